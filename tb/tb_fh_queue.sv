// Testbench for fh_queue: random pushes and pops against a reference queue,
// checking order, fill level, back-pressure when full and the overflow
// counter for words offered while full.
module tb_fh_queue;
  localparam int W = 16, D = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [W-1:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [$clog2(D):0] count;
  logic [31:0] overflows;
  int checks = 0, failures = 0, exp_ovf = 0, full_seen = 0;
  logic [W-1:0] model[$];

  fh_queue #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 99) < ((i / 500) % 2 ? 80 : 30));
      in_data   = W'($urandom);
      out_ready = ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 80));
      // compare before the edge
      checks++;
      if (count !== ($clog2(D)+1)'(model.size())) begin failures++; $display("count %0d vs %0d", count, model.size()); end
      checks++;
      if (in_ready !== (model.size() < D)) begin failures++; $display("in_ready wrong"); end
      if (out_valid) begin
        checks++;
        if (out_data !== model[0]) begin failures++; $display("data %0h vs %0h", out_data, model[0]); end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && model.size() + ((out_valid && out_ready) ? 1 : 0) < D + ((out_valid && out_ready) ? 1 : 0)
          && in_ready) model.push_back(in_data);
      else if (in_valid) begin exp_ovf++; full_seen++; end
    end
    @(negedge clk);
    checks++;
    if (overflows !== 32'(exp_ovf)) begin failures++; $display("overflows %0d vs %0d", overflows, exp_ovf); end
    checks++;
    if (full_seen == 0) begin failures++; $display("queue never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
