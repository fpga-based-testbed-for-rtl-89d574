// Testbench for time_offset_filter: random signed offsets; after every LEN
// samples exactly one output must appear, equal to the floor of their mean,
// and none in between. In bypass every sample must come straight out.
module tb_time_offset_filter;
  localparam int LEN = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic clear, bypass, in_valid, out_valid;
  logic signed [63:0] in_data, out_data;
  logic [$clog2(LEN):0] fill;
  int checks = 0, failures = 0;
  longint acc = 0;
  int n = 0;

  time_offset_filter #(.LEN(LEN), .W(64)) dut (.*);

  task automatic push(longint v);
    in_data = v; in_valid = 1;
    @(posedge clk); #1; in_valid = 0;
    checks++;
    if (bypass) begin
      if (!out_valid || out_data !== v) begin failures++; $display("bypass: %0d vs %0d", out_data, v); end
    end else begin
      acc += v; n++;
      if (n == LEN) begin
        if (!out_valid || out_data !== (acc >>> $clog2(LEN))) begin
          failures++; $display("mean %0d expected %0d", out_data, acc >>> $clog2(LEN));
        end
        acc = 0; n = 0;
      end else if (out_valid) begin failures++; $display("early output"); end
    end
    repeat ($urandom_range(0, 2)) @(posedge clk);
    #1;
  endtask

  initial begin
    clear = 0; bypass = 0; in_valid = 0; in_data = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 10 * LEN; i++) push(longint'($urandom_range(0, 100000)) - 60000);
    bypass = 1;
    for (int i = 0; i < 20; i++) push(longint'($urandom_range(0, 100000)) - 50000);
    bypass = 0;
    for (int i = 0; i < 3 * LEN; i++) push(longint'($urandom_range(0, 1000000)) - 500000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
