// Testbench for freq_ma_filter: random signed samples at random times; once
// LEN samples have arrived, every output must equal the floor of the mean of
// the last LEN inputs (computed here from a reference list). A flush must
// empty the window: no output until LEN new samples.
module tb_freq_ma_filter;
  localparam int LEN = 16, W = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic flush, in_valid, out_valid, full;
  logic signed [W-1:0] in_data, avg;
  int checks = 0, failures = 0, outs = 0;
  longint hist[$];

  freq_ma_filter #(.LEN(LEN), .W(W)) dut (.*);

  task automatic push(longint v);
    in_data = W'(v); in_valid = 1;
    @(posedge clk); #1; in_valid = 0;
    hist.push_back(v);
    if (hist.size() >= LEN) begin
      longint s = 0;
      for (int i = hist.size() - LEN; i < hist.size(); i++) s += hist[i];
      checks++;
      if (!out_valid || avg !== W'(s >>> $clog2(LEN))) begin
        failures++; $display("avg %0d expected %0d (valid %0b)", avg, s >>> $clog2(LEN), out_valid);
      end
      outs++;
    end else begin
      checks++;
      if (out_valid) begin failures++; $display("output before the window was full"); end
    end
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1;
  endtask

  initial begin
    flush = 0; in_valid = 0; in_data = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 200; i++) push(longint'($urandom_range(0, 2000000)) - 1000000);
    flush = 1; @(posedge clk); #1; flush = 0; hist.delete();
    checks++; if (full) begin failures++; $display("full after flush"); end
    for (int i = 0; i < 100; i++) push(longint'($urandom_range(0, 400)) - 250);
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
