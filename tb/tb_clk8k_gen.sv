// Testbench for clk8k_gen: drives the nanosecond input like an RTC (plain
// counting, a time step, and a sweep of values) and checks that the output,
// one cycle later, is high exactly in the first 62500 ns of every 125 us
// period. Also counts rising edges in (0, 1 ms): the output starts high at
// ns 0 (counted as the first rising edge) and 7 more follow, one per 125 us.
module tb_clk8k_gen;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  logic [29:0] ns;
  logic clk_out;
  int checks = 0, failures = 0;
  logic exp_q;

  clk8k_gen #(.OUT_HZ(8000)) dut (.*);

  function automatic logic expect_of(logic [29:0] v);
    return ((v / 62500) % 2) == 0;
  endfunction

  int rises = 0;
  logic prev = 0;
  initial begin
    ns = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    // count at 8 ns per cycle for 1 ms
    for (int i = 0; i < 124999; i++) begin   // ns 8 .. 999992
      ns = (ns + 8 >= 1_000_000_000) ? ns + 8 - 1_000_000_000 : ns + 8;
      exp_q = expect_of(ns);
      @(posedge clk); #1;
      checks++;
      if (clk_out !== exp_q) begin failures++; if (failures < 5) $display("ns %0d out %0b", ns, clk_out); end
      if (clk_out && !prev) rises++;
      prev = clk_out;
    end
    checks++;
    if (rises != 8) begin failures++; $display("rising edges %0d, expected 8", rises); end
    // random values, including near 10^9
    for (int i = 0; i < 20000; i++) begin
      ns = (i % 2) ? 30'($urandom_range(0, 999_999_999)) : 30'(999_999_999 - $urandom_range(0, 200000));
      exp_q = expect_of(ns);
      @(posedge clk); #1;
      checks++;
      if (clk_out !== exp_q) begin failures++; if (failures < 10) $display("ns %0d out %0b", ns, clk_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
