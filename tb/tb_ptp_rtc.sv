// Testbench for ptp_rtc: checks the time against a reference model through
// a second rollover, a programmed increment (frequency correction) with a
// fractional part, positive and negative time steps across a second boundary,
// and a direct set.
module tb_ptp_rtc;
  import fh_pkg::*;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  logic set_valid, inc_valid, step_valid;
  ptp_ts_t set_time, time_now;
  logic [39:0] inc_value, inc;
  logic signed [63:0] step_ns;
  logic [31:0] frac_ns;
  int checks = 0, failures = 0;

  ptp_rtc #(.CLK_PERIOD_NS(8)) dut (.*);

  // reference: total time in units of 2^-32 ns
  longint unsigned ref_sec;
  logic [95:0] ref_t;      // ns * 2^32 within the second
  logic [39:0] ref_inc;

  task automatic check(string what);
    checks++;
    if (time_now.sec !== 48'(ref_sec) || time_now.ns !== ref_t[95:32] || frac_ns !== ref_t[31:0]) begin
      failures++;
      $display("%s: rtc %0d.%09d frac %0h, ref %0d.%09d frac %0h", what, time_now.sec, time_now.ns, frac_ns,
               ref_sec, ref_t[95:32], ref_t[31:0]);
    end
  endtask

  task automatic tick(int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      ref_t = ref_t + 96'(ref_inc);
      if (ref_t[95:32] >= 1_000_000_000) begin ref_t[95:32] -= 1_000_000_000; ref_sec++; end
    end
  endtask

  initial begin
    set_valid = 0; inc_valid = 0; step_valid = 0; set_time = '0; inc_value = '0; step_ns = 0;
    ref_sec = 0; ref_t = 0; ref_inc = 40'd8 << 32;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    tick(1000); check("free run");
    // set near the end of a second
    set_time = '{sec: 48'd77, ns: 32'd999_999_000}; set_valid = 1;
    @(posedge clk); #1; set_valid = 0;
    ref_sec = 77; ref_t = {64'd999_999_000, 32'd0};
    check("set");
    tick(300); check("second rollover");
    // frequency correction: 8 ns minus a fraction (-50 ppm)
    inc_value = (40'd8 << 32) - 40'd1717987; inc_valid = 1;
    @(posedge clk); #1; inc_valid = 0;
    ref_t = ref_t + 96'(ref_inc); ref_inc = inc_value;
    check("inc load");
    checks++; if (inc !== inc_value) begin failures++; $display("inc readback"); end
    tick(5000); check("slow clock");
    // negative step across the second boundary
    step_ns = -64'sd50_000_000; step_valid = 1;
    @(posedge clk); #1; step_valid = 0;
    begin
      longint signed ns;
      ref_t = ref_t + 96'(ref_inc);
      ns = longint'(ref_t[95:32]) - 50_000_000;
      if (ns < 0) begin ns += 1_000_000_000; ref_sec--; end
      ref_t[95:32] = 64'(ns);
    end
    check("negative step");
    step_ns = 64'sd999_000_000; step_valid = 1;
    @(posedge clk); #1; step_valid = 0;
    begin
      longint signed ns;
      ref_t = ref_t + 96'(ref_inc);
      ns = longint'(ref_t[95:32]) + 999_000_000;
      if (ns >= 1_000_000_000) begin ns -= 1_000_000_000; ref_sec++; end
      ref_t[95:32] = 64'(ns);
    end
    check("positive step");
    tick(777); check("after steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
