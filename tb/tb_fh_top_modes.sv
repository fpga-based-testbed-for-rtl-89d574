// Servo-mode comparison: four copies of the whole design run side by side,
// as in the phase-noise comparisons of the reference testbed, with the
// 8 kHz output's period jitter (standard deviation of its period) used as a
// time-domain stand-in for phase noise:
//   A: smoothing on,  one hop       C: servo off (free running), one hop
//   B: smoothing off, one hop       D: smoothing on, two hops
// Each direction of each hop adds 2 us of latency and 0..400 ns of random
// delay variation; SYNC every 400 us, delay exchange every 4th SYNC, an
// 8-sample time buffer and a 32-sample frequency average (reduced sizes).
// After 60 SYNCs the 8 kHz edges are measured for 100 SYNC intervals (40 ms).
// Checks, taken from the comparisons the design is meant to reproduce:
//   * the free-running clock has the least jitter (C < A) but loses time
//     alignment (its 50 ppm rate error accumulates), while A, B, D stay
//     aligned to the BBU within 1 us;
//   * applying every raw offset (B) gives more jitter than the buffered mean
//     (A);
//   * the second hop doubles the delay estimate, and D stays locked.
module tb_fh_top_modes;
  timeunit 1ns;
  timeprecision 1fs;
  localparam int SYNC_INT = 50000;

  logic bbu_clk = 0, rru_clk = 0, rst = 1, measure = 0;
  always #4.0    bbu_clk = ~bbu_clk;
  always #4.0002 rru_clk = ~rru_clk;

  int     n[4], tc[4];
  real    pm[4], ps[4], ph[4];
  longint de[4], te[4];

  fh_mode_bench #(.HOPS(1), .SMOOTH(1), .SERVO(1), .SYNC_INT(SYNC_INT)) u_a (
    .bbu_clk, .rru_clk, .rst, .measure, .periods(n[0]), .period_mean(pm[0]), .period_std(ps[0]),
    .phase_mean(ph[0]), .delay_est(de[0]), .time_error(te[0]), .time_corrections(tc[0]));
  fh_mode_bench #(.HOPS(1), .SMOOTH(0), .SERVO(1), .SYNC_INT(SYNC_INT)) u_b (
    .bbu_clk, .rru_clk, .rst, .measure, .periods(n[1]), .period_mean(pm[1]), .period_std(ps[1]),
    .phase_mean(ph[1]), .delay_est(de[1]), .time_error(te[1]), .time_corrections(tc[1]));
  fh_mode_bench #(.HOPS(1), .SMOOTH(1), .SERVO(0), .SYNC_INT(SYNC_INT)) u_c (
    .bbu_clk, .rru_clk, .rst, .measure, .periods(n[2]), .period_mean(pm[2]), .period_std(ps[2]),
    .phase_mean(ph[2]), .delay_est(de[2]), .time_error(te[2]), .time_corrections(tc[2]));
  fh_mode_bench #(.HOPS(2), .SMOOTH(1), .SERVO(1), .SYNC_INT(SYNC_INT)) u_d (
    .bbu_clk, .rru_clk, .rst, .measure, .periods(n[3]), .period_mean(pm[3]), .period_std(ps[3]),
    .phase_mean(ph[3]), .delay_est(de[3]), .time_error(te[3]), .time_corrections(tc[3]));

  int checks = 0, failures = 0;
  string name[4] = '{"A smoothing on ", "B smoothing off", "C free running ", "D two hops     "};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5) @(posedge bbu_clk);
    rst = 0;
    repeat (60 * SYNC_INT) @(posedge bbu_clk);
    measure = 1;
    repeat (100 * SYNC_INT) @(posedge bbu_clk);
    for (int i = 0; i < 4; i++)
      $display("%s: %0d periods, mean %.2f ns, jitter %.2f ns rms, phase %.1f ns, delay %0d ns, time error %0d ns, %0d steps",
               name[i], n[i], pm[i], ps[i], ph[i], de[i], te[i], tc[i]);
    for (int i = 0; i < 4; i++) check(n[i] >= 300, "too few 8 kHz periods");
    check(ps[2] < ps[0], "free-running jitter not below locked jitter");
    check(ps[0] < ps[1], "smoothing does not reduce jitter");
    check(te[2] < -300 || te[2] > 300, "free-running clock stayed aligned");
    check(tc[2] == 0, "free-running clock was corrected");
    for (int i = 0; i < 4; i++)
      if (i != 2) check(te[i] > -1000 && te[i] < 1000 && ph[i] > -1000 && ph[i] < 1000, "locked clock not aligned");
    check(de[0] > 2000 && de[0] < 2800, "one-hop delay estimate");
    check(de[3] > 4100 && de[3] < 5400, "two-hop delay estimate");
    check(ps[3] < 3.0 * ps[0] + 20.0, "two-hop jitter far above one-hop jitter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * SYNC_INT) @(posedge bbu_clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
