// Testbench for ptp_servo, closed loop: the slave clock is a ptp_rtc running
// at the nominal 8 ns per cycle while the master's time advances 8.0004 ns
// per cycle (the slave oscillator is 50 ppm slow) and starts 40 us ahead.
// The bench plays the PTP engine: every SYNC_INT cycles it reports
// (t1 = master time, t2 = slave time LINK cycles later) and every 4th SYNC a
// delay exchange. The servo's steps and increments drive the slave RTC.
// Checks:
//   * delay and offset estimates equal eq. (1) and (2) on the reported
//     timestamps, exactly;
//   * after locking, the slave increment is within 1 ppm of 8.0004 ns and the
//     slave time within 40 ns of the master;
//   * with smoothing off, a time correction follows every SYNC;
//   * with the servo off, no correction is made and the clocks drift apart.
module tb_ptp_servo;
  import fh_pkg::*;
  localparam int SYNC_INT = 10000, LINK = 50;
  localparam real MASTER_NS = 8.0004;

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  logic servo_en, smooth_en, sync_valid, delay_valid, step_valid, inc_valid, freq_window_full;
  ptp_ts_t t1, t2, d1, d2, d3, d4, s_time;
  logic [39:0] inc_now, inc_value;
  logic signed [63:0] step_ns, delay_est, offset_est;
  logic signed [31:0] freq_est;
  logic [31:0] time_corr, freq_corr, frac_unused;
  logic [3:0] fill;

  ptp_servo #(.TIME_BUF_LEN(8), .FREQ_MA_LEN(16)) dut (
    .clk, .rst, .servo_en, .smooth_en, .sync_valid, .sync_t1(t1), .sync_t2(t2),
    .delay_valid, .d_t1(d1), .d_t2(d2), .d_t3(d3), .d_t4(d4), .t3_stamp(1'b0), .inc_now,
    .step_valid, .step_ns, .inc_valid, .inc_value, .delay_est, .offset_est, .freq_est,
    .time_corrections(time_corr), .freq_corrections(freq_corr),
    .time_buf_fill(fill), .freq_window_full);

  ptp_rtc #(.CLK_PERIOD_NS(8)) u_slave_rtc (
    .clk, .rst, .set_valid(1'b0), .set_time('0), .inc_valid, .inc_value,
    .step_valid, .step_ns, .time_now(s_time), .frac_ns(frac_unused), .inc(inc_now));

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  function automatic ptp_ts_t mk(longint t);
    ptp_ts_t r; r.sec = 48'(t / 1_000_000_000); r.ns = 32'(t % 1_000_000_000); return r;
  endfunction
  function automatic ptp_ts_t master_at(longint c);
    return mk(40_000 + longint'($floor(real'(c) * MASTER_NS)));
  endfunction

  int checks = 0, failures = 0;
  int n_sync = 0;
  logic signed [63:0] exp_d;
  ptp_ts_t c_t1, c_t2;

  task automatic do_sync(bit with_delay);
    ptp_ts_t a, b, c, d;
    a = master_at(cyc);
    repeat (LINK) @(posedge clk);
    #1 b = s_time;
    if (with_delay) begin
      repeat (20) @(posedge clk);
      #1 c = s_time;
      d = master_at(cyc + LINK);
    end
    @(negedge clk);
    if (with_delay) begin
      // the exchange completes before the SYNC is reported, so the offset
      // uses this delay
      d1 = a; d2 = b; d3 = c; d4 = d; delay_valid = 1;
      @(negedge clk);
      delay_valid = 0;
    end
    t1 = a; t2 = b; sync_valid = 1;
    @(negedge clk);
    sync_valid = 0;
    if (with_delay) begin
      exp_d = (ts_diff(d, a) - ts_diff(c, b)) >>> 1;
      checks++;
      if (delay_est !== exp_d) begin failures++; $display("delay_est %0d expected %0d", delay_est, exp_d); end
      checks++;
      if (offset_est !== ts_diff(b, a) - exp_d) begin failures++; $display("offset_est %0d expected %0d", offset_est, ts_diff(b, a) - exp_d); end
    end
    n_sync++;
  endtask

  task automatic run_syncs(int n);
    for (int i = 0; i < n; i++) begin
      do_sync(n_sync % 4 == 0);
      while (cyc % SYNC_INT != 0) @(posedge clk);
    end
  endtask

  longint err;
  int tc0;
  initial begin
    servo_en = 1; smooth_en = 1; sync_valid = 0; delay_valid = 0;
    t1 = '0; t2 = '0; d1 = '0; d2 = '0; d3 = '0; d4 = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    run_syncs(200);
    // locked?
    checks++;
    if (inc_now < 40'(longint'(8.0004 * 4294967296.0 * (1 - 1e-6))) ||
        inc_now > 40'(longint'(8.0004 * 4294967296.0 * (1 + 1e-6)))) begin
      failures++; $display("increment %f ns", real'(inc_now) / 4294967296.0);
    end
    err = ts_diff(s_time, master_at(cyc));
    checks++;
    if (err > 40 || err < -40) begin failures++; $display("time error %0d ns", err); end
    checks++;
    if (freq_corr < 5 || time_corr < 5) begin failures++; $display("corrections %0d %0d", freq_corr, time_corr); end
    $display("locked: inc %f ns, time error %0d ns, %0d time and %0d frequency corrections",
             real'(inc_now) / 4294967296.0, err, time_corr, freq_corr);
    // smoothing off: every SYNC corrects the time
    smooth_en = 0;
    tc0 = time_corr;
    run_syncs(10);
    checks++;
    if (time_corr - tc0 != 10) begin failures++; $display("unsmoothed corrections %0d", time_corr - tc0); end
    // free running: force a frequency error, no corrections may follow
    servo_en = 0;
    tc0 = time_corr + freq_corr;
    @(negedge clk);
    force u_slave_rtc.inc = 40'd8 << 32;
    run_syncs(40);
    release u_slave_rtc.inc;
    checks++;
    if (time_corr + freq_corr != tc0) begin failures++; $display("servo off but corrections made"); end
    err = ts_diff(s_time, master_at(cyc));
    checks++;
    if (err > -100) begin failures++; $display("free-running error only %0d ns", err); end
    $display("free running drift: %0d ns", err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
