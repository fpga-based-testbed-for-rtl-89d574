// End-to-end testbench for fh_top at reduced sizes: BBU and RRU on their
// own clocks (the RRU oscillator 50 ppm slow), joined by two switch models
// with 2 us latency and up to 16 ns of random packet delay variation (plus the
// variation from PTP frames queued behind IQ frames), IQ traffic at
// the CPRI profile-1 rate in both directions, PTP running the whole time.
// The RRU RTC starts 0.4 s behind the BBU. Phases:
//   1a. lock, PTP alone: the RRU must step its time and correct its rate
//      until its clock is within 100 ns of the BBU clock and its rate within
//      20 ppm; once locked the 8 kHz output must have a 125 us period (within
//      100 ns). The delay estimate must cover the 2 us switch latency plus
//      the frame time.
//   1b. IQ traffic on: IQ words must arrive in order, none lost, in both
//      directions; PTP frames must at times wait behind IQ frames, and the
//      clock must stay within 2 us (queueing adds delay variation that the
//      short SYNC interval of this bench turns into frequency noise).
//   2. burst: the BBU IQ source offers a word every cycle, beyond the link
//      rate, so the transmit queue must push back (flow control).
//   3. smoothing off: every SYNC must then correct the time.
//   4. servo off: the RRU clock runs free, no corrections.
//   5. receive overflow: the RRU DAC side stops taking data, the receive
//      queue must overflow and drop, and the lost basic frames must show up
//      as control-word errors.
// Each mechanism is counted; one that never happened is a failure.
module tb_fh_top;
  timeunit 1ns;
  timeprecision 1fs;
  import fh_pkg::*;

  localparam int SYNC_INT = 10000;
  logic bbu_clk = 0, rru_clk = 0, bbu_rst = 1, rru_rst = 1;
  always #4.0    bbu_clk = ~bbu_clk;
  always #4.0002 rru_clk = ~rru_clk;

  logic bbu_ptp_en, bbu_rtc_set_valid, rru_ptp_en, rru_servo_en, rru_smooth_en, rru_rtc_set_valid;
  ptp_ts_t bbu_rtc_set_time, rru_rtc_set_time, bbu_time, rru_time;
  logic [7:0] bbu_iq_in_data, bbu_iq_out_data, rru_iq_in_data, rru_iq_out_data;
  logic bbu_iq_in_valid, bbu_iq_in_ready, bbu_iq_out_valid, bbu_iq_out_ready;
  logic rru_iq_in_valid, rru_iq_in_ready, rru_iq_out_valid, rru_iq_out_ready;
  logic [7:0] bbu_mac_tx_tdata, bbu_mac_rx_tdata, rru_mac_tx_tdata, rru_mac_rx_tdata;
  logic bbu_mac_tx_tvalid, bbu_mac_tx_tready, bbu_mac_tx_tlast, bbu_mac_rx_tvalid, bbu_mac_rx_tlast;
  logic rru_mac_tx_tvalid, rru_mac_tx_tready, rru_mac_tx_tlast, rru_mac_rx_tvalid, rru_mac_rx_tlast;
  logic rru_clk_8k;
  node_stats_t bbu_stats, rru_stats;
  servo_status_t rru_servo;

  fh_top #(.BF_PER_FRAME(8), .TXQ_DEPTH(32), .RXQ_DEPTH(32), .SYNC_INTERVAL_CYC(SYNC_INT),
           .DREQ_EVERY(4), .TIME_BUF_LEN(8), .FREQ_MA_LEN(16)) dut (.*);

  int fwd_frames, rev_frames;
  eth_switch_model #(.LATENCY_NS(2000), .PDV_NS(16)) u_fwd (
    .in_clk(bbu_clk), .in_en(!bbu_rst), .in_tdata(bbu_mac_tx_tdata), .in_tvalid(bbu_mac_tx_tvalid),
    .in_tready(bbu_mac_tx_tready), .in_tlast(bbu_mac_tx_tlast),
    .out_clk(rru_clk), .out_tdata(rru_mac_rx_tdata), .out_tvalid(rru_mac_rx_tvalid),
    .out_tlast(rru_mac_rx_tlast), .frames(fwd_frames));
  eth_switch_model #(.LATENCY_NS(2000), .PDV_NS(16)) u_rev (
    .in_clk(rru_clk), .in_en(!rru_rst), .in_tdata(rru_mac_tx_tdata), .in_tvalid(rru_mac_tx_tvalid),
    .in_tready(rru_mac_tx_tready), .in_tlast(rru_mac_tx_tlast),
    .out_clk(bbu_clk), .out_tdata(bbu_mac_rx_tdata), .out_tvalid(bbu_mac_rx_tvalid),
    .out_tlast(bbu_mac_rx_tlast), .frames(rev_frames));

  int checks = 0, failures = 0, phase = 0;
  bit iq_on = 0;

  // ---------------- IQ sources (profile 1: 15 bytes per 1/3.84 MHz = 0.46 byte/cycle)
  logic [7:0] bbu_src_n, rru_src_n, bbu_exp, rru_exp;
  int bbu_words = 0, rru_words = 0;
  always @(posedge bbu_clk) begin
    if (bbu_rst) begin bbu_iq_in_valid <= 0; bbu_src_n <= 0; end
    else begin
      if (bbu_iq_in_valid && bbu_iq_in_ready) bbu_src_n <= bbu_src_n + 1;
      if (!bbu_iq_in_valid || bbu_iq_in_ready)
        bbu_iq_in_valid <= (phase == 2) || (iq_on && $urandom_range(0, 99) < 46);
    end
  end
  assign bbu_iq_in_data = bbu_src_n;
  always @(posedge rru_clk) begin
    if (rru_rst) begin rru_iq_in_valid <= 0; rru_src_n <= 0; end
    else begin
      if (rru_iq_in_valid && rru_iq_in_ready) rru_src_n <= rru_src_n + 1;
      if (!rru_iq_in_valid || rru_iq_in_ready)
        rru_iq_in_valid <= iq_on && ($urandom_range(0, 99) < 46);
    end
  end
  assign rru_iq_in_data = rru_src_n;

  // ---------------- IQ sinks and order checks
  always @(posedge rru_clk) rru_iq_out_ready <= (phase != 5);
  assign bbu_iq_out_ready = 1'b1;
  always @(posedge rru_clk) if (!rru_rst && rru_iq_out_valid && rru_iq_out_ready && phase < 5) begin
    checks++;
    if (rru_iq_out_data !== rru_exp) begin
      failures++;
      if (failures < 10) $display("RRU got IQ %0h expected %0h", rru_iq_out_data, rru_exp);
    end
    rru_exp = rru_iq_out_data + 1;
    rru_words++;
  end
  always @(posedge bbu_clk) if (!bbu_rst && bbu_iq_out_valid && bbu_iq_out_ready) begin
    checks++;
    if (bbu_iq_out_data !== bbu_exp) begin
      failures++;
      if (failures < 10) $display("BBU got IQ %0h expected %0h", bbu_iq_out_data, bbu_exp);
    end
    bbu_exp = bbu_iq_out_data + 1;
    bbu_words++;
  end

  // ---------------- 8 kHz output
  realtime last_rise = 0;
  bit locked = 0;
  int rises = 0, bad_period = 0;
  always @(posedge rru_clk_8k) begin
    if (phase == 1 && locked && last_rise > 0) begin
      rises++;
      if ($realtime - last_rise < 124_900 || $realtime - last_rise > 125_100) bad_period++;
    end
    last_rise = $realtime;
  end

  function automatic longint time_err();
    return ts_diff(rru_time, bbu_time);
  endfunction

  task automatic wait_syncs(int n);
    repeat (n * SYNC_INT) @(posedge bbu_clk);
  endtask

  int tc0, fc0, mech_stalls, mech_ovf, mech_cw, mech_unsmoothed, mech_free;
  longint err;
  initial begin
    bbu_exp = 0; rru_exp = 0;
    bbu_ptp_en = 0; rru_ptp_en = 0; rru_servo_en = 1; rru_smooth_en = 1;
    bbu_rtc_set_valid = 0; rru_rtc_set_valid = 0;
    bbu_rtc_set_time = '{sec: 48'd1000, ns: 32'd400_000_000};
    rru_rtc_set_time = '{sec: 48'd1000, ns: 32'd0};
    repeat (5) @(posedge bbu_clk);
    bbu_rst = 0; rru_rst = 0;
    // software sets the clocks and starts PTP
    @(posedge bbu_clk); bbu_rtc_set_valid = 1; @(posedge bbu_clk); bbu_rtc_set_valid = 0;
    @(posedge rru_clk); rru_rtc_set_valid = 1; @(posedge rru_clk); rru_rtc_set_valid = 0;
    bbu_ptp_en = 1; rru_ptp_en = 1;
    phase = 1;                                  // 1a: PTP alone
    wait_syncs(60);
    locked = 1;                                 // 8 kHz periods measured from here
    wait_syncs(40);
    err = time_err();
    $display("phase 1a: time error %0d ns, delay estimate %0d ns, %0d time / %0d frequency corrections, inc %f ns",
             err, rru_servo.delay_est, rru_servo.time_corrections, rru_servo.freq_corrections,
             real'(dut.u_rru.inc_now) / 4294967296.0);
    checks++; if (err > 100 || err < -100) begin failures++; $display("not locked"); end
    checks++; if (dut.u_rru.inc_now < 40'(longint'(8.0004 * 4294967296.0 * (1 - 20e-6))) ||
                  dut.u_rru.inc_now > 40'(longint'(8.0004 * 4294967296.0 * (1 + 20e-6)))) begin
      failures++; $display("rate not corrected to within 20 ppm");
    end
    checks++; if (rru_servo.time_corrections < 3 || rru_servo.freq_corrections < 3) begin failures++; $display("too few corrections"); end
    checks++; if (rru_servo.delay_est < 2000 || rru_servo.delay_est > 2700) begin failures++; $display("delay estimate off"); end
    checks++; if (rises < 10 || bad_period != 0) begin failures++; $display("8 kHz: %0d rises, %0d bad periods", rises, bad_period); end
    locked = 0;
    iq_on = 1;                                  // 1b: IQ traffic shares the link
    wait_syncs(50);
    err = time_err();
    $display("phase 1b: time error %0d ns with IQ traffic", err);
    checks++; if (err > 2000 || err < -2000) begin failures++; $display("lost lock under traffic"); end
    checks++; if (rru_words < 10000 || bbu_words < 10000) begin failures++; $display("IQ words %0d %0d", rru_words, bbu_words); end
    checks++; if (bbu_stats.cw_errors != 0 || rru_stats.cw_errors != 0) begin failures++; $display("basic frames lost"); end
    checks++; if (rru_stats.ptp_waits == 0 && bbu_stats.ptp_waits == 0) begin failures++; $display("PTP never waited behind IQ"); end

    phase = 2;                                  // flow control
    wait_syncs(4);
    mech_stalls = bbu_stats.txq_stalls;
    checks++; if (mech_stalls == 0) begin failures++; $display("transmit queue never pushed back"); end

    phase = 3;                                  // smoothing off
    repeat (300) @(posedge bbu_clk);
    rru_smooth_en = 0;
    tc0 = rru_servo.time_corrections;
    wait_syncs(12);
    mech_unsmoothed = rru_servo.time_corrections - tc0;
    checks++; if (mech_unsmoothed < 10) begin failures++; $display("unsmoothed corrections %0d", mech_unsmoothed); end
    rru_smooth_en = 1;

    phase = 4;                                  // free running
    rru_servo_en = 0;
    tc0 = rru_servo.time_corrections + rru_servo.freq_corrections;
    wait_syncs(20);
    mech_free = (rru_servo.time_corrections + rru_servo.freq_corrections == tc0);
    checks++; if (!mech_free) begin failures++; $display("corrections while the servo is off"); end
    rru_servo_en = 1;

    phase = 5;                                  // receive overflow
    wait_syncs(6);
    phase = 6;
    wait_syncs(2);
    mech_ovf = rru_stats.rxq_overflows;
    mech_cw  = rru_stats.cw_errors;
    checks++; if (mech_ovf == 0) begin failures++; $display("receive queue never overflowed"); end
    checks++; if (mech_cw == 0) begin failures++; $display("lost frames not detected"); end
    checks++; if (rru_stats.bad_frames != 0 || bbu_stats.bad_frames != 0) begin failures++; $display("bad frames"); end
    checks++; if (rru_stats.resp_mismatch != 0) begin failures++; $display("response mismatch"); end

    $display("mechanisms: syncs=%0d exchanges>=%0d ptp_waits=%0d/%0d txq_stalls=%0d unsmoothed=%0d free_run=%0d rxq_overflows=%0d cw_errors=%0d 8k_rises=%0d",
             rru_stats.ptp_rcvd, rru_servo.time_corrections, bbu_stats.ptp_waits, rru_stats.ptp_waits,
             mech_stalls, mech_unsmoothed, mech_free, mech_ovf, mech_cw, rises);
    $display("traffic: %0d frames BBU->RRU, %0d RRU->BBU, IQ words %0d / %0d", fwd_frames, rev_frames, rru_words, bbu_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8_000_000) @(posedge bbu_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
