// Full-size testbench: fh_top with every parameter at its default (8-bit
// CPRI words, 32 basic frames per Ethernet frame, SYNC every 976,562 cycles
// = 128/s at 125 MHz, delay exchange every 16th SYNC, 256-sample time buffer,
// 128-sample frequency moving average). BBU and RRU run on their own clocks
// (RRU 50 ppm slow), joined by two switch models with 2 us latency and 16 ns
// of delay variation, IQ at the CPRI profile-1 rate both ways.
// Three SYNC intervals (about 24 ms) are simulated: long enough for the first
// delay exchange and offset samples, far too short for the 256-sample buffer
// to fill, so no correction is expected yet. Checks: IQ order both ways, the
// delay estimate, each offset estimate against the true clock difference,
// the SYNC interval, fill of the time buffer, frame counters. PTP frames that
// meet a 526-byte IQ frame in a switch wait up to about 4.2 us, so the
// tolerances on interval, delay and offset are a few microseconds: this is
// the packet delay variation the buffer and moving average exist to filter.
module tb_fh_top_full;
  timeunit 1ns;
  timeprecision 1fs;
  import fh_pkg::*;

  localparam int SYNC_INT = 976_562;
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

  fh_top dut (.*);

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

  int checks = 0, failures = 0;

  // IQ sources at the profile-1 rate (0.46 byte per cycle)
  logic [7:0] bbu_src_n, rru_src_n, bbu_exp, rru_exp;
  int bbu_words = 0, rru_words = 0;
  always @(posedge bbu_clk) begin
    if (bbu_rst) begin bbu_iq_in_valid <= 0; bbu_src_n <= 0; end
    else begin
      if (bbu_iq_in_valid && bbu_iq_in_ready) bbu_src_n <= bbu_src_n + 1;
      if (!bbu_iq_in_valid || bbu_iq_in_ready) bbu_iq_in_valid <= ($urandom_range(0, 99) < 46);
    end
  end
  assign bbu_iq_in_data = bbu_src_n;
  always @(posedge rru_clk) begin
    if (rru_rst) begin rru_iq_in_valid <= 0; rru_src_n <= 0; end
    else begin
      if (rru_iq_in_valid && rru_iq_in_ready) rru_src_n <= rru_src_n + 1;
      if (!rru_iq_in_valid || rru_iq_in_ready) rru_iq_in_valid <= ($urandom_range(0, 99) < 46);
    end
  end
  assign rru_iq_in_data = rru_src_n;
  assign rru_iq_out_ready = 1'b1;
  assign bbu_iq_out_ready = 1'b1;

  always @(posedge rru_clk) if (!rru_rst && rru_iq_out_valid) begin
    checks++;
    if (rru_iq_out_data !== rru_exp) begin
      failures++;
      if (failures < 10) $display("RRU got IQ %0h expected %0h", rru_iq_out_data, rru_exp);
    end
    rru_exp = rru_iq_out_data + 1;
    rru_words++;
  end
  always @(posedge bbu_clk) if (!bbu_rst && bbu_iq_out_valid) begin
    checks++;
    if (bbu_iq_out_data !== bbu_exp) begin
      failures++;
      if (failures < 10) $display("BBU got IQ %0h expected %0h", bbu_iq_out_data, bbu_exp);
    end
    bbu_exp = bbu_iq_out_data + 1;
    bbu_words++;
  end

  // each offset estimate against the true clock difference at that moment
  int n_sync = 0, n_offset = 0;
  realtime last_sync = 0;
  always @(posedge rru_clk) if (!rru_rst && dut.u_rru.sync_valid) begin
    if (n_sync > 0) begin
      checks++;
      if ($realtime - last_sync < SYNC_INT * 8.0 - 5000 || $realtime - last_sync > SYNC_INT * 8.0 + 5000) begin
        failures++; $display("SYNC interval %0f ns", $realtime - last_sync);
      end
    end
    last_sync = $realtime;
    n_sync++;
    #1;
    if (rru_servo.time_corrections == 0 && dut.u_rru.g_slave.u_servo.d_known) begin
      n_offset++; checks++;
      if (rru_servo.offset_est - ts_diff(rru_time, bbu_time) > 3000 ||
          rru_servo.offset_est - ts_diff(rru_time, bbu_time) < -3000) begin
        failures++;
        $display("offset estimate %0d, true %0d", rru_servo.offset_est, ts_diff(rru_time, bbu_time));
      end
    end
  end

  initial begin
    bbu_exp = 0; rru_exp = 0;
    bbu_ptp_en = 0; rru_ptp_en = 0; rru_servo_en = 1; rru_smooth_en = 1;
    bbu_rtc_set_valid = 0; rru_rtc_set_valid = 0;
    bbu_rtc_set_time = '{sec: 48'd1000, ns: 32'd300_000};
    rru_rtc_set_time = '{sec: 48'd1000, ns: 32'd0};
    repeat (5) @(posedge bbu_clk);
    bbu_rst = 0; rru_rst = 0;
    @(posedge bbu_clk); bbu_rtc_set_valid = 1; @(posedge bbu_clk); bbu_rtc_set_valid = 0;
    @(posedge rru_clk); rru_rtc_set_valid = 1; @(posedge rru_clk); rru_rtc_set_valid = 0;
    bbu_ptp_en = 1; rru_ptp_en = 1;
    repeat (3 * SYNC_INT + 20000) @(posedge bbu_clk);

    $display("syncs %0d, delay estimate %0d ns, offset %0d ns (true %0d), buffer fill %0d",
             n_sync, rru_servo.delay_est, rru_servo.offset_est, ts_diff(rru_time, bbu_time),
             dut.u_rru.g_slave.u_servo.time_buf_fill);
    $display("frames %0d / %0d, IQ words %0d / %0d", bbu_stats.fh_frames_rcvd, rru_stats.fh_frames_rcvd,
             rru_words, bbu_words);
    checks++; if (n_sync != 3) begin failures++; $display("SYNCs seen %0d", n_sync); end
    // switch latency + PTP frame store-and-forward time (68 bytes) + MAC
    // pipeline, plus up to one 526-byte IQ frame of queueing in a switch
    checks++; if (rru_servo.delay_est < 2000 || rru_servo.delay_est > 7000) begin failures++; $display("delay estimate"); end
    checks++; if (n_offset < 2) begin failures++; $display("offset estimates %0d", n_offset); end
    checks++; if (rru_servo.time_corrections != 0 || rru_servo.freq_corrections != 0) begin failures++; $display("early correction"); end
    checks++; if (dut.u_rru.g_slave.u_servo.time_buf_fill != 32'(n_offset)) begin failures++; $display("buffer fill"); end
    checks++; if (rru_words < 1_200_000 || bbu_words < 1_200_000) begin failures++; $display("too few IQ words"); end
    checks++; if (bbu_stats.bad_frames != 0 || rru_stats.bad_frames != 0 || rru_stats.cw_errors != 0 ||
                  bbu_stats.cw_errors != 0 || rru_stats.rxq_overflows != 0 || bbu_stats.rxq_overflows != 0)
      begin failures++; $display("frame losses"); end
    checks++; if (rru_stats.resp_mismatch != 0 || bbu_stats.ptp_rcvd != 1) begin failures++; $display("PTP counters"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
