// Testbench for fh_node: a BBU-configured node (PTP master) and an
// RRU-configured node (PTP slave) on one clock, their MAC ports joined back
// to back through a fixed 40-cycle pipe that stands for MACs and cable.
// IQ words flow both ways at the CPRI profile-1 rate. The slave RTC starts
// 0.25 s behind; with one clock there is no frequency offset, so the servo
// must bring the time error to within 16 ns and keep the rate at 8 ns.
// Checks IQ order in both directions, the delay estimate (the pipe plus the
// PTP frame: 40 cycles = 320 ns, timestamps taken at the first byte), the
// 8 kHz output period, and the frame counters.
module tb_fh_node;
  import fh_pkg::*;
  localparam int LINK = 40, SYNC_INT = 4000;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  logic [7:0] m_iq_in, m_iq_out, s_iq_in, s_iq_out;
  logic m_in_v, m_in_r, m_out_v, s_in_v, s_in_r, s_out_v;
  logic [7:0] m_tx, s_tx, m_rx, s_rx;
  logic m_txv, m_txl, s_txv, s_txl, m_rxv, m_rxl, s_rxv, s_rxl;
  ptp_ts_t m_time, s_time, set_m, set_s;
  logic m_set, s_set, m_clk8k, s_clk8k;
  node_stats_t m_stats, s_stats;
  servo_status_t m_servo, s_servo;

  fh_node #(.IS_MASTER(1), .BF_PER_FRAME(4), .TXQ_DEPTH(16), .RXQ_DEPTH(16),
            .SYNC_INTERVAL_CYC(SYNC_INT), .DREQ_EVERY(2), .TIME_BUF_LEN(4), .FREQ_MA_LEN(4),
            .OWN_MAC(MAC_BBU), .PEER_MAC(MAC_RRU), .PORT_ID(80'h0200_00FF_FE00_0BB0_0001)) u_m (
    .clk, .rst, .ptp_en(1'b1), .servo_en(1'b0), .smooth_en(1'b0), .rtc_set_valid(m_set), .rtc_set_time(set_m),
    .iq_in_data(m_iq_in), .iq_in_valid(m_in_v), .iq_in_ready(m_in_r),
    .iq_out_data(m_iq_out), .iq_out_valid(m_out_v), .iq_out_ready(1'b1),
    .mac_tx_tdata(m_tx), .mac_tx_tvalid(m_txv), .mac_tx_tready(1'b1), .mac_tx_tlast(m_txl),
    .mac_rx_tdata(m_rx), .mac_rx_tvalid(m_rxv), .mac_rx_tlast(m_rxl),
    .rtc_time(m_time), .clk_out(m_clk8k), .stats(m_stats), .servo(m_servo));

  fh_node #(.IS_MASTER(0), .BF_PER_FRAME(4), .TXQ_DEPTH(16), .RXQ_DEPTH(16),
            .SYNC_INTERVAL_CYC(SYNC_INT), .DREQ_EVERY(2), .TIME_BUF_LEN(4), .FREQ_MA_LEN(4),
            .OWN_MAC(MAC_RRU), .PEER_MAC(MAC_BBU), .PORT_ID(80'h0200_00FF_FE00_0AA0_0001)) u_s (
    .clk, .rst, .ptp_en(1'b1), .servo_en(1'b1), .smooth_en(1'b1), .rtc_set_valid(s_set), .rtc_set_time(set_s),
    .iq_in_data(s_iq_in), .iq_in_valid(s_in_v), .iq_in_ready(s_in_r),
    .iq_out_data(s_iq_out), .iq_out_valid(s_out_v), .iq_out_ready(1'b1),
    .mac_tx_tdata(s_tx), .mac_tx_tvalid(s_txv), .mac_tx_tready(1'b1), .mac_tx_tlast(s_txl),
    .mac_rx_tdata(s_rx), .mac_rx_tvalid(s_rxv), .mac_rx_tlast(s_rxl),
    .rtc_time(s_time), .clk_out(s_clk8k), .stats(s_stats), .servo(s_servo));

  // back-to-back link
  logic [9:0] m2s[LINK], s2m[LINK];
  always @(posedge clk) begin
    for (int i = LINK - 1; i > 0; i--) begin m2s[i] <= m2s[i-1]; s2m[i] <= s2m[i-1]; end
    m2s[0] <= {!rst && m_txv, m_txl, m_tx};
    s2m[0] <= {!rst && s_txv, s_txl, s_tx};
  end
  assign {s_rxv, s_rxl, s_rx} = m2s[LINK-1];
  assign {m_rxv, m_rxl, m_rx} = s2m[LINK-1];

  initial for (int i = 0; i < LINK; i++) begin m2s[i] = '0; s2m[i] = '0; end

  // IQ sources and checks
  logic [7:0] m_n, s_n, m_exp, s_exp;
  int m_words = 0, s_words = 0, checks = 0, failures = 0;
  always @(posedge clk) begin
    if (rst) begin m_n <= 0; s_n <= 0; m_in_v <= 0; s_in_v <= 0; end
    else begin
      if (m_in_v && m_in_r) m_n <= m_n + 1;
      if (s_in_v && s_in_r) s_n <= s_n + 1;
      if (!m_in_v || m_in_r) m_in_v <= ($urandom_range(0, 99) < 40);
      if (!s_in_v || s_in_r) s_in_v <= ($urandom_range(0, 99) < 40);
    end
  end
  assign m_iq_in = m_n;
  assign s_iq_in = s_n;
  always @(posedge clk) if (!rst) begin
    if (s_out_v) begin
      checks++; if (s_iq_out !== s_exp) begin failures++; if (failures < 5) $display("slave IQ %0h exp %0h", s_iq_out, s_exp); end
      s_exp = s_iq_out + 1; s_words++;
    end
    if (m_out_v) begin
      checks++; if (m_iq_out !== m_exp) begin failures++; if (failures < 5) $display("master IQ %0h exp %0h", m_iq_out, m_exp); end
      m_exp = m_iq_out + 1; m_words++;
    end
  end

  // 8 kHz period once locked
  longint cyc = 0, last_rise = 0;
  int rises = 0, bad = 0;
  bit measure = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge s_clk8k) begin
    if (measure && last_rise > 0) begin
      rises++;
      if (cyc - last_rise < 15625 - 2 || cyc - last_rise > 15625 + 2) begin bad++; $display("8 kHz period %0d cycles", cyc - last_rise); end
    end
    last_rise = cyc;
  end

  longint err;

  initial begin
    m_exp = 0; s_exp = 0; m_set = 0; s_set = 0;
    set_m = '{sec: 48'd10, ns: 32'd250_000_000};
    set_s = '{sec: 48'd10, ns: 32'd0};
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); m_set <= 1; s_set <= 1;
    @(posedge clk); m_set <= 0; s_set <= 0;
    repeat (40 * SYNC_INT) @(posedge clk);
    measure = 1;
    repeat (40 * SYNC_INT) @(posedge clk);
    err = ts_diff(s_time, m_time);
    $display("time error %0d ns, delay %0d ns, corrections %0d/%0d, inc %f", err, s_servo.delay_est,
             s_servo.time_corrections, s_servo.freq_corrections, real'(u_s.inc_now) / 4294967296.0);
    checks++; if (err > 16 || err < -16) begin failures++; $display("not locked"); end
    checks++; if (s_servo.delay_est != LINK * 8) begin failures++; $display("delay estimate %0d", s_servo.delay_est); end
    checks++; if (u_s.inc_now != (40'd8 << 32)) begin failures++; $display("rate changed"); end
    checks++; if (s_servo.time_corrections < 5) begin failures++; $display("time corrections %0d", s_servo.time_corrections); end
    checks++; if (rises < 9 || bad != 0) begin failures++; $display("8 kHz: %0d rises %0d bad", rises, bad); end
    checks++; if (m_words < 20000 || s_words < 20000) begin failures++; $display("IQ words %0d %0d", m_words, s_words); end
    checks++; if (m_stats.fh_frames_rcvd < 300 || s_stats.fh_frames_rcvd < 300 || m_stats.bad_frames != 0 || s_stats.bad_frames != 0)
      begin failures++; $display("frame counters %0d %0d %0d %0d", m_stats.fh_frames_rcvd, s_stats.fh_frames_rcvd, m_stats.bad_frames, s_stats.bad_frames); end
    checks++; if (s_stats.ptp_rcvd < 80 || m_stats.ptp_rcvd < 30 || s_stats.resp_mismatch != 0) begin failures++; $display("PTP counters"); end
    checks++; if (s_stats.cw_errors != 0 || m_stats.cw_errors != 0 || s_stats.rxq_overflows != 0) begin failures++; $display("losses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100 * SYNC_INT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
