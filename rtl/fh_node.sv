// fh_node: the fabric logic of one end of the Ethernet fronthaul, the BBU
// (PTP master) or the RRU (PTP slave).
//
// Transmit path: IQ words (from the DMA interface on the BBU, from the ADC
// interface on the RRU) -> cpri_packer (basic frames) -> fh_queue (transmit
// queue; its ready stalls the IQ source when full) -> eth_packer (BF_PER_FRAME
// BFs per L2 frame) -> eth_tx_arbiter, which interleaves the frames of the
// PTP engine -> MAC.
// Receive path: MAC -> eth_unpacker (fronthaul payload to BFs, PTP payload to
// the PTP engine) -> fh_queue (receive queue, drops and counts on overflow)
// -> cpri_unpacker -> IQ words (to memory on the BBU, to the DAC on the RRU).
// Synchronization: ptp_rtc keeps the local time; ptp_engine runs the
// delay request-response exchange with timestamps from that RTC. On the slave
// (IS_MASTER = 0) ptp_servo turns the timestamps into time steps and
// increment changes of the RTC, and clk8k_gen derives the synchronized 8 kHz
// clock from it for the external jitter-attenuator PLL; on the master the
// RTC is the reference and clk_out is held low.
//
// Interfaces: valid/ready IQ word streams, AXI-Stream style byte streams to
// and from the MAC (receive without back-pressure), software controls
// (enables, RTC set), and counters. Everything runs on one clock, the MAC
// clock of that board.
module fh_node #(
  parameter bit          IS_MASTER         = 1'b1,
  parameter int unsigned WORD_BITS         = 8,
  parameter int unsigned BF_PER_FRAME      = 32,
  parameter int unsigned TXQ_DEPTH         = 64,
  parameter int unsigned RXQ_DEPTH         = 64,
  parameter int unsigned SYNC_INTERVAL_CYC = 976_562,
  parameter int unsigned DREQ_EVERY        = 16,
  parameter bit          TWO_STEP          = 1'b0,
  parameter int unsigned TIME_BUF_LEN      = 256,
  parameter int unsigned FREQ_MA_LEN       = 128,
  parameter int unsigned CLK_PERIOD_NS     = 8,
  parameter int unsigned OUT_HZ            = 8000,
  parameter logic [47:0] OWN_MAC           = fh_pkg::MAC_BBU,
  parameter logic [47:0] PEER_MAC          = fh_pkg::MAC_RRU,
  parameter logic [79:0] PORT_ID           = 80'h0200_00FF_FE00_0BB0_0001
) (
  input  logic                   clk,
  input  logic                   rst,
  // software controls
  input  logic                   ptp_en,
  input  logic                   servo_en,
  input  logic                   smooth_en,
  input  logic                   rtc_set_valid,
  input  fh_pkg::ptp_ts_t        rtc_set_time,
  // IQ words to be sent
  input  logic [WORD_BITS-1:0]   iq_in_data,
  input  logic                   iq_in_valid,
  output logic                   iq_in_ready,
  // IQ words received
  output logic [WORD_BITS-1:0]   iq_out_data,
  output logic                   iq_out_valid,
  input  logic                   iq_out_ready,
  // MAC transmit and receive
  output logic [7:0]             mac_tx_tdata,
  output logic                   mac_tx_tvalid,
  input  logic                   mac_tx_tready,
  output logic                   mac_tx_tlast,
  input  logic [7:0]             mac_rx_tdata,
  input  logic                   mac_rx_tvalid,
  input  logic                   mac_rx_tlast,
  // time and status
  output fh_pkg::ptp_ts_t        rtc_time,
  output logic                   clk_out,
  output fh_pkg::node_stats_t    stats,
  output fh_pkg::servo_status_t  servo
);
  import fh_pkg::*;
  localparam int unsigned BF_BITS = BF_WORDS * WORD_BITS;
  localparam int unsigned TQW = $clog2(TXQ_DEPTH) + 1;
  localparam int unsigned RQW = $clog2(RXQ_DEPTH) + 1;

  // ---------------- transmit path
  logic [BF_BITS-1:0] p_bf, tq_bf;
  logic               p_valid, p_ready, tq_valid, tq_ready;
  logic [TQW-1:0]     tq_count;
  logic [31:0]        tq_ovf;

  cpri_packer #(.WORD_BITS(WORD_BITS), .BF_WORDS(BF_WORDS)) u_cpri_pack (
    .clk, .rst, .iq_data(iq_in_data), .iq_valid(iq_in_valid), .iq_ready(iq_in_ready),
    .bf_data(p_bf), .bf_valid(p_valid), .bf_ready(p_ready));

  fh_queue #(.WIDTH(BF_BITS), .DEPTH(TXQ_DEPTH)) u_txq (
    .clk, .rst, .in_data(p_bf), .in_valid(p_valid), .in_ready(p_ready),
    .out_data(tq_bf), .out_valid(tq_valid), .out_ready(tq_ready),
    .count(tq_count), .overflows(tq_ovf));

  logic [7:0] e_tdata, t_tdata;
  logic       e_tvalid, e_tready, e_tlast, t_tvalid, t_tready, t_tlast;

  eth_packer #(.BF_BITS(BF_BITS), .BF_PER_FRAME(BF_PER_FRAME), .CNT_BITS(TQW),
               .SRC_MAC(OWN_MAC), .DST_MAC(PEER_MAC)) u_eth_pack (
    .clk, .rst, .bf_data(tq_bf), .bf_valid(tq_valid), .bf_ready(tq_ready),
    .bf_count(tq_count), .tx_tdata(e_tdata), .tx_tvalid(e_tvalid),
    .tx_tready(e_tready), .tx_tlast(e_tlast), .frames_sent(stats.fh_frames_sent));

  logic [31:0] frames_fh_arb, frames_ptp_arb;

  eth_tx_arbiter u_arb (
    .clk, .rst,
    .a_tdata(e_tdata), .a_tvalid(e_tvalid), .a_tready(e_tready), .a_tlast(e_tlast),
    .b_tdata(t_tdata), .b_tvalid(t_tvalid), .b_tready(t_tready), .b_tlast(t_tlast),
    .m_tdata(mac_tx_tdata), .m_tvalid(mac_tx_tvalid), .m_tready(mac_tx_tready),
    .m_tlast(mac_tx_tlast), .frames_a(frames_fh_arb), .frames_b(frames_ptp_arb),
    .waits_b(stats.ptp_waits));

  // ---------------- receive path
  logic               rx_sof, u_bf_valid, rq_valid, rq_ready, rq_in_ready;
  logic [BF_BITS-1:0] u_bf, rq_bf;
  logic [7:0]         r_tdata;
  logic               r_tvalid, r_tlast;
  logic [31:0]        ptp_frames_rx;
  logic [RQW-1:0]     rq_count;

  eth_unpacker #(.BF_BITS(BF_BITS), .BF_PER_FRAME(BF_PER_FRAME), .OWN_MAC(OWN_MAC)) u_eth_unpack (
    .clk, .rst, .rx_tdata(mac_rx_tdata), .rx_tvalid(mac_rx_tvalid), .rx_tlast(mac_rx_tlast),
    .rx_sof, .bf_data(u_bf), .bf_valid(u_bf_valid),
    .ptp_tdata(r_tdata), .ptp_tvalid(r_tvalid), .ptp_tlast(r_tlast),
    .fh_frames(stats.fh_frames_rcvd), .ptp_frames(ptp_frames_rx), .bad_frames(stats.bad_frames));

  fh_queue #(.WIDTH(BF_BITS), .DEPTH(RXQ_DEPTH)) u_rxq (
    .clk, .rst, .in_data(u_bf), .in_valid(u_bf_valid), .in_ready(rq_in_ready),
    .out_data(rq_bf), .out_valid(rq_valid), .out_ready(rq_ready),
    .count(rq_count), .overflows(stats.rxq_overflows));

  logic [WORD_BITS-1:0] cw_last;

  cpri_unpacker #(.WORD_BITS(WORD_BITS), .BF_WORDS(BF_WORDS)) u_cpri_unpack (
    .clk, .rst, .bf_data(rq_bf), .bf_valid(rq_valid), .bf_ready(rq_ready),
    .iq_data(iq_out_data), .iq_valid(iq_out_valid), .iq_ready(iq_out_ready),
    .cw(cw_last), .cw_errors(stats.cw_errors));

  // ---------------- synchronization
  logic                  inc_valid, step_valid;
  logic [8+32-1:0]       inc_value, inc_now;
  logic signed [63:0]    step_ns;
  logic [31:0]           frac_ns;
  logic                  sync_valid, delay_valid, t3_stamp;
  ptp_ts_t               s_t1, s_t2, d_t1, d_t2, d_t3, d_t4;
  logic [31:0]           rx_bad_msgs;

  ptp_rtc #(.CLK_PERIOD_NS(CLK_PERIOD_NS), .FRAC_BITS(32)) u_rtc (
    .clk, .rst, .set_valid(rtc_set_valid), .set_time(rtc_set_time),
    .inc_valid, .inc_value, .step_valid, .step_ns,
    .time_now(rtc_time), .frac_ns, .inc(inc_now));

  ptp_engine #(.IS_MASTER(IS_MASTER), .TWO_STEP(TWO_STEP),
               .SYNC_INTERVAL_CYC(SYNC_INTERVAL_CYC), .DREQ_EVERY(DREQ_EVERY),
               .SRC_MAC(OWN_MAC), .PORT_ID(PORT_ID)) u_ptp (
    .clk, .rst, .enable(ptp_en), .rtc_time,
    .tx_tdata(t_tdata), .tx_tvalid(t_tvalid), .tx_tready(t_tready), .tx_tlast(t_tlast),
    .rx_sof, .rx_tdata(r_tdata), .rx_tvalid(r_tvalid), .rx_tlast(r_tlast),
    .sync_valid, .sync_t1(s_t1), .sync_t2(s_t2),
    .delay_valid, .d_t1, .d_t2, .d_t3, .d_t4, .t3_stamp,
    .msgs_sent(stats.ptp_sent), .msgs_received(stats.ptp_rcvd),
    .resp_mismatch(stats.resp_mismatch), .rx_bad_msgs);

  if (IS_MASTER) begin : g_master
    assign inc_valid  = 1'b0;
    assign inc_value  = '0;
    assign step_valid = 1'b0;
    assign step_ns    = '0;
    assign clk_out    = 1'b0;
    assign servo      = '0;
  end else begin : g_slave
    ptp_servo #(.TIME_BUF_LEN(TIME_BUF_LEN), .FREQ_MA_LEN(FREQ_MA_LEN), .FRAC_BITS(32)) u_servo (
      .clk, .rst, .servo_en, .smooth_en,
      .sync_valid, .sync_t1(s_t1), .sync_t2(s_t2),
      .delay_valid, .d_t1, .d_t2, .d_t3, .d_t4, .t3_stamp,
      .inc_now, .step_valid, .step_ns, .inc_valid, .inc_value,
      .delay_est(servo.delay_est), .offset_est(servo.offset_est),
      .freq_est(servo.freq_est), .time_corrections(servo.time_corrections),
      .freq_corrections(servo.freq_corrections), .time_buf_fill(), .freq_window_full());

    clk8k_gen #(.OUT_HZ(OUT_HZ)) u_clk8k (
      .clk, .rst, .ns(rtc_time.ns[29:0]), .clk_out);
  end

  // cycles in which the IQ source offered a word the transmit path could not take
  always_ff @(posedge clk) begin
    if (rst) stats.txq_stalls <= '0;
    else if (iq_in_valid && !iq_in_ready) stats.txq_stalls <= stats.txq_stalls + 32'd1;
  end
endmodule
