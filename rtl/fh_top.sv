// fh_top: Ethernet fronthaul testbed, BBU and RRU fabric logic side by side.
//
// A baseband unit (BBU) and a remote radio unit (RRU) exchange CPRI basic
// frames, carried without line coding in plain layer-2 Ethernet frames over
// an ordinary switched network, and share that same link with IEEE 1588 PTP
// messages. The BBU is the PTP master and holds the reference time; the RRU
// is a slave that estimates delay, time offset and frequency offset from the
// PTP timestamps, filters them, disciplines its real-time clock, and derives
// an 8 kHz clock from it that an external jitter-attenuating PLL multiplies to
// the 40 MHz converter clock.
//
// Each side is an fh_node running on its own board clock (bbu_clk, rru_clk).
// What lies outside the FPGA fabric logic is reached through ports: the IQ
// word streams of the BBU's DMA interface and of the RRU's ADC/DAC interface,
// the byte streams of the two Ethernet MACs (which add preamble and FCS and
// connect, through the PHYs, to the switch), the 8 kHz clock to the PLL, and
// the software controls and counters of the processor.
module fh_top #(
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
  parameter int unsigned OUT_HZ            = 8000
) (
  // ---------------- BBU
  input  logic                  bbu_clk,
  input  logic                  bbu_rst,
  input  logic                  bbu_ptp_en,
  input  logic                  bbu_rtc_set_valid,
  input  fh_pkg::ptp_ts_t       bbu_rtc_set_time,
  input  logic [WORD_BITS-1:0]  bbu_iq_in_data,     // from the DMA interface
  input  logic                  bbu_iq_in_valid,
  output logic                  bbu_iq_in_ready,
  output logic [WORD_BITS-1:0]  bbu_iq_out_data,    // to the DMA interface
  output logic                  bbu_iq_out_valid,
  input  logic                  bbu_iq_out_ready,
  output logic [7:0]            bbu_mac_tx_tdata,
  output logic                  bbu_mac_tx_tvalid,
  input  logic                  bbu_mac_tx_tready,
  output logic                  bbu_mac_tx_tlast,
  input  logic [7:0]            bbu_mac_rx_tdata,
  input  logic                  bbu_mac_rx_tvalid,
  input  logic                  bbu_mac_rx_tlast,
  output fh_pkg::ptp_ts_t       bbu_time,
  output fh_pkg::node_stats_t   bbu_stats,
  // ---------------- RRU
  input  logic                  rru_clk,
  input  logic                  rru_rst,
  input  logic                  rru_ptp_en,
  input  logic                  rru_servo_en,
  input  logic                  rru_smooth_en,
  input  logic                  rru_rtc_set_valid,
  input  fh_pkg::ptp_ts_t       rru_rtc_set_time,
  input  logic [WORD_BITS-1:0]  rru_iq_in_data,     // from the ADC interface
  input  logic                  rru_iq_in_valid,
  output logic                  rru_iq_in_ready,
  output logic [WORD_BITS-1:0]  rru_iq_out_data,    // to the DAC interface
  output logic                  rru_iq_out_valid,
  input  logic                  rru_iq_out_ready,
  output logic [7:0]            rru_mac_tx_tdata,
  output logic                  rru_mac_tx_tvalid,
  input  logic                  rru_mac_tx_tready,
  output logic                  rru_mac_tx_tlast,
  input  logic [7:0]            rru_mac_rx_tdata,
  input  logic                  rru_mac_rx_tvalid,
  input  logic                  rru_mac_rx_tlast,
  output fh_pkg::ptp_ts_t       rru_time,
  output logic                  rru_clk_8k,         // to the jitter-attenuator PLL
  output fh_pkg::node_stats_t   rru_stats,
  output fh_pkg::servo_status_t rru_servo
);
  import fh_pkg::*;

  logic                  bbu_clk_unused;
  servo_status_t         bbu_servo_unused;

  fh_node #(
    .IS_MASTER(1'b1), .WORD_BITS(WORD_BITS), .BF_PER_FRAME(BF_PER_FRAME),
    .TXQ_DEPTH(TXQ_DEPTH), .RXQ_DEPTH(RXQ_DEPTH),
    .SYNC_INTERVAL_CYC(SYNC_INTERVAL_CYC), .DREQ_EVERY(DREQ_EVERY), .TWO_STEP(TWO_STEP),
    .TIME_BUF_LEN(TIME_BUF_LEN), .FREQ_MA_LEN(FREQ_MA_LEN),
    .CLK_PERIOD_NS(CLK_PERIOD_NS), .OUT_HZ(OUT_HZ),
    .OWN_MAC(MAC_BBU), .PEER_MAC(MAC_RRU), .PORT_ID(80'h0200_00FF_FE00_0BB0_0001)
  ) u_bbu (
    .clk(bbu_clk), .rst(bbu_rst),
    .ptp_en(bbu_ptp_en), .servo_en(1'b0), .smooth_en(1'b0),
    .rtc_set_valid(bbu_rtc_set_valid), .rtc_set_time(bbu_rtc_set_time),
    .iq_in_data(bbu_iq_in_data), .iq_in_valid(bbu_iq_in_valid), .iq_in_ready(bbu_iq_in_ready),
    .iq_out_data(bbu_iq_out_data), .iq_out_valid(bbu_iq_out_valid), .iq_out_ready(bbu_iq_out_ready),
    .mac_tx_tdata(bbu_mac_tx_tdata), .mac_tx_tvalid(bbu_mac_tx_tvalid),
    .mac_tx_tready(bbu_mac_tx_tready), .mac_tx_tlast(bbu_mac_tx_tlast),
    .mac_rx_tdata(bbu_mac_rx_tdata), .mac_rx_tvalid(bbu_mac_rx_tvalid), .mac_rx_tlast(bbu_mac_rx_tlast),
    .rtc_time(bbu_time), .clk_out(bbu_clk_unused), .stats(bbu_stats), .servo(bbu_servo_unused));

  fh_node #(
    .IS_MASTER(1'b0), .WORD_BITS(WORD_BITS), .BF_PER_FRAME(BF_PER_FRAME),
    .TXQ_DEPTH(TXQ_DEPTH), .RXQ_DEPTH(RXQ_DEPTH),
    .SYNC_INTERVAL_CYC(SYNC_INTERVAL_CYC), .DREQ_EVERY(DREQ_EVERY), .TWO_STEP(TWO_STEP),
    .TIME_BUF_LEN(TIME_BUF_LEN), .FREQ_MA_LEN(FREQ_MA_LEN),
    .CLK_PERIOD_NS(CLK_PERIOD_NS), .OUT_HZ(OUT_HZ),
    .OWN_MAC(MAC_RRU), .PEER_MAC(MAC_BBU), .PORT_ID(80'h0200_00FF_FE00_0AA0_0001)
  ) u_rru (
    .clk(rru_clk), .rst(rru_rst),
    .ptp_en(rru_ptp_en), .servo_en(rru_servo_en), .smooth_en(rru_smooth_en),
    .rtc_set_valid(rru_rtc_set_valid), .rtc_set_time(rru_rtc_set_time),
    .iq_in_data(rru_iq_in_data), .iq_in_valid(rru_iq_in_valid), .iq_in_ready(rru_iq_in_ready),
    .iq_out_data(rru_iq_out_data), .iq_out_valid(rru_iq_out_valid), .iq_out_ready(rru_iq_out_ready),
    .mac_tx_tdata(rru_mac_tx_tdata), .mac_tx_tvalid(rru_mac_tx_tvalid),
    .mac_tx_tready(rru_mac_tx_tready), .mac_tx_tlast(rru_mac_tx_tlast),
    .mac_rx_tdata(rru_mac_rx_tdata), .mac_rx_tvalid(rru_mac_rx_tvalid), .mac_rx_tlast(rru_mac_rx_tlast),
    .rtc_time(rru_time), .clk_out(rru_clk_8k), .stats(rru_stats), .servo(rru_servo));
endmodule
