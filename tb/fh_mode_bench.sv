// fh_mode_bench: one fh_top (BBU + RRU) joined by HOPS switch models per
// direction, each with 2 us latency and 0..PDV_NS of random delay, used by
// tb_fh_top_modes to compare servo modes side by side. No IQ traffic: the
// delay variation comes from the switches only, so it is known.
// The RRU clock is 50 ppm slow and its RTC starts equal to the BBU's.
// Measurement: after the 'measure' input rises, each rising edge of the
// 8 kHz output is timed in simulation time (the BBU clock is exact, so this
// is BBU time); the period of every edge pair, and the phase of every edge
// against the 125 us grid of the BBU RTC, are accumulated. Outputs: number of
// periods, mean and standard deviation of the period (ns), mean phase error
// (ns), and the RRU delay estimate and time error at the end.
module fh_mode_bench #(
  parameter int  HOPS     = 1,
  parameter int  PDV_NS   = 400,
  parameter int  SYNC_INT = 50000,
  parameter bit  SMOOTH   = 1'b1,
  parameter bit  SERVO    = 1'b1
) (
  input  logic  bbu_clk,
  input  logic  rru_clk,
  input  logic  rst,
  input  logic  measure,
  output int    periods,
  output real   period_mean,
  output real   period_std,
  output real   phase_mean,
  output longint delay_est,
  output longint time_error,
  output int    time_corrections
);
  import fh_pkg::*;

  logic bbu_rst, rru_rst;
  assign bbu_rst = rst;
  assign rru_rst = rst;
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
           .DREQ_EVERY(4), .TIME_BUF_LEN(8), .FREQ_MA_LEN(32)) dut (.*);

  assign bbu_iq_in_valid = 1'b0;
  assign rru_iq_in_valid = 1'b0;
  assign bbu_iq_in_data = '0;
  assign rru_iq_in_data = '0;
  assign bbu_iq_out_ready = 1'b1;
  assign rru_iq_out_ready = 1'b1;

  // HOPS switches per direction, in series
  logic [7:0] f_d[HOPS+1], r_d[HOPS+1];
  logic f_v[HOPS+1], f_l[HOPS+1], r_v[HOPS+1], r_l[HOPS+1];
  int unused_frames[2*HOPS];
  logic unused_ready[2*HOPS];
  assign f_d[0] = bbu_mac_tx_tdata;
  assign f_v[0] = bbu_mac_tx_tvalid;
  assign f_l[0] = bbu_mac_tx_tlast;
  assign r_d[0] = rru_mac_tx_tdata;
  assign r_v[0] = rru_mac_tx_tvalid;
  assign r_l[0] = rru_mac_tx_tlast;
  for (genvar h = 0; h < HOPS; h++) begin : g_hop
    // the first switch paces the sender; later ones take the previous
    // switch's output, which has no ready (frames are sparse here)
    eth_switch_model #(.LATENCY_NS(2000), .PDV_NS(PDV_NS)) u_fwd (
      .in_clk(h == 0 ? bbu_clk : rru_clk), .in_en(!rst), .in_tdata(f_d[h]), .in_tvalid(f_v[h]),
      .in_tready(unused_ready[2*h]), .in_tlast(f_l[h]),
      .out_clk(rru_clk), .out_tdata(f_d[h+1]), .out_tvalid(f_v[h+1]), .out_tlast(f_l[h+1]),
      .frames(unused_frames[2*h]));
    eth_switch_model #(.LATENCY_NS(2000), .PDV_NS(PDV_NS)) u_rev (
      .in_clk(h == 0 ? rru_clk : bbu_clk), .in_en(!rst), .in_tdata(r_d[h]), .in_tvalid(r_v[h]),
      .in_tready(unused_ready[2*h+1]), .in_tlast(r_l[h]),
      .out_clk(bbu_clk), .out_tdata(r_d[h+1]), .out_tvalid(r_v[h+1]), .out_tlast(r_l[h+1]),
      .frames(unused_frames[2*h+1]));
  end
  assign bbu_mac_tx_tready = unused_ready[0];
  assign rru_mac_tx_tready = unused_ready[1];
  assign rru_mac_rx_tdata  = f_d[HOPS];
  assign rru_mac_rx_tvalid = f_v[HOPS];
  assign rru_mac_rx_tlast  = f_l[HOPS];
  assign bbu_mac_rx_tdata  = r_d[HOPS];
  assign bbu_mac_rx_tvalid = r_v[HOPS];
  assign bbu_mac_rx_tlast  = r_l[HOPS];

  initial begin
    bbu_ptp_en = 0; rru_ptp_en = 0; rru_servo_en = SERVO; rru_smooth_en = SMOOTH;
    bbu_rtc_set_valid = 0; rru_rtc_set_valid = 0;
    bbu_rtc_set_time = '{sec: 48'd500, ns: 32'd0};
    rru_rtc_set_time = '{sec: 48'd500, ns: 32'd0};
    @(negedge rst);
    @(posedge bbu_clk); bbu_rtc_set_valid <= 1; rru_rtc_set_valid <= 1;
    @(posedge bbu_clk); bbu_rtc_set_valid <= 0; rru_rtc_set_valid <= 0;
    bbu_ptp_en = 1; rru_ptp_en = 1;
  end

  // 8 kHz edge statistics
  realtime last = 0;
  real sum_p = 0, sum_p2 = 0, sum_ph = 0;
  initial periods = 0;
  always @(posedge rru_clk_8k) begin
    if (measure) begin
      real ph;
      ph = real'(bbu_time.ns % 32'd125_000);
      if (ph > 62_500.0) ph = ph - 125_000.0;
      sum_ph += ph;
      if (last > 0) begin
        periods++;
        sum_p  += $realtime - last;
        sum_p2 += ($realtime - last) * ($realtime - last);
      end
      last = $realtime;
    end
  end
  always_comb begin
    period_mean = periods > 0 ? sum_p / periods : 0.0;
    period_std  = periods > 1 ? $sqrt(sum_p2 / periods - period_mean * period_mean) : 0.0;
    phase_mean  = periods > 0 ? sum_ph / (periods + 1) : 0.0;
  end
  assign delay_est        = rru_servo.delay_est;
  assign time_error       = ts_diff(rru_time, bbu_time);
  assign time_corrections = int'(rru_servo.time_corrections);
endmodule
