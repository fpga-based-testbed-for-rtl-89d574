// ptp_servo: turns PTP timestamps into time and frequency corrections of
// the slave RTC.
//
// Estimates (all in signed nanoseconds):
//   * one-way delay, on every completed delay exchange:
//       d = ((t4 - t1) - (t3 - t2)) / 2
//     assuming equal master-to-slave and slave-to-master delays. A step this
//     servo applied between t2 and t3 would bias d by half the step, so the
//     steps taken after the SYNC and before t3 (marked by t3_stamp) are
//     added back: d = ((t4 - t1) - (t3 - t2) + s) / 2;
//   * time offset, on every SYNC once a delay is known:
//       x = t2 - (t1 + d)
//   * frequency offset, from two successive SYNCs k and k+1, as a Q0.32
//     fraction (units of 2^-32):
//       y = ((t2' - t1') - (t2 - t1)) / (t1' - t1)
//     computed by a sequential divider (65 cycles).
// Filtering and correction:
//   * x goes through the time-offset estimation buffer (TIME_BUF_LEN
//     samples, sample mean); each selected value x_sel is removed from the
//     RTC with a step of -x_sel. With smooth_en low every raw x is applied.
//   * y goes through a moving average of FREQ_MA_LEN samples; when the
//     window is full the RTC increment is scaled by (1 - y_avg) and the window
//     is flushed, so the next average is measured at the new rate.
//   * After any correction the previous SYNC is forgotten, so no frequency
//     estimate spans a correction.
// With servo_en low nothing is corrected and the RTC runs free, while the
// estimates keep being computed. A time step must be below one second; larger
// offsets are left to software, which can set the RTC.
// The estimate equations and the filter sizes follow the testbed this RTL
// describes; the fixed-point formats, the block (flush-after-correction) use
// of the moving average and the correction law are this design's choices.
module ptp_servo #(
  parameter int unsigned TIME_BUF_LEN = 256,
  parameter int unsigned FREQ_MA_LEN  = 128,
  parameter int unsigned FRAC_BITS    = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   servo_en,
  input  logic                   smooth_en,
  input  logic                   sync_valid,
  input  fh_pkg::ptp_ts_t        sync_t1,
  input  fh_pkg::ptp_ts_t        sync_t2,
  input  logic                   delay_valid,
  input  fh_pkg::ptp_ts_t        d_t1,
  input  fh_pkg::ptp_ts_t        d_t2,
  input  fh_pkg::ptp_ts_t        d_t3,
  input  fh_pkg::ptp_ts_t        d_t4,
  input  logic                   t3_stamp,
  input  logic [8+FRAC_BITS-1:0] inc_now,
  output logic                   step_valid,
  output logic signed [63:0]     step_ns,
  output logic                   inc_valid,
  output logic [8+FRAC_BITS-1:0] inc_value,
  // estimates and statistics
  output logic signed [63:0]     delay_est,
  output logic signed [63:0]     offset_est,
  output logic signed [31:0]     freq_est,
  output logic [31:0]            time_corrections,
  output logic [31:0]            freq_corrections,
  output logic [$clog2(TIME_BUF_LEN):0] time_buf_fill,
  output logic                   freq_window_full
);
  import fh_pkg::*;
  localparam int unsigned IW = 8 + FRAC_BITS;
  localparam logic signed [63:0] STEP_MAX = 64'sd999_999_999;

  logic               d_known, prev_ok;
  logic signed [63:0] prev_o;
  ptp_ts_t            prev_t1;
  logic signed [63:0] o_now, x_now;

  // divider for y
  logic               div_start, div_busy, div_done;
  logic signed [63:0] div_num, div_den, div_q;
  logic signed [63:0] o_diff;

  // filters
  logic               tf_valid;
  logic signed [63:0] tf_out;
  logic               ma_flush, ma_valid;
  logic signed [31:0] ma_avg, y_sat;

  logic signed [IW+32:0] inc_prod;

  // steps applied since the last SYNC, and those already inside t3
  logic signed [63:0] st_acc, st_prev, st_t3;

  assign o_now  = ts_diff(sync_t2, sync_t1);
  assign x_now  = o_now - delay_est;
  assign o_diff = o_now - prev_o;

  always_comb begin
    div_start = sync_valid && prev_ok && !div_busy;
    // y in Q0.32; offsets differences beyond +-2^31 ns saturate
    if (o_diff > 64'sh7FFF_FFFF)       div_num = 64'sh7FFF_FFFF_0000_0000;
    else if (o_diff < -64'sh7FFF_FFFF) div_num = -64'sh7FFF_FFFF_0000_0000;
    else                               div_num = o_diff <<< 32;
    div_den = ts_diff(sync_t1, prev_t1);
  end

  seq_divider #(.W(64)) u_div (
    .clk, .rst, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_q));

  always_comb begin
    if (div_q > 64'sh7FFF_FFFF)       y_sat = 32'sh7FFF_FFFF;
    else if (div_q < -64'sh8000_0000) y_sat = -32'sh8000_0000;
    else                              y_sat = 32'(div_q);
  end

  time_offset_filter #(.LEN(TIME_BUF_LEN), .W(64)) u_tf (
    .clk, .rst, .clear(1'b0), .bypass(!smooth_en),
    .in_valid(sync_valid && d_known), .in_data(x_now),
    .out_valid(tf_valid), .out_data(tf_out), .fill(time_buf_fill));

  freq_ma_filter #(.LEN(FREQ_MA_LEN), .W(32)) u_ma (
    .clk, .rst, .flush(ma_flush), .in_valid(div_done), .in_data(y_sat),
    .out_valid(ma_valid), .avg(ma_avg), .full(freq_window_full));

  assign ma_flush = ma_valid && servo_en;
  assign inc_prod = signed'({1'b0, inc_now}) * (IW+33)'(ma_avg);

  always_ff @(posedge clk) begin
    if (rst) begin
      d_known <= 1'b0; prev_ok <= 1'b0; prev_o <= '0; prev_t1 <= '0;
      step_valid <= 1'b0; step_ns <= '0; inc_valid <= 1'b0; inc_value <= '0;
      delay_est <= '0; offset_est <= '0; freq_est <= '0;
      time_corrections <= '0; freq_corrections <= '0;
      st_acc <= '0; st_prev <= '0; st_t3 <= '0;
    end else begin
      st_prev <= st_acc;
      st_acc  <= (sync_valid ? 64'sd0 : st_acc) + (step_valid ? step_ns : 64'sd0);
      if (sync_valid)    st_t3 <= '0;
      else if (t3_stamp) st_t3 <= st_prev;
      step_valid <= 1'b0;
      inc_valid  <= 1'b0;
      if (delay_valid) begin
        delay_est <= (ts_diff(d_t4, d_t1) - ts_diff(d_t3, d_t2) + st_t3) >>> 1;
        d_known   <= 1'b1;
      end
      if (sync_valid) begin
        prev_o  <= o_now;
        prev_t1 <= sync_t1;
        prev_ok <= 1'b1;
        if (d_known) offset_est <= x_now;
      end
      if (ma_valid) freq_est <= ma_avg;
      if (tf_valid && servo_en) begin
        step_valid       <= 1'b1;
        step_ns          <= (tf_out > STEP_MAX) ? -STEP_MAX :
                            (tf_out < -STEP_MAX) ? STEP_MAX : -tf_out;
        time_corrections <= time_corrections + 32'd1;
        prev_ok          <= 1'b0;
      end
      if (ma_valid && servo_en) begin
        inc_valid        <= 1'b1;
        inc_value        <= inc_now - IW'(inc_prod >>> 32);
        freq_corrections <= freq_corrections + 32'd1;
        prev_ok          <= 1'b0;
      end
    end
  end
endmodule
