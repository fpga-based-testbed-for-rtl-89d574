// ptp_rtc: PTP real-time clock (RTC) with time and frequency correction.
//
// The clock holds IEEE 1588 time: 48-bit seconds and 32-bit nanoseconds
// (kept below 10^9), plus FRAC_BITS of fractional nanoseconds that are never
// sent on the network. Every clock cycle it adds the increment, a fixed-point
// number of nanoseconds (8 integer bits, FRAC_BITS fraction), that starts at
// the nominal period CLK_PERIOD_NS of the clock that drives it. Three inputs
// discipline it:
//   * set_valid loads a complete time (initial time of day, from software);
//   * inc_valid loads a new increment: this is the frequency correction, a
//     slightly larger or smaller increment makes the clock run faster or
//     slower with a resolution of 2^-FRAC_BITS ns per cycle;
//   * step_valid adds a signed offset in nanoseconds in one cycle: this is the
//     time correction. A step must be smaller than one second in magnitude.
// All updates take effect on the next clock edge; a step lands together with
// that cycle's increment. The 8-bit integer increment and the fraction width
// are this design's choices.
module ptp_rtc #(
  parameter int unsigned CLK_PERIOD_NS = 8,
  parameter int unsigned FRAC_BITS     = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     set_valid,
  input  fh_pkg::ptp_ts_t          set_time,
  input  logic                     inc_valid,
  input  logic [8+FRAC_BITS-1:0]   inc_value,
  input  logic                     step_valid,
  input  logic signed [63:0]       step_ns,
  output fh_pkg::ptp_ts_t          time_now,
  output logic [FRAC_BITS-1:0]     frac_ns,
  output logic [8+FRAC_BITS-1:0]   inc
);
  localparam logic signed [63:0] BILLION = 64'sd1_000_000_000;

  logic [FRAC_BITS:0]  frac_sum;
  logic signed [63:0]  ns_sum;

  always_comb begin
    frac_sum = {1'b0, frac_ns} + {1'b0, inc[FRAC_BITS-1:0]};
    ns_sum   = signed'({32'd0, time_now.ns}) + 64'(inc[8+FRAC_BITS-1:FRAC_BITS])
             + 64'(frac_sum[FRAC_BITS]) + (step_valid ? step_ns : 64'sd0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      time_now <= '0;
      frac_ns  <= '0;
      inc      <= (8+FRAC_BITS)'(CLK_PERIOD_NS) << FRAC_BITS;
    end else begin
      if (inc_valid) inc <= inc_value;
      if (set_valid) begin
        time_now <= set_time;
        frac_ns  <= '0;
      end else begin
        frac_ns <= frac_sum[FRAC_BITS-1:0];
        if (ns_sum >= BILLION) begin
          time_now.ns  <= 32'(ns_sum - BILLION);
          time_now.sec <= time_now.sec + 48'd1;
        end else if (ns_sum < 0) begin
          time_now.ns  <= 32'(ns_sum + BILLION);
          time_now.sec <= time_now.sec - 48'd1;
        end else begin
          time_now.ns  <= 32'(ns_sum);
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst)
                   step_valid |-> (step_ns < BILLION && step_ns > -BILLION));
  assert property (@(posedge clk) disable iff (rst) time_now.ns < 32'd1_000_000_000);
endmodule
