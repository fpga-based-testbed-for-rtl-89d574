// clk8k_gen: the PTP-synchronized output clock, derived from the RTC.
//
// The output is high for the first half of every period of OUT_HZ (8 kHz)
// counted from the start of each RTC second, and low for the second half: it
// is bit 0 of floor(ns / HALF_NS) with HALF_NS = 10^9 / (2*OUT_HZ) = 62500 ns.
// Because the edges are computed from the RTC nanoseconds, every frequency or
// time correction applied to the RTC moves the output clock with it; this is
// the clock that feeds the external jitter-attenuator PLL. The division by
// HALF_NS is done as a multiplication by a rounded-up reciprocal, which is
// exact for all ns below 2^30. OUT_HZ must divide 10^9/2 so that the clock
// stays aligned to the second. One register stage follows the multiplier, so
// clk_out lags the RTC by one cycle. Deriving the edges this way is this
// design's choice.
module clk8k_gen #(
  parameter int unsigned OUT_HZ = 8000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [29:0] ns,        // RTC nanoseconds (< 10^9 fits 30 bits)
  output logic        clk_out
);
  localparam longint unsigned HALF_NS = 64'd1_000_000_000 / (64'd2 * 64'(OUT_HZ));
  localparam int unsigned     SHIFT   = 30 + $clog2(HALF_NS);
  localparam longint unsigned RECIP   = ((64'd1 << SHIFT) + HALF_NS - 1) / HALF_NS;
  localparam int unsigned     RW      = $clog2(RECIP + 1);

  logic [30+RW-1:0] prod;

  assign prod = (30+RW)'(ns) * (30+RW)'(RECIP);

  always_ff @(posedge clk) begin
    if (rst) clk_out <= 1'b0;
    else     clk_out <= ~prod[SHIFT];
  end

  initial assert (HALF_NS * 2 * OUT_HZ == 64'd1_000_000_000);
endmodule
