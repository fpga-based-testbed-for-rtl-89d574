// freq_ma_filter: moving-average filter for the frequency-offset estimates.
//
// Keeps the last LEN samples (signed, W bits) in a circular buffer and a
// running sum: each new sample is added and the sample it displaces is
// subtracted, so the average of the window is available every sample without
// re-adding the window. The average is sum / LEN, an arithmetic shift
// because LEN must be a power of two (128 by default, the window length
// used for the frequency offset). out_valid pulses one cycle after each input
// once the window has been filled; full stays high from then on. flush empties
// the window, which the servo does after it has corrected the clock rate.
module freq_ma_filter #(
  parameter int unsigned LEN = 128,
  parameter int unsigned W   = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                flush,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] avg,
  output logic                full
);
  localparam int unsigned AW = $clog2(LEN);
  localparam int unsigned SW = W + AW;

  logic signed [W-1:0]  mem [LEN];
  logic [AW-1:0]        ptr;
  logic signed [SW-1:0] sum, sum_next;
  logic signed [W-1:0]  oldest;

  assign oldest   = full ? mem[ptr] : '0;
  assign sum_next = sum + SW'(in_data) - SW'(oldest);

  always_ff @(posedge clk) begin
    if (in_valid) mem[ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      ptr       <= '0;
      sum       <= '0;
      full      <= 1'b0;
      out_valid <= 1'b0;
      avg       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        sum <= sum_next;
        ptr <= ptr + 1'b1;
        if (ptr == AW'(LEN-1)) full <= 1'b1;
        if (full || ptr == AW'(LEN-1)) begin
          out_valid <= 1'b1;
          avg       <= W'(sum_next >>> AW);
        end
      end
    end
  end

  initial assert ((1 << AW) == LEN);
endmodule
