// time_offset_filter: estimation buffer and selection for the time offset.
//
// Time-offset samples are collected until LEN of them (256 by default) have
// arrived; the selection then outputs one value, their sample mean, and the
// buffer starts empty again. The mean is kept as a running sum, so no sample
// memory is needed, and divided by an arithmetic shift (LEN must be a power of
// two). With bypass set (smoothing off) every sample is passed straight
// through, so each raw estimate corrects the clock. out_valid pulses one cycle
// after the sample that completes a buffer (or after every sample in bypass).
// clear empties the buffer. Keeping only a running sum, rather than the
// samples themselves, is this design's choice.
module time_offset_filter #(
  parameter int unsigned LEN = 256,
  parameter int unsigned W   = 64
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                bypass,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data,
  output logic [$clog2(LEN):0] fill
);
  localparam int unsigned AW = $clog2(LEN);
  localparam int unsigned SW = W + AW;

  logic signed [SW-1:0] sum, sum_next;

  assign sum_next = sum + SW'(in_data);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      sum       <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (bypass) begin
          out_valid <= 1'b1;
          out_data  <= in_data;
        end else if (fill == (AW+1)'(LEN-1)) begin
          out_valid <= 1'b1;
          out_data  <= W'(sum_next >>> AW);
          sum       <= '0;
          fill      <= '0;
        end else begin
          sum  <= sum_next;
          fill <= fill + 1'b1;
        end
      end
    end
  end

  initial assert ((1 << AW) == LEN);
endmodule
