// cpri_unpacker: splits CPRI basic frames back into IQ words.
//
// Each basic frame (word 0 = control word, words 1..15 = IQ data, word k at
// bits [k*WORD_BITS +: WORD_BITS]) is taken whole, its control word is
// published on cw, and its 15 IQ words are sent out one per cycle in order.
// This design uses the control word as a basic-frame counter (see
// cpri_packer); a control word that does not follow the previous one by one
// (modulo 2^WORD_BITS, at most 256) is counted in cw_errors, which reveals
// basic frames lost in the network or in a queue.
//
// Interface: valid/ready on both sides. A new BF is accepted in the cycle the
// last IQ word of the previous one leaves, so the output can run without gaps.
module cpri_unpacker #(
  parameter int unsigned WORD_BITS = 8,
  parameter int unsigned BF_WORDS  = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [BF_WORDS*WORD_BITS-1:0] bf_data,
  input  logic                          bf_valid,
  output logic                          bf_ready,
  output logic [WORD_BITS-1:0]          iq_data,
  output logic                          iq_valid,
  input  logic                          iq_ready,
  output logic [WORD_BITS-1:0]          cw,
  output logic [31:0]                   cw_errors
);
  localparam int unsigned IQ_WORDS = BF_WORDS - 1;
  localparam int unsigned IW = $clog2(IQ_WORDS);
  localparam int unsigned CW_BITS = (WORD_BITS < 8) ? WORD_BITS : 8;

  logic [IQ_WORDS*WORD_BITS-1:0] iq_buf;
  logic [IW-1:0]                 idx;
  logic                          have_cw;
  logic                          take;

  assign iq_data  = iq_buf[idx*WORD_BITS +: WORD_BITS];
  assign bf_ready = !iq_valid || (iq_ready && idx == IW'(IQ_WORDS-1));
  assign take     = bf_valid && bf_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      iq_valid  <= 1'b0;
      iq_buf    <= '0;
      cw        <= '0;
      have_cw   <= 1'b0;
      cw_errors <= '0;
    end else begin
      if (iq_valid && iq_ready) begin
        if (idx == IW'(IQ_WORDS-1)) begin
          idx      <= '0;
          iq_valid <= 1'b0;
        end else begin
          idx <= idx + 1'b1;
        end
      end
      if (take) begin
        iq_buf   <= bf_data[BF_WORDS*WORD_BITS-1:WORD_BITS];
        iq_valid <= 1'b1;
        idx      <= '0;
        cw       <= bf_data[WORD_BITS-1:0];
        have_cw  <= 1'b1;
        if (have_cw && bf_data[CW_BITS-1:0] != CW_BITS'(cw[CW_BITS-1:0] + 1'b1))
          cw_errors <= cw_errors + 32'd1;
      end
    end
  end
endmodule
