// cpri_packer: builds CPRI basic frames (BFs) from a stream of IQ words.
//
// A basic frame is 16 words: word 0 is the control word (CW) and words 1..15
// are IQ data, as in CPRI. The word width is WORD_BITS (8 bits for CPRI
// profile 1, giving a 128-bit BF). The packer collects 15 IQ words, then
// presents the whole BF on bf_data with word k at bits [k*WORD_BITS +: WORD_BITS].
// The control word is this design's choice: the index of the basic frame
// within a 256-frame hyperframe (a running counter modulo 256, truncated to
// WORD_BITS), which lets the far end detect lost frames.
//
// Interface: valid/ready on both sides. IQ words are accepted one per cycle
// while the output register is free or being drained; the 15th word of a BF is
// held off only if the previous BF has not yet been taken. A BF appears on the
// cycle after its 15th IQ word is accepted.
module cpri_packer #(
  parameter int unsigned WORD_BITS = 8,
  parameter int unsigned BF_WORDS  = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [WORD_BITS-1:0]          iq_data,
  input  logic                          iq_valid,
  output logic                          iq_ready,
  output logic [BF_WORDS*WORD_BITS-1:0] bf_data,
  output logic                          bf_valid,
  input  logic                          bf_ready
);
  localparam int unsigned IQ_WORDS = BF_WORDS - 1;
  localparam int unsigned IW = $clog2(IQ_WORDS);

  logic [(IQ_WORDS-1)*WORD_BITS-1:0] iq_buf;  // IQ words 1..14
  logic [IW-1:0]                 idx;
  logic [7:0]                    bf_index;
  logic                          last_word;

  assign last_word = (idx == IW'(IQ_WORDS-1));
  assign iq_ready  = !last_word || !bf_valid || bf_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx      <= '0;
      bf_valid <= 1'b0;
      bf_index <= '0;
      iq_buf   <= '0;
      bf_data  <= '0;
    end else begin
      if (bf_valid && bf_ready) bf_valid <= 1'b0;
      if (iq_valid && iq_ready) begin
        if (last_word) begin
          idx      <= '0;
          bf_valid <= 1'b1;
          bf_index <= bf_index + 8'd1;
          bf_data  <= {iq_data, iq_buf, WORD_BITS'(bf_index)};
        end else begin
          iq_buf[idx*WORD_BITS +: WORD_BITS] <= iq_data;
          idx <= idx + 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst)
                   bf_valid && !bf_ready |=> bf_valid && $stable(bf_data));
endmodule
