// eth_packer: encapsulates CPRI basic frames into layer-2 Ethernet frames.
//
// A fixed number (BF_PER_FRAME) of basic frames is carried in each Ethernet
// frame, with no IP header, so the network must be an L2 switch. Frame
// layout, sent byte by byte to the MAC (which adds preamble and FCS):
//   destination MAC (6) | source MAC (6) | EtherType (2) | BF 0 | BF 1 | ...
// Each BF is sent without line coding, least significant byte first, so word 0
// (the control word) leads. A frame is started only when the transmit queue
// already holds BF_PER_FRAME basic frames (bf_count), so the byte stream to the
// MAC never pauses inside a frame. The number of BFs per frame, the EtherType
// and the byte order are this design's choices.
//
// Interface: BFs come from the transmit queue (valid/ready, ready pulses on
// the last byte of each BF); bytes leave on an AXI-Stream style port
// (tdata/tvalid/tready/tlast). One byte per accepted cycle; a frame is
// 14 + BF_PER_FRAME*BF_BITS/8 bytes long.
module eth_packer #(
  parameter int unsigned BF_BITS      = 128,
  parameter int unsigned BF_PER_FRAME = 32,
  parameter int unsigned CNT_BITS     = 7,
  parameter logic [47:0] SRC_MAC      = fh_pkg::MAC_BBU,
  parameter logic [47:0] DST_MAC      = fh_pkg::MAC_RRU,
  parameter logic [15:0] ETHERTYPE    = fh_pkg::ETHERTYPE_FH
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [BF_BITS-1:0] bf_data,
  input  logic               bf_valid,
  output logic               bf_ready,
  input  logic [CNT_BITS-1:0] bf_count,
  output logic [7:0]         tx_tdata,
  output logic               tx_tvalid,
  input  logic               tx_tready,
  output logic               tx_tlast,
  output logic [31:0]        frames_sent
);
  localparam int unsigned BF_BYTES = BF_BITS / 8;
  localparam int unsigned BB = $clog2(BF_BYTES);
  localparam int unsigned FB = $clog2(BF_PER_FRAME + 1);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY} state_t;
  state_t state;

  logic [3:0]    hdr_idx;
  logic [BB-1:0] byte_idx;
  logic [FB-1:0] bf_idx;
  logic [111:0]  header;
  logic          fire, last_byte_of_bf;

  assign header          = {DST_MAC, SRC_MAC, ETHERTYPE};
  assign fire            = tx_tvalid && tx_tready;
  assign last_byte_of_bf = (byte_idx == BB'(BF_BYTES-1));

  always_comb begin
    tx_tvalid = (state != S_IDLE);
    tx_tdata  = '0;
    tx_tlast  = 1'b0;
    bf_ready  = 1'b0;
    if (state == S_HDR) begin
      tx_tdata = header[8*(13-hdr_idx) +: 8];
    end else if (state == S_PAY) begin
      tx_tdata = bf_data[8*byte_idx +: 8];
      tx_tlast = last_byte_of_bf && (bf_idx == FB'(BF_PER_FRAME-1));
      bf_ready = tx_tready && last_byte_of_bf;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      hdr_idx     <= '0;
      byte_idx    <= '0;
      bf_idx      <= '0;
      frames_sent <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (32'(bf_count) >= BF_PER_FRAME) begin
          state   <= S_HDR;
          hdr_idx <= '0;
        end
        S_HDR: if (fire) begin
          if (hdr_idx == 4'd13) begin
            state    <= S_PAY;
            byte_idx <= '0;
            bf_idx   <= '0;
          end else hdr_idx <= hdr_idx + 4'd1;
        end
        S_PAY: if (fire) begin
          byte_idx <= byte_idx + 1'b1;
          if (last_byte_of_bf) begin
            byte_idx <= '0;
            bf_idx   <= bf_idx + 1'b1;
            if (tx_tlast) begin
              state       <= S_IDLE;
              frames_sent <= frames_sent + 32'd1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The queue held a whole frame's worth when the frame started.
  assert property (@(posedge clk) disable iff (rst) state == S_PAY |-> bf_valid);
endmodule
