// eth_unpacker: receive-side parser for frames arriving from the MAC.
//
// The 14-byte Ethernet header is checked as it streams in. A frame addressed
// to this station (or to the PTP multicast address) is then handled by its
// EtherType:
//   * fronthaul (ETHERTYPE): the payload is cut back into basic frames of
//     BF_BITS, least significant byte first, and each whole BF is written to
//     the receive queue (bf_valid pulse). At most BF_PER_FRAME BFs are taken
//     from one frame; a frame that ends inside a BF is counted in bad_frames
//     and its partial BF discarded.
//   * PTP (0x88F7): the bytes after the header are passed to the PTP engine,
//     one cycle later, with ptp_tlast on the last one.
//   * anything else is dropped.
// rx_sof pulses with the first byte of every frame so that the PTP engine can
// take its receive timestamp at the same point of every frame.
//
// Interface: AXI-Stream style input without back-pressure (a MAC cannot be
// stalled). Outputs are registered. The PTP forwarding and frame checks are
// this design's way of sharing one link between IQ data and PTP.
module eth_unpacker #(
  parameter int unsigned BF_BITS      = 128,
  parameter int unsigned BF_PER_FRAME = 32,
  parameter logic [47:0] OWN_MAC      = fh_pkg::MAC_RRU,
  parameter logic [15:0] ETHERTYPE    = fh_pkg::ETHERTYPE_FH
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [7:0]         rx_tdata,
  input  logic               rx_tvalid,
  input  logic               rx_tlast,
  output logic               rx_sof,
  output logic [BF_BITS-1:0] bf_data,
  output logic               bf_valid,
  output logic [7:0]         ptp_tdata,
  output logic               ptp_tvalid,
  output logic               ptp_tlast,
  output logic [31:0]        fh_frames,
  output logic [31:0]        ptp_frames,
  output logic [31:0]        bad_frames
);
  import fh_pkg::*;
  localparam int unsigned BF_BYTES = BF_BITS / 8;
  localparam int unsigned BB = $clog2(BF_BYTES);
  localparam int unsigned FB = $clog2(BF_PER_FRAME + 1);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_FH, S_PTP, S_DROP} state_t;
  state_t state;

  logic [103:0]       hdr;       // first 13 header bytes
  logic [3:0]         hdr_idx;
  logic [BF_BITS-1:0] acc;
  logic [BB-1:0]      byte_idx;
  logic [FB-1:0]      bf_cnt;
  logic [47:0]        dst;
  logic [15:0]        etype;
  logic               addr_ok;
  logic               frame_done;  // all BFs complete, counting this byte

  assign rx_sof  = rx_tvalid && (state == S_IDLE);
  assign dst     = hdr[103:56];
  assign etype   = {hdr[7:0], rx_tdata};
  assign addr_ok = (dst == OWN_MAC) || (dst == MAC_PTP_MCAST);
  assign frame_done = (byte_idx == BB'(BF_BYTES-1)) ? (32'(bf_cnt) + 1 >= BF_PER_FRAME)
                                                    : (byte_idx == '0 && 32'(bf_cnt) >= BF_PER_FRAME);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      hdr        <= '0;
      hdr_idx    <= '0;
      acc        <= '0;
      byte_idx   <= '0;
      bf_cnt     <= '0;
      bf_data    <= '0;
      bf_valid   <= 1'b0;
      ptp_tdata  <= '0;
      ptp_tvalid <= 1'b0;
      ptp_tlast  <= 1'b0;
      fh_frames  <= '0;
      ptp_frames <= '0;
      bad_frames <= '0;
    end else begin
      bf_valid   <= 1'b0;
      ptp_tvalid <= 1'b0;
      ptp_tlast  <= 1'b0;
      if (rx_tvalid) begin
        unique case (state)
          S_IDLE, S_HDR: begin
            hdr     <= {hdr[95:0], rx_tdata};
            hdr_idx <= (state == S_IDLE) ? 4'd1 : hdr_idx + 4'd1;
            if (state == S_IDLE) state <= S_HDR;
            if (rx_tlast) begin
              state      <= S_IDLE;
              bad_frames <= bad_frames + 32'd1;
            end else if (state == S_HDR && hdr_idx == 4'd13) begin
              byte_idx <= '0;
              bf_cnt   <= '0;
              if (addr_ok && etype == ETHERTYPE)          state <= S_FH;
              else if (addr_ok && etype == ETHERTYPE_PTP) state <= S_PTP;
              else                                        state <= S_DROP;
            end
          end
          S_FH: begin
            if (32'(bf_cnt) < BF_PER_FRAME) begin
              acc[8*byte_idx +: 8] <= rx_tdata;
              byte_idx <= byte_idx + 1'b1;
              if (byte_idx == BB'(BF_BYTES-1)) begin
                byte_idx <= '0;
                bf_cnt   <= bf_cnt + 1'b1;
                bf_valid <= 1'b1;
                bf_data  <= acc;
                bf_data[8*(BF_BYTES-1) +: 8] <= rx_tdata;
              end
            end
            if (rx_tlast) begin
              state <= S_IDLE;
              if (frame_done) fh_frames  <= fh_frames + 32'd1;
              else            bad_frames <= bad_frames + 32'd1;
            end
          end
          S_PTP: begin
            ptp_tdata  <= rx_tdata;
            ptp_tvalid <= 1'b1;
            ptp_tlast  <= rx_tlast;
            if (rx_tlast) begin
              state      <= S_IDLE;
              ptp_frames <= ptp_frames + 32'd1;
            end
          end
          S_DROP: if (rx_tlast) state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
