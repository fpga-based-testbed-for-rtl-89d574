// ptp_tx_framer: serializes one IEEE 1588 (PTPv2) message into an Ethernet
// frame and timestamps its transmission.
//
// On start the message fields are latched and the frame is sent byte by byte:
// Ethernet header (PTP multicast destination, SRC_MAC, EtherType 0x88F7),
// the 34-byte PTP common header (messageType, versionPTP 2, messageLength,
// flags with the two-step bit, zero correctionField, sourcePortIdentity,
// sequenceId, controlField), a 10-byte timestamp (48-bit seconds, 32-bit
// nanoseconds) and, for DELAY_RESP only, the 10-byte requestingPortIdentity.
// The local RTC is sampled when the first byte is accepted; this is the
// transmit timestamp, reported on tx_ts with a tx_ts_valid pulse. With
// one_step set the timestamp field carries that very sample (one-step SYNC);
// otherwise it carries ts_field. The byte layout is IEEE 1588-2008 Annex F.
//
// Interface: start is taken only while !busy. AXI-Stream style byte output;
// a frame is 58 bytes (68 for DELAY_RESP).
module ptp_tx_framer #(
  parameter logic [47:0] SRC_MAC  = fh_pkg::MAC_BBU,
  parameter logic [79:0] PORT_ID  = 80'h0200_00FF_FE00_0BB0_0001
) (
  input  logic              clk,
  input  logic              rst,
  input  fh_pkg::ptp_ts_t   rtc_time,
  input  logic              start,
  input  fh_pkg::ptp_msg_t  msg_type,
  input  logic [15:0]       seq_id,
  input  logic              one_step,
  input  logic              two_step_flag,
  input  fh_pkg::ptp_ts_t   ts_field,
  input  fh_pkg::port_id_t  req_port_id,
  output logic              busy,
  output logic [7:0]        tx_tdata,
  output logic              tx_tvalid,
  input  logic              tx_tready,
  output logic              tx_tlast,
  output fh_pkg::ptp_ts_t   tx_ts,
  output logic              tx_ts_valid
);
  import fh_pkg::*;
  localparam int unsigned MAXLEN = ETH_HDR_LEN + PTP_LEN_RESP;   // 68 bytes

  ptp_msg_t    m_type;
  logic [15:0] m_seq;
  logic        m_one_step, m_two_step;
  ptp_ts_t     m_ts;
  port_id_t    m_req;
  logic [6:0]  idx;
  logic [6:0]  len;
  logic [8*MAXLEN-1:0] frame;
  logic [15:0] msg_len;
  logic [7:0]  control;

  always_comb begin
    msg_len = (m_type == MSG_DELAY_RESP) ? 16'(PTP_LEN_RESP) : 16'(PTP_LEN_BASE);
    unique case (m_type)
      MSG_SYNC:      control = 8'd0;
      MSG_DELAY_REQ: control = 8'd1;
      MSG_FOLLOW_UP: control = 8'd2;
      default:       control = 8'd3;
    endcase
    frame = {MAC_PTP_MCAST, SRC_MAC, ETHERTYPE_PTP,           // 14
             4'h0, m_type, 8'h02, msg_len, 8'h00, 8'h00,        //  6
             {6'd0, m_two_step, 1'b0}, 8'h00,                   //  2 flags
             64'd0, 32'd0,                                      // 12
             PORT_ID, m_seq, control, 8'h7F,                    // 14
             m_ts.sec, m_ts.ns,                                 // 10
             m_req};                                            // 10
    tx_tdata = frame[8*(MAXLEN-1-32'(idx)) +: 8];
  end

  assign len       = 7'(ETH_HDR_LEN) + msg_len[6:0];
  assign tx_tvalid = busy;
  assign tx_tlast  = busy && (idx == len - 7'd1);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy        <= 1'b0;
      idx         <= '0;
      m_type      <= MSG_SYNC;
      m_seq       <= '0;
      m_one_step  <= 1'b0;
      m_two_step  <= 1'b0;
      m_ts        <= '0;
      m_req       <= '0;
      tx_ts       <= '0;
      tx_ts_valid <= 1'b0;
    end else begin
      tx_ts_valid <= 1'b0;
      if (!busy && start) begin
        busy       <= 1'b1;
        idx        <= '0;
        m_type     <= msg_type;
        m_seq      <= seq_id;
        m_one_step <= one_step;
        m_two_step <= two_step_flag;
        m_ts       <= ts_field;
        m_req      <= req_port_id;
      end else if (busy && tx_tready) begin
        idx <= idx + 7'd1;
        if (idx == '0) begin
          tx_ts       <= rtc_time;
          tx_ts_valid <= 1'b1;
          if (m_one_step) m_ts <= rtc_time;
        end
        if (tx_tlast) busy <= 1'b0;
      end
    end
  end
endmodule
