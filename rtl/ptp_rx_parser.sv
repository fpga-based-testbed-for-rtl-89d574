// ptp_rx_parser: decodes received IEEE 1588 (PTPv2) messages and attaches
// their receive timestamps.
//
// The RTC is sampled on rx_sof, the first byte of every frame arriving from
// the MAC, so every frame gets the same reference point as on transmit. The
// PTP bytes that follow the Ethernet header (from the Ethernet unpacker) are
// stored, and when the last one arrives the fields are decoded and presented
// for one cycle with msg_valid: messageType, two-step flag, sequenceId,
// sourcePortIdentity, the 10-byte timestamp field and, for DELAY_RESP, the
// requestingPortIdentity, together with rx_ts. A message whose versionPTP is
// not 2 or that is shorter than 44 bytes is counted in bad_msgs and not
// reported.
//
// Interface: byte stream without back-pressure; msg_valid follows the last
// byte by one cycle. The timestamp point (first byte at the MAC interface)
// is this design's choice.
module ptp_rx_parser (
  input  logic              clk,
  input  logic              rst,
  input  fh_pkg::ptp_ts_t   rtc_time,
  input  logic              rx_sof,
  input  logic [7:0]        rx_tdata,
  input  logic              rx_tvalid,
  input  logic              rx_tlast,
  output logic              msg_valid,
  output fh_pkg::ptp_msg_t  msg_type,
  output logic              two_step,
  output logic [15:0]       seq_id,
  output fh_pkg::port_id_t  src_port_id,
  output fh_pkg::ptp_ts_t   ts_field,
  output fh_pkg::port_id_t  req_port_id,
  output fh_pkg::ptp_ts_t   rx_ts,
  output logic [31:0]       bad_msgs
);
  import fh_pkg::*;
  localparam int unsigned N = PTP_LEN_RESP;   // bytes kept

  logic [8*N-1:0] msg;
  logic [6:0]     cnt;
  ptp_ts_t        sof_ts;
  logic [8*N-1:0] full;       // message including the last byte
  logic           ok;

  always_comb begin
    full = msg;
    if (cnt < 7'(N)) full[8*(N-1-32'(cnt)) +: 8] = rx_tdata;
    ok = (full[8*(N-2) +: 4] == 4'h2) && (cnt >= 7'(PTP_LEN_BASE-1));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      msg         <= '0;
      cnt         <= '0;
      sof_ts      <= '0;
      msg_valid   <= 1'b0;
      msg_type    <= MSG_SYNC;
      two_step    <= 1'b0;
      seq_id      <= '0;
      src_port_id <= '0;
      ts_field    <= '0;
      req_port_id <= '0;
      rx_ts       <= '0;
      bad_msgs    <= '0;
    end else begin
      msg_valid <= 1'b0;
      if (rx_sof) sof_ts <= rtc_time;
      if (rx_tvalid) begin
        msg <= full;
        cnt <= (cnt < 7'(N)) ? cnt + 7'd1 : cnt;
        if (rx_tlast) begin
          cnt <= '0;
          msg <= '0;
          if (ok) begin
            msg_valid   <= 1'b1;
            msg_type    <= ptp_msg_t'(full[8*N-5 -: 4]);
            two_step    <= full[8*(N-7)+1];
            src_port_id <= full[8*(N-20)-1 -: 80];
            seq_id      <= full[8*(N-30)-1 -: 16];
            ts_field    <= full[8*(N-34)-1 -: 80];
            req_port_id <= full[8*(N-44)-1 -: 80];
            rx_ts       <= sof_ts;
          end else begin
            bad_msgs <= bad_msgs + 32'd1;
          end
        end
      end
    end
  end
endmodule
