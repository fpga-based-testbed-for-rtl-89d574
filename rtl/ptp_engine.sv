// ptp_engine: the IEEE 1588 delay request-response mechanism, as master or
// as slave ordinary clock.
//
// Master (IS_MASTER = 1, the BBU): every SYNC_INTERVAL_CYC cycles it sends a
// SYNC. In one-step mode (TWO_STEP = 0) the SYNC carries its own transmit time
// t1; in two-step mode the SYNC has the two-step flag set and a FOLLOW_UP
// with t1 follows. Each DELAY_REQ received is timestamped (t4) and answered
// with a DELAY_RESP carrying t4, the request's sequenceId and its
// sourcePortIdentity as requestingPortIdentity.
// Slave (IS_MASTER = 0, the RRU): a SYNC is timestamped on arrival (t2) and
// its t1 taken from the SYNC or from the matching FOLLOW_UP; each (t1, t2)
// pair is reported with sync_valid. On every DREQ_EVERY-th SYNC it sends a
// DELAY_REQ at once, keeping its transmit time t3. A DELAY_RESP is accepted
// only if its requestingPortIdentity is this port and its sequenceId is that
// of the outstanding request; it then reports t1..t4 with delay_valid.
// Rejected responses are counted in resp_mismatch. A request whose response
// has not come by the next exchange is abandoned. t3_stamp pulses in the
// cycle after the one whose RTC time became t3, so a servo can tell which of
// its own RTC steps t3 already contains.
//
// Message framing and timestamping are in ptp_tx_framer and ptp_rx_parser.
// Interfaces: byte stream to the transmit arbiter, byte stream from the
// Ethernet unpacker, the local RTC time in. The defaults give 128 SYNC/s at a
// 125 MHz clock and one delay exchange every 16 SYNCs (8/s). The one-step
// default is this design's choice.
module ptp_engine #(
  parameter bit          IS_MASTER         = 1'b1,
  parameter bit          TWO_STEP          = 1'b0,
  parameter int unsigned SYNC_INTERVAL_CYC = 976_562,
  parameter int unsigned DREQ_EVERY        = 16,
  parameter logic [47:0] SRC_MAC           = fh_pkg::MAC_BBU,
  parameter logic [79:0] PORT_ID           = 80'h0200_00FF_FE00_0BB0_0001
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  fh_pkg::ptp_ts_t  rtc_time,
  // to the transmit arbiter
  output logic [7:0]       tx_tdata,
  output logic             tx_tvalid,
  input  logic             tx_tready,
  output logic             tx_tlast,
  // from the Ethernet unpacker
  input  logic             rx_sof,
  input  logic [7:0]       rx_tdata,
  input  logic             rx_tvalid,
  input  logic             rx_tlast,
  // slave results
  output logic             sync_valid,
  output fh_pkg::ptp_ts_t  sync_t1,
  output fh_pkg::ptp_ts_t  sync_t2,
  output logic             delay_valid,
  output fh_pkg::ptp_ts_t  d_t1,
  output fh_pkg::ptp_ts_t  d_t2,
  output fh_pkg::ptp_ts_t  d_t3,
  output fh_pkg::ptp_ts_t  d_t4,
  output logic             t3_stamp,
  // statistics
  output logic [31:0]      msgs_sent,
  output logic [31:0]      msgs_received,
  output logic [31:0]      resp_mismatch,
  output logic [31:0]      rx_bad_msgs
);
  import fh_pkg::*;
  localparam int unsigned TW = $clog2(SYNC_INTERVAL_CYC + 1);
  localparam int unsigned DW = $clog2(DREQ_EVERY + 1);

  // framer
  logic        f_start, f_busy, f_one_step, f_two_flag, f_ts_valid;
  ptp_msg_t    f_type, cur_type;
  logic [15:0] f_seq;
  ptp_ts_t     f_ts, f_tx_ts;
  port_id_t    f_req;

  ptp_tx_framer #(.SRC_MAC(SRC_MAC), .PORT_ID(PORT_ID)) u_framer (
    .clk, .rst, .rtc_time, .start(f_start), .msg_type(f_type), .seq_id(f_seq),
    .one_step(f_one_step), .two_step_flag(f_two_flag), .ts_field(f_ts),
    .req_port_id(f_req), .busy(f_busy), .tx_tdata, .tx_tvalid, .tx_tready,
    .tx_tlast, .tx_ts(f_tx_ts), .tx_ts_valid(f_ts_valid));

  assign t3_stamp = !IS_MASTER && f_ts_valid && cur_type == MSG_DELAY_REQ;

  // parser
  logic        p_valid, p_two;
  ptp_msg_t    p_type;
  logic [15:0] p_seq;
  port_id_t    p_src, p_req;
  ptp_ts_t     p_ts, p_rx_ts;
  
  ptp_rx_parser u_parser (
    .clk, .rst, .rtc_time, .rx_sof, .rx_tdata, .rx_tvalid, .rx_tlast,
    .msg_valid(p_valid), .msg_type(p_type), .two_step(p_two), .seq_id(p_seq),
    .src_port_id(p_src), .ts_field(p_ts), .req_port_id(p_req),
    .rx_ts(p_rx_ts), .bad_msgs(rx_bad_msgs));

  // protocol state
  logic [TW-1:0] timer;
  logic          sync_pend, fup_pend, resp_pend, dreq_pend, dreq_out;
  logic [15:0]   sync_seq, dreq_seq, resp_seq, fup_seq, wait_seq;
  ptp_ts_t       fup_ts, resp_t4, wait_t2;
  port_id_t      resp_req;
  logic          wait_fup, exch_sync;   // slave: waiting FOLLOW_UP; this SYNC opens an exchange
  logic [DW-1:0] sync_cnt;
  logic          launched;              // framer was started last cycle

  // transmit scheduling: FOLLOW_UP, then DELAY_RESP / DELAY_REQ, then SYNC
  always_comb begin
    f_start    = 1'b0;
    f_type     = MSG_SYNC;
    f_seq      = sync_seq;
    f_one_step = 1'b0;
    f_two_flag = 1'b0;
    f_ts       = '0;
    f_req      = '0;
    if (!f_busy && !launched) begin
      if (fup_pend) begin
        f_start = 1'b1; f_type = MSG_FOLLOW_UP; f_seq = fup_seq; f_ts = fup_ts;
      end else if (resp_pend) begin
        f_start = 1'b1; f_type = MSG_DELAY_RESP; f_seq = resp_seq;
        f_ts = resp_t4; f_req = resp_req;
      end else if (dreq_pend) begin
        f_start = 1'b1; f_type = MSG_DELAY_REQ; f_seq = dreq_seq;
      end else if (sync_pend) begin
        f_start = 1'b1; f_type = MSG_SYNC; f_seq = sync_seq;
        f_one_step = !TWO_STEP; f_two_flag = TWO_STEP;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      timer <= '0; sync_pend <= 1'b0; fup_pend <= 1'b0; resp_pend <= 1'b0;
      dreq_pend <= 1'b0; dreq_out <= 1'b0; sync_seq <= '0; dreq_seq <= '0;
      resp_seq <= '0; fup_seq <= '0; wait_seq <= '0; fup_ts <= '0;
      resp_t4 <= '0; wait_t2 <= '0; resp_req <= '0; wait_fup <= 1'b0;
      exch_sync <= 1'b0; sync_cnt <= '0; launched <= 1'b0; cur_type <= MSG_SYNC;
      sync_valid <= 1'b0; sync_t1 <= '0; sync_t2 <= '0; delay_valid <= 1'b0;
      d_t1 <= '0; d_t2 <= '0; d_t3 <= '0; d_t4 <= '0;
      msgs_sent <= '0; msgs_received <= '0; resp_mismatch <= '0;
    end else begin
      sync_valid  <= 1'b0;
      delay_valid <= 1'b0;
      launched    <= f_start;

      // ---- transmit bookkeeping
      if (f_start) begin
        cur_type  <= f_type;
        msgs_sent <= msgs_sent + 32'd1;
        unique case (f_type)
          MSG_FOLLOW_UP:  fup_pend  <= 1'b0;
          MSG_DELAY_RESP: resp_pend <= 1'b0;
          MSG_DELAY_REQ:  dreq_pend <= 1'b0;
          default: begin
            sync_pend <= 1'b0;
            sync_seq  <= sync_seq + 16'd1;
          end
        endcase
      end
      if (f_ts_valid) begin
        if (cur_type == MSG_SYNC && TWO_STEP) begin
          fup_pend <= 1'b1;
          fup_seq  <= sync_seq - 16'd1;
          fup_ts   <= f_tx_ts;
        end
        if (cur_type == MSG_DELAY_REQ) begin
          d_t3     <= f_tx_ts;
          dreq_out <= 1'b1;
        end
      end

      if (IS_MASTER) begin
        // ---- master: SYNC timer and DELAY_REQ handling
        if (enable) begin
          if (timer == TW'(SYNC_INTERVAL_CYC - 1)) begin
            timer     <= '0;
            sync_pend <= 1'b1;
          end else timer <= timer + 1'b1;
        end
        if (p_valid) begin
          msgs_received <= msgs_received + 32'd1;
          if (p_type == MSG_DELAY_REQ) begin
            resp_pend <= 1'b1;
            resp_seq  <= p_seq;
            resp_t4   <= p_rx_ts;
            resp_req  <= p_src;
          end
        end
      end else if (p_valid) begin
        // ---- slave
        msgs_received <= msgs_received + 32'd1;
        if (p_type == MSG_SYNC && enable) begin
          // every DREQ_EVERY-th SYNC opens a delay exchange right away
          exch_sync <= (sync_cnt == '0);
          if (sync_cnt == '0) begin
            dreq_pend <= 1'b1;
            if (dreq_out) begin          // previous response never came
              dreq_out <= 1'b0;
              dreq_seq <= dreq_seq + 16'd1;
            end
          end
          sync_cnt <= (sync_cnt == DW'(DREQ_EVERY - 1)) ? '0 : sync_cnt + 1'b1;
          if (p_two) begin
            wait_fup <= 1'b1;
            wait_seq <= p_seq;
            wait_t2  <= p_rx_ts;
          end else begin
            wait_fup   <= 1'b0;
            sync_valid <= 1'b1;
            sync_t1    <= p_ts;
            sync_t2    <= p_rx_ts;
            if (sync_cnt == '0) begin
              d_t1 <= p_ts;
              d_t2 <= p_rx_ts;
            end
          end
        end else if (p_type == MSG_FOLLOW_UP && wait_fup && p_seq == wait_seq) begin
          wait_fup   <= 1'b0;
          sync_valid <= 1'b1;
          sync_t1    <= p_ts;
          sync_t2    <= wait_t2;
          if (exch_sync) begin
            d_t1 <= p_ts;
            d_t2 <= wait_t2;
          end
        end else if (p_type == MSG_DELAY_RESP) begin
          if (dreq_out && p_req == PORT_ID && p_seq == dreq_seq) begin
            d_t4        <= p_ts;
            delay_valid <= 1'b1;
            dreq_out    <= 1'b0;
            dreq_seq    <= dreq_seq + 16'd1;
          end else begin
            resp_mismatch <= resp_mismatch + 32'd1;
          end
        end
      end
    end
  end
endmodule
