// ptp_link_bench: bench for ptp_engine, used by tb_ptp_engine: a master engine and a slave engine exchange PTP
// messages over a model link of fixed latency (LINK cycles each way) that
// strips and checks the Ethernet header the way the Ethernet unpacker would.
// The two local clocks are modelled here: the slave's time is the master's
// plus OFFSET_NS. Run once in one-step and once in two-step mode (TWO_STEP
// parameter of this bench, default one-step). Checks:
//   * every reported SYNC has t2 - t1 = link delay + offset;
//   * every delay exchange has ((t4-t1)-(t3-t2))/2 = link delay and
//     t2 - t1 - delay = offset;
//   * SYNCs come every SYNC_INTERVAL cycles, exchanges every DREQ_EVERY SYNCs;
//   * a DELAY_RESP whose requestingPortIdentity is corrupted on the link is
//     rejected and counted, and that exchange is not reported.
module ptp_link_bench #(
  parameter bit TWO_STEP = 1'b0
) (
  output int checks,
  output int failures,
  output bit done
);
  import fh_pkg::*;
  localparam int SYNC_INTERVAL = 600, DREQ_EVERY = 4, LINK = 37;
  localparam longint OFFSET_NS = 123_456;
  localparam longint LINK_NS = LINK * 8;

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  function automatic ptp_ts_t mk(longint t);
    ptp_ts_t r; r.sec = 48'(t / 1_000_000_000); r.ns = 32'(t % 1_000_000_000); return r;
  endfunction
  ptp_ts_t m_time, s_time;
  assign m_time = mk(5_000_000_000 + cyc * 8);
  assign s_time = mk(5_000_000_000 + cyc * 8 + OFFSET_NS);

  // master
  logic [7:0] m_tdata, s_tdata, m_rdata, s_rdata;
  logic m_tvalid, m_tready, m_tlast, s_tvalid, s_tready, s_tlast;
  logic m_sof, m_rvalid, m_rlast, s_sof, s_rvalid, s_rlast;
  logic sv, dv, m_sv, m_dv;
  ptp_ts_t t1, t2, d1, d2, d3, d4, mx1, mx2, md1, md2, md3, md4;
  logic m_t3s, s_t3s;
  logic [31:0] m_sent, m_rcvd, m_mis, m_bad, s_sent, s_rcvd, s_mis, s_bad;

  ptp_engine #(.IS_MASTER(1), .TWO_STEP(TWO_STEP), .SYNC_INTERVAL_CYC(SYNC_INTERVAL),
               .DREQ_EVERY(DREQ_EVERY), .SRC_MAC(MAC_BBU), .PORT_ID(80'h0200_00FF_FE00_0BB0_0001)) u_m (
    .clk, .rst, .enable(1'b1), .rtc_time(m_time),
    .tx_tdata(m_tdata), .tx_tvalid(m_tvalid), .tx_tready(m_tready), .tx_tlast(m_tlast),
    .rx_sof(m_sof), .rx_tdata(m_rdata), .rx_tvalid(m_rvalid), .rx_tlast(m_rlast),
    .sync_valid(m_sv), .sync_t1(mx1), .sync_t2(mx2), .delay_valid(m_dv),
    .d_t1(md1), .d_t2(md2), .d_t3(md3), .d_t4(md4), .t3_stamp(m_t3s),
    .msgs_sent(m_sent), .msgs_received(m_rcvd), .resp_mismatch(m_mis), .rx_bad_msgs(m_bad));

  ptp_engine #(.IS_MASTER(0), .TWO_STEP(TWO_STEP), .SYNC_INTERVAL_CYC(SYNC_INTERVAL),
               .DREQ_EVERY(DREQ_EVERY), .SRC_MAC(MAC_RRU), .PORT_ID(80'h0200_00FF_FE00_0AA0_0001)) u_s (
    .clk, .rst, .enable(1'b1), .rtc_time(s_time),
    .tx_tdata(s_tdata), .tx_tvalid(s_tvalid), .tx_tready(s_tready), .tx_tlast(s_tlast),
    .rx_sof(s_sof), .rx_tdata(s_rdata), .rx_tvalid(s_rvalid), .rx_tlast(s_rlast),
    .sync_valid(sv), .sync_t1(t1), .sync_t2(t2), .delay_valid(dv),
    .d_t1(d1), .d_t2(d2), .d_t3(d3), .d_t4(d4), .t3_stamp(s_t3s),
    .msgs_sent(s_sent), .msgs_received(s_rcvd), .resp_mismatch(s_mis), .rx_bad_msgs(s_bad));

  assign m_tready = 1'b1;
  assign s_tready = 1'b1;

  initial begin checks = 0; failures = 0; done = 0; end
  int n_resp = 0, corrupt_done = 0;

  // link model: LINK-stage pipe; header bytes checked and not forwarded
  typedef struct packed {logic v; logic l; logic [7:0] d; logic [6:0] pos;} lb_t;
  lb_t m2s[LINK], s2m[LINK];
  logic [6:0] m_pos, s_pos;
  logic [111:0] hdr_m = {MAC_PTP_MCAST, MAC_BBU, ETHERTYPE_PTP};
  logic [111:0] hdr_s = {MAC_PTP_MCAST, MAC_RRU, ETHERTYPE_PTP};
  logic corrupt_this;
  always @(posedge clk) begin
    if (rst) begin
      m_pos <= 0; s_pos <= 0; corrupt_this <= 0;
      for (int i = 0; i < LINK; i++) begin m2s[i] <= '0; s2m[i] <= '0; end
    end else begin
      for (int i = LINK - 1; i > 0; i--) begin m2s[i] <= m2s[i-1]; s2m[i] <= s2m[i-1]; end
      m2s[0] <= '{v: m_tvalid, l: m_tlast, d: m_tdata, pos: m_pos};
      s2m[0] <= '{v: s_tvalid, l: s_tlast, d: s_tdata, pos: s_pos};
      if (m_tvalid) begin
        m_pos <= m_tlast ? 7'd0 : m_pos + 7'd1;
        if (m_pos < 14) begin
          checks++;
          if (m_tdata !== hdr_m[8*(13-m_pos) +: 8]) begin failures++; $display("master header byte %0d", m_pos); end
        end
        // corrupt requestingPortIdentity of the 3rd DELAY_RESP
        if (m_pos == 14 && m_tdata[3:0] == 4'h9) begin
          n_resp++;
          corrupt_this <= (n_resp == 2);
        end
        if (m_pos == 14 + 45 && corrupt_this) begin
          m2s[0].d <= m_tdata ^ 8'h01;
          corrupt_done++;
        end
      end
      if (s_tvalid) begin
        s_pos <= s_tlast ? 7'd0 : s_pos + 7'd1;
        if (s_pos < 14) begin
          checks++;
          if (s_tdata !== hdr_s[8*(13-s_pos) +: 8]) begin failures++; $display("slave header byte %0d", s_pos); end
        end
      end
    end
  end
  assign s_sof    = m2s[LINK-1].v && m2s[LINK-1].pos == 0;
  assign s_rvalid = m2s[LINK-1].v && m2s[LINK-1].pos >= 14;
  assign s_rdata  = m2s[LINK-1].d;
  assign s_rlast  = m2s[LINK-1].l;
  assign m_sof    = s2m[LINK-1].v && s2m[LINK-1].pos == 0;
  assign m_rvalid = s2m[LINK-1].v && s2m[LINK-1].pos >= 14;
  assign m_rdata  = s2m[LINK-1].d;
  assign m_rlast  = s2m[LINK-1].l;

  // checks on reported results
  int n_sync = 0, n_delay = 0;
  longint last_sync_cyc = -1;
  always @(posedge clk) if (!rst) begin
    if (sv) begin
      n_sync++;
      checks++;
      if (ts_diff(t2, t1) != LINK_NS + OFFSET_NS) begin failures++; $display("t2-t1 = %0d", ts_diff(t2, t1)); end
      if (last_sync_cyc >= 0) begin
        checks++;
        if (cyc - last_sync_cyc != SYNC_INTERVAL) begin failures++; $display("SYNC interval %0d", cyc - last_sync_cyc); end
      end
      last_sync_cyc = cyc;
    end
    if (dv) begin
      longint d;
      n_delay++;
      d = (ts_diff(d4, d1) - ts_diff(d3, d2)) / 2;
      checks++;
      if (d != LINK_NS) begin failures++; $display("delay %0d expected %0d", d, LINK_NS); end
      checks++;
      if (ts_diff(d2, d1) - d != OFFSET_NS) begin failures++; $display("offset %0d", ts_diff(d2, d1) - d); end
    end
  end

  // t3_stamp marks the cycle after the one whose time became t3
  ptp_ts_t s_time_q, s_time_q2;
  logic    s_t3s_q;
  int      n_t3s = 0;
  always @(posedge clk) begin
    if (!rst && s_t3s_q) begin
      n_t3s++; checks++;
      if (d3 != s_time_q2) begin failures++; $display("t3_stamp not aligned with t3"); end
    end
    if (!rst && m_t3s) begin failures++; $display("master t3_stamp"); end
    s_t3s_q   <= s_t3s;
    s_time_q  <= s_time;
    s_time_q2 <= s_time_q;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (n_sync == 41);
    repeat (400) @(posedge clk);
    checks++;
    // 41 SYNCs -> exchanges on SYNC 0,4,...,40 = 11, one of them rejected
    if (n_delay != 10) begin failures++; $display("exchanges reported %0d", n_delay); end
    checks++;
    if (s_mis != 1 || corrupt_done != 1) begin failures++; $display("resp_mismatch %0d", s_mis); end
    checks++;
    if (m_bad != 0 || s_bad != 0) begin failures++; $display("bad messages"); end
    checks++;
    if (s_sent != 11 || m_rcvd != 11 || n_t3s != 11) begin failures++; $display("DELAY_REQ sent %0d received %0d", s_sent, m_rcvd); end
    checks++;
    if (m_sent != (TWO_STEP ? 2 * 41 : 41) + 11) begin failures++; $display("master sent %0d", m_sent); end
    done = 1;
  end
endmodule
