// eth_tx_arbiter: shares the one MAC transmit stream between the fronthaul
// (IQ) frames and the PTP frames.
//
// Arbitration is per frame: once a source is granted, it keeps the stream
// until it sends tlast. When both wait, the PTP source (port b) goes first,
// so a PTP message waits at most for the IQ frame already in flight; that
// waiting time is the packet delay variation this link adds to PTP. The
// priority order is this design's choice.
//
// Interface: two AXI-Stream style byte inputs, one output. The data path is
// combinational (no added latency); only the grant is registered, so a PTP
// engine that timestamps its first accepted byte timestamps the byte the MAC
// takes. grant_b_count counts frames sent from port b, waits_b counts PTP
// frames that had to wait behind an IQ frame.
module eth_tx_arbiter (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  a_tdata,
  input  logic        a_tvalid,
  output logic        a_tready,
  input  logic        a_tlast,
  input  logic [7:0]  b_tdata,
  input  logic        b_tvalid,
  output logic        b_tready,
  input  logic        b_tlast,
  output logic [7:0]  m_tdata,
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic        m_tlast,
  output logic [31:0] frames_a,
  output logic [31:0] frames_b,
  output logic [31:0] waits_b
);
  typedef enum logic [1:0] {G_NONE, G_A, G_B} grant_t;
  grant_t grant, sel;
  logic   b_waiting;

  // The source that owns the stream in this cycle
  always_comb begin
    sel = grant;
    if (grant == G_NONE) begin
      if (b_tvalid)      sel = G_B;
      else if (a_tvalid) sel = G_A;
    end
  end

  always_comb begin
    m_tdata  = '0;
    m_tvalid = 1'b0;
    m_tlast  = 1'b0;
    a_tready = 1'b0;
    b_tready = 1'b0;
    if (sel == G_A) begin
      m_tdata  = a_tdata;
      m_tvalid = a_tvalid;
      m_tlast  = a_tlast;
      a_tready = m_tready;
    end else if (sel == G_B) begin
      m_tdata  = b_tdata;
      m_tvalid = b_tvalid;
      m_tlast  = b_tlast;
      b_tready = m_tready;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      grant     <= G_NONE;
      frames_a  <= '0;
      frames_b  <= '0;
      waits_b   <= '0;
      b_waiting <= 1'b0;
    end else begin
      if (m_tvalid && m_tready) begin
        grant <= m_tlast ? G_NONE : sel;
        if (m_tlast && sel == G_A) frames_a <= frames_a + 32'd1;
        if (m_tlast && sel == G_B) frames_b <= frames_b + 32'd1;
      end else begin
        grant <= sel;
      end
      // A PTP frame that is held off by an IQ frame
      if (b_tvalid && sel == G_A && !b_waiting) begin
        b_waiting <= 1'b1;
        waits_b   <= waits_b + 32'd1;
      end
      if (sel == G_B) b_waiting <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(a_tready && b_tready));
endmodule
