// eth_switch_model: behavioural model (not synthesizable) of one direction of
// the Ethernet path between the two FPGAs: transmitting MAC, PHYs, cable
// and a store-and-forward L2 switch, for simulation only.
//
// Frames are taken from the sending side's MAC byte stream (in_clk) at
// Gigabit line rate: after each frame in_tready is held low for 24 byte
// times, the preamble, FCS and inter-frame gap the MAC adds. Each frame is
// delivered on the receiving side (out_clk) as an uninterrupted byte stream,
// LATENCY_NS plus a random extra of 0..PDV_NS after its last byte arrived
// (packet delay variation), never overtaking an earlier frame.
module eth_switch_model #(
  parameter int LATENCY_NS = 2000,
  parameter int PDV_NS     = 0
) (
  input  logic       in_clk,
  input  logic       in_en,       // sender out of reset
  input  logic [7:0] in_tdata,
  input  logic       in_tvalid,
  output logic       in_tready,
  input  logic       in_tlast,
  input  logic       out_clk,
  output logic [7:0] out_tdata,
  output logic       out_tvalid,
  output logic       out_tlast,
  output int         frames
);
  logic [8:0] bytes[$];      // {last, data}
  realtime    due[$];
  int         gap = 0;
  initial frames = 0;

  assign in_tready = (gap == 0);

  always @(posedge in_clk) begin
    if (gap > 0) gap <= gap - 1;
    if (in_en && in_tvalid && in_tready) begin
      bytes.push_back({in_tlast, in_tdata});
      if (in_tlast) begin
        due.push_back($realtime + LATENCY_NS + $urandom_range(0, PDV_NS));
        gap <= 24;
      end
    end
  end

  logic     sending = 0;
  realtime  last_due = 0;
  always @(posedge out_clk) begin
    out_tvalid <= 1'b0;
    out_tlast  <= 1'b0;
    if (!sending && due.size() > 0) begin
      if (due[0] < last_due) due[0] = last_due;
      if ($realtime >= due[0]) begin
        last_due = due.pop_front();
        sending = 1;
      end
    end
    if (sending) begin
      logic [8:0] b;
      b = bytes.pop_front();
      out_tdata  <= b[7:0];
      out_tvalid <= 1'b1;
      out_tlast  <= b[8];
      if (b[8]) begin
        sending = 0;
        frames <= frames + 1;
      end
    end
  end
endmodule
