// fh_queue: first-in first-out queue of basic frames, used as the transmit
// and the receive queue of the fronthaul controller.
//
// A plain synchronous FIFO with a memory array of DEPTH entries. The input
// side has valid/ready: on the transmit side the ready is the flow control
// that stalls the IQ source when the queue is full. On the receive side the
// network cannot be stalled, so a word offered while the queue is full is
// dropped and counted in overflows (in_ready is then simply ignored by the
// writer). count gives the fill level, which the Ethernet packer uses to start
// a frame only when a whole frame's worth of basic frames is waiting.
// Timing: a word written in one cycle is visible at the output the next.
// Queue depth and the drop-on-overflow policy are this design's choices.
module fh_queue #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [WIDTH-1:0]         in_data,
  input  logic                     in_valid,
  output logic                     in_ready,
  output logic [WIDTH-1:0]         out_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [$clog2(DEPTH):0]   count,
  output logic [31:0]              overflows
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             push, pop;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      overflows <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (in_valid && !in_ready) overflows <= overflows + 32'd1;
    end
  end

  assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));
endmodule
