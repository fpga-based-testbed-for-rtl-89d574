// Testbench for eth_packer: a reference queue of random basic frames feeds
// the packer through the same valid/ready/count signals a fh_queue gives;
// the MAC side applies random back-pressure. Every frame must be the 14-byte
// header (destination, source, EtherType) followed by exactly BF_PER_FRAME
// basic frames, least significant byte first, with tlast on the last byte;
// no frame may start before a whole frame's worth of BFs is queued. With no
// back-pressure a frame takes 14 + 16*N cycles.
module tb_eth_packer;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [127:0] bf_data;
  logic bf_valid, bf_ready, tx_tvalid, tx_tready, tx_tlast;
  logic [6:0] bf_count;
  logic [7:0] tx_tdata;
  logic [31:0] frames_sent;
  int checks = 0, failures = 0, phase = 0;

  eth_packer #(.BF_PER_FRAME(N), .CNT_BITS(7),
               .SRC_MAC(48'h02_00_00_00_0B_B0), .DST_MAC(48'h02_00_00_00_0A_A0)) dut (.*);

  logic [127:0] q[$];        // the transmit queue model
  logic [127:0] sent[$];     // every BF ever queued, in order
  logic [7:0]   exp_bytes[$];

  assign bf_valid = q.size() > 0;
  assign bf_data  = (q.size() > 0) ? q[0] : '0;
  assign bf_count = 7'(q.size());

  // producer adds BFs in bursts, slower than the packer drains
  always @(posedge clk) if (!rst) begin
    if (bf_valid && bf_ready) void'(q.pop_front());
    if ($urandom_range(0, 40) == 0 && q.size() < 60) begin
      logic [127:0] b;
      b = {$urandom, $urandom, $urandom, $urandom};
      q.push_back(b);
      sent.push_back(b);
    end
  end
  always @(posedge clk) tx_tready <= (phase == 1) || ($urandom_range(0, 3) != 0);

  int byte_i = 0, nframes = 0, start_cyc = 0, cyc = 0, fast_frames = 0;
  logic [111:0] hdr = {48'h02_00_00_00_0A_A0, 48'h02_00_00_00_0B_B0, 16'h88B5};
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst && tx_tvalid && tx_tready) begin
    logic [7:0] e;
    if (byte_i == 0) start_cyc = cyc;
    if (byte_i < 14) e = hdr[8*(13-byte_i) +: 8];
    else begin
      int k, j;
      k = (byte_i - 14) / 16; j = (byte_i - 14) % 16;
      e = sent[nframes * N + k][8*j +: 8];
    end
    checks++;
    if (tx_tdata !== e) begin failures++; $display("frame %0d byte %0d: %0h expected %0h", nframes, byte_i, tx_tdata, e); end
    checks++;
    if (tx_tlast !== (byte_i == 14 + 16 * N - 1)) begin failures++; $display("tlast at byte %0d", byte_i); end
    byte_i++;
    if (tx_tlast) begin
      if (phase == 1) begin
        checks++; fast_frames++;
        if (cyc - start_cyc != 14 + 16 * N - 1) begin failures++; $display("frame took %0d cycles", cyc - start_cyc + 1); end
      end
      byte_i = 0; nframes++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (nframes == 20);
    phase = 1;
    wait (nframes == 30);
    checks++;
    if (frames_sent != 30 && frames_sent != 29) begin failures++; $display("frames_sent %0d", frames_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
