// Testbench for eth_unpacker: streams a mix of frames into the parser -
// fronthaul frames to this station, fronthaul frames to another station,
// PTP frames to the PTP multicast address, a frame of unknown EtherType and a
// truncated fronthaul frame - and checks that exactly the expected basic
// frames come out, that PTP payload bytes are forwarded with tlast, that
// rx_sof marks every frame start, and the frame counters.
module tb_eth_unpacker;
  localparam int N = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0] rx_tdata, ptp_tdata;
  logic rx_tvalid, rx_tlast, rx_sof, bf_valid, ptp_tvalid, ptp_tlast;
  logic [127:0] bf_data;
  logic [31:0] fh_frames, ptp_frames, bad_frames;
  int checks = 0, failures = 0;

  eth_unpacker #(.BF_PER_FRAME(N), .OWN_MAC(48'h02_00_00_00_0A_A0)) dut (.*);

  logic [127:0] exp_bf[$];
  logic [7:0]   exp_ptp[$];
  int n_sof = 0, n_frames = 0, n_ptp_last = 0;

  task automatic send_byte(logic [7:0] b, logic last);
    rx_tdata = b; rx_tvalid = 1; rx_tlast = last;
    @(posedge clk); #1;
    rx_tvalid = $urandom_range(0, 1) ? 0 : 0;  // MAC may idle between bytes
    rx_tlast = 0;
    if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
  endtask

  task automatic send_frame(logic [47:0] dst, logic [15:0] et, int nbytes, bit expect_bfs, bit expect_ptp);
    logic [111:0] h;
    logic [7:0] pay[$];
    h = {dst, 48'h02_00_00_00_0B_B0, et};
    for (int i = 0; i < nbytes; i++) pay.push_back(8'($urandom));
    if (expect_bfs) for (int k = 0; k + 1 <= nbytes / 16 && k < N; k++) begin
      logic [127:0] b;
      for (int j = 0; j < 16; j++) b[8*j +: 8] = pay[16*k + j];
      exp_bf.push_back(b);
    end
    if (expect_ptp) foreach (pay[i]) exp_ptp.push_back(pay[i]);
    for (int i = 0; i < 14; i++) send_byte(h[8*(13-i) +: 8], 1'b0);
    for (int i = 0; i < nbytes; i++) send_byte(pay[i], i == nbytes - 1);
    n_frames++;
  endtask

  always @(posedge clk) if (!rst) begin
    if (rx_sof) n_sof++;
    if (bf_valid) begin
      checks++;
      if (exp_bf.size() == 0) begin failures++; $display("unexpected BF"); end
      else begin
        if (bf_data !== exp_bf[0]) begin failures++; $display("BF mismatch"); end
        void'(exp_bf.pop_front());
      end
    end
    if (ptp_tvalid) begin
      checks++;
      if (exp_ptp.size() == 0) begin failures++; $display("unexpected PTP byte"); end
      else begin
        if (ptp_tdata !== exp_ptp[0]) begin failures++; $display("PTP byte mismatch"); end
        void'(exp_ptp.pop_front());
      end
      if (ptp_tlast) n_ptp_last++;
    end
  end

  initial begin
    rx_tvalid = 0; rx_tlast = 0; rx_tdata = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    send_frame(48'h02_00_00_00_0A_A0, 16'h88B5, 16 * N, 1, 0);   // good
    send_frame(48'h01_1B_19_00_00_00, 16'h88F7, 44, 0, 1);       // PTP
    send_frame(48'h02_00_00_00_0C_C0, 16'h88B5, 16 * N, 0, 0);   // other station
    send_frame(48'h02_00_00_00_0A_A0, 16'h0800, 60, 0, 0);       // IPv4: dropped
    send_frame(48'h02_00_00_00_0A_A0, 16'h88B5, 16 * N - 5, 1, 0); // truncated
    send_frame(48'h02_00_00_00_0A_A0, 16'h88B5, 16 * N, 1, 0);   // good
    send_frame(48'h01_1B_19_00_00_00, 16'h88F7, 54, 0, 1);       // PTP
    send_frame(48'h02_00_00_00_0A_A0, 16'h88B5, 16 * N, 1, 0);   // good
    repeat (5) @(posedge clk);
    checks++; if (exp_bf.size() != 0)  begin failures++; $display("%0d BFs missing", exp_bf.size()); end
    checks++; if (exp_ptp.size() != 0) begin failures++; $display("PTP bytes missing"); end
    checks++; if (n_sof != n_frames)   begin failures++; $display("sof %0d frames %0d", n_sof, n_frames); end
    checks++; if (fh_frames != 3)      begin failures++; $display("fh_frames %0d", fh_frames); end
    checks++; if (ptp_frames != 2 || n_ptp_last != 2) begin failures++; $display("ptp_frames %0d", ptp_frames); end
    checks++; if (bad_frames != 1)     begin failures++; $display("bad_frames %0d", bad_frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
