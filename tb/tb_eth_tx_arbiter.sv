// Testbench for eth_tx_arbiter: two sources send numbered frames of random
// length at random times while the MAC side applies random back-pressure.
// Each frame must reach the output whole and uninterrupted (bytes of one
// frame never mixed with the other source), every frame must be delivered in
// order per source, a PTP frame that waits behind an IQ frame must be counted,
// and when both sources wait for a free link the PTP source must go first.
module tb_eth_tx_arbiter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0] a_tdata, b_tdata, m_tdata;
  logic a_tvalid, a_tready, a_tlast, b_tvalid, b_tready, b_tlast, m_tvalid, m_tready, m_tlast;
  logic [31:0] frames_a, frames_b, waits_b;
  int checks = 0, failures = 0;

  eth_tx_arbiter dut (.*);

  // sources: byte = {source bit, 7-bit frame number}; length random
  int a_len, a_pos, a_num, b_len, b_pos, b_num;
  always @(posedge clk) begin
    if (rst) begin a_tvalid <= 0; a_pos <= 0; a_num <= 0; a_len <= 20; end
    else begin
      if (a_tvalid && a_tready) begin
        if (a_tlast) begin a_tvalid <= 0; a_pos <= 0; a_num <= a_num + 1; a_len <= $urandom_range(20, 80); end
        else a_pos <= a_pos + 1;
      end else if (!a_tvalid && $urandom_range(0, 20) == 0) a_tvalid <= 1;
    end
  end
  always @(posedge clk) begin
    if (rst) begin b_tvalid <= 0; b_pos <= 0; b_num <= 0; b_len <= 10; end
    else begin
      if (b_tvalid && b_tready) begin
        if (b_tlast) begin b_tvalid <= 0; b_pos <= 0; b_num <= b_num + 1; b_len <= $urandom_range(5, 15); end
        else b_pos <= b_pos + 1;
      end else if (!b_tvalid && $urandom_range(0, 60) == 0) b_tvalid <= 1;
    end
  end
  assign a_tdata = {1'b0, 7'(a_num)};
  assign a_tlast = (a_pos == a_len - 1);
  assign b_tdata = {1'b1, 7'(b_num)};
  assign b_tlast = (b_pos == b_len - 1);
  always @(posedge clk) m_tready <= ($urandom_range(0, 4) != 0);

  // monitor
  logic in_frame = 0;
  logic [7:0] cur;
  int next_a = 0, next_b = 0, both_wait = 0, exp_waits = 0;
  logic b_wait_flag = 0;
  always @(posedge clk) if (!rst) begin
    if (m_tvalid && m_tready) begin
      checks++;
      if (in_frame && m_tdata !== cur) begin failures++; $display("frame interleaved"); end
      if (!in_frame) begin
        cur = m_tdata;
        if (m_tdata[7]) begin
          if (m_tdata[6:0] !== 7'(next_b)) begin failures++; $display("B frame order"); end
          next_b++;
        end else begin
          if (m_tdata[6:0] !== 7'(next_a)) begin failures++; $display("A frame order"); end
          next_a++;
        end
      end
      in_frame = !m_tlast;
    end
    // both waiting with no frame in progress and no grant held: B must win
    if (!in_frame && a_tvalid && b_tvalid && m_tvalid && dut.grant == dut.G_NONE) begin
      both_wait++; checks++;
      if (m_tdata[7] !== 1'b1) begin failures++; $display("priority violated"); end
    end
  end
  // reference count of PTP frames held behind an IQ frame
  always @(posedge clk) if (!rst) begin
    if (b_tvalid && !b_tready && in_frame && !cur[7] && !b_wait_flag) begin b_wait_flag = 1; exp_waits++; end
    if (b_tvalid && b_tready) b_wait_flag = 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (30000) @(posedge clk);
    checks++; if (frames_a != 32'(next_a) - (in_frame && !cur[7]) ) begin failures++; $display("frames_a %0d next_a %0d", frames_a, next_a); end
    checks++; if (frames_b != 32'(next_b) - (in_frame && cur[7])) begin failures++; $display("frames_b %0d next_b %0d", frames_b, next_b); end
    checks++; if (waits_b == 0 || waits_b > 32'(next_b + 1)) begin failures++; $display("waits_b %0d", waits_b); end
    checks++; if (both_wait == 0) begin failures++; $display("contention never seen"); end
    $display("waits_b=%0d ref=%0d contention=%0d", waits_b, exp_waits, both_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
