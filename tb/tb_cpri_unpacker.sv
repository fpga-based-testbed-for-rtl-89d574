// Testbench for cpri_unpacker: basic frames with consecutive control words
// and counting IQ contents are offered with random valid and the IQ output
// is drained with random ready; the IQ words must come out in order, the
// last control word must be published, and two deliberately skipped control
// words must be counted in cw_errors. With no stalls, 15 IQ words leave per
// 15 cycles.
module tb_cpri_unpacker;
  localparam int W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [16*W-1:0] bf_data;
  logic bf_valid, bf_ready, iq_valid, iq_ready;
  logic [W-1:0] iq_data, cw;
  logic [31:0] cw_errors;
  int checks = 0, failures = 0, phase = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  cpri_unpacker #(.WORD_BITS(W)) dut (.*);

  int nbf_sent = 0, nwords = 0, t0 = 0, t1 = 0;
  logic [W-1:0] word_in, word_exp, cw_in;

  function automatic logic [16*W-1:0] make_bf(logic [W-1:0] c, logic [W-1:0] w0);
    logic [16*W-1:0] b;
    b[W-1:0] = c;
    for (int k = 1; k < 16; k++) b[k*W +: W] = W'(w0 + W'(k - 1));
    return b;
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      bf_valid <= 0; word_in = 0; cw_in = 0; bf_data <= '0;
    end else begin
      if (bf_valid && bf_ready) begin
        nbf_sent++;
        word_in = W'(word_in + 15);
        cw_in   = W'(cw_in + ((nbf_sent == 50 || nbf_sent == 120) ? 2 : 1));  // two gaps
      end
      if (!bf_valid || bf_ready) begin
        bf_valid <= (phase == 1) || ($urandom_range(0, 2) != 0);
        bf_data  <= make_bf(cw_in, word_in);
      end
    end
  end
  always @(posedge clk) iq_ready <= (phase == 1) || ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (!rst && iq_valid && iq_ready) begin
    checks++;
    if (iq_data !== word_exp) begin failures++; $display("IQ %0h expected %0h", iq_data, word_exp); end
    word_exp = word_exp + 1;
    nwords++;
    if (phase == 1 && t0 == 0) t0 = cyc;
    if (phase == 1) t1 = cyc;
  end

  initial begin
    word_exp = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (nwords >= 150 * 15);
    phase = 1;
    wait (nwords >= 250 * 15);
    checks++;
    if (t1 - t0 > 100 * 15 + 10) begin failures++; $display("rate: %0d cycles", t1 - t0); end
    checks++;
    if (cw_errors !== 32'd2) begin failures++; $display("cw_errors %0d", cw_errors); end
    checks++;
    if (cw !== W'(nbf_sent + 1) && cw !== W'(nbf_sent) && cw !== W'(nbf_sent + 2) && cw !== W'(nbf_sent + 1)) begin
      failures++; $display("cw %0d nbf %0d", cw, nbf_sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
