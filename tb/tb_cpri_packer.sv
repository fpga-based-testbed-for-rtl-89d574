// Testbench for cpri_packer: random IQ words with random valid and random
// back-pressure; every basic frame must carry the running frame index as its
// control word and the next 15 IQ words in order. A second phase with no
// stalls checks that one BF leaves every 15 cycles.
module tb_cpri_packer;
  localparam int W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [W-1:0] iq_data;
  logic iq_valid, iq_ready, bf_valid, bf_ready;
  logic [16*W-1:0] bf_data;
  int checks = 0, failures = 0;

  cpri_packer #(.WORD_BITS(W)) dut (.*);

  logic [W-1:0] next_in, next_exp;
  int nbf = 0, phase = 0, first_cyc = 0, last_cyc = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // source
  always @(posedge clk) begin
    if (rst) begin iq_valid <= 0; next_in <= 0; iq_data <= 0; end
    else begin
      if (iq_valid && iq_ready) next_in = next_in + 1;
      iq_valid <= (phase == 1) ? 1'b1 : ($urandom_range(0, 3) != 0);
      iq_data  <= next_in;
    end
  end
  always @(posedge clk) bf_ready <= (phase == 1) ? 1'b1 : ($urandom_range(0, 2) != 0);

  // checker
  always @(posedge clk) if (!rst && bf_valid && bf_ready) begin
    checks++;
    if (bf_data[W-1:0] !== W'(nbf)) begin
      failures++; $display("CW mismatch %0d vs %0d", bf_data[W-1:0], nbf);
    end
    for (int k = 1; k < 16; k++) begin
      checks++;
      if (bf_data[k*W +: W] !== next_exp) begin
        failures++; $display("word %0d of BF %0d: %0h expected %0h", k, nbf, bf_data[k*W +: W], next_exp);
      end
      next_exp = next_exp + 1;
    end
    nbf++;
    if (phase == 1) begin
      if (first_cyc == 0) first_cyc = cyc;
      last_cyc = cyc;
    end
  end

  initial begin
    next_exp = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (nbf == 200);
    @(posedge clk);
    // align to a BF boundary: drain, then count throughput
    phase = 1;
    wait (nbf == 300);
    // BFs 201..299 in phase 1: 15 cycles apart
    checks++;
    if (last_cyc - first_cyc > 99 * 15 + 20 || last_cyc - first_cyc < 98 * 15) begin
      failures++; $display("throughput: %0d cycles for 99 BFs", last_cyc - first_cyc);
    end
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
