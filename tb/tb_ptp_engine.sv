// Testbench for ptp_engine: runs a master/slave pair over a model link in
// one-step mode and another pair in two-step mode (SYNC + FOLLOW_UP), see
// ptp_link_bench for what is checked, and adds up the results.
module tb_ptp_engine;
  int c1, f1, c2, f2;
  bit d1, d2;
  int checks, failures;

  ptp_link_bench #(.TWO_STEP(1'b0)) u_one_step (.checks(c1), .failures(f1), .done(d1));
  ptp_link_bench #(.TWO_STEP(1'b1)) u_two_step (.checks(c2), .failures(f2), .done(d2));

  initial begin
    wait (d1 && d2);
    checks = c1 + c2; failures = f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms;
    checks = c1 + c2; failures = f1 + f2 + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
