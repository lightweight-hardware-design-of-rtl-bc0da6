// tb_gf2m_sqr: checks the combinational GF(2^163) squarer against the
// reference multiplier (a*a) for edge cases and random operands.
module tb_gf2m_sqr;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  fe_t a, s, exp_s;

  gf2m_sqr #(.M(RM), .POLY(RPOLY)) dut (.a(a), .s(s));

  task automatic check(fe_t ta);
    a = ta;
    #1;
    exp_s = ref_mul(ta, ta);
    checks++;
    if (s !== exp_s) begin
      failures++;
      $display("FAIL sqr a=%h got %h exp %h", ta, s, exp_s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check(fe_t'(1));
    check('1);
    for (int i = 0; i < RM; i++) check(fe_t'(1) << i);   // every z^i
    for (int n = 0; n < 200; n++) check(rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
