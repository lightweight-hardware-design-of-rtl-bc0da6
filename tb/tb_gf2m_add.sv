// tb_gf2m_add: checks the GF(2^163) adder against a bit-by-bit sum modulo 2
// for edge cases and random operands.
module tb_gf2m_add;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  fe_t a, b, s, exp_s;

  gf2m_add #(.M(RM)) dut (.a(a), .b(b), .s(s));

  task automatic check(fe_t ta, fe_t tb_);
    a = ta; b = tb_;
    #1;
    for (int i = 0; i < RM; i++) exp_s[i] = (ta[i] + tb_[i]) % 2;
    checks++;
    if (s !== exp_s) begin
      failures++;
      $display("FAIL add a=%h b=%h got %h exp %h", ta, tb_, s, exp_s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, '0);
    check(fe_t'(1) << 162, fe_t'(1));
    for (int n = 0; n < 200; n++) check(rand_fe(), rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
