// tb_gf2m_mul: checks the bit-serial GF(2^163) multiplier against the
// reference product, and that each product takes exactly 163 busy cycles with
// done one cycle after the last.
module tb_gf2m_mul;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  fe_t a, b, p;
  logic busy, done;

  gf2m_mul #(.M(RM), .POLY(RPOLY)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(fe_t ta, fe_t tb_);
    int cyc = 0, busy_cyc = 0;
    fe_t e;
    @(negedge clk);
    a = ta; b = tb_; start = 1;
    @(negedge clk);
    start = 0;
    a = rand_fe(); b = rand_fe();   // operands are latched at start
    while (!done) begin
      if (busy) busy_cyc++;
      cyc++;
      @(negedge clk);
    end
    e = ref_mul(ta, tb_);
    checks += 2;
    if (p !== e) begin
      failures++;
      $display("FAIL mul %h * %h got %h exp %h", ta, tb_, p, e);
    end
    if (cyc != RM || busy_cyc != RM) begin
      failures++;
      $display("FAIL mul latency %0d busy %0d exp %0d", cyc, busy_cyc, RM);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, rand_fe());
    run(fe_t'(1), fe_t'(1));
    run('1, '1);
    run(fe_t'(1) << 162, fe_t'(1) << 1);
    run(fe_t'(1) << 162, fe_t'(1) << 162);
    for (int n = 0; n < 100; n++) run(rand_fe(), rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
