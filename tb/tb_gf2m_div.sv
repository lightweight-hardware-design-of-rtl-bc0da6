// tb_gf2m_div: checks the GF(2^163) divider. Each quotient q = y/x is
// compared with y * x^-1 from the reference (Fermat inversion), and the
// latency must be 326 busy cycles with done one cycle after the last.
module tb_gf2m_div;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  fe_t x, y, q;
  logic busy, done;

  gf2m_div #(.M(RM), .POLY(RPOLY)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(fe_t ty, fe_t tx);
    int cyc = 0, busy_cyc = 0;
    fe_t e;
    @(negedge clk);
    y = ty; x = tx; start = 1;
    @(negedge clk);
    start = 0;
    y = rand_fe(); x = rand_fe() | fe_t'(1);
    while (!done) begin
      if (busy) busy_cyc++;
      cyc++;
      @(negedge clk);
    end
    e = ref_mul(ty, ref_inv(tx));
    checks += 2;
    if (q !== e || ref_mul(q, tx) !== ty) begin
      failures++;
      $display("FAIL div %h / %h got %h exp %h", ty, tx, q, e);
    end
    if (cyc != 2*RM || busy_cyc != 2*RM) begin
      failures++;
      $display("FAIL div latency %0d busy %0d exp %0d", cyc, busy_cyc, 2*RM);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(fe_t'(1), fe_t'(1));
    run('0, rand_fe() | fe_t'(1));
    run(fe_t'(1), fe_t'(1) << 162);     // inverse of z^162
    run('1, '1);
    run(fe_t'(1), fe_t'(2));
    for (int n = 0; n < 60; n++) begin
      t = rand_fe();
      if (t == '0) t = fe_t'(1);
      run(rand_fe(), t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
