// tb_ecc_pmul: checks the Montgomery-ladder point multiplier at the full
// 163-bit size against double-and-add with affine reference arithmetic.
// Cases: small scalars, random scalars on the base point and on another curve
// point, k = n-1 (result -P, the ZB = 0 branch), k = 0 and k = n (point at
// infinity). Every result must lie on the curve, and the start-to-done
// latency must match the fixed schedule: 163 ladder steps of 5 multiplications
// (M+2 cycles each) and 4 single-cycle operations, then the conversion
// (3 divisions of 2M+2 cycles, 2 multiplications, 6 single-cycle operations)
// when it is needed.
module tb_ecc_pmul;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int C_BIT  = 5 * (RM + 2) + 4;
  localparam int C_CONV = 3 * (2 * RM + 2) + 2 * (RM + 2) + 6;
  localparam int LAT_CONV = RM * C_BIT + C_CONV + 2;
  localparam int LAT_SPEC = RM * C_BIT + 2;

  int checks = 0, failures = 0;
  int n_conv = 0, n_neg = 0, n_inf = 0;
  logic clk = 0, rst_n = 0, start = 0;
  fe_t k, xp, yp, xr, yr;
  logic busy, done, inf;

  ecc_pmul dut (.*);

  always #5 clk = ~clk;

  task automatic run(fe_t tk, pt_t p);
    int cyc = 0;
    pt_t e;
    bit special;
    @(negedge clk);
    k = tk; xp = p.x; yp = p.y; start = 1;
    @(negedge clk);
    start = 0;
    k = rand_fe(); xp = rand_fe(); yp = rand_fe();
    while (!done) begin
      cyc++;
      @(negedge clk);
    end
    e = ref_smul(tk, p);
    checks += 3;
    if (inf !== e.inf || (!e.inf && (xr !== e.x || yr !== e.y))) begin
      failures++;
      $display("FAIL k=%h got inf=%0d (%h,%h) exp inf=%0d (%h,%h)",
               tk, inf, xr, yr, e.inf, e.x, e.y);
    end
    if (!on_curve('{inf, xr, yr})) begin
      failures++;
      $display("FAIL result not on curve for k=%h", tk);
    end
    special = e.inf || (e.x == p.x && e.y != p.y);   // infinity or -P
    if (e.inf) n_inf++;
    else if (special) n_neg++;
    else n_conv++;
    if (cyc != (special ? LAT_SPEC : LAT_CONV)) begin
      failures++;
      $display("FAIL latency %0d exp %0d", cyc, special ? LAT_SPEC : LAT_CONV);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t g, h;
    g = '{1'b0, GX, GY};
    checks++;
    if (!on_curve(g)) begin
      failures++;
      $display("FAIL base point not on curve");
    end
    h = ref_smul(fe_t'(7), g);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(fe_t'(1), g);
    run(fe_t'(2), g);
    run(fe_t'(3), g);
    run(rand_fe(), g);
    run(rand_fe(), h);
    run(fe_t'(ORDER - 1), g);      // -G
    run('0, g);                    // infinity
    run(fe_t'(ORDER), h);          // n*H = infinity
    checks++;
    if (n_conv == 0 || n_neg == 0 || n_inf == 0) begin
      failures++;
      $display("FAIL a result branch was not exercised: conv=%0d neg=%0d inf=%0d",
               n_conv, n_neg, n_inf);
    end
    $display("branches: conversion=%0d minus_P=%0d infinity=%0d", n_conv, n_neg, n_inf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
