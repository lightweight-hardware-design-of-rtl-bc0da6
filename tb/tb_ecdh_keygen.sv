// tb_ecdh_keygen: end-to-end test of the ECDH key generator at its default
// (163-bit) size. Two parties each derive a public key from a random private
// key (mode 0, base point G), then each derives the shared key from the
// other's public key (mode 1); both shared keys must agree and match the
// affine double-and-add reference. Further runs take the -P branch
// (private key n-1 on a peer point) and the infinity branch (private key 0),
// and a start pulse during a run must be ignored. Each mechanism is counted:
// both modes, both ladder branches (scalar bit 0 and 1), the affine
// conversion, the -P and infinity results, and the ignored start; one that
// never happens is a failure.
module tb_ecdh_keygen;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int C_BIT  = 5 * (RM + 2) + 4;
  localparam int C_CONV = 3 * (2 * RM + 2) + 2 * (RM + 2) + 6;
  localparam int LAT_CONV = RM * C_BIT + C_CONV + 2;

  int checks = 0, failures = 0;
  int n_mode0 = 0, n_mode1 = 0, n_bit0 = 0, n_bit1 = 0;
  int n_conv = 0, n_neg = 0, n_inf = 0, n_ignored = 0;

  logic clk = 0, rst_n = 0, start = 0, mode = 0;
  fe_t  priv_key, peer_x, peer_y, key_x, key_y;
  logic busy, done, key_inf;

  ecdh_keygen dut (.*);

  always #5 clk = ~clk;

  task automatic keygen(logic tmode, fe_t d, pt_t peer, bit poke, output pt_t res, output int cyc);
    @(negedge clk);
    mode = tmode; priv_key = d; peer_x = peer.x; peer_y = peer.y; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    // the ladder takes one branch per scalar bit
    for (int i = 0; i < RM; i++) if (d[i]) n_bit1++; else n_bit0++;
    while (!done) begin
      cyc++;
      if (poke && cyc == 5000) begin
        // a second start while busy: must change nothing
        mode = ~tmode; priv_key = rand_fe(); peer_x = rand_fe(); start = 1;
        n_ignored++;
      end else begin
        start = 0;
      end
      @(negedge clk);
    end
    start = 0;
    res = '{key_inf, key_x, key_y};
    if (tmode) n_mode1++; else n_mode0++;
  endtask

  task automatic expect_pt(string what, pt_t got, pt_t exp_p);
    checks++;
    if (got.inf !== exp_p.inf || (!exp_p.inf && (got.x !== exp_p.x || got.y !== exp_p.y))) begin
      failures++;
      $display("FAIL %s: got inf=%0d (%h,%h) exp inf=%0d (%h,%h)", what,
               got.inf, got.x, got.y, exp_p.inf, exp_p.x, exp_p.y);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt_t g, qa, qb, ka, kb, r, none;
    fe_t da, db;
    int cyc;
    g    = '{1'b0, GX, GY};
    none = '{1'b0, rand_fe(), rand_fe()};   // ignored in mode 0
    da   = rand_fe() & ~(fe_t'(1) << 162);  // below the group order
    db   = rand_fe() & ~(fe_t'(1) << 162);
    repeat (3) @(negedge clk);
    rst_n = 1;

    keygen(1'b0, da, none, 1'b0, qa, cyc);
    expect_pt("public key A", qa, ref_smul(da, g));
    checks++;
    if (cyc != LAT_CONV) begin
      failures++;
      $display("FAIL latency %0d exp %0d", cyc, LAT_CONV);
    end
    n_conv++;

    keygen(1'b0, db, none, 1'b1, qb, cyc);          // with an ignored start
    expect_pt("public key B", qb, ref_smul(db, g));
    n_conv++;

    keygen(1'b1, da, qb, 1'b0, ka, cyc);
    keygen(1'b1, db, qa, 1'b0, kb, cyc);
    n_conv += 2;
    expect_pt("shared key A", ka, ref_smul(da, ref_smul(db, g)));
    checks++;
    if (ka.inf || kb.inf || ka.x !== kb.x) begin
      failures++;
      $display("FAIL shared keys differ: %h vs %h", ka.x, kb.x);
    end else begin
      $display("shared key %h", ka.x);
    end

    keygen(1'b1, fe_t'(ORDER - 1), qa, 1'b0, r, cyc);   // -Qa
    expect_pt("(n-1)*Qa", r, '{1'b0, qa.x, qa.x ^ qa.y});
    if (!r.inf && r.x == qa.x && r.y != qa.y) n_neg++;

    keygen(1'b0, '0, none, 1'b0, r, cyc);              // infinity
    expect_pt("0*G", r, '{1'b1, '0, '0});
    if (r.inf) n_inf++;

    $display("mechanisms: mode0=%0d mode1=%0d bit0=%0d bit1=%0d conv=%0d minus_P=%0d infinity=%0d ignored_start=%0d",
             n_mode0, n_mode1, n_bit0, n_bit1, n_conv, n_neg, n_inf, n_ignored);
    checks++;
    if (n_mode0 == 0 || n_mode1 == 0 || n_bit0 == 0 || n_bit1 == 0 ||
        n_conv == 0 || n_neg == 0 || n_inf == 0 || n_ignored == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
