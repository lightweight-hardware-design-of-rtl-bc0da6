// gf2m_sqr: squaring in GF(2^M) modulo f(z).
//
// Squaring is linear over GF(2): a(z)^2 = sum a_i z^(2i). The squarer first
// spreads the operand by inserting a zero after each bit, giving a polynomial
// of degree 2M-2, then reduces it modulo f(z) from the top bit down: every set
// bit i >= M is cancelled by adding f(z) * z^(i-M). The spreading step is the
// method of the source design; the top-down reduction is this design's choice.
// Purely combinational (an XOR network after synthesis), one cycle.
//
// Parameters: M is the field degree, POLY the M+1-bit reduction polynomial
// (bit i = coefficient of z^i).
module gf2m_sqr #(
  parameter int unsigned   M    = 163,
  parameter logic [M:0]    POLY = (164'd1 << 163) | 164'h0C9
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] s
);
  logic [2*M-2:0] t;

  always_comb begin
    t = '0;
    for (int unsigned i = 0; i < M; i++) t[2*i] = a[i];
    for (int i = 2*M-2; i >= int'(M); i--) begin
      if (t[i]) t[i -: M+1] = t[i -: M+1] ^ POLY;
    end
    s = t[M-1:0];
  end
endmodule
