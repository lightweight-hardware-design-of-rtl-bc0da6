// gf2m_div: divider in GF(2^M) modulo f(z), q = y / x.
//
// Binary extended Euclidean algorithm with a fixed 2M iterations, one per
// cycle. Registers A and B start as x and f(z), U and V as y and 0; the
// invariants A*y = U*x and B*y = V*x (mod f) hold throughout. Each cycle, if
// A is odd, B is added to A (and V to U); when the counter delta is negative
// the pairs are also swapped, so that B keeps the polynomial of smaller
// length. A is then divided by z, and U by z modulo f (adding f first when U
// is odd). After 2M cycles B = 1, so V = y/x. The use of the extended
// Euclidean algorithm and the 2M-cycle latency are the source design's; this
// particular constant-time binary form is this design's choice.
//
// Interface: when idle, start loads y and x (x must be nonzero). busy is high
// for the 2M computation cycles; done pulses for one cycle after the last, and
// q holds the quotient from then until the next start.
module gf2m_div #(
  parameter int unsigned   M    = 163,
  parameter logic [M:0]    POLY = (164'd1 << 163) | 164'h0C9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] y,
  input  logic [M-1:0] x,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] q
);
  localparam int unsigned CW = $clog2(2 * M + 1);
  localparam int unsigned DW = $clog2(2 * M + 1) + 1;  // signed delta

  logic [M:0]           ra, rb;
  logic [M-1:0]         ru, rv;
  logic signed [DW-1:0] delta;
  logic [CW-1:0]        cnt;

  // One iteration, combinational.
  logic [M:0]           na, nb, sa;
  logic [M-1:0]         nu, nv, su;
  logic signed [DW-1:0] nd;

  always_comb begin
    sa = ra;  nb = rb;
    su = ru;  nv = rv;
    nd = delta;
    if (ra[0]) begin
      sa = ra ^ rb;
      su = ru ^ rv;
      if (delta < 0) begin
        nb = ra;
        nv = ru;
        nd = -delta;
      end
    end
    na   = sa >> 1;
    nu   = {1'b0, su[M-1:1]} ^ (su[0] ? POLY[M:1] : '0);  // (su + su0*f) / z
    nd   = nd - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ra    <= '0;
      rb    <= '0;
      ru    <= '0;
      rv    <= '0;
      delta <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        ra    <= {1'b0, x};
        rb    <= POLY;
        ru    <= y;
        rv    <= '0;
        delta <= -DW'(1);
        cnt   <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        ra    <= na;
        rb    <= nb;
        ru    <= nu;
        rv    <= nv;
        delta <= nd;
        cnt   <= cnt + 1'b1;
        if (cnt == CW'(2 * M - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign q = rv;

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_nonzero:    assert property (@(posedge clk) disable iff (!rst_n) (start && !busy) |-> (x != '0));
endmodule
