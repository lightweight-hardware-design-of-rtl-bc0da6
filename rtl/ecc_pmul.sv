// ecc_pmul: scalar point multiplication Q = k*P on y^2 + xy = x^3 + x^2 + 1
// over GF(2^M), by the Montgomery ladder in Lopez-Dahab projective coordinates.
//
// How it works. Two projective points are kept, A = (XA:ZA), starting at the
// point at infinity (1:0), and B = (XB:ZB), starting at P = (xp:1); their
// difference is always P. For each bit of k, from the most significant down,
// one is replaced by A+B and the other is doubled: a bit of 0 gives
// B <- A+B, A <- 2A; a bit of 1 gives A <- A+B, B <- 2B. The ladder step needs
// only x and Z:
//   Z(A+B) = (XA*ZB + XB*ZA)^2,   X(A+B) = xp*Z(A+B) + XA*ZB*XB*ZA,
//   Z(2A)  = (XA*ZA)^2,           X(2A)  = (XA + ZA)^4        (b = 1).
// After all M bits, if ZA = 0 the result is the point at infinity (inf = 1);
// if ZB = 0 the result is -P = (xp, xp + yp); otherwise both points are made
// affine with two divisions and y is recovered as
//   y = (x1 + xp) * ((x1 + xp)(x2 + xp) + xp^2 + yp) / xp + yp.
// The ladder, its register initialisation, the operation order and the ZB = 0
// special case follow the source algorithm; the ZA = 0 (infinity) check is
// this design's addition, as the algorithm would otherwise divide by zero.
//
// Structure. An 8-entry register file (XA, ZA, XB, ZB, T1, T2, xp, yp) feeds
// one bit-serial multiplier (M cycles), one divider (2M cycles), an adder and
// two chained squarers (for (a+b)^2 and (a+b)^4 in one cycle). A controller
// steps through the micro-programs of ecc_pkg: 9 micro-ops per ladder bit and
// 11 for the conversion. For a scalar bit of 1 the A and B register addresses
// are swapped. Operations run one at a time; this sequencing is this design's
// choice.
//
// Interface and timing. A one-cycle start while idle loads k, xp and yp.
// busy stays high until done pulses for one cycle; xr, yr and inf then hold
// the result until the next done. A single-cycle micro-op takes 1 cycle, a
// multiplication M+2 (issue, M steps, write-back) and a division 2M+2. done
// rises M*(5*(M+2) + 4) + 3*(2M+2) + 2*(M+2) + 6 + 3 cycles after the cycle in
// which start is sampled when the affine conversion is needed (136,450 for
// M = 163), and M*(5*(M+2) + 4) + 3 cycles (135,130) for the -P and infinity
// results. xp must be nonzero.
module ecc_pmul
  import ecc_pkg::*;
#(
  parameter int unsigned M    = ecc_pkg::ECC_M,
  parameter logic [M:0]  POLY = ecc_pkg::ECC_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic [M-1:0] xp,
  input  logic [M-1:0] yp,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] xr,
  output logic [M-1:0] yr,
  output logic         inf
);
  localparam int unsigned BW = $clog2(M);

  typedef enum logic [2:0] {S_IDLE, S_LADDER, S_CHECK, S_CONV, S_FIN} state_e;

  state_e        state;
  logic [M-1:0]  rf [8];
  logic [M-1:0]  k_r;
  logic [BW-1:0] bit_cnt;
  logic [3:0]    pc;
  logic          waiting;     // a multiplication or division is in flight
  logic          inf_q;       // result is the point at infinity

  // Current micro-op, with A/B swap for a scalar bit of 1 in the ladder.
  uop_t uop;
  logic swap;
  logic [2:0] dst, sa, sb;

  function automatic logic [2:0] remap(input reg_e r, input logic sw);
    return (sw && r < R_T1) ? (3'(r) ^ 3'd2) : 3'(r);
  endfunction

  always_comb begin
    uop  = (state == S_CONV) ? conv_uop(pc) : ladder_uop(pc);
    swap = (state == S_LADDER) && k_r[M-1];
    dst  = remap(uop.dst,   swap);
    sa   = remap(uop.src_a, swap);
    sb   = remap(uop.src_b, swap);
  end

  logic [M-1:0] opa, opb;
  assign opa = rf[sa];
  assign opb = rf[sb];

  // Field units.
  logic [M-1:0] sum, sq_in, sq1, sq2;
  logic         long_op, issue;
  logic         mul_busy, mul_done, div_busy, div_done;
  logic [M-1:0] mul_p, div_q;

  gf2m_add #(.M(M)) u_add (.a(opa), .b(opb), .s(sum));

  assign sq_in = (uop.op == OP_SQR) ? opa : sum;
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sqr1 (.a(sq_in), .s(sq1));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sqr2 (.a(sq1),   .s(sq2));

  assign long_op = (uop.op == OP_MUL) || (uop.op == OP_DIV);
  assign issue   = ((state == S_LADDER) || (state == S_CONV)) && long_op && !waiting;

  gf2m_mul #(.M(M), .POLY(POLY)) u_mul (
    .clk, .rst_n, .start(issue && uop.op == OP_MUL), .a(opa), .b(opb),
    .busy(mul_busy), .done(mul_done), .p(mul_p));

  gf2m_div #(.M(M), .POLY(POLY)) u_div (
    .clk, .rst_n, .start(issue && uop.op == OP_DIV), .y(opa), .x(opb),
    .busy(div_busy), .done(div_done), .q(div_q));

  // Result of the current micro-op and whether it is ready this cycle.
  logic [M-1:0] result;
  logic         ready;

  always_comb begin
    unique case (uop.op)
      OP_ADD:   result = sum;
      OP_SQR,
      OP_SQADD: result = sq1;
      OP_QDADD: result = sq2;
      OP_MUL:   result = mul_p;
      default:  result = div_q;
    endcase
    ready = !long_op || (waiting && (mul_done || div_done));
  end

  logic last_uop;
  assign last_uop = (state == S_CONV) ? (pc == 4'(CONV_LEN - 1)) : (pc == 4'(LADDER_LEN - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      for (int i = 0; i < 8; i++) rf[i] <= '0;
      k_r     <= '0;
      bit_cnt <= '0;
      pc      <= '0;
      waiting <= 1'b0;
      inf_q   <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
      xr      <= '0;
      yr      <= '0;
      inf     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rf[R_XA] <= M'(1);
          rf[R_ZA] <= '0;
          rf[R_XB] <= xp;
          rf[R_ZB] <= M'(1);
          rf[R_XP] <= xp;
          rf[R_YP] <= yp;
          k_r      <= k;
          bit_cnt  <= BW'(M - 1);
          pc       <= '0;
          waiting  <= 1'b0;
          inf_q    <= 1'b0;
          busy     <= 1'b1;
          state    <= S_LADDER;
        end
        S_LADDER, S_CONV: begin
          if (issue) waiting <= 1'b1;
          if (ready) begin
            rf[dst] <= result;
            waiting <= 1'b0;
            if (!last_uop) begin
              pc <= pc + 1'b1;
            end else begin
              pc <= '0;
              if (state == S_CONV) begin
                state <= S_FIN;
              end else begin
                k_r <= k_r << 1;
                if (bit_cnt == '0) state <= S_CHECK;
                else               bit_cnt <= bit_cnt - 1'b1;
              end
            end
          end
        end
        S_CHECK: begin
          if (rf[R_ZA] == '0) begin
            inf_q <= 1'b1;               // k*P = infinity
            state <= S_FIN;
          end else if (rf[R_ZB] == '0) begin
            rf[R_XA] <= rf[R_XP];        // k*P = -P
            rf[R_ZA] <= rf[R_XP] ^ rf[R_YP];
            state    <= S_FIN;
          end else begin
            state <= S_CONV;
          end
        end
        default: begin                   // S_FIN
          xr    <= inf_q ? '0 : rf[R_XA];
          yr    <= inf_q ? '0 : rf[R_ZA];
          inf   <= inf_q;
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  // A long operation is only issued to an idle unit.
  a_mul_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               (issue && uop.op == OP_MUL) |-> !mul_busy);
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               (issue && uop.op == OP_DIV) |-> !div_busy);
endmodule
