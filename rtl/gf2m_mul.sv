// gf2m_mul: bit-serial multiplier in GF(2^M) modulo f(z).
//
// Most-significant-bit-first shift-and-add with interleaved reduction. Per
// cycle the accumulator is multiplied by z (shift left; if the bit shifted out
// is set, the low M bits of f(z) are added back) and the operand a is added if
// the current bit of b is set. After M cycles the accumulator holds a*b mod f.
// The M-cycle latency is the source design's; the MSB-first algorithm is this
// design's choice.
//
// Interface: when idle, start loads a and b. busy is high for the M
// computation cycles; done pulses for one cycle after the last one, and p holds
// the product from then until the next start. A start while busy is ignored.
module gf2m_mul #(
  parameter int unsigned   M    = 163,
  parameter logic [M:0]    POLY = (164'd1 << 163) | 164'h0C9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] p
);
  localparam int unsigned CW = $clog2(M + 1);

  logic [M-1:0]  a_r, b_r, acc;
  logic [CW-1:0] cnt;
  logic [M-1:0]  acc_z;   // acc * z mod f

  always_comb begin
    acc_z = {acc[M-2:0], 1'b0};
    if (acc[M-1]) acc_z = acc_z ^ POLY[M-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_r  <= '0;
      b_r  <= '0;
      acc  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        a_r  <= a;
        b_r  <= b;
        acc  <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        acc <= acc_z ^ (b_r[M-1] ? a_r : '0);
        b_r <= b_r << 1;
        cnt <= cnt + 1'b1;
        if (cnt == CW'(M - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign p = acc;

  // A new operation may only start while the unit is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
