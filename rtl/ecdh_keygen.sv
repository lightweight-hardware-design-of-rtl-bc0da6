// ecdh_keygen: Elliptic Curve Diffie-Hellman key generator for GF(2^163).
//
// Both halves of an ECDH exchange are one scalar multiplication by the
// private key d: the public key is d*G, with G the fixed base point of the
// curve, and the shared key is the x coordinate of d*Q, with Q the peer's
// public key. This block selects the point, G or Q, by `mode` and runs one
// Montgomery-ladder point multiplier (ecc_pmul). The 163-bit shared key is
// key_x in mode 1. The use of one point multiplier for ECDH and the 163-bit
// key size follow the source design; the mode input, the base point of the
// K-163 curve and the infinity flag are this design's choices.
//
// Interface and timing: a one-cycle start while busy is low samples mode,
// priv_key and the peer point. done pulses for one cycle when key_x, key_y
// and key_inf are valid; they hold until the next done. The latency is that of
// ecc_pmul: done rises 136,450 cycles after the start cycle for a result that
// is a finite point other than -P. key_inf = 1 means the result is the point at infinity
// (d a multiple of the group order, or an invalid peer point) and must not be
// used as a key. The peer point is not checked for lying on the curve, and its
// x coordinate must be nonzero.
module ecdh_keygen
  import ecc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             mode,       // 0: public key d*G, 1: shared key d*Q
  input  logic [ECC_M-1:0] priv_key,
  input  logic [ECC_M-1:0] peer_x,
  input  logic [ECC_M-1:0] peer_y,
  output logic             busy,
  output logic             done,
  output logic [ECC_M-1:0] key_x,
  output logic [ECC_M-1:0] key_y,
  output logic             key_inf
);
  logic [ECC_M-1:0] px, py;

  always_comb begin
    px = mode ? peer_x : GX;
    py = mode ? peer_y : GY;
  end

  ecc_pmul #(.M(ECC_M), .POLY(ECC_POLY)) u_pmul (
    .clk, .rst_n,
    .start (start && !busy),
    .k     (priv_key),
    .xp    (px),
    .yp    (py),
    .busy,
    .done,
    .xr    (key_x),
    .yr    (key_y),
    .inf   (key_inf)
  );
endmodule
