// ecc_pkg: shared constants and types of the ECDH key generator.
//
// The field is GF(2^163) in polynomial basis with the pentanomial
// f(z) = z^163 + z^7 + z^6 + z^3 + 1. The curve is y^2 + xy = x^3 + x^2 + 1
// (a = 1, b = 1, the Koblitz curve known as K-163 / sect163k1). b = 1 is what
// makes the doubling step X = X^4 + b*Z^4 collapse to X = (X + Z)^4, which is
// the form the ladder uses. The choice of this particular curve and field
// polynomial is this design's: only the 163-bit size and b = 1 follow from the
// ladder formulation.
//
// The point multiplier is driven by a small micro-program. Each micro-op names
// one field operation, a destination and two source registers of an 8-entry
// register file. The ladder program is written for a scalar bit of 0
// (A is doubled, B receives A+B); for a bit of 1 the controller swaps the A and
// B register addresses, which turns it into the other branch.
package ecc_pkg;

  localparam int unsigned ECC_M = 163;

  // Reduction polynomial, bit i is the coefficient of z^i (M+1 bits).
  localparam logic [ECC_M:0] ECC_POLY = (164'd1 << 163) | 164'h0C9;

  // Base point G of the curve (SEC 2, sect163k1).
  localparam logic [ECC_M-1:0] GX = 163'h2FE13C0537BBC11ACAA07D793DE4E6D5E5C94EEE8;
  localparam logic [ECC_M-1:0] GY = 163'h289070FB05D38FF58321F2E800536D538CCDAA3D9;

  // Field operations of one micro-op.
  typedef enum logic [2:0] {
    OP_ADD   = 3'd0,   // d = a + b
    OP_SQR   = 3'd1,   // d = a^2
    OP_SQADD = 3'd2,   // d = (a + b)^2
    OP_QDADD = 3'd3,   // d = (a + b)^4
    OP_MUL   = 3'd4,   // d = a * b       (multiplier, M cycles)
    OP_DIV   = 3'd5    // d = a / b       (divider, 2M cycles)
  } op_e;

  // Register file addresses. XA..ZB are the two projective ladder points.
  typedef enum logic [2:0] {
    R_XA = 3'd0, R_ZA = 3'd1, R_XB = 3'd2, R_ZB = 3'd3,
    R_T1 = 3'd4, R_T2 = 3'd5, R_XP = 3'd6, R_YP = 3'd7
  } reg_e;

  typedef struct packed {
    op_e  op;
    reg_e dst;
    reg_e src_a;
    reg_e src_b;
  } uop_t;

  localparam int unsigned LADDER_LEN = 9;
  localparam int unsigned CONV_LEN   = 11;

  // One ladder step, written for scalar bit 0: B <- A + B, A <- 2A.
  function automatic uop_t ladder_uop(input logic [3:0] pc);
    unique case (pc)
      4'd0:    return '{OP_MUL,   R_T1, R_XA, R_ZB};  // T1 = XA*ZB
      4'd1:    return '{OP_MUL,   R_T2, R_XB, R_ZA};  // T2 = XB*ZA
      4'd2:    return '{OP_SQADD, R_ZB, R_T1, R_T2};  // ZB = (T1+T2)^2
      4'd3:    return '{OP_MUL,   R_XB, R_XP, R_ZB};  // XB = xp*ZB
      4'd4:    return '{OP_MUL,   R_T1, R_T1, R_T2};  // T1 = T1*T2
      4'd5:    return '{OP_ADD,   R_XB, R_XB, R_T1};  // XB = XB + T1
      4'd6:    return '{OP_MUL,   R_T1, R_XA, R_ZA};  // T1 = XA*ZA
      4'd7:    return '{OP_QDADD, R_XA, R_XA, R_ZA};  // XA = (XA+ZA)^4
      default: return '{OP_SQR,   R_ZA, R_T1, R_T1};  // ZA = T1^2
    endcase
  endfunction

  // Conversion of (XA:ZA), (XB:ZB) to affine and recovery of y.
  function automatic uop_t conv_uop(input logic [3:0] pc);
    unique case (pc)
      4'd0:    return '{OP_DIV, R_XA, R_XA, R_ZA};  // XA = XA/ZA    (x1)
      4'd1:    return '{OP_DIV, R_XB, R_XB, R_ZB};  // XB = XB/ZB    (x2)
      4'd2:    return '{OP_ADD, R_T1, R_XA, R_XP};  // T1 = x1 + xp
      4'd3:    return '{OP_ADD, R_T2, R_XB, R_XP};  // T2 = x2 + xp
      4'd4:    return '{OP_MUL, R_ZA, R_T1, R_T2};  // ZA = T1*T2
      4'd5:    return '{OP_SQR, R_T2, R_XP, R_XP};  // T2 = xp^2
      4'd6:    return '{OP_ADD, R_ZA, R_ZA, R_T2};  // ZA = ZA + xp^2
      4'd7:    return '{OP_ADD, R_ZA, R_ZA, R_YP};  // ZA = ZA + yp
      4'd8:    return '{OP_MUL, R_ZA, R_ZA, R_T1};  // ZA = ZA*(x1+xp)
      4'd9:    return '{OP_DIV, R_ZA, R_ZA, R_XP};  // ZA = ZA/xp
      default: return '{OP_ADD, R_ZA, R_ZA, R_YP};  // ZA = ZA + yp  (y1)
    endcase
  endfunction

endpackage
