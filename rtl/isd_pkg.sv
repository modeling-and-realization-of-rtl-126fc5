// isd_pkg: types and constants shared by the radix-4 ISD (inverse square root,
// square root and division) unit.
//
// The unit runs one digit recurrence for all three operations on IEEE-754 single
// precision operands.  The recurrence variables w (residual), B and C are kept in
// one two's-complement fixed-point format of ISD_W bits with ISD_F fraction bits;
// the result R is built by on-the-fly conversion in a register with ISD_QF fraction
// bits.  The operation codes, the digit type and the iteration counts live here.
//
// Iteration counts follow the document: ceil(n/b) for the inverse square root,
// ceil((n+1)/b) for the square root and ceil((n+3)/b) for division, with n = 24
// significand bits and b = 2 bits per radix-4 digit.  The fixed-point widths are
// this design's choice: 50 fraction bits are what it takes to keep the inverse
// square root residual exact (the last C term weighs 2^-50), and three integer bits
// hold 4w in (-4, 4).
package isd_pkg;

  // operation select
  typedef enum logic [1:0] {
    OP_DIV   = 2'd0,   // x / h
    OP_SQRT  = 2'd1,   // sqrt(x)
    OP_ISQRT = 2'd2    // 1 / sqrt(h)
  } isd_op_e;

  // recurrence word: ISD_W bits, two's complement, ISD_F fraction bits
  localparam int unsigned ISD_F  = 50;
  localparam int unsigned ISD_W  = ISD_F + 3;

  // result register of the on-the-fly conversion: 3 integer bits (one is a sign
  // for the R-1 form at start-up), ISD_QF fraction bits = 2 * largest digit count
  localparam int unsigned ISD_QF = 28;
  localparam int unsigned ISD_QW = ISD_QF + 3;

  // significand bits of the operand (hidden one included) and radix exponent
  localparam int unsigned ISD_N  = 24;
  localparam int unsigned ISD_B  = 2;

  localparam int unsigned N_ISQRT = (ISD_N     + ISD_B - 1) / ISD_B;  // 12
  localparam int unsigned N_SQRT  = (ISD_N + 1 + ISD_B - 1) / ISD_B;  // 13
  localparam int unsigned N_DIV   = (ISD_N + 3 + ISD_B - 1) / ISD_B;  // 14

  // radix-4 result digit in {-2, -1, 0, 1, 2}
  typedef logic signed [2:0] digit_t;

  // IEEE-754 single precision, unpacked
  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;      // biased exponent as stored
    logic [23:0] mant;     // 1.f for normal numbers, 0 for zero / subnormal
    logic        is_zero;  // zero or subnormal (subnormals are flushed to zero)
    logic        is_inf;
    logic        is_nan;
    logic        exp_odd;  // unbiased exponent is odd
  } fp_unpacked_t;

  // exception flags
  typedef struct packed {
    logic invalid;
    logic div_zero;
    logic overflow;
    logic underflow;
    logic inexact;
  } isd_flags_t;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

endpackage
