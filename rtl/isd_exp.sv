// isd_exp: result exponent of the ISD unit, computed from the operand exponents
// while the recurrence runs.
//
// With Ex, Eh the unbiased exponents of x and h, the biased result exponent before
// the final normalization step is
//   DIV    Ex - Eh                (the round stage subtracts 1 when R(N) < 1/4)
//   SQRT   floor(Ex / 2)
//   ISQRT  -(Eh + 1) / 2 if Eh odd,  -(Eh + 2) / 2 if Eh even
//                                 (the round stage adds 1 when R(N) = 2)
// plus the bias 127.  The equations are the document's; the signed 10-bit width,
// wide enough for every overflow and underflow of a division, is this design's.
// Combinational.
module isd_exp
  import isd_pkg::*;
(
  input  isd_op_e            op_i,
  input  logic [7:0]         x_exp_i,   // biased
  input  logic [7:0]         h_exp_i,   // biased
  output logic signed [9:0]  exp_o      // biased, may be out of range
);

  logic signed [9:0] ex, eh;

  always_comb begin
    ex = 10'(signed'({2'b00, x_exp_i})) - 10'sd127;
    eh = 10'(signed'({2'b00, h_exp_i})) - 10'sd127;
    unique case (op_i)
      OP_DIV:   exp_o = ex - eh + 10'sd127;
      OP_SQRT:  exp_o = (ex >>> 1) + 10'sd127;
      OP_ISQRT: exp_o = (eh[0] ? -((eh + 10'sd1) >>> 1) : -((eh + 10'sd2) >>> 1)) + 10'sd127;
      default:  exp_o = '0;
    endcase
  end

endmodule
