// isd_unpack: splits an IEEE-754 single precision word into sign, exponent and
// significand and classifies it.
//
// Purely combinational.  The significand is returned with its hidden one (1.f, 24
// bits).  Zero and subnormal operands are both reported as zero with a zero
// significand: the unit flushes subnormals, a choice of this design since the
// document only says that unnormalized numbers can be treated as an exception.
// exp_odd tells whether the unbiased exponent (stored exponent - 127) is odd,
// which selects the operand scaling of the square root and inverse square root.
module isd_unpack
  import isd_pkg::*;
(
  input  logic [31:0]  fp_i,
  output fp_unpacked_t up_o
);

  logic [7:0]  e;
  logic [22:0] f;

  assign e = fp_i[30:23];
  assign f = fp_i[22:0];

  always_comb begin
    up_o.sign    = fp_i[31];
    up_o.exp     = e;
    up_o.is_zero = (e == 8'd0);
    up_o.is_inf  = (e == 8'hFF) && (f == 23'd0);
    up_o.is_nan  = (e == 8'hFF) && (f != 23'd0);
    up_o.mant    = (e == 8'd0) ? 24'd0 : {1'b1, f};
    // bias 127 is odd, so the unbiased exponent is odd when the stored one is even
    up_o.exp_odd = ~e[0];
  end

endmodule
