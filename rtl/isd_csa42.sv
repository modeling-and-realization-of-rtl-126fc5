// isd_csa42: 4:2 carry-save compressor, W bits wide.
//
// Reduces four operands to a sum and a carry vector whose total equals
// a + b + c + d modulo 2^W.  Built from two rows of full adders (3:2 counters);
// the carry of each row is shifted one place left and its top bit dropped, which
// is harmless for two's-complement values that fit in W bits.  Combinational.
// The document uses such a compressor ("4 to 2 CSA") in the residual recurrence
// and in the initialization path; the two-row construction is this design's.
module isd_csa42 #(
  parameter int unsigned W = 53
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);

  logic [W-1:0] s1, c1;

  always_comb begin
    // first row: a + b + c
    s1 = a_i ^ b_i ^ c_i;
    c1 = ((a_i & b_i) | (a_i & c_i) | (b_i & c_i)) << 1;
    // second row: s1 + c1 + d
    sum_o   = s1 ^ c1 ^ d_i;
    carry_o = ((s1 & c1) | (s1 & d_i) | (c1 & d_i)) << 1;
  end

endmodule
