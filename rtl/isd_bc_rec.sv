// isd_bc_rec: one step of the recurrences
//   B(k+1) = B(k) + 2 r(k+1) C(k)
//   C(k+1) = C(k) / 4
//
// 2rC is taken from a multiplexer (0, 2C or 4C) and inverted for a negative
// digit, the +1 of that negation being the adder's carry-in.  A carry-select adder
// (csel_adder) adds it to B, so B stays non-redundant.  In parallel an 8-bit
// carry-propagate adder adds the top bits of the two operands (weights 2^1 ..
// 2^-6) and gives the estimate B~(k+1) in format I.FFFFF (1/32 units) to the digit
// selection without waiting for the wide adder.  The C step is a right shift by
// two places.  Structure after the document's Figure 1; the document's wide adder
// is a CPA that its Section 3 replaces by a carry-select adder, as done here.
// Combinational.
module isd_bc_rec
  import isd_pkg::*;
#(
  parameter int unsigned W = ISD_W,
  parameter int unsigned F = ISD_F
) (
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  input  digit_t       r_i,
  output logic [W-1:0] b_o,
  output logic [W-1:0] c_o,
  output logic [5:0]   b_est_o
);

  logic [W-1:0] x, xi;
  logic         neg;
  logic [7:0]   b_short;

  always_comb begin
    unique case (r_i)
      3'sd2, -3'sd2: x = c_i << 2;
      3'sd1, -3'sd1: x = c_i << 1;
      default:       x = '0;
    endcase
    neg = (r_i < 0);
    xi  = neg ? ~x : x;
  end

  csel_adder #(.W(W), .BLK(8)) u_add (
    .a_i    (b_i),
    .b_i    (xi),
    .cin_i  (neg),
    .sum_o  (b_o),
    .cout_o ()
  );

  assign b_short = b_i[F+1 -: 8] + xi[F+1 -: 8];
  // B < 2 always; a set top bit can only come from the estimate and saturates
  assign b_est_o = b_short[7] ? 6'h3F : b_short[6:1];

  assign c_o = c_i >> 2;

endmodule
