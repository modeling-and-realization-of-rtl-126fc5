// isd_w_rec: one step of the residual recurrence
//   w(k+1) = 4 w(k) - B(k) r(k+1) - C(k) r(k+1)^2
// with w in carry-save form (sum, carry).
//
// 4w is a two-place left shift of both vectors.  The multiples B*r (0, B, 2B) and
// C*r^2 (0, C, 4C) come from multiplexers; a subtracted multiple is inverted and
// its +1 is placed in bit 0 of a shifted residual vector, which the shift has left
// empty.  A 4:2 compressor adds the four vectors.  The bits of weight 2^2 .. 2^-4
// of the new 4w are added in a 7-bit carry-propagate adder to give the estimate
// 4w~(k+1) (format III.FFFF, 1/16 units) for the next digit selection, in the same
// cycle (the retimed selection of the document).  Structure after the document's
// Figure 2; the placement of the +1 bits is this design's.  Combinational.
module isd_w_rec
  import isd_pkg::*;
#(
  parameter int unsigned W = ISD_W,
  parameter int unsigned F = ISD_F
) (
  input  logic [W-1:0] ws_i,
  input  logic [W-1:0] wc_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  input  digit_t       r_i,
  output logic [W-1:0] ws_o,
  output logic [W-1:0] wc_o,
  output logic [6:0]   w_est_o
);

  logic [W-1:0] br, cr, a_v, b_v, x1, x2;
  logic         neg_b, neg_c;

  always_comb begin
    // digit multiples by multiplexer
    unique case (r_i)
      3'sd2, -3'sd2: begin br = b_i << 1; cr = c_i << 2; end
      3'sd1, -3'sd1: begin br = b_i;      cr = c_i;      end
      default:       begin br = '0;       cr = '0;       end
    endcase
    // -B*r is a subtraction for r > 0, -C*r^2 for every r != 0
    neg_b = (r_i > 0);
    neg_c = (r_i != 0);
    x1    = neg_b ? ~br : br;
    x2    = neg_c ? ~cr : cr;
    a_v   = {ws_i[W-3:0], 1'b0, neg_c};
    b_v   = {wc_i[W-3:0], 1'b0, neg_b};
  end

  isd_csa42 #(.W(W)) u_csa (
    .a_i     (a_v),
    .b_i     (b_v),
    .c_i     (x1),
    .d_i     (x2),
    .sum_o   (ws_o),
    .carry_o (wc_o)
  );

  assign w_est_o = ws_o[F -: 7] + wc_o[F -: 7];

endmodule
