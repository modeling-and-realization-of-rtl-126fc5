// isd_sel_conv: input converter of the digit selection table for the residual
// estimate 4w~.
//
// 4w~ arrives as 7 bits, two's complement, in 1/16 units (format III.FFFF, range
// -64 .. 63).  No threshold of the selection table is larger in magnitude than 24,
// so every estimate whose two top magnitude bits say |4w~| >= 32 selects the same
// digit as +-25: those cases are detected from the top bits alone and passed on as
// +-25, and only the remaining 5 value bits go through the range check.  This
// follows the document's Section 3, which reduces the table input from 7 to 5
// bits this way; the detection logic is this design's.  Output: a 6-bit two's-
// complement value in -25 .. 25.  Combinational.
module isd_sel_conv (
  input  logic [6:0]        w_est_i,
  output logic signed [5:0] w_sel_o
);

  localparam logic signed [5:0] SAT = 6'sd25;

  logic signed [5:0] low;

  always_comb begin
    low = signed'(w_est_i[5:0]);
    if (w_est_i[6] != w_est_i[5]) begin
      // |4w~| >= 32: the sign bit alone decides
      w_sel_o = w_est_i[6] ? -SAT : SAT;
    end else if (low > SAT) begin
      w_sel_o = SAT;
    end else if (low < -SAT) begin
      w_sel_o = -SAT;
    end else begin
      w_sel_o = low;
    end
  end

endmodule
