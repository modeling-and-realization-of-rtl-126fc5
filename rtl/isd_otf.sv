// isd_otf: on-the-fly conversion of the signed radix-4 digits into the result,
//   R(k+1) = Convert(R(k), r(k+1)).
//
// Two registers are kept, Q = R(k) and QM = R(k) - 4^-k.  Each new digit only
// writes the two still-empty bits of weight 4^-(k+1), so no carry propagates:
//   Q(k+1)  = r >= 0 ? Q  + r 4^-(k+1)       : QM + (4 + r) 4^-(k+1)
//   QM(k+1) = r >  0 ? Q  + (r - 1) 4^-(k+1) : QM + (3 + r) 4^-(k+1)
// At the end QM is the result corrected downwards by one unit, used when the
// final residual is negative.  The document names the conversion only; the
// on-the-fly method is this design's choice.  k is the 0-based iteration number.
// Combinational; QW bits with QF fraction bits.
module isd_otf
  import isd_pkg::*;
#(
  parameter int unsigned QW = ISD_QW,
  parameter int unsigned QF = ISD_QF
) (
  input  logic [QW-1:0] q_i,
  input  logic [QW-1:0] qm_i,
  input  digit_t        r_i,
  input  logic [3:0]    k_i,
  output logic [QW-1:0] q_o,
  output logic [QW-1:0] qm_o
);

  logic [1:0]    dq, dqm;
  int unsigned   pos;
  int            rv;

  always_comb begin
    rv  = int'(r_i);
    pos = QF - 2 * (32'(k_i) + 1);
    dq  = 2'(rv >= 0 ? rv : rv + 4);
    dqm = 2'(rv > 0 ? rv - 1 : rv + 3);
    q_o  = (r_i >= 0 ? q_i : qm_i) | (QW'(dq)  << pos);
    qm_o = (r_i >  0 ? q_i : qm_i) | (QW'(dqm) << pos);
  end

endmodule
