// isd_round: phase 3 of the ISD unit: last residual, correction, normalization,
// rounding and packing.
//
// The final residual w(N) = ws + wc is assimilated in a carry-select adder.  A
// negative residual means R(N) is one unit of 4^-N too large, and the on-the-fly
// register QM (= R(N) - 4^-N) is taken instead of Q; a non-zero residual marks the
// result inexact (sticky).  The corrected R then lies in
//   ISQRT [1, 2]      SQRT [1/2, 1)      DIV [1/8, 1/2)
// and is shifted so that its leading one becomes the hidden bit: by 0 or -1 place
// for ISQRT (R = 2 adds 1 to the exponent), 1 place for SQRT (2R), and 2 or 3
// places for DIV (4R if R >= 1/4, else 8R with the exponent lowered by one), as the
// document prescribes.  Rounding is to nearest, ties to even, from a guard bit and
// the sticky bit.  A result exponent above 254 gives infinity (overflow), one below
// 1 gives a signed zero (underflow; no subnormal results); both are this design's
// choices.  A special result from the exception logic replaces everything.
// Combinational; the caller registers the outputs.
module isd_round
  import isd_pkg::*;
#(
  parameter int unsigned W  = ISD_W,
  parameter int unsigned QW = ISD_QW,
  parameter int unsigned QF = ISD_QF
) (
  input  isd_op_e           op_i,
  input  logic [QW-1:0]     q_i,
  input  logic [QW-1:0]     qm_i,
  input  logic [W-1:0]      ws_i,
  input  logic [W-1:0]      wc_i,
  input  logic signed [9:0] exp_i,       // biased, before normalization
  input  logic              sign_i,
  input  logic              special_i,
  input  logic [31:0]       special_res_i,
  input  logic              invalid_i,
  input  logic              div_zero_i,
  output logic [31:0]       result_o,
  output isd_flags_t        flags_o
);

  logic [W-1:0]      w;
  logic              w_neg, w_nz;
  logic [QW-1:0]     r, rn;
  logic [2:0]        sh;
  logic signed [9:0] e, e_r;
  logic [23:0]       mant;
  logic [24:0]       mant_r;
  logic              guard, sticky, up;

  csel_adder #(.W(W), .BLK(8)) u_res (
    .a_i    (ws_i),
    .b_i    (wc_i),
    .cin_i  (1'b0),
    .sum_o  (w),
    .cout_o ()
  );

  always_comb begin
    w_neg = w[W-1];
    w_nz  = (w != '0);
    r     = w_neg ? qm_i : q_i;

    // place the leading one at bit QF+1
    sh = 3'd0;
    e  = exp_i;
    unique case (op_i)
      OP_ISQRT: begin
        if (r[QF+1]) begin sh = 3'd0; e = exp_i + 10'sd1; end
        else         begin sh = 3'd1;                     end
      end
      OP_SQRT:       begin sh = 3'd2;                     end
      OP_DIV: begin
        if (r[QF-2]) begin sh = 3'd3;                     end
        else         begin sh = 3'd4; e = exp_i - 10'sd1; end
      end
      default: ;
    endcase
    rn     = r << sh;
    mant   = rn[QF+1 -: 24];
    guard  = rn[QF-23];
    sticky = (rn[QF-24:0] != '0) || w_nz;

    up     = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + 25'(up);
    e_r    = e;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_r    = e + 10'sd1;
    end

    flags_o = '0;
    if (special_i) begin
      result_o         = special_res_i;
      flags_o.invalid  = invalid_i;
      flags_o.div_zero = div_zero_i;
    end else if (e_r > 10'sd254) begin
      result_o         = {sign_i, 8'hFF, 23'd0};
      flags_o.overflow = 1'b1;
      flags_o.inexact  = 1'b1;
    end else if (e_r < 10'sd1) begin
      result_o          = {sign_i, 31'd0};
      flags_o.underflow = 1'b1;
      flags_o.inexact   = 1'b1;
    end else begin
      result_o        = {sign_i, e_r[7:0], mant_r[22:0]};
      flags_o.inexact = guard | sticky;
    end
  end

endmodule
