// isd_init: phase 1 of the ISD unit, the start values of the recurrence.
//
// From the operation and the two unpacked significands x and h it forms
//   w(0) = 0.5 (m - v)      kept in carry-save form (sum, carry)
//   B(0), C(0)              one fixed-point word each
//   R(0)                    as the two on-the-fly registers Q = R(0), QM = R(0) - 1
// and the estimates 4w^(0) and B^(0) from which the first digit r(1) is selected:
//
//   op     m            v            B(0)   C(0)              R(0)
//   DIV    x/4          0            h/2    0                 0
//   SQRT   x/4 (x/2 *)  1            1      1/8               1
//   ISQRT  1            h (h/2 *)    h/2    h/32 (h/16 *)     2 (1 *)
//   (* unbiased exponent odd)
//
// The table is the document's phase-1 initialization.  The document also gives
// w(0) = 0.5(1 - 0.25h) for an odd exponent in its separate inverse square root
// section; that disagrees with g = h/2, R(0) = 1, and the phase-1 form
// 0.5(1 - 0.5h) is used here.  As in the document's Figure 3, m and -v pass a 4:2
// compressor and a short carry-propagate adder forms the 7-bit estimate of 4w(0)
// (format III.FFFF).  The estimate of B(0) is exact (format I.FFFFF).
// Combinational.  Fixed point: W bits, F fraction bits; Q/QM: QW bits, QF fraction.
module isd_init
  import isd_pkg::*;
#(
  parameter int unsigned W  = ISD_W,
  parameter int unsigned F  = ISD_F,
  parameter int unsigned QW = ISD_QW,
  parameter int unsigned QF = ISD_QF
) (
  input  isd_op_e       op_i,
  input  logic [23:0]   x_mant_i,   // 1.f, 23 fraction bits
  input  logic          x_odd_i,    // unbiased exponent of x is odd
  input  logic [23:0]   h_mant_i,
  input  logic          h_odd_i,
  output logic [W-1:0]  ws_o,       // w(0), sum vector
  output logic [W-1:0]  wc_o,       // w(0), carry vector
  output logic [W-1:0]  b_o,
  output logic [W-1:0]  c_o,
  output logic [QW-1:0] q_o,
  output logic [QW-1:0] qm_o,
  output logic [6:0]    w_est_o,    // 4w(0) estimate, two's complement, 1/16 units
  output logic [5:0]    b_est_o     // B(0) estimate, 1/32 units
);

  // significand 1.f (23 fraction bits) placed at F fraction bits, times 2^-s
  function automatic logic [W-1:0] fx(input logic [23:0] m, input int unsigned s);
    return W'(m) << (F - 23 - s);
  endfunction

  localparam logic [W-1:0] ONE = W'(1) << F;

  logic [W-1:0] m_v, v_v;
  logic [1:0]   r0;

  always_comb begin
    m_v  = '0;
    v_v  = '0;
    b_o  = '0;
    c_o  = '0;
    r0   = 2'd0;
    unique case (op_i)
      OP_DIV: begin
        m_v = fx(x_mant_i, 2);
        v_v = '0;
        b_o = fx(h_mant_i, 1);
        c_o = '0;
        r0  = 2'd0;
      end
      OP_SQRT: begin
        m_v = x_odd_i ? fx(x_mant_i, 1) : fx(x_mant_i, 2);
        v_v = ONE;
        b_o = ONE;
        c_o = ONE >> 3;
        r0  = 2'd1;
      end
      OP_ISQRT: begin
        m_v = ONE;
        v_v = h_odd_i ? fx(h_mant_i, 1) : fx(h_mant_i, 0);
        b_o = fx(h_mant_i, 1);
        c_o = h_odd_i ? fx(h_mant_i, 4) : fx(h_mant_i, 5);
        r0  = h_odd_i ? 2'd1 : 2'd2;
      end
      default: ;
    endcase
  end

  // w(0) = m/2 + (~(v/2) + 1): the +1 enters as the third compressor input
  isd_csa42 #(.W(W)) u_csa (
    .a_i     (m_v >> 1),
    .b_i     (~(v_v >> 1)),
    .c_i     (W'(1)),
    .d_i     ('0),
    .sum_o   (ws_o),
    .carry_o (wc_o)
  );

  // short CPA over the bits of weight 2^0 .. 2^-6 of w, i.e. 2^2 .. 2^-4 of 4w
  assign w_est_o = ws_o[F -: 7] + wc_o[F -: 7];
  assign b_est_o = b_o[F -: 6];

  assign q_o  = QW'(r0) << QF;
  assign qm_o = (QW'(r0) << QF) - (QW'(1) << QF);

endmodule
