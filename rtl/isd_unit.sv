// isd_unit: radix-4 floating-point inverse square root, square root and division
// unit (ISD) for IEEE-754 single precision.
//
// One digit recurrence serves all three operations:
//   w(k+1) = 4 w(k) - B(k) r(k+1) - C(k) r(k+1)^2
//   B(k+1) = B(k) + 2 r(k+1) C(k)          C(k+1) = C(k) / 4
//   R(k+1) = R(k) + r(k+1) 4^-(k+1)        r(k+2) = SEL(4w~(k+1), B~(k+1))
// Only the start values (isd_init), the number of iterations and the final
// normalization differ between the operations.  Per cycle of phase 2 the residual
// step (isd_w_rec), the B/C step (isd_bc_rec), the on-the-fly conversion
// (isd_otf) and the selection of the next digit from the short estimates
// (isd_sel_conv, isd_sel_table) all complete, so one radix-4 digit (two result
// bits) is produced per clock.
//
// Interface: a single 32-bit operand port din_i, written into the x register by
// ld_x_i or into the h register by ld_h_i (a division needs both, x / h; the
// square root reads x, the inverse square root reads h).  start_i with op_i starts
// an operation when busy_o is low; result_o and flags_o are valid from the cycle
// done_o is high until the next done.  Loads while busy are ignored.
// Latency, start edge to done: N + 2 clocks (16 DIV, 15 SQRT, 14 ISQRT); one
// operation at a time.  Synchronous active-low reset.
//
// The single input port, the phases and the datapath follow the document; the
// load strobes, the done/busy handshake, the flags and the widths are this
// design's.
module isd_unit
  import isd_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic [31:0] din_i,
  input  logic        ld_x_i,
  input  logic        ld_h_i,
  input  isd_op_e     op_i,
  input  logic        start_i,
  output logic [31:0] result_o,
  output isd_flags_t  flags_o,
  output logic        busy_o,
  output logic        done_o
);

  localparam int unsigned W  = ISD_W;
  localparam int unsigned QW = ISD_QW;

  // ---------------------------------------------------------------- control
  isd_op_e    op;
  logic       ph_init, ph_iter, ph_final;
  logic [3:0] k;

  isd_ctrl u_ctrl (
    .clk_i   (clk_i),
    .rst_ni  (rst_ni),
    .start_i (start_i),
    .op_i    (op_i),
    .op_o    (op),
    .init_o  (ph_init),
    .iter_o  (ph_iter),
    .final_o (ph_final),
    .k_o     (k),
    .busy_o  (busy_o),
    .done_o  (done_o)
  );

  // ------------------------------------------------------ operand registers
  logic [31:0]  x_reg, h_reg;
  fp_unpacked_t x_up, h_up;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      x_reg <= '0;
      h_reg <= '0;
    end else if (!busy_o) begin
      if (ld_x_i) x_reg <= din_i;
      if (ld_h_i) h_reg <= din_i;
    end
  end

  isd_unpack u_unpack_x (.fp_i(x_reg), .up_o(x_up));
  isd_unpack u_unpack_h (.fp_i(h_reg), .up_o(h_up));

  // -------------------------------------------------- recurrence registers
  logic [W-1:0]  ws, wc, b, c;
  logic [QW-1:0] q, qm;
  digit_t        r;

  // phase 1
  logic [W-1:0]  ws0, wc0, b0, c0;
  logic [QW-1:0] q0, qm0;
  logic [6:0]    w_est0;
  logic [5:0]    b_est0;

  isd_init u_init (
    .op_i     (op),
    .x_mant_i (x_up.mant),
    .x_odd_i  (x_up.exp_odd),
    .h_mant_i (h_up.mant),
    .h_odd_i  (h_up.exp_odd),
    .ws_o     (ws0),
    .wc_o     (wc0),
    .b_o      (b0),
    .c_o      (c0),
    .q_o      (q0),
    .qm_o     (qm0),
    .w_est_o  (w_est0),
    .b_est_o  (b_est0)
  );

  // phase 2
  logic [W-1:0]  ws1, wc1, b1, c1;
  logic [QW-1:0] q1, qm1;
  logic [6:0]    w_est1;
  logic [5:0]    b_est1;

  isd_w_rec u_w_rec (
    .ws_i    (ws),
    .wc_i    (wc),
    .b_i     (b),
    .c_i     (c),
    .r_i     (r),
    .ws_o    (ws1),
    .wc_o    (wc1),
    .w_est_o (w_est1)
  );

  isd_bc_rec u_bc_rec (
    .b_i     (b),
    .c_i     (c),
    .r_i     (r),
    .b_o     (b1),
    .c_o     (c1),
    .b_est_o (b_est1)
  );

  isd_otf u_otf (
    .q_i  (q),
    .qm_i (qm),
    .r_i  (r),
    .k_i  (k),
    .q_o  (q1),
    .qm_o (qm1)
  );

  // digit selection at the end of the cycle, from phase-1 or phase-2 estimates
  logic [6:0]        w_est;
  logic [5:0]        b_est;
  logic signed [5:0] w_sel;
  digit_t            r_next;

  assign w_est = ph_init ? w_est0 : w_est1;
  assign b_est = ph_init ? b_est0 : b_est1;

  isd_sel_conv u_sel_conv (
    .w_est_i (w_est),
    .w_sel_o (w_sel)
  );

  isd_sel_table u_sel_table (
    .w_sel_i (w_sel),
    .b_est_i (b_est),
    .first_i (ph_init),
    .r_o     (r_next)
  );

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      ws <= '0;
      wc <= '0;
      b  <= '0;
      c  <= '0;
      q  <= '0;
      qm <= '0;
      r  <= '0;
    end else if (ph_init) begin
      ws <= ws0;
      wc <= wc0;
      b  <= b0;
      c  <= c0;
      q  <= q0;
      qm <= qm0;
      r  <= r_next;
    end else if (ph_iter) begin
      ws <= ws1;
      wc <= wc1;
      b  <= b1;
      c  <= c1;
      q  <= q1;
      qm <= qm1;
      r  <= r_next;
    end
  end

  // ------------------------------------------- exponent, exceptions, phase 3
  logic signed [9:0] exp_base;
  logic              special, exc_invalid, exc_div_zero;
  logic [31:0]       special_res, result_d;
  isd_flags_t        flags_d;
  logic              res_sign;

  isd_exp u_exp (
    .op_i    (op),
    .x_exp_i (x_up.exp),
    .h_exp_i (h_up.exp),
    .exp_o   (exp_base)
  );

  isd_except u_except (
    .op_i       (op),
    .x_i        (x_up),
    .h_i        (h_up),
    .special_o  (special),
    .result_o   (special_res),
    .invalid_o  (exc_invalid),
    .div_zero_o (exc_div_zero)
  );

  assign res_sign = (op == OP_DIV) ? (x_up.sign ^ h_up.sign) : 1'b0;

  isd_round u_round (
    .op_i          (op),
    .q_i           (q),
    .qm_i          (qm),
    .ws_i          (ws),
    .wc_i          (wc),
    .exp_i         (exp_base),
    .sign_i        (res_sign),
    .special_i     (special),
    .special_res_i (special_res),
    .invalid_i     (exc_invalid),
    .div_zero_i    (exc_div_zero),
    .result_o      (result_d),
    .flags_o       (flags_d)
  );

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      result_o <= '0;
      flags_o  <= '0;
    end else if (ph_final) begin
      result_o <= result_d;
      flags_o  <= flags_d;
    end
  end

  // the selection table keeps the residual bounded: the digit is never out of set
  assert property (@(posedge clk_i) disable iff (!rst_ni) ph_iter |-> (r >= -3'sd2 && r <= 3'sd2));

endmodule
