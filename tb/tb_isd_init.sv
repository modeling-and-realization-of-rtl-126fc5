// tb_isd_init: random significands and both exponent parities for each
// operation.  The start values are recomputed in real arithmetic (exact here,
// every value has fewer than 53 significant bits) from the operand values
// x, h in [1, 2):  DIV w = x/8, B = h/2, C = 0, R = 0;  SQRT w = (y - 1)/2 with
// y = x/4 (even) or x/2 (odd), B = 1, C = 1/8, R = 1;  ISQRT g = h/4 (even) or h/2
// (odd), R = 2 (even) or 1 (odd), w = (1 - g R^2)/2, B = g R, C = g/8.  The 4w
// estimate must be the truncated 4w(0) or one 1/16 below it.
module tb_isd_init;
  import isd_pkg::*;
  localparam int unsigned W  = ISD_W;
  localparam int unsigned F  = ISD_F;
  localparam int unsigned QW = ISD_QW;
  localparam int unsigned QF = ISD_QF;
  isd_op_e       op;
  logic [23:0]   xm, hm;
  logic          xo, ho;
  logic [W-1:0]  ws, wc, b, c;
  logic [QW-1:0] q, qm;
  logic [6:0]    west;
  logic [5:0]    best;
  int checks = 0, failures = 0;

  isd_init u_dut (.op_i(op), .x_mant_i(xm), .x_odd_i(xo), .h_mant_i(hm), .h_odd_i(ho),
                  .ws_o(ws), .wc_o(wc), .b_o(b), .c_o(c), .q_o(q), .qm_o(qm),
                  .w_est_o(west), .b_est_o(best));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fx(input logic [W-1:0] v);   // signed fixed point to real
    longint t;
    t = {{(64-W){v[W-1]}}, v};
    return $itor(t) / (2.0 ** F);
  endfunction

  function automatic real qx(input logic [QW-1:0] v);  // signed Q register to real
    longint t;
    t = {{(64-QW){v[QW-1]}}, v};
    return $itor(t);
  endfunction

  initial begin
    real x, h, y, g, ew, eb, ec, er, tw;
    int  tr;
    for (int i = 0; i < 3000; i++) begin
      op = isd_op_e'(i % 3);
      xm = {1'b1, 23'($urandom)}; hm = {1'b1, 23'($urandom)};
      xo = 1'($urandom); ho = 1'($urandom);
      x  = $itor(xm) / (2.0 ** 23);
      h  = $itor(hm) / (2.0 ** 23);
      case (op)
        OP_DIV:  begin ew = x / 8.0; eb = h / 2.0; ec = 0.0; er = 0.0; end
        OP_SQRT: begin
          y  = xo ? x / 2.0 : x / 4.0;
          ew = (y - 1.0) / 2.0; eb = 1.0; ec = 0.125; er = 1.0;
        end
        default: begin
          g  = ho ? h / 2.0 : h / 4.0;
          er = ho ? 1.0 : 2.0;
          ew = (1.0 - g * er * er) / 2.0; eb = g * er; ec = g / 8.0;
        end
      endcase
      #1;
      tw = fx(W'(ws + wc)) * 4.0 * 16.0;
      tr = $rtoi(tw);
      if ($itor(tr) > tw) tr--;       // floor
      checks++;
      if (fx(W'(ws + wc)) != ew || fx(b) != eb || fx(c) != ec ||
          qx(q) != er * (2.0 ** QF) ||
          qx(qm) != (er - 1.0) * (2.0 ** QF) ||
          !(7'(tr) - west inside {7'd0, 7'd1}) || best != 6'($rtoi(eb * 32.0))) begin
        failures++;
        if (failures < 5) $display("FAIL op=%0d w %f/%f B %f/%f C %f/%f est %0d/%0d", op,
                                   fx(W'(ws + wc)), ew, fx(b), eb, fx(c), ec, west, tr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
