// tb_isd_round: builds final states directly: a random R(N) in each operation's
// range with the right number of digit bits, QM = R - 4^-N, and a carry-save
// residual that is positive, zero or negative.  The reference rounds in real
// arithmetic: it takes the corrected R (R - 4^-N for a negative residual), finds
// its leading power of two, rounds R 2^(23 - lead) to nearest even (the residual
// breaks ties upwards as a sticky bit) and adds lead plus 0 (ISQRT), 1 (SQRT) or
// 2 (DIV) to the exponent.  Also checks overflow, underflow and the special path.
module tb_isd_round;
  import isd_pkg::*;
  localparam int unsigned W  = ISD_W;
  localparam int unsigned QW = ISD_QW;
  localparam int unsigned QF = ISD_QF;
  isd_op_e           op;
  logic [QW-1:0]     q, qm;
  logic [W-1:0]      ws, wc;
  logic signed [9:0] e;
  logic              sgn, sp, inv, dz;
  logic [31:0]       spres, res;
  isd_flags_t        fl;
  int checks = 0, failures = 0;

  isd_round u_dut (.op_i(op), .q_i(q), .qm_i(qm), .ws_i(ws), .wc_i(wc), .exp_i(e),
                   .sign_i(sgn), .special_i(sp), .special_res_i(spres), .invalid_i(inv),
                   .div_zero_i(dz), .result_o(res), .flags_o(fl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          n, lead, adj, er, kind;
    longint      rq, ulp, lo, hi, rr, mexp;
    real         rv, sc, fr;
    bit          sticky, up, st_in;
    logic [31:0] expres;
    for (int i = 0; i < 6000; i++) begin
      op = isd_op_e'(i % 3);
      unique case (op)
        OP_ISQRT: begin n = 12; lo = longint'(1) << QF;       hi = longint'(2) << QF; adj = 0; end
        OP_SQRT:  begin n = 13; lo = longint'(1) << (QF - 1); hi = longint'(1) << QF; adj = 1; end
        default:  begin n = 14; lo = longint'(1) << (QF - 3); hi = longint'(1) << (QF - 1); adj = 2; end
      endcase
      ulp = longint'(1) << (QF - 2 * n);
      // R(N) a multiple of 4^-N; the corrected value must stay in range
      rq = lo + ulp + ((longint'({$urandom, $urandom}) & 64'h7FFF_FFFF_FFFF) % (hi - lo - ulp));
      rq = rq - rq % ulp;
      if (i % 50 == 1 && op == OP_ISQRT) rq = hi;   // R = 2, exact
      q  = QW'(rq);
      qm = QW'(rq - ulp);
      kind = (op == OP_ISQRT && rq == hi) ? 0 : $urandom_range(0, 2);
      unique case (kind)
        0:       begin ws = '0;    wc = '0;            end   // zero residual
        1:       begin ws = W'(5); wc = W'(7);         end   // positive
        default: begin ws = '1;    wc = W'(0) - W'(6); end   // negative
      endcase
      e    = 10'($urandom_range(2, 253));
      sgn  = 1'($urandom);
      sp   = 1'b0; spres = '0; inv = 1'b0; dz = 1'b0;
      #1;
      rr     = (kind == 2) ? rq - ulp : rq;
      st_in  = (kind != 0);
      rv     = $itor(rr) / (2.0 ** QF);
      lead   = 1;
      while ((2.0 ** lead) > rv) lead--;
      sc     = rv * (2.0 ** (23 - lead));
      mexp   = $rtoi(sc);
      if ($itor(mexp) > sc) mexp--;
      fr     = sc - $itor(mexp);
      sticky = st_in || (fr != 0.0 && fr != 0.5);
      up     = (fr > 0.5) || (fr == 0.5 && (st_in || mexp[0]));
      mexp   = mexp + longint'(up);
      er     = int'(e) + lead + adj;
      if (mexp == (longint'(1) << 24)) begin mexp = mexp >> 1; er++; end
      expres = (er > 254) ? {sgn, 8'hFF, 23'd0} : {sgn, 8'(er), 23'(mexp)};
      checks++;
      if (res != expres || fl.inexact != (fr != 0.0 || st_in) || fl.overflow != (er > 254)) begin
        failures++;
        if (failures < 8) $display("FAIL op=%0d R=%h kind=%0d -> %h expected %h", op, rq, kind, res, expres);
      end
    end
    // overflow, underflow, special passthrough
    op = OP_DIV; q = QW'(longint'(3) << (QF - 3)); qm = q - 1'b1; ws = '0; wc = '0; sgn = 1'b1;
    e = 10'sd300; #1; checks++;
    if (res != 32'hFF80_0000 || !fl.overflow || !fl.inexact) begin failures++; $display("FAIL overflow %h", res); end
    e = -10'sd5; #1; checks++;
    if (res != 32'h8000_0000 || !fl.underflow) begin failures++; $display("FAIL underflow %h", res); end
    sp = 1'b1; spres = 32'h7FC0_0000; inv = 1'b1; e = 10'sd100; #1; checks++;
    if (res != 32'h7FC0_0000 || !fl.invalid || fl.inexact) begin failures++; $display("FAIL special %h", res); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
