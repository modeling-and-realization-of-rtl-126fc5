// tb_isd_otf: random digit strings from each start value R(0) = 0, 1, 2; after
// every digit Q must equal R(0) + sum r(i) 4^-i and QM must equal Q - 4^-k,
// computed here with ordinary signed integer arithmetic.
module tb_isd_otf;
  import isd_pkg::*;
  localparam int unsigned QW = ISD_QW;
  localparam int unsigned QF = ISD_QF;
  logic [QW-1:0] q, qm, qn, qmn;
  digit_t        r;
  logic [3:0]    k;
  int checks = 0, failures = 0;

  isd_otf u_dut (.q_i(q), .qm_i(qm), .r_i(r), .k_i(k), .q_o(qn), .qm_o(qmn));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    for (int t = 0; t < 600; t++) begin
      int r0;
      r0  = t % 3;
      acc = longint'(r0) << QF;
      q   = QW'(acc);
      qm  = QW'(acc - (longint'(1) << QF));
      for (int i = 0; i < 14; i++) begin
        r = 3'(int'($urandom_range(0, 4)) - 2);
        k = 4'(i);
        #1;
        acc += longint'(r) * (longint'(1) << (QF - 2 * (i + 1)));
        checks++;
        if (qn != QW'(acc) || qmn != QW'(acc - (longint'(1) << (QF - 2 * (i + 1))))) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d i=%0d r=%0d: %h %h expected %h", t, i, r, qn, qmn, QW'(acc));
        end
        q = qn; qm = qmn;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
