// tb_isd_sel_table: every estimate -25..25 against every B~ column 0..63, for
// r(1) and for later digits.  The reference counts how many of the column's
// thresholds the estimate reaches (r = -2 + count), with the thresholds written
// out row by row as in the selection table.
module tb_isd_sel_table;
  logic signed [5:0] w;
  logic [5:0]        b;
  logic              first;
  logic signed [2:0] r;
  int checks = 0, failures = 0;

  isd_sel_table u_dut (.w_sel_i(w), .b_est_i(b), .first_i(first), .r_o(r));

  // rows m(-1), m(0), m(1), m(2) for B~ = 16..31, then B~ >= 32 (later), (first)
  int m_m1 [18] = '{-13,-14,-14,-15,-16,-17,-18,-18,-18,-19,-20,-20,-21,-23,-24,-24,-22,-20};
  int m_0  [18] = '{ -5, -5, -6, -6, -6, -6, -7, -7, -8, -8, -8, -8, -9, -9, -9,-10, -9, -9};
  int m_1  [18] = '{  3,  4,  4,  4,  4,  4,  4,  5,  5,  7,  7,  7,  8,  8,  8,  8,  8,  8};
  int m_2  [18] = '{ 12, 13, 14, 14, 15, 15, 16, 17, 17, 18, 19, 19, 20, 20, 21, 22, 22, 22};

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int col, expr;
    for (int f = 0; f < 2; f++)
      for (int bi = 0; bi < 64; bi++)
        for (int wi = -25; wi <= 25; wi++) begin
          w = 6'(wi); b = 6'(bi); first = 1'(f);
          #1;
          col  = (bi >= 32) ? (f ? 17 : 16) : (bi < 16) ? 0 : bi - 16;
          expr = -2 + int'(wi >= m_m1[col]) + int'(wi >= m_0[col])
                    + int'(wi >= m_1[col]) + int'(wi >= m_2[col]);
          checks++;
          if (int'(r) != expr) begin
            failures++;
            if (failures < 10) $display("FAIL w=%0d B=%0d first=%0d -> %0d, expected %0d", wi, bi, f, r, expr);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
