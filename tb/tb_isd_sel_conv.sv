// tb_isd_sel_conv: all 128 estimates; the output must equal the estimate limited
// to -25..25.
module tb_isd_sel_conv;
  logic [6:0]        e;
  logic signed [5:0] o;
  int checks = 0, failures = 0;

  isd_sel_conv u_dut (.w_est_i(e), .w_sel_o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, expv;
    for (int i = 0; i < 128; i++) begin
      e = 7'(i);
      #1;
      v = (i >= 64) ? i - 128 : i;
      expv = (v > 25) ? 25 : (v < -25) ? -25 : v;
      checks++;
      if (int'(o) != expv) begin
        failures++;
        $display("FAIL est %0d -> %0d, expected %0d", v, o, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
