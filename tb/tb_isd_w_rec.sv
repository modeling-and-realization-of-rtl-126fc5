// tb_isd_w_rec: random carry-save residuals, multiples and digits.  Checks that
// the new sum + carry equals 4(ws + wc) - B r - C r^2 modulo 2^W, and that the
// 7-bit estimate is the truncated value of 4w(k+1) in 1/16 units, or one unit
// below it (both vectors are truncated), modulo 2^7.
module tb_isd_w_rec;
  import isd_pkg::*;
  localparam int unsigned W = ISD_W;
  localparam int unsigned F = ISD_F;
  logic [W-1:0] ws, wc, b, c, wso, wco;
  digit_t       r;
  logic [6:0]   est;
  int checks = 0, failures = 0;

  isd_w_rec u_dut (.ws_i(ws), .wc_i(wc), .b_i(b), .c_i(c), .r_i(r),
                   .ws_o(wso), .wc_o(wco), .w_est_o(est));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expw, got;
    logic [6:0]   tr;
    int           rv;
    for (int i = 0; i < 5000; i++) begin
      ws = {$urandom, $urandom}; wc = {$urandom, $urandom};
      b  = W'({$urandom, $urandom}) >> 2;   // below 1
      c  = W'({$urandom, $urandom}) >> 5;   // below 1/8
      rv = int'($urandom_range(0, 4)) - 2;
      r  = 3'(rv);
      #1;
      expw = W'((ws + wc) << 2) - W'(b * W'(rv)) - W'(c * W'(rv * rv));
      got  = wso + wco;
      tr   = got[F -: 7];
      checks++;
      if (got != expw || !((7'(tr - est)) inside {7'd0, 7'd1})) begin
        failures++;
        if (failures < 5) $display("FAIL r=%0d got %h expected %h est %0d trunc %0d", rv, got, expw, est, tr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
