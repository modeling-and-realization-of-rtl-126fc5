// tb_isd_bc_rec: random B in [0.5, 1], C below 1/8 and digits; checks
// B(k+1) = B + 2 r C exactly, C(k+1) = C / 4 (truncated), and that the short-
// adder estimate B~ (1/32 units) is the truncated new B or at most one unit below.
module tb_isd_bc_rec;
  import isd_pkg::*;
  localparam int unsigned W = ISD_W;
  localparam int unsigned F = ISD_F;
  logic [W-1:0] b, c, bo, co;
  digit_t       r;
  logic [5:0]   best;
  int checks = 0, failures = 0;

  isd_bc_rec u_dut (.b_i(b), .c_i(c), .r_i(r), .b_o(bo), .c_o(co), .b_est_o(best));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expb;
    int           rv, tr;
    for (int i = 0; i < 5000; i++) begin
      b  = (W'(1) << (F - 1)) + (W'({$urandom, $urandom}) >> 4);
      c  = W'({$urandom, $urandom}) >> 6;
      if (i == 0) begin b = W'(1) << F; c = W'(1) << (F - 3); end   // square root start
      rv = int'($urandom_range(0, 4)) - 2;
      r  = 3'(rv);
      #1;
      expb = b + W'(2 * rv) * c;
      tr   = int'(expb[F -: 6]);
      checks++;
      if (bo != expb || co != (c >> 2) || !(tr - int'(best) inside {0, 1})) begin
        failures++;
        if (failures < 5) $display("FAIL r=%0d B %h C %h -> %h %h est %0d trunc %0d", rv, b, c, bo, co, best, tr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
