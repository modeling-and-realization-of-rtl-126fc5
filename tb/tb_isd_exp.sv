// tb_isd_exp: all biased exponents 1..254 for the square root and inverse
// square root, random pairs for division.  The reference works with the value
// 2^E directly: sqrt(2^E) = 2^(E/2) for even E, 2^((E-1)/2) * sqrt(2) for odd E,
// so the exponent is the largest integer not above E/2; 1/sqrt(2^E) lies in
// (2^(e-1), 2^e] with e = -E/2 for even E, so the unit's base exponent (its
// significand range is (1, 2]) is that value minus one.
module tb_isd_exp;
  import isd_pkg::*;
  isd_op_e           op;
  logic [7:0]        xe, he;
  logic signed [9:0] eo;
  int checks = 0, failures = 0;

  isd_exp u_dut (.op_i(op), .x_exp_i(xe), .h_exp_i(he), .exp_o(eo));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int expv);
    #1;
    checks++;
    if (int'(eo) != expv) begin
      failures++;
      $display("FAIL op=%0d xe=%0d he=%0d -> %0d expected %0d", op, xe, he, eo, expv);
    end
  endtask

  initial begin
    int e, fl;
    for (int b = 1; b < 255; b++) begin
      e = b - 127;
      // floor(e / 2) without relying on signed division rounding
      fl = 0;
      while (2 * fl > e) fl--;
      while (2 * (fl + 1) <= e) fl++;
      op = OP_SQRT;  xe = 8'(b); he = 8'd0;  chk(fl + 127);
      // 1/sqrt(h 2^E) with h in [1,2): result exponent before the R = 2 step
      op = OP_ISQRT; xe = 8'd0;  he = 8'(b);
      if (e % 2 == 0) chk(-e / 2 - 1 + 127);
      else            chk(-(e + 1) / 2 + 127);
    end
    for (int i = 0; i < 2000; i++) begin
      op = OP_DIV; xe = 8'($urandom_range(1, 254)); he = 8'($urandom_range(1, 254));
      chk(int'(xe) - int'(he) + 127);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
