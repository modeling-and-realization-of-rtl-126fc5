// tb_isd_unpack: known constants (1.0, 2.0, 0.75, -0, +inf, NaN, a subnormal)
// and random words; checks sign, exponent, significand, classes and the parity
// of the unbiased exponent.
module tb_isd_unpack;
  import isd_pkg::*;
  logic [31:0]  w;
  fp_unpacked_t u;
  int checks = 0, failures = 0;

  isd_unpack u_dut (.fp_i(w), .up_o(u));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_fields(input logic [31:0] x, input logic s, input int ue,
                               input logic [23:0] m, input logic z, input logic inf,
                               input logic nan);
    w = x;
    #1;
    checks++;
    if (u.sign != s || u.mant != m || u.is_zero != z || u.is_inf != inf || u.is_nan != nan ||
        (!z && !inf && !nan && (int'(u.exp) - 127 != ue || u.exp_odd != ((ue % 2) != 0)))) begin
      failures++;
      $display("FAIL %h -> %p", x, u);
    end
  endtask

  initial begin
    expect_fields(32'h3F80_0000, 0,   0, 24'h800000, 0, 0, 0);  // 1.0
    expect_fields(32'h4000_0000, 0,   1, 24'h800000, 0, 0, 0);  // 2.0
    expect_fields(32'h3F40_0000, 0,  -1, 24'hC00000, 0, 0, 0);  // 0.75
    expect_fields(32'hC5AF_6000, 1,  12, 24'hAF6000, 0, 0, 0);  // -5612
    expect_fields(32'h8000_0000, 1,   0, 24'h000000, 1, 0, 0);  // -0
    expect_fields(32'h0000_1234, 0,   0, 24'h000000, 1, 0, 0);  // subnormal
    expect_fields(32'h7F80_0000, 0,   0, 24'h800000, 0, 1, 0);  // +inf
    expect_fields(32'h7FC0_0001, 0,   0, 24'hC00001, 0, 0, 1);  // NaN
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x;
      x = $urandom;
      if (x[30:23] == 8'd0 || x[30:23] == 8'hFF) x[30:23] = 8'd100;
      expect_fields(x, x[31], int'(x[30:23]) - 127, {1'b1, x[22:0]}, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
