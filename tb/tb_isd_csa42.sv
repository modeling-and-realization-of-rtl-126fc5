// tb_isd_csa42: random operands; checks that sum + carry equals a + b + c + d
// modulo 2^W, for the default width.
module tb_isd_csa42;
  localparam int unsigned W = 53;
  logic [W-1:0] a, b, c, d, s, cy;
  int checks = 0, failures = 0;

  isd_csa42 u_dut (.a_i(a), .b_i(b), .c_i(c), .d_i(d), .sum_o(s), .carry_o(cy));

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      a = rnd(); b = rnd(); c = rnd(); d = rnd();
      if (i < 4) begin a = '1; b = '1; c = '1; d = '1; end
      #1;
      checks++;
      if (W'(s + cy) != W'(a + b + c + d)) begin
        failures++;
        if (failures < 5) $display("FAIL %h %h %h %h -> %h %h", a, b, c, d, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
