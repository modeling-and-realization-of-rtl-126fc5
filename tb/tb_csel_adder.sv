// tb_csel_adder: random and boundary operands for the 53-bit carry-select adder;
// checks sum and carry-out against a plain addition.
module tb_csel_adder;
  localparam int unsigned W = 53;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  csel_adder u_dut (.a_i(a), .b_i(b), .cin_i(cin), .sum_o(s), .cout_o(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] ref_sum;
    for (int i = 0; i < 5000; i++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; cin = 1'($urandom);
      if (i == 0) begin a = '1; b = '0; cin = 1'b1; end   // carry through every block
      if (i == 1) begin a = '1; b = '1; cin = 1'b1; end
      if (i == 2) begin a = 53'h00FF; b = 53'h0001; cin = 1'b0; end
      #1;
      ref_sum = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      checks++;
      if ({cout, s} != ref_sum) begin
        failures++;
        if (failures < 5) $display("FAIL %h + %h + %b -> %b %h", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
