// tb_isd_workloads: the twelve operand sets used to demonstrate the unit:
//   DIV 1.1/0.13, 11111/5, 0.34/0.00453;  SQRT 132, 0.00132, -5612;
//   ISQRT 5.7, 333, 11111, -11111, 0.57, 0.0013245
// as single-precision words.  Normal results are checked exactly against the
// correctly rounded value (isd_tb_pkg) and against the expected word; the two
// negative roots must give the quiet NaN with the invalid flag.  The latency of
// each operation is checked too.
module tb_isd_workloads;
  import isd_pkg::*;
  import isd_tb_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] din;
  logic        ld_x, ld_h, start;
  isd_op_e     op;
  logic [31:0] result;
  isd_flags_t  flags;
  logic        busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  isd_unit u_dut (.clk_i(clk), .rst_ni(rst_n), .din_i(din), .ld_x_i(ld_x), .ld_h_i(ld_h),
                  .op_i(op), .start_i(start), .result_o(result), .flags_o(flags),
                  .busy_o(busy), .done_o(done));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    isd_op_e     o;
    logic [31:0] x, h, r;
    string       name;
  } case_t;

  // expected words: the operands rounded to single precision, then the exact
  // result of the operation on them rounded to nearest
  case_t cases [12] = '{
    '{OP_DIV,   32'h3F8C_CCCD, 32'h3E05_1EB8, 32'h4107_6277, "DIV 1.1/0.13"},
    '{OP_DIV,   32'h462D_9C00, 32'h40A0_0000, 32'h450A_E333, "DIV 11111/5"},
    '{OP_DIV,   32'h3EAE_147B, 32'h3B94_7065, 32'h4296_1C42, "DIV 0.34/0.00453"},
    '{OP_SQRT,  32'h4304_0000, 32'h0,         32'h4137_D375, "SQRT 132"},
    '{OP_SQRT,  32'h3AAD_03DA, 32'h0,         32'h3D14_D0A9, "SQRT 0.00132"},
    '{OP_SQRT,  32'hC5AF_6000, 32'h0,         QNAN,          "SQRT -5612"},
    '{OP_ISQRT, 32'h0, 32'h40B6_6666,         32'h3ED6_7405, "ISQRT 5.7"},
    '{OP_ISQRT, 32'h0, 32'h43A6_8000,         32'h3D60_759C, "ISQRT 333"},
    '{OP_ISQRT, 32'h0, 32'h462D_9C00,         32'h3C1B_6EDC, "ISQRT 11111"},
    '{OP_ISQRT, 32'h0, 32'hC62D_9C00,         QNAN,          "ISQRT -11111"},
    '{OP_ISQRT, 32'h0, 32'h3F11_EB85,         32'h3FA9_8A47, "ISQRT 0.57"},
    '{OP_ISQRT, 32'h0, 32'h3AAD_9AD8,         32'h41DB_D182, "ISQRT 0.0013245"}
  };

  initial begin
    int  cyc, n;
    bit  ok, exact;
    rst_n = 1'b0; din = '0; ld_x = 1'b0; ld_h = 1'b0; start = 1'b0; op = OP_DIV;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (cases[i]) begin
      @(negedge clk); din = cases[i].x; ld_x = 1'b1;
      @(negedge clk); ld_x = 1'b0; din = cases[i].h; ld_h = 1'b1;
      @(negedge clk); ld_h = 1'b0; op = cases[i].o; start = 1'b1;
      @(posedge clk);
      @(negedge clk); start = 1'b0;
      cyc = 0;
      while (!done && cyc < 100) begin @(posedge clk); @(negedge clk); cyc++; end
      n = (cases[i].o == OP_DIV) ? 14 : (cases[i].o == OP_SQRT) ? 13 : 12;
      checks++;
      if (cyc != n + 2) begin failures++; $display("FAIL %s latency %0d", cases[i].name, cyc); end
      checks++;
      if (cases[i].r == QNAN) ok = (result == QNAN) && flags.invalid;
      else ok = check_rounded(int'(cases[i].o), cases[i].x, cases[i].h, result, exact) &&
                (result == cases[i].r) && flags.inexact;
      if (!ok) begin
        failures++;
        $display("FAIL %s -> %h flags %b, expected %h", cases[i].name, result, flags, cases[i].r);
      end else $display("  %-18s -> %h (%0d cycles)", cases[i].name, result, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
