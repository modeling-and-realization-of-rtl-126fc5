// tb_isd_except: one directed case per rule of the exception table, plus random
// normal operands that must not be treated as special.
module tb_isd_except;
  import isd_pkg::*;
  isd_op_e      op;
  logic [31:0]  xw, hw, res;
  fp_unpacked_t xu, hu;
  logic         sp, inv, dz;
  int checks = 0, failures = 0;

  isd_unpack u_ux (.fp_i(xw), .up_o(xu));
  isd_unpack u_uh (.fp_i(hw), .up_o(hu));
  isd_except u_dut (.op_i(op), .x_i(xu), .h_i(hu), .special_o(sp), .result_o(res),
                    .invalid_o(inv), .div_zero_o(dz));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] ONE = 32'h3F80_0000, MONE = 32'hBF80_0000, PINF = 32'h7F80_0000,
                          NINF = 32'hFF80_0000, NAN1 = 32'h7F80_0001, PZ = 32'h0, NZ = 32'h8000_0000;

  task automatic t(input isd_op_e o, input logic [31:0] x, input logic [31:0] h,
                   input logic esp, input logic [31:0] eres, input logic einv, input logic edz);
    op = o; xw = x; hw = h;
    #1;
    checks++;
    if (sp != esp || (esp && (res != eres || inv != einv || dz != edz)) || (!esp && (inv || dz))) begin
      failures++;
      $display("FAIL op=%0d x=%h h=%h -> %b %h %b %b", o, x, h, sp, res, inv, dz);
    end
  endtask

  initial begin
    t(OP_DIV, NAN1, ONE,  1, QNAN, 1, 0);
    t(OP_DIV, ONE,  NAN1, 1, QNAN, 1, 0);
    t(OP_DIV, PZ,   NZ,   1, QNAN, 1, 0);
    t(OP_DIV, PINF, NINF, 1, QNAN, 1, 0);
    t(OP_DIV, NINF, ONE,  1, NINF, 0, 0);
    t(OP_DIV, MONE, PZ,   1, NINF, 0, 1);
    t(OP_DIV, ONE,  NZ,   1, NINF, 0, 1);
    t(OP_DIV, ONE,  NINF, 1, NZ,   0, 0);
    t(OP_DIV, NZ,   MONE, 1, PZ,   0, 0);
    t(OP_DIV, ONE,  MONE, 0, 0,    0, 0);
    t(OP_SQRT, NAN1, 0,   1, QNAN, 1, 0);
    t(OP_SQRT, NZ,   0,   1, NZ,   0, 0);
    t(OP_SQRT, PZ,   0,   1, PZ,   0, 0);
    t(OP_SQRT, 32'hC5AF_6000, 0, 1, QNAN, 1, 0);
    t(OP_SQRT, NINF, 0,   1, QNAN, 1, 0);
    t(OP_SQRT, PINF, 0,   1, PINF, 0, 0);
    t(OP_SQRT, ONE,  MONE, 0, 0,   0, 0);
    t(OP_ISQRT, 0, NAN1,  1, QNAN, 1, 0);
    t(OP_ISQRT, 0, PZ,    1, PINF, 0, 1);
    t(OP_ISQRT, 0, NZ,    1, NINF, 0, 1);
    t(OP_ISQRT, 0, 32'hC62D_9C00, 1, QNAN, 1, 0);
    t(OP_ISQRT, 0, PINF,  1, PZ,   0, 0);
    t(OP_ISQRT, MONE, ONE, 0, 0,   0, 0);
    for (int i = 0; i < 500; i++) begin
      logic [31:0] a, b;
      a = {1'b0, 8'($urandom_range(1, 254)), 23'($urandom)};
      b = {1'($urandom), 8'($urandom_range(1, 254)), 23'($urandom)};
      t(OP_DIV, b, {1'($urandom), 8'($urandom_range(1, 254)), 23'($urandom)}, 0, 0, 0, 0);
      t(OP_SQRT, a, b, 0, 0, 0, 0);
      t(OP_ISQRT, b, a, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
