// tb_isd_ctrl: starts each operation and checks the phase sequence: one INIT
// cycle, N ITER cycles numbered 0..N-1 (N = 14 DIV, 13 SQRT, 12 ISQRT), one FINAL
// cycle, done N + 2 clocks after the start edge, and that a start while busy is
// ignored.
module tb_isd_ctrl;
  import isd_pkg::*;
  logic       clk = 1'b0, rst_n, start;
  isd_op_e    op, op_l;
  logic       ini, itr, fin, busy, done;
  logic [3:0] k;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  isd_ctrl u_dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .op_i(op), .op_o(op_l),
                  .init_o(ini), .iter_o(itr), .final_o(fin), .k_o(k), .busy_o(busy), .done_o(done));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input isd_op_e o, input int n);
    int c, ni, nit, nf, kexp;
    bit kok;
    @(negedge clk); op = o; start = 1'b1;
    @(posedge clk);
    @(negedge clk); start = 1'b1; op = isd_op_e'((int'(o) + 1) % 3);  // ignored: busy
    c = 0; ni = 0; nit = 0; nf = 0; kexp = 0; kok = 1;
    while (!done && c < 100) begin
      if (ini) ni++;
      if (itr) begin nit++; if (int'(k) != kexp) kok = 0; kexp++; end
      if (fin) nf++;
      @(posedge clk); @(negedge clk); start = 1'b0;
      c++;
    end
    checks++;
    if (c != n + 2 || ni != 1 || nit != n || nf != 1 || !kok || op_l != o) begin
      failures++;
      $display("FAIL op=%0d cycles=%0d init=%0d iter=%0d final=%0d kok=%0d", o, c, ni, nit, nf, kok);
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle after done"); end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; op = OP_DIV;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6; i++) begin
      one(OP_DIV, 14);
      one(OP_SQRT, 13);
      one(OP_ISQRT, 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
