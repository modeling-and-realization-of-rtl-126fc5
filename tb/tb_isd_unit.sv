// tb_isd_unit: end-to-end test of the ISD unit at its default sizes.
//
// Runs random divisions, square roots and inverse square roots on normal operands
// (significands and exponents at random, plus significands near 1 and near 2)
// and a list of special operands.  Every normal result is checked exactly against
// the correctly rounded value (isd_tb_pkg), every special one against its IEEE
// pattern and flags.  The latency from start to done is checked for each
// operation: 16 cycles for division, 15 for square root, 14 for inverse square
// root.  The test also counts how often each mechanism of the datapath was used
// (every digit value, the negative-residual correction, both division shifts, the
// R = 2 inverse square root case, rounding up, overflow, underflow, each
// exception, the selection-table column for B >= 1 in phase 1 and later, the
// saturating table-input converter, odd and even exponent scaling) and fails if
// one never occurred.  Plusargs: +N=<rounds> sets the number of random rounds of
// three operations (default 100000), +SEED=<n> the random seed.
module tb_isd_unit;
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

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  isd_unit u_dut (
    .clk_i    (clk),
    .rst_ni   (rst_n),
    .din_i    (din),
    .ld_x_i   (ld_x),
    .ld_h_i   (ld_h),
    .op_i     (op),
    .start_i  (start),
    .result_o (result),
    .flags_o  (flags),
    .busy_o   (busy),
    .done_o   (done)
  );

  // watchdog: a fixed budget of 150 cycles per random round (three operations of
  // at most 16 cycles plus operand loads), plus a margin for the directed cases
  int n_rand;

  initial begin
    #1;
    repeat (100000 + 150 * n_rand) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- mechanism counters
  typedef enum int {
    EV_DIV, EV_SQRT, EV_ISQRT, EV_RM2, EV_RM1, EV_R0, EV_RP1, EV_RP2,
    EV_CORR, EV_DIV_SH2, EV_DIV_SH3, EV_ISQRT_TWO, EV_ROUND_UP,
    EV_OVF, EV_UNF, EV_INVALID, EV_DIVZERO, EV_COL32_FIRST, EV_COL32_LATER,
    EV_CONV_SAT, EV_ODD, EV_EVEN, EV_NUM
  } ev_e;
  int unsigned ev [EV_NUM];
  string ev_name [EV_NUM] = '{"div", "sqrt", "isqrt", "digit -2", "digit -1",
    "digit 0", "digit +1", "digit +2", "negative residual correction",
    "division shift by 2", "division shift by 3", "isqrt result 2",
    "rounding up", "overflow", "underflow", "invalid", "division by zero",
    "B>=1 column, first digit", "B>=1 column, later digit",
    "converter saturation", "odd exponent scaling", "even exponent scaling"};

  always @(posedge clk) if (rst_n) begin
    if (u_dut.ph_iter) begin
      unique case (u_dut.r)
        -3'sd2: ev[EV_RM2]++;
        -3'sd1: ev[EV_RM1]++;
         3'sd0: ev[EV_R0]++;
         3'sd1: ev[EV_RP1]++;
         3'sd2: ev[EV_RP2]++;
        default: ;
      endcase
    end
    if ((u_dut.ph_init || u_dut.ph_iter) && u_dut.b_est >= 6'd32)
      ev[u_dut.ph_init ? EV_COL32_FIRST : EV_COL32_LATER]++;
    if ((u_dut.ph_init || u_dut.ph_iter) && (u_dut.w_est[6] != u_dut.w_est[5]))
      ev[EV_CONV_SAT]++;
    if (u_dut.ph_final && !u_dut.special) begin
      if (u_dut.u_round.w_neg) ev[EV_CORR]++;
      if (u_dut.op == OP_DIV) ev[u_dut.u_round.sh == 3'd3 ? EV_DIV_SH2 : EV_DIV_SH3]++;
      if (u_dut.op == OP_ISQRT && u_dut.u_round.sh == 3'd0) ev[EV_ISQRT_TWO]++;
      if (u_dut.u_round.up) ev[EV_ROUND_UP]++;
    end
    if (u_dut.ph_init) begin
      if (u_dut.op == OP_SQRT)  ev[u_dut.x_up.exp_odd ? EV_ODD : EV_EVEN]++;
      if (u_dut.op == OP_ISQRT) ev[u_dut.h_up.exp_odd ? EV_ODD : EV_EVEN]++;
    end
  end

  // --------------------------------------------------------------- one operation
  function automatic int n_iter(isd_op_e o);
    case (o)
      OP_DIV:  return 14;
      OP_SQRT: return 13;
      default: return 12;
    endcase
  endfunction

  task automatic run(input isd_op_e o, input logic [31:0] x, input logic [31:0] h,
                     output logic [31:0] res, output isd_flags_t fl);
    int cyc;
    @(negedge clk);
    din = x; ld_x = 1'b1;
    @(negedge clk);
    ld_x = 1'b0; din = h; ld_h = 1'b1;
    @(negedge clk);
    ld_h = 1'b0; op = o; start = 1'b1;
    @(posedge clk);           // start edge
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(posedge clk); @(negedge clk);
      cyc++;
      if (cyc > 100) break;
    end
    checks++;
    if (cyc != n_iter(o) + 2) begin
      failures++;
      $display("FAIL latency op=%0d: %0d cycles, expected %0d", o, cyc, n_iter(o) + 2);
    end
    res = result;
    fl  = flags;
    case (o)
      OP_DIV:  ev[EV_DIV]++;
      OP_SQRT: ev[EV_SQRT]++;
      default: ev[EV_ISQRT]++;
    endcase
  endtask

  // normal operation, checked exactly
  task automatic run_normal(input isd_op_e o, input logic [31:0] x, input logic [31:0] h);
    logic [31:0] res;
    isd_flags_t  fl;
    bit          ok, exact;
    run(o, x, h, res, fl);
    ok = check_rounded(int'(o), x, h, res, exact);
    checks++;
    if (!ok || fl.inexact == exact || fl.invalid || fl.div_zero || fl.overflow || fl.underflow) begin
      failures++;
      $display("FAIL op=%0d x=%h h=%h -> %h flags=%b (exact=%0d)", o, x, h, res, fl, exact);
    end
  endtask

  // special operation with a known result
  task automatic run_expect(input isd_op_e o, input logic [31:0] x, input logic [31:0] h,
                            input logic [31:0] exp_res, input isd_flags_t exp_fl);
    logic [31:0] res;
    isd_flags_t  fl;
    run(o, x, h, res, fl);
    checks++;
    if (res !== exp_res || fl !== exp_fl) begin
      failures++;
      $display("FAIL op=%0d x=%h h=%h -> %h/%b expected %h/%b", o, x, h, res, fl, exp_res, exp_fl);
    end
    if (fl.overflow)  ev[EV_OVF]++;
    if (fl.underflow) ev[EV_UNF]++;
    if (fl.invalid)   ev[EV_INVALID]++;
    if (fl.div_zero)  ev[EV_DIVZERO]++;
  endtask

  function automatic logic [31:0] rnd_fp(input int emin, input int emax, input bit neg_ok);
    logic [22:0] f;
    int          e, kind;
    kind = $urandom_range(0, 5);
    case (kind)
      0:       f = 23'($urandom_range(0, 255));            // near 1
      1:       f = 23'h7FFFFF - 23'($urandom_range(0, 255)); // near 2
      default: f = 23'($urandom);
    endcase
    e = $urandom_range(emin, emax);
    return {neg_ok ? 1'($urandom) : 1'b0, 8'(e), f};
  endfunction

  localparam isd_flags_t NOFL = '0;
  localparam isd_flags_t INV  = '{invalid: 1'b1, default: 1'b0};
  localparam isd_flags_t DZ   = '{div_zero: 1'b1, default: 1'b0};
  localparam isd_flags_t OVF  = '{overflow: 1'b1, inexact: 1'b1, default: 1'b0};
  localparam isd_flags_t UNF  = '{underflow: 1'b1, inexact: 1'b1, default: 1'b0};
  localparam logic [31:0] PINF = 32'h7F80_0000;
  localparam logic [31:0] NINF = 32'hFF80_0000;

  int unsigned seed;

  initial begin
    if (!$value$plusargs("N=%d", n_rand)) n_rand = 100000;
    if ($value$plusargs("SEED=%d", seed)) void'($urandom(seed));
    rst_n = 1'b0; din = '0; ld_x = 1'b0; ld_h = 1'b0; start = 1'b0; op = OP_DIV;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // directed normal cases: exact results and the R = 2 inverse square root
    run_normal(OP_SQRT,  32'h4080_0000, 32'h0);             // sqrt(4) = 2
    run_normal(OP_SQRT,  32'h3F80_0000, 32'h0);             // sqrt(1) = 1
    run_normal(OP_SQRT,  32'h4000_0000, 32'h0);             // sqrt(2)
    run_normal(OP_ISQRT, 32'h0, 32'h3F80_0000);             // 1/sqrt(1) = 1
    run_normal(OP_ISQRT, 32'h0, 32'h4080_0000);             // 1/sqrt(4) = 0.5
    run_normal(OP_ISQRT, 32'h0, 32'h4000_0000);             // 1/sqrt(2)
    run_normal(OP_DIV,   32'h4040_0000, 32'h4000_0000);     // 3/2
    run_normal(OP_DIV,   32'h3F80_0000, 32'h4040_0000);     // 1/3
    run_normal(OP_DIV,   32'h3FFF_FFFF, 32'h3F80_0000);     // x/1
    run_normal(OP_DIV,   32'h3F80_0000, 32'h3FFF_FFFF);     // 1/(2-ulp)

    // random normal operands
    for (int i = 0; i < n_rand; i++) begin
      run_normal(OP_DIV,   rnd_fp(70, 184, 1), rnd_fp(70, 184, 1));
      run_normal(OP_SQRT,  rnd_fp(1, 254, 0), 32'h0);
      run_normal(OP_ISQRT, 32'h0, rnd_fp(1, 254, 0));
    end

    // special operands
    run_expect(OP_DIV,   32'h7F00_0000, 32'h0080_0000, PINF, OVF);          // 2^127 / 2^-126
    run_expect(OP_DIV,   32'hFF00_0000, 32'h0080_0000, NINF, OVF);
    run_expect(OP_DIV,   32'h0080_0000, 32'h7F00_0000, 32'h0, UNF);         // 2^-126 / 2^127
    run_expect(OP_DIV,   32'h3F80_0000, 32'h0,         PINF, DZ);
    run_expect(OP_DIV,   32'hBF80_0000, 32'h0,         NINF, DZ);
    run_expect(OP_DIV,   32'h0,         32'h0,         QNAN, INV);
    run_expect(OP_DIV,   PINF,          NINF,          QNAN, INV);
    run_expect(OP_DIV,   32'h7FC1_2345, 32'h3F80_0000, QNAN, INV);
    run_expect(OP_DIV,   PINF,          32'hC000_0000, NINF, NOFL);
    run_expect(OP_DIV,   32'h4000_0000, NINF,          32'h8000_0000, NOFL);
    run_expect(OP_DIV,   32'h0,         32'h4000_0000, 32'h0, NOFL);
    run_expect(OP_SQRT,  32'hC5AF_6000, 32'h0,         QNAN, INV);          // sqrt(-5612)
    run_expect(OP_SQRT,  32'h8000_0000, 32'h0,         32'h8000_0000, NOFL);
    run_expect(OP_SQRT,  32'h0,         32'h0,         32'h0, NOFL);
    run_expect(OP_SQRT,  PINF,          32'h0,         PINF, NOFL);
    run_expect(OP_SQRT,  32'h7F80_0001, 32'h0,         QNAN, INV);
    run_expect(OP_ISQRT, 32'h0, 32'hC62D_9C00,         QNAN, INV);          // 1/sqrt(-11111)
    run_expect(OP_ISQRT, 32'h0, 32'h0,                 PINF, DZ);
    run_expect(OP_ISQRT, 32'h0, 32'h8000_0000,         NINF, DZ);
    run_expect(OP_ISQRT, 32'h0, PINF,                  32'h0, NOFL);
    run_expect(OP_ISQRT, 32'h0, 32'h0000_0001,         PINF, DZ);           // subnormal = 0

    // 1/(1-2^-24) = 1 + 2^-24 + ...: rounds up to 1 + 2^-23
    run_normal(OP_DIV, 32'h3F80_0000, 32'h3F7F_FFFF);

    for (int e = 0; e < EV_NUM; e++) begin
      checks++;
      $display("  %-30s %0d", ev_name[e], ev[e]);
      if (ev[e] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", ev_name[e]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
