// csel_adder: carry-select adder, W bits, computing a + b + cin.
//
// The operands are cut into blocks of BLK bits.  Each block above the first is
// added twice in parallel, once for a carry-in of 0 and once for 1, and the real
// carry out of the block below picks one of the two sums, so the carry ripples
// through one multiplexer per block instead of through every bit.  The document
// replaces the carry-propagate adders of the unit by carry-select adders to cut
// the delay; the block size is this design's choice.  Combinational.
module csel_adder #(
  parameter int unsigned W   = 53,
  parameter int unsigned BLK = 8
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic         cin_i,
  output logic [W-1:0] sum_o,
  output logic         cout_o
);

  localparam int unsigned NB = (W + BLK - 1) / BLK;
  localparam int unsigned WP = NB * BLK;

  logic [WP-1:0] a_p, b_p, s_p;
  logic [NB:0]   c;

  assign a_p = WP'(a_i);
  assign b_p = WP'(b_i);
  assign c[0] = cin_i;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    logic [BLK:0] s0, s1;
    if (i == 0) begin : g_first
      // lowest block: its carry-in is known, a plain adder
      assign s0 = {1'b0, a_p[i*BLK +: BLK]} + {1'b0, b_p[i*BLK +: BLK]} + (BLK+1)'(c[0]);
      assign s1 = s0;
    end else begin : g_sel
      assign s0 = {1'b0, a_p[i*BLK +: BLK]} + {1'b0, b_p[i*BLK +: BLK]};
      assign s1 = {1'b0, a_p[i*BLK +: BLK]} + {1'b0, b_p[i*BLK +: BLK]} + (BLK+1)'(1);
    end
    assign s_p[i*BLK +: BLK] = c[i] ? s1[BLK-1:0] : s0[BLK-1:0];
    assign c[i+1]            = c[i] ? s1[BLK]     : s0[BLK];
  end

  assign sum_o  = s_p[W-1:0];
  assign cout_o = (WP == W) ? c[NB] : s_p[W];

endmodule
