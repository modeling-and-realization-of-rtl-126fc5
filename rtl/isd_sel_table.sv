// isd_sel_table: radix-4 digit selection ROM shared by division, square root and
// inverse square root.
//
// The digit r in {-2..2} is chosen by comparing the residual estimate 4w~ (1/16
// units, already limited to -25..25) with four thresholds m(-1), m(0), m(1), m(2)
// that depend on the column picked by B~ (1/32 units, format I.FFFFF):
//   r = 2 if 4w~ >= m(2),  1 if >= m(1),  0 if >= m(0),  -1 if >= m(-1),  else -2.
// Columns 16..31 cover B~ in [0.5, 1).  Their thresholds are the document's
// modified table (its Table 2) except four cells that were found to let the
// residual escape its bound with this datapath's estimates; these take the value
// of the document's original table (its Table 1):
//   m(-1) at B~=20: -18 -> -16,  at 21: -18 -> -17,  at 28: -20 -> -21
//   m(0)  at B~=23:  -8 ->  -7
// The document's table has no column for B~ >= 1, which the square root reaches
// (B(0) = 1).  This design adds one: m = (-22, -9, 8, 22), with m(-1) = -20 for
// the first digit r(1) only, where C(0) = 1/8 is large.  B~ below 0.5 uses
// column 16.  Combinational ROM.
module isd_sel_table (
  input  logic signed [5:0] w_sel_i,   // 4w~ in 1/16 units, -25..25
  input  logic [5:0]        b_est_i,   // B~ in 1/32 units
  input  logic              first_i,   // selecting r(1) in phase 1
  output logic signed [2:0] r_o
);

  localparam int unsigned NCOL = 18;

  // thresholds per column: {m(-1), m(0), m(1), m(2)}
  typedef logic signed [5:0] thr_t [4];
  localparam thr_t TABLE [NCOL] = '{
    '{-6'sd13, -6'sd5,  6'sd3, 6'sd12},  // B~ = 16
    '{-6'sd14, -6'sd5,  6'sd4, 6'sd13},  // 17
    '{-6'sd14, -6'sd6,  6'sd4, 6'sd14},  // 18
    '{-6'sd15, -6'sd6,  6'sd4, 6'sd14},  // 19
    '{-6'sd16, -6'sd6,  6'sd4, 6'sd15},  // 20
    '{-6'sd17, -6'sd6,  6'sd4, 6'sd15},  // 21
    '{-6'sd18, -6'sd7,  6'sd4, 6'sd16},  // 22
    '{-6'sd18, -6'sd7,  6'sd5, 6'sd17},  // 23
    '{-6'sd18, -6'sd8,  6'sd5, 6'sd17},  // 24
    '{-6'sd19, -6'sd8,  6'sd7, 6'sd18},  // 25
    '{-6'sd20, -6'sd8,  6'sd7, 6'sd19},  // 26
    '{-6'sd20, -6'sd8,  6'sd7, 6'sd19},  // 27
    '{-6'sd21, -6'sd9,  6'sd8, 6'sd20},  // 28
    '{-6'sd23, -6'sd9,  6'sd8, 6'sd20},  // 29
    '{-6'sd24, -6'sd9,  6'sd8, 6'sd21},  // 30
    '{-6'sd24, -6'sd10, 6'sd8, 6'sd22},  // 31
    '{-6'sd22, -6'sd9,  6'sd8, 6'sd22},  // B~ >= 32, r(2) onwards
    '{-6'sd20, -6'sd9,  6'sd8, 6'sd22}   // B~ >= 32, r(1)
  };

  logic [4:0] col;
  thr_t       m;

  always_comb begin
    if (b_est_i >= 6'd32)      col = first_i ? 5'd17 : 5'd16;
    else if (b_est_i < 6'd16)  col = 5'd0;
    else                       col = 5'(b_est_i - 6'd16);
    m = TABLE[col];
    if      (w_sel_i >= m[3]) r_o = 3'sd2;
    else if (w_sel_i >= m[2]) r_o = 3'sd1;
    else if (w_sel_i >= m[1]) r_o = 3'sd0;
    else if (w_sel_i >= m[0]) r_o = -3'sd1;
    else                      r_o = -3'sd2;
  end

endmodule
