// isd_except: exception handling of the ISD unit.
//
// Decides from the classes of the operands whether the recurrence result can be
// used, and if not, what the result is.  IEEE-754 rules are followed:
//   any NaN operand, 0/0, inf/inf, sqrt or 1/sqrt of a negative number -> quiet NaN
//   (invalid);  finite/0 -> inf (division by zero);  1/sqrt(+-0) -> +-inf (division
//   by zero);  inf/finite -> inf;  finite/inf and 0/finite -> 0;  sqrt(+-0) -> +-0;
//   sqrt(+inf) -> +inf;  1/sqrt(+inf) -> +0.
// The document shows negative square root and inverse square root operands being
// trapped as exceptions but gives no encoding; the NaN pattern 0x7FC00000 and the
// rest of the list are this design's.  Subnormal operands count as zero.
// Combinational.
module isd_except
  import isd_pkg::*;
(
  input  isd_op_e      op_i,
  input  fp_unpacked_t x_i,
  input  fp_unpacked_t h_i,
  output logic         special_o,   // result below replaces the recurrence result
  output logic [31:0]  result_o,
  output logic         invalid_o,
  output logic         div_zero_o
);

  localparam logic [31:0] INF = 32'h7F80_0000;

  logic sq;

  always_comb begin
    special_o  = 1'b0;
    result_o   = '0;
    invalid_o  = 1'b0;
    div_zero_o = 1'b0;
    sq         = x_i.sign ^ h_i.sign;
    unique case (op_i)
      OP_DIV: begin
        special_o = 1'b1;
        if (x_i.is_nan || h_i.is_nan ||
            (x_i.is_zero && h_i.is_zero) || (x_i.is_inf && h_i.is_inf)) begin
          result_o  = QNAN;
          invalid_o = 1'b1;
        end else if (x_i.is_inf) begin
          result_o = {sq, INF[30:0]};
        end else if (h_i.is_zero) begin
          result_o   = {sq, INF[30:0]};
          div_zero_o = 1'b1;
        end else if (h_i.is_inf || x_i.is_zero) begin
          result_o = {sq, 31'd0};
        end else begin
          special_o = 1'b0;
        end
      end
      OP_SQRT: begin
        special_o = 1'b1;
        if (x_i.is_nan) begin
          result_o  = QNAN;
          invalid_o = 1'b1;
        end else if (x_i.is_zero) begin
          result_o = {x_i.sign, 31'd0};
        end else if (x_i.sign) begin
          result_o  = QNAN;
          invalid_o = 1'b1;
        end else if (x_i.is_inf) begin
          result_o = INF;
        end else begin
          special_o = 1'b0;
        end
      end
      OP_ISQRT: begin
        special_o = 1'b1;
        if (h_i.is_nan) begin
          result_o  = QNAN;
          invalid_o = 1'b1;
        end else if (h_i.is_zero) begin
          result_o   = {h_i.sign, INF[30:0]};
          div_zero_o = 1'b1;
        end else if (h_i.sign) begin
          result_o  = QNAN;
          invalid_o = 1'b1;
        end else if (h_i.is_inf) begin
          result_o = 32'd0;
        end else begin
          special_o = 1'b0;
        end
      end
      default: begin
        special_o = 1'b1;
        result_o  = QNAN;
        invalid_o = 1'b1;
      end
    endcase
  end

endmodule
