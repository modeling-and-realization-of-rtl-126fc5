// isd_ctrl: sequencer of the ISD unit.
//
// States: IDLE -> INIT (phase 1: load w(0), B(0), C(0), R(0) and select r(1))
// -> ITER (phase 2, N cycles, one radix-4 digit each) -> FINAL (phase 3: correct,
// round and register the result) -> IDLE.  N is 14 for division, 13 for square
// root and 12 for inverse square root, the document's ceil((n+3)/b), ceil((n+1)/b)
// and ceil(n/b) for n = 24 and b = 2.  start_i is accepted in IDLE only, together
// with op_i; done_o is high for the one cycle after FINAL in which result and
// flags first show the new value, N + 2 clock edges after the start edge.  The
// document names a control signal that starts the recurrence once the operands are
// in the input registers; the state machine and the done handshake are this
// design's.  Synchronous, active-low reset.
module isd_ctrl
  import isd_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       start_i,
  input  isd_op_e    op_i,
  output isd_op_e    op_o,       // operation latched at start
  output logic       init_o,     // phase 1 this cycle
  output logic       iter_o,     // phase 2 this cycle
  output logic       final_o,    // phase 3 this cycle
  output logic [3:0] k_o,        // 0-based iteration number during ITER
  output logic       busy_o,
  output logic       done_o
);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_ITER, S_FINAL} state_e;

  state_e     state;
  logic [3:0] n_last;

  always_comb begin
    unique case (op_o)
      OP_DIV:   n_last = 4'(N_DIV - 1);
      OP_SQRT:  n_last = 4'(N_SQRT - 1);
      OP_ISQRT: n_last = 4'(N_ISQRT - 1);
      default:  n_last = 4'd0;
    endcase
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      state  <= S_IDLE;
      op_o   <= OP_DIV;
      k_o    <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_IDLE: if (start_i) begin
          op_o  <= op_i;
          state <= S_INIT;
        end
        S_INIT: begin
          k_o   <= '0;
          state <= S_ITER;
        end
        S_ITER: begin
          k_o <= k_o + 4'd1;
          if (k_o == n_last) state <= S_FINAL;
        end
        S_FINAL: begin
          done_o <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign init_o  = (state == S_INIT);
  assign iter_o  = (state == S_ITER);
  assign final_o = (state == S_FINAL);
  assign busy_o  = (state != S_IDLE);

endmodule
