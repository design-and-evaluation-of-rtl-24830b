// booth_controller: three-state control FSM of the Booth multiplier.
//
// States RESET, CHECK and SHIFT, with the transitions and outputs of the
// reference state diagram:
//   RESET: all controls low. Stays while START = 0; on START = 1 raises INIT
//          (load operands, clear A and Q-1, load COUNT) and goes to CHECK.
//   CHECK: LOAD_ACC = 1, so A takes A, A + M or A - M as chosen by {Q0, Q-1}.
//          Always goes to SHIFT.
//   SHIFT: SHIFT = 1, so A shifts arithmetically and Q/Q-1 rotate. If T = 0
//          it raises ENABLE (COUNT = COUNT - 1) and goes back to CHECK; if
//          T = 1 it raises DONE and goes to RESET.
// INIT, ENABLE and DONE are Mealy outputs valid in the cycle before the
// transition they label; LOAD_ACC and SHIFT depend on the state only.
// An N-bit multiplication therefore takes 1 + 2N cycles from the cycle in
// which START is sampled. Reset is synchronous, active high (a choice of
// this design).
module booth_controller
  import booth_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         t,         // last iteration, from the counter
  output logic         init,
  output logic         load_acc,
  output logic         shift,
  output logic         enable,
  output logic         done,
  output booth_state_e state
);

  booth_state_e next;

  always_ff @(posedge clk) begin
    if (rst) state <= ST_RESET;
    else     state <= next;
  end

  always_comb begin
    next     = state;
    init     = 1'b0;
    load_acc = 1'b0;
    shift    = 1'b0;
    enable   = 1'b0;
    done     = 1'b0;
    unique case (state)
      ST_RESET: begin
        if (start) begin
          init = 1'b1;
          next = ST_CHECK;
        end
      end
      ST_CHECK: begin
        load_acc = 1'b1;
        next     = ST_SHIFT;
      end
      ST_SHIFT: begin
        shift = 1'b1;
        if (t) begin
          done = 1'b1;
          next = ST_RESET;
        end else begin
          enable = 1'b1;
          next   = ST_CHECK;
        end
      end
      default: next = ST_RESET;
    endcase
  end

  // At most one datapath command per cycle.
  a_one_cmd: assert property (@(posedge clk) disable iff (rst)
    $onehot0({init, load_acc, shift}));
  // The state register never leaves the three legal codes.
  a_legal_state: assert property (@(posedge clk) disable iff (rst)
    state inside {ST_RESET, ST_CHECK, ST_SHIFT});

endmodule
