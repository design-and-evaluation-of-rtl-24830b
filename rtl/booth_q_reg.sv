// booth_q_reg: multiplier register Q with the extra Q-1 flip-flop.
//
// On INIT the multiplier is loaded into Q and Q-1 is cleared. On SHIFT the
// pair (Q, Q-1) is rotated right by one place as a circular shift: Q0 moves
// into Q-1 and also wraps around into Q[N-1]. Each rotation brings the next
// Booth bit pair {Q0, Q-1} to the bottom, and after N rotations Q holds the
// original multiplier again. Using a circular shift of Q, with the product
// kept entirely in the accumulator, follows the reference design; the
// synchronous reset is this design's choice.
//
// Timing: q and q_m1 change one clock edge after load or shift.
module booth_q_reg #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,    // synchronous, active high
  input  logic         load,   // INIT
  input  logic         shift,  // SHIFT
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic         q_m1    // Q-1
);

  always_ff @(posedge clk) begin
    if (rst) begin
      q    <= '0;
      q_m1 <= 1'b0;
    end else if (load) begin
      q    <= d;
      q_m1 <= 1'b0;
    end else if (shift) begin
      q    <= {q[0], q[N-1:1]};
      q_m1 <= q[0];
    end
  end

endmodule
