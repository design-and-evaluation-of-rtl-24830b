// booth_mcand_reg: multiplicand register M.
//
// Holds the signed N-bit multiplicand for the whole multiplication so the
// operand inputs may change once the operation has started. It loads on
// INIT (the cycle the controller accepts START) and otherwise keeps its
// value; a synchronous reset clears it. The four zero cells drawn to the
// right of M in the datapath are not stored here: booth_multiplier appends
// them by wiring when it aligns M to the upper half of the accumulator.
//
// Timing: m shows the new operand one clock edge after load.
module booth_mcand_reg #(
  parameter int unsigned N = 4  // operand width, n = 4 in the reference design
) (
  input  logic         clk,
  input  logic         rst,   // synchronous, active high
  input  logic         load,  // INIT
  input  logic [N-1:0] d,
  output logic [N-1:0] m
);

  always_ff @(posedge clk) begin
    if (rst)       m <= '0;
    else if (load) m <= d;
  end

endmodule
