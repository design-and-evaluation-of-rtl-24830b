// booth_mux: 4:1 multiplexer that chooses the next accumulator value.
//
// Selected by the Booth pair {Q0, Q-1}. For 00 and 11 (inside a run of
// equal bits) it passes A unchanged; for 01 and 10 it passes the adder
// output, which the complementer has already made A + M or A - M. The four
// numbered inputs and the rule follow the reference datapath.
//
// Timing: purely combinational.
module booth_mux
  import booth_pkg::*;
#(
  parameter int unsigned N = 4,
  localparam int unsigned W = 2 * N + 1  // accumulator width with guard bit
) (
  input  booth_pair_e    sel,  // {Q0, Q-1}
  input  logic [W-1:0] a,    // accumulator A
  input  logic [W-1:0] sum,  // adder output
  output logic [W-1:0] y
);

  always_comb begin
    unique case (sel)
      PAIR_01, PAIR_10: y = sum;
      default:          y = a;  // PAIR_00, PAIR_11
    endcase
  end

endmodule
