// booth_adder: parallel adder of the accumulator datapath.
//
// Adds the accumulator A and the aligned partial product {+-M, N zeros}
// modulo 2^W; the carry out is dropped, as two's complement arithmetic
// needs. The reference design names this an 8-bit parallel adder for
// N = 4 without giving its structure, so it is written as a plain '+' and
// left to synthesis to map. Here it is 2N+1 bits wide (9 for N = 4): the
// extra top bit is the guard bit that keeps A - M exact when M is the most
// negative N-bit number, a choice of this design.
//
// Timing: purely combinational.
module booth_adder #(
  parameter int unsigned N = 4,
  localparam int unsigned W = 2 * N + 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  assign sum = a + b;

endmodule
