// booth_complementer: conditional two's complement of the multiplicand.
//
// Produces +M when sub is 0 and -M when sub is 1. It works as in the
// reference datapath: a row of XOR gates inverts every bit of M when sub is
// high, and a parallel adder adds sub itself as the +1 that completes the
// two's complement. sub is decoded by the caller from the Booth pair
// {Q0, Q-1} = 10.
//
// M is sign-extended by one bit first, so the result is N+1 bits wide. That
// guard bit is this design's addition: without it -M cannot be represented
// for M = -2^(N-1) (for N = 4, -(-8) = +8), and the product of that
// multiplicand would come out with the wrong sign.
//
// Timing: purely combinational.
module booth_complementer #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] m,
  input  logic         sub,
  output logic [N:0]   y
);

  logic [N:0] m_x;  // XOR row output

  always_comb begin
    m_x = {m[N-1], m} ^ {(N+1){sub}};
    y   = m_x + (N+1)'(sub);
  end

endmodule
