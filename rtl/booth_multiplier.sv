// booth_multiplier: sequential radix-2 Booth multiplier, signed N x N -> 2N.
//
// Multiplies a signed multiplicand M by a signed multiplier Q, one Booth
// step per multiplier bit. Each step looks at the pair {Q0, Q-1}: 01 adds M
// to the accumulator A, 10 subtracts it, 00 and 11 leave A alone; then A is
// shifted right arithmetically and Q rotates right through Q-1. M enters the
// adder aligned to the upper half ({+-M, N zeros}), so after N steps
// A itself holds the full product and no shifting of product bits into Q is
// needed. A and the adder carry one guard bit above the 2N product bits so
// that A - M stays exact for the most negative multiplicand.
//
// Structure (one instance per block of the functional diagram):
//   Controller_uut  booth_controller   FSM RESET/CHECK/SHIFT
//   Count_uut       booth_counter      COUNT, flag T
//   Mcand_uut       booth_mcand_reg    M
//   Q_uut           booth_q_reg        Q and Q-1
//   Cmpl_uut        booth_complementer +M / -M (XOR row and parallel adder)
//   Adder_uut       booth_adder        (2N+1)-bit parallel adder
//   Mux_uut         booth_mux          4:1 select on {Q0, Q-1}
//   Accumulator_uut booth_accumulator  A
//
// Interface: hold mcand and mplier and raise start; the operands are
// captured in the first cycle (INIT). done pulses high for one cycle when
// prod holds the result; prod keeps it until the next start is accepted,
// which clears the accumulator one edge later. If start is still high when
// done pulses, the next multiplication begins at once.
//
// Timing: with start sampled high at clock edge 0 (FSM in RESET), done is
// high after edge 2N+1 (9 edges for N = 4). The datapath, state diagram and
// the choice of reading the product from A follow the reference design; the
// guard bit, the registered one-cycle done pulse and the synchronous reset
// are choices of this design.
//
// Lint: the counter's count output is left open and only bit 0 of Q is
// read (the Booth pair is {Q0, Q-1}); both warnings are expected.
module booth_multiplier
  import booth_pkg::*;
#(
  parameter int unsigned N = 4  // operand width, n = 4 in the reference design
) (
  input  logic           clk,
  input  logic           rst,     // synchronous, active high
  input  logic           start,
  input  logic [N-1:0]   mcand,   // signed multiplicand
  input  logic [N-1:0]   mplier,  // signed multiplier
  output logic [2*N-1:0] prod,    // signed product, valid while done is high
  output logic           done,
  output booth_state_e   state    // controller state (PS), for observation
);

  logic init, load_acc, shift, enable, last_shift, t;
  logic [N-1:0]   m, q;
  logic [N:0]     m_pm;            // +-M with guard bit
  logic           q_m1;
  logic [2*N:0]   a, sum, a_next;  // accumulator with guard bit
  booth_pair_e    pair;

  booth_controller Controller_uut (
    .clk, .rst, .start, .t,
    .init, .load_acc, .shift, .enable,
    .done (last_shift),
    .state
  );

  booth_counter #(.N(N)) Count_uut (
    .clk, .rst, .load(init), .enable, .t, .count()
  );

  booth_mcand_reg #(.N(N)) Mcand_uut (
    .clk, .rst, .load(init), .d(mcand), .m
  );

  booth_q_reg #(.N(N)) Q_uut (
    .clk, .rst, .load(init), .shift, .d(mplier), .q, .q_m1
  );

  assign pair = booth_pair_e'({q[0], q_m1});

  booth_complementer #(.N(N)) Cmpl_uut (
    .m, .sub(pair == PAIR_10), .y(m_pm)
  );

  booth_adder #(.N(N)) Adder_uut (
    .a, .b({m_pm, {N{1'b0}}}), .sum
  );

  booth_mux #(.N(N)) Mux_uut (
    .sel(pair), .a, .sum, .y(a_next)
  );

  booth_accumulator #(.N(N)) Accumulator_uut (
    .clk, .rst, .init, .load(load_acc), .shift, .d(a_next), .a
  );

  // DONE is registered so that it rises together with the final shift of A.
  always_ff @(posedge clk) begin
    if (rst) done <= 1'b0;
    else     done <= last_shift;
  end

  // The guard bit always equals bit 2N-1 once the product is complete.
  assign prod = a[2*N-1:0];

  a_guard: assert property (@(posedge clk) disable iff (rst)
    done |-> (a[2*N] == a[2*N-1]));

endmodule
