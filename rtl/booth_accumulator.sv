// booth_accumulator: the accumulator register A.
//
// INIT clears A. LOAD_ACC (the CHECK state) writes the multiplexer result,
// A, A + M or A - M with M aligned to the upper half. SHIFT does an
// arithmetic shift right by one, copying the sign bit. After N add-and-shift
// iterations A holds the full signed 2N-bit product, as in the reference
// design, where the product is read from A. The register is 2N+1 bits wide:
// the reference design draws it 8 bits wide for N = 4, and the extra top
// bit is this design's guard bit, which keeps the intermediate sums exact
// when the multiplicand is -2^(N-1); the product is the low 2N bits. Control
// priority when several
// inputs are high (init, load, shift) is this design's choice; the
// controller never raises two of them in one cycle.
//
// Timing: a changes one clock edge after init, load or shift.
module booth_accumulator #(
  parameter int unsigned N = 4,
  localparam int unsigned W = 2 * N + 1
) (
  input  logic           clk,
  input  logic           rst,    // synchronous, active high
  input  logic           init,   // INIT: A = 0
  input  logic           load,   // LOAD_ACC: A = d
  input  logic           shift,  // SHIFT: A = A >>> 1
  input  logic [W-1:0] d,
  output logic [W-1:0] a
);

  always_ff @(posedge clk) begin
    if (rst || init) a <= '0;
    else if (load)   a <= d;
    else if (shift)  a <= {a[W-1], a[W-1:1]};
  end

endmodule
