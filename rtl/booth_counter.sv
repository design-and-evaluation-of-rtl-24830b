// booth_counter: the sequence counter COUNT.
//
// Loaded with N (the operand width) on INIT and decremented by one when the
// controller raises ENABLE. Its flag T tells the controller that the
// iteration in progress is the last one. The controller raises ENABLE only
// on a SHIFT that returns to CHECK, so N iterations take N-1 decrements and
// T is COUNT == 1 (the flowchart's "COUNT = COUNT - 1; COUNT = 0?" tested
// before the decrement is stored). That reading, and the counter width, are
// this design's choices.
//
// Timing: count changes one clock edge after load or enable; t is
// combinational from count.
module booth_counter #(
  parameter int unsigned N  = 4,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst,     // synchronous, active high
  input  logic          load,    // INIT: COUNT = N
  input  logic          enable,  // ENABLE: COUNT = COUNT - 1
  output logic          t,       // T: last iteration
  output logic [CW-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)                           count <= '0;
    else if (load)                     count <= CW'(N);
    else if (enable && count != '0)    count <= count - 1'b1;
  end

  assign t = (count == CW'(1));

endmodule
