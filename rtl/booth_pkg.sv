// booth_pkg: types shared by the sequential Booth multiplier.
//
// The controller has three states. The encoding RESET=0, CHECK=1, SHIFT=2
// matches the present-state values seen during a multiplication (one RESET
// cycle, then CHECK and SHIFT alternating once per multiplier bit). The
// Booth pair {Q0, Q-1} is given a name for each of its four codes.
package booth_pkg;

  typedef enum logic [1:0] {
    ST_RESET = 2'd0,
    ST_CHECK = 2'd1,
    ST_SHIFT = 2'd2
  } booth_state_e;

  // Booth recoding of the multiplier bit pair {Q0, Q-1}.
  typedef enum logic [1:0] {
    PAIR_00 = 2'b00,  // inside a run of zeros: no operation
    PAIR_01 = 2'b01,  // end of a run of ones: A = A + M
    PAIR_10 = 2'b10,  // start of a run of ones: A = A - M
    PAIR_11 = 2'b11   // inside a run of ones: no operation
  } booth_pair_e;

endpackage
