// tb_booth_controller: drives START and T and checks every state transition
// and every control output of the RESET/CHECK/SHIFT machine against a
// reference table written out in the testbench, including staying in RESET
// while START is low and looping CHECK/SHIFT while T is low.
module tb_booth_controller;
  import booth_pkg::*;
  logic clk = 0, rst, start, t;
  logic init, load_acc, shift, enable, done;
  booth_state_e state, ms;
  int checks = 0, failures = 0;
  int n_loop = 0, n_exit = 0, n_idle = 0;

  booth_controller dut (.clk, .rst, .start, .t, .init, .load_acc, .shift,
                        .enable, .done, .state);

  always #5 clk = ~clk;

  // Expected outputs for the present model state and inputs.
  task automatic check_outputs();
    logic ei, el, es, ee, ed;
    ei = (ms == ST_RESET) && start;
    el = (ms == ST_CHECK);
    es = (ms == ST_SHIFT);
    ee = (ms == ST_SHIFT) && !t;
    ed = (ms == ST_SHIFT) && t;
    checks++;
    if (state !== ms || init !== ei || load_acc !== el || shift !== es ||
        enable !== ee || done !== ed) begin
      failures++;
      $display("FAIL state=%0d(exp %0d) init=%b load_acc=%b shift=%b enable=%b done=%b start=%b t=%b",
               state, ms, init, load_acc, shift, enable, done, start, t);
    end
  endtask

  initial begin
    rst = 1; start = 0; t = 0;
    @(posedge clk); #1;
    rst = 0; ms = ST_RESET;
    for (int i = 0; i < 600; i++) begin
      start = ($urandom_range(0, 2) == 0);
      t     = ($urandom_range(0, 3) == 0);
      #1;
      check_outputs();
      @(posedge clk);
      unique case (ms)
        ST_RESET: if (start) ms = ST_CHECK; else n_idle++;
        ST_CHECK: ms = ST_SHIFT;
        ST_SHIFT: if (t) begin ms = ST_RESET; n_exit++; end
                  else begin ms = ST_CHECK; n_loop++; end
        default:  ms = ST_RESET;
      endcase
      #1;
    end
    // Reset from the middle of an operation.
    start = 1; t = 0; @(posedge clk); #1;
    rst = 1; @(posedge clk); #1; rst = 0; start = 0; ms = ST_RESET; #1;
    check_outputs();
    checks++;
    if (n_loop == 0 || n_exit == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL coverage loop=%0d exit=%0d idle=%0d", n_loop, n_exit, n_idle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
