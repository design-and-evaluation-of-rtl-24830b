// tb_booth_q_reg: checks the multiplier register. After a load Q holds the
// operand and Q-1 is 0; each shift must put the old Q0 into Q-1 and into
// Q[N-1] (circular right shift), and after N shifts Q is back to the loaded
// value. Random loads, shifts and idle cycles are compared with a model.
module tb_booth_q_reg;
  localparam int N = 4;
  logic clk = 0, rst, load, shift;
  logic [N-1:0] d, q, mq;
  logic q_m1, mq1;
  int checks = 0, failures = 0;

  booth_q_reg #(.N(N)) dut (.clk, .rst, .load, .shift, .d, .q, .q_m1);

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== mq || q_m1 !== mq1) begin
      failures++;
      $display("FAIL %s q=%b q_m1=%b exp %b %b", what, q, q_m1, mq, mq1);
    end
  endtask

  initial begin
    rst = 1; load = 0; shift = 0; d = '1;
    @(posedge clk); #1;
    mq = '0; mq1 = 0; check("reset");
    rst = 0;
    // Directed: load 0111, N shifts, back to 0111.
    load = 1; d = 4'b0111; @(posedge clk); #1; load = 0;
    mq = d; mq1 = 0; check("load");
    shift = 1;
    for (int i = 0; i < N; i++) begin
      @(posedge clk); #1;
      mq1 = mq[0]; mq = {mq[0], mq[N-1:1]};
      check("shift");
    end
    shift = 0;
    checks++;
    if (q !== 4'b0111 || q_m1 !== 1'b0) begin
      failures++; $display("FAIL rotation did not restore multiplier");
    end
    // Random.
    for (int i = 0; i < 400; i++) begin
      int r;
      r = $urandom_range(0, 2);
      load = (r == 0); shift = (r == 1); d = N'($urandom);
      @(posedge clk); #1;
      if (load) begin mq = d; mq1 = 0; end
      else if (shift) begin mq1 = mq[0]; mq = {mq[0], mq[N-1:1]}; end
      check("random");
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
