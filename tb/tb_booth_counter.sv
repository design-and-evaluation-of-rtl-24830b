// tb_booth_counter: loads the counter, decrements it and checks COUNT and
// the last-iteration flag T (high exactly when COUNT is 1). Also checks that
// a load overrides ENABLE and that reset clears the count.
module tb_booth_counter;
  localparam int N = 4;
  localparam int CW = $clog2(N + 1);
  logic clk = 0, rst, load, enable, t;
  logic [CW-1:0] count;
  int mc;
  int checks = 0, failures = 0;

  booth_counter #(.N(N)) dut (.clk, .rst, .load, .enable, .t, .count);

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (count !== CW'(mc) || t !== (mc == 1)) begin
      failures++;
      $display("FAIL %s count=%0d t=%0d exp %0d", what, count, t, mc);
    end
  endtask

  initial begin
    rst = 1; load = 0; enable = 0;
    @(posedge clk); #1; mc = 0; check("reset");
    rst = 0;
    load = 1; @(posedge clk); #1; load = 0; mc = N; check("load");
    enable = 1;
    for (int i = 0; i < N - 1; i++) begin
      @(posedge clk); #1; mc--; check("decrement");
    end
    enable = 0;
    checks++;
    if (!t) begin failures++; $display("FAIL T not raised after N-1 decrements"); end
    for (int i = 0; i < 300; i++) begin
      load = ($urandom_range(0, 5) == 0); enable = 1'($urandom);
      @(posedge clk); #1;
      if (load) mc = N;
      else if (enable && mc != 0) mc--;
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
