// tb_booth_accumulator: checks the accumulator's clear, load and arithmetic
// right shift (the sign bit must be copied) with random commands against a
// model, plus a directed shift of a negative value.
module tb_booth_accumulator;
  localparam int N = 4;
  localparam int W = 2 * N + 1;
  logic clk = 0, rst, init, load, shift;
  logic [W-1:0] d, a, ma;
  int checks = 0, failures = 0;

  booth_accumulator #(.N(N)) dut (.clk, .rst, .init, .load, .shift, .d, .a);

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (a !== ma) begin
      failures++;
      $display("FAIL %s a=%h exp=%h", what, a, ma);
    end
  endtask

  initial begin
    rst = 1; init = 0; load = 0; shift = 0; d = '1;
    @(posedge clk); #1; ma = '0; check("reset");
    rst = 0;
    load = 1; d = 9'h1C0; @(posedge clk); #1; load = 0; ma = 9'h1C0; check("load");
    shift = 1; @(posedge clk); #1; shift = 0; ma = 9'h1E0; check("asr negative");
    load = 1; d = 9'h040; @(posedge clk); #1; load = 0; ma = 9'h040; check("load");
    shift = 1; @(posedge clk); #1; shift = 0; ma = 9'h020; check("asr positive");
    init = 1; @(posedge clk); #1; init = 0; ma = '0; check("init");
    for (int i = 0; i < 400; i++) begin
      int r;
      r = $urandom_range(0, 3);
      init = (r == 0); load = (r == 1); shift = (r == 2); d = W'($urandom);
      @(posedge clk); #1;
      if (init) ma = '0;
      else if (load) ma = d;
      else if (shift) ma = W'($signed(ma) >>> 1);
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
