// tb_booth_multiplier: end-to-end test of the Booth multiplier at its
// default size (N = 4, 8-bit product).
//
// 1. The worked example: multiplier 7, multiplicand -4, product -28.
// 2. All 256 signed operand pairs, one start pulse each. The product is
//    compared with the signed product computed by the testbench, done must
//    come exactly 2N+1 clock edges after the edge that sampled start and
//    last one cycle, and prod must hold its value while idle.
// 3. Back-to-back operation with start held high, so a new multiplication
//    begins in the cycle done is raised.
// 4. A reset in the middle of a multiplication, followed by a clean one.
// Every Booth action (add, subtract, skip on 00, skip on 11), the
// back-to-back restart and the reset abort are counted; each must occur.
module tb_booth_multiplier;
  import booth_pkg::*;
  localparam int N = 4;
  localparam int LAT = 2 * N + 1;

  logic clk = 0, rst, start, done;
  logic [N-1:0] mcand, mplier;
  logic [2*N-1:0] prod;
  booth_state_e state;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_skip00 = 0, n_skip11 = 0, n_b2b = 0, n_abort = 0;

  booth_multiplier dut (.clk, .rst, .start, .mcand, .mplier, .prod, .done, .state);

  always #5 clk = ~clk;

  // Count the Booth action taken in every CHECK cycle, seen from outside
  // the datapath: the pair {Q0, Q-1} is re-derived from the operand and the
  // number of steps already taken.
  logic [N-1:0] cur_mplier;
  int step;
  always @(posedge clk) begin
    if (!rst && state == ST_CHECK) begin
      logic q0, qm1;
      q0  = cur_mplier[step];
      qm1 = (step == 0) ? 1'b0 : cur_mplier[step-1];
      unique case ({q0, qm1})
        2'b01: n_add++;
        2'b10: n_sub++;
        2'b00: n_skip00++;
        2'b11: n_skip11++;
      endcase
    end
  end
  always @(posedge clk) begin
    if (rst || state == ST_RESET) step <= 0;
    else if (state == ST_SHIFT) step <= step + 1;
  end

  function automatic logic [2*N-1:0] ref_prod(logic [N-1:0] a, logic [N-1:0] b);
    int sa, sb;
    sa = a[N-1] ? int'(a) - (1 << N) : int'(a);
    sb = b[N-1] ? int'(b) - (1 << N) : int'(b);
    return (2*N)'(sa * sb);
  endfunction

  // One multiplication with a single-cycle start pulse.
  task automatic multiply(logic [N-1:0] mc, logic [N-1:0] mp);
    int lat;
    logic [2*N-1:0] exp;
    exp = ref_prod(mc, mp);
    mcand = mc; mplier = mp; start = 1; cur_mplier = mp;
    @(posedge clk); #1;
    start = 0;
    mcand = N'($urandom); mplier = N'($urandom);  // operands may change now
    lat = 1;
    while (!done && lat < 4 * LAT) begin
      @(posedge clk); #1; lat++;
    end
    checks++;
    if (lat != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d (mc=%0d mp=%0d)", lat, LAT, mc, mp);
    end
    checks++;
    if (prod !== exp) begin
      failures++;
      $display("FAIL %0d * %0d: prod=%0d exp=%0d", $signed(mc), $signed(mp),
               $signed(prod), $signed(exp));
    end
    @(posedge clk); #1;
    checks++;
    if (done !== 1'b0 || prod !== exp) begin
      failures++;
      $display("FAIL done not a pulse or prod not held (done=%b prod=%h)", done, prod);
    end
  endtask

  initial begin
    rst = 1; start = 0; mcand = '0; mplier = '0; cur_mplier = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;

    // 1. Worked example: 7 x -4.
    multiply(N'(-4), N'(7));
    checks++;
    if ($signed(prod) != -28) begin
      failures++; $display("FAIL worked example gave %0d", $signed(prod));
    end

    // 2. Exhaustive.
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++)
        multiply(N'(i), N'(j));

    // 3. Back-to-back with start held high.
    for (int k = 0; k < 20; k++) begin
      logic [N-1:0] mc, mp;
      mc = N'($urandom); mp = N'($urandom);
      mcand = mc; mplier = mp; start = 1; cur_mplier = mp;
      @(posedge clk); #1;
      repeat (LAT - 1) @(posedge clk);
      #1;
      checks++;
      if (!done || prod !== ref_prod(mc, mp)) begin
        failures++;
        $display("FAIL back-to-back %0d * %0d: done=%b prod=%0d", $signed(mc), $signed(mp),
                 done, $signed(prod));
      end
      // done is high and start is sampled again at the next edge.
      if (done && state == ST_RESET) n_b2b++;
    end
    start = 0;
    @(posedge clk); repeat (LAT) @(posedge clk); #1;

    // 4. Reset in the middle of a multiplication.
    mcand = N'(5); mplier = N'(-3); start = 1; cur_mplier = mplier;
    @(posedge clk); #1; start = 0;
    repeat (3) @(posedge clk); #1;
    rst = 1; @(posedge clk); #1; rst = 0;
    checks++;
    if (state != ST_RESET || prod !== '0 || done) begin
      failures++; $display("FAIL reset did not abort (state=%0d prod=%h)", state, prod);
    end else n_abort++;
    multiply(N'(-8), N'(-8));

    // Every mechanism must have happened.
    checks++;
    if (n_add == 0 || n_sub == 0 || n_skip00 == 0 || n_skip11 == 0 || n_b2b == 0 || n_abort == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("mechanisms: add=%0d sub=%0d skip00=%0d skip11=%0d back_to_back=%0d reset_abort=%0d",
             n_add, n_sub, n_skip00, n_skip11, n_b2b, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
