// tb_booth_multiplier_n8: the same multiplier built for 8-bit operands
// (16-bit product), to show that the operand width is a true parameter.
// Runs the corner operands (0, 1, -1, 127, -128 in every combination) and
// 3000 random pairs, checking each product against the signed product and
// the latency of 2N+1 = 17 clock edges.
module tb_booth_multiplier_n8;
  import booth_pkg::*;
  localparam int N = 8;
  localparam int LAT = 2 * N + 1;

  logic clk = 0, rst, start, done;
  logic [N-1:0] mcand, mplier;
  logic [2*N-1:0] prod;
  booth_state_e state;
  int checks = 0, failures = 0;

  booth_multiplier #(.N(N)) dut (.clk, .rst, .start, .mcand, .mplier, .prod, .done, .state);

  always #5 clk = ~clk;

  task automatic multiply(int sa, int sb);
    int lat;
    logic [2*N-1:0] exp;
    exp = (2*N)'(sa * sb);
    mcand = N'(sa); mplier = N'(sb); start = 1;
    @(posedge clk); #1;
    start = 0;
    lat = 1;
    while (!done && lat < 4 * LAT) begin
      @(posedge clk); #1; lat++;
    end
    checks++;
    if (lat != LAT || prod !== exp) begin
      failures++;
      $display("FAIL %0d * %0d: prod=%0d exp=%0d latency=%0d", sa, sb, $signed(prod),
               $signed(exp), lat);
    end
  endtask

  int corner[5] = '{0, 1, -1, 127, -128};

  initial begin
    rst = 1; start = 0; mcand = '0; mplier = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    foreach (corner[i])
      foreach (corner[j])
        multiply(corner[i], corner[j]);
    for (int k = 0; k < 3000; k++)
      multiply($urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
