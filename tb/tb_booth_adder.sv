// tb_booth_adder: exhaustive check of the (2N+1)-bit adder for N = 4 (all
// 512 x 512 operand pairs) against integer addition modulo 2^(2N+1).
module tb_booth_adder;
  localparam int N = 4;
  localparam int W = 2 * N + 1;
  logic [W-1:0] a, b, sum;
  int checks = 0, failures = 0;

  booth_adder #(.N(N)) dut (.a, .b, .sum);

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i); b = W'(j);
        #1;
        checks++;
        if (sum !== W'((i + j) % (1 << W))) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d = %0d", i, j, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
