// tb_booth_complementer: exhaustive check of the conditional two's
// complement for N = 4 (every signed M, both values of sub) against -M / +M
// computed with integer arithmetic in N+1 bits; -(-8) must give +8.
module tb_booth_complementer;
  localparam int N = 4;
  logic [N-1:0] m;
  logic [N:0] y;
  logic sub;
  int checks = 0, failures = 0;

  booth_complementer #(.N(N)) dut (.m, .sub, .y);

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int s = 0; s < 2; s++) begin
        logic [N:0] exp;
        int sm;
        m = N'(i); sub = 1'(s);
        sm = (i >= (1 << (N-1))) ? i - (1 << N) : i;
        exp = s ? (N+1)'(-sm) : (N+1)'(sm);
        #1;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL m=%0d sub=%0d y=%h exp=%h", i, s, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
