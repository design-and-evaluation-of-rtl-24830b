// tb_booth_mux: for each Booth pair {Q0, Q-1} and random data, checks that
// 00 and 11 select the accumulator and 01 and 10 select the adder output.
module tb_booth_mux;
  import booth_pkg::*;
  localparam int N = 4;
  localparam int W = 2 * N + 1;
  booth_pair_e    sel;
  logic [W-1:0] a, sum, y;
  int checks = 0, failures = 0;

  booth_mux #(.N(N)) dut (.sel, .a, .sum, .y);

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int s = 0; s < 4; s++) begin
        logic [W-1:0] exp;
        sel = booth_pair_e'(s);
        a   = W'($urandom);
        sum = W'($urandom);
        exp = (s == 1 || s == 2) ? sum : a;
        #1;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL sel=%b a=%h sum=%h y=%h", s[1:0], a, sum, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
