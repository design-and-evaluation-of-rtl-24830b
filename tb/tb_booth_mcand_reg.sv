// tb_booth_mcand_reg: checks reset, load and hold of the multiplicand
// register with random data and random load enables, against a model
// register kept in the testbench.
module tb_booth_mcand_reg;
  localparam int N = 4;
  logic clk = 0, rst, load;
  logic [N-1:0] d, m, model;
  int checks = 0, failures = 0;

  booth_mcand_reg #(.N(N)) dut (.clk, .rst, .load, .d, .m);

  always #5 clk = ~clk;

  initial begin
    rst = 1; load = 0; d = '1;
    @(posedge clk); #1;
    checks++;
    if (m !== '0) begin failures++; $display("FAIL reset m=%h", m); end
    rst = 0; model = '0;
    for (int i = 0; i < 300; i++) begin
      load = 1'($urandom);
      d    = N'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (m !== model) begin failures++; $display("FAIL cycle %0d m=%h exp=%h", i, m, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
