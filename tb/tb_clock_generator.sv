// tb_clock_generator: checks that after reset the phases alternate C1, C2, C1, ... with
// exactly one of them active per clk cycle, and none during reset.
module tb_clock_generator;
  logic clk = 0, rst = 1, c1, c2;
  int checks = 0, failures = 0;

  clock_generator dut (.clk(clk), .rst(rst), .c1(c1), .c2(c2));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (c1 || c2) begin failures++; $display("FAIL phase active in reset"); end
    rst = 0;
    #1;
    for (int n = 0; n < 40; n++) begin
      checks++;
      if (c1 !== (n % 2 == 0) || c2 !== (n % 2 == 1)) begin
        failures++;
        $display("FAIL cycle %0d c1=%b c2=%b", n, c1, c2);
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
