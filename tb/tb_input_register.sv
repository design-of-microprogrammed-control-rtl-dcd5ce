// tb_input_register: random inputs each cycle, random phase enable; the register must clear on
// reset, take x only in cycles with c1 and hold it otherwise.
module tb_input_register;
  logic       clk = 0, rst = 1, c1 = 0;
  logic [5:0] x = '0, xq, model;
  int checks = 0, failures = 0;

  input_register #(.N(6)) dut (.clk(clk), .rst(rst), .c1(c1), .x(x), .xq(xq));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    #1;
    checks++;
    if (xq !== '0) begin failures++; $display("FAIL reset xq=%b", xq); end
    model = '0;
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      x  = 6'($urandom);
      c1 = 1'($urandom);
      @(posedge clk);
      if (c1) model = x;
      #1;
      checks++;
      if (xq !== model) begin failures++; $display("FAIL n=%0d xq=%b exp=%b", n, xq, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
