// tb_phase_register: reset must give state y1; random one-hot next states with a random load
// enable must be taken only when load is 1, and the state held otherwise.
module tb_phase_register;
  logic       clk = 0, rst = 1, load = 0;
  logic [2:0] ysec = 3'b001, y, model;
  int checks = 0, failures = 0;

  phase_register #(.P(3)) dut (.clk(clk), .rst(rst), .load(load), .ysec(ysec), .y(y));

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
    if (y !== 3'b001) begin failures++; $display("FAIL reset y=%b", y); end
    model = 3'b001;
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      ysec = 3'(1 << ($urandom % 3));
      load = 1'($urandom);
      @(posedge clk);
      if (load) model = ysec;
      #1;
      checks++;
      if (y !== model) begin failures++; $display("FAIL n=%0d y=%b exp=%b", n, y, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
