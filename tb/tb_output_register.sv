// tb_output_register: random set/reset patterns (never both on one output) with a random C2
// enable; each output must go to 1 on set, to 0 on reset and hold otherwise. Counts that every
// output was set and reset at least once.
module tb_output_register;
  logic       clk = 0, rst = 1, c2 = 0;
  logic [3:0] s = '0, r = '0, z, model;
  int checks = 0, failures = 0, sets = 0, resets = 0;

  output_register #(.M(4)) dut (.clk(clk), .rst(rst), .c2(c2), .set_i(s), .rst_i(r), .z(z));

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
    if (z !== '0) begin failures++; $display("FAIL reset z=%b", z); end
    model = '0;
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      s  = 4'($urandom);
      r  = 4'($urandom) & ~s;
      c2 = 1'($urandom);
      @(posedge clk);
      if (c2) begin
        if (s != 0) sets++;
        if (r != 0) resets++;
        model = (model | s) & ~r;
      end
      #1;
      checks++;
      if (z !== model) begin failures++; $display("FAIL n=%0d z=%b exp=%b", n, z, model); end
    end
    checks++;
    if (sets == 0 || resets == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
