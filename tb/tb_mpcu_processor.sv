// tb_mpcu_processor: drives the processor's change-line inputs directly with random legal
// patterns (no output set and reset together, at most one next state) and compares inputs
// register, outputs, state and clock phases cycle by cycle with a model of the two-phase
// timing: inputs taken in C1 cycles, outputs and state updated in C2 cycles.
module tb_mpcu_processor;
  import mpcu_pkg::*;

  logic      clk = 0, rst = 1;
  x_vec_t    x = '0, xq, m_xq;
  z_vec_t    z, m_z;
  y_vec_t    y, m_y;
  line_vec_t lines = '0;
  logic      c1, c2, m_ph;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  mpcu_processor dut (
    .clk(clk), .rst(rst), .x(x), .z(z), .xq(xq), .y(y), .lines(lines), .c1(c1), .c2(c2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int n);
    checks++;
    if (xq !== m_xq || z !== m_z || y !== m_y || c1 !== !m_ph || c2 !== m_ph) begin
      failures++;
      $display("FAIL n=%0d xq=%b/%b z=%b/%b y=%b/%b c1=%b c2=%b ph=%b",
               n, xq, m_xq, z, m_z, y, m_y, c1, c2, m_ph);
    end
  endtask

  initial begin
    logic [3:0] s, r;
    logic [2:0] nx;
    repeat (2) @(posedge clk);
    #1;
    m_xq = '0; m_z = '0; m_y = 3'b001; m_ph = 1'b0;
    rst = 0;
    #1;
    compare(-1);
    for (int n = 0; n < 1000; n++) begin
      x  = 6'($urandom);
      s  = 4'($urandom);
      r  = 4'($urandom) & ~s;
      nx = ($urandom % 4 == 0) ? 3'(1 << ($urandom % 3)) : 3'b000;
      for (int i = 0; i < 4; i++) begin
        lines[set_line(i + 1)] = s[i];
        lines[rst_line(i + 1)] = r[i];
      end
      for (int j = 0; j < 3; j++) lines[y_line(j + 1)] = nx[j];
      @(posedge clk);
      if (!m_ph) m_xq = x;
      else begin
        m_z = (m_z | s) & ~r;
        if (nx != 0) begin m_y = nx; loads++; end
        else holds++;
      end
      m_ph = ~m_ph;
      #1;
      compare(n);
    end
    checks++;
    if (loads == 0 || holds == 0) failures++;
    $display("state loads %0d, holds %0d", loads, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
