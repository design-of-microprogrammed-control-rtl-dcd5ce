// tb_mpcu_top: end-to-end test of the control unit at its only size (6 inputs, 4 outputs,
// 3 states, six 32x8 memory units).
//
// In each control step the testbench picks a random input combination that is legal in the
// current state (no output set and reset together, at most one next state), applies it before
// the C1 cycle and compares outputs and state after the C2 cycle with a reference model built
// from the unit's sum-of-products expressions. It also checks the step timing: nothing changes
// after the C1 cycle, the new values appear after the C2 cycle, two clk cycles per step.
// Counted mechanisms, each of which must happen: every state transition of the example
// (y1->y2, y1->y3, y2->y1, y2->y3, y3->y2), a held state (clock enable off) in each state,
// an output set and an output reset, both banks of the y1 field (x6 = 0 and 1), and a reset
// in the middle of operation.
module tb_mpcu_top;
  import mpcu_ref_pkg::*;

  localparam int STEPS = 3000;

  logic        clk = 0, rst = 1;
  logic [5:0]  x = '0;
  logic [3:0]  z, m_z;
  logic [2:0]  y, m_y;
  logic [10:0] lines;
  logic        c1, c2;
  int checks = 0, failures = 0;
  int trans [3][3];
  int holds [3];
  int sets = 0, resets = 0, bank0 = 0, bank1 = 0, midresets = 0;

  mpcu_top dut (.clk(clk), .rst(rst), .x(x), .z(z), .y(y), .lines(lines), .c1(c1), .c2(c2));

  always #5 clk = ~clk;

  initial begin
    repeat (20 * STEPS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(logic [2:0] v);
    return v[0] ? 0 : v[1] ? 1 : 2;
  endfunction

  task automatic compare(string what);
    checks++;
    if (z !== m_z || y !== m_y) begin
      failures++;
      $display("FAIL %s z=%b exp=%b y=%b exp=%b", what, z, m_z, y, m_y);
    end
  endtask

  initial begin
    logic [10:0] l;
    logic [3:0]  s, r;
    logic [2:0]  ny;
    logic [5:0]  xs;
    foreach (trans[a, b]) trans[a][b] = 0;
    foreach (holds[a]) holds[a] = 0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    m_z = '0;
    m_y = 3'b001;
    #1;
    compare("after reset");
    for (int n = 0; n < STEPS; n++) begin
      if (n == STEPS / 2) begin
        // Reset in the middle of operation: back to y1 with all outputs 0.
        rst = 1;
        @(posedge clk);
        #1;
        rst = 0;
        #1;
        m_z = '0;
        m_y = 3'b001;
        midresets++;
        compare("mid-run reset");
      end
      // The phase generator starts with C1 after reset; each step is C1 then C2.
      checks++;
      if (!c1) begin failures++; $display("FAIL step %0d does not start in C1", n); end
      do x = 6'($urandom); while (!legal(m_y, x));
      xs = x;
      l = ref_lines(m_y, x);
      s = {l[6], l[4], l[2], l[0]};
      r = {l[7], l[5], l[3], l[1]};
      ny = l[10:8];
      @(posedge clk);          // C1: inputs sampled
      #1;
      x = 6'($urandom);        // must not matter any more in this step
      compare("after C1");
      @(posedge clk);          // C2: outputs and state updated
      #1;
      if (m_y[0]) begin
        if (xs[5]) bank1++; else bank0++;
      end
      if ((s & ~m_z) != 0) sets++;
      if ((r & m_z) != 0) resets++;
      m_z = (m_z | s) & ~r;
      if (ny != 0) begin
        trans[idx(m_y)][idx(ny)]++;
        m_y = ny;
      end else begin
        holds[idx(m_y)]++;
      end
      compare($sformatf("step %0d", n));
    end

    $display("transitions 1->2 %0d, 1->3 %0d, 2->1 %0d, 2->3 %0d, 3->2 %0d",
             trans[0][1], trans[0][2], trans[1][0], trans[1][2], trans[2][1]);
    $display("holds y1 %0d, y2 %0d, y3 %0d; output sets %0d, resets %0d",
             holds[0], holds[1], holds[2], sets, resets);
    $display("y1 field bank x6=0 %0d, x6=1 %0d; mid-run resets %0d", bank0, bank1, midresets);
    checks++;
    if (trans[0][1] == 0 || trans[0][2] == 0 || trans[1][0] == 0 || trans[1][2] == 0 ||
        trans[2][1] == 0) begin
      failures++;
      $display("FAIL a state transition never happened");
    end
    checks++;
    if (holds[0] == 0 || holds[1] == 0 || holds[2] == 0) begin
      failures++;
      $display("FAIL a state was never held");
    end
    checks++;
    if (sets == 0 || resets == 0 || bank0 == 0 || bank1 == 0 || midresets == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
