// tb_microprogram_storage: checks the whole storage against the reference expressions for
// every input combination in each of the three states, and that it drives nothing when no
// state is active.
module tb_microprogram_storage;
  import mpcu_ref_pkg::*;

  logic [5:0]  x;
  logic [2:0]  y;
  logic [10:0] lines;
  int checks = 0, failures = 0;

  microprogram_storage dut (.x(x), .y(y), .lines(lines));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      for (int v = 0; v < 64; v++) begin
        x = 6'(v);
        y = (k < 3) ? 3'(1 << k) : 3'b000;
        #1;
        checks++;
        if (lines !== ref_lines(y, x)) begin
          failures++;
          $display("FAIL y=%b x=%b lines=%b exp=%b", y, x, lines, ref_lines(y, x));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
