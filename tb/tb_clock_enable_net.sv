// tb_clock_enable_net: all combinations of C2 and Y1..Y3; the enable must be 1 exactly when
// C2 is active and at least one Y_j is 1.
module tb_clock_enable_net;
  logic       c2, load;
  logic [2:0] ysec;
  int checks = 0, failures = 0;

  clock_enable_net #(.P(3)) dut (.c2(c2), .ysec(ysec), .load(load));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {c2, ysec} = 4'(v);
      #1;
      checks++;
      if (load !== (c2 && ysec != 0)) begin
        failures++;
        $display("FAIL c2=%b Y=%b load=%b", c2, ysec, load);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
