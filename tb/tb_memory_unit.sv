// tb_memory_unit: checks a small memory unit (8 words of 4 bits) read at every address with
// the enable on and off. The contents are a formula, word a = (5a + 3) mod 16, worked out here
// independently of the unit.
module tb_memory_unit;
  localparam int unsigned R = 3, S = 4;

  function automatic logic [(2**R)*S-1:0] image();
    logic [(2**R)*S-1:0] v;
    for (int a = 0; a < 2**R; a++) v[a*S +: S] = S'((5 * a + 3) % 16);
    return v;
  endfunction

  logic [R-1:0] c;
  logic         e;
  logic [S-1:0] d;
  int checks = 0, failures = 0;

  memory_unit #(.R(R), .S(S), .CONTENT(image())) dut (.c(c), .e(e), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**R; a++) begin
      for (int en = 0; en < 2; en++) begin
        c = R'(a);
        e = en[0];
        #1;
        checks++;
        if (d !== (en ? S'((5 * a + 3) % 16) : S'(0))) begin
          failures++;
          $display("FAIL addr=%0d e=%0d d=%h", a, en, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
