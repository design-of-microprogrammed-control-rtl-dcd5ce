// tb_storage_field: checks the storage fields of the three states.
//
// The field of y2 (3 address inputs x1 x3 x5, 5 data bits z1:0 z3:1 z4:0 Y1 Y3) is compared
// with the eight-row content table of that memory part, written out here. The fields
// of y1 (four memory units, x6 choosing the bank) and y3 are compared over all 64 input
// combinations with the reference expressions. Every field must drive nothing while disabled
// and nothing outside its own set of lines.
module tb_storage_field;
  import mpcu_ref_pkg::*;

  // Content of the y2 unit: rows x1 x3 x5 = 000..111, columns D1..D5.
  localparam logic [4:0] Y2_TABLE [8] = '{
    5'b10000, 5'b11101, 5'b10000, 5'b10010,
    5'b00000, 5'b11101, 5'b00000, 5'b00010
  };

  logic [5:0]  x;
  logic [2:0]  en;
  logic [10:0] l1, l2, l3;
  int checks = 0, failures = 0;

  storage_field #(.K(1)) f1 (.x(x), .y_k(en[0]), .lines(l1));
  storage_field #(.K(2)) f2 (.x(x), .y_k(en[1]), .lines(l2));
  storage_field #(.K(3)) f3 (.x(x), .y_k(en[2]), .lines(l3));

  task automatic check(string what, logic [10:0] got, logic [10:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%b got=%b exp=%b", what, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0]  row;
    logic [10:0] exp2;
    for (int v = 0; v < 64; v++) begin
      x = 6'(v);
      en = 3'b111;
      #1;
      check("y1 field", l1, ref_lines(3'b001, x));
      check("y3 field", l3, ref_lines(3'b100, x));
      // Table row index: x1 is the leftmost bit of the row label.
      row = Y2_TABLE[{x[0], x[2], x[4]}];
      exp2 = '0;
      exp2[1]  = row[4];   // D1 = z1:0
      exp2[4]  = row[3];   // D2 = z3:1
      exp2[7]  = row[2];   // D3 = z4:0
      exp2[8]  = row[1];   // D4 = Y1
      exp2[10] = row[0];   // D5 = Y3
      check("y2 field vs table", l2, exp2);
      check("y2 field vs expressions", l2, ref_lines(3'b010, x));
      en = 3'b000;
      #1;
      check("y1 disabled", l1, '0);
      check("y2 disabled", l2, '0);
      check("y3 disabled", l3, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
