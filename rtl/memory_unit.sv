// memory_unit: one read-only memory part "M" of the microprogram storage.
//
// A 2**R x S read-only memory with address inputs C1..CR (c[0] = C1), data outputs D1..DS
// (d[0] = D1) and an enable input E. While E is 1 the word at the address is presented on the
// outputs; while E is 0 the outputs are released. The storage joins the outputs of several
// units on common lines and enables at most one unit per line at a time; the real parts do this
// with tri-state outputs. This model drives 0 from a disabled unit instead, and the joining is
// a logical OR, which gives the same values on the lines while only one unit is enabled.
//
// The contents are the parameter CONTENT, word a at bits [a*S +: S]. The defaults R = 5 and
// S = 8 are the part used in the worked example (five address inputs, eight data outputs).
// Purely combinational: the outputs follow the address and enable without a clock.
module memory_unit #(
  parameter int unsigned           R       = 5,
  parameter int unsigned           S       = 8,
  parameter logic [(2**R)*S-1:0]   CONTENT = '0
) (
  input  logic [R-1:0] c,   // address inputs C1..CR
  input  logic         e,   // enable E
  output logic [S-1:0] d    // data outputs D1..DS, 0 while disabled
);

  logic [S-1:0] rom [2**R];

  always_comb begin
    for (int a = 0; a < 2**R; a++) rom[a] = CONTENT[a*S +: S];
  end

  assign d = e ? rom[c] : '0;

endmodule
