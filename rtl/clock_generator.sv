// clock_generator: the two-phase clock C1, C2 of the phase-register structure.
//
// The structure works with two clock phases: in C1 the input flip-flops sample the inputs, in
// C2 the output flip-flops and the phase register take the values the storage computed from
// them. Here the phases are produced from one system clock as alternating one-cycle enables
// (c1 in one clock cycle, c2 in the next), so that the rest of the design is synchronous to clk.
// The first cycle after reset is a C1 cycle. One control step therefore takes two clk cycles.
module clock_generator (
  input  logic clk,
  input  logic rst,   // synchronous, active high
  output logic c1,    // phase C1 enable
  output logic c2     // phase C2 enable
);

  logic ph;   // 0: C1 cycle, 1: C2 cycle

  always_ff @(posedge clk) begin
    if (rst) ph <= 1'b0;
    else     ph <= ~ph;
  end

  assign c1 = ~rst & ~ph;
  assign c2 = ~rst &  ph;

endmodule
