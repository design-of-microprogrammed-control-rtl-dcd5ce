// output_register: the output set-reset flip-flops z1..zm.
//
// Each output z_i is a flip-flop with a set input (change line z_i:1) and a reset input
// (change line z_i:0), updated in clock phase C2 (enable c2). Set alone makes z_i 1, reset
// alone makes it 0, neither keeps it. The storage is built so that set and reset of one output
// are never 1 together in a state the unit actually reaches; an assertion flags it if they are,
// and the flip-flop then keeps its value (this design's choice). Cleared by reset.
module output_register #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst,     // synchronous, active high: clears the outputs
  input  logic         c2,      // phase C2 enable
  input  logic [M-1:0] set_i,   // z_i:1
  input  logic [M-1:0] rst_i,   // z_i:0
  output logic [M-1:0] z
);

  always_ff @(posedge clk) begin
    if (rst) z <= '0;
    else if (c2) begin
      for (int i = 0; i < int'(M); i++) begin
        if (set_i[i] && !rst_i[i])      z[i] <= 1'b1;
        else if (rst_i[i] && !set_i[i]) z[i] <= 1'b0;
      end
    end
  end

  a_no_set_and_reset: assert property (@(posedge clk) disable iff (rst)
    c2 |-> ((set_i & rst_i) == '0))
    else $error("output_register: z_i:1 and z_i:0 both active");

endmodule
