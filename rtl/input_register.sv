// input_register: the input flip-flops x1..xn of the phase-register structure.
//
// D flip-flops that sample the external inputs in clock phase C1 (enable c1) and hold them for
// the storage through the following C2 phase, so the storage sees inputs that do not change
// while the outputs and the state are updated. Cleared by reset. The width defaults to the
// example's six inputs.
module input_register #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst,   // synchronous, active high: clears the flip-flops
  input  logic         c1,    // phase C1 enable
  input  logic [N-1:0] x,     // external inputs x1..xn (x[0] = x1)
  output logic [N-1:0] xq     // registered inputs
);

  always_ff @(posedge clk) begin
    if (rst)     xq <= '0;
    else if (c1) xq <= x;
  end

endmodule
