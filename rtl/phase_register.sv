// phase_register: the one-hot ("1-from-n") state register y1..yp.
//
// Holds the state as one flip-flop per state, exactly one of them 1. When the clock enabling
// network raises load (phase C2 with some Y_j = 1), the register takes the vector Y1..Yp, which
// sets the new state's flip-flop and clears the old one; otherwise it keeps its value. Reset
// puts the unit in state y1 (this design's choice of initial state). An assertion checks that a
// loaded vector is one-hot.
module phase_register #(
  parameter int unsigned P = 3
) (
  input  logic         clk,
  input  logic         rst,    // synchronous, active high: state y1
  input  logic         load,   // from the clock enabling network
  input  logic [P-1:0] ysec,   // Y1..Yp
  output logic [P-1:0] y       // y1..yp, one-hot
);

  always_ff @(posedge clk) begin
    if (rst)       y <= P'(1);
    else if (load) y <= ysec;
  end

  a_onehot_load: assert property (@(posedge clk) disable iff (rst)
    load |-> $onehot(ysec))
    else $error("phase_register: next-state vector is not one-hot");

endmodule
