// mpcu_top: microprogrammed control unit with separate microprogram fields enabled by states.
//
// The unit is a synchronous phase-register machine (6 inputs, 4 outputs, 3 one-hot states)
// whose combinational part is held in read-only memory. The memory is not one block addressed by
// all inputs and all state bits; each state has its own field, addressed only by the inputs that
// state's identifying functions depend on and driving only the change lines that can be 1 in
// that state, and enabled by that state's flip-flop. Here that takes six 32x8 memory units
// instead of sixteen for a single storage addressed by inputs and state bits together.
//
// Interface: clk, rst (synchronous, active high), x[5:0] = x6..x1, z[3:0] = z4..z1, and for
// observation the state y[2:0] = y3..y1, the change lines and the two clock phases.
// Timing: one control step per two clk cycles (C1: sample x, C2: update z and y).
module mpcu_top
  import mpcu_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  x_vec_t    x,
  output z_vec_t    z,
  output y_vec_t    y,
  output line_vec_t lines,
  output logic      c1,
  output logic      c2
);

  x_vec_t xq;

  mpcu_processor u_proc (
    .clk(clk), .rst(rst), .x(x), .z(z), .xq(xq), .y(y), .lines(lines), .c1(c1), .c2(c2));

  microprogram_storage u_store (.x(xq), .y(y), .lines(lines));

endmodule
