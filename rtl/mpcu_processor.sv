// mpcu_processor: everything of the control unit except the combinational part.
//
// Holds the input flip-flops, the output set-reset flip-flops, the one-hot phase register, the
// clock enabling network and the two-phase clock generator. Outwards it has the unit's inputs x
// and outputs z; towards the microprogram storage it presents the registered inputs xq and the
// state y, and takes back the change lines (z_i:1, z_i:0, Y_j, numbered as in mpcu_pkg).
//
// Timing: a control step is two clk cycles. In the C1 cycle the inputs are sampled. In the C2
// cycle the storage output (from xq and y) sets or resets outputs and, if some Y_j is 1, moves
// the phase register to the new state. z and y change at the end of the C2 cycle.
module mpcu_processor
  import mpcu_pkg::*;
(
  input  logic      clk,
  input  logic      rst,     // reset (B): inputs and outputs cleared, state y1
  input  x_vec_t    x,       // external inputs
  output z_vec_t    z,       // external outputs
  output x_vec_t    xq,      // registered inputs, to the storage
  output y_vec_t    y,       // state, to the storage
  input  line_vec_t lines,   // change lines from the storage
  output logic      c1,      // clock phases, brought out for observation
  output logic      c2
);

  z_vec_t set_v, rst_v;
  y_vec_t ysec;
  logic   load;

  always_comb begin
    for (int i = 1; i <= int'(N_Z); i++) begin
      set_v[i-1] = lines[set_line(i)];
      rst_v[i-1] = lines[rst_line(i)];
    end
    for (int j = 1; j <= int'(N_Y); j++) ysec[j-1] = lines[y_line(j)];
  end

  clock_generator u_clk (.clk(clk), .rst(rst), .c1(c1), .c2(c2));

  input_register #(.N(N_X)) u_in (.clk(clk), .rst(rst), .c1(c1), .x(x), .xq(xq));

  output_register #(.M(N_Z)) u_out (
    .clk(clk), .rst(rst), .c2(c2), .set_i(set_v), .rst_i(rst_v), .z(z));

  clock_enable_net #(.P(N_Y)) u_cen (.c2(c2), .ysec(ysec), .load(load));

  phase_register #(.P(N_Y)) u_phase (
    .clk(clk), .rst(rst), .load(load), .ysec(ysec), .y(y));

endmodule
