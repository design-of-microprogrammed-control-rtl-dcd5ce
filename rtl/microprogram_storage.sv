// microprogram_storage: the whole microprogram storage, split into one field per state.
//
// Each state y_k has its own storage_field, which reads only the inputs X/F^k and drives only
// the change lines Z/y_k u Y/y_k. The one-hot phase vector enables exactly one field at a time,
// and the fields' outputs are joined on the common change lines (OR here, tri-state wiring in
// the real parts). The result is, for every line, the sum over k of y_k AND F^k.
//
// Interface: x (registered inputs x1..x6), y (one-hot state y1..y3), lines (z_i:1, z_i:0, Y_j,
// numbered as in mpcu_pkg). Purely combinational. Six 32x8 memory units in total: four for
// y1, one each for y2 and y3.
module microprogram_storage
  import mpcu_pkg::*;
(
  input  x_vec_t    x,
  input  y_vec_t    y,
  output line_vec_t lines
);

  line_vec_t field_lines [N_Y];

  for (genvar k = 0; k < N_Y; k++) begin : g_field
    storage_field #(.K(k + 1)) u_field (
      .x     (x),
      .y_k   (y[k]),
      .lines (field_lines[k])
    );
  end

  always_comb begin
    lines = '0;
    for (int k = 0; k < int'(N_Y); k++) lines |= field_lines[k];
  end

endmodule
