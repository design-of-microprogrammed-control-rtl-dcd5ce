// clock_enable_net: the clock enabling network of the phase register.
//
// In the 1-from-n state code, Y_j = 1 means "go to state y_j". When no Y_j is 1 the state must
// stay as it is, so the phase register may only be clocked in phase C2 when at least one Y_j
// is 1. This block forms that load enable from C2 and the secondary change lines.
// Combinational.
module clock_enable_net #(
  parameter int unsigned P = 3
) (
  input  logic         c2,    // phase C2 enable
  input  logic [P-1:0] ysec,  // Y1..Yp from the storage
  output logic         load   // clock enable of the phase register
);

  assign load = c2 & (|ysec);

endmodule
