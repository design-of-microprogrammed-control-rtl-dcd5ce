// mpcu_ref_pkg: reference model used by the testbenches of the control unit.
//
// ref_lines() evaluates the combinational part of the example control unit straight from its
// sum-of-products expressions in the state variables (z_i:1, z_i:0 and Y_j as sums of y_k terms),
// independently of the per-state storage fields. Line numbering: z_i:1 at 2(i-1), z_i:0 at
// 2(i-1)+1, Y_j at 8+(j-1). legal() tells whether an input combination can be applied in a
// state: no output is both set and reset, and at most one next state is named (the combinations
// the design procedure excludes from the operation of the unit).
package mpcu_ref_pkg;

  function automatic logic [10:0] ref_lines(logic [2:0] y, logic [5:0] x);
    logic x1, x2, x3, x4, x5, x6, y1, y2, y3;
    logic [10:0] l;
    {x6, x5, x4, x3, x2, x1} = x;
    {y3, y2, y1} = y;
    l[0]  = (y1 & x2 & x6) | (y3 & x2 & x6);                                  // z1:1
    l[1]  = y2 & ((~x3 & x5) | ~x1);                                          // z1:0
    l[2]  = y1 & ~x1;                                                         // z2:1
    l[3]  = y1 & ((~x5 & x6) | (~x3 & x5));                                   // z2:0
    l[4]  = (y1 & ((~x1 & ~x3) | (~x3 & x5) | (~x2 & x4))) | (y2 & ~x3 & x5); // z3:1
    l[5]  = (y1 & ~x1 & x3) | (y3 & x2 & x6);                                 // z3:0
    l[6]  = (y1 & ~x5 & x6) | (y3 & x2 & x6);                                 // z4:1
    l[7]  = (y1 & ((~x3 & x5) | (~x2 & x4))) | (y2 & ~x3 & x5);               // z4:0
    l[8]  = y2 & x3 & x5;                                                     // Y1
    l[9]  = (y1 & x2 & x6) | (y3 & x2 & x6);                                  // Y2
    l[10] = (y1 & ((~x3 & x5) | (~x1 & ~x3))) | (y2 & ~x3 & x5);              // Y3
    return l;
  endfunction

  function automatic bit legal(logic [2:0] y, logic [5:0] x);
    logic [10:0] l;
    l = ref_lines(y, x);
    for (int i = 0; i < 4; i++)
      if (l[2*i] && l[2*i+1]) return 1'b0;
    return $countones(l[10:8]) <= 1;
  endfunction

endpackage
