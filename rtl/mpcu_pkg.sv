// mpcu_pkg: shared sizes, encodings and the microprogram of the example control unit.
//
// The control unit is a synchronous phase-register machine with n = 6 inputs x1..x6,
// m = 4 outputs z1..z4 and p = 3 one-hot states y1..y3. Its combinational part is a set of
// "change lines": z_i:1 (set output z_i), z_i:0 (reset output z_i) and Y_j (move to state y_j).
// Line numbering used everywhere in this design (0-based):
//   line 2*(i-1)     = z_i:1      line 2*(i-1)+1 = z_i:0      line 2*m+(j-1) = Y_j
// Input x_i is bit i-1 of an input vector, state y_k is bit k-1 of the phase vector.
//
// identify() gives the identifying functions F^k of state y_k: for each change line, the input
// condition under which it is 1 while the unit is in y_k. The expressions are the minimal
// sum-of-products forms of the worked example this design implements.
//
// The storage is split into one field per state. XF_MASK[k] is the set X/F^k of inputs a field
// reads; ZY_MASK[k] is the set Z/y_k u Y/y_k of change lines it drives. field_word() applies the
// microprogram construction rule: a data bit of the memory unit enabled by y_k is 1 exactly at
// the addresses (input combinations on X/F^k) where its identifying function is 1, 0 elsewhere.
// Memory units are 5-input, 8-output parts (MEM_R, MEM_S), as in the example.
package mpcu_pkg;

  localparam int unsigned N_X   = 6;                 // n, inputs
  localparam int unsigned N_Z   = 4;                 // m, outputs
  localparam int unsigned N_Y   = 3;                 // p, states
  localparam int unsigned N_L   = 2 * N_Z + N_Y;     // change lines: z_i:1, z_i:0, Y_j
  localparam int unsigned MEM_R = 5;                 // address inputs of one memory unit
  localparam int unsigned MEM_S = 8;                 // data outputs of one memory unit

  typedef logic [N_X-1:0] x_vec_t;
  typedef logic [N_Z-1:0] z_vec_t;
  typedef logic [N_Y-1:0] y_vec_t;
  typedef logic [N_L-1:0] line_vec_t;

  // Line indices of the change lines, for readability.
  function automatic int unsigned set_line(int unsigned i);   // z_i:1, i = 1..m
    return 2 * (i - 1);
  endfunction
  function automatic int unsigned rst_line(int unsigned i);   // z_i:0, i = 1..m
    return 2 * (i - 1) + 1;
  endfunction
  function automatic int unsigned y_line(int unsigned j);     // Y_j, j = 1..p
    return 2 * N_Z + (j - 1);
  endfunction

  // X/F^k: the inputs each state's identifying functions depend on.
  //   X/F^1 = {x1..x6}, X/F^2 = {x1, x3, x5}, X/F^3 = {x2, x6}
  localparam logic [N_Y-1:0][N_X-1:0] XF_MASK = '{
    6'b100010,   // y3
    6'b010101,   // y2
    6'b111111    // y1
  };

  // Z/y_k u Y/y_k: the change lines each state's field drives (bit = line index).
  //   y1: z1:1 z2:1 z2:0 z3:1 z3:0 z4:1 z4:0 Y2 Y3
  //   y2: z1:0 z3:1 z4:0 Y1 Y3
  //   y3: z1:1 z3:0 z4:1 Y2
  localparam logic [N_Y-1:0][N_L-1:0] ZY_MASK = '{
    11'b010_0110_0001,   // y3
    11'b101_1001_0010,   // y2
    11'b110_1111_1101    // y1
  };

  // Identifying functions of state y_k (k = 1..p) for the input vector x.
  function automatic line_vec_t identify(int unsigned k, x_vec_t x);
    logic x1, x2, x3, x4, x5, x6;
    line_vec_t l;
    {x6, x5, x4, x3, x2, x1} = x;
    l = '0;
    case (k)
      1: begin
        l[set_line(1)] = x2 & x6;
        l[set_line(2)] = ~x1;
        l[rst_line(2)] = (~x5 & x6) | (~x3 & x5);
        l[set_line(3)] = (~x1 & ~x3) | (~x3 & x5) | (~x2 & x4);
        l[rst_line(3)] = ~x1 & x3;
        l[set_line(4)] = ~x5 & x6;
        l[rst_line(4)] = (~x3 & x5) | (~x2 & x4);
        l[y_line(2)]   = x2 & x6;
        l[y_line(3)]   = (~x3 & x5) | (~x1 & ~x3);
      end
      2: begin
        l[rst_line(1)] = (~x3 & x5) | ~x1;
        l[set_line(3)] = ~x3 & x5;
        l[rst_line(4)] = ~x3 & x5;
        l[y_line(1)]   = x3 & x5;
        l[y_line(3)]   = ~x3 & x5;
      end
      3: begin
        l[set_line(1)] = x2 & x6;
        l[rst_line(3)] = x2 & x6;
        l[set_line(4)] = x2 & x6;
        l[y_line(2)]   = x2 & x6;
      end
      default: l = '0;
    endcase
    return l;
  endfunction

  function automatic int unsigned popcount(logic [31:0] v);
    int unsigned c;
    c = 0;
    for (int i = 0; i < 32; i++) c += int'(v[i]);
    return c;
  endfunction

  // Spread the low bits of a field address onto the positions of mask (ascending order).
  function automatic x_vec_t scatter_x(logic [31:0] addr, x_vec_t mask);
    x_vec_t x;
    int unsigned b;
    x = '0;
    b = 0;
    for (int i = 0; i < int'(N_X); i++) begin
      if (mask[i]) begin
        x[i] = addr[b];
        b++;
      end
    end
    return x;
  endfunction

  // Collect the change lines selected by mask into consecutive data bits (ascending order).
  function automatic logic [N_L-1:0] gather_lines(line_vec_t l, line_vec_t mask);
    logic [N_L-1:0] d;
    int unsigned b;
    d = '0;
    b = 0;
    for (int i = 0; i < int'(N_L); i++) begin
      if (mask[i]) begin
        d[b] = l[i];
        b++;
      end
    end
    return d;
  endfunction

  // Microprogram word of field k (1..p) at field address addr: the field's data bits,
  // i.e. the lines of ZY_MASK[k-1] in ascending order, for the input combination addr
  // laid onto X/F^k in ascending input order.
  function automatic logic [N_L-1:0] field_word(int unsigned k, logic [31:0] addr);
    return gather_lines(identify(k, scatter_x(addr, XF_MASK[k-1])), ZY_MASK[k-1]);
  endfunction

endpackage
