// storage_field: the part of the microprogram storage that belongs to one state y_k.
//
// Only the inputs in X/F^k (XMASK) are wired to the address lines, in ascending input order,
// and only the change lines in Z/y_k u Y/y_k (LMASK) are wired from the data outputs, again in
// ascending line order. The field is enabled by its state bit y_k, so in every other state it
// drives nothing.
//
// A field that needs more address bits than one memory unit has (A > R) is split into
// 2**(A-R) banks: the low R address bits go to every unit and the high bits, combined with y_k,
// pick which bank is enabled. A field that needs more data bits than one unit has (O > S) uses
// ceil(O/S) units side by side. For the example's state y1 (6 inputs, 9 lines, 5x8 units) this
// gives four units, with x6 choosing between the two pairs, as in the example realisation. The
// bank and slice arrangement for other sizes is this design's generalisation of that layout.
//
// The contents of each unit are computed at elaboration from mpcu_pkg::field_word, i.e. by the
// microprogram construction rule applied to the identifying functions of state K. Addresses a
// unit has but the field never reaches (unused high address lines, tied to 0) hold 0.
//
// Combinational; lines is 0 while y_k is 0. Outputs of the banks of one slice are ORed, standing
// for the joined tri-state outputs.
module storage_field
  import mpcu_pkg::*;
#(
  parameter int unsigned K     = 2,               // state number, 1..N_Y
  parameter x_vec_t      XMASK = XF_MASK[K-1],    // X/F^k
  parameter line_vec_t   LMASK = ZY_MASK[K-1],    // Z/y_k u Y/y_k
  parameter int unsigned R     = MEM_R,
  parameter int unsigned S     = MEM_S
) (
  input  x_vec_t    x,      // registered inputs x1..xn
  input  logic      y_k,    // state bit enabling this field
  output line_vec_t lines   // change lines driven by this field (0 outside LMASK)
);

  localparam int unsigned A      = popcount(32'(XMASK));           // address bits needed
  localparam int unsigned O      = popcount(32'(LMASK));           // data bits needed
  localparam int unsigned AB     = (A > R) ? A - R : 0;            // bank-select bits
  localparam int unsigned BANKS  = 2**AB;
  localparam int unsigned SLICES = (O + S - 1) / S;
  localparam int unsigned AW     = (A > 0) ? A : 1;

  // Contents of the unit in bank b, slice s.
  function automatic logic [(2**R)*S-1:0] unit_content(int unsigned b, int unsigned s);
    logic [(2**R)*S-1:0] img;
    logic [N_L-1:0]      w;
    img = '0;
    for (int unsigned a = 0; a < 2**R; a++) begin
      if (a < 2**A) begin
        w = field_word(K, (b << R) | a);
        for (int unsigned j = 0; j < S; j++)
          if (s * S + j < O) img[a*S + j] = w[s*S + j];
      end
    end
    return img;
  endfunction

  // Input wiring: X/F^k in ascending order.
  logic [AW-1:0] faddr;
  always_comb begin
    int unsigned b;
    faddr = '0;
    b = 0;
    for (int i = 0; i < int'(N_X); i++) begin
      if (XMASK[i]) begin
        faddr[b] = x[i];
        b++;
      end
    end
  end

  logic [R-1:0] uaddr;
  always_comb begin
    uaddr = '0;
    for (int i = 0; i < int'(R); i++)
      if (i < int'(A)) uaddr[i] = faddr[i];
  end

  logic [BANKS-1:0][SLICES*S-1:0] bank_d;

  for (genvar gb = 0; gb < BANKS; gb++) begin : g_bank
    logic en;
    if (AB > 0) begin : g_sel
      assign en = y_k && (faddr[AW-1 -: (AB > 0 ? AB : 1)] == (AB > 0 ? AB : 1)'(gb));
    end else begin : g_one
      assign en = y_k;
    end
    for (genvar gs = 0; gs < SLICES; gs++) begin : g_slice
      memory_unit #(
        .R       (R),
        .S       (S),
        .CONTENT (unit_content(gb, gs))
      ) u_mem (
        .c (uaddr),
        .e (en),
        .d (bank_d[gb][gs*S +: S])
      );
    end
  end

  // Joined outputs of all banks, then output wiring onto the change lines.
  logic [SLICES*S-1:0] fdata;
  always_comb begin
    fdata = '0;
    for (int b = 0; b < int'(BANKS); b++) fdata |= bank_d[b];
  end

  always_comb begin
    int unsigned b;
    lines = '0;
    b = 0;
    for (int i = 0; i < int'(N_L); i++) begin
      if (LMASK[i]) begin
        lines[i] = fdata[b];
        b++;
      end
    end
  end

endmodule
