// pim_dot_unit: basic computation unit of the DRAM PIM engine.
//
// N multiplication units (1-bit weight x 2-bit data) feed an adder tree that
// returns the 8-bit two's-complement dot product of the two N-element arrays
// (|sum| <= 2*32 fits 8 bits).  Element e of the unit uses columns 2e
// (bit 0) and 2e+1 (bit 1) of the unit's 2N-column slice, for the weights
// (shadow latches) and for the data (sense amplifiers) alike.  Purely
// combinational.  Structure and N = 32 are the architecture's; the tree is
// written as a balanced pairwise reduction (N a power of two).
module pim_dot_unit #(
  parameter int unsigned N = 32
) (
  input  logic [2*N-1:0]    w,
  input  logic [2*N-1:0]    d,
  output logic signed [7:0] dot
);
  logic signed [2:0] p [N];
  for (genvar e = 0; e < int'(N); e++) begin : g_mul
    pim_mul_unit u_mul (.w_dup(w[2*e +: 2]), .d(d[2*e +: 2]), .p(p[e]));
  end

  // balanced adder tree (N a power of two)
  localparam int unsigned L = $clog2(N);
  logic signed [7:0] lvl [L+1][N];
  always_comb begin
    for (int i = 0; i < int'(N); i++) lvl[0][i] = 8'(p[i]);
    for (int l = 1; l <= int'(L); l++)
      for (int i = 0; i < int'(N); i++)
        lvl[l][i] = (i < int'(N >> l)) ? lvl[l-1][(2*i) % N] + lvl[l-1][(2*i+1) % N] : 8'sd0;
  end
  assign dot = lvl[L][0];
endmodule
