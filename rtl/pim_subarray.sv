// pim_subarray: one MAC-enabled DRAM sub-array of the PIM engine.
//
// ROWS x COLS DRAM cells with COLS primary sense amplifiers (PSA).  ACT senses
// a row into the PSAs (the open row); WR writes an 8-bit column word of the
// open row (and the cells behind it); RD returns one.  LATCH closes the
// isolation switches so that the shadow latches (SHL) take the sensed row:
// this is how a weight row is parked while data rows are activated.  UNITS
// dot-product units sit behind the PSAs, unit u on columns u*2N .. u*2N+2N-1:
// weights from the SHLs, data from the PSAs.  In compute mode the column
// select lines pick one unit's 8-bit result onto the 8-bit master bitlines
// (mbl).  Storage layout (architecture): a weight row and its data rows
// share the columns; each 1-bit weight is stored in both columns of its
// 2-bit data element.
// The cells and sense amplifiers are analog circuits; here they are a memory
// array and a row register (one clock per operation, no charge-sharing or
// precharge timing).  The dot-product units are combinational as in the
// design, so mbl follows unit_sel in the same cycle.
module pim_subarray #(
  parameter int unsigned ROWS  = 1024,
  parameter int unsigned COLS  = 1024,
  parameter int unsigned UNITS = 16,
  parameter int unsigned N     = 32
) (
  input  logic                          clk,
  input  logic                          act,
  input  logic [$clog2(ROWS)-1:0]       row,
  input  logic                          latch_en,
  input  logic [$clog2(COLS/8)-1:0]     col,
  input  logic                          wr,
  input  logic [7:0]                    wdata,
  output logic [7:0]                    rdata,
  input  logic [$clog2(UNITS)-1:0]      unit_sel,
  output logic signed [7:0]             mbl
);
  logic [COLS-1:0] cells [ROWS];
  logic [COLS-1:0] psa;
  logic [COLS-1:0] shl;
  logic [$clog2(ROWS)-1:0] open_row;

  initial assert (UNITS * 2 * N <= COLS) else $error("dot-product units exceed the sub-array width");

  always_ff @(posedge clk) begin
    if (act) begin
      psa      <= cells[row];
      open_row <= row;
    end else begin
      if (wr) begin
        psa[col*8 +: 8]             <= wdata;
        cells[open_row][col*8 +: 8] <= wdata;
      end
    end
    if (latch_en) shl <= psa;
  end
  assign rdata = psa[col*8 +: 8];

  logic signed [7:0] dots [UNITS];
  for (genvar u = 0; u < int'(UNITS); u++) begin : g_unit
    pim_dot_unit #(.N(N)) u_dot (.w(shl[u*2*N +: 2*N]), .d(psa[u*2*N +: 2*N]), .dot(dots[u]));
  end
  assign mbl = dots[unit_sel];
endmodule
