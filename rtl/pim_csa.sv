// pim_csa: one column of MAC sub-arrays (CSA) with its secondary processing
// unit; it computes one LSTM cell (or one FC neuron on the FC bank).
//
// MAC_ROWS sub-arrays share the CSA's 8-bit master bitlines.  A block command
// from the bank addresses the sub-array of block blk: ACT/PRE/LATCH/RD/WR
// act on it directly; WRB writes the same byte into every block named in
// wr_mask (multi-CSL write).  MAC puts dot-product unit `unit` of that sub-array on
// the master bitlines; the value is registered at the secondary sense
// amplifiers (transfer) and added by the SPU in the next cycle, so transfer
// and addition overlap and cost one cycle of latency.  CELL, CLR and BIAS go
// to the SPU.  The hierarchy (sub-arrays per CSA, 8-bit master bitlines, SPU
// at the SSAs) is the architecture's; the register between transfer and add
// is this design's reading of "executed in pipeline manner".
module pim_csa
  import pim_pkg::*;
#(
  parameter int unsigned MAC_ROWS = 4,
  parameter int unsigned ROWS     = 1024,
  parameter int unsigned COLS     = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pim_req_t    req,
  input  logic        req_valid,
  input  logic [7:0]  wdata,      // data for WR / WRB
  input  logic        wr_sel,     // this CSA takes part in a PIM_WR
  input  logic        bias_sel,   // this CSA takes part in a PIM_BIAS
  input  logic [15:0] bias_data,
  output logic [7:0]  rdata,
  output logic [1:0]  y,
  output logic        y_valid,
  output logic [15:0] fc_sum,
  output logic        fc_valid
);
  localparam int unsigned CWD = $clog2(COLS / 8);
  logic [7:0]        sa_rdata [MAC_ROWS];
  logic signed [7:0] sa_mbl   [MAC_ROWS];

  for (genvar b = 0; b < int'(MAC_ROWS); b++) begin : g_sa
    logic mine;
    assign mine = req_valid && (int'(req.blk) == b);
    pim_subarray #(.ROWS(ROWS), .COLS(COLS)) u_sa (
      .clk,
      .act(mine && req.cmd == PIM_ACT), .row($clog2(ROWS)'(req.row)),
      .latch_en(mine && req.cmd == PIM_LATCH),
      .col(CWD'(req.col)),
      .wr((mine && req.cmd == PIM_WR && wr_sel) || (req_valid && req.cmd == PIM_WRB && req.wr_mask[b])),
      .wdata,
      .rdata(sa_rdata[b]), .unit_sel(req.unit), .mbl(sa_mbl[b])
    );
  end
  assign rdata = sa_rdata[req.blk];

  // transfer register at the SSAs
  logic              t_valid, t_done;
  logic [3:0]        t_sel;
  logic signed [7:0] t_dot;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t_valid <= 1'b0;
    else t_valid <= req_valid && req.cmd == PIM_MAC;
  end
  always_ff @(posedge clk) begin
    t_dot  <= sa_mbl[req.blk];
    t_sel  <= req.sel;
    t_done <= req.done;
  end

  pim_spu u_spu (
    .clk, .rst_n,
    .in_valid(t_valid), .in_dot(t_dot), .sel(t_sel), .done(t_done),
    .bias_we(req_valid && req.cmd == PIM_BIAS && bias_sel), .bias_sel(req.sel), .bias_data,
    .cell_go(req_valid && req.cmd == PIM_CELL), .c_clr(req_valid && req.cmd == PIM_CLR),
    .y, .y_valid, .fc_sum, .fc_valid
  );
endmodule
