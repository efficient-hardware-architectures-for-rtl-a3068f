// pim_bank: one DRAM bank enhanced with LSTM computation (PIM bank).
//
// N_CSA columns of sub-arrays (one LSTM cell each) receive the same block
// command, since wordlines and control lines are shared along a block.  The
// 64-bit bank interface (shared data bus of the device) carries:
//   RD    8 bytes, one from each of the 8 CSAs of half `half`
//   WR    8 bytes, one into each of those CSAs
//   WRB   byte 0 into every CSA, in all blocks of wr_mask (multi-CSL write)
//   BIAS  SPU bias of entry sel in CSA col[3:0], value in bits [15:0]
//   YOUT  the bank's y(t): 2 bits per CSA in bits [2*N_CSA-1:0]
//   FCRD  the FC sums of CSAs 4*col[1:0] .. 4*col[1:0]+3, 16 bits each
// The PIM control logic (pim_ctrl) runs one LSTM time step on step_start and
// owns the command path while busy; otherwise commands come from outside.
// Read data (RD, YOUT, FCRD) is valid in the cycle of the command.
// Structure from the architecture; the command set and data placement are
// this design's.
module pim_bank
  import pim_pkg::*;
#(
  parameter int unsigned N_CSA    = 16,
  parameter int unsigned MAC_ROWS = 4,
  parameter int unsigned ROWS     = 1024,
  parameter int unsigned COLS     = 1024,
  parameter int unsigned NU       = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pim_req_t    req,
  input  logic        req_valid,
  input  logic [63:0] wdata,
  output logic [63:0] rdata,
  input  logic        step_start,
  output logic        step_busy,
  output logic        step_done,
  output logic [2*N_CSA-1:0] y_vec
);
  pim_req_t   creq, r;
  logic       cvalid, rv;
  pim_ctrl #(.NU(NU)) u_ctrl (
    .clk, .rst_n, .start(step_start), .busy(step_busy), .done(step_done),
    .req(creq), .req_valid(cvalid)
  );
  assign r  = step_busy ? creq : req;
  assign rv = step_busy ? cvalid : req_valid;

  logic [7:0]  rd8 [N_CSA];
  logic [15:0] fcs [N_CSA];
  for (genvar k = 0; k < int'(N_CSA); k++) begin : g_csa
    logic [7:0] wd;
    logic       ws;
    assign ws = (k / 8) == int'(r.half);
    assign wd = (r.cmd == PIM_WRB) ? wdata[7:0] : wdata[(k % 8)*8 +: 8];
    pim_csa #(.MAC_ROWS(MAC_ROWS), .ROWS(ROWS), .COLS(COLS)) u_csa (
      .clk, .rst_n, .req(r), .req_valid(rv), .wdata(wd), .wr_sel(ws),
      .bias_sel(int'(r.col[3:0]) == k), .bias_data(wdata[15:0]),
      .rdata(rd8[k]), .y(y_vec[2*k +: 2]), .y_valid(),
      .fc_sum(fcs[k]), .fc_valid()
    );
  end

  always_comb begin
    rdata = '0;
    unique case (r.cmd)
      PIM_RD:   for (int k = 0; k < 8; k++) rdata[k*8 +: 8] = rd8[(int'(r.half) * 8 + k) % N_CSA];
      PIM_YOUT: rdata[2*N_CSA-1:0] = y_vec;
      PIM_FCRD: for (int k = 0; k < 4; k++) rdata[k*16 +: 16] = fcs[(int'(r.col[1:0]) * 4 + k) % N_CSA];
      default: ;
    endcase
  end
endmodule
