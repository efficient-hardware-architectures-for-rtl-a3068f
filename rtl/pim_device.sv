// pim_device: the PIM DRAM device: N_BANKS PIM banks on one 64-bit bus.
//
// The DDR4 device of the architecture has 16 banks; the default here is 4
// because lint/elaboration memory grows by about 1.6 GB per full bank.
//
// Every bank computes up to N_CSA LSTM cells in parallel; one bank (any,
// chosen by the host) serves as FC bank for the fully connected layer of the
// previous time step.  Commands carry a bank address; step_start starts the
// one-step sequence in every bank of step_mask at once.  The y(t) of a
// bank is broadcast without a dedicated bus: a YOUT command to bank b puts
// its 2*N_CSA bits on the shared bus (rdata), and a WRB command issued in
// the same cycle with bcast set writes them (byte col_byte of that word) into
// all banks of bcast_mask; the host repeats this for the four bytes.
// rdata is the bus driven by the addressed bank (or by the YOUT bank during
// a broadcast).  Bank count and the bus reuse are the architecture's; the
// broadcast handshake is this design's.
module pim_device
  import pim_pkg::*;
#(
  parameter int unsigned N_BANKS  = 4,
  parameter int unsigned N_CSA    = 16,
  parameter int unsigned MAC_ROWS = 4,
  parameter int unsigned ROWS     = 1024,
  parameter int unsigned COLS     = 1024,
  parameter int unsigned NU       = 5
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  pim_req_t                  req,
  input  logic                      req_valid,
  input  logic [$clog2(N_BANKS)-1:0] bank,
  input  logic [63:0]               wdata,
  output logic [63:0]               rdata,
  // broadcast of y(t): src bank drives YOUT, banks in bcast_mask take WRB
  input  logic                      bcast,
  input  logic [$clog2(N_BANKS)-1:0] bcast_src,
  input  logic [1:0]                bcast_byte,
  input  logic [N_BANKS-1:0]        bcast_mask,
  input  pim_req_t                  bcast_req,    // the WRB command for the receivers
  input  logic [N_BANKS-1:0]        step_mask,
  input  logic                      step_start,
  output logic [N_BANKS-1:0]        step_busy,
  output logic [N_BANKS-1:0]        step_done
);
  logic [63:0] brd [N_BANKS];
  logic [63:0] bus;
  pim_req_t    yout;

  always_comb begin
    yout     = '0;
    yout.cmd = PIM_YOUT;
  end

  assign bus   = bcast ? brd[bcast_src] : brd[bank];
  assign rdata = bus;

  for (genvar b = 0; b < int'(N_BANKS); b++) begin : g_bank
    pim_req_t   br;
    logic       bv;
    logic [63:0] bw;
    always_comb begin
      if (bcast && b == int'(bcast_src)) begin
        br = yout; bv = 1'b1; bw = wdata;
      end else if (bcast && bcast_mask[b]) begin
        br = bcast_req; bv = 1'b1; bw = {56'd0, bus[int'(bcast_byte)*8 +: 8]};
      end else begin
        br = req; bv = req_valid && (b == int'(bank)); bw = wdata;
      end
    end
    pim_bank #(.N_CSA(N_CSA), .MAC_ROWS(MAC_ROWS), .ROWS(ROWS), .COLS(COLS), .NU(NU)) u_bank (
      .clk, .rst_n, .req(br), .req_valid(bv), .wdata(bw), .rdata(brd[b]),
      .step_start(step_start && step_mask[b]), .step_busy(step_busy[b]), .step_done(step_done[b]),
      .y_vec()
    );
  end
endmodule
