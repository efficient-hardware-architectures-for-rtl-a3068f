// lstm_accel_top: the two LSTM inference engines side by side.
//
//  * mdlstm_accel - FPGA-style 2D-LSTM (MD-LSTM) accelerator: pixel-by-pixel
//    processing of 64x64 patches in four scan directions with an output layer
//    for pixel labelling, connected by AXI4-Lite (control, parameters) and
//    two AXI4 masters (input pixels, output labels).
//  * pim_device  - binary 1D-LSTM engine inside a DRAM device: dot products
//    next to the sense amplifiers, per-column secondary processing units,
//    command-driven through a DRAM-like request port and a 64-bit bus.
// The two share only clock and reset; every port of each is brought out.
module lstm_accel_top
  import pim_pkg::*;
#(
  parameter int unsigned BUS_W   = 64,
  parameter int unsigned C       = 3,       // 2D-LSTM: input channels
  parameter int unsigned NH      = 40,      // 2D-LSTM: hidden cells
  parameter int unsigned W       = 64,      // 2D-LSTM: patch width
  parameter int unsigned H       = 64,      // 2D-LSTM: patch height
  parameter int unsigned NO      = 2,       // 2D-LSTM: output units
  parameter int unsigned PE_LSTM = 1,       // 2D-LSTM: hidden-layer PEs
  parameter int unsigned N_BANKS = 4,       // PIM: banks (see pim_device)
  parameter int unsigned N_CSA   = 16,      // PIM: LSTM cells per bank
  parameter int unsigned ROWS    = 1024    // DRAM rows per sub-array
) (
  input  logic               clk,
  input  logic               rst_n,
  // ---- 2D-LSTM accelerator ----
  input  logic [31:0]        s_awaddr,
  input  logic               s_awvalid,
  output logic               s_awready,
  input  logic [31:0]        s_wdata,
  input  logic               s_wvalid,
  output logic               s_wready,
  output logic [1:0]         s_bresp,
  output logic               s_bvalid,
  input  logic               s_bready,
  input  logic [31:0]        s_araddr,
  input  logic               s_arvalid,
  output logic               s_arready,
  output logic [31:0]        s_rdata,
  output logic [1:0]         s_rresp,
  output logic               s_rvalid,
  input  logic               s_rready,
  output logic [31:0]        m_araddr,
  output logic [7:0]         m_arlen,
  output logic [2:0]         m_arsize,
  output logic [1:0]         m_arburst,
  output logic               m_arvalid,
  input  logic               m_arready,
  input  logic [BUS_W-1:0]   m_rdata,
  input  logic               m_rlast,
  input  logic               m_rvalid,
  output logic               m_rready,
  output logic [31:0]        m_awaddr,
  output logic [7:0]         m_awlen,
  output logic [2:0]         m_awsize,
  output logic [1:0]         m_awburst,
  output logic               m_awvalid,
  input  logic               m_awready,
  output logic [BUS_W-1:0]   m_wdata,
  output logic [BUS_W/8-1:0] m_wstrb,
  output logic               m_wlast,
  output logic               m_wvalid,
  input  logic               m_wready,
  input  logic [1:0]         m_bresp,
  input  logic               m_bvalid,
  output logic               m_bready,
  output logic               obs_hazard_stall,
  output logic               obs_drain,
  // ---- DRAM PIM device ----
  input  pim_req_t                   pim_req,
  input  logic                       pim_req_valid,
  input  logic [$clog2(N_BANKS)-1:0] pim_bank,
  input  logic [63:0]                pim_wdata,
  output logic [63:0]                pim_rdata,
  input  logic                       pim_bcast,
  input  logic [$clog2(N_BANKS)-1:0] pim_bcast_src,
  input  logic [1:0]                 pim_bcast_byte,
  input  logic [N_BANKS-1:0]         pim_bcast_mask,
  input  pim_req_t                   pim_bcast_req,
  input  logic [N_BANKS-1:0]         pim_step_mask,
  input  logic                       pim_step_start,
  output logic [N_BANKS-1:0]         pim_step_busy,
  output logic [N_BANKS-1:0]         pim_step_done
);
  mdlstm_accel #(
    .BUS_W(BUS_W), .C(C), .NH(NH), .W(W), .H(H), .NO(NO), .PE_LSTM(PE_LSTM)
  ) u_mdlstm (.*);

  pim_device #(.N_BANKS(N_BANKS), .N_CSA(N_CSA), .ROWS(ROWS)) u_pim (
    .clk, .rst_n, .req(pim_req), .req_valid(pim_req_valid), .bank(pim_bank),
    .wdata(pim_wdata), .rdata(pim_rdata), .bcast(pim_bcast), .bcast_src(pim_bcast_src),
    .bcast_byte(pim_bcast_byte), .bcast_mask(pim_bcast_mask), .bcast_req(pim_bcast_req),
    .step_mask(pim_step_mask), .step_start(pim_step_start), .step_busy(pim_step_busy),
    .step_done(pim_step_done)
  );
endmodule
