// mdlstm_accel: the 2D-LSTM (MD-LSTM) inference accelerator.
//
// Data path (all links are valid/ready streams):
//   Mem2Stream (AXI4 read) -> input Data Width Converter (SIMD_INPUT = C)
//   -> 2D-LSTM Hidden Layer -> Output Layer -> SoftMax (arg-max)
//   -> output Data Width Converter -> Stream2Mem (AXI4 write).
// The hidden layer's outputs also go through the X- and Y-axis recurrent
// width converters into the X-axis buffer (4 direction-steps, previous
// column) and the Y-axis buffer (4*W direction-steps, previous row), which
// feed the recurrent inputs back.
// The host writes the parameters and the run registers through the AXI4-Lite
// slave (see ctrl_slave) and sets bit 0 of register 0x00.  A run reads
// n_in input words: the pixels of one or more patches/images, C elements of
// XW bits each, already interleaved by scan direction (for each pixel step:
// top-left, top-right, bottom-left, bottom-right origin).  It writes n_out
// words of labels: one label per pixel (SEGMENT = 1) or per image
// (SEGMENT = 0).  status bit 1 (done) is set after the last label word.
// Defaults are the document-binarisation configuration (C=3, NH=40, NO=2,
// 64x64 patches, 8/4,8/4/8,8 bits, PE_LSTM=1, SIMD = FULL).
module mdlstm_accel
  import mdlstm_pkg::*;
#(
  parameter int unsigned BUS_W   = 64,
  parameter int unsigned C       = 3,
  parameter int unsigned NH      = 40,
  parameter int unsigned W       = 64,
  parameter int unsigned H       = 64,
  parameter int unsigned NO      = 2,
  parameter bit          SEGMENT = 1'b1,
  parameter int unsigned PE_LSTM = 1,
  parameter int unsigned XW      = 8,
  parameter int unsigned WW      = 4,
  parameter int unsigned BW      = 8,
  parameter int unsigned YW      = 4,
  parameter int unsigned WFW     = 8,
  parameter int unsigned BFW     = 8,
  parameter int unsigned CW      = 16,
  parameter int unsigned ZW      = 24
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave (AXI_MEM_SLAVE)
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
  // AXI4 read master (Mem2Stream)
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
  // AXI4 write master (Stream2Mem)
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
  // observation of the mechanisms
  output logic               obs_hazard_stall,
  output logic               obs_drain
);
  localparam int unsigned LW  = (NO > 1) ? $clog2(NO) : 1;
  localparam int unsigned RWW = NH * (YW + CW);

  // ---------------- control ----------------
  logic        start, rd_done, rd_busy, wr_done, wr_busy;
  logic [31:0] src_addr, dst_addr, n_in, n_out;
  logic        prm_en;
  logic [2:0]  prm_region;
  logic [31:0] prm_idx, prm_data;

  ctrl_slave u_ctrl (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .start, .src_addr, .dst_addr, .n_in, .n_out,
    .busy(rd_busy || wr_busy), .done_pulse(wr_done),
    .prm_en, .prm_region, .prm_idx, .prm_data
  );

  // ---------------- input path ----------------
  logic             m2s_valid, m2s_ready;
  logic [BUS_W-1:0] m2s_data;
  mem2stream #(.BUS_W(BUS_W)) u_m2s (
    .clk, .rst_n, .start, .addr(src_addr), .nwords(n_in), .done(rd_done), .busy(rd_busy),
    .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rdata, .m_rlast, .m_rvalid, .m_rready,
    .out_valid(m2s_valid), .out_ready(m2s_ready), .out_data(m2s_data)
  );

  logic              x_valid, x_ready;
  logic [C*XW-1:0]   x_data;
  dwc_in #(.BUS_W(BUS_W), .ELEM_W(XW), .OUT_N(C)) u_dwc_in (
    .clk, .rst_n, .restart(start),
    .in_valid(m2s_valid), .in_ready(m2s_ready), .in_data(m2s_data),
    .out_valid(x_valid), .out_ready(x_ready), .out_data(x_data)
  );

  // ---------------- hidden layer + recurrent paths ----------------
  logic                  rx_pop, ry_pop, rxw_en, ryw_en;
  logic [RWW-1:0]        rx_data, ry_data, rxw_data, ryw_data;
  logic                  h_valid, h_ready, h_fire;
  logic [PE_LSTM*YW-1:0] h_y;
  logic [PE_LSTM*CW-1:0] h_c;
  hl_meta_t              h_meta;

  hidden_layer #(
    .C(C), .NH(NH), .W(W), .H(H), .PE_LSTM(PE_LSTM),
    .XW(XW), .WW(WW), .BW(BW), .YW(YW), .CW(CW)
  ) u_hidden (
    .clk, .rst_n, .restart(start),
    .x_valid, .x_ready, .x_data,
    .rx_data, .rx_pop, .ry_data, .ry_pop,
    .out_valid(h_valid), .out_ready(h_ready), .out_y(h_y), .out_c(h_c), .out_meta(h_meta),
    .wr_en(prm_en && (prm_region == 3'd1 || prm_region == 3'd2)),
    .wr_sel(prm_region == 3'd2), .wr_idx(prm_idx), .wr_data(prm_data),
    .hazard_stall(obs_hazard_stall)
  );
  assign h_fire = h_valid && h_ready;

  rec_dwc #(.NH(NH), .PE(PE_LSTM), .YW(YW), .CW(CW)) u_rdwc_x (
    .clk, .in_fire(h_fire), .in_grp(h_meta.grp), .in_last(h_meta.last_grp),
    .in_y(h_y), .in_c(h_c), .wr_en(rxw_en), .wr_data(rxw_data)
  );
  rec_dwc #(.NH(NH), .PE(PE_LSTM), .YW(YW), .CW(CW)) u_rdwc_y (
    .clk, .in_fire(h_fire), .in_grp(h_meta.grp), .in_last(h_meta.last_grp),
    .in_y(h_y), .in_c(h_c), .wr_en(ryw_en), .wr_data(ryw_data)
  );
  rec_buffer #(.DEPTH(4), .WIDTH(RWW)) u_xbuf (
    .clk, .rst_n, .restart(start), .wr_en(rxw_en), .wr_data(rxw_data), .pop(rx_pop), .rd_data(rx_data)
  );
  rec_buffer #(.DEPTH(4 * W), .WIDTH(RWW)) u_ybuf (
    .clk, .rst_n, .restart(start), .wr_en(ryw_en), .wr_data(ryw_data), .pop(ry_pop), .rd_data(ry_data)
  );

  // ---------------- output path ----------------
  logic             z_valid, z_ready, z_last;
  logic [NO*ZW-1:0] z;
  output_layer #(
    .NH(NH), .PE_LSTM(PE_LSTM), .W(W), .H(H), .NO(NO), .SEGMENT(SEGMENT),
    .YW(YW), .WFW(WFW), .BFW(BFW), .ZW(ZW)
  ) u_out (
    .clk, .rst_n, .init(start),
    .in_valid(h_valid), .in_ready(h_ready), .in_y(h_y), .in_meta(h_meta),
    .out_valid(z_valid), .out_ready(z_ready), .out_z(z), .out_last(z_last),
    .wr_en(prm_en && (prm_region == 3'd3 || prm_region == 3'd4)),
    .wr_sel(prm_region == 3'd4), .wr_idx(prm_idx), .wr_data(prm_data)
  );
  assign obs_drain = z_valid;

  logic          l_valid, l_ready, l_last;
  logic [LW-1:0] l_label;
  softmax_argmax #(.NO(NO), .ZW(ZW)) u_softmax (
    .clk, .rst_n, .in_valid(z_valid), .in_ready(z_ready), .in_z(z), .in_last(z_last),
    .out_valid(l_valid), .out_ready(l_ready), .out_label(l_label), .out_last(l_last)
  );

  logic             o_valid, o_ready;
  logic [BUS_W-1:0] o_data;
  dwc_out #(.BUS_W(BUS_W), .LBL_W(LW)) u_dwc_out (
    .clk, .rst_n, .in_valid(l_valid), .in_ready(l_ready), .in_label(l_label), .in_last(l_last),
    .out_valid(o_valid), .out_ready(o_ready), .out_data(o_data)
  );

  stream2mem #(.BUS_W(BUS_W)) u_s2m (
    .clk, .rst_n, .start, .addr(dst_addr), .nwords(n_out), .done(wr_done), .busy(wr_busy),
    .in_valid(o_valid), .in_ready(o_ready), .in_data(o_data),
    .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready, .m_bresp, .m_bvalid, .m_bready
  );

  logic unused;
  assign unused = rd_done;
endmodule
