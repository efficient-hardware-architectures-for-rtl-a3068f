// ctrl_slave: AXI4-Lite control slave of the 2D-LSTM accelerator.
//
// Register map (byte addresses, region = addr[31:28]):
//   region 0: 0x00 control/status (write bit0 = start; read bit0 = busy,
//             bit1 = done, sticky until the next start), 0x04 source address,
//             0x08 destination address, 0x0C input words, 0x10 output words.
//   region 1..4: parameter window, one element per 32-bit write at element
//             index addr[27:2]: 1 = LSTM weights, 2 = LSTM biases,
//             3 = FC weights, 4 = FC biases (index layout in hidden_layer and
//             output_layer).  Parameter writes are forwarded as one-cycle
//             pulses on prm_*; reads of the window return 0.
// A write is accepted when address and data are both valid; one response is
// outstanding at a time.  The accelerator's host interface exists in the
// architecture only by name; this register map is this design's.
module ctrl_slave (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic [31:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [31:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // to the accelerator
  output logic        start,
  output logic [31:0] src_addr,
  output logic [31:0] dst_addr,
  output logic [31:0] n_in,
  output logic [31:0] n_out,
  input  logic        busy,
  input  logic        done_pulse,
  output logic        prm_en,
  output logic [2:0]  prm_region,
  output logic [31:0] prm_idx,
  output logic [31:0] prm_data
);
  logic wr, done_flag;
  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr        = s_awready;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_arready = !s_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid <= 1'b0; s_rvalid <= 1'b0; s_rdata <= '0;
      start <= 1'b0; done_flag <= 1'b0;
      src_addr <= '0; dst_addr <= '0; n_in <= '0; n_out <= '0;
      prm_en <= 1'b0; prm_region <= '0; prm_idx <= '0; prm_data <= '0;
    end else begin
      start  <= 1'b0;
      prm_en <= 1'b0;
      if (done_pulse) done_flag <= 1'b1;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr) begin
        s_bvalid <= 1'b1;
        if (s_awaddr[31:28] == 4'd0) begin
          unique case (s_awaddr[7:0])
            8'h00: if (s_wdata[0]) begin start <= 1'b1; done_flag <= 1'b0; end
            8'h04: src_addr <= s_wdata;
            8'h08: dst_addr <= s_wdata;
            8'h0C: n_in     <= s_wdata;
            8'h10: n_out    <= s_wdata;
            default: ;
          endcase
        end else begin
          prm_en     <= 1'b1;
          prm_region <= s_awaddr[30:28];
          prm_idx    <= {6'd0, s_awaddr[27:2]};
          prm_data   <= s_wdata;
        end
      end
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        if (s_araddr[31:28] != 4'd0) s_rdata <= '0;
        else unique case (s_araddr[7:0])
          8'h00: s_rdata <= {30'd0, done_flag, busy};
          8'h04: s_rdata <= src_addr;
          8'h08: s_rdata <= dst_addr;
          8'h0C: s_rdata <= n_in;
          8'h10: s_rdata <= n_out;
          default: s_rdata <= '0;
        endcase
      end
    end
  end
endmodule
