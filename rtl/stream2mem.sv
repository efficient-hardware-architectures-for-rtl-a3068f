// stream2mem: DMA write core of the 2D-LSTM accelerator.
//
// On start it takes nwords BUS_W-bit words from its input stream and writes
// them to consecutive addresses from byte address addr through an AXI4
// memory-mapped write channel.  Each word is a single-beat write; address and
// data are offered together and the next word is taken after the write
// response.  done pulses after the last response.  The core's role is the
// architecture's; the single-beat policy is this design's choice.
module stream2mem #(
  parameter int unsigned BUS_W = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        addr,
  input  logic [31:0]        nwords,
  output logic               done,
  output logic               busy,
  // stream in
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [BUS_W-1:0]   in_data,
  // AXI4 write channels
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
  output logic               m_bready
);
  localparam int unsigned BB = BUS_W / 8;
  logic [31:0] left, next_addr;
  logic        wait_b;

  assign m_awlen   = 8'd0;
  assign m_awsize  = 3'($clog2(BB));
  assign m_awburst = 2'b01;
  assign m_wstrb   = '1;
  assign m_wlast   = 1'b1;
  assign m_bready  = wait_b;
  assign in_ready  = busy && !m_awvalid && !m_wvalid && !wait_b && left != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; wait_b <= 1'b0;
      m_awvalid <= 1'b0; m_wvalid <= 1'b0;
      left <= '0; next_addr <= '0; m_awaddr <= '0; m_wdata <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= nwords != 0;
        done      <= nwords == 0;
        left      <= nwords;
        next_addr <= addr;
      end
      if (in_valid && in_ready) begin
        m_awaddr  <= next_addr;
        m_wdata   <= in_data;
        m_awvalid <= 1'b1;
        m_wvalid  <= 1'b1;
        next_addr <= next_addr + BB;
        left      <= left - 1;
      end
      if (m_awvalid && m_awready) m_awvalid <= 1'b0;
      if (m_wvalid && m_wready) m_wvalid <= 1'b0;
      if ((m_awvalid && m_awready && (!m_wvalid || m_wready)) ||
          (m_wvalid && m_wready && (!m_awvalid || m_awready)))
        wait_b <= 1'b1;
      if (m_bvalid && m_bready) begin
        wait_b <= 1'b0;
        if (left == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
