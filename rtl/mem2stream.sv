// mem2stream: DMA read core of the 2D-LSTM accelerator.
//
// On start it reads nwords BUS_W-bit words from byte address addr through an
// AXI4 memory-mapped read channel and forwards the read data as a stream.
// Reads are INCR bursts of up to MAX_BURST beats that never cross a 4 KiB
// boundary; one burst is outstanding at a time.  rready follows the stream's
// out_ready, so the stream back-pressures the bus.  done pulses after the
// last beat.  The core's role is the architecture's; the burst policy is this
// design's choice.  addr must be aligned to the bus width.
module mem2stream #(
  parameter int unsigned BUS_W     = 64,
  parameter int unsigned MAX_BURST = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [31:0]      addr,
  input  logic [31:0]      nwords,
  output logic             done,
  output logic             busy,
  // AXI4 read address / data channels
  output logic [31:0]      m_araddr,
  output logic [7:0]       m_arlen,
  output logic [2:0]       m_arsize,
  output logic [1:0]       m_arburst,
  output logic             m_arvalid,
  input  logic             m_arready,
  input  logic [BUS_W-1:0] m_rdata,
  input  logic             m_rlast,
  input  logic             m_rvalid,
  output logic             m_rready,
  // stream out
  output logic             out_valid,
  input  logic             out_ready,
  output logic [BUS_W-1:0] out_data
);
  localparam int unsigned BB = BUS_W / 8;          // bytes per beat
  logic [31:0] next_addr, left, beats;
  logic        in_burst;

  always_comb begin
    logic [31:0] to4k;
    to4k  = (32'd4096 - 32'(next_addr[11:0])) / BB;
    beats = (left < MAX_BURST) ? left : 32'(MAX_BURST);
    if (to4k < beats) beats = to4k;
  end

  assign m_arsize  = 3'($clog2(BB));
  assign m_arburst = 2'b01;
  assign out_valid = m_rvalid && in_burst;
  assign out_data  = m_rdata;
  assign m_rready  = out_ready && in_burst;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      in_burst  <= 1'b0;
      m_arvalid <= 1'b0;
      done      <= 1'b0;
      left      <= '0;
      next_addr <= '0;
      m_araddr  <= '0;
      m_arlen   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= nwords != 0;
        done      <= nwords == 0;
        left      <= nwords;
        next_addr <= addr;
      end else if (busy) begin
        if (!m_arvalid && !in_burst) begin
          m_arvalid <= 1'b1;
          m_araddr  <= next_addr;
          m_arlen   <= 8'(beats - 1);
          next_addr <= next_addr + beats * BB;
          left      <= left - beats;
        end
        if (m_arvalid && m_arready) begin
          m_arvalid <= 1'b0;
          in_burst  <= 1'b1;
        end
        if (m_rvalid && m_rready && m_rlast) begin
          in_burst <= 1'b0;
          if (left == 0) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end
endmodule
