// axi_mem_model: behavioural AXI4 slave memory for the testbenches.
// Word-addressed array of DEPTH BUS_W-bit words (byte address / (BUS_W/8)).
// Read channel: accepts one INCR burst at a time, returns its beats with
// random gaps (rvalid dropped at random).  Write channel: accepts INCR bursts,
// random awready/wready, one response per burst.  Counts bursts and beats and
// flags any burst that crosses a 4 KiB boundary or is longer than 256 beats.
module axi_mem_model #(
  parameter int unsigned BUS_W = 64,
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned STALL = 1   // 0: no random gaps
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [31:0]        araddr,
  input  logic [7:0]         arlen,
  input  logic               arvalid,
  output logic               arready,
  output logic [BUS_W-1:0]   rdata,
  output logic               rlast,
  output logic               rvalid,
  input  logic               rready,
  input  logic [31:0]        awaddr,
  input  logic [7:0]         awlen,
  input  logic               awvalid,
  output logic               awready,
  input  logic [BUS_W-1:0]   wdata,
  input  logic               wlast,
  input  logic               wvalid,
  output logic               wready,
  output logic [1:0]         bresp,
  output logic               bvalid,
  input  logic               bready
);
  localparam int unsigned BB = BUS_W / 8;
  logic [BUS_W-1:0] mem [DEPTH];
  int rd_bursts = 0, wr_bursts = 0, rd_beats = 0, wr_beats = 0, r_viol = 0, w_viol = 0;
  int violations;
  assign violations = r_viol + w_viol;

  // read side
  logic        r_act;
  logic [31:0] r_addr;
  logic [8:0]  r_left;
  logic        r_gap;
  assign arready = !r_act;
  assign rvalid  = r_act && !r_gap;
  assign rdata   = mem[(r_addr / BB) % DEPTH];
  assign rlast   = (r_left == 1);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_act <= 1'b0; r_left <= '0; r_addr <= '0; r_gap <= 1'b0;
    end else begin
      r_gap <= (STALL != 0) && ($urandom_range(0, 3) == 0);
      if (arvalid && arready) begin
        r_act <= 1'b1; r_addr <= araddr; r_left <= 9'(arlen) + 9'd1;
        rd_bursts <= rd_bursts + 1;
        if ((araddr / 4096) != ((araddr + (32'(arlen) + 1) * BB - 1) / 4096)) r_viol <= r_viol + 1;
      end
      if (rvalid && rready) begin
        rd_beats <= rd_beats + 1;
        r_addr   <= r_addr + BB;
        r_left   <= r_left - 1'b1;
        if (r_left == 1) r_act <= 1'b0;
      end
    end
  end

  // write side
  logic        w_act;
  logic [31:0] w_addr;
  logic        aw_rdy, w_rdy;
  assign awready = !w_act && !bvalid && aw_rdy;
  assign wready  = w_act && w_rdy;
  assign bresp   = 2'b00;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_act <= 1'b0; w_addr <= '0; bvalid <= 1'b0; aw_rdy <= 1'b0; w_rdy <= 1'b0;
    end else begin
      aw_rdy <= (STALL == 0) || ($urandom_range(0, 2) != 0);
      w_rdy  <= (STALL == 0) || ($urandom_range(0, 2) != 0);
      if (awvalid && awready) begin
        w_act <= 1'b1; w_addr <= awaddr; wr_bursts <= wr_bursts + 1;
        if ((awaddr / 4096) != ((awaddr + (32'(awlen) + 1) * BB - 1) / 4096)) w_viol <= w_viol + 1;
      end
      if (wvalid && wready) begin
        mem[(w_addr / BB) % DEPTH] <= wdata;
        w_addr   <= w_addr + BB;
        wr_beats <= wr_beats + 1;
        if (wlast) begin w_act <= 1'b0; bvalid <= 1'b1; end
      end
      if (bvalid && bready) bvalid <= 1'b0;
    end
  end
endmodule
