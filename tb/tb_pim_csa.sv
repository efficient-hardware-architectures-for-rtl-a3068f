// tb_pim_csa: one column of sub-arrays with its SPU (4 blocks, 4 rows).  For
// each block: column-writes a random binary weight row and a data row, reads
// a word back, latches the weights, opens the data row and transfers the
// five dot-product units to an SPU entry (FC entry 5, done on the last);
// the FC sum must equal the 160-element dot product.  Repeated for all four
// blocks, which checks the block selection of ACT, LATCH, WR, RD and MAC.
module tb_pim_csa;
  import pim_pkg::*;
  localparam int NE = 160;
  logic clk = 0, rst_n = 0, req_valid = 0, wr_sel = 1, bias_sel = 0;
  pim_req_t req;
  logic [7:0] wdata = 0, rdata;
  logic [15:0] bias_data = 0, fc_sum;
  logic [1:0] y;
  logic y_valid, fc_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pim_csa #(.MAC_ROWS(4), .ROWS(4), .COLS(1024)) dut (.*);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic issue(input pim_cmd_e c, input int blk, input int row, input int col, input int unit,
                       input int sel, input bit dn, input logic [7:0] d);
    @(posedge clk); #1;
    req = '0; req.cmd = c; req.blk = 2'(blk); req.row = 10'(row); req.col = 7'(col);
    req.unit = 4'(unit); req.sel = 4'(sel); req.done = dn; wdata = d; req_valid = 1;
    @(posedge clk); #1 req_valid = 0; req = '0;
  endtask
  initial begin
    req = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int b = 0; b < 4; b++) begin
      bit wt [NE];
      int xd [NE], e;
      logic [7:0] wb [NE/4];
      for (int i = 0; i < NE; i++) begin wt[i] = 1'($urandom); xd[i] = $urandom_range(0, 3) - 2; end
      issue(PIM_ACT, b, 0, 0, 0, 0, 0, 0);
      for (int c = 0; c < NE / 4; c++) begin
        for (int j = 0; j < 4; j++) wb[c][2*j +: 2] = {2{wt[4*c+j]}};
        issue(PIM_WR, b, 0, c, 0, 0, 0, wb[c]);
      end
      issue(PIM_ACT, b, 1, 0, 0, 0, 0, 0);
      for (int c = 0; c < NE / 4; c++) begin
        logic [7:0] d;
        for (int j = 0; j < 4; j++) d[2*j +: 2] = 2'(xd[4*c+j]);
        issue(PIM_WR, b, 1, c, 0, 0, 0, d);
      end
      issue(PIM_ACT, b, 0, 0, 0, 0, 0, 0);
      @(posedge clk); #1 req = '0; req.cmd = PIM_RD; req.blk = 2'(b); req.col = 7'd7; req_valid = 1; #1;
      checks++;
      if (rdata !== wb[7]) begin failures++; $display("RD block %0d", b); end
      @(posedge clk); #1 req_valid = 0;
      issue(PIM_LATCH, b, 0, 0, 0, 0, 0, 0);
      issue(PIM_ACT, b, 1, 0, 0, 0, 0, 0);
      for (int u = 0; u < 5; u++) issue(PIM_MAC, b, 0, 0, u, 5, u == 4, 0);
      @(posedge clk); #1;
      e = 0;
      for (int i = 0; i < NE; i++) e += wt[i] ? -xd[i] : xd[i];
      checks++;
      if (int'($signed(fc_sum)) != e) begin failures++; $display("block %0d fc %0d exp %0d", b, $signed(fc_sum), e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
