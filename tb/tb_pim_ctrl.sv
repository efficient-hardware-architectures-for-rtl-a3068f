// tb_pim_ctrl: runs two steps of the PIM control sequence and checks the
// command stream cycle by cycle: per gate g ACT(weight row, block g),
// LATCH, ACT(data row), MAC units 0..NU-1 into entry g with done on the last;
// then two idle cycles and CELL together with the done pulse; busy
// throughout; start ignored while busy.
module tb_pim_ctrl;
  import pim_pkg::*;
  localparam int NU = 5;
  logic clk = 0, rst_n = 0, start = 0, busy, done, req_valid;
  pim_req_t req;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pim_ctrl #(.NU(NU), .W_ROW(0), .D_ROW(1)) dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic expect_cmd(input pim_cmd_e c, input int blk, input int row, input int unit, input bit dn);
    @(posedge clk); #1;
    checks++;
    if (!req_valid || req.cmd != c || (c != PIM_CELL && int'(req.blk) != blk) || (c == PIM_ACT && int'(req.row) != row)
        || (c == PIM_MAC && (int'(req.unit) != unit || int'(req.sel) != blk || req.done != dn)) || !busy) begin
      failures++; $display("cmd %s blk %0d row %0d unit %0d done %0d; exp %s", req.cmd.name(), req.blk, req.row, req.unit, req.done, c.name());
    end
  endtask
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
      for (int g = 0; g < 4; g++) begin
        if (g == 0) begin
          checks++;
          if (!req_valid || req.cmd != PIM_ACT || req.row != 0) failures++;
          start = 1;   // ignored while busy
        end else expect_cmd(PIM_ACT, g, 0, 0, 0);
        expect_cmd(PIM_LATCH, g, 0, 0, 0);
        start = 0;
        expect_cmd(PIM_ACT, g, 1, 0, 0);
        for (int u = 0; u < NU; u++) expect_cmd(PIM_MAC, g, 0, u, u == NU - 1);
      end
      repeat (2) begin
        @(posedge clk); #1; checks++; if (req_valid || !busy) failures++;
      end
      expect_cmd(PIM_CELL, 0, 0, 0, 0);
      @(posedge clk); #1;
      checks++;
      if (!done || busy || req_valid) failures++;
      @(posedge clk); #1;
      checks++;
      if (done) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
