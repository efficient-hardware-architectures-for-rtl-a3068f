// tb_pim_subarray: a 16-row sub-array (full 1024-bit width, 16 units).
// Writes random rows through the column interface, reads them back after
// re-activation, then copies a weight row into the shadow latches, opens a
// data row and checks the dot product of every unit on the MBL; finally
// checks that re-opening another row leaves the latched weights unchanged.
module tb_pim_subarray;
  localparam int ROWS = 16, COLS = 1024, UNITS = 16, N = 32;
  logic clk = 0, act = 0, latch_en = 0, wr = 0;
  logic [3:0] row = 0, unit_sel = 0;
  logic [6:0] col = 0;
  logic [7:0] wdata = 0, rdata;
  logic signed [7:0] mbl;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pim_subarray #(.ROWS(ROWS), .COLS(COLS), .UNITS(UNITS), .N(N)) dut (.*);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [COLS-1:0] img [ROWS];
  task automatic open_row(input int r);
    @(posedge clk); #1 act = 1; row = 4'(r); @(posedge clk); #1 act = 0;
  endtask
  task automatic check_dots(input int wr_row, input int dr);
    for (int u = 0; u < UNITS; u++) begin
      int e;
      unit_sel = 4'(u); #1;
      e = 0;
      for (int j = 0; j < N; j++)
        e += (img[wr_row][u*2*N + 2*j] ? -1 : 1) * int'($signed(img[dr][u*2*N + 2*j +: 2]));
      checks++;
      if (int'(mbl) != e) begin failures++; $display("unit %0d mbl %0d exp %0d", u, mbl, e); end
    end
  endtask
  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int b = 0; b < COLS; b += 2) begin
        logic [1:0] v;
        v = 2'($urandom);
        img[r][b +: 2] = (r == 0 || r == 3) ? {2{v[0]}} : v;   // rows 0, 3: weights
      end
      open_row(r);
      for (int c = 0; c < COLS / 8; c++) begin
        @(posedge clk); #1 wr = 1; col = 7'(c); wdata = img[r][c*8 +: 8];
      end
      @(posedge clk); #1 wr = 0;
    end
    for (int r = 0; r < 4; r++) begin
      open_row(r);
      for (int c = 0; c < COLS / 8; c++) begin
        col = 7'(c); #1;
        checks++;
        if (rdata !== img[r][c*8 +: 8]) begin failures++; $display("row %0d col %0d", r, c); end
      end
    end
    open_row(0);
    @(posedge clk); #1 latch_en = 1; @(posedge clk); #1 latch_en = 0;
    open_row(1);
    check_dots(0, 1);
    open_row(2);
    check_dots(0, 2);
    open_row(3);
    @(posedge clk); #1 latch_en = 1; @(posedge clk); #1 latch_en = 0;
    open_row(1);
    check_dots(3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
