// tb_output_layer: pixel-labelling mode, NH=4, PE_LSTM=2, W=3, H=2, NO=2.
// Streams two patches of hidden outputs in the hidden layer's order (pixel
// step, direction TL/TR/BL/BR, cell group) with random gaps and a stalling
// consumer, and checks every drained pixel (raster order, bias plus the
// weighted sum over the four directions mapped through the Row offset /
// Column index tables) and the last flag.  The second patch checks the bias
// reset on read-out.
module tb_output_layer;
  import mdlstm_pkg::*;
  localparam int NH = 4, P = 2, W = 3, H = 2, NO = 2, YW = 4, WFW = 8, BFW = 8, ZW = 24;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0, out_ready = 0, wr_en = 0, wr_sel = 0;
  logic in_ready, out_valid, out_last;
  logic [P*YW-1:0] in_y = 0;
  hl_meta_t in_meta;
  logic [NO*ZW-1:0] out_z;
  logic [31:0] wr_idx = 0, wr_data = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  output_layer #(.NH(NH), .PE_LSTM(P), .W(W), .H(H), .NO(NO), .SEGMENT(1'b1),
                 .YW(YW), .WFW(WFW), .BFW(BFW), .ZW(ZW)) dut (.*);
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int wt [NO][4*NH];
  int bs [NO];
  longint expz [$];
  int nout = 0;
  always @(posedge clk) out_ready <= $urandom_range(0, 3) != 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    nout++;
    for (int o = 0; o < NO; o++) begin
      longint e;
      e = expz.pop_front();
      checks++;
      if (longint'($signed(out_z[o*ZW +: ZW])) != e) begin failures++; $display("pix %0d unit %0d got %0d exp %0d", nout, o, $signed(out_z[o*ZW +: ZW]), e); end
    end
    checks++;
    if (out_last != (nout % (W*H) == 0)) failures++;
  end

  task automatic patch();
    int yv [H][W][4][NH];
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) for (int d = 0; d < 4; d++)
      for (int n = 0; n < NH; n++) yv[r][c][d][n] = $urandom_range(0, 15) - 8;
    // reference in raster order
    for (int pr = 0; pr < H; pr++) for (int pc = 0; pc < W; pc++)
      for (int o = 0; o < NO; o++) begin
        longint s;
        s = longint'(bs[o]) <<< 3;
        for (int d = 0; d < 4; d++) begin
          int r, c;
          r = (d & 2) ? H - 1 - pr : pr;
          c = (d & 1) ? W - 1 - pc : pc;
          for (int n = 0; n < NH; n++) s += longint'(yv[r][c][d][n]) * wt[o][d*NH+n];
        end
        expz.push_back(s);
      end
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) for (int d = 0; d < 4; d++)
      for (int g = 0; g < NH / P; g++) begin
        @(posedge clk); #1;
        in_meta = '0;
        in_meta.dir = 2'(d); in_meta.row = 16'(r); in_meta.col = 16'(c); in_meta.grp = 16'(g);
        in_meta.last_grp = (g == NH / P - 1);
        in_meta.last_step = in_meta.last_grp && d == 3 && r == H - 1 && c == W - 1;
        for (int p = 0; p < P; p++) in_y[p*YW +: YW] = YW'(yv[r][c][d][g*P+p]);
        in_valid = 1;
        do @(negedge clk); while (!in_ready);
        @(posedge clk); #1 in_valid = 0;
        if ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
      end
  endtask

  initial begin
    in_meta = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int o = 0; o < NO; o++) begin
      bs[o] = $urandom_range(0, 255) - 128;
      @(posedge clk); #1 wr_en = 1; wr_sel = 1; wr_idx = 32'(o); wr_data = 32'(bs[o]);
      for (int i = 0; i < 4 * NH; i++) begin
        wt[o][i] = $urandom_range(0, 255) - 128;
        @(posedge clk); #1 wr_en = 1; wr_sel = 0; wr_idx = 32'((o << 4) | i); wr_data = 32'(wt[o][i]);
      end
    end
    @(posedge clk); #1 wr_en = 0;
    // reload the biases into the partial sums
    init = 1; @(posedge clk); #1 init = 0;
    patch();
    patch();
    repeat (200) @(posedge clk);
    checks++;
    if (nout != 2 * W * H || expz.size() != 0) begin failures++; $display("nout %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
