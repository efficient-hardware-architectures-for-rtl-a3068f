// tb_hidden_layer: runs two small patches through the hidden layer with the
// X-/Y-axis converters and buffers, random weights, biases and pixels and a
// randomly stalling consumer, and compares every y and c with a reference
// computed in the testbench for all four scan directions.  It also checks
// the meta data (direction, position, group), that each direction-step
// takes NH/PE_LSTM cycles when nothing stalls, and that a restart returns
// to the patch origin.
module tb_hidden_layer;
  import mdlstm_pkg::*;
  import mdlstm_ref::*;
  localparam int C = 2, NH = 4, W = 3, H = 2, P = 2, XW = 8, WW = 4, BW = 8, YW = 4, CW = 16;
  localparam int NIN = C + 2 * NH, IW = $clog2(NIN), RWW = NH * (YW + CW);

  logic clk = 0, rst_n = 0, restart = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic x_valid, x_ready;
  logic [C*XW-1:0] x_data;
  logic [RWW-1:0] rx_data, ry_data, rxw, ryw;
  logic rx_pop, ry_pop, rxw_en, ryw_en;
  logic out_valid, out_ready;
  logic [P*YW-1:0] out_y;
  logic [P*CW-1:0] out_c;
  hl_meta_t out_meta;
  logic wr_en = 0, wr_sel = 0;
  logic [31:0] wr_idx = 0, wr_data = 0;
  logic hz;

  hidden_layer #(.C(C), .NH(NH), .W(W), .H(H), .PE_LSTM(P), .XW(XW), .WW(WW), .BW(BW), .YW(YW), .CW(CW)) dut (
    .clk, .rst_n, .restart, .x_valid, .x_ready, .x_data, .rx_data, .rx_pop, .ry_data, .ry_pop,
    .out_valid, .out_ready, .out_y, .out_c, .out_meta, .wr_en, .wr_sel, .wr_idx, .wr_data, .hazard_stall(hz));
  rec_dwc #(.NH(NH), .PE(P), .YW(YW), .CW(CW)) dx (.clk, .in_fire(out_valid && out_ready), .in_grp(out_meta.grp),
    .in_last(out_meta.last_grp), .in_y(out_y), .in_c(out_c), .wr_en(rxw_en), .wr_data(rxw));
  rec_dwc #(.NH(NH), .PE(P), .YW(YW), .CW(CW)) dy (.clk, .in_fire(out_valid && out_ready), .in_grp(out_meta.grp),
    .in_last(out_meta.last_grp), .in_y(out_y), .in_c(out_c), .wr_en(ryw_en), .wr_data(ryw));
  rec_buffer #(.DEPTH(4), .WIDTH(RWW)) bx (.clk, .rst_n, .restart, .wr_en(rxw_en), .wr_data(rxw), .pop(rx_pop), .rd_data(rx_data));
  rec_buffer #(.DEPTH(4*W), .WIDTH(RWW)) by (.clk, .rst_n, .restart, .wr_en(ryw_en), .wr_data(ryw), .pop(ry_pop), .rd_data(ry_data));

  // model parameters and data
  int wq [NH][5][NIN];
  int bq [NH][5];
  int img [H][W][C];
  int yref [4][H][W][NH];
  int cref [4][H][W][NH];

  function automatic int sx(int v, int n); return (v << (32 - n)) >>> (32 - n); endfunction

  task automatic compute_ref();
    for (int d = 0; d < 4; d++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          int gr, gc;
          gr = ((d & 2) != 0) ? H - 1 - r : r;
          gc = ((d & 1) != 0) ? W - 1 - c : c;
          for (int n = 0; n < NH; n++) begin
            int act [5];
            longint t, yt;
            int cx, cy, cc, th;
            for (int g = 0; g < 5; g++) begin
              longint acc;
              acc = longint'(bq[n][g]) <<< (11 - 7);
              for (int i = 0; i < C; i++) acc += longint'(img[gr][gc][i]) * wq[n][g][i];
              for (int i = 0; i < NH; i++) begin
                acc += longint'((c > 0) ? yref[d][r][c-1][i] : 0) * wq[n][g][C+i] <<< 5;
                acc += longint'((r > 0) ? yref[d][r-1][c][i] : 0) * wq[n][g][C+NH+i] <<< 5;
              end
              act[g] = (g == 0) ? tanh8(clampi(acc >>> 7, -128, 127)) : sig8(clampi(acc >>> 7, -128, 127));
            end
            cx = (c > 0) ? cref[d][r][c-1][n] : 0;
            cy = (r > 0) ? cref[d][r-1][c][n] : 0;
            t  = (longint'(act[2]) * cx + longint'(act[3]) * cy + longint'(act[0]) * act[1]) >>> 8;
            cc = clampi(t, -32768, 32767);
            th = tanh8(clampi(cc >>> 3, -128, 127));
            yt = longint'(act[4]) * th;
            cref[d][r][c][n] = cc;
            yref[d][r][c][n] = clampi((yt + (1 << 11)) >>> 12, -8, 7);
          end
        end
  endtask

  // driver: direction-interleaved pixel stream, two patches
  int patch_in = -1;
  initial begin
    x_valid = 0;
    x_data = '0;
    wait (rst_n);
    repeat (3) @(posedge clk);
    for (int pt = 0; pt < 2; pt++) begin
      wait (patch_in == pt);
      @(posedge clk); #1;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          for (int d = 0; d < 4; d++) begin
            int gr, gc;
            gr = ((d & 2) != 0) ? H - 1 - r : r;
            gc = ((d & 1) != 0) ? W - 1 - c : c;
            for (int i = 0; i < C; i++) x_data[i*XW +: XW] = XW'(img[gr][gc][i]);
            x_valid = 1;
            do @(negedge clk); while (!x_ready);
            @(posedge clk);
            #1 x_valid = 0;
            if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
          end
    end
  end

  // consumer with random back-pressure and checker
  int ostep = 0, pt_out = 0, grp_seen = 0, stalls = 0;
  always @(posedge clk) out_ready <= ($urandom_range(0, 4) != 0);
  always @(posedge clk) if (hz) stalls++;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int r, c, d;
    d = ostep % 4;
    c = (ostep / 4) % W;
    r = (ostep / 4) / W;
    checks++;
    if (out_meta.dir != 2'(d) || out_meta.col != 16'(c) || out_meta.row != 16'(r) || out_meta.grp != 16'(grp_seen)) begin
      failures++;
      $display("meta mismatch step %0d: dir %0d col %0d row %0d grp %0d", ostep, out_meta.dir, out_meta.col, out_meta.row, out_meta.grp);
    end
    for (int p = 0; p < P; p++) begin
      int n;
      n = grp_seen * P + p;
      checks += 2;
      if (sx(int'(out_y[p*YW +: YW]), YW) != yref[d][r][c][n]) begin
        failures++;
        $display("y mismatch pt %0d d%0d r%0d c%0d n%0d: %0d exp %0d", pt_out, d, r, c, n, sx(int'(out_y[p*YW +: YW]), YW), yref[d][r][c][n]);
      end
      if (sx(int'(out_c[p*CW +: CW]), CW) != cref[d][r][c][n]) begin
        failures++;
        $display("c mismatch d%0d r%0d c%0d n%0d: %0d exp %0d", d, r, c, n, sx(int'(out_c[p*CW +: CW]), CW), cref[d][r][c][n]);
      end
    end
    checks++;
    if (out_meta.last_grp != (grp_seen == NH / P - 1)) failures++;
    if (grp_seen == NH / P - 1) begin
      grp_seen = 0;
      checks++;
      if (out_meta.last_step != (ostep == 4 * W * H - 1)) failures++;
      ostep++;
      if (ostep == 4 * W * H) begin
        ostep = 0;
        pt_out++;
      end
    end else grp_seen++;
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // random parameters
    for (int n = 0; n < NH; n++)
      for (int g = 0; g < 5; g++) begin
        bq[n][g] = $urandom_range(0, 255) - 128;
        for (int i = 0; i < NIN; i++) wq[n][g][i] = $urandom_range(0, 15) - 8;
      end
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) for (int i = 0; i < C; i++) img[r][c][i] = $urandom_range(0, 255);
    compute_ref();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < NH; n++)
      for (int g = 0; g < 5; g++) begin
        for (int i = 0; i < NIN; i++) begin
          wr_en <= 1; wr_sel <= 0; wr_idx <= 32'((n << (IW + 3)) | (g << IW) | i); wr_data <= 32'(wq[n][g][i]);
          @(posedge clk);
        end
        wr_en <= 1; wr_sel <= 1; wr_idx <= 32'((n << 3) | g); wr_data <= 32'(bq[n][g]);
        @(posedge clk);
      end
    wr_en <= 0;
    patch_in = 0;
    wait (pt_out == 1);
    // second patch: new image, same weights
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) for (int i = 0; i < C; i++) img[r][c][i] = $urandom_range(0, 255);
    compute_ref();
    patch_in = 1;
    wait (pt_out == 2);
    // throughput: with a ready consumer one direction-step takes NH/P cycles
    begin
      int t0, t1;
      @(posedge clk);
      restart <= 1; @(posedge clk); restart <= 0;
      force out_ready = 1'b1;
      patch_in = 2;
      t0 = 0;
      @(posedge clk); #1;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          for (int d = 0; d < 4; d++) begin
            int gr, gc;
            gr = ((d & 2) != 0) ? H - 1 - r : r;
            gc = ((d & 1) != 0) ? W - 1 - c : c;
            for (int i = 0; i < C; i++) x_data[i*XW +: XW] = XW'(img[gr][gc][i]);
            x_valid = 1;
            do @(negedge clk); while (!x_ready);
            @(posedge clk);
            #1 t0++;
          end
      x_valid = 0;
      wait (pt_out == 3);
      release out_ready;
    end
    checks++;
    if (pt_out != 3) failures++;
    $display("hazard stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
