// dwc_out: output data width converter of the 2D-LSTM accelerator.
//
// Packs LBL_W-bit labels into BUS_W-bit words for Stream2Mem, first label in
// the lowest bits.  A word is sent when it is full or when a label marked
// last (end of patch) has been added; the rest of such a word is zero.
// Valid/ready streams on both sides; the input stalls only while a finished
// word waits.  Function from the architecture, packing order this design's.
module dwc_out #(
  parameter int unsigned BUS_W = 64,
  parameter int unsigned LBL_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [LBL_W-1:0] in_label,
  input  logic             in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [BUS_W-1:0] out_data
);
  localparam int unsigned PER = BUS_W / LBL_W;
  localparam int unsigned CW  = $clog2(PER + 1);
  logic [CW-1:0] cnt;

  assign in_ready = !out_valid || out_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (cnt == 0) out_data <= BUS_W'(in_label);
        else out_data[int'(cnt)*LBL_W +: LBL_W] <= in_label;
        if (in_last || cnt == CW'(PER - 1)) begin
          out_valid <= 1'b1;
          cnt       <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
