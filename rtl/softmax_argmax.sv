// softmax_argmax: the simplified SoftMax core of the 2D-LSTM accelerator.
//
// Instead of the exponentials it returns the label of the largest of the NO
// output-layer values (per pixel in pixel labelling, per image in
// classification); ties go to the lower label.  One register stage with a
// valid/ready stream on both sides; the end-of-patch flag passes through.
// Choosing the maximum is the architecture's; the tie rule is this design's.
module softmax_argmax #(
  parameter int unsigned NO = 2,
  parameter int unsigned ZW = 24,
  parameter int unsigned LW = (NO > 1) ? $clog2(NO) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [NO*ZW-1:0] in_z,
  input  logic             in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [LW-1:0]    out_label,
  output logic             out_last
);
  logic [LW-1:0] best;
  always_comb begin
    logic signed [ZW-1:0] m;
    best = '0;
    m    = $signed(in_z[0 +: ZW]);
    for (int o = 1; o < int'(NO); o++)
      if ($signed(in_z[o*ZW +: ZW]) > m) begin
        m    = $signed(in_z[o*ZW +: ZW]);
        best = LW'(o);
      end
  end

  assign in_ready = !out_valid || out_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    if (in_ready && in_valid) begin
      out_label <= best;
      out_last  <= in_last;
    end
  end
endmodule
