// act_lut: quantised look-up table for the in-cell activation functions of
// the 2D-LSTM cell (sigmoid for the gates, tanh for the cell input and the
// cell output).
//
// The table input is the pre-activation in signed fixed point with FRAC_IN
// fraction bits (default: 8 bits, [-8,8) in steps of 1/16).  The sigmoid table
// returns an unsigned value with OUT_W fraction bits (Q0.8), the tanh table a
// signed value with OUT_W-1 fraction bits (Q1.7).  Entries are rounded to
// nearest and clipped to the output range, the quantisation rule used for
// all activations of the accelerator.  The table is computed at elaboration
// time from $exp; that the activations are LUT based is the architecture's,
// the table size and resolution are this design's choice.  Purely
// combinational: the output follows the index in the same cycle.
module act_lut #(
  parameter bit          TANH    = 1'b0,
  parameter int unsigned IN_W    = 8,
  parameter int unsigned FRAC_IN = 4,
  parameter int unsigned OUT_W   = 8
) (
  input  logic signed [IN_W-1:0] idx,
  output logic        [OUT_W-1:0] q
);
  localparam int unsigned N = 1 << IN_W;

  function automatic logic [N*OUT_W-1:0] build();
    logic [N*OUT_W-1:0] t;
    real x, v;
    longint q0, hi, lo;
    t = '0;
    for (int i = 0; i < int'(N); i++) begin
      x = real'(i >= int'(N/2) ? i - int'(N) : i) / real'(1 << FRAC_IN);
      if (TANH) begin
        v  = (1.0 - $exp(-2.0 * x)) / (1.0 + $exp(-2.0 * x));
        q0 = longint'($floor(v * real'(1 << (OUT_W - 1)) + 0.5));
        hi = (longint'(1) << (OUT_W - 1)) - 1;
        lo = -(longint'(1) << (OUT_W - 1));
      end else begin
        v  = 1.0 / (1.0 + $exp(-x));
        q0 = longint'($floor(v * real'(1 << OUT_W) + 0.5));
        hi = (longint'(1) << OUT_W) - 1;
        lo = 0;
      end
      if (q0 > hi) q0 = hi;
      if (q0 < lo) q0 = lo;
      t[i*OUT_W +: OUT_W] = OUT_W'(q0);
    end
    return t;
  endfunction

  localparam logic [N*OUT_W-1:0] TABLE = build();

  assign q = TABLE[int'($unsigned(idx))*OUT_W +: OUT_W];
endmodule
