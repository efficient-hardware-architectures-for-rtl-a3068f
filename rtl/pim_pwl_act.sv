// pim_pwl_act: piece-wise linear sigmoid / tanh of the PIM SPU.
//
// Input: signed IN_W-bit value with FRAC_IN fraction bits.  The sigmoid is
// approximated by four linear segments per side (PLAN approximation):
//   |x| >= 5:        1
//   2.375 <= |x| < 5: |x|/32 + 0.84375
//   1 <= |x| < 2.375: |x|/8  + 0.625
//   |x| < 1:          |x|/4  + 0.5
// and sigmoid(-x) = 1 - sigmoid(x); tanh(x) = 2*sigmoid(2x) - 1.  The result
// is rounded to the 2-bit activation: sigmoid unsigned with 2 fraction bits
// (0, .25, .5, .75), tanh signed with 1 fraction bit (-1, -.5, 0, .5).
// Combinational.  A piece-wise linear activation with 2-bit outputs is the
// architecture's; the segment break points are this design's choice.
module pim_pwl_act #(
  parameter int unsigned IN_W    = 16,
  parameter int unsigned FRAC_IN = 1
) (
  input  logic signed [IN_W-1:0] x,
  input  logic                   tanh_sel,
  output logic [1:0]             q
);
  // sigmoid in Q.8 of a Q.8 argument
  function automatic int plan(input longint signed xq8);
    longint signed a;
    int y;
    a = (xq8 < 0) ? -xq8 : xq8;
    if (a >= 1280)     y = 256;
    else if (a >= 608) y = int'(a / 32) + 216;
    else if (a >= 256) y = int'(a / 8) + 160;
    else               y = int'(a / 4) + 128;
    return (xq8 < 0) ? 256 - y : y;
  endfunction

  always_comb begin
    longint signed xq8;
    int s, t, r;
    s = 0; t = 0; r = 0;
    xq8 = (longint'(x) <<< 8) >>> FRAC_IN;
    if (!tanh_sel) begin
      s = plan(xq8);
      r = (s + 32) >>> 6;
      q = (r > 3) ? 2'd3 : 2'(r);
    end else begin
      t = 2 * plan(2 * xq8) - 256;
      r = (t + 64) >>> 7;
      if (r > 1) r = 1;
      if (r < -2) r = -2;
      q = 2'(r);
    end
  end
endmodule
