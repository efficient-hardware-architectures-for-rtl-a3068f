// pim_ref: reference model of the binary 1D-LSTM arithmetic used by the PIM
// testbenches: +-1 weights (bit 0 = +1, bit 1 = -1) times 2-bit signed data
// (1 fraction bit), the PLAN piecewise-linear sigmoid (breakpoints 1, 2.375,
// 5) and tanh(x) = 2 sigmoid(2x) - 1, quantised to 2 bits (sigmoid Q0.2
// unsigned, tanh Q1.1 signed), cell state Q4.4 saturated to 8 bits.
package pim_ref;
  // PLAN sigmoid of a real argument, on a 1/256 grid
  function automatic int plan_q8(real x);
    real a, y;
    a = (x < 0.0) ? -x : x;
    if (a >= 5.0)        y = 1.0;
    else if (a >= 2.375) y = 0.03125 * a + 0.84375;
    else if (a >= 1.0)   y = 0.125 * a + 0.625;
    else                 y = 0.25 * a + 0.5;
    // the hardware evaluates the slopes on a 1/256 argument grid, truncated
    y = $floor(y * 256.0 + 1.0e-9);
    return (x < 0.0) ? 256 - int'(y) : int'(y);
  endfunction

  function automatic int sig_q(real x);     // 0..3, value q/4
    int r;
    r = (plan_q8(x) + 32) >>> 6;
    return (r > 3) ? 3 : r;
  endfunction

  function automatic int tanh_q(real x);    // -2..1, value q/2
    int r;
    r = (2 * plan_q8(2.0 * x) - 256 + 64) >>> 7;
    if (r > 1) r = 1;
    if (r < -2) r = -2;
    return r;
  endfunction

  // one cell update: gates a (tanh code), i, f, o (sigmoid codes), c Q4.4
  function automatic void cell_step(input int a, input int i, input int f, input int o,
                               inout int c, output int y);
    int t;
    t = ((a * i) <<< 1) + ((f * c) >>> 2);
    if (t > 127) t = 127;
    if (t < -128) t = -128;
    c = t;
    t = (o * tanh_q(real'(c) / 16.0) + 2) >>> 2;
    if (t > 1) t = 1;
    if (t < -2) t = -2;
    y = t;
  endfunction
endpackage
