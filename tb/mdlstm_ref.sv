// mdlstm_ref: bit-accurate reference model of the 2D-LSTM cell and output
// layer, used by the testbenches.  Written from the equations
//   s_gate = W x + U y(i-1,j) + V y(i,j-1) + b
//   c = f c(i-1,j) + g c(i,j-1) + a k,   y = o tanh(c)
// with the number formats of the RTL (x unsigned XW fraction bits, weights
// signed WW-1, biases BW-1, y YW-1 fraction bits, table index 4 fraction bits,
// 8-bit table outputs, cell state 7 fraction bits).  The activation tables
// are evaluated directly with $exp here.
package mdlstm_ref;
  function automatic int clampi(longint v, int lo, int hi);
    if (v > hi) return hi;
    if (v < lo) return lo;
    return int'(v);
  endfunction

  function automatic int sig8(int idx);   // idx: [-128,127], 4 fraction bits
    real x;
    x = real'(idx) / 16.0;
    return clampi(longint'($floor(256.0 / (1.0 + $exp(-x)) + 0.5)), 0, 255);
  endfunction

  function automatic int tanh8(int idx);
    real x;
    x = real'(idx) / 16.0;
    return clampi(longint'($floor(128.0 * (($exp(x) - $exp(-x)) / ($exp(x) + $exp(-x))) + 0.5)), -128, 127);
  endfunction

  // floor division by 2^s for negative numbers too
  function automatic longint asr(longint v, int s);
    return v >>> s;
  endfunction
endpackage
