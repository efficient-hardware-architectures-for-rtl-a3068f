// mdlstm_pkg: types, constants and arithmetic helpers shared by the 2D-LSTM
// (MD-LSTM) accelerator cores.
//
// Gate order of a 2D-LSTM cell follows Eq. 2 of the architecture: a (cell
// input, tanh), k (input gate), f (forget gate along x), g (forget gate along
// y) and o (output gate), all sigmoid except a.  Fixed-point values follow the
// quantisation rule clip(round(a*2^f)*2^-f, min, max): signed values in [-1,1)
// carry k-1 fraction bits, unsigned sigmoid outputs carry k fraction bits.
// The 16-bit meta fields and the direction encoding are this design's choice.
package mdlstm_pkg;

  localparam int unsigned NGATES = 5;
  typedef enum logic [2:0] {G_A = 3'd0, G_K = 3'd1, G_F = 3'd2, G_G = 3'd3, G_O = 3'd4} gate_e;

  // Scan directions, processed interleaved in this order for every pixel step.
  typedef enum logic [1:0] {DIR_TL = 2'd0, DIR_TR = 2'd1, DIR_BL = 2'd2, DIR_BR = 2'd3} dir_e;

  // Side-band information travelling with every group of hidden-layer outputs.
  typedef struct packed {
    logic [1:0]  dir;        // scan direction of this direction-step
    logic [15:0] col;        // column in the direction's own scan coordinates
    logic [15:0] row;        // row in the direction's own scan coordinates
    logic [15:0] grp;        // which group of PE_LSTM cells (cell = grp*PE+p)
    logic        last_grp;   // last group of this direction-step
    logic        last_step;  // last group of the last step of the patch/image
  } hl_meta_t;

  // Value of a stored weight: 1-bit weights are binary (0 -> +1, 1 -> -1),
  // wider weights are two's complement.
  function automatic int signed wval(input logic [31:0] raw, input int unsigned w);
    if (w == 1) return raw[0] ? -1 : 1;
    return int'($signed(raw << (32 - w))) >>> (32 - w);
  endfunction

  // Saturate a signed value to an n-bit two's complement range.
  function automatic longint signed sat(input longint signed v, input int unsigned n);
    longint signed hi, lo;
    hi = (longint'(1) <<< (n - 1)) - 1;
    lo = -(longint'(1) <<< (n - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
