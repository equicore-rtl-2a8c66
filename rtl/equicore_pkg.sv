// Shared widths, types and encodings of the Equicore CGTP accelerator.
//
// Number formats: irreps and weights arrive as 16-bit signed fixed point
// (FRAC fraction bits) with a 3-bit shift n; they are quantized to Int8 as
// round(x * 2^n). CG values are Int8 with their own 3-bit shift n_cg.
// Dequantization is a right shift by the merged n_x + n_y + n_cg (and n_w
// for weights). Accumulators hold fixed point with FRAC fraction bits.
// The Int8 data, the 3-bit shifts and the 8-bit CG indexes follow the
// paper; the 12-bit fraction, accumulator width and the CG word encoding
// below are choices of this design.
package equicore_pkg;

  localparam int ID_W   = 8;   // id_x, id_y, id_z index width
  localparam int INT_W  = 8;   // quantized data width
  localparam int SH_W   = 3;   // number-of-shift width
  localparam int FIX_W  = 16;  // full-precision (fixed point) word
  localparam int FRAC   = 12;  // fraction bits of FIX_W words and accumulators
  localparam int OP_W   = 16;  // L-PE product I_x * I_y
  localparam int NSUM_W = 5;   // merged shift n_x + n_y + n_cg (0..21)
  localparam int ACC_W  = 40;  // reduced-sum (BRAM tile) accumulator
  localparam int CGW_W  = 20;  // one word of the reorganized CG stream
  localparam int ADDR_W = 20;  // buffer address on the load port

  // Head: the (id_x, id_y) position shared by a packed group of non-zeros.
  typedef struct packed {
    logic [2:0]      pad;
    logic [ID_W-1:0] idx;
    logic [ID_W-1:0] idy;
  } cg_head_t;

  // Body: one non-zero CG element of the group.
  typedef struct packed {
    logic signed [INT_W-1:0] value;
    logic [SH_W-1:0]         ncg;
    logic [ID_W-1:0]         idz;
  } cg_body_t;

  // Stream word: bit 19 tells Head from Body.
  typedef struct packed {
    logic        is_head;
    logic [18:0] payload;
  } cg_word_t;

  // Buffer selector of the load port.
  typedef enum logic [2:0] {
    BUF_IX  = 3'd0,  // addr = {row u, element e}
    BUF_IY  = 3'd1,  // addr = {row v, element e}
    BUF_W   = 3'd2,  // addr = {pair, output channel w}
    BUF_CG  = 3'd3,  // addr = word index, data = raw 20-bit CG word
    BUF_CFG = 3'd4   // addr = register number, data = value
  } buf_sel_e;

  // Configuration registers (BUF_CFG addresses).
  localparam int CFG_MX     = 0;  // multiplicity of I_x
  localparam int CFG_MY     = 1;  // multiplicity of I_y
  localparam int CFG_MZ     = 2;  // multiplicity of I_z
  localparam int CFG_NZ     = 3;  // 2*l_z + 1
  localparam int CFG_CG_LEN = 4;  // number of words in the CG stream

endpackage
