// dctq_pkg: widths, the multiplication-factor table and the position-group
// rule shared by the 8x8 forward transform and quantization core.
//
// Widths: the residual input X is 9-bit signed (-255..255) and each quantized
// coefficient Z is 19-bit signed; both follow from the core's pin count
// (576 + 6 + 1 inputs and 1216 + 1 outputs). The widths in between are this
// design's choice, sized so no intermediate value can overflow:
//   S (after the row pass)     13 bits: the 1D gain is at most 8 (+1 bit margin)
//   W (after the column pass)  17 bits: 13 + 4
//   R = |W| * MF + f           32 bits unsigned: |W| < 2^16, MF < 2^15, f < 2^24
// The MF values are the standard H.264 8x8 quantization factors for
// m = QP mod 6 and the six position groups G0..G5.
package dctq_pkg;

  localparam int unsigned X_W    = 9;   // input residual width
  localparam int unsigned S_W    = 13;  // row-transform output width
  localparam int unsigned W_W    = 17;  // 2D transform output width
  localparam int unsigned QP_W   = 6;   // QP 0..51
  localparam int unsigned QB_W   = 5;   // qbits = 15 + QP/6 (15..25)
  localparam int unsigned MF_W   = 15;  // largest MF is 20972
  localparam int unsigned F_W    = 24;  // f = 2^qbits / 3 < 2^24
  localparam int unsigned R_W    = 32;  // |W|*MF + f
  localparam int unsigned Z_W    = 19;  // quantized coefficient width
  localparam int unsigned QP_MAX = 51;

  // The six coefficient position groups that share one MF value.
  typedef enum logic [2:0] {
    G0 = 3'd0,  // i in {0,4},       j in {0,4}
    G1 = 3'd1,  // i odd,            j odd
    G2 = 3'd2,  // i in {2,6},       j in {2,6}
    G3 = 3'd3,  // one index in {0,4}, the other odd
    G4 = 3'd4,  // one index in {0,4}, the other in {2,6}
    G5 = 3'd5   // one index in {2,6}, the other odd
  } pos_group_e;

  typedef logic [MF_W-1:0] mf_t;

  // MF_TABLE[m][g]: m = QP mod 6, g = position group.
  localparam mf_t MF_TABLE [6][6] = '{
    '{15'd13107, 15'd11428, 15'd20972, 15'd12222, 15'd16777, 15'd15481},
    '{15'd11916, 15'd10826, 15'd19174, 15'd11058, 15'd14980, 15'd14290},
    '{15'd10082, 15'd8943,  15'd15978, 15'd9675,  15'd12710, 15'd11985},
    '{15'd9362,  15'd8228,  15'd14913, 15'd8931,  15'd11984, 15'd11295},
    '{15'd8192,  15'd7346,  15'd13159, 15'd7740,  15'd10486, 15'd9777},
    '{15'd7282,  15'd6428,  15'd11570, 15'd6830,  15'd9118,  15'd8640}
  };

  // Class of a single index, given mod 4: 0 for {0,4}, 1 for odd, 2 for {2,6}.
  function automatic logic [1:0] idx_class(input logic [1:0] k);
    if (k[0])          return 2'd1;
    else if (k[1])     return 2'd2;
    else               return 2'd0;
  endfunction

  // Position group of coefficient (i, j), given i mod 4 and j mod 4 (the
  // class of an index does not depend on its bit 2).
  function automatic pos_group_e pos_group(input logic [1:0] i4, input logic [1:0] j4);
    logic [1:0] ci, cj;
    ci = idx_class(i4);
    cj = idx_class(j4);
    if (ci == cj) begin
      case (ci)
        2'd0:    return G0;
        2'd1:    return G1;
        default: return G2;
      endcase
    end
    if (ci != 2'd1 && cj != 2'd1) return G4;   // {0,4} with {2,6}
    if (ci == 2'd0 || cj == 2'd0) return G3;   // {0,4} with odd
    return G5;                                 // {2,6} with odd
  endfunction

endpackage
