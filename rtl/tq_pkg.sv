// tq_pkg: types and constants shared by the H.264 transform/quantisation
// (T/Q) core and its AHB wrapper.
//
// A block handed to the core is described by tq_mode_t: direction (forward
// transform + quantisation, or dequantisation + inverse transform), the kind
// of block (4x4 residual, 4x4 luma DC, 2x2 chroma DC) and whether forward
// quantisation uses the intra or the inter rounding offset.  The quantiser
// tables MF and V are the ones the H.264 standard defines for flat scaling.
package tq_pkg;

  localparam int DW = 16;  // datapath width of transform and quantiser

  // Blocks of one 4:2:0 macroblock as the wrapper processes them: 16 luma 4x4
  // residual blocks, the luma DC block, 4 Cb and 4 Cr residual blocks, the Cb
  // and the Cr DC blocks; 408 samples in all.
  localparam int MB_BLOCKS  = 27;
  localparam int MB_SAMPLES = 408;

  typedef enum logic [1:0] {
    BLK_RES = 2'd0,  // 4x4 residual block (integer core transform)
    BLK_LDC = 2'd1,  // 4x4 luma DC block (Hadamard)
    BLK_CDC = 2'd2   // 2x2 chroma DC block
  } blk_kind_t;

  typedef struct packed {
    logic      inverse;  // 0: forward T then Q, 1: inverse Q then inverse T
    blk_kind_t kind;
    logic      intra;    // forward rounding offset 2^qbits/3 (1) or /6 (0)
  } tq_mode_t;

  // Quantiser multiplication factor MF, indexed [QP%6][position class].
  // Class 0: (even,even) positions, 1: (odd,odd), 2: the others.
  function automatic logic [13:0] mf_coef(input logic [2:0] rem, input logic [1:0] cls);
    logic [13:0] t[6][3];
    t = '{'{14'd13107, 14'd5243, 14'd8066},
          '{14'd11916, 14'd4660, 14'd7490},
          '{14'd10082, 14'd4194, 14'd6554},
          '{14'd9362,  14'd3647, 14'd5825},
          '{14'd8192,  14'd3355, 14'd5243},
          '{14'd7282,  14'd2893, 14'd4559}};
    if (rem > 3'd5 || cls > 2'd2) return '0;
    return t[rem][cls];
  endfunction

  // Dequantiser scaling factor V, indexed like mf_coef.
  function automatic logic [4:0] v_coef(input logic [2:0] rem, input logic [1:0] cls);
    logic [4:0] t[6][3];
    t = '{'{5'd10, 5'd16, 5'd13},
          '{5'd11, 5'd18, 5'd14},
          '{5'd13, 5'd20, 5'd16},
          '{5'd14, 5'd23, 5'd18},
          '{5'd16, 5'd25, 5'd20},
          '{5'd18, 5'd29, 5'd23}};
    if (rem > 3'd5 || cls > 2'd2) return '0;
    return t[rem][cls];
  endfunction

  // Position class of raster index idx (row = idx[3:2], column = idx[1:0]).
  function automatic logic [1:0] pos_class(input logic [3:0] idx);
    if (!idx[2] && !idx[0]) return 2'd0;
    if (idx[2] && idx[0])   return 2'd1;
    return 2'd2;
  endfunction

  // Macroblocks per frame for the 16 image sizes selected by the IS field
  // (128x96 up to 2048x1536); width and height in macroblocks.
  function automatic logic [7:0] img_mb_w(input logic [3:0] is);
    logic [7:0] t[16];
    t = '{8'd8, 8'd11, 8'd20, 8'd22, 8'd22, 8'd40, 8'd44, 8'd44,
          8'd45, 8'd45, 8'd64, 8'd80, 8'd80, 8'd88, 8'd120, 8'd128};
    return t[is];
  endfunction

  function automatic logic [6:0] img_mb_h(input logic [3:0] is);
    logic [6:0] t[16];
    t = '{7'd6, 7'd9, 7'd15, 7'd15, 7'd18, 7'd30, 7'd30, 7'd36,
          7'd30, 7'd36, 7'd48, 7'd45, 7'd64, 7'd72, 7'd68, 7'd96};
    return t[is];
  endfunction

  // Kind of block b (0..26) within a macroblock.
  function automatic blk_kind_t mb_block_kind(input logic [4:0] b);
    if (b == 5'd16) return BLK_LDC;
    if (b >= 5'd25) return BLK_CDC;
    return BLK_RES;
  endfunction

endpackage
