// h264_pkg: types, constants and small table functions shared by the H.264
// intra-coding datapath (intra prediction, mode decision, 4x4 forward/inverse
// integer transform, quantisation, inverse quantisation, reconstruction).
//
// Blocks are carried as unpacked arrays of 16 elements in raster order:
// element 4*row+col. Pixels are 8-bit unsigned. Transform coefficients are
// 16-bit signed, so one row of four coefficients is a 64-bit word, the data
// width quoted for the embedded multipliers.
//
// The quantiser multiplication factors (MF) and the inverse-quantiser scale
// factors (V) are the H.264 values for a flat scaling matrix, indexed by
// QP mod 6 and by the coefficient position class:
//   class 0: row and column both even  (0,0),(0,2),(2,0),(2,2)
//   class 1: row and column both odd   (1,1),(1,3),(3,1),(3,3)
//   class 2: all other positions
// QP runs over the 52 levels 0..51; qbits = 15 + floor(QP/6).
package h264_pkg;

  localparam int unsigned PIX_W    = 8;   // pixel bits
  localparam int unsigned COEF_W   = 16;  // forward-transform coefficient bits
  localparam int unsigned LEVEL_W  = 16;  // quantised level bits
  localparam int unsigned WCOEF_W  = 32;  // rescaled (dequantised) coefficient bits
  localparam int unsigned RES_W    = 24;  // decoded residual bits
  localparam int unsigned QP_W     = 6;
  localparam int unsigned QP_MAX   = 51;  // 52 quantisation levels
  localparam int unsigned QBITS0   = 15;

  typedef logic [PIX_W-1:0]          pixel_t;
  typedef logic signed [PIX_W:0]     resid_t;    // pixel difference, -255..255
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic signed [LEVEL_W-1:0] level_t;
  typedef logic signed [WCOEF_W-1:0] wcoef_t;
  typedef logic signed [RES_W-1:0]   dres_t;
  typedef logic [QP_W-1:0]           qp_t;

  // 4x4 luma intra prediction modes (H.264 numbering)
  typedef enum logic [3:0] {
    I4_VERTICAL        = 4'd0,
    I4_HORIZONTAL      = 4'd1,
    I4_DC              = 4'd2,
    I4_DIAG_DOWN_LEFT  = 4'd3,
    I4_DIAG_DOWN_RIGHT = 4'd4,
    I4_VERTICAL_RIGHT  = 4'd5,
    I4_HORIZONTAL_DOWN = 4'd6,
    I4_VERTICAL_LEFT   = 4'd7,
    I4_HORIZONTAL_UP   = 4'd8
  } i4_mode_e;

  // 16x16 luma and 8x8 chroma intra prediction modes (chroma numbering)
  typedef enum logic [1:0] {
    IP_VERTICAL   = 2'd0,
    IP_HORIZONTAL = 2'd1,
    IP_DC         = 2'd2,
    IP_PLANE      = 2'd3
  } ip_mode_e;

  // forward core transform matrix Cf, row-major
  localparam int CF [16] = '{ 1,  1,  1,  1,
                              2,  1, -1, -2,
                              1, -1, -1,  1,
                              1, -2,  2, -1 };

  function automatic logic [1:0] pos_class(input int unsigned idx);
    logic r0, c0;
    r0 = idx[2];   // lsb of row  (idx = 4*row + col)
    c0 = idx[0];   // lsb of column
    if (!r0 && !c0)     return 2'd0;
    else if (r0 && c0)  return 2'd1;
    else                return 2'd2;
  endfunction

  function automatic logic [2:0] qp_rem6(input qp_t qp);
    return 3'(qp % 6);
  endfunction

  function automatic logic [3:0] qp_div6(input qp_t qp);
    return 4'(qp / 6);
  endfunction

  // quantiser multiplication factor
  function automatic logic [13:0] mf_lookup(input logic [2:0] rem, input logic [1:0] cls);
    logic [13:0] mf;
    unique case (rem)
      3'd0: mf = (cls == 2'd0) ? 14'd13107 : (cls == 2'd1) ? 14'd5243 : 14'd8066;
      3'd1: mf = (cls == 2'd0) ? 14'd11916 : (cls == 2'd1) ? 14'd4660 : 14'd7490;
      3'd2: mf = (cls == 2'd0) ? 14'd10082 : (cls == 2'd1) ? 14'd4194 : 14'd6554;
      3'd3: mf = (cls == 2'd0) ? 14'd9362  : (cls == 2'd1) ? 14'd3647 : 14'd5825;
      3'd4: mf = (cls == 2'd0) ? 14'd8192  : (cls == 2'd1) ? 14'd3355 : 14'd5243;
      default: mf = (cls == 2'd0) ? 14'd7282 : (cls == 2'd1) ? 14'd2893 : 14'd4559;
    endcase
    return mf;
  endfunction

  // inverse-quantiser scale factor
  function automatic logic [4:0] v_lookup(input logic [2:0] rem, input logic [1:0] cls);
    logic [4:0] v;
    unique case (rem)
      3'd0: v = (cls == 2'd0) ? 5'd10 : (cls == 2'd1) ? 5'd16 : 5'd13;
      3'd1: v = (cls == 2'd0) ? 5'd11 : (cls == 2'd1) ? 5'd18 : 5'd14;
      3'd2: v = (cls == 2'd0) ? 5'd13 : (cls == 2'd1) ? 5'd20 : 5'd16;
      3'd3: v = (cls == 2'd0) ? 5'd14 : (cls == 2'd1) ? 5'd23 : 5'd18;
      3'd4: v = (cls == 2'd0) ? 5'd16 : (cls == 2'd1) ? 5'd25 : 5'd20;
      default: v = (cls == 2'd0) ? 5'd18 : (cls == 2'd1) ? 5'd29 : 5'd23;
    endcase
    return v;
  endfunction

  function automatic pixel_t clip_pixel(input int signed v);
    if (v < 0)        return '0;
    else if (v > 255) return 8'd255;
    else              return pixel_t'(v);
  endfunction

endpackage
