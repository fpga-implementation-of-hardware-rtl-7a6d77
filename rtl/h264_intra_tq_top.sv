// h264_intra_tq_top: H.264 intra prediction, transform and quantisation datapath.
//
// Three parallel paths share the clock:
//
// 4x4 luma coding loop (one 4x4 block per clock, fully pipelined)
//   intra4x4_pred      all nine 4x4 modes from the 13 neighbours  (combinational)
//   sad_mode_decision  best available mode by SAD                 (1 cycle)
//   residual           source minus chosen prediction             (combinational)
//   fwd_transform4x4   Y = Cf X Cf^T                               (2 cycles)
//   quant4x4           levels Z, sent out for entropy coding       (1 cycle)
//   dequant4x4         W = Z V 2^floor(QP/6)                       (1 cycle)
//   inv_transform4x4   decoded residual                            (2 cycles)
//   recon4x4           prediction + residual, clipped              (1 cycle)
//   Latency from blk_valid: i4_valid +1, level_valid +4, recon_valid +8.
//   QP, the chosen mode and the chosen prediction travel down the pipeline
//   with their block. Neighbour pixels are inputs: the caller feeds back the
//   reconstructed pixels of earlier blocks (recon) in its block order.
//
// 16x16 luma prediction: intra_plane_pred (N=16) + sad_mode_decision over
//   the four modes; i16_* one cycle after mb_valid.
//
// 8x8 chroma prediction: intra_plane_pred (N=8) + sad_mode_decision over the
//   four modes, one chroma component per transfer; ch_* one cycle after
//   ch_valid.
//
// Luma mode selection: luma_mode_select sums the SADs of each run of sixteen
//   4x4 blocks (one macroblock) and compares the sum with the last 16x16 SAD;
//   luma_sel_* two cycles after the sixteenth blk_valid. Present a macroblock
//   to the 16x16 path before the last of its 4x4 blocks.
//
// The block structure (prediction, integer transform, quantisation and the
// inverse quantisation / inverse transform / adder loop) follows the source
// design's encoder diagram. Motion estimation and compensation, the loop
// filter and entropy coding are outside this datapath, and so is transform
// coding of 16x16 and chroma residuals; the 4x4 loop always codes its blocks
// and the luma selection is reported alongside. Reset is active low and
// asynchronous and clears the valid pipeline only.
module h264_intra_tq_top
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,

  // 4x4 luma coding loop
  input  logic       blk_valid,
  input  qp_t        qp,
  input  pixel_t     blk_orig   [16],
  input  pixel_t     nb_top     [8],   // A..H
  input  pixel_t     nb_left    [4],   // I..L
  input  pixel_t     nb_corner,        // M
  input  logic       nb_top_valid,
  input  logic       nb_topright_valid,
  input  logic       nb_left_valid,
  input  logic       nb_corner_valid,
  output logic       i4_valid,
  output logic [3:0] i4_mode,
  output logic [11:0] i4_sad,
  output logic       level_valid,
  output logic [3:0] level_mode,
  output level_t     level      [16],
  output logic       recon_valid,
  output pixel_t     recon      [16],

  // 16x16 luma prediction
  input  logic       mb_valid,
  input  pixel_t     mb_orig    [256],
  input  pixel_t     mb_top     [16],
  input  pixel_t     mb_left    [16],
  input  pixel_t     mb_corner,
  input  logic       mb_top_valid,
  input  logic       mb_left_valid,
  input  logic       mb_corner_valid,
  output logic       i16_valid,
  output logic [1:0] i16_mode,
  output logic [15:0] i16_sad,
  output pixel_t     i16_pred   [256],

  // 8x8 chroma prediction
  input  logic       ch_valid,
  input  pixel_t     ch_orig    [64],
  input  pixel_t     ch_top     [8],
  input  pixel_t     ch_left    [8],
  input  pixel_t     ch_corner,
  input  logic       ch_top_valid,
  input  logic       ch_left_valid,
  input  logic       ch_corner_valid,
  output logic       ch_out_valid,
  output logic [1:0] ch_mode,
  output logic [13:0] ch_sad,
  output pixel_t     ch_pred    [64],

  // per-macroblock luma choice (4x4 vs 16x16)
  output logic       luma_sel_valid,
  output logic       luma_use_i16,
  output logic       luma_i16_missing,
  output logic [15:0] luma_sad4_sum,
  output logic [15:0] luma_sad16
);

  // ---------------------------------------------------------------- 4x4 loop
  pixel_t     p4      [9][16];
  logic [8:0] p4_ok;
  pixel_t     md_pred [16];
  pixel_t     md_orig [16];
  resid_t     resid   [16];
  logic       ft_valid;
  coef_t      coef    [16];
  logic       dq_valid;
  wcoef_t     wcoef   [16];
  logic       it_valid;
  dres_t      dres    [16];

  // pipeline companions of each block
  qp_t        qp_d    [4];      // qp_d[k]: QP k+1 cycles after blk_valid
  logic [3:0] mode_d  [3];      // mode_d[k]: mode k+2 cycles after blk_valid
  pixel_t     pred_d  [6][16];  // pred_d[k]: prediction k+2 cycles after blk_valid

  intra4x4_pred u_i4_pred (
    .top            (nb_top),
    .left           (nb_left),
    .corner         (nb_corner),
    .top_valid      (nb_top_valid),
    .topright_valid (nb_topright_valid),
    .left_valid     (nb_left_valid),
    .corner_valid   (nb_corner_valid),
    .pred           (p4),
    .mode_valid     (p4_ok)
  );

  sad_mode_decision #(.NMODES(9), .NPIX(16)) u_i4_md (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (blk_valid),
    .orig       (blk_orig),
    .pred       (p4),
    .mode_valid (p4_ok),
    .out_valid  (i4_valid),
    .best_mode  (i4_mode),
    .best_sad   (i4_sad),
    .best_pred  (md_pred),
    .orig_q     (md_orig)
  );

  always_comb begin
    for (int i = 0; i < 16; i++) resid[i] = resid_t'(int'(md_orig[i]) - int'(md_pred[i]));
  end

  fwd_transform4x4 u_ft (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (i4_valid),
    .res       (resid),
    .out_valid (ft_valid),
    .coef      (coef)
  );

  quant4x4 #(.INTRA(1'b1)) u_q (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ft_valid),
    .qp        (qp_d[2]),
    .coef      (coef),
    .out_valid (level_valid),
    .level     (level)
  );

  dequant4x4 u_dq (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (level_valid),
    .qp        (qp_d[3]),
    .level     (level),
    .out_valid (dq_valid),
    .wcoef     (wcoef)
  );

  inv_transform4x4 u_it (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (dq_valid),
    .wcoef     (wcoef),
    .out_valid (it_valid),
    .res       (dres)
  );

  recon4x4 u_rec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (it_valid),
    .pred      (pred_d[5]),
    .res       (dres),
    .out_valid (recon_valid),
    .recon     (recon)
  );

  // The datapath never stalls, so the companions shift every cycle.
  always_ff @(posedge clk) begin
    qp_d[0] <= qp;
    for (int k = 1; k < 4; k++) qp_d[k] <= qp_d[k-1];
    mode_d[0] <= i4_mode;
    for (int k = 1; k < 3; k++) mode_d[k] <= mode_d[k-1];
    pred_d[0] <= md_pred;
    for (int k = 1; k < 6; k++) pred_d[k] <= pred_d[k-1];
  end

  assign level_mode = mode_d[2];

  // ---------------------------------------------------------------- 16x16 luma
  pixel_t     p16    [4][256];
  logic [3:0] p16_ok;
  pixel_t     i16_orig_q [256];

  intra_plane_pred #(.N(16)) u_i16_pred (
    .top          (mb_top),
    .left         (mb_left),
    .corner       (mb_corner),
    .top_valid    (mb_top_valid),
    .left_valid   (mb_left_valid),
    .corner_valid (mb_corner_valid),
    .pred         (p16),
    .mode_valid   (p16_ok)
  );

  sad_mode_decision #(.NMODES(4), .NPIX(256)) u_i16_md (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (mb_valid),
    .orig       (mb_orig),
    .pred       (p16),
    .mode_valid (p16_ok),
    .out_valid  (i16_valid),
    .best_mode  (i16_mode),
    .best_sad   (i16_sad),
    .best_pred  (i16_pred),
    .orig_q     (i16_orig_q)
  );

  // ---------------------------------------------------------------- 8x8 chroma
  pixel_t     p8     [4][64];
  logic [3:0] p8_ok;
  pixel_t     ch_orig_q [64];

  intra_plane_pred #(.N(8)) u_ch_pred (
    .top          (ch_top),
    .left         (ch_left),
    .corner       (ch_corner),
    .top_valid    (ch_top_valid),
    .left_valid   (ch_left_valid),
    .corner_valid (ch_corner_valid),
    .pred         (p8),
    .mode_valid   (p8_ok)
  );

  sad_mode_decision #(.NMODES(4), .NPIX(64)) u_ch_md (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (ch_valid),
    .orig       (ch_orig),
    .pred       (p8),
    .mode_valid (p8_ok),
    .out_valid  (ch_out_valid),
    .best_mode  (ch_mode),
    .best_sad   (ch_sad),
    .best_pred  (ch_pred),
    .orig_q     (ch_orig_q)
  );

  // ---------------------------------------------------------------- luma choice
  luma_mode_select #(.SAD4_W(12), .SAD16_W(16)) u_luma_sel (
    .clk         (clk),
    .rst_n       (rst_n),
    .i4_valid    (i4_valid),
    .i4_sad      (i4_sad),
    .i16_valid   (i16_valid),
    .i16_sad     (i16_sad),
    .sel_valid   (luma_sel_valid),
    .use_i16     (luma_use_i16),
    .i16_missing (luma_i16_missing),
    .sad4_sum    (luma_sad4_sum),
    .sad16       (luma_sad16)
  );

endmodule
