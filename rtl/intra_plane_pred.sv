// intra_plane_pred: NxN intra prediction with the four whole-block modes,
// used for 16x16 luma (N=16) and for 8x8 chroma (N=8).
//
//   mode 0 vertical   : each column copies the pixel above it
//   mode 1 horizontal : each row copies the pixel left of it
//   mode 2 DC         : one mean of the top (H) and left (V) neighbours over
//                       the whole block; mean of the one group present if the
//                       other is missing, 128 if both are
//   mode 3 plane      : a bilinear ramp fitted to the neighbours in integer
//                       arithmetic,
//       Hg = sum_{k=0}^{N/2-1} (k+1) * (top[N/2+k] - top[N/2-2-k])
//       Vg = sum_{k=0}^{N/2-1} (k+1) * (left[N/2+k] - left[N/2-2-k])
//       (index -1 means the corner pixel)
//       a = 16 * (top[N-1] + left[N-1])
//       b = (S*Hg + 32) >> 6,  c = (S*Vg + 32) >> 6,  S = 5 for N=16, 34 for N=8
//       pred(x,y) = clip((a + b*(x - N/2 + 1) + c*(y - N/2 + 1) + 16) >> 5)
//
// All four predictions are produced in parallel, with mode_valid telling
// which have their neighbours: vertical needs the top row, horizontal the
// left column, plane all of top, left and corner; DC is always available.
// The four modes and the single mean of H and V for DC follow the source
// design (H.264 itself splits chroma DC by 4x4 quadrant; this design does
// not). The plane equations are those of H.264 for 16x16 luma and for 4:2:0
// chroma.
//
// Interface: purely combinational; pred[m][N*y+x].
module intra_plane_pred
  import h264_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  pixel_t     top    [N],
  input  pixel_t     left   [N],
  input  pixel_t     corner,
  input  logic       top_valid,
  input  logic       left_valid,
  input  logic       corner_valid,
  output pixel_t     pred   [4][N*N],
  output logic [3:0] mode_valid
);

  localparam int HALF   = int'(N / 2);
  localparam int LOG2N  = $clog2(N);
  localparam int SCALE  = (N == 16) ? 5 : 34;

  function automatic int nb(input pixel_t line [N], input pixel_t m, input int idx);
    return (idx < 0) ? int'(m) : int'(line[idx]);
  endfunction

  always_comb begin
    logic signed [31:0] sum_t, sum_l, dcv, hg, vg, a, b, c;

    mode_valid[0] = top_valid;
    mode_valid[1] = left_valid;
    mode_valid[2] = 1'b1;
    mode_valid[3] = top_valid && left_valid && corner_valid;

    sum_t = 0;
    sum_l = 0;
    for (int i = 0; i < N; i++) begin
      sum_t += int'(top[i]);
      sum_l += int'(left[i]);
    end
    if (top_valid && left_valid) dcv = (sum_t + sum_l + N) >>> (LOG2N + 1);
    else if (top_valid)          dcv = (sum_t + HALF) >>> LOG2N;
    else if (left_valid)         dcv = (sum_l + HALF) >>> LOG2N;
    else                         dcv = 128;

    hg = 0;
    vg = 0;
    for (int k = 0; k < HALF; k++) begin
      hg += (k + 1) * (nb(top,  corner, HALF + k) - nb(top,  corner, HALF - 2 - k));
      vg += (k + 1) * (nb(left, corner, HALF + k) - nb(left, corner, HALF - 2 - k));
    end
    a = 16 * (int'(top[N-1]) + int'(left[N-1]));
    b = (SCALE * hg + 32) >>> 6;
    c = (SCALE * vg + 32) >>> 6;

    for (int y = 0; y < N; y++) begin
      for (int x = 0; x < N; x++) begin
        pred[0][N*y+x] = top[x];
        pred[1][N*y+x] = left[y];
        pred[2][N*y+x] = pixel_t'(dcv);
        pred[3][N*y+x] = clip_pixel((a + b * (x - HALF + 1) + c * (y - HALF + 1) + 16) >>> 5);
      end
    end
  end

endmodule
