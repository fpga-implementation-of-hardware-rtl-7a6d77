// intra4x4_pred: 4x4 luma intra prediction calculator.
//
// From the 13 neighbouring reconstructed pixels of a 4x4 block -- A..H above
// and above-right, I..L to the left, M above-left -- it computes the predicted
// block of all nine H.264 4x4 luma modes at once (vertical, horizontal, DC,
// diagonal down-left, diagonal down-right, vertical-right, horizontal-down,
// vertical-left, horizontal-up), so a following mode decision can compare
// them in the same cycle.
//
// Each neighbour group has its own valid input, since neighbours are missing
// at picture and slice edges. A mode whose neighbours are missing is flagged
// in mode_valid. When E..H are missing but A..D are present, D is repeated in
// their place (as H.264 does), so modes 3 and 7 stay usable. DC uses whichever
// of the top and left groups are present, and 128 when neither is.
//
// Interface: purely combinational; pred[m][4*row+col] is mode m's pixel.
// Computing all modes in parallel from the 13 neighbours with per-group valid
// inputs follows the source design; the pixel equations are those of H.264.
module intra4x4_pred
  import h264_pkg::*;
(
  input  pixel_t     top      [8],   // A..H
  input  pixel_t     left     [4],   // I..L
  input  pixel_t     corner,         // M
  input  logic       top_valid,      // A..D present
  input  logic       topright_valid, // E..H present
  input  logic       left_valid,     // I..L present
  input  logic       corner_valid,   // M present
  output pixel_t     pred     [9][16],
  output logic [8:0] mode_valid
);

  // z: neighbours along one line, L K J I M A B C D E F G H
  //    index:                       0 1 2 3 4 5 6 7 8 9 10 11 12
  // left pixel of row r is z[3-r]; top pixel of column c is z[5+c]; M is z[4].
  logic [31:0] z [13];

  function automatic pixel_t avg2(input int unsigned a, input int unsigned b);
    return pixel_t'((a + b + 1) >> 1);
  endfunction

  function automatic pixel_t avg3(input int unsigned a, input int unsigned b, input int unsigned c);
    return pixel_t'((a + 2 * b + c + 2) >> 2);
  endfunction

  always_comb begin
    logic [31:0]        sum_t, sum_l, dcv;
    logic signed [31:0] zz;
    logic [31:0]        k;

    for (int i = 0; i < 4; i++) z[3 - i] = int'(left[i]);
    z[4] = int'(corner);
    for (int i = 0; i < 4; i++) z[5 + i] = int'(top[i]);
    for (int i = 4; i < 8; i++) z[5 + i] = topright_valid ? int'(top[i]) : int'(top[3]);

    mode_valid[0] = top_valid;
    mode_valid[1] = left_valid;
    mode_valid[2] = 1'b1;
    mode_valid[3] = top_valid;
    mode_valid[4] = top_valid && left_valid && corner_valid;
    mode_valid[5] = top_valid && left_valid && corner_valid;
    mode_valid[6] = top_valid && left_valid && corner_valid;
    mode_valid[7] = top_valid;
    mode_valid[8] = left_valid;

    sum_t = z[5] + z[6] + z[7] + z[8];
    sum_l = z[0] + z[1] + z[2] + z[3];
    if (top_valid && left_valid) dcv = (sum_t + sum_l + 4) >> 3;
    else if (top_valid)          dcv = (sum_t + 2) >> 2;
    else if (left_valid)         dcv = (sum_l + 2) >> 2;
    else                         dcv = 128;

    for (int y = 0; y < 4; y++) begin
      for (int x = 0; x < 4; x++) begin
        // 0 vertical, 1 horizontal, 2 DC
        pred[0][4*y+x] = pixel_t'(z[5 + x]);
        pred[1][4*y+x] = pixel_t'(z[3 - y]);
        pred[2][4*y+x] = pixel_t'(dcv);

        // 3 diagonal down-left
        if (x == 3 && y == 3) pred[3][4*y+x] = avg3(z[11], z[12], z[12]);
        else                  pred[3][4*y+x] = avg3(z[5+x+y], z[6+x+y], z[7+x+y]);

        // 4 diagonal down-right: centred on z[4 + x - y]
        k = 4 + x - y;
        pred[4][4*y+x] = avg3(z[k-1], z[k], z[k+1]);

        // 5 vertical-right
        zz = 2 * x - y;
        if (zz >= 0 && zz[0] == 1'b0) begin
          k = 5 + x - (y >> 1);                // top[x-(y>>1)]
          pred[5][4*y+x] = avg2(z[k-1], z[k]);
        end else if (zz > 0) begin
          k = 5 + x - (y >> 1);
          pred[5][4*y+x] = avg3(z[k-2], z[k-1], z[k]);
        end else if (zz == -1) begin
          pred[5][4*y+x] = avg3(z[3], z[4], z[5]);
        end else begin
          // left[y-1], left[y-2], left[y-3] with left[-1] = M
          pred[5][4*y+x] = avg3(z[4-y], z[5-y], z[6-y]);
        end

        // 6 horizontal-down
        zz = 2 * y - x;
        if (zz >= 0 && zz[0] == 1'b0) begin
          k = 3 - (y - (x >> 1));              // left[y-(x>>1)]
          pred[6][4*y+x] = avg2(z[k+1], z[k]);
        end else if (zz > 0) begin
          k = 3 - (y - (x >> 1));
          pred[6][4*y+x] = avg3(z[k+2], z[k+1], z[k]);
        end else if (zz == -1) begin
          pred[6][4*y+x] = avg3(z[3], z[4], z[5]);
        end else begin
          // top[x-1], top[x-2], top[x-3] with top[-1] = M
          pred[6][4*y+x] = avg3(z[4+x], z[3+x], z[2+x]);
        end

        // 7 vertical-left
        k = 5 + x + (y >> 1);
        if (y[0] == 1'b0) pred[7][4*y+x] = avg2(z[k], z[k+1]);
        else              pred[7][4*y+x] = avg3(z[k], z[k+1], z[k+2]);

        // 8 horizontal-up
        zz = x + 2 * y;
        k = 3 - (y + (x >> 1));                // left[y+(x>>1)]
        if (zz > 5)                           pred[8][4*y+x] = pixel_t'(z[0]);
        else if (zz == 5)                     pred[8][4*y+x] = avg3(z[1], z[0], z[0]);
        else if (zz[0] == 1'b0)               pred[8][4*y+x] = avg2(z[k], z[k-1]);
        else                                  pred[8][4*y+x] = avg3(z[k], z[k-1], z[k-2]);
      end
    end
  end

endmodule
