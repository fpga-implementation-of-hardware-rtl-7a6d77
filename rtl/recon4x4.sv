// recon4x4: reconstruction of a 4x4 block.
//
// Adds the decoded residual from the inverse transform to the prediction the
// block was coded with and clips each sum to the 8-bit pixel range 0..255.
// These are the pixels a decoder would produce; they become the neighbours
// for predicting later blocks. The adder is the one of the source design's
// encoder loop; the clipping is H.264's.
//
// Timing: one register stage, one block per clock; out_valid follows
// in_valid by one cycle.
module recon4x4
  import h264_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t pred  [16],
  input  dres_t  res   [16],
  output logic   out_valid,
  output pixel_t recon [16]
);

  pixel_t rec_c [16];

  always_comb begin
    for (int i = 0; i < 16; i++) rec_c[i] = clip_pixel(int'(pred[i]) + int'(res[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) recon <= rec_c;
  end

endmodule
