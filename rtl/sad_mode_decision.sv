// sad_mode_decision: intra mode decision.
//
// Compares every candidate prediction with the source block and picks the
// mode with the smallest sum of absolute differences (SAD) among the modes
// flagged available. Ties go to the lower mode number. All SADs are formed in
// parallel and the choice is registered, so a new block can be presented on
// every clock cycle.
//
// Interface: in_valid qualifies orig/pred/mode_valid. One cycle later
// out_valid rises with best_mode, its SAD, its prediction and the source block
// (passed along so the residual can be formed downstream). If no mode is
// available, mode 0 is reported. The source design names a mode decision
// that compares the predictions; SAD as the cost and the tie rule are this
// design's choices. Reset (active low, asynchronous) clears out_valid only.
module sad_mode_decision
  import h264_pkg::*;
#(
  parameter int unsigned NMODES = 9,
  parameter int unsigned NPIX   = 16,
  localparam int unsigned MODE_W = (NMODES > 1) ? $clog2(NMODES) : 1,
  localparam int unsigned SAD_W  = $clog2(NPIX * 255 + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pixel_t            orig      [NPIX],
  input  pixel_t            pred      [NMODES][NPIX],
  input  logic [NMODES-1:0] mode_valid,
  output logic              out_valid,
  output logic [MODE_W-1:0] best_mode,
  output logic [SAD_W-1:0]  best_sad,
  output pixel_t            best_pred [NPIX],
  output pixel_t            orig_q    [NPIX]
);

  logic [SAD_W-1:0]  sad [NMODES];
  logic [MODE_W-1:0] sel;
  logic [SAD_W-1:0]  sel_sad;

  always_comb begin
    logic found;
    for (int m = 0; m < NMODES; m++) begin
      sad[m] = '0;
      for (int p = 0; p < NPIX; p++) begin
        sad[m] = sad[m] + ((orig[p] > pred[m][p]) ? SAD_W'(orig[p]) - SAD_W'(pred[m][p])
                                                  : SAD_W'(pred[m][p]) - SAD_W'(orig[p]));
      end
    end
    found   = 1'b0;
    sel     = '0;
    sel_sad = sad[0];
    for (int m = 0; m < NMODES; m++) begin
      if (mode_valid[m] && (!found || sad[m] < sel_sad)) begin
        found   = 1'b1;
        sel     = MODE_W'(m);
        sel_sad = sad[m];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      best_mode <= sel;
      best_sad  <= sel_sad;
      best_pred <= pred[sel];
      orig_q    <= orig;
    end
  end

endmodule
