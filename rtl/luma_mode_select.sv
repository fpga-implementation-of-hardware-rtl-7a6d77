// luma_mode_select: per-macroblock choice between 4x4 and 16x16 luma coding.
//
// The 16 SADs of a macroblock's 4x4 blocks, as the 4x4 mode decision reports
// them, are summed. When the sixteenth arrives, the sum is compared with the
// 16x16 SAD of the same macroblock, and the decision is registered. The
// macroblock prefers 16x16 coding when its SAD is not larger (16x16 coding
// sends one mode instead of sixteen). The 16x16 SAD is held from its last
// i16_valid, so the caller presents the macroblock to the 16x16 predictor
// before the last of its 4x4 blocks. If no 16x16 SAD has arrived since the
// previous decision, the macroblock is coded 4x4 and i16_missing is set.
//
// Interface: i4_valid/i4_sad and i16_valid/i16_sad come straight from the
// two mode decisions; sel_valid pulses one cycle after the sixteenth
// i4_valid with use_i16, the two costs and i16_missing. The source design
// says the 4x4 and 16x16 predictions are compared by the mode decision and
// the best luma is selected; the SAD sum, the tie rule and the ordering
// rule are this design's choices. Reset (asynchronous, active low) clears
// the block counter, the held 16x16 SAD flag and sel_valid.
module luma_mode_select #(
  parameter int unsigned SAD4_W  = 12,
  parameter int unsigned SAD16_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               i4_valid,
  input  logic [SAD4_W-1:0]  i4_sad,
  input  logic               i16_valid,
  input  logic [SAD16_W-1:0] i16_sad,
  output logic               sel_valid,
  output logic               use_i16,
  output logic               i16_missing,
  output logic [SAD16_W-1:0] sad4_sum,
  output logic [SAD16_W-1:0] sad16
);

  logic [3:0]         blk_cnt;
  logic [SAD16_W-1:0] acc;
  logic [SAD16_W-1:0] held16;
  logic               held_ok;
  logic [SAD16_W-1:0] acc_next;
  logic               last;

  assign acc_next = ((blk_cnt == 4'd0) ? '0 : acc) + SAD16_W'(i4_sad);
  assign last     = i4_valid && (blk_cnt == 4'd15);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_cnt   <= '0;
      held_ok   <= 1'b0;
      sel_valid <= 1'b0;
    end else begin
      sel_valid <= last;
      if (i4_valid) blk_cnt <= blk_cnt + 4'd1;
      // a 16x16 SAD arriving on the deciding cycle belongs to the next macroblock
      if (i16_valid)  held_ok <= 1'b1;
      else if (last)  held_ok <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (i4_valid) acc <= acc_next;
    if (i16_valid) held16 <= i16_sad;
    if (last) begin
      sad4_sum    <= acc_next;
      sad16       <= held16;
      i16_missing <= !held_ok;
      use_i16     <= held_ok && (held16 <= acc_next);
    end
  end

endmodule
