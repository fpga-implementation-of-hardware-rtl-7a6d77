// fwd_transform4x4: H.264 4x4 forward integer core transform, Y = Cf X Cf^T.
//
//        | 1  1  1  1 |
//   Cf = | 2  1 -1 -2 |
//        | 1 -1 -1  1 |
//        | 1 -2  2 -1 |
//
// The transform is computed by direct multiplication with the fixed matrix
// coefficients (parallel constant-coefficient multipliers) rather than by an
// add/shift butterfly, as in the source design, first along the rows
// (T = X Cf^T) and then along the columns (Y = Cf T). The post-scaling of the
// full transform is left to the quantiser, which folds it into its
// multiplication factors.
//
// Timing: a two-stage pipeline (row stage, column stage), one 4x4 block per
// clock; out_valid follows in_valid by two cycles. Residual input range is
// -255..255, which keeps every coefficient within 16 bits (|Y| <= 36*255).
// Reset (active low, asynchronous) clears the valid pipeline only.
module fwd_transform4x4
  import h264_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  resid_t res  [16],   // X, raster order
  output logic   out_valid,
  output coef_t  coef [16]    // Y, raster order
);

  coef_t row_c [16];   // T = X Cf^T, combinational
  coef_t row_q [16];   // registered
  coef_t col_c [16];   // Y = Cf T, combinational
  logic  v1;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        logic signed [31:0] acc;
        acc = 0;
        for (int k = 0; k < 4; k++) acc += int'(res[4*i+k]) * CF[4*j+k];
        row_c[4*i+j] = coef_t'(acc);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        logic signed [31:0] acc;
        acc = 0;
        for (int k = 0; k < 4; k++) acc += CF[4*i+k] * int'(row_q[4*k+j]);
        col_c[4*i+j] = coef_t'(acc);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) row_q <= row_c;
    if (v1)       coef  <= col_c;
  end

endmodule
