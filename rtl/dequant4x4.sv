// dequant4x4: inverse quantiser (rescaling) for a 4x4 block of levels.
//
//   W = Z * V(QP mod 6, position class) * 2^floor(QP/6)
//
// V is the H.264 rescaling factor for a flat scaling matrix (see h264_pkg);
// it carries the inverse transform's pre-scaling and a factor of 64 that the
// inverse transform removes with its final (x+32)>>6. The formula follows the
// source design; the V values are those of H.264.
//
// Timing: one register stage, one block per clock; out_valid follows
// in_valid by one cycle. QP is sampled together with the block.
module dequant4x4
  import h264_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  qp_t    qp,
  input  level_t level [16],
  output logic   out_valid,
  output wcoef_t wcoef [16]
);

  wcoef_t w_c [16];

  always_comb begin
    logic [2:0]  rem;
    logic [31:0] sh;
    rem = qp_rem6(qp);
    sh  = 32'(qp_div6(qp));
    for (int i = 0; i < 16; i++) begin
      w_c[i] = wcoef_t'((int'(level[i]) * int'(v_lookup(rem, pos_class(i)))) <<< sh);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) wcoef <= w_c;
  end

endmodule
