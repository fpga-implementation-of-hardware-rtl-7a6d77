// quant4x4: forward quantiser for a 4x4 block of transform coefficients.
//
//   |Z| = (|Y| * MF + f) >> qbits,   sign(Z) = sign(Y)
//   qbits = 15 + floor(QP/6),  MF = MF(QP mod 6, position class)
//
// QP selects one of 52 levels (0..51); each step of 6 in QP doubles the
// quantiser step size, which appears here as one more bit of right shift.
// MF is the H.264 multiplication factor (see h264_pkg), which also carries the
// post-scaling of the forward core transform. The rounding offset f is
// 2^qbits/3 for intra blocks (INTRA=1) and 2^qbits/6 otherwise; the source
// design only says f is a rounding term, the values are H.264 encoder practice.
//
// Timing: one register stage, one block per clock; out_valid follows
// in_valid by one cycle. QP is sampled together with the block.
module quant4x4
  import h264_pkg::*;
#(
  parameter bit INTRA = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  qp_t    qp,
  input  coef_t  coef  [16],
  output logic   out_valid,
  output level_t level [16]
);

  level_t lvl_c [16];

  always_comb begin
    logic [2:0]  rem;
    logic [31:0]        qbits;
    logic signed [63:0] f, mag, q;
    rem   = qp_rem6(qp);
    qbits = QBITS0 + 32'(qp_div6(qp));
    f     = INTRA ? (longint'(1) << qbits) / 3 : (longint'(1) << qbits) / 6;
    for (int i = 0; i < 16; i++) begin
      mag = (coef[i] < 0) ? -longint'(coef[i]) : longint'(coef[i]);
      q   = (mag * longint'(mf_lookup(rem, pos_class(i))) + f) >>> qbits;
      lvl_c[i] = (coef[i] < 0) ? level_t'(-q) : level_t'(q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) level <= lvl_c;
  end

endmodule
