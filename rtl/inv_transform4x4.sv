// inv_transform4x4: H.264 4x4 inverse integer transform.
//
// Each 1-D pass over four values w0..w3 is
//   e0 = w0 + w2        e1 = w0 - w2
//   e2 = (w1 >>> 1) - w3  e3 = w1 + (w3 >>> 1)
//   out = { e0 + e3, e1 + e2, e1 - e2, e0 - e3 }
// applied first along each row, then along each column; the result is
// scaled back with (x + 32) >>> 6. Being exact integer arithmetic, it gives
// the same residual in encoder and decoder. The source design names the
// inverse transform in its encoder loop; the equations are those of H.264.
//
// Timing: two register stages (row pass, column pass with final scaling),
// one block per clock; out_valid follows in_valid by two cycles. The row pass
// is kept at 40 bits so no 32-bit input can overflow it.
module inv_transform4x4
  import h264_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  wcoef_t wcoef [16],
  output logic   out_valid,
  output dres_t  res   [16]
);

  typedef logic signed [39:0] acc_t;

  acc_t  row_c [16];
  acc_t  row_q [16];
  dres_t col_c [16];
  logic  v1;

  function automatic void butterfly(input acc_t w0, input acc_t w1, input acc_t w2,
                                    input acc_t w3, output acc_t o0, output acc_t o1,
                                    output acc_t o2, output acc_t o3);
    acc_t e0, e1, e2, e3;
    e0 = w0 + w2;
    e1 = w0 - w2;
    e2 = (w1 >>> 1) - w3;
    e3 = w1 + (w3 >>> 1);
    o0 = e0 + e3;
    o1 = e1 + e2;
    o2 = e1 - e2;
    o3 = e0 - e3;
  endfunction

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      butterfly(acc_t'(wcoef[4*i]), acc_t'(wcoef[4*i+1]), acc_t'(wcoef[4*i+2]),
                acc_t'(wcoef[4*i+3]),
                row_c[4*i], row_c[4*i+1], row_c[4*i+2], row_c[4*i+3]);
    end
  end

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      acc_t o [4];
      butterfly(row_q[j], row_q[4+j], row_q[8+j], row_q[12+j], o[0], o[1], o[2], o[3]);
      for (int i = 0; i < 4; i++) col_c[4*i+j] = dres_t'((o[i] + 40'sd32) >>> 6);
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
    if (v1)       res   <= col_c;
  end

endmodule
