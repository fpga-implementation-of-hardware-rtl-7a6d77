// tb_intra4x4_pred: checks all nine 4x4 luma predictions and the mode
// availability flags against the reference model, for random neighbour
// pixels and every combination of the four neighbour-group valid flags
// (including the repetition of D when E..H are missing).
module tb_intra4x4_pred;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  pixel_t     top  [8];
  pixel_t     left [4];
  pixel_t     corner;
  logic       tv, trv, lv, mv;
  pixel_t     pred [9][16];
  logic [8:0] ok;

  int checks = 0, failures = 0;

  intra4x4_pred dut (
    .top(top), .left(left), .corner(corner), .top_valid(tv), .topright_valid(trv),
    .left_valid(lv), .corner_valid(mv), .pred(pred), .mode_valid(ok)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t [8];
    int l [4];
    int m, e;
    for (int it = 0; it < 3000; it++) begin
      for (int i = 0; i < 8; i++) t[i] = (it % 7 == 0) ? 255 - (i * 3) : int'($urandom_range(0, 255));
      for (int i = 0; i < 4; i++) l[i] = $urandom_range(0, 255);
      m = $urandom_range(0, 255);
      {tv, trv, lv, mv} = 4'(it % 16);
      for (int i = 0; i < 8; i++) top[i] = pixel_t'(t[i]);
      for (int i = 0; i < 4; i++) left[i] = pixel_t'(l[i]);
      corner = pixel_t'(m);
      if (!trv) for (int i = 4; i < 8; i++) t[i] = t[3];
      #1;
      for (int md = 0; md < 9; md++) begin
        checks++;
        if (ok[md] !== ref_i4_ok(md, tv, lv, mv)) begin
          failures++;
          if (failures < 10) $display("mode_valid[%0d] mismatch tv=%0d lv=%0d mv=%0d", md, tv, lv, mv);
        end
        if (ref_i4_ok(md, tv, lv, mv)) begin
          for (int y = 0; y < 4; y++)
            for (int x = 0; x < 4; x++) begin
              e = ref_i4_pix(md, t, l, m, tv, lv, x, y);
              checks++;
              if (int'(pred[md][4*y+x]) != e) begin
                failures++;
                if (failures < 10) $display("mode %0d (%0d,%0d): got %0d exp %0d", md, x, y, pred[md][4*y+x], e);
              end
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
