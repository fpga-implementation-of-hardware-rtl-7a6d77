// tb_intra_plane_pred: checks the vertical, horizontal, DC and plane
// predictions and their availability flags for a 16x16 luma instance and an
// 8x8 chroma instance, for random and for extreme (0/255 ramp) neighbours
// that drive the plane mode into clipping, under all valid-flag combinations.
module tb_intra_plane_pred;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  pixel_t     t16 [16], l16 [16], t8 [8], l8 [8];
  pixel_t     m16, m8;
  logic       tv, lv, mv;
  pixel_t     p16 [4][256];
  pixel_t     p8  [4][64];
  logic [3:0] ok16, ok8;

  int checks = 0, failures = 0, clipped = 0;

  intra_plane_pred #(.N(16)) dut16 (
    .top(t16), .left(l16), .corner(m16), .top_valid(tv), .left_valid(lv),
    .corner_valid(mv), .pred(p16), .mode_valid(ok16)
  );

  intra_plane_pred #(.N(8)) dut8 (
    .top(t8), .left(l8), .corner(m8), .top_valid(tv), .left_valid(lv),
    .corner_valid(mv), .pred(p8), .mode_valid(ok8)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit exp_ok(int mode, bit t, bit l, bit m);
    case (mode)
      0: return t;
      1: return l;
      2: return 1'b1;
      default: return t && l && m;
    endcase
  endfunction

  initial begin
    int ta [16], la [16], tb8 [16], lb8 [16];
    int ma, mb, e, kind;
    for (int it = 0; it < 800; it++) begin
      kind = it % 4;
      for (int i = 0; i < 16; i++) begin
        if (kind == 1) begin ta[i] = 255 - 16 * i; la[i] = 16 * i; end
        else if (kind == 2) begin ta[i] = 15 * i; la[i] = 15 * i; end
        else begin ta[i] = $urandom_range(0, 255); la[i] = $urandom_range(0, 255); end
        tb8[i] = (kind == 2) ? 30 * (i % 8) + 10 : int'($urandom_range(0, 255));
        lb8[i] = (kind == 2) ? 30 * (i % 8) + 10 : int'($urandom_range(0, 255));
      end
      ma = (kind == 2) ? 0 : int'($urandom_range(0, 255));
      mb = (kind == 2) ? 0 : int'($urandom_range(0, 255));
      {tv, lv, mv} = 3'((it / 4) % 8);
      for (int i = 0; i < 16; i++) begin t16[i] = pixel_t'(ta[i]); l16[i] = pixel_t'(la[i]); end
      for (int i = 0; i < 8; i++)  begin t8[i]  = pixel_t'(tb8[i]); l8[i] = pixel_t'(lb8[i]); end
      m16 = pixel_t'(ma);
      m8  = pixel_t'(mb);
      #1;
      for (int md = 0; md < 4; md++) begin
        checks += 2;
        if (ok16[md] !== exp_ok(md, tv, lv, mv)) failures++;
        if (ok8[md]  !== exp_ok(md, tv, lv, mv)) failures++;
        if (!exp_ok(md, tv, lv, mv)) continue;
        for (int y = 0; y < 16; y++)
          for (int x = 0; x < 16; x++) begin
            e = ref_plane_pix(16, md, ta, la, ma, tv, lv, x, y);
            if (md == 3 && (e == 0 || e == 255)) clipped++;
            checks++;
            if (int'(p16[md][16*y+x]) != e) begin
              failures++;
              if (failures < 10) $display("16x16 mode %0d (%0d,%0d): got %0d exp %0d", md, x, y, p16[md][16*y+x], e);
            end
          end
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++) begin
            e = ref_plane_pix(8, md, tb8, lb8, mb, tv, lv, x, y);
            checks++;
            if (int'(p8[md][8*y+x]) != e) begin
              failures++;
              if (failures < 10) $display("8x8 mode %0d (%0d,%0d): got %0d exp %0d", md, x, y, p8[md][8*y+x], e);
            end
          end
      end
    end
    checks++;
    if (clipped == 0) begin failures++; $display("plane clipping never exercised"); end
    $display("plane predictions clipped: %0d", clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
