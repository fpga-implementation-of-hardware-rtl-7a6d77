// tb_h264_intra_tq_top: end-to-end test of the intra datapath at its
// default sizes.
//
// Phase 1 codes a 32x32 synthetic luma picture macroblock by macroblock,
//   closing the loop as an encoder does: each macroblock goes to the 16x16
//   path, then its sixteen 4x4 blocks go through the coding loop in raster
//   order, each taking its neighbours from the reconstructed pixels the
//   design returned for earlier blocks; a neighbour group counts as missing
//   when it lies outside the picture or has not been coded yet. Run at
//   several QPs.
// Phase 2 streams blocks back to back, one per clock, with random neighbours,
//   availability and QP, each source block built near one chosen mode's
//   prediction so that every mode wins sometimes; every sixteenth block a
//   macroblock goes to the 16x16 path too, half of them exactly predictable.
// Phase 3 drives the 16x16 luma and 8x8 chroma predictors the same way.
//
// Every output (chosen mode, SAD, levels, mode travelling with the levels,
// reconstruction, 16x16 and chroma choices and predictions, the per-
// macroblock 4x4/16x16 choice) is compared
// with a reference chain computed here, and the latencies (+1, +4, +8) are
// checked. Coverage counters require each 4x4, 16x16 and chroma mode to be
// chosen, both luma macroblock choices, top-right substitution, no-neighbour DC, recon clipping, every
// QP/6 shift group and full-rate streaming to have occurred.
module tb_h264_intra_tq_top;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 0, rst_n = 0;

  logic       blk_valid = 0;
  qp_t        qp;
  pixel_t     blk_orig [16];
  pixel_t     nb_top [8], nb_left [4], nb_corner;
  logic       nb_top_valid, nb_topright_valid, nb_left_valid, nb_corner_valid;
  logic       i4_valid;
  logic [3:0] i4_mode;
  logic [11:0] i4_sad;
  logic       level_valid;
  logic [3:0] level_mode;
  level_t     level [16];
  logic       recon_valid;
  pixel_t     recon [16];

  logic       mb_valid = 0;
  pixel_t     mb_orig [256], mb_top [16], mb_left [16], mb_corner;
  logic       mb_top_valid, mb_left_valid, mb_corner_valid;
  logic       i16_valid;
  logic [1:0] i16_mode;
  logic [15:0] i16_sad;
  pixel_t     i16_pred [256];

  logic       ch_valid = 0;
  pixel_t     ch_orig [64], ch_top [8], ch_left [8], ch_corner;
  logic       ch_top_valid, ch_left_valid, ch_corner_valid;
  logic       ch_out_valid;
  logic [1:0] ch_mode;
  logic [13:0] ch_sad;
  pixel_t     ch_pred [64];

  logic       luma_sel_valid, luma_use_i16, luma_i16_missing;
  logic [15:0] luma_sad4_sum, luma_sad16;

  h264_intra_tq_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  // coverage
  int cov_i4 [9], cov_i16 [4], cov_ch [4], cov_shift [9];
  int cov_trsub = 0, cov_nonb = 0, cov_clip = 0;
  int run = 0, best_run = 0;

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
  endtask

  // ------------------------------------------------------------ reference chain
  typedef struct {
    int mode; int sad; blk16_t lev; blk16_t rec; int cyc;
  } exp4_t;

  function automatic exp4_t ref_chain(blk16_t o, int t_in [8], int l [4], int m,
                                      bit tv, bit trv, bit lv, bit mv, int qpv);
    exp4_t  e;
    int     t [8];
    blk16_t p, r, y, w, d;
    int     s, pre;
    t = t_in;
    if (!trv) for (int i = 4; i < 8; i++) t[i] = t[3];
    e.mode = -1;
    for (int md = 0; md < 9; md++) begin
      if (!ref_i4_ok(md, tv, lv, mv)) continue;
      s = 0;
      for (int i = 0; i < 16; i++) begin
        int v;
        v = ref_i4_pix(md, t, l, m, tv, lv, i % 4, i / 4);
        s += (o[i] > v) ? o[i] - v : v - o[i];
      end
      if (e.mode < 0 || s < e.sad) begin
        e.mode = md; e.sad = s;
      end
    end
    for (int i = 0; i < 16; i++) begin
      p[i] = ref_i4_pix(e.mode, t, l, m, tv, lv, i % 4, i / 4);
      r[i] = o[i] - p[i];
    end
    y = ref_fwd(r);
    e.lev = ref_quant(y, qpv, 1'b1);
    w = ref_dequant(e.lev, qpv);
    d = ref_inv(w);
    for (int i = 0; i < 16; i++) begin
      pre = p[i] + d[i];
      if (pre < 0 || pre > 255) cov_clip++;
      e.rec[i] = clip255(pre);
    end
    return e;
  endfunction

  exp4_t q_md [$], q_lev [$], q_rec [$];

  // ------------------------------------------------------------ monitors
  always @(posedge clk) begin
    exp4_t e;
    if (rst_n && i4_valid) begin
      checks++;
      if (q_md.size() == 0) fail("unexpected i4_valid");
      else begin
        e = q_md.pop_front();
        if (cycle - e.cyc != 1) fail($sformatf("mode latency %0d", cycle - e.cyc));
        if (int'(i4_mode) != e.mode || int'(i4_sad) != e.sad)
          fail($sformatf("mode %0d sad %0d, exp %0d %0d", i4_mode, i4_sad, e.mode, e.sad));
        else cov_i4[e.mode]++;
      end
    end
    if (rst_n && level_valid) begin
      checks++;
      if (q_lev.size() == 0) fail("unexpected level_valid");
      else begin
        e = q_lev.pop_front();
        if (cycle - e.cyc != 4) fail($sformatf("level latency %0d", cycle - e.cyc));
        if (int'(level_mode) != e.mode) fail("level_mode");
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (int'(level[i]) != e.lev[i]) fail($sformatf("level[%0d] %0d exp %0d", i, level[i], e.lev[i]));
        end
      end
    end
    if (rst_n && recon_valid) begin
      checks++;
      if (q_rec.size() == 0) fail("unexpected recon_valid");
      else begin
        e = q_rec.pop_front();
        if (cycle - e.cyc != 8) fail($sformatf("recon latency %0d", cycle - e.cyc));
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (int'(recon[i]) != e.rec[i]) fail($sformatf("recon[%0d] %0d exp %0d", i, recon[i], e.rec[i]));
        end
      end
    end
  end

  // per-macroblock luma choice, modelled from the observed SADs
  typedef struct { bit u; bit miss; int s4; int s16; } lexp_t;
  lexp_t lq [$];
  int  lm_cnt = 0, lm_acc = 0, lm_held = 0, cov_use16 = 0, cov_use4 = 0;
  bit  lm_ok = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (luma_sel_valid) begin
        lexp_t e;
        checks++;
        if (lq.size() == 0) fail("unexpected luma_sel_valid");
        else begin
          e = lq.pop_front();
          if (luma_use_i16 != e.u || luma_i16_missing != e.miss || int'(luma_sad4_sum) != e.s4 ||
              (!e.miss && int'(luma_sad16) != e.s16))
            fail($sformatf("luma choice %0d/%0d %0d %0d, exp %0d/%0d %0d %0d", luma_use_i16,
                           luma_i16_missing, luma_sad4_sum, luma_sad16, e.u, e.miss, e.s4, e.s16));
          else if (e.u) cov_use16++;
          else cov_use4++;
        end
      end
      if (i4_valid) begin
        lm_acc = ((lm_cnt == 0) ? 0 : lm_acc) + int'(i4_sad);
        if (lm_cnt == 15) begin
          lexp_t e;
          e.u = lm_ok && (lm_held <= lm_acc); e.miss = !lm_ok; e.s4 = lm_acc; e.s16 = lm_held;
          lq.push_back(e);
          lm_ok = 0;
        end
        lm_cnt = (lm_cnt + 1) % 16;
      end
      if (i16_valid) begin lm_held = int'(i16_sad); lm_ok = 1; end
    end
  end

  // present one 4x4 block at the coming clock edge (call at negedge)
  task automatic send4(blk16_t o, int t [8], int l [4], int m, bit tv, bit trv, bit lv, bit mv, int qpv);
    exp4_t e;
    for (int i = 0; i < 16; i++) blk_orig[i] = pixel_t'(o[i]);
    for (int i = 0; i < 8; i++)  nb_top[i]   = pixel_t'(t[i]);
    for (int i = 0; i < 4; i++)  nb_left[i]  = pixel_t'(l[i]);
    nb_corner = pixel_t'(m);
    {nb_top_valid, nb_topright_valid, nb_left_valid, nb_corner_valid} = {tv, trv, lv, mv};
    qp = qp_t'(qpv);
    blk_valid = 1'b1;
    if (tv && !trv) cov_trsub++;
    if (!tv && !lv) cov_nonb++;
    cov_shift[qpv / 6]++;
    e = ref_chain(o, t, l, m, tv, trv, lv, mv, qpv);
    e.cyc = cycle + 1;
    q_md.push_back(e);
    q_lev.push_back(e);
    q_rec.push_back(e);
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int W = 32;
  int pic [W][W];
  int rec [W][W];
  bit coded [64];

  // recon collector for phase 1
  int  rec_bx, rec_by;
  bit  collect = 0;
  always @(posedge clk) begin
    if (collect && recon_valid)
      for (int i = 0; i < 16; i++) rec[4*rec_by + i/4][4*rec_bx + i%4] = int'(recon[i]);
  end

  initial begin
    blk16_t o;
    int t [8], l [4], m, tgt, qpv, streak;
    bit tv, trv, lv, mv;

    for (int i = 0; i < 9; i++) cov_shift[i] = 0;
    for (int i = 0; i < 9; i++) cov_i4[i] = 0;
    for (int i = 0; i < 4; i++) begin cov_i16[i] = 0; cov_ch[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- phase 1: closed-loop picture coding
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++)
        pic[y][x] = clip255(((x < 16) ? 8 * x : 250 - 6 * y) + ((y / 8) % 2) * 40 +
                            ((x + y) % 8 == 0 ? 30 : 0) + int'($urandom_range(0, 12)) - 6);
    for (int pass = 0; pass < 4; pass++) begin
      qpv = (pass == 0) ? 4 : (pass == 1) ? 22 : (pass == 2) ? 34 : 51;
      for (int i = 0; i < 64; i++) coded[i] = 0;
      collect = 1;
      for (int mby = 0; mby < W / 16; mby++)
        for (int mbx = 0; mbx < W / 16; mbx++) begin
          @(negedge clk);
          for (int i = 0; i < 16; i++) begin
            mb_top[i]  = pixel_t'((mby > 0) ? rec[16*mby-1][16*mbx+i] : 0);
            mb_left[i] = pixel_t'((mbx > 0) ? rec[16*mby+i][16*mbx-1] : 0);
          end
          mb_corner = pixel_t'((mby > 0 && mbx > 0) ? rec[16*mby-1][16*mbx-1] : 0);
          {mb_top_valid, mb_left_valid, mb_corner_valid} = {mby > 0, mbx > 0, mby > 0 && mbx > 0};
          for (int i = 0; i < 256; i++) mb_orig[i] = pixel_t'(pic[16*mby + i/16][16*mbx + i%16]);
          mb_valid = 1;
          @(negedge clk);
          mb_valid = 0;
          for (int sb = 0; sb < 16; sb++) begin
            int bx, by;
            bx  = 4 * mbx + sb % 4;
            by  = 4 * mby + sb / 4;
            tv  = (by > 0) && coded[8*(by-1) + bx];
            lv  = (bx > 0) && coded[8*by + bx - 1];
            mv  = (bx > 0) && (by > 0) && coded[8*(by-1) + bx - 1];
            trv = (by > 0) && (bx < W / 4 - 1) && coded[8*(by-1) + bx + 1];
            for (int i = 0; i < 8; i++) t[i] = ((i < 4) ? tv : trv) ? rec[4*by-1][4*bx+i] : 0;
            for (int i = 0; i < 4; i++) l[i] = lv ? rec[4*by+i][4*bx-1] : 0;
            m = mv ? rec[4*by-1][4*bx-1] : 0;
            for (int i = 0; i < 16; i++) o[i] = pic[4*by + i/4][4*bx + i%4];
            @(negedge clk);
            rec_bx = bx; rec_by = by;
            send4(o, t, l, m, tv, trv, lv, mv, qpv);
            @(negedge clk);
            blk_valid = 0;
            wait (q_rec.size() == 0);
            coded[8*by + bx] = 1;
            @(negedge clk);
          end
        end
      collect = 0;
    end

    // ---------------- phase 2: back-to-back streaming
    streak = 0;
    for (int n = 0; n < 2000; n++) begin
      {tv, trv, lv, mv} = 4'($urandom);
      if (n % 5 == 0) {tv, trv, lv, mv} = 4'b1111;
      for (int i = 0; i < 8; i++) t[i] = $urandom_range(0, 255);
      for (int i = 0; i < 4; i++) l[i] = $urandom_range(0, 255);
      m = $urandom_range(0, 255);
      tgt = n % 9;
      begin
        int ts [8];
        ts = t;
        if (!trv) for (int i = 4; i < 8; i++) ts[i] = ts[3];
        for (int i = 0; i < 16; i++)
          o[i] = clip255(ref_i4_pix(tgt, ts, l, m, tv, lv, i % 4, i / 4) + int'($urandom_range(0, 4)) - 2);
      end
      qpv = (n * 7) % 52;
      @(negedge clk);
      send4(o, t, l, m, tv, trv, lv, mv, qpv);
      mb_valid = (n % 16 == 0);
      if (n % 16 == 0) begin
        for (int i = 0; i < 16; i++) begin
          mb_top[i] = pixel_t'($urandom_range(0, 255));
          mb_left[i] = pixel_t'($urandom_range(0, 255));
        end
        {mb_top_valid, mb_left_valid, mb_corner_valid} = 3'b111;
        for (int i = 0; i < 256; i++)
          mb_orig[i] = ((n / 16) % 2 == 0) ? mb_top[i % 16] : pixel_t'($urandom_range(0, 255));
      end
    end
    @(negedge clk);
    blk_valid = 0;
    mb_valid = 0;
    wait (q_rec.size() == 0);
    repeat (2) @(negedge clk);

    // ---------------- phase 3: 16x16 luma and 8x8 chroma
    for (int n = 0; n < 200; n++) begin
      int tt [16], ll [16], mm, t8 [16], l8 [16], m8;
      int e16 [256], e8 [64], s, bs, bm, v;
      bit a_t, a_l, a_m;
      {a_t, a_l, a_m} = (n % 3 == 0) ? 3'b111 : 3'($urandom);
      for (int i = 0; i < 16; i++) begin
        tt[i] = (n % 4 == 1) ? 16 * i : int'($urandom_range(0, 255));
        ll[i] = (n % 4 == 1) ? 255 - 10 * i : int'($urandom_range(0, 255));
        t8[i] = $urandom_range(0, 255);
        l8[i] = $urandom_range(0, 255);
      end
      mm = $urandom_range(0, 255);
      m8 = $urandom_range(0, 255);
      tgt = n % 4;
      if (!(tgt == 0 && a_t || tgt == 1 && a_l || tgt == 3 && a_t && a_l && a_m)) tgt = 2;
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin mb_top[i] = pixel_t'(tt[i]); mb_left[i] = pixel_t'(ll[i]); end
      for (int i = 0; i < 8; i++)  begin ch_top[i] = pixel_t'(t8[i]); ch_left[i] = pixel_t'(l8[i]); end
      mb_corner = pixel_t'(mm);
      ch_corner = pixel_t'(m8);
      {mb_top_valid, mb_left_valid, mb_corner_valid} = {a_t, a_l, a_m};
      {ch_top_valid, ch_left_valid, ch_corner_valid} = {a_t, a_l, a_m};
      for (int i = 0; i < 256; i++)
        mb_orig[i] = pixel_t'(clip255(ref_plane_pix(16, tgt, tt, ll, mm, a_t, a_l, i % 16, i / 16) +
                                      int'($urandom_range(0, 4)) - 2));
      for (int i = 0; i < 64; i++)
        ch_orig[i] = pixel_t'(clip255(ref_plane_pix(8, tgt, t8, l8, m8, a_t, a_l, i % 8, i / 8) +
                                      int'($urandom_range(0, 4)) - 2));
      mb_valid = 1;
      ch_valid = 1;
      @(negedge clk);
      mb_valid = 0;
      ch_valid = 0;
      // 16x16 expected
      bm = -1; bs = 0;
      for (int md = 0; md < 4; md++) begin
        if (!(md == 2 || md == 0 && a_t || md == 1 && a_l || md == 3 && a_t && a_l && a_m)) continue;
        s = 0;
        for (int i = 0; i < 256; i++) begin
          v = ref_plane_pix(16, md, tt, ll, mm, a_t, a_l, i % 16, i / 16);
          s += (int'(mb_orig[i]) > v) ? int'(mb_orig[i]) - v : v - int'(mb_orig[i]);
        end
        if (bm < 0 || s < bs) begin bm = md; bs = s; end
      end
      checks++;
      if (!i16_valid) fail("i16_valid missing");
      else if (int'(i16_mode) != bm || int'(i16_sad) != bs)
        fail($sformatf("i16 mode %0d sad %0d exp %0d %0d", i16_mode, i16_sad, bm, bs));
      else begin
        cov_i16[bm]++;
        for (int i = 0; i < 256; i++) begin
          checks++;
          if (int'(i16_pred[i]) != ref_plane_pix(16, bm, tt, ll, mm, a_t, a_l, i % 16, i / 16)) fail("i16_pred");
        end
      end
      // chroma expected
      bm = -1; bs = 0;
      for (int md = 0; md < 4; md++) begin
        if (!(md == 2 || md == 0 && a_t || md == 1 && a_l || md == 3 && a_t && a_l && a_m)) continue;
        s = 0;
        for (int i = 0; i < 64; i++) begin
          v = ref_plane_pix(8, md, t8, l8, m8, a_t, a_l, i % 8, i / 8);
          s += (int'(ch_orig[i]) > v) ? int'(ch_orig[i]) - v : v - int'(ch_orig[i]);
        end
        if (bm < 0 || s < bs) begin bm = md; bs = s; end
      end
      checks++;
      if (!ch_out_valid) fail("ch_out_valid missing");
      else if (int'(ch_mode) != bm || int'(ch_sad) != bs)
        fail($sformatf("chroma mode %0d sad %0d exp %0d %0d", ch_mode, ch_sad, bm, bs));
      else begin
        cov_ch[bm]++;
        for (int i = 0; i < 64; i++) begin
          checks++;
          if (int'(ch_pred[i]) != ref_plane_pix(8, bm, t8, l8, m8, a_t, a_l, i % 8, i / 8)) fail("ch_pred");
        end
      end
    end
    @(negedge clk);
    checks++;
    if (i16_valid || ch_out_valid) fail("valid held too long");

    // ---------------- coverage
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (cov_i4[i] == 0) fail($sformatf("4x4 mode %0d never chosen", i));
    end
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (cov_i16[i] == 0) fail($sformatf("16x16 mode %0d never chosen", i));
      if (cov_ch[i] == 0)  fail($sformatf("chroma mode %0d never chosen", i));
    end
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (cov_shift[i] == 0) fail($sformatf("QP/6 = %0d never used", i));
    end
    checks += 3;
    if (cov_trsub == 0) fail("top-right substitution never used");
    if (cov_nonb == 0)  fail("block without neighbours never coded");
    if (cov_clip == 0)  fail("reconstruction never clipped");
    checks += 2;
    if (cov_use16 == 0) fail("macroblock never chosen for 16x16 coding");
    if (cov_use4 == 0)  fail("macroblock never chosen for 4x4 coding");
    if (lq.size() != 0) fail("luma choices missing");
    checks++;
    if (best_run < 2000) fail($sformatf("longest full-rate run %0d blocks", best_run));
    $display("4x4 modes chosen: %0d %0d %0d %0d %0d %0d %0d %0d %0d", cov_i4[0], cov_i4[1], cov_i4[2],
             cov_i4[3], cov_i4[4], cov_i4[5], cov_i4[6], cov_i4[7], cov_i4[8]);
    $display("luma macroblock choice: 16x16 %0d, 4x4 %0d", cov_use16, cov_use4);
    $display("16x16 modes chosen: %0d %0d %0d %0d; chroma: %0d %0d %0d %0d", cov_i16[0], cov_i16[1],
             cov_i16[2], cov_i16[3], cov_ch[0], cov_ch[1], cov_ch[2], cov_ch[3]);
    $display("top-right substituted %0d, no neighbours %0d, recon clipped %0d, full-rate run %0d",
             cov_trsub, cov_nonb, cov_clip, best_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // streaming: recon must come out on consecutive cycles during phase 2
  always @(posedge clk) begin
    if (rst_n && recon_valid) run++;
    else run = 0;
    if (run > best_run) best_run = run;
  end
endmodule
