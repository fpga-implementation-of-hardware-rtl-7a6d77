// tb_luma_mode_select: drives random streams of 4x4 SADs (with gaps) and
// occasional 16x16 SADs, including ones that arrive on the deciding cycle,
// macroblocks without a 16x16 SAD and equal costs, and checks every decision
// and its one-cycle latency against a model kept here.
module tb_luma_mode_select;
  logic        clk = 0, rst_n = 0;
  logic        i4_valid = 0, i16_valid = 0;
  logic [11:0] i4_sad;
  logic [15:0] i16_sad;
  logic        sel_valid, use_i16, i16_missing;
  logic [15:0] sad4_sum, sad16;

  int checks = 0, failures = 0, cycle = 0;
  int cov_i16 = 0, cov_i4 = 0, cov_missing = 0, cov_tie = 0, cov_same_cycle = 0;

  typedef struct { bit use16; bit miss; int s4; int s16; int cyc; } exp_t;
  exp_t q [$];

  luma_mode_select dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && sel_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected decision"); end
      else begin
        e = q.pop_front();
        if (cycle - e.cyc != 1 || use_i16 != e.use16 || i16_missing != e.miss ||
            int'(sad4_sum) != e.s4 || (!e.miss && int'(sad16) != e.s16)) begin
          failures++;
          if (failures < 10) $display("got use16=%0d miss=%0d s4=%0d s16=%0d exp %0d %0d %0d %0d",
                                      use_i16, i16_missing, sad4_sum, sad16, e.use16, e.miss, e.s4, e.s16);
        end
      end
    end
  end

  initial begin
    int cnt = 0, acc = 0, held = 0, s, s16v, n = 0;
    bit held_ok = 0;
    exp_t e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n < 400) begin
      @(negedge clk);
      i4_valid  = ($urandom_range(0, 3) != 0);
      i16_valid = ($urandom_range(0, 15) == 0) && (n % 7 != 3);
      s = $urandom_range(0, 400);
      s16v = (n % 5 == 0) ? acc + 15 * 200 : int'($urandom_range(0, 6000));
      // now and then make the sum equal the held 16x16 SAD exactly
      if (cnt == 15 && held_ok && !i16_valid && n % 2 == 0 && held - acc >= 0 && held - acc <= 4000) s = held - acc;
      i4_sad  = 12'(s);
      i16_sad = 16'(s16v);
      if (i4_valid) begin
        acc = (cnt == 0 ? 0 : acc) + s;
        if (cnt == 15) begin
          e.s4 = acc; e.s16 = held; e.miss = !held_ok;
          e.use16 = held_ok && (held <= acc);
          e.cyc = cycle + 1;
          q.push_back(e);
          if (e.miss) cov_missing++;
          else if (e.use16) cov_i16++;
          else cov_i4++;
          if (held_ok && held == acc) cov_tie++;
          if (i16_valid) cov_same_cycle++;
          held_ok = 0;
          n++;
        end
        cnt = (cnt + 1) % 16;
      end
      if (i16_valid) begin held = s16v; held_ok = 1; end
    end
    @(negedge clk);
    i4_valid = 0; i16_valid = 0;
    repeat (3) @(posedge clk);
    checks += 5;
    if (cov_tie == 0) begin failures++; $display("equal costs never seen"); end
    if (q.size() != 0) failures++;
    if (cov_i16 == 0 || cov_i4 == 0) begin failures++; $display("both outcomes not seen"); end
    if (cov_missing == 0) begin failures++; $display("missing 16x16 never seen"); end
    if (cov_same_cycle == 0) begin failures++; $display("same-cycle 16x16 never seen"); end
    $display("16x16 %0d, 4x4 %0d, missing %0d, ties %0d, same-cycle %0d", cov_i16, cov_i4, cov_missing, cov_tie, cov_same_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
