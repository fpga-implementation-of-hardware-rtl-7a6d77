// tb_sad_mode_decision: streams random 4x4 source blocks with nine random
// candidate predictions (some made equal to force ties, some close to the
// source) and random availability flags, one block per cycle with gaps, and
// checks the chosen mode, its SAD, its prediction, the forwarded source and
// the one-cycle latency against a reference computed here.
module tb_sad_mode_decision;
  import h264_pkg::*;

  localparam int NM = 9, NP = 16;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  pixel_t     orig [NP];
  pixel_t     pred [NM][NP];
  logic [NM-1:0] ok;
  logic       out_valid;
  logic [3:0] best_mode;
  logic [11:0] best_sad;
  pixel_t     best_pred [NP];
  pixel_t     orig_q [NP];

  int checks = 0, failures = 0, cycle = 0, ties = 0;

  typedef struct { int mode; int sad; int cyc; pixel_t p [NP]; pixel_t o [NP]; } exp_t;
  exp_t q [$];

  sad_mode_decision #(.NMODES(NM), .NPIX(NP)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .orig(orig), .pred(pred), .mode_valid(ok),
    .out_valid(out_valid), .best_mode(best_mode), .best_sad(best_sad), .best_pred(best_pred),
    .orig_q(orig_q)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected out_valid"); end
      else begin
        e = q.pop_front();
        if (cycle - e.cyc != 1 || int'(best_mode) != e.mode || int'(best_sad) != e.sad ||
            best_pred != e.p || orig_q != e.o) begin
          failures++;
          if (failures < 10) $display("got mode %0d sad %0d (lat %0d), exp mode %0d sad %0d",
                                      best_mode, best_sad, cycle - e.cyc, e.mode, e.sad);
        end
      end
    end
  end

  initial begin
    exp_t e;
    int s, bs, bm, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < 3000) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < NP; i++) orig[i] = pixel_t'($urandom_range(0, 255));
      for (int m = 0; m < NM; m++)
        for (int i = 0; i < NP; i++)
          pred[m][i] = (m % 3 == 1) ? pred[m-1][i]
                     : pixel_t'(($urandom_range(0, 1) != 0) ? int'(orig[i]) + int'($urandom_range(0, 6)) - 3
                                                            : int'($urandom_range(0, 255)));
      ok = NM'($urandom);
      if (n % 10 == 0) ok = '0;
      if (in_valid) begin
        bm = -1; bs = 0;
        for (int m = 0; m < NM; m++) begin
          s = 0;
          for (int i = 0; i < NP; i++) s += (orig[i] > pred[m][i]) ? orig[i] - pred[m][i] : pred[m][i] - orig[i];
          if (ok[m]) begin
            if (bm >= 0 && s == bs) ties++;
            if (bm < 0 || s < bs) begin bm = m; bs = s; end
          end
        end
        if (bm < 0) begin
          bm = 0;
          bs = 0;
          for (int i = 0; i < NP; i++) bs += (orig[i] > pred[0][i]) ? orig[i] - pred[0][i] : pred[0][i] - orig[i];
        end
        e.mode = bm; e.sad = bs; e.cyc = cycle + 1; e.p = pred[bm]; e.o = orig;
        q.push_back(e);
        n++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    checks++;
    if (ties == 0) begin failures++; $display("no tie exercised"); end
    $display("ties resolved: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
