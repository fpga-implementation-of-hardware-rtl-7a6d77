// tb_recon4x4: streams random predictions and residuals, including ones that
// push the sum below 0 and above 255, and checks the clipped reconstruction
// and the one-cycle latency; it counts that both clip directions occurred.
module tb_recon4x4;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  localparam int LAT = 1;

  logic   clk = 0, rst_n = 0, in_valid = 0;
  pixel_t pred [16];
  dres_t  res [16];
  logic   out_valid;
  pixel_t recon [16];

  int checks = 0, failures = 0, cycle = 0, clip_lo = 0, clip_hi = 0;
  typedef struct { blk16_t r; int cyc; } exp_t;
  exp_t q [$];

  recon4x4 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pred(pred), .res(res),
                .out_valid(out_valid), .recon(recon));

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
      if (q.size() == 0) begin failures++; checks++; end
      else begin
        e = q.pop_front();
        checks++;
        if (cycle - e.cyc != LAT) begin failures++; $display("latency %0d", cycle - e.cyc); end
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (int'(recon[i]) != e.r[i]) begin
            failures++;
            if (failures < 10) $display("recon[%0d] got %0d exp %0d", i, recon[i], e.r[i]);
          end
        end
      end
    end
  end

  initial begin
    exp_t e;
    int n = 0, p, r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n < 3000) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < 16; i++) begin
        p = $urandom_range(0, 255);
        r = (n % 2 == 0) ? int'($urandom_range(0, 600)) - 300 : int'($urandom_range(0, 200000)) - 100000;
        pred[i] = pixel_t'(p);
        res[i]  = dres_t'(r);
        if (in_valid) begin
          if (p + r < 0) clip_lo++;
          if (p + r > 255) clip_hi++;
        end
        e.r[i] = clip255(p + r);
      end
      if (in_valid) begin
        e.cyc = cycle + 1;
        q.push_back(e);
        n++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    checks += 2;
    if (q.size() != 0) failures++;
    if (clip_lo == 0 || clip_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
