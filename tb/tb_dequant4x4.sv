// tb_dequant4x4: streams random level blocks over all 52 QP values and
// checks W = Z V 2^floor(QP/6) with the typed-in V table, for positive and
// negative levels, and the one-cycle latency.
module tb_dequant4x4;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  localparam int LAT = 1;

  logic   clk = 0, rst_n = 0, in_valid = 0;
  qp_t    qp;
  level_t level [16];
  logic   out_valid;
  wcoef_t wcoef [16];

  int checks = 0, failures = 0, cycle = 0;
  typedef struct { blk16_t w; int cyc; } exp_t;
  exp_t q [$];

  dequant4x4 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .qp(qp), .level(level),
                  .out_valid(out_valid), .wcoef(wcoef));

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
          if (int'(wcoef[i]) != e.w[i]) begin
            failures++;
            if (failures < 10) $display("w[%0d] got %0d exp %0d", i, wcoef[i], e.w[i]);
          end
        end
      end
    end
  end

  initial begin
    blk16_t z;
    exp_t e;
    int n = 0, qv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n < 3000) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      qv = n % 52;
      qp = qp_t'(qv);
      for (int i = 0; i < 16; i++) begin
        z[i] = (n % 3 == 0) ? int'($urandom_range(0, 8000)) - 4000 : int'($urandom_range(0, 40)) - 20;
        level[i] = level_t'(z[i]);
      end
      if (in_valid) begin
        e.w = ref_dequant(z, qv);
        e.cyc = cycle + 1;
        q.push_back(e);
        n++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
