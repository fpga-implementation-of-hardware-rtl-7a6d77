// tb_inv_transform4x4: streams random rescaled-coefficient blocks (small,
// large, odd values that exercise the arithmetic half-shifts, and negative
// values that exercise the rounding of (x+32)>>6) and checks the decoded
// residual against the H.264 row/column equations and the two-cycle latency.
module tb_inv_transform4x4;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  localparam int LAT = 2;

  logic   clk = 0, rst_n = 0, in_valid = 0;
  wcoef_t wcoef [16];
  logic   out_valid;
  dres_t  res [16];

  int checks = 0, failures = 0, cycle = 0;
  typedef struct { blk16_t r; int cyc; } exp_t;
  exp_t q [$];

  inv_transform4x4 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .wcoef(wcoef),
                        .out_valid(out_valid), .res(res));

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
          if (int'(res[i]) != e.r[i]) begin
            failures++;
            if (failures < 10) $display("res[%0d] got %0d exp %0d", i, res[i], e.r[i]);
          end
        end
      end
    end
  end

  initial begin
    blk16_t w;
    exp_t e;
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n < 3000) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < 16; i++) begin
        case (n % 3)
          0: w[i] = int'($urandom_range(0, 400)) - 200;
          1: w[i] = int'($urandom_range(0, 2000000)) - 1000000;
          default: w[i] = 2 * (int'($urandom_range(0, 50)) - 25) + 1;
        endcase
        wcoef[i] = wcoef_t'(w[i]);
      end
      if (in_valid) begin
        e.r = ref_inv(w);
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
