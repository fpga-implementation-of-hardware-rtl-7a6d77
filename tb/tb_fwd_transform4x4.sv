// tb_fwd_transform4x4: streams random residual blocks (including the
// extreme -255/+255 patterns that give the largest coefficients) with gaps
// in in_valid, and checks every coefficient against Y = (Cf X) Cf^T and the
// two-cycle latency.
module tb_fwd_transform4x4;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  localparam int LAT = 2;

  logic   clk = 0, rst_n = 0, in_valid = 0;
  resid_t res [16];
  logic   out_valid;
  coef_t  coef [16];

  int checks = 0, failures = 0, cycle = 0;
  typedef struct { blk16_t y; int cyc; } exp_t;
  exp_t q [$];

  fwd_transform4x4 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .res(res),
                        .out_valid(out_valid), .coef(coef));

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
          if (int'(coef[i]) != e.y[i]) begin
            failures++;
            if (failures < 10) $display("coef[%0d] got %0d exp %0d", i, coef[i], e.y[i]);
          end
        end
      end
    end
  end

  initial begin
    blk16_t x;
    exp_t e;
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n < 3000) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < 16; i++) begin
        case (n % 5)
          0: x[i] = ((i % 4 == 0) || (i % 4 == 3)) ? 255 : -255;   // large odd-row output
          1: x[i] = 255;
          2: x[i] = -255;
          default: x[i] = int'($urandom_range(0, 510)) - 255;
        endcase
        res[i] = resid_t'(x[i]);
      end
      if (in_valid) begin
        e.y = ref_fwd(x);
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
