// tb_quant4x4: streams random coefficient blocks over all 52 QP values,
// including the largest coefficients the forward transform can produce, and
// checks each level against |Z| = (|Y| MF + f) >> (15 + QP/6) with the
// typed-in MF table, the sign rule and the one-cycle latency.
module tb_quant4x4;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  localparam int LAT = 1;

  logic   clk = 0, rst_n = 0, in_valid = 0;
  qp_t    qp;
  coef_t  coef [16];
  logic   out_valid;
  level_t level [16];

  int checks = 0, failures = 0, cycle = 0;
  typedef struct { blk16_t z; int cyc; } exp_t;
  exp_t q [$];

  quant4x4 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .qp(qp), .coef(coef),
                .out_valid(out_valid), .level(level));

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
          if (int'(level[i]) != e.z[i]) begin
            failures++;
            if (failures < 10) $display("level[%0d] got %0d exp %0d", i, level[i], e.z[i]);
          end
        end
      end
    end
  end

  initial begin
    blk16_t y;
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
        case (n % 4)
          0: y[i] = ($urandom_range(0, 1) != 0) ? 9180 : -9180;
          1: y[i] = int'($urandom_range(0, 200)) - 100;
          default: y[i] = int'($urandom_range(0, 18360)) - 9180;
        endcase
        coef[i] = coef_t'(y[i]);
      end
      if (in_valid) begin
        e.z = ref_quant(y, qv, 1'b1);
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
