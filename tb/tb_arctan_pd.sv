// tb_arctan_pd: checks the CORDIC phase detector against the real-valued
// atan2(x, y) for random angles and amplitudes over all four quadrants,
// the axes, the +-pi wrap, tiny amplitudes and full-scale inputs. The result
// must be within 4 binary-angle units (0.02 degrees) plus a small-amplitude
// allowance, and arrive exactly ITER + 1 clocks after `start`.
module tb_arctan_pd;
  import tdtl_pkg::*;

  localparam int ITER = 15;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  sample_t x = '0, y = '0;
  logic busy, e_valid;
  angle_t e;
  int checks = 0, failures = 0;

  arctan_pd #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  task automatic one(sample_t xi, sample_t yi);
    real ref_a, got, err, tol, mag;
    int lat;
    @(negedge clk);
    x = xi; y = yi; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!e_valid && lat < 100) begin @(negedge clk); lat++; end
    ref_a = (xi == 0 && yi == 0) ? 0.0 : $atan2(real'(xi), real'(yi)) * 32768.0 / PI;
    got   = real'(e);
    err   = got - ref_a;
    while (err > 32768.0)   err -= 65536.0;
    while (err < -32768.0)  err += 65536.0;
    mag   = $sqrt(real'(xi) * real'(xi) + real'(yi) * real'(yi));
    tol   = 4.0 + ((mag > 0.0) ? 2.0 * 32768.0 / PI / (16.0 * mag) : 0.0);
    checks++;
    if (err > tol || err < -tol) begin
      failures++;
      if (failures < 10) $display("FAIL: x=%0d y=%0d e=%0d ref=%0.1f", xi, yi, e, ref_a);
    end
    checks++;
    if (lat != ITER + 1) begin
      failures++;
      if (failures < 10) $display("FAIL: latency %0d", lat);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one(0, 0);
    one(0, 1000); one(1000, 0); one(0, -1000); one(-1000, 0);
    one(-1, -30000); one(1, -30000);                 // either side of the +-pi wrap
    one(32767, 32767); one(-32768, -32768); one(-32768, 32767); one(32767, -32768);
    one(1, 1); one(-3, 2); one(5, -7);
    for (int i = 0; i < 3000; i++) begin
      real a, m;
      a = 2.0 * PI * real'($urandom_range(0, 99999)) / 100000.0;
      m = real'($urandom_range(10, 32000));
      one(sample_t'($rtoi(m * $sin(a))), sample_t'($rtoi(m * $cos(a))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
