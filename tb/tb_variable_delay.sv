// tb_variable_delay: checks the variable PV delay. Random samples are pushed
// while the delay setting changes at random; every output must equal the input
// of `delay` strobes before (the current input for a delay of zero, zero for
// samples older than the stream), one clock after its strobe.
module tb_variable_delay;
  import tdtl_pkg::*;

  localparam int DEPTH = 400;
  localparam int N     = 6000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sample_t din = '0, dout;
  logic [8:0] delay = '0;
  logic out_valid;
  sample_t hist [N];
  int checks = 0, failures = 0, n_zero = 0, n_max = 0;

  variable_delay #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    sample_t expect_v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      if ($urandom_range(0, 49) == 0) begin
        case ($urandom_range(0, 3))
          0: delay = '0;
          1: delay = 9'(DEPTH - 1);
          default: delay = 9'($urandom_range(0, DEPTH - 1));
        endcase
      end
      if (delay == 0) n_zero++;
      if (delay == DEPTH - 1) n_max++;
      hist[i]  = sample_t'($urandom);
      din      = hist[i];
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      expect_v = (i >= int'(delay)) ? hist[i - int'(delay)] : sample_t'(0);
      checks++;
      if (!out_valid || dout != expect_v) begin
        failures++;
        if (failures < 10) $display("FAIL: sample %0d delay %0d out %0d expected %0d", i, delay, dout, expect_v);
      end
      if ($urandom_range(0, 1)) @(negedge clk);
    end
    checks++;
    if (n_zero == 0 || n_max == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
