// tb_fixed_delay: checks the quarter-period delay line. Random samples are
// pushed with irregular strobe spacing; every output must equal the input of
// exactly DEPTH strobes before (zero while the line is still filling) and
// appear one clock after its strobe.
module tb_fixed_delay;
  import tdtl_pkg::*;

  localparam int DEPTH = 100;
  localparam int N     = 2000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sample_t din = '0, dout;
  logic out_valid;
  sample_t hist [N];
  int checks = 0, failures = 0;

  fixed_delay #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      hist[i]  = sample_t'($urandom);
      din      = hist[i];
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || dout != ((i >= DEPTH) ? hist[i - DEPTH] : sample_t'(0))) begin
        failures++;
        if (failures < 10) $display("FAIL: sample %0d out %0d valid %b", i, dout, out_valid);
      end
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        checks++;
        if (out_valid) failures++;
      end
    end
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
