// tb_sample_hold: checks the sample-and-hold. A random stream changes every
// clock; the held value must equal the stream at the last strobe and stay
// constant in between, with hold_valid high exactly one clock after each
// strobe.
module tb_sample_hold;
  import tdtl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, strobe = 1'b0;
  sample_t din = '0, hold;
  logic hold_valid;
  int checks = 0, failures = 0;

  sample_hold dut (.*);

  always #5 clk = ~clk;

  initial begin
    sample_t exp_hold;
    bit exp_valid;
    exp_hold = '0; exp_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (hold != 0) failures++;
    for (int i = 0; i < 5000; i++) begin
      din    = sample_t'($urandom);
      strobe = ($urandom_range(0, 9) == 0);
      @(posedge clk);
      if (strobe) exp_hold = din;
      exp_valid = strobe;
      @(negedge clk);
      checks++;
      if (hold != exp_hold || hold_valid != exp_valid) begin
        failures++;
        if (failures < 10) $display("FAIL: i=%0d hold %0d exp %0d", i, hold, exp_hold);
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
