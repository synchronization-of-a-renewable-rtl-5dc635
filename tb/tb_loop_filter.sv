// tb_loop_filter: checks the proportional plus accumulation filter
// c(k) = K1 e(k) + K2 acc(k), acc(k) = sat(acc(k-1) + e(k)), against an
// integer model, with random errors, gaps between updates, the one-clock
// latency, accumulator saturation at both ends and a reset.
module tb_loop_filter;
  import tdtl_pkg::*;

  localparam int K1 = 400, K2 = 80, ACC_W = 24;

  logic clk = 1'b0, rst_n = 1'b0, e_valid = 1'b0;
  angle_t e = '0;
  cfx_t c;
  logic c_valid, acc_sat;
  int checks = 0, failures = 0, n_sat = 0;
  longint acc_m = 0;

  loop_filter #(.K1_FX(K1), .K2_FX(K2), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic one(angle_t ev);
    longint lo, hi, exp_c;
    bit sat;
    lo = -(longint'(1) <<< (ACC_W - 1));
    hi = (longint'(1) <<< (ACC_W - 1)) - 1;
    acc_m = acc_m + longint'(ev);
    sat = 1'b0;
    if (acc_m > hi) begin acc_m = hi; sat = 1'b1; end
    if (acc_m < lo) begin acc_m = lo; sat = 1'b1; end
    exp_c = longint'(K1) * longint'(ev) + longint'(K2) * acc_m;
    @(negedge clk);
    e = ev; e_valid = 1'b1;
    @(negedge clk);
    e_valid = 1'b0;
    checks++;
    if (!c_valid || longint'(c) != exp_c || acc_sat != sat) begin
      failures++;
      if (failures < 10) $display("FAIL: e=%0d c=%0d expected %0d", ev, c, exp_c);
    end
    if (sat) n_sat++;
    repeat ($urandom_range(0, 2)) begin
      @(negedge clk);
      checks++;
      if (c_valid) failures++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) one(angle_t'($urandom));
    for (int i = 0; i < 400; i++) one(angle_t'(32767));     // drive to positive saturation
    for (int i = 0; i < 800; i++) one(angle_t'(-32768));    // and to negative saturation
    for (int i = 0; i < 200; i++) one(angle_t'($urandom_range(0, 2000)) - angle_t'(1000));
    // reset clears the accumulator
    rst_n = 1'b0; acc_m = 0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 50; i++) one(angle_t'($urandom));
    checks++;
    if (n_sat < 2) failures++;
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
