// tb_delay_controller: checks that each c(k) moves the delay to
// floor((D - c) mod T) with D kept to 16 fraction bits, for random c of
// either sign and up to several periods, and that the update completes in
// |c|/T + 2 clocks or fewer (one clock per period added or removed).
module tb_delay_controller;
  import tdtl_pkg::*;

  localparam int  PERIOD = 400;
  localparam longint P_FX = longint'(PERIOD) <<< FRAC_W;

  logic clk = 1'b0, rst_n = 1'b0, c_valid = 1'b0;
  cfx_t c = '0;
  logic [8:0] delay;
  logic busy, wrap_up, wrap_down;
  int checks = 0, failures = 0, n_up = 0, n_down = 0;
  longint d_m = 0;

  delay_controller #(.PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (wrap_up) n_up++;
    if (wrap_down) n_down++;
  end

  task automatic one(longint cv);
    int cyc, bound;
    longint ac;
    d_m = d_m - cv;
    d_m = ((d_m % P_FX) + P_FX) % P_FX;
    ac = (cv < 0) ? -cv : cv;
    bound = int'(ac / P_FX) + 3;
    @(negedge clk);
    c = cfx_t'(cv); c_valid = 1'b1;
    @(negedge clk);
    c_valid = 1'b0;
    cyc = 1;
    while (busy && cyc < 100000) begin @(negedge clk); cyc++; end
    checks++;
    if (32'(delay) != 32'(d_m >>> FRAC_W)) begin
      failures++;
      if (failures < 10) $display("FAIL: c=%0d delay %0d expected %0d", cv, delay, d_m >>> FRAC_W);
    end
    checks++;
    if (cyc > bound) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d cycles for c=%0d", cyc, cv);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (delay != 0) failures++;
    one(0);
    one(longint'(1) <<< FRAC_W);         // one sample earlier: wraps to T-1
    one(-(longint'(5) <<< FRAC_W));
    one(P_FX);                           // whole period: no change
    one(-3 * P_FX - 12345);
    for (int i = 0; i < 2000; i++) begin
      longint cv;
      cv = longint'($urandom_range(0, 32'h7FFF_FFFF)) - longint'(32'h4000_0000);
      if ($urandom_range(0, 3) == 0) cv = cv >>> 8;   // mostly within a period
      one(cv);
    end
    checks++;
    if (n_up == 0 || n_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
