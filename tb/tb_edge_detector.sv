// tb_edge_detector: checks the sampling-instant detector against a model.
// A sine stream with occasional jumps back and forward in phase (as caused by
// the variable delay) is fed in; a strobe is expected at each rising zero
// crossing that comes at least HOLDOFF samples after the previous accepted
// one, in the same cycle as the crossing sample, and `suppressed` for the
// others.
module tb_edge_detector;
  import tdtl_pkg::*;

  localparam int HOLDOFF = 200;
  localparam int PERIOD  = 400;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sample_t din = '0;
  logic edge_o, suppressed;
  int checks = 0, failures = 0, n_edge = 0, n_supp = 0;

  edge_detector #(.HOLDOFF(HOLDOFF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    int ph, since;
    sample_t prev, cur;
    bit xing, exp_edge, exp_supp;
    ph = 0; since = HOLDOFF; prev = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      ph = ph + 1;
      if ($urandom_range(0, 299) == 0) ph = ph - int'($urandom_range(1, 150));   // delay lengthened
      if ($urandom_range(0, 299) == 0) ph = ph + int'($urandom_range(1, 150));   // delay shortened
      ph = ((ph % PERIOD) + PERIOD) % PERIOD;
      cur = sample_t'($rtoi(20000.0 * $sin(2.0 * PI * real'(ph) / real'(PERIOD) - 0.001)));
      xing    = (prev < 0) && (cur >= 0);
      exp_edge = xing && since >= HOLDOFF;
      exp_supp = xing && since < HOLDOFF;
      din = cur;
      in_valid = 1'b1;
      #1;
      checks++;
      if (edge_o != exp_edge || suppressed != exp_supp) begin
        failures++;
        if (failures < 10) $display("FAIL: i=%0d edge %b/%b supp %b/%b", i, edge_o, exp_edge, suppressed, exp_supp);
      end
      if (exp_edge) begin since = 1; n_edge++; end
      else if (since < HOLDOFF) since++;
      if (exp_supp) n_supp++;
      prev = cur;
      @(negedge clk);
      in_valid = 1'b0;
      // no strobe between samples
      #1;
      checks++;
      if (edge_o || suppressed) failures++;
      @(negedge clk);
    end
    checks++;
    if (n_edge < 40 || n_supp == 0) failures++;
    $display("edges=%0d suppressed=%0d", n_edge, n_supp);
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
