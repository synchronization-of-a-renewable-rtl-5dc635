// tb_tdtl_lock_range: checks the lock range of the second-order loop,
// 0 < K1 < 4 / (1 + r), with K1 = G1 omega and r = 1 + G2 / G1.
// Two synchronisers see the same 50 Hz grid and PV waveforms:
//   inside : K1 = 1.6, r = 1.2 (limit 1.82) must lock after a phase step,
//   outside: K1 = 2.2, r = 1.2 must not settle.
// The grid takes a 1.5 rad phase step every second; the true phase error at
// each sampling instant is worked out from the generated grid phase.
module tb_tdtl_lock_range;
  import tdtl_pkg::*;

  localparam int  PERIOD = 400;
  localparam int  TAU    = 100;
  localparam int  FS     = 20000;
  localparam real OMEGA  = 2.0 * PI * 50.0;
  localparam real G1_IN  = 1.6 / OMEGA;
  localparam real G1_OUT = 2.2 / OMEGA;

  logic clk = 1'b0, rst_n = 1'b0, smp_valid = 1'b0;
  sample_t grid_in = '0, pv_in = '0;

  sample_t pv_a, x_a, y_a, pv_b, x_b, y_b;
  logic pvv_a, edge_a, ev_a, pvv_b, edge_b, ev_b;
  angle_t e_a, e_b;
  cfx_t c_a, c_b;
  logic [8:0] d_a, d_b;
  logic [3:0] flags_a, flags_b;

  tdtl_sync_top #(.G1(G1_IN), .G2(0.2 * G1_IN)) u_in (
    .clk, .rst_n, .smp_valid, .grid_in, .pv_in,
    .pv_sync(pv_a), .pv_sync_valid(pvv_a), .sample_edge(edge_a), .x_k(x_a), .y_k(y_a),
    .e_k(e_a), .e_valid(ev_a), .c_k(c_a), .delay_samples(d_a),
    .edge_suppressed(flags_a[0]), .acc_sat(flags_a[1]), .wrap_up(flags_a[2]), .wrap_down(flags_a[3])
  );
  tdtl_sync_top #(.G1(G1_OUT), .G2(0.2 * G1_OUT)) u_out (
    .clk, .rst_n, .smp_valid, .grid_in, .pv_in,
    .pv_sync(pv_b), .pv_sync_valid(pvv_b), .sample_edge(edge_b), .x_k(x_b), .y_k(y_b),
    .e_k(e_b), .e_valid(ev_b), .c_k(c_b), .delay_samples(d_b),
    .edge_suppressed(flags_b[0]), .acc_sat(flags_b[1]), .wrap_up(flags_b[2]), .wrap_down(flags_b[3])
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint n = 0;
  real theta = 0.0;
  real ph_hist [PERIOD];
  real worst_in, worst_out;      // largest |phi| in the second half of each second

  function automatic real wrap_pi(real a);
    real q = a;
    while (q >= PI) q -= 2.0 * PI;
    while (q < -PI) q += 2.0 * PI;
    return q;
  endfunction

  function automatic real rabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  task automatic step_sample();
    real ph;
    n++;
    ph = 2.0 * PI * real'(n % PERIOD) / real'(PERIOD) + theta;
    ph_hist[int'(n % PERIOD)] = ph;
    @(negedge clk);
    grid_in   = sample_t'($rtoi(16250.0 * $sin(ph)));
    pv_in     = sample_t'($rtoi(16250.0 * $sin(2.0 * PI * real'(n % PERIOD) / real'(PERIOD))));
    smp_valid = 1'b1;
    @(negedge clk);
    smp_valid = 1'b0;
  endtask

  bit late = 1'b0;
  always @(posedge clk) if (rst_n && late) begin
    if (edge_a) worst_in  = (rabs(wrap_pi(ph_hist[int'((n - TAU) % PERIOD)])) > worst_in)
                            ? rabs(wrap_pi(ph_hist[int'((n - TAU) % PERIOD)])) : worst_in;
    if (edge_b) worst_out = (rabs(wrap_pi(ph_hist[int'((n - TAU) % PERIOD)])) > worst_out)
                            ? rabs(wrap_pi(ph_hist[int'((n - TAU) % PERIOD)])) : worst_out;
  end

  initial begin
    foreach (ph_hist[i]) ph_hist[i] = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      theta = theta + 1.5;
      late = 1'b0;
      repeat (FS / 2) step_sample();
      worst_in = 0.0; worst_out = 0.0;
      late = 1'b1;
      repeat (FS / 2) step_sample();
      $display("step %0d: worst |phi| over the last 0.5 s: K1=1.6 %0.3f rad, K1=2.2 %0.3f rad",
               s, worst_in, worst_out);
      checks++;
      if (worst_in > 0.05) begin failures++; $display("FAIL: K1 = 1.6 did not lock"); end
      checks++;
      if (worst_out < 0.3) begin failures++; $display("FAIL: K1 = 2.2 settled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
