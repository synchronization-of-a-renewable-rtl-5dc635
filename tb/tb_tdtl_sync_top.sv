// tb_tdtl_sync_top: end-to-end test of the TDTL grid synchroniser at its
// default parameters (20 kHz sampling, 50 Hz, G1 = 0.00318, G2 = 0.000635).
//
// The testbench synthesises a 325 V grid waveform (50 codes per volt) and a
// fixed 50 Hz PV reference, and takes the loop through a sequence of grid
// disturbances: acquisition from reset, a clean half-period phase step,
// phase steps with white Gaussian noise (20 dB SNR), with 80 % and with 35 %
// harmonic distortion, a run of consecutive steps, a sawtooth phase ramp
// (a frequency offset) and a voltage sag down to zero and back.
//
// Reference model: the testbench keeps the exact phase of the clean grid
// fundamental for every sample. At each sampling instant it computes the
// true phase error phi(k), the grid phase a quarter period before the
// instant, wrapped to [-pi, pi). It checks that
//   * on clean input, e(k) from the design equals atan2(x(k), y(k)) and phi(k)
//     within quantisation,
//   * after each disturbance |phi| settles below a tolerance within the time
//     budget of that scenario and stays there,
//   * in lock the rising zero crossings of pv_sync lag those of the grid by a
//     quarter period.
// It also counts the design's mechanisms (phase error wrap through +-pi,
// CORDIC left-half pre-rotation, hold-off suppression, delay wrap up and down)
// and fails on any that never occurred.
module tb_tdtl_sync_top;
  import tdtl_pkg::*;

  localparam int    PERIOD = 400;
  localparam int    TAU    = 100;
  localparam int    FS     = 20000;
  localparam real   PI2    = 2.0 * PI;
  localparam real   AMP    = 325.0 * 50.0;     // 325 V at 50 codes per volt
  localparam int    SPACING = 4;               // clocks per converter sample

  logic clk = 1'b0, rst_n = 1'b0, smp_valid = 1'b0;
  sample_t grid_in = '0, pv_in = '0;
  sample_t pv_sync, x_k, y_k;
  logic pv_sync_valid, sample_edge, e_valid;
  angle_t e_k;
  cfx_t c_k;
  logic [8:0] delay_samples;
  logic edge_suppressed, acc_sat, wrap_up, wrap_down;

  tdtl_sync_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint n = 0;                 // index of the last sample presented
  real   theta = 0.0;            // grid phase offset, radians
  real   amp_scale = 1.0;        // grid amplitude relative to 325 V
  real   h3 = 0.0, h5 = 0.0;     // harmonic amplitudes relative to the fundamental
                                 // (third harmonic in antiphase, fifth in phase)
  real   noise_sd = 0.0;         // noise standard deviation in codes
  real   freq_off = 0.0;         // extra grid phase per sample (ramp), radians
  real   ph_hist [PERIOD];       // fundamental phase of the last PERIOD samples
  real   phi = 0.0;              // true phase error at the last sampling instant
  longint last_edge_n = 0;
  longint last_change_n = 0;     // last sample with a phase jump of the grid
  real   prev_theta = 0.0;
  bit    clean = 1'b1;

  // mechanism counters
  int n_edges = 0, n_wrap_pi = 0, n_left = 0, n_supp = 0, n_up = 0, n_down = 0, n_sat = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t = %0.3f s)", what, real'(n) / FS);
    end
  endtask

  function automatic real wrap_pi(real a);
    real r = a;
    while (r >= PI)  r -= PI2;
    while (r < -PI)  r += PI2;
    return r;
  endfunction

  function automatic real rabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(PI2 * u2);
  endfunction

  function automatic sample_t to_code(real v);
    if (v > 32767.0)  return 16'sd32767;
    if (v < -32768.0) return -16'sd32768;
    return sample_t'($rtoi(v));
  endfunction

  // present one converter sample, SPACING clocks apart
  task automatic step_sample();
    real ph, g, pv;
    n++;
    theta = theta + freq_off;
    if (rabs(theta - prev_theta - freq_off) > 1.0e-9) last_change_n = n;
    prev_theta = theta;
    ph = PI2 * real'(n % PERIOD) / real'(PERIOD) + theta;
    ph_hist[int'(n % PERIOD)] = ph;
    g  = AMP * amp_scale * ($sin(ph) + h3 * $sin(3.0 * ph + PI) + h5 * $sin(5.0 * ph));
    if (noise_sd > 0.0) g = g + noise_sd * gauss();
    pv = AMP * $sin(PI2 * real'(n % PERIOD) / real'(PERIOD));
    @(negedge clk);
    grid_in   = to_code(g);
    pv_in     = to_code(pv);
    smp_valid = 1'b1;
    @(negedge clk);
    smp_valid = 1'b0;
    repeat (SPACING - 2) @(negedge clk);
  endtask

  // loop observation
  always @(posedge clk) if (rst_n) begin
    if (sample_edge) begin
      n_edges++;
      // the samplers capture sample n; x(t) there is the grid of sample n - TAU
      phi = wrap_pi(ph_hist[int'((n - TAU) % PERIOD)]);
      last_edge_n = n;
    end
    if (edge_suppressed) n_supp++;
    if (wrap_up)         n_up++;
    if (wrap_down)       n_down++;
    if (acc_sat)         n_sat++;
    if (dut.u_pd.start && y_k < 0) n_left++;
    if (e_valid) begin
      real e_rad, ref_rad;
      e_rad = real'(e_k) * PI / 32768.0;
      if (e_rad > 2.8 || e_rad < -2.8) n_wrap_pi++;
      if (clean && (x_k != 0 || y_k != 0) && last_edge_n > last_change_n + TAU + 1) begin
        ref_rad = $atan2(real'(x_k), real'(y_k));
        check(rabs(wrap_pi(e_rad - ref_rad)) < 0.002, "e(k) differs from atan2(x(k), y(k))");
        check(rabs(wrap_pi(e_rad - phi)) < 0.03, "e(k) differs from the true phase error");
      end
    end
  end

  // Run `ms` milliseconds; return the time (ms) after which |phi| stayed below tol.
  task automatic run_settle(int ms, real tol, output real settle_ms);
    longint start_n = n;
    longint last_bad = n;
    longint seen = 0;
    repeat (ms * FS / 1000) begin
      step_sample();
      if (last_edge_n == n) begin
        seen++;
        if (rabs(phi) >= tol) last_bad = n;
      end
    end
    settle_ms = real'(last_bad - start_n) * 1000.0 / FS;
    check(seen > 0, "no sampling instants");
  endtask

  // Run a scenario of `ms` milliseconds. The loop must bring |phi| below
  // `tol` within `budget_ms` and keep it there, and end the scenario with
  // |phi| below `fine` over its last 100 ms.
  task automatic scenario(string name, int ms, real tol, real budget_ms, real fine);
    real s, f;
    longint start_n = n;
    longint last_bad = n, last_bad_fine = n;
    repeat (ms * FS / 1000) begin
      step_sample();
      if (last_edge_n == n) begin
        if (rabs(phi) >= tol)  last_bad = n;
        if (rabs(phi) >= fine) last_bad_fine = n;
      end
    end
    s = real'(last_bad - start_n) * 1000.0 / FS;
    f = real'(last_bad_fine - start_n) * 1000.0 / FS;
    $display("%-34s |phi| < %0.2f rad after %6.1f ms (budget %3.0f ms), < %0.2f rad after %6.1f ms",
             name, tol, s, budget_ms, fine, f);
    check(s <= budget_ms, {name, ": not settled within its budget"});
    check(f <= real'(ms - 100), {name, ": not locked at the end"});
  endtask

  // Apply a phase step just after a sampling instant and compare the phase
  // errors of the following periods with the loop's difference equation
  //   phi(k+2) = 2 phi(k+1) - phi(k) - r K1 phi(k+1) + K1 phi(k)
  // (linear detector), with K1 = G1 omega and r = 1 + G2 / G1 worked out here
  // from the gains, not from the design's fixed-point constants.
  task automatic check_recurrence(real step_rad);
    real K1, r, p[12], pred;
    int  k;
    K1 = 0.00318 * PI2 * 50.0;
    r  = 1.0 + 0.000635 / 0.00318;
    while (last_edge_n != n) step_sample();
    step_sample();
    theta = theta + step_rad;
    k = 0;
    while (k < 12) begin
      step_sample();
      if (last_edge_n == n) begin p[k] = phi; k++; end
    end
    for (int i = 2; i < 12; i++) begin
      pred = 2.0 * p[i-1] - p[i-2] - r * K1 * p[i-1] + K1 * p[i-2];
      check(rabs(p[i] - pred) < 0.04, $sformatf("Eq. 15 recurrence, period %0d: %0.3f vs %0.3f", i, p[i], pred));
    end
    $display("difference equation: phi = %0.3f %0.3f %0.3f %0.3f %0.3f %0.3f (rad, per period)",
             p[0], p[1], p[2], p[3], p[4], p[5]);
  endtask

  // Check that pv_sync crosses zero upward a quarter period after the grid.
  task automatic check_output_phase();
    real lag;
    longint pv_n, grid_n;
    sample_t prev_pv, prev_g;
    pv_n = -1; grid_n = -1; prev_pv = pv_sync; prev_g = grid_in;
    repeat (2 * PERIOD) begin
      step_sample();
      if (prev_g < 0 && grid_in >= 0 && grid_n < 0) grid_n = n;
      if (grid_n >= 0 && prev_pv < 0 && pv_sync >= 0 && pv_n < 0) pv_n = n;
      prev_pv = pv_sync; prev_g = grid_in;
    end
    lag = real'(pv_n - grid_n);
    $display("pv_sync rising crossing lags the grid by %0.0f samples (quarter period = %0d)", lag, TAU);
    check(pv_n > 0 && rabs(lag - real'(TAU)) <= 3.0, "pv_sync is not a quarter period behind the grid");
  endtask

  initial begin
    real s;
    foreach (ph_hist[i]) ph_hist[i] = 0.0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;

    // 1. acquisition from reset (grid starts in phase with the PV waveform)
    scenario("acquisition from reset", 600, 0.3, 200.0, 0.05);
    check_output_phase();

    // 2. clean phase step of 10 ms (pi rad)
    theta = theta + PI;
    scenario("10 ms phase step, clean", 600, 0.3, 100.0, 0.05);

    // 3. same step with 20 dB SNR white Gaussian noise
    clean = 1'b0;
    noise_sd = AMP / $sqrt(2.0) / 10.0;
    theta = theta + PI;
    scenario("10 ms phase step, AWGN 20 dB", 1000, 0.6, 200.0, 0.6);
    noise_sd = 0.0;
    scenario("noise removed", 400, 0.05, 300.0, 0.05);

    // 4. phase step with 80 % THD (0.6 third + 0.53 fifth harmonic)
    h3 = 0.6; h5 = 0.53;
    scenario("80 % THD applied", 400, 0.3, 200.0, 0.05);
    theta = theta + PI;
    scenario("10 ms phase step, 80 % THD", 600, 0.3, 200.0, 0.05);

    // 5. consecutive steps with 35 % THD (0.25 third + 0.245 fifth harmonic)
    h3 = 0.25; h5 = 0.245;
    scenario("35 % THD applied", 300, 0.3, 200.0, 0.05);
    theta = theta + 0.7;  scenario("consecutive step 1, 35 % THD", 400, 0.3, 100.0, 0.05);
    theta = theta - 0.9;  scenario("consecutive step 2, 35 % THD", 400, 0.3, 100.0, 0.05);
    theta = theta - 0.5;  scenario("consecutive step 3, 35 % THD", 400, 0.3, 100.0, 0.05);
    theta = theta + 1.2;  scenario("consecutive step 4, 35 % THD", 400, 0.3, 100.0, 0.05);
    theta = theta + 1.2;  scenario("consecutive step 5, 35 % THD", 400, 0.3, 100.0, 0.05);
    theta = theta - 2.8;  scenario("consecutive step 6, 35 % THD", 400, 0.3, 100.0, 0.05);
    h3 = 0.0; h5 = 0.0;
    clean = 1'b1;
    scenario("distortion removed", 300, 0.05, 200.0, 0.05);

    // 6. sawtooth phase ramp: +3.33 ms over 0.5 s, then a jump back
    for (int r = 0; r < 3; r++) begin
      freq_off = PI2 * 50.0 * 3.33e-3 / (0.5 * FS);
      scenario($sformatf("phase ramp %0d", r), 500, 0.3, 100.0, 0.1);
      freq_off = 0.0;
      theta = theta - PI2 * 50.0 * 3.33e-3;
    end
    scenario("after ramps", 400, 0.3, 100.0, 0.05);

    // negative clean step of 5 ms (-pi/2)
    theta = theta - PI / 2.0;
    scenario("-5 ms phase step, clean", 400, 0.3, 100.0, 0.05);

    // loop difference equation after a clean 1 rad step
    check_recurrence(1.0);
    scenario("after 1 rad step", 300, 0.3, 100.0, 0.05);

    // 7. voltage sag: amplitude falls linearly to zero over 1.25 s and recovers
    clean = 1'b0;
    for (int i = 0; i < 50; i++) begin
      amp_scale = 1.0 - real'(i) / 50.0;
      run_settle(25, 10.0, s);
    end
    amp_scale = 0.0;
    run_settle(25, 10.0, s);
    for (int i = 1; i <= 50; i++) begin
      amp_scale = real'(i) / 50.0;
      if (i <= 10) run_settle(25, 10.0, s);
      else begin
        run_settle(25, 0.1, s);
        check(s <= 0.0, "lock lost while the sag recovers");
      end
    end
    amp_scale = 1.0;
    clean = 1'b1;
    scenario("after voltage sag", 400, 0.05, 200.0, 0.05);
    check_output_phase();

    $display("mechanisms: edges=%0d e_at_pi=%0d left_half=%0d holdoff=%0d wrap_up=%0d wrap_down=%0d acc_sat=%0d",
             n_edges, n_wrap_pi, n_left, n_supp, n_up, n_down, n_sat);
    check(n_wrap_pi > 0, "phase error never reached +-pi");
    check(n_left > 0,    "CORDIC pre-rotation never used");
    check(n_supp > 0,    "edge hold-off never suppressed a crossing");
    check(n_up > 0,      "controller never wrapped the delay up");
    check(n_down > 0,    "controller never wrapped the delay down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
