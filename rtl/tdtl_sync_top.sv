// tdtl_sync_top: all-digital synchroniser of a PV inverter reference waveform
// with the grid voltage, built as a second-order time-delay digital tanlock
// loop (TDTL).
//
// Signal flow (one converter sample per smp_valid strobe):
//   grid_in --+--> fixed_delay (tau = T/4) --> x --> Sampler1 --+
//             +--------------------------------> y --> Sampler2 --+--> arctan_pd
//   pv_in ------> variable_delay --> pv_sync --> edge_detector ---^ (sampling
//                       ^                                            instants)
//                       +-- delay_controller <-- loop_filter <-- e(k)
// The rising zero crossings of the delayed PV waveform are the sampling
// instants t(k). At each one the grid sample y(k) and its quarter-period
// delayed copy x(k) are held, the arctangent of x/y gives the phase error
// e(k), the PI loop filter turns it into c(k), and the controller shortens
// the next sampling interval by c(k) by moving the variable delay. In lock
// x(k) = 0 and y(k) is at its positive peak: the sampling instants, and so
// the rising zero crossings of pv_sync, sit a quarter period after the rising
// zero crossings of the grid.
//
// Parameters: SAMPLE_HZ is the converter sample rate (this design's choice),
// GRID_HZ the nominal grid and PV frequency, G1 and G2 the loop filter gains
// in seconds per radian (values of the published design). Derived: PERIOD = samples
// per period, TAU = PERIOD / 4.
//
// Timing: all blocks run on clk and advance on smp_valid. Between two
// sampling instants the loop needs about ITER + |c|/T + 6 clocks; any strobe
// spacing works as long as that is shorter than half a period.
module tdtl_sync_top
  import tdtl_pkg::*;
#(
  parameter int  SAMPLE_HZ = 20000,
  parameter int  GRID_HZ   = 50,
  parameter real G1        = 0.00318,
  parameter real G2        = 0.000635,
  localparam int PERIOD    = SAMPLE_HZ / GRID_HZ,
  localparam int TAU       = PERIOD / 4,
  localparam int DW        = $clog2(PERIOD)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          smp_valid,
  input  sample_t       grid_in,
  input  sample_t       pv_in,
  output sample_t       pv_sync,
  output logic          pv_sync_valid,
  output logic          sample_edge,
  output sample_t       x_k,
  output sample_t       y_k,
  output angle_t        e_k,
  output logic          e_valid,
  output cfx_t          c_k,
  output logic [DW-1:0] delay_samples,
  output logic          edge_suppressed,   // a crossing inside the hold-off was ignored
  output logic          acc_sat,           // loop filter accumulator saturated
  output logic          wrap_up,           // controller added one period to the delay
  output logic          wrap_down          // controller removed one period from the delay
);

  localparam int K1_FX = gain_fx(G1, SAMPLE_HZ);
  localparam int K2_FX = gain_fx(G2, SAMPLE_HZ);

  // x(t): grid delayed by tau
  sample_t x_s;
  fixed_delay #(.DEPTH(TAU)) u_tau (
    .clk, .rst_n, .in_valid(smp_valid), .din(grid_in),
    .dout(x_s), .out_valid()
  );

  // y(t): grid, registered to stay aligned with x and the delayed PV stream
  sample_t y_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         y_s <= '0;
    else if (smp_valid) y_s <= grid_in;
  end

  // delayed PV waveform
  logic [DW-1:0] delay;
  variable_delay #(.DEPTH(PERIOD)) u_vdelay (
    .clk, .rst_n, .in_valid(smp_valid), .din(pv_in), .delay(delay),
    .dout(pv_sync), .out_valid(pv_sync_valid)
  );

  // sampling instants
  logic edge_s;
  edge_detector #(.HOLDOFF(PERIOD / 2)) u_edge (
    .clk, .rst_n, .in_valid(pv_sync_valid), .din(pv_sync),
    .edge_o(edge_s), .suppressed(edge_suppressed)
  );

  // Sampler1 (x) and Sampler2 (y)
  logic x_hold_valid, y_hold_valid;
  sample_hold u_sampler1 (
    .clk, .rst_n, .strobe(edge_s), .din(x_s), .hold(x_k), .hold_valid(x_hold_valid)
  );
  sample_hold u_sampler2 (
    .clk, .rst_n, .strobe(edge_s), .din(y_s), .hold(y_k), .hold_valid(y_hold_valid)
  );

  // phase detector
  logic pd_busy;
  arctan_pd u_pd (
    .clk, .rst_n, .start(x_hold_valid && y_hold_valid), .x(x_k), .y(y_k),
    .busy(pd_busy), .e(e_k), .e_valid(e_valid)
  );

  // loop filter
  logic c_valid;
  loop_filter #(.K1_FX(K1_FX), .K2_FX(K2_FX)) u_filter (
    .clk, .rst_n, .e_valid(e_valid), .e(e_k), .c(c_k), .c_valid(c_valid),
    .acc_sat(acc_sat)
  );

  // controller
  logic ctrl_busy;
  delay_controller #(.PERIOD(PERIOD)) u_ctrl (
    .clk, .rst_n, .c_valid(c_valid), .c(c_k), .delay(delay),
    .busy(ctrl_busy), .wrap_up(wrap_up), .wrap_down(wrap_down)
  );

  assign sample_edge   = edge_s;
  assign delay_samples = delay;

  // the loop must finish one update before the next sampling instant
  always_comb begin
    if (edge_s) assert (!pd_busy && !ctrl_busy)
      else $error("sampling instant while the previous loop update is still running");
  end

endmodule
