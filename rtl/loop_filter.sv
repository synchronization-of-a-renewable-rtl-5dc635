// loop_filter: the first-order digital loop filter of the TDTL, a
// proportional plus accumulation filter D(z) = G1 + G2 / (1 - z^-1):
//   acc(k) = acc(k-1) + e(k)
//   c(k)   = G1 * e(k) + G2 * acc(k)
// The accumulator makes the loop second order, so a constant frequency offset
// between grid and PV waveform is tracked with zero phase error.
//
// Number formats: e(k) is a binary angle (pi = 2^15); c(k) is in sample
// periods with FRAC_W fraction bits. K1_FX and K2_FX are G1 and G2 (seconds
// per radian) converted to these units by tdtl_pkg::gain_fx; the defaults are
// the gains G1 = 0.00318 and G2 = 0.000635 at a 20 kHz sample rate. The
// accumulator saturates at ACC_W bits instead of wrapping.
//
// Interface/timing: one update per e_valid strobe; c and c_valid follow one
// clock later. Reset clears the accumulator. The filter structure and gains
// are the published design's; the fixed-point formats are this design's.
module loop_filter
  import tdtl_pkg::*;
#(
  parameter int K1_FX = 400,
  parameter int K2_FX = 80,
  parameter int ACC_W = 24
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   e_valid,
  input  angle_t e,
  output cfx_t   c,
  output logic   c_valid,
  output logic   acc_sat
);

  localparam logic signed [ACC_W-1:0] ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W:0]   acc_sum;
  logic signed [ACC_W-1:0] acc_next;
  logic                    sat_next;

  always_comb begin
    acc_sum  = (ACC_W+1)'(acc) + (ACC_W+1)'(e);
    sat_next = 1'b0;
    if (acc_sum > (ACC_W+1)'(ACC_MAX)) begin
      acc_next = ACC_MAX;
      sat_next = 1'b1;
    end else if (acc_sum < (ACC_W+1)'(ACC_MIN)) begin
      acc_next = ACC_MIN;
      sat_next = 1'b1;
    end else begin
      acc_next = acc_sum[ACC_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      c       <= '0;
      c_valid <= 1'b0;
      acc_sat <= 1'b0;
    end else begin
      c_valid <= e_valid;
      if (e_valid) begin
        acc     <= acc_next;
        acc_sat <= sat_next;
        c       <= cfx_t'(e) * cfx_t'(K1_FX) + cfx_t'(acc_next) * cfx_t'(K2_FX);
      end
    end
  end

endmodule
