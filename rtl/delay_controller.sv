// delay_controller: the controller between loop filter and variable delay.
// The loop requires the interval between sampling instants to be
// T(k) = T - c(k-1), i.e. each filter output must pull the next zero crossing
// of the delayed PV waveform c(k) sample periods earlier. The controller
// therefore keeps the delay as a running value
//   D(k) = (D(k-1) - c(k)) mod T
// in sample periods with FRAC_W fraction bits, and drives the variable delay
// with its whole-sample part. Working modulo one period is exact because the
// PV waveform repeats every T.
//
// Implementation: on c_valid the subtraction is done and `busy` rises; then
// one period is added or subtracted per clock until the value lies in
// [0, T). The `delay` output is updated once the value is back in range.
// wrap_up / wrap_down pulse for each period added / subtracted.
//
// Interface/timing: c_valid/c in (a strobe arriving while busy is dropped;
// in the loop strobes are a period apart); delay out, |c|/T + 2 clocks after
// the strobe. The published design names the block and the interval law; the modulo
// accumulation is this design's reading of it. Reset sets the delay to zero.
module delay_controller
  import tdtl_pkg::*;
#(
  parameter int PERIOD = 400,
  localparam int DW    = $clog2(PERIOD)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          c_valid,
  input  cfx_t          c,
  output logic [DW-1:0] delay,
  output logic          busy,
  output logic          wrap_up,
  output logic          wrap_down
);

  localparam int DFW = C_W + 1;
  typedef logic signed [DFW-1:0] dfx_t;
  localparam dfx_t PERIOD_FX = dfx_t'(PERIOD) <<< FRAC_W;

  dfx_t d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d         <= '0;
      delay     <= '0;
      busy      <= 1'b0;
      wrap_up   <= 1'b0;
      wrap_down <= 1'b0;
    end else begin
      wrap_up   <= 1'b0;
      wrap_down <= 1'b0;
      if (!busy) begin
        if (c_valid) begin
          d    <= d - dfx_t'(c);
          busy <= 1'b1;
        end
      end else if (d < 0) begin
        d       <= d + PERIOD_FX;
        wrap_up <= 1'b1;
      end else if (d >= PERIOD_FX) begin
        d         <= d - PERIOD_FX;
        wrap_down <= 1'b1;
      end else begin
        delay <= DW'(d >>> FRAC_W);
        busy  <= 1'b0;
      end
    end
  end

endmodule
