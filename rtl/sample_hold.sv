// sample_hold: sample-and-hold of the TDTL (Sampler1 for x, Sampler2 for y).
// On each sampling strobe it captures the current input sample and holds it
// until the next strobe, giving x(k) and y(k) at the instants t(k).
//
// Interface/timing: `hold` changes on the clock edge that sees `strobe`, and
// `hold_valid` is high for the following cycle to start the phase detector.
// Reset clears the held value.
module sample_hold
  import tdtl_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    strobe,
  input  sample_t din,
  output sample_t hold,
  output logic    hold_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold       <= '0;
      hold_valid <= 1'b0;
    end else begin
      hold_valid <= strobe;
      if (strobe) hold <= din;
    end
  end

endmodule
