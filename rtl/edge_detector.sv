// edge_detector: produces the sampling instants t(k) of the TDTL from the
// delayed PV waveform. A sampling instant is a rising zero crossing: the
// previous sample negative and the current one zero or positive.
//
// A crossing that comes less than HOLDOFF samples after the last accepted one
// is ignored and flagged on `suppressed`. Such crossings appear when the
// variable delay is lengthened just after an edge and the delayed waveform
// steps back across zero; without the hold-off one period would be sampled
// twice. Since the PV waveform has period T, ignoring it leaves the sampled
// phase unchanged.
//
// Interface/timing: edge_o is combinational on the current input sample, so a
// sampler clocked by it captures values of that same sample instant. The
// published design only names this block; the zero-crossing rule and the hold-off are
// this design's choices.
module edge_detector
  import tdtl_pkg::*;
#(
  parameter int HOLDOFF = 200
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t din,
  output logic    edge_o,
  output logic    suppressed
);

  localparam int CW = $clog2(HOLDOFF + 1);

  sample_t       prev;
  logic [CW-1:0] since;      // samples since the last accepted edge, saturating
  logic          crossing;
  logic          armed;

  assign crossing   = in_valid && prev[SAMPLE_W-1] && !din[SAMPLE_W-1];
  assign armed      = (32'(since) >= HOLDOFF);
  assign edge_o     = crossing && armed;
  assign suppressed = crossing && !armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev  <= '0;
      since <= CW'(HOLDOFF);
    end else if (in_valid) begin
      prev <= din;
      if (edge_o)              since <= CW'(1);
      else if (!armed)         since <= since + 1'b1;
    end
  end

endmodule
