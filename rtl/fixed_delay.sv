// fixed_delay: the fixed time delay tau of the TDTL. It turns the grid samples
// y into x, the same waveform shifted by a quarter of the nominal grid period
// (90 degrees at 50 Hz), which the phase detector uses as the quadrature input.
//
// Implementation: a circular buffer of DEPTH words. On every input strobe the
// new sample is written at the write pointer and the word previously stored
// there, written DEPTH strobes earlier, is registered as the output. Until the
// buffer has been filled once the output is zero, so uninitialised memory never
// reaches the loop.
//
// Interface/timing: in_valid/din in; dout/out_valid one clock later, dout equal
// to the din of DEPTH strobes before. The quarter-period delay is from the
// published design; expressing it as a whole number of samples (DEPTH = fs / (4 f))
// is this design's choice.
module fixed_delay
  import tdtl_pkg::*;
#(
  parameter int DEPTH = 100
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t din,
  output sample_t dout,
  output logic    out_valid
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  sample_t         mem [DEPTH];
  logic [AW-1:0]   wp;
  logic            filled;

  always_ff @(posedge clk) begin
    if (in_valid) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      filled    <= 1'b0;
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dout <= filled ? mem[wp] : '0;
        if (wp == AW'(DEPTH - 1)) begin
          wp     <= '0;
          filled <= 1'b1;
        end else begin
          wp <= wp + 1'b1;
        end
      end
    end
  end

endmodule
