// variable_delay: the controllable delay on the PV path of the TDTL. Together
// with the controller it replaces the digitally controlled oscillator of a
// classic tanlock loop: moving the delay moves the zero crossings of the
// delayed PV waveform, and those crossings are the loop's sampling instants.
// Its output is also the synchronised PV waveform.
//
// Implementation: a circular buffer of DEPTH words (one nominal period). The
// input is written at the write pointer and the word written `delay` strobes
// earlier is read from (wp - delay) mod DEPTH; a delay of zero passes the
// input straight to the output register. Words older than the number of
// samples written since reset read as zero.
//
// Interface/timing: in_valid/din in, delay in whole samples (0..DEPTH-1,
// larger values are reduced modulo DEPTH); dout/out_valid one clock after the
// input strobe. A change of `delay` takes effect on the next strobe. The
// published design gives the block's role; the buffer organisation, the sample-step
// resolution and the one-period range (enough, since the PV waveform is
// periodic) are this design's choices.
module variable_delay
  import tdtl_pkg::*;
#(
  parameter int DEPTH = 400,
  localparam int DW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  sample_t       din,
  input  logic [DW-1:0] delay,
  output sample_t       dout,
  output logic          out_valid
);

  sample_t         mem [DEPTH];
  logic [DW-1:0]   wp;
  logic [DW-1:0]   rp;
  logic [DW-1:0]   d_mod;
  logic [DW:0]     written;     // samples written since reset, saturates at DEPTH

  always_comb begin
    d_mod = (32'(delay) >= DEPTH) ? DW'(32'(delay) - DEPTH) : delay;
    if (wp >= d_mod) rp = wp - d_mod;
    else             rp = DW'(32'(wp) + DEPTH - 32'(d_mod));
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      written   <= '0;
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (d_mod == '0)                       dout <= din;
        else if ((DW+1)'(d_mod) <= written)    dout <= mem[rp];
        else                                   dout <= '0;
        wp <= (wp == DW'(DEPTH - 1)) ? '0 : wp + 1'b1;
        if (written != (DW+1)'(DEPTH)) written <= written + 1'b1;
      end
    end
  end

endmodule
