// delay_line -- programmable digital delay for one two-bit sample stream.
//
// The delay lines are taken over unchanged from the continuum system, so only
// their function is given: delay a sampled signal by a selectable number of
// samples. This version keeps the last DEPTH samples in a circular buffer
// written on every sample strobe. On each strobe the output register takes
// the sample that entered `delay` strobes earlier (delay = 0 gives the
// current input), so the total latency is delay strobes plus one clock.
// DEPTH (256 samples) is this design's choice.
//
// Interface: en marks a sample on din; dout changes only after a strobe.
module delay_line
  import vla_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] delay,
  input  samp_t                    din,
  output samp_t                    dout
);
  localparam int unsigned AW = $clog2(DEPTH);

  samp_t           buf_q [DEPTH];
  logic   [AW-1:0] wp;

  always_ff @(posedge clk) begin
    if (en) buf_q[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp   <= '0;
      dout <= '0;
    end else if (en) begin
      wp   <= wp + AW'(1);
      dout <= (delay == '0) ? din : buf_q[wp - delay];
    end
  end
endmodule
