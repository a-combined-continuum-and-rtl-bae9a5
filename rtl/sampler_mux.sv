// sampler_mux -- multiplexer between the samplers and the delay lines.
//
// In Figure 1 some delay lines can take either their own sampler's output or
// the output of another sampler, so that in the spectral line modes the
// signal a module must store (R or L, one IF or the other) reaches the delay
// line that feeds its recirculating memory. Which input each position takes
// for each mode is this design's choice; here a select bit chooses between
// the two inputs and the chosen sample is registered on the sample strobe
// (one clock of latency).
module sampler_mux
  import vla_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  sel,     // 0: own sampler, 1: alternate sampler
  input  samp_t own_in,
  input  samp_t alt_in,
  output samp_t dout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dout <= '0;
    else if (en) dout <= sel ? alt_in : own_in;
  end
endmodule
