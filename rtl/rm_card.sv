// rm_card -- recirculating memory and lag step generator board, both bits.
//
// Figure 3 shows the board for one of the two sample bits; this module holds
// one recirc_memory and one lag_step_gen per bit, driven by common controls,
// and presents two-bit samples. In spectral line mode din (input X) is
// stored and recirculated and the board delivers the undelayed stream tau_0
// and the stream delayed by m = 8*lag_d + 4*lag_h samples, tau_m. In
// continuum mode the board is a flow-through path: z_in appears on tau_m and
// y_in on tau_0, each 8 clocks later. Latency from rd_start to the first
// sample of a pass on tau_0: 6 clocks.
module rm_card
  import vla_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  mode_e      mode,
  input  logic       wr_en,
  input  samp_t      din,
  input  logic       swap,
  input  logic       rd_start,
  input  logic [5:0] lag_d,
  input  logic       lag_h,
  input  samp_t      z_in,
  input  samp_t      y_in,
  output samp_t      tau_m,
  output samp_t      tau_0,
  output logic       overflow,
  output logic       wr_full,
  output logic       pass_done
);
  logic [1:0] ovf, full, done;

  for (genvar b = 0; b < 2; b++) begin : g_bit
    logic [7:0] lines;
    logic       stb, busy;

    recirc_memory #(.WORDS(WORDS)) u_rm (
      .clk, .rst_n,
      .wr_en, .din(din[b]), .swap, .wr_full(full[b]), .overflow(ovf[b]),
      .rd_start, .line_bits(lines), .line_stb(stb), .rd_busy(busy),
      .pass_done(done[b])
    );

    lag_step_gen u_lsg (
      .clk, .rst_n, .mode,
      .line_bits(lines), .line_stb(stb), .lag_d, .lag_h,
      .z_in(z_in[b]), .y_in(y_in[b]),
      .tau_m(tau_m[b]), .tau_0(tau_0[b])
    );
  end

  assign overflow  = |ovf;
  assign wr_full   = &full;
  assign pass_done = done[0];
endmodule
