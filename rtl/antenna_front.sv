// antenna_front -- everything one antenna has in one correlator module:
// sampler multiplexers, delay lines, two recirculating-memory boards and four
// drivers, ending in the sixteen driver outputs that the cable matrix takes to
// the multipliers.
//
// The antenna's four sampled signals are RS, RC, LS and LC (right and left
// polarization, sine and cosine outputs). Each passes a sampler multiplexer
// (mux_sel bit 0: the RS and RC positions take LS and LC; bit 1: the LS and LC
// positions take RS and RC) and a delay line of up to DL_DEPTH-1 samples. Board
// 0 stores the RS position and passes RC through; board 1 does the same for LS
// and LC. The four drivers follow the wiring of Figure 4 of the document: each
// adds one flip-flop to the lag chain, so that in spectral line mode the
// drivers put tau_0 and tau_(m+0..m+3) of board 0 on their outputs; in
// continuum each driver puts its own signal on all four outputs.
//
//   driver   T1       T2       B1       B2          (spectral line)
//   RS       tau0     tau0     tau_m+0  tau0
//   RC       tau_m+0  tau_m+1  tau0     tau_m+1
//   LS       tau0     tau0     tau_m+2  tau0
//   LC       tau_m+2  tau_m+3  tau0     tau_m+3
//
// Outputs are indexed by driver: 0 RS, 1 RC, 2 LS, 3 LC. All outputs are
// registered; every driver output of one antenna has the same latency from
// rd_start. The placement of the multiplexers is this design's choice.
module antenna_front
  import vla_pkg::*;
#(
  parameter int unsigned MEM_WRDS = MEM_WORDS,
  parameter int unsigned DL_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        samp_en,
  input  logic        wr_en,
  input  logic        swap,
  input  logic        rd_start,
  input  logic [5:0]  lag_d,
  input  logic        lag_h,
  input  logic [1:0]  mux_sel,
  input  samp_t       samp  [4],
  input  logic [$clog2(DL_DEPTH)-1:0] delay [4],
  output samp_t       t1    [4],
  output samp_t       t2    [4],
  output samp_t       b1    [4],
  output samp_t       b2    [4],
  output logic        overflow
);
  samp_t mx [4];
  samp_t dl [4];
  samp_t tm [2];
  samp_t t0 [2];
  logic [1:0] ovf_c;

  for (genvar s = 0; s < 4; s++) begin : g_sig
    // R positions (s < 2) may take L, L positions may take R
    sampler_mux u_mux (
      .clk, .rst_n, .en(samp_en), .sel(mux_sel[s >= 2]),
      .own_in(samp[s]), .alt_in(samp[(s + 2) % 4]), .dout(mx[s])
    );
    delay_line #(.DEPTH(DL_DEPTH)) u_dl (
      .clk, .rst_n, .en(samp_en), .delay(delay[s]), .din(mx[s]), .dout(dl[s])
    );
  end

  for (genvar k = 0; k < 2; k++) begin : g_card
    logic full_c, done_c;
    rm_card #(.WORDS(MEM_WRDS)) u_card (
      .clk, .rst_n, .mode, .wr_en, .din(dl[2*k]), .swap, .rd_start,
      .lag_d, .lag_h, .z_in(dl[2*k]), .y_in(dl[2*k+1]),
      .tau_m(tm[k]), .tau_0(t0[k]), .overflow(ovf_c[k]),
      .wr_full(full_c), .pass_done(done_c)
    );
  end
  assign overflow = |ovf_c;

  samp_t lag_rs, rc_lag, lag_ls, lag_lc;

  driver #(.SEL_T1(SEL_T0), .SEL_T2(SEL_T0), .SEL_B1(SEL_L0), .SEL_B2(SEL_T0)) u_rs (
    .clk, .rst_n, .mode, .t0_in(t0[0]), .lag_in(tm[0]), .cont_in(tm[0]),
    .lag_out(lag_rs), .t1(t1[0]), .t2(t2[0]), .b1(b1[0]), .b2(b2[0])
  );
  driver #(.SEL_T1(SEL_L0), .SEL_T2(SEL_L1), .SEL_B1(SEL_T0), .SEL_B2(SEL_L1)) u_rc (
    .clk, .rst_n, .mode, .t0_in(t0[0]), .lag_in(tm[0]), .cont_in(t0[0]),
    .lag_out(rc_lag), .t1(t1[1]), .t2(t2[1]), .b1(b1[1]), .b2(b2[1])
  );
  driver #(.SEL_T1(SEL_T0), .SEL_T2(SEL_T0), .SEL_B1(SEL_L1), .SEL_B2(SEL_T0)) u_ls (
    .clk, .rst_n, .mode, .t0_in(t0[0]), .lag_in(rc_lag), .cont_in(tm[1]),
    .lag_out(lag_ls), .t1(t1[2]), .t2(t2[2]), .b1(b1[2]), .b2(b2[2])
  );
  driver #(.SEL_T1(SEL_L1), .SEL_T2(SEL_L2), .SEL_B1(SEL_T0), .SEL_B2(SEL_L2)) u_lc (
    .clk, .rst_n, .mode, .t0_in(t0[0]), .lag_in(rc_lag), .cont_in(t0[1]),
    .lag_out(lag_lc), .t1(t1[3]), .t2(t2[3]), .b1(b1[3]), .b2(b2[3])
  );
endmodule
