// vla_corr_module -- one driver-multiplier-integrator module of the combined
// continuum / spectral line delay and multiplier system: N_ANT antennas (27),
// every baseline between them with eight cross multipliers (351 baselines,
// 2808 cross multipliers), four self multipliers and two sin x cos
// multipliers per antenna, the integrators behind them and one controller for
// the recirculating memories.
//
// Each antenna (antenna_front) delivers four sampled signals, right and left
// polarization as sine (S) and cosine (C) outputs: RS, RC, LS, LC. They pass
// sampler multiplexers and delay lines into two recirculating-memory boards
// (board 0: RS stored, RC flow-through; board 1: LS stored, LC flow-through)
// and four drivers (RS, RC, LS, LC) with two terminated (T1, T2) and two
// bridging (B1, B2) outputs each. A fixed cable matrix takes driver outputs to
// the multipliers; every baseline (X = lower antenna number, Y = higher) is
// wired the same way:
//
//   mult  X out   Y out   continuum   spectral line
//   0     RS.T1   RS.B1   RSxRS       X tau_0 x Y tau_(m+0)
//   1     LS.T1   LS.B1   LSxLS       X tau_0 x Y tau_(m+2)
//   2     RC.B1   LC.T2   RCxLC       X tau_0 x Y tau_(m+3)
//   3     LC.B1   RC.T2   LCxRC       X tau_0 x Y tau_(m+1)
//   4     RS.B1   RC.B1   RSxRC       Y tau_0 x X tau_(m+0)
//   5     LS.B1   LC.B1   LSxLC       Y tau_0 x X tau_(m+2)
//   6     RC.T2   LS.T1   RCxLS       Y tau_0 x X tau_(m+1)
//   7     LC.T2   RS.T1   LCxRS       Y tau_0 x X tau_(m+3)
//
// Continuum mode (MODE_CONT) bypasses the memories; the cross products are
// the document's continuum list, the self multipliers give the power of RS,
// RC, LS and LC, and the sin x cos multipliers give RSxRC and LSxLC of each
// antenna. Spectral line mode (MODE_LINE) stores each antenna's RS
// position and recirculates it; each memory cycle forms one lag set m, and its
// products are dumped into integrator word K, the pass number, so after R
// passes the module holds 8R cross-correlation lags per baseline and 4R
// autocorrelation lags (tau_0 x tau_(m+0..m+3)) per antenna. The sin x cos
// multipliers (RS.T1 x RC.T1 and LS.T1 x LC.T1) then repeat the
// autocorrelation lags m+0 and m+2.
//
// The modes of the four-module system differ in what each module stores and
// in its lag set: mux_sel (per antenna) chooses the stored polarization, and
// lag_mult_log2 / lag_off give the module its share of the lags (m = 4K, 8K +
// 4j or 16K + 4j).
//
// The module sizes, the block structure, the driver wiring of Figure 4 and the
// continuum product list follow the document; the assignment of driver
// outputs to multipliers, the multiplexer placement and the host read port are
// this design's.
//
// Host port: rd_sel picks an integrator, rd_addr its lag word (combinational
// read). Integrator 8*b + n is cross multiplier n of baseline b, where the
// baselines (i, j), i < j, are numbered in order (0,1), (0,2) ... (0,N-1),
// (1,2) ...; integrator 8*NB + 4*a + k is self multiplier k of antenna a, and
// 8*NB + 4*N_ANT + 2*a + k sin x cos multiplier k (RSxRC, LSxLC) of antenna
// a. clr starts a 64-clock sweep that zeroes all integrators.
module vla_corr_module
  import vla_pkg::*;
#(
  parameter int unsigned N_ANT    = 27,
  parameter int unsigned MEM_WRDS = MEM_WORDS,
  parameter int unsigned CYC_N    = CYC_CLKS,
  parameter int unsigned INT_N    = INT_CLKS,
  parameter int unsigned NCYC     = CYC_PER_DI,
  parameter int unsigned DL_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        di,
  input  mode_e       mode,
  input  logic [2:0]  samp_log2,
  input  logic [2:0]  rep_log2,
  input  logic [2:0]  recirc_log2,
  input  logic [1:0]  lag_mult_log2,
  input  logic [1:0]  lag_off,
  input  logic [1:0]  mux_sel [N_ANT],
  input  samp_t       samp    [N_ANT][4],
  input  logic [$clog2(DL_DEPTH)-1:0] delay [N_ANT][4],
  input  logic        clr,
  input  logic [$clog2(4*N_ANT*N_ANT + 2*N_ANT)-1:0] rd_sel,
  input  logic [5:0]  rd_addr,
  output logic signed [35:0] rd_data,
  output logic        swap_o,
  output logic        rd_start_o,
  output logic        dump_o,
  output logic        int_en_o,
  output logic        running_o,
  output logic        primed_o,
  output logic        overflow_o,
  output logic [5:0]  dump_slot_o
);
  localparam int unsigned READ_N = MEM_WRDS * WORD_BITS;
  localparam int unsigned PIPE   = 9;
  localparam int unsigned NB     = N_ANT * (N_ANT - 1) / 2;   // baselines
  localparam int unsigned NSELF  = 8 * NB;                    // first self
  localparam int unsigned NSC    = NSELF + 4 * N_ANT;         // first sin x cos
  localparam int unsigned NINT   = NSC + 2 * N_ANT;           // integrators

  // number of baseline (i, j), i < j
  function automatic int unsigned bidx(int unsigned i, int unsigned j);
    return i * N_ANT - i * (i + 1) / 2 + j - i - 1;
  endfunction

  logic       samp_en, wr_en, swap, rd_start, lag_h, int_en, dump, running, primed;
  logic [5:0] lag_d, dump_slot;

  rm_controller #(
    .READ_N(READ_N), .INT_N(INT_N), .CYC_N(CYC_N), .NCYC(NCYC), .PIPE(PIPE)
  ) u_ctl (
    .clk, .rst_n, .di, .mode, .samp_log2, .rep_log2, .recirc_log2,
    .lag_mult_log2, .lag_off,
    .samp_en, .wr_en, .swap, .rd_start, .lag_d, .lag_h, .int_en, .dump,
    .dump_slot, .running, .primed
  );

  // driver outputs, [antenna][driver RS, RC, LS, LC]
  samp_t dT1 [N_ANT][4];
  samp_t dT2 [N_ANT][4];
  samp_t dB1 [N_ANT][4];
  samp_t dB2 [N_ANT][4];
  logic [N_ANT-1:0] ovf;

  for (genvar a = 0; a < N_ANT; a++) begin : g_ant
    antenna_front #(.MEM_WRDS(MEM_WRDS), .DL_DEPTH(DL_DEPTH)) u_fe (
      .clk, .rst_n, .mode, .samp_en, .wr_en, .swap, .rd_start, .lag_d, .lag_h,
      .mux_sel(mux_sel[a]), .samp(samp[a]), .delay(delay[a]),
      .t1(dT1[a]), .t2(dT2[a]), .b1(dB1[a]), .b2(dB2[a]), .overflow(ovf[a])
    );
  end

  // ---------------- cable matrix ----------------
  samp_t ma [NINT];
  samp_t mb [NINT];

  for (genvar i = 0; i < N_ANT; i++) begin : g_x
    for (genvar j = i + 1; j < N_ANT; j++) begin : g_y
      localparam int unsigned B = 8 * bidx(i, j);
      assign ma[B+0] = dT1[i][0];  assign mb[B+0] = dB1[j][0];   // RS x RS
      assign ma[B+1] = dT1[i][2];  assign mb[B+1] = dB1[j][2];   // LS x LS
      assign ma[B+2] = dB1[i][1];  assign mb[B+2] = dT2[j][3];   // RC x LC
      assign ma[B+3] = dB1[i][3];  assign mb[B+3] = dT2[j][1];   // LC x RC
      assign ma[B+4] = dB1[i][0];  assign mb[B+4] = dB1[j][1];   // RS x RC
      assign ma[B+5] = dB1[i][2];  assign mb[B+5] = dB1[j][3];   // LS x LC
      assign ma[B+6] = dT2[i][1];  assign mb[B+6] = dT1[j][2];   // RC x LS
      assign ma[B+7] = dT2[i][3];  assign mb[B+7] = dT1[j][0];   // LC x RS
    end
  end

  // self multipliers / autocorrelators: in spectral line mode tau_0 from the
  // RS or LS driver against a lag from the RC or LC driver; in continuum the
  // square of one driver's signal.
  for (genvar a = 0; a < N_ANT; a++) begin : g_auto
    samp_t p [4];
    samp_t q [4];
    assign p[0] = dT2[a][0]; assign q[0] = dT1[a][1];
    assign p[1] = dB2[a][0]; assign q[1] = dB2[a][1];
    assign p[2] = dT2[a][2]; assign q[2] = dT1[a][3];
    assign p[3] = dB2[a][2]; assign q[3] = dB2[a][3];
    for (genvar k = 0; k < 4; k++) begin : g_k
      samp_t sq;
      assign sq = (k % 2 == 0) ? p[k] : q[k];
      assign ma[NSELF + 4*a + k] = (mode == MODE_CONT) ? sq : p[k];
      assign mb[NSELF + 4*a + k] = (mode == MODE_CONT) ? sq : q[k];
    end
    // sin x cos multipliers, the same wiring in both modes
    assign ma[NSC + 2*a]     = dT1[a][0];  assign mb[NSC + 2*a]     = dT1[a][1];
    assign ma[NSC + 2*a + 1] = dT1[a][2];  assign mb[NSC + 2*a + 1] = dT1[a][3];
  end

  logic signed [35:0] rdv [NINT];

  for (genvar i = 0; i < NINT; i++) begin : g_mul
    logic signed [1:0]  prod;
    logic signed [17:0] acc;
    multiplier u_mul (.clk, .rst_n, .a(ma[i]), .b(mb[i]), .prod);
    integrator #(.ACC_W(18), .STORE_W(36), .SLOTS(64)) u_int (
      .clk, .rst_n, .int_en, .prod, .dump, .dump_slot, .clr,
      .rd_addr, .rd_data(rdv[i]), .acc
    );
  end

  assign rd_data     = (32'(rd_sel) < NINT) ? rdv[rd_sel] : '0;
  assign swap_o      = swap;
  assign rd_start_o  = rd_start;
  assign dump_o      = dump;
  assign int_en_o    = int_en;
  assign running_o   = running;
  assign primed_o    = primed;
  assign overflow_o  = |ovf;
  assign dump_slot_o = dump_slot;
endmodule
