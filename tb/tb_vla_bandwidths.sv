// tb_vla_bandwidths -- the spectral line bandwidth settings of the channel
// table, run on a two-antenna module at the full memory and cycle sizes.
//
// For each bandwidth the sampling rate is 100 MHz / 2^samp_log2 and the
// recirculation factor 2^recirc_log2 (50 MHz: 1 ... 0.78125 MHz: 32, the
// narrower ones 64; the narrowest writes each sample twice). The design runs
// one valid period of 64 memory cycles (two when the factor is 64, since the
// first loads the memories), and every lag word of every integrator is then
// compared with the product sums computed here from the samples recorded on
// their way into the memories, with lags m = 4K for pass K.
module tb_vla_bandwidths;
  import vla_pkg::*;
  localparam int W = MEM_WORDS, CY = CYC_CLKS, IN = INT_CLKS, NC = CYC_PER_DI;
  localparam int N = W * 72, SKIP = N - IN;
  localparam int LOFF = 0;
  int R = 1;

  logic clk = 0, rst_n = 0, di = 1, clr = 0;
  logic [1:0] x_mux_sel = 2'b00, y_mux_sel = 2'b00;
  mode_e mode = MODE_LINE;
  logic [2:0] samp_log2 = 3'd0, rep_log2 = 3'd0, recirc_log2 = 3'd0;
  logic [1:0] lag_mult_log2 = 2'd0, lag_off = 2'(LOFF);
  samp_t x_samp [4];
  samp_t y_samp [4];
  logic [7:0] x_delay [4];
  logic [7:0] y_delay [4];
  logic [4:0] rd_sel = 0;
  samp_t      samp    [2][4];
  logic [7:0] delay   [2][4];
  logic [1:0] mux_sel [2];
  always_comb begin
    samp[0] = x_samp;    samp[1] = y_samp;
    delay[0] = x_delay;  delay[1] = y_delay;
    mux_sel[0] = x_mux_sel; mux_sel[1] = y_mux_sel;
  end
  logic [5:0] rd_addr = 0;
  logic signed [35:0] rd_data;
  logic swap_o, rd_start_o, dump_o, int_en_o, running_o, primed_o, overflow_o;
  logic [5:0] dump_slot_o;

  vla_corr_module #(.N_ANT(2)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_swap = 0, n_recirc = 0, n_half = 0, n_dstep = 0, n_dump = 0, n_ovf = 0;
  int n_resync = 0, n_modesw = 0, n_mux = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int lvl(samp_t s);
    return s[0] ? (s[1] ? -1 : 1) : 0;
  endfunction

  // ---- record what each antenna's RS memory is loaded with ----
  samp_t capx [2][N];
  samp_t capy [2][N];
  int    ncap = 0, cset = 0, nsw = 0;
  samp_t xs [N];
  samp_t ys [N];
  longint exp_v [20][64];

  always @(negedge clk) if (rst_n && mode == MODE_LINE) begin
    if (dut.swap) begin
      // the set just completed is read from now on
      if (nsw >= 1) add_expect(cset);
      nsw++; cset = nsw % 2; ncap = 0;
    end else if (dut.wr_en && ncap < N) begin
      capx[cset][ncap] = dut.g_ant[0].u_fe.dl[0];
      capy[cset][ncap] = dut.g_ant[1].u_fe.dl[0];
      ncap++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (swap_o) n_swap++;
    if (rd_start_o && dut.u_ctl.pass_k != 0 && !swap_o) n_recirc++;
    if (dump_o && mode == MODE_LINE) begin
      n_dump++;
      if (dut.lag_h) n_half++;
      if (dut.lag_d != 0) n_dstep++;
    end
    if (overflow_o) n_ovf++;
  end

  // expected sums for the set read during one group of R passes
  task automatic add_expect(input int set);
    int na [4] = '{0, 2, 3, 1};
    int nb [4] = '{0, 2, 1, 3};
    for (int i = 0; i < N; i++) begin xs[i] = capx[set][i]; ys[i] = capy[set][i]; end
    for (int k = 0; k < R; k++) begin
      int m;
      m = 4 * (k + LOFF);
      for (int s = SKIP; s < N; s++) begin
        for (int j = 0; j < 4; j++) begin
          exp_v[j][k]      += lvl(xs[s]) * lvl(ys[s - m - na[j]]);
          exp_v[4 + j][k]  += lvl(ys[s]) * lvl(xs[s - m - nb[j]]);
          exp_v[8 + j][k]  += lvl(xs[s]) * lvl(xs[s - m - j]);
          exp_v[12 + j][k] += lvl(ys[s]) * lvl(ys[s - m - j]);
        end
        for (int j = 0; j < 2; j++) begin
          exp_v[16 + j][k] += lvl(xs[s]) * lvl(xs[s - m - 2*j]);
          exp_v[18 + j][k] += lvl(ys[s]) * lvl(ys[s - m - 2*j]);
        end
      end
    end
  endtask

  task automatic check_store(input int slots, input string tag);
    int bad = 0;
    for (int i = 0; i < 20; i++)
      for (int k = 0; k < slots; k++) begin
        rd_sel = 5'(i); rd_addr = 6'(k); #1;
        checks++;
        if (rd_data != 36'(exp_v[i][k])) begin
          failures++; bad++;
          if (bad < 10) $display("FAIL %s integrator %0d word %0d got %0d exp %0d",
                                 tag, i, k, rd_data, exp_v[i][k]);
        end
      end
  endtask

  // ---- sample sources ----
  samp_t hist [$];
  int    cont_phase = 0;
  always @(negedge clk) begin
    samp_t w, v;
    if (cont_phase == 0 && dut.samp_en) begin
      w = samp_t'($urandom);
      hist.push_back(w);
      v = (hist.size() > 6) ? hist[hist.size() - 7] : 2'b00;   // 6 samples
      x_samp[0] = w;  y_samp[0] = v;
      for (int i = 1; i < 4; i++) begin x_samp[i] = samp_t'($urandom); y_samp[i] = samp_t'($urandom); end
    end else begin
      w = {1'($urandom), 1'b1};
      for (int i = 0; i < 4; i++) begin x_samp[i] = w; y_samp[i] = w; end
      x_samp[1] = {~w[1], 1'b1};
      x_samp[2] = 2'b00;
    end
  end

  initial begin
    #1000000000;
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {samp_log2, rep_log2, recirc_log2} per bandwidth
    int sl [8] = '{0, 1, 2, 3, 4, 5, 6, 7};
    int rl [8] = '{0, 0, 0, 0, 0, 0, 0, 1};
    int cl [8] = '{0, 1, 2, 3, 4, 5, 6, 6};
    real bw [8] = '{50.0, 25.0, 12.5, 6.25, 3.125, 0.78125, 0.390625, 0.09765625};
    foreach (x_delay[i]) begin x_delay[i] = 0; y_delay[i] = 0; end
    foreach (sl[r]) begin
      int periods;
      rst_n = 0;
      foreach (exp_v[i, k]) exp_v[i][k] = 0;
      nsw = 0; ncap = 0; cset = 0; n_dump = 0;
      samp_log2 = 3'(sl[r]); rep_log2 = 3'(rl[r]); recirc_log2 = 3'(cl[r]);
      R = 1 << cl[r];
      periods = (R == 64) ? 2 : 1;
      repeat (3) @(negedge clk);
      rst_n = 1;
      for (int p = 0; p < periods; p++) begin
        di = 1;
        repeat (100) @(negedge clk);
        di = 0;
        repeat (2) @(negedge clk);
        wait (!running_o);
        @(negedge clk);
      end
      $display("bandwidth %f MHz: recirculation %0d, %0d dumps", bw[r], R, n_dump);
      check_store(R, $sformatf("bw %f", bw[r]));
      chk(n_dump == 64 - ((R == 64) ? 0 : R), $sformatf("dump count %0d", n_dump));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
