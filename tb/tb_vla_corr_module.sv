// tb_vla_corr_module -- end-to-end test of the module, built with two
// antennas (one baseline), at reduced
// memory and cycle sizes (4-word memory sets = 288 samples per pass, 240
// integrating clocks, 320-clock memory cycles, 8 cycles per valid period).
//
// Spectral line, one polarization, sampling every 4th clock, recirculation
// factor 4: the samples written into each antenna's memory are recorded from
// the delay-line outputs; after the valid period the 20 integrators (8 cross;
// 4 self and 2 sin x cos per antenna) must hold, for each pass k (lag m = 4k), the sums of the products listed in the top's
// header over the integrated samples, computed here from the recorded
// samples. Y's RS signal is X's delayed by 6 samples, so the cross products
// show a peak. A second valid period re-synchronises and accumulates on top.
// Continuum: all eight signals carry one nonzero stream, X's RC with its sign
// inverted and X's LS zero; the sampler multiplexers replace X's LS and LC
// by its RS and RC, and every product then sums to +-(cycles x 240).
// Finally a spectral line run in which Y's memory stores its L signal through
// the sampler multiplexer (an RxL module) with the lag set m = 8K + 4.
// Each mechanism (swap, recirculated pass, 40 ns half step, 80 ns RAM step,
// dump, overflow of a full set, data-invalid resynchronisation, mode switch,
// sampler multiplexer) is counted and must occur.
module tb_vla_corr_module;
  import vla_pkg::*;
  localparam int W = 4, CY = 320, IN = 240, NC = 8;
  localparam int N = W * 72, SKIP = N - IN;
  localparam logic [2:0] SAMP = 3'd2, RECIRC = 3'd2;
  localparam int R = 1 << RECIRC;

  logic clk = 0, rst_n = 0, di = 1, clr = 0;
  logic [1:0] x_mux_sel = 2'b00, y_mux_sel = 2'b00;
  mode_e mode = MODE_LINE;
  logic [2:0] samp_log2 = SAMP, rep_log2 = 3'd0, recirc_log2 = RECIRC;
  logic [1:0] lag_mult_log2 = 2'd0, lag_off = 2'd0;
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

  vla_corr_module #(.N_ANT(2), .MEM_WRDS(W), .CYC_N(CY), .INT_N(IN), .NCYC(NC)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_swap = 0, n_recirc = 0, n_half = 0, n_dstep = 0, n_dump = 0, n_ovf = 0;
  int n_resync = 0, n_modesw = 0, n_mux = 0, n_xpol = 0;

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
      m = 4 * ((k << lag_mult_log2) + lag_off);
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
    if (cont_phase == 0) begin
      w = samp_t'($urandom);
      hist.push_back(w);
      v = (hist.size() > 24) ? hist[hist.size() - 25] : 2'b00;  // 6 samples x 4 clocks
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
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (x_delay[i]) begin x_delay[i] = 0; y_delay[i] = 0; end
    foreach (exp_v[i, k]) exp_v[i][k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    // ---------------- spectral line, first valid period ----------------
    di = 0;
    wait (!running_o && n_swap > 0);
    @(negedge clk);
    check_store(R, "line period 1");
    // ---------------- second valid period: re-synchronised ----------------
    di = 1; repeat (50) @(negedge clk); di = 0;
    @(negedge clk);
    if (running_o) n_resync++;
    wait (!running_o);
    @(negedge clk);
    check_store(R, "line period 2");
    // ---------------- continuum ----------------
    di = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    mode = MODE_CONT; n_modesw++; cont_phase = 1; x_mux_sel = 2'b10;
    repeat (20) @(negedge clk);
    di = 0;
    repeat (2) @(negedge clk);
    wait (!running_o);
    @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      longint e;
      e = NC * IN;
      // X's RC is inverted, and X's LC takes it through the multiplexer
      if (i == 2 || i == 3 || i == 6 || i == 7 || i == 16 || i == 17) e = -e;
      rd_sel = 5'(i); rd_addr = 0; #1;
      chk(rd_data == 36'(e), $sformatf("continuum integrator %0d got %0d exp %0d", i, rd_data, e));
    end
    // X LS came through the multiplexer: LSxLS would be 0 without it
    rd_sel = 5'd1; #1;
    if (rd_data != 0) n_mux++;
    // ------- spectral line, cross polarization (Y stores L), lags 8K + 4 -------
    rst_n = 0;
    foreach (exp_v[i, k]) exp_v[i][k] = 0;
    nsw = 0; ncap = 0; cset = 0;
    mode = MODE_LINE; n_modesw++; cont_phase = 0;
    x_mux_sel = 2'b00; y_mux_sel = 2'b01; lag_mult_log2 = 2'd1; lag_off = 2'd1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    di = 0;
    repeat (2) @(negedge clk);
    wait (!running_o);
    @(negedge clk);
    check_store(R, "line RxL");
    if (dut.g_ant[1].u_fe.g_sig[0].u_mux.sel) n_xpol++;
    // ---------------- mechanism counts ----------------
    $display("swaps=%0d recirculated passes=%0d half steps=%0d RAM steps=%0d dumps=%0d overflow=%0d resync=%0d mode switches=%0d mux=%0d",
             n_swap, n_recirc, n_half, n_dstep, n_dump, n_ovf, n_resync, n_modesw, n_mux);
    chk(n_swap > 0, "swap happened");
    chk(n_recirc > 0, "recirculated pass happened");
    chk(n_half > 0, "40 ns half step happened");
    chk(n_dstep > 0, "80 ns RAM step happened");
    chk(n_dump > 0, "dump happened");
    chk(n_ovf > 0, "overflow of a full set happened");
    chk(n_resync > 0, "data-invalid resynchronisation happened");
    chk(n_modesw > 0, "mode switch happened");
    chk(n_mux > 0, "sampler multiplexer used");
    chk(n_xpol > 0, "cross-polarization line run with interleaved lags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
