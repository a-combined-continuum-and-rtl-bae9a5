// tb_vla_full -- one complete spectral line operation of the module at its
// full, default sizes: 27 antennas (351 baselines, 2808 cross, 108 self and
// 54 sin x cos multipliers), 1024-word memory sets (73728 samples), 744.047 us memory
// cycles (74405 clocks), 72385 integrating clocks.
//
// Sampling at 100 MHz (50 MHz bandwidth, recirculation factor 1), lag offset
// m = 4 (a 40 ns half step). Antenna a's RS signal is one common random
// stream delayed by a mod 8 samples, so every baseline has a correlation peak
// somewhere in its lags; the other signals are independent noise. The first
// memory cycle loads all memories; the second reads them once, integrates and
// dumps. Every one of the 2970 integrators must then hold the product sum
// computed here from the samples recorded on their way into the memories.
module tb_vla_full;
  import vla_pkg::*;
  localparam int NA = 27;
  localparam int NB = NA * (NA - 1) / 2;
  localparam int NI = 8 * NB + 6 * NA;
  localparam int N = MEM_WORDS * 72, SKIP = N - INT_CLKS;
  localparam int LOFF = 1;

  logic clk = 0, rst_n = 0, di = 1, clr = 0;
  mode_e mode = MODE_LINE;
  logic [2:0] samp_log2 = 3'd0, rep_log2 = 3'd0, recirc_log2 = 3'd0;
  logic [1:0] lag_mult_log2 = 2'd0, lag_off = 2'(LOFF);
  logic [1:0] mux_sel [NA];
  samp_t      samp    [NA][4];
  logic [7:0] delay   [NA][4];
  logic [11:0] rd_sel = 0;
  logic [5:0] rd_addr = 0;
  logic signed [35:0] rd_data;
  logic swap_o, rd_start_o, dump_o, int_en_o, running_o, primed_o, overflow_o;
  logic [5:0] dump_slot_o;

  vla_corr_module dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_swap = 0, n_dump = 0, n_half = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int lvl(samp_t s);
    return s[0] ? (s[1] ? -1 : 1) : 0;
  endfunction

  // ---- record what each antenna's RS memory is loaded with ----
  samp_t dlv [NA];
  for (genvar a = 0; a < NA; a++) begin : g_tap
    assign dlv[a] = dut.g_ant[a].u_fe.dl[0];
  end

  samp_t  cap [2][NA][N];
  int     ncap = 0, cset = 0, nsw = 0;
  longint exp_v [NI];

  always @(negedge clk) if (rst_n) begin
    if (dut.swap) begin
      // the set just completed is read from now on
      if (nsw >= 1) add_expect(cset);
      nsw++; cset = nsw % 2; ncap = 0;
    end else if (dut.wr_en && ncap < N) begin
      for (int a = 0; a < NA; a++) cap[cset][a][ncap] = dlv[a];
      ncap++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (swap_o) n_swap++;
    if (dump_o) begin
      n_dump++;
      if (dut.lag_h) n_half++;
    end
  end

  // expected sums for one pass over the set, lag m = 4 * LOFF
  task automatic add_expect(input int set);
    int na [4] = '{0, 2, 3, 1};
    int nb [4] = '{0, 2, 1, 3};
    int m, b;
    m = 4 * LOFF;
    b = 0;
    for (int x = 0; x < NA; x++)
      for (int y = x + 1; y < NA; y++) begin
        for (int s = SKIP; s < N; s++) begin
          int vx, vy;
          vx = lvl(cap[set][x][s]);
          vy = lvl(cap[set][y][s]);
          for (int j = 0; j < 4; j++) begin
            exp_v[8*b + j]     += vx * lvl(cap[set][y][s - m - na[j]]);
            exp_v[8*b + 4 + j] += vy * lvl(cap[set][x][s - m - nb[j]]);
          end
        end
        b++;
      end
    for (int a = 0; a < NA; a++)
      for (int s = SKIP; s < N; s++)
        for (int j = 0; j < 4; j++)
          exp_v[8*NB + 4*a + j] += lvl(cap[set][a][s]) * lvl(cap[set][a][s - m - j]);
    for (int a = 0; a < NA; a++)
      for (int s = SKIP; s < N; s++)
        for (int j = 0; j < 2; j++)
          exp_v[8*NB + 4*NA + 2*a + j] += lvl(cap[set][a][s]) * lvl(cap[set][a][s - m - 2*j]);
  endtask

  // ---- sample sources ----
  samp_t hist [8];
  always @(negedge clk) begin
    for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = samp_t'($urandom);
    for (int a = 0; a < NA; a++) begin
      samp[a][0] = hist[a % 8];
      for (int i = 1; i < 4; i++) samp[a][i] = samp_t'($urandom);
    end
  end

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    foreach (delay[a, i]) delay[a][i] = 0;
    foreach (mux_sel[a]) mux_sel[a] = 2'b00;
    foreach (hist[i]) hist[i] = 2'b00;
    foreach (exp_v[i]) exp_v[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    di = 0;
    wait (n_dump == 1);
    repeat (2) @(negedge clk);
    bad = 0;
    for (int i = 0; i < NI; i++) begin
      rd_sel = 12'(i); rd_addr = 6'd0; #1;
      checks++;
      if (rd_data != 36'(exp_v[i])) begin
        failures++; bad++;
        if (bad < 10) $display("FAIL integrator %0d got %0d exp %0d", i, rd_data, exp_v[i]);
      end
    end
    $display("swaps=%0d dumps=%0d half steps=%0d", n_swap, n_dump, n_half);
    chk(n_swap == 2, "two swaps: load, then read");
    chk(n_half == 1, "pass used the 40 ns half step");
    // baseline (0,5), number 4: Y is X delayed by 5 samples, so Y tau_0 x
    // X tau_(m+1) (cross 6, lag 5) must show the full correlation: about
    // half of the 72385 products are +1, none -1.
    rd_sel = 12'(8*4 + 6); #1;
    $display("peak of baseline (0,5): %0d", rd_data);
    chk(rd_data > 30000, "correlation peak at the antenna delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
