// tb_rm_card -- recirculating memory board, both bits, with a 4-word memory
// set (288 samples). Loads random two-bit samples, swaps, and reads the set
// in two passes with lags m = 0 and m = 12: tau_0 must carry sample s six
// clocks after rd_start plus s, and tau_m sample s - m at the same time.
// Then the continuum flow-through: tau_m follows z_in and tau_0 follows y_in
// 8 clocks later.
module tb_rm_card;
  import vla_pkg::*;
  localparam int W = 4, N = W * 72;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_LINE;
  logic wr_en = 0, swap = 0, rd_start = 0, lag_h = 0;
  logic [5:0] lag_d = 0;
  samp_t din = 0, z_in = 0, y_in = 0, tau_m, tau_0;
  logic overflow, wr_full, pass_done;
  samp_t s [N];
  samp_t zh [$], yh [$];
  int checks = 0, failures = 0;

  rm_card #(.WORDS(W)) dut (.clk, .rst_n, .mode, .wr_en, .din, .swap, .rd_start,
    .lag_d, .lag_h, .z_in, .y_in, .tau_m, .tau_0, .overflow, .wr_full, .pass_done);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(input int d, input int h);
    int m, e0, em;
    m = 8 * d + 4 * h; e0 = 0; em = 0;
    lag_d = 6'(d); lag_h = 1'(h);
    @(negedge clk); rd_start = 1;
    @(negedge clk); rd_start = 0;
    // now after the posedge that took rd_start; sample s shows after 5 + s more
    repeat (5) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      if (tau_0 != s[i]) e0++;
      if (i >= m && tau_m != s[i - m]) em++;
      @(negedge clk);
    end
    checks += 2;
    if (e0 != 0) begin failures++; $display("FAIL tau_0 errors %0d", e0); end
    if (em != 0) begin failures++; $display("FAIL tau_m m=%0d errors %0d", m, em); end
    wait (!dut.g_bit[0].busy);
  endtask

  initial begin
    foreach (s[i]) s[i] = samp_t'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    for (int i = 0; i < N; i++) begin wr_en = 1; din = s[i]; @(negedge clk); end
    wr_en = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (!wr_full) begin failures++; $display("FAIL not full"); end
    swap = 1; @(negedge clk); swap = 0;
    pass(0, 0);
    pass(1, 1);
    @(negedge clk); mode = MODE_CONT;
    begin
      int e = 0;
      for (int p = 0; p < 300; p++) begin
        @(negedge clk);
        if (p > 20 && (tau_m != zh[zh.size() - 8] || tau_0 != yh[yh.size() - 8])) e++;
        z_in = samp_t'($urandom); y_in = samp_t'($urandom);
        zh.push_back(z_in); yh.push_back(y_in);
      end
      checks++;
      if (e != 0) begin failures++; $display("FAIL continuum errors %0d", e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
