// tb_lag_step_gen -- lag stepping generator, one bit.
// Spectral line: a random sample stream is presented eight samples at a time
// on the lines, one strobe every 8 clocks. For several RAM delays lag_d and
// half steps lag_h, tau_0 must carry sample s two clocks after the edge that
// takes in the strobe holding it (plus its position), and tau_m must carry
// sample s - (8*lag_d + 4*lag_h) at the same time.
// Continuum: tau_m must follow z_in and tau_0 follow y_in 8 clocks later.
module tb_lag_step_gen;
  import vla_pkg::*;
  localparam int NS = 8 * 2000;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_LINE;
  logic [7:0] line_bits = 0;
  logic line_stb = 0, lag_h = 0, z_in = 0, y_in = 0, tau_m, tau_0;
  logic [5:0] lag_d = 0;
  logic s [NS];
  logic zh [$], yh [$];
  int checks = 0, failures = 0, e0 = 0, em = 0;

  lag_step_gen dut (.clk, .rst_n, .mode, .line_bits, .line_stb, .lag_d, .lag_h,
                    .z_in, .y_in, .tau_m, .tau_0);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_lag(input int d, input int h);
    int m, base, idx;
    m = 8 * d + 4 * h;
    lag_d = 6'(d); lag_h = 1'(h);
    e0 = 0; em = 0;
    base = -1;
    for (int p = 0; p < NS + 8; p++) begin
      @(negedge clk);
      // outputs after the posedge just passed
      if (base >= 0) begin
        idx = p - base - 2;
        if (idx >= 600 && idx < NS) begin
          if (tau_0 != s[idx]) e0++;
          if (tau_m != s[idx - m]) em++;
        end
      end
      // drive the next clock
      if (p % 8 == 0 && p / 8 < NS / 8) begin
        if (base < 0) base = p + 1;
        line_stb = 1;
        for (int i = 0; i < 8; i++) line_bits[i] = s[p + i];
      end else begin
        line_stb = 0;
      end
    end
    checks++;
    if (e0 != 0) begin failures++; $display("FAIL tau_0 d=%0d h=%0d errors=%0d", d, h, e0); end
    checks++;
    if (em != 0) begin failures++; $display("FAIL tau_m d=%0d h=%0d errors=%0d", d, h, em); end
  endtask

  initial begin
    int dl [6] = '{0, 0, 1, 5, 31, 63};
    int hl [6] = '{0, 1, 0, 1, 1, 0};
    foreach (s[i]) s[i] = 1'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (dl[k]) run_lag(dl[k], hl[k]);
    // continuum flow-through
    @(negedge clk); mode = MODE_CONT;
    e0 = 0; em = 0;
    for (int p = 0; p < 500; p++) begin
      @(negedge clk);
      if (p > 20) begin
        if (tau_m != zh[zh.size() - 8]) em++;
        if (tau_0 != yh[yh.size() - 8]) e0++;
      end
      z_in = 1'($urandom); y_in = 1'($urandom);
      zh.push_back(z_in); yh.push_back(y_in);
    end
    checks += 2;
    if (em != 0) begin failures++; $display("FAIL continuum Z path errors=%0d", em); end
    if (e0 != 0) begin failures++; $display("FAIL continuum Y path errors=%0d", e0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
