// tb_driver -- drivers in the four positions of Figure 4, chained as in the
// system (RC's lag_out feeds LS and LC). Random streams for tau_0, tau_m and
// the continuum inputs. Spectral line: each output two clocks later must be
// tau_0 or tau_(m+n) with n as listed for its position; continuum: every
// output must be the driver's own continuum input two clocks earlier.
module tb_driver;
  import vla_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_LINE;
  samp_t t0 = 0, lm = 0;
  samp_t ci [4];
  samp_t lo [4];
  samp_t o1 [4];
  samp_t o2 [4];
  samp_t o3 [4];
  samp_t o4 [4];
  samp_t t0h [$], lmh [$];
  samp_t cih [4][$];
  int checks = 0, failures = 0;
  // expected signal per output [position][T1,T2,B1,B2]: -1 = tau_0, n = tau_(m+n)
  int expn [4][4] = '{'{-1, -1, 0, -1}, '{0, 1, -1, 1}, '{-1, -1, 2, -1}, '{2, 3, -1, 3}};

  driver #(.SEL_T1(SEL_T0), .SEL_T2(SEL_T0), .SEL_B1(SEL_L0), .SEL_B2(SEL_T0)) u_rs (
    .clk, .rst_n, .mode, .t0_in(t0), .lag_in(lm), .cont_in(ci[0]), .lag_out(lo[0]),
    .t1(o1[0]), .t2(o2[0]), .b1(o3[0]), .b2(o4[0]));
  driver #(.SEL_T1(SEL_L0), .SEL_T2(SEL_L1), .SEL_B1(SEL_T0), .SEL_B2(SEL_L1)) u_rc (
    .clk, .rst_n, .mode, .t0_in(t0), .lag_in(lm), .cont_in(ci[1]), .lag_out(lo[1]),
    .t1(o1[1]), .t2(o2[1]), .b1(o3[1]), .b2(o4[1]));
  driver #(.SEL_T1(SEL_T0), .SEL_T2(SEL_T0), .SEL_B1(SEL_L1), .SEL_B2(SEL_T0)) u_ls (
    .clk, .rst_n, .mode, .t0_in(t0), .lag_in(lo[1]), .cont_in(ci[2]), .lag_out(lo[2]),
    .t1(o1[2]), .t2(o2[2]), .b1(o3[2]), .b2(o4[2]));
  driver #(.SEL_T1(SEL_L1), .SEL_T2(SEL_L2), .SEL_B1(SEL_T0), .SEL_B2(SEL_L2)) u_lc (
    .clk, .rst_n, .mode, .t0_in(t0), .lag_in(lo[1]), .cont_in(ci[3]), .lag_out(lo[3]),
    .t1(o1[3]), .t2(o2[3]), .b1(o3[3]), .b2(o4[3]));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the lag stream is the tau_0 stream delayed by M clocks, so that
  // tau_(m+n) at time t is tau_0 at time t - M - n
  localparam int M = 5;

  function automatic samp_t outv(int d, int k);
    case (k) 0: return o1[d]; 1: return o2[d]; 2: return o3[d]; default: return o4[d]; endcase
  endfunction

  initial begin
    samp_t e, g;
    int sz;
    foreach (ci[i]) ci[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 400; p++) begin
      @(negedge clk);
      sz = t0h.size();
      if (p > 20) begin
        for (int d = 0; d < 4; d++)
          for (int k = 0; k < 4; k++) begin
            // outputs now show inputs presented two clocks ago (index sz-2)
            e = (expn[d][k] < 0) ? t0h[sz - 2] : t0h[sz - 2 - M - expn[d][k]];
            g = outv(d, k);
            checks++;
            if (g != e) begin failures++; $display("FAIL line drv %0d out %0d", d, k); end
          end
      end
      t0 = samp_t'($urandom);
      t0h.push_back(t0);
      lm = (t0h.size() > M) ? t0h[t0h.size() - 1 - M] : '0;
    end
    @(negedge clk); mode = MODE_CONT;
    for (int p = 0; p < 200; p++) begin
      @(negedge clk);
      if (p > 4) begin
        for (int d = 0; d < 4; d++)
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (outv(d, k) != cih[d][cih[d].size() - 2]) begin
              failures++; $display("FAIL cont drv %0d out %0d", d, k);
            end
          end
      end
      for (int d = 0; d < 4; d++) begin ci[d] = samp_t'($urandom); cih[d].push_back(ci[d]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
