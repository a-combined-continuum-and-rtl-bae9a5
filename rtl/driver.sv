// driver -- one two-bit driver of the driver board (Figure 4).
//
// A driver sends one signal to each of its four output sets, two terminated
// (T1, T2) and two bridging (B1, B2), which the cable matrix carries to the
// multipliers. Each output is chosen by a multiplexer (M) and re-timed by a
// flip-flop (F).
//
// Spectral line: t0_in is the undelayed data tau_0 and lag_in the lag data
// tau_(m+n) for this driver. Input flip-flops re-time both; two further
// flip-flops on the lag give lag_in delayed by one and two more clocks, which
// against the re-timed tau_0 are the lags n+1 and n+2 (the "tau delay" stages
// of Figure 2). lag_out (lag_in after one flip-flop) passes lag n+1 on to the
// next driver in the chain. The parameters SEL_T1 .. SEL_B2 give, for this
// driver position, which signal each output carries in spectral line mode;
// their values for the four positions are those of Figure 4.
// Continuum: every output carries cont_in, as in Figure 4's continuum
// example.
//
// Timing: outputs change two clocks after the inputs they carry.
module driver
  import vla_pkg::*;
#(
  parameter drv_sel_e SEL_T1 = SEL_T0,
  parameter drv_sel_e SEL_T2 = SEL_T0,
  parameter drv_sel_e SEL_B1 = SEL_L0,
  parameter drv_sel_e SEL_B2 = SEL_T0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  input  samp_t t0_in,
  input  samp_t lag_in,
  input  samp_t cont_in,
  output samp_t lag_out,
  output samp_t t1,
  output samp_t t2,
  output samp_t b1,
  output samp_t b2
);
  samp_t t0_r, l0_r, l1_r, l2_r, c_r;

  function automatic samp_t pick(input drv_sel_e s, input samp_t v_t0, input samp_t v_l0,
                                 input samp_t v_l1, input samp_t v_l2);
    case (s)
      SEL_T0:  return v_t0;
      SEL_L0:  return v_l0;
      SEL_L1:  return v_l1;
      default: return v_l2;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t0_r <= '0; l0_r <= '0; l1_r <= '0; l2_r <= '0; c_r <= '0;
      t1 <= '0; t2 <= '0; b1 <= '0; b2 <= '0;
    end else begin
      t0_r <= t0_in;
      l0_r <= lag_in;
      l1_r <= l0_r;
      l2_r <= l1_r;
      c_r  <= cont_in;
      if (mode == MODE_CONT) begin
        t1 <= c_r; t2 <= c_r; b1 <= c_r; b2 <= c_r;
      end else begin
        t1 <= pick(SEL_T1, t0_r, l0_r, l1_r, l2_r);
        t2 <= pick(SEL_T2, t0_r, l0_r, l1_r, l2_r);
        b1 <= pick(SEL_B1, t0_r, l0_r, l1_r, l2_r);
        b2 <= pick(SEL_B2, t0_r, l0_r, l1_r, l2_r);
      end
    end
  end

  assign lag_out = l0_r;
endmodule
