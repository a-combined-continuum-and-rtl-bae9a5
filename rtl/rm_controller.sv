// rm_controller -- timing and control for the recirculating memories, the lag
// stepping and the integrator dumps.
//
// The document leaves these controls undesigned but fixes the timing they
// must produce, in 10 ns clocks of the 100 MHz multiplier clock:
//   * a memory cycle of CYC_N = 74405 clocks (744.047 us); each cycle starts a
//     pass of READ_N = 73728 clocks (737.28 us) through the loaded memory set;
//   * integration over INT_N = 72385 clocks (723.847 us) of each pass and then
//     a dump of the accumulators, before the next cycle;
//   * NCYC = 64 memory cycles after the end of each data-invalid period.
// The memory set being loaded is swapped with the one being read every
// 2^recirc_log2 cycles (the recirculation factor of Table 1); pass k of a set
// (k = 0 .. R-1) forms the lag set m = 4*(k*2^lag_mult_log2 + lag_off)
// (Figure 2: m = 4K, 8K + 4j or 16K + 4j when the lags are shared between one,
// two or four modules), delivered as lag_d = m/8 and lag_h = (m/4) mod 2.
// Samples are taken every 2^samp_log2 clocks (sampling rate 100 MHz / 2^s)
// and written 2^rep_log2 times each (the redundant bits per sample of
// Table 3). In continuum mode samples are taken every clock and nothing is
// recirculated.
//
// This design's choices: integration covers the last INT_N clocks of each pass
// (the first READ_N - INT_N lagged samples would pair with data of the
// previous pass), offset by PIPE clocks, the latency from rd_start to the
// products at the integrator inputs; the dump is a single-clock pulse at the
// end of the window; integration starts only after the second swap, when the
// set being read has been filled completely.
module rm_controller
  import vla_pkg::*;
#(
  parameter int unsigned READ_N = READ_CLKS,
  parameter int unsigned INT_N  = INT_CLKS,
  parameter int unsigned CYC_N  = CYC_CLKS,
  parameter int unsigned NCYC   = CYC_PER_DI,
  parameter int unsigned PIPE   = 9
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       di,             // data invalid (high while blanking)
  input  mode_e      mode,
  input  logic [2:0] samp_log2,
  input  logic [2:0] rep_log2,
  input  logic [2:0] recirc_log2,
  input  logic [1:0] lag_mult_log2,
  input  logic [1:0] lag_off,
  output logic       samp_en,
  output logic       wr_en,
  output logic       swap,
  output logic       rd_start,
  output logic [5:0] lag_d,
  output logic       lag_h,
  output logic       int_en,
  output logic       dump,
  output logic [5:0] dump_slot,
  output logic       running,
  output logic       primed
);
  localparam int unsigned CW = $clog2(CYC_N);
  localparam int unsigned NW = $clog2(NCYC + 1);

  logic [CW-1:0] c;
  logic [NW-1:0] ncyc;
  logic [5:0]    pass_k;
  logic [6:0]    scnt;
  logic          di_q, started;
  logic [1:0]    swaps;
  logic [5:0]    r_last;
  logic [2:0]    wr_log2;
  logic [9:0]    m;
  logic          cyc0, line;

  assign line    = (mode == MODE_LINE);
  assign r_last  = 6'((7'd1 << recirc_log2) - 7'd1);
  assign wr_log2 = (rep_log2 > samp_log2) ? 3'd0 : samp_log2 - rep_log2;
  assign cyc0    = running && (c == '0);

  assign samp_en  = !line || ((scnt & 7'((8'd1 << samp_log2) - 8'd1)) == '0);
  assign wr_en    =  line && ((scnt & 7'((8'd1 << wr_log2) - 8'd1)) == '0);
  assign swap     = line && cyc0 && (!started || pass_k == r_last);
  assign rd_start = line && cyc0;

  assign m     = 10'(4 * ((int'(pass_k) << lag_mult_log2) + int'(lag_off)));
  assign lag_d = m[8:3];
  assign lag_h = m[2];

  assign int_en    = running && (primed || !line) &&
                     (c >= CW'(PIPE + READ_N - INT_N)) && (c < CW'(PIPE + READ_N));
  assign dump      = running && (primed || !line) && (c == CW'(PIPE + READ_N));
  assign dump_slot = line ? pass_k : 6'd0;
  assign primed    = (swaps == 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; ncyc <= '0; pass_k <= '0; scnt <= '0;
      di_q <= 1'b1; started <= 1'b0; swaps <= '0; running <= 1'b0;
    end else begin
      scnt <= scnt + 7'd1;
      di_q <= di;
      if (!running) begin
        if (di_q && !di) begin
          running <= 1'b1;
          c       <= '0;
          ncyc    <= '0;
        end
      end else begin
        if (cyc0) begin
          if (line) begin
            started <= 1'b1;
            if (swap) begin
              pass_k <= '0;
              if (swaps != 2'd2) swaps <= swaps + 2'd1;
            end else begin
              pass_k <= pass_k + 6'd1;
            end
          end
        end
        if (c == CW'(CYC_N - 1)) begin
          c <= '0;
          if (ncyc == NW'(NCYC - 1)) running <= 1'b0;
          else                       ncyc <= ncyc + NW'(1);
        end else begin
          c <= c + CW'(1);
        end
      end
    end
  end
endmodule
