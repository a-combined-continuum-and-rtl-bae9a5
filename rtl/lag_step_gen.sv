// lag_step_gen -- lag stepping generator and undelayed path for one bit
// (registers F, G, H, I and J of Figure 3).
//
// Spectral line: the eight serial lines from the recirculating memory, each
// carrying one bit per 8 clocks, are written on every line_stb into eight
// 1 x 64 RAMs (F, one word of 8 bits per strobe). The word written lag_d
// strobes earlier is read back, giving a delay of 8 x lag_d samples (80 ns
// steps). G keeps the previous RAM word; H is loaded either with the RAM word
// (lag_h = 0) or with the upper half of G followed by the lower half of the
// RAM word (lag_h = 1), adding four samples (40 ns), and shifts one sample per
// clock out as tau_m. The total lag is m = 8*lag_d + 4*lag_h samples.
// The undelayed data: the same line bits are taken in parallel into I, moved
// to J when H is loaded and shifted out as tau_0, so that with m = 0 tau_m
// and tau_0 carry the same sample on the same clock, three clocks after its
// line_stb.
//
// Continuum: the RAMs are bypassed; z_in shifts serially through H and y_in
// through four bits of I and four of J, both with 8 clocks of delay.
//
// The register names, widths and the 40 ns / 80 ns resolutions follow the
// document; how G and H produce the half step is this design's reading.
module lag_step_gen
  import vla_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mode_e      mode,
  input  logic [7:0] line_bits,
  input  logic       line_stb,
  input  logic [5:0] lag_d,
  input  logic       lag_h,
  input  logic       z_in,
  input  logic       y_in,
  output logic       tau_m,
  output logic       tau_0
);
  logic [7:0] ram [LSG_DEPTH];
  logic [5:0] wa, wa_d;
  logic       stb_d1, stb_d2;
  logic [7:0] rdata, g_q, h_q, i_q, j_q;

  always_ff @(posedge clk) begin
    if (mode == MODE_LINE && line_stb) ram[wa] <= line_bits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= '0; wa_d <= '0; stb_d1 <= 1'b0; stb_d2 <= 1'b0;
      rdata <= '0; g_q <= '0; h_q <= '0; i_q <= '0; j_q <= '0;
    end else if (mode == MODE_CONT) begin
      stb_d1 <= 1'b0;
      stb_d2 <= 1'b0;
      h_q    <= {z_in, h_q[7:1]};
      i_q    <= {4'b0, y_in, i_q[3:1]};
      j_q    <= {4'b0, i_q[0], j_q[3:1]};
    end else begin
      stb_d1 <= line_stb;
      stb_d2 <= stb_d1;
      if (line_stb) begin
        wa_d <= wa;
        wa   <= wa + 6'd1;
        i_q  <= line_bits;
      end
      if (stb_d1) rdata <= ram[wa_d - lag_d];
      if (stb_d2) begin
        g_q <= rdata;
        h_q <= lag_h ? {rdata[3:0], g_q[7:4]} : rdata;
        j_q <= i_q;
      end else begin
        h_q <= {1'b0, h_q[7:1]};
        j_q <= {1'b0, j_q[7:1]};
      end
    end
  end

  assign tau_m = h_q[0];
  assign tau_0 = j_q[0];
endmodule
