// recirc_memory -- double-buffered recirculating memory for one bit of the
// sample stream (registers A to E of Figure 3).
//
// Write side: samples enter serially at X on wr_en into the 6-bit register A.
// Every sixth sample A is copied in parallel to B, and B is shifted six bits
// at a time into the 72-bit register C. When C has taken twelve groups the
// 72-bit word is written into the memory set currently being loaded (D1 or
// D2). Once a set holds WORDS words further samples are dropped and counted
// on `overflow` until the next swap.
//
// Read side: rd_start begins one pass through the other set. Every 72 clocks
// a word is read into E, which is eight 9-bit shift registers; every 8 clocks
// all eight shift one bit out onto line_bits (line i carries samples i, i+8,
// ... of the word), so the eight lines together carry one sample per clock
// in the order written. line_stb marks each new set of line bits; a pass ends
// with pass_done after WORDS x 72 clocks.
//
// swap exchanges the roles of the two sets and restarts loading. The register
// chain and sizes follow the document; the sample-to-line order inside a word,
// and the control signals, are this design's choices (the memory controls
// were left undesigned).
module recirc_memory #(
  parameter int unsigned WORDS = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  // loading
  input  logic       wr_en,
  input  logic       din,
  input  logic       swap,
  output logic       wr_full,
  output logic       overflow,
  // unloading
  input  logic       rd_start,
  output logic [7:0] line_bits,
  output logic       line_stb,
  output logic       rd_busy,
  output logic       pass_done
);
  localparam int unsigned WB  = 72;
  localparam int unsigned NS  = WORDS * WB;
  localparam int unsigned SAW = $clog2(NS + 1);

  // ---------------- loading: A, B, C ----------------
  logic [5:0]    a_q, b_q;
  logic [2:0]    a_cnt;
  logic          b_load;
  logic [WB-1:0] c_q;
  logic [3:0]    c_cnt;
  logic [SAW-1:0] samples_in;
  logic          wr_sel;       // set being loaded: 0 = D1, 1 = D2
  logic          word_wr;
  logic [WB-1:0] word_data;

  assign wr_full   = (samples_in == SAW'(NS));
  assign word_wr   = b_load && (c_cnt == 4'd11);
  assign word_data = {b_q, c_q[WB-1:6]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; a_cnt <= '0; b_load <= 1'b0;
      c_q <= '0; c_cnt <= '0; samples_in <= '0; wr_sel <= 1'b0;
      overflow <= 1'b0;
    end else if (swap) begin
      a_cnt <= '0; b_load <= 1'b0; c_cnt <= '0; samples_in <= '0;
      wr_sel <= ~wr_sel;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && wr_full;
      b_load   <= 1'b0;
      if (wr_en && !wr_full) begin
        a_q <= {din, a_q[5:1]};
        samples_in <= samples_in + SAW'(1);
        if (a_cnt == 3'd5) begin
          b_q    <= {din, a_q[5:1]};
          b_load <= 1'b1;
          a_cnt  <= '0;
        end else begin
          a_cnt <= a_cnt + 3'd1;
        end
      end
      if (b_load) begin
        c_q <= word_data;
        if (c_cnt == 4'd11) begin
          c_cnt <= '0;
        end else begin
          c_cnt <= c_cnt + 4'd1;
        end
      end
    end
  end

  // ---------------- the two memory sets ----------------
  logic          rd_en;
  logic [WB-1:0] rd_d1, rd_d2, rd_word;

  ccd_bank #(.WIDTH(WB), .WORDS(WORDS)) u_d1 (
    .clk, .rst_n,
    .wr_restart(swap), .wr_en(word_wr && !wr_sel), .wr_data(word_data),
    .rd_restart(rd_start), .rd_en(rd_en && wr_sel), .rd_data(rd_d1)
  );
  ccd_bank #(.WIDTH(WB), .WORDS(WORDS)) u_d2 (
    .clk, .rst_n,
    .wr_restart(swap), .wr_en(word_wr && wr_sel), .wr_data(word_data),
    .rd_restart(rd_start), .rd_en(rd_en && !wr_sel), .rd_data(rd_d2)
  );
  assign rd_word = wr_sel ? rd_d1 : rd_d2;

  // ---------------- unloading: E ----------------
  logic [6:0]           p;                 // clock within a word, 0..71
  logic [$clog2(WORDS)-1:0] rd_cnt;
  logic [8:0]           e_sr [8];

  assign rd_en = rd_busy && (p == 7'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy <= 1'b0; p <= '0; rd_cnt <= '0; pass_done <= 1'b0;
      line_bits <= '0; line_stb <= 1'b0;
      for (int i = 0; i < 8; i++) e_sr[i] <= '0;
    end else begin
      pass_done <= 1'b0;
      line_stb  <= 1'b0;
      if (rd_start) begin
        rd_busy <= 1'b1;
        p       <= '0;
        rd_cnt  <= '0;
      end else if (rd_busy) begin
        if (p == 7'd71) begin
          p <= '0;
          if (rd_cnt == ($clog2(WORDS))'(WORDS - 1)) begin
            rd_busy   <= 1'b0;
            pass_done <= 1'b1;
          end else begin
            rd_cnt <= rd_cnt + 1'b1;
          end
        end else begin
          p <= p + 7'd1;
        end
        if (p[2:0] == 3'd1) begin
          line_stb <= 1'b1;
          if (p == 7'd1) begin
            for (int i = 0; i < 8; i++) begin
              line_bits[i] <= rd_word[i];
              for (int k = 0; k < 8; k++) e_sr[i][k] <= rd_word[8*(k+1) + i];
              e_sr[i][8] <= 1'b0;
            end
          end else begin
            for (int i = 0; i < 8; i++) begin
              line_bits[i] <= e_sr[i][0];
              e_sr[i]      <= {1'b0, e_sr[i][8:1]};
            end
          end
        end
      end
    end
  end
endmodule
