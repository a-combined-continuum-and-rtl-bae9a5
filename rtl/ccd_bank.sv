// ccd_bank -- one recirculator memory set (D1 or D2 of Figure 3).
//
// A set is eight CCD chips, each of nine 1024-bit shift registers, giving 72
// wires of 1024 bits (73728 bits). A CCD shift register is read in the order
// it was written, so the set behaves as a first-in first-out store of 72-bit
// words: writes go to successive words from the last wr_restart, reads come
// from successive words from the last rd_restart. Here the shift registers
// are modelled as an addressed array with separate input and output ports
// instead of common tri-state I/O, and the CCDs' need to keep shifting (they
// may stop for at most 9.56 us) is not modelled: both are this design's
// simplifications. rd_data is registered: it holds the word one clock after
// rd_en.
module ccd_bank #(
  parameter int unsigned WIDTH = 72,
  parameter int unsigned WORDS = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_restart,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_restart,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [WIDTH-1:0] mem [WORDS];
  logic [AW-1:0]    wa, ra;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wa] <= wr_data;
    if (rd_en) rd_data <= mem[ra];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= '0;
      ra <= '0;
    end else begin
      if (wr_restart)  wa <= '0;
      else if (wr_en)  wa <= (wa == AW'(WORDS - 1)) ? '0 : wa + AW'(1);
      if (rd_restart)  ra <= '0;
      else if (rd_en)  ra <= (ra == AW'(WORDS - 1)) ? '0 : ra + AW'(1);
    end
  end
endmodule
