// integrator -- high speed accumulator with a dump into per-lag storage.
//
// Each multiplier feeds one integrator. While int_en is high the product is
// added to a fast accumulator. At the end of every memory cycle a dump pulse
// adds the accumulator into the storage word of the lag set that cycle formed
// (dump_slot, the recirculation pass number) and clears it, so that the
// channels of all passes build up side by side until the host reads them.
// The document gives the dump (20.16 us with the continuum integrators) and
// the two extra accumulator bits; the widths, the storage depth (one word per
// possible pass, 64) and the host port are this design's choices.
//
// Host port: rd_addr/rd_data read a storage word combinationally; clr (and
// reset) start a sweep that zeroes one storage word per clock for SLOTS
// clocks (the read-out every 10, 20 or 40 s); no dump may fall inside the
// sweep. The storage has no reset of its own so that it maps to a RAM. A dump
// and int_en never coincide in this design; if they do, the product of that
// clock is lost.
module integrator #(
  parameter int unsigned ACC_W   = 18,   // 72385 products fit in 18 signed bits
  parameter int unsigned STORE_W = 36,
  parameter int unsigned SLOTS   = 64
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        int_en,
  input  logic signed [1:0]           prod,
  input  logic                        dump,
  input  logic [$clog2(SLOTS)-1:0]    dump_slot,
  input  logic                        clr,
  input  logic [$clog2(SLOTS)-1:0]    rd_addr,
  output logic signed [STORE_W-1:0]   rd_data,
  output logic signed [ACC_W-1:0]     acc
);
  logic signed [STORE_W-1:0] store [SLOTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (dump) begin
      acc <= '0;
    end else if (int_en) begin
      acc <= acc + ACC_W'(prod);
    end
  end

  localparam int unsigned SW = $clog2(SLOTS);

  logic          clearing;
  logic [SW-1:0] clr_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_idx  <= '0;
    end else if (clr) begin
      clearing <= 1'b1;
      clr_idx  <= '0;
    end else if (clearing) begin
      clr_idx <= clr_idx + SW'(1);
      if (clr_idx == SW'(SLOTS - 1)) clearing <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clearing)  store[clr_idx]   <= '0;
    else if (dump) store[dump_slot] <= store[dump_slot] + STORE_W'(acc);
  end

  assign rd_data = store[rd_addr];
endmodule
