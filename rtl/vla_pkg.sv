// vla_pkg -- types and constants shared by the combined continuum / spectral
// line delay and multiplier system.
//
// Samples are two-bit, three-level values as produced by the samplers:
// bit 1 is the sign (1 = negative) and bit 0 the magnitude (1 = nonzero).
// The level encoding is this design's choice; only "two bits, three levels"
// is given. The timing constants are counts of the 100 MHz multiplier
// clock derived from the memory-cycle figures: a 737.28 us pass through a
// 73728-bit memory set, integration stopped at 723.847 us, 20.20 us for the
// accumulator dump, and a 744.047 us cycle of which 64 fit in the valid part
// of each 52.083 ms system cycle.
package vla_pkg;

  typedef logic [1:0] samp_t;

  // System operating mode as seen by the controller and the driver input
  // multiplexers.
  typedef enum logic {
    MODE_CONT = 1'b0,   // continuum: flow-through, no recirculation
    MODE_LINE = 1'b1    // spectral line, one polarization
  } mode_e;

  // Signal chosen at a driver output (Figure 4): the undelayed data or the
  // lag data delayed by 0, 1 or 2 further clocks.
  typedef enum logic [1:0] {
    SEL_T0 = 2'd0,
    SEL_L0 = 2'd1,
    SEL_L1 = 2'd2,
    SEL_L2 = 2'd3
  } drv_sel_e;

  // Recirculating memory organisation (Figure 3).
  localparam int unsigned WORD_BITS  = 72;    // CCD wires per memory set
  localparam int unsigned MEM_WORDS  = 1024;  // bits per CCD shift register
  localparam int unsigned N_LINES    = 8;     // serial lines into the RAMs
  localparam int unsigned LINE_BITS  = 9;     // bits per line per word (E)
  localparam int unsigned LSG_DEPTH  = 64;    // 1 x 64 RAMs of the lag stepper

  // Memory cycle, in 10 ns clocks.
  localparam int unsigned READ_CLKS  = 73728; // 737.28 us pass
  localparam int unsigned INT_CLKS   = 72385; // 723.847 us integration
  localparam int unsigned DUMP_CLKS  = 2020;  // 20.20 us dump
  localparam int unsigned CYC_CLKS   = 74405; // 744.047 us memory cycle
  localparam int unsigned CYC_PER_DI = 64;    // memory cycles per valid period

  // Product of two three-level samples: -1, 0 or +1.
  function automatic logic signed [1:0] mult3(input samp_t a, input samp_t b);
    if (!(a[0] && b[0])) return 2'sd0;
    return (a[1] ^ b[1]) ? -2'sd1 : 2'sd1;
  endfunction

endpackage
