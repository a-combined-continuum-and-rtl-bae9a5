// tb_rm_controller -- controller timing at reduced cycle lengths
// (pass 288, integration 240, cycle 320 clocks, 8 cycles per valid period).
// Checks, for a spectral line setting with recirculation factor 4:
//   * nothing starts before data invalid ends; then exactly 8 memory cycles
//     of 320 clocks each (rd_start spacing), and again after the next
//     data-invalid period;
//   * swaps every 4 cycles; no integration until the second swap; then 240
//     integrating clocks and one dump per cycle, at clock PIPE + 288 of it;
//   * dump_slot = pass number 0..3 and lag m = 4*(2k + 1) (lag_mult_log2 = 1,
//     lag_off = 1) as lag_d / lag_h;
//   * sample and write strobe spacing, with and without redundant writes;
//   * continuum: a sample every clock, no memory activity, dumps to word 0.
module tb_rm_controller;
  import vla_pkg::*;
  localparam int RD = 288, IN = 240, CY = 320, NC = 8, PP = 9;
  logic clk = 0, rst_n = 0, di = 1;
  mode_e mode = MODE_LINE;
  logic [2:0] samp_log2 = 3'd2, rep_log2 = 3'd0, recirc_log2 = 3'd2;
  logic [1:0] lag_mult_log2 = 2'd1, lag_off = 2'd1;
  logic samp_en, wr_en, swap, rd_start, lag_h, int_en, dump, running, primed;
  logic [5:0] lag_d, dump_slot;
  int checks = 0, failures = 0;
  int cyc = 0, last_rd = -1, n_rd = 0, n_swap = 0, n_int = 0, n_dump = 0;
  int n_samp = 0, n_wr = 0, last_samp = -1, last_wr = -1, bad_samp = 0, bad_wr = 0;
  int exp_samp = 4, exp_wr = 4;

  rm_controller #(.READ_N(RD), .INT_N(IN), .CYC_N(CY), .NCYC(NC), .PIPE(PP)) dut (
    .clk, .rst_n, .di, .mode, .samp_log2, .rep_log2, .recirc_log2, .lag_mult_log2, .lag_off,
    .samp_en, .wr_en, .swap, .rd_start, .lag_d, .lag_h, .int_en, .dump, .dump_slot,
    .running, .primed);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // monitor, sampled mid-clock
  int int_in_cyc = 0, cyc_idx = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (samp_en) begin
      if (last_samp >= 0 && cyc - last_samp != exp_samp) bad_samp++;
      last_samp = cyc; n_samp++;
    end
    if (wr_en) begin
      if (last_wr >= 0 && cyc - last_wr != exp_wr) bad_wr++;
      last_wr = cyc; n_wr++;
    end
    if (rd_start) begin
      if (last_rd >= 0 && cyc - last_rd != CY && cyc - last_rd < 2 * CY)
        begin failures++; $display("FAIL rd_start spacing %0d", cyc - last_rd); end
      if (last_rd >= 0 && cyc - last_rd < 2 * CY) checks++;
      last_rd = cyc; n_rd++; int_in_cyc = 0;
    end
    if (swap) n_swap++;
    if (int_en) begin n_int++; int_in_cyc++; end
    if (dump) begin
      int k, m;
      k = n_dump % 4;
      m = 4 * (2 * k + 1);
      n_dump++;
      if (mode == MODE_LINE)
        chk(cyc - last_rd == PP + RD, $sformatf("dump position %0d", cyc - last_rd));
      chk(int_in_cyc == IN, $sformatf("integration length %0d", int_in_cyc));
      int_in_cyc = 0;
      if (mode == MODE_LINE) begin
        chk(dump_slot == 6'(k), $sformatf("dump slot %0d exp %0d", dump_slot, k));
        chk({lag_d, lag_h} == 7'(m >> 2), $sformatf("lag d=%0d h=%0d exp m=%0d", lag_d, lag_h, m));
      end else begin
        chk(dump_slot == 0, "continuum dump slot");
      end
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (500) @(negedge clk);
    chk(n_rd == 0 && !running, "idle during data invalid");
    di = 0;
    repeat (NC * CY + 100) @(negedge clk);
    chk(n_rd == NC, $sformatf("rd_start count %0d", n_rd));
    chk(n_swap == 2, $sformatf("swap count %0d", n_swap));
    chk(n_dump == 4, $sformatf("dumps after priming %0d", n_dump));
    chk(n_int == 4 * IN, $sformatf("integrating clocks %0d", n_int));
    chk(!running, "stopped after 8 cycles");
    // second valid period, with one redundant write per sample
    di = 1; rep_log2 = 3'd1; exp_wr = 2; last_wr = -1; last_rd = -1;
    repeat (50) @(negedge clk);
    di = 0;
    repeat (NC * CY + 100) @(negedge clk);
    chk(n_rd == 2 * NC, $sformatf("rd_start count after resync %0d", n_rd));
    chk(n_swap == 4, $sformatf("swap count after resync %0d", n_swap));
    chk(n_dump == 12, $sformatf("dumps after resync %0d", n_dump));
    chk(bad_samp == 0, "sample strobe spacing");
    chk(bad_wr == 0, "write strobe spacing");
    // continuum
    di = 1; mode = MODE_CONT; exp_samp = 1; last_samp = -1;
    n_dump = 0; n_rd = 0; n_swap = 0; n_wr = 0;
    repeat (50) @(negedge clk);
    di = 0;
    repeat (NC * CY + 100) @(negedge clk);
    chk(n_rd == 0 && n_swap == 0 && n_wr == 0, "no memory activity in continuum");
    chk(n_dump == NC, $sformatf("continuum dumps %0d", n_dump));
    chk(bad_samp == 0, "continuum sample strobe every clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
