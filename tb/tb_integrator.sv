// tb_integrator -- random products accumulated under int_en, dumped into
// random lag words, compared with a reference sum per word; then the
// clear sweep must zero every word.
module tb_integrator;
  logic clk = 0, rst_n = 0;
  logic int_en = 0, dump = 0, clr = 0;
  logic signed [1:0] prod = 0;
  logic [5:0] dump_slot = 0, rd_addr = 0;
  logic signed [35:0] rd_data;
  logic signed [17:0] acc;
  longint model [64];
  longint run;
  int checks = 0, failures = 0;

  integrator dut (.clk, .rst_n, .int_en, .prod, .dump, .dump_slot, .clr,
                  .rd_addr, .rd_data, .acc);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (70) @(posedge clk);   // clear sweep after reset
    for (int d = 0; d < 40; d++) begin
      run = 0;
      for (int t = 0; t < 200 + $urandom_range(0, 300); t++) begin
        @(negedge clk);
        int_en = ($urandom_range(0, 3) != 0);
        prod   = 2'($signed($urandom_range(0, 2)) - 1);
        if (int_en) run += prod;
      end
      @(negedge clk); int_en = 0;
      checks++;
      if (acc != 18'(run)) begin failures++; $display("FAIL acc %0d exp %0d", acc, run); end
      dump_slot = 6'($urandom_range(0, 7));
      dump = 1;
      model[dump_slot] += run;
      @(negedge clk); dump = 0;
      checks++;
      if (acc != 0) begin failures++; $display("FAIL acc not cleared"); end
    end
    for (int s = 0; s < 8; s++) begin
      rd_addr = 6'(s); #1;
      checks++;
      if (rd_data != 36'(model[s])) begin
        failures++; $display("FAIL slot %0d got %0d exp %0d", s, rd_data, model[s]);
      end
    end
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    repeat (64) @(negedge clk);
    for (int s = 0; s < 8; s++) begin
      rd_addr = 6'(s); #1;
      checks++;
      if (rd_data != 0) begin failures++; $display("FAIL clear word %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
