// tb_ccd_bank -- fill a full-size memory set (1024 words of 72 bits) with
// random words, read it back twice in order (as two recirculation passes)
// and compare each word, one clock after rd_en.
module tb_ccd_bank;
  localparam int W = 1024;
  logic clk = 0, rst_n = 0;
  logic wr_restart = 0, wr_en = 0, rd_restart = 0, rd_en = 0;
  logic [71:0] wr_data = 0, rd_data;
  logic [71:0] ref_q [W];
  int checks = 0, failures = 0;

  ccd_bank #(.WIDTH(72), .WORDS(W)) dut (.clk, .rst_n, .wr_restart, .wr_en, .wr_data,
                                         .rd_restart, .rd_en, .rd_data);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); wr_restart = 1; @(negedge clk); wr_restart = 0;
    for (int i = 0; i < W; i++) begin
      ref_q[i] = {$urandom, $urandom, $urandom};
      wr_data = ref_q[i]; wr_en = 1;
      @(negedge clk);
    end
    wr_en = 0;
    for (int pass = 0; pass < 2; pass++) begin
      rd_restart = 1; @(negedge clk); rd_restart = 0;
      for (int i = 0; i < W; i++) begin
        rd_en = 1; @(negedge clk); rd_en = 0;
        checks++;
        if (rd_data != ref_q[i]) begin failures++; $display("FAIL pass %0d word %0d", pass, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
