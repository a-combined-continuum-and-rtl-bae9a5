// tb_multiplier -- exhaustive check of the three-level multiplier: every pair
// of valid sample codes, product compared with the level arithmetic
// (level = magnitude ? (sign ? -1 : +1) : 0), one clock of latency.
module tb_multiplier;
  import vla_pkg::*;
  logic clk = 0, rst_n = 0;
  samp_t a, b;
  logic signed [1:0] prod;
  int checks = 0, failures = 0;

  multiplier dut (.clk, .rst_n, .a, .b, .prod);
  always #5 clk = ~clk;

  function automatic int lvl(samp_t s);
    return s[0] ? (s[1] ? -1 : 1) : 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        @(negedge clk); a = samp_t'(i); b = samp_t'(j);
        @(negedge clk);
        checks++;
        if (int'(prod) != lvl(a) * lvl(b)) begin
          failures++;
          $display("FAIL a=%b b=%b prod=%0d", a, b, prod);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
