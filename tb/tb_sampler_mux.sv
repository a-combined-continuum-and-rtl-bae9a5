// tb_sampler_mux -- random inputs and select; after each strobe the output
// must hold the selected input; without a strobe it must hold its value.
module tb_sampler_mux;
  import vla_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, sel = 0;
  samp_t own_in = 0, alt_in = 0, dout, exp_q = 0;
  int checks = 0, failures = 0;

  sampler_mux dut (.clk, .rst_n, .en, .sel, .own_in, .alt_in, .dout);
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
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      en = $urandom_range(0, 1); sel = $urandom_range(0, 1);
      own_in = samp_t'($urandom); alt_in = samp_t'($urandom);
      if (en) exp_q = sel ? alt_in : own_in;
      @(posedge clk); #1;
      checks++;
      if (dout != exp_q) begin failures++; $display("FAIL n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
