// tb_delay_line -- random two-bit stream with irregular sample strobes; for
// several delays the output after each strobe must equal the input that
// arrived `delay` strobes earlier.
module tb_delay_line;
  import vla_pkg::*;
  localparam int D = 256;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] delay = 0;
  samp_t din = 0, dout;
  samp_t hist [$];
  int checks = 0, failures = 0;

  delay_line #(.DEPTH(D)) dut (.clk, .rst_n, .en, .delay, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dl [5] = '{0, 1, 7, 100, 255};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (dl[k]) begin
      delay = 8'(dl[k]);
      // fill the buffer past the delay before checking
      for (int n = 0; n < D + 300; n++) begin
        @(negedge clk);
        en  = ($urandom_range(0, 2) != 0);
        din = samp_t'($urandom);
        if (en) hist.push_back(din);
        @(posedge clk); #1;
        if (en && n > D + 10 && hist.size() > dl[k]) begin
          checks++;
          if (dout != hist[hist.size() - 1 - dl[k]]) begin
            failures++;
            $display("FAIL delay %0d got %0d exp %0d", dl[k], dout, hist[hist.size()-1-dl[k]]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
