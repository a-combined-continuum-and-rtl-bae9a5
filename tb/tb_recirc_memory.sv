// tb_recirc_memory -- full-size recirculating memory (one bit plane):
//  * load a set with 73728 random bits plus some extra, which must be
//    refused and flagged on overflow;
//  * swap, then read the set twice (two recirculation passes) while the other
//    set is loaded with new bits; each pass must deliver the bits in the order
//    written, one per clock on the eight lines, and last 73728 + 1 clocks from
//    rd_start to pass_done;
//  * swap again and read the new bits.
module tb_recirc_memory;
  localparam int W = 1024;
  localparam int N = W * 72;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, din = 0, swap = 0, rd_start = 0;
  logic wr_full, overflow, line_stb, rd_busy, pass_done;
  logic [7:0] line_bits;
  logic set_a [N];
  logic set_b [N];
  int checks = 0, failures = 0, ovf_cnt = 0, nout, t_start, nload;
  bit loading_b = 0;

  recirc_memory #(.WORDS(W)) dut (.clk, .rst_n, .wr_en, .din, .swap, .wr_full, .overflow,
                                  .rd_start, .line_bits, .line_stb, .rd_busy, .pass_done);
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (overflow) ovf_cnt++;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // loader for set B, runs while set A is being read
  always @(negedge clk) begin
    if (loading_b && nload < N) begin
      wr_en = 1; din = set_b[nload]; nload++;
    end else if (loading_b) begin
      wr_en = 0;
    end
  end

  task automatic read_pass(input bit use_b);
    int errs = 0, len;
    @(negedge clk); rd_start = 1; t_start = cyc;
    @(negedge clk); rd_start = 0;
    nout = 0;
    while (!pass_done) begin
      @(posedge clk); #1;
      if (line_stb) begin
        for (int i = 0; i < 8; i++) begin
          if (nout < N && line_bits[i] != (use_b ? set_b[nout] : set_a[nout])) errs++;
          nout++;
        end
      end
    end
    len = cyc - t_start;
    checks++;
    if (errs != 0 || nout != N) begin
      failures++; $display("FAIL pass data: %0d errors, %0d bits", errs, nout);
    end
    checks++;
    if (len != N + 1) begin failures++; $display("FAIL pass length %0d", len); end
  endtask

  initial begin
    foreach (set_a[i]) set_a[i] = 1'($urandom);
    foreach (set_b[i]) set_b[i] = 1'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;   // load D2 first
    for (int i = 0; i < N + 20; i++) begin
      wr_en = 1; din = (i < N) ? set_a[i] : 1'b1;
      @(negedge clk);
    end
    wr_en = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (!wr_full || ovf_cnt != 20) begin
      failures++; $display("FAIL full=%0d overflow count %0d", wr_full, ovf_cnt);
    end
    swap = 1; @(negedge clk); swap = 0;
    nload = 0; loading_b = 1;
    read_pass(0);
    read_pass(0);
    loading_b = 0; wr_en = 0;
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    read_pass(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
