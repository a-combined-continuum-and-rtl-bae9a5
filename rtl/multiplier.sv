// multiplier -- three-level by three-level multiplier.
//
// Used for the cross multipliers, the continuum self-multipliers and the
// spectral line autocorrelators. Each input is a two-bit sample (sign,
// magnitude); the product is -1, 0 or +1 and is registered, so it appears one
// clock after its inputs. The product weights (+-1 and 0) are this design's
// choice; the document gives only the two-bit, three-level format.
module multiplier
  import vla_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  samp_t              a,
  input  samp_t              b,
  output logic signed [1:0]  prod
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prod <= '0;
    else        prod <= mult3(a, b);
  end
endmodule
