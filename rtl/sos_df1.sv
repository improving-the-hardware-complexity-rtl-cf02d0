// sos_df1: one direct form I second-order section (biquad) with a0 = 1.
//
//   y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2]
//
// Direct form I keeps separate delay lines for the input and the output, the
// structure chosen for the fractional operators because it tolerates
// coefficient quantization and internal overflow better than the transposed or
// direct form II alternatives. The five products are summed at full
// precision and rounded once (round half up) back to the acc_t format, with
// saturation.
//
// Interface and timing: y is a combinational function of x and the four
// delay registers. On a clock edge with en = 1 the delay lines shift
// (x[n-1] <= x, y[n-1] <= y), so en marks the one cycle in which x holds
// sample n. Synchronous active-low reset clears the delay lines.
// The section structure follows the document; formats and rounding are this
// design's own choice.
module sos_df1
  import fcfp_pkg::*;
#(
  parameter sos_coef_t COEF = '{b0: coef_t'(1) <<< COEF_FL, b1: '0, b2: '0, a1: '0, a2: '0}
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  acc_t x,
  output acc_t y
);

  acc_t x1, x2, y1, y2;
  // Product width plus three guard bits for the five-term sum.
  localparam int PW = COEF_W + ACC_W + 3;
  typedef logic signed [PW-1:0] prod_t;
  prod_t sum;

  always_comb begin
    sum = prod_t'(COEF.b0) * prod_t'(x)  + prod_t'(COEF.b1) * prod_t'(x1)
        + prod_t'(COEF.b2) * prod_t'(x2) - prod_t'(COEF.a1) * prod_t'(y1)
        - prod_t'(COEF.a2) * prod_t'(y2);
    y = acc_t'(sat_to(rshift_round(128'(sum), COEF_FL), ACC_W));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
      y1 <= '0;
      y2 <= '0;
    end else if (en) begin
      x1 <= x;
      x2 <= x1;
      y1 <= y;
      y2 <= y1;
    end
  end

endmodule
