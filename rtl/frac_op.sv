// frac_op: fractional-order integro-differential operator D^alpha realized as
// an IIR filter.
//
// The Oustaloup approximation of s^alpha, discretized with Tustin's rule, is
// an improper z-domain fraction N(z)/D(z). It is split into a direct term Q
// (the quotient of the leading coefficients) plus a proper remainder R(z)/D(z),
// and the remainder is factored into second-order sections in direct form I:
//
//   y[n] = Q x[n] + sos_{N-1}( ... sos_1( sos_0( GAIN x[n] ) ) )
//
// The default coefficients are the alpha = -0.99 integrator of the document's
// Table 1 (Q = 0.0060, scale 0.010427, three sections); fcfp_pkg also holds a
// matching alpha = +0.99 differentiator, derived in the same way.
//
// Interface and timing: one sample per in_valid pulse. The cascade is
// combinational between the delay registers; the result, rounded to the
// sig_t format and saturated, is registered and appears with out_valid one
// clock after in_valid. Internal values are carried in the wider acc_t
// format (this design's choice); input and output are 22-bit sig_t words.
module frac_op
  import fcfp_pkg::*;
#(
  parameter sos_set_t SOS    = INT_SOS,
  parameter coef_t    GAIN   = INT_GAIN,
  parameter coef_t    DIRECT = INT_DIRECT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  sig_t x,
  output logic out_valid,
  output sig_t y
);

  localparam int SH = ACC_FL - SIG_FL;  // sig_t -> acc_t alignment
  localparam int PW = COEF_W + ACC_W + 1;
  typedef logic signed [PW-1:0] prod_t;

  acc_t x_acc;
  acc_t stage [NSEC+1];
  prod_t direct_p;
  acc_t  y_acc;
  logic signed [ACC_W:0] y_sum;

  assign x_acc = acc_t'(x) <<< SH;

  // Input scaling by the cascade gain.
  assign stage[0] = acc_t'(sat_to(rshift_round(128'(prod_t'(GAIN) * prod_t'(x_acc)), COEF_FL), ACC_W));

  for (genvar i = 0; i < NSEC; i++) begin : g_sec
    sos_df1 #(.COEF(SOS[i])) u_sec (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (in_valid),
      .x    (stage[i]),
      .y    (stage[i+1])
    );
  end

  // Parallel direct (quotient) path.
  assign direct_p = prod_t'(DIRECT) * prod_t'(x_acc);
  assign y_acc = acc_t'(sat_to(rshift_round(128'(direct_p), COEF_FL), ACC_W));
  assign y_sum = (ACC_W+1)'(y_acc) + (ACC_W+1)'(stage[NSEC]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        y <= sig_t'(sat_to(rshift_round(128'(y_sum), SH), SIG_W));
    end
  end

endmodule
