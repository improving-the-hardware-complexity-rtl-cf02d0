// switch_fn: switching function of the sliding-mode control term, applied to
// the sliding variable S.
//
//   SW_SGN: sgn(S) = +1, 0 or -1
//   SW_SAT: sat(S/eps) = S/eps clamped to [-1, +1]
//
// The controller of the document uses the signum function and notes that the
// saturation function removes the remaining chattering; the boundary layer
// eps = 0.5 comes from the controller parameter table. Division by eps is a
// multiplication by the constant INV_EPS. Purely combinational; output in the
// sig_t format (1.0 = 2^SIG_FL).
module switch_fn
  import fcfp_pkg::*;
#(
  parameter coef_t INV_EPS = K_INV_EPS
) (
  input  sw_mode_e mode,
  input  sig_t     s,
  output sig_t     y
);

  localparam sig_t ONE = sig_t'(1) <<< SIG_FL;
  localparam int PW = COEF_W + SIG_W;
  typedef logic signed [PW-1:0] prod_t;

  prod_t scaled;

  always_comb begin
    scaled = prod_t'(rshift_round(128'(prod_t'(INV_EPS) * prod_t'(s)), COEF_FL));
    if (mode == SW_SGN) begin
      if (s > 0)      y = ONE;
      else if (s < 0) y = -ONE;
      else            y = '0;
    end else begin
      if (scaled > prod_t'(ONE))       y = ONE;
      else if (scaled < -prod_t'(ONE)) y = -ONE;
      else                             y = sig_t'(scaled);
    end
  end

endmodule
