// fcfp_ctrl: reduced-dynamics fractional-order sliding-mode controller for the
// fractional-order plant (FCFP).
//
// The plant is a five-state nonlinear compartment model (states x1..x5, x5 the
// total). The controller drives x4 to the reference x5ref through the control
// input V using the fractional sliding manifold
//
//   e  = x4 - x5ref
//   S  = e + c1 D^a e
//
// and the reduced-dynamics control law
//
//   V  = ( (u+w) x4 - gamma x3 + D^a x5ref - (1/c1)(x4 - x5ref)
//          - (kd/c1) D^-a sw(S) ) / x5
//
// where D^a is a fractional differentiator, D^-a a fractional integrator
// (a = 0.99) and sw() the signum function or, when sat_mode selects it, the
// saturation function sat(S/eps). Compared with the full fractional law, only
// single-order operators appear: one differentiator per differentiated signal
// and one integrator on the switching term, none of order 2a.
//
// Structure: two frac_op differentiators (on e and on x5ref), the
// switch_fn, one frac_op integrator, a multiply-accumulate for the numerator
// and a seq_div for the division by x5. Constants are those of the FCFP
// column of the controller parameter table: c1 = 0.5, kd = 0.01, eps = 0.5,
// a = 0.99, and the plant's nominal u = 1/255, w = 1/12, gamma = 1/1.2.
//
// Interface and timing (this design's own): one control step per accepted
// in_valid (accepted when in_ready = 1). V and the sliding variable s appear
// with a one-cycle out_valid pulse LATENCY = NUM_W + 4 clocks after the step
// was accepted (52 at the default). Inputs are sig_t (8 fractional bits),
// V is v_t (18 fractional bits).
module fcfp_ctrl
  import fcfp_pkg::*;
#(
  parameter coef_t K_UW_P     = K_UW,
  parameter coef_t K_GAMMA_P  = K_GAMMA,
  parameter coef_t K_C1_P     = K_C1,
  parameter coef_t K_INV_C1_P = K_INV_C1,
  parameter coef_t K_KD_C1_P  = K_KD_C1,
  parameter coef_t K_INV_EPS_P = K_INV_EPS,
  parameter int    NUM_W      = 48
) (
  input  logic     clk,
  input  logic     rst_n,
  input  sw_mode_e sat_mode,
  input  logic     in_valid,
  output logic     in_ready,
  input  sig_t     x3,
  input  sig_t     x4,
  input  sig_t     x5,
  input  sig_t     x5ref,
  output logic     out_valid,
  output v_t       v,
  output sig_t     s
);

  localparam int PW = COEF_W + SIG_W + 4;
  typedef logic signed [PW-1:0] prod_t;

  typedef enum logic [1:0] {ST_IDLE, ST_DER, ST_INT, ST_DIV} state_e;
  state_e state;

  sig_t x3_r, x4_r, x5_r, e_r;
  sig_t e_in;
  logic fire;

  sig_t de, dref, s_c, sw, isw;
  logic de_v, dref_v, isw_v;

  logic signed [NUM_W-1:0] num, q;
  logic div_start, div_busy, div_done;

  assign in_ready = (state == ST_IDLE);
  assign fire     = in_valid && in_ready;
  assign e_in     = sig_t'(sat_to(128'(x4) - 128'(x5ref), SIG_W));

  frac_op #(.SOS(DER_SOS), .GAIN(DER_GAIN), .DIRECT(DER_DIRECT)) u_der_e (
    .clk(clk), .rst_n(rst_n), .in_valid(fire), .x(e_in), .out_valid(de_v), .y(de));

  frac_op #(.SOS(DER_SOS), .GAIN(DER_GAIN), .DIRECT(DER_DIRECT)) u_der_ref (
    .clk(clk), .rst_n(rst_n), .in_valid(fire), .x(x5ref), .out_valid(dref_v), .y(dref));

  // Sliding variable S = e + c1 D^a e.
  assign s_c = sig_t'(sat_to(128'(e_r) + rshift_round(128'(prod_t'(K_C1_P) * prod_t'(de)), COEF_FL), SIG_W));

  switch_fn #(.INV_EPS(K_INV_EPS_P)) u_sw (.mode(sat_mode), .s(s_c), .y(sw));

  frac_op #(.SOS(INT_SOS), .GAIN(INT_GAIN), .DIRECT(INT_DIRECT)) u_int (
    .clk(clk), .rst_n(rst_n), .in_valid(state == ST_DER), .x(sw), .out_valid(isw_v), .y(isw));

  // Numerator of V, products in COEF_FL + SIG_FL fractional bits, result in
  // SIG_FL + V_FL so that the division by x5 (SIG_FL) leaves V_FL.
  always_comb begin
    logic signed [127:0] acc;
    acc = 128'(prod_t'(K_UW_P) * prod_t'(x4_r))
        - 128'(prod_t'(K_GAMMA_P) * prod_t'(x3_r))
        + (128'(dref) <<< COEF_FL)
        - 128'(prod_t'(K_INV_C1_P) * prod_t'(e_r))
        - 128'(prod_t'(K_KD_C1_P) * prod_t'(isw));
    num = (NUM_W)'(sat_to(rshift_round(acc, COEF_FL - V_FL), NUM_W));
  end

  assign div_start = (state == ST_INT);

  seq_div #(.NW(NUM_W), .DW(SIG_W)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .n(num), .d(x5_r),
    .busy(div_busy), .done(div_done), .q(q));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      x3_r      <= '0;
      x4_r      <= '0;
      x5_r      <= '0;
      e_r       <= '0;
      s         <= '0;
      v         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        ST_IDLE: if (fire) begin
          x3_r  <= x3;
          x4_r  <= x4;
          x5_r  <= x5;
          e_r   <= e_in;
          state <= ST_DER;
        end
        ST_DER: begin
          s     <= s_c;
          state <= ST_INT;
        end
        ST_INT: state <= ST_DIV;
        ST_DIV: if (div_done) begin
          v         <= v_t'(sat_to(128'(q), V_W));
          out_valid <= 1'b1;
          state     <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The operators are stepped in lock-step with the state machine.
  a_der_sync: assert property (@(posedge clk) disable iff (!rst_n) (state == ST_DER) |-> (de_v && dref_v));
  a_int_sync: assert property (@(posedge clk) disable iff (!rst_n) (state == ST_INT) |-> isw_v);
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

endmodule
