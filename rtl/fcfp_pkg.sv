// fcfp_pkg: number formats, coefficient sets and arithmetic helpers shared by
// the reduced-dynamics fractional sliding-mode controller (FCFP) datapath.
//
// Number formats (two's complement, fixed point):
//   sig_t   22 bits, 8 fractional bits. Plant states x3, x4, x5, the reference
//           x5ref and every operator input/output. The 22-bit word length is
//           the one the FCFP controller is built with; the split into 13
//           integer and 8 fractional bits is this design's choice, made so that
//           populations up to about 8000 fit (the states run from 200 to 1300).
//   coef_t  36 bits, 24 fractional bits. Filter and controller constants.
//           The biquad coefficients all lie in (-2, 2). 24 fractional bits
//           are needed by the differentiator, whose nearly cancelling
//           pole/zero pairs near z = 1 set its low-frequency gain (with 20
//           bits its response to a slow sine is wrong by a factor of six);
//           its input gain (about -293) and direct term (about 168) need the
//           integer bits.
//   acc_t   48 bits, 24 fractional bits. Values passed between the cascaded
//           second-order sections and held in their delay lines. The wide
//           internal word is this design's choice: the differentiator's
//           intermediate signals reach about 6e5 for a step of 1000.
//   v_t     22 bits, 18 fractional bits. The control signal V(t).
//
// Coefficient sets:
//   INT_SOS / INT_GAIN / INT_DIRECT: the fractional integrator D^-0.99 of
//     Table 1 (Oustaloup band [0.001, 1500] rad/s, order 2, Tustin, T = 0.01),
//     written as direct term Q = 0.0060 plus gain 0.010427 times three
//     sections. Each constant is round(value * 2^24).
//   DER_SOS / DER_GAIN / DER_DIRECT: the differentiator D^+0.99 over the same
//     band. Its coefficients are not tabulated with the integrator; they are
//     derived here the same way from the reciprocal of the same Oustaloup
//     transfer function (numerator and denominator exchanged), Tustin with
//     T = 0.01, then split into direct term plus proper part and factored into
//     sections.
package fcfp_pkg;

  localparam int SIG_W  = 22;
  localparam int SIG_FL = 8;
  localparam int COEF_W  = 36;
  localparam int COEF_FL = 24;
  localparam int ACC_W  = 48;
  localparam int ACC_FL = 24;
  localparam int V_W  = 22;
  localparam int V_FL = 18;

  typedef logic signed [SIG_W-1:0]  sig_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [V_W-1:0]    v_t;

  // One second-order section, a0 = 1:
  //   y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2]
  typedef struct packed {
    coef_t b0;
    coef_t b1;
    coef_t b2;
    coef_t a1;
    coef_t a2;
  } sos_coef_t;

  localparam int NSEC = 3;
  typedef sos_coef_t [NSEC-1:0] sos_set_t;

  // Switching function used in the discontinuous control term.
  typedef enum logic {SW_SGN = 1'b0, SW_SAT = 1'b1} sw_mode_e;

  // Table 1, fractional integrator alpha = -0.99 (index 0 is section 1).
  localparam sos_set_t INT_SOS = '{
    '{b0: 36'sd16777216, b1: -36'sd33502423, b2: 36'sd16725542, a1: -36'sd33551077, a2: 36'sd16774196},  // Sos3
    '{b0: 36'sd16777216, b1: -36'sd22572066, b2: 36'sd6290785, a1: -36'sd32661884, a2: 36'sd15887017},  // Sos2
    '{b0: 36'sd0, b1: 36'sd16777216, b2: 36'sd0, a1: -36'sd6483220, a2: 36'sd0}  // Sos1
  };
  localparam coef_t INT_GAIN   = 36'sd174936;  // 0.010427
  localparam coef_t INT_DIRECT = 36'sd100663;   // 0.0060

  // Differentiator alpha = +0.99, same band and sample time (derived).
  localparam sos_set_t DER_SOS = '{
    '{b0: 36'sd16777216, b1: -36'sd33502784, b2: 36'sd16725576, a1: -36'sd33502786, a2: 36'sd16725578},
    '{b0: 36'sd16777216, b1: -36'sd22571257, b2: 36'sd6290736, a1: -36'sd3178587, a2: -36'sd12155304},
    '{b0: 36'sd0, b1: 36'sd16777216, b2: 36'sd0, a1: -36'sd6682328, a2: 36'sd0}
  };
  localparam coef_t DER_GAIN   = -36'sd4918351458;  // -293.157
  localparam coef_t DER_DIRECT = 36'sd2813123842;   //  167.675

  // Controller constants, Tables 4 and 5 (FCFP column), times 2^24.
  localparam coef_t K_UW     = 36'sd1463894;    // u + w = 1/255 + 1/12
  localparam coef_t K_GAMMA  = 36'sd13981013;   // gamma = 1/1.2
  localparam coef_t K_C1     = 36'sd8388608;   // c1 = 0.5
  localparam coef_t K_INV_C1 = 36'sd33554432;  // 1/c1 = 2
  localparam coef_t K_KD_C1  = 36'sd335544;    // kd/c1 = 0.01/0.5
  localparam coef_t K_INV_EPS = 36'sd33554432; // 1/epsilon = 1/0.5

  // Arithmetic right shift by sh with round-half-up.
  function automatic logic signed [127:0] rshift_round(input logic signed [127:0] v, input int sh);
    logic signed [127:0] r;
    if (sh <= 0) return v <<< (-sh);
    r = v + (128'sd1 <<< (sh - 1));
    return r >>> sh;
  endfunction

  // Saturate a wide value to a signed word of width w.
  function automatic logic signed [127:0] sat_to(input logic signed [127:0] v, input int w);
    logic signed [127:0] hi, lo;
    hi = (128'sd1 <<< (w - 1)) - 1;
    lo = -(128'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
