// tb_fcfp_closed_loop: closes the loop between the FCFP controller and a
// floating-point model of the fractional-order plant,
//
//   D^a x1 = -u x1 + w x4 - phi + v x5 - x5 V
//   D^a x2 = phi - (u + sigma) x2
//   D^a x3 = -(u + gamma) x3 + sigma x2
//   D^a x4 = -(u + w) x4 + gamma x3 + x5 V,   phi = beta x1 x3 / x5,
//
// with a = 0.99 (Caputo sense), integrated by the Grunwald-Letnikov scheme
// applied to the deviation from the initial state at the
// controller's sample time T = 0.01 day for 50 days (5000 control steps).
// Initial state x = (400, 190, 210, 200), x5 = 1000; the reference is the
// natural growth of the total, x5ref = 1000 exp((v - u) t). The run is made
// with the nominal plant parameters and again with every rate perturbed by its
// uncertainty, both with the signum switching function, and once more with
// the nominal parameters and the saturation function sat(S/eps). Checks, per
// run, from day 25 on: x4 within a tolerance of x5ref (1 % nominal, 2 %
// perturbed: the small switching gain kd = 0.01 leaves about 1 % tracking
// error under the perturbation); x2 and x3 below
// 1 % of x5; x1 within the same tolerance of the gap x5 - x5ref (the
// plant's total follows its own fractional growth, which drifts from the
// exponential reference, and with x4 held on the reference that gap ends up
// in x1). V in steady state (days 30 to 50) within 0.015 of
// (u + w) + (v - u), the value at which x4 = x5 grows with the total
// (0.092 for the nominal rates).
module tb_fcfp_closed_loop;
  import fcfp_pkg::*;

  localparam int    NSTEP = 5000;
  localparam real   H     = 0.01;
  localparam real   ALPHA = 0.99;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  sig_t x3s, x4s, x5s, x5refs, s;
  v_t vq;
  sw_mode_e mode = SW_SGN;
  int checks = 0, failures = 0;

  fcfp_ctrl dut (.clk(clk), .rst_n(rst_n), .sat_mode(mode), .in_valid(in_valid), .in_ready(in_ready),
                 .x3(x3s), .x4(x4s), .x5(x5s), .x5ref(x5refs), .out_valid(out_valid), .v(vq), .s(s));

  always #50 clk = ~clk;

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic sig_t to_sig(real r);
    return sig_t'($rtoi($floor(r * 256.0 + 0.5)));
  endfunction

  real cgl[NSTEP+1];
  real xs[4][NSTEP+1];

  task automatic run(string name, sw_mode_e m, real tol, real u, real w, real v, real gam, real sig, real beta);
    real x5, x5ref, vv, vprev, dv, phi, f[4], hist, t, vsum, vmin, vmax, vstep;
    real un = 1.0 / 255.0, vn = 1.0 / 115.0;
    int nv;
    bit conv_ok;
    mode = m;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    xs[0][0] = 400.0; xs[1][0] = 190.0; xs[2][0] = 210.0; xs[3][0] = 200.0;
    conv_ok = 1; vsum = 0.0; nv = 0; vmin = 1.0e9; vmax = -1.0e9; vstep = 0.0; vprev = 0.0;
    for (int k = 1; k <= NSTEP; k++) begin
      t = (k - 1) * H;
      x5 = xs[0][k-1] + xs[1][k-1] + xs[2][k-1] + xs[3][k-1];
      x5ref = 1000.0 * $exp((vn - un) * t);
      // one control step
      @(negedge clk);
      x3s = to_sig(xs[2][k-1]); x4s = to_sig(xs[3][k-1]); x5s = to_sig(x5); x5refs = to_sig(x5ref);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      while (!out_valid) @(negedge clk);
      vv = real'(vq) / 262144.0;
      // plant step
      phi  = beta * xs[0][k-1] * xs[2][k-1] / x5;
      f[0] = -u * xs[0][k-1] + w * xs[3][k-1] - phi + v * x5 - x5 * vv;
      f[1] = phi - (u + sig) * xs[1][k-1];
      f[2] = -(u + gam) * xs[2][k-1] + sig * xs[1][k-1];
      f[3] = -(u + w) * xs[3][k-1] + gam * xs[2][k-1] + x5 * vv;
      for (int i = 0; i < 4; i++) begin
        hist = 0.0;
        for (int j = 1; j <= k; j++) hist += cgl[j] * (xs[i][k-j] - xs[i][0]);
        xs[i][k] = xs[i][0] + f[i] * (H ** ALPHA) - hist;
      end
      if (t >= 25.0) begin
        bit was_ok;
        was_ok = conv_ok;
        if ((xs[3][k-1] - x5ref) > tol * x5ref || (x5ref - xs[3][k-1]) > tol * x5ref) conv_ok = 0;
        for (int i = 1; i < 3; i++) if (xs[i][k-1] > 0.01 * x5 || xs[i][k-1] < -0.01 * x5) conv_ok = 0;
        if ((xs[0][k-1] - (x5 - x5ref)) > tol * x5 || ((x5 - x5ref) - xs[0][k-1]) > tol * x5) conv_ok = 0;
        if (was_ok && !conv_ok)
          $display("%s: not converged at t=%5.2f x1=%f x2=%f x3=%f x4=%f x5=%f x5ref=%f",
                   name, t, xs[0][k-1], xs[1][k-1], xs[2][k-1], xs[3][k-1], x5, x5ref);
      end
      if (t >= 30.0) begin
        vsum += vv; nv++;
        if (vv < vmin) vmin = vv;
        if (vv > vmax) vmax = vv;
        dv = vv - vprev;
        if (dv < 0.0) dv = -dv;
        if (dv > vstep) vstep = dv;
      end
      vprev = vv;
      if (k % 500 == 1)
        $display("%s t=%5.1f x1=%7.2f x2=%7.2f x3=%7.2f x4=%8.2f x5=%8.2f x5ref=%8.2f V=%8.5f",
                 name, t, xs[0][k-1], xs[1][k-1], xs[2][k-1], xs[3][k-1], x5, x5ref, vv);
    end
    $display("%s steady V mean %f min %f max %f largest step-to-step change %f",
             name, vsum / nv, vmin, vmax, vstep);
    chk(conv_ok, {name, ": states converged by day 25"});
    chk(vmin > (u + w) + (v - u) - 0.015 && vmax < (u + w) + (v - u) + 0.015,
        $sformatf("%s: steady-state V near %f", name, (u + w) + (v - u)));
  endtask

  initial begin
    x3s = '0; x4s = '0; x5s = 22'sd256; x5refs = '0;
    cgl[0] = 1.0;
    for (int j = 1; j <= NSTEP; j++) cgl[j] = (1.0 - (1.0 + ALPHA) / j) * cgl[j-1];
    run("nominal",   SW_SGN, 0.01, 1.0 / 255.0, 1.0 / 12.0, 1.0 / 115.0, 1.0 / 1.2, 1.0 / 1.2, 1.66);
    run("perturbed", SW_SGN, 0.02, 1.0 / 275.0, 1.0 / 14.5, 1.0 / 130.0, 1.0 / 2.2, 1.0 / 2.2, 1.66);
    run("nominal-sat", SW_SAT, 0.01, 1.0 / 255.0, 1.0 / 12.0, 1.0 / 115.0, 1.0 / 1.2, 1.0 / 1.2, 1.66);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
