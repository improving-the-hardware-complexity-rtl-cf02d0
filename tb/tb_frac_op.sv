// tb_frac_op: checks the fractional operator in both configurations.
//  1. Integrator (alpha = -0.99, Table 1 coefficients), input sin(t) sampled
//     at T = 0.01 for t in [0, 10): every output against the bit-exact model;
//     the response against the continuous-time expectation, which follows
//     1 - cos(t) (peak about 1.93 near t = 3.03, 0.344 at t = 9.99 for this
//     band-limited approximation, computed independently in floating point);
//     the one-cycle latency of out_valid.
//  2. Differentiator (alpha = +0.99), input 100 sin(t): bit-exact model, and
//     the output at t = 9.99 close to 100 cos(t) (-85.2 for the unquantized
//     approximation, -83.8 with 24-bit coefficient fractions).
//  3. Saturation: a constant 8000 into the integrator drives the output to
//     the largest sig_t value.
module tb_frac_op;
  import fcfp_pkg::*;
  import fcfp_model_pkg::*;

  logic clk = 0, rst_n = 0, vi = 0, vi_d = 0;
  sig_t xi, xd, yi, yd;
  logic ovi, ovd;
  int checks = 0, failures = 0;
  real peak, tpeak, yr;
  frac_model mi, md;
  sig_t ei, ed;

  frac_op dut_i (.clk(clk), .rst_n(rst_n), .in_valid(vi), .x(xi), .out_valid(ovi), .y(yi));
  frac_op #(.SOS(DER_SOS), .GAIN(DER_GAIN), .DIRECT(DER_DIRECT))
    dut_d (.clk(clk), .rst_n(rst_n), .in_valid(vi), .x(xd), .out_valid(ovd), .y(yd));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    mi = new(INT_SOS, INT_GAIN, INT_DIRECT);
    md = new(DER_SOS, DER_GAIN, DER_DIRECT);
    xi = '0; xd = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    peak = -1.0; tpeak = 0.0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      xi = sig_t'($rtoi($floor($sin(n * 0.01) * 256.0 + 0.5)));
      xd = sig_t'($rtoi($floor($sin(n * 0.01) * 25600.0 + 0.5)));
      vi = 1;
      ei = mi.step(xi);
      ed = md.step(xd);
      @(negedge clk);
      vi = 0;
      chk(ovi && ovd, "out_valid one cycle after in_valid");
      chk(yi == ei, $sformatf("integrator n=%0d got %0d exp %0d", n, yi, ei));
      chk(yd == ed, $sformatf("differentiator n=%0d got %0d exp %0d", n, yd, ed));
      yr = real'(yi) / 256.0;
      if (yr > peak) begin peak = yr; tpeak = n * 0.01; end
      if (n == 999) begin
        $display("end values at t=9.99: integrator %f differentiator %f", yr, real'(yd) / 256.0);
        chk(yr > 0.31 && yr < 0.38, $sformatf("integrator end value %f", yr));
        chk(real'(yd) / 256.0 > -87.0 && real'(yd) / 256.0 < -81.0, $sformatf("differentiator end %f", real'(yd) / 256.0));
      end
      @(negedge clk);
      chk(!ovi, "out_valid is a single pulse");
    end
    $display("integrator peak %f at t=%f", peak, tpeak);
    chk(peak > 1.88 && peak < 1.98, "integrator peak near 1.93");
    chk(tpeak > 2.9 && tpeak < 3.2, "integrator peak near t=3.03");
    // Saturation.
    for (int n = 0; n < 600; n++) begin
      @(negedge clk); xi = sig_t'(8000 * 256); vi = 1;
      @(negedge clk); vi = 0;
    end
    chk(yi == sig_t'({1'b0, {(SIG_W-1){1'b1}}}), $sformatf("integrator saturates, got %0d", yi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
