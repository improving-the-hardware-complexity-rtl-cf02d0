// tb_fcfp_ctrl: runs the controller through 400 control steps along a
// trajectory shaped like the closed-loop response (x4 rising from 200 towards
// a reference ramp starting at 1000, x3 decaying), first with the signum
// switching function and then with the saturation function, and compares V
// and S of every step with the bit-exact model. It also checks the latency of
// NUM_W + 4 = 52 clocks from accepted step to out_valid, that in_ready stays
// low meanwhile and that an in_valid raised while busy is ignored, and that
// both signs of S and, in saturation mode, the linear band |S| < eps occur.
module tb_fcfp_ctrl;
  import fcfp_pkg::*;
  import fcfp_model_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  sw_mode_e mode = SW_SGN;
  sig_t x3, x4, x5, x5ref, s;
  v_t v;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_band = 0, n_ignored = 0;
  ctrl_model m;

  fcfp_ctrl dut (.clk(clk), .rst_n(rst_n), .sat_mode(mode), .in_valid(in_valid), .in_ready(in_ready),
                 .x3(x3), .x4(x4), .x5(x5), .x5ref(x5ref), .out_valid(out_valid), .v(v), .s(s));

  always #50 clk = ~clk;

  initial begin
    #10ms;
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

  initial begin
    v_t ev;
    sig_t es;
    real t;
    int lat;
    x3 = '0; x4 = '0; x5 = 22'sd256; x5ref = '0;
    m = new();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      t = n * 0.05;
      if (n == 200) mode = SW_SAT;
      @(negedge clk);
      x4    = to_sig(1000.0 + 5.4 * t - 800.0 * $exp(-t / 4.0) + 3.0 * $sin(7.0 * t));
      x5ref = to_sig(1000.0 + 5.4 * t);
      x5    = to_sig(1000.0 + 5.4 * t + 2.0 * $sin(t));
      x3    = to_sig(60.0 * $exp(-t / 3.0));
      chk(in_ready, "ready when idle");
      in_valid = 1;
      m.step(mode, x3, x4, x5, x5ref, ev, es);
      @(negedge clk);
      in_valid = 0;
      lat = 0;
      while (!out_valid && lat < 200) begin
        if (lat == 4) begin
          // A request while busy must be ignored.
          chk(!in_ready, "not ready while busy");
          in_valid = 1; x4 = 22'sd12345;
          n_ignored++;
        end
        if (lat == 6) in_valid = 0;
        @(negedge clk);
        lat++;
      end
      chk(lat == 52, $sformatf("latency %0d", lat));
      chk(v == ev, $sformatf("step %0d V got %0d exp %0d", n, v, ev));
      chk(s == es, $sformatf("step %0d S got %0d exp %0d", n, s, es));
      if (s > 0) n_pos++;
      if (s < 0) n_neg++;
      if (mode == SW_SAT && s > -128 && s < 128) n_band++;
    end
    $display("S>0 %0d  S<0 %0d  in band %0d  ignored %0d", n_pos, n_neg, n_band, n_ignored);
    chk(n_pos > 0 && n_neg > 0, "both signs of S");
    chk(n_band > 0, "saturation linear band reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
