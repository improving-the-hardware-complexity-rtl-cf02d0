// tb_switch_fn: checks the switching function in both modes against values
// worked out by hand: sgn gives +1/0/-1 (256/0/-256 in sig_t), sat(S/0.5)
// gives 2S clamped to [-1, 1]; plus 500 random inputs against real-valued
// arithmetic.
module tb_switch_fn;
  import fcfp_pkg::*;

  sw_mode_e mode;
  sig_t s, y;
  int checks = 0, failures = 0;
  int exp_y;
  real r;

  switch_fn dut (.mode(mode), .s(s), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(sw_mode_e m, int sv, int ev);
    mode = m; s = sig_t'(sv);
    #1;
    checks++;
    if (int'(y) != ev) begin
      failures++;
      $display("FAIL mode=%0d s=%0d y=%0d exp=%0d", m, sv, y, ev);
    end
  endtask

  initial begin
    chk(SW_SGN, 0, 0);
    chk(SW_SGN, 1, 256);
    chk(SW_SGN, -1, -256);
    chk(SW_SGN, 2000000, 256);
    chk(SW_SGN, -2097152, -256);
    chk(SW_SAT, 0, 0);
    chk(SW_SAT, 64, 128);      // S = 0.25 -> 0.5
    chk(SW_SAT, -100, -200);   // S = -0.39 -> -0.78
    chk(SW_SAT, 128, 256);     // S = eps -> 1
    chk(SW_SAT, 129, 256);     // beyond eps, clamped
    chk(SW_SAT, -5000, -256);
    for (int i = 0; i < 500; i++) begin
      int sv;
      sv = int'($urandom_range(0, 1200)) - 600;
      r = 2.0 * sv;
      if (r > 256.0) r = 256.0;
      if (r < -256.0) r = -256.0;
      exp_y = $rtoi(r);
      chk(SW_SAT, sv, exp_y);
      chk(SW_SGN, sv, sv > 0 ? 256 : sv < 0 ? -256 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
