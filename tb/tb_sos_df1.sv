// tb_sos_df1: checks one direct form I section (Sos2 of the integrator) against
// the difference equation evaluated in 128-bit integers, for 400 random
// samples with random gaps in en, then checks that reset clears the delay
// lines (zero input gives zero output).
module tb_sos_df1;
  import fcfp_pkg::*;

  localparam sos_coef_t C = INT_SOS[1];

  logic clk = 0, rst_n = 0, en = 0;
  acc_t x, y;
  int checks = 0, failures = 0;
  logic signed [127:0] xd1, xd2, yd1, yd2, exp_y, sum;

  sos_df1 #(.COEF(C)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    xd1 = 0; xd2 = 0; yd1 = 0; yd2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      x  = acc_t'($signed($urandom_range(0, 2000000)) - 1000000) <<< 8;
      en = ($urandom_range(0, 3) != 0);
      #1;
      sum = 128'(C.b0) * 128'(x) + 128'(C.b1) * xd1 + 128'(C.b2) * xd2
          - 128'(C.a1) * yd1 - 128'(C.a2) * yd2;
      exp_y = (sum + (128'sd1 <<< (COEF_FL - 1))) >>> COEF_FL;
      if (exp_y > (128'sd1 <<< 47) - 1) exp_y = (128'sd1 <<< 47) - 1;
      if (exp_y < -(128'sd1 <<< 47))    exp_y = -(128'sd1 <<< 47);
      checks++;
      if (128'(y) != exp_y) begin
        failures++;
        if (failures < 5) $display("mismatch n=%0d y=%0d exp=%0d", n, y, exp_y);
      end
      if (en) begin
        xd2 = xd1; xd1 = 128'(x);
        yd2 = yd1; yd1 = exp_y;
      end
    end
    // Reset clears the delay lines.
    @(negedge clk); rst_n = 0; en = 0;
    @(negedge clk); rst_n = 1; x = '0;
    #1;
    checks++;
    if (y != '0) begin failures++; $display("state not cleared by reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
