// tb_clk_gen: measures the periods and high times of the three generated
// clocks against a 100 MHz input: 20 ns (50 MHz), 40 ns (25 MHz) and 100 ns
// (10 MHz), each with 50 % duty cycle, and checks locked after reset.
module tb_clk_gen;
  logic sysclk = 0, rst_n = 0;
  logic clk50, clk25, clk_dut, locked;
  int checks = 0, failures = 0;

  clk_gen dut (.sysclk(sysclk), .rst_n(rst_n), .clk50(clk50), .clk25(clk25), .clk_dut(clk_dut), .locked(locked));

  always #5 sysclk = ~sysclk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int which, input realtime per, input realtime hi);
    realtime t0, t1, t2;
    for (int k = 0; k < 5; k++) begin
      case (which)
        0: begin @(posedge clk50);   t0 = $realtime; @(negedge clk50);   t1 = $realtime; @(posedge clk50);   t2 = $realtime; end
        1: begin @(posedge clk25);   t0 = $realtime; @(negedge clk25);   t1 = $realtime; @(posedge clk25);   t2 = $realtime; end
        default: begin @(posedge clk_dut); t0 = $realtime; @(negedge clk_dut); t1 = $realtime; @(posedge clk_dut); t2 = $realtime; end
      endcase
      checks++;
      if ((t2 - t0 - per) > 0.01 || (per - (t2 - t0)) > 0.01 || (t1 - t0 - hi) > 0.01 || (hi - (t1 - t0)) > 0.01) begin
        failures++;
        $display("FAIL clock %0d period %0t high %0t", which, t2 - t0, t1 - t0);
      end
    end
  endtask

  initial begin
    repeat (4) @(posedge sysclk);
    checks++;
    if (locked) begin failures++; $display("FAIL locked during reset"); end
    rst_n = 1;
    repeat (2) @(posedge sysclk);
    #1;
    checks++;
    if (!locked) begin failures++; $display("FAIL not locked"); end
    measure(0, 20ns, 10ns);
    measure(1, 40ns, 20ns);
    measure(2, 100ns, 50ns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
