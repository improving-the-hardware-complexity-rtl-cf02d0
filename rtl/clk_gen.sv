// clk_gen: clock generation for the controller board. From the 100 MHz board
// clock it derives the 50 MHz RMII reference clock (ETH_REFCLK), the 25 MHz
// byte clock of the bridge and FPGA-in-the-loop core (TXCLK, RXCLK) and the
// 10 MHz clock of the controller (DUT_CLK).
//
// The frequencies are the document's; on the FPGA they come from a mixed-mode
// clock manager (MMCM). Here they are made with counters: clk50 toggles every
// input cycle, clk25 every second, clk10 every fifth, giving 50 % duty cycle
// on each. All outputs are registers on sysclk, so they rise together at
// every 100 ns. Like the clock manager they stand in for, the dividers run
// during reset (so that the reset synchronizers of the derived domains see
// clock edges); they start from their power-up values. Active-low
// asynchronous reset only clears locked, which goes high in the first cycle
// after reset, as the clock manager's lock output would.
module clk_gen #(
  parameter int DIV_DUT = 10  // sysclk cycles per DUT_CLK period, even
) (
  input  logic sysclk,
  input  logic rst_n,
  output logic clk50,
  output logic clk25,
  output logic clk_dut,
  output logic locked
);

  localparam int HALF = DIV_DUT / 2;
  localparam int CW = $clog2(HALF + 1);

  logic [CW-1:0] dut_cnt = '0;
  logic c50 = 1'b0, c25 = 1'b0, cdut = 1'b0;

  assign clk50   = c50;
  assign clk25   = c25;
  assign clk_dut = cdut;

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) locked <= 1'b0;
    else        locked <= 1'b1;
  end

  always_ff @(posedge sysclk) begin
    c50 <= ~c50;
    if (c50) c25 <= ~c25;
    if (dut_cnt == CW'(HALF - 1)) begin
      dut_cnt <= '0;
      cdut    <= ~cdut;
    end else begin
      dut_cnt <= dut_cnt + 1'b1;
    end
  end

endmodule
