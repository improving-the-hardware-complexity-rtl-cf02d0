// fcfp_fil_top: FPGA side of the FPGA-in-the-loop test bench for the FCFP
// controller.
//
// The plant model runs on a host PC, which exchanges samples with the board
// over 100 Mbit/s Ethernet. On the board, the Ethernet PHY talks RMII (2-bit
// data at 50 MHz) to the RMII bridge, which assembles bytes for the
// FPGA-in-the-loop core (25 MHz byte clock); that core unpacks the plant
// states, steps the controller at 10 MHz and returns the control signal.
//
// This top holds the parts of that system that are specified: clock
// generation (100 MHz board clock to 50, 25 and 10 MHz), one reset
// synchronizer per clock domain, the RMII bridge and the FCFP controller. The
// FPGA-in-the-loop core is a vendor component whose packet protocol is not
// given, so its two faces are brought out as ports: the bridge's byte stream
// (RXD/RXCLK_EN towards it, TXD/TX_VALID/TXCLK_EN from it, all in the
// ETH_REFCLK domain) and the controller's sample interface (in the DUT_CLK
// domain). TXCLK and RXCLK are the 25 MHz byte clock that core runs on.
//
// Clock domains: ETH_REFCLK (bridge), DUT_CLK (controller); the two share no
// signals inside this top. Resets: rst_n from the board, synchronized into
// each domain.
module fcfp_fil_top
  import fcfp_pkg::*;
(
  input  logic       SYSCLK,        // 100 MHz board clock
  input  logic       RST_N,         // board reset, active low
  output logic       LOCKED,
  // Ethernet PHY, RMII
  input  logic       ETH_CRS,       // CRS_DV
  input  logic       ETH_RXER,
  input  logic [1:0] ETH_RXD,
  output logic       ETH_REFCLK,    // 50 MHz
  output logic       ETH_TXEN,
  output logic [1:0] ETH_TXD,
  // byte side of the bridge, towards the FPGA-in-the-loop core
  output logic       TXCLK,         // 25 MHz
  output logic       RXCLK,         // 25 MHz
  output logic [7:0] RXD,
  output logic       RXCLK_EN,
  output logic       RX_ERR,
  input  logic [7:0] TXD,
  input  logic       TX_VALID,
  output logic       TXCLK_EN,
  // controller sample interface, DUT_CLK domain
  output logic       DUT_CLK,       // 10 MHz
  input  sw_mode_e   SAT_MODE,
  input  logic       CTRL_IN_VALID,
  output logic       CTRL_IN_READY,
  input  sig_t       X3,
  input  sig_t       X4,
  input  sig_t       X5,
  input  sig_t       X5REF,
  output logic       CTRL_OUT_VALID,
  output v_t         V,
  output sig_t       S
);

  logic clk50, clk25, clk_dut;
  logic rst50_n, rstdut_n;

  clk_gen u_clk (
    .sysclk(SYSCLK), .rst_n(RST_N), .clk50(clk50), .clk25(clk25), .clk_dut(clk_dut), .locked(LOCKED));

  assign ETH_REFCLK = clk50;
  assign TXCLK      = clk25;
  assign RXCLK      = clk25;
  assign DUT_CLK    = clk_dut;

  rst_sync u_rst50  (.clk(clk50),   .arst_n(RST_N), .rst_n(rst50_n));
  rst_sync u_rstdut (.clk(clk_dut), .arst_n(RST_N), .rst_n(rstdut_n));

  rmii_bridge u_rmii (
    .clk(clk50), .rst_n(rst50_n),
    .eth_crs_dv(ETH_CRS), .eth_rxer(ETH_RXER), .eth_rxd(ETH_RXD),
    .eth_txen(ETH_TXEN), .eth_txd(ETH_TXD),
    .rx_data(RXD), .rx_en(RXCLK_EN), .rx_err(RX_ERR),
    .tx_data(TXD), .tx_valid(TX_VALID), .tx_ready(TXCLK_EN));

  fcfp_ctrl u_ctrl (
    .clk(clk_dut), .rst_n(rstdut_n), .sat_mode(SAT_MODE),
    .in_valid(CTRL_IN_VALID), .in_ready(CTRL_IN_READY),
    .x3(X3), .x4(X4), .x5(X5), .x5ref(X5REF),
    .out_valid(CTRL_OUT_VALID), .v(V), .s(S));

endmodule
