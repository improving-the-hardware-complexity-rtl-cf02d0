// rmii_bridge: RMII bridge between the Ethernet PHY (2-bit data at the 50 MHz
// reference clock) and the byte-wide stream of the FPGA-in-the-loop core.
//
// Receive: while ETH_CRS (RMII CRS_DV) is high, ETH_RXD dibits are shifted in
// least significant dibit first; every fourth dibit completes a byte, which is
// presented on rx_data with a one-cycle rx_en strobe (RXCLK_EN). Byte
// alignment restarts when CRS_DV rises. rx_err is set with a byte if ETH_RXER
// was high during any of its dibits. Preamble and start-of-frame bytes are
// passed through unchanged; framing belongs to the byte-side consumer.
//
// Transmit: a valid/ready handshake on tx_data. A byte is taken in a cycle with
// tx_valid = 1 and tx_ready = 1 (TXCLK_EN); it is sent as four dibits, least
// significant first, with ETH_TXEN high. A byte offered while the last dibit
// of the previous one goes out follows it back to back, so a frame is sent
// without gaps for as long as tx_valid stays high; ETH_TXEN falls after the
// last byte.
//
// Timing: everything runs on clk, the 50 MHz RMII reference clock. A byte
// every four cycles gives the 12.5 Mbyte/s of 100 Mbit/s Ethernet. The
// document names the bridge, its pins and its clocks; the dibit order is
// that of the RMII standard, and the handshake is this design's choice.
module rmii_bridge (
  input  logic       clk,
  input  logic       rst_n,
  // PHY side
  input  logic       eth_crs_dv,
  input  logic       eth_rxer,
  input  logic [1:0] eth_rxd,
  output logic       eth_txen,
  output logic [1:0] eth_txd,
  // byte side
  output logic [7:0] rx_data,
  output logic       rx_en,
  output logic       rx_err,
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready
);

  logic [5:0] rx_sr;
  logic [1:0] rx_cnt;
  logic       rx_err_acc;
  logic [5:0] tx_sr;
  logic [1:0] tx_cnt;
  logic       tx_active;

  // Receive path.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_sr      <= '0;
      rx_cnt     <= '0;
      rx_err_acc <= 1'b0;
      rx_data    <= '0;
      rx_en      <= 1'b0;
      rx_err     <= 1'b0;
    end else begin
      rx_en <= 1'b0;
      if (eth_crs_dv) begin
        rx_sr  <= {eth_rxd, rx_sr[5:2]};
        rx_cnt <= rx_cnt + 2'd1;
        if (rx_cnt == 2'd3) begin
          rx_data    <= {eth_rxd, rx_sr};
          rx_en      <= 1'b1;
          rx_err     <= rx_err_acc | eth_rxer;
          rx_err_acc <= 1'b0;
        end else begin
          rx_err_acc <= rx_err_acc | eth_rxer;
        end
      end else begin
        rx_cnt     <= '0;
        rx_err_acc <= 1'b0;
      end
    end
  end

  // Transmit path.
  assign tx_ready = !tx_active || (tx_cnt == 2'd3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_sr     <= '0;
      tx_cnt    <= '0;
      tx_active <= 1'b0;
      eth_txen  <= 1'b0;
      eth_txd   <= '0;
    end else if (tx_ready) begin
      if (tx_valid) begin
        eth_txen  <= 1'b1;
        eth_txd   <= tx_data[1:0];
        tx_sr     <= tx_data[7:2];
        tx_cnt    <= '0;
        tx_active <= 1'b1;
      end else begin
        eth_txen  <= 1'b0;
        eth_txd   <= '0;
        tx_active <= 1'b0;
      end
    end else begin
      eth_txd <= tx_sr[1:0];
      tx_sr   <= {2'b00, tx_sr[5:2]};
      tx_cnt  <= tx_cnt + 2'd1;
    end
  end

endmodule
