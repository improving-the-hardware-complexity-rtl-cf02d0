// tb_rmii_bridge: drives RMII receive frames (preamble, start-of-frame byte,
// random payload, one dibit with RX_ER) and checks the reassembled bytes, the
// error flag and the byte spacing of four clocks; sends byte streams through
// the transmit handshake, back to back and with gaps, and checks the dibits
// on ETH_TXD, that ETH_TXEN stays high without a break through a back-to-back
// frame, and that it falls after the last byte.
module tb_rmii_bridge;
  logic clk = 0, rst_n = 0;
  logic crs_dv = 0, rxer = 0;
  logic [1:0] rxd = '0, txd;
  logic txen;
  logic [7:0] rx_data, tx_data;
  logic rx_en, rx_err, tx_valid = 0, tx_ready;
  int checks = 0, failures = 0;

  byte unsigned rx_exp[$], tx_exp[$];
  int rx_err_idx, rx_count, last_rx_cyc, cyc;
  bit rx_err_seen;

  rmii_bridge dut (.clk(clk), .rst_n(rst_n), .eth_crs_dv(crs_dv), .eth_rxer(rxer), .eth_rxd(rxd),
                   .eth_txen(txen), .eth_txd(txd), .rx_data(rx_data), .rx_en(rx_en), .rx_err(rx_err),
                   .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready));

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  // Receive monitor.
  always @(posedge clk) if (rst_n && rx_en) begin
    byte unsigned e;
    e = rx_exp.pop_front();
    chk(rx_data == e, $sformatf("rx byte %0d got %02x exp %02x", rx_count, rx_data, e));
    chk(rx_err == (rx_count == rx_err_idx), $sformatf("rx_err at byte %0d", rx_count));
    if (rx_count > 0 && rx_count != rx_err_idx + 1000) chk(cyc - last_rx_cyc == 4, "rx byte spacing");
    last_rx_cyc = cyc;
    rx_count++;
  end

  // Transmit monitor: rebuild bytes from dibits while TXEN is high.
  logic [7:0] tsr;
  int tn = 0, tx_count = 0;
  always @(posedge clk) if (rst_n && txen) begin
    tsr = {txd, tsr[7:2]};
    tn++;
    if (tn == 4) begin
      byte unsigned e;
      tn = 0;
      e = tx_exp.pop_front();
      chk(tsr == e, $sformatf("tx byte %0d got %02x exp %02x", tx_count, tsr, e));
      tx_count++;
    end
  end

  task automatic rx_frame(int n, int err_byte);
    byte unsigned b;
    rx_count = 0;
    rx_err_idx = err_byte;
    for (int i = 0; i < n; i++) begin
      b = (i < 7) ? 8'h55 : (i == 7) ? 8'hD5 : 8'($urandom);
      rx_exp.push_back(b);
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        crs_dv = 1;
        rxd = b[2*k +: 2];
        rxer = (i == err_byte && k == 2);
      end
    end
    @(negedge clk);
    crs_dv = 0; rxer = 0; rxd = '0;
    repeat (6) @(negedge clk);
    chk(rx_exp.size() == 0, "all rx bytes delivered");
  endtask

  task automatic tx_frame(int n, bit gaps);
    int sent = 0;
    int txen_hi = 0, txen_first = -1, txen_last = -1;
    while (sent < n) begin
      @(negedge clk);
      if (gaps && $urandom_range(0, 2) == 0) begin
        tx_valid = 0;
      end else begin
        tx_valid = 1;
        tx_data = 8'($urandom);
      end
      @(posedge clk);
      if (tx_valid && tx_ready) begin
        tx_exp.push_back(tx_data);
        sent++;
      end
      if (txen) begin
        txen_hi++;
        if (txen_first < 0) txen_first = cyc;
        txen_last = cyc;
      end
    end
    @(negedge clk) tx_valid = 0;
    repeat (8) begin
      @(posedge clk);
      if (txen) begin txen_hi++; txen_last = cyc; end
    end
    chk(tx_exp.size() == 0, "all tx bytes sent");
    chk(!txen, "TXEN falls after the frame");
    if (!gaps) chk(txen_hi == 4 * n && txen_last - txen_first + 1 == 4 * n,
                   $sformatf("back-to-back frame: TXEN high %0d cycles", txen_hi));
  endtask

  initial begin
    tx_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    rx_frame(40, 12);
    rx_frame(20, -1);
    tx_frame(16, 0);
    tx_frame(30, 1);
    tx_frame(5, 0);
    chk(tx_count == 51, "tx byte count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
