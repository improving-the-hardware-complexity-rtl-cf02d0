// tb_fcfp_fil_top: end-to-end test of the board-side design at its default
// sizes. From a 100 MHz board clock it
//  - checks the generated 50 MHz RMII clock and 10 MHz controller clock;
//  - sends RMII receive frames (with one RX_ER byte) and checks the bytes and
//    error flag delivered towards the FPGA-in-the-loop core;
//  - sends transmit byte streams, back to back and with gaps, and checks the
//    dibits on ETH_TXD and ETH_TXEN;
//  - runs 300 controller steps (signum, then saturation switching function,
//    including a first step whose reference jump saturates the
//    differentiators and one step with x5 = 0) and compares V and S with the
//    bit-exact model, with the 52-clock latency;
// and counts each mechanism, failing if one never happened.
module tb_fcfp_fil_top;
  import fcfp_pkg::*;
  import fcfp_model_pkg::*;

  logic SYSCLK = 0, RST_N = 0, LOCKED;
  logic ETH_CRS = 0, ETH_RXER = 0, ETH_REFCLK, ETH_TXEN;
  logic [1:0] ETH_RXD = '0, ETH_TXD;
  logic TXCLK, RXCLK, RXCLK_EN, RX_ERR, TX_VALID = 0, TXCLK_EN, DUT_CLK;
  logic [7:0] RXD, TXD = '0;
  sw_mode_e SAT_MODE = SW_SGN;
  logic CTRL_IN_VALID = 0, CTRL_IN_READY, CTRL_OUT_VALID;
  sig_t X3 = '0, X4 = '0, X5 = 22'sd256, X5REF = '0, S;
  v_t V;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_rx_byte = 0, n_rx_err = 0, n_tx_b2b = 0, n_tx_gap = 0;
  int n_sgn = 0, n_sat = 0, n_busy_ignored = 0, n_op_sat = 0, n_div0 = 0;

  fcfp_fil_top dut (.*);

  always #5 SYSCLK = ~SYSCLK;

  initial begin
    #20ms;
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

  // ---------------- RMII receive ----------------
  byte unsigned rx_exp[$];
  int rx_idx = 0, rx_err_at = -1;
  always @(posedge ETH_REFCLK) if (RXCLK_EN) begin
    byte unsigned e;
    e = rx_exp.pop_front();
    chk(RXD == e, $sformatf("rx byte %0d %02x exp %02x", rx_idx, RXD, e));
    chk(RX_ERR == (rx_idx == rx_err_at), "rx error flag");
    n_rx_byte++;
    if (RX_ERR) n_rx_err++;
    rx_idx++;
  end

  task automatic rx_frame(int n, int err_byte);
    byte unsigned b;
    rx_idx = 0; rx_err_at = err_byte;
    for (int i = 0; i < n; i++) begin
      b = (i < 7) ? 8'h55 : (i == 7) ? 8'hD5 : 8'($urandom);
      rx_exp.push_back(b);
      for (int k = 0; k < 4; k++) begin
        @(negedge ETH_REFCLK);
        ETH_CRS = 1; ETH_RXD = b[2*k +: 2]; ETH_RXER = (i == err_byte && k == 1);
      end
    end
    @(negedge ETH_REFCLK);
    ETH_CRS = 0; ETH_RXER = 0; ETH_RXD = '0;
    repeat (4) @(negedge ETH_REFCLK);
    chk(rx_exp.size() == 0, "rx frame fully delivered");
  endtask

  // ---------------- RMII transmit ----------------
  byte unsigned tx_exp[$];
  logic [7:0] tsr;
  int tn = 0;
  bit txen_q = 0;
  always @(posedge ETH_REFCLK) begin
    if (txen_q && !ETH_TXEN && TX_VALID) n_tx_gap++;  // stream paused mid-frame
    txen_q <= ETH_TXEN;
    if (ETH_TXEN) begin
      tsr = {ETH_TXD, tsr[7:2]};
      tn++;
      if (tn == 4) begin
        byte unsigned e;
        tn = 0;
        e = tx_exp.pop_front();
        chk(tsr == e, $sformatf("tx byte %02x exp %02x", tsr, e));
      end
    end
  end

  task automatic tx_frame(int n, bit gaps);
    int sent = 0, hi = 0;
    while (sent < n) begin
      @(negedge ETH_REFCLK);
      if (gaps && ($urandom_range(0, 3) == 0)) TX_VALID = 0;
      else begin TX_VALID = 1; TXD = 8'($urandom); end
      @(posedge ETH_REFCLK);
      if (TX_VALID && TXCLK_EN) begin tx_exp.push_back(TXD); sent++; end
      if (ETH_TXEN) hi++;
    end
    @(negedge ETH_REFCLK) TX_VALID = 0;
    repeat (6) begin @(posedge ETH_REFCLK); if (ETH_TXEN) hi++; end
    chk(tx_exp.size() == 0, "tx frame fully sent");
    chk(!ETH_TXEN, "TXEN low after frame");
    if (!gaps) begin
      chk(hi == 4 * n, $sformatf("back-to-back TXEN high %0d cycles", hi));
      n_tx_b2b++;
    end
  endtask

  // ---------------- controller ----------------
  task automatic ctrl_steps(int nsteps);
    ctrl_model m;
    v_t ev;
    sig_t es;
    real t;
    int lat;
    m = new();
    for (int n = 0; n < nsteps; n++) begin
      t = n * 0.05;
      if (n == nsteps / 2) SAT_MODE = SW_SAT;
      @(negedge DUT_CLK);
      X4    = to_sig(1000.0 + 5.4 * t - 800.0 * $exp(-t / 4.0) + 3.0 * $sin(7.0 * t));
      X5REF = to_sig(1000.0 + 5.4 * t);
      X5    = (n == nsteps - 1) ? '0 : to_sig(1000.0 + 5.4 * t + 2.0 * $sin(t));
      X3    = to_sig(60.0 * $exp(-t / 3.0));
      chk(CTRL_IN_READY, "controller ready");
      CTRL_IN_VALID = 1;
      m.step(SAT_MODE, X3, X4, X5, X5REF, ev, es);
      if (X5 == '0) n_div0++;
      // differentiator output at full scale (reference jump); the bit-exact
      // comparison of V below shows the hardware saturated the same way
      if (m.last_dref == sig_t'({1'b0, {(SIG_W-1){1'b1}}}) ||
          m.last_dref == sig_t'({1'b1, {(SIG_W-1){1'b0}}})) n_op_sat++;
      @(negedge DUT_CLK);
      CTRL_IN_VALID = 0;
      lat = 0;
      while (!CTRL_OUT_VALID && lat < 200) begin
        if (lat == 10) begin
          chk(!CTRL_IN_READY, "busy");
          CTRL_IN_VALID = 1;
          n_busy_ignored++;
        end
        if (lat == 11) CTRL_IN_VALID = 0;
        @(negedge DUT_CLK);
        lat++;
      end
      chk(lat == 52, $sformatf("controller latency %0d", lat));
      chk(V == ev && S == es, $sformatf("step %0d V %0d exp %0d S %0d exp %0d", n, V, ev, S, es));
      if (SAT_MODE == SW_SGN) n_sgn++; else n_sat++;
    end
  endtask

  initial begin
    realtime t0;
    repeat (10) @(posedge SYSCLK);
    RST_N = 1;
    repeat (10) @(posedge SYSCLK);
    chk(LOCKED, "clock generator locked");
    @(posedge ETH_REFCLK); t0 = $realtime; @(posedge ETH_REFCLK);
    chk(($realtime - t0) > 19.99 && ($realtime - t0) < 20.01, "ETH_REFCLK 50 MHz");
    @(posedge DUT_CLK); t0 = $realtime; @(posedge DUT_CLK);
    chk(($realtime - t0) > 99.99 && ($realtime - t0) < 100.01, "DUT_CLK 10 MHz");
    repeat (4) @(posedge DUT_CLK);
    fork
      begin
        rx_frame(64, 20);
        rx_frame(30, -1);
      end
      begin
        tx_frame(40, 0);
        tx_frame(60, 1);
      end
      ctrl_steps(300);
    join
    $display("mechanisms: rx_byte=%0d rx_err=%0d tx_back_to_back=%0d tx_gap=%0d sgn=%0d sat=%0d busy_ignored=%0d op_saturated=%0d div_by_zero=%0d",
             n_rx_byte, n_rx_err, n_tx_b2b, n_tx_gap, n_sgn, n_sat, n_busy_ignored, n_op_sat, n_div0);
    chk(n_rx_byte > 0, "rx bytes");
    chk(n_rx_err > 0, "rx error");
    chk(n_tx_b2b > 0, "tx back to back");
    chk(n_tx_gap > 0, "tx gap");
    chk(n_sgn > 0, "signum mode");
    chk(n_sat > 0, "saturation mode");
    chk(n_busy_ignored > 0, "busy request ignored");
    chk(n_op_sat > 0, "operator saturation");
    chk(n_div0 > 0, "division by zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
