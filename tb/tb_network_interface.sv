// tb_network_interface: two network interfaces wired link to link, A the
// master and B the slave of a session whose routes are empty (the packets
// are already at their destination). Checks the session opening on both
// sides, monitored data delivered intact, a violation caused by B's PE
// stopping (A still offers data: AIR >= AC, so two probes and a route
// selection follow), a violation caused by A's PE slowing down (LOWINJ), and
// the session closing.
module tb_network_interface;
  import monoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] tx_valid, tx_ready, tx_last, blocked, rx_valid, rx_ready, rx_last;
  flit_t [1:0] tx_data, rx_data;
  pe_kind_e [1:0] tx_kind;
  link_t [1:0] olink;
  logic [1:0][1:0] cred_o;
  logic [1:0] m_open, s_open, e_viol, e_low, e_adapt, e_close, e_sel;
  logic [1:0][1:0] route;

  for (genvar i = 0; i < 2; i++) begin : g_ni
    network_interface u_ni (
      .clk, .rst_n,
      .pe_tx_valid(tx_valid[i]), .pe_tx_ready(tx_ready[i]), .pe_tx_data(tx_data[i]),
      .pe_tx_kind(tx_kind[i]), .pe_tx_last(tx_last[i]), .pe_blocked(blocked[i]),
      .pe_rx_valid(rx_valid[i]), .pe_rx_ready(rx_ready[i]), .pe_rx_data(rx_data[i]),
      .pe_rx_last(rx_last[i]),
      .out_link(olink[i]), .credit_in(cred_o[1-i]),
      .in_link(olink[1-i]), .credit_out(cred_o[i]),
      .mst_open(m_open[i]), .slv_open(s_open[i]), .mst_route(route[i]),
      .ev_violation(e_viol[i]), .ev_lowinj(e_low[i]), .ev_adapt(e_adapt[i]),
      .ev_close(e_close[i]), .ev_select(e_sel[i]));
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] took;
  always_ff @(posedge clk) took <= tx_valid & tx_ready;
  task automatic send(int n, pe_kind_e k, flit_t f[]);
    foreach (f[i]) begin
      tx_valid[n] = 1; tx_kind[n] = k; tx_data[n] = f[i]; tx_last[n] = (i == f.size() - 1);
      do @(negedge clk); while (!took[n]);
    end
    tx_valid[n] = 0;
  endtask

  int mode = 0;  // 0 idle, 1 full, 2 slow
  task automatic source();
    flit_t f[] = new[11];
    f[0] = 16'd10;
    for (int k = 1; k <= 10; k++) f[k] = flit_t'(k);
    forever begin
      if (mode != 0) begin
        send(0, KIND_MON, f);
        if (mode == 2) repeat (150) @(negedge clk);
      end else @(negedge clk);
    end
  endtask

  int pos = 0, pkts = 0, bad = 0, n_viol = 0, n_low = 0, n_adapt = 0, n_sel = 0, n_close = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (rx_valid[1] && rx_ready[1]) begin
      if (rx_data[1] != ((pos == 0) ? 16'd10 : flit_t'(pos))) bad <= bad + 1;
      if (rx_last[1] != (pos == 10)) bad <= bad + 1;
      pos  <= rx_last[1] ? 0 : pos + 1;
      pkts <= pkts + int'(rx_last[1]);
    end
    n_viol  <= n_viol + int'(e_viol[0]);
    n_low   <= n_low + int'(e_low[0]);
    n_adapt <= n_adapt + int'(e_adapt[0]);
    n_sel   <= n_sel + int'(e_sel[1]);
    n_close <= n_close + int'(e_close[0]);
  end

  initial begin
    int p0, w;
    tx_valid = '0; tx_last = '0; tx_data = '0; tx_kind = '{default: KIND_BE}; rx_ready = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork source(); join_none
    send(0, KIND_OPEN, '{16'd100, 16'd50, 16'd100, 16'd2, 16'hFFFF, 16'hFFFF, 16'hFFFF,
                         16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF});
    repeat (40) @(negedge clk);
    chk(m_open[0] && s_open[1] && !blocked[0], "session open at A (master) and B (slave)");
    mode = 1;
    repeat (600) @(negedge clk);
    chk(n_viol == 0, "no violation while B reads at full rate");
    p0 = pkts;
    chk(p0 > 30, "monitored packets delivered");
    // B's PE stops reading
    rx_ready[1] = 0;
    w = 0;
    while (n_adapt == 0 && w < 3000) begin @(negedge clk); w++; end
    chk(n_viol >= 1 && n_sel == 1 && n_adapt == 1, "violation with AIR >= AC: probes and selection");
    rx_ready[1] = 1;
    repeat (400) @(negedge clk);
    // A's PE slows down
    mode = 2;
    w = 0;
    while (n_low == 0 && w < 5000) begin @(negedge clk); w++; end
    chk(n_low >= 1, "violation with AIR < AC: low injection");
    mode = 0;
    repeat (300) @(negedge clk);
    send(0, KIND_CLOSE, '{16'h0000});
    repeat (40) @(negedge clk);
    chk(!m_open[0] && !s_open[1] && n_close == 1, "session closed on both sides");
    chk(bad == 0 && pos == 0, "all packets intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
