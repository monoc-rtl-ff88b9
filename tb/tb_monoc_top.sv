// tb_monoc_top: end-to-end test of the 5 x 5 MoNoC at its default parameters.
//
// The evaluated pair runs from node 0 (corner (0,0)) to node 24 (corner
// (4,4)) with four routes: 0 = XY (EEEENNNN), 1 = YX (NNNNEEEE),
// 2 = NNEENNEE, 3 = EENNEENN. Disturbing best-effort flows:
//   S1 node 1 -> node 3   (EE, on the XY route and on route 3)
//   S2 node 9 -> node 19  (NN, on the XY route and on route 3)
//   S3 node 10 -> node 20 (NN, on route 1), running from the start
// Route 2 is the only one free of disturbing traffic, so it must be chosen.
// Phases: open a session (MTS 200, AC 120 payload flits, OTS 200), stream
// monitored packets of 20 payload flits (values 1..20) with no disturbance
// (no violation expected), start S1/S2 (violation, AIR >= AC, probing,
// route 2 chosen), slow the source (violation judged as low injection), close.
// Every received packet is checked flit by flit, and each mechanism (session
// open, violation, low-injection answer, probing/selection, adaptation, close,
// control-lane preemption, link stall, path-flit drop, flow blocking) must
// occur at least once. Session-opening, adaptation and closing times are
// measured and bounded.
module tb_monoc_top;
  import monoc_pkg::*;

  localparam int N = 25;
  localparam int SRC = 0, DST = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     [N-1:0]      pe_tx_valid, pe_tx_ready, pe_tx_last, pe_blocked;
  flit_t    [N-1:0]      pe_tx_data, pe_rx_data;
  pe_kind_e [N-1:0]      pe_tx_kind;
  logic     [N-1:0]      pe_rx_valid, pe_rx_ready, pe_rx_last;
  logic     [N-1:0]      mst_open, slv_open, ev_violation, ev_lowinj, ev_adapt, ev_close;
  logic     [N-1:0]      ev_select, ev_preempt, ev_stall, ev_drop;
  logic     [N-1:0][1:0] mst_route;

  monoc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- PE transmit models ----------------
  logic [N-1:0] took;
  always_ff @(posedge clk) took <= pe_tx_valid & pe_tx_ready;

  task automatic send(int n, pe_kind_e k, flit_t f[]);
    for (int i = 0; i < f.size(); i++) begin
      pe_tx_valid[n] = 1'b1;
      pe_tx_data[n]  = f[i];
      pe_tx_kind[n]  = k;
      pe_tx_last[n]  = (i == f.size() - 1);
      do @(negedge clk); while (!took[n]);
    end
    pe_tx_valid[n] = 1'b0;
  endtask

  function automatic void mk_payload(ref flit_t f[], input int first);
    f[first] = 16'd20;
    for (int i = 1; i <= 20; i++) f[first + i] = flit_t'(i);
  endfunction

  bit run_s1 = 0, run_s2 = 0, run_s3 = 0;
  int cp_mode = 0;   // 0 idle, 1 full rate, 2 slow

  task automatic disturb(int n, flit_t path, ref bit run);
    flit_t f[] = new[23];
    f[0] = path; f[1] = TERMINATOR;
    mk_payload(f, 2);
    forever begin
      if (run) send(n, KIND_BE, f);
      else @(negedge clk);
    end
  endtask

  task automatic cp_source();
    flit_t f[] = new[21];
    mk_payload(f, 0);
    forever begin
      if (cp_mode != 0) begin
        send(SRC, KIND_MON, f);
        if (cp_mode == 2) repeat (300) @(negedge clk);
      end else @(negedge clk);
    end
  endtask

  // ---------------- PE receive checks ----------------
  assign pe_rx_ready = '1;
  int rx_pos [N];
  int rx_pkts [N];
  int rx_bad = 0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) begin rx_pos[n] <= 0; rx_pkts[n] <= 0; end
    end else begin
      for (int n = 0; n < N; n++) if (pe_rx_valid[n]) begin
        if (rx_pos[n] == 0) begin
          if (pe_rx_data[n] != 16'd20) rx_bad <= rx_bad + 1;
        end else if (pe_rx_data[n] != flit_t'(rx_pos[n])) rx_bad <= rx_bad + 1;
        if (pe_rx_last[n] != (rx_pos[n] == 20)) rx_bad <= rx_bad + 1;
        if (pe_rx_last[n]) begin
          rx_pos[n]  <= 0;
          rx_pkts[n] <= rx_pkts[n] + 1;
        end else rx_pos[n] <= rx_pos[n] + 1;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_viol = 0, n_lowinj = 0, n_adapt = 0, n_select = 0, n_close = 0;
  int n_preempt = 0, n_stall = 0, n_drop = 0, n_block = 0, n_open = 0;
  logic slv_open_q = 1'b0;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      n_viol    <= n_viol    + int'(ev_violation[SRC]);
      n_lowinj  <= n_lowinj  + int'(ev_lowinj[SRC]);
      n_adapt   <= n_adapt   + int'(ev_adapt[SRC]);
      n_close   <= n_close   + int'(ev_close[SRC]);
      n_select  <= n_select  + int'(ev_select[DST]);
      n_preempt <= n_preempt + $countones(ev_preempt);
      n_stall   <= n_stall   + $countones(ev_stall);
      n_drop    <= n_drop    + $countones(ev_drop);
      n_block   <= n_block   + int'(pe_blocked[SRC]);
      slv_open_q <= slv_open[DST];
      if (slv_open[DST] && !slv_open_q) n_open <= n_open + 1;
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scenario ----------------
  initial begin
    flit_t open_pkt[] = new[4 + PATH_FLITS + 4 * PATH_FLITS];
    flit_t close_pkt[] = new[1];
    int t0, t1, dt, v_before, adapt_blk;
    pe_tx_valid = '0; pe_tx_data = '0; pe_tx_kind = '{default: KIND_BE}; pe_tx_last = '0;

    open_pkt = '{16'd200, 16'd120, 16'd200, 16'd4,
                 16'h1111, 16'h3333, 16'hFFFF,      // return route WWWWSSSS
                 16'h0000, 16'h2222, 16'hFFFF,      // route 0: XY
                 16'h2222, 16'h0000, 16'hFFFF,      // route 1: YX
                 16'h2200, 16'h2200, 16'hFFFF,      // route 2
                 16'h0022, 16'h0022, 16'hFFFF};     // route 3
    close_pkt[0] = 16'h0000;

    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    fork
      disturb(1,  16'h00FF, run_s1);
      disturb(9,  16'h22FF, run_s2);
      disturb(10, 16'h22FF, run_s3);
      cp_source();
    join_none

    run_s3 = 1;
    repeat (1200) @(negedge clk);   // let the Intra Monitors on route 1 see S3

    // session opening
    t0 = int'($time / 10);
    send(SRC, KIND_OPEN, open_pkt);
    while (!slv_open[DST] && (int'($time / 10) - t0) < 2000) @(negedge clk);
    t1 = int'($time / 10);
    $display("session opening: %0d cycles from the first configuration flit to monitoring at the target", t1 - t0);
    check(slv_open[DST] && mst_open[SRC], "session opened on both sides");
    check(t1 - t0 <= 100, "session opening within 100 cycles");
    check(mst_route[SRC] == 2'd0, "XY route used first");

    // undisturbed streaming: the contract holds
    cp_mode = 1;
    repeat (1500) @(negedge clk);
    check(n_viol == 0, "no violation without disturbing traffic");
    check(rx_pkts[DST] > 30, "monitored packets delivered");

    // disturbance on the XY route
    run_s1 = 1; run_s2 = 1;
    dt = 0;
    while (n_adapt < 1 && dt < 20000) begin @(negedge clk); dt++; end
    check(n_adapt >= 1, "path adaptation took place");
    check(mst_route[SRC] == 2'd2, "route 2, the undisturbed one, selected");
    adapt_blk = n_block;
    $display("adaptation: route %0d selected, source flow blocked %0d cycles in total so far",
             mst_route[SRC], adapt_blk);
    check(adapt_blk <= 1000, "flow blocked for a few hundred cycles at most");

    // after adaptation the contract holds again
    repeat (600) @(negedge clk);
    v_before = n_viol;
    repeat (2000) @(negedge clk);
    check(n_viol == v_before, "no further violation on the new route");

    // slow source: violation judged as low injection
    cp_mode = 2;
    dt = 0;
    while (n_lowinj < 1 && dt < 20000) begin @(negedge clk); dt++; end
    check(n_lowinj >= 1, "low injection recognised");
    check(mst_route[SRC] == 2'd2 || n_adapt > 1, "route kept unless a new adaptation ran");

    // close
    cp_mode = 0;
    repeat (400) @(negedge clk);
    t0 = int'($time / 10);
    send(SRC, KIND_CLOSE, close_pkt);
    while (slv_open[DST] && (int'($time / 10) - t0) < 2000) @(negedge clk);
    t1 = int'($time / 10);
    $display("session closing: %0d cycles", t1 - t0);
    check(!slv_open[DST] && !mst_open[SRC], "session closed on both sides");
    check(t1 - t0 <= 100, "session closing within 100 cycles");

    run_s1 = 0; run_s2 = 0; run_s3 = 0;
    repeat (500) @(negedge clk);
    check(rx_bad == 0, "all delivered packets intact");
    check(rx_pkts[3] > 0 && rx_pkts[19] > 0 && rx_pkts[20] > 0, "disturbing flows delivered");

    $display("mechanisms: open=%0d violation=%0d lowinj=%0d select=%0d adapt=%0d close=%0d preempt=%0d stall=%0d drop=%0d blocked=%0d",
             n_open, n_viol, n_lowinj, n_select, n_adapt, n_close, n_preempt, n_stall, n_drop, n_block);
    $display("packets received at target: %0d", rx_pkts[DST]);
    check(n_open >= 1,    "mechanism: session opening");
    check(n_viol >= 1,    "mechanism: contract violation");
    check(n_lowinj >= 1,  "mechanism: low-injection answer");
    check(n_select >= 1,  "mechanism: route selection at the target");
    check(n_adapt >= 1,   "mechanism: route update at the source");
    check(n_close >= 1,   "mechanism: session closing");
    check(n_preempt >= 1, "mechanism: control lane preempting data");
    check(n_stall >= 1,   "mechanism: link stall");
    check(n_drop >= 1,    "mechanism: exhausted path flit dropped");
    check(n_block >= 1,   "mechanism: monitored flow blocked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
