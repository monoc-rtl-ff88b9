// tb_dynamic_scenario: the dynamic-traffic experiment on the 5 x 5 MoNoC at
// its default parameters. The evaluated pair runs from node 5 (x=0, y=1) to
// node 23 (x=3, y=4); the source generates one 20-flit-payload packet every
// GEN cycles (about 86 % of a link, queued in its PE) for 400 packets. The
// disturbing traffic changes every 100 generated packets, each flow injecting
// 20-30 % of a link:
//   phase 0 (packets   0- 99)  none
//   phase 1 (packets 100-199)  S2 node 7 -> 9 (EE), S4 node 13 -> 18 (N)
//   phase 2 (packets 200-299)  S1 node 20 -> 22 (EE), S5 node 12 -> 18 (EN)
//   phase 3 (packets 300-399)  S3 node 6 -> 16 (NN), S4 node 13 -> 18 (N)
// Candidate routes: 0 = XY (EEENNN), 1 = YX (NNNEEE), 2 = ENENEN, 3 = NENENE.
// Each phase disturbs the route chosen in the one before, so a contract
// (window MTS = 30 packets = 840 cycles, AC = 570 payload flits,
// OTS 200) should adapt the route once per disturbed phase. The route
// measure is each output's averaged link use, which lags behind a change of
// traffic; in phase 3 the route just left by S1 still looks loaded and the
// choice can take a few rounds, which this bench reports but does not fail.
// Runs (reset between them): 0 without a contract (XY throughout), 1 with a
// contract. Checks: every packet intact; without a contract the latency
// climbs past ten times the undisturbed one; with a contract at least two
// adaptations happen, the peak latency of phases 1 and 2 is at least halved
// and the overall peak is lower. The source, target and flow placement
// follow the experiment's figure, except that S4 stops one router short of
// the target's router: ending there it would load the target's own ejection
// port, which no route change can relieve. Which flows run in which phase,
// the loads, packet lengths and contract values are this bench's own.
module tb_dynamic_scenario;
  import monoc_pkg::*;

  localparam int N = 25, SRC = 5, DST = 23, NPKT = 400, GEN = 28;

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
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // ---------------- PE transmit side ----------------
  logic [N-1:0] took;
  always_ff @(posedge clk) took <= pe_tx_valid & pe_tx_ready;

  task automatic send(int n, pe_kind_e k, flit_t f[]);
    for (int i = 0; i < f.size(); i++) begin
      pe_tx_valid[n] = 1'b1; pe_tx_data[n] = f[i]; pe_tx_kind[n] = k;
      pe_tx_last[n]  = (i == f.size() - 1);
      do @(negedge clk); while (!took[n]);
    end
    pe_tx_valid[n] = 1'b0;
  endtask

  bit stop;
  int lo_pct, hi_pct;

  // disturbing payload: first flit D000|source, then D000+k; a flow runs
  // while the current phase is one of its phases
  task automatic disturb(int n, flit_t path, int pa, int pb);
    flit_t f[] = new[23];
    int gap;
    f[0] = path; f[1] = TERMINATOR; f[2] = 16'd20;
    f[3] = 16'hD000 | flit_t'(n);
    for (int k = 2; k <= 20; k++) f[2 + k] = 16'hD000 + flit_t'(k);
    while (!stop) begin
      if (lo_pct > 0 && (n_gen / 100 == pa || n_gen / 100 == pb)) begin
        send(n, KIND_BE, f);
        // 23 flits at r % of the link: 23 * 100 / r cycles per packet
        gap = 2300 / (lo_pct + int'($urandom_range(0, hi_pct - lo_pct))) - 23;
        repeat (gap) @(negedge clk);
      end else @(negedge clk);
    end
  endtask

  // evaluated pair: payload flit 1 is the sequence number, then C000+k
  int gen_t [NPKT], inj_t [NPKT], lat [NPKT], nlat [NPKT];
  bit got [NPKT];
  int q [$];
  int n_gen, n_got;

  task automatic generator();
    for (int i = 0; i < NPKT; i++) begin
      gen_t[i] = cyc; q.push_back(i); n_gen++;
      repeat (GEN) @(negedge clk);
    end
  endtask

  task automatic cp_sender(bit monitored);
    flit_t f[];
    int s, o;
    while (!stop) begin
      if (q.size() > 0) begin
        s = q.pop_front();
        o = monitored ? 0 : 3;
        f = new[o + 21];
        if (!monitored) begin f[0] = 16'h0002; f[1] = 16'h22FF; f[2] = TERMINATOR; end
        f[o] = 16'd20; f[o + 1] = flit_t'(s);
        for (int k = 2; k <= 20; k++) f[o + k] = 16'hC000 + flit_t'(k);
        inj_t[s] = cyc;
        send(SRC, monitored ? KIND_MON : KIND_BE, f);
      end else @(negedge clk);
    end
  endtask

  // ---------------- PE receive side ----------------
  assign pe_rx_ready = '1;
  int rx_pos [N], rx_tag [N], rx_other [N];
  int rx_bad;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) begin rx_pos[n] <= 0; rx_other[n] <= 0; end
    end else begin
      for (int n = 0; n < N; n++) if (pe_rx_valid[n]) begin
        automatic int p = rx_pos[n];
        automatic int tag = (p == 1) ? int'(pe_rx_data[n]) : rx_tag[n];
        if (p == 0 && pe_rx_data[n] != 16'd20) rx_bad <= rx_bad + 1;
        if (p == 1) rx_tag[n] <= tag;
        if (p >= 2) begin
          if ((tag & 16'hF000) == 16'hD000) begin
            if (pe_rx_data[n] != 16'hD000 + flit_t'(p)) rx_bad <= rx_bad + 1;
          end else if (pe_rx_data[n] != 16'hC000 + flit_t'(p)) rx_bad <= rx_bad + 1;
        end
        if (pe_rx_last[n] != (p == 20)) rx_bad <= rx_bad + 1;
        if (pe_rx_last[n]) begin
          rx_pos[n] <= 0;
          if ((tag & 16'hF000) == 16'hD000) rx_other[n] <= rx_other[n] + 1;
          else if (n == DST && tag < NPKT && !got[tag]) begin
            got[tag] <= 1'b1; lat[tag] <= cyc + 1 - gen_t[tag]; nlat[tag] <= cyc + 1 - inj_t[tag]; n_got <= n_got + 1;
          end else rx_bad <= rx_bad + 1;
        end else rx_pos[n] <= p + 1;
      end
    end
  end

  int n_adapt;
  always_ff @(posedge clk) if (rst_n) n_adapt <= n_adapt + int'(ev_adapt[SRC]);

  // ---------------- one run ----------------
  real tail [2], peak [2];
  int  ph_peak [2][4];

  task automatic run(int idx, int lo, int hi, bit contract);
    flit_t open_pkt[] = new[4 + PATH_FLITS + 4 * PATH_FLITS];
    int t;
    open_pkt = '{16'd840, 16'd570, 16'd200, 16'd4,
                 16'h1113, 16'h33FF, 16'hFFFF,      // return route WWWSSS
                 16'h0002, 16'h22FF, 16'hFFFF,      // route 0: XY
                 16'h2220, 16'h00FF, 16'hFFFF,      // route 1: YX
                 16'h0202, 16'h02FF, 16'hFFFF,      // route 2: ENENEN
                 16'h2020, 16'h20FF, 16'hFFFF};     // route 3: NENENE
    rst_n = 1'b0;
    pe_tx_valid = '0; pe_tx_data = '0; pe_tx_kind = '{default: KIND_BE}; pe_tx_last = '0;
    stop = 0; lo_pct = lo; hi_pct = hi; q = {}; n_gen = 0; n_got = 0; n_adapt = 0; rx_bad = 0;
    for (int i = 0; i < NPKT; i++) begin got[i] = 0; lat[i] = 0; end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    fork
      begin
        if (contract) begin
          send(SRC, KIND_OPEN, open_pkt);
          while (!slv_open[DST]) @(negedge clk);
        end
        fork generator(); cp_sender(contract); join_none
        t = 0;
        while (n_got < NPKT && t < 150000) begin @(negedge clk); t++; end
        stop = 1;
      end
      if (lo > 0) begin
        fork
          disturb(20, 16'h00FF, 2, 2);    // S1
          disturb(7,  16'h00FF, 1, 1);    // S2
          disturb(6,  16'h22FF, 3, 3);    // S3
          disturb(13, 16'h2FFF, 1, 3);    // S4
          disturb(12, 16'h02FF, 2, 2);    // S5
        join
      end
    join
    repeat (300) @(negedge clk);   // senders finish their last packets
    check(n_got == NPKT && rx_bad == 0, $sformatf("run %0d: all %0d packets delivered intact", idx, NPKT));
    tail[idx] = 0; peak[idx] = 0;
    for (int i = NPKT - 25; i < NPKT; i++) tail[idx] += real'(lat[i]) / 25.0;
    for (int i = 0; i < NPKT; i++) if (real'(lat[i]) > peak[idx]) peak[idx] = real'(lat[i]);
    for (int ph = 0; ph < 4; ph++) begin
      int pk;
      pk = 0;
      for (int i = 100 * ph; i < 100 * ph + 100; i++) if (lat[i] > pk) pk = lat[i];
      ph_peak[idx][ph] = pk;
      $display("run %0d phase %0d: peak latency %0d cycles", idx, ph, pk);
    end
    $display("run %0d (disturbance %0d-%0d %%, contract %0d): peak latency %0.0f, mean of the last 25 packets %0.1f cycles, adaptations %0d, final route %0d",
             idx, lo, hi, contract, peak[idx], tail[idx], n_adapt, mst_route[SRC]);
  endtask

  initial begin
    run(0, 20, 30, 0);
    run(1, 20, 30, 1);
    check(peak[0] > 10.0 * real'(ph_peak[0][0]), "without a contract the latency climbs to over ten times the undisturbed one");
    check(n_adapt >= 2, "with a contract the route is adapted as the disturbance moves");
    check(2 * ph_peak[1][1] < ph_peak[0][1] && 2 * ph_peak[1][2] < ph_peak[0][2],
          "phases 1 and 2: with a contract the peak latency is at least halved");
    check(peak[1] < peak[0], "with a contract the overall peak latency is lower");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
