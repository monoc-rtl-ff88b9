// tb_static_scenario: the static-traffic experiment on the 5 x 5 MoNoC at its
// default parameters: an evaluated pair (source node 0, target node 24) whose
// XY route is crossed by four disturbing best-effort flows
//   S1 node 1 -> node 3    (East x2, bottom row)
//   S2 node 2 -> node 4    (East x2, bottom row)
//   S3 node 9 -> node 19   (North x2, right column)
//   S4 node 14 -> node 24  (North x2, right column, same target router)
// Each disturbing source sends 20-flit-payload packets with a random gap so
// that its injection rate is uniform in a given range of the link capacity.
// The evaluated source generates one 20-flit-payload packet every GEN cycles
// (its offered load is about 80 % of a link) and queues it in its PE; the
// application latency of a packet runs from its generation to the arrival of
// its last flit at the target, so it includes waiting in the source queue;
// the network latency runs from the first flit offered to the interface.
//
// Runs (the network is reset between runs):
//   0  no disturbance, no contract: the reference (minimum) latency
//   1  disturbance 10-20 %, no contract (XY route throughout)
//   2  disturbance 40-50 %, no contract
//   3  disturbance 10-20 %, contract (MTS 600 cycles, AC 360 payload flits)
//      with four routes: XY, YX, NNEENNEE, EENNEENN
// Checks: every packet arrives intact; without a contract the latency climbs
// and climbs faster under heavier disturbance; with a contract the route is
// changed to one that avoids the disturbed links and the latency of the last
// packets falls back near the reference. 250 packets per run, as in the
// experiment this reproduces; disturbing flow placement follows its figure,
// the offered loads, packet lengths and contract values are this bench's.
module tb_static_scenario;
  import monoc_pkg::*;

  localparam int N = 25, SRC = 0, DST = 24, NPKT = 250, GEN = 30;

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
    repeat (400000) @(posedge clk);
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

  // disturbing payload: first flit D000|source, then D000+k
  task automatic disturb(int n, flit_t path);
    flit_t f[] = new[23];
    int gap;
    f[0] = path; f[1] = TERMINATOR; f[2] = 16'd20;
    f[3] = 16'hD000 | flit_t'(n);
    for (int k = 2; k <= 20; k++) f[2 + k] = 16'hD000 + flit_t'(k);
    while (!stop) begin
      send(n, KIND_BE, f);
      // 23 flits at r % of the link: 23 * 100 / r cycles per packet
      gap = 2300 / (lo_pct + int'($urandom_range(0, hi_pct - lo_pct))) - 23;
      repeat (gap) @(negedge clk);
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
        if (!monitored) begin f[0] = 16'h0000; f[1] = 16'h2222; f[2] = TERMINATOR; end
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
  real ref_lat, tail [4], peak [4];
  int  react, nreact, npeak;

  task automatic run(int idx, int lo, int hi, bit contract);
    flit_t open_pkt[] = new[4 + PATH_FLITS + 4 * PATH_FLITS];
    int t;
    open_pkt = '{16'd600, 16'd360, 16'd600, 16'd4,
                 16'h1111, 16'h3333, 16'hFFFF,      // return route WWWWSSSS
                 16'h0000, 16'h2222, 16'hFFFF,      // route 0: XY
                 16'h2222, 16'h0000, 16'hFFFF,      // route 1: YX
                 16'h2200, 16'h2200, 16'hFFFF,      // route 2
                 16'h0022, 16'h0022, 16'hFFFF};     // route 3
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
        while (n_got < NPKT && t < 60000) begin @(negedge clk); t++; end
        stop = 1;
      end
      if (lo > 0) begin
        fork
          disturb(1, 16'h00FF); disturb(2, 16'h00FF);
          disturb(9, 16'h22FF); disturb(14, 16'h22FF);
        join
      end
    join
    repeat (300) @(negedge clk);   // senders finish their last packets
    check(n_got == NPKT && rx_bad == 0, $sformatf("run %0d: all %0d packets delivered intact", idx, NPKT));
    tail[idx] = 0; peak[idx] = 0;
    for (int i = NPKT - 25; i < NPKT; i++) tail[idx] += real'(lat[i]) / 25.0;
    for (int i = 0; i < NPKT; i++) if (real'(lat[i]) > peak[idx]) peak[idx] = real'(lat[i]);
    $display("run %0d (disturbance %0d-%0d %%, contract %0d): peak latency %0.0f, mean of the last 25 packets %0.1f cycles, adaptations %0d, final route %0d",
             idx, lo, hi, contract, peak[idx], tail[idx], n_adapt, mst_route[SRC]);
  endtask

  initial begin
    run(0, 0, 0, 0);
    ref_lat = tail[0];
    run(1, 10, 20, 0);
    run(2, 40, 50, 0);
    run(3, 10, 20, 1);
    // reaction: first packet from which the mean latency of every 10
    // consecutive packets stays within 20 % of the reference
    react = 0;
    for (int i = 0; i + 10 <= NPKT; i++) begin
      real m;
      m = 0;
      for (int k = 0; k < 10; k++) m += real'(lat[i + k]) / 10.0;
      if (m > 1.2 * ref_lat) react = i + 1;
    end
    // the same for the network latency (from the first flit offered to the NI)
    nreact = 0; npeak = 0;
    for (int i = 0; i < NPKT; i++) if (nlat[i] > npeak) npeak = nlat[i];
    for (int i = 0; i + 10 <= NPKT; i++) begin
      real m;
      m = 0;
      for (int k = 0; k < 10; k++) m += real'(nlat[i + k]) / 10.0;
      if (m > 1.2 * ref_lat) nreact = i + 1;
    end
    $display("with a contract: peak network latency %0d cycles, 10-packet mean network latency within 20 %% of the reference from packet %0d on",
             npeak, nreact);
    $display("reference latency %0.1f cycles; with a contract the 10-packet mean latency stays within 20 %% of it from packet %0d on",
             ref_lat, react);
    check(peak[0] < 1.2 * ref_lat, "undisturbed latency is flat");
    check(tail[1] > 2.0 * ref_lat, "without a contract, 10-20 % disturbance makes the latency climb");
    check(tail[2] > tail[1], "heavier disturbance, higher latency");
    check(n_adapt >= 1, "with a contract the route is adapted");
    check(mst_route[SRC] == 2'd1 || mst_route[SRC] == 2'd2, "the new route avoids the disturbed links");
    check(tail[3] < 1.2 * ref_lat, "with a contract the latency returns near the reference");
    check(tail[3] < tail[1], "adaptation beats the fixed XY route");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
