// tb_monoc_router: one router, packets entering four ports at once.
//   West  in: path 00FF -> East, leaves with 0FFF
//   South in: path 0FFF, 3333 -> East, exhausted flit dropped, leaves with 3333
//   Local in: path 2FFF -> North, exhausted flit dropped, leaves with terminator
//   North in: terminator -> Local
//   East  in (control lane): path 1FFF -> West, exhausted flit dropped
// Two packets contend for East: both must arrive whole, one after the other.
// Also checks the first-flit latency of an uncontended packet (header flit
// written into the input buffer at cycle t leaves on the link at t+3) and
// then one flit per cycle (23 flits in 23 consecutive cycles).
module tb_monoc_router;
  import monoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  link_t [4:0] in_link, out_link;
  logic  [4:0][1:0] credit_out, credit_in;
  logic  [4:0][15:0] link_use;
  logic  [4:0] ev_preempt, ev_stall, ev_drop;
  monoc_router dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  flit_t got [5][2][$];
  int    first_out [5], last_out [5];
  int    ndrop [5];
  always @(posedge clk) if (rst_n) for (int p = 0; p < 5; p++) ndrop[p] += int'(ev_drop[p]);
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 5; p++) if (out_link[p].tx && credit_in[p][out_link[p].lane]) begin
      if (got[p][0].size() == 0 && got[p][1].size() == 0) first_out[p] = cyc;
      got[p][int'(out_link[p].lane)].push_back(out_link[p].data);
      last_out[p] = cyc;
    end
  end

  task automatic drive(int p, lane_e l, flit_t f[], output int t_first);
    foreach (f[k]) begin
      in_link[p].tx = 1; in_link[p].lane = l; in_link[p].data = f[k];
      while (!credit_out[p][l]) @(negedge clk);
      if (k == 0) t_first = cyc + 1;   // the edge that writes the flit
      @(negedge clk);
    end
    in_link[p].tx = 0;
  endtask

  function automatic void mk(ref flit_t f[], input flit_t path[], input flit_t tag, input int npl);
    f = new[path.size() + 1 + npl];
    foreach (path[k]) f[k] = path[k];
    f[path.size()] = flit_t'(npl);
    for (int k = 1; k <= npl; k++) f[path.size() + k] = tag + flit_t'(k);
  endfunction

  function automatic bit same(flit_t a[$], flit_t b[]);
    if (a.size() != b.size()) return 0;
    foreach (b[k]) if (a[k] != b[k]) return 0;
    return 1;
  endfunction

  initial begin
    flit_t pw[], ps[], pl[], pn[], pe[], ew[], es[], nl[], ln[], we[];
    flit_t head[$];
    int tw, ts, tl, tn, te, tsolo;
    in_link = '0; credit_in = '1;
    mk(pw, '{16'h00FF, 16'hFFFF}, 16'h1000, 20);
    mk(ps, '{16'h0FFF, 16'h3333, 16'hFFFF}, 16'h3000, 6);
    mk(pl, '{16'h2FFF, 16'hFFFF}, 16'h4000, 3);
    mk(pn, '{16'hFFFF}, 16'h2000, 2);
    mk(pe, '{16'h1FFF, 16'hFFFF}, 16'h5000, 5);
    mk(ew, '{16'h0FFF, 16'hFFFF}, 16'h1000, 20);
    mk(es, '{16'h3333, 16'hFFFF}, 16'h3000, 6);
    mk(nl, '{16'hFFFF}, 16'h2000, 2);
    mk(ln, '{16'hFFFF}, 16'h4000, 3);
    mk(we, '{16'hFFFF}, 16'h5000, 5);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // uncontended latency and throughput
    drive(P_WEST, LANE_DATA, pw, tsolo);
    repeat (10) @(negedge clk);
    chk(first_out[P_EAST] - tsolo == 3, "header leaves 3 cycles after entering the buffer");
    chk(same(got[P_EAST][0], ew), "West->East packet, leading hop consumed");
    chk(last_out[P_EAST] - first_out[P_EAST] == ew.size() - 1, "one flit per cycle");
    got[P_EAST][0].delete();
    // four at once
    fork
      drive(P_WEST,  LANE_DATA, pw, tw);
      drive(P_SOUTH, LANE_DATA, ps, ts);
      drive(P_LOCAL, LANE_DATA, pl, tl);
      drive(P_NORTH, LANE_DATA, pn, tn);
      drive(P_EAST,  LANE_CTRL, pe, te);
    join
    repeat (60) @(negedge clk);
    // East: both packets, whole, in either order
    head = got[P_EAST][0];
    chk(head.size() == ew.size() + es.size(), "East carries both packets");
    if (head.size() == ew.size() + es.size()) begin
      flit_t a[$], b[$];
      if (head[0] == ew[0]) begin a = head[0:ew.size()-1]; b = head[ew.size():$]; chk(same(a, ew) && same(b, es), "East: W then S intact"); end
      else begin a = head[0:es.size()-1]; b = head[es.size():$]; chk(same(a, es) && same(b, ew), "East: S then W intact"); end
    end
    chk(same(got[P_NORTH][0], ln), "Local->North, exhausted path flit dropped");
    chk(same(got[P_LOCAL][0], nl), "North->Local, arrived packet ejected");
    chk(same(got[P_WEST][1], we), "control packet East->West on the control lane");
    // exhausted path flits are dropped at the South, Local and East inputs only
    chk(ndrop[P_SOUTH] == 1 && ndrop[P_LOCAL] == 1 && ndrop[P_EAST] == 1 &&
        ndrop[P_WEST] == 0 && ndrop[P_NORTH] == 0, "drop events per input port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
