// tb_slv_monitor: plays the slvProbe and the NI receiver around a slvMonitor.
//  - SETUP opens the session; CRR >= AC at a window end: no violation.
//  - CRR < AC: VIOLATION (with CRR) sent on the return route, monitoring stops.
//  - LOWINJ restarts monitoring.
//  - Route selection with the table of the adaptation example (averages 25,
//    18, 12, 16; maxima 55, 34, 20, 18): the third route (index 2) wins.
//  - The path-search example: route A (link rates 80,110,122,135,90: average
//    107.4, max 135) against route B (89,123,146,145,90: 118.6, 146): A wins.
//  - Equal averages over different hop counts: the lower maximum wins.
//  - RELEASE closes the session.
module tb_slv_monitor;
  import monoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_valid, msg_valid, msg_ack, probe_clear, probe_en, win_done, session_open, ev_violation, ev_select;
  rx_msg_t rx_msg;
  ctrl_msg_t msg;
  logic [15:0] mts, crr;
  logic [1:0] best_idx;
  slv_monitor dut (.*);

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

  task automatic rx(flit_t p[]);
    rx_msg = '0;
    rx_msg.len = 4'(p.size());
    foreach (p[k]) rx_msg.pl[k] = p[k];
    rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
  endtask

  task automatic window(int c);
    crr = 16'(c); win_done = 1;
    @(negedge clk);
    win_done = 0;
    @(negedge clk);
  endtask

  task automatic expect_msg(flit_t cmd, flit_t arg, string what);
    int w = 0;
    while (!msg_valid && w < 20) begin @(negedge clk); w++; end
    chk(msg_valid && msg.pl[0] == cmd && msg.pl[1] == arg && msg.path[0] == 16'h1111 &&
        msg.path[1] == 16'h3333 && msg.len == 4'd2, what);
    msg_ack = 1; @(negedge clk); msg_ack = 0; @(negedge clk);
  endtask

  task automatic probe(int idx, int sum, int mx, int hops);
    rx('{CMD_PROBE, flit_t'(idx), flit_t'(sum), flit_t'(mx), flit_t'(hops)});
  endtask

  task automatic setup(int np);
    rx('{CMD_SETUP, 16'd50, 16'd30, 16'd200, flit_t'(np), 16'h1111, 16'h3333, 16'hFFFF});
  endtask

  initial begin
    rx_valid = 0; rx_msg = '0; msg_ack = 0; crr = 0; win_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    setup(4);
    chk(session_open && probe_en && mts == 16'd50, "session opened with MTS 50");
    window(40);
    chk(!msg_valid && probe_en, "CRR 40 >= AC 30: no violation");
    window(20);
    chk(!probe_en, "monitoring stopped at violation");
    expect_msg(CMD_VIOLATION, 16'd20, "VIOLATION with CRR on the return route");
    rx('{CMD_LOWINJ});
    @(negedge clk);
    chk(probe_en, "LOWINJ restarts monitoring");
    window(10);
    expect_msg(CMD_VIOLATION, 16'd10, "second violation");
    probe(0, 100, 55, 4);
    probe(1,  72, 34, 4);
    probe(2,  48, 20, 4);
    chk(!msg_valid, "waits for all four probes");
    probe(3,  64, 18, 4);
    expect_msg(CMD_NEWPATH, 16'd2, "route 3 (index 2) selected, lowest average");
    chk(best_idx == 2'd2 && probe_en, "monitoring re-enabled");
    // path search example, two routes
    setup(2);
    window(0);
    expect_msg(CMD_VIOLATION, 16'd0, "violation");
    probe(1, 89 + 123 + 146 + 145 + 90, 146, 5);
    probe(0, 80 + 110 + 122 + 135 + 90, 135, 5);
    expect_msg(CMD_NEWPATH, 16'd0, "route A selected");
    // equal averages, the lower maximum wins
    window(5);
    expect_msg(CMD_VIOLATION, 16'd5, "violation");
    probe(0, 100, 30, 4);
    probe(1,  50, 20, 2);
    expect_msg(CMD_NEWPATH, 16'd1, "tie on average broken by the lower maximum");
    rx('{CMD_RELEASE});
    chk(!session_open && !probe_en, "RELEASE closes the session");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
