// tb_mst_monitor: plays the NI sender, receiver and mstProbe around an
// mstMonitor.
//  - Configuration (MTS 200, AC 120, OTS 300, 4 routes): the flow is blocked,
//    a SETUP packet leaves on route 0 with every field, then the flow is
//    released and the probe cleared.
//  - VIOLATION with AIR < AC: a LOWINJ answer, the flow never blocked.
//  - VIOLATION with AIR >= AC: flow blocked, four PROBE packets on routes
//    0..3, NEWPATH 2 switches to route 2 and releases the flow.
//  - CLOSE: RELEASE sent, session closed.
module tb_mst_monitor;
  import monoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_valid, cfg_last, cfg_ready, block, msg_valid, msg_ack, rx_valid;
  logic probe_clear, probe_en, session_open, ev_violation, ev_lowinj, ev_adapt, ev_close;
  flit_t cfg_data;
  pe_kind_e cfg_kind;
  path_t cur_path;
  ctrl_msg_t msg;
  rx_msg_t rx_msg;
  logic [15:0] mts, air;
  logic [1:0] cur_idx;
  mst_monitor dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, state %s", dut.st.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int clears = 0;
  always_ff @(posedge clk) clears <= clears + int'(probe_clear);

  logic took;
  always_ff @(posedge clk) took <= cfg_valid && cfg_ready;

  task automatic cfg(pe_kind_e k, flit_t f[]);
    foreach (f[i]) begin
      cfg_valid = 1; cfg_kind = k; cfg_data = f[i]; cfg_last = (i == f.size() - 1);
      do @(negedge clk); while (!took);
    end
    cfg_valid = 0;
  endtask

  function automatic path_t route(int r);
    case (r)
      0: return '{16'hFFFF, 16'h2222, 16'h0000};
      1: return '{16'hFFFF, 16'h0000, 16'h2222};
      2: return '{16'hFFFF, 16'h2200, 16'h2200};
      default: return '{16'hFFFF, 16'h0022, 16'h0022};
    endcase
  endfunction

  task automatic take(output ctrl_msg_t m);
    int w = 0;
    while (!msg_valid && w < 20) begin @(negedge clk); w++; end
    m = msg;
    chk(msg_valid, "message offered");
    msg_ack = 1; @(negedge clk); msg_ack = 0;
  endtask

  task automatic rx(flit_t p[]);
    rx_msg = '0; rx_msg.len = 4'(p.size());
    foreach (p[k]) rx_msg.pl[k] = p[k];
    rx_valid = 1; @(negedge clk); rx_valid = 0;
  endtask

  initial begin
    ctrl_msg_t m;
    cfg_valid = 0; cfg_last = 0; cfg_data = 0; cfg_kind = KIND_OPEN; msg_ack = 0; rx_valid = 0;
    rx_msg = '0; air = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg(KIND_OPEN, '{16'd200, 16'd120, 16'd300, 16'd4, 16'h1111, 16'h3333, 16'hFFFF,
                     16'h0000, 16'h2222, 16'hFFFF, 16'h2222, 16'h0000, 16'hFFFF,
                     16'h2200, 16'h2200, 16'hFFFF, 16'h0022, 16'h0022, 16'hFFFF});
    chk(block, "flow blocked during opening");
    take(m);
    chk(m.path == route(0) && m.len == 4'(SU_LEN) && m.pl[0] == CMD_SETUP && m.pl[SU_MTS] == 16'd200 &&
        m.pl[SU_AC] == 16'd120 && m.pl[SU_OTS] == 16'd300 && m.pl[SU_NPATHS] == 16'd4 &&
        m.pl[SU_RET] == 16'h1111 && m.pl[SU_RET+1] == 16'h3333, "SETUP on route 0 with all fields");
    @(negedge clk);
    chk(!block && session_open && probe_en && mts == 16'd200 && clears == 1, "flow released, probe cleared and enabled");
    chk(cur_path == route(0), "XY route in use");
    // low injection
    air = 16'd100;
    rx('{CMD_VIOLATION, 16'd50});
    take(m);
    chk(m.pl[0] == CMD_LOWINJ && m.len == 4'd1 && !block, "AIR < AC: LOWINJ, flow not blocked");
    // congestion
    air = 16'd150;
    rx('{CMD_VIOLATION, 16'd50});
    @(negedge clk);
    chk(block && !probe_en, "AIR >= AC: flow blocked, monitoring stopped");
    for (int r = 0; r < 4; r++) begin
      take(m);
      chk(m.pl[0] == CMD_PROBE && m.pl[PR_IDX] == flit_t'(r) && m.path == route(r) && m.len == 4'd5 &&
          m.pl[PR_SUM] == 0 && m.pl[PR_MAX] == 0 && m.pl[PR_HOPS] == 0, $sformatf("PROBE %0d", r));
    end
    repeat (3) @(negedge clk);
    chk(!msg_valid && block, "waiting for the selected route");
    rx('{CMD_NEWPATH, 16'd2});
    @(negedge clk);
    chk(!block && cur_idx == 2'd2 && cur_path == route(2) && probe_en, "route 2 in use, flow released");
    // close
    cfg(KIND_CLOSE, '{16'h0000});
    take(m);
    chk(m.pl[0] == CMD_RELEASE && m.path == route(2), "RELEASE on the current route");
    @(negedge clk);
    chk(!session_open && !probe_en, "session closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
