// tb_ni_sender: a PE model and a link receiver with controllable credits.
//  - BE packet: passed unchanged on the data lane.
//  - MON packet: the current route (two flits) and the terminator are put in
//    front; mon_beat is high once per offered payload flit.
//  - MON packet while blocked: held back until the block is lifted.
//  - OPEN packet: delivered to the configuration port, nothing on the link.
//  - Control messages from both monitors: serialised on the control lane
//    (route, terminator, size, payload), the master's first, and sent ahead of
//    data whenever the control lane has credit; with the control credit low,
//    data still flows.
module tb_ni_sender;
  import monoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pe_valid, pe_ready, pe_last, cfg_valid, cfg_last, cfg_ready, block, mon_beat;
  flit_t pe_data, cfg_data;
  pe_kind_e pe_kind, cfg_kind;
  path_t cur_path;
  logic mst_msg_valid, mst_msg_ack, slv_msg_valid, slv_msg_ack;
  ctrl_msg_t mst_msg, slv_msg;
  link_t out_link;
  logic [1:0] credit_in;
  ni_sender dut (.*);

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

  flit_t got [2][$];
  flit_t cfg_got [$];
  int beats = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_link.tx && credit_in[out_link.lane]) got[int'(out_link.lane)].push_back(out_link.data);
    if (cfg_valid && cfg_ready) cfg_got.push_back(cfg_data);
    if (mon_beat) beats++;
  end

  logic took, m_acked, s_acked;
  always_ff @(posedge clk) begin
    m_acked <= mst_msg_valid && mst_msg_ack;
    s_acked <= slv_msg_valid && slv_msg_ack;
  end
  always_ff @(posedge clk) took <= pe_valid && pe_ready;
  task automatic send(pe_kind_e k, flit_t f[]);
    foreach (f[i]) begin
      pe_valid = 1; pe_kind = k; pe_data = f[i]; pe_last = (i == f.size() - 1);
      do @(negedge clk); while (!took);
    end
    pe_valid = 0;
  endtask

  function automatic bit same(flit_t a[$], flit_t b[]);
    if (a.size() != b.size()) return 0;
    foreach (b[k]) if (a[k] != b[k]) return 0;
    return 1;
  endfunction

  initial begin
    pe_valid = 0; pe_last = 0; pe_data = 0; pe_kind = KIND_BE; cfg_ready = 1; block = 0;
    cur_path = '{16'hFFFF, 16'h2222, 16'h0000};
    mst_msg_valid = 0; slv_msg_valid = 0; mst_msg = '0; slv_msg = '0; credit_in = 2'b11;
    repeat (2) @(negedge clk);
    rst_n = 1;
    send(KIND_BE, '{16'h00FF, 16'hFFFF, 16'd2, 16'hAAAA, 16'hBBBB});
    repeat (3) @(negedge clk);
    chk(same(got[0], '{16'h00FF, 16'hFFFF, 16'd2, 16'hAAAA, 16'hBBBB}), "BE packet unchanged");
    got[0].delete();
    send(KIND_MON, '{16'd3, 16'h0001, 16'h0002, 16'h0003});
    repeat (3) @(negedge clk);
    chk(same(got[0], '{16'h0000, 16'h2222, 16'hFFFF, 16'h8003, 16'h0001, 16'h0002, 16'h0003}), "MON packet gets the route and the monitored mark");
    chk(beats == 3, "one mon_beat per payload flit");
    got[0].delete();
    block = 1;
    fork send(KIND_MON, '{16'd1, 16'h0009}); join_none
    repeat (10) @(negedge clk);
    chk(got[0].size() == 0, "blocked flow held back");
    cur_path = '{16'hFFFF, 16'h2200, 16'h2200};
    block = 0;
    repeat (10) @(negedge clk);
    chk(same(got[0], '{16'h2200, 16'h2200, 16'hFFFF, 16'h8001, 16'h0009}), "released flow uses the new route");
    got[0].delete();
    send(KIND_OPEN, '{16'd200, 16'd120, 16'd4});
    repeat (2) @(negedge clk);
    chk(same(cfg_got, '{16'd200, 16'd120, 16'd4}) && got[0].size() == 0, "OPEN to the configuration port");
    // control messages while a long data packet streams
    mst_msg.path = '{16'hFFFF, 16'hFFFF, 16'h1111}; mst_msg.len = 4'd2;
    mst_msg.pl[0] = CMD_VIOLATION; mst_msg.pl[1] = 16'd7;
    slv_msg.path = '{16'hFFFF, 16'hFFFF, 16'h3FFF}; slv_msg.len = 4'd1; slv_msg.pl[0] = CMD_LOWINJ;
    fork send(KIND_BE, '{16'hFFFF, 16'd20, 16'd1, 16'd2, 16'd3, 16'd4, 16'd5, 16'd6, 16'd7, 16'd8, 16'd9,
                         16'd10, 16'd11, 16'd12, 16'd13, 16'd14, 16'd15, 16'd16, 16'd17, 16'd18, 16'd19, 16'd20});
    join_none
    repeat (3) @(negedge clk);
    mst_msg_valid = 1; slv_msg_valid = 1;
    do @(negedge clk); while (!(m_acked || s_acked));
    chk(m_acked && !s_acked, "master message first");
    mst_msg_valid = 0;
    do @(negedge clk); while (!s_acked);
    slv_msg_valid = 0;
    repeat (12) @(negedge clk);
    chk(same(got[1], '{16'h1111, 16'hFFFF, 16'd2, CMD_VIOLATION, 16'd7, 16'h3FFF, 16'hFFFF, 16'd1, CMD_LOWINJ}),
        "control packets serialised");
    chk(got[0].size() < 22, "control lane ahead of the data packet");
    // control credit low: data continues
    credit_in = 2'b01;
    slv_msg_valid = 1;
    repeat (20) @(negedge clk);
    chk(got[0].size() == 22, "data flows while the control lane has no credit");
    credit_in = 2'b11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
