// tb_output_port: model input lanes feed an output port.
//  - FCFS: data requests from ports 3, 1, 0 arriving in that order are served
//    in that order (not by index).
//  - SETUP on the control lane sets OTS = 20 in the Intra Monitor; a long data
//    packet then keeps the link busy, so the link use becomes 20.
//  - A PROBE (sum 100, max 10, hops 3) interrupts the data packet (preemption)
//    and leaves with sum 120, max 20, hops 4.
//  - With no credit the port offers a flit and stalls without losing it.
module tb_output_port;
  import monoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [1:0][4:0] req_vec;
  logic  [1:0][2:0] owner;
  logic  [1:0]      owner_v, sel_valid, sel_last, pop, credit_in;
  flit_t [1:0]      sel_flit;
  link_t            out_link;
  logic  [15:0]     link_use;
  iam_state_e       iam_state;
  logic             ev_preempt, ev_stall;
  output_port dut (.*);

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

  // source model: per lane and input port a flit store with last flags
  flit_t sf [2][5][512];
  bit    sl [2][5][512];
  int    wr [2][5], rd [2][5];

  always_comb begin
    for (int l = 0; l < 2; l++) begin
      for (int i = 0; i < 5; i++) req_vec[l][i] = (rd[l][i] < wr[l][i]);
      sel_valid[l] = rd[l][owner[l]] < wr[l][owner[l]];
      sel_flit[l]  = sf[l][owner[l]][rd[l][owner[l]] % 512];
      sel_last[l]  = sl[l][owner[l]][rd[l][owner[l]] % 512];
    end
  end
  always_ff @(posedge clk) for (int l = 0; l < 2; l++) if (pop[l]) rd[l][owner[l]] <= rd[l][owner[l]] + 1;

  task automatic add_pkt(int l, int i, flit_t f[]);
    foreach (f[k]) begin
      sf[l][i][(wr[l][i] + k) % 512] = f[k];
      sl[l][i][(wr[l][i] + k) % 512] = (k == f.size() - 1);
    end
    wr[l][i] += f.size();
  endtask

  // link capture
  flit_t got [2][$];
  int preempts = 0, stalls = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_link.tx && credit_in[out_link.lane]) got[int'(out_link.lane)].push_back(out_link.data);
    if (ev_preempt) preempts++;
    if (ev_stall) stalls++;
  end

  initial begin
    flit_t longp[] = new[230];
    for (int l = 0; l < 2; l++) for (int i = 0; i < 5; i++) begin wr[l][i] = 0; rd[l][i] = 0; end
    credit_in = 2'b11;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // FCFS
    add_pkt(0, 3, '{16'h0003, 16'h1111, 16'h1112, 16'h1113, 16'h1114, 16'h1115});
    repeat (2) @(negedge clk);
    add_pkt(0, 1, '{16'h0001, 16'h2222});
    @(negedge clk);
    add_pkt(0, 0, '{16'h0000, 16'h3333});
    repeat (20) @(negedge clk);
    chk(got[0].size() == 10, "three packets passed");
    chk(got[0][0] == 16'h0003 && got[0][6] == 16'h0001 && got[0][8] == 16'h0000, "first come, first served");
    got[0].delete();
    // SETUP with OTS = 20, alongside a long data packet
    for (int k = 0; k < 230; k++) longp[k] = flit_t'(16'h5000 + k);
    add_pkt(0, 4, longp);
    add_pkt(1, 2, '{16'hFFFF, 16'd8, CMD_SETUP, 16'd200, 16'd120, 16'd20, 16'd4, 16'h1111, 16'h3333, 16'hFFFF});
    repeat (80) @(negedge clk);
    chk(got[1].size() == 10, "setup passed unchanged in length");
    chk(link_use == 16'd20, "link use 20 of 20 after OTS set by SETUP");
    got[1].delete();
    // PROBE preempts the data packet
    add_pkt(1, 1, '{16'hFFFF, 16'd5, CMD_PROBE, 16'd2, 16'd100, 16'd10, 16'd3});
    repeat (10) @(negedge clk);
    chk(got[1].size() == 7, "probe passed");
    if (got[1].size() == 7) begin
      chk(got[1][4] == 16'd120, "probe sum + link use");
      chk(got[1][5] == 16'd20,  "probe max with link use");
      chk(got[1][6] == 16'd4,   "probe hop count");
      chk(got[1][3] == 16'd2,   "probe index untouched");
    end
    chk(preempts >= 1, "control flits sent while data waited");
    repeat (200) @(negedge clk);
    chk(got[0].size() == 230, "long data packet complete");
    got[0].delete();
    // stall
    credit_in = 2'b00;
    add_pkt(0, 2, '{16'h0002, 16'h7777});
    repeat (10) @(negedge clk);
    chk(out_link.tx && stalls >= 8 && got[0].size() == 0, "stall without credit");
    chk(iam_state == IAM_STALL, "monitor in Stalled");
    credit_in = 2'b11;
    repeat (5) @(negedge clk);
    chk(got[0].size() == 2 && got[0][1] == 16'h7777, "stalled packet delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
