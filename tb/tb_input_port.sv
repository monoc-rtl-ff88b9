// tb_input_port: sends packets into both lanes of an input port while a
// random-ready consumer pops the offered flits. Checks, per lane, the
// requested output port, the flit sequence (leading hop consumed, exhausted
// path flits dropped, terminator, size, payload), the last flag, credit
// back-pressure (no more than 4 flits accepted without pops) and that a
// control packet overtakes a stalled data packet.
module tb_input_port;
  import monoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  link_t in_link;
  logic [1:0] credit_out, req, last, pop, dropped;
  port_e [1:0] dir;
  flit_t [1:0] flit;
  input_port dut (.*);

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

  // expected output per lane: {dir, flit, last}
  typedef struct { port_e d; flit_t f; bit l; } exp_t;
  exp_t expq [2][$];
  bit   ready_en [2];
  int   popped [2];

  // consumer
  always_ff @(posedge clk) begin
    for (int l = 0; l < 2; l++) if (pop[l]) begin
      popped[l] <= popped[l] + 1;
    end
  end
  always_comb for (int l = 0; l < 2; l++) pop[l] = req[l] && ready_en[l];

  always @(posedge clk) begin
    for (int l = 0; l < 2; l++) if (rst_n && pop[l]) begin
      exp_t e;
      checks++;
      if (expq[l].size() == 0) begin failures++; $display("FAIL lane %0d unexpected flit %h", l, flit[l]); end
      else begin
        e = expq[l].pop_front();
        if (dir[l] != e.d || flit[l] != e.f || last[l] != e.l) begin
          failures++;
          $display("FAIL lane %0d got dir %0d flit %h last %0d exp %0d %h %0d", l, dir[l], flit[l], last[l], e.d, e.f, e.l);
        end
      end
    end
  end

  task automatic put(lane_e l, flit_t f);
    in_link.tx = 1; in_link.lane = l; in_link.data = f;
    while (!credit_out[l]) @(negedge clk);
    @(negedge clk);
    in_link.tx = 0;
  endtask

  task automatic exp_pkt(int l, port_e d, flit_t fl[], int npl);
    for (int i = 0; i < fl.size(); i++) expq[l].push_back('{d, fl[i], 1'b0});
    expq[l].push_back('{d, flit_t'(npl), npl == 0});
    for (int i = 1; i <= npl; i++) expq[l].push_back('{d, flit_t'(16'hA000 + i), i == npl});
  endtask

  task automatic send_pkt(lane_e l, flit_t path[], int npl);
    foreach (path[i]) put(l, path[i]);
    put(l, flit_t'(npl));
    for (int i = 1; i <= npl; i++) put(l, flit_t'(16'hA000 + i));
  endtask

  initial begin
    int n;
    in_link = '0; ready_en = '{1, 1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1: EENN in one flit: East, flit leaves as 022F
    exp_pkt(0, P_EAST, '{16'h022F, 16'hFFFF}, 3);
    send_pkt(LANE_DATA, '{16'h0022, 16'hFFFF}, 3);
    // 2: one hop left in the first flit: dropped, next path flit follows
    exp_pkt(0, P_NORTH, '{16'h3333, 16'hFFFF}, 2);
    send_pkt(LANE_DATA, '{16'h2FFF, 16'h3333, 16'hFFFF}, 2);
    // 3: arrived: terminator at the head goes to Local
    exp_pkt(0, P_LOCAL, '{16'hFFFF}, 4);
    send_pkt(LANE_DATA, '{16'hFFFF}, 4);
    // 4: control lane, size 0, the size flit is last
    exp_pkt(1, P_WEST, '{16'h1FFF, 16'hFFFF}, 0);
    send_pkt(LANE_CTRL, '{16'h11FF, 16'hFFFF}, 0);
    repeat (20) @(negedge clk);
    chk(expq[0].size() == 0 && expq[1].size() == 0, "all packets delivered");
    // 5: back-pressure: consumer stopped, the 4-flit data lane fills
    ready_en = '{0, 1};
    exp_pkt(0, P_SOUTH, '{16'h3FFF, 16'hFFFF}, 1);
    send_pkt(LANE_DATA, '{16'h33FF, 16'hFFFF}, 1);   // exactly fills the lane
    repeat (10) @(negedge clk);
    chk(!credit_out[0], "data lane credit low when full");
    n = popped[0];
    // 6: control packet overtakes the stalled data packet
    exp_pkt(1, P_EAST, '{16'h0FFF, 16'hFFFF}, 5);
    send_pkt(LANE_CTRL, '{16'h00FF, 16'hFFFF}, 5);
    repeat (20) @(negedge clk);
    chk(expq[1].size() == 0, "control packet through while data stalled");
    chk(popped[0] == n, "data lane held");
    ready_en = '{1, 1};
    repeat (40) @(negedge clk);
    chk(expq[0].size() == 0, "data packet completes after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
