// tb_ni_receiver: link flits in, PE and monitor outputs checked.
//  - Data packet (terminator, size 3, payload): size and payload delivered with
//    pe_last on the final flit, three data_beat pulses, the terminator removed.
//  - Control packets: VIOLATION goes to the master port, LOWINJ and PROBE to
//    the slave port, with their payloads.
//  - PE not ready: the data lane fills (4 flits), its credit drops, while a
//    control packet still gets through.
module tb_ni_receiver;
  import monoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  link_t in_link;
  logic [1:0] credit_out;
  logic pe_valid, pe_ready, pe_last, data_beat, mst_rx_valid, slv_rx_valid;
  flit_t pe_data;
  rx_msg_t rx_msg;
  ni_receiver dut (.*);

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

  flit_t pe_got [$];
  bit    last_got [$];
  int beats = 0;
  rx_msg_t mst_msgs [$], slv_msgs [$];
  always @(posedge clk) if (rst_n) begin
    if (pe_valid && pe_ready) begin pe_got.push_back(pe_data); last_got.push_back(pe_last); end
    if (data_beat) beats++;
    if (mst_rx_valid) mst_msgs.push_back(rx_msg);
    if (slv_rx_valid) slv_msgs.push_back(rx_msg);
  end

  task automatic put(lane_e l, flit_t f[]);
    foreach (f[k]) begin
      in_link.tx = 1; in_link.lane = l; in_link.data = f[k];
      while (!credit_out[l]) @(negedge clk);
      @(negedge clk);
    end
    in_link.tx = 0;
  endtask

  initial begin
    in_link = '0; pe_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    put(LANE_DATA, '{16'hFFFF, 16'h8003, 16'hA1, 16'hA2, 16'hA3});   // monitored mark set
    repeat (4) @(negedge clk);
    chk(pe_got.size() == 4 && pe_got[0] == 16'd3 && pe_got[1] == 16'hA1 && pe_got[3] == 16'hA3,
        "size and payload delivered, terminator removed");
    chk(last_got.size() == 4 && !last_got[2] && last_got[3], "last flag on the final flit");
    chk(beats == 3, "payload flits of the monitored packet counted");
    put(LANE_DATA, '{16'hFFFF, 16'd2, 16'hB1, 16'hB2});              // unmarked packet
    repeat (4) @(negedge clk);
    chk(beats == 3 && pe_got.size() == 7 && pe_got[4] == 16'd2, "unmarked packet delivered, not counted");
    put(LANE_CTRL, '{16'hFFFF, 16'd2, CMD_VIOLATION, 16'd77});
    put(LANE_CTRL, '{16'hFFFF, 16'd1, CMD_LOWINJ});
    put(LANE_CTRL, '{16'hFFFF, 16'd5, CMD_PROBE, 16'd1, 16'd300, 16'd90, 16'd6});
    repeat (4) @(negedge clk);
    chk(mst_msgs.size() == 1 && mst_msgs[0].pl[0] == CMD_VIOLATION && mst_msgs[0].pl[1] == 16'd77 &&
        mst_msgs[0].len == 4'd2, "VIOLATION to the master");
    chk(slv_msgs.size() == 2 && slv_msgs[0].pl[0] == CMD_LOWINJ && slv_msgs[1].pl[0] == CMD_PROBE &&
        slv_msgs[1].pl[2] == 16'd300 && slv_msgs[1].pl[4] == 16'd6 && slv_msgs[1].len == 4'd5,
        "LOWINJ and PROBE to the slave");
    // back-pressure from the PE
    pe_ready = 0;
    fork put(LANE_DATA, '{16'hFFFF, 16'd6, 16'h1, 16'h2, 16'h3, 16'h4, 16'h5, 16'h6}); join_none
    repeat (10) @(negedge clk);
    chk(!credit_out[0], "data lane credit low while the PE waits");
    pe_ready = 1;
    repeat (12) @(negedge clk);
    chk(pe_got.size() == 4 + 3 + 7 && last_got[13], "packet completes after the PE resumes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
