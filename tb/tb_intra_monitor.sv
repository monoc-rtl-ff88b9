// tb_intra_monitor: replays the worked example of the monitoring structures
// with OTS = 1000: window 1 = 800 Free / 200 Transmitting, window 2 = 600 /
// 400, window 3 = Free 0-300, Transmitting 300-400, Stalled 400-600,
// Transmitting 600-900, Free 900-1000. Expected CVS and AVS:
//   CVS 800/200/0, 600/400/0, 400/400/200; AVS 800/200/0, 700/300/0, 550/350/100.
// Also checks the FSM state per cycle, the operation interface (sum and
// maximum accumulation of the link use, Transmitting + Stalled AVS) and that
// SET_OTS changes the window length.
module tb_intra_monitor;
  import monoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic obs_tx, op_en;
  lane_e obs_lane;
  logic [1:0] obs_credit;
  iam_cmd_e op_cmd;
  flit_t op_din, op_dout;
  iam_state_e state;
  logic [15:0] cvs_free, cvs_trans, cvs_stall, avs_free, avs_trans, avs_stall, link_use;
  intra_monitor dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one cycle of a given condition
  task automatic cyc(iam_state_e s);
    obs_lane   = LANE_DATA;
    obs_tx     = (s != IAM_FREE);
    obs_credit = (s == IAM_TRANS) ? 2'b01 : 2'b10;
    @(negedge clk);
    chk(16'(state), 16'(s), "FSM state");
  endtask

  initial begin
    obs_tx = 0; obs_lane = LANE_DATA; obs_credit = 2'b11; op_en = 0; op_cmd = IAM_NOP; op_din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // window 1
    repeat (800) cyc(IAM_FREE);
    repeat (200) cyc(IAM_TRANS);
    chk(cvs_free, 800, "CVS1 free"); chk(cvs_trans, 200, "CVS1 trans"); chk(cvs_stall, 0, "CVS1 stall");
    chk(avs_free, 800, "AVS1 free"); chk(avs_trans, 200, "AVS1 trans"); chk(avs_stall, 0, "AVS1 stall");
    // window 2
    repeat (600) cyc(IAM_FREE);
    repeat (400) cyc(IAM_TRANS);
    chk(cvs_free, 600, "CVS2 free"); chk(cvs_trans, 400, "CVS2 trans");
    chk(avs_free, 700, "AVS2 free"); chk(avs_trans, 300, "AVS2 trans"); chk(avs_stall, 0, "AVS2 stall");
    // window 3, the timeline of the example
    repeat (300) cyc(IAM_FREE);
    repeat (100) cyc(IAM_TRANS);
    repeat (200) cyc(IAM_STALL);
    repeat (300) cyc(IAM_TRANS);
    repeat (100) cyc(IAM_FREE);
    chk(cvs_free, 400, "CVS3 free"); chk(cvs_trans, 400, "CVS3 trans"); chk(cvs_stall, 200, "CVS3 stall");
    chk(avs_free, 550, "AVS3 free"); chk(avs_trans, 350, "AVS3 trans"); chk(avs_stall, 100, "AVS3 stall");
    chk(link_use, 450, "link use = trans + stall AVS");
    // a stall on the control lane while the data lane has room
    obs_tx = 1; obs_lane = LANE_CTRL; obs_credit = 2'b01;
    @(negedge clk);
    chk(16'(state), 16'(IAM_STALL), "stall judged on the offered lane");
    obs_tx = 0;
    // operation interface
    op_cmd = IAM_ACC_SUM; op_din = 16'd100; #1;
    chk(op_dout, 550, "sum accumulation");
    op_cmd = IAM_ACC_MAX; op_din = 16'd300; #1;
    chk(op_dout, 450, "max accumulation, own larger");
    op_din = 16'd900; #1;
    chk(op_dout, 900, "max accumulation, incoming larger");
    op_cmd = IAM_ACC_SUM; op_din = 16'hFFF0; #1;
    chk(op_dout, 16'hFFFF, "sum saturates");
    // SET_OTS = 10: structures cleared, 10-cycle windows
    @(negedge clk);
    op_cmd = IAM_SET_OTS; op_din = 16'd10; op_en = 1;
    @(negedge clk);
    op_en = 0; op_cmd = IAM_NOP;
    repeat (7) cyc(IAM_TRANS);
    repeat (3) cyc(IAM_FREE);
    chk(cvs_trans, 7, "CVS after OTS=10"); chk(avs_trans, 7, "AVS after OTS=10 (first window)");
    chk(cvs_free, 3, "CVS free after OTS=10");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
