// intra_monitor: the Intra Monitor (IAM) attached to every router output port.
//
// Observation interface: each cycle the link's tx, lane and the neighbour's
// per-lane credits classify the port as Free (nothing offered), Transmitting
// (a flit offered and the neighbour lane has room) or Stalled (a flit offered,
// no room). A three-state FSM holds that state; per state an avs_stat keeps
// OVS/CVS/AVS over an Observation Time Slice of OTS cycles (1000 by default,
// as in the worked example).
//
// Operation interface: a control packet passing through the port drives
// op_cmd/op_din. IAM_SET_OTS (with op_en) loads a new OTS and restarts the
// window; IAM_ACC_SUM and IAM_ACC_MAX return on op_dout, combinationally, the
// input accumulated with this port's link use, defined here as the AVS of
// Transmitting plus Stalled cycles (busy cycles per OTS). The document only
// says control packets read the AVS; counting stalled cycles as use is this
// design's choice. From Free the FSM may enter Stalled directly, as the text's
// conditions imply.
module intra_monitor
  import monoc_pkg::*;
#(
  parameter int OTS_DEFAULT = 1000
) (
  input  logic             clk,
  input  logic             rst_n,
  // observation interface
  input  logic             obs_tx,
  input  lane_e            obs_lane,
  input  logic [NLANES-1:0] obs_credit,
  // operation interface
  input  logic             op_en,
  input  iam_cmd_e         op_cmd,
  input  flit_t            op_din,
  output flit_t            op_dout,
  // structures, for inspection
  output iam_state_e       state,
  output logic [CNT_W-1:0] cvs_free, cvs_trans, cvs_stall,
  output logic [CNT_W-1:0] avs_free, avs_trans, avs_stall,
  output logic [CNT_W-1:0] link_use
);
  iam_state_e       nxt;
  logic [CNT_W-1:0] ots, tcnt;
  logic             win_end, set_ots;
  logic [CNT_W-1:0] ovs_f, ovs_t, ovs_s;

  always_comb begin
    if (!obs_tx)                 nxt = IAM_FREE;
    else if (obs_credit[obs_lane]) nxt = IAM_TRANS;
    else                         nxt = IAM_STALL;
  end

  assign set_ots = op_en && (op_cmd == IAM_SET_OTS) && (op_din != '0);
  assign win_end = (tcnt == ots - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IAM_FREE;
      ots   <= CNT_W'(OTS_DEFAULT);
      tcnt  <= '0;
    end else begin
      state <= nxt;
      if (set_ots) begin
        ots  <= op_din;
        tcnt <= '0;
      end else begin
        tcnt <= win_end ? '0 : tcnt + 1'b1;
      end
    end
  end

  avs_stat #(.W(CNT_W)) u_free  (.clk, .rst_n, .clear(set_ots), .inc(nxt == IAM_FREE),
                                 .win_end, .ovs(ovs_f), .cvs(cvs_free),  .avs(avs_free));
  avs_stat #(.W(CNT_W)) u_trans (.clk, .rst_n, .clear(set_ots), .inc(nxt == IAM_TRANS),
                                 .win_end, .ovs(ovs_t), .cvs(cvs_trans), .avs(avs_trans));
  avs_stat #(.W(CNT_W)) u_stall (.clk, .rst_n, .clear(set_ots), .inc(nxt == IAM_STALL),
                                 .win_end, .ovs(ovs_s), .cvs(cvs_stall), .avs(avs_stall));

  assign link_use = sat_add(avs_trans, avs_stall);

  always_comb begin
    case (op_cmd)
      IAM_ACC_SUM: op_dout = sat_add(op_din, link_use);
      IAM_ACC_MAX: op_dout = (link_use > op_din) ? link_use : op_din;
      default:     op_dout = op_din;
    endcase
  end
endmodule
