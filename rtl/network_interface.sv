// network_interface: the MoNoC network interface between a PE and its router.
//
// Holds the NISender and NIReceiver and the Inter Monitor: mstMonitor with its
// mstProbe (counting monitored payload flits the sender injects) and
// slvMonitor with its slvProbe (counting payload flits delivered to the PE).
// Either side can be active: a node is master of the session it opened and
// slave of a session another node opened towards it. The monitors exchange
// control packets over the control lane of the same link as the data.
//
// PE transmit port: pe_tx_* (see ni_sender). PE receive port: pe_rx_* (see
// ni_receiver). Link: out_link/credit_in towards the router's local input,
// in_link/credit_out from its local output.
module network_interface
  import monoc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // PE transmit
  input  logic              pe_tx_valid,
  output logic              pe_tx_ready,
  input  flit_t             pe_tx_data,
  input  pe_kind_e          pe_tx_kind,
  input  logic              pe_tx_last,
  output logic              pe_blocked,
  // PE receive
  output logic              pe_rx_valid,
  input  logic              pe_rx_ready,
  output flit_t             pe_rx_data,
  output logic              pe_rx_last,
  // router link
  output link_t             out_link,
  input  logic [NLANES-1:0] credit_in,
  input  link_t             in_link,
  output logic [NLANES-1:0] credit_out,
  // status
  output logic              mst_open,
  output logic              slv_open,
  output logic [1:0]        mst_route,
  output logic              ev_violation,
  output logic              ev_lowinj,
  output logic              ev_adapt,
  output logic              ev_close,
  output logic              ev_select
);
  logic             cfg_valid, cfg_last, cfg_ready;
  flit_t            cfg_data;
  pe_kind_e         cfg_kind;
  path_t            cur_path;
  logic             block, mon_beat, data_beat;
  logic             mst_msg_valid, mst_msg_ack, slv_msg_valid, slv_msg_ack;
  ctrl_msg_t        mst_msg, slv_msg;
  logic             mst_rx_valid, slv_rx_valid;
  rx_msg_t          rx_msg;
  logic             mp_clear, mp_en, sp_clear, sp_en, sp_done, mp_done;
  logic [CNT_W-1:0] m_mts, s_mts, air, crr, mp_ovs, mp_cvs, sp_ovs, sp_avs;
  logic [1:0]       best_idx;
  logic             slv_viol;

  assign pe_blocked = block;

  ni_sender u_sender (
    .clk, .rst_n,
    .pe_valid(pe_tx_valid), .pe_ready(pe_tx_ready), .pe_data(pe_tx_data),
    .pe_kind(pe_tx_kind), .pe_last(pe_tx_last),
    .cfg_valid, .cfg_data, .cfg_kind, .cfg_last, .cfg_ready,
    .cur_path, .block, .mon_beat,
    .mst_msg_valid, .mst_msg, .mst_msg_ack,
    .slv_msg_valid, .slv_msg, .slv_msg_ack,
    .out_link, .credit_in);

  ni_receiver u_receiver (
    .clk, .rst_n, .in_link, .credit_out,
    .pe_valid(pe_rx_valid), .pe_ready(pe_rx_ready), .pe_data(pe_rx_data),
    .pe_last(pe_rx_last), .data_beat,
    .mst_rx_valid, .slv_rx_valid, .rx_msg);

  mst_monitor u_mst (
    .clk, .rst_n,
    .cfg_valid, .cfg_data, .cfg_kind, .cfg_last, .cfg_ready,
    .cur_path, .block,
    .msg_valid(mst_msg_valid), .msg(mst_msg), .msg_ack(mst_msg_ack),
    .rx_valid(mst_rx_valid), .rx_msg,
    .probe_clear(mp_clear), .probe_en(mp_en), .mts(m_mts), .air,
    .session_open(mst_open), .cur_idx(mst_route),
    .ev_violation, .ev_lowinj, .ev_adapt, .ev_close);

  rate_probe u_mst_probe (
    .clk, .rst_n, .clear(mp_clear), .en(mp_en), .mts(m_mts), .inc(mon_beat),
    .ovs(mp_ovs), .cvs(mp_cvs), .avs(air), .win_done(mp_done));

  slv_monitor u_slv (
    .clk, .rst_n,
    .rx_valid(slv_rx_valid), .rx_msg,
    .msg_valid(slv_msg_valid), .msg(slv_msg), .msg_ack(slv_msg_ack),
    .probe_clear(sp_clear), .probe_en(sp_en), .mts(s_mts), .crr, .win_done(sp_done),
    .session_open(slv_open), .best_idx, .ev_violation(slv_viol), .ev_select);

  rate_probe u_slv_probe (
    .clk, .rst_n, .clear(sp_clear), .en(sp_en), .mts(s_mts), .inc(data_beat),
    .ovs(sp_ovs), .cvs(crr), .avs(sp_avs), .win_done(sp_done));
endmodule
