// monoc_router: a 5-port MoNoC router (East, West, North, South, Local).
//
// Five input ports (Regulator + two lane buffers), a crossbar and five output
// ports (Arbiter, Granter, Intra Monitor). Routing is by source route: the
// input lanes read the next hop from the packet's own path field, so the
// router computes no routes. A flit needs two cycles from the head of an
// input buffer to the link when the output lane is free (one to decode the
// hop, one to win the lane), then moves one flit per cycle.
//
// Links: in_link[p]/credit_out[p] is the channel entering through port p,
// out_link[p]/credit_in[p] the one leaving through it. Port indices follow
// port_e.
module monoc_router
  import monoc_pkg::*;
#(
  parameter int OTS_DEFAULT = 1000
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  link_t [NPORTS-1:0]                 in_link,
  output logic  [NPORTS-1:0][NLANES-1:0]     credit_out,
  output link_t [NPORTS-1:0]                 out_link,
  input  logic  [NPORTS-1:0][NLANES-1:0]     credit_in,
  output logic  [NPORTS-1:0][CNT_W-1:0]      link_use,
  output logic  [NPORTS-1:0]                 ev_preempt,
  output logic  [NPORTS-1:0]                 ev_stall,
  output logic  [NPORTS-1:0]                 ev_drop
);
  logic  [NPORTS-1:0][NLANES-1:0]             in_req, in_last, in_pop, in_drop;
  port_e [NPORTS-1:0][NLANES-1:0]             in_dir;
  flit_t [NPORTS-1:0][NLANES-1:0]             in_flit;
  logic  [NPORTS-1:0][NLANES-1:0][NPORTS-1:0] req_vec;
  logic  [NPORTS-1:0][NLANES-1:0][2:0]        owner;
  logic  [NPORTS-1:0][NLANES-1:0]             owner_v, o_valid, o_last, o_pop;
  flit_t [NPORTS-1:0][NLANES-1:0]             o_flit;
  iam_state_e [NPORTS-1:0]                    iam_state;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    input_port u_in (
      .clk, .rst_n,
      .in_link   (in_link[p]),
      .credit_out(credit_out[p]),
      .req       (in_req[p]),
      .dir       (in_dir[p]),
      .flit      (in_flit[p]),
      .last      (in_last[p]),
      .pop       (in_pop[p]),
      .dropped   (in_drop[p]));
    assign ev_drop[p] = |in_drop[p];

    output_port #(.OTS_DEFAULT(OTS_DEFAULT)) u_out (
      .clk, .rst_n,
      .req_vec   (req_vec[p]),
      .owner     (owner[p]),
      .owner_v   (owner_v[p]),
      .sel_valid (o_valid[p]),
      .sel_flit  (o_flit[p]),
      .sel_last  (o_last[p]),
      .pop       (o_pop[p]),
      .out_link  (out_link[p]),
      .credit_in (credit_in[p]),
      .link_use  (link_use[p]),
      .iam_state (iam_state[p]),
      .ev_preempt(ev_preempt[p]),
      .ev_stall  (ev_stall[p]));
  end

  crossbar u_xbar (
    .in_req, .in_dir, .in_flit, .in_last, .in_pop,
    .out_req_vec(req_vec), .out_owner(owner), .out_owner_v(owner_v),
    .out_valid(o_valid), .out_flit(o_flit), .out_last(o_last), .out_pop(o_pop));
endmodule
