// monoc_top: a MoNoC network on chip, an XS x YS mesh (5 x 5 by default, the
// size of the evaluated system) of monoc_router, each with a
// network_interface on its local port.
//
// Node n = y*XS + x sits at column x, row y; East is x+1 and North is y+1.
// Mesh edges are closed: an edge output sees no credit and an edge input
// receives nothing. The processing elements are outside: every node's PE
// transmit and receive ports are brought out as arrays indexed by node, with
// per-node session status and event pulses for observation.
module monoc_top
  import monoc_pkg::*;
#(
  parameter int XS = 5,
  parameter int YS = 5,
  parameter int OTS_DEFAULT = 1000
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic     [XS*YS-1:0]         pe_tx_valid,
  output logic     [XS*YS-1:0]         pe_tx_ready,
  input  flit_t    [XS*YS-1:0]         pe_tx_data,
  input  pe_kind_e [XS*YS-1:0]         pe_tx_kind,
  input  logic     [XS*YS-1:0]         pe_tx_last,
  output logic     [XS*YS-1:0]         pe_blocked,
  output logic     [XS*YS-1:0]         pe_rx_valid,
  input  logic     [XS*YS-1:0]         pe_rx_ready,
  output flit_t    [XS*YS-1:0]         pe_rx_data,
  output logic     [XS*YS-1:0]         pe_rx_last,
  output logic     [XS*YS-1:0]         mst_open,
  output logic     [XS*YS-1:0]         slv_open,
  output logic     [XS*YS-1:0][1:0]    mst_route,
  output logic     [XS*YS-1:0]         ev_violation,
  output logic     [XS*YS-1:0]         ev_lowinj,
  output logic     [XS*YS-1:0]         ev_adapt,
  output logic     [XS*YS-1:0]         ev_close,
  output logic     [XS*YS-1:0]         ev_select,
  output logic     [XS*YS-1:0]         ev_preempt,
  output logic     [XS*YS-1:0]         ev_stall,
  output logic     [XS*YS-1:0]         ev_drop
);
  localparam int N = XS * YS;

  link_t [N-1:0][NPORTS-1:0]             r_in, r_out;
  logic  [N-1:0][NPORTS-1:0][NLANES-1:0] r_cred_out, r_cred_in;
  logic  [N-1:0][NPORTS-1:0][CNT_W-1:0]  link_use;
  logic  [N-1:0][NPORTS-1:0]             pre, stl, drp;

  for (genvar y = 0; y < YS; y++) begin : g_y
    for (genvar x = 0; x < XS; x++) begin : g_x
      localparam int n = y * XS + x;

      // East
      if (x < XS - 1) begin : g_e
        assign r_in[n][P_EAST]      = r_out[n+1][P_WEST];
        assign r_cred_in[n][P_EAST] = r_cred_out[n+1][P_WEST];
      end else begin : g_e_edge
        assign r_in[n][P_EAST]      = '0;
        assign r_cred_in[n][P_EAST] = '0;
      end
      // West
      if (x > 0) begin : g_w
        assign r_in[n][P_WEST]      = r_out[n-1][P_EAST];
        assign r_cred_in[n][P_WEST] = r_cred_out[n-1][P_EAST];
      end else begin : g_w_edge
        assign r_in[n][P_WEST]      = '0;
        assign r_cred_in[n][P_WEST] = '0;
      end
      // North
      if (y < YS - 1) begin : g_n
        assign r_in[n][P_NORTH]      = r_out[n+XS][P_SOUTH];
        assign r_cred_in[n][P_NORTH] = r_cred_out[n+XS][P_SOUTH];
      end else begin : g_n_edge
        assign r_in[n][P_NORTH]      = '0;
        assign r_cred_in[n][P_NORTH] = '0;
      end
      // South
      if (y > 0) begin : g_s
        assign r_in[n][P_SOUTH]      = r_out[n-XS][P_NORTH];
        assign r_cred_in[n][P_SOUTH] = r_cred_out[n-XS][P_NORTH];
      end else begin : g_s_edge
        assign r_in[n][P_SOUTH]      = '0;
        assign r_cred_in[n][P_SOUTH] = '0;
      end

      monoc_router #(.OTS_DEFAULT(OTS_DEFAULT)) u_router (
        .clk, .rst_n,
        .in_link   (r_in[n]),
        .credit_out(r_cred_out[n]),
        .out_link  (r_out[n]),
        .credit_in (r_cred_in[n]),
        .link_use  (link_use[n]),
        .ev_preempt(pre[n]),
        .ev_stall  (stl[n]),
        .ev_drop   (drp[n]));

      assign ev_preempt[n] = |pre[n];
      assign ev_stall[n]   = |stl[n];
      assign ev_drop[n]    = |drp[n];

      network_interface u_ni (
        .clk, .rst_n,
        .pe_tx_valid(pe_tx_valid[n]), .pe_tx_ready(pe_tx_ready[n]),
        .pe_tx_data(pe_tx_data[n]), .pe_tx_kind(pe_tx_kind[n]), .pe_tx_last(pe_tx_last[n]),
        .pe_blocked(pe_blocked[n]),
        .pe_rx_valid(pe_rx_valid[n]), .pe_rx_ready(pe_rx_ready[n]),
        .pe_rx_data(pe_rx_data[n]), .pe_rx_last(pe_rx_last[n]),
        .out_link  (r_in[n][P_LOCAL]),
        .credit_in (r_cred_out[n][P_LOCAL]),
        .in_link   (r_out[n][P_LOCAL]),
        .credit_out(r_cred_in[n][P_LOCAL]),
        .mst_open(mst_open[n]), .slv_open(slv_open[n]), .mst_route(mst_route[n]),
        .ev_violation(ev_violation[n]), .ev_lowinj(ev_lowinj[n]), .ev_adapt(ev_adapt[n]),
        .ev_close(ev_close[n]), .ev_select(ev_select[n]));
    end
  end
endmodule
