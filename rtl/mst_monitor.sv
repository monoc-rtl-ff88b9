// mst_monitor: mstMonitor, the master (source) side of the Inter Monitor.
//
// Session opening: the PE's KIND_OPEN packet arrives flit by flit on cfg_*,
// in this order: MTS, AC (payload flits per MTS), OTS, number of routes N,
// the return route from target to source (PATH_FLITS flits), then N routes of
// PATH_FLITS flits each, route 0 being the XY route. The monitor stores them,
// blocks the monitored flow (block), sends a SETUP control packet along route
// 0, clears and enables its probe and unblocks the flow.
//
// Monitoring: on a VIOLATION message from the target, the Average Injection
// Rate (air, the probe's AVS) is compared with AC. AIR < AC means the source
// itself injects slowly: a LOWINJ message tells the target to carry on. Else
// the route is congested: the flow is blocked, monitoring stops and one PROBE
// control packet is sent along each of the N routes. The NEWPATH answer
// selects the route used from then on; the flow is unblocked and monitoring
// restarts. A KIND_CLOSE packet sends RELEASE and ends the session.
//
// Control messages are handed to the NI sender as ctrl_msg_t (msg_valid until
// msg_ack). The sequence follows the document's session-opening chart and
// path-adaptation protocol; the message layout is this design's.
module mst_monitor
  import monoc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // configuration from the NI sender
  input  logic             cfg_valid,
  input  flit_t            cfg_data,
  input  pe_kind_e         cfg_kind,
  input  logic             cfg_last,
  output logic             cfg_ready,
  // to the NI sender
  output path_t            cur_path,
  output logic             block,
  output logic             msg_valid,
  output ctrl_msg_t        msg,
  input  logic             msg_ack,
  // from the NI receiver
  input  logic             rx_valid,
  input  rx_msg_t          rx_msg,
  // mstProbe
  output logic             probe_clear,
  output logic             probe_en,
  output logic [CNT_W-1:0] mts,
  input  logic [CNT_W-1:0] air,
  // status
  output logic             session_open,
  output logic [1:0]       cur_idx,
  output logic             ev_violation,  // notification received
  output logic             ev_lowinj,     // judged as low injection
  output logic             ev_adapt,      // new route taken
  output logic             ev_close
);
  typedef enum logic [3:0] {
    M_IDLE, M_CFG, M_SETUP, M_MONITOR, M_LOWINJ, M_PROBE, M_WAIT_PATH, M_CLOSE, M_SKIP
  } m_e;
  m_e st;

  logic [CNT_W-1:0] ac, ots;
  logic [2:0]       npaths;
  path_t            ret_path;
  path_t [MAX_PATHS-1:0] paths;
  logic [5:0]       cidx;   // configuration flit index
  logic [1:0]       pk;     // route being probed

  // configuration flit index -> field
  localparam int CF_RET  = 4;
  localparam int CF_PATH = CF_RET + PATH_FLITS;

  assign cfg_ready = (st == M_IDLE) || (st == M_CFG) || (st == M_SKIP) ||
                     ((st == M_MONITOR) && cfg_kind == KIND_CLOSE);
  assign cur_path  = paths[cur_idx];
  assign probe_en  = (st == M_MONITOR) || (st == M_LOWINJ);

  always_comb begin
    msg       = '0;
    msg.pl    = '0;
    msg_valid = 1'b0;
    case (st)
      M_SETUP: begin
        msg_valid         = 1'b1;
        msg.path          = paths[0];
        msg.len           = 4'(SU_LEN);
        msg.pl[0]         = CMD_SETUP;
        msg.pl[SU_MTS]    = mts;
        msg.pl[SU_AC]     = ac;
        msg.pl[SU_OTS]    = ots;
        msg.pl[SU_NPATHS] = FLIT_W'(npaths);
        for (int k = 0; k < PATH_FLITS; k++) msg.pl[SU_RET+k] = ret_path[k];
      end
      M_LOWINJ: begin
        msg_valid = 1'b1;
        msg.path  = paths[cur_idx];
        msg.len   = 4'd1;
        msg.pl[0] = CMD_LOWINJ;
      end
      M_PROBE: begin
        msg_valid      = 1'b1;
        msg.path       = paths[pk];
        msg.len        = 4'(PR_LEN);
        msg.pl[0]      = CMD_PROBE;
        msg.pl[PR_IDX] = FLIT_W'(pk);
      end
      M_CLOSE: begin
        msg_valid = 1'b1;
        msg.path  = paths[cur_idx];
        msg.len   = 4'd1;
        msg.pl[0] = CMD_RELEASE;
      end
      default: ;
    endcase
  end

  logic viol;
  assign viol = rx_valid && rx_msg.pl[0] == CMD_VIOLATION;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; mts <= CNT_W'(1000); ac <= '0; ots <= CNT_W'(1000); npaths <= '0;
      ret_path <= '1; paths <= '1; cidx <= '0; pk <= '0; cur_idx <= '0;
      block <= 1'b0; session_open <= 1'b0; probe_clear <= 1'b0;
      ev_violation <= 1'b0; ev_lowinj <= 1'b0; ev_adapt <= 1'b0; ev_close <= 1'b0;
    end else begin
      probe_clear  <= 1'b0;
      ev_violation <= 1'b0; ev_lowinj <= 1'b0; ev_adapt <= 1'b0; ev_close <= 1'b0;
      case (st)
        M_IDLE: if (cfg_valid) begin
          if (cfg_kind == KIND_OPEN) begin
            mts  <= cfg_data;
            cidx <= 6'd1;
            st   <= cfg_last ? M_IDLE : M_CFG;
          end else if (!cfg_last) begin
            st <= M_SKIP;    // close request without a session
          end
        end
        M_SKIP: if (cfg_valid && cfg_last) st <= M_IDLE;
        M_CFG: if (cfg_valid) begin
          if (cidx == 6'd1) ac  <= cfg_data;
          if (cidx == 6'd2) ots <= cfg_data;
          if (cidx == 6'd3) npaths <= (cfg_data > FLIT_W'(MAX_PATHS)) ? 3'(MAX_PATHS) :
                                      (cfg_data == '0) ? 3'd1 : cfg_data[2:0];
          for (int k = 0; k < PATH_FLITS; k++)
            if (cidx == 6'(CF_RET + k)) ret_path[k] <= cfg_data;
          for (int p = 0; p < MAX_PATHS; p++)
            for (int k = 0; k < PATH_FLITS; k++)
              if (cidx == 6'(CF_PATH + p*PATH_FLITS + k)) paths[p][k] <= cfg_data;
          if (cidx != 6'h3F) cidx <= cidx + 1'b1;
          if (cfg_last) begin
            st      <= M_SETUP;
            block   <= 1'b1;       // session open notification: block the flow
            cur_idx <= '0;         // XY route first
          end
        end
        M_SETUP: if (msg_ack) begin
          st           <= M_MONITOR;
          probe_clear  <= 1'b1;
          session_open <= 1'b1;
          block        <= 1'b0;    // command sent: unblock
        end
        M_MONITOR: begin
          if (cfg_valid && cfg_kind == KIND_CLOSE) begin
            if (cfg_last) st <= M_CLOSE;
          end else if (viol) begin
            ev_violation <= 1'b1;
            if (air < ac) begin
              st        <= M_LOWINJ;
              ev_lowinj <= 1'b1;
            end else begin
              st    <= M_PROBE;
              pk    <= '0;
              block <= 1'b1;
            end
          end
        end
        M_LOWINJ: if (msg_ack) st <= M_MONITOR;
        M_PROBE: if (msg_ack) begin
          if (3'(pk) + 3'd1 >= npaths) st <= M_WAIT_PATH;
          else pk <= pk + 1'b1;
        end
        M_WAIT_PATH: if (rx_valid && rx_msg.pl[0] == CMD_NEWPATH) begin
          cur_idx     <= (rx_msg.pl[PR_IDX] < FLIT_W'(npaths)) ? rx_msg.pl[PR_IDX][1:0] : cur_idx;
          block       <= 1'b0;
          probe_clear <= 1'b1;
          ev_adapt    <= 1'b1;
          st          <= M_MONITOR;
        end
        M_CLOSE: if (msg_ack) begin
          st           <= M_IDLE;
          session_open <= 1'b0;
          ev_close     <= 1'b1;
          cur_idx      <= '0;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
