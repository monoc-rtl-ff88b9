// slv_monitor: slvMonitor, the slave (target) side of the Inter Monitor.
//
// A SETUP message opens the session: MTS, AC, OTS, the number of routes and
// the return route are stored, the slvProbe is cleared and monitoring starts.
// At the end of every MTS window the Current Reception Rate (crr, the probe's
// CVS) is compared with AC; CRR < AC stops monitoring and sends VIOLATION
// (carrying CRR) back along the return route. The monitor then waits:
//   LOWINJ   - the source injects below AC; monitoring restarts.
//   PROBE    - one per route, each carrying the sum and the maximum of the
//              link use read from every Intra Monitor on its way and the hop
//              count. After the announced number of probes the route with the
//              lowest average (sum / hops) wins, the lowest maximum breaking a
//              tie, then the lowest index. NEWPATH names it to the source and
//              monitoring restarts.
// RELEASE closes the session from any state. Averages are compared by cross
// multiplication (sum_a * hops_b < sum_b * hops_a), so no divider is needed.
// The selection rule follows the document; message layout and the restart of
// the MTS window after each decision are this design's choices.
module slv_monitor
  import monoc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx_valid,
  input  rx_msg_t          rx_msg,
  output logic             msg_valid,
  output ctrl_msg_t        msg,
  input  logic             msg_ack,
  // slvProbe
  output logic             probe_clear,
  output logic             probe_en,
  output logic [CNT_W-1:0] mts,
  input  logic [CNT_W-1:0] crr,
  input  logic             win_done,
  // status
  output logic             session_open,
  output logic [1:0]       best_idx,
  output logic             ev_violation,
  output logic             ev_select
);
  typedef enum logic [2:0] { S_IDLE, S_MONITOR, S_VIOL, S_WAIT, S_NEWPATH } s_e;
  s_e st;

  logic [CNT_W-1:0] ac, crr_q;
  logic [2:0]       npaths, got;
  path_t            ret_path;
  flit_t            best_sum, best_max, best_hops;

  // candidate from the received PROBE
  flit_t       p_sum, p_max, p_hops;
  logic [31:0] lhs, rhs;
  logic        better;
  assign p_sum  = rx_msg.pl[PR_SUM];
  assign p_max  = rx_msg.pl[PR_MAX];
  assign p_hops = (rx_msg.pl[PR_HOPS] == '0) ? 16'd1 : rx_msg.pl[PR_HOPS];
  assign lhs    = p_sum * best_hops;
  assign rhs    = best_sum * p_hops;
  assign better = (got == '0) || (lhs < rhs) || (lhs == rhs && p_max < best_max);

  assign probe_en = (st == S_MONITOR);

  always_comb begin
    msg       = '0;
    msg_valid = 1'b0;
    msg.path  = ret_path;
    case (st)
      S_VIOL: begin
        msg_valid = 1'b1;
        msg.len   = 4'd2;
        msg.pl[0] = CMD_VIOLATION;
        msg.pl[1] = crr_q;
      end
      S_NEWPATH: begin
        msg_valid      = 1'b1;
        msg.len        = 4'd2;
        msg.pl[0]      = CMD_NEWPATH;
        msg.pl[PR_IDX] = FLIT_W'(best_idx);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ac <= '0; mts <= CNT_W'(1000); npaths <= 3'd1; got <= '0;
      ret_path <= '1; crr_q <= '0; best_sum <= '0; best_max <= '0; best_hops <= 16'd1;
      best_idx <= '0; probe_clear <= 1'b0; session_open <= 1'b0;
      ev_violation <= 1'b0; ev_select <= 1'b0;
    end else begin
      probe_clear  <= 1'b0;
      ev_violation <= 1'b0;
      ev_select    <= 1'b0;
      if (rx_valid && rx_msg.pl[0] == CMD_SETUP) begin
        mts    <= rx_msg.pl[SU_MTS];
        ac     <= rx_msg.pl[SU_AC];
        npaths <= (rx_msg.pl[SU_NPATHS] > FLIT_W'(MAX_PATHS)) ? 3'(MAX_PATHS) :
                  (rx_msg.pl[SU_NPATHS] == '0) ? 3'd1 : rx_msg.pl[SU_NPATHS][2:0];
        for (int k = 0; k < PATH_FLITS; k++) ret_path[k] <= rx_msg.pl[SU_RET+k];
        probe_clear  <= 1'b1;
        session_open <= 1'b1;
        st           <= S_MONITOR;
      end else if (rx_valid && rx_msg.pl[0] == CMD_RELEASE) begin
        session_open <= 1'b0;
        st           <= S_IDLE;
      end else begin
        case (st)
          S_MONITOR: if (win_done && crr < ac) begin
            crr_q        <= crr;
            ev_violation <= 1'b1;
            st           <= S_VIOL;
          end
          S_VIOL: if (msg_ack) begin
            st  <= S_WAIT;
            got <= '0;
          end
          S_WAIT: if (rx_valid) begin
            if (rx_msg.pl[0] == CMD_LOWINJ) begin
              probe_clear <= 1'b1;
              st          <= S_MONITOR;
            end else if (rx_msg.pl[0] == CMD_PROBE) begin
              if (better) begin
                best_sum  <= p_sum;
                best_max  <= p_max;
                best_hops <= p_hops;
                best_idx  <= rx_msg.pl[PR_IDX][1:0];
              end
              got <= got + 1'b1;
              if (got + 3'd1 >= npaths) st <= S_NEWPATH;
            end
          end
          S_NEWPATH: if (msg_ack) begin
            ev_select   <= 1'b1;
            probe_clear <= 1'b1;
            st          <= S_MONITOR;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
