// ni_sender: NISender, the transmit side of the network interface.
//
// Data lane. The PE hands over packets flit by flit (valid/ready, pe_last on
// the final flit) with a kind:
//   KIND_BE    a complete packet (path, terminator, size, payload), passed on;
//   KIND_MON   size + payload of the monitored flow; the sender first emits
//              the current path chosen by the mstMonitor and the terminator,
//              and sets bit 15 of the size flit (the monitored-flow mark).
//              mon_beat (to the mstProbe) is high in every cycle in which the
//              PE offers a payload flit of such a packet.
//              While the mstMonitor blocks the flow, KIND_MON packets wait.
//   KIND_OPEN / KIND_CLOSE  a session request, forwarded flit by flit to the
//              mstMonitor on the cfg_* port.
// Control lane. Control packets composed by the mstMonitor or slvMonitor
// (ctrl_msg_t) are serialised as path, terminator, size, payload; the master's
// requests go first when both wait.
// The link carries one flit per cycle. The control lane is put on the link
// when it has a flit and credit, otherwise the data lane (same rule as a
// router's Granter). Which monitored packets get the NI's path, and the
// message order between the monitors, are this design's choices.
module ni_sender
  import monoc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // PE side
  input  logic              pe_valid,
  output logic              pe_ready,
  input  flit_t             pe_data,
  input  pe_kind_e          pe_kind,
  input  logic              pe_last,
  // session configuration to the mstMonitor
  output logic              cfg_valid,
  output flit_t             cfg_data,
  output pe_kind_e          cfg_kind,
  output logic              cfg_last,
  input  logic              cfg_ready,
  // from the mstMonitor
  input  path_t             cur_path,
  input  logic              block,
  output logic              mon_beat,
  // control packets from the monitors
  input  logic              mst_msg_valid,
  input  ctrl_msg_t         mst_msg,
  output logic              mst_msg_ack,
  input  logic              slv_msg_valid,
  input  ctrl_msg_t         slv_msg,
  output logic              slv_msg_ack,
  // link to the router's local input port
  output link_t             out_link,
  input  logic [NLANES-1:0] credit_in
);
  localparam int C = int'(LANE_CTRL);
  localparam int D = int'(LANE_DATA);

  // ---------------- data lane ----------------
  typedef enum logic [1:0] { D_IDLE, D_PATH, D_PASS, D_CFG } d_e;
  d_e         dst;
  logic [1:0] dk;       // index into the path being emitted
  logic       mon;      // current packet belongs to the monitored flow
  logic       size_ph;  // next PE flit of a monitored packet is its size
  path_t      dpath;
  flit_t      d_flit, path_flit;
  logic       d_has, d_send, c_send, path_end;

  assign path_flit = dpath[dk];
  assign path_end  = (dk == 2'(PATH_FLITS)) || (path_flit == TERMINATOR);

  always_comb begin
    d_has  = 1'b0;
    d_flit = pe_data;
    case (dst)
      D_PATH: begin d_has = 1'b1; d_flit = path_end ? TERMINATOR : path_flit; end
      D_PASS: begin
        d_has = pe_valid;
        if (mon && size_ph) d_flit = pe_data | MON_FLAG;   // mark the monitored packet
      end
      default: ;
    endcase
  end

  assign cfg_valid = (dst == D_CFG) && pe_valid;
  assign cfg_data  = pe_data;
  assign cfg_last  = pe_last;
  assign cfg_kind  = pe_kind;
  assign pe_ready  = (dst == D_PASS) ? d_send : (dst == D_CFG) ? cfg_ready : 1'b0;
  // AIR counts the cycles in which the PE offers a monitored payload flit,
  // accepted or not, so that back-pressure from a congested route does not
  // look like a slow source.
  assign mon_beat  = (dst == D_PASS) && pe_valid && mon && !size_ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst <= D_IDLE; dk <= '0; mon <= 1'b0; size_ph <= 1'b0; dpath <= '1;
    end else begin
      case (dst)
        D_IDLE: if (pe_valid) begin
          case (pe_kind)
            KIND_BE:  begin dst <= D_PASS; mon <= 1'b0; size_ph <= 1'b0; end
            KIND_MON: if (!block) begin
              dst <= D_PATH; dk <= '0; dpath <= cur_path; mon <= 1'b1; size_ph <= 1'b1;
            end
            default:  dst <= D_CFG;
          endcase
        end
        D_PATH: if (d_send) begin
          if (path_end) dst <= D_PASS;
          else          dk  <= dk + 1'b1;
        end
        D_PASS: if (d_send) begin
          size_ph <= 1'b0;
          if (pe_last) dst <= D_IDLE;
        end
        D_CFG: if (pe_valid && cfg_ready && pe_last) dst <= D_IDLE;
        default: dst <= D_IDLE;
      endcase
    end
  end

  // ---------------- control lane ----------------
  typedef enum logic [2:0] { C_IDLE, C_PATH, C_SIZE, C_PL } c_e;
  c_e         cst;
  ctrl_msg_t  cm;
  logic [1:0] ck;
  logic [3:0] ci;
  flit_t      c_flit, cpath_flit;
  logic       c_has, cpath_end;

  assign cpath_flit = cm.path[ck];
  assign cpath_end  = (ck == 2'(PATH_FLITS)) || (cpath_flit == TERMINATOR);
  assign mst_msg_ack = (cst == C_IDLE) && mst_msg_valid;
  assign slv_msg_ack = (cst == C_IDLE) && !mst_msg_valid && slv_msg_valid;

  always_comb begin
    c_has  = (cst != C_IDLE);
    c_flit = '0;
    case (cst)
      C_PATH: c_flit = cpath_end ? TERMINATOR : cpath_flit;
      C_SIZE: c_flit = FLIT_W'(cm.len);
      C_PL:   c_flit = cm.pl[ci[2:0]];
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_IDLE; cm <= '0; ck <= '0; ci <= '0;
    end else begin
      case (cst)
        C_IDLE: begin
          if (mst_msg_valid)      begin cm <= mst_msg; cst <= C_PATH; ck <= '0; end
          else if (slv_msg_valid) begin cm <= slv_msg; cst <= C_PATH; ck <= '0; end
        end
        C_PATH: if (c_send) begin
          if (cpath_end) cst <= C_SIZE;
          else           ck  <= ck + 1'b1;
        end
        C_SIZE: if (c_send) begin
          ci  <= '0;
          cst <= (cm.len == '0) ? C_IDLE : C_PL;
        end
        C_PL: if (c_send) begin
          ci <= ci + 1'b1;
          if (ci + 1'b1 == cm.len) cst <= C_IDLE;
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

  // ---------------- lane choice ----------------
  assign c_send = c_has && credit_in[C];
  assign d_send = !c_send && d_has && credit_in[D];

  assign out_link.tx   = c_has || d_has;
  assign out_link.lane = (c_send || (!d_send && c_has)) ? LANE_CTRL : LANE_DATA;
  assign out_link.data = (c_send || (!d_send && c_has)) ? c_flit : d_flit;
endmodule
