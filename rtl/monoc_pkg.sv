// monoc_pkg: types and constants shared by the MoNoC router, network interface
// and monitors.
//
// Flits are 16 bits wide. A packet is a source-routed path (4-bit hop codes,
// most significant nibble first: 0 East, 1 West, 2 North, 3 South, F invalid),
// closed by the terminator flit 0xFFFF, then a payload-size flit, then that
// many payload flits. Every channel carries two virtual lanes: data and
// control; the control lane has priority. The hop encoding, the terminator,
// the 16-bit flit and the 4-flit buffers follow the MoNoC description; the
// control packet layout and command codes below are this design's choice.
package monoc_pkg;

  parameter int FLIT_W      = 16;   // flit width (Sec. 5.1)
  parameter int NPORTS      = 5;    // E, W, N, S, Local
  parameter int NLANES      = 2;    // data lane, control lane
  parameter int BUF_DEPTH   = 4;    // flits per lane buffer (Sec. 5.1)
  parameter int PATH_FLITS  = 3;    // path storage per route: 12 hops
  parameter int MAX_PATHS   = 4;    // pre-computed routes per pair ("typically four")
  parameter int CTRL_PL_MAX = 8;    // largest control-packet payload
  parameter int CNT_W       = 16;   // monitor counter width

  typedef logic [FLIT_W-1:0] flit_t;

  typedef enum logic [2:0] {
    P_EAST = 3'd0, P_WEST = 3'd1, P_NORTH = 3'd2, P_SOUTH = 3'd3, P_LOCAL = 3'd4
  } port_e;

  localparam flit_t TERMINATOR = 16'hFFFF;
  // Bit 15 of a payload-size flit marks a packet of a monitored flow; the
  // size itself is bits 14:0. The target counts only marked packets.
  localparam flit_t MON_FLAG = 16'h8000;

  typedef enum logic { LANE_DATA = 1'b0, LANE_CTRL = 1'b1 } lane_e;

  // One direction of a physical channel. The receiver returns one credit bit
  // per lane: high while that lane's buffer has room.
  typedef struct packed {
    logic  tx;     // a flit is offered
    lane_e lane;   // lane of the offered flit
    flit_t data;
  } link_t;

  // Intra Monitor observation state (Fig. 5)
  typedef enum logic [1:0] { IAM_FREE = 2'd0, IAM_TRANS = 2'd1, IAM_STALL = 2'd2 } iam_state_e;

  // Intra Monitor operation-interface commands
  typedef enum logic [1:0] {
    IAM_NOP = 2'd0, IAM_SET_OTS = 2'd1, IAM_ACC_SUM = 2'd2, IAM_ACC_MAX = 2'd3
  } iam_cmd_e;

  // First payload flit of a control packet
  localparam flit_t CMD_SETUP     = 16'h0001;  // master -> slave: open session
  localparam flit_t CMD_RELEASE   = 16'h0002;  // master -> slave: close session
  localparam flit_t CMD_VIOLATION = 16'h0003;  // slave -> master: CRR < AC
  localparam flit_t CMD_LOWINJ    = 16'h0004;  // master -> slave: source injects slowly, go on
  localparam flit_t CMD_PROBE     = 16'h0005;  // master -> slave: collects link use along a route
  localparam flit_t CMD_NEWPATH   = 16'h0006;  // slave -> master: selected route

  // Payload positions of a PROBE packet: CMD, index, sum, max, hops
  localparam int PR_IDX = 1, PR_SUM = 2, PR_MAX = 3, PR_HOPS = 4, PR_LEN = 5;
  // Payload positions of a SETUP packet: CMD, MTS, AC, OTS, npaths, return path
  localparam int SU_MTS = 1, SU_AC = 2, SU_OTS = 3, SU_NPATHS = 4, SU_RET = 5;
  localparam int SU_LEN = SU_RET + PATH_FLITS;

  // What the PE hands to the NI with each packet
  typedef enum logic [1:0] {
    KIND_BE = 2'd0,     // complete packet, best effort
    KIND_MON = 2'd1,    // size + payload of the monitored flow, NI adds the path
    KIND_OPEN = 2'd2,   // session configuration
    KIND_CLOSE = 2'd3   // session close request
  } pe_kind_e;

  typedef flit_t [PATH_FLITS-1:0] path_t;

  // A control packet to be sent by the NI
  typedef struct packed {
    path_t                        path;
    logic [3:0]                   len;
    flit_t [CTRL_PL_MAX-1:0]      pl;
  } ctrl_msg_t;

  // A received control packet (payload only)
  typedef struct packed {
    logic [3:0]                   len;
    flit_t [CTRL_PL_MAX-1:0]      pl;
  } rx_msg_t;

  // Consume the leading hop of a path flit
  function automatic flit_t size_of(flit_t f);
    return {1'b0, f[FLIT_W-2:0]};
  endfunction

  function automatic flit_t path_consume(flit_t f);
    return {f[FLIT_W-5:0], 4'hF};
  endfunction

  // Output port selected by a hop code; F (and any other unused code) means
  // the packet has arrived and leaves through the local port.
  function automatic port_e hop_to_port(logic [3:0] h);
    case (h)
      4'h0: return P_EAST;
      4'h1: return P_WEST;
      4'h2: return P_NORTH;
      4'h3: return P_SOUTH;
      default: return P_LOCAL;
    endcase
  endfunction

  function automatic logic [CNT_W-1:0] sat_add(logic [CNT_W-1:0] a, logic [CNT_W-1:0] b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CNT_W] ? {CNT_W{1'b1}} : s[CNT_W-1:0];
  endfunction

endpackage
