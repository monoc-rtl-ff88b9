// output_port: a router output port (Arbiter, control and data lanes,
// Granter, Intra Monitor).
//
// Arbiter: each lane of the port is owned by at most one input lane at a
// time, from the packet's first flit to its last. Requests are served first
// come, first served: every waiting request ages by one per cycle and a free
// lane goes to the oldest (lowest port index on a tie). Because the two lanes
// are allocated separately, a control packet that wants a port busy with data
// takes the control lane at once and interrupts the data flow flit by flit
// (preemption).
//
// Granter: each cycle one flit goes on the link. The control lane wins when
// it has a flit and the neighbour's control lane has room; otherwise a data
// flit with room goes. With no room anywhere the port still offers a flit
// (tx high) and stalls, which the Intra Monitor records.
//
// Control packets are framed as they leave. A PROBE packet has its sum, max
// and hop fields updated with this port's link use through the Intra Monitor's
// operation interface; a SETUP packet's OTS field is loaded into the monitor.
// The arbiter/granter split follows the document; the ageing FCFS arbiter and
// the packet field positions are this design's choices.
module output_port
  import monoc_pkg::*;
#(
  parameter int OTS_DEFAULT = 1000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic  [NLANES-1:0][NPORTS-1:0] req_vec,
  output logic  [NLANES-1:0][2:0]   owner,
  output logic  [NLANES-1:0]        owner_v,
  input  logic  [NLANES-1:0]        sel_valid,
  input  flit_t [NLANES-1:0]        sel_flit,
  input  logic  [NLANES-1:0]        sel_last,
  output logic  [NLANES-1:0]        pop,
  output link_t                     out_link,
  input  logic  [NLANES-1:0]        credit_in,
  output logic  [CNT_W-1:0]         link_use,
  output iam_state_e                iam_state,
  output logic                      ev_preempt,  // control flit sent while a data flit waited
  output logic                      ev_stall     // flit offered, no room downstream
);
  localparam int C = int'(LANE_CTRL);
  localparam int D = int'(LANE_DATA);

  // ---------------- Arbiter (per lane, FCFS) ----------------
  logic [NLANES-1:0][NPORTS-1:0][3:0] age;

  for (genvar l = 0; l < NLANES; l++) begin : g_arb
    logic [2:0] win;
    logic       any;
    always_comb begin
      win = '0;
      any = 1'b0;
      for (int i = 0; i < NPORTS; i++) begin
        if (req_vec[l][i] && (!any || age[l][i] > age[l][win])) begin
          win = 3'(i);
          any = 1'b1;
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        owner_v[l] <= 1'b0;
        owner[l]   <= '0;
        age[l]     <= '0;
      end else begin
        for (int i = 0; i < NPORTS; i++) begin
          if (req_vec[l][i] && !(owner_v[l] && owner[l] == 3'(i)))
            age[l][i] <= (age[l][i] == 4'hF) ? age[l][i] : age[l][i] + 1'b1;
          else
            age[l][i] <= '0;
        end
        if (owner_v[l]) begin
          if (pop[l] && sel_last[l]) owner_v[l] <= 1'b0;
        end else if (any) begin
          owner_v[l] <= 1'b1;
          owner[l]   <= win;
        end
      end
    end
  end

  // ---------------- Granter ----------------
  logic has_c, has_d, send_c, send_d;
  assign has_c  = owner_v[C] && sel_valid[C];
  assign has_d  = owner_v[D] && sel_valid[D];
  assign send_c = has_c && credit_in[C];
  assign send_d = !send_c && has_d && credit_in[D];

  lane_e out_lane;
  always_comb begin
    if (send_c)      out_lane = LANE_CTRL;
    else if (send_d) out_lane = LANE_DATA;
    else if (has_c)  out_lane = LANE_CTRL;
    else             out_lane = LANE_DATA;
  end

  assign pop[C] = send_c;
  assign pop[D] = send_d;

  assign ev_preempt = send_c && has_d;
  assign ev_stall   = (has_c || has_d) && !send_c && !send_d;

  // ---------------- Control packet framing ----------------
  typedef enum logic [1:0] { CF_PATH, CF_SIZE, CF_PAYLOAD } cf_e;
  cf_e        cf;
  logic [3:0] idx;
  logic       is_probe, is_setup;
  flit_t      cflit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cf <= CF_PATH; idx <= '0; is_probe <= 1'b0; is_setup <= 1'b0;
    end else if (send_c) begin
      if (sel_last[C]) begin
        cf <= CF_PATH; is_probe <= 1'b0; is_setup <= 1'b0;
      end else begin
        case (cf)
          CF_PATH: if (sel_flit[C] == TERMINATOR) cf <= CF_SIZE;
          CF_SIZE: begin cf <= CF_PAYLOAD; idx <= '0; end
          CF_PAYLOAD: begin
            if (idx == 4'd0) begin
              is_probe <= (sel_flit[C] == CMD_PROBE);
              is_setup <= (sel_flit[C] == CMD_SETUP);
            end
            if (idx != 4'hF) idx <= idx + 1'b1;
          end
          default: cf <= CF_PATH;
        endcase
      end
    end
  end

  iam_cmd_e op_cmd;
  flit_t    op_dout;
  always_comb begin
    op_cmd = IAM_NOP;
    if (cf == CF_PAYLOAD && is_probe && idx == 4'(PR_SUM)) op_cmd = IAM_ACC_SUM;
    if (cf == CF_PAYLOAD && is_probe && idx == 4'(PR_MAX)) op_cmd = IAM_ACC_MAX;
    if (cf == CF_PAYLOAD && is_setup && idx == 4'(SU_OTS)) op_cmd = IAM_SET_OTS;
  end

  always_comb begin
    cflit = op_dout;
    if (cf == CF_PAYLOAD && is_probe && idx == 4'(PR_HOPS)) cflit = sel_flit[C] + 1'b1;
  end

  // ---------------- Intra Monitor ----------------
  logic [CNT_W-1:0] cvs_f, cvs_t, cvs_s, avs_f, avs_t, avs_s;

  intra_monitor #(.OTS_DEFAULT(OTS_DEFAULT)) u_iam (
    .clk, .rst_n,
    .obs_tx    (out_link.tx),
    .obs_lane  (out_link.lane),
    .obs_credit(credit_in),
    .op_en     (send_c),
    .op_cmd    (op_cmd),
    .op_din    (sel_flit[C]),
    .op_dout   (op_dout),
    .state     (iam_state),
    .cvs_free(cvs_f), .cvs_trans(cvs_t), .cvs_stall(cvs_s),
    .avs_free(avs_f), .avs_trans(avs_t), .avs_stall(avs_s),
    .link_use);

  assign out_link.tx   = has_c || has_d;
  assign out_link.lane = out_lane;
  assign out_link.data = (out_lane == LANE_CTRL) ? cflit : sel_flit[D];

`ifndef SYNTHESIS
  a_one_lane: assert property (@(posedge clk) disable iff (!rst_n) !(pop[C] && pop[D]))
    else $error("output_port: two lanes granted in one cycle");
`endif
endmodule
