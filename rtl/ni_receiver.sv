// ni_receiver: NIReceiver, the receive side of the network interface.
//
// The link from the router's local output port fills one lane buffer per lane
// (credits returned as for a router input port).
// Data lane: the arriving packet's remaining path flits and terminator are
// removed; the size flit and the payload go to the PE (valid/ready, pe_last on
// the final flit), with the monitored-flow mark (bit 15 of the size flit)
// cleared. Each payload flit of a marked packet pulses data_beat, which the
// slvProbe counts, so other traffic to this node is not mistaken for the
// monitored flow. The mark is this design's choice.
// Control lane: the payload of each control packet (up to CTRL_PL_MAX flits,
// the rest discarded) is collected and then presented for one cycle: on
// mst_rx_valid for the messages a master handles (VIOLATION, NEWPATH), on
// slv_rx_valid for the others. The monitors take a message in any state.
// Splitting the stream by command is this design's choice.
module ni_receiver
  import monoc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  link_t             in_link,
  output logic [NLANES-1:0] credit_out,
  // PE side
  output logic              pe_valid,
  input  logic              pe_ready,
  output flit_t             pe_data,
  output logic              pe_last,
  output logic              data_beat,
  // decoded control packets
  output logic              mst_rx_valid,
  output logic              slv_rx_valid,
  output rx_msg_t           rx_msg
);
  localparam int C = int'(LANE_CTRL);
  localparam int D = int'(LANE_DATA);

  logic  [NLANES-1:0] full, empty, pop;
  flit_t [NLANES-1:0] head;

  for (genvar l = 0; l < NLANES; l++) begin : g_buf
    lane_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_en  (in_link.tx && in_link.lane == lane_e'(l) && !full[l]),
      .wr_data(in_link.data),
      .rd_en  (pop[l]),
      .rd_data(head[l]),
      .empty  (empty[l]),
      .full   (full[l]));
  end
  assign credit_out = ~full;

  typedef enum logic [1:0] { R_PATH, R_SIZE, R_PAYLOAD } r_e;

  // ---------------- data lane ----------------
  r_e    dst;
  flit_t dcnt;
  logic  dmon;      // current packet carries the monitored-flow mark

  assign pe_valid  = !empty[D] && (dst != R_PATH);
  assign pe_data   = (dst == R_SIZE) ? size_of(head[D]) : head[D];
  assign pe_last   = ((dst == R_SIZE) && size_of(head[D]) == '0) || ((dst == R_PAYLOAD) && dcnt == 16'd1);
  assign pop[D]    = !empty[D] && ((dst == R_PATH) || pe_ready);
  assign data_beat = pe_valid && pe_ready && (dst == R_PAYLOAD) && dmon;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst <= R_PATH; dcnt <= '0; dmon <= 1'b0;
    end else if (pop[D]) begin
      case (dst)
        R_PATH:    if (head[D] == TERMINATOR) dst <= R_SIZE;
        R_SIZE:    begin
          dcnt <= size_of(head[D]); dmon <= head[D][FLIT_W-1];
          dst  <= (size_of(head[D]) == '0) ? R_PATH : R_PAYLOAD;
        end
        R_PAYLOAD: begin dcnt <= dcnt - 1'b1; if (dcnt == 16'd1) dst <= R_PATH; end
        default:   dst <= R_PATH;
      endcase
    end
  end

  // ---------------- control lane ----------------
  r_e      cst;
  flit_t   ccnt;
  rx_msg_t acc;
  logic    done;
  logic [3:0] cidx;

  assign pop[C] = !empty[C];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= R_PATH; ccnt <= '0; cidx <= '0; acc <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (pop[C]) begin
        case (cst)
          R_PATH: if (head[C] == TERMINATOR) cst <= R_SIZE;
          R_SIZE: begin
            ccnt    <= head[C];
            cidx    <= '0;
            acc     <= '0;
            acc.len <= (head[C] > FLIT_W'(CTRL_PL_MAX)) ? 4'(CTRL_PL_MAX) : head[C][3:0];
            if (head[C] == '0) begin cst <= R_PATH; done <= 1'b1; end
            else cst <= R_PAYLOAD;
          end
          R_PAYLOAD: begin
            if (cidx < 4'(CTRL_PL_MAX)) acc.pl[cidx[2:0]] <= head[C];
            if (cidx != 4'hF) cidx <= cidx + 1'b1;
            ccnt <= ccnt - 1'b1;
            if (ccnt == 16'd1) begin cst <= R_PATH; done <= 1'b1; end
          end
          default: cst <= R_PATH;
        endcase
      end
    end
  end

  assign rx_msg       = acc;
  assign mst_rx_valid = done && (acc.pl[0] == CMD_VIOLATION || acc.pl[0] == CMD_NEWPATH);
  assign slv_rx_valid = done && !(acc.pl[0] == CMD_VIOLATION || acc.pl[0] == CMD_NEWPATH);
endmodule
