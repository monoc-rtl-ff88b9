// input_lane: one virtual lane of a router input port.
//
// The lane buffer (lane_fifo) feeds a packet-framing FSM:
//   ROUTE   - the head flit is the first path flit. Its leading hop code picks
//             the output port (F: local). The flit leaves with that hop
//             consumed (shifted left, F fed in). If consuming the hop empties
//             the flit (0xXFFF) the flit is dropped here instead, so the next
//             router starts on the next path flit.
//   PATH    - remaining path flits pass unchanged up to the terminator 0xFFFF.
//   SIZE    - the payload-size flit passes and loads the payload counter
//             from its bits 14:0 (bit 15 is the monitored-flow mark).
//   PAYLOAD - payload flits pass; the last one frees the output lane.
// req/dir/flit/last offer the current flit to the crossbar; pop (from the
// owning output port) removes it. The framing follows the packet format of the
// document; dropping exhausted path flits is how this design walks a path
// longer than one flit.
module input_lane
  import monoc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   wr_en,
  input  flit_t  wr_data,
  output logic   full,
  output logic   req,
  output port_e  dir,
  output flit_t  flit,
  output logic   last,
  input  logic   pop,
  output logic   dropped   // a path flit was consumed at this router
);
  typedef enum logic [1:0] { ST_ROUTE, ST_PATH, ST_SIZE, ST_PAYLOAD } st_e;
  st_e   st;
  flit_t head, cnt;
  logic  empty, rot, drop;

  lane_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en(pop || drop), .rd_data(head), .empty, .full);

  assign drop    = (st == ST_ROUTE) && !empty && (head != TERMINATOR) &&
                   (path_consume(head) == TERMINATOR);
  assign dropped = drop;
  assign req     = (st != ST_ROUTE) && !empty;
  assign flit    = rot ? path_consume(head) : head;
  assign last    = ((st == ST_SIZE) && (size_of(head) == '0)) || ((st == ST_PAYLOAD) && (cnt == 16'd1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= ST_ROUTE;
      dir <= P_LOCAL;
      rot <= 1'b0;
      cnt <= '0;
    end else begin
      case (st)
        ST_ROUTE: if (!empty) begin
          dir <= hop_to_port(head[FLIT_W-1 -: 4]);
          rot <= !drop;
          st  <= ST_PATH;
        end
        ST_PATH: if (pop) begin
          rot <= 1'b0;
          if (head == TERMINATOR) st <= ST_SIZE;
        end
        ST_SIZE: if (pop) begin
          cnt <= size_of(head);
          st  <= (head == '0) ? ST_ROUTE : ST_PAYLOAD;
        end
        ST_PAYLOAD: if (pop) begin
          cnt <= cnt - 1'b1;
          if (cnt == 16'd1) st <= ST_ROUTE;
        end
      endcase
    end
  end
endmodule
