// input_port: a router input port (Regulator, control lane, data lane).
//
// Flits arriving on the link are written into the lane named by in_link.lane
// when the sender sees that lane's credit. The Regulator returns one credit
// per lane, high while the lane buffer has room, so the upstream Granter can
// send on whichever lane has space: the control lane is normally preferred,
// but a full control lane lets data through. Each lane then frames packets
// and offers flits to the crossbar on its own (see input_lane), so a control
// packet never waits behind a data packet.
module input_port
  import monoc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  link_t                    in_link,
  output logic  [NLANES-1:0]       credit_out,
  output logic  [NLANES-1:0]       req,
  output port_e [NLANES-1:0]       dir,
  output flit_t [NLANES-1:0]       flit,
  output logic  [NLANES-1:0]       last,
  input  logic  [NLANES-1:0]       pop,
  output logic  [NLANES-1:0]       dropped
);
  logic [NLANES-1:0] full;

  for (genvar l = 0; l < NLANES; l++) begin : g_lane
    input_lane u_lane (
      .clk, .rst_n,
      .wr_en  (in_link.tx && (in_link.lane == lane_e'(l)) && !full[l]),
      .wr_data(in_link.data),
      .full   (full[l]),
      .req    (req[l]),
      .dir    (dir[l]),
      .flit   (flit[l]),
      .last   (last[l]),
      .pop    (pop[l]),
      .dropped(dropped[l]));
  end

  // Regulator
  assign credit_out = ~full;
endmodule
