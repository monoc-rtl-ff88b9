// crossbar: the router's crossbar switch.
//
// For every output port and lane it turns the input lanes' routing requests
// into a request vector for that port's arbiter, and connects the input lane
// that owns the output lane (owner index from the output port) to it: the
// owner's flit, valid and last flags go to the output, and the output's pop
// goes back to the owner. Purely combinational.
module crossbar
  import monoc_pkg::*;
(
  // from the input ports
  input  logic  [NPORTS-1:0][NLANES-1:0]             in_req,
  input  port_e [NPORTS-1:0][NLANES-1:0]             in_dir,
  input  flit_t [NPORTS-1:0][NLANES-1:0]             in_flit,
  input  logic  [NPORTS-1:0][NLANES-1:0]             in_last,
  output logic  [NPORTS-1:0][NLANES-1:0]             in_pop,
  // to / from the output ports
  output logic  [NPORTS-1:0][NLANES-1:0][NPORTS-1:0] out_req_vec,
  input  logic  [NPORTS-1:0][NLANES-1:0][2:0]        out_owner,
  input  logic  [NPORTS-1:0][NLANES-1:0]             out_owner_v,
  output logic  [NPORTS-1:0][NLANES-1:0]             out_valid,
  output flit_t [NPORTS-1:0][NLANES-1:0]             out_flit,
  output logic  [NPORTS-1:0][NLANES-1:0]             out_last,
  input  logic  [NPORTS-1:0][NLANES-1:0]             out_pop
);
  always_comb begin
    in_pop = '0;
    for (int o = 0; o < NPORTS; o++) begin
      for (int l = 0; l < NLANES; l++) begin
        for (int i = 0; i < NPORTS; i++)
          out_req_vec[o][l][i] = in_req[i][l] && (in_dir[i][l] == port_e'(o));
        out_valid[o][l] = 1'b0;
        out_flit[o][l]  = '0;
        out_last[o][l]  = 1'b0;
        for (int i = 0; i < NPORTS; i++) begin
          if (out_owner_v[o][l] && out_owner[o][l] == 3'(i)) begin
            out_valid[o][l] = in_req[i][l];
            out_flit[o][l]  = in_flit[i][l];
            out_last[o][l]  = in_last[i][l];
            if (out_pop[o][l]) in_pop[i][l] = 1'b1;
          end
        end
      end
    end
  end
endmodule
