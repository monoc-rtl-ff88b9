// lane_fifo: the buffer of one virtual lane at an input port.
//
// A circular FIFO of DEPTH words. Writes and reads may happen in the same
// cycle; the head word is visible on rd_data whenever empty is low (first-word
// fall-through). full is a registered-state function and is returned to the
// upstream sender as the lane's credit. The 4-flit default depth follows the
// evaluated router; the fall-through organisation is this design's choice.
module lane_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  assign empty   = (cnt == 0);
  assign full    = (cnt == (AW+1)'(DEPTH));
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_wr) wp <= incr(wp);
      if (do_rd) rp <= incr(rp);
      cnt <= cnt + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full)
    else $error("lane_fifo: write while full");
`endif
endmodule
