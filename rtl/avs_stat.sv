// avs_stat: one observed quantity of a monitor (Intra Monitor or probe).
//
// OVS counts cycles (or events) during the current observation window. At the
// window end the count, including the event of that last cycle, moves to CVS
// and OVS restarts from zero. AVS is the weighted average (AVS + CVS) / 2; the
// first window after a clear loads AVS with CVS directly, which reproduces the
// worked example of the monitoring structures (800, 600, 400 -> 800, 700, 550).
// Counters saturate at all ones. clear returns everything to zero.
module avs_stat #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         inc,
  input  logic         win_end,
  output logic [W-1:0] ovs,
  output logic [W-1:0] cvs,
  output logic [W-1:0] avs
);
  logic         first;
  logic [W-1:0] ovs_fin;
  logic [W:0]   avg_sum;

  assign ovs_fin = (inc && ovs != {W{1'b1}}) ? ovs + 1'b1 : ovs;
  assign avg_sum = {1'b0, avs} + {1'b0, ovs_fin};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovs <= '0; cvs <= '0; avs <= '0; first <= 1'b1;
    end else if (clear) begin
      ovs <= '0; cvs <= '0; avs <= '0; first <= 1'b1;
    end else if (win_end) begin
      cvs   <= ovs_fin;
      avs   <= first ? ovs_fin : avg_sum[W:1];
      first <= 1'b0;
      ovs   <= '0;
    end else begin
      ovs <= ovs_fin;
    end
  end
endmodule
