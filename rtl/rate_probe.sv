// rate_probe: mstProbe / slvProbe of the Inter Monitor.
//
// Counts events (payload flits of the monitored flow, injected at the source
// or received at the target) during a Monitored Time Slice of mts cycles,
// with the same OVS/CVS/AVS structures as the Intra Monitor. At the source
// the AVS is the Average Injection Rate (AIR); at the target the CVS is the
// Current Reception Rate (CRR). clear zeroes the structures and restarts the
// window; while en is low nothing counts and the window timer holds. win_done
// pulses for one cycle once CVS/AVS hold the result of a finished window.
module rate_probe
  import monoc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [CNT_W-1:0] mts,
  input  logic             inc,
  output logic [CNT_W-1:0] ovs,
  output logic [CNT_W-1:0] cvs,
  output logic [CNT_W-1:0] avs,
  output logic             win_done
);
  logic [CNT_W-1:0] tcnt;
  logic             win_end;

  assign win_end = en && (tcnt >= mts - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt     <= '0;
      win_done <= 1'b0;
    end else begin
      win_done <= win_end && !clear;
      if (clear || win_end) tcnt <= '0;
      else if (en)          tcnt <= tcnt + 1'b1;
    end
  end

  avs_stat #(.W(CNT_W)) u_stat (.clk, .rst_n, .clear, .inc(en && inc), .win_end,
                                .ovs, .cvs, .avs);
endmodule
