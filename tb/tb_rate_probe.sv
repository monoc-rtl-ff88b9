// tb_rate_probe: MTS windows of 50 cycles with 30, 10 and 20 events; checks
// CVS (30, 10, 20), AVS (30, 20, 20), the win_done pulse timing (one pulse per
// window, one cycle after the window's last cycle), hold while disabled and
// clear.
module tb_rate_probe;
  import monoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, en, inc, win_done;
  logic [15:0] mts, ovs, cvs, avs;
  rate_probe dut (.*);

  int checks = 0, failures = 0, pulses = 0;
  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask
  always_ff @(posedge clk) pulses <= pulses + int'(win_done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window(int events);
    for (int i = 0; i < 50; i++) begin
      inc = (i < events);
      @(negedge clk);
    end
    inc = 0;
  endtask

  initial begin
    clear = 0; en = 0; inc = 0; mts = 16'd50;
    repeat (2) @(negedge clk);
    rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    en = 1;
    window(30);
    chk(win_done, 1, "win_done one cycle after window 1");
    chk(cvs, 30, "CVS1"); chk(avs, 30, "AVS1");
    window(10);
    chk(cvs, 10, "CVS2"); chk(avs, 20, "AVS2");
    window(20);
    chk(cvs, 20, "CVS3"); chk(avs, 20, "AVS3");
    repeat (2) @(negedge clk);
    chk(pulses, 3, "one pulse per window");
    en = 0; inc = 1;
    repeat (100) @(negedge clk);
    inc = 0;
    chk(pulses, 3, "no window while disabled");
    chk(ovs, 0, "no counting while disabled");
    clear = 1; @(negedge clk); clear = 0;
    chk(cvs, 0, "clear CVS"); chk(avs, 0, "clear AVS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
