// tb_lane_fifo: random pushes and pops against a queue model; checks order,
// empty/full flags and that the 4-entry default depth is exactly reached.
module tb_lane_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, empty, full;
  logic [15:0] wr_data, rd_data;
  lane_fifo dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fills;
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (!empty || full) failures++;
    // fill to full: depth 4
    fills = 0;
    while (!full && fills < 10) begin
      wr_en = 1; wr_data = 16'(100 + fills); q.push_back(wr_data);
      @(negedge clk); fills++;
    end
    wr_en = 0;
    checks++; if (fills != 4) begin failures++; $display("FAIL depth %0d", fills); end
    for (int i = 0; i < 3000; i++) begin
      wr_en = !full && ($urandom_range(0, 1) == 1);
      rd_en = !empty && ($urandom_range(0, 2) != 0);
      wr_data = 16'($urandom);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 4)) begin
        failures++; $display("FAIL flags size=%0d", q.size());
      end
      if (rd_en) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("FAIL data %h exp %h", rd_data, q[0]); end
      end
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
