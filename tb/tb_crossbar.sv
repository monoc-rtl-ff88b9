// tb_crossbar: random input-lane requests and output ownerships compared with
// an independent model of the connection rules (request vector per output,
// owner's flit/valid/last forwarded, pop returned to the owner only).
module tb_crossbar;
  import monoc_pkg::*;
  logic  [4:0][1:0]      in_req, in_last, in_pop, out_owner_v, out_valid, out_last, out_pop;
  port_e [4:0][1:0]      in_dir;
  flit_t [4:0][1:0]      in_flit, out_flit;
  logic  [4:0][1:0][4:0] out_req_vec;
  logic  [4:0][1:0][2:0] out_owner;
  crossbar dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      logic [4:0][1:0] exp_pop;
      for (int p = 0; p < 5; p++) for (int l = 0; l < 2; l++) begin
        in_req[p][l]      = 1'($urandom);
        in_dir[p][l]      = port_e'($urandom_range(0, 4));
        in_flit[p][l]     = 16'($urandom);
        in_last[p][l]     = 1'($urandom);
        out_owner_v[p][l] = 1'($urandom);
        out_owner[p][l]   = 3'($urandom_range(0, 4));
        out_pop[p][l]     = 1'($urandom);
      end
      #1;
      exp_pop = '0;
      for (int o = 0; o < 5; o++) for (int l = 0; l < 2; l++) begin
        int w;
        for (int i = 0; i < 5; i++) begin
          checks++;
          if (out_req_vec[o][l][i] != (in_req[i][l] && in_dir[i][l] == port_e'(o))) failures++;
        end
        w = out_owner[o][l];
        checks++;
        if (out_owner_v[o][l]) begin
          if (out_valid[o][l] != in_req[w][l] || out_flit[o][l] != in_flit[w][l] ||
              out_last[o][l] != in_last[w][l]) failures++;
          if (out_pop[o][l]) exp_pop[w][l] = 1'b1;
        end else if (out_valid[o][l]) failures++;
      end
      checks++;
      if (in_pop != exp_pop) begin failures++; $display("FAIL pop %b exp %b", in_pop, exp_pop); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
