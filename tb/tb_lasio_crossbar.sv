// tb_lasio_crossbar - random connection tables against a reference switch.
//
// Each round draws a random partial permutation of inputs to outputs, random
// flit valids, data and output readies, and compares every output link and
// every input pop with a reference computed in the testbench.
module tb_lasio_crossbar;
  import lasio_pkg::*;

  logic [NPORTS-1:0] in_valid, in_pop, out_busy, in_conn, out_ready;
  logic [FLIT_W-1:0] in_data [NPORTS];
  logic [PORT_W-1:0] out_src [NPORTS];
  logic [PORT_W-1:0] in_dst  [NPORTS];
  link_t             out     [NPORTS];
  int checks = 0, failures = 0;

  lasio_crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 2000; round++) begin
      int perm [NPORTS];
      for (int p = 0; p < NPORTS; p++) perm[p] = p;
      for (int p = NPORTS-1; p > 0; p--) begin
        int j, t;
        j = $urandom % (p + 1);
        t = perm[p]; perm[p] = perm[j]; perm[j] = t;
      end
      out_busy = '0; in_conn = '0;
      for (int p = 0; p < NPORTS; p++) begin
        out_src[p] = '0;
        in_dst[p]  = '0;
        in_data[p] = 16'($urandom);
      end
      in_valid  = NPORTS'($urandom);
      out_ready = NPORTS'($urandom);
      for (int i = 0; i < NPORTS; i++) begin
        if ($urandom % 3 != 0) begin
          in_conn[i]        = 1'b1;
          in_dst[i]         = PORT_W'(perm[i]);
          out_busy[perm[i]] = 1'b1;
          out_src[perm[i]]  = PORT_W'(i);
        end
      end
      #1;
      for (int i = 0; i < NPORTS; i++) begin
        logic exp_pop;
        exp_pop = in_conn[i] && out_ready[perm[i]];
        checks++;
        if (in_pop[i] !== exp_pop) begin
          failures++;
          $display("FAIL round %0d pop[%0d]", round, i);
        end
        if (in_conn[i]) begin
          checks++;
          if (out[perm[i]].valid !== in_valid[i] ||
              (in_valid[i] && out[perm[i]].data !== in_data[i])) begin
            failures++;
            $display("FAIL round %0d out[%0d]", round, perm[i]);
          end
        end
      end
      for (int o = 0; o < NPORTS; o++) begin
        if (!out_busy[o]) begin
          checks++;
          if (out[o].valid !== 1'b0) begin
            failures++;
            $display("FAIL round %0d idle out[%0d] valid", round, o);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
