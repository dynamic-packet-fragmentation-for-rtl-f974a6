// crossbar_tb: random partial permutations of inputs to outputs; every
// output must carry exactly the flit of the input routed to it, and idle
// outputs must be invalid.
`timescale 1ns/1ps
module crossbar_tb;
  import noc_pkg::*;
  xbar_t xin [NUM_PORTS];
  xbar_t xout [NUM_PORTS];
  int checks = 0, failures = 0;
  int src_of [NUM_PORTS];

  crossbar dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm [NUM_PORTS];
      for (int i = 0; i < NUM_PORTS; i++) perm[i] = i;
      perm.shuffle();
      for (int q = 0; q < NUM_PORTS; q++) src_of[q] = -1;
      for (int p = 0; p < NUM_PORTS; p++) begin
        xin[p].valid = ($urandom_range(3) != 0);
        xin[p].port  = port_e'(perm[p]);
        xin[p].vc    = VC_W'($urandom);
        xin[p].flit  = {$urandom, $urandom, $urandom, $urandom};
        if (xin[p].valid) src_of[perm[p]] = p;
      end
      #1;
      for (int q = 0; q < NUM_PORTS; q++) begin
        checks++;
        if (src_of[q] < 0) begin
          if (xout[q].valid) failures++;
        end else if (xout[q] != xin[src_of[q]]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d out %0d", t, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
