// switch_alloc_tb: random requests, busy ports and free-VC masks. Checks
// against a reference model with one round-robin pointer per output port:
// the granted input, the VC handed out (lowest free one), that busy ports
// and ports without a free VC grant nothing, and that alloc/alloc_vc agree
// with the per-input grants.
`timescale 1ns/1ps
module switch_alloc_tb;
  import noc_pkg::*;
  localparam int P = NUM_PORTS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [P-1:0] lreq, out_busy, gnt, alloc;
  port_e lreq_port [P];
  logic [P-1:0][NUM_VC-1:0] vc_free;
  logic [VC_W-1:0] gnt_vc [P];
  logic [VC_W-1:0] alloc_vc [P];
  int last [P];
  int checks = 0, failures = 0, n_conflict = 0;

  switch_alloc dut (.*);

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    lreq = '0; out_busy = '0; vc_free = '0;
    for (int p = 0; p < P; p++) begin lreq_port[p] = P_LOCAL; last[p] = P - 1; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int exp_in [P];
      int exp_vc [P];
      int nreq [P];
      for (int p = 0; p < P; p++) begin
        lreq[p] = $urandom_range(1);
        lreq_port[p] = port_e'($urandom_range(P - 1));
        out_busy[p] = ($urandom_range(4) == 0);
        vc_free[p] = NUM_VC'($urandom);
        if ($urandom_range(1)) vc_free[p] = '1;
      end
      #1;
      for (int q = 0; q < P; q++) begin
        exp_in[q] = -1; exp_vc[q] = 0; nreq[q] = 0;
        for (int v = NUM_VC - 1; v >= 0; v--) if (vc_free[q][v]) exp_vc[q] = v;
        for (int p = 0; p < P; p++) if (lreq[p] && lreq_port[p] == port_e'(q)) nreq[q]++;
        if (nreq[q] > 1) n_conflict++;
        if (!out_busy[q] && vc_free[q] != '0)
          for (int k = 1; k <= P; k++) begin
            int p;
            p = (last[q] + k) % P;
            if (exp_in[q] < 0 && lreq[p] && lreq_port[p] == port_e'(q)) exp_in[q] = p;
          end
        chk(alloc[q] == (exp_in[q] >= 0), $sformatf("alloc t=%0d q=%0d", t, q));
        if (exp_in[q] >= 0) begin
          chk(alloc_vc[q] == VC_W'(exp_vc[q]), "alloc_vc");
          chk(gnt[exp_in[q]] && gnt_vc[exp_in[q]] == VC_W'(exp_vc[q]), "gnt to winner");
        end
      end
      for (int p = 0; p < P; p++) begin
        bit g;
        g = 0;
        for (int q = 0; q < P; q++) if (exp_in[q] == p) g = 1;
        chk(gnt[p] == g, "no stray grant");
      end
      @(posedge clk); #1;
      for (int q = 0; q < P; q++) if (exp_in[q] >= 0) last[q] = exp_in[q];
    end
    chk(n_conflict > 0, "no contention exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
