// link_pipe_tb: random flits and credits; the downstream side must see each
// flit exactly one cycle later, the look-ahead must show the VC of the flit
// that arrives next cycle, and credits must arrive upstream one cycle later.
`timescale 1ns/1ps
module link_pipe_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  link_t up_link, dn_link, prev_link;
  la_t dn_next, prev_next;
  logic [NUM_VC-1:0] dn_credit, up_credit, prev_cr;
  int checks = 0, failures = 0;

  link_pipe dut (.*);

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    up_link = '0; dn_credit = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(dn_link.valid == 0 && up_credit == 0, "reset state");
    for (int t = 0; t < 1000; t++) begin
      up_link.valid = $urandom_range(1);
      up_link.vc    = VC_W'($urandom);
      up_link.flit  = {$urandom, $urandom, $urandom, $urandom};
      dn_credit     = NUM_VC'($urandom);
      #1;
      chk(dn_next.valid == up_link.valid && dn_next.vc == up_link.vc, "look-ahead");
      prev_link = up_link; prev_next = dn_next; prev_cr = dn_credit;
      @(posedge clk); #1;
      chk(dn_link == prev_link, "flit delay");
      chk(dn_link.valid == prev_next.valid && dn_link.vc == prev_next.vc, "look-ahead was right");
      chk(up_credit == prev_cr, "credit delay");
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
