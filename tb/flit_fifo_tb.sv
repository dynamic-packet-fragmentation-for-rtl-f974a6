// flit_fifo_tb: random pushes and pops against a queue model. Checks the
// head (the arriving flit itself when the buffer is empty: bypass), the
// valid flag and the count, including pushes into a full buffer that pops in
// the same cycle and bypass cycles where nothing is stored.
`timescale 1ns/1ps
module flit_fifo_tb;
  import noc_pkg::*;
  localparam int D = BUF_DEPTH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, head_valid;
  flit_t din, head;
  logic [$clog2(D+1)-1:0] count;
  flit_t q[$];
  int checks = 0, failures = 0, n_bypass = 0;

  flit_fifo #(.DEPTH(D)) dut (.*);

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      push = (q.size() < D || $urandom_range(1)) && $urandom_range(2) != 0;
      #1;
      chk(int'(count) == q.size(), "count");
      chk(head_valid == (q.size() > 0 || push), "head_valid");
      if (q.size() > 0) chk(head == q[0], "head from buffer");
      else if (push)    chk(head == din, "bypass head");
      pop = head_valid && $urandom_range(2) != 0;
      if (q.size() == D && push) pop = 1;   // full: must pop to accept
      #1;
      if (q.size() == 0 && push && pop) n_bypass++;
      @(posedge clk);
      if (push) q.push_back(din);
      if (pop)  void'(q.pop_front());
      #1;
    end
    chk(n_bypass > 0, "bypass never exercised");
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
