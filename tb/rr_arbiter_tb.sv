// rr_arbiter_tb: random requests against a reference round-robin model
// (pointer at the last winner, scan upward with wrap-around, pointer moves
// only when advance is set). N is 5 to cover a non-power-of-two size.
`timescale 1ns/1ps
module rr_arbiter_tb;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req, gnt, exp_gnt;
  logic advance;
  int checks = 0, failures = 0, last = N - 1;

  rr_arbiter #(.N(N)) dut (.*);

  initial begin
    req = '0; advance = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      req = N'($urandom);
      if (t % 7 == 0) req = '1;
      advance = ($urandom_range(3) != 0);
      #1;
      exp_gnt = '0;
      for (int k = 1; k <= N; k++)
        if (exp_gnt == '0 && req[(last + k) % N]) exp_gnt[(last + k) % N] = 1'b1;
      checks++;
      if (gnt !== exp_gnt) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d req=%b gnt=%b exp=%b", t, req, gnt, exp_gnt);
      end
      @(posedge clk);
      if (advance) for (int i = 0; i < N; i++) if (exp_gnt[i]) last = i;
      #1;
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
