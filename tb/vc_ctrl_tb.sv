// vc_ctrl_tb: directed sequences through the VC controller states, with the
// expected outputs worked out by hand for a router at (1,1):
//   - a head granted at once leaves in the same cycle with its look-ahead
//     port recomputed for the next router;
//   - body flits stream without requests; a body sent on the last credit
//     with none returning leaves as a virtual tail (credit stall);
//   - the fragment is re-issued only when a flit is present, led by a
//     virtual head built from the header buffer, on the newly granted VC;
//   - a body that is the last flit available, with none announced, leaves
//     as a virtual tail (buffer-empty stall); a real tail never does;
//   - a head that is not granted waits in the header buffer and is sent
//     from there later; no flit moves without a credit.
`timescale 1ns/1ps
module vc_ctrl_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [COORD_W-1:0] cur_x = 1, cur_y = 1;
  logic head_valid, more, pop, cr_ok, cr_last, req, req_hdr, gnt, send, active, frag_credit, frag_empty;
  flit_t head, send_flit;
  port_e req_port, send_port;
  logic [VC_W-1:0] gnt_vc, send_vc;
  int checks = 0, failures = 0;

  vc_ctrl dut (.*);

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  function automatic flit_t mk(ftype_e t, port_e la, int dx, int dy, int d);
    flit_t f;
    f = '0; f.ftype = t; f.la_port = la; f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy);
    f.data = DATA_W'(d);
    return f;
  endfunction

  // apply inputs, settle, return (outputs checked by caller), then clock
  task automatic drive(bit hv, flit_t h, bit m, bit ok, bit last, bit g, int gv);
    head_valid = hv; head = h; more = m; cr_ok = ok; cr_last = last; gnt = g; gnt_vc = VC_W'(gv);
    #1;
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  flit_t h1, b;

  initial begin
    head_valid = 0; head = '0; more = 0; cr_ok = 0; cr_last = 0; gnt = 0; gnt_vc = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // --- head to (3,1) entering east, granted at once on VC 2 ---
    h1 = mk(F_HEAD, P_EAST, 3, 1, 77);
    drive(1, h1, 1, 1, 0, 1, 2);
    chk(req && req_port == P_EAST && pop, "head requests and is captured");
    chk(send && send_port == P_EAST && send_vc == 2, "head sent at once");
    chk(send_flit.ftype == F_HEAD && send_flit.la_port == P_EAST && send_flit.data == DATA_W'(77),
        "head look-ahead: from (2,1) to (3,1) is east");
    tick();
    chk(active, "active after grant");

    // --- body streams ---
    b = mk(F_BODY, P_LOCAL, 0, 0, 1);
    drive(1, b, 1, 1, 0, 0, 0);
    chk(send && pop && !req && send_flit.ftype == F_BODY && send_vc == 2 && send_port == P_EAST, "body streams");
    chk(!frag_credit && !frag_empty, "no fragmentation");
    tick();

    // --- no credit: nothing moves ---
    drive(1, b, 1, 0, 0, 0, 0);
    chk(!send && !pop, "credit stall holds");
    tick();

    // --- last credit, none returning: virtual tail ---
    drive(1, b, 1, 1, 1, 0, 0);
    chk(send && pop && send_flit.ftype == F_VTAIL && frag_credit && !frag_empty, "credit-stall fragmentation");
    tick();
    chk(!active, "released after virtual tail");

    // --- FRAG: no request without a flit ---
    drive(0, b, 0, 0, 0, 0, 0);
    chk(!req && !send, "fragment waits for a flit");
    tick();

    // --- FRAG: flit present, granted VC 3 -> virtual head from header buffer ---
    drive(1, b, 1, 0, 0, 1, 3);
    chk(req && req_port == P_EAST && !pop, "fragment requests again");
    chk(send && send_vc == 3 && send_flit.ftype == F_VHEAD && send_flit.dst_x == 3 &&
        send_flit.la_port == P_EAST && send_flit.data == DATA_W'(77), "virtual head from header copy");
    tick();
    chk(active, "active on new VC");

    // --- last flit available, none coming: virtual tail (buffer empty) ---
    drive(1, b, 0, 1, 0, 0, 0);
    chk(send && send_vc == 3 && send_flit.ftype == F_VTAIL && frag_empty && !frag_credit, "buffer-empty fragmentation");
    tick();

    // --- flit arrives, re-issued on VC 1, then tail with nothing after: stays a tail ---
    drive(1, mk(F_TAIL, P_LOCAL, 0, 0, 9), 0, 0, 0, 1, 1);
    chk(send && send_flit.ftype == F_VHEAD && send_vc == 1, "second virtual head");
    tick();
    drive(1, mk(F_TAIL, P_LOCAL, 0, 0, 9), 0, 1, 1, 0, 0);
    chk(send && send_flit.ftype == F_TAIL && !frag_credit && !frag_empty, "tail is never re-typed");
    tick();
    chk(!active, "idle after tail");

    // --- head not granted: waits in header buffer (ROUTE) ---
    h1 = mk(F_VHEAD, P_NORTH, 1, 3, 55);
    drive(1, h1, 0, 1, 0, 0, 0);
    chk(req && req_port == P_NORTH && pop && !send, "head captured without grant");
    tick();
    drive(0, '0, 0, 1, 0, 0, 0);
    chk(req && req_hdr && req_port == P_NORTH && !send, "header waits in header buffer");
    tick();
    drive(0, '0, 0, 1, 0, 1, 0);
    chk(send && !pop && send_flit.ftype == F_VHEAD && send_flit.la_port == P_NORTH &&
        send_flit.data == DATA_W'(55), "received virtual head forwarded as such, route (1,2)->(1,3) north");
    tick();
    chk(active, "active after late grant");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
