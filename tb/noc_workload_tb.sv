// noc_workload_tb: latency and fragmentation rate of the 4x4 mesh under
// uniform random traffic, for 8-flit and 16-flit packets, at several offered
// loads.
//
// Each node generates packets to uniformly chosen other nodes with a
// Bernoulli process whose rate gives the offered load in flits per node per
// cycle. Packets wait in an unbounded source queue, so latency counts from
// generation to the arrival of the tail and includes queueing. Sinks
// consume every flit at once. Each load point runs WARM cycles of warm-up,
// then MEAS cycles whose packets are measured, then a drain. The
// fragmentation rate is the number of virtual heads delivered per packet
// (100% = each packet cut once on average).
// A second set of runs uses static fragmentation at the source, the scheme
// dynamic fragmentation is compared against: the source itself ends a
// fragment with a virtual tail after every BUF_DEPTH+1 flits (the storage of
// one VC including its header buffer) and resumes with a virtual head on a
// VC whose downstream buffer is empty, so an 8-flit packet is cut once and a
// 16-flit packet twice before the routers add any cuts of their own. The
// cut length is this bench's choice.
// Checks: every packet arrives complete, in order, intact; at the lowest
// load the average latency is within a few cycles of the zero-load value and
// few packets are cut; the fragmentation rate and the latency grow with the
// load; 16-flit packets are cut more often than 8-flit ones at the same
// load; in static mode at least the source's cuts arrive; under dynamic
// fragmentation no packet is cut more than (len-1)/(BUF_DEPTH+1) times
// (once for 8 flits, twice for 16).
// Runtime: about 5 s in verilator.
`timescale 1ns/1ps
module noc_workload_tb;
  import noc_pkg::*;

  localparam int MX = 4, MY = 4, N = MX * MY;
  localparam int WARM = 1000, MEAS = 2000;
  localparam int NPTS = 4;
  localparam int LOADS [NPTS] = '{5, 20, 35, 45};   // percent flits/node/cycle

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t              inj_link   [N];
  la_t                inj_next   [N];
  logic [NUM_VC-1:0]  inj_credit [N];
  link_t              ej_link    [N];
  logic [NUM_VC-1:0]  ej_credit  [N];
  logic [NUM_PORTS-1:0] frag_credit [N];
  logic [NUM_PORTS-1:0] frag_empty  [N];

  noc_mesh dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int pkt_len = 8, load = 0;
  bit gen_on = 0, stat_frag = 0;

  // sources
  int    q_t    [N][$];   // generation time of queued packets
  int    q_d    [N][$];   // destination
  bit    s_act  [N];
  int    s_dst  [N], s_idx [N], s_vc [N], s_pkt [N], s_t0 [N];
  int    s_cr   [N][NUM_VC];
  bit    s_vh   [N];      // static mode: a virtual head is owed
  link_t s_pend [N];
  // sinks
  int    d_cur   [N][NUM_VC];
  int    d_inpkt [N][N];
  int    d_idx   [N][N];
  int    d_vh    [N][N];  // virtual heads seen in the current packet
  // measurement
  int    gen_total = 0, rcv_total = 0;
  longint lat_sum;
  int    lat_n, vh_n, vh_max, meas_lo, meas_hi;
  int    gen_time [N][int];   // [src][pkt] generation time, measured packets only

  function automatic logic [DATA_W-1:0] mkdata(int src, int pkt, int idx);
    logic [DATA_W-1:0] d;
    d = '0;
    d[7:0] = 8'(idx); d[23:8] = 16'(pkt); d[27:24] = 4'(src);
    d[59:28] = 32'(src * 7919 + pkt * 104729 + idx * 31) ^ 32'h0BAD_F00D;
    return d;
  endfunction

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, m); end
  endtask

  task automatic source_step(int n);
    link_t nx;
    nx = '0;
    // generation: probability load/len per cycle, in 1/10000 steps
    if (gen_on && $urandom_range(9999) < (load * 100) / pkt_len) begin
      int d;
      do d = $urandom_range(N - 1); while (d == n);
      q_t[n].push_back(cyc); q_d[n].push_back(d);
      gen_total++;
    end
    if (!s_act[n] && q_t[n].size() > 0) begin
      int v;
      v = -1;
      for (int k = 0; k < NUM_VC; k++) begin
        int c;
        c = (k + s_pkt[n]) % NUM_VC;
        if (v < 0 && s_cr[n][c] == BUF_DEPTH) v = c;
      end
      if (v >= 0) begin
        s_act[n] = 1; s_idx[n] = 0; s_vc[n] = v;
        s_t0[n] = q_t[n].pop_front(); s_dst[n] = q_d[n].pop_front();
        if (s_t0[n] >= meas_lo && s_t0[n] < meas_hi) gen_time[n][s_pkt[n]] = s_t0[n];
      end
    end
    if (s_act[n] && s_vh[n]) begin
      // static fragmentation: resend the head as a virtual head on a VC
      // whose downstream buffer is empty
      int v;
      v = -1;
      for (int c = 0; c < NUM_VC; c++) if (v < 0 && s_cr[n][c] == BUF_DEPTH) v = c;
      if (v >= 0) begin
        s_vc[n] = v; s_vh[n] = 0;
        nx.valid = 1; nx.vc = VC_W'(v);
        nx.flit.dst_x = COORD_W'(s_dst[n] % MX); nx.flit.dst_y = COORD_W'(s_dst[n] / MX);
        nx.flit.la_port = xy_dir(COORD_W'(n % MX), COORD_W'(n / MX), nx.flit.dst_x, nx.flit.dst_y);
        nx.flit.ftype = F_VHEAD;
        nx.flit.data = mkdata(n, s_pkt[n], 0);
        s_cr[n][v]--;
      end
    end else if (s_act[n] && s_cr[n][s_vc[n]] > 0) begin
      nx.valid = 1; nx.vc = VC_W'(s_vc[n]);
      nx.flit.dst_x = COORD_W'(s_dst[n] % MX); nx.flit.dst_y = COORD_W'(s_dst[n] / MX);
      nx.flit.la_port = xy_dir(COORD_W'(n % MX), COORD_W'(n / MX), nx.flit.dst_x, nx.flit.dst_y);
      nx.flit.ftype = (s_idx[n] == 0) ? F_HEAD : (s_idx[n] == pkt_len - 1) ? F_TAIL : F_BODY;
      if (stat_frag && s_idx[n] < pkt_len - 1 && (s_idx[n] + 1) % (BUF_DEPTH + 1) == 0) begin
        nx.flit.ftype = F_VTAIL;
        s_vh[n] = 1;
      end
      nx.flit.data = mkdata(n, s_pkt[n], s_idx[n]);
      s_cr[n][s_vc[n]]--;
      s_idx[n]++;
      if (s_idx[n] == pkt_len) begin s_act[n] = 0; s_pkt[n]++; end
    end
    inj_link[n] = s_pend[n];
    inj_next[n].valid = nx.valid; inj_next[n].vc = nx.vc;
    s_pend[n] = nx;
  endtask

  task automatic sink_step(int n);
    link_t l;
    int v, src, pkt, idx;
    l = ej_link[n];
    ej_credit[n] = '0;
    if (l.valid) begin
      v = int'(l.vc); src = int'(l.flit.data[27:24]); pkt = int'(l.flit.data[23:8]); idx = int'(l.flit.data[7:0]);
      ej_credit[n][v] = 1'b1;
      chk(l.flit.data == mkdata(src, pkt, idx), "payload");
      if (is_head(l.flit.ftype)) begin
        chk(d_cur[n][v] < 0, "head on busy VC");
        d_cur[n][v] = src;
        if (l.flit.ftype == F_HEAD) begin
          chk(d_inpkt[n][src] < 0, "head inside packet");
          d_inpkt[n][src] = pkt; d_idx[n][src] = 1; d_vh[n][src] = 0;
        end else begin
          chk(d_inpkt[n][src] == pkt, "virtual head outside packet");
          d_vh[n][src]++;
          if (gen_time[src].exists(pkt)) vh_n++;
        end
      end else begin
        chk(d_cur[n][v] == src && d_inpkt[n][src] == pkt && idx == d_idx[n][src], "flit order");
        d_idx[n][src]++;
        if (is_tail(l.flit.ftype)) d_cur[n][v] = -1;
        if (l.flit.ftype == F_TAIL) begin
          chk(idx == pkt_len - 1, "tail position");
          d_inpkt[n][src] = -1;
          rcv_total++;
          if (gen_time[src].exists(pkt)) begin
            lat_sum += cyc - gen_time[src][pkt];
            lat_n++;
            if (d_vh[n][src] > vh_max) vh_max = d_vh[n][src];
            gen_time[src].delete(pkt);
          end
        end
      end
    end
  endtask

  task automatic step();
    @(posedge clk); #1;
    cyc++;
    for (int n = 0; n < N; n++) begin
      for (int c = 0; c < NUM_VC; c++) if (inj_credit[n][c]) s_cr[n][c]++;
      sink_step(n);
      source_step(n);
    end
  endtask

  // run one load point; returns average latency (x100) and fragmentation rate (%)
  task automatic run_point(int len, int ld, bit st, output int lat100, output int frag_pct);
    int k;
    pkt_len = len; load = ld; stat_frag = st;
    lat_sum = 0; lat_n = 0; vh_n = 0; vh_max = 0;
    meas_lo = cyc + WARM; meas_hi = cyc + WARM + MEAS;
    gen_on = 1;
    repeat (WARM + MEAS) step();
    gen_on = 0;
    k = 0;
    while ((rcv_total < gen_total) && k < 40000) begin step(); k++; end
    chk(rcv_total == gen_total, $sformatf("len %0d load %0d: generated %0d received %0d", len, ld, gen_total, rcv_total));
    chk(lat_n > 0, "no measured packets");
    // a fragment is at most one VC's storage (BUF_DEPTH + 1 flits), so a
    // packet can be cut at most (len - 1) / (BUF_DEPTH + 1) times
    if (!st) chk(vh_max <= (len - 1) / (BUF_DEPTH + 1),
                 $sformatf("%0d-flit packet cut %0d times", len, vh_max));
    lat100   = (lat_n > 0) ? int'((lat_sum * 100) / lat_n) : 0;
    frag_pct = (lat_n > 0) ? (vh_n * 100) / lat_n : 0;
    $display("%s packet %2d flits  load %2d%%  packets %5d  avg latency %0d.%02d  fragmentation %3d%%  most cuts %0d",
             st ? "static " : "dynamic", len, ld, lat_n, lat100 / 100, lat100 % 100, frag_pct, vh_max);
  endtask

  int lat [2][NPTS];
  int frg [2][NPTS];
  int slat [2][2];
  int sfrg [2][2];

  initial begin
    for (int n = 0; n < N; n++) begin
      inj_link[n] = '0; inj_next[n] = '0; ej_credit[n] = '0; s_pend[n] = '0; s_act[n] = 0; s_pkt[n] = 0; s_vh[n] = 0;
      for (int c = 0; c < NUM_VC; c++) begin s_cr[n][c] = BUF_DEPTH; d_cur[n][c] = -1; end
      for (int s = 0; s < N; s++) begin d_inpkt[n][s] = -1; d_idx[n][s] = 0; end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int li = 0; li < 2; li++)
      for (int p = 0; p < NPTS; p++)
        run_point(li == 0 ? 8 : 16, LOADS[p], 0, lat[li][p], frg[li][p]);
    // static fragmentation at the source, as in the comparison schemes:
    // one cut per 8-flit packet, two per 16-flit packet
    for (int li = 0; li < 2; li++)
      for (int p = 0; p < 2; p++)
        run_point(li == 0 ? 8 : 16, LOADS[2 * p + 1], 1, slat[li][p], sfrg[li][p]);

    for (int li = 0; li < 2; li++) begin
      int len, zero_load;
      len = (li == 0) ? 8 : 16;
      // zero-load: 2 cycles per link hop + 1, average 2.67 hops for uniform
      // random traffic in a 4x4 mesh, plus the packet's serialisation, plus
      // one cycle from generation to injection
      zero_load = 2 * 267 + 100 + (len - 1) * 100 + 100;
      chk(lat[li][0] < zero_load + 400, $sformatf("%0d-flit low-load latency %0d.%02d far above zero-load %0d.%02d",
          len, lat[li][0] / 100, lat[li][0] % 100, zero_load / 100, zero_load % 100));
      chk(lat[li][0] >= zero_load - 300, "low-load latency below zero-load bound");
      chk(frg[li][0] < 30, "many packets cut at low load");
      chk(frg[li][NPTS-1] > frg[li][0], "fragmentation does not grow with load");
      chk(lat[li][NPTS-1] > lat[li][0], "latency does not grow with load");
    end
    chk(frg[1][NPTS-1] > frg[0][NPTS-1], "16-flit packets not cut more often than 8-flit ones");
    for (int li = 0; li < 2; li++)
      for (int p = 0; p < 2; p++)
        chk(sfrg[li][p] >= 100 * (li + 1), "static mode: fewer virtual heads than cuts at the source");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
