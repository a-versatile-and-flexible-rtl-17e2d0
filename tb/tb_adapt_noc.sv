// tb_adapt_noc: end-to-end test of the whole adaptable network at its default size (8x8).
//
// 1. After reset the network is a plain mesh: zero-load latencies are measured and checked
//    against the pipeline (2 cycles per router, bypassed NI buffer at the source), then random
//    multi-flit packets run all-to-all on both virtual networks.
// 2. While the upper-right quarter (4..7,4..7) keeps running mesh traffic, the other three 4x4
//    quarters are re-configured one after another through the configuration controller:
//    (0..3,0..3) torus, (4..7,0..3) mesh requests + tree replies from a memory-controller node
//    at (7,0), (0..3,4..7) concentrated mesh with gated ports. Phase cycle counts are checked.
// 3. Traffic runs in all four subNoCs at once; every packet is checked for destination, order
//    and payload. Tree replies must reach the farthest node as fast as a 2-hop mesh path, a
//    torus wrap-around packet as fast as a 1-hop path.
// 4. The concentrated mesh is turned back into a mesh, which has to wake its gated ports.
// Mechanisms counted (each must occur): buffer bypass, IX/IY into the chiplet router (3:1 mux),
// chiplet router into the interposer switch (5:1 mux), dateline crossings, injection held for a
// drain, gated ports, port wake-up, completed re-configurations. Link conflicts must not occur,
// and no packet may start at a node whose subNoC is being drained.
module tb_adapt_noc;
  import adapt_noc_pkg::*;
  import adapt_noc_tb_pkg::*;

  localparam int NX = MESH_X;
  localparam int NY = MESH_Y;
  localparam int N  = NX * NY;
  localparam int MAXP = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] tx_valid, tx_ready, rx_valid, rx_ready;
  flit_t        tx_flit [N];
  flit_t        rx_flit [N];
  logic         cfg_wr_en = 1'b0, cmd_start = 1'b0;
  logic [5:0]   cfg_wr_addr = '0;
  router_cfg_t  cfg_wr_data = '0;
  logic [COORD_W-1:0] cmd_x0 = '0, cmd_y0 = '0, cmd_x1 = '0, cmd_y1 = '0;
  logic         cfg_busy, cfg_done, link_conflict;
  logic [31:0]  drain_cycles, pwr_cycles, link_cycles;
  logic [N-1:0] ev_bypass, ev_inj_mux, ev_is_mux, ev_dateline, waking;
  logic [NUM_PORTS-1:0] port_on [N];

  adapt_noc dut (.*);

  // ---------------- packet bookkeeping ----------------
  int p_src [MAXP], p_dst [MAXP], p_vn [MAXP], p_len [MAXP];
  longint p_t0 [MAXP], p_t1 [MAXP];
  int p_next [MAXP];
  bit p_done [MAXP];
  int npk = 0;
  int srcq [N][$];
  int cur_flit [N];
  longint cyc = 0;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_inj = 0, n_ismux = 0, n_dl = 0, n_hold = 0, n_gated = 0, n_wake = 0,
      n_cfg = 0, n_conf = 0;
  bit hold_seen [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic int node(input int x, input int y);
    return y * NX + x;
  endfunction

  function automatic int new_pkt(input int s, input int d, input int vn, input int len);
    int id;
    id = npk++;
    p_src[id] = s; p_dst[id] = d; p_vn[id] = vn; p_len[id] = len;
    p_next[id] = 0; p_done[id] = 0; p_t0[id] = -1; p_t1[id] = -1;
    srcq[s].push_back(id);
    return id;
  endfunction

  // sources
  always_comb begin
    for (int n = 0; n < N; n++) begin
      tx_valid[n] = 1'b0;
      tx_flit[n]  = '0;
      if (rst_n && srcq[n].size() > 0) begin
        int id;
        id = srcq[n][0];
        tx_valid[n]         = 1'b1;
        tx_flit[n].head     = (cur_flit[n] == 0);
        tx_flit[n].tail     = (cur_flit[n] == p_len[id] - 1);
        tx_flit[n].vc       = vc_of(p_vn[id], 0);
        tx_flit[n].dst_x    = COORD_W'(p_dst[id] % NX);
        tx_flit[n].dst_y    = COORD_W'(p_dst[id] / NX);
        tx_flit[n].src_x    = COORD_W'(n % NX);
        tx_flit[n].src_y    = COORD_W'(n / NX);
        tx_flit[n].data     = {64'(id * 7 + 3), 32'(cur_flit[n]), 32'(id)};
      end
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int n = 0; n < N; n++) begin
        if (tx_valid[n] && tx_ready[n]) begin
          int id;
          id = srcq[n][0];
          if (cur_flit[n] == 0) p_t0[id] = cyc;
          if (cur_flit[n] == p_len[id] - 1) begin
            cur_flit[n] = 0;
            void'(srcq[n].pop_front());
          end else cur_flit[n]++;
        end
        if (rx_valid[n] && rx_ready[n]) begin
          int id, seq;
          id  = int'(rx_flit[n].data[31:0]);
          seq = int'(rx_flit[n].data[63:32]);
          if (id < 0 || id >= npk) check(0, "unknown packet id");
          else begin
            check(p_dst[id] == n, $sformatf("packet %0d delivered to node %0d, wanted %0d", id, n, p_dst[id]));
            check(seq == p_next[id] && rx_flit[n].data[127:64] == 64'(id * 7 + 3)
                  && rx_flit[n].head == (seq == 0) && rx_flit[n].tail == (seq == p_len[id]-1)
                  && int'(rx_flit[n].src_x) == p_src[id] % NX && int'(rx_flit[n].src_y) == p_src[id] / NX,
                  $sformatf("packet %0d flit %0d order/payload", id, seq));
            check(vnet_of(rx_flit[n].vc) == p_vn[id], "virtual network kept");
            p_next[id]++;
            if (rx_flit[n].tail) begin p_done[id] = 1; p_t1[id] = cyc; end
          end
        end
        if (dut.hold[n] && tx_valid[n] && !tx_ready[n]) begin n_hold++; end
        if (dut.hold[n] && tx_valid[n] && tx_ready[n])
          check(!tx_flit[n].head, $sformatf("no packet may start at node %0d while its subNoC drains", n));
        if (port_on[n] != '1) n_gated++;
        if (waking[n]) n_wake++;
      end
      n_bypass += $countones(ev_bypass);
      n_inj    += $countones(ev_inj_mux);
      n_ismux  += $countones(ev_is_mux);
      n_dl     += $countones(ev_dateline);
      if (link_conflict) n_conf++;
      if (cfg_done) n_cfg++;
    end
  end

  initial begin
    for (int n = 0; n < N; n++) cur_flit[n] = 0;
  end

  always_comb for (int n = 0; n < N; n++) rx_ready[n] = rst_n && (($urandom % 8) != 0 || 1'b1);

  // ---------------- helpers ----------------
  task automatic wait_all(input int from, input int to, input int limit);
    int t;
    t = 0;
    forever begin
      bit all;
      all = 1;
      for (int i = from; i < to; i++) if (!p_done[i]) all = 0;
      if (all) break;
      @(posedge clk);
      t++;
      if (t > limit) begin
        check(0, $sformatf("packets %0d..%0d not all delivered", from, to - 1));
        break;
      end
    end
    @(posedge clk);
  endtask

  function automatic longint lat(input int id);
    return p_t1[id] - p_t0[id];
  endfunction

  task automatic single(input int s, input int d, input int vn, output longint l);
    int id;
    id = new_pkt(s, d, vn, 1);
    wait_all(id, id + 1, 500);
    l = lat(id);
  endtask

  task automatic write_cfg(input int x, input int y, input router_cfg_t c);
    @(negedge clk);
    cfg_wr_en   = 1'b1;
    cfg_wr_addr = 6'(node(x, y));
    cfg_wr_data = c;
    @(negedge clk);
    cfg_wr_en   = 1'b0;
  endtask

  task automatic configure(input int x0, input int y0, input int x1, input int y1);
    @(negedge clk);
    cmd_x0 = COORD_W'(x0); cmd_y0 = COORD_W'(y0); cmd_x1 = COORD_W'(x1); cmd_y1 = COORD_W'(y1);
    cmd_start = 1'b1;
    @(negedge clk);
    cmd_start = 1'b0;
    while (!cfg_done) @(posedge clk);
    @(posedge clk);
  endtask

  // random traffic inside a 4x4 quarter; returns the first packet id
  task automatic region_traffic(input int ox, input int oy, input int count, output int first);
    first = npk;
    for (int k = 0; k < count; k++) begin
      int s, d;
      s = node(ox + $urandom_range(0, 3), oy + $urandom_range(0, 3));
      do d = node(ox + $urandom_range(0, 3), oy + $urandom_range(0, 3)); while (d == s);
      void'(new_pkt(s, d, $urandom_range(0, 1), $urandom_range(1, 4)));
    end
  endtask

  // ---------------- main sequence ----------------
  int first, f_d, f_a, f_b, f_c;
  longint l1, l2, l3, l_tree, l_wrap;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // zero-load latency in the mesh: 1 flit from the NI into the source router (bypass), then
    // 2 cycles per router and the ejection FIFO
    single(node(0, 0), node(1, 0), 0, l1);
    single(node(0, 0), node(2, 0), 0, l2);
    single(node(0, 0), node(3, 0), 0, l3);
    $display("mesh zero-load latency: 1 hop %0d, 2 hops %0d, 3 hops %0d", l1, l2, l3);
    check(l2 - l1 == 2 && l3 - l2 == 2, "2 cycles per router hop");
    check(l1 == 5, "1-hop zero-load latency is 5 cycles");

    // all-to-all random traffic on the full mesh
    first = npk;
    for (int k = 0; k < 400; k++) begin
      int s, d;
      s = $urandom_range(0, N - 1);
      do d = $urandom_range(0, N - 1); while (d == s);
      void'(new_pkt(s, d, $urandom_range(0, 1), $urandom_range(1, 5)));
    end
    wait_all(first, npk, 20000);

    // set-up words of the three re-configured quarters
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        write_cfg(x, y, torus_cfg(x, y, 0, 0));
        write_cfg(x + 4, y, tree_cfg(x + 4, y, 4, 0));
        write_cfg(x, y + 4, cmesh_cfg(x, y + 4, 0, 4));
      end

    // torus while the mesh quarter (4..7,4..7) and the future torus quarter are busy
    region_traffic(4, 4, 150, f_d);
    region_traffic(0, 0, 200, f_a);
    repeat (10) @(posedge clk);
    configure(0, 0, 3, 3);
    $display("torus set-up: drain %0d, power %0d, link %0d cycles", drain_cycles, pwr_cycles, link_cycles);
    check(drain_cycles > 2, "torus quarter had to drain");
    check(pwr_cycles == 32, "power phase: 2 cycles per router when nothing wakes");
    check(link_cycles == 48, "link phase: 2-cycle set-up + 1 cycle handshake per router");
    wait_all(f_a, f_a + 200, 20000);

    configure(4, 0, 7, 3);
    configure(0, 4, 3, 7);
    $display("cmesh set-up: drain %0d, power %0d, link %0d cycles", drain_cycles, pwr_cycles, link_cycles);
    check(pwr_cycles == 32, "power phase: empty ports switched off without waiting");
    wait_all(f_d, f_d + 150, 20000);

    // zero-load checks in the new topologies
    single(node(7, 0), node(4, 3), 1, l_tree);   // tree reply to the farthest node: 2 hops
    $display("tree reply MC(7,0)->(4,3): %0d cycles (mesh path is 6 hops)", l_tree);
    check(l_tree <= l2, "tree reply within two router hops");
    single(node(3, 1), node(0, 1), 0, l_wrap);   // torus wrap-around: 1 hop
    $display("torus wrap (3,1)->(0,1): %0d cycles", l_wrap);
    check(l_wrap == l1, "wrap-around link is one hop");
    single(node(0, 5), node(3, 6), 0, l3);       // cmesh: A-block node to C of the other block
    $display("cmesh (0,5)->(3,6): %0d cycles", l3);
    check(l3 < l1 + 6, "cmesh path faster than the 4-hop mesh path");

    // all four subNoCs at once
    region_traffic(0, 0, 300, f_a);
    first = npk;
    for (int k = 0; k < 150; k++) begin           // tree quarter: requests to MC, replies from it
      int nd;
      nd = node(4 + $urandom_range(0, 3), $urandom_range(0, 3));
      if (nd != node(7, 0)) begin
        void'(new_pkt(nd, node(7, 0), 0, 1));
        void'(new_pkt(node(7, 0), nd, 1, 5));
      end
    end
    f_b = first;
    region_traffic(0, 4, 300, f_c);
    region_traffic(4, 4, 300, f_d);
    wait_all(f_a, npk, 40000);

    // turn the concentrated mesh back into a mesh: gated ports must wake up (12 cycles)
    for (int y = 4; y < 8; y++)
      for (int x = 0; x < 4; x++) write_cfg(x, y, mesh_cfg(x, y));
    configure(0, 4, 3, 7);
    $display("cmesh -> mesh: power %0d cycles", pwr_cycles);
    check(pwr_cycles == 16 * (WAKE_CYCLES + 1), "every router woken in 12 cycles");
    region_traffic(0, 4, 200, f_c);
    wait_all(f_c, npk, 20000);

    // mechanisms
    $display("bypass %0d, IS->chiplet %0d, chiplet->IS %0d, dateline %0d, drain stalls %0d, gated %0d, waking %0d, reconfig %0d, conflicts %0d",
             n_bypass, n_inj, n_ismux, n_dl, n_hold, n_gated, n_wake, n_cfg, n_conf);
    check(n_bypass > 0, "buffer bypass happened");
    check(n_inj > 0,    "interposer switch fed the chiplet router through the 3:1 mux");
    check(n_ismux > 0,  "chiplet router fed the interposer switch through the 5:1 mux");
    check(n_dl > 0,     "dateline crossed in the torus");
    check(n_hold > 0,   "injection held while draining");
    check(n_gated > 0,  "ports power gated");
    check(n_wake > 0,   "ports woken");
    check(n_cfg == 4,   "four re-configurations completed");
    check(n_conf == 0,  "no adaptable-link segment had two senders");
    $display("packets delivered: %0d", npk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
