// tb_adaptable_router: one adaptable router at (2,2) between traffic sources and credit-returning
// sinks on all seven ports.
//
// Directed part (zero load):
//   * Mesh input to mesh output: the flit is on the output link 2 cycles after it was on the
//     input link (buffer write, then route + allocation + crossbar).
//   * NI input to mesh output: 1 cycle, because the NI buffers are bypassed when empty.
//   * A flit arriving on the interposer row channel (IX) for this node: ejected 1 cycle later
//     through the 3:1 injection mux, with the bypass event.
//   * Only IX and IY powered: the chiplet crossbar is off, and a flit still turns from IX to IY
//     in 1 cycle through the interposer switch.
//   * NI and IX flits offered in the same cycle: they share the 3:1 mux and leave in different
//     cycles; the mux event is raised.
//   * NI to IY: the flit leaves the chiplet crossbar through the 5:1 mux toward the interposer
//     switch, 1 cycle, with the 5:1 mux event.
//   * The link set-up takes effect 2 cycles after its commit, and woken ports take 12.
// Random part (mesh set-up): up to 8000 packets of 1 to 4 flits are sent from the four mesh inputs and
// the NI, with destinations that respect X-then-Y order. Each packet must leave on the
// dimension-order port, whole and with its flits in order on its VC. No output VC may receive more
// flits than the sink has slots, and every packet must arrive exactly once. The router is idle
// afterwards.
module tb_adaptable_router;
  import adapt_noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [COORD_W-1:0] MX = 3'd2, MY = 3'd2;

  chan_t   mesh_in [4], mesh_out [4], adapt_in [6], adapt_out [6], ni_in, ej_out;
  credit_t mesh_cr_out [4], mesh_cr_in [4], adapt_cr_out [6], adapt_cr_in [6], ni_cr_out, ej_cr_in;
  router_cfg_t cfg;
  logic pwr_commit = 0, link_commit = 0, pwr_ready, link_ready, waking, idle;
  logic ev_bypass, ev_inj_mux, ev_is_mux, ev_dateline;
  link_cfg_t link_cfg;
  logic [NUM_TRACKS-1:0] sw_on_x, sw_on_y;
  logic [NUM_PORTS-1:0] port_on;

  adaptable_router dut (.clk, .rst_n, .my_x(MX), .my_y(MY), .mesh_in, .mesh_cr_out, .mesh_out,
    .mesh_cr_in, .adapt_in, .adapt_cr_out, .adapt_out, .adapt_cr_in, .ni_in, .ni_cr_out, .ej_out,
    .ej_cr_in, .cfg, .pwr_commit, .link_commit, .pwr_ready, .link_ready, .link_cfg, .sw_on_x,
    .sw_on_y, .port_on, .waking, .idle, .ev_bypass, .ev_inj_mux, .ev_is_mux, .ev_dateline);

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s @%0t", s, $time);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- port views: index 0..3 mesh, 4 NI, 5 IX, 6 IY ----
  chan_t   src [NUM_PORTS];   // random sources
  chan_t   dsrc [NUM_PORTS];  // directed flits
  credit_t scr [NUM_PORTS];   // credits returned by the sinks
  chan_t   o_ch [NUM_PORTS];
  credit_t i_cr [NUM_PORTS];

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      mesh_in[d]    = src[d] | dsrc[d];
      mesh_cr_in[d] = scr[d];
      o_ch[d]       = mesh_out[d];
      i_cr[d]       = mesh_cr_out[d];
      adapt_in[d]   = '0;
      adapt_cr_in[d] = '0;
    end
    ni_in          = src[4] | dsrc[4];
    ej_cr_in       = scr[4];
    o_ch[4]        = ej_out;
    i_cr[4]        = ni_cr_out;
    adapt_in[4]    = src[5] | dsrc[5];
    adapt_in[5]    = src[6] | dsrc[6];
    adapt_cr_in[4] = scr[5];
    adapt_cr_in[5] = scr[6];
    o_ch[5]        = adapt_out[4];
    o_ch[6]        = adapt_out[5];
    i_cr[5]        = adapt_cr_out[4];
    i_cr[6]        = adapt_cr_out[5];
  end

  function automatic int dor(input int dx, input int dy);
    if (dx > int'(MX)) return 0;
    if (dx < int'(MX)) return 1;
    if (dy > int'(MY)) return 2;
    if (dy < int'(MY)) return 3;
    return 4;
  endfunction

  // ---- random sources and checking sinks ----
  localparam int NPKT = 8000;
  bit gen_on = 0;
  int n_gen, n_got, n_byp, n_inj, n_is;
  int exp_port [NPKT], exp_len [NPKT], got [NPKT];
  int s_cred [NUM_PORTS][NUM_VCS];
  int s_pid [NUM_PORTS], s_idx [NUM_PORTS], s_vc [NUM_PORTS];
  bit s_act [NUM_PORTS];
  flit_t s_hdr [NUM_PORTS];
  int k_occ [NUM_PORTS][NUM_VCS];
  int k_pid [NUM_PORTS][NUM_VCS], k_idx [NUM_PORTS][NUM_VCS];
  int k_ret [NUM_PORTS][$];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_gen <= 0; n_got <= 0; n_byp <= 0; n_inj <= 0; n_is <= 0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        src[p] <= '0; scr[p] <= '0; s_act[p] <= 0;
        for (int v = 0; v < NUM_VCS; v++) begin
          s_cred[p][v] = BUF_DEPTH; k_occ[p][v] = 0; k_pid[p][v] = -1;
        end
      end
    end else begin
      int ng, nr;
      ng = n_gen;
      nr = n_got;
      if (ev_bypass)  n_byp <= n_byp + 1;
      if (ev_inj_mux) n_inj <= n_inj + 1;
      if (ev_is_mux)  n_is  <= n_is + 1;
      for (int p = 0; p < NUM_PORTS; p++) begin
        // credits from the router's inputs
        if (i_cr[p].valid) s_cred[p][i_cr[p].vc] = s_cred[p][i_cr[p].vc] + 1;
        if (dsrc[p].valid) s_cred[p][dsrc[p].flit.vc] = s_cred[p][dsrc[p].flit.vc] - 1;
        check(s_cred[p][0] <= BUF_DEPTH && s_cred[p][1] <= BUF_DEPTH &&
              s_cred[p][2] <= BUF_DEPTH && s_cred[p][3] <= BUF_DEPTH, "input credits in range");
        // sources: only the four mesh inputs and the NI
        src[p] <= '0;
        if (p < 5 && gen_on) begin
          if (!s_act[p] && ng < NPKT && $urandom_range(2) == 0) begin
            int dx, dy, vn, len;
            flit_t h;
            vn = $urandom_range(1);
            unique case (p)
              0: begin dx = $urandom_range(MX); dy = $urandom_range(7); end
              1: begin dx = $urandom_range(7, MX); dy = $urandom_range(7); end
              2: begin dx = MX; dy = $urandom_range(MY); end
              3: begin dx = MX; dy = $urandom_range(7, MY); end
              default: begin
                do begin dx = $urandom_range(7); dy = $urandom_range(7); end
                while (dx == int'(MX) && dy == int'(MY));
              end
            endcase
            len = $urandom_range(4, 1);
            h = '0;
            h.dst_x = COORD_W'(dx); h.dst_y = COORD_W'(dy);
            h.vc = vc_of(vn, 0);
            exp_port[ng] = dor(dx, dy);
            exp_len[ng]  = len;
            got[ng]      = 0;
            s_hdr[p] <= h; s_pid[p] <= ng; s_idx[p] <= 0; s_act[p] <= 1;
            s_vc[p] <= -1;
            ng++;
          end else if (s_act[p] && $urandom_range(3) != 0) begin
            int v;
            v = s_vc[p];
            if (v < 0) begin
              // head picks a VC of the packet's virtual network with room
              int b;
              b = int'(s_hdr[p].vc) + $urandom_range(1);
              if (s_cred[p][b] > 0) v = b;
            end
            if (v >= 0 && s_cred[p][v] > 0) begin
              chan_t c;
              c = '0;
              c.valid = 1;
              c.flit = s_hdr[p];
              c.flit.vc = VC_W'(v);
              c.flit.head = (s_idx[p] == 0);
              c.flit.tail = (s_idx[p] == exp_len[s_pid[p]] - 1);
              c.flit.data = DATA_W'({s_pid[p][31:0], s_idx[p][7:0]});
              src[p] <= c;
              s_cred[p][v] = s_cred[p][v] - 1;
              s_vc[p] <= v;
              s_idx[p] <= s_idx[p] + 1;
              if (c.flit.tail) s_act[p] <= 0;
            end
          end
        end
        // sinks
        scr[p] <= '0;
        if (o_ch[p].valid) begin
          int v, pid, k;
          v   = int'(o_ch[p].flit.vc);
          pid = int'(o_ch[p].flit.data[39:8]);
          k   = int'(o_ch[p].flit.data[7:0]);
          check(k_occ[p][v] < BUF_DEPTH, "no output VC overflow");
          k_occ[p][v] = k_occ[p][v] + 1;
          k_ret[p].push_back(v);
          if (gen_on && pid < NPKT) begin
            check(exp_port[pid] == p, $sformatf("packet %0d on port %0d, expected %0d", pid, p, exp_port[pid]));
            if (o_ch[p].flit.head) begin
              check(k_pid[p][v] < 0 && k == 0, "head starts a packet on its VC");
              k_pid[p][v] = pid;
            end else
              check(k_pid[p][v] == pid && k == k_idx[p][v], "flits of a packet in order on one VC");
            k_idx[p][v] = k + 1;
            if (o_ch[p].flit.tail) begin
              check(k == exp_len[pid] - 1, "tail on the last flit");
              k_pid[p][v] = -1;
              got[pid]++;
              nr++;
            end
          end
        end
        if (k_ret[p].size() > 0 && $urandom_range(1) == 0) begin
          int v;
          v = k_ret[p].pop_front();
          k_occ[p][v] = k_occ[p][v] - 1;
          scr[p] <= '{valid: 1'b1, vc: VC_W'(v)};
        end
      end
      n_gen <= ng;
      n_got <= nr;
    end
  end

  // ---- directed tests ----
  function automatic chan_t one_flit(input int dx, input int dy, input int vc);
    chan_t c;
    c = '0;
    c.valid = 1;
    c.flit.head = 1; c.flit.tail = 1;
    c.flit.vc = VC_W'(vc);
    c.flit.dst_x = COORD_W'(dx); c.flit.dst_y = COORD_W'(dy);
    c.flit.data = DATA_W'({32'hFFFF_FFFF, 8'd0});
    return c;
  endfunction

  task automatic clear_dsrc();
    dsrc[0] = '0; dsrc[1] = '0; dsrc[2] = '0; dsrc[3] = '0; dsrc[4] = '0; dsrc[5] = '0; dsrc[6] = '0;
  endtask

  task automatic apply(input router_cfg_t c, input bit pw, input bit lk);
    @(negedge clk);
    cfg = c; pwr_commit = pw; link_commit = lk;
    @(negedge clk);
    pwr_commit = 0; link_commit = 0;
  endtask

  initial begin
    router_cfg_t c;
    int t, first;
    clear_dsrc();
    cfg = '0;
    cfg.pwr_en = '1;
    cfg.route = mesh_route(MX, MY);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(port_on == '1 && pwr_ready && link_ready && idle, "reset state");

    // mesh in -> mesh out: 2 cycles
    dsrc[1] = one_flit(5, 2, 0);
    @(negedge clk); clear_dsrc();
    check(!mesh_out[0].valid, "not out after 1 cycle");
    @(negedge clk);
    check(mesh_out[0].valid && mesh_out[0].flit.dst_x == 3'd5, "mesh hop: out after 2 cycles");
    repeat (3) @(negedge clk);

    // NI -> +Y: 1 cycle through the bypass
    dsrc[4] = one_flit(2, 6, 2);
    @(negedge clk); clear_dsrc();
    check(mesh_out[2].valid && mesh_out[2].flit.dst_y == 3'd6, "NI bypass: out after 1 cycle");
    repeat (3) @(negedge clk);

    // enable the IX receiver on row channel 1 and the IY sender on column channel 2
    c = cfg;
    c.link.in_tap[4]  = '{en: 1'b1, trk: 2'd1};
    c.link.out_tap[5] = '{en: 1'b1, trk: 2'd2};
    c.link.sw_x = 4'b0010;
    c.route.yt[0][6] = '{port: P_IY, dl: 1'b0};
    @(negedge clk);
    cfg = c; link_commit = 1;
    @(negedge clk);
    link_commit = 0;
    check(!link_ready && link_cfg.in_tap[4].en == 1'b0, "link set-up pending");
    @(negedge clk);
    check(link_ready && link_cfg.in_tap[4].en && sw_on_x == 4'b0010, "link set-up after 2 cycles");

    // IX -> NI: 1 cycle, bypass
    dsrc[5] = one_flit(2, 2, 1);
    @(negedge clk); clear_dsrc();
    check(ej_out.valid, $sformatf("IX to NI: ejected after 1 cycle (%b %b)", ej_out.valid, port_on));
    repeat (3) @(negedge clk);

    // NI and IX in the same cycle share the 3:1 mux
    dsrc[4] = one_flit(5, 2, 0);
    dsrc[5] = one_flit(2, 0, 0);
    first = 0;
    @(negedge clk); clear_dsrc();
    t = 1;
    if (mesh_out[0].valid) first++;
    if (mesh_out[3].valid) first++;
    check(first == 1, "one of the two through the 3:1 mux per cycle");
    @(negedge clk);
    check(mesh_out[0].valid || mesh_out[3].valid, "the other one the next cycle");
    check(n_inj == 2, $sformatf("3:1 mux event for the two IX flits (%0d)", n_inj));
    repeat (3) @(negedge clk);

    // NI -> IY through the 5:1 mux into the interposer switch, 1 cycle
    dsrc[4] = one_flit(2, 6, 0);
    @(negedge clk); clear_dsrc();
    check(adapt_out[5].valid && adapt_out[5].flit.dst_y == 3'd6, "NI to IY after 1 cycle");
    @(negedge clk);
    check(n_is == 1, "5:1 mux event");
    repeat (3) @(negedge clk);

    // only IX and IY powered: crossbar off, IX -> IY still works
    c = cfg;
    c.pwr_en = 7'b1100000;
    apply(c, 1, 0);
    check(port_on == 7'b1100000 && pwr_ready, "chiplet ports and crossbar off");
    dsrc[5] = one_flit(2, 6, 1);
    @(negedge clk); clear_dsrc();
    check(adapt_out[5].valid && adapt_out[5].flit.dst_y == 3'd6 && !mesh_out[2].valid,
          $sformatf("IX to IY with the crossbar off, 1 cycle (%b %b %b)", adapt_out[5].valid, mesh_out[2].valid, port_on));
    repeat (3) @(negedge clk);

    // wake every port: usable 12 cycles after the commit
    c.pwr_en = '1;
    @(negedge clk);
    cfg = c; pwr_commit = 1;
    t = 0;
    @(negedge clk);
    pwr_commit = 0;
    t = 1;
    while (!pwr_ready && t < 40) begin @(negedge clk); t++; end
    check(t == WAKE_CYCLES && port_on == '1, $sformatf("wake-up in %0d cycles", t));

    // back to the plain mesh set-up for random traffic
    c = cfg;
    c.link = '0;
    c.route = mesh_route(MX, MY);
    apply(c, 0, 1);
    repeat (3) @(negedge clk);
    check(link_ready && link_cfg == '0, "mesh set-up restored");

    gen_on = 1;
    wait (n_gen >= NPKT);
    repeat (500) @(negedge clk);
    if (n_got != NPKT)
      for (int p = 0; p < NUM_PORTS; p++)
        $display("port %0d act %0d idx %0d vc %0d cred %0d %0d %0d %0d occ %0d %0d %0d %0d ret %0d on %b",
                 p, s_act[p], s_idx[p], s_vc[p], s_cred[p][0], s_cred[p][1], s_cred[p][2],
                 s_cred[p][3], k_occ[p][0], k_occ[p][1], k_occ[p][2], k_occ[p][3], k_ret[p].size(), port_on);
    check(n_got == NPKT, $sformatf("all packets delivered (%0d of %0d)", n_got, NPKT));
    for (int i = 0; i < NPKT; i++) check(got[i] == 1, "each packet once");
    check(n_byp > 100, "NI bypass used under load");
    check(idle, "idle when drained");
    $display("packets %0d, bypass cycles %0d", n_got, n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
