// tb_network_interface: one NI between a random packet source and sink and a model of the router.
//
// The source offers packets of 1 to 4 flits on a random virtual network. Each flit's payload
// carries its packet number and position. The router model keeps one 4-slot queue per VC of its
// NI input set. Each cycle it forwards one queued flit, from a random VC, back to the NI's
// ejection port when the NI has a credit for that VC. Then it returns the injection credit.
// Checks:
//   * Injection. An injected flit is on the link the cycle after it was accepted. Its VC lies in
//     the packet's virtual network and stays the same for the whole packet. A VC never receives
//     more flits than it has slots. The two VCs of a virtual network are both used.
//   * Hold. No packet starts while hold is high, and a started packet still finishes.
//   * Ejection. Packets reach the sink whole, never interleaved, with their flits in order, and
//     every packet arrives exactly once. The ejection FIFOs are never overrun. The NI is idle once
//     all traffic has drained.
module tb_network_interface;
  import adapt_noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic    hold = 0;
  logic    tx_valid, tx_ready, rx_valid, rx_ready, idle;
  flit_t   tx_flit, rx_flit;
  chan_t   inj_out, ej_in;
  credit_t inj_cr_in, ej_cr_out;

  network_interface dut (.*);

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s @%0t", s, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NPKT = 3000;

  // ---------------- source ----------------
  int    pkt_len [NPKT];
  int    pkt_vn  [NPKT];
  int    src_pkt, src_idx;
  bit    gen_on;
  flit_t cur;

  always_comb begin
    cur = '0;
    cur.head = (src_idx == 0);
    cur.tail = (src_idx == pkt_len[src_pkt % NPKT] - 1);
    cur.vc   = vc_of(pkt_vn[src_pkt % NPKT], 0);
    cur.dst_x = COORD_W'(src_pkt);
    cur.data  = DATA_W'({src_pkt[31:0], src_idx[7:0]});
  end
  assign tx_flit = cur;

  // ---------------- router model, sink, checks ----------------
  flit_t rq [NUM_VCS][$];
  int    ej_cred [NUM_VCS];
  int    inj_used [NUM_VCS];
  int    pkt_vc [NPKT];
  int    got [NPKT];
  int    rx_pkt, rx_idx;
  bit    rx_busy;
  int    vc_use [NUM_VCS];
  int    held_starts, held_cycles, ejected;
  flit_t last_sent;
  bit    last_acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      src_pkt <= 0; src_idx <= 0; tx_valid <= 0; rx_ready <= 0;
      ej_in <= '0; inj_cr_in <= '0; last_acc <= 0; rx_busy <= 0;
      for (int v = 0; v < NUM_VCS; v++) begin ej_cred[v] <= BUF_DEPTH; inj_used[v] <= 0; end
    end else begin
      bit acc;
      int pick;
      acc = tx_valid && tx_ready;
      // injection link carries last cycle's accepted flit
      check(inj_out.valid == last_acc, "injected flit on the link one cycle after acceptance");
      if (inj_out.valid) begin
        int p, k, vcn;
        p   = int'(inj_out.flit.data[39:8]);
        k   = int'(inj_out.flit.data[7:0]);
        vcn = int'(inj_out.flit.vc);
        check(inj_out.flit == '{head: last_sent.head, tail: last_sent.tail, vc: inj_out.flit.vc,
                                dl: 1'b0, dst_x: last_sent.dst_x, dst_y: last_sent.dst_y,
                                src_x: last_sent.src_x, src_y: last_sent.src_y,
                                data: last_sent.data}, "flit carried unchanged");
        check(vnet_of(inj_out.flit.vc) == pkt_vn[p], "VC in the packet's virtual network");
        if (k == 0) pkt_vc[p] = vcn;
        else check(pkt_vc[p] == vcn, "one VC for the whole packet");
        check(rq[vcn].size() < BUF_DEPTH, "no VC overflow at the router");
        rq[vcn].push_back(inj_out.flit);
        if (k == 0) vc_use[vcn]++;
      end
      // hold: a new packet must not start
      if (hold) held_cycles++;
      if (acc && hold && cur.head) held_starts++;
      last_acc  <= acc;
      last_sent <= cur;
      // source
      if (acc) begin
        if (cur.tail) begin src_pkt <= src_pkt + 1; src_idx <= 0; end
        else src_idx <= src_idx + 1;
      end
      tx_valid <= gen_on && ($urandom_range(3) != 0) && !(acc && cur.tail && src_pkt + 1 >= NPKT);
      rx_ready <= ($urandom_range(3) != 0);
      // router model forwards one flit to ejection, returns the injection credit
      ej_in <= '0; inj_cr_in <= '0;
      pick = $urandom_range(NUM_VCS - 1);
      for (int v = 0; v < NUM_VCS; v++)
        if (ej_cr_out.valid && int'(ej_cr_out.vc) == v) ej_cred[v] <= ej_cred[v] + 1;
      if (rq[pick].size() > 0 && ej_cred[pick] > 0 && $urandom_range(3) != 0) begin
        ej_in     <= '{valid: 1'b1, flit: rq[pick].pop_front()};
        inj_cr_in <= '{valid: 1'b1, vc: VC_W'(pick)};
        ej_cred[pick] <= ej_cred[pick] - 1 + ((ej_cr_out.valid && int'(ej_cr_out.vc) == pick) ? 1 : 0);
      end
      // sink
      check(!(ej_cr_out.valid && ej_cred[int'(ej_cr_out.vc)] >= BUF_DEPTH), "ejection credit in range");
      if (rx_valid && rx_ready) begin
        int p, k;
        p = int'(rx_flit.data[39:8]);
        k = int'(rx_flit.data[7:0]);
        if (!rx_busy) begin
          check(rx_flit.head && k == 0, "packet begins with its head");
          rx_pkt <= p;
        end else begin
          check(p == rx_pkt && k == rx_idx, "packet not interleaved, flits in order");
        end
        rx_idx  <= k + 1;
        rx_busy <= !rx_flit.tail;
        if (rx_flit.tail) begin
          check(k == pkt_len[p] - 1, "tail at the packet's last flit");
          got[p]++;
          ejected++;
        end
      end
    end
  end

  initial begin
    int n0;
    for (int i = 0; i < NPKT; i++) begin
      pkt_len[i] = $urandom_range(4, 1);
      pkt_vn[i]  = $urandom_range(NUM_VNETS - 1);
      got[i] = 0;
    end
    gen_on = 1; held_starts = 0; held_cycles = 0; ejected = 0;
    for (int v = 0; v < NUM_VCS; v++) vc_use[v] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(idle, "idle after reset");
    // run, with a few hold windows
    for (int w = 0; w < 20; w++) begin
      repeat ($urandom_range(600, 200)) @(negedge clk);
      hold = 1;
      n0 = src_pkt;
      repeat (40) @(negedge clk);
      check(src_pkt <= n0 + 1, "at most the started packet finishes under hold");
      hold = 0;
    end
    wait (src_pkt >= NPKT);
    gen_on = 0;
    repeat (200) @(negedge clk);
    check(held_starts == 0, "no packet started while held");
    check(held_cycles >= 800, "hold windows applied");
    check(ejected == NPKT, $sformatf("all packets delivered (%0d)", ejected));
    for (int i = 0; i < NPKT; i++) check(got[i] == 1, "each packet exactly once");
    for (int v = 0; v < NUM_VCS; v++) check(vc_use[v] > NPKT / 8, "every VC used");
    check(idle, "idle when drained");
    $display("packets %0d, per VC %0d %0d %0d %0d", ejected, vc_use[0], vc_use[1], vc_use[2], vc_use[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
