// tb_subnoc_config_ctrl: the re-configuration sequence on a 4x4 network (size reduced to keep
// the run short; the controller is written for any size).
//
// Random router words are written into the table, and then random rectangular regions are
// re-configured one after another. Behavioural responders stand in for the routers:
//   * the region stays busy for a random number of cycles after the command starts;
//   * after a power commit, a router's power-ready stays low for a random K cycles;
//   * after a link commit, its link-ready stays low for a random L cycles.
// These give the expected cost of every phase:
//   drain = busy cycles + 2       power = sum(K + 2)       link = sum(L + 2)
// With the real controllers, K = 0 or WAKE_CYCLES - 1 and L = LINK_SETUP_CYCLES - 1. That gives
// 2 or 13 cycles per router for power and 3 cycles per router for link.
// The testbench checks:
//   * hold covers exactly the region from the drain until `done`;
//   * no commit happens before the region has been idle for two cycles;
//   * every router of the region gets one power commit, then one link commit, in row order, and
//     nothing outside the region is committed;
//   * each commit carries the router's table word;
//   * the three cycle counters;
//   * one `done` pulse per command.
module tb_subnoc_config_ctrl;
  import adapt_noc_pkg::*;

  localparam int NX = 4, NY = 4, N = NX * NY, AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               wr_en = 0, start = 0, busy, done;
  logic [AW-1:0]      wr_addr = '0;
  router_cfg_t        wr_data = '0, cfg_out;
  logic [COORD_W-1:0] x0 = '0, y0 = '0, x1 = '0, y1 = '0;
  logic [31:0]        drain_cycles, pwr_cycles, link_cycles;
  logic [N-1:0]       hold, pwr_commit, link_commit, node_idle, pwr_ready, link_ready;

  subnoc_config_ctrl #(.NX(NX), .NY(NY)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s @%0t", s, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- responders and monitors ----
  router_cfg_t ref_tbl [N];
  int  busy_left;            // cycles the region still reports busy once held
  int  pk [N], lk [N];       // per-router K and L of the current command
  int  pcnt [N], lcnt [N];
  int  idle_run;             // consecutive cycles the region was idle while held
  int  p_seq [$], l_seq [$];
  int  n_done;
  bit  in_cmd;
  logic [N-1:0] mask;

  always_comb
    for (int n = 0; n < N; n++) begin
      pwr_ready[n]  = (pcnt[n] == 0);
      link_ready[n] = (lcnt[n] == 0);
      node_idle[n]  = !(mask[n] && busy_left > 0) && ((n % 3) != 0 || mask[n] || busy_left == 0);
    end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) begin pcnt[n] <= 0; lcnt[n] <= 0; end
      busy_left <= 0; idle_run <= 0; n_done <= 0;
    end else begin
      // hold is raised one cycle into the drain and dropped with done
      if (in_cmd) check(hold == ((busy && drain_cycles != 0) ? mask : '0), "hold covers exactly the region");
      if (busy && busy_left > 0) busy_left <= busy_left - 1;
      idle_run <= ((node_idle | ~mask) == '1 && busy) ? idle_run + 1 : 0;
      for (int n = 0; n < N; n++) begin
        if (pcnt[n] > 0) pcnt[n] <= pcnt[n] - 1;
        if (lcnt[n] > 0) lcnt[n] <= lcnt[n] - 1;
        if (pwr_commit[n]) begin
          check(mask[n], "power commit inside the region");
          check(idle_run >= 2, "power commit only after two idle cycles");
          check(cfg_out == ref_tbl[n], "power commit carries the table word");
          check(l_seq.size() == 0, "all power commits before link commits");
          p_seq.push_back(n);
          pcnt[n] <= pk[n];
        end
        if (link_commit[n]) begin
          check(mask[n], "link commit inside the region");
          check(cfg_out == ref_tbl[n], "link commit carries the table word");
          l_seq.push_back(n);
          lcnt[n] <= lk[n];
        end
      end
      check($countones(pwr_commit) + $countones(link_commit) <= 1, "one commit at a time");
      if (done) n_done <= n_done + 1;
    end
  end

  initial begin
    int bl, exp_p, exp_l, idx, done0;
    int rx0, rx1, ry0, ry1;
    mask = '0; in_cmd = 0;
    for (int n = 0; n < N; n++) begin pk[n] = 0; lk[n] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && hold == '0, "idle after reset");
    // fill the table
    for (int n = 0; n < N; n++) begin
      router_cfg_t w;
      for (int b = 0; b < $bits(router_cfg_t); b += 32) w[b +: 32] = $urandom;
      ref_tbl[n] = w;
      wr_en = 1; wr_addr = AW'(n); wr_data = w;
      @(negedge clk);
    end
    wr_en = 0;

    for (int c = 0; c < 60; c++) begin
      rx0 = $urandom_range(NX - 1); rx1 = $urandom_range(NX - 1, rx0);
      ry0 = $urandom_range(NY - 1); ry1 = $urandom_range(NY - 1, ry0);
      bl  = (c % 4 == 0) ? 0 : $urandom_range(30);
      exp_p = 0; exp_l = 0;
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++) begin
          idx = y * NX + x;
          mask[idx] = (x >= rx0 && x <= rx1 && y >= ry0 && y <= ry1);
          pk[idx] = (c % 3 == 0) ? ((x + y) % 2 == 0 ? WAKE_CYCLES - 1 : 0) : $urandom_range(15);
          lk[idx] = (c % 3 == 0) ? LINK_SETUP_CYCLES - 1 : $urandom_range(5);
          if (mask[idx]) begin exp_p += pk[idx] + 2; exp_l += lk[idx] + 2; end
        end
      busy_left = bl;
      p_seq.delete(); l_seq.delete();
      done0 = n_done;
      x0 = COORD_W'(rx0); x1 = COORD_W'(rx1); y0 = COORD_W'(ry0); y1 = COORD_W'(ry1);
      start = 1; in_cmd = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      check(drain_cycles == 32'(bl + 2), $sformatf("drain %0d cycles, expected %0d", drain_cycles, bl + 2));
      check(pwr_cycles == 32'(exp_p), $sformatf("power %0d cycles, expected %0d", pwr_cycles, exp_p));
      check(link_cycles == 32'(exp_l), $sformatf("link %0d cycles, expected %0d", link_cycles, exp_l));
      @(negedge clk);
      in_cmd = 0;
      check(!busy && hold == '0 && n_done == done0 + 1, "one done pulse, hold released");
      check(p_seq.size() == $countones(mask) && l_seq.size() == $countones(mask), "each router once");
      idx = 0;
      for (int y = ry0; y <= ry1; y++)
        for (int x = rx0; x <= rx1; x++) begin
          check(p_seq[idx] == y * NX + x && l_seq[idx] == y * NX + x, "row order");
          idx++;
        end
      repeat ($urandom_range(5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
