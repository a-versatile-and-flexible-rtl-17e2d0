// tb_switch_allocator: random requests, output VC states and power states. Every cycle the
// grants are checked against the allocation rules (one flit per buffer set and per output, one
// flit through the 3:1 injection mux and one through the 5:1 mux, credits, free VCs of the
// right virtual network and class, powered outputs and crossbar) and for maximality: a request
// left without a grant must be blocked by one of those rules. Rotation must let every buffer
// set win at least once under full contention.
module tb_switch_allocator;
  import adapt_noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic xbar_on;
  logic [NUM_PORTS-1:0] out_on, out_gnt;
  logic [NUM_VCS-1:0] req_valid [NUM_PORTS], req_va [NUM_PORTS], req_cls_any [NUM_PORTS],
                      req_cls [NUM_PORTS], out_vc_free [NUM_PORTS], out_credit [NUM_PORTS],
                      gnt [NUM_PORTS];
  port_e req_port [NUM_PORTS][NUM_VCS];
  logic [VC_W-1:0] req_outvc [NUM_PORTS][NUM_VCS], gnt_outvc [NUM_PORTS];
  logic [2:0] out_src [NUM_PORTS];
  logic [VC_W-1:0] out_src_vc [NUM_PORTS], out_vc [NUM_PORTS];
  logic inj_mux_used, is_mux_used;

  switch_allocator dut (.*);

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", s, $time); end
  endtask

  function automatic bit uses_inj(int p, int o); return p >= 4 && o <= 4; endfunction
  function automatic bit uses_is(int p, int o);  return p <= 4 && o >= 5; endfunction
  function automatic bit uses_xb(int p, int o);  return !(p >= 5 && o >= 5); endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int wins [NUM_PORTS];
    int n_inj = 0, n_is = 0;
    for (int p = 0; p < NUM_PORTS; p++) wins[p] = 0;
    xbar_on = 1; out_on = '1;
    for (int p = 0; p < NUM_PORTS; p++) begin
      req_valid[p] = 0; req_va[p] = 0; req_cls_any[p] = 0; req_cls[p] = 0;
      out_vc_free[p] = 0; out_credit[p] = 0;
      for (int v = 0; v < NUM_VCS; v++) begin req_port[p][v] = P_XP; req_outvc[p][v] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      bit full;
      @(negedge clk);
      full = (c < 200);
      xbar_on = full ? 1'b1 : ($urandom_range(0, 7) != 0);
      out_on  = full ? '1 : NUM_PORTS'($urandom) | NUM_PORTS'($urandom);
      for (int p = 0; p < NUM_PORTS; p++) begin
        out_vc_free[p] = full ? '1 : NUM_VCS'($urandom);
        out_credit[p]  = full ? '1 : NUM_VCS'($urandom | $urandom);
        req_valid[p]   = full ? '1 : NUM_VCS'($urandom);
        req_va[p]      = NUM_VCS'($urandom);
        req_cls_any[p] = NUM_VCS'($urandom);
        req_cls[p]     = NUM_VCS'($urandom);
        for (int v = 0; v < NUM_VCS; v++) begin
          req_port[p][v]  = full ? P_NI : port_e'($urandom_range(0, 6));
          req_outvc[p][v] = VC_W'((v / VCS_PER_VNET) * VCS_PER_VNET + $urandom_range(0, 1));
        end
      end
      #1;
      begin
        bit set_used [NUM_PORTS], out_used [NUM_PORTS];
        bit inj, isx;
        inj = 0; isx = 0;
        for (int p = 0; p < NUM_PORTS; p++) begin set_used[p] = 0; out_used[p] = 0; end
        // legality of the grants
        for (int p = 0; p < NUM_PORTS; p++) begin
          check($countones(gnt[p]) <= 1, "one VC per buffer set");
          for (int v = 0; v < NUM_VCS; v++) if (gnt[p][v]) begin
            int o;
            logic [VC_W-1:0] ov;
            o  = int'(req_port[p][v]);
            ov = gnt_outvc[p];
            check(req_valid[p][v], "grant without request");
            check(!out_used[o], "one flit per output");
            check(out_on[o] && (xbar_on || !uses_xb(p, o)), "powered path");
            check(out_credit[o][ov], "credit available");
            if (req_va[p][v]) check(out_vc_free[o][ov] && int'(ov) / VCS_PER_VNET == v / VCS_PER_VNET
                                    && (req_cls_any[p][v] || ov[0] == req_cls[p][v]), "VC allocation");
            else check(ov == req_outvc[p][v], "held VC kept");
            check(out_gnt[o] && int'(out_src[o]) == p && int'(out_src_vc[o]) == v && out_vc[o] == ov, "output view");
            if (uses_inj(p, o)) begin check(!inj, "3:1 mux used once"); inj = 1; if (p != 4) n_inj++; end
            if (uses_is(p, o))  begin check(!isx, "5:1 mux used once"); isx = 1; n_is++; end
            set_used[p] = 1; out_used[o] = 1;
            wins[p]++;
          end
        end
        for (int o = 0; o < NUM_PORTS; o++) check(out_gnt[o] == out_used[o], "out_gnt matches");
        // maximality
        for (int p = 0; p < NUM_PORTS; p++)
          for (int v = 0; v < NUM_VCS; v++) if (req_valid[p][v] && !gnt[p][v]) begin
            int o;
            bit vc_ok;
            o = int'(req_port[p][v]);
            vc_ok = 0;
            if (req_va[p][v]) begin
              for (int k = 0; k < VCS_PER_VNET; k++) begin
                int cand;
                cand = (v / VCS_PER_VNET) * VCS_PER_VNET + k;
                if (out_vc_free[o][cand] && out_credit[o][cand] && (req_cls_any[p][v] || k == int'(req_cls[p][v])))
                  vc_ok = 1;
              end
            end else vc_ok = out_credit[o][req_outvc[p][v]];
            check(set_used[p] || out_used[o] || !out_on[o] || (uses_xb(p, o) && !xbar_on) ||
                  (uses_inj(p, o) && inj) || (uses_is(p, o) && isx) || !vc_ok,
                  $sformatf("request set %0d vc %0d left idle without reason", p, v));
          end
      end
    end
    for (int p = 0; p < NUM_PORTS; p++) check(wins[p] > 0, $sformatf("set %0d never won", p));
    check(n_inj > 0 && n_is > 0, "both muxes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
