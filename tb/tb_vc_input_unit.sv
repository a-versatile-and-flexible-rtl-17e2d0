// tb_vc_input_unit: two input units, one plain (+X port) and one with bypass (IX port), get
// random multi-flit packets into random VCs under credit flow control and random grants.
// A queue model per VC checks head flits, requested ports (mesh routes), head/body state,
// the held output VC, credits and the busy flag; directed steps check that a plain VC requests
// one cycle after arrival and a bypass VC in the arrival cycle.
module tb_vc_input_unit;
  import adapt_noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [COORD_W-1:0] my_x = 3'd3, my_y = 3'd3;
  route_cfg_t rcfg;
  assign rcfg = mesh_route(3'd3, 3'd3);

  chan_t   in_c   [2];
  credit_t cr     [2];
  logic  [NUM_VCS-1:0] rv [2], rva [2], rany [2], rcls [2], gnt [2];
  port_e   rport  [2][NUM_VCS];
  logic [VC_W-1:0] routvc [2][NUM_VCS];
  flit_t   hf     [2][NUM_VCS];
  logic [VC_W-1:0] govc [2];
  logic    busy [2], byp [2];

  vc_input_unit #(.PORT(P_XP), .BYPASS(1'b0)) u_plain (
    .clk, .rst_n, .powered(1'b1), .my_x, .my_y, .route_cfg(rcfg), .in_chan(in_c[0]), .cr_out(cr[0]),
    .req_valid(rv[0]), .req_port(rport[0]), .req_va(rva[0]), .req_cls_any(rany[0]), .req_cls(rcls[0]),
    .req_outvc(routvc[0]), .head_flit(hf[0]), .gnt(gnt[0]), .gnt_outvc(govc[0]), .busy(busy[0]),
    .bypass_used(byp[0]));
  vc_input_unit #(.PORT(P_IX), .BYPASS(1'b1)) u_byp (
    .clk, .rst_n, .powered(1'b1), .my_x, .my_y, .route_cfg(rcfg), .in_chan(in_c[1]), .cr_out(cr[1]),
    .req_valid(rv[1]), .req_port(rport[1]), .req_va(rva[1]), .req_cls_any(rany[1]), .req_cls(rcls[1]),
    .req_outvc(routvc[1]), .head_flit(hf[1]), .gnt(gnt[1]), .gnt_outvc(govc[1]), .busy(busy[1]),
    .bypass_used(byp[1]));

  flit_t q [2][NUM_VCS][$];
  int    credits [2][NUM_VCS];
  bit    act [2][NUM_VCS];
  logic [VC_W-1:0] hold_vc [2][NUM_VCS];
  int    pkt_left [2];
  logic [VC_W-1:0] pkt_vc [2];
  logic [COORD_W-1:0] pkt_dx [2], pkt_dy [2];
  int    n_byp = 0, seqn = 0;

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s @%0t", s, $time); end
  endtask

  function automatic port_e model_route(input flit_t f);
    if (f.dst_x > my_x) return P_XP;
    if (f.dst_x < my_x) return P_XN;
    if (f.dst_y > my_y) return P_YP;
    if (f.dst_y < my_y) return P_YN;
    return P_NI;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < 2; u++) begin
      in_c[u] = '0; gnt[u] = '0; govc[u] = '0; pkt_left[u] = 0;
      for (int v = 0; v < NUM_VCS; v++) begin credits[u][v] = BUF_DEPTH; act[u][v] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // directed: timing of plain vs bypass VC
    for (int u = 0; u < 2; u++) begin
      in_c[u].valid = 1; in_c[u].flit = '0; in_c[u].flit.head = 1; in_c[u].flit.tail = 1;
      in_c[u].flit.vc = 2'd1; in_c[u].flit.dst_x = 3'd5; in_c[u].flit.dst_y = 3'd3;
    end
    #1;
    check(rv[0] == 0, "plain VC does not request in the arrival cycle");
    check(rv[1] == 4'b0010 && rport[1][1] == P_XP, "bypass VC requests in the arrival cycle");
    gnt[1] = 4'b0010; govc[1] = 2'd0;
    #1;
    check(byp[1] == 1, "bypass taken");
    @(negedge clk);
    in_c[0].valid = 0; in_c[1].valid = 0; gnt[1] = 0;
    #1;
    check(rv[0] == 4'b0010 && rport[0][1] == P_XP && rva[0][1], "plain VC requests one cycle later");
    check(rv[1] == 0 && !busy[1], "bypassed flit was not stored");
    check(cr[1].valid && cr[1].vc == 2'd1, "credit for the bypassed flit");
    gnt[0] = 4'b0010;
    @(negedge clk);
    gnt[0] = 0;
    #1;
    check(cr[0].valid && cr[0].vc == 2'd1, "credit after pop");
    check(!busy[0], "plain unit empty again");

    // random
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      in_c[0] = '0;
      in_c[1] = '0;
      gnt[0]  = '0;
      gnt[1]  = '0;
      #1;
      for (int u = 0; u < 2; u++) begin
        // credits returned by the unit (registered from the previous grant)
        if (cr[u].valid) credits[u][cr[u].vc]++;
        // check requests against model
        for (int v = 0; v < NUM_VCS; v++) begin
          bit has;
          has = q[u][v].size() > 0;
          check(rv[u][v] == has, $sformatf("u%0d vc%0d req_valid", u, v));
          if (has) begin
            check(hf[u][v].data == q[u][v][0].data && hf[u][v].head == q[u][v][0].head
                  && hf[u][v].tail == q[u][v][0].tail, "head flit");
            check(rva[u][v] == !act[u][v], "head/body state");
            if (act[u][v]) check(routvc[u][v] == hold_vc[u][v], "held output VC");
            else check(rport[u][v] == model_route(q[u][v][0]), "route of head flit");
          end
        end
        // new arrival
        in_c[u] = '0;
        if ($urandom_range(0, 1) != 0) begin
          if (pkt_left[u] == 0 && $urandom_range(0,1)) begin
            pkt_left[u] = $urandom_range(1, 6);
            pkt_vc[u]   = VC_W'($urandom);
            pkt_dx[u]   = COORD_W'($urandom); pkt_dy[u] = COORD_W'($urandom);
            in_c[u].flit.head = 1;
          end
          if (pkt_left[u] > 0 && credits[u][pkt_vc[u]] > 0) begin
            if (in_c[u].flit.head == 0 && pkt_left[u] > 0) ;
            in_c[u].valid = 1;
            in_c[u].flit.vc = pkt_vc[u];
            in_c[u].flit.tail = (pkt_left[u] == 1);
            in_c[u].flit.dst_x = pkt_dx[u]; in_c[u].flit.dst_y = pkt_dy[u];
            in_c[u].flit.data = DATA_W'(seqn++);
          end else in_c[u].flit.head = 0;
        end
        // grant a random requesting VC
        gnt[u] = '0;
      end
      begin chan_t t0, t1; t0 = in_c[0]; t1 = in_c[1]; in_c[0] = t0; in_c[1] = t1; end
      #1;
      for (int u = 0; u < 2; u++) begin
        int k, st;
        st = $urandom_range(0, NUM_VCS - 1);
        for (int j = 0; j < NUM_VCS; j++) begin
          k = (st + j) % NUM_VCS;
          if (rv[u][k] && gnt[u] == 0 && $urandom_range(0, 3) != 0) begin
            gnt[u][k] = 1'b1;
            govc[u] = VC_W'($urandom);
          end
        end
      end
      #1;
      // update model at the clock edge
      for (int u = 0; u < 2; u++) begin
        if (in_c[u].valid) begin
          credits[u][in_c[u].flit.vc]--;
          if (in_c[u].flit.head && pkt_left[u] == 0) ;
          pkt_left[u]--;
          q[u][in_c[u].flit.vc].push_back(in_c[u].flit);
          if (u == 1 && byp[1]) n_byp++;
        end
        for (int v = 0; v < NUM_VCS; v++) if (gnt[u][v]) begin
          flit_t f;
          f = q[u][v].pop_front();
          if (!act[u][v] && !f.tail) begin act[u][v] = 1; hold_vc[u][v] = govc[u]; end
          else if (f.tail) act[u][v] = 0;
        end
      end
    end
    check(n_byp > 0, "random bypasses happened");
    $display("bypassed flits in random phase: %0d", n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
