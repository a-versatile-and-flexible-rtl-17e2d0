// tb_route_unit: random head flits and random route tables against an independent model of
// dimension-order table routing (X phase, Y phase, 2x2 delivery table, ejection) and of the
// dateline class rules.
module tb_route_unit;
  import adapt_noc_pkg::*;

  flit_t              flit;
  port_e              in_port, out_port;
  logic [COORD_W-1:0] my_x, my_y;
  route_cfg_t         cfg;
  logic               new_dl, cls_any, cls;
  int checks = 0, failures = 0;

  route_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic port_e rand_port();
    return port_e'($urandom_range(0, 6));
  endfunction

  initial begin
    int n_x = 0, n_y = 0, n_c = 0, n_e = 0, n_dl = 0;
    for (int it = 0; it < 4000; it++) begin
      port_e ep;
      logic  edl, ecany;
      int    vn;
      for (int v = 0; v < NUM_VNETS; v++) begin
        for (int k = 0; k < MESH_X; k++) begin
          cfg.xt[v][k].port = ($urandom_range(0, 5) == 0) ? P_NI : rand_port();
          cfg.xt[v][k].dl   = 1'($urandom);
          cfg.yt[v][k].port = ($urandom_range(0, 5) == 0) ? P_NI : rand_port();
          cfg.yt[v][k].dl   = 1'($urandom);
        end
        for (int k = 0; k < 4; k++) begin
          cfg.ct[v][k].port = rand_port();
          cfg.ct[v][k].dl   = 1'($urandom);
        end
      end
      cfg.torus = 2'($urandom);
      flit      = '0;
      flit.head = 1'b1;
      flit.vc   = VC_W'($urandom);
      flit.dl   = 1'($urandom);
      my_x = COORD_W'($urandom); my_y = COORD_W'($urandom);
      flit.dst_x = ($urandom_range(0, 2) == 0) ? my_x : COORD_W'($urandom);
      flit.dst_y = ($urandom_range(0, 2) == 0) ? my_y : COORD_W'($urandom);
      in_port = rand_port();
      #1;
      // model
      vn = int'(flit.vc) / VCS_PER_VNET;
      if (flit.dst_x != my_x && cfg.xt[vn][flit.dst_x].port != P_NI) begin
        ep  = cfg.xt[vn][flit.dst_x].port;
        edl = cfg.xt[vn][flit.dst_x].dl ||
              (flit.dl && (in_port == P_XP || in_port == P_XN || in_port == P_IX));
        n_x++;
      end else if (flit.dst_y != my_y && cfg.yt[vn][flit.dst_y].port != P_NI) begin
        ep  = cfg.yt[vn][flit.dst_y].port;
        edl = cfg.yt[vn][flit.dst_y].dl ||
              (flit.dl && (in_port == P_YP || in_port == P_YN || in_port == P_IY));
        n_y++;
      end else if (flit.dst_x != my_x || flit.dst_y != my_y) begin
        ep  = cfg.ct[vn][2 * int'(flit.dst_y[0]) + int'(flit.dst_x[0])].port;
        edl = cfg.ct[vn][2 * int'(flit.dst_y[0]) + int'(flit.dst_x[0])].dl;
        n_c++;
      end else begin
        ep  = P_NI;
        edl = 1'b0;
        n_e++;
      end
      ecany = !cfg.torus[vn] || ep == P_NI;
      if (edl) n_dl++;
      checks++;
      if (out_port != ep || new_dl != edl || cls_any != ecany || (!ecany && cls != edl)) begin
        failures++;
        if (failures < 10)
          $display("FAIL it %0d: port %0d/%0d dl %0d/%0d any %0d/%0d", it, out_port, ep, new_dl, edl, cls_any, ecany);
      end
    end
    checks++;
    if (n_x == 0 || n_y == 0 || n_c == 0 || n_e == 0 || n_dl == 0) failures++;
    $display("X %0d Y %0d block %0d eject %0d dateline %0d", n_x, n_y, n_c, n_e, n_dl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
