// adapt_noc_tb_pkg: set-up words for the subNoC topologies, as system software would compute
// them, plus small helpers shared by the testbenches.
//
// Each function returns the router_cfg_t of the router at global (x, y) for a 4x4 subNoC whose
// lower-left router is (ox, oy) (ox, oy even):
//   torus_cfg  4x4 torus. Wrap-around links: row/column channel 0 carries the +dir wrap
//              (last router -> first), channel 1 the -dir wrap; the hop over the wrap crosses
//              the dateline. Both virtual networks use dateline VC classes.
//   tree_cfg   mesh request network (vnet 0) and a tree reply network (vnet 1) rooted at the
//              memory controller in the lower-right corner (local (3,0)): the root reaches the
//              three routers of its row and the three of its column in one hop each (mesh link,
//              port switched onto channel 0, interposer port on channel 1), and each router of
//              the bottom row reaches the three routers of its column likewise: every node is
//              within two hops of the root.
//   cmesh_cfg  concentrated mesh: four 2x2 blocks, router D = local (2b+1, 2a) of each block is
//              the concentrating router. B (left of D) and C (above D) inject through the
//              interposer switch of D; A (diagonal) goes through the interposer switch of C.
//              The D routers form a 2x2 mesh over express links on channels 2 and 3. A, B and C
//              keep only their NI and interposer ports powered, D only what it uses.
//   mesh_cfg   plain mesh with every port powered (the state after reset).
package adapt_noc_tb_pkg;
  import adapt_noc_pkg::*;

  function automatic tap_t tp(input int t);
    tap_t r;
    r.en  = 1'b1;
    r.trk = TRK_W'(t);
    return r;
  endfunction

  function automatic route_ent_t re(input port_e p, input bit dl = 1'b0);
    route_ent_t r;
    r.port = p;
    r.dl   = dl;
    return r;
  endfunction

  function automatic router_cfg_t mesh_cfg(input int x, input int y);
    router_cfg_t c;
    c        = '0;
    c.pwr_en = '1;
    c.route  = mesh_route(COORD_W'(x), COORD_W'(y));
    return c;
  endfunction

  function automatic router_cfg_t torus_cfg(input int x, input int y, input int ox, input int oy);
    router_cfg_t c;
    int i, j;
    c = mesh_cfg(x, y);
    i = x - ox;
    j = y - oy;
    c.route.torus = '1;
    for (int vn = 0; vn < NUM_VNETS; vn++) begin
      for (int k = 0; k < 4; k++) begin
        int dx, dy;
        dx = (k - i + 4) % 4;
        dy = (k - j + 4) % 4;
        if (dx == 1 || dx == 2) c.route.xt[vn][ox+k] = re(P_XP, i == 3);
        if (dx == 3)            c.route.xt[vn][ox+k] = re(P_XN, i == 0);
        if (dy == 1 || dy == 2) c.route.yt[vn][oy+k] = re(P_YP, j == 3);
        if (dy == 3)            c.route.yt[vn][oy+k] = re(P_YN, j == 0);
      end
    end
    if (i == 3) begin c.link.out_tap[0] = tp(0); c.link.in_tap[0] = tp(1); end
    if (i == 0) begin c.link.in_tap[1]  = tp(0); c.link.out_tap[1] = tp(1); end
    if (j == 3) begin c.link.out_tap[2] = tp(0); c.link.in_tap[2] = tp(1); end
    if (j == 0) begin c.link.in_tap[3]  = tp(0); c.link.out_tap[3] = tp(1); end
    c.link.sw_x = (i < 3) ? 4'b0011 : 4'b0000;
    c.link.sw_y = (j < 3) ? 4'b0011 : 4'b0000;
    return c;
  endfunction

  function automatic router_cfg_t tree_cfg(input int x, input int y, input int ox, input int oy);
    router_cfg_t c;
    int i, j;
    c = mesh_cfg(x, y);
    i = x - ox;
    j = y - oy;
    // reply network (vnet 1)
    if (i == 3 && j == 0) begin
      c.route.xt[1][ox+2] = re(P_XN);
      c.route.xt[1][ox+1] = re(P_IX);
      c.route.xt[1][ox+0] = re(P_XP);
      c.link.out_tap[0]   = tp(0);   // +X port -> channel 0 -> (0,0)
      c.link.out_tap[4]   = tp(1);   // IX      -> channel 1 -> (1,0)
    end
    if (j == 0) begin
      c.route.yt[1][oy+1] = re(P_YP);
      c.route.yt[1][oy+2] = re(P_YN);
      c.route.yt[1][oy+3] = re(P_IY);
      c.link.out_tap[3]   = tp(0);   // -Y port -> column channel 0 -> (i,2)
      c.link.out_tap[5]   = tp(1);   // IY      -> column channel 1 -> (i,3)
    end
    if (i == 0 && j == 0) c.link.in_tap[1] = tp(0);   // -X input from the root
    if (i == 1 && j == 0) c.link.in_tap[4] = tp(1);   // IX input from the root
    if (j == 2) c.link.in_tap[5] = tp(0);             // IY input from the bottom row
    if (j == 3) c.link.in_tap[2] = tp(1);             // +Y input from the bottom row
    c.link.sw_x = (j == 0 && i < 3) ? 4'b0011 : 4'b0000;
    c.link.sw_y = (j == 0 || j == 1) ? 4'b0011 : (j == 2) ? 4'b0010 : 4'b0000;
    return c;
  endfunction

  function automatic router_cfg_t cmesh_cfg(input int x, input int y, input int ox, input int oy);
    router_cfg_t c;
    int i, j, bx, by;
    bit isd, isc, isb, isa;
    c  = '0;
    i  = x - ox;
    j  = y - oy;
    bx = ox + (i / 2) * 2;
    by = oy + (j / 2) * 2;
    isd = (i % 2 == 1) && (j % 2 == 0);
    isc = (i % 2 == 1) && (j % 2 == 1);
    isb = (i % 2 == 0) && (j % 2 == 0);
    isa = (i % 2 == 0) && (j % 2 == 1);
    for (int vn = 0; vn < NUM_VNETS; vn++) begin
      for (int k = 0; k < MESH_X; k++) c.route.xt[vn][k] = re(P_NI);
      for (int k = 0; k < MESH_Y; k++) c.route.yt[vn][k] = re(P_NI);
      for (int k = 0; k < 4; k++)      c.route.ct[vn][k] = re(P_NI);
      if (isd) begin
        for (int k = ox; k < ox + 4; k++) begin
          if (k < bx)     c.route.xt[vn][k] = re(P_XN);
          if (k > bx + 1) c.route.xt[vn][k] = re(P_XP);
        end
        for (int k = oy; k < oy + 4; k++) begin
          if (k < by)     c.route.yt[vn][k] = re(P_YN);
          if (k > by + 1) c.route.yt[vn][k] = re(P_YP);
        end
        c.route.ct[vn][0] = re(P_IX);   // B
        c.route.ct[vn][3] = re(P_IY);   // C
        c.route.ct[vn][2] = re(P_IY);   // A, via C's interposer switch
      end
      if (isc) begin
        for (int k = 0; k < MESH_X; k++) if (k < bx || k > bx + 1) c.route.xt[vn][k] = re(P_IY);
        for (int k = 0; k < MESH_Y; k++) if (k != by + 1) c.route.yt[vn][k] = re(P_IY);
        for (int k = 0; k < 4; k++) c.route.ct[vn][k] = re(P_IY);
        c.route.ct[vn][2] = re(P_IX);   // A
      end
      if (isb || isa) begin
        for (int k = 0; k < MESH_X; k++) c.route.xt[vn][k] = re(P_IX);
        for (int k = 0; k < MESH_Y; k++) c.route.yt[vn][k] = re(P_IX);
        for (int k = 0; k < 4; k++)      c.route.ct[vn][k] = re(P_IX);
      end
    end
    if (isa) begin c.link.out_tap[4] = tp(0); c.link.in_tap[4] = tp(1); end
    if (isb) begin c.link.out_tap[4] = tp(0); c.link.in_tap[4] = tp(1); end
    if (isc) begin
      c.link.out_tap[4] = tp(1); c.link.in_tap[4] = tp(0);
      c.link.out_tap[5] = tp(0); c.link.in_tap[5] = tp(1);
    end
    if (isd) begin
      c.link.out_tap[4] = tp(1); c.link.in_tap[4] = tp(0);
      c.link.out_tap[5] = tp(1); c.link.in_tap[5] = tp(0);
      if (i == 1) begin c.link.out_tap[0] = tp(2); c.link.in_tap[0] = tp(3); end
      if (i == 3) begin c.link.out_tap[1] = tp(3); c.link.in_tap[1] = tp(2); end
      if (j == 0) begin c.link.out_tap[2] = tp(2); c.link.in_tap[2] = tp(3); end
      if (j == 2) begin c.link.out_tap[3] = tp(3); c.link.in_tap[3] = tp(2); end
    end
    c.link.sw_x = (i == 0) ? 4'b0011 : (i == 1) ? 4'b1100 : (i == 2) ? 4'b1111 : 4'b0000;
    c.link.sw_y = (j == 0) ? 4'b1111 : (j == 1) ? 4'b1100 : (j == 2) ? 4'b0011 : 4'b0000;
    // power: NI and interposer ports everywhere, D also its express ports
    c.pwr_en = '0;
    c.pwr_en[P_NI] = 1'b1;
    c.pwr_en[P_IX] = 1'b1;
    if (isc || isd) c.pwr_en[P_IY] = 1'b1;
    if (isd) begin
      c.pwr_en[(i == 1) ? P_XP : P_XN] = 1'b1;
      c.pwr_en[(j == 0) ? P_YP : P_YN] = 1'b1;
    end
    return c;
  endfunction

endpackage
