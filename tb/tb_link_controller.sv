// tb_link_controller: after reset the route tables must be the plain-mesh tables and every port
// on its mesh link; a committed set-up must appear exactly 2 cycles after the commit with ready
// low in between, and the link-switch outputs must follow the committed bits.
module tb_link_controller;
  import adapt_noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [COORD_W-1:0] my_x = 3'd2, my_y = 3'd5;
  logic commit = 0, ready;
  link_cfg_t cfg_link = '0, link;
  route_cfg_t cfg_route = '0, route;
  logic [NUM_TRACKS-1:0] sw_on_x, sw_on_y;

  link_controller dut (.*);

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", s, $time); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // reset state: XY mesh routes for (2,5)
    for (int vn = 0; vn < NUM_VNETS; vn++) begin
      for (int c = 0; c < MESH_X; c++)
        check(route.xt[vn][c].port == ((c > 2) ? P_XP : (c < 2) ? P_XN : P_NI) && !route.xt[vn][c].dl, "reset X table");
      for (int c = 0; c < MESH_Y; c++)
        check(route.yt[vn][c].port == ((c > 5) ? P_YP : (c < 5) ? P_YN : P_NI), "reset Y table");
    end
    check(link == '0 && ready && sw_on_x == 0 && sw_on_y == 0, "reset link state");

    for (int it = 0; it < 20; it++) begin
      link_cfg_t  nl;
      route_cfg_t nr, old_r;
      link_cfg_t  old_l;
      int lat;
      nl = link_cfg_t'({$urandom, $urandom, $urandom});
      nr = route_cfg_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      old_l = link; old_r = route;
      @(negedge clk);
      cfg_link = nl; cfg_route = nr; commit = 1;
      @(negedge clk);
      commit = 0; cfg_link = '0; cfg_route = '0;
      lat = 1;
      check(!ready && link == old_l && route == old_r, "not yet applied after 1 cycle");
      while (!ready && lat < 10) begin @(negedge clk); lat++; end
      check(lat == LINK_SETUP_CYCLES, $sformatf("set-up took %0d cycles", lat));
      check(link == nl && route == nr, "committed set-up applied");
      check(sw_on_x == nl.sw_x && sw_on_y == nl.sw_y, "link switch bits");
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(link == nl && route == nr && ready, "set-up stays");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
