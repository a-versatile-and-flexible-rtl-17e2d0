// adapt_noc: adaptable network-on-chip for a chiplet-based manycore (top level).
//
// MESH_X x MESH_Y adaptable routers (8x8: four 4x4 chiplets on an active interposer) are joined
// by ordinary mesh links and, in every row and every column, by NUM_TRACKS adaptable-link
// channels that run in the interposer and can be cut into segments by link switches. Every
// router can switch each of its direction ports from its mesh link onto an adaptable channel,
// and its interposer switch (IX, IY) always sits on the row / column channels. Together with
// per-router route tables this lets disjoint rectangular subNoCs each run their own topology
// (mesh, concentrated mesh, torus, tree reply network, or combinations) at the same time.
//
// Every node has a network interface to which a core or memory controller (outside this design)
// connects by flit-wide valid/ready ports (tx_* into the network, rx_* out of it). The subNoC
// configuration controller takes per-router set-up words (cfg_wr_*) and, on cmd_start,
// drains, powers and re-links one region while the others keep running.
// After reset every router is powered and works as a plain XY mesh router.
// Event outputs (bypass, 3:1 and 5:1 mux use, powered ports, channel conflicts) are for
// observation only.
module adapt_noc
  import adapt_noc_pkg::*;
#(
  parameter int unsigned NX = MESH_X,
  parameter int unsigned NY = MESH_Y,
  localparam int unsigned N  = NX * NY,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic               clk,
  input  logic               rst_n,
  // cores / memory controllers, node index y * NX + x
  input  logic [N-1:0]       tx_valid,
  input  flit_t              tx_flit  [N],
  output logic [N-1:0]       tx_ready,
  output logic [N-1:0]       rx_valid,
  output flit_t              rx_flit  [N],
  input  logic [N-1:0]       rx_ready,
  // subNoC configuration
  input  logic               cfg_wr_en,
  input  logic [AW-1:0]      cfg_wr_addr,
  input  router_cfg_t        cfg_wr_data,
  input  logic               cmd_start,
  input  logic [COORD_W-1:0] cmd_x0, cmd_y0, cmd_x1, cmd_y1,
  output logic               cfg_busy,
  output logic               cfg_done,
  output logic [31:0]        drain_cycles,
  output logic [31:0]        pwr_cycles,
  output logic [31:0]        link_cycles,
  // observation
  output logic [N-1:0]       ev_bypass,
  output logic [N-1:0]       ev_inj_mux,
  output logic [N-1:0]       ev_is_mux,
  output logic [N-1:0]       ev_dateline,
  output logic [NUM_PORTS-1:0] port_on [N],
  output logic [N-1:0]       waking,
  output logic               link_conflict
);
  chan_t     mesh_out    [N][4];
  credit_t   mesh_cr_out [N][4];
  chan_t     mesh_in     [N][4];
  credit_t   mesh_cr_in  [N][4];
  chan_t     adapt_out   [N][6];
  credit_t   adapt_cr_out[N][6];
  chan_t     adapt_in    [N][6];
  credit_t   adapt_cr_in [N][6];
  link_cfg_t lcfg        [N];
  logic [NUM_TRACKS-1:0] sw_x [N];
  logic [NUM_TRACKS-1:0] sw_y [N];
  chan_t     inj  [N];
  credit_t   inj_cr [N];
  chan_t     ej   [N];
  credit_t   ej_cr  [N];
  logic [N-1:0] hold, r_idle, ni_idle, pwr_commit, link_commit, pwr_ready, link_ready;
  logic [NY-1:0] row_conf;
  logic [NX-1:0] col_conf;
  router_cfg_t  cfg_bus;

  // ---- routers and network interfaces --------------------------------------------------------
  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int n = y * NX + x;

      // mesh neighbours (index 0..3 = +X -X +Y -Y): the +X input of (x,y) is the -X output of (x+1,y), and so on
      always_comb begin
        mesh_in[n][0]    = (x < NX-1) ? mesh_out[n+1][1]     : '0;
        mesh_cr_in[n][0] = (x < NX-1) ? mesh_cr_out[n+1][1]  : '0;
        mesh_in[n][1]    = (x > 0)    ? mesh_out[n-1][0]     : '0;
        mesh_cr_in[n][1] = (x > 0)    ? mesh_cr_out[n-1][0]  : '0;
        mesh_in[n][2]    = (y < NY-1) ? mesh_out[n+NX][3]    : '0;
        mesh_cr_in[n][2] = (y < NY-1) ? mesh_cr_out[n+NX][3] : '0;
        mesh_in[n][3]    = (y > 0)    ? mesh_out[n-NX][2]    : '0;
        mesh_cr_in[n][3] = (y > 0)    ? mesh_cr_out[n-NX][2] : '0;
      end

      adaptable_router u_router (
        .clk, .rst_n, .my_x(COORD_W'(x)), .my_y(COORD_W'(y)),
        .mesh_in(mesh_in[n]), .mesh_cr_out(mesh_cr_out[n]),
        .mesh_out(mesh_out[n]), .mesh_cr_in(mesh_cr_in[n]),
        .adapt_in(adapt_in[n]), .adapt_cr_out(adapt_cr_out[n]),
        .adapt_out(adapt_out[n]), .adapt_cr_in(adapt_cr_in[n]),
        .ni_in(inj[n]), .ni_cr_out(inj_cr[n]), .ej_out(ej[n]), .ej_cr_in(ej_cr[n]),
        .cfg(cfg_bus), .pwr_commit(pwr_commit[n]), .link_commit(link_commit[n]),
        .pwr_ready(pwr_ready[n]), .link_ready(link_ready[n]), .link_cfg(lcfg[n]),
        .sw_on_x(sw_x[n]), .sw_on_y(sw_y[n]), .port_on(port_on[n]), .waking(waking[n]),
        .idle(r_idle[n]), .ev_bypass(ev_bypass[n]), .ev_inj_mux(ev_inj_mux[n]),
        .ev_is_mux(ev_is_mux[n]), .ev_dateline(ev_dateline[n])
      );

      network_interface u_ni (
        .clk, .rst_n, .hold(hold[n]),
        .tx_valid(tx_valid[n]), .tx_flit(tx_flit[n]), .tx_ready(tx_ready[n]),
        .rx_valid(rx_valid[n]), .rx_flit(rx_flit[n]), .rx_ready(rx_ready[n]),
        .inj_out(inj[n]), .inj_cr_in(inj_cr[n]), .ej_in(ej[n]), .ej_cr_out(ej_cr[n]),
        .idle(ni_idle[n])
      );
    end
  end

  // ---- adaptable links of each row: taps +X, -X, IX ----------------------------------------------
  for (genvar y = 0; y < NY; y++) begin : g_row
    chan_t   dc [NX][3];
    tap_t    dt [NX][3];
    credit_t dr [NX][3];
    chan_t   rc [NX][3];
    tap_t    rt [NX][3];
    credit_t rr [NX][3];
    logic [NUM_TRACKS-1:0] sw [NX];
    for (genvar x = 0; x < NX; x++) begin : g_tap
      localparam int n = y * NX + x;
      localparam int TP [3] = '{0, 1, 4};
      for (genvar k = 0; k < 3; k++) begin : g_k
        assign dc[x][k] = adapt_out[n][TP[k]];
        assign dt[x][k] = lcfg[n].out_tap[TP[k]];
        assign adapt_cr_in[n][TP[k]] = dr[x][k];
        assign adapt_in[n][TP[k]] = rc[x][k];
        assign rt[x][k] = lcfg[n].in_tap[TP[k]];
        assign rr[x][k] = adapt_cr_out[n][TP[k]];
      end
      assign sw[x] = sw_x[n];
    end
    adaptable_link #(.N(NX)) u_link (
      .drv_chan(dc), .drv_tap(dt), .drv_cr(dr), .rcv_chan(rc), .rcv_tap(rt), .rcv_cr(rr),
      .sw_on(sw), .conflict(row_conf[y])
    );
  end

  // ---- adaptable links of each column: taps +Y, -Y, IY ------------------------------------------
  for (genvar x = 0; x < NX; x++) begin : g_col
    chan_t   dc [NY][3];
    tap_t    dt [NY][3];
    credit_t dr [NY][3];
    chan_t   rc [NY][3];
    tap_t    rt [NY][3];
    credit_t rr [NY][3];
    logic [NUM_TRACKS-1:0] sw [NY];
    for (genvar y = 0; y < NY; y++) begin : g_tap
      localparam int n = y * NX + x;
      localparam int TP [3] = '{2, 3, 5};
      for (genvar k = 0; k < 3; k++) begin : g_k
        assign dc[y][k] = adapt_out[n][TP[k]];
        assign dt[y][k] = lcfg[n].out_tap[TP[k]];
        assign adapt_cr_in[n][TP[k]] = dr[y][k];
        assign adapt_in[n][TP[k]] = rc[y][k];
        assign rt[y][k] = lcfg[n].in_tap[TP[k]];
        assign rr[y][k] = adapt_cr_out[n][TP[k]];
      end
      assign sw[y] = sw_y[n];
    end
    adaptable_link #(.N(NY)) u_link (
      .drv_chan(dc), .drv_tap(dt), .drv_cr(dr), .rcv_chan(rc), .rcv_tap(rt), .rcv_cr(rr),
      .sw_on(sw), .conflict(col_conf[x])
    );
  end

  assign link_conflict = |row_conf || |col_conf;

  // ---- subNoC configuration --------------------------------------------------------------------
  subnoc_config_ctrl #(.NX(NX), .NY(NY)) u_cfg (
    .clk, .rst_n, .wr_en(cfg_wr_en), .wr_addr(cfg_wr_addr), .wr_data(cfg_wr_data),
    .start(cmd_start), .x0(cmd_x0), .y0(cmd_y0), .x1(cmd_x1), .y1(cmd_y1),
    .busy(cfg_busy), .done(cfg_done), .drain_cycles, .pwr_cycles, .link_cycles,
    .hold, .cfg_out(cfg_bus), .pwr_commit, .link_commit,
    .node_idle(r_idle & ni_idle), .pwr_ready, .link_ready
  );

endmodule
