// adaptable_router: one node of the adaptable network-on-chip.
//
// It joins a 5x5 virtual-channel chiplet router (+X -X +Y -Y and the NI port) with a 2x2
// interposer switch (IX on the row's adaptable-link channels, IY on the column's), for a radix
// of up to 7:
//   * Seven input buffer sets (vc_input_unit). The NI, IX and IY sets have bypass links: a flit
//     reaching an empty VC can leave in its arrival cycle.
//   * The NI, IX and IY sets share the chiplet crossbar's injection input through a 3:1 mux, so
//     VC allocation still sees five chiplet inputs.
//   * The chiplet crossbar has a sixth column, a 5:1 mux that hands one chiplet input per cycle to
//     the interposer switch outputs. Each interposer output (IX, IY) takes the IX buffer, the IY
//     buffer or that 5:1 line; IX/IY to IX/IY traffic never enters the chiplet crossbar.
//   * Each direction port has a 2:1 input mux (mesh link or adaptable link) and an output demux,
//     set by the link controller, which also owns this router's link switches.
//   * The power-gating controller switches ports and the crossbar on and off.
// Pipeline: buffer write, then route computation + VC/switch allocation + crossbar into the
// output register; a flit through the chiplet router takes 2 cycles, a flit that bypasses the
// interposer switch buffers takes 1. Allocation is done by switch_allocator.
// Interface: one chan_t (valid + flit) forward and one credit_t backward per link; `cfg` with the
// `pwr_commit` / `link_commit` strobes loads a new set-up (ready flags report completion).
// The structure (ports, muxes, bypass, LC, PG, 2-stage pipeline, VC counts) follows the document;
// the allocator, credit protocol and configuration interface are this design's own.
module adaptable_router
  import adapt_noc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  // mesh links of the four directions (index = P_XP .. P_YN)
  input  chan_t              mesh_in     [4],
  output credit_t            mesh_cr_out [4],
  output chan_t              mesh_out    [4],
  input  credit_t            mesh_cr_in  [4],
  // adaptable-link taps: 0..3 direction ports, 4 = IX, 5 = IY
  input  chan_t              adapt_in     [6],
  output credit_t            adapt_cr_out [6],
  output chan_t              adapt_out    [6],
  input  credit_t            adapt_cr_in  [6],
  // network interface
  input  chan_t              ni_in,
  output credit_t            ni_cr_out,
  output chan_t              ej_out,
  input  credit_t            ej_cr_in,
  // configuration
  input  router_cfg_t        cfg,
  input  logic               pwr_commit,
  input  logic               link_commit,
  output logic               pwr_ready,
  output logic               link_ready,
  output link_cfg_t          link_cfg,
  output logic [NUM_TRACKS-1:0] sw_on_x,   // link switches toward x+1, one per row channel
  output logic [NUM_TRACKS-1:0] sw_on_y,   // link switches toward y+1, one per column channel
  output logic [NUM_PORTS-1:0] port_on,
  output logic               waking,     // a power-on is in progress
  output logic               idle,
  // event strobes
  output logic               ev_bypass,
  output logic               ev_inj_mux,   // a flit from IX or IY entered the chiplet crossbar (3:1 mux)
  output logic               ev_is_mux,    // a chiplet input left through the 5:1 mux to the interposer
  output logic               ev_dateline   // a head flit left on a dateline-class VC
);
  link_cfg_t  link;
  route_cfg_t route;
  logic       xbar_on;

  chan_t   in_chan  [NUM_PORTS];
  credit_t cr_out   [NUM_PORTS];
  chan_t   out_chan [NUM_PORTS];
  credit_t cr_in    [NUM_PORTS];

  logic [NUM_VCS-1:0] req_valid   [NUM_PORTS];
  port_e              req_port    [NUM_PORTS][NUM_VCS];
  logic [NUM_VCS-1:0] req_va      [NUM_PORTS];
  logic [NUM_VCS-1:0] req_cls_any [NUM_PORTS];
  logic [NUM_VCS-1:0] req_cls     [NUM_PORTS];
  logic [VC_W-1:0]    req_outvc   [NUM_PORTS][NUM_VCS];
  flit_t              head_flit   [NUM_PORTS][NUM_VCS];
  logic [NUM_VCS-1:0] gnt         [NUM_PORTS];
  logic [VC_W-1:0]    gnt_outvc   [NUM_PORTS];
  logic [NUM_VCS-1:0] out_vc_free [NUM_PORTS];
  logic [NUM_VCS-1:0] out_credit  [NUM_PORTS];
  logic [NUM_PORTS-1:0] out_gnt, in_busy, out_busy, byp;
  logic [2:0]         out_src     [NUM_PORTS];
  logic [VC_W-1:0]    out_src_vc  [NUM_PORTS];
  logic [VC_W-1:0]    out_vc      [NUM_PORTS];

  // ---- link controller and power gating ---------------------------------------------------
  link_controller u_lc (
    .clk, .rst_n, .my_x, .my_y, .commit(link_commit), .cfg_link(cfg.link), .cfg_route(cfg.route),
    .link, .route, .sw_on_x, .sw_on_y, .ready(link_ready)
  );
  assign link_cfg = link;

  power_gating_ctrl u_pg (
    .clk, .rst_n, .rst_pwr({NUM_PORTS{1'b1}}), .commit(pwr_commit), .pwr_en(cfg.pwr_en),
    .port_busy(in_busy | out_busy), .port_on, .xbar_on, .waking, .ready(pwr_ready)
  );

  // ---- input muxes (mesh / adaptable) and output demuxes -------------------------------------
  always_comb begin
    for (int d = 0; d < 4; d++) begin
      in_chan[d]      = link.in_tap[d].en ? adapt_in[d] : mesh_in[d];
      mesh_cr_out[d]  = link.in_tap[d].en ? '0 : cr_out[d];
      adapt_cr_out[d] = link.in_tap[d].en ? cr_out[d] : '0;
      mesh_out[d]     = link.out_tap[d].en ? '0 : out_chan[d];
      adapt_out[d]    = link.out_tap[d].en ? out_chan[d] : '0;
      cr_in[d]        = link.out_tap[d].en ? adapt_cr_in[d] : mesh_cr_in[d];
    end
    in_chan[P_NI]   = ni_in;
    ni_cr_out       = cr_out[P_NI];
    ej_out          = out_chan[P_NI];
    cr_in[P_NI]     = ej_cr_in;
    in_chan[P_IX]   = adapt_in[4];
    in_chan[P_IY]   = adapt_in[5];
    adapt_cr_out[4] = cr_out[P_IX];
    adapt_cr_out[5] = cr_out[P_IY];
    adapt_out[4]    = out_chan[P_IX];
    adapt_out[5]    = out_chan[P_IY];
    cr_in[P_IX]     = adapt_cr_in[4];
    cr_in[P_IY]     = adapt_cr_in[5];
  end

  // ---- input units -----------------------------------------------------------------------------
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    vc_input_unit #(.PORT(port_e'(p)), .DEPTH(BUF_DEPTH), .BYPASS(p >= int'(P_NI))) u_in (
      .clk, .rst_n, .powered(port_on[p]), .my_x, .my_y, .route_cfg(route),
      .in_chan(in_chan[p]), .cr_out(cr_out[p]),
      .req_valid(req_valid[p]), .req_port(req_port[p]), .req_va(req_va[p]),
      .req_cls_any(req_cls_any[p]), .req_cls(req_cls[p]), .req_outvc(req_outvc[p]),
      .head_flit(head_flit[p]), .gnt(gnt[p]), .gnt_outvc(gnt_outvc[p]),
      .busy(in_busy[p]), .bypass_used(byp[p])
    );
  end

  // ---- allocation ------------------------------------------------------------------------------
  switch_allocator u_sa (
    .clk, .rst_n, .xbar_on, .out_on(port_on),
    .req_valid, .req_port, .req_va, .req_cls_any, .req_cls, .req_outvc,
    .out_vc_free, .out_credit,
    .gnt, .gnt_outvc, .out_gnt, .out_src, .out_src_vc, .out_vc,
    .inj_mux_used(ev_inj_mux), .is_mux_used(ev_is_mux)
  );

  // ---- crossbar and output units ---------------------------------------------------------------
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    flit_t xf;
    always_comb begin
      xf    = head_flit[out_src[o]][out_src_vc[o]];
      xf.vc = out_vc[o];
    end
    output_unit #(.DEPTH(BUF_DEPTH)) u_out (
      .clk, .rst_n, .powered(port_on[o]), .gnt_valid(out_gnt[o]), .gnt_flit(xf),
      .cr_in(cr_in[o]), .out_chan(out_chan[o]), .vc_free(out_vc_free[o]),
      .credit_ok(out_credit[o]), .busy(out_busy[o])
    );
  end

  always_comb begin
    ev_dateline = 1'b0;
    for (int o = 0; o < NUM_PORTS; o++)
      if (o != int'(P_NI) && out_chan[o].valid && out_chan[o].flit.head && out_chan[o].flit.dl)
        ev_dateline = 1'b1;
  end

  assign idle      = !(|in_busy) && !(|out_busy);
  assign ev_bypass = |byp;

endmodule
