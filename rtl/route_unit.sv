// route_unit: route computation (RC) for one head flit.
//
// Routing is dimension ordered, X first, then Y, as the design uses for mesh, cmesh, torus and
// the tree reply network. Instead of fixed neighbour arithmetic the router looks the next hop
// up in two small tables per virtual network, one indexed by destination column and one by
// destination row. Each entry names an output port (a mesh port, a port switched onto an
// adaptable link, or an interposer-switch port) and whether the hop crosses the dateline.
// Loading different tables turns the same hardware into any of the subNoC topologies; that
// table form is this design's choice. At the destination the flit is ejected to the NI.
//
// Dateline deadlock avoidance for tori: a packet travels on VC class 0 until it crosses the
// dateline of its dimension, then on class 1; the class starts at 0 again when the packet turns
// from X into Y. Virtual networks whose torus bit is clear may use either class.
//
// Purely combinational; no clock.
module route_unit
  import adapt_noc_pkg::*;
(
  input  flit_t              flit,      // head flit
  input  port_e              in_port,   // buffer set it arrived in
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  route_cfg_t         cfg,
  output port_e              out_port,
  output logic               new_dl,    // dateline bit carried on the next link
  output logic               cls_any,   // any VC of the virtual network may be used
  output logic               cls        // required VC class when cls_any is 0
);
  logic [$clog2(NUM_VNETS)-1:0] vnet;
  logic in_x_side, in_y_side;
  route_ent_t ent;

  assign vnet      = flit.vc[VC_W-1 -: $clog2(NUM_VNETS)];
  assign in_x_side = (in_port == P_XP) || (in_port == P_XN) || (in_port == P_IX);
  assign in_y_side = (in_port == P_YP) || (in_port == P_YN) || (in_port == P_IY);

  always_comb begin
    ent      = '{port: P_NI, dl: 1'b0};
    out_port = P_NI;
    new_dl   = 1'b0;
    if (flit.dst_x != my_x && cfg.xt[vnet][flit.dst_x].port != P_NI) begin
      ent      = cfg.xt[vnet][flit.dst_x];
      out_port = ent.port;
      new_dl   = (in_x_side & flit.dl) | ent.dl;
    end else if (flit.dst_y != my_y && cfg.yt[vnet][flit.dst_y].port != P_NI) begin
      ent      = cfg.yt[vnet][flit.dst_y];
      out_port = ent.port;
      new_dl   = (in_y_side & flit.dl) | ent.dl;
    end else if (flit.dst_x != my_x || flit.dst_y != my_y) begin
      ent      = cfg.ct[vnet][{flit.dst_y[0], flit.dst_x[0]}];
      out_port = ent.port;
      new_dl   = ent.dl;
    end
    cls_any = ~cfg.torus[vnet] | (out_port == P_NI);
    cls     = new_dl;
  end

endmodule
