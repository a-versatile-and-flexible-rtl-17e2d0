// adapt_noc_pkg: types and constants shared by every block of the adaptable network-on-chip.
//
// The network is an 8x8 grid of adaptable routers (four 4x4 chiplets on an active interposer).
// Each router has seven ports: the four mesh directions, the network interface (NI) and the two
// interposer-switch ports IX and IY. Links are 128 bits wide and use credit-based flow control
// with 2 virtual networks x 2 virtual channels (VCs) of 4 flits each, as in the evaluated system.
// The flit sideband (head/tail, VC, dateline bit, coordinates), the configuration word layout
// and the credit format are this design's own choices.
package adapt_noc_pkg;

  // ---- sizes --------------------------------------------------------------------------------
  parameter int unsigned MESH_X        = 8;    // routers per row
  parameter int unsigned MESH_Y        = 8;    // routers per column
  parameter int unsigned COORD_W       = 3;    // log2(max(MESH_X, MESH_Y))
  parameter int unsigned DATA_W        = 128;  // link / flit payload width
  parameter int unsigned NUM_VNETS     = 2;    // request and reply virtual networks
  parameter int unsigned VCS_PER_VNET  = 2;    // dateline classes 0 and 1
  parameter int unsigned NUM_VCS       = NUM_VNETS * VCS_PER_VNET;
  parameter int unsigned VC_W          = 2;    // $clog2(NUM_VCS)
  parameter int unsigned BUF_DEPTH     = 4;    // flits per VC
  parameter int unsigned NUM_PORTS     = 7;    // +X -X +Y -Y NI IX IY
  parameter int unsigned NUM_TRACKS    = 4;    // adaptable-link channels per row and per column
  parameter int unsigned TRK_W         = 2;    // $clog2(NUM_TRACKS)
  parameter int unsigned WAKE_CYCLES   = 12;   // power-on time of a router
  parameter int unsigned LINK_SETUP_CYCLES = 2; // link set-up time of a router

  // ---- ports --------------------------------------------------------------------------------
  // Input index p names the buffer set fed from that side; output index p names the side the
  // flit leaves on. P_NI is injection on the input side and ejection on the output side.
  typedef enum logic [2:0] {
    P_XP = 3'd0,   // +X side (towards x+1)
    P_XN = 3'd1,   // -X side
    P_YP = 3'd2,   // +Y side
    P_YN = 3'd3,   // -Y side
    P_NI = 3'd4,   // network interface
    P_IX = 3'd5,   // interposer switch, row channel
    P_IY = 3'd6    // interposer switch, column channel
  } port_e;

  // ---- flits, channels, credits -------------------------------------------------------------
  typedef struct packed {
    logic               head;
    logic               tail;
    logic [VC_W-1:0]    vc;      // VC on the link the flit travels; vc / VCS_PER_VNET = vnet
    logic               dl;      // has crossed the dateline in the current dimension
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [DATA_W-1:0]  data;
  } flit_t;

  typedef struct packed {
    logic  valid;
    flit_t flit;
  } chan_t;

  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  // ---- configuration --------------------------------------------------------------------------
  typedef struct packed {
    port_e port;  // output port toward this destination column / row
    logic  dl;    // this hop crosses the dateline
  } route_ent_t;

  typedef struct packed {
    route_ent_t [NUM_VNETS-1:0][MESH_X-1:0] xt;  // per vnet, per destination column
    route_ent_t [NUM_VNETS-1:0][MESH_Y-1:0] yt;  // per vnet, per destination row
    route_ent_t [NUM_VNETS-1:0][3:0]        ct;  // per vnet, by {dst_y[0], dst_x[0]}: delivery
                                                 // inside a 2x2 concentration block
    logic       [NUM_VNETS-1:0]             torus; // dateline VC classes used in this vnet
  } route_cfg_t;

  typedef struct packed {
    logic             en;   // tap attached to an adaptable-link channel
    logic [TRK_W-1:0] trk;  // which channel of its row / column
  } tap_t;

  // Taps: index 0..3 = the direction ports (+X -X +Y -Y), 4 = IX, 5 = IY.
  // A direction port whose tap is disabled uses its mesh link.
  typedef struct packed {
    tap_t [5:0]            out_tap;
    tap_t [5:0]            in_tap;
    logic [NUM_TRACKS-1:0] sw_x;    // link switches between this router and x+1, on / off
    logic [NUM_TRACKS-1:0] sw_y;    // link switches between this router and y+1, on / off
  } link_cfg_t;

  typedef struct packed {
    logic [NUM_PORTS-1:0] pwr_en;   // ports to keep powered
    link_cfg_t            link;
    route_cfg_t           route;
  } router_cfg_t;

  // ---- helpers --------------------------------------------------------------------------------
  function automatic logic [VC_W-1:0] vc_of(input int unsigned vnet, input int unsigned cls);
    return VC_W'(vnet * VCS_PER_VNET + cls);
  endfunction

  function automatic int unsigned vnet_of(input logic [VC_W-1:0] vc);
    return int'(vc) / VCS_PER_VNET;
  endfunction

  // Dimension-order route tables of a plain mesh for the router at (x, y): the set-up after reset.
  function automatic route_cfg_t mesh_route(input logic [COORD_W-1:0] x, input logic [COORD_W-1:0] y);
    route_cfg_t r;
    r = '0;
    for (int vn = 0; vn < NUM_VNETS; vn++) begin
      for (int c = 0; c < MESH_X; c++)
        r.xt[vn][c].port = (c > int'(x)) ? P_XP : (c < int'(x)) ? P_XN : P_NI;
      for (int c = 0; c < MESH_Y; c++)
        r.yt[vn][c].port = (c > int'(y)) ? P_YP : (c < int'(y)) ? P_YN : P_NI;
    end
    return r;
  endfunction

endpackage
