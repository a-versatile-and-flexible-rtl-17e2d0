// link_controller: the link controller (LC) of one adaptable router.
//
// It holds the router's active link set-up and route tables: which direction ports use their
// mesh link and which use an adaptable link (the input muxes and output demuxes), which
// adaptable-link channel every tap of the router drives or listens to, and the on/off bit of
// each link switch owned by this router (the switch on each row channel between this router
// and x+1, and on each column channel between it and y+1). After reset the router is a plain mesh router. A commit captures a new set-up;
// it takes effect SETUP_CYCLES cycles after the cycle in which commit is high (2 cycles per router, the set-up time the
// document gives), after which `ready` is high again. The LC sits beside the datapath: its
// outputs are static while traffic flows. Register layout and commit handshake are this
// design's own.
module link_controller
  import adapt_noc_pkg::*;
#(
  parameter int unsigned SETUP_CYCLES = LINK_SETUP_CYCLES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [COORD_W-1:0]    my_x,
  input  logic [COORD_W-1:0]    my_y,
  input  logic                  commit,
  input  link_cfg_t             cfg_link,
  input  route_cfg_t            cfg_route,
  output link_cfg_t             link,
  output route_cfg_t            route,
  output logic [NUM_TRACKS-1:0] sw_on_x,
  output logic [NUM_TRACKS-1:0] sw_on_y,
  output logic                  ready
);
  localparam int unsigned CW = $clog2(SETUP_CYCLES + 1);

  link_cfg_t  pend_link;
  route_cfg_t pend_route;
  logic [CW-1:0] cnt;
  logic          pending;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link       <= '0;                     // all direction ports on mesh links
      route      <= mesh_route(my_x, my_y); // plain mesh after reset
      pend_link  <= '0;
      pend_route <= '0;
      cnt        <= '0;
      pending    <= 1'b0;
    end else if (commit) begin
      pend_link  <= cfg_link;
      pend_route <= cfg_route;
      cnt        <= CW'((SETUP_CYCLES > 1) ? SETUP_CYCLES - 2 : 0);
      pending    <= 1'b1;
    end else if (pending) begin
      if (cnt == '0) begin
        link    <= pend_link;
        route   <= pend_route;
        pending <= 1'b0;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  assign sw_on_x = link.sw_x;
  assign sw_on_y = link.sw_y;
  assign ready   = !pending;

endmodule
