// vc_input_unit: the virtual-channel buffers of one router input port.
//
// NUM_VCS FIFOs of DEPTH flits each receive flits from the link (the flit's vc field selects the
// FIFO). For the flit at the head of each FIFO the unit computes its route (route_unit) and
// presents a request to the switch allocator: the output port, whether an output VC still has
// to be allocated (head flit) and which VC class it may use, or the output VC the packet
// already holds (body and tail flits). A grant pops the flit; the output port and VC are held
// from head to tail. Each pop returns one credit to the upstream router in the next cycle.
//
// With BYPASS set, a flit that arrives at an empty VC is presented to the allocator in its
// arrival cycle and, if granted, leaves without being written (the bypass links that the
// design adds to the network-interface and interposer-switch VCs). Without BYPASS a flit is
// written first and requests one cycle later, giving the 2-cycle router pipeline.
//
// While `powered` is low the port ignores its link and requests nothing.
module vc_input_unit
  import adapt_noc_pkg::*;
#(
  parameter port_e       PORT   = P_XP,
  parameter int unsigned DEPTH  = BUF_DEPTH,
  parameter bit          BYPASS = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 powered,
  input  logic [COORD_W-1:0]   my_x,
  input  logic [COORD_W-1:0]   my_y,
  input  route_cfg_t           route_cfg,
  input  chan_t                in_chan,
  output credit_t              cr_out,
  // requests, one per VC
  output logic  [NUM_VCS-1:0]  req_valid,
  output port_e                req_port   [NUM_VCS],
  output logic  [NUM_VCS-1:0]  req_va,      // head flit: needs an output VC
  output logic  [NUM_VCS-1:0]  req_cls_any,
  output logic  [NUM_VCS-1:0]  req_cls,
  output logic  [VC_W-1:0]     req_outvc  [NUM_VCS],
  output flit_t                head_flit  [NUM_VCS], // dl already updated for the next hop
  // grant: at most one VC per cycle
  input  logic  [NUM_VCS-1:0]  gnt,
  input  logic  [VC_W-1:0]     gnt_outvc,
  output logic                 busy,                 // some VC holds a flit or a packet
  output logic                 bypass_used           // a granted flit took the bypass
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t              mem    [NUM_VCS][DEPTH];
  logic [PTR_W-1:0]   rd_ptr [NUM_VCS];
  logic [PTR_W-1:0]   wr_ptr [NUM_VCS];
  logic [PTR_W:0]     count  [NUM_VCS];
  logic               active [NUM_VCS];
  port_e              st_port[NUM_VCS];
  logic [VC_W-1:0]    st_vc  [NUM_VCS];

  logic  [NUM_VCS-1:0] arrive, bypass_hd;
  flit_t               hd     [NUM_VCS];
  port_e               rc_port[NUM_VCS];
  logic  [NUM_VCS-1:0] rc_dl;

  for (genvar v = 0; v < NUM_VCS; v++) begin : g_vc
    assign arrive[v]    = powered && in_chan.valid && (in_chan.flit.vc == VC_W'(v));
    assign bypass_hd[v] = BYPASS && (count[v] == '0) && arrive[v];
    assign hd[v]        = bypass_hd[v] ? in_chan.flit : mem[v][rd_ptr[v]];

    route_unit u_rc (
      .flit(hd[v]), .in_port(PORT), .my_x(my_x), .my_y(my_y), .cfg(route_cfg),
      .out_port(rc_port[v]), .new_dl(rc_dl[v]), .cls_any(req_cls_any[v]), .cls(req_cls[v])
    );

    always_comb begin
      req_valid[v]  = powered && ((count[v] != '0) || bypass_hd[v]);
      req_va[v]     = !active[v];
      req_port[v]   = active[v] ? st_port[v] : rc_port[v];
      req_outvc[v]  = st_vc[v];
      head_flit[v]  = hd[v];
      if (!active[v]) head_flit[v].dl = rc_dl[v];
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        rd_ptr[v]  <= '0;
        wr_ptr[v]  <= '0;
        count[v]   <= '0;
        active[v]  <= 1'b0;
        st_port[v] <= P_NI;
        st_vc[v]   <= '0;
      end else begin
        logic do_wr, do_rd;
        do_rd = gnt[v] && !bypass_hd[v];
        do_wr = arrive[v] && !(bypass_hd[v] && gnt[v]);
        if (do_wr) begin
          mem[v][wr_ptr[v]] <= in_chan.flit;
          wr_ptr[v] <= (wr_ptr[v] == PTR_W'(DEPTH-1)) ? '0 : wr_ptr[v] + 1'b1;
        end
        if (do_rd) rd_ptr[v] <= (rd_ptr[v] == PTR_W'(DEPTH-1)) ? '0 : rd_ptr[v] + 1'b1;
        count[v] <= count[v] + (PTR_W+1)'(do_wr) - (PTR_W+1)'(do_rd);
        if (gnt[v]) begin
          if (!active[v] && !hd[v].tail) begin
            active[v]  <= 1'b1;
            st_port[v] <= rc_port[v];
            st_vc[v]   <= gnt_outvc;
          end else if (hd[v].tail) begin
            active[v]  <= 1'b0;
          end
        end
      end
    end
  end

  // one credit per popped flit, one cycle later
  always_ff @(posedge clk) begin
    if (!rst_n) cr_out <= '0;
    else begin
      cr_out <= '0;
      for (int v = 0; v < NUM_VCS; v++)
        if (gnt[v]) cr_out <= '{valid: 1'b1, vc: VC_W'(v)};
    end
  end

  assign bypass_used = |(gnt & bypass_hd);

  always_comb begin
    busy = 1'b0;
    for (int v = 0; v < NUM_VCS; v++) busy |= (count[v] != '0) || active[v];
  end

  // a link must never deliver a flit into a full VC (credit protocol)
  for (genvar v = 0; v < NUM_VCS; v++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(arrive[v] && count[v] == (PTR_W+1)'(DEPTH)));
  end

endmodule
