// switch_allocator: combined VC allocation (VA) and switch allocation (SA) of an adaptable
// router.
//
// Requesters are the NUM_VCS virtual channels of each of the 7 buffer sets (+X -X +Y -Y NI IX
// IY). Every cycle the allocator walks all requesters once, starting at a rotating priority
// pointer, and grants a request when every resource it needs is still free:
//   * its buffer set (one flit leaves a buffer set per cycle),
//   * its output port (one flit enters an output register per cycle),
//   * for a head flit, a free downstream VC of its virtual network and allowed class;
//     for any flit, a credit for the downstream VC,
//   * the 3:1 injection mux when NI, IX or IY feed the chiplet crossbar (these three share the
//     crossbar's injection input),
//   * the 5:1 mux when one of the five chiplet inputs goes to the interposer switch outputs,
//   * the chiplet crossbar being powered, for every path through it. IX/IY to IX/IY stays inside
//     the interposer switch and works while the chiplet crossbar is off.
// The walk order and the greedy policy are this design's choice; the document names the VA and
// SA stages and the two muxes but not the arbitration. Combinational, plus the priority pointer.
module switch_allocator
  import adapt_noc_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       xbar_on,
  input  logic [NUM_PORTS-1:0]       out_on,
  input  logic [NUM_VCS-1:0]         req_valid   [NUM_PORTS],
  input  port_e                      req_port    [NUM_PORTS][NUM_VCS],
  input  logic [NUM_VCS-1:0]         req_va      [NUM_PORTS],
  input  logic [NUM_VCS-1:0]         req_cls_any [NUM_PORTS],
  input  logic [NUM_VCS-1:0]         req_cls     [NUM_PORTS],
  input  logic [VC_W-1:0]            req_outvc   [NUM_PORTS][NUM_VCS],
  input  logic [NUM_VCS-1:0]         out_vc_free [NUM_PORTS],
  input  logic [NUM_VCS-1:0]         out_credit  [NUM_PORTS],
  // per input set
  output logic [NUM_VCS-1:0]         gnt         [NUM_PORTS],
  output logic [VC_W-1:0]            gnt_outvc   [NUM_PORTS],
  // per output port
  output logic [NUM_PORTS-1:0]       out_gnt,
  output logic [2:0]                 out_src     [NUM_PORTS],  // input set
  output logic [VC_W-1:0]            out_src_vc  [NUM_PORTS],  // VC within the set
  output logic [VC_W-1:0]            out_vc      [NUM_PORTS],  // downstream VC
  output logic                       inj_mux_used,            // 3:1 mux carried a flit from IX/IY
  output logic                       is_mux_used              // 5:1 mux carried a flit
);
  localparam int unsigned NREQ = NUM_PORTS * NUM_VCS;
  localparam int unsigned RW   = $clog2(NREQ);

  logic [RW-1:0] rr_ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) rr_ptr <= '0;
    else        rr_ptr <= (rr_ptr == RW'(NREQ-1)) ? '0 : rr_ptr + 1'b1;
  end

  always_comb begin
    logic [NUM_PORTS-1:0] set_used, out_used;
    logic                 inj_used, tois_used, is_inj;
    int unsigned          idx, p, v, o, vn;
    logic                 ok, via_inj, via_is, via_xbar, found;
    logic [VC_W-1:0]      ov, cand;
    cand = '0;
    for (int q = 0; q < NUM_PORTS; q++) begin
      gnt[q]        = '0;
      gnt_outvc[q]  = '0;
      out_src[q]    = '0;
      out_src_vc[q] = '0;
      out_vc[q]     = '0;
    end
    out_gnt   = '0;
    set_used  = '0;
    out_used  = '0;
    inj_used  = 1'b0;
    tois_used = 1'b0;
    is_inj    = 1'b0;

    for (int k = 0; k < NREQ; k++) begin
      idx = (int'(rr_ptr) + k) % NREQ;
      p   = idx / NUM_VCS;
      v   = idx % NUM_VCS;
      o   = int'(req_port[p][v]);
      vn  = v / VCS_PER_VNET;
      via_inj  = (p >= int'(P_NI)) && (o <= int'(P_NI));
      via_is   = (p <= int'(P_NI)) && (o >= int'(P_IX));
      via_xbar = !((p >= int'(P_IX)) && (o >= int'(P_IX)));
      ok = req_valid[p][v] && !set_used[p] && !out_used[o] && out_on[o]
           && !(via_inj && inj_used) && !(via_is && tois_used) && !(via_xbar && !xbar_on);
      found = 1'b0;
      ov    = req_outvc[p][v];
      if (req_va[p][v]) begin
        for (int c = 0; c < VCS_PER_VNET; c++) begin
          cand = VC_W'(vn * VCS_PER_VNET + c);
          if (!found && out_vc_free[o][cand] && out_credit[o][cand]
              && (req_cls_any[p][v] || (req_cls[p][v] == c[0]))) begin
            found = 1'b1;
            ov    = cand;
          end
        end
      end else begin
        found = out_credit[o][ov];
      end
      if (ok && found) begin
        gnt[p][v]     = 1'b1;
        gnt_outvc[p]  = ov;
        set_used[p]   = 1'b1;
        out_used[o]   = 1'b1;
        out_gnt[o]    = 1'b1;
        out_src[o]    = 3'(p);
        out_src_vc[o] = VC_W'(v);
        out_vc[o]     = ov;
        if (via_inj) inj_used  = 1'b1;
        if (via_inj && p != int'(P_NI)) is_inj = 1'b1;
        if (via_is)  tois_used = 1'b1;
      end
    end
    inj_mux_used = is_inj;
    is_mux_used  = tois_used;
  end

endmodule
