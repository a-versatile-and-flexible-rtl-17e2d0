// network_interface: connects a core or memory controller to its adaptable router.
//
// Injection: the core offers flits (tx_valid / tx_ready); head and tail bits mark packets and the
// upper bit(s) of the flit's vc field give its virtual network. For each new packet the NI picks
// a VC of that virtual network in the router's NI input set that has a free slot (alternating
// between the VCs) and keeps it until the tail. It tracks one credit per buffer slot of that set
// and registers the flit onto the injection link, so a flit accepted in cycle t is at the router
// in cycle t+1. While `hold` is high (its subNoC is being drained for re-configuration) no new
// packet starts; a packet already started is finished.
// Ejection: flits from the router's ejection port are kept in one FIFO per VC (DEPTH slots,
// credit returned one cycle after a flit leaves). Whole packets are handed to the core one at a
// time, VCs taken in rotating order.
// The injected flit's dateline bit is always 0 (a packet starts in VC class 0).
// The document only names the NI and its bypassable VCs (those are in the router's NI input set);
// everything here is this design's own.
module network_interface
  import adapt_noc_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    hold,
  // core side
  input  logic    tx_valid,
  input  flit_t   tx_flit,
  output logic    tx_ready,
  output logic    rx_valid,
  output flit_t   rx_flit,
  input  logic    rx_ready,
  // router side
  output chan_t   inj_out,
  input  credit_t inj_cr_in,
  input  chan_t   ej_in,
  output credit_t ej_cr_out,
  output logic    idle
);
  localparam int unsigned CW    = $clog2(DEPTH + 1);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned VNW   = $clog2(NUM_VNETS);

  // ---------------- injection ----------------
  logic [CW-1:0]   credits [NUM_VCS];
  logic            in_pkt;
  logic [VC_W-1:0] cur_vc;
  logic [NUM_VNETS-1:0] alt;        // which class to try first per vnet
  logic [VC_W-1:0] pick_vc;
  logic            pick_ok;
  logic [VNW-1:0]  vnet;

  assign vnet = tx_flit.vc[VC_W-1 -: VNW];

  always_comb begin
    logic [VC_W-1:0] cand;
    cand    = '0;
    pick_ok = 1'b0;
    pick_vc = cur_vc;
    if (in_pkt) begin
      pick_ok = (credits[cur_vc] != '0);
    end else if (!hold) begin
      for (int c = 0; c < VCS_PER_VNET; c++) begin
        cand = VC_W'(int'(vnet) * VCS_PER_VNET + ((c + int'(alt[vnet])) % VCS_PER_VNET));
        if (!pick_ok && credits[cand] != '0) begin
          pick_ok = 1'b1;
          pick_vc = cand;
        end
      end
    end
  end

  assign tx_ready = pick_ok;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inj_out <= '0;
      in_pkt  <= 1'b0;
      cur_vc  <= '0;
      alt     <= '0;
      for (int v = 0; v < NUM_VCS; v++) credits[v] <= CW'(DEPTH);
    end else begin
      logic send;
      send = tx_valid && tx_ready;
      inj_out.valid <= send;
      if (send) begin
        inj_out.flit    <= tx_flit;
        inj_out.flit.vc <= pick_vc;
        inj_out.flit.dl <= 1'b0;
        if (tx_flit.head && !tx_flit.tail) in_pkt <= 1'b1;
        if (tx_flit.tail)                  in_pkt <= 1'b0;
        cur_vc <= pick_vc;
        if (tx_flit.head) alt[vnet] <= ~alt[vnet];
      end
      for (int v = 0; v < NUM_VCS; v++)
        credits[v] <= credits[v] - CW'(send && pick_vc == VC_W'(v))
                                 + CW'(inj_cr_in.valid && inj_cr_in.vc == VC_W'(v));
    end
  end

  // ---------------- ejection ----------------
  flit_t            ej_mem [NUM_VCS][DEPTH];
  logic [PTR_W-1:0] ej_rd  [NUM_VCS];
  logic [PTR_W-1:0] ej_wr  [NUM_VCS];
  logic [PTR_W:0]   ej_cnt [NUM_VCS];
  logic             rx_lock;
  logic [VC_W-1:0]  rx_vc, rx_rr;
  logic [VC_W-1:0]  sel_vc;
  logic             sel_ok;

  always_comb begin
    logic [VC_W-1:0] cand;
    cand   = '0;
    sel_ok = 1'b0;
    sel_vc = rx_vc;
    if (rx_lock) begin
      sel_ok = (ej_cnt[rx_vc] != '0);
    end else begin
      for (int k = 0; k < NUM_VCS; k++) begin
        cand = VC_W'((int'(rx_rr) + k) % NUM_VCS);
        if (!sel_ok && ej_cnt[cand] != '0) begin
          sel_ok = 1'b1;
          sel_vc = cand;
        end
      end
    end
    rx_valid = sel_ok;
    rx_flit  = ej_mem[sel_vc][ej_rd[sel_vc]];
  end

  always_ff @(posedge clk) begin
    if (ej_in.valid) ej_mem[ej_in.flit.vc][ej_wr[ej_in.flit.vc]] <= ej_in.flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VCS; v++) begin
        ej_rd[v]  <= '0;
        ej_wr[v]  <= '0;
        ej_cnt[v] <= '0;
      end
      rx_lock   <= 1'b0;
      rx_vc     <= '0;
      rx_rr     <= '0;
      ej_cr_out <= '0;
    end else begin
      logic pop;
      pop = rx_valid && rx_ready;
      ej_cr_out <= '{valid: pop, vc: sel_vc};
      for (int v = 0; v < NUM_VCS; v++) begin
        logic w, r;
        w = ej_in.valid && (ej_in.flit.vc == VC_W'(v));
        r = pop && (sel_vc == VC_W'(v));
        if (w) ej_wr[v] <= (ej_wr[v] == PTR_W'(DEPTH-1)) ? '0 : ej_wr[v] + 1'b1;
        if (r) ej_rd[v] <= (ej_rd[v] == PTR_W'(DEPTH-1)) ? '0 : ej_rd[v] + 1'b1;
        ej_cnt[v] <= ej_cnt[v] + (PTR_W+1)'(w) - (PTR_W+1)'(r);
      end
      if (pop) begin
        rx_vc <= sel_vc;
        if (rx_flit.tail) begin
          rx_lock <= 1'b0;
          rx_rr   <= sel_vc + 1'b1;
        end else begin
          rx_lock <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    idle = !in_pkt && !inj_out.valid;
    for (int v = 0; v < NUM_VCS; v++)
      idle &= (ej_cnt[v] == '0) && (credits[v] == CW'(DEPTH));
  end

endmodule
