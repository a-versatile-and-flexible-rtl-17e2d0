// subnoc_config_ctrl: run-time formation of one subNoC (a rectangular region of routers).
//
// System software writes one configuration word per router into a table (wr_* port): powered
// ports, link set-up, route tables. A `start` with a region x0..x1, y0..y1 then re-configures
// that region while the rest of the network keeps running:
//   1. DRAIN  the NIs of the region stop starting packets (hold) until every router and NI of
//             the region has been empty for two consecutive cycles, so no packet is misrouted;
//   2. POWER  router by router (row order), the power set-up is committed and the controller
//             waits for that router's power-gating controller: 2 cycles for a router whose
//             ports only switch off, WAKE_CYCLES + 1 for one whose ports must be woken;
//   3. LINK   router by router, the link and route set-up is committed and the controller
//             waits for the link controller: LINK_SETUP_CYCLES + 1 cycles per router;
//   4. the hold is released and `done` pulses for one cycle.
// The cycles spent in each phase are counted (drain_cycles, pwr_cycles, link_cycles).
// The three phases and their per-hop costs follow the document; the table interface, the
// row-order walk and the two-cycle empty test are this design's own.
module subnoc_config_ctrl
  import adapt_noc_pkg::*;
#(
  parameter int unsigned NX = MESH_X,
  parameter int unsigned NY = MESH_Y,
  localparam int unsigned N  = NX * NY,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration table
  input  logic               wr_en,
  input  logic [AW-1:0]      wr_addr,     // y * NX + x
  input  router_cfg_t        wr_data,
  // command
  input  logic               start,
  input  logic [COORD_W-1:0] x0, y0, x1, y1,
  output logic               busy,
  output logic               done,
  output logic [31:0]        drain_cycles,
  output logic [31:0]        pwr_cycles,
  output logic [31:0]        link_cycles,
  // to the routers and NIs
  output logic [N-1:0]       hold,
  output router_cfg_t        cfg_out,
  output logic [N-1:0]       pwr_commit,
  output logic [N-1:0]       link_commit,
  input  logic [N-1:0]       node_idle,
  input  logic [N-1:0]       pwr_ready,
  input  logic [N-1:0]       link_ready
);
  typedef enum logic [2:0] {S_IDLE, S_DRAIN, S_PWR, S_PWR_WAIT, S_LINK, S_LINK_WAIT} state_e;

  router_cfg_t        tbl [N];
  state_e             state;
  logic [COORD_W-1:0] rx0, ry0, rx1, ry1, cx, cy;
  logic [N-1:0]       region;
  logic               region_idle, idle_q, last;
  logic [AW-1:0]      cur;

  always_ff @(posedge clk) begin
    if (wr_en) tbl[wr_addr] <= wr_data;
  end

  always_comb begin
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++)
        region[y*NX + x] = (x >= int'(rx0)) && (x <= int'(rx1)) && (y >= int'(ry0)) && (y <= int'(ry1));
    region_idle = ((node_idle | ~region) == '1);
    cur         = AW'(int'(cy) * NX + int'(cx));
    last        = (cx == rx1) && (cy == ry1);
    cfg_out     = tbl[cur];
  end

  assign busy = (state != S_IDLE);

  // commit strobes are issued in the PWR / LINK cycle itself, so the addressed controller's
  // ready flag already reflects the commit in the following WAIT cycle
  always_comb begin
    pwr_commit  = '0;
    link_commit = '0;
    if (state == S_PWR)  pwr_commit[cur]  = 1'b1;
    if (state == S_LINK) link_commit[cur] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      {rx0, ry0, rx1, ry1, cx, cy} <= '0;
      hold         <= '0;
      done         <= 1'b0;
      idle_q       <= 1'b0;
      drain_cycles <= '0;
      pwr_cycles   <= '0;
      link_cycles  <= '0;
    end else begin
      done        <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rx0 <= x0; ry0 <= y0; rx1 <= x1; ry1 <= y1;
          cx  <= x0; cy  <= y0;
          drain_cycles <= '0;
          pwr_cycles   <= '0;
          link_cycles  <= '0;
          idle_q       <= 1'b0;
          state        <= S_DRAIN;
        end
        S_DRAIN: begin
          hold         <= region;
          drain_cycles <= drain_cycles + 1;
          idle_q       <= region_idle;
          if (region_idle && idle_q) state <= S_PWR;
        end
        S_PWR: begin
          pwr_cycles      <= pwr_cycles + 1;
          state           <= S_PWR_WAIT;
        end
        S_PWR_WAIT: begin
          pwr_cycles <= pwr_cycles + 1;
          if (pwr_ready[cur]) begin
            if (last) begin
              cx <= rx0; cy <= ry0;
              state <= S_LINK;
            end else begin
              if (cx == rx1) begin cx <= rx0; cy <= cy + 1'b1; end
              else cx <= cx + 1'b1;
              state <= S_PWR;
            end
          end
        end
        S_LINK: begin
          link_cycles      <= link_cycles + 1;
          state            <= S_LINK_WAIT;
        end
        S_LINK_WAIT: begin
          link_cycles <= link_cycles + 1;
          if (link_ready[cur]) begin
            if (last) begin
              hold  <= '0;
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              if (cx == rx1) begin cx <= rx0; cy <= cy + 1'b1; end
              else cx <= cx + 1'b1;
              state <= S_LINK;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
