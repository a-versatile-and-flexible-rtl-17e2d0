// output_unit: one router output port (switch traversal and downstream VC state).
//
// The flit granted to this port in a cycle is registered and driven onto the link in the next
// cycle (switch traversal, ST). The unit keeps, for each downstream VC, a credit counter that
// starts at the downstream buffer depth, drops by one per flit sent and rises by one per
// credit received, and a busy bit that marks the VC as owned by a packet from the cycle its
// head flit is granted until its tail flit is granted. The allocator reads vc_free and
// credit_ok to decide which VC a new packet may take and whether a flit may be sent.
// While `powered` is low the port sends nothing; its state is kept.
module output_unit
  import adapt_noc_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                powered,
  input  logic                gnt_valid,
  input  flit_t               gnt_flit,   // vc field = downstream VC
  input  credit_t             cr_in,
  output chan_t               out_chan,
  output logic [NUM_VCS-1:0]  vc_free,
  output logic [NUM_VCS-1:0]  credit_ok,
  output logic                busy        // a flit is in the output register
);
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [CNT_W-1:0]   credits [NUM_VCS];
  logic [NUM_VCS-1:0] owned;
  logic               send;

  assign send = gnt_valid && powered;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_chan <= '0;
      owned    <= '0;
      for (int v = 0; v < NUM_VCS; v++) credits[v] <= CNT_W'(DEPTH);
    end else begin
      out_chan.valid <= send;
      if (send) out_chan.flit <= gnt_flit;
      for (int v = 0; v < NUM_VCS; v++) begin
        logic dec, inc;
        dec = send && (gnt_flit.vc == VC_W'(v));
        inc = cr_in.valid && (cr_in.vc == VC_W'(v));
        credits[v] <= credits[v] - CNT_W'(dec) + CNT_W'(inc);
        if (dec) begin
          if (gnt_flit.tail)      owned[v] <= 1'b0;
          else if (gnt_flit.head) owned[v] <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int v = 0; v < NUM_VCS; v++) begin
      vc_free[v]   = !owned[v];
      credit_ok[v] = (credits[v] != '0);
    end
  end

  assign busy = out_chan.valid;

  a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
    !(cr_in.valid && credits[cr_in.vc] == CNT_W'(DEPTH)));

endmodule
