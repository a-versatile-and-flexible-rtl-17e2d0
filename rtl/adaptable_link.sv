// adaptable_link: the adaptable-link channels of one row (or one column) of routers.
//
// Each of the NUM_TRACKS channels is one long interposer wire that passes every router of the
// row. Link switches (tri-state repeaters) sit on the wire between neighbouring routers; a switch
// that is off cuts the wire, so the channel falls into independent segments of any length. A
// segment can thus join two adjacent routers, skip over routers (express or wrap-around link)
// or carry two unrelated links in different parts of the row at once.
//
// Every router has three sender taps (its +dir and -dir ports when switched onto an adaptable
// link, and its interposer-switch port) and three receiver taps. A tap attaches to at most one
// channel. On each segment, the flit driven by the one enabled sender reaches every receiver tap
// attached to that segment, and the credits driven by the receiver flow back to the sender.
// The tri-state wire is represented by its logic function (OR of the enabled drivers of a
// segment); `conflict` flags a segment with more than one sender, which the set-up must avoid.
// Purely combinational: an on switch repeats the signal without adding a cycle.
// Segmenting by switches controlled per router follows the document; the tap arrangement and
// the OR model are this design's own.
module adaptable_link
  import adapt_noc_pkg::*;
#(
  parameter int unsigned N = MESH_X
) (
  input  chan_t                 drv_chan [N][3],
  input  tap_t                  drv_tap  [N][3],
  output credit_t               drv_cr   [N][3],
  output chan_t                 rcv_chan [N][3],
  input  tap_t                  rcv_tap  [N][3],
  input  credit_t               rcv_cr   [N][3],
  input  logic [NUM_TRACKS-1:0] sw_on    [N],     // switch between position i and i+1 (last unused)
  output logic                  conflict
);
  localparam int unsigned SW = $clog2(N + 1);

  logic [SW-1:0] seg [NUM_TRACKS][N];

  always_comb begin
    for (int t = 0; t < NUM_TRACKS; t++) begin
      seg[t][0] = '0;
      for (int i = 1; i < N; i++)
        seg[t][i] = seg[t][i-1] + SW'(!sw_on[i-1][t]);
    end
  end

  always_comb begin
    conflict = 1'b0;
    for (int i = 0; i < N; i++) begin
      for (int r = 0; r < 3; r++) begin
        int unsigned nd;
        rcv_chan[i][r] = '0;
        drv_cr[i][r]   = '0;
        nd = 0;
        for (int j = 0; j < N; j++) begin
          for (int d = 0; d < 3; d++) begin
            if (rcv_tap[i][r].en && drv_tap[j][d].en && drv_tap[j][d].trk == rcv_tap[i][r].trk
                && seg[rcv_tap[i][r].trk][i] == seg[rcv_tap[i][r].trk][j]) begin
              rcv_chan[i][r] = rcv_chan[i][r] | drv_chan[j][d];
              nd = nd + 1;
            end
            if (drv_tap[i][r].en && rcv_tap[j][d].en && rcv_tap[j][d].trk == drv_tap[i][r].trk
                && seg[drv_tap[i][r].trk][i] == seg[drv_tap[i][r].trk][j])
              drv_cr[i][r] = drv_cr[i][r] | rcv_cr[j][d];
          end
        end
        if (nd > 1) conflict = 1'b1;
      end
    end
  end

endmodule
