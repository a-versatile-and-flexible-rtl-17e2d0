// power_gating_ctrl: power gating of the seven ports and the crossbar of one adaptable router.
//
// A commit loads the requested set of powered ports. Ports that are to be switched on become
// usable WAKE_CYCLES cycles after the commit (12 cycles per router, the power-on time the
// design is budgeted for); ports that are to be switched off are cut as soon as they hold no
// flit (at the commit itself when already empty). The chiplet crossbar is powered while any of the five chiplet ports (+X -X +Y -Y NI)
// is. `ready` is high whenever the powered set equals the requested set and no wake-up is in
// progress; it drops in the cycle after a commit that changes anything.
// The wake-up time follows the document; the order (off waits for empty, on waits for a fixed
// count) is this design's choice.
module power_gating_ctrl
  import adapt_noc_pkg::*;
#(
  parameter int unsigned WAKE = WAKE_CYCLES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_PORTS-1:0] rst_pwr,    // powered set after reset
  input  logic                 commit,
  input  logic [NUM_PORTS-1:0] pwr_en,
  input  logic [NUM_PORTS-1:0] port_busy,
  output logic [NUM_PORTS-1:0] port_on,
  output logic                 xbar_on,
  output logic                 waking,
  output logic                 ready
);
  localparam int unsigned CW = $clog2(WAKE + 1);

  logic [NUM_PORTS-1:0] target;
  logic [CW-1:0]        wake_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      port_on  <= rst_pwr;
      target   <= rst_pwr;
      wake_cnt <= '0;
      waking   <= 1'b0;
    end else if (commit) begin
      target  <= pwr_en;
      port_on <= port_on & ~(port_on & ~pwr_en & ~port_busy);
      if ((pwr_en & ~port_on) != '0) begin
        waking   <= 1'b1;
        wake_cnt <= CW'(WAKE - 2);
      end
    end else begin
      if (waking) begin
        if (wake_cnt == '0) begin
          waking  <= 1'b0;
          port_on <= (port_on | target) & ~(port_on & ~target & ~port_busy);
        end else begin
          wake_cnt <= wake_cnt - 1'b1;
          port_on  <= port_on & ~(port_on & ~target & ~port_busy);
        end
      end else begin
        port_on <= port_on & ~(port_on & ~target & ~port_busy);
      end
    end
  end

  assign xbar_on = |port_on[int'(P_NI):0];
  assign ready   = !waking && (port_on == target);

endmodule
