// tb_power_gating_ctrl: ports switched on must become usable exactly 12 cycles after the commit
// with ready low meanwhile; ports switched off must stay on while they hold flits and go off in
// the cycle after they are empty; the crossbar is on while any chiplet port is.
module tb_power_gating_ctrl;
  import adapt_noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic commit = 0, xbar_on, waking, ready;
  logic [NUM_PORTS-1:0] pwr_en = '0, port_busy = '0, port_on;

  power_gating_ctrl dut (.clk, .rst_n, .rst_pwr('1), .commit, .pwr_en, .port_busy, .port_on,
                         .xbar_on, .waking, .ready);

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", s, $time); end
  endtask

  task automatic do_commit(input logic [NUM_PORTS-1:0] en);
    @(negedge clk);
    pwr_en = en; commit = 1;
    @(negedge clk);
    commit = 0;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(port_on == '1 && ready && xbar_on, "all on after reset");

    // switch off +X, -Y and IY while -Y is still busy
    port_busy = 7'b0001000;
    do_commit(7'b0110110);
    check(port_on == 7'b0111110, "idle ports off one cycle after commit, busy -Y kept");
    check(!ready, "not ready while a port is busy");
    repeat (3) @(negedge clk);
    check(port_on[3] && !ready, "busy port stays on");
    port_busy = '0;
    @(negedge clk);
    check(port_on == 7'b0110110 && ready, "port off once empty");

    // all chiplet ports off: crossbar off, interposer switch still on
    do_commit(7'b0100000);
    check(port_on == 7'b0100000 && !xbar_on, "crossbar off with its ports");

    // wake everything: 12 cycles
    do_commit('1);
    t = 1;
    while (port_on != '1 && t < 40) begin
      check(!ready && waking, "waking, not ready");
      @(negedge clk); t++;
    end
    check(t == WAKE_CYCLES, $sformatf("wake-up took %0d cycles", t));
    check(ready && xbar_on && !waking, "ready after wake-up");

    // unchanged set: ready stays high
    do_commit('1);
    check(ready && port_on == '1, "no-op commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
