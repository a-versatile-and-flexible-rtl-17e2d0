// tb_output_unit: random grants and credit returns against a model of the downstream credit
// counters and VC ownership; checks the one-cycle switch-traversal register and that a
// powered-off port sends nothing.
module tb_output_unit;
  import adapt_noc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic powered, gnt_valid, busy;
  flit_t gnt_flit;
  credit_t cr_in;
  chan_t out_chan;
  logic [NUM_VCS-1:0] vc_free, credit_ok;

  output_unit dut (.*);

  int cred [NUM_VCS];
  bit own [NUM_VCS];
  int outstanding [NUM_VCS];
  bit exp_valid;
  flit_t exp_flit;

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", s, $time); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n_zero = 0;
    powered = 1; gnt_valid = 0; gnt_flit = '0; cr_in = '0; exp_valid = 0;
    for (int v = 0; v < NUM_VCS; v++) begin cred[v] = BUF_DEPTH; own[v] = 0; outstanding[v] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      // outputs of the previous edge
      check(out_chan.valid == exp_valid, "output valid one cycle after grant");
      if (exp_valid) check(out_chan.flit == exp_flit, "output flit");
      check(busy == out_chan.valid, "busy");
      for (int v = 0; v < NUM_VCS; v++) begin
        check(credit_ok[v] == (cred[v] > 0), $sformatf("credit_ok vc%0d", v));
        check(vc_free[v] == !own[v], $sformatf("vc_free vc%0d", v));
        if (cred[v] == 0) n_zero++;
      end
      powered   = ($urandom_range(0, 15) != 0);
      gnt_valid = 0;
      gnt_flit  = '0;
      begin
        int v;
        v = $urandom_range(0, NUM_VCS - 1);
        if (cred[v] > 0 && $urandom_range(0, 1)) begin
          gnt_valid      = 1;
          gnt_flit.vc    = VC_W'(v);
          gnt_flit.head  = !own[v];
          gnt_flit.tail  = $urandom_range(0, 2) == 0;
          gnt_flit.data  = {$urandom, $urandom, $urandom, $urandom};
        end
      end
      cr_in = '0;
      begin
        int v;
        v = $urandom_range(0, NUM_VCS - 1);
        if (outstanding[v] > 0 && $urandom_range(0, 2) == 0) begin
          cr_in.valid = 1; cr_in.vc = VC_W'(v);
        end
      end
      // model of this edge
      exp_valid = gnt_valid && powered;
      exp_flit  = gnt_flit;
      if (cr_in.valid) begin cred[cr_in.vc]++; outstanding[cr_in.vc]--; end
      if (exp_valid) begin
        cred[gnt_flit.vc]--; outstanding[gnt_flit.vc]++;
        if (gnt_flit.tail) own[gnt_flit.vc] = 0;
        else if (gnt_flit.head) own[gnt_flit.vc] = 1;
      end
    end
    check(n_zero > 0, "credits ran out at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
