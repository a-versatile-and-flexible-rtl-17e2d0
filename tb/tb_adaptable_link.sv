// tb_adaptable_link: checks the channels of one row of eight routers against a reference model.
//
// Every clock edge draws a new random set-up: the switches between neighbours, the track (or no
// track) of each of the 3 sender and 3 receiver taps of each router, and a flit and credit on
// every tap. Each flit's payload names its sender, so the receiver shows which sender reached it.
// At the falling edge the outputs are compared with a model that walks the row. Two taps on the
// same track are joined when every switch between them is on. A receiver gets the OR of the flits
// of the senders joined to it, and a sender gets the OR of their credits. `conflict` must be high
// when a receiver is joined to two or more senders. Half of the set-ups are made conflict-free
// (one sender per track) so that the single-driver case, the one a real set-up uses, dominates.
// Plain combinational block: no latency to measure.
module tb_adaptable_link;
  import adapt_noc_pkg::*;

  localparam int N = MESH_X;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  chan_t                 drv_chan [N][3];
  tap_t                  drv_tap  [N][3];
  credit_t               drv_cr   [N][3];
  chan_t                 rcv_chan [N][3];
  tap_t                  rcv_tap  [N][3];
  credit_t               rcv_cr   [N][3];
  logic [NUM_TRACKS-1:0] sw_on    [N];
  logic                  conflict;

  adaptable_link #(.N(N)) dut (.*);

  // new random set-up on every rising edge
  always_ff @(posedge clk) begin
    logic [NUM_TRACKS-1:0] used;
    logic                  clean;
    clean = $urandom_range(1);
    used  = '0;
    for (int i = 0; i < N; i++) begin
      sw_on[i] <= NUM_TRACKS'($urandom);
      for (int d = 0; d < 3; d++) begin
        tap_t   t;
        chan_t  c;
        credit_t k;
        t.en  = ($urandom_range(2) != 0);
        t.trk = TRK_W'($urandom);
        if (clean && t.en) begin
          if (used[t.trk]) t.en = 1'b0;
          else used[t.trk] = 1'b1;
        end
        drv_tap[i][d] <= t;
        rcv_tap[i][d] <= '{en: ($urandom_range(2) != 0), trk: TRK_W'($urandom)};
        c = '0;
        c.valid = $urandom_range(1);
        c.flit.head = $urandom_range(1);
        c.flit.data = DATA_W'(1) << (i * 3 + d);
        drv_chan[i][d] <= c;
        k.valid = $urandom_range(1);
        k.vc    = VC_W'($urandom);
        rcv_cr[i][d] <= k;
      end
    end
  end

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s @%0t", s, $time);
    end
  endtask

  function automatic bit joined(input int a, input int b, input int trk);
    int lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    for (int k = lo; k < hi; k++)
      if (!sw_on[k][trk]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_conf = 0, n_long = 0;
    @(posedge clk);
    repeat (20000) begin
      bit exp_conf;
      @(negedge clk);
      exp_conf = 1'b0;
      for (int i = 0; i < N; i++) begin
        for (int r = 0; r < 3; r++) begin
          chan_t   ec;
          credit_t ek;
          int      nd;
          ec = '0; ek = '0; nd = 0;
          for (int j = 0; j < N; j++) begin
            for (int d = 0; d < 3; d++) begin
              if (rcv_tap[i][r].en && drv_tap[j][d].en && rcv_tap[i][r].trk == drv_tap[j][d].trk
                  && joined(i, j, int'(rcv_tap[i][r].trk))) begin
                ec = ec | drv_chan[j][d];
                nd++;
                if (j > i + 1 || i > j + 1) n_long++;
              end
              if (drv_tap[i][r].en && rcv_tap[j][d].en && drv_tap[i][r].trk == rcv_tap[j][d].trk
                  && joined(i, j, int'(drv_tap[i][r].trk)))
                ek = ek | rcv_cr[j][d];
            end
          end
          if (nd > 1) exp_conf = 1'b1;
          check(rcv_chan[i][r] == ec, $sformatf("receiver %0d/%0d", i, r));
          check(drv_cr[i][r] == ek, $sformatf("credit to sender %0d/%0d", i, r));
        end
      end
      check(conflict == exp_conf, "conflict flag");
      if (exp_conf) n_conf++;
    end
    check(n_conf > 1000 && n_conf < 19000, "both conflict and clean set-ups seen");
    check(n_long > 1000, "links spanning several routers seen");
    $display("set-ups with conflict %0d, multi-hop joins %0d", n_conf, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
