// tb_pspin_mpq_monitor: checks the pseudo-LRU victim choice and the timeout.
// Eight MPQs; some are touched and made active; the monitor must never name
// an inactive MPQ while an active one exists, must point to the
// least-recently-touched MPQ after a sequence that touches them in order, and
// must raise timeout only once that MPQ's threshold is exceeded.
module tb_pspin_mpq_monitor;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic touch;
  logic [2:0] tidx, vidx;
  logic [31:0] thr;
  logic [N-1:0] active;
  logic tout;
  pspin_mpq_monitor #(.NUM_MPQ(N)) dut (.clk_i(clk), .rst_ni(rst_n), .touch_i(touch),
    .touch_idx_i(tidx), .touch_thr_i(thr), .active_i(active), .timeout_o(tout), .timeout_idx_o(vidx));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first;
    touch = 0; tidx = 0; thr = 0; active = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // touch MPQs 0..7 in order with large threshold; all active
    for (int i = 0; i < N; i++) begin
      @(negedge clk); touch = 1; tidx = 3'(i); thr = 1000; active[i] = 1;
    end
    @(negedge clk); touch = 0;
    #1 chk(vidx == 0, $sformatf("LRU victim should be 0, got %0d", vidx));
    chk(!tout, "no timeout before threshold");
    // touch 0 again: tree now points at 4 (oldest in the other half)
    touch = 1; tidx = 0; @(negedge clk); touch = 0;
    #1 chk(vidx == 4, $sformatf("victim after touching 0 should be 4, got %0d", vidx));
    // only MPQs 5 and 6 active: victim must be one of them
    active = 8'b0110_0000;
    #1 chk(vidx == 5 || vidx == 6, $sformatf("victim %0d not active", vidx));
    // random activity: victim always active
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      active = N'($urandom) | N'(1 << ($urandom % N));
      touch = $urandom % 2; tidx = 3'($urandom); thr = 1000;
      #1 chk(active[vidx], $sformatf("victim %0d inactive (active=%b)", vidx, active));
    end
    // timeout: single active MPQ 3 with threshold 20
    @(negedge clk);
    touch = 1; tidx = 3; thr = 20; active = 8'b0000_1000;
    @(negedge clk); touch = 0;
    first = -1;
    for (int t = 0; t < 40; t++) begin
      #1;
      if (tout && first < 0) first = t;
      @(negedge clk);
    end
    chk(first >= 19 && first <= 21, $sformatf("timeout after %0d cycles, expected ~20", first));
    chk(vidx == 3, "timeout names MPQ 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
