// tb_pspin_task_dispatcher: four clusters with controllable free space and
// readiness. Checks that a task goes to its home cluster (message ID mod 4)
// when that cluster has room, otherwise to the cluster with the most free
// bytes, that the dispatcher blocks when no cluster has room, and that a task
// appears at the cluster one cycle after it is accepted.
module tb_pspin_task_dispatcher;
  import pspin_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tv, tr;
  task_t ti, co;
  logic [31:0] fr [4];
  logic [3:0] cv, cr;
  pspin_task_dispatcher dut (.clk_i(clk), .rst_ni(rst_n), .task_valid_i(tv), .task_ready_o(tr),
    .task_i(ti), .free_bytes_i(fr), .cl_valid_o(cv), .cl_ready_i(cr), .cl_task_o(co));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tv = 0; ti = '0; cr = '1;
    for (int c = 0; c < 4; c++) fr[c] = 32768;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int need, home, exp_c, best;
      bit any;
      @(negedge clk);
      for (int c = 0; c < 4; c++) fr[c] = ($urandom % 4 == 0) ? 32'($urandom % 128) : 32'($urandom % 4096);
      ti = '0;
      ti.her.msgid = MPQ_W'($urandom);
      ti.her.pkt_size = 16'($urandom % 2048);
      ti.her.ectx.l1_copy_bytes = ($urandom % 2) ? 16'hFFFF : 16'($urandom % 512);
      ti.handler_addr = 32'(t);
      tv = 1;
      need = (ti.her.ectx.l1_copy_bytes < ti.her.pkt_size) ? ti.her.ectx.l1_copy_bytes : ti.her.pkt_size;
      need = (need + 63) / 64 * 64;
      home = ti.her.msgid % 4;
      any = 0; exp_c = home; best = -1;
      if (fr[home] >= need) any = 1;
      else for (int c = 0; c < 4; c++) if (fr[c] >= need && int'(fr[c]) > best) begin any = 1; exp_c = c; best = fr[c]; end
      #1;
      chk(tr == any, $sformatf("ready=%0d expected %0d", tr, any));
      @(posedge clk);
      @(negedge clk);
      tv = 0;
      if (any) begin
        chk(cv == 4'(1 << exp_c), $sformatf("cluster %b expected %0d (home %0d)", cv, exp_c, home));
        chk(co.handler_addr == 32'(t), "task payload");
      end else chk(cv == 0, "no task when blocked");
    end
    // back-pressure: target cluster not ready holds the task
    @(negedge clk);
    for (int c = 0; c < 4; c++) fr[c] = 32768;
    cr = 4'b0000;
    ti = '0; ti.her.msgid = 2; ti.her.pkt_size = 64; ti.her.ectx.l1_copy_bytes = 64; tv = 1;
    @(negedge clk); tv = 0;
    repeat (3) begin #1 chk(cv == 4'b0100, "task held for busy cluster"); @(negedge clk); end
    #1 chk(!tr, "blocked while holding");
    cr = '1;
    @(negedge clk);
    chk(cv == 0, "released after ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
