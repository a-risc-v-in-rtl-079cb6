// tb_pspin_hpu_driver: one HPU driver with a scripted core.
// Checks: the core is clock-gated while it waits for a task and the blocking
// task load completes with the task's fields when one arrives; PMP windows
// match the task; commands get the driver's ID and tag; the completion
// notification waits for every in-flight command response; a finished task is
// buffered so a new task can start at once; a failed handler first sends a
// HostDirect error record to the context descriptor, then a notification
// flagged as error; the watchdog fires after wd_timeout cycles.
module tb_pspin_hpu_driver;
  import pspin_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tv, tr, creq, cval, clken, wd, cdone, cerr, cdr, ccv, ccr, crv, cmv, cmr, rv, fbv, fbr;
  cl_task_t ti; hpu_task_t ct; pmp_cfg_t pmp; cmd_t ccmd, cmd; cmd_resp_t cresp, resp; feedback_t fb;

  pspin_hpu_driver dut (.clk_i(clk), .rst_ni(rst_n), .cluster_id_i(2'd2), .hpu_id_i(3'd5),
    .task_valid_i(tv), .task_ready_o(tr), .task_i(ti),
    .core_task_req_i(creq), .core_task_valid_o(cval), .core_task_o(ct), .core_clk_en_o(clken),
    .pmp_o(pmp), .core_wd_irq_o(wd), .core_done_i(cdone), .core_err_i(cerr), .core_done_ready_o(cdr),
    .core_cmd_valid_i(ccv), .core_cmd_ready_o(ccr), .core_cmd_i(ccmd),
    .core_resp_valid_o(crv), .core_resp_o(cresp),
    .cmd_valid_o(cmv), .cmd_ready_i(cmr), .cmd_o(cmd), .resp_valid_i(rv), .resp_i(resp),
    .fb_valid_o(fbv), .fb_ready_i(fbr), .fb_o(fb));

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

  function automatic cl_task_t mk(int n, int wdt);
    cl_task_t t;
    t = '0;
    t.tsk.kind = HDL_PAYLOAD;
    t.tsk.handler_addr = 32'h1D00_0100 + 32'(n);
    t.tsk.her.msgid = MPQ_W'(n);
    t.tsk.her.pkt_addr = 32'h1C00_0000 + 32'(n * 64);
    t.tsk.her.pkt_size = 16'(100 + n);
    t.tsk.her.ectx.hnd_mem_addr = 32'h1C40_0000;
    t.tsk.her.ectx.hnd_mem_size = 32'h1000;
    t.tsk.her.ectx.host_desc_addr = 32'hABC0;
    t.tsk.her.ectx.wd_timeout = 32'(wdt);
    t.l1_pkt_addr = 32'h1080_0000 + 32'(n * 128);
    t.l1_pkt_size = 16'(100 + n);
    t.alloc_idx = ALLOC_W'(n);
    return t;
  endfunction

  task automatic give(cl_task_t t);
    @(negedge clk);
    chk(tr, "driver ready for a task");
    ti = t; tv = 1;
    @(negedge clk); tv = 0;
  endtask

  // wait for the load to complete, check the fields
  task automatic load(cl_task_t t);
    int n;
    n = 0;
    creq = 1;
    #1;
    while (!cval) begin @(negedge clk); #1; n++; end
    chk(ct.handler_addr == t.tsk.handler_addr && ct.pkt_addr == t.l1_pkt_addr &&
        ct.pkt_size == t.tsk.her.pkt_size, "task fields");
    chk(pmp.pkt_base == t.l1_pkt_addr && pmp.hnd_base == t.tsk.her.ectx.hnd_mem_addr &&
        pmp.code_base == PROG_BASE, "PMP windows");
    chk(clken, "clock enabled with a task");
    @(negedge clk); creq = 0;
  endtask

  initial begin
    cl_task_t t0, t1, t2;
    tv = 0; ti = '0; creq = 0; cdone = 0; cerr = 0; ccv = 0; ccmd = '0; cmr = 1; rv = 0; resp = '0; fbr = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // waiting for a task: clock gated
    @(negedge clk); creq = 1;
    #1 chk(!clken && !cval, "core gated while waiting");
    repeat (3) @(negedge clk);
    #1 chk(!clken, "still gated");
    t0 = mk(1, 0);
    give(t0);
    load(t0);
    // two commands
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      ccmd = '0; ccmd.kind = CMD_DMA; ccmd.length = 64; ccv = 1;
      #1 chk(cmv && cmd.id.cluster == 2 && cmd.id.hpu == 5 && cmd.kind == CMD_DMA, "command forwarded with ID");
      @(negedge clk); ccv = 0;
    end
    // doorbell
    @(negedge clk); cdone = 1; #1 chk(cdr, "doorbell accepted"); @(negedge clk); cdone = 0;
    // no notification while commands in flight; new task may start
    repeat (4) begin #1 chk(!fbv, "notification held by in-flight commands"); @(negedge clk); end
    #1 chk(tr, "new task accepted while completion is buffered");
    t1 = mk(2, 20);
    give(t1);
    // first response: still waiting
    resp = '0; resp.id = '{cluster: 2, hpu: 5, tag: 0}; rv = 1;
    @(negedge clk); rv = 0;
    #1 chk(!fbv, "one response still missing");
    rv = 1; @(negedge clk); rv = 0;
    #1 chk(fbv && fb.alloc_idx == t0.alloc_idx && fb.msgid == t0.tsk.her.msgid && !fb.error, "notification after last response");
    @(negedge clk);
    #1 chk(!fbv, "notification sent once");
    // second task: watchdog
    load(t1);
    begin
      int n;
      n = 0;
      while (!wd && n < 100) begin @(negedge clk); #1; n++; end
      chk(wd && n >= 18 && n <= 22, $sformatf("watchdog after %0d cycles", n));
    end
    // runtime ends the handler with an error
    cdone = 1; cerr = 1; @(negedge clk); cdone = 0; cerr = 0;
    #1 chk(cmv && cmd.kind == CMD_HOSTDIRECT && cmd.dst_addr == 64'hABC0 && cmd.id.tag == 1'b1,
           "error record sent with HostDirect");
    @(negedge clk);
    #1 chk(!fbv, "error notification waits for the HostDirect response");
    resp = '0; resp.id = '{cluster: 2, hpu: 5, tag: 1}; rv = 1;
    @(negedge clk); rv = 0;
    #1 chk(fbv && fb.error && fb.alloc_idx == t1.alloc_idx, "error notification");
    // back-pressure on notifications
    @(negedge clk);
    t2 = mk(3, 0);
    give(t2); load(t2);
    fbr = 0;
    cdone = 1; @(negedge clk); cdone = 0;
    repeat (3) begin #1 chk(fbv, "notification held until accepted"); @(negedge clk); end
    fbr = 1; @(negedge clk);
    #1 chk(!fbv, "notification gone after acceptance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
