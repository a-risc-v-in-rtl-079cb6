// pspin_hpu_driver: the memory-mapped task device in front of one HPU.
//
// Task hand-over: the HPU runtime asks for its next handler with a load
// (core_task_req_i). Without a task the driver holds the load and drops
// core_clk_en_o, gating the core's clock; when the CSCHED delivers a task the
// clock is enabled and the load completes (core_task_valid_o for one cycle with
// the handler address, packet address in L1, sizes and handler-memory region).
// With the task the driver sets the PMP windows (pmp_o) the handler may touch
// and starts the watchdog.
//
// Commands: the handler's commands (NIC, DMA, HostDirect) are tagged with the
// cluster, HPU and task tag and forwarded; the driver counts, per task, the
// commands whose response has not yet come back. Responses are passed to the
// core.
//
// Completion: the runtime writes the doorbell (core_done_i, with core_err_i
// when the handler failed). The finished task moves to a one-entry completion
// buffer and the driver can take a new task at once. The completion
// notification (fb_o) leaves when no command of that task is in flight. For a
// failed handler, a HostDirect command first writes the error to the execution
// context descriptor in host memory. The watchdog raises core_wd_irq_o when a
// handler runs for more than the context's wd_timeout cycles (0 disables it);
// the runtime then ends the handler with an error.
//
// Document: blocking load with clock gating, doorbell, notification only after
// in-flight commands complete, one buffered completed task, per-task PMP,
// watchdog, error report through HostDirect. Own choices: the signal-level
// core interface (not a bus decoder), the two task tags, the PMP windows
// (program memory, packet in L1, handler memory) and the error record layout.
module pspin_hpu_driver
  import pspin_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic [CL_W-1:0]  cluster_id_i,
  input  logic [HPU_W-1:0] hpu_id_i,
  // task from CSCHED
  input  logic        task_valid_i,
  output logic        task_ready_o,
  input  cl_task_t    task_i,
  // core side
  input  logic        core_task_req_i,
  output logic        core_task_valid_o,
  output hpu_task_t   core_task_o,
  output logic        core_clk_en_o,
  output pmp_cfg_t    pmp_o,
  output logic        core_wd_irq_o,
  input  logic        core_done_i,
  input  logic        core_err_i,
  output logic        core_done_ready_o,
  input  logic        core_cmd_valid_i,
  output logic        core_cmd_ready_o,
  input  cmd_t        core_cmd_i,
  output logic        core_resp_valid_o,
  output cmd_resp_t   core_resp_o,
  // command unit
  output logic        cmd_valid_o,
  input  logic        cmd_ready_i,
  output cmd_t        cmd_o,
  input  logic        resp_valid_i,
  input  cmd_resp_t   resp_i,
  // completion notification
  output logic        fb_valid_o,
  input  logic        fb_ready_i,
  output feedback_t   fb_o
);
  logic      cur_valid_q, cur_run_q, cur_tag_q;
  cl_task_t  cur_q;
  logic      dn_valid_q, dn_tag_q, dn_err_q, dn_errcmd_q;
  cl_task_t  dn_q;
  logic [7:0]  inflight_q [2];
  logic [31:0] wd_cnt_q;

  // ---------------- task hand-over ----------------
  assign task_ready_o      = !cur_valid_q;
  assign core_task_valid_o = cur_valid_q && !cur_run_q && core_task_req_i;
  assign core_clk_en_o     = cur_valid_q || !core_task_req_i;

  always_comb begin
    core_task_o              = '0;
    core_task_o.kind         = cur_q.tsk.kind;
    core_task_o.handler_addr = cur_q.tsk.handler_addr;
    core_task_o.pkt_addr     = cur_q.l1_pkt_addr;
    core_task_o.pkt_size     = cur_q.tsk.her.pkt_size;
    core_task_o.l2_pkt_addr  = cur_q.tsk.her.pkt_addr;
    core_task_o.hnd_mem_addr = cur_q.tsk.her.ectx.hnd_mem_addr;
    core_task_o.hnd_mem_size = cur_q.tsk.her.ectx.hnd_mem_size;
    core_task_o.msgid        = cur_q.tsk.her.msgid;
    pmp_o = '0;
    if (cur_valid_q) begin
      pmp_o.code_base = PROG_BASE;
      pmp_o.code_size = PROG_BYTES;
      pmp_o.pkt_base  = cur_q.l1_pkt_addr;
      pmp_o.pkt_size  = 32'(cur_q.l1_pkt_size);
      pmp_o.hnd_base  = cur_q.tsk.her.ectx.hnd_mem_addr;
      pmp_o.hnd_size  = cur_q.tsk.her.ectx.hnd_mem_size;
    end
  end

  assign core_wd_irq_o = cur_run_q && (cur_q.tsk.her.ectx.wd_timeout != 0)
                         && (wd_cnt_q >= cur_q.tsk.her.ectx.wd_timeout);

  // ---------------- commands ----------------
  logic  err_cmd;
  cmd_t  err_cmd_d;
  assign err_cmd = dn_valid_q && dn_err_q && !dn_errcmd_q;
  always_comb begin
    err_cmd_d          = '0;
    err_cmd_d.kind     = CMD_HOSTDIRECT;
    err_cmd_d.id       = '{cluster: cluster_id_i, hpu: hpu_id_i, tag: dn_tag_q};
    err_cmd_d.dst_addr = 64'(dn_q.tsk.her.ectx.host_desc_addr);
    err_cmd_d.imm      = {64'd0, 32'(dn_q.tsk.handler_addr), 32'(dn_q.tsk.her.pkt_addr),
                          16'(dn_q.tsk.her.msgid), 14'd0, dn_q.tsk.kind, 32'hE77_0001,
                          32'd0, 32'd0};
    cmd_o = err_cmd_d;
    if (!err_cmd) begin
      cmd_o    = core_cmd_i;
      cmd_o.id = '{cluster: cluster_id_i, hpu: hpu_id_i, tag: cur_tag_q};
    end
  end
  assign cmd_valid_o      = err_cmd || (core_cmd_valid_i && cur_run_q);
  assign core_cmd_ready_o = cmd_ready_i && !err_cmd && cur_run_q;
  assign core_resp_valid_o = resp_valid_i;
  assign core_resp_o       = resp_i;

  // ---------------- completion ----------------
  assign core_done_ready_o = cur_run_q && !dn_valid_q;
  assign fb_valid_o = dn_valid_q && !err_cmd && (inflight_q[dn_tag_q] == 0);
  always_comb begin
    fb_o           = '0;
    fb_o.msgid     = dn_q.tsk.her.msgid;
    fb_o.kind      = dn_q.tsk.kind;
    fb_o.eom       = dn_q.tsk.her.eom;
    fb_o.pkt_addr  = dn_q.tsk.her.pkt_addr;
    fb_o.pkt_size  = dn_q.tsk.her.pkt_size;
    fb_o.cluster   = cluster_id_i;
    fb_o.alloc_idx = dn_q.alloc_idx;
    fb_o.error     = dn_err_q;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cur_valid_q <= 1'b0; cur_run_q <= 1'b0; cur_tag_q <= 1'b0; cur_q <= '0;
      dn_valid_q <= 1'b0; dn_tag_q <= 1'b0; dn_err_q <= 1'b0; dn_errcmd_q <= 1'b0; dn_q <= '0;
      inflight_q[0] <= '0; inflight_q[1] <= '0;
      wd_cnt_q <= '0;
    end else begin
      logic [7:0] inf0, inf1;
      inf0 = inflight_q[0];
      inf1 = inflight_q[1];
      if (task_valid_i && task_ready_o) begin
        cur_valid_q <= 1'b1;
        cur_q       <= task_i;
      end
      if (core_task_valid_o) begin
        cur_run_q <= 1'b1;
        wd_cnt_q  <= '0;
      end else if (cur_run_q) begin
        wd_cnt_q  <= wd_cnt_q + 1;
      end
      // command issue / response bookkeeping
      if (cmd_valid_o && cmd_ready_i) begin
        if (cmd_o.id.tag) inf1 = inf1 + 1; else inf0 = inf0 + 1;
      end
      if (resp_valid_i) begin
        if (resp_i.id.tag) inf1 = inf1 - 1; else inf0 = inf0 - 1;
      end
      inflight_q[0] <= inf0;
      inflight_q[1] <= inf1;
      if (err_cmd && cmd_ready_i) dn_errcmd_q <= 1'b1;
      // doorbell
      if (core_done_i && core_done_ready_o) begin
        dn_valid_q  <= 1'b1;
        dn_q        <= cur_q;
        dn_tag_q    <= cur_tag_q;
        dn_err_q    <= core_err_i;
        dn_errcmd_q <= 1'b0;
        cur_valid_q <= 1'b0;
        cur_run_q   <= 1'b0;
        cur_tag_q   <= ~cur_tag_q;
      end
      if (fb_valid_o && fb_ready_i) dn_valid_q <= 1'b0;
    end
  end
endmodule
