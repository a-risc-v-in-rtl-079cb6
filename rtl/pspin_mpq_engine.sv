// pspin_mpq_engine: message processing queue (MPQ) engine of the packet
// scheduler.
//
// Each HER is queued in the MPQ named by its message ID (a FIFO of QDEPTH
// entries per MPQ). The engine enforces the handler order of the programming
// model: the first packet of a message runs the header handler and no payload
// handler of that message starts before the header handler's completion
// notification has come back; after the end-of-message packet has been
// dispatched and every handler of the message has completed, the completion
// handler runs once. A round-robin arbiter picks one eligible MPQ per cycle and
// the task is held in an output register (one task per cycle at full rate).
//
// Completion notifications from the clusters are forwarded to the NIC inbound
// engine unchanged except for mpq_idle, which is set on the notification after
// which the MPQ holds nothing (so the NIC may remap it). A pseudo-LRU monitor
// resets an active MPQ that received no packet for longer than its execution
// context's threshold and reports it on timeout_o (the reset is skipped when a
// packet for that MPQ is accepted in the same cycle).
//
// Document: HER contents, header/payload/completion ordering, end-of-message
// flag, notification forwarding, the pseudo-LRU timeout. Own choices: queue
// depth, number of MPQs, and the handling of missing handlers: a header packet
// without a header handler runs as a payload packet, a packet without any
// handler still goes through a cluster with a null handler address (the HPU
// runtime returns at once) so its buffer is freed the usual way, and a message
// without completion handler becomes idle after its last notification.
module pspin_mpq_engine
  import pspin_pkg::*;
#(
  parameter int unsigned QDEPTH = 4,
  localparam int unsigned QW = $clog2(QDEPTH)
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // HERs from the NIC inbound engine
  input  logic        her_valid_i,
  output logic        her_ready_o,
  input  her_t        her_i,
  // tasks to the task dispatcher
  output logic        task_valid_o,
  input  logic        task_ready_i,
  output task_t       task_o,
  // completion notifications from the clusters
  input  logic        fb_valid_i,
  output logic        fb_ready_o,
  input  feedback_t   fb_i,
  // completion notifications to the NIC inbound engine
  output logic        nic_fb_valid_o,
  input  logic        nic_fb_ready_i,
  output feedback_t   nic_fb_o,
  // MPQ reset by the timeout monitor
  output logic        timeout_o,
  output logic [MPQ_W-1:0] timeout_idx_o
);
  typedef struct packed {
    her_t her;
    logic first;   // first packet of its message
  } qent_t;

  qent_t             q_mem   [NUM_MPQ][QDEPTH];
  logic [QW-1:0]     q_rd    [NUM_MPQ];
  logic [QW-1:0]     q_wr    [NUM_MPQ];
  logic [QW:0]       q_cnt   [NUM_MPQ];
  logic [NUM_MPQ-1:0] active_q;     // message open on this MPQ
  logic [NUM_MPQ-1:0] hdr_wait_q;   // header handler not yet completed
  logic [NUM_MPQ-1:0] eom_disp_q;   // end-of-message packet dispatched
  logic [NUM_MPQ-1:0] th_disp_q;    // completion handler dispatched
  logic [15:0]        inflight_q [NUM_MPQ];
  her_t               eom_her_q  [NUM_MPQ];

  // ---------------- eligibility ----------------
  logic [NUM_MPQ-1:0] elig, elig_th;
  always_comb begin
    for (int m = 0; m < int'(NUM_MPQ); m++) begin
      qent_t h;
      h = q_mem[m][q_rd[m]];
      elig_th[m] = active_q[m] && eom_disp_q[m] && !th_disp_q[m]
                   && (inflight_q[m] == 0) && (eom_her_q[m].ectx.th_addr != '0);
      elig[m]    = elig_th[m] ||
                   ((q_cnt[m] != 0) && !eom_disp_q[m] && (h.first || !hdr_wait_q[m]));
    end
  end

  logic out_valid_q;
  task_t out_task_q;
  logic issue;
  logic [NUM_MPQ-1:0] arb_gnt;
  logic [MPQ_W-1:0] sel;
  logic sel_valid;

  assign issue = sel_valid && (!out_valid_q || task_ready_i);

  pspin_rr_arbiter #(.N(NUM_MPQ)) u_arb (
    .clk_i, .rst_ni, .req_i(elig), .advance_i(issue),
    .gnt_o(arb_gnt), .idx_o(sel), .valid_o(sel_valid)
  );

  // task built for the selected MPQ
  task_t  sel_task;
  logic   sel_is_th, sel_is_hh;
  always_comb begin
    qent_t h;
    h = q_mem[sel][q_rd[sel]];
    sel_is_th = elig_th[sel];
    sel_is_hh = !sel_is_th && h.first && (h.her.ectx.hh_addr != '0);
    sel_task  = '0;
    if (sel_is_th) begin
      sel_task.kind         = HDL_COMPLETION;
      sel_task.her          = eom_her_q[sel];
      sel_task.her.pkt_size = '0;       // no packet data for the completion handler
      sel_task.handler_addr = eom_her_q[sel].ectx.th_addr;
    end else begin
      sel_task.her          = h.her;
      sel_task.kind         = sel_is_hh ? HDL_HEADER : HDL_PAYLOAD;
      sel_task.handler_addr = sel_is_hh ? h.her.ectx.hh_addr : h.her.ectx.ph_addr;
    end
  end

  // ---------------- feedback path ----------------
  logic fb_fire, her_fire;
  logic [MPQ_W-1:0] fb_m;
  logic fb_idle;
  assign fb_m    = fb_i.msgid;
  assign fb_fire = fb_valid_i && nic_fb_ready_i;
  always_comb begin
    fb_idle = 1'b0;
    if (active_q[fb_m]) begin
      if (fb_i.kind == HDL_COMPLETION)
        fb_idle = 1'b1;
      else
        fb_idle = eom_disp_q[fb_m] && (inflight_q[fb_m] == 16'd1)
                  && (eom_her_q[fb_m].ectx.th_addr == '0)
                  && !(issue && sel == fb_m);
    end
  end
  always_comb begin
    nic_fb_o          = fb_i;
    nic_fb_o.mpq_idle = fb_idle;
  end
  assign nic_fb_valid_o = fb_valid_i;
  assign fb_ready_o     = nic_fb_ready_i;

  // ---------------- HER input ----------------
  logic [MPQ_W-1:0] h_m;
  assign h_m         = her_i.msgid;
  assign her_ready_o = (q_cnt[h_m] != (QW+1)'(QDEPTH));
  assign her_fire    = her_valid_i && her_ready_o;

  pspin_mpq_monitor #(.NUM_MPQ(NUM_MPQ)) u_mon (
    .clk_i, .rst_ni,
    .touch_i(her_fire), .touch_idx_i(h_m), .touch_thr_i(her_i.ectx.mpq_timeout),
    .active_i(active_q), .timeout_o(timeout_o), .timeout_idx_o(timeout_idx_o)
  );

  // the first HER of a message is the one that opens an idle MPQ, or the one
  // arriving behind a message's end-of-message packet in the same queue
  // (packets queued behind a dispatched end-of-message belong to the next one)
  logic her_first;
  always_comb begin
    her_first = !active_q[h_m] || eom_disp_q[h_m];
    if (q_cnt[h_m] != 0) her_first = q_mem[h_m][q_wr[h_m] - 1'b1].her.eom;
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      out_valid_q <= 1'b0;
      out_task_q  <= '0;
      active_q    <= '0;
      hdr_wait_q  <= '0;
      eom_disp_q  <= '0;
      th_disp_q   <= '0;
      for (int m = 0; m < int'(NUM_MPQ); m++) begin
        q_rd[m] <= '0; q_wr[m] <= '0; q_cnt[m] <= '0;
        inflight_q[m] <= '0;
        eom_her_q[m]  <= '0;
        for (int e = 0; e < int'(QDEPTH); e++) q_mem[m][e] <= '0;
      end
    end else begin
      if (task_ready_i) out_valid_q <= 1'b0;
      // push
      if (her_fire) begin
        q_mem[h_m][q_wr[h_m]] <= '{her: her_i, first: her_first};
        q_wr[h_m]    <= q_wr[h_m] + 1'b1;
        active_q[h_m] <= 1'b1;
      end
      // pop / issue
      if (issue) begin
        out_valid_q <= 1'b1;
        out_task_q  <= sel_task;
        if (sel_is_th) begin
          th_disp_q[sel] <= 1'b1;
        end else begin
          q_rd[sel] <= q_rd[sel] + 1'b1;
          if (sel_is_hh) hdr_wait_q[sel] <= 1'b1;
          if (q_mem[sel][q_rd[sel]].her.eom) begin
            eom_disp_q[sel] <= 1'b1;
            eom_her_q[sel]  <= q_mem[sel][q_rd[sel]].her;
          end
        end
      end
      // queue occupancy
      for (int m = 0; m < int'(NUM_MPQ); m++) begin
        logic push, pop;
        push = her_fire && (h_m == MPQ_W'(m));
        pop  = issue && !sel_is_th && (sel == MPQ_W'(m));
        q_cnt[m] <= q_cnt[m] + (QW+1)'(push) - (QW+1)'(pop);
        inflight_q[m] <= inflight_q[m] + 16'(issue && sel == MPQ_W'(m))
                         - 16'(fb_fire && active_q[fb_m] && fb_m == MPQ_W'(m));
      end
      // completions
      if (fb_fire && active_q[fb_m]) begin
        if (fb_i.kind == HDL_HEADER) hdr_wait_q[fb_m] <= 1'b0;
        if (fb_idle) begin
          active_q[fb_m]   <= (q_cnt[fb_m] != 0) || (her_fire && h_m == fb_m);
          eom_disp_q[fb_m] <= 1'b0;
          th_disp_q[fb_m]  <= 1'b0;
          hdr_wait_q[fb_m] <= 1'b0;
        end
      end
      // timeout reset: drop the whole MPQ state (not if a packet just arrived)
      if (timeout_o && !(her_fire && h_m == timeout_idx_o)) begin
        active_q[timeout_idx_o]   <= 1'b0;
        eom_disp_q[timeout_idx_o] <= 1'b0;
        th_disp_q[timeout_idx_o]  <= 1'b0;
        hdr_wait_q[timeout_idx_o] <= 1'b0;
        q_rd[timeout_idx_o]       <= '0;
        q_wr[timeout_idx_o]       <= '0;
        q_cnt[timeout_idx_o]      <= '0;
        inflight_q[timeout_idx_o] <= '0;
      end
    end
  end

  assign task_valid_o = out_valid_q;
  assign task_o       = out_task_q;
endmodule
