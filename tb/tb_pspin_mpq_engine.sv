// tb_pspin_mpq_engine: sends several multi-packet messages (with and without
// header/completion handlers, two of them back to back on one MPQ) and a
// model of the clusters that completes tasks after random delays, in random
// order. Checks, per message: the header handler is the first task, no
// payload task is issued before the header handler's notification, exactly one
// completion handler is issued and only after every other task completed,
// mpq_idle is set on exactly the last notification, and every packet gets a
// task. Finally an unterminated message must be reset by the timeout monitor.
module tb_pspin_mpq_engine;
  import pspin_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic her_valid, her_ready, t_valid, t_ready, fb_valid, fb_ready, nfb_valid, nfb_ready, tout;
  her_t her; task_t tsk; feedback_t fb, nfb;
  logic [MPQ_W-1:0] tidx;

  pspin_mpq_engine dut (.clk_i(clk), .rst_ni(rst_n), .her_valid_i(her_valid), .her_ready_o(her_ready),
    .her_i(her), .task_valid_o(t_valid), .task_ready_i(t_ready), .task_o(tsk),
    .fb_valid_i(fb_valid), .fb_ready_o(fb_ready), .fb_i(fb),
    .nic_fb_valid_o(nfb_valid), .nic_fb_ready_i(nfb_ready), .nic_fb_o(nfb),
    .timeout_o(tout), .timeout_idx_o(tidx));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  // message descriptors: msg k uses MPQ mq[k]
  localparam int NMSG = 5;
  int mq   [NMSG] = '{1, 2, 3, 1, 6};
  int npk  [NMSG] = '{5, 4, 6, 3, 1};
  bit hh   [NMSG] = '{1, 0, 1, 1, 1};
  bit th   [NMSG] = '{1, 0, 1, 1, 0};
  // per-message progress
  int issued [NMSG], done_cnt [NMSG], th_issued [NMSG], idle_seen [NMSG];
  bit hdr_done [NMSG];
  int cur_msg [NUM_MPQ];   // message currently at the head of each MPQ (in order)
  int msg_q [NUM_MPQ][$];

  task_t pend [$];
  int    pend_msg [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // task sink: accept tasks, remember them
  always @(posedge clk) if (rst_n && t_valid && t_ready) begin
    int m;
    m = msg_q[tsk.her.msgid][0];
    if (tsk.kind == HDL_HEADER) chk(issued[m] == 0, "header handler must be first task");
    if (tsk.kind == HDL_PAYLOAD && hh[m]) chk(hdr_done[m], "payload before header completion");
    if (tsk.kind == HDL_COMPLETION) begin
      chk(th[m], "completion handler issued for message without one");
      chk(done_cnt[m] == npk[m], "completion handler before all handlers done");
      th_issued[m]++;
    end else begin
      chk(tsk.handler_addr == (tsk.kind == HDL_HEADER ? tsk.her.ectx.hh_addr : tsk.her.ectx.ph_addr),
          "handler address");
    end
    issued[m]++;
    pend.push_back(tsk);
    pend_msg.push_back(m);
  end

  // notification checker
  always @(posedge clk) if (rst_n && nfb_valid && nfb_ready) begin
    int m;
    m = msg_q[nfb.msgid][0];
    if (nfb.kind == HDL_HEADER) hdr_done[m] = 1;
    if (nfb.kind != HDL_COMPLETION) done_cnt[m]++;
    if (nfb.mpq_idle) begin
      idle_seen[m]++;
      chk(done_cnt[m] == npk[m] && (th[m] ? nfb.kind == HDL_COMPLETION : 1'b1),
          $sformatf("mpq_idle too early for msg %0d", m));
      void'(msg_q[nfb.msgid].pop_front());
    end
  end

  initial begin
    her_valid = 0; her = '0; t_ready = 1; fb_valid = 0; fb = '0; nfb_ready = 1;
    for (int m = 0; m < NMSG; m++) begin
      issued[m] = 0; done_cnt[m] = 0; th_issued[m] = 0; idle_seen[m] = 0; hdr_done[m] = 0;
      msg_q[mq[m]].push_back(m);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      // HER source: interleave packets of the messages, in order per message
      begin
        int sent [NMSG];
        int left;
        for (int m = 0; m < NMSG; m++) sent[m] = 0;
        left = 0;
        for (int m = 0; m < NMSG; m++) left += npk[m];
        while (left > 0) begin
          int m;
          m = $urandom % NMSG;
          // message 3 shares MPQ 1 with message 0: send it only after message 0's packets
          if (m == 3 && sent[0] < npk[0]) continue;
          if (sent[m] == npk[m]) continue;
          @(negedge clk);
          her_valid = 1;
          her = '0;
          her.msgid = MPQ_W'(mq[m]);
          her.eom = (sent[m] == npk[m] - 1);
          her.pkt_addr = 32'(m * 4096 + sent[m] * 64);
          her.pkt_size = 64;
          her.ectx.hh_addr = hh[m] ? 32'h100 + 32'(m) : 0;
          her.ectx.ph_addr = 32'h200 + 32'(m);
          her.ectx.th_addr = th[m] ? 32'h300 + 32'(m) : 0;
          her.ectx.mpq_timeout = 32'hFFFF_FFFF;
          @(posedge clk);
          while (!her_ready) @(posedge clk);
          sent[m]++; left--;
          @(negedge clk);
          her_valid = 0;
          repeat ($urandom % 3) @(negedge clk);
        end
      end
      // cluster model: complete a random pending task after a random delay
      begin
        int idle_cycles;
        idle_cycles = 0;
        while (idle_cycles < 300) begin
          @(negedge clk);
          fb_valid = 0;
          if (pend.size() > 0 && ($urandom % 3 == 0)) begin
            int k;
            k = $urandom % pend.size();
            fb = '0;
            fb.msgid = pend[k].her.msgid;
            fb.kind = pend[k].kind;
            fb.eom = pend[k].her.eom;
            fb.pkt_addr = pend[k].her.pkt_addr;
            fb_valid = 1;
            pend.delete(k);
            pend_msg.delete(k);
            idle_cycles = 0;
          end else idle_cycles++;
        end
        fb_valid = 0;
      end
    join
    for (int m = 0; m < NMSG; m++) begin
      chk(issued[m] == npk[m] + (th[m] ? 1 : 0), $sformatf("msg %0d: %0d tasks", m, issued[m]));
      chk(th_issued[m] == (th[m] ? 1 : 0), $sformatf("msg %0d completion handler count", m));
      chk(idle_seen[m] == 1, $sformatf("msg %0d idle count %0d", m, idle_seen[m]));
    end
    // timeout: open a message on MPQ 9, never finish it
    @(negedge clk);
    her = '0; her.msgid = 9; her.eom = 0; her.pkt_size = 64;
    her.ectx.ph_addr = 32'h500; her.ectx.mpq_timeout = 50;
    her_valid = 1;
    @(negedge clk); her_valid = 0;
    begin
      int t; bit seen;
      seen = 0;
      for (t = 0; t < 200 && !seen; t++) begin
        @(posedge clk);
        if (tout && tidx == 9) seen = 1;
      end
      chk(seen && t > 45, $sformatf("timeout of MPQ 9 after %0d cycles (seen=%0d)", t, seen));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
