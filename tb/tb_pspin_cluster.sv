// tb_pspin_cluster: one processing cluster (cluster ID 2) with a model L2
// packet buffer (one-cycle reads, random grant stalls), a model command
// executor and a runtime model per HPU. Tasks of random packet sizes are
// sent as fast as the cluster takes them. Checks: every task reaches exactly
// one HPU with its handler address; the packet copy in L1 matches L2 (first
// and last word, read through the HPU's TCDM port); commands leave tagged with
// cluster and HPU and their responses come back to the issuing HPU; a
// notification leaves only after the task's command was answered and carries
// the task's message and packet; after all tasks the L1 packet buffer is
// empty again (32 KiB free).
module tb_pspin_cluster;
  import pspin_pkg::*;
  localparam int NH = NUM_HPUS, NT = 80;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(bit cc, string m);
    checks++;
    if (!cc) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic tv, tr; task_t tin; logic [31:0] free;
  logic l2req, l2gnt, l2rv; logic [31:0] l2addr; logic [WIDE_W-1:0] l2rd;
  logic fbv, fbr; feedback_t fb;
  logic cmv, cmr, rsv; cmd_t cm; cmd_resp_t rs;
  logic [NH-1:0] treq, tval, cen, wdi, dn, er, dnr, cv, cr, rv, tq, twe, tg, trv;
  hpu_task_t ct [NH]; pmp_cfg_t pmp [NH]; cmd_t cc [NH]; cmd_resp_t rsp [NH];
  logic [19:0] ta [NH]; logic [31:0] twd [NH], trd [NH]; logic [3:0] tbe [NH];

  pspin_cluster dut (
    .clk_i(clk), .rst_ni(rst_n), .cluster_id_i(CL_W'(2)),
    .task_valid_i(tv), .task_ready_o(tr), .task_i(tin), .free_bytes_o(free),
    .l2_req_o(l2req), .l2_addr_o(l2addr), .l2_gnt_i(l2gnt), .l2_rvalid_i(l2rv), .l2_rdata_i(l2rd),
    .fb_valid_o(fbv), .fb_ready_i(fbr), .fb_o(fb),
    .cmd_valid_o(cmv), .cmd_ready_i(cmr), .cmd_o(cm), .resp_valid_i(rsv), .resp_i(rs),
    .core_task_req_i(treq), .core_task_valid_o(tval), .core_task_o(ct), .core_clk_en_o(cen),
    .pmp_o(pmp), .core_wd_irq_o(wdi), .core_done_i(dn), .core_err_i(er), .core_done_ready_o(dnr),
    .core_cmd_valid_i(cv), .core_cmd_ready_o(cr), .core_cmd_i(cc), .core_resp_valid_o(rv),
    .core_resp_o(rsp), .tcdm_req_i(tq), .tcdm_we_i(twe), .tcdm_addr_i(ta), .tcdm_wdata_i(twd),
    .tcdm_be_i(tbe), .tcdm_gnt_o(tg), .tcdm_rvalid_o(trv), .tcdm_rdata_o(trd),
    .fetch_req_i('0), .fetch_addr_i('{default: '0}), .fetch_gnt_o(), .fetch_rvalid_o(),
    .fetch_rdata_o(), .ic_req_o(), .ic_addr_o(), .ic_gnt_i(1'b0), .ic_rvalid_i(1'b0), .ic_rdata_i('0)
  );

  function automatic logic [31:0] pat(logic [31:0] a);
    return (a * 32'h0101_0F1B) ^ 32'hC0DE_0000;
  endfunction
  // model L2 packet buffer
  always @(posedge clk) begin
    if (!rst_n) begin l2gnt <= 0; l2rv <= 0; end
    else begin
      l2gnt <= ($urandom % 3) != 0;
      l2rv  <= l2req && l2gnt;
      for (int i = 0; i < 16; i++) l2rd[32*i +: 32] <= pat({10'd0, l2addr[21:6], 6'd0} + 32'(4 * i));
    end
  end
  // model command executor: answers each command 5..20 cycles later
  cmd_resp_t rq [$]; int rq_t [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int answered [int];
  always @(posedge clk) begin
    if (!rst_n) begin cmr <= 0; rsv <= 0; rs <= '0; end
    else begin
      cmr <= ($urandom % 2) != 0;
      if (cmv && cmr) begin
        chk(cm.id.cluster == CL_W'(2) && cm.kind == CMD_DMA, "command tagged with the cluster");
        rq.push_back('{id: cm.id, error: 1'b0}); rq_t.push_back(cyc + 5 + int'($urandom % 16));
      end
      rsv <= 0;
      if (rq.size() != 0 && rq_t[0] <= cyc) begin
        rsv <= 1; rs <= rq.pop_front(); void'(rq_t.pop_front());
      end
    end
  end

  int got [int], notified [int];
  // HPU runtime models
  for (genvar h = 0; h < NH; h++) begin : g_h
    typedef enum logic [2:0] {S_IDLE, S_RD0, S_RD1, S_CMD, S_RUN, S_DONE} st_e;
    st_e st; hpu_task_t tk; int left, key; bit tag; int key_tag [2];
    logic [31:0] ew;
    logic treq_l, dn_l, cv_l, tq_l; logic [19:0] ta_l; cmd_t cc_l;
    assign treq[h] = treq_l; assign dn[h] = dn_l; assign er[h] = 1'b0; assign cv[h] = cv_l;
    assign cc[h] = cc_l; assign tq[h] = tq_l; assign ta[h] = ta_l; assign twe[h] = 1'b0;
    assign twd[h] = '0; assign tbe[h] = 4'hF;
    always @(posedge clk) begin
      if (!rst_n) begin
        st <= S_IDLE; treq_l <= 0; dn_l <= 0; cv_l <= 0; cc_l <= '0; tq_l <= 0; ta_l <= '0;
        tag = 0; key_tag[0] = -1; key_tag[1] = -1;
      end else begin
        if (rv[h]) begin
          chk(rsp[h].id.hpu == HPU_W'(h) && key_tag[rsp[h].id.tag] >= 0, "response to the issuing HPU");
          answered[key_tag[rsp[h].id.tag]] = 1;
        end
        case (st)
          S_IDLE: begin
            treq_l <= 1;
            if (treq_l && tval[h]) begin
              tk = ct[h]; key = int'((tk.l2_pkt_addr - L2_PKT_BASE) >> 11);
              chk(!got.exists(key), "each task once"); got[key] = 1;
              chk(tk.handler_addr == 32'h1D00_0000 + ((tk.l2_pkt_addr - L2_PKT_BASE) >> 11), "handler address");
              chk(tk.pkt_addr[31:20] == 12'h108 && pmp[h].pkt_base == tk.pkt_addr, "packet in this cluster's L1");
              key_tag[tag] = key;
              treq_l <= 0; tq_l <= 1; ta_l <= tk.pkt_addr[19:0]; ew = pat(tk.l2_pkt_addr - L2_PKT_BASE);
              st <= S_RD0;
            end
          end
          S_RD0, S_RD1: begin
            if (tq_l && tg[h]) tq_l <= 0;
            if (trv[h]) begin
              chk(trd[h] == ew, $sformatf("L1 copy word, HPU %0d: %h exp %h at %h l2 %h", h, trd[h], ew, ta_l, tk.l2_pkt_addr));
              if (st == S_RD0) begin
                int last; last = (int'(tk.pkt_size) - 4) & ~3;
                tq_l <= 1; ta_l <= tk.pkt_addr[19:0] + 20'(last); ew = pat(tk.l2_pkt_addr - L2_PKT_BASE + 32'(last));
                st <= S_RD1;
              end else begin
                cv_l <= 1; cc_l <= '0; cc_l.kind <= CMD_DMA; cc_l.length <= 32'(tk.pkt_size);
                st <= S_CMD;
              end
            end
          end
          S_CMD: if (cv_l && cr[h]) begin cv_l <= 0; left = int'($urandom % 40); st <= S_RUN; end
          S_RUN: if (left > 0) left = left - 1; else begin dn_l <= 1; st <= S_DONE; end
          S_DONE: if (dnr[h]) begin dn_l <= 0; tag = !tag; st <= S_IDLE; end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  always @(posedge clk) if (rst_n) fbr <= ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n && fbv && fbr) begin
    int key; key = int'((fb.pkt_addr - L2_PKT_BASE) >> 11);
    chk(got.exists(key) && !notified.exists(key), "one notification per task");
    chk(answered.exists(key), "notification after the command response");
    chk(fb.cluster == CL_W'(2) && fb.msgid == MPQ_W'(key % 16) && fb.kind == HDL_PAYLOAD, "notification fields");
    notified[key] = 1;
  end

  initial begin
    int n;
    tv = 0; tin = '0; fbr = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    chk(free == 32768, "empty packet buffer");
    for (int t = 0; t < NT; t++) begin
      tin <= '0;
      tin.kind <= HDL_PAYLOAD;
      tin.handler_addr <= 32'h1D00_0000 + 32'(t + 1);
      tin.her.msgid <= MPQ_W'((t + 1) % 16);
      tin.her.pkt_addr <= L2_PKT_BASE + 32'((t + 1) * 2048);
      tin.her.pkt_size <= 16'(64 + $urandom % 1437);
      tin.her.ectx.l1_copy_bytes <= 16'hFFFF;
      tv <= 1;
      do @(posedge clk); while (!tr);
    end
    tv <= 0;
    n = 0;
    while (notified.size() < NT && n < 20000) begin @(posedge clk); n++; end
    chk(notified.size() == NT, $sformatf("all %0d tasks notified (%0d)", NT, notified.size()));
    repeat (5) @(posedge clk);
    chk(free == 32768, "packet buffer empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
