// tb_pspin_top: end-to-end test of the whole unit at its default size (4
// clusters x 8 HPUs, full memories; no parameter overrides).
//
// The parts outside the unit are synchronous models in this file:
//  * NIC inbound engine: writes each packet into the L2 packet buffer in 64 B
//    words, then sends its HER. Packets live at L2 offset
//    (msg*128 + pkt)*2048, and each 32-bit word holds pat(offset).
//  * HPU runtime (one per HPU): asks for a task with the blocking load, reads
//    the first and last word of the packet copy in L1 through its TCDM port and
//    compares them with the L2 pattern, runs for some cycles, issues its
//    commands and rings the doorbell without waiting for their responses.
//  * NIC outbound engine: accepts commands with random stalls and answers
//    after a few cycles. Host: grants writes at random and checks each one
//    against the expected data; the IOMMU maps one 4 KiB page per message.
//
// Traffic: phase 1 interleaves 15 messages with header, payload and completion
// handlers; their handlers copy the first packet to the host (off-cluster
// DMA), write a 32 B HostDirect record, or send through the NIC. Message 10
// has a failing handler (error record), message 11 a hanging one (watchdog),
// message 12 has no last packet (MPQ timeout) and message 13 writes to an
// unmapped page (IOMMU fault). Phase 2 floods one message with long handlers
// so that its home cluster and then every cluster fill up. Host and program
// memory are written and read back through the host ports.
//
// Checked: handler address, size and kind of every task; HH before any PH,
// TH after all other notifications of its message, mpq_idle on the last
// notification; packet data in L1; every host write; one notification per
// task, none before its commands have been answered; error flags. Each
// mechanism below is counted, and one that never happened is a failure.
module tb_pspin_top;
  import pspin_pkg::*;
  localparam int NCL = NUM_CLUSTERS, NH = NUM_HPUS, NM = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit cc, string m);
    checks++;
    if (!cc) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, m);
    end
  endtask

  // ---------------- DUT signals ----------------
  logic her_valid, her_ready; her_t her;
  logic nfb_valid, nfb_ready; feedback_t nfb;
  logic mpq_to; logic [MPQ_W-1:0] mpq_to_idx;
  logic pw_req, pw_gnt; logic [21:0] pw_addr; logic [WIDE_W-1:0] pw_data; logic [WIDE_BYTES-1:0] pw_be;
  logic ncmd_valid, ncmd_ready; cmd_t ncmd;
  logic nresp_valid, nresp_ready; cmd_resp_t nresp;
  logic nrd_gnt, nrd_rvalid; logic [WIDE_W-1:0] nrd_rdata;
  logic hw_req, hw_gnt, hr_req, hr_gnt, hr_rvalid;
  logic [21:0] hw_addr, hr_addr; logic [WIDE_W-1:0] hw_data, hr_rdata; logic [WIDE_BYTES-1:0] hw_be;
  logic p_req, p_we, p_gnt, p_rvalid; logic [14:0] p_addr; logic [63:0] p_wdata, p_rdata; logic [7:0] p_be;
  logic [NH-1:0] f_req [NCL]; logic [14:0] f_addr [NCL][NH];
  logic [NH-1:0] f_gnt [NCL], f_rv [NCL]; logic [31:0] f_rd [NCL][NH];
  logic h_req, h_gnt; logic [63:0] h_addr; logic [WIDE_W-1:0] h_data; logic [WIDE_BYTES-1:0] h_be;
  logic cfg_we, cfg_v; logic [3:0] cfg_idx; logic [51:0] cfg_vpn, cfg_ppn;
  logic io_fault; logic [63:0] io_fault_addr;
  logic [1:0] pe_wr_gnt, pe_rd_gnt, pe_rd_rvalid;
  logic [WIDE_W-1:0] pe_rd_rdata [2];
  logic [NH-1:0] t_req [NCL], t_valid [NCL], clk_en [NCL], wd_irq [NCL], done [NCL], err [NCL], done_rdy [NCL];
  logic [NH-1:0] cv [NCL], cr [NCL], rv [NCL];
  hpu_task_t ct [NCL][NH];
  pmp_cfg_t  pmp [NCL][NH];
  cmd_t      cc [NCL][NH];
  cmd_resp_t rsp [NCL][NH];
  logic [NH-1:0] tq [NCL], twe [NCL], tgnt [NCL], trv [NCL];
  logic [19:0] ta [NCL][NH];
  logic [31:0] twd [NCL][NH], trd [NCL][NH];
  logic [3:0]  tbe [NCL][NH];

  pspin_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .her_valid_i(her_valid), .her_ready_o(her_ready), .her_i(her),
    .nic_fb_valid_o(nfb_valid), .nic_fb_ready_i(nfb_ready), .nic_fb_o(nfb),
    .mpq_timeout_o(mpq_to), .mpq_timeout_idx_o(mpq_to_idx),
    .pkt_wr_req_i(pw_req), .pkt_wr_addr_i(pw_addr), .pkt_wr_data_i(pw_data), .pkt_wr_be_i(pw_be),
    .pkt_wr_gnt_o(pw_gnt),
    .nic_cmd_valid_o(ncmd_valid), .nic_cmd_ready_i(ncmd_ready), .nic_cmd_o(ncmd),
    .nic_resp_valid_i(nresp_valid), .nic_resp_ready_o(nresp_ready), .nic_resp_i(nresp),
    .nic_rd_req_i(1'b0), .nic_rd_addr_i('0), .nic_rd_gnt_o(nrd_gnt), .nic_rd_rvalid_o(nrd_rvalid),
    .nic_rd_rdata_o(nrd_rdata),
    .hnd_wr_req_i(hw_req), .hnd_wr_addr_i(hw_addr), .hnd_wr_data_i(hw_data), .hnd_wr_be_i(hw_be),
    .hnd_wr_gnt_o(hw_gnt), .hnd_rd_req_i(hr_req), .hnd_rd_addr_i(hr_addr), .hnd_rd_gnt_o(hr_gnt),
    .hnd_rd_rvalid_o(hr_rvalid), .hnd_rd_rdata_o(hr_rdata),
    .prog_req_i(p_req), .prog_we_i(p_we), .prog_addr_i(p_addr), .prog_wdata_i(p_wdata),
    .prog_be_i(p_be), .prog_gnt_o(p_gnt), .prog_rvalid_o(p_rvalid), .prog_rdata_o(p_rdata),
    .host_wr_req_o(h_req), .host_wr_addr_o(h_addr), .host_wr_data_o(h_data), .host_wr_be_o(h_be),
    .host_wr_gnt_i(h_gnt),
    .iommu_cfg_we_i(cfg_we), .iommu_cfg_idx_i(cfg_idx), .iommu_cfg_valid_i(cfg_v),
    .iommu_cfg_vpn_i(cfg_vpn), .iommu_cfg_ppn_i(cfg_ppn), .iommu_fault_o(io_fault),
    .iommu_fault_addr_o(io_fault_addr),
    .pe_wr_req_i('0), .pe_wr_addr_i('{default: '0}), .pe_wr_data_i('{default: '0}),
    .pe_wr_be_i('{default: '0}), .pe_wr_gnt_o(pe_wr_gnt), .pe_rd_req_i('0),
    .pe_rd_addr_i('{default: '0}), .pe_rd_gnt_o(pe_rd_gnt), .pe_rd_rvalid_o(pe_rd_rvalid),
    .pe_rd_rdata_o(pe_rd_rdata),
    .core_task_req_i(t_req), .core_task_valid_o(t_valid), .core_task_o(ct), .core_clk_en_o(clk_en),
    .pmp_o(pmp), .core_wd_irq_o(wd_irq), .core_done_i(done), .core_err_i(err),
    .core_done_ready_o(done_rdy), .core_cmd_valid_i(cv), .core_cmd_ready_o(cr), .core_cmd_i(cc),
    .core_resp_valid_o(rv), .core_resp_o(rsp),
    .tcdm_req_i(tq), .tcdm_we_i(twe), .tcdm_addr_i(ta), .tcdm_wdata_i(twd), .tcdm_be_i(tbe),
    .tcdm_gnt_o(tgnt), .tcdm_rvalid_o(trv), .tcdm_rdata_o(trd),
    .fetch_req_i(f_req), .fetch_addr_i(f_addr), .fetch_gnt_o(f_gnt), .fetch_rvalid_o(f_rv),
    .fetch_rdata_o(f_rd)
  );

  // ---------------- helpers ----------------
  function automatic logic [31:0] pat(logic [31:0] off);
    return (off * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction
  function automatic logic [WIDE_W-1:0] pat_word(logic [31:0] off);
    logic [WIDE_W-1:0] w;
    for (int i = 0; i < 16; i++) w[32*i +: 32] = pat(off + 32'(4 * i));
    return w;
  endfunction
  function automatic logic [63:0] host_pa(int m, logic [11:0] off);
    return {40'h0, 12'h800 + 12'(m * 7), off};
  endfunction
  function automatic int slot_of(logic [31:0] a);
    return int'((a - L2_PKT_BASE) >> 11);
  endfunction

  // ---------------- messages ----------------
  int npk [NM];            // packets sent per message
  bit has_eom [NM];
  int run_len [NM];
  ectx_t ectx [NM];
  int fb_cnt [NM];         // HH/PH notifications seen
  bit hh_seen [NM], th_seen [NM];
  int fb_seen [int];       // per task key
  int pending [int];       // commands not yet answered, per task key
  bit started [int];

  // mechanism counters
  int n_hh, n_ph, n_th, n_idle, n_home, n_nonhome, n_block, n_gate, n_inflight_wait,
      n_err_rec, n_wd, n_mpq_to, n_iommu_fault, n_bank_stall, n_odma, n_hd, n_nic_cmd,
      n_l1_ok, n_hnd_mem, n_prog_mem, n_ic, n_ic_miss, n_tcdm_stall;

  initial begin
    for (int m = 0; m < NM; m++) begin
      ectx[m] = '0;
      ectx[m].hh_addr = 32'h1D00_0100 + 32'(m * 16);
      ectx[m].ph_addr = 32'h1D00_1100 + 32'(m * 16);
      ectx[m].th_addr = 32'h1D00_2100 + 32'(m * 16);
      ectx[m].hnd_mem_addr = L2_HND_BASE + 32'(m * 32'h1_0000);
      ectx[m].hnd_mem_size = 32'h1_0000;
      ectx[m].host_desc_addr = 32'(m * 4096) + 32'hF00;
      ectx[m].l1_copy_bytes = 16'hFFFF;
      ectx[m].mpq_timeout = 32'd1_000_000;
      ectx[m].wd_timeout = 32'd0;
      run_len[m] = 4 + m;
      has_eom[m] = 1;
      npk[m] = 0; fb_cnt[m] = 0; hh_seen[m] = 0; th_seen[m] = 0;
    end
    ectx[11].wd_timeout = 32'd150;
    ectx[12].mpq_timeout = 32'd400;
    has_eom[12] = 0;
    ectx[14].hh_addr = 32'd0;          // no header handler: first packet runs the payload handler
    ectx[15].l1_copy_bytes = 16'd512;  // flood: only the first 512 B of each packet go to L1
    run_len[15] = 4000;
  end

  // host virtual address of message m's 4 KiB page; the descriptor address
  // field of the execution context is 32 bits wide
  function automatic logic [63:0] va(int m, int off);
    return 64'(32'(m * 4096) + 32'(off));
  endfunction

  // ---------------- host memory model ----------------
  logic [WIDE_W-1:0]     exp_data [logic [63:0]];
  logic [WIDE_BYTES-1:0] exp_be   [logic [63:0]];
  bit                    exp_err  [logic [63:0]];
  always @(posedge clk) if (rst_n) h_gnt <= ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n && h_req && h_gnt) begin
    if (exp_be.exists(h_addr)) begin
      logic [WIDE_W-1:0] mask;
      for (int b = 0; b < WIDE_BYTES; b++) mask[8*b +: 8] = {8{exp_be[h_addr][b]}};
      if (exp_err.exists(h_addr)) begin
        chk(h_data[95:64] == 32'h0E77_0001 && h_be == {32'd0, 32'hFFFF_FFFF}, "error record content");
        n_err_rec++;
      end else begin
        chk(h_be == exp_be[h_addr] && (h_data & mask) == (exp_data[h_addr] & mask),
            $sformatf("host write data at %h", h_addr));
      end
      exp_be.delete(h_addr);
    end else chk(0, $sformatf("unexpected host write at %h", h_addr));
  end
  always @(posedge clk) if (rst_n && io_fault) n_iommu_fault++;

  // ---------------- NIC outbound model ----------------
  cmd_resp_t nq [$];
  int        nq_t [$];
  always @(posedge clk) begin
    if (!rst_n) begin
      ncmd_ready <= 0; nresp_valid <= 0; nresp <= '0;
    end else begin
      ncmd_ready <= ($urandom % 2) != 0;
      if (ncmd_valid && ncmd_ready) begin
        chk(ncmd.kind == CMD_NIC && ncmd.length != 0, "NIC command");
        nq.push_back('{id: ncmd.id, error: 1'b0});
        nq_t.push_back(int'(cyc) + 3 + int'($urandom % 8));
        n_nic_cmd++;
      end
      if (nresp_valid && nresp_ready) nresp_valid <= 0;
      else if (!nresp_valid && nq.size() != 0 && nq_t[0] <= int'(cyc)) begin
        nresp_valid <= 1; nresp <= nq.pop_front(); void'(nq_t.pop_front());
      end
    end
  end

  // ---------------- notifications from the unit ----------------
  always @(posedge clk) if (rst_n) nfb_ready <= ($urandom % 4) != 0;
  always @(posedge clk) if (rst_n && nfb_valid && nfb_ready) begin
    int m, key;
    m = int'(nfb.msgid);
    key = slot_of(nfb.pkt_addr) * 4 + int'(nfb.kind);
    chk(!fb_seen.exists(key), "one notification per task");
    fb_seen[key] = 1;
    chk(!pending.exists(key) || pending[key] == 0, "notification after all command responses");
    chk(nfb.error == (m == 10 && nfb.kind == HDL_PAYLOAD && slot_of(nfb.pkt_addr) % 128 == 1
                      || m == 11 && nfb.kind == HDL_PAYLOAD && slot_of(nfb.pkt_addr) % 128 == 1),
        "error flag");
    if (nfb.kind == HDL_COMPLETION) begin
      chk(fb_cnt[m] == npk[m] && nfb.mpq_idle, "TH notification last, with mpq_idle");
      th_seen[m] = 1;
    end else begin
      if (nfb.kind == HDL_HEADER) hh_seen[m] = 1;
      fb_cnt[m]++;
      chk(!nfb.mpq_idle || (ectx[m].th_addr == 0 && fb_cnt[m] == npk[m]), "mpq_idle only at the end");
    end
    if (nfb.mpq_idle) n_idle++;
  end
  always @(posedge clk) if (rst_n && mpq_to) begin
    chk(mpq_to_idx == 12, "only message 12 times out");
    n_mpq_to++;
  end
  always @(posedge clk) if (rst_n && dut.t_valid && !dut.t_ready) n_block++;
  always @(posedge clk) if (rst_n && pw_req && !pw_gnt) n_bank_stall++;

  // ---------------- HPU runtime models ----------------
  typedef enum logic [2:0] {R_IDLE, R_RD0, R_RD1, R_RUN, R_CMD, R_DONE} rst_e;
  for (genvar c = 0; c < NCL; c++) begin : g_c
    for (genvar h = 0; h < NH; h++) begin : g_h
      rst_e st;
      hpu_task_t tk;
      int key, left, wait_rv, m, p;
      bit tag, rd_sent, is_err;
      logic [31:0] exp_w;
      cmd_t cmdq [$];
      int key_of_tag [2];
      logic treq_l, done_l, err_l, cv_l, tq_l;
      cmd_t cc_l;
      logic [19:0] ta_l;
      assign t_req[c][h] = treq_l;
      assign done[c][h]  = done_l;
      assign err[c][h]   = err_l;
      assign cv[c][h]    = cv_l;
      assign cc[c][h]    = cc_l;
      assign tq[c][h]    = tq_l;
      assign ta[c][h]    = ta_l;
      assign twe[c][h] = 1'b0;
      assign twd[c][h] = '0;
      assign tbe[c][h] = 4'hF;
      always @(posedge clk) begin
        if (!rst_n) begin
          st <= R_IDLE; treq_l <= 1'b0; done_l <= 1'b0; err_l <= 1'b0;
          cv_l <= 1'b0; cc_l <= '0; tq_l <= 1'b0; ta_l <= '0; tag = 0; rd_sent = 0;
          key_of_tag[0] = -1; key_of_tag[1] = -1;
        end else begin
          if (!clk_en[c][h]) n_gate++;
          if (rv[c][h]) begin
            int k;
            k = key_of_tag[rsp[c][h].id.tag];
            chk(rsp[c][h].id.cluster == CL_W'(c) && rsp[c][h].id.hpu == HPU_W'(h) && k >= 0,
                "response routed to the issuing HPU");
            if (k >= 0) pending[k] = pending[k] - 1;
          end
          case (st)
            R_IDLE: begin
              treq_l <= 1'b1;
              if (t_req[c][h] && t_valid[c][h]) begin
                tk = ct[c][h];
                m = int'(tk.msgid);
                p = slot_of(tk.l2_pkt_addr) % 128;
                key = slot_of(tk.l2_pkt_addr) * 4 + int'(tk.kind);
                treq_l <= 1'b0;
                chk(!started.exists(key), "task runs once");
                started[key] = 1;
                if (CL_W'(c) == CL_W'(m % NCL)) n_home++; else n_nonhome++;
                case (tk.kind)
                  HDL_HEADER: begin
                    n_hh++;
                    chk(p == 0 && tk.handler_addr == ectx[m].hh_addr, "HH task: first packet, HH address");
                  end
                  HDL_PAYLOAD: begin
                    n_ph++;
                    chk(tk.handler_addr == ectx[m].ph_addr, "PH address");
                    chk(hh_seen[m] || ectx[m].hh_addr == 0, "PH only after the HH notification");
                  end
                  default: begin
                    n_th++;
                    chk(tk.handler_addr == ectx[m].th_addr, "TH address");
                    chk(fb_cnt[m] == npk[m] && has_eom[m], "TH only after every other handler");
                  end
                endcase
                if (tk.kind == HDL_COMPLETION) chk(tk.pkt_size == 0, "completion task carries no packet");
                else chk(tk.pkt_size != 0 && tk.pkt_addr[31:22] == 10'((L1_BASE + L1_STRIDE * c) >> 22),
                    $sformatf("packet copy in this cluster's L1: c%0d h%0d m%0d p%0d kind %0d l1 %h size %0d", c, h, m, p, tk.kind, tk.pkt_addr, tk.pkt_size));
                chk(pmp[c][h].pkt_base == tk.pkt_addr && pmp[c][h].hnd_base == ectx[m].hnd_mem_addr,
                    "PMP windows");
                key_of_tag[tag] = key;
                if (!pending.exists(key)) pending[key] = 0;
                is_err = (m == 10 || m == 11) && tk.kind == HDL_PAYLOAD && p == 1;
                // commands of this handler
                cmdq.delete();
                if (tk.kind == HDL_PAYLOAD || tk.kind == HDL_HEADER && m % 3 == 0) begin
                  cmd_t x;
                  x = '0;
                  if (m == 13 && p == 0) begin
                    x.kind = CMD_DMA; x.src_addr = tk.l2_pkt_addr; x.dst_addr = va(m, 0); x.length = 256;
                    cmdq.push_back(x);
                  end else if (m % 3 == 0 && p == 0 && m != 15) begin
                    x.kind = CMD_DMA; x.src_addr = tk.l2_pkt_addr; x.dst_addr = va(m, 0);
                    x.length = 32'(tk.pkt_size);
                    cmdq.push_back(x);
                  end else if (m % 3 == 1 && m < 15) begin
                    x.kind = CMD_HOSTDIRECT; x.dst_addr = va(m, 32'h800 + 64 * p + 32 * (p % 2));
                    x.imm = {8{pat(32'(key))}};
                    cmdq.push_back(x);
                  end else if (m % 3 == 2 && p < 3) begin
                    x.kind = CMD_NIC; x.src_addr = tk.l2_pkt_addr; x.length = 32'(tk.pkt_size);
                    cmdq.push_back(x);
                  end
                end
                tq_l <= 1'b1;
                ta_l <= tk.pkt_addr[19:0];
                exp_w = pat(tk.l2_pkt_addr - L2_PKT_BASE);
                rd_sent = 0;
                st <= R_RD0;
                if (tk.kind == HDL_COMPLETION) begin
                  tq_l <= 1'b0;
                  left = run_len[m];
                  st <= R_RUN;
                end
              end
            end
            R_RD0, R_RD1: begin
              if (tq[c][h] && tgnt[c][h]) begin tq_l <= 1'b0; rd_sent = 1; end
              else if (tq[c][h]) n_tcdm_stall++;
              if (trv[c][h]) begin
                chk(trd[c][h] == exp_w, $sformatf("L1 copy word (c%0d h%0d m%0d p%0d k%0d st%0d): %h, expected %h at %h", c, h, m, p, tk.kind, st, trd[c][h], exp_w, ta[c][h]));
                n_l1_ok++;
                if (st == R_RD0) begin
                  int last;
                  last = ((tk.pkt_size < ectx[m].l1_copy_bytes ? int'(tk.pkt_size) : int'(ectx[m].l1_copy_bytes)) - 4) & ~3;
                  tq_l <= 1'b1;
                  ta_l <= tk.pkt_addr[19:0] + 20'(last);
                  exp_w = pat(tk.l2_pkt_addr - L2_PKT_BASE + 32'(last));
                  st <= R_RD1;
                end else begin
                  left = run_len[m] + int'($urandom % 8);
                  st <= R_RUN;
                end
              end
            end
            R_RUN: begin
              if (m == 11 && is_err) begin
                if (wd_irq[c][h]) begin n_wd++; st <= R_CMD; end
              end else if (left > 0) left = left - 1;
              else st <= R_CMD;
              chk(!wd_irq[c][h] || (m == 11 && is_err), "watchdog only for the hanging handler");
            end
            R_CMD: begin
              if (cv[c][h] && cr[c][h]) begin
                cmd_t x;
                x = cmdq.pop_front();
                pending[key] = pending[key] + 1;
                if (x.kind == CMD_DMA) begin
                  n_odma++;
                  if (m != 13) begin
                    for (int w = 0; w * 64 < int'(x.length); w++) begin
                      logic [63:0] pa;
                      int rem;
                      pa = host_pa(m, 12'(w * 64));
                      rem = int'(x.length) - w * 64;
                      exp_data[pa] = pat_word(x.src_addr - L2_PKT_BASE + 32'(w * 64));
                      exp_be[pa] = rem >= 64 ? '1 : (64'(1) << rem) - 1;
                    end
                  end
                end else if (x.kind == CMD_HOSTDIRECT) begin
                  logic [63:0] pa;
                  n_hd++;
                  pa = host_pa(m, {x.dst_addr[11:6], 6'd0});
                  if (m != 13) begin
                    exp_data[pa] = x.dst_addr[5] ? {x.imm, 256'd0} : {256'd0, x.imm};
                    exp_be[pa] = x.dst_addr[5] ? {32'hFFFF_FFFF, 32'd0} : {32'd0, 32'hFFFF_FFFF};
                  end
                end
                cv_l <= 1'b0;
              end else if (!cv[c][h]) begin
                if (cmdq.size() != 0) begin
                  cv_l <= 1'b1; cc_l <= cmdq[0];
                end else begin
                  done_l <= 1'b1; err_l <= is_err; st <= R_DONE;
                end
              end
            end
            R_DONE: begin
              if (done[c][h] && done_rdy[c][h]) begin
                done_l <= 1'b0; err_l <= 1'b0;
                if (pending[key] > 0) n_inflight_wait++;
                if (is_err) begin
                  logic [63:0] pa;
                  pa = host_pa(m, 12'hF00);
                  exp_be[pa] = '1; exp_err[pa] = 1;
                  pending[key] = pending[key] + 1;   // the driver's error record
                end
                tag = !tag;
                st <= R_IDLE;
              end
            end
            default: st <= R_IDLE;
          endcase
        end
      end
    end
  end

  // ---------------- NIC inbound model ----------------
  typedef struct { int m; int p; int size; bit eom; } pkt_s;
  pkt_s pq [$];
  int   sent_pkts = 0;
  task automatic send_pkt(pkt_s k);
    logic [31:0] off;
    off = 32'((k.m * 128 + k.p) * 2048);
    for (int w = 0; w * 64 < k.size; w++) begin
      @(posedge clk);
      pw_req <= 1; pw_addr <= 22'(off + 32'(w * 64)); pw_data <= pat_word(off + 32'(w * 64)); pw_be <= '1;
      do @(posedge clk); while (!pw_gnt);
      pw_req <= 0;
    end
    her_valid <= 1;
    her.msgid <= MPQ_W'(k.m); her.eom <= k.eom; her.pkt_addr <= L2_PKT_BASE + off;
    her.pkt_size <= 16'(k.size); her.ectx <= ectx[k.m];
    npk[k.m]++;
    do @(posedge clk); while (!her_ready);
    her_valid <= 0;
    sent_pkts++;
  endtask

  // ---------------- host setup: IOMMU, handler and program memory ----------------
  task automatic host_setup();
    int e;
    e = 0;
    for (int m = 0; m < NM; m++) if (m != 13) begin
      @(posedge clk);
      cfg_we <= 1; cfg_idx <= 4'(e); cfg_v <= 1; cfg_vpn <= 52'(va(m, 0) >> 12);
      cfg_ppn <= 52'(host_pa(m, 0) >> 12);
      e++;
    end
    @(posedge clk); cfg_we <= 0;
    // handler memory: the host installs and reads back a few state words
    for (int i = 0; i < 8; i++) begin
      @(posedge clk);
      hw_req <= 1; hw_addr <= 22'(i * 64 + 64'h1000); hw_data <= pat_word(32'(i * 77)); hw_be <= '1;
      do @(posedge clk); while (!hw_gnt);
      hw_req <= 0;
    end
    for (int i = 0; i < 8; i++) begin
      @(posedge clk);
      hr_req <= 1; hr_addr <= 22'(i * 64 + 64'h1000);
      do @(posedge clk); while (!hr_gnt);
      hr_req <= 0;
      while (!hr_rvalid) @(posedge clk);
      chk(hr_rdata == pat_word(32'(i * 77)), "handler memory read-back");
      n_hnd_mem++;
    end
    // program memory: handler code written by the host, fetched by the I$ refill port
    for (int i = 0; i < 8; i++) begin
      @(posedge clk);
      p_req <= 1; p_we <= 1; p_addr <= 15'(i * 8); p_wdata <= {pat(32'(i)), pat(32'(i + 100))}; p_be <= '1;
      do @(posedge clk); while (!p_gnt);
      p_req <= 0;
    end
    for (int i = 0; i < 8; i++) begin
      @(posedge clk);
      p_req <= 1; p_we <= 0; p_addr <= 15'(i * 8);
      do @(posedge clk); while (!p_gnt);
      p_req <= 0;
      while (!p_rvalid) @(posedge clk);
      chk(p_rdata == {pat(32'(i)), pat(32'(i + 100))}, "program memory read-back");
      n_prog_mem++;
    end
    // instruction fetch: all HPUs of each cluster fetch the code at once through
    // their cluster's I$, which refills the lines from the program memory
    for (int c = 0; c < NCL; c++) begin
      for (int w = 0; w < 16; w++) begin
        logic [NH-1:0] pend, exp_rv;
        @(posedge clk);
        for (int h = 0; h < NH; h++) begin
          f_req[c][h] <= 1'b1; f_addr[c][h] <= 15'(((w + h) % 16) * 4);
        end
        pend = '1; exp_rv = '0;
        while (pend != 0 || exp_rv != 0) begin
          @(posedge clk);
          for (int h = 0; h < NH; h++) begin
            if (exp_rv[h]) begin
              int k;
              k = (w + h) % 16;
              chk(f_rv[c][h] && f_rd[c][h] == ((k % 2) ? pat(32'(k / 2)) : pat(32'(k / 2 + 100))),
                  "instruction fetch through the I$");
              n_ic++;
            end
          end
          exp_rv = '0;
          for (int h = 0; h < NH; h++) begin
            if (pend[h] && f_gnt[c][h]) begin
              exp_rv[h] = 1'b1; pend[h] = 1'b0; f_req[c][h] <= 1'b0;
            end else if (pend[h]) n_ic_miss++;
          end
        end
      end
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: stopped at cycle %0d, %0d packets sent", cyc, sent_pkts);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit phase_done(int upto);
    for (int m = 0; m < upto; m++) begin
      if (m == 12) begin
        if (fb_cnt[m] != npk[m]) return 0;
      end else if (!th_seen[m]) return 0;
    end
    return 1;
  endfunction

  initial begin
    int left [NM];
    her_valid = 0; her = '0; pw_req = 0; pw_addr = 0; pw_data = 0; pw_be = 0;
    hw_req = 0; hw_addr = 0; hw_data = 0; hw_be = 0; hr_req = 0; hr_addr = 0;
    p_req = 0; p_we = 0; p_addr = 0; p_wdata = 0; p_be = 0; f_req = '{default: '0}; f_addr = '{default: '0};
    cfg_we = 0; cfg_v = 0; cfg_idx = 0; cfg_vpn = 0; cfg_ppn = 0; h_gnt = 0; nfb_ready = 0;
    n_hh = 0; n_ph = 0; n_th = 0; n_idle = 0; n_home = 0; n_nonhome = 0; n_block = 0; n_gate = 0;
    n_inflight_wait = 0; n_err_rec = 0; n_wd = 0; n_mpq_to = 0; n_iommu_fault = 0;
    n_bank_stall = 0; n_odma = 0; n_hd = 0; n_nic_cmd = 0; n_l1_ok = 0; n_hnd_mem = 0;
    n_prog_mem = 0; n_ic = 0; n_ic_miss = 0; n_tcdm_stall = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    host_setup();
    // phase 1: messages 0..14, packets interleaved
    for (int m = 0; m < 15; m++) left[m] = (m == 12) ? 2 : 3 + int'($urandom % 4);
    for (int m = 0; m < 15; m++) if (m == 10 || m == 11) left[m] = 4;
    begin
      int rem, p [NM];
      rem = 0;
      for (int m = 0; m < 15; m++) begin rem += left[m]; p[m] = 0; end
      while (rem > 0) begin
        int m;
        m = int'($urandom % 15);
        if (left[m] == 0) continue;
        send_pkt('{m: m, p: p[m], size: 64 + int'($urandom % 1437), eom: left[m] == 1 && has_eom[m]});
        p[m]++; left[m]--; rem--;
      end
    end
    while (!phase_done(15)) @(posedge clk);
    for (int i = 0; i < 5000 && n_mpq_to == 0; i++) @(posedge clk);
    // phase 2: flood
    for (int p = 0; p < 120; p++)
      send_pkt('{m: 15, p: p, size: 1024, eom: p == 119});
    while (!th_seen[15]) @(posedge clk);
    repeat (200) @(posedge clk);
    // final checks
    for (int m = 0; m < NM; m++) begin
      chk(fb_cnt[m] == npk[m], $sformatf("message %0d: every packet notified", m));
      chk(th_seen[m] == (m != 12), $sformatf("message %0d: completion handler", m));
    end
    chk(exp_be.size() == 0, $sformatf("all expected host writes seen (%0d left)", exp_be.size()));
    $display("mechanisms: HH=%0d PH=%0d TH=%0d idle=%0d home=%0d nonhome=%0d dispatch_block=%0d",
             n_hh, n_ph, n_th, n_idle, n_home, n_nonhome, n_block);
    $display("  clock_gated_cycles=%0d inflight_wait=%0d error_record=%0d watchdog=%0d mpq_timeout=%0d",
             n_gate, n_inflight_wait, n_err_rec, n_wd, n_mpq_to);
    $display("  iommu_fault=%0d l2_bank_stall=%0d offcluster_dma=%0d hostdirect=%0d nic_cmd=%0d",
             n_iommu_fault, n_bank_stall, n_odma, n_hd, n_nic_cmd);
    $display("  l1_copy_words=%0d tcdm_stall=%0d hnd_mem=%0d prog_mem=%0d ifetch=%0d ifetch_miss_cycles=%0d cycles=%0d",
             n_l1_ok, n_tcdm_stall, n_hnd_mem, n_prog_mem, n_ic, n_ic_miss, cyc);
    chk(n_hh > 0, "mechanism: header handler");
    chk(n_ph > 0, "mechanism: payload handler");
    chk(n_th > 0, "mechanism: completion handler");
    chk(n_idle > 0, "mechanism: mpq_idle notification");
    chk(n_home > 0, "mechanism: home-cluster dispatch");
    chk(n_nonhome > 0, "mechanism: dispatch to another cluster");
    chk(n_block > 0, "mechanism: dispatcher blocked, all clusters full");
    chk(n_gate > 0, "mechanism: HPU clock gated while waiting");
    chk(n_inflight_wait > 0, "mechanism: notification held for in-flight commands");
    chk(n_err_rec > 0, "mechanism: error record through HostDirect");
    chk(n_wd > 0, "mechanism: watchdog");
    chk(n_mpq_to > 0, "mechanism: MPQ timeout");
    chk(n_iommu_fault > 0, "mechanism: IOMMU fault");
    chk(n_bank_stall > 0, "mechanism: L2 bank conflict stall");
    chk(n_odma > 0, "mechanism: off-cluster DMA");
    chk(n_hd > 0, "mechanism: HostDirect command");
    chk(n_nic_cmd > 0, "mechanism: NIC command");
    chk(n_l1_ok > 0, "mechanism: packet copy to L1");
    chk(n_hnd_mem > 0 && n_prog_mem > 0, "mechanism: host access to L2 memories");
    chk(n_ic == NCL * NH * 16, "mechanism: instruction fetch through the I$");
    chk(n_ic_miss > 0, "mechanism: I$ miss and refill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
