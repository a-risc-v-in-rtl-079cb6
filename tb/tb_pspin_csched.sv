// tb_pspin_csched: the cluster-local scheduler with a model DMA engine and
// eight model HPU drivers that hold each task for a random time and then
// release its room. Checks: each DMA job copies the right L2 source and
// length into the room given to the task; jobs run in arrival order; a task
// reaches an HPU only after its copy is done, and in the cycle after (single-
// cycle assignment); live rooms never overlap and stay inside the 32 KiB
// packet buffer; the scheduler stops accepting when the buffer is full and
// resumes when rooms are released.
module tb_pspin_csched;
  import pspin_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tv, tr, dv, dr, dd, fv;
  task_t ti;
  logic [31:0] freeb, dsrc;
  logic [19:0] ddst;
  logic [15:0] dlen;
  logic [7:0] hv, hr;
  cl_task_t ht;
  logic [ALLOC_W-1:0] fidx;

  pspin_csched dut (.clk_i(clk), .rst_ni(rst_n), .l1_base_i(32'h1000_0000),
    .task_valid_i(tv), .task_ready_o(tr), .task_i(ti), .free_bytes_o(freeb),
    .dma_valid_o(dv), .dma_ready_i(dr), .dma_src_o(dsrc), .dma_dst_o(ddst), .dma_len_o(dlen),
    .dma_done_i(dd), .hpu_valid_o(hv), .hpu_ready_i(hr), .hpu_task_o(ht),
    .free_valid_i(fv), .free_idx_i(fidx));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- DMA model ----
  int dma_busy = 0, dma_cnt = 0, job_seq = 0, done_cycle = -100, cyc = 0;
  always @(posedge clk) cyc++;
  assign dr = (dma_busy == 0);
  int exp_src [$];
  int exp_len [$];
  always @(posedge clk) begin
    dd <= 0;
    if (rst_n) begin
      if (dma_busy > 0) begin
        dma_busy--;
        if (dma_busy == 0) begin dd <= 1; done_cycle = cyc; end
      end else if (dv) begin
        chk(exp_src.size() > 0, "unexpected DMA job");
        if (exp_src.size() > 0) begin
          chk(int'(dsrc) == exp_src[0] - int'(L2_PKT_BASE), $sformatf("DMA src %h", dsrc));
          chk(int'(dlen) == exp_len[0], $sformatf("DMA len %0d exp %0d", dlen, exp_len[0]));
          void'(exp_src.pop_front()); void'(exp_len.pop_front());
        end
        dma_busy = 2 + int'(dlen) / 64;
        dma_cnt++;
      end
    end
  end

  // ---- HPU models ----
  int hold [8];
  int room_base [16], room_size [16];
  bit room_live [16];
  int held_idx [8];
  int delivered = 0;
  always @(posedge clk) begin
    fv <= 0;
    if (rst_n) begin
      // deliveries
      for (int h = 0; h < 8; h++) if (hv[h] && hr[h]) begin
        int a, s;
        chk(cyc == done_cycle + 1 || cyc > done_cycle + 1, "task before copy done");
        a = int'(ht.l1_pkt_addr - 32'h1000_0000);
        s = (int'(ht.l1_pkt_size) + 63) / 64 * 64;
        chk(a >= 0 && a + s <= 32768, $sformatf("room %0d+%0d outside buffer", a, s));
        for (int r = 0; r < 16; r++)
          if (room_live[r] && s > 0 && room_size[r] > 0)
            chk(a + s <= room_base[r] || room_base[r] + room_size[r] <= a,
                $sformatf("room %0d+%0d overlaps %0d+%0d", a, s, room_base[r], room_size[r]));
        room_live[ht.alloc_idx] = 1; room_base[ht.alloc_idx] = a; room_size[ht.alloc_idx] = s;
        hold[h] = 5 + $urandom % 60; held_idx[h] = ht.alloc_idx;
        delivered++;
      end
      // completions (one release per cycle)
      begin
        bit sent;
        sent = 0;
        for (int h = 0; h < 8; h++) begin
          if (hold[h] > 1) hold[h]--;
          else if (hold[h] == 1 && !sent && !stall_release) begin
            hold[h] = 0; sent = 1;
            fv <= 1; fidx <= ALLOC_W'(held_idx[h]);
            room_live[held_idx[h]] = 0;
          end
        end
      end
    end
  end
  always_comb for (int h = 0; h < 8; h++) hr[h] = (hold[h] == 0);

  bit stall_release = 0;
  int accepted = 0;

  task automatic send(int size, int copy);
    @(negedge clk);
    ti = '0;
    ti.her.pkt_addr = L2_PKT_BASE + 32'(accepted * 2048);
    ti.her.pkt_size = 16'(size);
    ti.her.ectx.l1_copy_bytes = 16'(copy);
    tv = 1;
    @(posedge clk);
    while (!tr) @(posedge clk);
    exp_src.push_back(int'(ti.her.pkt_addr));
    exp_len.push_back(size < copy ? size : copy);
    accepted++;
    @(negedge clk);
    tv = 0;
  endtask

  initial begin
    tv = 0; ti = '0; fidx = '0;
    for (int h = 0; h < 8; h++) hold[h] = 0;
    for (int r = 0; r < 16; r++) room_live[r] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1 chk(freeb == 32768, "empty buffer reports 32 KiB");
    for (int i = 0; i < 120; i++) send(64 + ($urandom % 1500), ($urandom % 4 == 0) ? 256 : 65535);
    // fill: hold releases, send 4 KiB packets until refused
    repeat (600) @(posedge clk);
    chk(freeb == 32768, $sformatf("all rooms released: free=%0d", freeb));
    stall_release = 1;
    begin
      int n; bit blocked;
      n = 0; blocked = 0;
      for (int i = 0; i < 12 && !blocked; i++) begin
        @(negedge clk);
        ti = '0; ti.her.pkt_addr = L2_PKT_BASE; ti.her.pkt_size = 4096; ti.her.ectx.l1_copy_bytes = 16'hFFFF;
        tv = 1;
        #1;
        if (!tr) blocked = 1;
        else begin
          exp_src.push_back(int'(L2_PKT_BASE)); exp_len.push_back(4096); n++; accepted++;
        end
        @(posedge clk);
      end
      @(negedge clk); tv = 0;
      chk(blocked && n >= 5 && n <= 8, $sformatf("buffer full after %0d x 4 KiB (blocked=%0d)", n, blocked));
      stall_release = 0;
      repeat (600) @(posedge clk);
      chk(freeb == 32768, $sformatf("all rooms released: free=%0d", freeb));
    end
    chk(delivered == accepted, $sformatf("delivered %0d of %0d", delivered, accepted));
    chk(dma_cnt == accepted, $sformatf("dma jobs %0d", dma_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
