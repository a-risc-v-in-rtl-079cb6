// pspin_csched: cluster-local scheduler (CSCHED).
//
// For every task from the task dispatcher it (1) reserves room for the packet
// in the cluster's L1 packet buffer, (2) queues the task in its FIFO, (3) has
// the cluster DMA engine copy the packet from the L2 packet buffer to that
// room, one task at a time in arrival order, and (4) once the copy is done,
// hands the task to an idle HPU driver in a single cycle (lowest-numbered idle
// driver). When the HPU driver's completion notification leaves the cluster,
// free_valid_i releases the task's room.
//
// The L1 packet buffer (PKT_BYTES at L1 offset PKT_OFF) is managed as a ring:
// rooms are taken at the head in 64 B units and recorded in an allocation table
// of ALLOC_ENTRIES entries; they may be released in any order, and the tail
// moves past released rooms in allocation order. A room never wraps: when it
// does not fit before the end, the bytes to the end are added to it as
// padding. free_bytes_o is the largest room that can be taken now and is what
// the task dispatcher compares against; task_ready_o is the exact check.
//
// Document: CSCHED owns the DMA start, the FIFO, the single-cycle HPU
// assignment, 32 KiB packet buffer in L1. Own choices: the ring allocator, the
// table size, the FIFO depths, the copy length min(packet size, l1_copy_bytes).
module pspin_csched
  import pspin_pkg::*;
#(
  parameter int unsigned NH        = NUM_HPUS,
  parameter int unsigned PKT_BYTES = L1_PKT_BYTES,
  parameter int unsigned PKT_OFF   = 0,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic [31:0] l1_base_i,      // global address of this cluster's L1
  // from task dispatcher
  input  logic        task_valid_i,
  output logic        task_ready_o,
  input  task_t       task_i,
  output logic [31:0] free_bytes_o,
  // cluster DMA
  output logic        dma_valid_o,
  input  logic        dma_ready_i,
  output logic [31:0] dma_src_o,      // byte offset in the L2 packet buffer
  output logic [19:0] dma_dst_o,      // byte offset in L1
  output logic [15:0] dma_len_o,
  input  logic        dma_done_i,
  // HPU drivers
  output logic [NH-1:0] hpu_valid_o,
  input  logic [NH-1:0] hpu_ready_i,
  output cl_task_t    hpu_task_o,
  // room release
  input  logic        free_valid_i,
  input  logic [ALLOC_W-1:0] free_idx_i
);
  localparam int unsigned BW = $clog2(PKT_BYTES) + 1;

  // ---------------- allocator ----------------
  logic [BW-1:0]      head_q, used_q;
  logic [BW-1:0]      size_q [ALLOC_ENTRIES];
  logic [ALLOC_ENTRIES-1:0] live_q, rel_q;
  logic [ALLOC_W-1:0] wr_q, rd_q;

  logic [BW-1:0] tail, end_free, start_free, contig, need, room, at;
  logic          fits, wrap_pad;

  always_comb begin
    logic [31:0] n;
    n    = (task_i.her.ectx.l1_copy_bytes < task_i.her.pkt_size) ? 32'(task_i.her.ectx.l1_copy_bytes)
                                                                 : 32'(task_i.her.pkt_size);
    need = BW'((n + 32'(WIDE_BYTES - 1)) & ~32'(WIDE_BYTES - 1));
    tail = (head_q >= used_q) ? head_q - used_q : BW'(PKT_BYTES) + head_q - used_q;
    if (used_q == BW'(PKT_BYTES)) begin
      end_free = '0; start_free = '0;
    end else if (head_q >= tail) begin
      end_free   = BW'(PKT_BYTES) - head_q;
      start_free = tail;
    end else begin
      end_free   = tail - head_q;
      start_free = '0;
    end
    contig   = (end_free > start_free) ? end_free : start_free;
    wrap_pad = (need > end_free);
    fits     = !live_q[wr_q] && (wrap_pad ? (need <= start_free) : 1'b1);
    room     = wrap_pad ? need + end_free : need;
    at       = wrap_pad ? '0 : head_q;
  end
  assign free_bytes_o = live_q[wr_q] ? '0 : 32'(contig);

  // ---------------- copy FIFO ----------------
  cl_task_t in_task, cp_head, rdy_head;
  logic cp_valid, cp_ready, cp_in_ready, rdy_in_ready, rdy_valid, rdy_pop;
  logic task_fire;
  logic dma_busy_q;

  always_comb begin
    in_task             = '0;
    in_task.tsk         = task_i;
    in_task.l1_pkt_addr = l1_base_i + 32'(PKT_OFF) + 32'(at);
    in_task.l1_pkt_size = (task_i.her.ectx.l1_copy_bytes < task_i.her.pkt_size)
                          ? task_i.her.ectx.l1_copy_bytes : task_i.her.pkt_size;
    in_task.alloc_idx   = wr_q;
  end

  assign task_ready_o = fits && cp_in_ready;
  assign task_fire    = task_valid_i && task_ready_o;

  pspin_fifo #(.DEPTH(FIFO_DEPTH), .T(cl_task_t)) u_cp_fifo (
    .clk_i, .rst_ni, .valid_i(task_fire), .ready_o(cp_in_ready), .data_i(in_task),
    .valid_o(cp_valid), .ready_i(cp_ready), .data_o(cp_head), .count_o()
  );

  // one DMA job at a time, for the FIFO head
  logic [15:0] cp_len;
  assign cp_len      = (cp_head.tsk.her.ectx.l1_copy_bytes < cp_head.tsk.her.pkt_size)
                       ? cp_head.tsk.her.ectx.l1_copy_bytes : cp_head.tsk.her.pkt_size;
  assign dma_valid_o = cp_valid && !dma_busy_q && rdy_in_ready;
  assign dma_src_o   = cp_head.tsk.her.pkt_addr - L2_PKT_BASE;
  assign dma_dst_o   = 20'(cp_head.l1_pkt_addr - l1_base_i);
  assign dma_len_o   = cp_len;
  assign cp_ready    = dma_done_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) dma_busy_q <= 1'b0;
    else if (dma_valid_o && dma_ready_i) dma_busy_q <= 1'b1;
    else if (dma_done_i) dma_busy_q <= 1'b0;
  end

  // ---------------- ready FIFO and HPU assignment ----------------
  pspin_fifo #(.DEPTH(2), .T(cl_task_t)) u_rdy_fifo (
    .clk_i, .rst_ni, .valid_i(dma_done_i), .ready_o(rdy_in_ready), .data_i(cp_head),
    .valid_o(rdy_valid), .ready_i(rdy_pop), .data_o(rdy_head), .count_o()
  );

  always_comb begin
    hpu_valid_o = '0;
    for (int h = int'(NH) - 1; h >= 0; h--)
      if (hpu_ready_i[h]) begin
        hpu_valid_o    = '0;
        hpu_valid_o[h] = rdy_valid;
      end
  end
  assign rdy_pop    = rdy_valid && (|hpu_ready_i);
  assign hpu_task_o = rdy_head;

  // ---------------- allocation bookkeeping ----------------
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      head_q <= '0; used_q <= '0; wr_q <= '0; rd_q <= '0;
      live_q <= '0; rel_q <= '0;
      for (int i = 0; i < int'(ALLOC_ENTRIES); i++) size_q[i] <= '0;
    end else begin
      logic [BW-1:0] used_n;
      logic [ALLOC_ENTRIES-1:0] live_n, rel_n;
      used_n = used_q;
      live_n = live_q;
      rel_n  = rel_q;
      if (free_valid_i) rel_n[free_idx_i] = 1'b1;
      if (task_fire) begin
        size_q[wr_q] <= room;
        live_n[wr_q] = 1'b1;
        rel_n[wr_q]  = 1'b0;
        used_n       = used_n + room;
        head_q       <= (at + need == BW'(PKT_BYTES)) ? '0 : at + need;
        wr_q         <= wr_q + 1'b1;
      end
      // retire the oldest room if released
      if (live_q[rd_q] && rel_q[rd_q]) begin
        used_n = used_n - size_q[rd_q];
        live_n[rd_q] = 1'b0;
        rel_n[rd_q]  = 1'b0;
        rd_q <= rd_q + 1'b1;
      end
      // an empty buffer restarts at offset 0, so the whole buffer is one room
      if (used_n == '0 && !task_fire) head_q <= '0;
      used_q <= used_n;
      live_q <= live_n;
      rel_q  <= rel_n;
    end
  end
endmodule
