// pspin_cluster: one PsPIN processing cluster.
//
// Holds the cluster-local scheduler (CSCHED), the cluster DMA engine, the
// 1 MiB L1 TCDM with its interconnect, the instruction cache (pspin_icache),
// one HPU driver per HPU and two
// round-robin arbiters: one picks, every cycle, the HPU driver whose completion
// notification leaves the cluster (that hand-shake also releases the task's L1
// packet room in the CSCHED), the other picks the HPU driver whose command goes
// to the command unit. Command responses are delivered to the HPU driver named
// in the command ID.
//
// A task from the task dispatcher is copied to L1 by the DMA engine and handed
// to an idle HPU driver (see pspin_csched). The HPU cores themselves are not
// part of this module: each HPU's driver interface (task load, doorbell,
// commands, PMP, watchdog interrupt, clock enable) and its TCDM port are
// ports of the cluster.
//
// Document: the cluster organisation of Fig. 5 (CSCHED with FIFO, DMA engine,
// TCDM interconnect, 8 HPUs with drivers, round-robin arbiters for commands and
// notifications), the per-cluster instruction cache. Own choices: the L1 layout places the packet buffer at L1
// offset 0; the ports' signal-level protocols.
module pspin_cluster
  import pspin_pkg::*;
#(
  parameter int unsigned NH = NUM_HPUS
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic [CL_W-1:0] cluster_id_i,
  // task from dispatcher
  input  logic        task_valid_i,
  output logic        task_ready_o,
  input  task_t       task_i,
  output logic [31:0] free_bytes_o,
  // L2 packet buffer read (DMA interconnect); byte offset in the buffer
  output logic        l2_req_o,
  output logic [31:0] l2_addr_o,
  input  logic        l2_gnt_i,
  input  logic        l2_rvalid_i,
  input  logic [WIDE_W-1:0] l2_rdata_i,
  // completion notifications
  output logic        fb_valid_o,
  input  logic        fb_ready_i,
  output feedback_t   fb_o,
  // commands
  output logic        cmd_valid_o,
  input  logic        cmd_ready_i,
  output cmd_t        cmd_o,
  input  logic        resp_valid_i,
  input  cmd_resp_t   resp_i,
  // HPU cores: driver interface
  input  logic [NH-1:0] core_task_req_i,
  output logic [NH-1:0] core_task_valid_o,
  output hpu_task_t   core_task_o [NH],
  output logic [NH-1:0] core_clk_en_o,
  output pmp_cfg_t    pmp_o [NH],
  output logic [NH-1:0] core_wd_irq_o,
  input  logic [NH-1:0] core_done_i,
  input  logic [NH-1:0] core_err_i,
  output logic [NH-1:0] core_done_ready_o,
  input  logic [NH-1:0] core_cmd_valid_i,
  output logic [NH-1:0] core_cmd_ready_o,
  input  cmd_t        core_cmd_i [NH],
  output logic [NH-1:0] core_resp_valid_o,
  output cmd_resp_t   core_resp_o [NH],
  // HPU cores: TCDM ports (byte offset in L1)
  input  logic [NH-1:0] tcdm_req_i,
  input  logic [NH-1:0] tcdm_we_i,
  input  logic [19:0] tcdm_addr_i  [NH],
  input  logic [31:0] tcdm_wdata_i [NH],
  input  logic [3:0]  tcdm_be_i    [NH],
  output logic [NH-1:0] tcdm_gnt_o,
  output logic [NH-1:0] tcdm_rvalid_o,
  output logic [31:0] tcdm_rdata_o [NH],
  // HPU instruction fetch (byte offsets in the program memory)
  input  logic [NH-1:0] fetch_req_i,
  input  logic [14:0] fetch_addr_i [NH],
  output logic [NH-1:0] fetch_gnt_o,
  output logic [NH-1:0] fetch_rvalid_o,
  output logic [31:0] fetch_rdata_o [NH],
  // instruction-cache refill from the program memory
  output logic        ic_req_o,
  output logic [14:0] ic_addr_o,
  input  logic        ic_gnt_i,
  input  logic        ic_rvalid_i,
  input  logic [63:0] ic_rdata_i
);
  localparam int unsigned WB = WIDE_W / 8;

  logic [31:0] l1_base;
  assign l1_base = L1_BASE + L1_STRIDE * 32'(cluster_id_i);

  // ---------------- CSCHED + DMA ----------------
  logic        dma_valid, dma_ready, dma_done;
  logic [31:0] dma_src;
  logic [19:0] dma_dst;
  logic [15:0] dma_len;
  logic [NH-1:0] drv_valid, drv_ready;
  cl_task_t    drv_task;
  logic        fb_fire;
  feedback_t   fb_sel;

  pspin_csched #(.NH(NH)) u_csched (
    .clk_i, .rst_ni, .l1_base_i(l1_base),
    .task_valid_i, .task_ready_o, .task_i, .free_bytes_o,
    .dma_valid_o(dma_valid), .dma_ready_i(dma_ready), .dma_src_o(dma_src),
    .dma_dst_o(dma_dst), .dma_len_o(dma_len), .dma_done_i(dma_done),
    .hpu_valid_o(drv_valid), .hpu_ready_i(drv_ready), .hpu_task_o(drv_task),
    .free_valid_i(fb_fire), .free_idx_i(fb_sel.alloc_idx)
  );

  logic              l1w_req;
  logic [19:0]       l1w_addr;
  logic [WIDE_W-1:0] l1w_data;
  logic [WB-1:0]     l1w_be;

  pspin_cluster_dma #(.L2_AW(32), .L1_AW(20)) u_dma (
    .clk_i, .rst_ni,
    .job_valid_i(dma_valid), .job_ready_o(dma_ready), .job_src_i(dma_src),
    .job_dst_i(dma_dst), .job_len_i(dma_len), .done_o(dma_done),
    .l2_req_o, .l2_addr_o, .l2_gnt_i, .l2_rvalid_i, .l2_rdata_i,
    .l1_req_o(l1w_req), .l1_addr_o(l1w_addr), .l1_wdata_o(l1w_data), .l1_be_o(l1w_be)
  );

  pspin_l1_tcdm #(.NP(NH)) u_l1 (
    .clk_i, .rst_ni,
    .req_i(tcdm_req_i), .we_i(tcdm_we_i), .addr_i(tcdm_addr_i), .wdata_i(tcdm_wdata_i),
    .be_i(tcdm_be_i), .gnt_o(tcdm_gnt_o), .rvalid_o(tcdm_rvalid_o), .rdata_o(tcdm_rdata_o),
    .w_req_i(l1w_req), .w_we_i(1'b1), .w_addr_i(l1w_addr), .w_wdata_i(l1w_data),
    .w_be_i(l1w_be), .w_gnt_o(), .w_rvalid_o(), .w_rdata_o()
  );

  // ---------------- HPU drivers ----------------
  logic [NH-1:0] fbv, fbr, cmdv, cmdr, rspv;
  feedback_t     fbd  [NH];
  cmd_t          cmdd [NH];

  for (genvar h = 0; h < NH; h++) begin : g_hpu
    assign rspv[h] = resp_valid_i && (resp_i.id.hpu == HPU_W'(h));
    pspin_hpu_driver u_drv (
      .clk_i, .rst_ni, .cluster_id_i, .hpu_id_i(HPU_W'(h)),
      .task_valid_i(drv_valid[h]), .task_ready_o(drv_ready[h]), .task_i(drv_task),
      .core_task_req_i(core_task_req_i[h]), .core_task_valid_o(core_task_valid_o[h]),
      .core_task_o(core_task_o[h]), .core_clk_en_o(core_clk_en_o[h]), .pmp_o(pmp_o[h]),
      .core_wd_irq_o(core_wd_irq_o[h]), .core_done_i(core_done_i[h]), .core_err_i(core_err_i[h]),
      .core_done_ready_o(core_done_ready_o[h]),
      .core_cmd_valid_i(core_cmd_valid_i[h]), .core_cmd_ready_o(core_cmd_ready_o[h]),
      .core_cmd_i(core_cmd_i[h]), .core_resp_valid_o(core_resp_valid_o[h]),
      .core_resp_o(core_resp_o[h]),
      .cmd_valid_o(cmdv[h]), .cmd_ready_i(cmdr[h]), .cmd_o(cmdd[h]),
      .resp_valid_i(rspv[h]), .resp_i,
      .fb_valid_o(fbv[h]), .fb_ready_i(fbr[h]), .fb_o(fbd[h])
    );
  end

  pspin_stream_arb #(.N(NH), .T(feedback_t)) u_fb_arb (
    .clk_i, .rst_ni, .valid_i(fbv), .ready_o(fbr), .data_i(fbd),
    .valid_o(fb_valid_o), .ready_i(fb_ready_i), .data_o(fb_sel), .idx_o()
  );
  assign fb_o    = fb_sel;
  assign fb_fire = fb_valid_o && fb_ready_i;

  pspin_icache #(.NP(NH)) u_icache (
    .clk_i, .rst_ni, .req_i(fetch_req_i), .addr_i(fetch_addr_i), .gnt_o(fetch_gnt_o),
    .rvalid_o(fetch_rvalid_o), .rdata_o(fetch_rdata_o), .rf_req_o(ic_req_o), .rf_addr_o(ic_addr_o),
    .rf_gnt_i(ic_gnt_i), .rf_rvalid_i(ic_rvalid_i), .rf_rdata_i(ic_rdata_i)
  );

  pspin_stream_arb #(.N(NH), .T(cmd_t)) u_cmd_arb (
    .clk_i, .rst_ni, .valid_i(cmdv), .ready_o(cmdr), .data_i(cmdd),
    .valid_o(cmd_valid_o), .ready_i(cmd_ready_i), .data_o(cmd_o), .idx_o()
  );
endmodule
