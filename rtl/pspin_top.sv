// pspin_top: the PsPIN packet-processing unit.
//
// Control path: HERs from the NIC inbound engine enter the MPQ engine, which
// orders header, payload and completion handlers per message; the task
// dispatcher sends each task to a cluster (home cluster first, else least
// loaded); in the cluster the CSCHED copies the packet from the L2 packet
// buffer to L1 and hands the task to an idle HPU driver; the HPU runs the
// handler; its completion notification returns through a round-robin arbiter
// over the clusters to the MPQ engine and on to the NIC inbound engine.
// Handler commands go through the command unit to the NIC outbound engine
// (port), the off-cluster DMA engine or the HostDirect unit; both of the latter
// write host memory through a multiplexer and the IOMMU to the host slave port.
//
// Data path: the L2 packet buffer (4 MiB, 32 banks of 512 bit) has two
// full-duplex ports, each built as a read and a write channel. Port 0 sits on
// the NIC-host side: the NIC inbound engine writes packets through it, the NIC
// outbound engine and the off-cluster DMA engine share its read channel. Port
// 1 serves the four cluster DMA engines (DMA interconnect) and the PE
// interconnect. The L2 handler memory (4 MiB, 64-bit banks) is written and read
// by the host on port 0, whose read channel it shares with the off-cluster DMA
// engine; port 1 is the PE side. The program memory (32 KiB) is written by the
// host and read for instruction-cache refills.
//
// The HPU cores, the NIC engines and the PCIe host bridges are outside this
// module: their connections are ports. The PE interconnect side of the L2
// memories (HPU loads and stores to L2) is brought out as raw channels.
// Addresses on the memory ports are byte offsets inside each memory.
//
// Sizes follow the document (4 clusters x 8 HPUs, 1 MiB L1 each, 4 MiB +
// 4 MiB + 32 KiB L2, 512-bit wide paths). The simple request/grant channels in
// place of AXI4 are this design's own.
module pspin_top
  import pspin_pkg::*;
#(
  parameter int unsigned NCL = NUM_CLUSTERS,
  parameter int unsigned NH  = NUM_HPUS
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // ---- NIC inbound engine ----
  input  logic        her_valid_i,
  output logic        her_ready_o,
  input  her_t        her_i,
  output logic        nic_fb_valid_o,
  input  logic        nic_fb_ready_i,
  output feedback_t   nic_fb_o,
  output logic        mpq_timeout_o,
  output logic [MPQ_W-1:0] mpq_timeout_idx_o,
  input  logic        pkt_wr_req_i,         // packet write into the L2 packet buffer
  input  logic [21:0] pkt_wr_addr_i,
  input  logic [WIDE_W-1:0] pkt_wr_data_i,
  input  logic [WIDE_BYTES-1:0] pkt_wr_be_i,
  output logic        pkt_wr_gnt_o,
  // ---- NIC outbound engine ----
  output logic        nic_cmd_valid_o,
  input  logic        nic_cmd_ready_i,
  output cmd_t        nic_cmd_o,
  input  logic        nic_resp_valid_i,
  output logic        nic_resp_ready_o,
  input  cmd_resp_t   nic_resp_i,
  input  logic        nic_rd_req_i,         // outbound DMA reads of the L2 packet buffer
  input  logic [21:0] nic_rd_addr_i,
  output logic        nic_rd_gnt_o,
  output logic        nic_rd_rvalid_o,
  output logic [WIDE_W-1:0] nic_rd_rdata_o,
  // ---- host master (AXI2PCI): handler and program memory access ----
  input  logic        hnd_wr_req_i,
  input  logic [21:0] hnd_wr_addr_i,
  input  logic [WIDE_W-1:0] hnd_wr_data_i,
  input  logic [WIDE_BYTES-1:0] hnd_wr_be_i,
  output logic        hnd_wr_gnt_o,
  input  logic        hnd_rd_req_i,
  input  logic [21:0] hnd_rd_addr_i,
  output logic        hnd_rd_gnt_o,
  output logic        hnd_rd_rvalid_o,
  output logic [WIDE_W-1:0] hnd_rd_rdata_o,
  input  logic        prog_req_i,
  input  logic        prog_we_i,
  input  logic [14:0] prog_addr_i,
  input  logic [63:0] prog_wdata_i,
  input  logic [7:0]  prog_be_i,
  output logic        prog_gnt_o,
  output logic        prog_rvalid_o,
  output logic [63:0] prog_rdata_o,
  // ---- host slave (AXI2PCI): writes to host memory, and IOMMU setup ----
  output logic        host_wr_req_o,
  output logic [63:0] host_wr_addr_o,
  output logic [WIDE_W-1:0] host_wr_data_o,
  output logic [WIDE_BYTES-1:0] host_wr_be_o,
  input  logic        host_wr_gnt_i,
  input  logic        iommu_cfg_we_i,
  input  logic [3:0]  iommu_cfg_idx_i,
  input  logic        iommu_cfg_valid_i,
  input  logic [51:0] iommu_cfg_vpn_i,
  input  logic [51:0] iommu_cfg_ppn_i,
  output logic        iommu_fault_o,
  output logic [63:0] iommu_fault_addr_o,
  // ---- PE interconnect side of the L2 memories: 0 = packet buffer, 1 = handler memory ----
  input  logic [1:0]  pe_wr_req_i,
  input  logic [21:0] pe_wr_addr_i  [2],
  input  logic [WIDE_W-1:0] pe_wr_data_i [2],
  input  logic [WIDE_BYTES-1:0] pe_wr_be_i [2],
  output logic [1:0]  pe_wr_gnt_o,
  input  logic [1:0]  pe_rd_req_i,
  input  logic [21:0] pe_rd_addr_i  [2],
  output logic [1:0]  pe_rd_gnt_o,
  output logic [1:0]  pe_rd_rvalid_o,
  output logic [WIDE_W-1:0] pe_rd_rdata_o [2],
  // ---- HPU cores ----
  input  logic [NH-1:0] core_task_req_i   [NCL],
  output logic [NH-1:0] core_task_valid_o [NCL],
  output hpu_task_t   core_task_o [NCL][NH],
  output logic [NH-1:0] core_clk_en_o     [NCL],
  output pmp_cfg_t    pmp_o [NCL][NH],
  output logic [NH-1:0] core_wd_irq_o     [NCL],
  input  logic [NH-1:0] core_done_i       [NCL],
  input  logic [NH-1:0] core_err_i        [NCL],
  output logic [NH-1:0] core_done_ready_o [NCL],
  input  logic [NH-1:0] core_cmd_valid_i  [NCL],
  output logic [NH-1:0] core_cmd_ready_o  [NCL],
  input  cmd_t        core_cmd_i [NCL][NH],
  output logic [NH-1:0] core_resp_valid_o [NCL],
  output cmd_resp_t   core_resp_o [NCL][NH],
  input  logic [NH-1:0] tcdm_req_i        [NCL],
  input  logic [NH-1:0] tcdm_we_i         [NCL],
  input  logic [19:0] tcdm_addr_i  [NCL][NH],
  input  logic [31:0] tcdm_wdata_i [NCL][NH],
  input  logic [3:0]  tcdm_be_i    [NCL][NH],
  output logic [NH-1:0] tcdm_gnt_o        [NCL],
  output logic [NH-1:0] tcdm_rvalid_o     [NCL],
  output logic [31:0] tcdm_rdata_o [NCL][NH],
  // instruction fetch through each cluster's instruction cache
  input  logic [NH-1:0] fetch_req_i       [NCL],
  input  logic [14:0] fetch_addr_i [NCL][NH],
  output logic [NH-1:0] fetch_gnt_o       [NCL],
  output logic [NH-1:0] fetch_rvalid_o    [NCL],
  output logic [31:0] fetch_rdata_o [NCL][NH]
);
  localparam int unsigned WB = WIDE_BYTES;

  // =============== packet scheduler ===============
  logic      t_valid, t_ready;
  task_t     t_task;
  logic      fb_valid, fb_ready;
  feedback_t fb;

  pspin_mpq_engine u_mpq (
    .clk_i, .rst_ni,
    .her_valid_i, .her_ready_o, .her_i,
    .task_valid_o(t_valid), .task_ready_i(t_ready), .task_o(t_task),
    .fb_valid_i(fb_valid), .fb_ready_o(fb_ready), .fb_i(fb),
    .nic_fb_valid_o, .nic_fb_ready_i, .nic_fb_o,
    .timeout_o(mpq_timeout_o), .timeout_idx_o(mpq_timeout_idx_o)
  );

  logic [31:0]    free_bytes [NCL];
  logic [NCL-1:0] cl_valid, cl_ready;
  task_t          cl_task;

  pspin_task_dispatcher #(.NCL(NCL)) u_disp (
    .clk_i, .rst_ni,
    .task_valid_i(t_valid), .task_ready_o(t_ready), .task_i(t_task),
    .free_bytes_i(free_bytes), .cl_valid_o(cl_valid), .cl_ready_i(cl_ready), .cl_task_o(cl_task)
  );

  // =============== clusters ===============
  logic [NCL-1:0]    cl_l2_req, cl_l2_gnt, cl_l2_rvalid;
  logic [31:0]       cl_l2_addr [NCL];
  logic [WIDE_W-1:0] cl_l2_rdata;
  logic [NCL-1:0]    cl_fb_valid, cl_fb_ready, cl_cmd_valid, cl_cmd_ready, cl_resp_valid;
  feedback_t         cl_fb  [NCL];
  cmd_t              cl_cmd [NCL];
  cmd_resp_t         cl_resp;

  logic [NCL-1:0] ic_req, ic_gnt, ic_rvalid;
  logic [14:0]    ic_addr [NCL];

  for (genvar c = 0; c < NCL; c++) begin : g_cl
    pspin_cluster #(.NH(NH)) u_cluster (
      .clk_i, .rst_ni, .cluster_id_i(CL_W'(c)),
      .task_valid_i(cl_valid[c]), .task_ready_o(cl_ready[c]), .task_i(cl_task),
      .free_bytes_o(free_bytes[c]),
      .l2_req_o(cl_l2_req[c]), .l2_addr_o(cl_l2_addr[c]), .l2_gnt_i(cl_l2_gnt[c]),
      .l2_rvalid_i(cl_l2_rvalid[c]), .l2_rdata_i(cl_l2_rdata),
      .fb_valid_o(cl_fb_valid[c]), .fb_ready_i(cl_fb_ready[c]), .fb_o(cl_fb[c]),
      .cmd_valid_o(cl_cmd_valid[c]), .cmd_ready_i(cl_cmd_ready[c]), .cmd_o(cl_cmd[c]),
      .resp_valid_i(cl_resp_valid[c]), .resp_i(cl_resp),
      .core_task_req_i(core_task_req_i[c]), .core_task_valid_o(core_task_valid_o[c]),
      .core_task_o(core_task_o[c]), .core_clk_en_o(core_clk_en_o[c]), .pmp_o(pmp_o[c]),
      .core_wd_irq_o(core_wd_irq_o[c]), .core_done_i(core_done_i[c]), .core_err_i(core_err_i[c]),
      .core_done_ready_o(core_done_ready_o[c]), .core_cmd_valid_i(core_cmd_valid_i[c]),
      .core_cmd_ready_o(core_cmd_ready_o[c]), .core_cmd_i(core_cmd_i[c]),
      .core_resp_valid_o(core_resp_valid_o[c]), .core_resp_o(core_resp_o[c]),
      .tcdm_req_i(tcdm_req_i[c]), .tcdm_we_i(tcdm_we_i[c]), .tcdm_addr_i(tcdm_addr_i[c]),
      .tcdm_wdata_i(tcdm_wdata_i[c]), .tcdm_be_i(tcdm_be_i[c]), .tcdm_gnt_o(tcdm_gnt_o[c]),
      .tcdm_rvalid_o(tcdm_rvalid_o[c]), .tcdm_rdata_o(tcdm_rdata_o[c]),
      .fetch_req_i(fetch_req_i[c]), .fetch_addr_i(fetch_addr_i[c]), .fetch_gnt_o(fetch_gnt_o[c]),
      .fetch_rvalid_o(fetch_rvalid_o[c]), .fetch_rdata_o(fetch_rdata_o[c]),
      .ic_req_o(ic_req[c]), .ic_addr_o(ic_addr[c]), .ic_gnt_i(ic_gnt[c]),
      .ic_rvalid_i(ic_rvalid[c]), .ic_rdata_i(prog_rdata_o)
    );
  end

  // notifications: round-robin over clusters
  pspin_stream_arb #(.N(NCL), .T(feedback_t)) u_fb_arb (
    .clk_i, .rst_ni, .valid_i(cl_fb_valid), .ready_o(cl_fb_ready), .data_i(cl_fb),
    .valid_o(fb_valid), .ready_i(fb_ready), .data_o(fb), .idx_o()
  );

  // =============== command unit and executors ===============
  logic [2:0] ex_valid, ex_ready, ex_rvalid, ex_rready;
  cmd_t       ex_cmd;
  cmd_resp_t  ex_resp [3];

  pspin_cmd_unit #(.NCL(NCL)) u_cmd (
    .clk_i, .rst_ni,
    .cl_cmd_valid_i(cl_cmd_valid), .cl_cmd_ready_o(cl_cmd_ready), .cl_cmd_i(cl_cmd),
    .cl_resp_valid_o(cl_resp_valid), .cl_resp_o(cl_resp),
    .ex_cmd_valid_o(ex_valid), .ex_cmd_ready_i(ex_ready), .ex_cmd_o(ex_cmd),
    .ex_resp_valid_i(ex_rvalid), .ex_resp_ready_o(ex_rready), .ex_resp_i(ex_resp)
  );

  assign nic_cmd_valid_o  = ex_valid[0];
  assign ex_ready[0]      = nic_cmd_ready_i;
  assign nic_cmd_o        = ex_cmd;
  assign ex_rvalid[0]     = nic_resp_valid_i;
  assign nic_resp_ready_o = ex_rready[0];
  assign ex_resp[0]       = nic_resp_i;

  // off-cluster DMA
  logic [1:0]        od_rd_req, od_rd_gnt, od_rd_rvalid;
  logic [31:0]       od_rd_addr;
  logic [WIDE_W-1:0] od_rd_rdata [2];
  logic [1:0]        hw_req, hw_gnt;
  logic [63:0]       hw_addr [2];
  logic [WIDE_W-1:0] hw_data [2];
  logic [WB-1:0]     hw_be   [2];

  pspin_offcluster_dma u_odma (
    .clk_i, .rst_ni,
    .cmd_valid_i(ex_valid[1]), .cmd_ready_o(ex_ready[1]), .cmd_i(ex_cmd),
    .resp_valid_o(ex_rvalid[1]), .resp_ready_i(ex_rready[1]), .resp_o(ex_resp[1]),
    .rd_req_o(od_rd_req), .rd_addr_o(od_rd_addr), .rd_gnt_i(od_rd_gnt),
    .rd_rvalid_i(od_rd_rvalid), .rd_rdata_i(od_rd_rdata),
    .wr_req_o(hw_req[0]), .wr_addr_o(hw_addr[0]), .wr_data_o(hw_data[0]),
    .wr_be_o(hw_be[0]), .wr_gnt_i(hw_gnt[0])
  );

  pspin_hostdirect u_hd (
    .clk_i, .rst_ni,
    .cmd_valid_i(ex_valid[2]), .cmd_ready_o(ex_ready[2]), .cmd_i(ex_cmd),
    .resp_valid_o(ex_rvalid[2]), .resp_ready_i(ex_rready[2]), .resp_o(ex_resp[2]),
    .wr_req_o(hw_req[1]), .wr_addr_o(hw_addr[1]), .wr_data_o(hw_data[1]),
    .wr_be_o(hw_be[1]), .wr_gnt_i(hw_gnt[1])
  );

  // host write mux -> IOMMU -> host slave
  logic              hm_req, hm_gnt;
  logic [63:0]       hm_addr;
  logic [WIDE_W-1:0] hm_data;
  logic [WB-1:0]     hm_be;
  pspin_mem_mux #(.N(2), .AW(64), .DW(WIDE_W)) u_host_mux (
    .clk_i, .rst_ni, .req_i(hw_req), .we_i(2'b11), .addr_i(hw_addr), .wdata_i(hw_data),
    .be_i(hw_be), .gnt_o(hw_gnt), .rvalid_o(), .rdata_o(),
    .m_req_o(hm_req), .m_we_o(), .m_addr_o(hm_addr), .m_wdata_o(hm_data), .m_be_o(hm_be),
    .m_gnt_i(hm_gnt), .m_rvalid_i(1'b0), .m_rdata_i('0)
  );

  pspin_iommu #(.ENTRIES(16)) u_iommu (
    .clk_i, .rst_ni,
    .cfg_we_i(iommu_cfg_we_i), .cfg_idx_i(iommu_cfg_idx_i), .cfg_valid_i(iommu_cfg_valid_i),
    .cfg_vpn_i(iommu_cfg_vpn_i), .cfg_ppn_i(iommu_cfg_ppn_i),
    .in_req_i(hm_req), .in_addr_i(hm_addr), .in_data_i(hm_data), .in_be_i(hm_be),
    .in_gnt_o(hm_gnt),
    .out_req_o(host_wr_req_o), .out_addr_o(host_wr_addr_o), .out_data_o(host_wr_data_o),
    .out_be_o(host_wr_be_o), .out_gnt_i(host_wr_gnt_i),
    .fault_o(iommu_fault_o), .fault_addr_o(iommu_fault_addr_o)
  );

  // =============== L2 packet buffer ===============
  // channels: 0 = port 0 write (NIC inbound), 1 = port 0 read (NHI),
  //           2 = port 1 write (PE), 3 = port 1 read (DMA + PE)
  logic [3:0]        pb_req, pb_we, pb_gnt, pb_rvalid;
  logic [21:0]       pb_addr  [4];
  logic [WIDE_W-1:0] pb_wdata [4];
  logic [WB-1:0]     pb_be    [4];
  logic [WIDE_W-1:0] pb_rdata [4];

  pspin_l2_mem #(.BYTES(L2_PKT_BYTES), .NUM_BANKS(32), .BANK_W(512), .PORT_W(WIDE_W), .NUM_CH(4)) u_l2_pkt (
    .clk_i, .rst_ni, .req_i(pb_req), .we_i(pb_we), .addr_i(pb_addr), .wdata_i(pb_wdata),
    .be_i(pb_be), .gnt_o(pb_gnt), .rvalid_o(pb_rvalid), .rdata_o(pb_rdata)
  );

  assign pb_req[0]   = pkt_wr_req_i;
  assign pb_we[0]    = 1'b1;
  assign pb_addr[0]  = pkt_wr_addr_i;
  assign pb_wdata[0] = pkt_wr_data_i;
  assign pb_be[0]    = pkt_wr_be_i;
  assign pkt_wr_gnt_o = pb_gnt[0];

  assign pb_req[2]   = pe_wr_req_i[0];
  assign pb_we[2]    = 1'b1;
  assign pb_addr[2]  = pe_wr_addr_i[0];
  assign pb_wdata[2] = pe_wr_data_i[0];
  assign pb_be[2]    = pe_wr_be_i[0];
  assign pe_wr_gnt_o[0] = pb_gnt[2];

  // NHI read share: 0 = NIC outbound, 1 = off-cluster DMA
  logic [1:0]  nhi_req, nhi_gnt, nhi_rvalid;
  logic [21:0] nhi_addr [2];
  logic [WIDE_W-1:0] nhi_rdata;
  assign nhi_req  = {od_rd_req[0], nic_rd_req_i};
  assign nhi_addr = '{nic_rd_addr_i, od_rd_addr[21:0]};
  pspin_mem_mux #(.N(2), .AW(22), .DW(WIDE_W)) u_nhi_pkt (
    .clk_i, .rst_ni, .req_i(nhi_req), .we_i('0), .addr_i(nhi_addr), .wdata_i('{default: '0}),
    .be_i('{default: '0}), .gnt_o(nhi_gnt), .rvalid_o(nhi_rvalid), .rdata_o(nhi_rdata),
    .m_req_o(pb_req[1]), .m_we_o(pb_we[1]), .m_addr_o(pb_addr[1]), .m_wdata_o(pb_wdata[1]),
    .m_be_o(pb_be[1]), .m_gnt_i(pb_gnt[1]), .m_rvalid_i(pb_rvalid[1]), .m_rdata_i(pb_rdata[1])
  );
  assign nic_rd_gnt_o    = nhi_gnt[0];
  assign nic_rd_rvalid_o = nhi_rvalid[0];
  assign nic_rd_rdata_o  = nhi_rdata;
  assign od_rd_gnt[0]    = nhi_gnt[1];
  assign od_rd_rvalid[0] = nhi_rvalid[1];
  assign od_rd_rdata[0]  = nhi_rdata;

  // DMA interconnect read share: clusters 0..NCL-1, then the PE side
  logic [NCL:0]  dma_req, dma_gnt, dma_rvalid;
  logic [21:0]   dma_addr [NCL+1];
  logic [WIDE_W-1:0] dma_rdata;
  always_comb begin
    for (int c = 0; c < int'(NCL); c++) begin
      dma_req[c]  = cl_l2_req[c];
      dma_addr[c] = cl_l2_addr[c][21:0];
    end
    dma_req[NCL]  = pe_rd_req_i[0];
    dma_addr[NCL] = pe_rd_addr_i[0];
  end
  pspin_mem_mux #(.N(NCL + 1), .AW(22), .DW(WIDE_W)) u_dma_ic (
    .clk_i, .rst_ni, .req_i(dma_req), .we_i('0), .addr_i(dma_addr), .wdata_i('{default: '0}),
    .be_i('{default: '0}), .gnt_o(dma_gnt), .rvalid_o(dma_rvalid), .rdata_o(dma_rdata),
    .m_req_o(pb_req[3]), .m_we_o(pb_we[3]), .m_addr_o(pb_addr[3]), .m_wdata_o(pb_wdata[3]),
    .m_be_o(pb_be[3]), .m_gnt_i(pb_gnt[3]), .m_rvalid_i(pb_rvalid[3]), .m_rdata_i(pb_rdata[3])
  );
  assign cl_l2_gnt         = dma_gnt[NCL-1:0];
  assign cl_l2_rvalid      = dma_rvalid[NCL-1:0];
  assign cl_l2_rdata       = dma_rdata;
  assign pe_rd_gnt_o[0]    = dma_gnt[NCL];
  assign pe_rd_rvalid_o[0] = dma_rvalid[NCL];
  assign pe_rd_rdata_o[0]  = dma_rdata;

  // =============== L2 handler memory ===============
  logic [3:0]        hm_req4, hm_we4, hm_gnt4, hm_rvalid4;
  logic [21:0]       hm_addr4  [4];
  logic [WIDE_W-1:0] hm_wdata4 [4];
  logic [WB-1:0]     hm_be4    [4];
  logic [WIDE_W-1:0] hm_rdata4 [4];

  pspin_l2_mem #(.BYTES(L2_HND_BYTES), .NUM_BANKS(64), .BANK_W(64), .PORT_W(WIDE_W), .NUM_CH(4)) u_l2_hnd (
    .clk_i, .rst_ni, .req_i(hm_req4), .we_i(hm_we4), .addr_i(hm_addr4), .wdata_i(hm_wdata4),
    .be_i(hm_be4), .gnt_o(hm_gnt4), .rvalid_o(hm_rvalid4), .rdata_o(hm_rdata4)
  );

  assign hm_req4[0] = hnd_wr_req_i;   assign hm_we4[0] = 1'b1;
  assign hm_addr4[0] = hnd_wr_addr_i; assign hm_wdata4[0] = hnd_wr_data_i;
  assign hm_be4[0] = hnd_wr_be_i;     assign hnd_wr_gnt_o = hm_gnt4[0];
  assign hm_req4[2] = pe_wr_req_i[1]; assign hm_we4[2] = 1'b1;
  assign hm_addr4[2] = pe_wr_addr_i[1]; assign hm_wdata4[2] = pe_wr_data_i[1];
  assign hm_be4[2] = pe_wr_be_i[1];   assign pe_wr_gnt_o[1] = hm_gnt4[2];
  assign hm_req4[3] = pe_rd_req_i[1]; assign hm_we4[3] = 1'b0;
  assign hm_addr4[3] = pe_rd_addr_i[1]; assign hm_wdata4[3] = '0;
  assign hm_be4[3] = '0;              assign pe_rd_gnt_o[1] = hm_gnt4[3];
  assign pe_rd_rvalid_o[1] = hm_rvalid4[3];
  assign pe_rd_rdata_o[1]  = hm_rdata4[3];

  // NHI read share of the handler memory: 0 = host, 1 = off-cluster DMA
  logic [1:0]  hnhi_req, hnhi_gnt, hnhi_rvalid;
  logic [21:0] hnhi_addr [2];
  assign hnhi_req  = {od_rd_req[1], hnd_rd_req_i};
  assign hnhi_addr = '{hnd_rd_addr_i, od_rd_addr[21:0]};
  pspin_mem_mux #(.N(2), .AW(22), .DW(WIDE_W)) u_nhi_hnd (
    .clk_i, .rst_ni, .req_i(hnhi_req), .we_i('0), .addr_i(hnhi_addr), .wdata_i('{default: '0}),
    .be_i('{default: '0}), .gnt_o(hnhi_gnt), .rvalid_o(hnhi_rvalid), .rdata_o(hnd_rd_rdata_o),
    .m_req_o(hm_req4[1]), .m_we_o(hm_we4[1]), .m_addr_o(hm_addr4[1]), .m_wdata_o(hm_wdata4[1]),
    .m_be_o(hm_be4[1]), .m_gnt_i(hm_gnt4[1]), .m_rvalid_i(hm_rvalid4[1]), .m_rdata_i(hm_rdata4[1])
  );
  assign hnd_rd_gnt_o    = hnhi_gnt[0];
  assign hnd_rd_rvalid_o = hnhi_rvalid[0];
  assign od_rd_gnt[1]    = hnhi_gnt[1];
  assign od_rd_rvalid[1] = hnhi_rvalid[1];
  assign od_rd_rdata[1]  = hnd_rd_rdata_o;

  // =============== program memory ===============
  // refills of the four instruction caches share the PE-side input
  logic        pr_req, pr_gnt, pr_rvalid;
  logic [14:0] pr_addr;
  pspin_mem_mux #(.N(NCL), .AW(15), .DW(64)) u_ic_mux (
    .clk_i, .rst_ni, .req_i(ic_req), .we_i('0), .addr_i(ic_addr), .wdata_i('{default: '0}),
    .be_i('{default: '0}), .gnt_o(ic_gnt), .rvalid_o(ic_rvalid), .rdata_o(),
    .m_req_o(pr_req), .m_we_o(), .m_addr_o(pr_addr), .m_wdata_o(), .m_be_o(),
    .m_gnt_i(pr_gnt), .m_rvalid_i(pr_rvalid), .m_rdata_i(prog_rdata_o)
  );

  logic [1:0] pm_gnt, pm_rvalid;
  pspin_prog_mem u_prog (
    .clk_i, .rst_ni, .req_i({pr_req, prog_req_i}), .we_i({1'b0, prog_we_i}),
    .addr_i('{prog_addr_i, pr_addr}), .wdata_i('{prog_wdata_i, 64'd0}),
    .be_i('{prog_be_i, 8'd0}), .gnt_o(pm_gnt), .rvalid_o(pm_rvalid), .rdata_o(prog_rdata_o)
  );
  assign prog_gnt_o    = pm_gnt[0];
  assign prog_rvalid_o = pm_rvalid[0];
  assign pr_gnt        = pm_gnt[1];
  assign pr_rvalid     = pm_rvalid[1];
endmodule
