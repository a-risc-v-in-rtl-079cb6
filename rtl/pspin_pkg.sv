// pspin_pkg: shared sizes, address map and message types of the PsPIN
// packet-processing unit.
//
// The unit receives Handler Execution Requests (HERs) from a NIC inbound
// engine, schedules one handler task per packet on one of NUM_CLUSTERS
// clusters of NUM_HPUS handler processing units (HPUs), and returns one
// completion notification (feedback) per task. Handlers issue commands
// (NIC send, DMA to host, HostDirect immediate write) and receive responses.
//
// Sizes that follow the document: 4 clusters of 8 HPUs, 1 MiB L1 per cluster
// with a 32 KiB packet buffer, 4 MiB L2 packet buffer and handler memory,
// 32 KiB program memory, 512-bit wide data paths, 32 B HostDirect payload.
// This design's own choices: the field widths of the structs, the number of
// MPQs, the address map and the encoding of handler and command kinds.
package pspin_pkg;

  // ---------------- configuration (document) ----------------
  localparam int unsigned NUM_CLUSTERS   = 4;
  localparam int unsigned NUM_HPUS       = 8;        // per cluster
  localparam int unsigned WIDE_W         = 512;      // wide AXI data width
  localparam int unsigned WIDE_BYTES     = WIDE_W / 8;
  localparam int unsigned L1_BYTES       = 1 << 20;  // 1 MiB per cluster
  localparam int unsigned L1_PKT_BYTES   = 32 * 1024;
  localparam int unsigned L2_PKT_BYTES   = 4 << 20;
  localparam int unsigned L2_HND_BYTES   = 4 << 20;
  localparam int unsigned PROG_BYTES     = 32 * 1024;
  localparam int unsigned HD_IMM_BYTES   = 32;       // HostDirect immediate

  // ---------------- configuration (this design) ----------------
  localparam int unsigned NUM_MPQ        = 16;       // message processing queues
  localparam int unsigned MPQ_W          = $clog2(NUM_MPQ);
  localparam int unsigned ALLOC_ENTRIES  = 16;       // L1 buffer allocations per cluster
  localparam int unsigned ALLOC_W        = $clog2(ALLOC_ENTRIES);
  localparam int unsigned CL_W           = $clog2(NUM_CLUSTERS);
  localparam int unsigned HPU_W          = $clog2(NUM_HPUS);

  // Address map (byte addresses as seen on the interconnects)
  localparam logic [31:0] L1_BASE        = 32'h1000_0000; // cluster c at L1_BASE + c*L1_STRIDE
  localparam logic [31:0] L1_STRIDE      = 32'h0040_0000;
  localparam logic [31:0] PROG_BASE      = 32'h1D00_0000;
  localparam logic [31:0] L2_PKT_BASE    = 32'h1C00_0000;
  localparam logic [31:0] L2_HND_BASE    = 32'h1C40_0000;

  // Handler kinds
  typedef enum logic [1:0] {
    HDL_HEADER     = 2'd0,
    HDL_PAYLOAD    = 2'd1,
    HDL_COMPLETION = 2'd2
  } handler_kind_e;

  // Execution context carried in each HER
  typedef struct packed {
    logic [31:0] hh_addr;        // header handler, 0 = none
    logic [31:0] ph_addr;        // payload handler, 0 = none
    logic [31:0] th_addr;        // completion handler, 0 = none
    logic [31:0] hnd_mem_addr;   // L2 handler memory region
    logic [31:0] hnd_mem_size;
    logic [31:0] host_desc_addr; // execution-context descriptor in host memory
    logic [15:0] l1_copy_bytes;  // bytes of the packet the handlers need in L1
    logic [31:0] mpq_timeout;    // cycles without packets before an MPQ is reset
    logic [31:0] wd_timeout;     // handler watchdog, cycles
  } ectx_t;

  // Handler Execution Request
  typedef struct packed {
    logic [MPQ_W-1:0] msgid;     // message / MPQ index
    logic             eom;       // last packet of the message
    logic [31:0]      pkt_addr;  // byte address in the L2 packet buffer
    logic [15:0]      pkt_size;  // bytes
    ectx_t            ectx;
  } her_t;

  // Task: one handler invocation
  typedef struct packed {
    handler_kind_e    kind;
    logic [31:0]      handler_addr;
    her_t             her;
  } task_t;

  // Task inside a cluster, after L1 allocation and copy
  typedef struct packed {
    task_t            tsk;
    logic [31:0]      l1_pkt_addr;
    logic [15:0]      l1_pkt_size;
    logic [ALLOC_W-1:0] alloc_idx;
  } cl_task_t;

  // Completion notification
  typedef struct packed {
    logic [MPQ_W-1:0] msgid;
    handler_kind_e    kind;
    logic             eom;
    logic [31:0]      pkt_addr;
    logic [15:0]      pkt_size;
    logic [CL_W-1:0]  cluster;
    logic [ALLOC_W-1:0] alloc_idx;
    logic             error;     // handler failed (exception or watchdog)
    logic             mpq_idle;  // set by the MPQ engine: message fully processed
  } feedback_t;

  // Handler commands
  typedef enum logic [1:0] {
    CMD_NIC        = 2'd0,
    CMD_DMA        = 2'd1,
    CMD_HOSTDIRECT = 2'd2
  } cmd_kind_e;

  typedef struct packed {
    logic [CL_W-1:0]  cluster;
    logic [HPU_W-1:0] hpu;
    logic             tag;       // which task of the HPU driver issued it
  } cmd_id_t;

  typedef struct packed {
    cmd_kind_e          kind;
    cmd_id_t            id;
    logic [31:0]        src_addr;  // PsPIN address (NIC, DMA)
    logic [63:0]        dst_addr;  // host virtual address (DMA, HostDirect)
    logic [31:0]        length;    // bytes (NIC, DMA)
    logic [HD_IMM_BYTES*8-1:0] imm; // HostDirect data
  } cmd_t;

  typedef struct packed {
    cmd_id_t          id;
    logic             error;
  } cmd_resp_t;

  // Task information an HPU reads from its driver
  typedef struct packed {
    handler_kind_e    kind;
    logic [31:0]      handler_addr;
    logic [31:0]      pkt_addr;      // L1 address of packet copy
    logic [15:0]      pkt_size;      // full packet size
    logic [31:0]      l2_pkt_addr;   // packet in L2
    logic [31:0]      hnd_mem_addr;
    logic [31:0]      hnd_mem_size;
    logic [MPQ_W-1:0] msgid;
  } hpu_task_t;

  // PMP windows the driver grants to a handler
  typedef struct packed {
    logic [31:0] code_base;  logic [31:0] code_size;
    logic [31:0] pkt_base;   logic [31:0] pkt_size;
    logic [31:0] hnd_base;   logic [31:0] hnd_size;
  } pmp_cfg_t;

endpackage
