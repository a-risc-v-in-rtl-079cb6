// pspin_iommu: address translation for writes towards host memory.
//
// A table of ENTRIES fully associative page mappings (4 KiB pages) translates
// the host virtual address of each write from the off-cluster DMA engine and
// the HostDirect unit to a physical address. The table is written by the NIC
// driver through the configuration port (entry index, valid, virtual and
// physical page numbers) when the host registers memory. Translation is
// combinational; a write whose page has no valid entry is granted and dropped,
// and fault_o pulses with its address so the driver can be told.
//
// Document: the off-cluster DMA engine interfaces to an IOMMU that translates
// virtual addresses of handler commands to physical ones and is updated by the
// NIC driver. Own choices: page size, table size and organisation, the
// configuration port and the fault behaviour.
module pspin_iommu
  import pspin_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  localparam int unsigned EW = $clog2(ENTRIES)
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // configuration (NIC driver)
  input  logic        cfg_we_i,
  input  logic [EW-1:0] cfg_idx_i,
  input  logic        cfg_valid_i,
  input  logic [51:0] cfg_vpn_i,
  input  logic [51:0] cfg_ppn_i,
  // write from PsPIN (virtual)
  input  logic        in_req_i,
  input  logic [63:0] in_addr_i,
  input  logic [WIDE_W-1:0] in_data_i,
  input  logic [WIDE_BYTES-1:0] in_be_i,
  output logic        in_gnt_o,
  // write to host slave port (physical)
  output logic        out_req_o,
  output logic [63:0] out_addr_o,
  output logic [WIDE_W-1:0] out_data_o,
  output logic [WIDE_BYTES-1:0] out_be_o,
  input  logic        out_gnt_i,
  output logic        fault_o,
  output logic [63:0] fault_addr_o
);
  logic [ENTRIES-1:0] v_q;
  logic [51:0] vpn_q [ENTRIES];
  logic [51:0] ppn_q [ENTRIES];

  logic hit;
  logic [51:0] ppn;
  always_comb begin
    hit = 1'b0;
    ppn = '0;
    for (int e = 0; e < int'(ENTRIES); e++)
      if (!hit && v_q[e] && vpn_q[e] == in_addr_i[63:12]) begin
        hit = 1'b1;
        ppn = ppn_q[e];
      end
  end

  assign out_req_o    = in_req_i && hit;
  assign out_addr_o   = {ppn, in_addr_i[11:0]};
  assign out_data_o   = in_data_i;
  assign out_be_o     = in_be_i;
  assign in_gnt_o     = hit ? out_gnt_i : in_req_i;
  assign fault_o      = in_req_i && !hit;
  assign fault_addr_o = in_addr_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      v_q <= '0;
      for (int e = 0; e < int'(ENTRIES); e++) begin vpn_q[e] <= '0; ppn_q[e] <= '0; end
    end else if (cfg_we_i) begin
      v_q[cfg_idx_i]   <= cfg_valid_i;
      vpn_q[cfg_idx_i] <= cfg_vpn_i;
      ppn_q[cfg_idx_i] <= cfg_ppn_i;
    end
  end
endmodule
