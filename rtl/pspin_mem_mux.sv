// pspin_mem_mux: N-to-1 multiplexer on a memory channel.
//
// Several masters share one channel of a memory (for instance the NIC outbound
// engine and the off-cluster DMA engine sharing the L2 packet buffer's read
// channel on the NIC-host interconnect, or the four cluster DMA engines sharing
// its second port on the DMA interconnect). One request per cycle is forwarded
// by round-robin; the winner sees gnt when the memory grants. Read data comes
// back RD_LAT cycles after the grant and is routed to the master recorded at
// grant time.
//
// Document: masters on the NIC-host, DMA and PE interconnects share the L2
// memory ports. Own choices: this simple request/grant channel in place of
// AXI4, round-robin, fixed read latency.
module pspin_mem_mux #(
  parameter int unsigned N      = 2,
  parameter int unsigned AW     = 32,
  parameter int unsigned DW     = 512,
  parameter int unsigned RD_LAT = 1,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic [N-1:0]  req_i,
  input  logic [N-1:0]  we_i,
  input  logic [AW-1:0] addr_i  [N],
  input  logic [DW-1:0] wdata_i [N],
  input  logic [DW/8-1:0] be_i  [N],
  output logic [N-1:0]  gnt_o,
  output logic [N-1:0]  rvalid_o,
  output logic [DW-1:0] rdata_o,
  output logic          m_req_o,
  output logic          m_we_o,
  output logic [AW-1:0] m_addr_o,
  output logic [DW-1:0] m_wdata_o,
  output logic [DW/8-1:0] m_be_o,
  input  logic          m_gnt_i,
  input  logic          m_rvalid_i,
  input  logic [DW-1:0] m_rdata_i
);
  logic [N-1:0]  gnt;
  logic [IW-1:0] idx;
  logic          any;

  pspin_rr_arbiter #(.N(N)) u_arb (
    .clk_i, .rst_ni, .req_i, .advance_i(m_gnt_i), .gnt_o(gnt), .idx_o(idx), .valid_o(any)
  );

  assign m_req_o   = any;
  assign m_we_o    = we_i[idx];
  assign m_addr_o  = addr_i[idx];
  assign m_wdata_o = wdata_i[idx];
  assign m_be_o    = be_i[idx];
  assign gnt_o     = gnt & {N{m_gnt_i}};

  // read-return routing
  logic [IW-1:0] idx_pipe [RD_LAT];
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < int'(RD_LAT); i++) idx_pipe[i] <= '0;
    end else begin
      idx_pipe[0] <= idx;
      for (int i = 1; i < int'(RD_LAT); i++) idx_pipe[i] <= idx_pipe[i-1];
    end
  end
  always_comb begin
    rvalid_o = '0;
    rvalid_o[idx_pipe[RD_LAT-1]] = m_rvalid_i;
  end
  assign rdata_o = m_rdata_i;
endmodule
