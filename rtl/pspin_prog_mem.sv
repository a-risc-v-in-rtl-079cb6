// pspin_prog_mem: L2 program memory holding the handlers' code.
//
// A single-port, half-duplex SRAM of BYTES bytes with DW-bit words and byte
// enables, behind a two-input multiplexer: input 0 is the host (code offload
// through the NIC-host interconnect), input 1 the instruction-cache refills
// from the PE interconnect. The host has priority. Reads return one cycle after
// the grant.
//
// Document: 32 KiB, single port, half duplex, 64 Gbit/s (64 bit per cycle at
// 1 GHz), written by the host and read to refill the per-cluster instruction
// caches; the multiplexer in front of it. Own choices: fixed host priority and
// the port protocol.
module pspin_prog_mem #(
  parameter int unsigned BYTES = pspin_pkg::PROG_BYTES,
  parameter int unsigned DW    = 64,
  localparam int unsigned AW   = $clog2(BYTES),
  localparam int unsigned DEPTH = BYTES / (DW / 8)
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic [1:0]    req_i,
  input  logic [1:0]    we_i,
  input  logic [AW-1:0] addr_i  [2],
  input  logic [DW-1:0] wdata_i [2],
  input  logic [DW/8-1:0] be_i  [2],
  output logic [1:0]    gnt_o,
  output logic [1:0]    rvalid_o,
  output logic [DW-1:0] rdata_o
);
  localparam int unsigned OW = $clog2(DW / 8);
  logic [DW-1:0] mem [DEPTH];
  logic          s;
  logic [AW-OW-1:0] row;

  assign s     = !req_i[0];
  assign gnt_o = req_i[0] ? 2'b01 : {req_i[1], 1'b0};
  assign row   = addr_i[s][AW-1:OW];

  always_ff @(posedge clk_i) begin
    if (|req_i) begin
      if (we_i[s]) begin
        for (int i = 0; i < int'(DW / 8); i++)
          if (be_i[s][i]) mem[row][i*8 +: 8] <= wdata_i[s][i*8 +: 8];
      end else begin
        rdata_o <= mem[row];
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rvalid_o <= '0;
    else         rvalid_o <= gnt_o & ~we_i;
  end
endmodule
