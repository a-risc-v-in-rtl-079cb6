// pspin_l1_tcdm: cluster L1 tightly-coupled data memory (TCDM) with its
// interconnect.
//
// NUM_BANKS word-interleaved banks of 32 bit (word i in bank i % NUM_BANKS),
// single-cycle access. NP narrow 32-bit ports serve the HPUs; one wide port of
// WIDE_W bits serves the cluster DMA engine and covers WIDE_W/32 consecutive
// banks. Per bank, the wide port has priority over the narrow ports (a DMA
// transfer is never stalled by handlers); the narrow ports share a bank by
// round-robin. A port keeps req high until gnt; read data follows one cycle
// after the grant, with rvalid. Byte enables apply to writes.
//
// Document: 1 MiB, 64 banks of 32 bit, word-interleaved, single-cycle access
// from the HPUs. Own choices: the DMA port's bank priority and the port
// protocol.
module pspin_l1_tcdm #(
  parameter int unsigned BYTES     = pspin_pkg::L1_BYTES,
  parameter int unsigned NUM_BANKS = 64,
  parameter int unsigned NP        = pspin_pkg::NUM_HPUS,
  parameter int unsigned WIDE_W    = pspin_pkg::WIDE_W,
  localparam int unsigned AW       = $clog2(BYTES)
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // narrow (HPU) ports
  input  logic [NP-1:0]     req_i,
  input  logic [NP-1:0]     we_i,
  input  logic [AW-1:0]     addr_i  [NP],
  input  logic [31:0]       wdata_i [NP],
  input  logic [3:0]        be_i    [NP],
  output logic [NP-1:0]     gnt_o,
  output logic [NP-1:0]     rvalid_o,
  output logic [31:0]       rdata_o [NP],
  // wide (DMA) port
  input  logic              w_req_i,
  input  logic              w_we_i,
  input  logic [AW-1:0]     w_addr_i,
  input  logic [WIDE_W-1:0] w_wdata_i,
  input  logic [WIDE_W/8-1:0] w_be_i,
  output logic              w_gnt_o,
  output logic              w_rvalid_o,
  output logic [WIDE_W-1:0] w_rdata_o
);
  localparam int unsigned BW    = $clog2(NUM_BANKS);
  localparam int unsigned DEPTH = BYTES / (NUM_BANKS * 4);
  localparam int unsigned RW    = $clog2(DEPTH);
  localparam int unsigned WK    = WIDE_W / 32;
  localparam int unsigned PW    = (NP > 1) ? $clog2(NP) : 1;

  logic [BW-1:0] nbank [NP];
  logic [RW-1:0] nrow  [NP];
  always_comb
    for (int p = 0; p < int'(NP); p++) begin
      nbank[p] = addr_i[p][2 +: BW];
      nrow[p]  = addr_i[p][2 + BW +: RW];
    end

  logic [BW-1:0] wbank0;
  logic [RW-1:0] wrow;
  assign wbank0  = w_addr_i[2 +: BW];
  assign wrow    = w_addr_i[2 + BW +: RW];
  assign w_gnt_o = w_req_i;

  logic [31:0]       bank_rdata [NUM_BANKS];
  logic [NP-1:0]     bank_gnt   [NUM_BANKS];

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic [31:0]   mem [DEPTH];
    logic          wide_hit;
    logic [BW-1:0] woff;
    logic [NP-1:0] breq;
    logic [PW-1:0] widx;
    logic          wvalid;

    assign woff     = BW'(b) - wbank0;
    assign wide_hit = w_req_i && (int'(woff) < int'(WK));
    always_comb
      for (int p = 0; p < int'(NP); p++) breq[p] = req_i[p] && (nbank[p] == BW'(b)) && !wide_hit;

    pspin_rr_arbiter #(.N(NP)) u_arb (
      .clk_i, .rst_ni, .req_i(breq), .advance_i(1'b1),
      .gnt_o(bank_gnt[b]), .idx_o(widx), .valid_o(wvalid)
    );

    always_ff @(posedge clk_i) begin
      if (wide_hit) begin
        if (w_we_i) begin
          for (int i = 0; i < 4; i++)
            if (w_be_i[int'(woff)*4 + i]) mem[wrow][i*8 +: 8] <= w_wdata_i[int'(woff)*32 + i*8 +: 8];
        end else begin
          bank_rdata[b] <= mem[wrow];
        end
      end else if (wvalid) begin
        if (we_i[widx]) begin
          for (int i = 0; i < 4; i++)
            if (be_i[widx][i]) mem[nrow[widx]][i*8 +: 8] <= wdata_i[widx][i*8 +: 8];
        end else begin
          bank_rdata[b] <= mem[nrow[widx]];
        end
      end
    end
  end

  always_comb begin
    gnt_o = '0;
    for (int b = 0; b < int'(NUM_BANKS); b++) gnt_o |= bank_gnt[b];
  end

  // read responses
  logic [NP-1:0] nrd_q;
  logic [BW-1:0] nbank_q [NP];
  logic          wrd_q;
  logic [BW-1:0] wbank_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      nrd_q   <= '0;
      wrd_q   <= 1'b0;
      wbank_q <= '0;
      for (int p = 0; p < int'(NP); p++) nbank_q[p] <= '0;
    end else begin
      nrd_q   <= gnt_o & ~we_i;
      wrd_q   <= w_req_i && !w_we_i;
      wbank_q <= wbank0;
      for (int p = 0; p < int'(NP); p++) nbank_q[p] <= nbank[p];
    end
  end
  assign rvalid_o   = nrd_q;
  assign w_rvalid_o = wrd_q;
  always_comb begin
    for (int p = 0; p < int'(NP); p++) rdata_o[p] = bank_rdata[nbank_q[p]];
    for (int k = 0; k < int'(WK); k++) w_rdata_o[k*32 +: 32] = bank_rdata[BW'(wbank_q + BW'(k))];
  end
endmodule
