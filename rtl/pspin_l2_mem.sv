// pspin_l2_mem: multi-banked, word-interleaved L2 memory with several
// independent channels.
//
// The memory is NUM_BANKS single-port SRAM banks of BANK_W bits. A channel
// access is one PORT_W-bit word; consecutive words go to consecutive groups of
// PORT_W/BANK_W banks (word interleaving). An access occupies only the banks
// whose byte enables are set (all of them for a read), so narrow accesses to
// different banks of one word proceed together. Each cycle the channels are
// served in round-robin order and a channel is granted when none of its banks
// is already taken (all-or-nothing); a refused channel keeps req high and
// retries. Reads return rdata one cycle after the grant, with rvalid.
//
// Configured as the document's L2 packet buffer (4 MiB, 32 banks of 512 bit)
// it gives each channel one 512-bit word per cycle (512 Gbit/s at 1 GHz). Two
// full-duplex ports are built as four channels: a read and a write channel per
// port. As the handler memory (4 MiB) it uses 64-bit banks; the bank count of
// the handler memory is this design's choice (64). The channel protocol and
// arbitration are this design's own.
module pspin_l2_mem #(
  parameter int unsigned BYTES     = 4 << 20,
  parameter int unsigned NUM_BANKS = 32,
  parameter int unsigned BANK_W    = 512,
  parameter int unsigned PORT_W    = 512,
  parameter int unsigned NUM_CH    = 4,
  localparam int unsigned AW       = $clog2(BYTES),
  localparam int unsigned PB       = PORT_W / 8
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic [NUM_CH-1:0] req_i,
  input  logic [NUM_CH-1:0] we_i,
  input  logic [AW-1:0]     addr_i  [NUM_CH],   // byte address, PORT_W aligned
  input  logic [PORT_W-1:0] wdata_i [NUM_CH],
  input  logic [PB-1:0]     be_i    [NUM_CH],
  output logic [NUM_CH-1:0] gnt_o,
  output logic [NUM_CH-1:0] rvalid_o,
  output logic [PORT_W-1:0] rdata_o [NUM_CH]
);
  localparam int unsigned K      = PORT_W / BANK_W;          // banks per word
  localparam int unsigned G      = NUM_BANKS / K;            // word groups
  localparam int unsigned GW     = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned DEPTH  = BYTES / (NUM_BANKS * BANK_W / 8);
  localparam int unsigned RW     = $clog2(DEPTH);
  localparam int unsigned BB     = BANK_W / 8;
  localparam int unsigned CW     = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;

  // per-channel decode
  logic [GW-1:0]        grp  [NUM_CH];
  logic [RW-1:0]        row  [NUM_CH];
  logic [NUM_BANKS-1:0] need [NUM_CH];
  always_comb begin
    for (int c = 0; c < int'(NUM_CH); c++) begin
      logic [AW-1:0] w;
      w = AW'(32'(addr_i[c]) / PB);
      grp[c]  = GW'(w % G);
      row[c]  = RW'(w / G);
      need[c] = '0;
      for (int k = 0; k < int'(K); k++)
        if (!we_i[c] || (be_i[c][k*BB +: BB] != '0))
          need[c][int'(grp[c])*K + k] = 1'b1;
    end
  end

  // all-or-nothing round-robin grant
  logic [CW-1:0]        ptr_q;
  logic [NUM_BANKS-1:0] taken;
  logic [CW-1:0]        owner [NUM_BANKS];
  always_comb begin
    taken = '0;
    gnt_o = '0;
    for (int b = 0; b < int'(NUM_BANKS); b++) owner[b] = '0;
    for (int k = 0; k < int'(NUM_CH); k++) begin
      int unsigned c;
      c = (int'(ptr_q) + k) % NUM_CH;
      if (req_i[c] && ((need[c] & taken) == '0)) begin
        gnt_o[c] = 1'b1;
        taken    = taken | need[c];
        for (int b = 0; b < int'(NUM_BANKS); b++) if (need[c][b]) owner[b] = CW'(c);
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) ptr_q <= '0;
    else if (|req_i) ptr_q <= (ptr_q == CW'(NUM_CH - 1)) ? '0 : ptr_q + 1'b1;
  end

  // banks
  logic [BANK_W-1:0] bank_rdata [NUM_BANKS];
  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    localparam int unsigned KK = b % K;
    logic [BANK_W-1:0] mem [DEPTH];
    logic [CW-1:0] o;
    assign o = owner[b];
    always_ff @(posedge clk_i) begin
      if (taken[b]) begin
        if (we_i[o]) begin
          for (int i = 0; i < int'(BB); i++)
            if (be_i[o][KK*BB + i]) mem[row[o]][i*8 +: 8] <= wdata_i[o][(KK*BB + i)*8 +: 8];
        end else begin
          bank_rdata[b] <= mem[row[o]];
        end
      end
    end
  end

  // read response, one cycle after the grant
  logic [NUM_CH-1:0] rd_q;
  logic [GW-1:0]     rgrp_q [NUM_CH];
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_q <= '0;
      for (int c = 0; c < int'(NUM_CH); c++) rgrp_q[c] <= '0;
    end else begin
      for (int c = 0; c < int'(NUM_CH); c++) begin
        rd_q[c]   <= gnt_o[c] && !we_i[c];
        rgrp_q[c] <= grp[c];
      end
    end
  end
  assign rvalid_o = rd_q;
  always_comb begin
    for (int c = 0; c < int'(NUM_CH); c++)
      for (int k = 0; k < int'(K); k++)
        rdata_o[c][k*BANK_W +: BANK_W] = bank_rdata[int'(rgrp_q[c])*K + k];
  end
endmodule
