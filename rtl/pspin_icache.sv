// pspin_icache: the instruction cache shared by the HPUs of one cluster.
//
// BYTES of cache in WAYS ways of LINE-byte lines. NP fetch ports (one per HPU)
// look up the tags in parallel. A hit grants the fetch, and the 32-bit
// instruction word appears on rdata_o one cycle later with rvalid_o. A port
// that misses keeps its request up. The cache picks one missing line at a time,
// round-robin over the ports, and reads it from the program memory through the
// refill port in LINE/8 64-bit reads, which may be issued back to back. The
// line goes into the set's next way in round-robin order, and the waiting
// ports then hit. Ports that miss on the line being filled simply wait for it.
// Fetch addresses are byte addresses inside the program memory (word
// aligned); code is not written while it is cached, so there is no
// invalidation.
//
// Document: one cache per cluster, 4 KiB, 4-way set associative, 8 ports,
// refilled from the 32 KiB program memory through the PE interconnect. Own
// choices: 32-byte lines, round-robin replacement, one refill at a time, the
// port protocol.
module pspin_icache #(
  parameter int unsigned BYTES = 4096,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned LINE  = 32,
  parameter int unsigned NP    = pspin_pkg::NUM_HPUS,
  parameter int unsigned AW    = $clog2(pspin_pkg::PROG_BYTES),
  localparam int unsigned SETS = BYTES / (WAYS * LINE),
  localparam int unsigned OW   = $clog2(LINE),
  localparam int unsigned SW   = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned TW   = AW - OW - SW,
  localparam int unsigned WW   = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned NW   = LINE / 8,
  localparam int unsigned KW   = $clog2(NW) + 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  // fetch ports
  input  logic [NP-1:0] req_i,
  input  logic [AW-1:0] addr_i  [NP],
  output logic [NP-1:0] gnt_o,
  output logic [NP-1:0] rvalid_o,
  output logic [31:0]   rdata_o [NP],
  // refill port to the program memory
  output logic          rf_req_o,
  output logic [AW-1:0] rf_addr_o,
  input  logic          rf_gnt_i,
  input  logic          rf_rvalid_i,
  input  logic [63:0]   rf_rdata_i
);
  logic [LINE*8-1:0] data_q  [SETS][WAYS];
  logic [TW-1:0]     tag_q   [SETS][WAYS];
  logic [WAYS-1:0]   valid_q [SETS];
  logic [WW-1:0]     repl_q  [SETS];

  // ---------------- lookup ----------------
  logic [NP-1:0]  hit;
  logic [LINE*8-1:0] hit_line [NP];
  always_comb begin
    for (int p = 0; p < int'(NP); p++) begin
      logic [SW-1:0] s;
      logic [TW-1:0] t;
      s = addr_i[p][OW +: SW];
      t = addr_i[p][OW + SW +: TW];
      hit[p] = 1'b0;
      hit_line[p] = '0;
      for (int w = 0; w < int'(WAYS); w++) begin
        if (valid_q[s][w] && tag_q[s][w] == t) begin
          hit[p] = 1'b1;
          hit_line[p] = data_q[s][w];
        end
      end
    end
  end
  assign gnt_o = req_i & hit;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rvalid_o <= '0;
      for (int p = 0; p < int'(NP); p++) rdata_o[p] <= '0;
    end else begin
      rvalid_o <= gnt_o;
      for (int p = 0; p < int'(NP); p++)
        if (gnt_o[p]) rdata_o[p] <= hit_line[p][32 * int'(addr_i[p][OW-1:2]) +: 32];
    end
  end

  // ---------------- refill ----------------
  logic [NP-1:0]    miss;
  logic [NP-1:0]    miss_gnt;
  logic [$clog2(NP > 1 ? NP : 2)-1:0] miss_idx;
  logic             miss_any, busy_q, pick;
  logic [AW-OW-1:0] line_q;       // line address being filled
  logic [KW-1:0]    req_cnt_q, rsp_cnt_q;
  logic [LINE*8-1:0] buf_q;

  assign miss = req_i & ~hit;
  assign pick = !busy_q && miss_any;

  pspin_rr_arbiter #(.N(NP)) u_miss_arb (
    .clk_i, .rst_ni, .req_i(miss), .advance_i(pick), .gnt_o(miss_gnt),
    .idx_o(miss_idx), .valid_o(miss_any)
  );

  assign rf_req_o  = busy_q && (req_cnt_q != KW'(NW));
  assign rf_addr_o = {line_q, OW'(8 * int'(req_cnt_q))};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q <= 1'b0; line_q <= '0; req_cnt_q <= '0; rsp_cnt_q <= '0; buf_q <= '0;
      for (int s = 0; s < int'(SETS); s++) begin
        valid_q[s] <= '0;
        repl_q[s]  <= '0;
        for (int w = 0; w < int'(WAYS); w++) begin
          tag_q[s][w]  <= '0;
          data_q[s][w] <= '0;
        end
      end
    end else begin
      if (pick) begin
        busy_q    <= 1'b1;
        line_q    <= addr_i[miss_idx][AW-1:OW];
        req_cnt_q <= '0;
        rsp_cnt_q <= '0;
      end
      if (rf_req_o && rf_gnt_i) req_cnt_q <= req_cnt_q + 1'b1;
      if (busy_q && rf_rvalid_i) begin
        logic [LINE*8-1:0] nb;
        logic [SW-1:0]     s;
        nb = buf_q;
        nb[64 * int'(rsp_cnt_q) +: 64] = rf_rdata_i;
        buf_q     <= nb;
        rsp_cnt_q <= rsp_cnt_q + 1'b1;
        if (rsp_cnt_q == KW'(NW - 1)) begin
          s = line_q[SW-1:0];
          data_q[s][repl_q[s]]  <= nb;
          tag_q[s][repl_q[s]]   <= line_q[SW +: TW];
          valid_q[s][repl_q[s]] <= 1'b1;
          repl_q[s]             <= (repl_q[s] == WW'(WAYS - 1)) ? '0 : repl_q[s] + 1'b1;
          busy_q                <= 1'b0;
        end
      end
    end
  end
endmodule
