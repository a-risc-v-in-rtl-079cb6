// pspin_cluster_dma: cluster-local DMA engine, L2 packet buffer to L1.
//
// Takes one copy job at a time (src in the L2 packet buffer, dst in L1, length
// in bytes) and moves it in WIDE_W-bit words: a read request is issued every
// cycle it is granted, so many words are in flight at once, and every returned
// word is written to L1 on the cycle it arrives (the L1 wide port is never
// stalled). The last word's byte enables cover only the remaining bytes. done_o
// pulses in the cycle the last word is written. A zero-length job completes
// one cycle after it is accepted.
//
// Document: a per-cluster DMA engine copies packets from L2 to L1 in bursts
// over 512-bit connections. Own choices: src and dst must be WIDE_W/8-byte
// aligned, one job at a time, read responses return in request order.
module pspin_cluster_dma #(
  parameter int unsigned WIDE_W = pspin_pkg::WIDE_W,
  parameter int unsigned L2_AW  = 32,
  parameter int unsigned L1_AW  = 20,
  localparam int unsigned WB    = WIDE_W / 8
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // job
  input  logic              job_valid_i,
  output logic              job_ready_o,
  input  logic [L2_AW-1:0]  job_src_i,
  input  logic [L1_AW-1:0]  job_dst_i,
  input  logic [15:0]       job_len_i,
  output logic              done_o,
  // L2 read master
  output logic              l2_req_o,
  output logic [L2_AW-1:0]  l2_addr_o,
  input  logic              l2_gnt_i,
  input  logic              l2_rvalid_i,
  input  logic [WIDE_W-1:0] l2_rdata_i,
  // L1 wide write master
  output logic              l1_req_o,
  output logic [L1_AW-1:0]  l1_addr_o,
  output logic [WIDE_W-1:0] l1_wdata_o,
  output logic [WB-1:0]     l1_be_o
);
  logic             busy_q;
  logic [L2_AW-1:0] src_q;
  logic [L1_AW-1:0] dst_q;
  logic [15:0]      req_left_q;   // words still to request
  logic [15:0]      rsp_left_q;   // words still to receive
  logic [15:0]      bytes_left_q; // bytes still to write

  logic [15:0] words;
  assign words       = 16'((32'(job_len_i) + WB - 1) / WB);
  assign job_ready_o = !busy_q;

  assign l2_req_o  = busy_q && (req_left_q != 0);
  assign l2_addr_o = src_q;

  assign l1_req_o   = l2_rvalid_i && busy_q;
  assign l1_addr_o  = dst_q;
  assign l1_wdata_o = l2_rdata_i;
  always_comb begin
    for (int i = 0; i < int'(WB); i++) l1_be_o[i] = (16'(i) < bytes_left_q);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q <= 1'b0; src_q <= '0; dst_q <= '0;
      req_left_q <= '0; rsp_left_q <= '0; bytes_left_q <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (!busy_q) begin
        if (job_valid_i) begin
          if (words == 0) begin
            done_o <= 1'b1;
          end else begin
            busy_q       <= 1'b1;
            src_q        <= job_src_i;
            dst_q        <= job_dst_i;
            req_left_q   <= words;
            rsp_left_q   <= words;
            bytes_left_q <= job_len_i;
          end
        end
      end else begin
        if (l2_req_o && l2_gnt_i) begin
          src_q      <= src_q + L2_AW'(WB);
          req_left_q <= req_left_q - 1'b1;
        end
        if (l2_rvalid_i) begin
          dst_q        <= dst_q + L1_AW'(WB);
          rsp_left_q   <= rsp_left_q - 1'b1;
          bytes_left_q <= (bytes_left_q > 16'(WB)) ? bytes_left_q - 16'(WB) : '0;
          if (rsp_left_q == 16'd1) begin
            busy_q <= 1'b0;
            done_o <= 1'b1;
          end
        end
      end
    end
  end
endmodule
