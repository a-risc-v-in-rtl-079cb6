// pspin_offcluster_dma: off-cluster DMA engine for handler DMA commands.
//
// A DMA command moves `length` bytes from a PsPIN address (L2 packet buffer or
// L2 handler memory) to a host address. The engine reads WIDE_W-bit words from
// the memory the source falls in, keeps up to FIFO_DEPTH words read but not yet
// written (requests in flight included), and writes them to the host write
// port in order, one per granted cycle, so reads and writes overlap. The last
// word's byte enables cover only the remaining bytes. When the last write is
// granted it returns a response with the command's ID; a source outside both
// memories ends the command at once with an error response.
//
// Document: an off-cluster DMA engine serves handler DMA commands towards host
// memory through the IOMMU, reading from the L2 memories. Own choices: source
// and destination WIDE_W/8-byte aligned, one command at a time, host-to-NIC
// transfers and L1 sources not supported.
module pspin_offcluster_dma
  import pspin_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        cmd_valid_i,
  output logic        cmd_ready_o,
  input  cmd_t        cmd_i,
  output logic        resp_valid_o,
  input  logic        resp_ready_i,
  output cmd_resp_t   resp_o,
  // read masters: 0 = L2 packet buffer, 1 = L2 handler memory (byte offsets)
  output logic [1:0]  rd_req_o,
  output logic [31:0] rd_addr_o,
  input  logic [1:0]  rd_gnt_i,
  input  logic [1:0]  rd_rvalid_i,
  input  logic [WIDE_W-1:0] rd_rdata_i [2],
  // host write
  output logic        wr_req_o,
  output logic [63:0] wr_addr_o,
  output logic [WIDE_W-1:0] wr_data_o,
  output logic [WIDE_BYTES-1:0] wr_be_o,
  input  logic        wr_gnt_i
);
  typedef enum logic [1:0] {IDLE, RUN, RESP} state_e;
  state_e state_q;
  cmd_id_t id_q;
  logic err_q;
  logic src_sel_q;
  logic [31:0] src_q;
  logic [63:0] dst_q;
  logic [31:0] req_left_q, wr_left_q, bytes_left_q;
  logic [$clog2(FIFO_DEPTH):0] credit_q;   // free FIFO slots not yet claimed by reads

  // source decode
  logic in_pkt, in_hnd;
  assign in_pkt = (cmd_i.src_addr >= L2_PKT_BASE) && (cmd_i.src_addr < L2_PKT_BASE + L2_PKT_BYTES);
  assign in_hnd = (cmd_i.src_addr >= L2_HND_BASE) && (cmd_i.src_addr < L2_HND_BASE + L2_HND_BYTES);

  logic rd_fire, rd_ret, wr_fire;
  logic f_valid;
  logic [WIDE_W-1:0] f_data;
  assign rd_req_o[0] = (state_q == RUN) && (req_left_q != 0) && (credit_q != 0) && !src_sel_q;
  assign rd_req_o[1] = (state_q == RUN) && (req_left_q != 0) && (credit_q != 0) &&  src_sel_q;
  assign rd_addr_o   = src_q;
  assign rd_fire     = |(rd_req_o & rd_gnt_i);
  assign rd_ret      = rd_rvalid_i[src_sel_q] && (state_q == RUN);

  pspin_fifo #(.DEPTH(FIFO_DEPTH), .T(logic [WIDE_W-1:0])) u_fifo (
    .clk_i, .rst_ni, .valid_i(rd_ret), .ready_o(), .data_i(rd_rdata_i[src_sel_q]),
    .valid_o(f_valid), .ready_i(wr_fire), .data_o(f_data), .count_o()
  );

  assign wr_req_o  = f_valid && (state_q == RUN);
  assign wr_addr_o = dst_q;
  assign wr_data_o = f_data;
  always_comb
    for (int i = 0; i < int'(WIDE_BYTES); i++) wr_be_o[i] = (32'(i) < bytes_left_q);
  assign wr_fire = wr_req_o && wr_gnt_i;

  assign cmd_ready_o  = (state_q == IDLE);
  assign resp_valid_o = (state_q == RESP);
  assign resp_o       = '{id: id_q, error: err_q};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= IDLE; id_q <= '0; err_q <= 1'b0; src_sel_q <= 1'b0;
      src_q <= '0; dst_q <= '0; req_left_q <= '0; wr_left_q <= '0; bytes_left_q <= '0;
      credit_q <= ($clog2(FIFO_DEPTH)+1)'(FIFO_DEPTH);
    end else begin
      case (state_q)
        IDLE: if (cmd_valid_i) begin
          logic [31:0] words;
          words        = (cmd_i.length + WIDE_BYTES - 1) / WIDE_BYTES;
          id_q         <= cmd_i.id;
          err_q        <= !(in_pkt || in_hnd);
          src_sel_q    <= in_hnd;
          src_q        <= cmd_i.src_addr - (in_hnd ? L2_HND_BASE : L2_PKT_BASE);
          dst_q        <= cmd_i.dst_addr;
          req_left_q   <= words;
          wr_left_q    <= words;
          bytes_left_q <= cmd_i.length;
          state_q      <= (!(in_pkt || in_hnd) || words == 0) ? RESP : RUN;
        end
        RUN: begin
          if (rd_fire) begin
            src_q      <= src_q + WIDE_BYTES;
            req_left_q <= req_left_q - 1;
          end
          credit_q <= credit_q - ($clog2(FIFO_DEPTH)+1)'(rd_fire) + ($clog2(FIFO_DEPTH)+1)'(wr_fire);
          if (wr_fire) begin
            dst_q        <= dst_q + 64'(WIDE_BYTES);
            wr_left_q    <= wr_left_q - 1;
            bytes_left_q <= (bytes_left_q > WIDE_BYTES) ? bytes_left_q - WIDE_BYTES : '0;
            if (wr_left_q == 1) state_q <= RESP;
          end
        end
        RESP: if (resp_ready_i) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end
endmodule
