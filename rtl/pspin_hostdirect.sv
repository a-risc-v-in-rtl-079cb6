// pspin_hostdirect: HostDirect unit.
//
// Executes HostDirect commands: the command carries a host address and 32 B of
// immediate data, which the unit writes to host memory as one WIDE_W-bit write
// whose byte enables select the 32 bytes at the address's offset within the
// wide word. After the host side accepts the write (wr_gnt_i) the unit returns
// a response with the command's ID. One command at a time: the command is
// accepted the cycle the unit is idle, the write is requested from the next
// cycle on, and the response follows the grant by one cycle.
//
// Document: HostDirect commands write 32 B of immediate data to a host memory
// address; they also carry handler error reports to the execution context.
// Own choices: the wide write format, the requirement that the 32 bytes do not
// cross a 64 B boundary (the address is aligned down to 32 B), one command in
// flight.
module pspin_hostdirect
  import pspin_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        cmd_valid_i,
  output logic        cmd_ready_o,
  input  cmd_t        cmd_i,
  output logic        resp_valid_o,
  input  logic        resp_ready_i,
  output cmd_resp_t   resp_o,
  // host write
  output logic        wr_req_o,
  output logic [63:0] wr_addr_o,      // WIDE_BYTES aligned
  output logic [WIDE_W-1:0] wr_data_o,
  output logic [WIDE_BYTES-1:0] wr_be_o,
  input  logic        wr_gnt_i
);
  typedef enum logic [1:0] {IDLE, WRITE, RESP} state_e;
  state_e state_q;
  cmd_t   cmd_q;
  logic   half;

  assign half        = cmd_q.dst_addr[5];
  assign cmd_ready_o = (state_q == IDLE);
  assign wr_req_o    = (state_q == WRITE);
  assign wr_addr_o   = {cmd_q.dst_addr[63:6], 6'd0};
  assign wr_data_o   = half ? {cmd_q.imm, 256'd0} : {256'd0, cmd_q.imm};
  assign wr_be_o     = half ? {32'hFFFF_FFFF, 32'd0} : {32'd0, 32'hFFFF_FFFF};
  assign resp_valid_o = (state_q == RESP);
  assign resp_o       = '{id: cmd_q.id, error: 1'b0};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= IDLE;
      cmd_q   <= '0;
    end else begin
      case (state_q)
        IDLE:  if (cmd_valid_i) begin cmd_q <= cmd_i; state_q <= WRITE; end
        WRITE: if (wr_gnt_i) state_q <= RESP;
        RESP:  if (resp_ready_i) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end
endmodule
