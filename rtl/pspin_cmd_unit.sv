// pspin_cmd_unit: command unit between the clusters and the command
// executors.
//
// One command per cycle is taken from the clusters by round-robin and sent,
// by its kind, to the NIC outbound engine (NIC commands), the off-cluster DMA
// engine (DMA commands) or the HostDirect unit (HostDirect commands). A
// command waits while its executor is not ready, which blocks the issuing
// handler. Responses of the three executors are merged by round-robin and
// returned to the cluster named in the command ID; clusters always accept
// responses.
//
// Document: three command kinds, their three executors, responses that tell
// handlers about completion or errors. Own choices: one command and one
// response per cycle, round-robin on both sides, no buffering.
module pspin_cmd_unit
  import pspin_pkg::*;
#(
  parameter int unsigned NCL = NUM_CLUSTERS
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // from clusters
  input  logic [NCL-1:0] cl_cmd_valid_i,
  output logic [NCL-1:0] cl_cmd_ready_o,
  input  cmd_t        cl_cmd_i [NCL],
  output logic [NCL-1:0] cl_resp_valid_o,
  output cmd_resp_t   cl_resp_o,
  // executors: 0 = NIC outbound, 1 = off-cluster DMA, 2 = HostDirect
  output logic [2:0]  ex_cmd_valid_o,
  input  logic [2:0]  ex_cmd_ready_i,
  output cmd_t        ex_cmd_o,
  input  logic [2:0]  ex_resp_valid_i,
  output logic [2:0]  ex_resp_ready_o,
  input  cmd_resp_t   ex_resp_i [3]
);
  logic sel_valid;
  cmd_t sel_cmd;
  logic [1:0] ex;
  logic sel_ready;

  pspin_stream_arb #(.N(NCL), .T(cmd_t)) u_cmd_arb (
    .clk_i, .rst_ni, .valid_i(cl_cmd_valid_i), .ready_o(cl_cmd_ready_o), .data_i(cl_cmd_i),
    .valid_o(sel_valid), .ready_i(sel_ready), .data_o(sel_cmd), .idx_o()
  );

  always_comb begin
    case (sel_cmd.kind)
      CMD_NIC:        ex = 2'd0;
      CMD_DMA:        ex = 2'd1;
      default:        ex = 2'd2;
    endcase
    ex_cmd_valid_o     = '0;
    ex_cmd_valid_o[ex] = sel_valid;
  end
  assign sel_ready = ex_cmd_ready_i[ex];
  assign ex_cmd_o  = sel_cmd;

  logic      r_valid;
  cmd_resp_t r_sel;
  pspin_stream_arb #(.N(3), .T(cmd_resp_t)) u_resp_arb (
    .clk_i, .rst_ni, .valid_i(ex_resp_valid_i), .ready_o(ex_resp_ready_o), .data_i(ex_resp_i),
    .valid_o(r_valid), .ready_i(1'b1), .data_o(r_sel), .idx_o()
  );

  always_comb begin
    cl_resp_valid_o = '0;
    cl_resp_valid_o[r_sel.id.cluster] = r_valid;
  end
  assign cl_resp_o = r_sel;
endmodule
