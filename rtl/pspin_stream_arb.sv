// pspin_stream_arb: N valid/ready streams merged into one by round-robin.
//
// The winner of pspin_rr_arbiter is forwarded combinationally; its ready is
// raised when the output is accepted, and the round-robin pointer then moves
// past it. Used for the per-cluster feedback and command arbiters, the
// inter-cluster feedback arbiter and the command unit's input and response
// selection.
module pspin_stream_arb #(
  parameter int unsigned N = 8,
  parameter type T = logic [31:0],
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic [N-1:0]  valid_i,
  output logic [N-1:0]  ready_o,
  input  T              data_i [N],
  output logic          valid_o,
  input  logic          ready_i,
  output T              data_o,
  output logic [IW-1:0] idx_o
);
  logic [N-1:0] gnt;

  pspin_rr_arbiter #(.N(N)) u_arb (
    .clk_i, .rst_ni, .req_i(valid_i), .advance_i(ready_i),
    .gnt_o(gnt), .idx_o(idx_o), .valid_o(valid_o)
  );

  assign data_o  = data_i[idx_o];
  assign ready_o = gnt & {N{ready_i}};
endmodule
