// pspin_rr_arbiter: round-robin arbiter.
//
// Among the asserted bits of req_i it grants the first one at or after the
// priority pointer; the pointer moves past the winner when advance_i is high
// (the winner's transfer happened). One grant per cycle, purely combinational
// from req_i to gnt_o/idx_o. The document uses round-robin arbiters to pick,
// every cycle, one HPU (and one cluster) that may send a completion
// notification and one that may issue a command; the pointer scheme is this
// design's choice.
module pspin_rr_arbiter #(
  parameter int unsigned N = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic [N-1:0]  req_i,
  input  logic          advance_i,
  output logic [N-1:0]  gnt_o,
  output logic [IW-1:0] idx_o,
  output logic          valid_o
);
  logic [IW-1:0] ptr_q;

  always_comb begin
    gnt_o   = '0;
    idx_o   = '0;
    valid_o = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr_q) + k) % N;
      if (!valid_o && req_i[i]) begin
        valid_o  = 1'b1;
        idx_o    = IW'(i);
        gnt_o[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                   ptr_q <= '0;
    else if (advance_i && valid_o) ptr_q <= (idx_o == IW'(N - 1)) ? '0 : idx_o + 1'b1;
  end
endmodule
