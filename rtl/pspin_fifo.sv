// pspin_fifo: synchronous first-in first-out buffer of DEPTH entries of type T.
// push when valid_i && ready_o (ready_o = not full); the head is shown on
// data_o while valid_o; pop when valid_o && ready_i. No fall-through: an entry
// is visible the cycle after it is pushed. Reset empties it.
module pspin_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter type T = logic [31:0],
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic valid_i,
  output logic ready_o,
  input  T     data_i,
  output logic valid_o,
  input  logic ready_i,
  output T     data_o,
  output logic [AW:0] count_o
);
  T              mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [AW:0]   cnt_q;
  logic push, pop;

  assign ready_o = (cnt_q != (AW+1)'(DEPTH));
  assign valid_o = (cnt_q != 0);
  assign data_o  = mem[rd_q];
  assign count_o = cnt_q;
  assign push    = valid_i && ready_o;
  assign pop     = valid_o && ready_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_q <= '0; wr_q <= '0; cnt_q <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wr_q] <= data_i;
        wr_q <= (wr_q == AW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      end
      if (pop) rd_q <= (rd_q == AW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
    end
  end
endmodule
