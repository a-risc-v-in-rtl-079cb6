// pspin_mpq_monitor: detects messages whose packets stopped arriving.
//
// Every MPQ that receives a packet (touch_i) is moved to the most-recently-used
// side of a tree pseudo-LRU (NUM_MPQ-1 direction bits). The candidate victim is
// found by walking the tree from the root, following each node's bit but
// turning to the other subtree when the pointed-to one holds no active MPQ, so
// the victim is always an active MPQ when there is one. If the victim has not
// been touched for more than its threshold (taken from the execution context of
// the HER that last touched it), timeout_o is raised for one cycle with its
// index; the MPQ engine then resets that MPQ. The pseudo-LRU over active MPQs
// and the per-context threshold follow the document; the tree walk, the
// per-MPQ timestamps and the one-check-per-cycle rate are this design's own.
// NUM_MPQ must be a power of two.
module pspin_mpq_monitor #(
  parameter int unsigned NUM_MPQ = pspin_pkg::NUM_MPQ,
  localparam int unsigned W = $clog2(NUM_MPQ)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               touch_i,
  input  logic [W-1:0]       touch_idx_i,
  input  logic [31:0]        touch_thr_i,   // cycles
  input  logic [NUM_MPQ-1:0] active_i,
  output logic               timeout_o,
  output logic [W-1:0]       timeout_idx_o
);
  logic [31:0]        now_q;
  logic [31:0]        last_q [NUM_MPQ];
  logic [31:0]        thr_q  [NUM_MPQ];
  logic [NUM_MPQ-2:0] plru_q;               // heap-ordered node bits, 1 = victim on the right
  logic [2*NUM_MPQ-2:0] sub_act;            // heap-ordered: any active MPQ below node

  // subtree activity, leaves at heap index NUM_MPQ-1+i
  always_comb begin
    for (int i = 0; i < int'(NUM_MPQ); i++) sub_act[NUM_MPQ-1+i] = active_i[i];
    for (int n = int'(NUM_MPQ) - 2; n >= 0; n--) sub_act[n] = sub_act[2*n+1] | sub_act[2*n+2];
  end

  // victim walk
  logic [W-1:0] victim;
  always_comb begin
    int n;
    logic go_right;
    n = 0;
    victim = '0;
    for (int l = 0; l < int'(W); l++) begin
      go_right = plru_q[n];
      if (go_right && !sub_act[2*n+2]) go_right = 1'b0;
      else if (!go_right && !sub_act[2*n+1]) go_right = 1'b1;
      victim = {victim[W-2:0], go_right};
      n = 2*n + 1 + int'(go_right);
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      now_q  <= '0;
      plru_q <= '0;
      for (int i = 0; i < int'(NUM_MPQ); i++) begin
        last_q[i] <= '0;
        thr_q[i]  <= '1;
      end
    end else begin
      now_q <= now_q + 1;
      if (touch_i) begin
        int n;
        last_q[touch_idx_i] <= now_q;
        thr_q[touch_idx_i]  <= touch_thr_i;
        // point every node on the path away from the touched MPQ
        n = 0;
        for (int l = 0; l < int'(W); l++) begin
          plru_q[n] <= ~touch_idx_i[W-1-l];
          n = 2*n + 1 + int'(touch_idx_i[W-1-l]);
        end
      end
    end
  end

  assign timeout_idx_o = victim;
  assign timeout_o     = active_i[victim] && ((now_q - last_q[victim]) > thr_q[victim]);
endmodule
