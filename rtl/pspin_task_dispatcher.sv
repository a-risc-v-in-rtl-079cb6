// pspin_task_dispatcher: chooses the processing cluster for each task.
//
// A cluster can take a task when its L1 packet buffer has room for the bytes
// the task copies to L1 (reported by each cluster as free_bytes_i). The
// dispatcher tries the message's home cluster (message ID modulo the number of
// clusters); if the home cluster cannot accept it, it picks the cluster with
// the most free bytes (least loaded); if no cluster has room it blocks, which
// back-pressures the MPQ engine and, through it, the NIC inbound engine.
// One task per cycle; the choice is registered (one cycle latency).
//
// Document: home-cluster rule, least-loaded fallback, blocking. Own choices:
// "load" measured as free packet-buffer bytes, copy size rounded up to 64 B,
// ties resolved towards the lowest cluster index. The choice is final: if the
// chosen cluster then refuses the task (its space was taken meanwhile) the
// output register waits for it.
module pspin_task_dispatcher
  import pspin_pkg::*;
#(
  parameter int unsigned NCL = NUM_CLUSTERS
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        task_valid_i,
  output logic        task_ready_o,
  input  task_t       task_i,
  input  logic [31:0] free_bytes_i [NCL],
  output logic [NCL-1:0] cl_valid_o,
  input  logic [NCL-1:0] cl_ready_i,
  output task_t       cl_task_o
);
  localparam int unsigned CW = (NCL > 1) ? $clog2(NCL) : 1;

  // L1 bytes a task needs: copy length rounded up to whole 64 B words
  function automatic logic [31:0] need_bytes(task_t t);
    logic [31:0] n;
    n = (t.her.ectx.l1_copy_bytes < t.her.pkt_size) ? 32'(t.her.ectx.l1_copy_bytes)
                                                    : 32'(t.her.pkt_size);
    return (n + 32'(WIDE_BYTES - 1)) & ~32'(WIDE_BYTES - 1);
  endfunction

  logic          out_valid_q;
  logic [CW-1:0] out_cl_q;
  task_t         out_task_q;
  logic          out_free;
  logic [31:0]   need;
  logic [31:0]   avail [NCL];
  logic          found;
  logic [CW-1:0] pick;

  assign need     = need_bytes(task_i);
  assign out_free = !out_valid_q || cl_ready_i[out_cl_q];

  always_comb begin
    logic [CW-1:0] home;
    logic [31:0]   best;
    for (int c = 0; c < int'(NCL); c++) avail[c] = free_bytes_i[c];
    home  = CW'(task_i.her.msgid % NCL);
    found = 1'b0;
    pick  = home;
    best  = '0;
    if (avail[home] >= need) begin
      found = 1'b1;
    end else begin
      for (int c = 0; c < int'(NCL); c++) begin
        if (avail[c] >= need && (!found || avail[c] > best)) begin
          found = 1'b1;
          pick  = CW'(c);
          best  = avail[c];
        end
      end
    end
  end

  assign task_ready_o = out_free && found;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      out_valid_q <= 1'b0;
      out_cl_q    <= '0;
      out_task_q  <= '0;
    end else if (out_free) begin
      out_valid_q <= task_valid_i && found;
      if (task_valid_i && found) begin
        out_cl_q   <= pick;
        out_task_q <= task_i;
      end
    end
  end

  always_comb begin
    cl_valid_o = '0;
    cl_valid_o[out_cl_q] = out_valid_q;
  end
  assign cl_task_o = out_task_q;
endmodule
