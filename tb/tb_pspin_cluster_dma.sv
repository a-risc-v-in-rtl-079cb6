// tb_pspin_cluster_dma: the cluster DMA engine between a model L2 (one-cycle
// read latency, random grant stalls) and a model L1. Copies of several lengths
// (including a partial last word and zero) are checked byte for byte, with
// bytes past the end untouched; with a memory that always grants, a copy of N
// words must signal done N+2 cycles after it is accepted (one word per cycle).
module tb_pspin_cluster_dma;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic jv, jr, done, l2req, l2gnt, l2rv, l1req;
  logic [31:0] jsrc, l2addr;
  logic [19:0] jdst, l1addr;
  logic [15:0] jlen;
  logic [511:0] l2rd, l1wd;
  logic [63:0] l1be;

  pspin_cluster_dma dut (.clk_i(clk), .rst_ni(rst_n), .job_valid_i(jv), .job_ready_o(jr),
    .job_src_i(jsrc), .job_dst_i(jdst), .job_len_i(jlen), .done_o(done),
    .l2_req_o(l2req), .l2_addr_o(l2addr), .l2_gnt_i(l2gnt), .l2_rvalid_i(l2rv), .l2_rdata_i(l2rd),
    .l1_req_o(l1req), .l1_addr_o(l1addr), .l1_wdata_o(l1wd), .l1_be_o(l1be));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] l2byte(int a);
    return 8'((a * 7 + (a >> 8)) ^ 8'h5A);
  endfunction

  logic [7:0] l1 [int];
  bit stall = 0;
  bit gok = 1;
  always @(negedge clk) gok <= !(stall && ($urandom % 2));
  assign l2gnt = l2req && gok;
  always @(posedge clk) begin
    l2rv <= l2req && l2gnt;
    for (int b = 0; b < 64; b++) l2rd[b*8 +: 8] <= l2byte(int'(l2addr) + b);
    if (l1req) for (int b = 0; b < 64; b++) if (l1be[b]) l1[int'(l1addr) + b] = l1wd[b*8 +: 8];
  end

  task automatic copy(int src, int dst, int len, bit st, output int cycles);
    stall = st;
    l1.delete();
    @(negedge clk);
    jv = 1; jsrc = 32'(src); jdst = 20'(dst); jlen = 16'(len);
    #1 chk(jr, "engine idle");
    @(negedge clk); jv = 0;
    cycles = 1;
    while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
    for (int b = 0; b < len; b++)
      chk(l1.exists(dst + b) && l1[dst + b] == l2byte(src + b), $sformatf("byte %0d of %0d", b, len));
    chk(!l1.exists(dst + len), "no byte past the end written");
  endtask

  initial begin
    int cyc;
    jv = 0; jsrc = '0; jdst = '0; jlen = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    copy(64 * 10, 64 * 3, 64, 0, cyc);
    chk(cyc == 3, $sformatf("1 word in %0d cycles", cyc));
    copy(64 * 100, 64 * 50, 1024, 0, cyc);
    chk(cyc == 18, $sformatf("16 words in %0d cycles", cyc));
    copy(64 * 7, 0, 100, 1, cyc);
    copy(64 * 9, 640, 1500, 1, cyc);
    copy(0, 0, 0, 0, cyc);
    chk(cyc <= 2, "zero-length job completes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
