// tb_pspin_offcluster_dma: DMA commands from the L2 packet buffer and the L2
// handler memory (model memories with one-cycle reads and random grant
// stalls) to a model host with random back-pressure. Checks every written
// word's address and data, byte enables of the last word, the response ID
// after the last write, an error response for a source outside L2, and that
// reads and writes overlap (a 16-word copy without stalls takes about 16
// cycles, not 48).
module tb_pspin_offcluster_dma;
  import pspin_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cv, cr, rv, rr, wreq, wgnt;
  cmd_t c; cmd_resp_t r;
  logic [1:0] rdreq, rdgnt, rdrv;
  logic [31:0] rdaddr;
  logic [511:0] rddata [2];
  logic [63:0] waddr; logic [511:0] wdata; logic [63:0] wbe;
  pspin_offcluster_dma dut (.clk_i(clk), .rst_ni(rst_n), .cmd_valid_i(cv), .cmd_ready_o(cr), .cmd_i(c),
    .resp_valid_o(rv), .resp_ready_i(rr), .resp_o(r), .rd_req_o(rdreq), .rd_addr_o(rdaddr),
    .rd_gnt_i(rdgnt), .rd_rvalid_i(rdrv), .rd_rdata_i(rddata),
    .wr_req_o(wreq), .wr_addr_o(waddr), .wr_data_o(wdata), .wr_be_o(wbe), .wr_gnt_i(wgnt));
  task automatic chk(bit cc, string m);
    checks++;
    if (!cc) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [511:0] word(int mem, int off);
    return {16{32'(mem * 32'h1000_0000 + off)}};
  endfunction
  bit stall = 0, g0 = 1, g1 = 1;
  always @(negedge clk) begin g0 <= !stall || ($urandom % 2); g1 <= !stall || ($urandom % 2); end
  assign rdgnt = rdreq & {g1, g0};
  assign wgnt  = wreq && g1;
  always @(posedge clk) begin
    rdrv <= rdreq & rdgnt;
    for (int m = 0; m < 2; m++) rddata[m] <= word(m, int'(rdaddr));
  end

  task automatic run(int src, int len, bit st, output int cycles);
    int mem, off, k;
    mem = (src >= int'(L2_HND_BASE)) ? 1 : 0;
    off = src - (mem ? int'(L2_HND_BASE) : int'(L2_PKT_BASE));
    stall = st;
    @(negedge clk);
    c = '0; c.kind = CMD_DMA; c.id.hpu = 3; c.id.cluster = 1; c.src_addr = 32'(src);
    c.dst_addr = 64'h0000_0002_0000_0000 + 64'(len); c.length = 32'(len);
    cv = 1;
    @(negedge clk); cv = 0;
    k = 0; cycles = 1;
    while (!rv && cycles < 500) begin
      #1;
      if (wreq && wgnt) begin
        chk(waddr == c.dst_addr + 64'(k * 64), "write address");
        chk(wdata == word(mem, off + k * 64), $sformatf("write data word %0d", k));
        if ((k + 1) * 64 >= len) chk(wbe == ((len % 64 == 0) ? '1 : (64'(1) << (len % 64)) - 1), "last byte enables");
        else chk(wbe == '1, "full byte enables");
        k++;
      end
      @(negedge clk); cycles++;
    end
    chk(rv && r.id == c.id && !r.error && k == (len + 63) / 64, $sformatf("response after %0d writes", k));
    @(negedge clk);
  endtask

  initial begin
    int cyc;
    cv = 0; c = '0; rr = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(int'(L2_PKT_BASE) + 4096, 1024, 0, cyc);
    chk(cyc <= 22, $sformatf("16 words in %0d cycles (overlapped)", cyc));
    run(int'(L2_HND_BASE) + 640, 200, 1, cyc);
    run(int'(L2_PKT_BASE), 1500, 1, cyc);
    // outside both memories
    @(negedge clk);
    c = '0; c.kind = CMD_DMA; c.id.hpu = 7; c.src_addr = 32'h0000_1000; c.length = 64; cv = 1;
    @(negedge clk); cv = 0;
    #1 chk(rv && r.error && r.id.hpu == 7, "error response for a bad source");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
