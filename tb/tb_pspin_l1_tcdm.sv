// tb_pspin_l1_tcdm: the 1 MiB L1 with 8 narrow HPU ports and the wide DMA
// port. Random narrow reads/writes with byte enables and wide DMA writes and
// reads are checked against a byte reference. Checks single-cycle access
// (rvalid the cycle after the grant), word interleaving (eight HPUs on eight
// different banks are all granted in one cycle), round-robin on a shared bank
// (each of the eight contenders is served within eight cycles) and DMA
// priority on the banks it covers.
module tb_pspin_l1_tcdm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] req, we, gnt, rvalid;
  logic [19:0] addr [8];
  logic [31:0] wdata [8], rdata [8];
  logic [3:0] be [8];
  logic wreq, wwe, wgnt, wrvalid;
  logic [19:0] waddr;
  logic [511:0] wwdata, wrdata;
  logic [63:0] wbe;

  pspin_l1_tcdm dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr),
    .wdata_i(wdata), .be_i(be), .gnt_o(gnt), .rvalid_o(rvalid), .rdata_o(rdata),
    .w_req_i(wreq), .w_we_i(wwe), .w_addr_i(waddr), .w_wdata_i(wwdata), .w_be_i(wbe),
    .w_gnt_o(wgnt), .w_rvalid_o(wrvalid), .w_rdata_o(wrdata));

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

  logic [31:0] ref_w [int];   // word index -> data
  int region = 1024;          // words under test (16 rows of 64 banks)

  initial begin
    req = '0; we = '0; wreq = 0; wwe = 0; waddr = '0; wwdata = '0; wbe = '0;
    for (int p = 0; p < 8; p++) begin addr[p] = '0; wdata[p] = '0; be[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill the region with DMA writes (16 words per write)
    for (int i = 0; i < region / 16; i++) begin
      @(negedge clk);
      wreq = 1; wwe = 1; waddr = 20'(i * 64); wwdata = {16{$urandom}}; wbe = '1;
      for (int k = 0; k < 16; k++) ref_w[i * 16 + k] = wwdata[k*32 +: 32];
    end
    @(negedge clk); wreq = 0;
    // all eight HPUs on distinct banks: all granted
    for (int p = 0; p < 8; p++) begin req[p] = 1; we[p] = 0; addr[p] = 20'((p * 3) * 4); end
    #1 chk(gnt == 8'hFF, "distinct banks all granted");
    @(negedge clk);
    for (int p = 0; p < 8; p++) chk(rvalid[p] && rdata[p] == ref_w[p * 3], "parallel read data");
    // all eight on bank 5 (different rows): every one served within 8 cycles
    begin
      bit [7:0] served;
      served = '0;
      for (int p = 0; p < 8; p++) begin req[p] = 1; we[p] = 0; addr[p] = 20'((5 + 64 * p) * 4); end
      for (int c = 0; c < 8; c++) begin
        #1 chk($countones(gnt) == 1, "one grant per bank per cycle");
        served |= gnt;
        @(negedge clk);
        for (int p = 0; p < 8; p++) if (rvalid[p]) chk(rdata[p] == ref_w[5 + 64 * p], "shared-bank read data");
        req &= ~served;
      end
      chk(served == 8'hFF, "round-robin served all eight");
      req = '0;
    end
    // DMA priority: DMA covers banks 32..47, HPU 0 wants bank 35
    @(negedge clk);
    wreq = 1; wwe = 0; waddr = 20'(64 * 2);
    req = 8'b1; we = 0; addr[0] = 20'(35 * 4);
    #1 chk(wgnt && !gnt[0], "DMA has priority on its banks");
    @(negedge clk);
    wreq = 0;
    for (int k = 0; k < 16; k++) chk(wrdata[k*32 +: 32] == ref_w[2 * 16 + k], "DMA read data");
    #1 chk(gnt[0], "HPU granted after DMA");
    @(negedge clk); req = '0;
    // random narrow traffic
    for (int t = 0; t < 2000; t++) begin
      int w [8];
      bit [7:0] rd;
      @(negedge clk);
      for (int p = 0; p < 8; p++) begin
        bit dup;
        w[p] = $urandom % region;
        dup = 0;
        for (int q = 0; q < p; q++) if (w[q] == w[p]) dup = 1;
        req[p] = !dup && ($urandom % 2);
        we[p] = $urandom % 2; addr[p] = 20'(w[p] * 4); wdata[p] = $urandom; be[p] = 4'($urandom);
      end
      @(posedge clk);
      rd = '0;
      for (int p = 0; p < 8; p++) if (req[p] && gnt[p]) begin
        if (we[p]) begin for (int b = 0; b < 4; b++) if (be[p][b]) ref_w[w[p]][b*8 +: 8] = wdata[p][b*8 +: 8]; end
        else rd[p] = 1;
      end
      @(negedge clk);
      for (int p = 0; p < 8; p++) if (rd[p]) chk(rvalid[p] && rdata[p] == ref_w[w[p]], "random read data");
      req = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
