// tb_pspin_l2_mem: the L2 packet buffer at full size (4 MiB, 32 banks of
// 512 bit, four channels = two full-duplex ports). Random reads and partial
// writes on all four channels against a byte-level reference model. Checks
// read data, one-cycle read latency, that two channels hitting different
// banks are both granted in the same cycle (full bandwidth), and that two
// channels hitting the same bank are served one after the other.
module tb_pspin_l2_mem;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int CH = 4;
  localparam int BYTES = 4 << 20;
  logic [CH-1:0] req, we, gnt, rvalid;
  logic [21:0] addr [CH];
  logic [511:0] wdata [CH], rdata [CH];
  logic [63:0] be [CH];

  pspin_l2_mem #(.BYTES(BYTES), .NUM_BANKS(32), .BANK_W(512), .PORT_W(512), .NUM_CH(CH)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata),
    .be_i(be), .gnt_o(gnt), .rvalid_o(rvalid), .rdata_o(rdata));

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

  // reference: word address -> data (only words written are compared)
  logic [511:0] ref_mem [int];
  bit [CH-1:0] pend_rd;
  int pend_w [CH];
  int both_granted = 0, conflicts = 0;
  int words [16];

  initial begin
    req = '0; we = '0;
    for (int c = 0; c < CH; c++) begin addr[c] = '0; wdata[c] = '0; be[c] = '0; end
    for (int i = 0; i < 16; i++) words[i] = $urandom % (BYTES / 64);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initialise the working set with full writes on channel 0
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      req = 4'b0001; we = 4'b0001; addr[0] = 22'(words[i] * 64);
      wdata[0] = {16{$urandom}}; be[0] = '1;
      ref_mem[words[i]] = wdata[0];
      #1 while (!gnt[0]) begin @(negedge clk); #1; end
    end
    @(negedge clk); req = '0;
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      bit [CH-1:0] used_bank;
      @(negedge clk);
      for (int c = 0; c < CH; c++) begin
        req[c] = $urandom % 2;
        we[c]  = (c % 2 == 0);            // even channels write, odd read (full duplex ports)
        pend_w[c] = words[$urandom % 16];
        addr[c] = 22'(pend_w[c] * 64);
        wdata[c] = {16{$urandom}};
        be[c] = {$urandom, $urandom};
      end
      // avoid two writers or a reader and a writer on the same word in one cycle
      for (int c = 1; c < CH; c++)
        for (int d = 0; d < c; d++) if (req[d] && pend_w[c] == pend_w[d]) req[c] = 0;
      #1;
      // a channel that shares its word group with no other requester is granted;
      // two reads of one group are never granted together
      for (int c = 0; c < CH; c++) if (req[c]) begin
        bit alone;
        alone = 1;
        for (int d = 0; d < CH; d++) if (d != c && req[d] && (pend_w[c] % 32) == (pend_w[d] % 32)) alone = 0;
        if (alone) begin chk(gnt[c], "request on a free bank granted"); both_granted++; end
        for (int d = 0; d < c; d++)
          if (req[d] && !we[c] && !we[d] && (pend_w[c] % 32) == (pend_w[d] % 32)) begin
            chk(!(gnt[c] && gnt[d]), "same bank not granted twice");
            conflicts++;
          end
      end
      @(posedge clk);
      for (int c = 0; c < CH; c++) if (req[c] && gnt[c] && we[c]) begin
        for (int b = 0; b < 64; b++) if (be[c][b]) ref_mem[pend_w[c]][b*8 +: 8] = wdata[c][b*8 +: 8];
      end
      pend_rd = '0;
      for (int c = 0; c < CH; c++) if (req[c] && gnt[c] && !we[c]) pend_rd[c] = 1;
      @(negedge clk);
      for (int c = 0; c < CH; c++) if (pend_rd[c]) begin
        chk(rvalid[c], "rvalid one cycle after grant");
        chk(rdata[c] == ref_mem[pend_w[c]], $sformatf("read data ch%0d word %0d", c, pend_w[c]));
      end
      req = '0;
    end
    chk(both_granted > 100 && conflicts > 5, $sformatf("coverage %0d/%0d", both_granted, conflicts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
