// tb_pspin_prog_mem: the 32 KiB program memory. The host writes a code image
// with byte enables; instruction-cache refills read it back. Checks read data,
// one-cycle latency, host priority when both request, and that the refill
// is served in the next free cycle.
module tb_pspin_prog_mem;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] req, we, gnt, rvalid;
  logic [14:0] addr [2];
  logic [63:0] wdata [2], rdata;
  logic [7:0] be [2];
  pspin_prog_mem dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr),
    .wdata_i(wdata), .be_i(be), .gnt_o(gnt), .rvalid_o(rvalid), .rdata_o(rdata));
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
  logic [63:0] img [4096];
  initial begin
    req = '0; we = '0; addr = '{default: '0}; wdata = '{default: '0}; be = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      img[i] = {$urandom, $urandom};
      req = 2'b01; we = 2'b01; addr[0] = 15'(i * 8); wdata[0] = img[i]; be[0] = 8'hFF;
    end
    // partial overwrite of word 10
    @(negedge clk);
    addr[0] = 15'(80); wdata[0] = 64'hDEAD_BEEF_0000_0000; be[0] = 8'hF0;
    img[10][63:32] = 32'hDEAD_BEEF;
    @(negedge clk); req = 0;
    for (int t = 0; t < 500; t++) begin
      int a, b;
      @(negedge clk);
      a = $urandom % 4096; b = $urandom % 4096;
      req = 2'($urandom); we = 0; addr[0] = 15'(a * 8); addr[1] = 15'(b * 8);
      #1;
      if (req[0]) chk(gnt == 2'b01, "host has priority");
      else if (req[1]) chk(gnt == 2'b10, "refill granted when host idle");
      @(negedge clk);
      if (req[0]) chk(rvalid == 2'b01 && rdata == img[a], "host read");
      else if (req[1]) chk(rvalid == 2'b10 && rdata == img[b], "refill read");
      req = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
