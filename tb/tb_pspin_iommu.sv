// tb_pspin_iommu: programs page mappings, then sends writes. Checks that a
// mapped address is translated (page number replaced, offset kept) and
// forwarded with its data, that grant follows the host side, that an unmapped
// address is dropped with a fault, and that invalidating an entry removes it.
module tb_pspin_iommu;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we, v, ireq, igt, oreq, ogt, fault;
  logic [3:0] idx;
  logic [51:0] vpn, ppn;
  logic [63:0] iaddr, oaddr, faddr;
  logic [511:0] idata, odata;
  logic [63:0] ibe, obe;
  pspin_iommu dut (.clk_i(clk), .rst_ni(rst_n), .cfg_we_i(we), .cfg_idx_i(idx), .cfg_valid_i(v),
    .cfg_vpn_i(vpn), .cfg_ppn_i(ppn), .in_req_i(ireq), .in_addr_i(iaddr), .in_data_i(idata),
    .in_be_i(ibe), .in_gnt_o(igt), .out_req_o(oreq), .out_addr_o(oaddr), .out_data_o(odata),
    .out_be_o(obe), .out_gnt_i(ogt), .fault_o(fault), .fault_addr_o(faddr));
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
  logic [51:0] vp [16], pp [16];
  initial begin
    we = 0; v = 0; idx = 0; vpn = 0; ppn = 0; ireq = 0; iaddr = 0; idata = 0; ibe = 0; ogt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 16; e++) begin
      @(negedge clk);
      vp[e] = {20'h7F, 32'(e * 3 + 1)}; pp[e] = {20'h0, 32'($urandom)};
      we = 1; idx = 4'(e); v = 1; vpn = vp[e]; ppn = pp[e];
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 200; t++) begin
      int e;
      bit mapped;
      @(negedge clk);
      e = $urandom % 16;
      mapped = ($urandom % 4 != 0);
      iaddr = mapped ? {vp[e], 12'($urandom)} : {20'h3, 32'($urandom), 12'h0};
      idata = {16{$urandom}}; ibe = {$urandom, $urandom}; ireq = 1; ogt = $urandom % 2;
      #1;
      if (mapped) begin
        chk(oreq && oaddr == {pp[e], iaddr[11:0]} && odata == idata && obe == ibe && !fault, "translated");
        chk(igt == ogt, "grant from host side");
      end else chk(!oreq && fault && faddr == iaddr && igt, "unmapped write dropped with fault");
    end
    // invalidate entry 5
    @(negedge clk); ireq = 0; we = 1; idx = 5; v = 0;
    @(negedge clk); we = 0; iaddr = {vp[5], 12'h10}; ireq = 1;
    #1 chk(fault && !oreq, "invalidated entry no longer translates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
