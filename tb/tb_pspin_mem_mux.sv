// tb_pspin_mem_mux: three masters share one channel of a model memory that
// grants at random and answers reads one cycle after the grant. Every read
// must come back to the master that issued it with the right data; a master
// that keeps requesting waits at most two other grants (round-robin).
module tb_pspin_mem_mux;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 3;
  logic [N-1:0] req, we, gnt, rvalid;
  logic [15:0] addr [N];
  logic [31:0] wdata [N], rdata;
  logic [3:0] be [N];
  logic mreq, mwe, mgnt, mrv;
  logic [15:0] maddr;
  logic [31:0] mwdata, mrdata;
  logic [3:0] mbe;
  pspin_mem_mux #(.N(N), .AW(16), .DW(32)) dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we),
    .addr_i(addr), .wdata_i(wdata), .be_i(be), .gnt_o(gnt), .rvalid_o(rvalid), .rdata_o(rdata),
    .m_req_o(mreq), .m_we_o(mwe), .m_addr_o(maddr), .m_wdata_o(mwdata), .m_be_o(mbe),
    .m_gnt_i(mgnt), .m_rvalid_i(mrv), .m_rdata_i(mrdata));
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
  // memory model: data = f(addr)
  bit gok = 1;
  always @(negedge clk) gok <= ($urandom % 4 != 0);
  assign mgnt = mreq && gok;
  always @(posedge clk) begin
    mrv <= mreq && mgnt && !mwe;
    mrdata <= {16'hA5A5, maddr};
  end
  int waits [N];
  int rd_exp [N][$];
  logic [N-1:0] gnt_q = '0;
  always @(posedge clk) gnt_q <= req & gnt;
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < N; m++) begin
      if (rvalid[m]) begin
        chk(rd_exp[m].size() > 0 && rdata == {16'hA5A5, 16'(rd_exp[m][0])}, $sformatf("read return to master %0d", m));
        if (rd_exp[m].size() > 0) void'(rd_exp[m].pop_front());
      end
      if (req[m] && gnt[m]) begin
        if (!we[m]) rd_exp[m].push_back(int'(addr[m]));
        chk(waits[m] <= N - 1, $sformatf("master %0d passed over %0d times", m, waits[m]));
        waits[m] = 0;
      end else if (req[m] && (|gnt)) waits[m]++;
    end
  end
  initial begin
    req = '0; we = '0; addr = '{default: '0}; wdata = '{default: '0}; be = '{default: '0};
    for (int m = 0; m < N; m++) waits[m] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int m = 0; m < N; m++)
        if (!req[m] || gnt_q[m]) begin
          req[m] = ($urandom % 4 != 0); we[m] = ($urandom % 3 == 0); addr[m] = 16'($urandom);
        end
    end
    @(negedge clk); req = '0;
    repeat (3) @(negedge clk);
    for (int m = 0; m < N; m++) chk(rd_exp[m].size() == 0, "all reads returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
