// tb_pspin_icache: eight fetch ports against a model program memory (one-cycle
// reads, random grant stalls). Ports fetch random words, mostly from a small
// working set and sometimes from anywhere in the 32 KiB. Checks every fetched
// word against the memory pattern, that a request is granted only when its
// line is present, that the first fetch of a line misses and a repeat fetch
// right after hits, that a line refill reads exactly its four 64-bit words,
// and that five lines mapping to one set evict the oldest (4 ways).
module tb_pspin_icache;
  localparam int NP = 8, AW = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(bit cc, string m);
    checks++;
    if (!cc) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, m); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [NP-1:0] req, gnt, rv;
  logic [AW-1:0] addr [NP];
  logic [31:0] rd [NP];
  logic rfq, rfg, rfv; logic [AW-1:0] rfa; logic [63:0] rfd;
  pspin_icache dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .addr_i(addr), .gnt_o(gnt),
    .rvalid_o(rv), .rdata_o(rd), .rf_req_o(rfq), .rf_addr_o(rfa), .rf_gnt_i(rfg),
    .rf_rvalid_i(rfv), .rf_rdata_i(rfd));
  function automatic logic [31:0] pat(int a);
    return 32'(a) * 32'h2545_F491 + 32'h1234_5678;
  endfunction
  int n_refill_words = 0;
  always @(posedge clk) begin
    if (!rst_n) begin rfg <= 0; rfv <= 0; rfd <= '0; end
    else begin
      rfg <= ($urandom % 3) != 0;
      rfv <= rfq && rfg;
      if (rfq && rfg) begin
        chk(rfa[2:0] == 0, "refill word aligned");
        rfd <= {pat(int'(rfa) + 4), pat(int'(rfa))};
        n_refill_words++;
      end
    end
  end
  // fetch port models
  int n_hit = 0, n_miss = 0, n_fetch = 0;
  bit phase2 = 0;
  for (genvar p = 0; p < NP; p++) begin : g_p
    logic [AW-1:0] a_q; logic wait_rv; int lat;
    always @(posedge clk) begin
      if (!rst_n) begin req[p] <= 0; addr[p] <= '0; wait_rv <= 0; lat = 0; end
      else if (!phase2) begin
        if (rv[p]) begin chk(rd[p] == pat(int'(a_q)), $sformatf("fetch data port %0d", p)); n_fetch++; end
        if (req[p] && gnt[p]) begin
          a_q <= addr[p];
          if (lat == 0) n_hit++; else n_miss++;
          req[p] <= 0; lat = 0;
        end else if (req[p]) lat++;
        else if ($urandom % 2) begin
          req[p] <= 1;
          addr[p] <= ($urandom % 8 != 0) ? AW'(($urandom % 512) * 4) : AW'(($urandom % 8192) * 4);
        end
      end
    end
  end
  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (20000) @(posedge clk);
    phase2 = 1;
    @(posedge clk); req <= '0;
    repeat (3) @(posedge clk);
    chk(n_hit > n_miss && n_miss > 0, $sformatf("hits %0d misses %0d", n_hit, n_miss));
    chk(n_refill_words % 4 == 0, "refills read whole lines");
    // eviction: five lines of set 3 (stride = sets * line = 1 KiB)
    begin
      int lat, w0;
      for (int k = 0; k < 6; k++) begin
        int a; a = (k % 5) * 1024 + 3 * 32 + 8 + 16384;
        w0 = n_refill_words;
        req[0] <= 1; addr[0] <= AW'(a); lat = 0;
        do begin @(posedge clk); lat++; end while (!gnt[0]);
        req[0] <= 0;
        @(posedge clk); @(posedge clk);
        chk(rd[0] == pat(a), "fetch in the eviction test");
        if (k < 5) chk(n_refill_words - w0 == 4 && lat > 1, $sformatf("line %0d misses and is refilled", k));
        else chk(n_refill_words - w0 == 4, "the oldest line was evicted by the fifth");
        // immediate re-fetch hits
        req[0] <= 1; addr[0] <= AW'(a + 4);
        @(posedge clk); #1 chk(gnt[0], "re-fetch of a present line hits at once");
        @(posedge clk); req[0] <= 0; @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
