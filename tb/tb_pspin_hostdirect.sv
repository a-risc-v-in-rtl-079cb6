// tb_pspin_hostdirect: HostDirect commands to both 32 B halves of a 64 B host
// word, with random host back-pressure. Checks the write address (aligned to
// 64 B), that the 32 immediate bytes land in the right half with exactly those
// 32 byte enables set, that the response carries the command's ID and comes
// after the write was accepted, and that the unit takes one command at a time.
module tb_pspin_hostdirect;
  import pspin_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cv, cr, rv, rr, wreq, wgnt;
  cmd_t c; cmd_resp_t r;
  logic [63:0] waddr; logic [511:0] wdata; logic [63:0] wbe;
  pspin_hostdirect dut (.clk_i(clk), .rst_ni(rst_n), .cmd_valid_i(cv), .cmd_ready_o(cr), .cmd_i(c),
    .resp_valid_o(rv), .resp_ready_i(rr), .resp_o(r), .wr_req_o(wreq), .wr_addr_o(waddr),
    .wr_data_o(wdata), .wr_be_o(wbe), .wr_gnt_i(wgnt));
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
  bit gok = 0;
  always @(negedge clk) gok <= $urandom % 2;
  assign wgnt = wreq && gok;
  initial begin
    cv = 0; c = '0; rr = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      bit wrote;
      int n;
      @(negedge clk);
      c = '0; c.kind = CMD_HOSTDIRECT; c.id.cluster = CL_W'(t); c.id.hpu = HPU_W'(t >> 2); c.id.tag = t[0];
      c.dst_addr = {32'h0000_0001, $urandom} & ~64'h1F;
      c.imm = {8{$urandom}};
      cv = 1;
      #1 chk(cr, "idle unit takes the command");
      @(negedge clk); cv = 0;
      wrote = 0; n = 0;
      while (!rv && n < 50) begin
        #1;
        if (wreq && wgnt) begin
          wrote = 1;
          chk(waddr == {c.dst_addr[63:6], 6'd0}, "aligned write address");
          if (c.dst_addr[5]) chk(wbe == {32'hFFFF_FFFF, 32'h0} && wdata[511:256] == c.imm, "upper half");
          else               chk(wbe == {32'h0, 32'hFFFF_FFFF} && wdata[255:0] == c.imm, "lower half");
        end
        chk(!cr, "busy while a command is in flight");
        @(negedge clk); n++;
      end
      chk(wrote && rv && r.id == c.id && !r.error, "response after the write, with the ID");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
