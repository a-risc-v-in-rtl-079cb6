// tb_pspin_cmd_unit: four clusters issue random commands of the three kinds;
// three model executors accept them with random stalls and answer after a
// random delay. Checks that each command reaches the executor of its kind
// unchanged, that every response returns to the cluster named in its ID,
// that no command is lost or duplicated, and that a stalled executor blocks
// only while the selected command is for it.
module tb_pspin_cmd_unit;
  import pspin_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] cv, cr, rv;
  cmd_t cc [4];
  cmd_resp_t r;
  logic [2:0] ev, er, erv, err;
  cmd_t ec;
  cmd_resp_t eresp [3];
  pspin_cmd_unit dut (.clk_i(clk), .rst_ni(rst_n), .cl_cmd_valid_i(cv), .cl_cmd_ready_o(cr),
    .cl_cmd_i(cc), .cl_resp_valid_o(rv), .cl_resp_o(r), .ex_cmd_valid_o(ev), .ex_cmd_ready_i(er),
    .ex_cmd_o(ec), .ex_resp_valid_i(erv), .ex_resp_ready_o(err), .ex_resp_i(eresp));

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

  int issued = 0, executed = 0, responded = 0;
  cmd_resp_t pend [3][$];
  logic [2:0] er_q = '1;
  always @(negedge clk) er_q <= 3'($urandom) | 3'b001;
  assign er = er_q;
  // executors
  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < 3; e++) if (ev[e] && er[e]) begin
      chk(int'(ec.kind) == e, $sformatf("command of kind %0d at executor %0d", ec.kind, e));
      chk(ec.length == {ec.id.cluster, ec.id.hpu, 16'hC0DE}, "command payload intact");
      pend[e].push_back('{id: ec.id, error: 1'b0});
      executed++;
    end
    for (int e = 0; e < 3; e++) if (erv[e] && err[e]) void'(pend[e].pop_front());
    // response receipt
    for (int c = 0; c < 4; c++) if (rv[c]) begin
      chk(int'(r.id.cluster) == c, "response routed to its cluster");
      responded++;
    end
  end
  always_comb for (int e = 0; e < 3; e++) begin
    erv[e] = pend[e].size() > 0;
    eresp[e] = (pend[e].size() > 0) ? pend[e][0] : '0;
  end

  initial begin
    cv = '0; cc = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int c = 0; c < 4; c++) if (!cv[c] || cr_q[c]) begin
        cv[c] = ($urandom % 2);
        cc[c] = '0;
        cc[c].kind = cmd_kind_e'($urandom % 3);
        cc[c].id.cluster = CL_W'(c);
        cc[c].id.hpu = HPU_W'($urandom);
        cc[c].length = {cc[c].id.cluster, cc[c].id.hpu, 16'hC0DE};
        if (cv[c]) issued++;
      end
    end
    @(negedge clk);
    cv &= ~cr_q;
    while (cv != 0) begin @(negedge clk); cv &= ~cr_q; end
    repeat (50) @(negedge clk);
    chk(executed == issued && responded == issued, $sformatf("issued %0d executed %0d responded %0d", issued, executed, responded));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [3:0] cr_q = '0;
  always @(posedge clk) cr_q <= cv & cr;
endmodule
