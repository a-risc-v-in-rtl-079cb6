// tb_pspin_rr_arbiter: drives random request vectors into a 5-way round-robin
// arbiter and compares every grant with a reference pointer model; also
// checks that a continuously requesting set is served in strict rotation.
module tb_pspin_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] req, gnt;
  logic [2:0] idx;
  logic valid, adv;
  pspin_rr_arbiter #(.N(N)) dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .advance_i(adv),
                                 .gnt_o(gnt), .idx_o(idx), .valid_o(valid));
  int ptr = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; adv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int exp_i;
      bit found;
      @(negedge clk);
      req = N'($urandom);
      adv = ($urandom % 4) != 0;
      #1;
      found = 0; exp_i = 0;
      for (int k = 0; k < N; k++) if (!found && req[(ptr + k) % N]) begin found = 1; exp_i = (ptr + k) % N; end
      checks++;
      if (valid !== found || (found && (idx != exp_i || gnt != (N'(1) << exp_i)))) begin
        failures++;
        $display("mismatch t=%0d req=%b ptr=%0d gnt=%b exp=%0d", t, req, ptr, gnt, exp_i);
      end
      @(posedge clk);
      if (found && adv) ptr = (exp_i + 1) % N;
    end
    // rotation with all requesting
    @(negedge clk);
    req = '1; adv = 1;
    for (int k = 0; k < 2 * N; k++) begin
      #1;
      checks++;
      if (idx != (ptr + k) % N) begin failures++; $display("rotation broke at %0d", k); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
