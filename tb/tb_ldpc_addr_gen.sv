// tb_ldpc_addr_gen: checks the address generator counter: load with the CNP
// offset or with 0, counting with wrap-around at L-1, holding when not
// enabled.  Uses L = 16 and OFFSET = 13 so the wrap comes early.
module tb_ldpc_addr_gen;
  localparam int L = 16;
  localparam int OFF = 13;
  logic clk = 0, rst_n = 0, start = 0, cnp = 0, en = 0;
  logic [3:0] addr;
  int checks = 0, failures = 0;
  int expv;

  always #5 clk = ~clk;

  ldpc_addr_gen #(.L(L), .OFFSET(OFF)) dut (.*);

  task automatic chk(int e, string what);
    checks++;
    if (int'(addr) != e) begin
      failures++;
      $display("FAIL %s: addr %0d expected %0d", what, addr, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(0, "reset");
    // CNP load then count through two wraps
    start = 1; cnp = 1; en = 1;
    @(negedge clk);
    start = 0;
    expv = OFF;
    for (int c = 0; c < 2 * L + 3; c++) begin
      chk(expv, "cnp count");
      @(negedge clk);
      expv = (expv + 1) % L;
    end
    // hold when en low
    en = 0;
    @(negedge clk);
    @(negedge clk);
    chk(expv, "hold");
    // VNP load with 0
    start = 1; cnp = 0; en = 1;
    @(negedge clk);
    start = 0;
    for (int c = 0; c < L + 2; c++) begin
      chk(c % L, "vnp count");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
