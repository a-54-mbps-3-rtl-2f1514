// tb_ldpc_dec_ram: writes random hard decisions into both DEC_RAM banks and
// checks the asynchronous read of either bank against a model.
module tb_ldpc_dec_ram;
  localparam int L = 16;
  logic clk = 0;
  logic we = 0, wbank = 0, rbank = 0, wdata = 0, rdata;
  logic [3:0] waddr = 0, raddr = 0;
  logic model [2][L];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ldpc_dec_ram #(.L(L)) dut (.*);

  initial begin
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < L; a++) begin
        @(negedge clk);
        we = 1; wbank = b[0]; waddr = 4'(a); wdata = 1'($urandom);
        model[b][a] = wdata;
      end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we    = $urandom % 2 == 1;
      wbank = 1'($urandom);
      waddr = 4'($urandom);
      wdata = 1'($urandom);
      rbank = 1'($urandom);
      raddr = 4'($urandom);
      #1;
      checks++;
      if (rdata !== model[rbank][raddr]) begin
        failures++;
        $display("FAIL: bank %0d addr %0d", rbank, raddr);
      end
      if (we) model[wbank][waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
