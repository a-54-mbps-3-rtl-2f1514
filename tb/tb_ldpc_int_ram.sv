// tb_ldpc_int_ram: fills both INT_RAM banks, then reads random locations of
// either bank while the other one is being written, against a model.
module tb_ldpc_int_ram;
  localparam int L = 16, W = 5;
  logic clk = 0;
  logic we = 0, wbank = 0, rbank = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [2][L];
  logic [W-1:0] expv;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ldpc_int_ram #(.L(L), .W(W)) dut (.*);

  initial begin
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < L; a++) begin
        @(negedge clk);
        we = 1; wbank = b[0]; waddr = 4'(a); wdata = W'($urandom);
        model[b][a] = wdata;
      end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      rbank = n[5];
      raddr = 4'($urandom);
      wbank = ~rbank;
      we    = $urandom % 2 == 1;
      waddr = 4'($urandom);
      wdata = W'($urandom);
      expv  = model[rbank][raddr];
      if (we) model[wbank][waddr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        $display("FAIL: bank %0d addr %0d read %h expected %h", rbank, raddr, rdata, expv);
      end
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
