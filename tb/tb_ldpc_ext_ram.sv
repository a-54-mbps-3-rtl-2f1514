// tb_ldpc_ext_ram: random reads and writes on the EXT_RAM against a model,
// including reads of the address being written in the same cycle, which
// must return the new data.
module tb_ldpc_ext_ram;
  localparam int L = 16, W = 6;
  logic clk = 0;
  logic [3:0] raddr = 0, waddr = 0;
  logic [W-1:0] rdata, wdata = 0;
  logic we = 0;
  logic [W-1:0] model [L];
  logic [W-1:0] expv;
  int checks = 0, failures = 0, n_same = 0;

  always #5 clk = ~clk;

  ldpc_ext_ram #(.L(L), .W(W)) dut (.*);

  initial begin
    for (int a = 0; a < L; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = W'($urandom); model[a] = wdata;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we    = ($urandom % 2) == 1;
      waddr = 4'($urandom);
      raddr = ($urandom % 3 == 0) ? waddr : 4'($urandom);
      wdata = W'($urandom);
      expv  = (we && waddr == raddr) ? wdata : model[raddr];
      if (we && waddr == raddr) n_same++;
      if (we) model[waddr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", raddr, rdata, expv);
      end
    end
    checks++;
    if (n_same == 0) failures++;
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
