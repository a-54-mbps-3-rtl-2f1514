// tb_ldpc_ctrl_rom: reads every word of ROM R and ROM C (k = 6, L = 256)
// and compares with the control bits of the code definition, with one
// cycle of read latency; also checks that the words are not constant.
module tb_ldpc_ctrl_rom;
  localparam int K = 6, L = 256;
  logic clk = 0;
  logic [7:0] addr = 0;
  logic [K-1:0] word_r, word_c;
  int checks = 0, failures = 0, ones = 0;

  always #5 clk = ~clk;

  ldpc_ctrl_rom #(.K(K), .L(L), .SEL(0)) dut_r (.clk, .addr, .word(word_r));
  ldpc_ctrl_rom #(.K(K), .L(L), .SEL(1)) dut_c (.clk, .addr, .word(word_c));

  initial begin
    for (int a = 0; a < L; a++) begin
      @(negedge clk);
      addr = 8'(a);
      @(posedge clk);
      #1;
      for (int b = 0; b < K; b++) begin
        checks++;
        if (word_r[b] != ldpc_pkg::ctrl_bit(0, a, b) || word_c[b] != ldpc_pkg::ctrl_bit(1, a, b)) begin
          failures++;
          $display("FAIL addr %0d bit %0d", a, b);
        end
        ones += int'(word_r[b]) + int'(word_c[b]);
      end
    end
    checks++;
    if (ones < L / 2 || ones > 2 * K * L - L / 2) begin
      failures++;
      $display("FAIL: %0d ones", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
