// tb_ldpc_pi3: the concatenated shuffle network pi_3 (k = 6, L = 16).
// For every CNP cycle c it drives k^2 distinct tagged words, one per PE,
// and checks that each arrives at the CNU input the routing rule gives
// (row stage: output y takes input R_x(y) when s^(r)_x = 1; column stage:
// output x takes input C_y(x) when s^(c)_y = 1; CNU_{3,x} gets row x), and
// that words sent back from the CNU side return to the PE they came from.
module tb_ldpc_pi3;
  import ldpc_pkg::*;
  localparam int K = 6, L = 16;
  logic clk = 0;
  logic [3:0] rom_addr = 0;
  hybrid_t a [K][K], c [K][K];
  msg_t c_bwd [K][K], a_bwd [K][K];
  int checks = 0, failures = 0, n_on = 0;
  int rinv [K][K], cinv [K][K];

  always #5 clk = ~clk;

  ldpc_pi3 #(.K(K), .L(L)) dut (.*);

  initial begin
    for (int q = 0; q < K; q++)
      for (int j = 0; j < K; j++) begin
        rinv[q][shuffle_perm(0, q + 1, K, j)] = j;
        cinv[q][shuffle_perm(1, q + 1, K, j)] = j;
      end
    for (int cyc = 0; cyc < 2 * L; cyc++) begin
      int cc;
      cc = cyc % L;
      @(negedge clk);
      rom_addr = 4'(cc);
      @(posedge clk);
      #1;
      for (int x = 0; x < K; x++)
        for (int y = 0; y < K; y++) a[x][y] = hybrid_t'(x * K + y);
      #1;
      // tag on the way back: the CNU port (x', y') it arrived at, encoded
      for (int x = 0; x < K; x++)
        for (int y = 0; y < K; y++) c_bwd[x][y] = msg_t'(c[x][y]);
      #1;
      for (int x = 0; x < K; x++)
        for (int y = 0; y < K; y++) begin
          int j, i3;
          j  = ctrl_bit(0, cc, x) ? rinv[x][y] : y;     // row stage position
          i3 = ctrl_bit(1, cc, j) ? cinv[j][x] : x;     // column stage position
          if (j != y || i3 != x) n_on++;
          checks++;
          if (int'(c[i3][j]) != x * K + y) begin
            failures++;
            $display("FAIL fwd cycle %0d PE(%0d,%0d)", cc, x, y);
          end
          checks++;
          if (int'(a_bwd[x][y]) != (x * K + y) % 32) begin
            failures++;
            $display("FAIL bwd cycle %0d PE(%0d,%0d)", cc, x, y);
          end
        end
    end
    checks++;
    if (n_on == 0) failures++;
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
