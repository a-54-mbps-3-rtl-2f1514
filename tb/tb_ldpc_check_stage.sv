// tb_ldpc_check_stage: the three shuffle networks with their 3k CNUs
// (k = 6, L = 16).  Each CNP cycle it drives random hybrid words for all
// 3k^2 ports, works out the members of every check node from the
// connection rules (pi_1: same row x; pi_2: same column y; pi_3: row and
// column shuffle of that cycle), computes offset min-sum (offset 1) and the parity checks
// itself, and compares every returned message and the combined parity
// flag.  Half of the cycles use hard decisions that satisfy all checks.
module tb_ldpc_check_stage;
  import ldpc_pkg::*;
  localparam int K = 6, L = 16;
  logic clk = 0;
  logic [3:0] rom_addr = 0;
  hybrid_t hyb [3][K][K];
  msg_t c2v [3][K][K];
  logic parity_ok;
  int checks = 0, failures = 0, n_ok = 0, n_bad = 0;
  int rinv [K][K], cinv [K][K];
  int cn [3][K][K];          // check node (0..K-1) of port (x, y) in group i

  always #5 clk = ~clk;

  ldpc_check_stage #(.K(K), .L(L)) dut (.*);

  initial begin
    for (int q = 0; q < K; q++)
      for (int j = 0; j < K; j++) begin
        rinv[q][shuffle_perm(0, q + 1, K, j)] = j;
        cinv[q][shuffle_perm(1, q + 1, K, j)] = j;
      end
    for (int cyc = 0; cyc < 4 * L; cyc++) begin
      int cc;
      bit all_ok;
      cc = cyc % L;
      @(negedge clk);
      rom_addr = 4'(cc);
      @(posedge clk);
      #1;
      for (int x = 0; x < K; x++)
        for (int y = 0; y < K; y++) begin
          int j;
          cn[0][x][y] = x;
          cn[1][x][y] = y;
          j = ctrl_bit(0, cc, x) ? rinv[x][y] : y;
          cn[2][x][y] = ctrl_bit(1, cc, j) ? cinv[j][x] : x;
          for (int i = 0; i < 3; i++) begin
            hyb[i][x][y] = hybrid_t'($urandom);
            if (cyc % 2 == 0) hyb[i][x][y].hd = 1'b0;
          end
        end
      #1;
      all_ok = 1;
      for (int i = 0; i < 3; i++)
        for (int n = 0; n < K; n++) begin
          bit par;
          par = 0;
          for (int x = 0; x < K; x++)
            for (int y = 0; y < K; y++)
              if (cn[i][x][y] == n) par ^= hyb[i][x][y].hd;
          if (par) all_ok = 0;
        end
      checks++;
      if (parity_ok != all_ok) begin
        failures++;
        $display("FAIL parity cycle %0d", cyc);
      end
      if (all_ok) n_ok++; else n_bad++;
      for (int i = 0; i < 3; i++)
        for (int x = 0; x < K; x++)
          for (int y = 0; y < K; y++) begin
            bit s;
            int mn, cnt;
            s = 0;
            mn = 15;
            cnt = 0;
            for (int x2 = 0; x2 < K; x2++)
              for (int y2 = 0; y2 < K; y2++)
                if (cn[i][x2][y2] == cn[i][x][y]) begin
                  cnt++;
                  if (x2 != x || y2 != y) begin
                    s ^= hyb[i][x2][y2].msg[4];
                    if (int'(hyb[i][x2][y2].msg[3:0]) < mn) mn = int'(hyb[i][x2][y2].msg[3:0]);
                  end
                end
            mn = (mn > 0) ? mn - 1 : 0;
            checks++;
            if (cnt != K || c2v[i][x][y][4] != s || int'(c2v[i][x][y][3:0]) != mn) begin
              failures++;
              $display("FAIL group %0d PE(%0d,%0d) cycle %0d", i + 1, x, y, cyc);
            end
          end
    end
    checks++;
    if (n_ok == 0 || n_bad == 0) failures++;
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
