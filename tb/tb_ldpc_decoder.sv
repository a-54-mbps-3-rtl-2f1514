// tb_ldpc_decoder: end-to-end test of the decoder at its default size
// (k = 6, L = 256, N = 9216, 18 iterations at most).
//
// The testbench builds its own copy of the parity check matrix from the
// code definition (AG offsets and the pi_3 routing of every CNP cycle), checks
// that every check node has degree k and that the Tanner graph has no
// 4-cycle, and runs a bit-true reference decoder (flooding schedule, 5-bit
// sign-magnitude messages, offset min-sum check nodes, early stop when all checks
// hold) on the same frames.  Frames are the all-zero codeword sent over an
// AWGN-like channel at several noise levels: a noiseless frame (stops before
// the first iteration), moderate noise (stops after a few iterations) and
// heavy noise (runs the full 18 iterations).
//
// Frames are streamed as the decoder is meant to be used: frame f+1 is
// loaded and frame f-1 is read out while frame f is decoded.  For every frame
// it compares all 9216 hard decisions, the iteration count, the converged
// flag and the decoding time in cycles (L*(2s+1)+1 for s iterations, or
// L*(2n+2)+1 for an early stop after n iterations) with the reference.
// It also counts that each mechanism occurred: early stop, stop at the
// iteration limit, loading during decoding, reading during decoding, the
// initialisation pass, and both settings of the pi_3 shuffle switches.
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int K  = K_DEF;
  localparam int L  = L_DEF;
  localparam int S  = MAX_ITER_DEF;
  localparam int N  = L * K * K;
  localparam int NC = K * L;        // check nodes per group
  localparam int NF = 4;            // frames
  localparam int AW = $clog2(L);
  localparam int PW = $clog2(K * K);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            start = 0, busy, done, converged;
  logic [4:0]      iterations;
  logic            load_en = 0;
  logic [PW+AW-1:0] load_addr = '0;
  msg_t            load_llr = '0;
  logic            rd_en = 0;
  logic [AW-1:0]   rd_addr = '0;
  logic            rd_valid;
  logic [K*K-1:0]  rd_data;

  ldpc_decoder dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  // ---------------- code construction (reference) ----------------
  int chk [3][N];                   // check node of variable v in group i
  int mem [3][NC][K];               // members of each check node
  int deg [3][NC];

  function automatic int vidx(int x, int y, int d);  // 0-based x, y, d
    return (x * K + y) * L + d;
  endfunction

  task automatic build_code();
    int rinv [K][K], cinv [K][K];
    for (int i = 0; i < 3; i++) for (int c = 0; c < NC; c++) deg[i][c] = 0;
    for (int a = 0; a < K; a++)
      for (int j = 0; j < K; j++) begin
        rinv[a][shuffle_perm(0, a + 1, K, j)] = j;
        cinv[a][shuffle_perm(1, a + 1, K, j)] = j;
      end
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++)
        for (int c = 0; c < L; c++) begin
          int d2, d3, j, i3;
          // CG1: PE_{x,y} reads address c in CNP cycle c, to CNU_{1,x}
          chk[0][vidx(x, y, c)] = x * L + c;
          // CG2: address (u + c) mod L, to CNU_{2,y}
          d2 = (h2_offset(x + 1, y + 1, L) + c) % L;
          chk[1][vidx(x, y, d2)] = y * L + c;
          // CG3: address (t + c) mod L, row then column shuffle
          d3 = (h3_offset(x + 1, y + 1, K, L) + c) % L;
          j  = ctrl_bit(0, c, x) ? rinv[x][y] : y;
          i3 = ctrl_bit(1, c, j) ? cinv[j][x] : x;
          chk[2][vidx(x, y, d3)] = i3 * L + c;
        end
    for (int i = 0; i < 3; i++)
      for (int v = 0; v < N; v++) begin
        int c;
        c = chk[i][v];
        if (deg[i][c] < K) mem[i][c][deg[i][c]] = v;
        deg[i][c]++;
      end
  endtask

  task automatic check_code();
    bit seen [longint];
    int bad_deg, cyc4;
    bad_deg = 0;
    cyc4 = 0;
    for (int i = 0; i < 3; i++)
      for (int c = 0; c < NC; c++) if (deg[i][c] != K) bad_deg++;
    checks++;
    if (bad_deg != 0) fail($sformatf("%0d check nodes without degree %0d", bad_deg, K));
    for (int i = 0; i < 3; i++)
      for (int j = i + 1; j < 3; j++)
        for (int v = 0; v < N; v++) begin
          longint key;
          key = longint'(i * 3 + j) * 64'd100000000 + longint'(chk[i][v]) * 64'd10000 + longint'(chk[j][v]);
          if (seen.exists(key)) cyc4++;
          seen[key] = 1'b1;
        end
    checks++;
    if (cyc4 != 0) fail($sformatf("Tanner graph has %0d 4-cycles", cyc4));
  endtask

  // ---------------- reference decoder ----------------
  int llr [NF][N];
  bit ref_hd [NF][N];
  int ref_iter [NF];
  bit ref_conv [NF];

  function automatic int sat(int v);
    return (v > 15) ? 15 : (v < -15) ? -15 : v;
  endfunction

  task automatic ref_decode(int f);
    int v2c [3][N];
    int c2v [3][N];
    bit hd [N];
    int it;
    bit conv;
    for (int v = 0; v < N; v++) begin
      for (int i = 0; i < 3; i++) v2c[i][v] = llr[f][v];
      hd[v] = llr[f][v] < 0;
    end
    it = 0;
    conv = 0;
    while (it < S) begin
      bit all_ok;
      all_ok = 1;
      for (int i = 0; i < 3; i++)
        for (int c = 0; c < NC; c++) begin
          bit par;
          par = 0;
          for (int j = 0; j < K; j++) begin
            int sgn, mn;
            par ^= hd[mem[i][c][j]];
            sgn = 0;
            mn = 15;
            for (int m = 0; m < K; m++) if (m != j) begin
              int val;
              val = v2c[i][mem[i][c][m]];
              sgn ^= (val < 0);
              if ((val < 0 ? -val : val) < mn) mn = (val < 0 ? -val : val);
            end
            mn = (mn > 0) ? mn - 1 : 0;
            c2v[i][mem[i][c][j]] = sgn ? -mn : mn;
          end
          if (par) all_ok = 0;
        end
      if (all_ok) begin
        conv = 1;
        break;
      end
      for (int v = 0; v < N; v++) begin
        int tot;
        tot = llr[f][v] + c2v[0][v] + c2v[1][v] + c2v[2][v];
        for (int i = 0; i < 3; i++) v2c[i][v] = sat(tot - c2v[i][v]);
        hd[v] = tot < 0;
      end
      it++;
    end
    for (int v = 0; v < N; v++) ref_hd[f][v] = hd[v];
    ref_iter[f] = it;
    ref_conv[f] = conv;
  endtask

  // all-zero codeword, BPSK, Gaussian noise; LLR mean m, standard deviation sd
  task automatic make_frame(int f, real m, real sd);
    for (int v = 0; v < N; v++) begin
      real g;
      int q;
      g = 0.0;
      for (int u = 0; u < 12; u++) g += real'($urandom % 10000) / 10000.0;
      g -= 6.0;
      q = int'(m + sd * g);
      llr[f][v] = sat(q);
    end
  endtask

  function automatic msg_t to_msg(int v);
    msg_t r;
    r[QW-1] = v < 0;
    r[MAGW-1:0] = MAGW'(v < 0 ? -v : v);
    return r;
  endfunction

  // ---------------- stimulus ----------------
  int n_early = 0, n_maxit = 0, n_load_busy = 0, n_read_busy = 0;
  int n_init = 0, n_sw_on = 0, n_sw_off = 0;

  always @(negedge clk) begin
    if (busy && load_en) n_load_busy++;
    if (busy && rd_en) n_read_busy++;
    if (dut.ph_ex == PH_INIT) n_init++;
    if (dut.ph_ex == PH_CNP) begin
      if (dut.u_check.u_pi3.s_row != '0 && dut.u_check.u_pi3.s_col != '0) n_sw_on++;
      if (dut.u_check.u_pi3.s_row != '1 && dut.u_check.u_pi3.s_col != '1) n_sw_off++;
    end
  end

  task automatic load_frame(int f);
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++)
        for (int d = 0; d < L; d++) begin
          @(negedge clk);
          load_en   <= 1'b1;
          load_addr <= {PW'(x * K + y), AW'(d)};
          load_llr  <= to_msg(llr[f][vidx(x, y, d)]);
        end
    @(negedge clk);
    load_en <= 1'b0;
    repeat (K + 1) @(negedge clk);
  endtask

  int rd_frame = 0, rd_cnt = 0, rd_bad = 0;

  always @(negedge clk) begin
    if (rd_valid) begin
      for (int b = 0; b < K * K; b++)
        if (rd_data[b] != ref_hd[rd_frame][b * L + rd_cnt]) rd_bad++;
      rd_cnt++;
    end
  end

  task automatic read_frame(int f);
    rd_frame = f;
    rd_cnt = 0;
    rd_bad = 0;
    for (int d = 0; d < L; d++) begin
      @(negedge clk);
      rd_en   <= 1'b1;
      rd_addr <= AW'(d);
    end
    @(negedge clk);
    rd_en <= 1'b0;
    repeat (K + 1) @(negedge clk);
    checks++;
    if (rd_cnt != L) fail($sformatf("frame %0d: %0d read words returned", f, rd_cnt));
    checks++;
    if (rd_bad != 0) fail($sformatf("frame %0d: %0d hard decisions differ from the reference", f, rd_bad));
  endtask

  task automatic start_frame();
    @(negedge clk);
    start <= 1'b1;
    @(negedge clk);
    start <= 1'b0;
  endtask

  task automatic wait_done(int f, longint t0);
    longint dt, exp_dt;
    while (!done) @(negedge clk);
    dt = cycle - t0;
    exp_dt = ref_conv[f] ? longint'(L * (2 * ref_iter[f] + 2) + 1)
                         : longint'(L * (2 * S + 1) + 1);
    $display("frame %0d: iterations %0d (ref %0d) converged %0d (ref %0d) cycles %0d (expected %0d)",
             f, iterations, ref_iter[f], converged, ref_conv[f], dt, exp_dt);
    checks++;
    if (int'(iterations) != ref_iter[f]) fail($sformatf("frame %0d iterations", f));
    checks++;
    if (converged != ref_conv[f]) fail($sformatf("frame %0d converged flag", f));
    checks++;
    if (dt != exp_dt) fail($sformatf("frame %0d decoding time %0d, expected %0d", f, dt, exp_dt));
    if (converged) n_early++;
    else if (int'(iterations) == S) n_maxit++;
  endtask

  initial begin
    longint t0;
    build_code();
    check_code();
    make_frame(0, 6.0, 0.0);        // noiseless
    make_frame(1, 4.0, 2.8);        // moderate noise
    make_frame(2, 1.0, 2.8);        // heavy noise
    make_frame(3, 4.5, 3.0);        // moderate noise
    for (int f = 0; f < NF; f++) ref_decode(f);
    for (int f = 0; f < NF; f++)
      $display("reference frame %0d: %0d iterations, converged %0d", f, ref_iter[f], ref_conv[f]);

    repeat (3) @(negedge clk);
    rst_n <= 1'b1;
    load_frame(0);
    for (int f = 0; f < NF; f++) begin
      start_frame();
      t0 = cycle;
      fork
        if (f + 1 < NF) load_frame(f + 1);
        if (f > 0) read_frame(f - 1);
        wait_done(f, t0);
      join
    end
    // one more start makes the last frame readable (the decoder re-decodes a
    // stale bank meanwhile, which is not checked)
    start_frame();
    read_frame(NF - 1);
    while (!done) @(negedge clk);

    checks++; if (n_early == 0)     fail("no early stop");
    checks++; if (n_maxit == 0)     fail("no frame ran to the iteration limit");
    checks++; if (n_load_busy == 0) fail("no load during decoding");
    checks++; if (n_read_busy == 0) fail("no read-out during decoding");
    checks++; if (n_init == 0)      fail("no initialisation pass");
    checks++; if (n_sw_on == 0 || n_sw_off == 0) fail("pi_3 switches never both used");
    $display("mechanisms: early=%0d maxit=%0d load_busy=%0d read_busy=%0d init=%0d sw_on=%0d sw_off=%0d",
             n_early, n_maxit, n_load_busy, n_read_busy, n_init, n_sw_on, n_sw_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
