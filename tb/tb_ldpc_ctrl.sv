// tb_ldpc_ctrl: the phase controller with L = 8 and at most 3 iterations.
// Frame A never satisfies the checks: the phases must run INIT, then
// (CNP, VNP) three times, each L cycles, with ph_ex one cycle behind,
// address generators restarted one cycle before each phase, done after
// L*(2*3+1)+1 cycles.  Frame B fails one check in its first CNP pass and
// satisfies all in the second: it must stop early after 1 iteration, after
// L*(2*1+2)+1 cycles, with converged set.  A start pulse during decoding
// must be ignored; accepted starts must swap both bank selects.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  localparam int L = 8, S = 3;
  logic clk = 0, rst_n = 0, start = 0, parity_ok;
  phase_e ph_rd, ph_ex;
  logic [2:0] cnt;
  logic ag_start, ag_cnp, ag_en, int_bank, dec_bank, ld_bank, busy, done, converged;
  logic [1:0] iterations;
  int checks = 0, failures = 0;
  int mode = 0, pass = 0, exec_idx = 0;
  phase_e prev_rd;

  always #5 clk = ~clk;

  ldpc_ctrl #(.L(L), .MAX_ITER(S)) dut (.*);

  // parity results of the check stage as seen in the execute stage
  always_comb begin
    if (mode == 0) parity_ok = 1'b0;
    else if (pass == 1) parity_ok = (exec_idx != L - 1);   // only the last word fails
    else parity_ok = (pass == 2);
  end

  always @(posedge clk) begin
    if (ph_ex == PH_CNP) exec_idx <= exec_idx + 1;
    else exec_idx <= 0;
    if (ph_ex != PH_CNP && ph_rd == PH_CNP && cnt == 0) pass <= pass + 1;
  end

  task automatic fail(string m);
    failures++;
    $display("FAIL %s", m);
  endtask

  // expected read-stage phase k cycles after the accepting edge (k >= 1)
  function automatic phase_e exp_ph(int k, int iters, bit early);
    int last;
    last = early ? L * (2 * iters + 2) + 1 : L * (2 * S + 1);
    if (k > last) return PH_IDLE;
    if (k <= L) return PH_INIT;
    return (((k - L - 1) / L) % 2 == 0) ? PH_CNP : PH_VNP;
  endfunction

  task automatic run_frame(int iters, bit early);
    int k, lat;
    logic ib, db;
    ib = int_bank;
    db = dec_bank;
    pass = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (int_bank == ib || dec_bank == db || ld_bank != ~int_bank) fail("bank swap");
    k = 1;
    prev_rd = ph_rd;
    while (!done && k < 1000) begin
      checks++;
      if (ph_rd != exp_ph(k, iters, early)) fail($sformatf("phase at %0d: %s", k, ph_rd.name()));
      if (ph_rd != PH_IDLE && int'(cnt) != (k - 1) % L) fail($sformatf("cnt at %0d", k));
      if (k == 20) begin
        start = 1;                 // must be ignored
      end else start = 0;
      @(negedge clk);
      checks++;
      if (ph_ex != prev_rd && !(early && prev_rd == PH_VNP)) fail($sformatf("ph_ex at %0d", k));
      prev_rd = ph_rd;
      k++;
    end
    lat = early ? L * (2 * iters + 2) + 1 : L * (2 * S + 1) + 1;
    checks++;
    if (k - 1 != lat) fail($sformatf("latency %0d expected %0d", k - 1, lat));
    checks++;
    if (int'(iterations) != iters || converged != early) fail("status");
    checks++;
    if (int_bank == ib || dec_bank == db) fail("bank changed by ignored start");
  endtask

  // address generator restarts: one cycle before each phase
  always @(negedge clk) if (rst_n && busy && ph_rd != PH_IDLE) begin
    if (int'(cnt) == L - 1 && ph_rd != PH_VNP) begin
      checks++;
      if (!ag_start || ag_cnp != (ph_rd == PH_INIT)) fail("ag_start before phase");
    end else if (int'(cnt) != L - 1 && ag_start) fail("stray ag_start");
    if (!ag_en) fail("ag_en");
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    mode = 0;
    run_frame(S, 0);
    mode = 1;
    run_frame(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
