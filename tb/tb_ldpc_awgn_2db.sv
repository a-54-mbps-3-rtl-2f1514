// tb_ldpc_awgn_2db: error-rate workload at the default size (N = 9216,
// rate 1/2, at most 18 iterations).  The all-zero codeword is sent with
// BPSK over an AWGN channel at Eb/N0 = 2 dB (noise variance
// sigma^2 = 1 / (2 * R * Eb/N0)); the channel LLR 2y/sigma^2 is quantised
// to the decoder's 5-bit sign-magnitude format with a step of 0.25 and
// clipping at +/-15.  NF frames are streamed through the decoder with
// loading and read-out overlapping decoding.
// Checks: every frame that reports converged must decode to the
// transmitted codeword; every frame's decoding time must match its
// iteration count (L*(2n+2)+1 when converged, L*(2*18+1)+1 otherwise); the
// channel must have produced errors, and decoding must leave fewer bit
// errors than the channel did.  Bit and frame error counts and the average
// iteration count are printed; they are measured, not required values.
module tb_ldpc_awgn_2db;
  import ldpc_pkg::*;

  localparam int K  = K_DEF;
  localparam int L  = L_DEF;
  localparam int S  = MAX_ITER_DEF;
  localparam int N  = L * K * K;
  localparam int NF = 16;
  localparam int AW = $clog2(L);
  localparam int PW = $clog2(K * K);
  real EBN0_DB = 2.0;                // +ebn0=<dB> overrides
  real STEP = 0.25;                  // +step=<LLR per unit> overrides

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

  msg_t llr [N];
  int   ch_err = 0, dec_err = 0, frame_err = 0, iter_sum = 0;
  bit   conv_of [NF];

  task automatic make_frame();
    real sigma, g, y, l;
    int q;
    sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (EBN0_DB / 10.0))));
    for (int v = 0; v < N; v++) begin
      g = 0.0;
      for (int u = 0; u < 12; u++) g += real'($urandom % 100000) / 100000.0;
      g -= 6.0;
      y = 1.0 + sigma * g;
      l = 2.0 * y / (sigma * sigma) / STEP;
      q = (l >= 0.0) ? int'(l + 0.5) - ((l + 0.5) - real'(int'(l + 0.5)) < 0.0 ? 1 : 0) : -int'(-l + 0.5);
      if (q > 15) q = 15;
      if (q < -15) q = -15;
      if (q < 0) ch_err++;
      llr[v][QW-1] = q < 0;
      llr[v][MAGW-1:0] = MAGW'(q < 0 ? -q : q);
    end
  endtask

  task automatic load_frame();
    make_frame();
    for (int p = 0; p < K * K; p++)
      for (int d = 0; d < L; d++) begin
        @(negedge clk);
        load_en   <= 1'b1;
        load_addr <= {PW'(p), AW'(d)};
        load_llr  <= llr[p * L + d];
      end
    @(negedge clk);
    load_en <= 1'b0;
    repeat (K + 1) @(negedge clk);
  endtask

  int rd_cnt = 0, rd_err = 0;
  always @(negedge clk)
    if (rd_valid) begin
      rd_err += $countones(rd_data);
      rd_cnt++;
    end

  task automatic read_frame(int f);
    rd_cnt = 0;
    rd_err = 0;
    for (int d = 0; d < L; d++) begin
      @(negedge clk);
      rd_en   <= 1'b1;
      rd_addr <= AW'(d);
    end
    @(negedge clk);
    rd_en <= 1'b0;
    repeat (K + 1) @(negedge clk);
    checks++;
    if (rd_cnt != L) begin
      failures++;
      $display("FAIL: frame %0d read-out incomplete", f);
    end
    dec_err += rd_err;
    if (rd_err != 0) frame_err++;
    checks++;
    if (conv_of[f] && rd_err != 0) begin
      failures++;
      $display("FAIL: frame %0d converged to a wrong word (%0d bit errors)", f, rd_err);
    end
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
    conv_of[f] = converged;
    iter_sum += int'(iterations);
    exp_dt = converged ? longint'(L * (2 * int'(iterations) + 2) + 1) : longint'(L * (2 * S + 1) + 1);
    checks++;
    if (dt != exp_dt || (!converged && int'(iterations) != S)) begin
      failures++;
      $display("FAIL: frame %0d took %0d cycles, expected %0d", f, dt, exp_dt);
    end
  endtask

  initial begin
    longint t0;
    void'($value$plusargs("ebn0=%f", EBN0_DB));
    void'($value$plusargs("step=%f", STEP));
    repeat (3) @(negedge clk);
    rst_n <= 1'b1;
    load_frame();
    for (int f = 0; f < NF; f++) begin
      start_frame();
      t0 = cycle;
      fork
        if (f + 1 < NF) load_frame();
        if (f > 0) read_frame(f - 1);
        wait_done(f, t0);
      join
    end
    start_frame();
    read_frame(NF - 1);
    while (!done) @(negedge clk);
    $display("Eb/N0 %.1f dB: %0d frames, channel bit errors %0d, decoded bit errors %0d, frame errors %0d, average iterations %.2f",
             EBN0_DB, NF, ch_err, dec_err, frame_err, real'(iter_sum) / NF);
    checks++;
    if (ch_err == 0 || dec_err >= ch_err) begin
      failures++;
      $display("FAIL: decoding did not reduce the channel errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
