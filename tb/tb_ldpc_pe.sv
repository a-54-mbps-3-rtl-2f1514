// tb_ldpc_pe: one PE block, PE_{2,3} with k = 6 and L = 16, driven by a
// controller sequence written out in the testbench.
//  - Load chain: a frame of intrinsic messages for this PE and one for a
//    neighbour go down the chain; only this PE's are stored, and every field
//    reappears on the chain output one cycle later.
//  - Initialisation pass, CNP pass, VNP pass, CNP pass: in each CNP cycle
//    the hybrid words on hyb_out must be those of the addresses the three
//    address generators visit (0, ((x-1)y) mod L, t_{x,y}, counting up), and
//    the testbench returns random check-to-variable messages.  The second
//    CNP pass shows the variable-to-check messages the VNU made from them.
//  - Read-out chain: the hard decisions of the VNP pass are read from the
//    other bank after a bank swap; this PE fills bus bit y-1 and passes the
//    other bits and the address through.
module tb_ldpc_pe;
  import ldpc_pkg::*;
  localparam int K = 6, L = 16, X = 2, Y = 3, AW = 4, PW = 6;
  localparam int MYPE = (X - 1) * K + (Y - 1);

  logic clk = 0, rst_n = 0;
  phase_e ph_ex = PH_IDLE;
  logic ag_start = 0, ag_cnp = 0, ag_en = 0, int_bank = 0, dec_bank = 1;
  hybrid_t hyb_out [3];
  msg_t c2v_in [3];
  logic ld_en_in = 0, ld_bank_in = 0;
  logic [PW-1:0] ld_pe_in = 0;
  logic [AW-1:0] ld_addr_in = 0;
  msg_t ld_data_in = 0;
  logic ld_en_out, ld_bank_out;
  logic [PW-1:0] ld_pe_out;
  logic [AW-1:0] ld_addr_out;
  msg_t ld_data_out;
  logic rd_en_in = 0;
  logic [AW-1:0] rd_addr_in = 0;
  logic [K-1:0] rd_bits_in = 0;
  logic rd_en_out;
  logic [AW-1:0] rd_addr_out;
  logic [K-1:0] rd_bits_out;

  always #5 clk = ~clk;

  ldpc_pe #(.K(K), .L(L), .X(X), .Y(Y)) dut (.*);

  int checks = 0, failures = 0;
  int intr [L], v2c [3][L], c2v [3][L];
  bit hd [L];
  int off [3];

  function automatic int val(msg_t m);
    return m[4] ? -int'(m[3:0]) : int'(m[3:0]);
  endfunction
  function automatic int clip(int v);
    return v > 15 ? 15 : v < -15 ? -15 : v;
  endfunction
  function automatic msg_t to_msg(int v);
    msg_t r;
    r[4] = v < 0;
    r[3:0] = 4'(v < 0 ? -v : v);
    return r;
  endfunction

  task automatic fail(string m);
    failures++;
    if (failures < 20) $display("FAIL %s", m);
  endtask

  // read-stage schedule: 2 idle cycles, then INIT, CNP, VNP, CNP, idle
  localparam int T = 4 * L + 6;
  phase_e rd_ph [T];
  int     rd_word [T];
  bit     vnp_done = 0;

  task automatic run_schedule();
    for (int c = 0; c < T; c++) begin
      rd_ph[c] = PH_IDLE;
      rd_word[c] = 0;
    end
    for (int p = 0; p < 4; p++)
      for (int w = 0; w < L; w++) begin
        rd_ph[2 + p * L + w] = (p == 0) ? PH_INIT : (p == 2) ? PH_VNP : PH_CNP;
        rd_word[2 + p * L + w] = w;
      end
    for (int c = 1; c < T - 1; c++) begin
      ph_ex    = rd_ph[c-1];
      ag_en    = rd_ph[c] != PH_IDLE;
      ag_start = rd_ph[c+1] != PH_IDLE && rd_word[c+1] == 0;
      ag_cnp   = rd_ph[c+1] == PH_CNP;
      if (c >= 2 && ph_ex == PH_CNP && rd_ph[c-2] == PH_VNP && !vnp_done) begin
        vnp_done = 1;
        for (int a = 0; a < L; a++) begin
          int tot;
          tot = intr[a] + c2v[0][a] + c2v[1][a] + c2v[2][a];
          for (int i = 0; i < 3; i++) v2c[i][a] = clip(tot - c2v[i][a]);
          hd[a] = tot < 0;
        end
      end
      if (ph_ex == PH_CNP) begin
        for (int i = 0; i < 3; i++) begin
          int a;
          a = (off[i] + rd_word[c-1]) % L;
          checks++;
          if (val(hyb_out[i].msg) != v2c[i][a] || hyb_out[i].hd != hd[a])
            fail($sformatf("hybrid EXT_RAM_%0d addr %0d: %0d/%0d expected %0d/%0d",
                           i + 1, a, val(hyb_out[i].msg), hyb_out[i].hd, v2c[i][a], hd[a]));
          c2v[i][a] = int'($urandom % 31) - 15;
          c2v_in[i] = to_msg(c2v[i][a]);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    off[0] = 0;
    off[1] = h2_offset(X, Y, L);
    off[2] = h3_offset(X, Y, K, L);
    for (int i = 0; i < 3; i++) c2v_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- load chain
    for (int n = 0; n < 2 * L; n++) begin
      int a, v;
      a = n % L;
      v = int'($urandom % 31) - 15;
      ld_en_in   = 1;
      ld_bank_in = 1;
      ld_pe_in   = PW'(n < L ? MYPE : MYPE + 1);
      ld_addr_in = AW'(a);
      ld_data_in = to_msg(v);
      if (n < L) intr[a] = v;
      @(negedge clk);
      checks++;
      if (!ld_en_out || ld_pe_out != ld_pe_in || ld_addr_out != ld_addr_in ||
          ld_data_out != ld_data_in || ld_bank_out != ld_bank_in) fail("load chain register");
    end
    ld_en_in = 0;
    int_bank = 1;
    dec_bank = 1;
    for (int a = 0; a < L; a++) begin
      for (int i = 0; i < 3; i++) v2c[i][a] = intr[a];
      hd[a] = intr[a] < 0;
    end
    // ---- initialisation pass, CNP, VNP, CNP
    run_schedule();
    ph_ex = PH_IDLE;
    ag_en = 0;
    // ---- read-out chain from the other DEC_RAM bank
    dec_bank = 0;
    for (int a = 0; a < L; a++) begin
      logic [K-1:0] bits;
      bits = K'($urandom);
      rd_en_in   = 1;
      rd_addr_in = AW'(a);
      rd_bits_in = bits;
      @(negedge clk);
      bits[Y-1] = hd[a];
      checks++;
      if (!rd_en_out || rd_addr_out != AW'(a) || rd_bits_out != bits)
        fail($sformatf("read-out addr %0d: %b expected %b", a, rd_bits_out, bits));
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
