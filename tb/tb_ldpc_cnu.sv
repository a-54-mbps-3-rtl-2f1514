// tb_ldpc_cnu: random hybrid words through the check node unit (k = 6),
// compared with offset min-sum worked out directly for each output (product
// of the other signs, minimum of the other magnitudes less 1, not below 0) and with the parity of
// the hard decisions.  Ties of the minimum are made frequent on purpose.
module tb_ldpc_cnu;
  import ldpc_pkg::*;
  localparam int K = 6;
  hybrid_t hyb [K];
  msg_t c2v [K];
  logic parity_ok;
  int checks = 0, failures = 0;

  ldpc_cnu #(.K(K)) dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      bit par;
      par = 0;
      for (int j = 0; j < K; j++) begin
        hyb[j] = hybrid_t'($urandom);
        if (n % 2 == 0) hyb[j].msg[3:0] = 4'($urandom % 4);
        par ^= hyb[j].hd;
      end
      #1;
      checks++;
      if (parity_ok != !par) begin
        failures++;
        $display("FAIL parity");
      end
      for (int j = 0; j < K; j++) begin
        bit s;
        int mn;
        s = 0;
        mn = 15;
        for (int m = 0; m < K; m++) if (m != j) begin
          s ^= hyb[m].msg[4];
          if (int'(hyb[m].msg[3:0]) < mn) mn = int'(hyb[m].msg[3:0]);
        end
        checks++;
        mn = (mn > 0) ? mn - 1 : 0;     // offset 1
        if (c2v[j][4] != s || int'(c2v[j][3:0]) != mn) begin
          failures++;
          $display("FAIL c2v[%0d] = %h, expected sign %0d mag %0d", j, c2v[j], s, mn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
