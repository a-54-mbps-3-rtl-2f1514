// tb_ldpc_perm_net: one configurable shuffle network (k = 6).  With s = 0
// the data must pass straight; with s = 1 the forward path must apply the
// permutation of the code definition and be a true permutation of the
// inputs, and data sent back along the backward path must arrive at the
// port its forward word came from.
module tb_ldpc_perm_net;
  localparam int K = 6, FW = 6, BW = 5, SEL = 0, IDX = 3;
  logic s;
  logic [FW-1:0] fwd_in [K], fwd_out [K];
  logic [BW-1:0] bwd_in [K], bwd_out [K];
  int checks = 0, failures = 0, n_moved = 0;

  ldpc_perm_net #(.K(K), .FW(FW), .BW(BW), .SEL(SEL), .IDX(IDX)) dut (.*);

  initial begin
    for (int n = 0; n < 200; n++) begin
      s = n[0];
      for (int j = 0; j < K; j++) fwd_in[j] = FW'(j * 8 + (n % 8));   // distinct tags
      #1;
      // route backwards the tag (low bits = output position) of each output
      for (int j = 0; j < K; j++) bwd_in[j] = BW'(fwd_out[j] >> 3);
      #1;
      for (int j = 0; j < K; j++) begin
        int src;
        src = s ? ldpc_pkg::shuffle_perm(SEL, IDX, K, j) : j;
        checks++;
        if (fwd_out[j] != fwd_in[src]) begin
          failures++;
          $display("FAIL fwd s=%0d pos %0d", s, j);
        end
        if (s && src != j) n_moved++;
        // the backward word at port j must be the tag j itself
        checks++;
        if (int'(bwd_out[j]) != j) begin
          failures++;
          $display("FAIL bwd s=%0d pos %0d got %0d", s, j, bwd_out[j]);
        end
      end
    end
    checks++;
    if (n_moved == 0) failures++;
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
