// tb_ldpc_vnu: random messages through the variable node unit, compared
// with the update worked out on integers: total = intrinsic + sum of the
// three incoming messages, outgoing = total - own incoming clipped to
// +/-15, hard decision = total < 0; and with init the incoming messages
// ignored.
module tb_ldpc_vnu;
  import ldpc_pkg::*;
  logic init;
  msg_t intr;
  msg_t c2v [3];
  hybrid_t hyb [3];
  logic hd;
  int checks = 0, failures = 0;
  int iv, cv [3], tot, e;

  ldpc_vnu dut (.*);

  function automatic int val(msg_t m);
    return m[4] ? -int'(m[3:0]) : int'(m[3:0]);
  endfunction

  function automatic int clip(int v);
    return v > 15 ? 15 : v < -15 ? -15 : v;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      init = (n % 5 == 0);
      intr = msg_t'($urandom);
      for (int i = 0; i < 3; i++) c2v[i] = msg_t'($urandom);
      #1;
      iv = val(intr);
      tot = iv;
      for (int i = 0; i < 3; i++) begin
        cv[i] = init ? 0 : val(c2v[i]);
        tot += cv[i];
      end
      checks++;
      if (hd != (tot < 0)) begin
        failures++;
        $display("FAIL hd: tot %0d", tot);
      end
      for (int i = 0; i < 3; i++) begin
        e = clip(tot - cv[i]);
        checks++;
        if (val(hyb[i].msg) != e || hyb[i].hd != (tot < 0) || (e == 0 && hyb[i].msg[4])) begin
          failures++;
          $display("FAIL v2c[%0d]: %0d expected %0d", i, val(hyb[i].msg), e);
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
