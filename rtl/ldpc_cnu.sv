// ldpc_cnu: check node processor unit CNU_{i,j}.
//
// Combinational.  Takes the K hybrid words {hd, v2c} of the variable nodes of
// one check node (delivered by shuffle network pi_i) and returns K
// check-to-variable messages, one per input position, plus the parity check
// of the K hard decisions (parity_ok = 1 when their XOR is 0), which the
// controller uses to stop decoding early.
// The message rule is offset min-sum, this design's choice: the sign of
// output j is the XOR of the other K-1 input signs, its magnitude the
// smallest of the other K-1 magnitudes minus OFFSET (not below 0).  The
// offset makes up for min-sum overrating the magnitudes of belief
// propagation; OFFSET = 0 gives plain min-sum.  It is computed with the
// usual two-minimum search (smallest and second smallest magnitude, and the
// position of the smallest).
module ldpc_cnu
  import ldpc_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int unsigned OFFSET = 1
) (
  input  hybrid_t hyb [K],
  output msg_t    c2v [K],
  output logic    parity_ok
);

  localparam int unsigned IW = (K > 1) ? $clog2(K) : 1;

  logic [MAGW-1:0] min1, min2, mag_ex;
  logic [IW-1:0]   min1_pos;
  logic            sign_all;
  logic            hd_par;

  always_comb begin
    min1     = '1;
    min2     = '1;
    min1_pos = '0;
    sign_all = 1'b0;
    hd_par   = 1'b0;
    for (int j = 0; j < int'(K); j++) begin
      sign_all ^= hyb[j].msg[QW-1];
      hd_par   ^= hyb[j].hd;
      if (hyb[j].msg[MAGW-1:0] < min1) begin
        min2     = min1;
        min1     = hyb[j].msg[MAGW-1:0];
        min1_pos = IW'(j);
      end else if (hyb[j].msg[MAGW-1:0] < min2) begin
        min2 = hyb[j].msg[MAGW-1:0];
      end
    end
    for (int j = 0; j < int'(K); j++) begin
      c2v[j][QW-1]     = sign_all ^ hyb[j].msg[QW-1];
      mag_ex           = (min1_pos == IW'(j)) ? min2 : min1;
      c2v[j][MAGW-1:0] = (mag_ex > MAGW'(OFFSET)) ? mag_ex - MAGW'(OFFSET) : '0;
    end
    parity_ok = ~hd_par;
  end

endmodule
