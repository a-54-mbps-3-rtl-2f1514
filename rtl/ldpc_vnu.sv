// ldpc_vnu: variable node processor unit of a PE block.
//
// Combinational.  From the intrinsic message of variable node v_d and the
// three check-to-variable messages stored for it in EXT_RAM_1..3 it forms
//   total = intr + c2v[0] + c2v[1] + c2v[2]
//   v2c[i] = total - c2v[i]      (saturated to +/-15)
//   hd     = (total < 0)
// and returns the three hybrid words {hd, v2c[i]} that are written back to
// EXT_RAM_i.  With init high the incoming messages are taken as zero: this
// is the initialisation pass that seeds a new frame, so every v2c equals the
// intrinsic message.  The architecture fixes only the read-modify-write role
// of this unit; the update itself is the standard belief-propagation
// variable node rule in 5-bit sign-magnitude arithmetic (this design's
// choice of number format and saturation).
module ldpc_vnu
  import ldpc_pkg::*;
(
  input  logic    init,
  input  msg_t    intr,
  input  msg_t    c2v [3],
  output hybrid_t hyb [3],
  output logic    hd
);

  logic signed [7:0] cin [3];
  logic signed [7:0] total;

  always_comb begin
    for (int i = 0; i < 3; i++)
      cin[i] = init ? 8'sd0 : 8'(msg_to_int(c2v[i]));
    total = 8'(msg_to_int(intr)) + cin[0] + cin[1] + cin[2];
    hd    = total[7];
    for (int i = 0; i < 3; i++) begin
      hyb[i].hd  = total[7];
      hyb[i].msg = int_to_msg(total - cin[i]);
    end
  end

endmodule
