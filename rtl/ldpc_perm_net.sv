// ldpc_perm_net: configurable bi-directional shuffle network Psi of pi_3.
//
// K ports in each direction.  With control bit s = 0 it passes data straight
// through (identity); with s = 1 it applies one fixed random permutation P:
// forward output position j takes forward input P(j).  The backward path
// carries check-to-variable messages on separate wires and applies the
// inverse, so a message returned at position j reaches the port its
// forward counterpart came from.  SEL = 0 selects R_IDX of the intra-row
// array, SEL = 1 C_IDX of the intra-column array; the permutation itself is
// drawn by ldpc_pkg::shuffle_perm.  Purely combinational.
module ldpc_perm_net #(
  parameter int unsigned K   = ldpc_pkg::K_DEF,
  parameter int unsigned FW  = ldpc_pkg::HW,
  parameter int unsigned BW  = ldpc_pkg::QW,
  parameter int unsigned SEL = 0,
  parameter int unsigned IDX = 1
) (
  input  logic          s,
  input  logic [FW-1:0] fwd_in  [K],
  output logic [FW-1:0] fwd_out [K],
  input  logic [BW-1:0] bwd_in  [K],
  output logic [BW-1:0] bwd_out [K]
);

  for (genvar j = 0; j < int'(K); j++) begin : g_port
    localparam int P    = ldpc_pkg::shuffle_perm(SEL, IDX, K, j);
    localparam int PINV = ldpc_pkg::shuffle_perm_inv(SEL, IDX, K, j);
    assign fwd_out[j] = s ? fwd_in[P]    : fwd_in[j];
    assign bwd_out[j] = s ? bwd_in[PINV] : bwd_in[j];
  end

endmodule
