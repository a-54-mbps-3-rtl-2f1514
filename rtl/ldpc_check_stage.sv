// ldpc_check_stage: the check node side of the decoder, i.e. the three
// bi-directional shuffle networks pi_1, pi_2, pi_3 and the 3k check node
// units CNU_{i,j}.
//
// Each CNP cycle every PE block PE_{x,y} presents one hybrid word per
// EXT_RAM_i (hyb[i][x][y], indices 0-based).  The networks deliver them:
//   pi_1: the k words of PE row x        -> CNU_{1,x}  (fixed wiring)
//   pi_2: the k words of PE column y     -> CNU_{2,y}  (fixed wiring)
//   pi_3: all k^2 words, row then column shuffle -> CNU_{3,x} (ldpc_pi3)
// and carry the check-to-variable messages back, on separate wires, to the
// port the hybrid word came from: c2v[i][x][y] goes back into EXT_RAM_i of
// PE_{x,y}.  parity_ok is high when every one of the 3k parity checks of this
// cycle is satisfied by the hard decisions.
// Combinational apart from the ROM R / ROM C read inside pi_3, whose
// address rom_addr is the CNP cycle count one cycle ahead of the data.
module ldpc_check_stage
  import ldpc_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int unsigned L  = L_DEF,
  localparam int unsigned AW = $clog2(L)
) (
  input  logic          clk,
  input  logic [AW-1:0] rom_addr,
  input  hybrid_t       hyb [3][K][K],
  output msg_t          c2v [3][K][K],
  output logic          parity_ok
);

  logic [3*K-1:0] ok;

  // pi_1 and CNU_{1,x}
  for (genvar x = 0; x < int'(K); x++) begin : g_cg1
    hybrid_t in  [K];
    msg_t    out [K];
    for (genvar y = 0; y < int'(K); y++) begin : g_w
      assign in[y]        = hyb[0][x][y];
      assign c2v[0][x][y] = out[y];
    end
    ldpc_cnu #(.K(K)) u_cnu (.hyb(in), .c2v(out), .parity_ok(ok[x]));
  end

  // pi_2 and CNU_{2,y}
  for (genvar y = 0; y < int'(K); y++) begin : g_cg2
    hybrid_t in  [K];
    msg_t    out [K];
    for (genvar x = 0; x < int'(K); x++) begin : g_w
      assign in[x]        = hyb[1][x][y];
      assign c2v[1][x][y] = out[x];
    end
    ldpc_cnu #(.K(K)) u_cnu (.hyb(in), .c2v(out), .parity_ok(ok[K+y]));
  end

  // pi_3 and CNU_{3,x}
  hybrid_t c3     [K][K];
  msg_t    c3_bwd [K][K];

  ldpc_pi3 #(.K(K), .L(L)) u_pi3 (
    .clk,
    .rom_addr,
    .a    (hyb[2]),
    .c    (c3),
    .c_bwd(c3_bwd),
    .a_bwd(c2v[2])
  );

  for (genvar x = 0; x < int'(K); x++) begin : g_cg3
    ldpc_cnu #(.K(K)) u_cnu (.hyb(c3[x]), .c2v(c3_bwd[x]), .parity_ok(ok[2*K+x]));
  end

  assign parity_ok = &ok;

endmodule
