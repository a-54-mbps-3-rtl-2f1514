// ldpc_pi3: concatenated configurable random shuffle network pi_3.
//
// Each CNP cycle it routes the k^2 hybrid words a[x][y] (a[x][y] from
// PE_{x,y}) to the inputs of the k check node units CNU_{3,x} in two
// stages:
//   intra-row:    Psi^(r)_x shuffles a[x][0..k-1] into b[x][0..k-1],
//                 permutation R_x when control bit s^(r)_x = 1, else identity;
//   intra-column: Psi^(c)_y shuffles b[0..k-1][y] into c[0..k-1][y],
//                 permutation C_y when s^(c)_y = 1, else identity.
// The k words c[x][*] go to CNU_{3,x} (input position y).  The control words
// s^(r) and s^(c) change every cycle; they come from ROM R and ROM C,
// addressed by the CNP cycle count.  The backward path returns the
// check-to-variable messages c_bwd[x][y] through the same switches in the
// opposite order on separate wires, so each message lands at the PE its
// forward word came from.  Because every row network touches one row of PE
// blocks and every column network one column, all wiring stays local to a
// row or a column of the square PE floor plan.
//
// Timing: rom_addr in cycle c selects the control words used in cycle c+1,
// the cycle in which the EXT_RAM data read in cycle c is on a[][]; the
// shuffle itself is combinational.
module ldpc_pi3
  import ldpc_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int unsigned L  = L_DEF,
  localparam int unsigned AW = $clog2(L)
) (
  input  logic          clk,
  input  logic [AW-1:0] rom_addr,
  input  hybrid_t       a     [K][K],
  output hybrid_t       c     [K][K],
  input  msg_t          c_bwd [K][K],
  output msg_t          a_bwd [K][K]
);

  logic [K-1:0] s_row, s_col;

  ldpc_ctrl_rom #(.K(K), .L(L), .SEL(0)) u_rom_r (.clk, .addr(rom_addr), .word(s_row));
  ldpc_ctrl_rom #(.K(K), .L(L), .SEL(1)) u_rom_c (.clk, .addr(rom_addr), .word(s_col));

  logic [HW-1:0] b     [K][K];
  logic [QW-1:0] b_bwd [K][K];

  for (genvar x = 0; x < int'(K); x++) begin : g_row
    logic [HW-1:0] fi [K];
    logic [QW-1:0] bo [K];
    for (genvar y = 0; y < int'(K); y++) begin : g_io
      assign fi[y]       = a[x][y];
      assign a_bwd[x][y] = bo[y];
    end
    ldpc_perm_net #(.K(K), .FW(HW), .BW(QW), .SEL(0), .IDX(x + 1)) u_psi_r (
      .s      (s_row[x]),
      .fwd_in (fi),
      .fwd_out(b[x]),
      .bwd_in (b_bwd[x]),
      .bwd_out(bo)
    );
  end

  for (genvar y = 0; y < int'(K); y++) begin : g_col
    logic [HW-1:0] fi [K];
    logic [HW-1:0] fo [K];
    logic [QW-1:0] bi [K];
    logic [QW-1:0] bo [K];
    for (genvar x = 0; x < int'(K); x++) begin : g_io
      assign fi[x]       = b[x][y];
      assign c[x][y]     = hybrid_t'(fo[x]);
      assign bi[x]       = c_bwd[x][y];
      assign b_bwd[x][y] = bo[x];
    end
    ldpc_perm_net #(.K(K), .FW(HW), .BW(QW), .SEL(1), .IDX(y + 1)) u_psi_c (
      .s      (s_col[y]),
      .fwd_in (fi),
      .fwd_out(fo),
      .bwd_in (bi),
      .bwd_out(bo)
    );
  end

endmodule
