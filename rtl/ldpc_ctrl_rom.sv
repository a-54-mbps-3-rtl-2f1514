// ldpc_ctrl_rom: ROM R (SEL = 0) or ROM C (SEL = 1) of shuffle network pi_3.
//
// L words of K bits; word c is the configuration of the K intra-row (or
// intra-column) shuffle networks in CNP cycle c, bit x-1 (or y-1) driving
// Psi_x (or Psi_y).  The contents are random in the architecture; here they
// are the fixed pseudo-random bits of ldpc_pkg::ctrl_bit, written into the
// array at start-up, which synthesis turns into ROM contents.
// Timing: synchronous read, word for addr appears the next cycle, in step
// with the EXT_RAM data read with the same cycle count.
module ldpc_ctrl_rom #(
  parameter int unsigned K   = ldpc_pkg::K_DEF,
  parameter int unsigned L   = ldpc_pkg::L_DEF,
  parameter int unsigned SEL = 0,
  localparam int unsigned AW = $clog2(L)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [K-1:0]  word
);

  logic [K-1:0] rom [L];

  initial begin
    for (int a = 0; a < int'(L); a++)
      for (int b = 0; b < int'(K); b++)
        rom[a][b] = ldpc_pkg::ctrl_bit(SEL, a, b);
  end

  always_ff @(posedge clk)
    word <= rom[addr];

endmodule
