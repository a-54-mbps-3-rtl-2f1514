// ldpc_ext_ram: EXT_RAM_i of a PE block, L words of W bits.
//
// Location d-1 holds what variable node v_d of the block exchanges with its
// neighbour in check node group CG_i: the hybrid word {hard decision,
// variable-to-check message} before check node processing, the
// check-to-variable message after it.
//
// One synchronous read port and one write port.  rdata is registered: the
// word addressed by raddr in cycle c is on rdata in cycle c+1.  A write takes
// effect at the clock edge.  When a write and a read hit the same address in
// the same cycle, the read returns the data being written (write-first); the
// decoder relies on this where the last write of one phase and the first read
// of the next meet.  The two-port organisation and the write-first behaviour
// are this design's choices; the original maps each EXT_RAM onto half of an
// FPGA block RAM.
module ldpc_ext_ram #(
  parameter int unsigned L  = ldpc_pkg::L_DEF,
  parameter int unsigned W  = ldpc_pkg::HW,
  localparam int unsigned AW = $clog2(L)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [L];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (we && waddr == raddr) rdata <= wdata;
    else                      rdata <= mem[raddr];
  end

endmodule
