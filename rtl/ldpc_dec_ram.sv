// ldpc_dec_ram: DEC_RAM of a PE block, hard decisions of its L variable nodes.
//
// Two banks of L bits: the decoder writes the current frame's decisions into
// one bank while the previous frame's decisions are read out of the other.
// It is a small distributed RAM: synchronous write, asynchronous
// (combinational) read, so the read-out chain can pick up the bit in the
// same cycle the address arrives.
module ldpc_dec_ram #(
  parameter int unsigned L  = ldpc_pkg::L_DEF,
  localparam int unsigned AW = $clog2(L)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wbank,
  input  logic [AW-1:0] waddr,
  input  logic          wdata,
  input  logic          rbank,
  input  logic [AW-1:0] raddr,
  output logic          rdata
);

  logic mem [2*L];

  always_ff @(posedge clk)
    if (we) mem[{wbank, waddr}] <= wdata;

  assign rdata = mem[{rbank, raddr}];

endmodule
