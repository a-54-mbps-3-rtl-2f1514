// ldpc_addr_gen: address generator AG^(i)_{x,y} of one EXT_RAM.
//
// A ceil(log2 L)-bit counter that counts up to L-1 and wraps to 0.  At the
// start of each phase it is loaded: with OFFSET when the coming phase is
// check node processing (0 for AG^(1), ((x-1)*y) mod L for AG^(2), t_{x,y}
// for AG^(3), as the code construction prescribes), and with 0 for variable
// node processing and the initialisation pass, where every memory is walked
// in address order.  The reload value for the non-CNP phases is this
// design's choice.
//
// Timing: start (with cnp) loads the counter at the clock edge, so addr
// holds the first read address in the cycle after start; while en is high
// the counter advances once per cycle.  start has priority over en.
module ldpc_addr_gen #(
  parameter int unsigned L      = ldpc_pkg::L_DEF,
  parameter int unsigned OFFSET = 0,
  localparam int unsigned AW    = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          cnp,
  input  logic          en,
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk) begin
    if (!rst_n)
      addr <= '0;
    else if (start)
      addr <= cnp ? AW'(OFFSET) : '0;
    else if (en)
      addr <= (addr == AW'(L - 1)) ? '0 : addr + 1'b1;
  end

endmodule
