// ldpc_int_ram: INT_RAM of a PE block, the intrinsic messages of its L
// variable nodes.
//
// Two banks of L x QW bits: the bank the decoder reads holds the frame being
// decoded, the other one receives the next frame.  Which bank is which is
// chosen by the controller (rbank) and by the load chain (wbank); they swap
// when a new frame is started.  Location d-1 belongs to variable node v_d.
//
// Timing: synchronous write; synchronous read with rdata valid the cycle
// after raddr.  Reads and writes go to different banks in normal use, so no
// read-during-write rule is needed.
module ldpc_int_ram #(
  parameter int unsigned L  = ldpc_pkg::L_DEF,
  parameter int unsigned W  = ldpc_pkg::QW,
  localparam int unsigned AW = $clog2(L)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wbank,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          rbank,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2*L];

  always_ff @(posedge clk) begin
    if (we) mem[{wbank, waddr}] <= wdata;
    rdata <= mem[{rbank, raddr}];
  end

endmodule
