// ldpc_pe: PE block PE_{X,Y}, owner of variable node group VG_{X,Y}
// (the L variable nodes v_1..v_L of columns H^(X,Y)).
//
// Contents: EXT_RAM_1..3 (one per check node group), INT_RAM (two banks of
// intrinsic messages), DEC_RAM (two banks of hard decisions), one VNU, the
// three address generators AG^(1..3)_{X,Y}, and one stage each of the
// intrinsic load chain and the read-out chain.  Everything about node v_d
// lives at address d-1 of every memory.
//
// Datapath loop, one word per EXT_RAM per cycle, two stages:
//   read stage (phase ph of the controller): AG^(i) addresses EXT_RAM_i,
//     AG^(1) also addresses INT_RAM;
//   execute stage (ph_ex, one cycle later): in CNP mode the three hybrid
//     words leave on hyb_out towards the shuffle networks and the returning
//     check-to-variable messages c2v_in are written to the same addresses;
//     in VNP mode (and in the initialisation pass) the VNU turns the three
//     stored check-to-variable messages and the intrinsic message into three
//     hybrid words written back to EXT_RAM_1..3, and the hard decision goes
//     to the current DEC_RAM bank.
// The write address is the read address delayed by one cycle.  AG^(1) is
// loaded with 0, AG^(2) with ((X-1)*Y) mod L and AG^(3) with t_{X,Y} at the
// start of CNP mode; all three restart at 0 for the other phases.
//
// Load chain: ld_* carries {enable, target bank, PE index (X-1)*K+(Y-1),
// location, intrinsic message}.  The block writes the symbol into INT_RAM
// when the PE index is its own, and passes all fields on to PE_{X+1,Y}
// through a register.  Read-out chain: rd_* carries {enable, location,
// K-bit bus}.  The block reads its previous-frame DEC_RAM bank at the
// location, puts the bit on bus position Y-1, and hands everything to
// PE_{X,Y+1} through a register.
module ldpc_pe
  import ldpc_pkg::*;
#(
  parameter int unsigned K  = K_DEF,
  parameter int unsigned L  = L_DEF,
  parameter int unsigned X  = 1,
  parameter int unsigned Y  = 1,
  localparam int unsigned AW = $clog2(L),
  localparam int unsigned PW = $clog2(K * K)
) (
  input  logic          clk,
  input  logic          rst_n,
  // phase control
  input  phase_e        ph_ex,
  input  logic          ag_start,
  input  logic          ag_cnp,
  input  logic          ag_en,
  input  logic          int_bank,
  input  logic          dec_bank,
  // shuffle network side
  output hybrid_t       hyb_out [3],
  input  msg_t          c2v_in  [3],
  // intrinsic load chain
  input  logic          ld_en_in,
  input  logic          ld_bank_in,
  input  logic [PW-1:0] ld_pe_in,
  input  logic [AW-1:0] ld_addr_in,
  input  msg_t          ld_data_in,
  output logic          ld_en_out,
  output logic          ld_bank_out,
  output logic [PW-1:0] ld_pe_out,
  output logic [AW-1:0] ld_addr_out,
  output msg_t          ld_data_out,
  // hard decision read-out chain
  input  logic          rd_en_in,
  input  logic [AW-1:0] rd_addr_in,
  input  logic [K-1:0]  rd_bits_in,
  output logic          rd_en_out,
  output logic [AW-1:0] rd_addr_out,
  output logic [K-1:0]  rd_bits_out
);

  localparam int unsigned OFF [3] = '{0, h2_offset(X, Y, L), h3_offset(X, Y, K, L)};
  localparam logic [PW-1:0] MY_PE = PW'((X - 1) * K + (Y - 1));

  logic [AW-1:0] addr   [3];
  logic [AW-1:0] addr_d [3];
  logic [HW-1:0] ext_rdata [3];
  logic [HW-1:0] ext_wdata [3];
  msg_t          intr;
  msg_t          vnu_c2v [3];
  hybrid_t       vnu_hyb [3];
  logic          vnu_hd;
  logic          ext_we, dec_we;

  for (genvar i = 0; i < 3; i++) begin : g_ext
    ldpc_addr_gen #(.L(L), .OFFSET(OFF[i])) u_ag (
      .clk, .rst_n, .start(ag_start), .cnp(ag_cnp), .en(ag_en), .addr(addr[i])
    );

    ldpc_ext_ram #(.L(L), .W(HW)) u_ext (
      .clk, .raddr(addr[i]), .rdata(ext_rdata[i]),
      .we(ext_we), .waddr(addr_d[i]), .wdata(ext_wdata[i])
    );

    assign hyb_out[i] = hybrid_t'(ext_rdata[i]);
    assign vnu_c2v[i] = ext_rdata[i][QW-1:0];
    assign ext_wdata[i] = (ph_ex == PH_CNP) ? {1'b0, c2v_in[i]} : vnu_hyb[i];
  end

  always_ff @(posedge clk) addr_d <= addr;

  assign ext_we = (ph_ex != PH_IDLE);
  assign dec_we = (ph_ex == PH_INIT) || (ph_ex == PH_VNP);

  ldpc_int_ram #(.L(L), .W(QW)) u_int (
    .clk,
    .we   (ld_en_in && ld_pe_in == MY_PE),
    .wbank(ld_bank_in),
    .waddr(ld_addr_in),
    .wdata(ld_data_in),
    .rbank(int_bank),
    .raddr(addr[0]),
    .rdata(intr)
  );

  ldpc_vnu u_vnu (
    .init(ph_ex == PH_INIT),
    .intr,
    .c2v (vnu_c2v),
    .hyb (vnu_hyb),
    .hd  (vnu_hd)
  );

  logic dec_bit;

  ldpc_dec_ram #(.L(L)) u_dec (
    .clk,
    .we   (dec_we),
    .wbank(dec_bank),
    .waddr(addr_d[0]),
    .wdata(vnu_hd),
    .rbank(~dec_bank),
    .raddr(rd_addr_in),
    .rdata(dec_bit)
  );

  // load and read-out chain registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ld_en_out <= 1'b0;
      rd_en_out <= 1'b0;
    end else begin
      ld_en_out <= ld_en_in;
      rd_en_out <= rd_en_in;
    end
    ld_bank_out <= ld_bank_in;
    ld_pe_out   <= ld_pe_in;
    ld_addr_out <= ld_addr_in;
    ld_data_out <= ld_data_in;
    rd_addr_out <= rd_addr_in;
    rd_bits_out <= rd_bits_in;
    rd_bits_out[Y-1] <= dec_bit;
  end

endmodule
