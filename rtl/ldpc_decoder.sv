// ldpc_decoder: partly parallel decoder for a (3,k)-regular LDPC code of
// length N = L*k^2 (default k = 6, L = 256: 9216 bits, rate 1/2).
//
// The k^2 PE blocks PE_{x,y} each own L variable nodes; the 3k check node
// units sit behind the shuffle networks pi_1, pi_2, pi_3 of
// ldpc_check_stage.  The code's parity check matrix H = [H_1; H_2; H_3] is
// set by the address generators in the PE blocks together with the shuffle
// networks (see ldpc_pkg).  One iteration takes 2L cycles: in the first L
// cycles (CNP) every EXT_RAM word goes through read - shuffle - check node
// update - unshuffle - write, in the next L cycles (VNP) every variable node
// is updated in its own PE block.  A frame needs L*(2s+1) cycles for s
// iterations, the extra L cycles being the initialisation pass; decoding
// stops earlier once all parity checks hold (ldpc_ctrl).
//
// Three frames are in flight: while one is decoded, the next is loaded into
// the other INT_RAM bank and the hard decisions of the previous one are read
// from the other DEC_RAM bank.
//   Load:  one 5-bit sign-magnitude LLR per cycle (load_en), load_addr =
//          {PE index (x-1)*k+(y-1), location d-1}.  The symbol enters all
//          PE_{1,y} and moves down one PE row per cycle; it lands in the
//          bank that is not being decoded.  Wait k cycles after the last
//          load before start.
//   Start: pulse start while busy is low; the loaded frame becomes the one
//          decoded and the frame just decoded becomes readable.
//   Read:  rd_en with location rd_addr enters all PE_{x,1} and moves right
//          one PE per cycle, each PE adding its hard decision; k cycles
//          later rd_valid is high and rd_data bit (x-1)*k+(y-1) is the
//          decision of v_{rd_addr+1} of PE_{x,y}.  Bit = 1 means a negative
//          LLR.
// Status: done once a frame has been decoded and nothing is pending;
// converged when it stopped because all checks held; iterations = number of
// completed iterations.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned L        = L_DEF,
  parameter int unsigned MAX_ITER = MAX_ITER_DEF,
  localparam int unsigned AW = $clog2(L),
  localparam int unsigned PW = $clog2(K * K),
  localparam int unsigned IW = $clog2(MAX_ITER + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             converged,
  output logic [IW-1:0]    iterations,
  input  logic             load_en,
  input  logic [PW+AW-1:0] load_addr,
  input  msg_t             load_llr,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic             rd_valid,
  output logic [K*K-1:0]   rd_data
);

  phase_e        ph_rd, ph_ex;
  logic [AW-1:0] cnt;
  logic          ag_start, ag_cnp, ag_en, int_bank, dec_bank, ld_bank, parity_ok;

  ldpc_ctrl #(.L(L), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n, .start, .parity_ok,
    .ph_rd, .ph_ex, .cnt, .ag_start, .ag_cnp, .ag_en,
    .int_bank, .dec_bank, .ld_bank,
    .busy, .done, .converged, .iterations
  );

  hybrid_t hyb [3][K][K];
  msg_t    c2v [3][K][K];

  ldpc_check_stage #(.K(K), .L(L)) u_check (
    .clk, .rom_addr(cnt), .hyb, .c2v, .parity_ok
  );

  // chain signals: index [x][y] is the input of PE_{x+1,y+1}; row K / column
  // K hold the outputs of the last row / column.
  logic          ld_en   [K+1][K];
  logic          ld_bank_c [K+1][K];
  logic [PW-1:0] ld_pe   [K+1][K];
  logic [AW-1:0] ld_addr [K+1][K];
  msg_t          ld_data [K+1][K];
  logic          rd_en_c   [K][K+1];
  logic [AW-1:0] rd_addr_c [K][K+1];
  logic [K-1:0]  rd_bits_c [K][K+1];

  for (genvar y = 0; y < int'(K); y++) begin : g_ld_in
    assign ld_en[0][y]     = load_en;
    assign ld_bank_c[0][y] = ld_bank;
    assign ld_pe[0][y]     = load_addr[PW+AW-1:AW];
    assign ld_addr[0][y]   = load_addr[AW-1:0];
    assign ld_data[0][y]   = load_llr;
  end

  for (genvar x = 0; x < int'(K); x++) begin : g_rd_in
    assign rd_en_c[x][0]   = rd_en;
    assign rd_addr_c[x][0] = rd_addr;
    assign rd_bits_c[x][0] = '0;
    assign rd_data[x*K +: K] = rd_bits_c[x][K];
  end

  assign rd_valid = rd_en_c[0][K];

  for (genvar x = 0; x < int'(K); x++) begin : g_x
    for (genvar y = 0; y < int'(K); y++) begin : g_y
      hybrid_t h [3];
      msg_t    m [3];
      for (genvar i = 0; i < 3; i++) begin : g_i
        assign hyb[i][x][y] = h[i];
        assign m[i]         = c2v[i][x][y];
      end
      ldpc_pe #(.K(K), .L(L), .X(x + 1), .Y(y + 1)) u_pe (
        .clk, .rst_n,
        .ph_ex, .ag_start, .ag_cnp, .ag_en, .int_bank, .dec_bank,
        .hyb_out    (h),
        .c2v_in     (m),
        .ld_en_in   (ld_en[x][y]),
        .ld_bank_in (ld_bank_c[x][y]),
        .ld_pe_in   (ld_pe[x][y]),
        .ld_addr_in (ld_addr[x][y]),
        .ld_data_in (ld_data[x][y]),
        .ld_en_out  (ld_en[x+1][y]),
        .ld_bank_out(ld_bank_c[x+1][y]),
        .ld_pe_out  (ld_pe[x+1][y]),
        .ld_addr_out(ld_addr[x+1][y]),
        .ld_data_out(ld_data[x+1][y]),
        .rd_en_in   (rd_en_c[x][y]),
        .rd_addr_in (rd_addr_c[x][y]),
        .rd_bits_in (rd_bits_c[x][y]),
        .rd_en_out  (rd_en_c[x][y+1]),
        .rd_addr_out(rd_addr_c[x][y+1]),
        .rd_bits_out(rd_bits_c[x][y+1])
      );
    end
  end

endmodule
