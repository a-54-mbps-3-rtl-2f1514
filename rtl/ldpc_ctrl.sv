// ldpc_ctrl: phase controller of the decoder.
//
// A frame is decoded as an initialisation pass of L cycles followed by up to
// MAX_ITER iterations of 2L cycles each: L cycles of check node processing
// (CNP), then L cycles of variable node processing (VNP).  The controller
// counts the cycles of the read stage (cnt, also the ROM R / ROM C address),
// tells the PE blocks the phase of the read stage (ph_rd) and of the
// execute stage one cycle later (ph_ex), and restarts the address generators
// one cycle before each phase (ag_start, with ag_cnp when CNP follows).
//
// Early stop (this design's reading of the per-check parity result): during
// a CNP pass the parity_ok results of all check nodes are ANDed.  When the
// last CNP word has been checked (first cycle of the following VNP) and every
// check held, the current hard decisions form a codeword: the VNP pass is
// cancelled, its pending writes suppressed, and the frame ends with
// converged = 1.  Otherwise the frame ends after MAX_ITER iterations.
//
// Frame pipelining: start is accepted when idle.  It swaps the INT_RAM banks
// (the frame loaded meanwhile becomes the one decoded, loading continues
// into the other bank; ld_bank tells the load chain which) and the DEC_RAM
// banks (the frame just decoded becomes readable).  done rises when the last
// write has happened: L*(2*s+1)+1 cycles after start for s iterations
// without early stop, L*(2*n+2)+1 cycles when the check after n iterations
// succeeds.  iterations counts the completed VNP passes of the last frame.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned L        = L_DEF,
  parameter int unsigned MAX_ITER = MAX_ITER_DEF,
  localparam int unsigned AW = $clog2(L),
  localparam int unsigned IW = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          parity_ok,
  output phase_e        ph_rd,
  output phase_e        ph_ex,
  output logic [AW-1:0] cnt,
  output logic          ag_start,
  output logic          ag_cnp,
  output logic          ag_en,
  output logic          int_bank,
  output logic          dec_bank,
  output logic          ld_bank,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic [IW-1:0] iterations
);

  logic last, accept, early, more, syn_acc, decoded;

  assign last   = (cnt == AW'(L - 1));
  assign busy   = (ph_rd != PH_IDLE) || (ph_ex != PH_IDLE);
  assign accept = start && !busy;
  assign early  = (ph_rd == PH_VNP) && (cnt == '0) && syn_acc && parity_ok;
  assign more   = (32'(iterations) + 1 < MAX_ITER);
  assign done   = decoded && !busy;
  assign ld_bank = ~int_bank;
  assign ag_en  = (ph_rd != PH_IDLE);

  always_comb begin
    ag_start = 1'b0;
    ag_cnp   = 1'b0;
    if (accept) begin
      ag_start = 1'b1;
    end else if (last) begin
      unique case (ph_rd)
        PH_INIT: begin ag_start = 1'b1; ag_cnp = (MAX_ITER > 0); end
        PH_CNP:  ag_start = 1'b1;
        PH_VNP:  begin ag_start = more; ag_cnp = more; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph_rd      <= PH_IDLE;
      ph_ex      <= PH_IDLE;
      cnt        <= '0;
      int_bank   <= 1'b0;
      dec_bank   <= 1'b0;
      decoded    <= 1'b0;
      converged  <= 1'b0;
      iterations <= '0;
      syn_acc    <= 1'b0;
    end else begin
      ph_ex <= early ? PH_IDLE : ph_rd;
      if (ph_ex == PH_CNP) syn_acc <= syn_acc & parity_ok;
      if (ag_start && ag_cnp) syn_acc <= 1'b1;
      cnt <= (ph_rd == PH_IDLE || last || early) ? '0 : cnt + 1'b1;
      unique case (ph_rd)
        PH_IDLE: if (accept) begin
          ph_rd      <= PH_INIT;
          int_bank   <= ~int_bank;
          dec_bank   <= ~dec_bank;
          decoded    <= 1'b0;
          converged  <= 1'b0;
          iterations <= '0;
        end
        PH_INIT: if (last) begin
          ph_rd   <= (MAX_ITER > 0) ? PH_CNP : PH_IDLE;
          decoded <= (MAX_ITER == 0);
        end
        PH_CNP: if (last) ph_rd <= PH_VNP;
        PH_VNP: if (early) begin
          ph_rd     <= PH_IDLE;
          decoded   <= 1'b1;
          converged <= 1'b1;
        end else if (last) begin
          iterations <= iterations + 1'b1;
          ph_rd      <= more ? PH_CNP : PH_IDLE;
          decoded    <= !more;
        end
        default: ;
      endcase
    end
  end

  // start is only honoured between frames
  assert property (@(posedge clk) disable iff (!rst_n) accept |=> ph_rd == PH_INIT);
  // a CNP pass is always followed by a VNP pass or an early stop
  assert property (@(posedge clk) disable iff (!rst_n)
                   (ph_rd == PH_CNP && last) |=> ph_rd == PH_VNP);

endmodule
