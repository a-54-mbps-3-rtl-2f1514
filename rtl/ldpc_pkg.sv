// ldpc_pkg: types, constants and code-construction functions shared by the
// (3,k)-regular partly parallel LDPC decoder.
//
// Messages (intrinsic, check-to-variable, variable-to-check) are 5-bit
// sign-magnitude numbers: bit 4 is the sign (1 = negative LLR, i.e. bit value
// 1 is more likely), bits 3:0 the magnitude 0..15.  A "hybrid" word, as
// stored in EXT_RAM before check node processing, carries the hard decision
// of the variable node next to its variable-to-check message.
//
// The code is defined by the address generator offsets and the pi_3 shuffle
// network.  The offsets of AG^(2) follow the construction of H_2
// (u = ((x-1)*y) mod L).  The offsets t_{x,y} of AG^(3), the fixed
// permutations R_x / C_y and the ROM R / ROM C control words are random in
// the architecture; here they are produced by a fixed 32-bit linear
// congruential generator (s' = 1664525*s + 1013904223), so that every tool
// and testbench sees the same code.  h3_offset() draws each t_{x,y} and steps
// it up until the two 4-cycle-free constraints hold:
//   t_{x,y1} != t_{x,y2}                         for y1 != y2
//   t_{x1,y} - t_{x2,y} != (x1-x2)*y  (mod L)    for x1 != x2
// The functions run at elaboration only.  Indices x, y are 1-based as in the
// architecture description; permutation positions are 0-based.
package ldpc_pkg;

  localparam int K_DEF        = 6;    // row weight k
  localparam int L_DEF        = 256;  // block size L
  localparam int MAX_ITER_DEF = 18;   // maximum decoding iterations s
  localparam int QW           = 5;    // message width
  localparam int MAGW         = QW - 1;
  localparam int KMAX         = 16;   // largest k the construction functions handle

  typedef logic [QW-1:0] msg_t;       // {sign, magnitude}

  typedef struct packed {
    logic hd;                         // hard decision of the variable node
    msg_t msg;                        // variable-to-check message
  } hybrid_t;

  localparam int HW = $bits(hybrid_t);

  // Phase of the decoder, carried with each pipeline stage.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_INIT = 2'd1,                   // initialisation pass (VNP with zero c2v)
    PH_CNP  = 2'd2,                   // check node processing
    PH_VNP  = 2'd3                    // variable node processing
  } phase_e;

  function automatic int unsigned lcg(int unsigned s);
    return s * 32'd1664525 + 32'd1013904223;
  endfunction

  function automatic int mod_l(int v, int l);
    int r;
    r = v % l;
    if (r < 0) r += l;
    return r;
  endfunction

  // Load value of AG^(2)_{x,y}: cyclic shift of P_{x,y} in H_2.
  function automatic int h2_offset(int x, int y, int l);
    return mod_l((x - 1) * y, l);
  endfunction

  // Load value t_{x,y} of AG^(3)_{x,y}.
  function automatic int h3_offset(int x, int y, int k, int l);
    int t [KMAX*KMAX];  // t[(x-1)*KMAX + (y-1)]
    int unsigned s;
    bit clash;
    s = 32'h1d87_2b41;
    for (int xi = 1; xi <= k; xi++) begin
      for (int yi = 1; yi <= k; yi++) begin
        s = lcg(s);
        t[(xi-1)*KMAX + yi-1] = int'((s >> 8) % l);
        clash = 1'b1;
        for (int tries = 0; tries < l && clash; tries++) begin
          clash = 1'b0;
          for (int yy = 1; yy < yi; yy++)
            if (t[(xi-1)*KMAX + yy-1] == t[(xi-1)*KMAX + yi-1]) clash = 1'b1;
          for (int xx = 1; xx < xi; xx++)
            if (mod_l(t[(xx-1)*KMAX + yi-1] - t[(xi-1)*KMAX + yi-1], l) == mod_l((xx - xi) * yi, l))
              clash = 1'b1;
          if (clash) t[(xi-1)*KMAX + yi-1] = mod_l(t[(xi-1)*KMAX + yi-1] + 1, l);
        end
      end
    end
    return t[(x-1)*KMAX + y-1];
  endfunction

  // Fixed random permutation of a configurable shuffle network.
  // sel = 0: R_idx of intra-row network Psi^(r)_idx; sel = 1: C_idx.
  // Returns the input position routed to output position pos when enabled.
  function automatic int shuffle_perm(int sel, int idx, int k, int pos);
    int p [KMAX];
    int unsigned s;
    int j, tmp;
    for (int i = 0; i < KMAX; i++) p[i] = i;
    s = 32'h5bd1_e995 + 32'h9e37_79b9 * (unsigned'(sel) * 32'd64 + unsigned'(idx));
    s = lcg(lcg(s));
    for (int i = k - 1; i > 0; i--) begin
      s   = lcg(s);
      j   = int'((s >> 8) % (i + 1));
      tmp = p[i];
      p[i] = p[j];
      p[j] = tmp;
    end
    return p[pos];
  endfunction

  // Inverse of shuffle_perm: output position that input position pos reaches.
  function automatic int shuffle_perm_inv(int sel, int idx, int k, int pos);
    int r;
    r = 0;
    for (int i = 0; i < k; i++)
      if (shuffle_perm(sel, idx, k, i) == pos) r = i;
    return r;
  endfunction

  // Control bit s^(r)_x (sel = 0, ROM R) or s^(c)_y (sel = 1, ROM C) used in
  // CNP cycle addr; pos = x-1 or y-1.
  function automatic logic ctrl_bit(int sel, int addr, int pos);
    int unsigned s;
    s = 32'h2545_f491 + 32'h9e37_79b9 * unsigned'(sel) + 32'h85eb_ca6b * unsigned'(addr)
      + 32'hc2b2_ae35 * unsigned'(pos);
    s = lcg(lcg(lcg(s)));
    return s[31];                     // top bit: depends on every seed bit
  endfunction

  // Sign-magnitude message to two's complement.
  function automatic logic signed [QW:0] msg_to_int(msg_t m);
    logic signed [QW:0] v;
    v = signed'({2'b00, m[MAGW-1:0]});
    return m[QW-1] ? -v : v;
  endfunction

  // Two's complement to sign-magnitude, saturating the magnitude.
  function automatic msg_t int_to_msg(logic signed [7:0] v);
    logic [7:0] a;
    msg_t m;
    a = v[7] ? 8'(-v) : 8'(v);
    m[QW-1] = v[7];
    m[MAGW-1:0] = (a > 8'((1 << MAGW) - 1)) ? MAGW'((1 << MAGW) - 1) : a[MAGW-1:0];
    return m;
  endfunction

endpackage
