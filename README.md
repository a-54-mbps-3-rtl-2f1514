# Partly parallel (3,6)-regular LDPC decoder, 9216 bits, rate 1/2

This is a synthesizable SystemVerilog model of a partly parallel
belief-propagation decoder for a (3,k)-regular LDPC code of length
N = L·k² (default k = 6, L = 256: N = 9216, rate 1/2). A fully parallel
decoder puts one processor on every node of the Tanner graph, which does not
scale to long codes. This design instead puts the code and the hardware
together:

* **k² = 36 PE blocks.** Each one owns a group of L = 256 variable nodes,
  with their memories and one variable node unit (VNU).
* **3k = 18 check node units (CNUs).** They sit behind three shuffle
  networks π₁, π₂, π₃.
* **The code follows from the hardware.** The parity check matrix is set by
  a few counters and by the shuffle networks. No table of the graph is
  stored anywhere.

One decoding iteration takes exactly 2L = 512 clock cycles. A frame with s
iterations takes L·(2s+1) cycles: the extra L cycles are an initialisation
pass. With s = 18 and a 56 MHz clock (the figure reported for a Virtex-E
FPGA implementation of this architecture) that is
56·36/37 ≈ 54 Mbit/s of decoded symbols. Decoding also stops early once the
hard decisions satisfy every parity check.

## How the hardware defines the code

The parity check matrix is H = [H₁; H₂; H₃]. Each Hᵢ is Lk × Lk² and gives
every variable node exactly one check node in check node group CGᵢ.

**Where the data lives.** Variable node v_d of group VG_{x,y} (d = 1…L,
x, y = 1…k) is handled by PE_{x,y}. All of its state is at address d−1 of
the PE's memories:

* three EXT_RAMs, one per check node group;
* INT_RAM, the intrinsic LLR;
* DEC_RAM, the hard decision.

**How a CNP cycle works.** In each cycle of check node processing (CNP),
every EXT_RAMᵢ of every PE is read once, at the address its address
generator AG⁽ⁱ⁾_{x,y} gives. Shuffle network πᵢ carries the word to a CNU.
The node a PE reads in CNP cycle c therefore meets the check node that CNU
handles in cycle c. Which PE feeds which CNU input comes from the network:

| group | address generator (loaded at the start of CNP, then counts up mod L) | network |
|---|---|---|
| H₁ | 0 | π₁: the k PEs of row x → CNU_{1,x} |
| H₂ | u = ((x−1)·y) mod L (the cyclic shift of block P_{x,y}) | π₂: the k PEs of column y → CNU_{2,y} |
| H₃ | t_{x,y} | π₃: row shuffle, then column shuffle → CNU_{3,x} |

In code terms:

* **H₁** is a row of k identity blocks per block row.
* **H₂** is a row of cyclically shifted identity blocks per block row. The
  two together have girth 12.
* **H₃** is random-like. The offsets t_{x,y} are chosen at random under two
  rules. Together these rules keep the whole graph free of 4-cycles,
  whatever π₃ does:
  * t_{x,y₁} ≠ t_{x,y₂};
  * t_{x₁,y} − t_{x₂,y} ≢ (x₁−x₂)·y (mod L).

**π₃, the concatenated shuffle.** π₃ is two stages of small configurable
networks Ψ:

* **Row stage.** Ψ⁽ʳ⁾_x reorders the k words of PE row x. It applies a fixed
  random permutation R_x when its control bit is 1, and passes the words
  straight when it is 0.
* **Column stage.** Ψ⁽ᶜ⁾_y does the same within each column, with
  permutation C_y.

The control bits change every cycle. They come from ROM R and ROM C, each
L words of k bits, addressed by the CNP cycle number. The row stage only
connects PEs of one row, and the column stage only PEs of one column. On a
square floor plan of PE blocks all π₃ wiring therefore stays inside a row or
a column. Each Ψ is bi-directional: check-to-variable messages go back
through the inverse permutations, on their own wires.

**What is random here, and how it is fixed.** The t_{x,y}, R_x, C_y and the
ROM bits are random in the architecture. In this RTL they are fixed
pseudo-random values, made at elaboration by constant functions in
`ldpc_pkg`:

* The generator is a 32-bit linear congruential generator,
  s′ = 1664525·s + 1013904223.
* `h3_offset` draws each t_{x,y} and steps it up until both rules hold.
* `shuffle_perm` makes each permutation by a Fisher–Yates shuffle.
* `ctrl_bit` gives the ROM bits.

Changing the seeds there gives another code of the same ensemble. The
end-to-end testbench rebuilds H from these rules and checks two things:
every check node has degree k, and the Tanner graph has no 4-cycle.

## The iteration: 2L cycles, two phases

Every memory access runs in a two-stage loop:

1. **Read stage.** The address generators address the synchronous
   EXT_RAMs and INT_RAM.
2. **Execute stage, one cycle later.** The data is processed and written
   back to the read address, delayed by one register.

The phases:

* **CNP, L cycles.** Each EXT_RAM word holds a hybrid word: {hard decision,
  5-bit variable-to-check message}. Each word takes the path *read →
  shuffle → CNU → unshuffle → write*. It comes back as the check-to-variable
  message and is written to the same address. Shuffle, CNU and unshuffle
  are combinational inside the execute stage. Each CNU also XORs the k hard
  decisions it sees (the parity check).
* **VNP, L cycles.** All address generators count 0…L−1. The VNU of each PE
  reads the three check-to-variable messages and the intrinsic message of
  one node. It writes three new hybrid words back, and the hard decision to
  DEC_RAM.
* **Initialisation, L cycles.** This is a VNP pass with the incoming
  messages forced to zero. It seeds a new frame: every v2c equals the
  intrinsic LLR.

**Phase changes.** The write of the last word of a phase happens in the
same cycle as the first read of the next phase. The EXT_RAM is write-first:
a read of the address being written returns the new word. With a one-cycle
loop this removes every hazard, whatever the offsets u and t_{x,y} are, so
no bubble cycles are needed and an iteration is exactly 2L cycles.

**Early stop.** The controller ANDs the parity results of all 3k CNUs over a
CNP pass. The result is complete in the first cycle of the following VNP. If
all checks held, that VNP is cancelled: its writes are suppressed and the
frame ends with `converged = 1`. Otherwise the frame ends after `MAX_ITER`
iterations.

**Frame timing.** Measured from the start pulse to `done`:

* with no early stop: L·(2·MAX_ITER+1)+1 cycles, which is 9473 at the
  defaults;
* with an early stop after n iterations: L·(2n+2)+1 cycles.

The +1 is the write of the last word.

## Messages and node rules

* **Format.** All messages are 5-bit sign-magnitude: bit 4 is the sign
  (1 = negative LLR = bit value 1 more likely), bits 3:0 the magnitude.
* **VNU.** It computes the total = intrinsic + c2v₁ + c2v₂ + c2v₃. Each
  outgoing message is total − own input, clipped to ±15. The hard decision
  is total < 0.
* **CNU.** It uses offset min-sum: the sign of output j is the XOR of the
  other k−1 signs. Its magnitude is the smallest of the other k−1
  magnitudes minus `OFFSET` (default 1), and never below 0. It is built as
  a two-minimum search. The parity result is the XOR of the k hard
  decisions. The offset corrects plain min-sum's overestimate of the
  belief-propagation magnitudes. `OFFSET = 0` gives plain min-sum, which
  fails more frames at 2 dB.

The architecture fixes the 5-bit width and what each unit exchanges. The
exact arithmetic of the node updates is this design's own:

* the offset min-sum rule;
* the sign-magnitude format;
* the clipping.

Swapping in a table-based belief-propagation check rule only touches
`ldpc_cnu`. The testbench reference models must then change with it.

## Three frames at once: load, decode, read out

INT_RAM and DEC_RAM each have two banks:

* **Decode.** One frame is decoded.
* **Load.** The next frame is loaded into the other INT_RAM bank.
* **Read out.** The previous frame's decisions are read from the other
  DEC_RAM bank.

The signals at `ldpc_decoder`:

* **Load.** Put one LLR per cycle on `load_en`, `load_llr` and `load_addr`.
  `load_addr = {(x−1)·k+(y−1), d−1}`, so 6 + 8 bits. The symbol enters PE_{1,y}
  of every column and moves one PE row down per cycle. Each PE compares the
  PE index with its own. The target bank travels with the symbol. Wait k
  cycles after the last symbol before `start`.
* **Start.** Pulse `start` while `busy` is low. It swaps both bank pairs.
  The loaded frame is decoded, and the frame just decoded becomes readable.
  A start while busy is ignored, and an assertion in `ldpc_ctrl` flags
  this.
* **Read.** Put `rd_en` and `rd_addr = d−1` on the inputs. The request enters
  PE_{x,1} of every row and moves one PE to the right per cycle. Each PE adds
  its bit to a k-bit bus. After k cycles, `rd_valid` rises and `rd_data` holds
  k² bits. Bit (x−1)·k+(y−1) is the decision for v_d of PE_{x,y}.
* **Status.** `done` means the frame is finished and nothing is pending.
  `converged` and `iterations` describe the last frame.

Loading a frame takes N = 9216 cycles and decoding at most 9473, so the
three-frame pipeline keeps the decoder busy.

## Files

| file | contents |
|---|---|
| `rtl/ldpc_pkg.sv` | widths, message and hybrid types, phase enum, code-construction functions |
| `rtl/ldpc_decoder.sv` | top: controller, check node stage, k×k PE array, load and read-out chains |
| `rtl/ldpc_ctrl.sv` | phase sequencing, address generator restarts, early stop, bank swaps |
| `rtl/ldpc_pe.sv` | PE block: 3 EXT_RAM, INT_RAM, DEC_RAM, VNU, 3 address generators, chain stages |
| `rtl/ldpc_addr_gen.sv` | AG⁽ⁱ⁾_{x,y}: loadable counter mod L |
| `rtl/ldpc_ext_ram.sv` | EXT_RAM, L×6, write-first |
| `rtl/ldpc_int_ram.sv`, `rtl/ldpc_dec_ram.sv` | two-bank intrinsic and hard decision memories |
| `rtl/ldpc_vnu.sv`, `rtl/ldpc_cnu.sv` | node units |
| `rtl/ldpc_check_stage.sv` | π₁, π₂, π₃ and the 3k CNUs |
| `rtl/ldpc_pi3.sv` | two-stage shuffle network with ROM R and ROM C |
| `rtl/ldpc_perm_net.sv` | one bi-directional Ψ switch |
| `rtl/ldpc_ctrl_rom.sv` | ROM R / ROM C |

The parameters are `K` (row weight k), `L` (block size), and `MAX_ITER`
(at most s iterations) on the top. The construction functions support
k ≤ 16. They need L ≥ 2k−1 so that valid t_{x,y} exist.

At the defaults, synthesis gives 279,552 memory bits:

* EXT_RAM: 36·3·256·6;
* INT_RAM: 36·2·256·5;
* DEC_RAM: 36·2·256;
* the two ROMs.

There are about 2,000 flip-flops. The original FPGA mapping uses 90 dual-port
4-kbit block RAMs: each EXT_RAM is one half of a block, and each INT_RAM is
two halves. DEC_RAM is distributed RAM.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* **`tb_ldpc_decoder`** runs the full-size decoder (default parameters). It
  builds H independently from the construction rules and checks the degrees
  and that there are no 4-cycles. It then runs a bit-true reference decoder
  in the testbench on four frames: the all-zero codeword with
  Gaussian-distributed LLRs (noiseless, moderate, heavy noise). Frames are
  streamed with loading and read-out overlapping decoding. For every frame
  it compares:
  * all 9216 hard decisions;
  * the iteration count and `converged`;
  * the cycle count from start to done.

  It also counts the mechanisms: early stop, the iteration limit, load
  during decode, read during decode, the initialisation pass, and both
  switch settings in π₃.
* **`tb_ldpc_awgn_2db`** streams 16 frames at Eb/N0 = 2 dB through the
  full-size decoder. The channel is BPSK over AWGN, with LLRs quantised in
  steps of 0.25 and clipped at ±15. It checks that:
  * every frame that reports `converged` decoded to the transmitted word;
  * every decoding time matches its iteration count;
  * decoding removes errors.

  It prints the bit and frame error counts. With this code instance and
  node rule, 4 of 16 frames failed at 2 dB, averaging 15.8 iterations. That
  is far from a BER of 10⁻⁶. The plusargs `+ebn0=<dB>` and `+step=<x>` change
  the operating point. At 2.5 dB and 3 dB all 16 frames decoded, averaging
  10.1 and 7.5 iterations.
* **`tb_ldpc_pe`** runs one PE block through load, initialisation, CNP, VNP,
  CNP and read-out, with an emulated controller.
* **`tb_ldpc_check_stage` and `tb_ldpc_pi3`** check the routing of every
  port against the connection rules, and offset min-sum and parity against direct
  computation.
* The remaining testbenches cover the counters, memories, node units, the
  Ψ switch, the ROMs and the controller's phase sequence, latencies, early
  stop and bank swaps.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv rtl/*.sv tb/tb_ldpc_decoder.sv \
          --top-module tb_ldpc_decoder -Mdir obj && ./obj/Vtb_ldpc_decoder
```

The full-size run builds in about half a minute and simulates in a few
seconds.

## Where this RTL departs from the original design, and what to trust

* **Code instance.** t_{x,y}, R_x, C_y and the ROM words are this design's
  pseudo-random values, not those of the published decoder. The code is a
  member of the same 4-cycle-free ensemble. It has not been selected for
  cycle length or error rate, so its error-rate curve will differ.
* **Node arithmetic.** Offset min-sum with 5-bit sign-magnitude messages is
  an assumption. The original was characterised with belief propagation:
  a BER of 10⁻⁶ at Eb/N0 = 2 dB over AWGN, with 18 iterations. This RTL does
  not reach that with its code instance: it fails about a quarter of the
  frames at 2 dB (see `tb_ldpc_awgn_2db`). The likely causes are the
  check rule and the unselected code; neither has been isolated. The datapath and scheduling are
  verified bit-exact against the reference model.
* **Loop pipelining.** The original pipelines the read–shuffle–modify–
  unshuffle–write loop further to reach its clock rate. Here the loop has
  one register stage (the synchronous RAM read). That keeps exactly 2L cycles
  per iteration without hazard handling, but the combinational path from
  EXT_RAM through π₃, a CNU and back is long. Deeper pipelining would need
  either bubble cycles at phase changes or offset constraints that avoid
  read-after-write conflicts.
* **Memory organisation.** The EXT_RAMs have a separate read and write port
  and store 6 of the 8 bits of the original 256×8 blocks.
* **Read-out bus.** In the original, the decoded data bus of a row grows by
  one bit at each PE. Here every PE of a row passes a full k-bit bus and
  fills its own bit. The bits not yet filled are constant zeros that can be removed in
  synthesis, so the result is the same.
* **Early stop and frame control.** The parity-based early stop and the
  start/done handshake are this design's choices. After a frame that ran to
  the iteration limit, `converged` stays 0 even if the last decisions happen
  to form a codeword: no extra check pass is run.
* **Clock rate.** The clock rate, and therefore the 54 Mbit/s figure, depends
  on the target technology and has not been checked.
