# Single-bit error correction co-processor for the GPRS Block Check Sequence

A GPRS receiver checks every decoded radio block with its Block Check
Sequence (BCS), a CRC appended by the transmitter. A block that fails is
normally thrown away and sent again. Coding scheme CS-4 is the fastest scheme
and has no convolutional code, so in CS-4 a single wrong bit is enough to make
a block fail. Often that one bit is the only error.

This co-processor repairs such blocks. It tries every single-bit inversion of
the block at the same time. A bank of CRC units receives the decoded block bit
by bit as the receiver produces it. Each unit inverts one different bit on
the way in. When the last bit arrives, each unit holds the remainder that the
block would have with its bit flipped. A unit whose remainder is correct
names the bit in error, and the host flips that bit. Every repaired block is
one retransmission saved. With about 14 % of CS-4 blocks repairable this way,
the user's data rate goes up by about that much.

The co-processor sits on the baseband DSP's parallel bus. It handles all four
coding schemes: CS-1 with its 40-bit BCS, and CS-2 to CS-4 with their 16-bit
BCS.

## The BCS test

A block is the data bits followed by the BCS bits, sent first bit first. Read
as a polynomial with the first bit as the highest power, a correct block
leaves a remainder of **all ones** when divided by the generator g(D):

| scheme | bits covered (data + USF + BCS) | g(D) |
|---|---|---|
| CS-1 | 181 + 3 + 40 = 224 | D^40 + D^26 + D^23 + D^17 + D^3 + 1 = (D^23+1)(D^17+D^3+1) |
| CS-2 | 268 + 3 + 16 = 287 | D^16 + D^12 + D^5 + 1 |
| CS-3 | 312 + 3 + 16 = 331 | D^16 + D^12 + D^5 + 1 |
| CS-4 | 428 + 3 + 16 = 447 | D^16 + D^12 + D^5 + 1 |

The transmitter makes this happen by taking the remainder of data·D^L and
appending its inverse. Each CRC unit (`crc_unit`) is a plain division shift
register. It starts at zero. The new bit enters at the low end, and the bit
that leaves the top feeds the polynomial back in. After the last bit, the
register holds the remainder itself, and `pass` is the AND of its bits. One
40-bit register serves both BCS lengths: in 16-bit mode the polynomial works
in the low 16 bits. An XOR in front of each register inverts the incoming bit
when the control unit strobes that unit.

## Sections: 64 units, up to 7 passes

A CS-4 block has 447 bit positions, so a full bank would need 447 units. The
default build has **64 units** (`N_CRC`), and the block is searched in up to
**7 sections** (`N_SECTIONS`) of 64 positions each. In section `s`, unit `k`
inverts bit `64*s + k`. The host sends the same block once per section and
stops at the first section that reports a pass. CS-1 needs at most 4 passes,
CS-2 5, CS-3 6 and CS-4 7. This trades latency for area. The bank is almost
the whole circuit: 64 × 40 flip-flops out of about 2,576.

`N_CRC = 448, N_SECTIONS = 1` gives the single-pass version, which searches
the whole block in one pass. It passes the same end-to-end test, but it is
not the default.

Short blocks. In the last section of a block, some units sit at positions
past the end of the block, for example units 32 to 63 of CS-1 section 3. These
units never invert anything, so on a block with no error they would pass. The
control unit therefore gives the output unit a `valid` mask. Only units whose
position lies inside the block can report a pass.

## Blocks

```
             data_in / data_out / addr / ce_n rd_n wr_n / reset
                              |
                      +----------------+
                      | interface_unit |<-------------------------+
                      +----------------+                          |
               cfg_we, cs, section | bit_we, D0          found, pos, count
                      +----------------+                          |
                      |  control_unit  |--- valid, base ------+   |
                      +----------------+                      |   |
                 invert[0..N-1] | shift_en, wide, clear       v   |
                      +-----------------------+         +-------------+
           D0 ------> | crc_bank: N x (XOR +  |--pass-->| output_unit |
                      |           crc_unit)   |  [N]    +-------------+
                      +-----------------------+
```

- `interface_unit`: the bus slave. It decodes the two write registers and
  returns the two read registers (see below).
- `control_unit`: latches the coding scheme and section. It counts the
  incoming bits and strobes `invert[k]` for the unit that owns the current bit
  position. It refuses bits past the block length, raises `done` after the
  last bit, and produces the `valid` mask.
- `crc_bank`: holds `N_CRC` instances of `crc_unit`. All of them share the bit
  stream, the shift enable and the mode.
- `output_unit`: a priority search. The lowest valid passing unit wins. It
  returns the absolute bit position (`base + k`) and the number of passing
  units.
- `gprs_edc_pkg`: the coding scheme enum, the polynomials, the block lengths
  and the register map.

## Using it from the host

The bus is synchronous to `clk`. `ce_n`, `rd_n` and `wr_n` are active low.
`reset` is active high and synchronous. A write is taken once per strobe, on
the first clock where `ce_n` and `wr_n` are both low. The strobe must go high
again before the next write. A read is combinational while `ce_n` and `rd_n`
are low, and `data_oe` is high for an external tri-state buffer.

| addr | write | read |
|---|---|---|
| 0 | CONFIG: D1..D0 coding scheme (0 = CS-1 … 3 = CS-4), D4..D2 section. Starts a pass: clears the bank and the bit counter | RESULT: D8..D0 position of the bit to flip |
| 1 | DATA: D0 = next bit of the block | STATUS: D0 done, D1 found, D2 more than one unit passed, D12..D4 bits received |

The host runs one pass per section. A pass is:

1. Write CONFIG with the coding scheme and section `s`.
2. Write all bits of the block to DATA, in order.
3. Read STATUS. It is valid the cycle after the last DATA write.
4. If `found` is set, read RESULT and flip that bit. The block is repaired.
   Otherwise run the next section.

If no section passes, the block cannot be repaired and is requested again.
With one write every two clocks, a full CS-4 search takes 7 × 448 × 2 =
6,272 clocks. One radio block spans four TDMA frames, about 18.5 ms, so even a
1 MHz bus keeps up.

Both generators contain the factor (D + 1), so every error pattern of odd
weight is detected. A block with two errors plus one trial inversion has
three bits wrong, so it can never pass, and double errors are never
"repaired". Two units cannot pass on a block with one error either, because
no two-bit pattern this short is a multiple of g(D). The ambiguity bit is a
safeguard that these block lengths never set. The testbenches confirm this
behaviour against a brute-force search.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_CRC` | 64 | CRC units in the bank (positions per section) |
| `N_SECTIONS` | 7 | sections; `N_CRC*N_SECTIONS` must be at least 447 (checked by an elaboration assertion) |
| `DATA_W` | 16 | bus data width (at least 13) |
| `ADDR_W` | 2 | bus address width |

## What is taken from the design description and what is this design's own

These parts follow the description the design is based on:

- the four blocks and how they connect
- the XOR in front of every CRC unit
- bit-serial input on D0 and the result on D0–D8
- the coding scheme set after reset
- the polynomials and the all-ones remainder test
- 64 units and 7 sections

These parts are this design's own choices:

- the register map, the strobe polarity and timing, and the status word
- one shared 40-bit register per unit
- the `valid` mask for positions past the end of a block
- lowest-position priority and the ambiguity flag
- ignoring bits past the block length
- CS-4 as the coding scheme after reset

For CS-1, the source gives two lengths that disagree. This design follows the
coding-scheme table: 184 data bits plus 40 BCS bits, 224 in all. This is also
what the GPRS standard uses.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself if it
runs too long. The reference model (`tb/tb_gprs_pkg.sv`) checks blocks by
schoolbook GF(2) long division, not by a shift register.

| testbench | what it checks |
|---|---|
| `tb_crc_unit` | remainder and pass for correct, corrupted and corrected blocks of all four schemes |
| `tb_crc_bank` | pass flags of all 64 units, compared with a brute-force flip-and-divide for each unit |
| `tb_control_unit` | inversion strobe timing for every scheme and section, `done`, the valid mask, refused bits |
| `tb_output_unit` | priority, position, count and masking on random vectors |
| `tb_interface_unit` | one pulse per strobe of any length, decoded fields, read words, chip enable |
| `tb_gprs_edc_top` | end to end at the default size: 32 blocks with no, one or two errors, a full section search, repair checked against the block as sent |
| `tb_workload_500_frames` | 500 CS-4 blocks, 70 with one error and 30 with two; all 70 are recovered, and the worst case takes 6,272 clocks |

`tb_gprs_edc_top` also counts each mechanism and fails if one never happens:

- each coding scheme
- a hit in the first section, in a later section and in the seventh section
- a block with no repair
- an error-free block
- a double-error block
- bits written after the end of the block
- masked spare units
- a pass cut short by a new CONFIG write
- the reset pin

To run a testbench:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_gprs_edc_top rtl/gprs_edc_pkg.sv tb/tb_gprs_pkg.sv tb/tb_gprs_edc_top.sv
./obj_dir/Vtb_gprs_edc_top
```

Replace the top module and the last file name to run another testbench.

## Limits

- The design has been simulated only. It has not been put on an FPGA.
- The tests plant errors at random. They do not model the radio channel, so
  they say nothing about how often real channels produce single-bit errors.
- `data_out[15:13]` are always zero.
- The design corrects one bit per block. A two-bit search would need a unit
  for every pair of positions, and it is not built.
