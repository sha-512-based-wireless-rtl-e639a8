# SHA-512 hashing node for wireless battery-cell authentication

A battery pack made of many cells is open to a simple hardware attack: a
rogue ("trojan") cell fitted at the factory or during maintenance can report
false health data or drain the pack. Checking each cell through wired contacts
does not scale to large packs. This design authenticates cells over a wireless
link instead. Every cell, and the battery management system (BMS), contains a
small SHA-512 engine. A cell hashes its unique identification code and sends
the 512-bit digest. The BMS hashes the code it expects for that cell and
compares the two digests. Changing one bit of the code changes the digest
completely, so a cell with the wrong code is rejected.

This repository holds the logic side of one such node:

- a SHA-512 core, built for small area, with a 64-bit word interface;
- an AXI4-Lite peripheral that lets a CPU start a hash and read the digest;
- the identification-code source that feeds the core;
- a node top that wires them together.

In a complete node, a soft CPU runs the authentication software and talks to
a Wi-Fi module through a UART. The CPU, its memory, the bus interconnect, the
UARTs, the clock synthesizer and the reset generators are standard vendor
parts. They are not included here. The node exposes an AXI4-Lite slave port
where the interconnect would connect.

## Block structure

```
bms_auth_node
 ├─ ip_generator      identification code, 64 bits per word, ENDFlag on the last word
 └─ sha512_axi        AXI4-Lite registers, digest capture
     └─ sha512_core   load / pad / hash / stream-out controller
         ├─ sha512_msg_buf    64 x 64-bit block RAM (message words)
         ├─ sha512_padder     padding computed when a word is read
         ├─ sha512_msg_sched  W0..W79, 16-word sliding window
         └─ sha512_compress   80 rounds, 3 cycles each, a..h registers
             └─ sha512_k_rom  K0..K79
sha512_pkg                    word/state types, IV, Sigma/sigma/Ch/Maj functions
```

The LEDs show bits [15:0] of the core's `DataOut`. The `message_ready` pin is
the core's `DigestReady`.

## The core's word interface (`sha512_core`)

The core has seven ports: `clk`, `reset` (active-high, synchronous), `Start`,
`DataIn[63:0]`, `Stop`, `DataOut[63:0]` and `DigestReady`. One operation goes
as follows:

1. **Idle.** After reset the core waits until `Start` is high.
2. **Load.** Starting the cycle after `Start`, the core takes one word from
   `DataIn` every `IN_DIV` cycles. The default `IN_DIV` is 2, so words arrive at
   half the hashing clock: 78.5 MHz against 157 MHz in the reference system.
   Between these sampling cycles the core ignores `DataIn`. The word taken
   while `Stop` is high is the **last** word of the message. If `Start` and
   `Stop` are high together, the message is a single word.
3. **Hash.** The core sets H to the SHA-512 initial value. It then compresses
   the padded message one 1024-bit block at a time.
4. **Stream out.** For eight consecutive cycles `DigestReady` is high and
   `DataOut` carries H0, H1, …, H7. Outside those eight cycles `DataOut` is
   zero. The core then returns to idle.

Messages are whole 64-bit words. Because the interface has no byte count,
the bit length is always 64 × words. The longest message is `MAX_WORDS` = 56
words (3584 bits). If more words arrive before `Stop`, the extra words are
dropped, and the hash covers only the first 56.

**Latency.** `DigestReady` rises 1 + 243 × blocks cycles after the last word
is taken. The number of blocks is ⌈(words + 3) / 16⌉. A one-word message
takes 244 cycles, which is 1.55 µs at 157 MHz. A 56-word message takes 4
blocks and 973 cycles.

## Padding without writing padding

The message buffer stores only the message words. `sha512_padder` produces
the padded message as the buffer is read, word by word. Given the word index
`i` and the word count `n`, it returns:

| index                         | word                              |
|-------------------------------|-----------------------------------|
| `i < n`                       | buffer word `i`                   |
| `i == n`                      | `0x8000_0000_0000_0000` (the 1 bit) |
| `i == 16·blocks − 1`          | `64·n` (length, low 64 bits)      |
| otherwise                     | 0 (including the high length word) |

with `blocks = ⌊(n + 3 + 15) / 16⌋`. The `+3` counts the pad word and the
two length words. Fourteen words or more push the length into a second block.
This costs a comparator or two and saves the cycles of writing padding into
the RAM.

## The round engine (`sha512_compress`)

The design trades speed for area. Each round uses a single set of adders over
three clock cycles:

| cycle | action |
|-------|--------|
| OPS   | `Kt ← K[t]`, `Wt ← W_t`, `Cx,Cy,Cz ← e,f,g`, `Mx,My ← a,b` |
| TCALC | `T1 ← h + Σ1(e) + Ch(Cx,Cy,Cz) + Kt + Wt`; `T2 ← Σ0(a) + Maj(Mx,My,c)` |
| UPD   | `h←g, g←f, f←e, e←d+T1, d←c, c←b, b←a, a←T1+T2` |

A block takes one fetch cycle, 80 × 3 round cycles and one done cycle: 242
cycles in total. In the done cycle, `sum = h_in + (a..h)` word by word mod
2^64 becomes the new H.

The Ch and Maj operands are latched one cycle early into `Cx..Cz` and
`Mx, My`. So at the end of a block these registers hold the old e, f, g and
a, b, which are the final f, g, h and b, c. In the known-answer test below,
the testbench checks these values and the final a, T1, T2 and Kt.

The message word for round t is requested one cycle before the OPS cycle
(`w_req`, `w_idx`). This allows for the block RAM's registered read. The core
holds the read address between requests, so `rdata` stays valid.
`sha512_msg_sched` passes block words through for t < 16. From t = 16 on, it
computes σ1(W[t−2]) + W[t−7] + σ0(W[t−15]) + W[t−16] from a 16-entry shift
register. `sha512_k_rom` is a combinational table of the 80 standard constants
(the first 64 fraction bits of the cube roots of the first 80 primes).

## AXI4-Lite peripheral (`sha512_axi`)

The peripheral has 32-bit registers and an 8-bit byte address.

| address      | access | meaning |
|--------------|--------|---------|
| `0x00`       | W      | bit 0 = 1 starts a hash. The start is ignored while busy. |
| `0x00`       | R      | bit 0 busy, bit 1 done (digest complete; cleared by the next start) |
| `0x40 + 4j`  | R      | digest word j = 0..15. Even j gives H_{j/2}[63:32]; odd j gives H_{j/2}[31:0]. |

Other addresses read as 0, and writes to them are ignored. Every response is
OKAY.

- **Writes.** A write is accepted in the cycle where `awvalid` and `wvalid`
  are both high and no write response is pending. `bvalid` rises one cycle
  later.
- **Reads.** A read is accepted when `arvalid` is high and no read data is
  pending. `rvalid` rises one cycle later.
- **Assertions.** Two assertions check the slave's side of the protocol: a
  response stays valid until it is taken, and read data stays stable meanwhile.

The message does not travel over the bus. It arrives on `DataIn` and
`ENDFlag` (the core's `Stop`). `StartPulse` repeats the core's `Start`. In the
node, `StartPulse` restarts `ip_generator`, so a multi-word code is replayed
in step with the core's word sampling. Software therefore does three things:
write 1 to `0x00`, poll `0x00` until bit 0 clears, and read `0x40..0x7C`.

## Identification code (`ip_generator`)

`ip_generator` presents `ID_WORDS` 64-bit words: word 0 is `ID_VALUE[63:0]`,
and the following words move up through the parameter. A new word appears
every `STEP` cycles after reset. The last word stays on `IP` with `ENDFlag`
high. The default code is one word, `0x6162636461626364` (ASCII "abcdabcd").
Its digest is

```
7edbb31279e6b88a c79812e2f77f5b23 4f817797c7cf9826 3d557ecfc992f1c4
3e8b169e11e3aace b4407da8390517ca c5e64f579344e15f 589be5c20e7cecc8
```

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `sha512_core` | `IN_DIV` | 2 | clock cycles per loaded word |
| `sha512_core` | `MAX_WORDS` | 56 | longest message, 3584 bits |
| `sha512_core` | `BUF_WORDS` | 64 | buffer depth, 4 blocks; must be a power of two ≥ `MAX_WORDS + 3` |
| `sha512_msg_buf` | `DEPTH` | 64 | |
| `sha512_axi` | `ADDR_W`, `IN_DIV` | 8, 2 | |
| `ip_generator`, `bms_auth_node` | `ID_WORDS`, `ID_VALUE` | 1, `0x6162636461626364` | |
| `ip_generator` | `STEP` | 2 | must equal the core's `IN_DIV` |

## Where this design departs from, or goes beyond, the reference system

- **One clock.** The reference system loads words on a 78.5 MHz clock and
  hashes on a 157 MHz clock. Here, one clock and a load strobe every `IN_DIV`
  cycles stand in for the two clocks.
- **Stop marks the last word.** `Stop` is read as marking the last word,
  which is the only reading under which a one-word message with `Start` and
  `Stop` both high works.
- **Reset polarity.** The reset is active-high. The reference waveform shows
  reset low during operation.
- **Latency.** The reference core needed about 142 µs per one-block hash. Its
  cycle-level organisation is not known, so this design does not try to match
  that figure. The three-cycle round is this design's own choice. It matches
  the register set (a..h, T1, T2, Kt, Cx..Cz, Mx, My) and their final values
  in the reference simulation. This design is much faster (1.55 µs at
  157 MHz).
- **Own choices.** The AXI register map, the bus timing, the digest word order
  on `DataOut` (H0 first) and the generator's replay-on-start are this
  design's own. So are the bits shown on the LEDs, the dropping of words past
  56, and padding on read.
- **Not built.** The following are not implemented: the faster variant of the
  core (189.5 MHz) that the reference system also reports, the CPU software
  and its authentication exchange, and the UART and Wi-Fi parts.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Expected values come
from `tb/sha512_ref_pkg.sv`, a behavioural SHA-512 model written separately
from the RTL. It derives K and the IV from their prime-root definitions.

- `tb_sha512_k_rom`: all 80 constants.
- `tb_sha512_padder`: every padded word for 1..61 words.
- `tb_sha512_msg_buf`: write, read back, and read while writing.
- `tb_sha512_msg_sched`: W0..W79 of three blocks.
- `tb_sha512_compress`: random blocks and H, 242-cycle timing, request order,
  and the internal known-answer registers.
- `tb_sha512_core`:
  - "abcdabcd" with `Start` and `Stop` together;
  - messages of 1, 13, 14, 29, 45 and 56 words;
  - truncation of 60 words;
  - `IN_DIV` sampling;
  - the 8-cycle `DigestReady` window;
  - latency 1 + 243·blocks.
- `tb_sha512_axi`: register map, busy/done, start ignored while busy, and the
  digest of 1-, 14- and 56-word messages.
- `tb_ip_generator`: word stepping, hold and restart.
- `tb_bms_auth_node`: three nodes (1, 14 and 56 words) driven through
  AXI4-Lite. It counts each mechanism: start, busy, ignored start,
  multi-block chaining, a block holding only padding, the longest message,
  the `DigestReady` windows and the LED words.
- `tb_bms_auth_node_full`: one complete hash on the node with all defaults.
- `tb_auth_scenario`: a BMS node and two cell nodes. The genuine cell's
  digest matches the BMS's; a cell whose code differs in one bit is rejected.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sha512_pkg.sv tb/sha512_ref_pkg.sv tb/tb_sha512_core.sv --top tb_sha512_core
./obj_dir/Vtb_sha512_core
```

Replace `tb_sha512_core` with any testbench name. Each one finishes in well
under a second.
