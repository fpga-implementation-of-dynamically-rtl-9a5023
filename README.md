# Algorithm-hopping authenticated-encryption link

A small IoT device that always encrypts with the same cipher gives an attacker one
fixed target: collect enough traces or cipher texts, break that one algorithm, and
all traffic is open. *Algorithm hopping* borrows the idea of frequency hopping in
radio: the two ends of a link change cipher from one message to the next, following
a pseudo-random sequence that only they know. An attacker who does not know the
sequence does not even know which algorithm protects a given message.

In the target system, each end is an FPGA whose cipher area is a dynamically
reconfigurable partition. Before every message it is loaded with one of five
authenticated ciphers, the CAESAR candidates ASCON, COLM, Deoxys, OCB and AEGIS.
The rest of the node is static and shared by all ciphers:

- the FIFOs,
- the CAESAR-API pre- and post-processor,
- the UART,
- the sequence generator.

This repository is the synthesizable SystemVerilog of that link. It covers:

- both nodes, the hopping logic and the serial protocol between the nodes;
- three of the five ciphers: ASCON-128, AEGIS-128 and OCB3 with AES-128;
- the partition as a multiplexed set of cipher modules with a modelled
  reconfiguration delay.

## The hopping sequence

`hop_lfsr` is a 5-bit Fibonacci LFSR with polynomial 1 + x^3 + x^5 and an XNOR
feedback gate (`next = {s[3:0], ~(s[4] ^ s[2])}`). It runs through the 31 states other
than all ones; a seed of all ones, the XNOR lock-up state, is loaded as zero. The three
low bits of the state are the algorithm ID:

| ID | 0 | 1 | 2 | 3 | 4-7 |
|----|---|---|---|---|-----|
| cipher | ASCON | COLM | Deoxys | OCB | AEGIS |

The sequence from seed 00, shown as state:cipher, is:

`00:ASCON 01:COLM 03:OCB 07:AEGIS 0E:AEGIS 1C:AEGIS 19:COLM 12:Deoxys 04:AEGIS 08:ASCON 11:COLM 02:Deoxys 05:AEGIS 0A:Deoxys 15:AEGIS 0B:OCB ...`

Both nodes load the same secret seed and step once at the end of every session.
The sequence therefore stays in lock-step as long as every session completes.
The receiver also checks the ID it is sent (see below).

AEGIS has a second generator, `iv_lfsr128`. This is a 128-bit LFSR with taps 128,
126, 101 and 99 that supplies a fresh 128-bit IV for every AEGIS message, so a
nonce is never reused with a key. An IV whose 16 bytes are all equal would start
AEGIS from a weak state, so the generator skips it by stepping again. The sender
writes the IV into the nonce field of the outgoing request, and the receiver reads
it from there.

## A session between the two nodes

`hopping_link` is the top. It joins a sending `hop_node` (`IS_SENDER=1`) and a
receiving one with one serial line in each direction. A session runs as follows:

1. The sender's host has loaded the key (SDI FIFO), written Activate Key and an
   encryption request (PDI FIFO), and pulses `hop_start`.
2. The sender reads the ID from its LFSR and reconfigures its partition to that
   cipher. This takes `RECONFIG_CYCLES`, 16700 by default, which is 1.67 ms at
   10 MHz. For AEGIS it also draws the next IV.
3. The pre-processor feeds the request to the cipher. The post-processor writes the
   result to the DO FIFO as a complete decryption request.
4. The sender's UART sends the data frame: `A5`, the ID, the word count (N), then N
   words, each sent as 8 bytes, most significant first.
5. The receiver compares the ID with its own LFSR.
   - If the ciphers agree, it reconfigures, pushes the words into its PDI FIFO and
     decrypts.
   - If they disagree, it reads the frame off the line and drops it, and nothing
     reaches its host.
6. The receiver keeps the plaintext back until the tag has been checked.
   - If the tag is good, the plaintext is released to its DO FIFO, followed by a
     success status word.
   - If the tag is bad, only a failure status word is written.
7. The receiver sends the status frame `5A, E0` (success) or `5A, F0` (failure). Both
   nodes report `session_done` and `session_ok`, and both LFSRs step to the next hop.

The UART is 8N1 with `CLKS_PER_BIT=87`, which is 115200 baud at 10 MHz. The receiver
double-registers its input. At this rate the serial link, not the ciphers, limits
the end-to-end throughput.

## Word formats

Host FIFOs and the serial frames carry 64-bit words. The format follows the CAESAR
hardware API (instruction, segment header, data); the exact field positions are set
in `hop_pkg`:

| word | bits |
|------|------|
| instruction | `[63:56]` message id, `[55:48]` opcode: ENC `02`, DEC `03`, Load Key `04`, Activate Key `05` |
| segment header | `[63:56]` message id, `[55:52]` type: NPUB `1`, AD `2`, MSG `4`, CT `5`, KEY `6`, TAG `8`; `[49]` end of input, `[48]` end of type, `[15:0]` size in bytes |
| status | `[63:56]` message id, `[55:48]` `E0` success / `F0` failure |

Data words are big-endian byte strings, and the last word of a segment is
zero-filled. A request carries the following segments:

- Encryption: `ENC, NPUB hdr, 2 words, AD hdr, words, MSG hdr, words`.
- Decryption: `DEC, NPUB hdr, 2 words, AD hdr, words, CT hdr, words, TAG hdr, 2 words`.

An empty AD or message segment is a header of size 0 with no data words. Keys go to
SDI as `Load Key, KEY hdr (16), 2 words`, and become active when `Activate Key`
arrives through PDI.

## The cipher interface and the key handshake

Every cipher module has the same two ports, the structs `core_in_t` and
`core_out_t` from `hop_pkg`. This is what lets one partition hold any of them.

- **Input blocks.** `bdi` carries a 16-byte block with its byte count and the `ad`,
  `eot` (end of segment) and `eoi` (end of input) flags. The core acknowledges it
  combinationally with `bdi_read` in the cycle it takes it, so `bdi_valid`/`bdi_read`
  is a valid/ready pair. Flags are captured in that same cycle.
- **Output blocks.** Output blocks (`bdo`) and the tag are held valid until the
  post-processor's `bdo_ready`.
- **Tag check.** On decryption the core compares the computed tag with the expected
  tag. It then pulses `auth_done` with the result in `auth_valid`.
- **Key handshake** (in `cipher_partition`). `key_ready` means a key sits in the
  pre-processor. `key_needs_update` means Activate Key was seen. When both are high
  and no message is in progress, the partition copies the key and raises
  `key_updated`. A message starts only on `bdi_proc` while no key update is pending.

Cycle counts at the core interface:

| core | init | per 16-byte block | final |
|------|------|-------------------|-------|
| `aegis128_core` | 10 | 1 (five AES rounds in parallel) | 7 + 1 |
| `ascon128_core` | 12 | 14 (two 8-byte rate blocks of 6 rounds + absorb) | 12 + tag |
| `ocb3_core` | key schedule 10, L* and Ktop 2 AES calls | about 12 (one iterative AES call) | 1 AES call |

At 10 MHz this is 1280, about 91 and about 107 Mbps for the cores alone.
`aes128_core` is shared by OCB. It has one round per cycle and decrypts with stored
round keys. The AES functions in `aes_pkg` compute the S-box from the GF(2^8)
inverse instead of a table.

## Masked ASCON S-box

ASCON's only nonlinear part is a 5-bit S-box. A power analysis of the first or last
round needs only 32 hypotheses per S-box, so it is the natural place to attack.
`ascon_masked_sbox` places a decoy S-box, S*, beside each real one:

1. A random swap bit per column routes the real 5-bit input to either S or S*.
2. The other unit receives a random 5-bit input.
3. The same bit routes the outputs back.

The result is always S(x), so the cipher is unchanged. The power drawn, though, is
that of two S-box evaluations in a random arrangement. The layer is bit-sliced
logic over 64 columns, with no table. `ascon128_core` feeds it decoy inputs and swap
bits from a free-running 64-bit LFSR, in place of a true random source.

## Reconfiguration model

`cipher_partition` instantiates the ASCON, OCB and AEGIS modules side by side. Each
has its own registered reset. A reconfiguration request holds every module in reset
for `RECONFIG_CYCLES` and then releases only the selected one; an output
multiplexer follows `active_alg`. In the target FPGA, one partial bitstream replaces
the previous module instead. The timing and the fact that a module starts from reset
are the same, but the area is not: this RTL contains all three modules.

COLM and Deoxys are not included. Their slots are brought out of the top as ports:

- `tx_/rx_ext_cin` and `tx_/rx_ext_rst_n` carry the shared input bundle and the slot
  reset;
- `*_colm_cout` and `*_deoxys_cout` take the modules' outputs.

A module with the `core_in_t`/`core_out_t` interface can be attached there. If
nothing is attached and the sequence reaches ID 1 or 2, the sender waits forever for
that cipher. With the slots empty, choose seeds (or re-seed between sessions) so that
the hop avoids those IDs, as the testbenches do.

## Where this RTL departs from the target system

- **All modules present.** All reconfigurable modules are present at once. Partial
  bitstream loading (ICAP controller, processor, SD card) is outside the RTL, and
  only its delay is modelled.
- **COLM and Deoxys.** They are not implemented; only their slots exist.
- **Word width.** FIFOs in the nodes are 64 bits wide and 32 deep, where the target
  uses 256-bit ports. `fwft_fifo`'s defaults are 256 x 32. A message of instruction,
  headers, AD, text and tag must fit in 32 words, for example 5 bytes of AD and
  20 bytes of text take 13.
- **Host interface.** The processor's AXI access to the FIFOs is replaced by plain
  FIFO write/read ports.
- **Own choices.** These are not given by the target system:
  - the word layout and codes;
  - the frame bytes `A5`/`5A`;
  - the baud rate;
  - the ID mapping for IDs 4-7;
  - dropping frames with a mismatched ID.
- **Mask source.** The masked ASCON S-box draws its random inputs from a 64-bit
  LFSR, not from a true random source.

## Files

| file | contents |
|------|----------|
| `rtl/hop_pkg.sv`, `rtl/aes_pkg.sv` | types, word formats, AES functions |
| `rtl/hop_lfsr.sv`, `rtl/iv_lfsr128.sv` | hop sequence, AEGIS IV generator |
| `rtl/fwft_fifo.sv`, `rtl/uart_tx.sv`, `rtl/uart_rx.sv` | static infrastructure |
| `rtl/pre_processor.sv`, `rtl/post_processor.sv` | CAESAR-API front and back end |
| `rtl/aes128_core.sv`, `rtl/ocb3_core.sv`, `rtl/ascon128_core.sv`, `rtl/aegis128_core.sv` | ciphers |
| `rtl/ascon_masked_sbox.sv` | ASCON S-box layer with decoy S-box |
| `rtl/cipher_partition.sv` | reconfigurable partition, key handshake |
| `rtl/hop_node.sv`, `rtl/hopping_link.sv` | one node, the two-node top |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_hopping_link.sv` | eight sessions at reduced reconfiguration and UART times |
| `tb/tb_hopping_link_full.sv` | three sessions at the default parameters |

The cipher testbenches compare against the ciphers' published test vectors or
values computed independently from the cipher definitions. Each runs messages of
0 to 48 bytes of AD and text, with and without output back-pressure, and with a
forged tag. `tb_hopping_link` exercises and counts:

- reconfigurations and key activations;
- ASCON, OCB and AEGIS sessions;
- IV replacement;
- an authentication failure (wrong receiver key);
- an ID mismatch (receiver out of step);
- LFSR hops and frames.

It fails if any of these never happens.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hopping_link \
  -y rtl -y tb +libext+.sv rtl/aes_pkg.sv rtl/hop_pkg.sv tb/tb_hopping_link.sv
./obj_dir/Vtb_hopping_link
```

Substitute any `tb_<name>` to run that block's testbench. Each one prints
`TB_RESULT checks=N failures=M`. The reduced link test takes a few seconds. The
full-size one simulates about 340,000 cycles (about 16 s).
