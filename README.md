# Byte-serial low-power AES-128 encryption core

A sensor node has little silicon area and a tight power budget, but it still
needs a block cipher. This core encrypts 128-bit blocks with AES-128 using
the smallest practical datapath: **one S-box, one MixColumn "basic module"
and two 8-bit registers**, working a byte at a time on a 16-byte register
memory. A second, equally small unit computes each round key on the fly,
a byte per clock, while the data unit is busy with the first part of the
round. The architecture follows the paper *Low Power Circuit Architecture
of AES Crypto Module for Wireless Sensor Network* (M. Kim, J. Kim, Y. Choi).
The cycle-level schedule, the controller and the host interface are this
implementation's own, because the paper does not give them.

An encryption takes 634 clock cycles: 16 for the initial AddRoundKey, 65
for each of rounds 1 to 9 and 33 for round 10. At the paper's 10 MHz
operating point that is 63.4 µs per block.

## Structure

```
                 aes_top  (round controller, host port)
          ┌──────────────┴───────────────┐
   aes_data_unit                    aes_key_unit
   ├ aes_byte_mem  (state S0..S15)  ├ aes_byte_mem (key S0..S15)
   ├ aes_sbox                       ├ aes_sbox
   ├ aes_mc_basic ─ aes_xtime       ├ aes_rcon_gen ─ aes_xtime
   └ Reg1, Reg2, selectors          └ Kreg, XOR, mux1..mux3
```

`aes_pkg` holds the byte types, the cycle counts, the SubByte/ShiftRow read
order and the phase enum. Bytes are numbered as AES numbers its input:
byte *i* is row *i* mod 4, column *i* / 4. So byte 0 is the first byte of
the FIPS-197 hex string.

## The data round, byte by byte

This is the hard part of the design. A round is three passes over the
state memory, and each pass reads and writes the memory in place.

**SubByte + ShiftRow (17 cycles).** ShiftRow rotates row *r* left by *r*,
so the byte at (r, c) moves to (r, c−r mod 4). The pass reads one byte per
cycle in the order

```
0 4 8 12 | 5 1 13 9 | 2 10 6 14 | 15 3 7 11
```

Each cycle the S-box output of the byte just read goes into Reg1. In the
same cycle the previous Reg1 value is written to the ShiftRow destination
of the previous byte. Within a rotation cycle of a row, that destination is
the address being read in the current cycle. So each byte is read just
before the byte moving onto its address overwrites it, and no second buffer
is needed. Row 0 does not move: it is simply substituted in place. Row 2
splits into two 2-cycles, (2,10) and (6,14). The 17th cycle writes the last
byte.

**MixColumn (32 cycles, 8 per column).** The MixColumn matrix can be
rewritten as

```
b_i = xtime(a_i ^ a_(i+1)) ^ (a0 ^ a1 ^ a2 ^ a3) ^ a_i
```

so one xtime block and three XORs make any output byte. In cycles 0–3 of a
column, Reg2 accumulates the column sum, and Reg1 keeps a0. In cycles 4–7,
b0..b3 are written over a0..a3. b3 needs the original a0, which has been
overwritten by then, so it takes a0 from Reg1. The final round has no
MixColumn pass.

**AddRoundKey (16 cycles).** Byte *i* is replaced by byte *i* XOR key
byte *i*. The key byte comes from the key unit's memory at `rk_addr = i`.

The S-box and MixColumn inputs are forced to zero outside their passes.
This is operand isolation: idle logic does not toggle. Every memory byte
register loads only through its own enable, and a clock-gating synthesis
flow turns that enable into a gated clock. The RTL contains no explicit
gating cell.

## Key schedule in parallel

The key memory is loaded with the cipher key and then overwritten with
each round key. One round key takes 17 cycles. Kreg is a one-byte
pipeline register in front of the XOR with the memory byte being updated:

| cycle | memory write | Kreg load |
|---|---|---|
| 0 | – | S(k13) ^ Rcon |
| 1–3 | k0..k2 ^= Kreg | S(k14), S(k15), S(k12) |
| 4–15 | k3..k14 ^= Kreg | new k0..k11 |
| 16 | k15 ^= Kreg | – (Rcon advances) |

This is the AES-128 recurrence applied one byte at a time. The S-box reads
bytes 12–15 before they are updated. The round constant register starts at
01 and is shifted with the AES reduction (xtime), giving
01, 02, …, 80, 1B, 36.

The controller starts the key unit together with each data round. The
17-cycle key generation ends at the same edge as the 17-cycle SubByte/
ShiftRow pass. So the round key is complete when AddRoundKey first reads
it, and the data unit never waits. Assertions in `aes_top` check this. If
you change either schedule, keep key generation no longer than the
SubByte/ShiftRow pass, or add a wait.

## Interface and timing (`aes_top`)

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the controllers |
| `data_we`, `key_we`, `addr`, `din`, `keyin` | in | 1,1,4,8,8 | write plaintext / key byte `addr` while `busy` = 0 |
| `start` | in | 1 | sampled while idle: begin encryption |
| `busy` | out | 1 | high for exactly 634 cycles |
| `done` | out | 1 | one-cycle pulse in the cycle after `busy` falls |
| `round` | out | 4 | 0 during the initial AddRoundKey, then 1..10 |
| `rd_addr`, `dout` | in/out | 4, 8 | combinational read of state byte `rd_addr` (the ciphertext after `done`) |

Usage: write 16 plaintext bytes and 16 key bytes, pulse `start`, wait for
`done`, then read 16 ciphertext bytes. Writes while `busy` are ignored. The
key memory ends up holding the round-10 key, so **write the key again
before every block**. The memories are not reset.

## How far it matches the published architecture

Taken from the paper:
- The split into a data encryption unit and a key schedule unit.
- A single combinational S-box in each unit, with encryption and
  decryption paths around one GF(2^8) inverter.
- The MixColumn basic module built from the equation above, with xtime
  made of a wired shift and three XORs.
- Register-array 16-byte memories.
- Reg1, Reg2 and Kreg, and the selector roles.
- In-place writing to the address being read.
- The round constant register.
- 10 rounds for a 128-bit key.
- 17 cycles per round key.

Differences and own choices:
- **Cycles per round.** The paper reports 86 cycles per data round but
  does not say how they are spent. This schedule needs 65 (33 for the
  final round).
- **S-box inverter.** The paper uses a compact composite-field inverter
  from earlier work (about 540 gates). Here the inverter computes a^254
  with GF(2^8) multipliers. It is functionally identical, but larger.
- **AddRoundKey path.** AddRoundKey writes memory XOR key directly. In the
  paper's datapath the key XOR sits after the S-box selector and before
  Reg1.
- **Selector wiring.** The exact wiring of the paper's six data-path
  selectors is not reproduced; only their roles are.
- **Encryption only.** The decryption path of the S-box exists but is tied
  off, because no inverse round datapath is described.
- **Key length.** Only 128-bit keys. The 192- and 256-bit AES key lengths
  need a larger key memory and more rounds.
- **Own additions.** The controller, the host port, the reset behaviour and
  the start/busy/done handshake.
- **Silicon figures.** Gate counts, power and the clock-gating savings are
  properties of the original silicon and are not reproduced.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.
`tb_aes_ref_pkg` is an independent reference model. Its S-box is found by
searching for the inverse, and its rounds work on whole arrays.

- `tb_aes_sbox`: all 256 inputs in both directions.
- `tb_aes_xtime`: all 256 inputs.
- `tb_aes_mc_basic`: the FIPS-197 column and 2000 random columns.
- `tb_aes_byte_mem`: random writes against a shadow copy.
- `tb_aes_rcon_gen`: the ten constants, hold and clear.
- `tb_aes_key_unit`: FIPS-197 A.1 round keys; exactly 17 cycles per key;
  back-to-back generation.
- `tb_aes_data_unit`: every intermediate state against the reference, and
  the 16/65/33 cycle counts.
- `tb_aes_top`: end to end. Covers FIPS-197 B and C.1, 20 random blocks,
  exactly 634 busy cycles, and a stray write while busy. It also counts
  each mechanism: initial AddRoundKey, MixColumn passes, final rounds,
  key/data overlap, key reloads and ignored writes.

The core has no size parameters. `tb_aes_top` therefore exercises the full
design as built.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/aes_pkg.sv tb/tb_aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Replace `tb_aes_top` with any other testbench name. All testbenches run in
well under a second.
