# Byte-serial low-power AES-128 encryption core

This core encrypts 128-bit blocks with AES-128. It is built for small, battery-powered
nodes such as wireless sensor nodes, where area and switching activity count for more
than throughput. It handles one byte per clock cycle instead of a whole 128-bit round.
The data path has one S-box. MixColumn is done by a one-byte "basic module" used four
times. The state and the key each live in a 16-byte register memory, and the key
schedule works on its memory in place.

Performance at a glance:

| item | value |
|---|---|
| block / key size | 128 / 128 bits, 10 rounds |
| one round key | 17 cycles |
| one block, start to done | 765 cycles |
| S-boxes | 2 (one per unit), combinational |
| state storage | 16 + 16 byte registers, plus Reg1, Reg2, Kreg (8 bits each) |

The core only encrypts. There is no decryption path.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | shared types, cycle constants, and the data unit control word `dctl_t` |
| `rtl/aes_core.sv` | top level: connects the controller, the data unit and the key unit |
| `rtl/aes_data_ctrl.sv` | round controller: orders the byte passes and starts the key schedule |
| `rtl/aes_data_unit.sv` | data encryption unit: state memory, S-box, MixColumn module, Reg1/Reg2, mux1..mux6 |
| `rtl/aes_key_schedule.sv` | key schedule unit: key memory, S-box, Rcon, Kreg, mux1..mux3, plus its 17-cycle sequencer |
| `rtl/aes_byte_mem.sv` | 16-byte register memory: several read ports, one byte-wide write port |
| `rtl/aes_sbox.sv` | combinational S-box: GF(2^8) inverse as a^254, then the affine map |
| `rtl/aes_mc_basic.sv` | MixColumn basic module: `xtime(a ^ b) ^ a ^ t` |
| `rtl/aes_xtime.sv` | multiply by 02 in GF(2^8) |
| `rtl/aes_rcon_gen.sv` | round constant shift/rotate register, 01 → 02 → … → 36 |
| `tb/aes_ref_pkg.sv` | software AES-128 reference used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Using the core

Byte `i` is AES input byte `i`. In the state that is row `i % 4` and column `i / 4`. For
example, key `2b7e1516…` has byte 0 = `2b`.

1. While `busy` is low, write the 16 key bytes with `key_we`/`key_addr`/`keyin`. Write
   the 16 plaintext bytes with `din_we`/`din_addr`/`din`. The two loads may share cycles.
2. Pulse `start` for one cycle.
3. `busy` rises in the next cycle. `done` pulses 765 cycles after the `start` cycle.
4. Read the ciphertext with `dout_addr` → `dout`. This is an asynchronous read of the
   state memory.
5. **Write the key again before the next block.** The key memory now holds round key 10,
   because the round keys are generated in place.

Reset (`rst_n`, active low, asynchronous) clears the controllers, Reg1, Reg2, Kreg and
the round constant. It does not clear the two memories.

## Data encryption unit (`aes_data_unit`)

The datapath has no sequencing of its own. Each cycle the controller drives a control
word (`dctl_t`) that sets the two read addresses (ports A and B), the write address and
every multiplexer select.

```
            +--------------- 16-byte state memory S0..S15 ----------------+
            | port A            port B                         dout port  |
            +---+-----------------+------------------------------+--------+
                |                 |
   S-box <------+ (input forced to 0 when bypassed)
     |          |
    mux1: 0=S-box, 1=memory byte
     |
     +---- XOR ---- mux6: 1=round key byte, 0=Reg1
     |      |
    mux2: 0=mux1, 1=XOR  --> Reg1
                                |
 MC basic module: xtime(A ^ (B | Reg2)) ^ A ^ Reg1      Reg2 <- port A
                                |
    mux3: 1=port B, 0=Reg1 --> mux4: 1=MC, 0=mux3 --> mux5: 1=mux4, 0=din --> write port
```

The multiplexer names and input numbers follow the architecture this core implements.
The core runs each AES step as a pass over the memory, and all passes work in place:

| pass | cycles | what happens each cycle |
|---|---|---|
| AddRoundKey | 17 | byte *i* is read, XORed with key byte *i* into Reg1, and written back to *i* one cycle later while byte *i+1* is read |
| SubByte | 17 | the same, through the S-box and without the key |
| ShiftRow | 12 | rows 1–3 are each rotated with four byte moves (port B → mux3 → memory); Reg1 holds the one byte a rotation would overwrite |
| MixColumn | 32 | per column: 4 cycles sum the column, then 4 cycles write the results |

### MixColumn with one basic module

For a column `A0..A3` with sum `T = A0^A1^A2^A3`, every output byte has the same form:

    B_i = xtime(A_i ^ A_(i+1)) ^ A_i ^ T     = 02·A_i ^ 03·A_(i+1) ^ A_(i+2) ^ A_(i+3)

So one `xtime` and three byte XORs make any output byte. The core handles a column in
two phases:

* **Sum phase, cycles 0–3.** `T` builds up in Reg1, with mux6 selecting Reg1 as the XOR
  operand. At cycle 0, `A0` is also copied into Reg2.
* **Write phase, cycles 4–7.** `B_i` is computed from port A (`A_i`), port B (`A_(i+1)`)
  and Reg1. It is written straight to address *i*.

`B0` overwrites `A0`. The last byte, `B3`, still needs `A0`, so it takes its second
operand from Reg2 instead of port B. That is why the basic module has a data path
selector in front of it.

### ShiftRow with byte moves

With Reg1 as the only spare byte, each row is rotated like this:

* Row 1: `Reg1←a0, a0←a1, a1←a2, a2←a3, a3←Reg1`.
* Row 2: two swaps.
* Row 3: the row 1 sequence run backwards.

The moves are listed in `sr_move()` in `aes_data_ctrl.sv`.

## Key schedule unit (`aes_key_schedule`)

The key memory is loaded through mux3 input 0 (`keyin`). Each `start` replaces round key
*r-1* with round key *r* in 17 cycles:

| cycle | action |
|---|---|
| 0 | `Kreg ← S-box(S13) ^ Rcon` (mux1 = 1, mux2 = 1) |
| 1–3 | `S[c-1] ← S[c-1] ^ Kreg`; `Kreg ← S-box(S14)`, `S-box(S15)`, `S-box(S12)` |
| 4–15 | `S[c-1] ← S[c-1] ^ Kreg`; `Kreg ← S[c-4]` (mux2 = 0; a byte of the new previous word) |
| 16 | `S[15] ← S[15] ^ Kreg`; Rcon steps; `done` |

The S-box reads S13, S14, S15, S12 in that order, which performs RotWord. The round
constant register starts at 01 (reloaded on each block `start`). Each step shifts it
left, rotating the top bit into bit 0 and XORing it into bits 1, 3 and 4.

## Round controller and timing (`aes_data_ctrl`)

    ARK(K0) | SB SR MC ARK(K1) | ... | SB SR MC ARK(K9) | SB SR ARK(K10)
     17       17 12 32 17                                  17 12 17        = 765 cycles

Round key *r* is computed while SubByte, ShiftRow and MixColumn of round *r* run, because
those passes never read the key memory. The key unit is started in the last cycle of each
AddRoundKey pass. It finishes well before the next AddRoundKey, which is at least 29
cycles away. An assertion checks that the key unit is idle whenever an AddRoundKey pass
starts.

## Low-power measures in the RTL

* **Clock gating.** Each memory write enables only one byte register. Reg1, Reg2 and Kreg
  have load enables. A clock-gating synthesis flow turns these enables into gated clocks.
  The RTL does not instantiate a gate cell.
* **Operand isolation.** Both S-box inputs are held at zero whenever the S-box output is
  not used.
* **Combinational S-box.** The S-box is logic, not a clocked ROM.

## Where this design makes its own choices

The architecture fixes the block structure and the 17-cycle key schedule. It leaves the
following open, and this core fills them in as shown:

* **Key length.** AES-128, 10 rounds, chosen because both memories hold 16 bytes.
* **Controller.** The pass order, all cycle counts except the key schedule's, and the
  ShiftRow and MixColumn micro-sequences are this core's own.
* **MixColumn wiring.** The exact connection of the three XORs is this core's choice,
  including the column sum in Reg1 and `A0` in Reg2.
* **Memory read ports.** The data memory has 3 read ports and the key memory has 4. Each
  port is a 16:1 byte multiplexer.
* **Host interface.** Byte-addressed loads and reads, a `start`/`busy`/`done` handshake,
  and the rule that the key is written again for every block.
* **Encryption only.** The core has no decryption.
* **Reset.** Reset values are this core's choice.

The architecture is sized at about 3714 gates for the key schedule unit and 67 gates per
8-bit register. Neither figure was checked against this RTL.

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`.

* `tb_aes_core` (full size, default parameters):
  * encrypts the FIPS-197 Appendix B and C.1 vectors, then 10 random blocks with random
    keys, and checks each against the reference model;
  * checks the 765-cycle latency;
  * counts how often each mechanism is used: plaintext and key loads, key schedule
    overlapping the data passes, the Rcon path, the MixColumn operand from Reg2,
    ShiftRow byte moves, and the final round without MixColumn.
* `tb_aes_data_ctrl` runs the controller with a real data unit and a testbench model of
  the key unit. It checks the ciphertexts, the latency, the cycles spent in each pass,
  and the number of key schedule starts.
* `tb_aes_key_schedule` checks all ten round keys for the FIPS-197 key and for random keys,
  and that each takes 17 cycles.
* `tb_aes_data_unit` drives control words by hand for AddRoundKey, SubByte, a ShiftRow
  row and one MixColumn column.
* `tb_aes_sbox` and `tb_aes_xtime` test every input. `tb_aes_mc_basic`, `tb_aes_rcon_gen`
  and `tb_aes_byte_mem` use random and known values.

The reference model (`tb/aes_ref_pkg.sv`) builds its S-box from log/antilog tables. That
is a different construction from the RTL's.

To simulate with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
        rtl/aes_*.sv tb/tb_aes_core.sv --top-module tb_aes_core -o sim
    ./obj_dir/sim

Replace `tb_aes_core` with another testbench name to run that test instead.
