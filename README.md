# Grain v.1 and Trivium stream-cipher cores with parallel key/IV loading, and SABL cell models

Grain v.1 and Trivium are two small hardware stream ciphers. Each keeps its whole
state in feedback shift registers (FSRs) and gives one keystream bit per update.
Such a core is open to differential power analysis (DPA). An attacker who can resend
chosen IVs under a fixed key records the supply current during initialisation, and
that current follows the data held in the flip-flops and gates.
This RTL takes the countermeasures that can be stated at logic level:

* **Parallel key/IV loading.** Every state bit has a 2:1 selector in front of its
  flip-flop, so key and IV enter the whole state on one clock edge. A bit-serial load
  would leak the key one bit at a time, which a simple power analysis could read.
* **Bit-serial cores by default.** One update per clock, with a `RADIX` parameter
  that unrolls the update for more bits per clock. Throughput is `f x RADIX`, so
  5 Mbit/s per core at 5 MHz and `RADIX = 1`.
* **Behavioural models of the SABL cells.** SABL (sense-amplifier based logic) is a
  dual-rail precharge logic style, and the ciphers are meant to be built from it at
  transistor level. The models let the SABL signalling protocol be simulated: in
  every cycle exactly one wire of each signal pair falls and rises, whatever the
  data. That protocol is why SABL consumes the same charge in every cycle.

The ciphers themselves are written as ordinary single-rail synthesizable logic. A
dual-rail SABL netlist, balanced routing, clock buffering and any power figures are
transistor-level matters. They are not part of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/grain_pkg.sv` | Grain v.1 sizes, feedback functions f, g, filter h, keystream z, one-step update, load value |
| `rtl/trivium_pkg.sv` | Trivium sizes, one-step update, keystream z, load value |
| `rtl/fsr_load_reg.sv` | FSR flip-flops, each behind a three-NAND2 load/shift selector |
| `rtl/fsr_init_ctrl.sv` | phase sequencer: load, initialisation, keystream |
| `rtl/grain_core.sv` | Grain v.1 core |
| `rtl/trivium_core.sv` | Trivium core |
| `rtl/sabl_nand2.sv`, `rtl/sabl_xor2.sv`, `rtl/sabl_dff.sv` | behavioural models of the SABL NAND2/AND2, XOR2/XNOR2 and D flip-flop |
| `rtl/fsr_ciphers_top.sv` | top: both cores and the three SABL cell models side by side |
| `tb/cipher_ref_pkg.sv` | reference models of both ciphers, used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The cipher state and how it is indexed

The hardest part to get right is the bit numbering. Both packages use one convention.
Bit `j` of a register vector holds the sequence element `x_(i+j)` at time `i`.
Bit 0 is the oldest bit and leaves first. Every clock the register shifts towards
bit 0, and the feedback bit enters at the top. The equations below can be read
straight off the RTL in that form.

**Grain v.1** (`grain_pkg`): there is an 80-bit LFSR `s` and an 80-bit NLFSR `b`.

    s_(i+80) = s_(i+62) ^ s_(i+51) ^ s_(i+38) ^ s_(i+23) ^ s_(i+13) ^ s_i
    b_(i+80) = s_i ^ g(b)          (linear taps 0,9,14,21,28,33,37,45,52,60,62 plus 11 product terms)
    h        = h(s_(i+3), s_(i+25), s_(i+46), s_(i+64), b_(i+63))
    z_i      = b_(i+1) ^ b_(i+2) ^ b_(i+4) ^ b_(i+10) ^ b_(i+31) ^ b_(i+43) ^ b_(i+56) ^ h

Load: `b_j = k_j` for all 80 bits; `s_j = IV_j` for j < 64; `s_64..s_79 = 1`.
Then 160 updates follow with `z` XORed into both feedback bits and no output.

**Trivium** (`trivium_pkg`): registers A, B and C have 93, 84 and 111 bits.

    a_(i+93)  = a_(i+24) ^ c_i ^ c_(i+1)c_(i+2) ^ c_(i+45)
    b_(i+84)  = b_(i+6)  ^ a_i ^ a_(i+1)a_(i+2) ^ a_(i+27)
    c_(i+111) = c_(i+24) ^ b_i ^ b_(i+1)b_(i+2) ^ b_(i+15)
    z_i       = a_i ^ b_i ^ c_i ^ a_(i+27) ^ b_(i+15) ^ c_(i+45)

Load: `a_(92-j) = k_j`, `b_(83-j) = IV_j`, `c_0 = c_1 = c_2 = 1`, and every other bit
0\. Then 1152 updates (four times the 288-bit state) follow with no output.

Many descriptions of Trivium number the state `s1..s288` instead. The two
numberings match as follows: `a_j = s_(93-j)`, `b_j = s_(177-j)` and
`c_j = s_(288-j)`. The testbench reference model uses the `s1..s288` form, so the
two numberings are checked against each other.

**Port bit order.** `key[j]` is `k_j` and `iv[j]` is `IV_j`. A hexadecimal key
such as `80..0` is the 80-bit number `key[79:0]`. With the usual byte packing
(keystream bytes collected least significant bit first), the cores reproduce the
published all-zero key/IV test vectors:

* Grain v.1 gives `dee931cf1662a72f77d0`.
* Trivium gives `fbe0bf265859051b517a2e4e239fc97f...`.

Both testbenches check these values.

## Parallel loading register (`fsr_load_reg`)

Each bit is `q <= NAND(NAND(d_load, load), NAND(d_shift, shift))`. That is three
two-input NAND gates per flip-flop, written out gate by gate. The control is a single
line, `load_n_shift`: 0 loads and 1 shifts. Its complement drives the load-side
NAND. The feedback logic sits outside the register: each core computes the whole
next state and presents it on `d_shift`.

The state flip-flops have no reset. A parallel load is the only way they are
initialised, and the keystream is marked invalid until a load and a full
initialisation have taken place.

## Phase sequencing and timing (`fsr_init_ctrl`, the cores)

```
clock edge     :  E0 (load=1)   E1 ... E_N          E_(N+1) ...
state          :  <- key/IV     N updates with       keystream updates
init_busy      :  0 -> 1 ...................... 1 -> 0
ks_valid       :  0 ............................ 1 ......
```

* `N = INIT_CLOCKS / RADIX`. That is 160 clocks for Grain and 1152 for Trivium at
  `RADIX = 1`.
* `ks[RADIX-1:0]` is combinational from the state registers, so it belongs to the
  current clock cycle. `ks[0]` is the earliest bit.
* A `load` pulse is accepted in any phase and restarts the sequence, including
  during initialisation.
* `rst_n` is asynchronous and active low, and it resets only the sequencer.
* There is no stall or enable: as in the reference structure, the registers update
  on every clock.

`RADIX` chains that many copies of the one-step update function inside one clock
(an `always_comb` loop). The allowed range is 1..32 for Grain and 1..64 for Trivium,
and `INIT_CLOCKS` must be a multiple of `RADIX`. Higher radix costs combinational
depth, not state: the registers stay 160 and 288 bits.

## SABL cell models

Every SABL signal travels on two wires, and every clock cycle has two phases:

* **Precharge** (`clk` low): both output nodes of a gate are pulled high.
* **Evaluation** (`clk` high): the differential pull-down network discharges exactly
  one of them.

The models use a domino convention for the inputs. Both rails of an input are 0
during precharge, because they come through inverters from the previous gate's
nodes. During evaluation one rail rises.

| model | outputs in evaluation |
|---|---|
| `sabl_nand2` | `nand_o = ~(a & b)`, `and_o = a & b`; a node discharges only once its path is complete, so the gate waits for late inputs |
| `sabl_xor2` | `xor_o = a ^ b`, `xnor_o = ~(a ^ b)` |
| `sabl_dff` | captures `(d, d_n)` at the rising edge and drives static `q`, `q_n` |

The gate testbenches check data independence directly. They count the edges on the
two output wires and require exactly one fall and one rise per cycle for every input
combination.

These are logic models only. Several things are not modelled:

* charge and current;
* the balancing of the two rails;
* the delayed clocking that softens the current spike at the start of precharge;
* the relative timing of gate evaluation and flip-flop capture in a real SABL
  pipeline.

In the top the three cells are side by side with the ciphers, with their pins
brought out. They are not used inside the cipher cores.

## Top level (`fsr_ciphers_top`)

* **Shared:** `clk` and `rst_n`.
* **Grain:** `grain_load`, `grain_key[79:0]`, `grain_iv[63:0]`,
  `grain_ks[GRAIN_RADIX-1:0]`, `grain_ks_valid` and `grain_init_busy`.
* **Trivium:** the same ports with the `trivium_` prefix, but with an 80-bit IV.
* **SABL cells:** `sabl_a/_n`, `sabl_b/_n`, `sabl_nand_o`, `sabl_and_o`,
  `sabl_xor_o` and `sabl_xnor_o`, then `sabl_d/_n` and `sabl_q/_n`.
* **Parameters:** `GRAIN_RADIX = 1` and `TRIVIUM_RADIX = 1`.

After coarse synthesis with yosys, the default top holds 475 flip-flop bits:

* 160 + 288 are cipher state;
* 2 belong to the SABL flip-flop model;
* the rest are the two sequencers.

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/grain_pkg.sv rtl/trivium_pkg.sv tb/cipher_ref_pkg.sv \
    tb/tb_fsr_ciphers_top.sv --top-module tb_fsr_ciphers_top -o sim
obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_fsr_load_reg` | random load/shift selection over 2000 clocks; serial shifting after a load |
| `tb_fsr_init_ctrl` | exact initialisation length (160; 1152 at radix 64 = 18), reload during initialisation and keystream |
| `tb_grain_core` | RADIX 1, 8 and 32 against the reference model, initialisation length, published test vector |
| `tb_trivium_core` | RADIX 1 and 64 against the reference model, initialisation length, published test vector |
| `tb_sabl_*` | precharge/evaluate behaviour, logic function, one fall and one rise per cycle (gates); edge capture (flip-flop) |
| `tb_fsr_ciphers_top` | both cores at default size, run concurrently; the SABL cells are driven every cycle; counts each mechanism |

The key/IV pairs used throughout are the four from the original power experiments:

* K1 = `AA..A`, K2 = `80..0` (80-bit keys);
* IV1 = `55..5`, IV2 = `FF..F`, IV3 = `00..0`, IV4 = `11..1`;
* pairs (K1, IV1), (K1, IV2), (K2, IV3) and (K2, IV4).

Grain uses the 64-bit form of each IV. Random pairs are added on top.

The top-level test runs all four pairs through full initialisation and 128 keystream
bits on both ciphers. It also:

* restarts Trivium in the middle of its initialisation;
* reloads both cores while they are producing keystream.

All of this runs at the default parameters in well under a second.

## Departures and choices made here

* **Grain v.1 initialisation length.** It is 160 clocks. This comes from the Grain
  v.1 cipher definition and is confirmed by the test vector.
* **Single-rail ciphers.** The cores are single-rail logic, not a dual-rail SABL
  netlist. The SABL cells are included only as separate behavioural models.
* **Interface and control.** The load handshake, reset, phase encoding, port bit
  order and `RADIX` unrolling are this design's own choices.
* **No stall or enable.** The cores update on every clock.
* **Not built.** The clock buffer chain and the delayed-clock scheme have no logic
  function and are not built. The clock is an ideal net.
