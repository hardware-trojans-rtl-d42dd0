# Hardware Trojans in block-cipher hardware: two attack designs

A hardware Trojan is a deliberate change made to a chip by whoever builds it. It has two parts:
- a **trigger**, some condition that rarely happens by chance;
- a **payload**, the harm it does once that condition happens.

This repository holds synthesizable SystemVerilog for two such Trojans. Each sits inside the cipher it attacks.

1. **A timing-fault Trojan in a round-pipelined AES-128.** Some logic paths of round 7 are made slower than the rest, so nothing visible is added.
   - At the normal clock, the circuit is correct.
   - When an attacker overclocks it, the slow paths capture a wrong byte at the register after round 7. That gives a random-byte fault in one state byte, which is exactly what differential fault analysis (DFA) needs to recover the AES key from a few faulty ciphertexts.
2. **A timing-channel Trojan in a "Trojan-resilient" cipher.** The cipher is protected by a 3-party secret-sharing scheme with a majority vote. This Trojan defeats it anyway.
   - **Trigger:** the attacker sends plaintexts with short or long gaps between them, encoding a secret 80-bit bit pattern.
   - **Payload:** once the pattern has been received, every mini-circuit forces its state share to zero. The shared computation then reconstructs the **key** instead of the ciphertext. All sets agree, so the vote passes it.

The two designs are independent. The top module `trojan_designs_top` places them side by side and brings out the ports of each.

## Design 1: pipelined AES-128 with a slowed round

### Pipeline (`aes_round_pipe`)

```
plaintext,key -> AK0 / KS1 -> D1 -R1/KS2-> D2 -R2/KS3-> ... D9 -R9/KS10-> D10 -> RF -> ciphertext
```

- Each register stage Dr holds one block's 128-bit state, its round key and a valid bit.
- The round logic Rr sits between Dr and D(r+1). It is SubBytes, ShiftRows (just wiring), MixColumns and AddRoundKey.
- The key step KS(r+1) computes the next round key from the key held in Dr. Each block therefore carries its own key, and the key may change with every block.
- The final round RF leaves out MixColumns. It is combinational after D10.
- **Rate:** one block per clock.
- **Latency:** `out_valid` / `ciphertext` appear 10 clocks after the clock that captured `in_valid` / `plaintext`.
- Only the valid bits are reset.

Byte order follows FIPS-197: byte 0 of the state is bits [127:120], and bytes run down column by column. Bits [31:24] are byte 12, which is row 0 of column 3 (S(0,3)).

Building blocks:
- `aes_round`: parameter `FINAL` drops MixColumns.
- `aes_key_step`: parameter `ROUND` selects Rcon.
- `aes_sbox`: the S-box table is computed at elaboration from the GF(2^8) inverse and the affine map, not stored.
- `aes_pkg`: the shared types and GF(2^8) helpers.

### The fault point and the timing model (`timing_fault_model`)

The Trojan lengthens the round-7 paths that end in bits [31:24] of D8. This is a place-and-route change, not RTL, so the design models its effect instead:

- The pipeline has an input `d8_fault[7:0]`. D8 captures `round7_result[31:24] ^ d8_fault`. When `d8_fault` is 0, the pipeline is exact AES.
- `timing_fault_model` is a **behavioural model**, for simulation only, since it uses `$urandom`. It maps a declared clock frequency `f_clk_mhz` to an error byte on every clock:

| f_clk_mhz | probability that the byte is wrong |
|-----------|------------------------------------|
| below 65  | 0 (the circuit works)              |
| 65        | 3 %                                |
| 70        | 53 %                               |
| 72        | 86.5 %                             |
| 73        | 95.5 %                             |
| 80 and up | 99.7 %                             |

The table follows measurements made on the modified design, with 5000 random encryptions per frequency. The model interpolates linearly between the points. A wrong byte is a uniform random non-zero error mask. For comparison:
- The unmodified design closes timing at 100 MHz.
- A slack analysis of the lengthened paths predicted that errors would begin near 43 MHz. The model follows the measured 65 MHz instead (`F_TRIG_MHZ`).
- The highest table point sits at `F_FULL_MHZ` = 80 MHz.

The model ignores the Hamming-weight distribution of the errors. What matters for DFA is that the fault hits a single known byte after round 7.

## Design 2: the protected cipher and its trigger

### The protection being attacked

A trusted **master** (`tr_master`) works with λ sets of three untrusted **mini-circuits** (`tr_minicircuit`). λ is 3 by default (`LAMBDA`).

**Sharing.** In each set, every mini-circuit j draws two 128-bit random words per operation from its own PRNG. It sends them to its neighbour through the master. The correlated values α_j = r_j ⊕ r_(j+1) then XOR to zero across the set (β is built the same way for the key).
- The master masks the inputs as x_j = v ⊕ α_(j-1) (plaintext v) and y_j = k ⊕ β_(j-1) (key k).
- Mini-circuit j then holds the shares (α_j, x_(j-1)) and (β_j, y_(j-1)).

**Computation.** The mini-circuits add the shares; this is the 3-party key addition. Only this step is implemented. The shared SubBytes/MixColumns needed for full AES are not specified and are not built. So in AES mode the fault-free result is v ⊕ k.

**Reconstruction** (`share_reconstruct`):
- The master computes o1 = s0(1) ⊕ s1(2), o2 = s0(2) ⊕ s1(3) and o3 = s0(3) ⊕ s1(1) from the returned shares.
- It flags a mismatch if the three differ.

**Vote** (`majority_vote`): among the sets without a mismatch, a value held by a strict majority wins. If there is none, `error` is raised.

**Timing:** `out_valid` comes 3 clocks after `pt_valid`: 2 clocks in the mini-circuits and 1 output register. Every mini-circuit must finish on the same clock; an assertion in the master checks this.

**MOE mode** (`MOE = 1`): the mini-circuits return the processed state share, and the master adds the key after the vote. This corresponds to the prototype, which protected a different block cipher whose internals are not specified here.

`tr_system` connects the master and the 3λ mini-circuits. `TROJAN_MASK` bit i chooses whether set i carries the Trojan. By default all sets carry it, because the attacker is assumed to manufacture every mini-circuit.

### Trigger part 1: the modulation level (`mod_level_detect`)

The start pulse of each encryption (FSM reset) marks a plaintext arrival.
- A counter `cnt` (25 bits) is cleared on each arrival and counts clocks between arrivals.
- A sticky flag `f_ovfl` is set when the counter is all ones.
- `m_t = (cnt > THRESH) | f_ovfl` classifies the gap that just ended: 1 is a "slow" gap, 0 a "fast" one.
- `THRESH` = 33,000,000 is 0.5 s at the 66 MHz system clock.

Because m_t is sampled on the arrival clock, it describes the gap before that arrival.

### Trigger part 2: the sequence (`mod_seq_detect`)

An 80-bit register `sr` is loaded with the secret pattern `80'h12349876_deadbeef_1235`. On each arrival:
- if `sr` is zero (`f_trig` is set), it reloads the pattern;
- else if `sr[79] == m_t`, it shifts left and a 0 enters;
- else it reloads the pattern.

`f_trig = (sr == 0)`. It therefore stays high for exactly the one encryption that follows a complete pattern, and the next arrival clears it.

Some consequences to keep in mind:
- The register fills with zeros, so a pattern needs only to be matched down to its lowest 1 bit.
- The pattern's MSB is 0, so the first matched gap is a fast one.
- The register's state after unknown traffic is unknown. The attacker first sends a reset run, fast or slow gaps opposite to the bits that would be expected, until a mismatch reloads the pattern.

The register is clocked by the system clock, and the arrival pulse acts as its enable. It is not clocked by the arrival pulse itself; that is a choice made here to keep one clock domain.

### Payload

When `f_trig` is set, a multiplexer in the mini-circuit replaces the stored state share with (0, 0). The key addition then returns only the key share:
- **AES mode:** each reconstruction gives o_j = β_j ⊕ y_j = k. All sets agree, and the vote outputs the key.
- **MOE mode:** the share returned is 0, and the master's own key addition outputs k.

The protection cannot see the payload: the reconstruction is consistent and the vote is unanimous. It is caught only if some sets are clean (`TROJAN_MASK`) and they outvote the infected ones.

## Interface of the top (`trojan_designs_top`)

| signal | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | common clock, active-low asynchronous reset |
| aes_in_valid, aes_plaintext, aes_key | in | 1,128,128 | block into the AES pipeline |
| f_clk_mhz | in | 32 | declared frequency, drives the timing model |
| aes_out_valid, aes_ciphertext | out | 1,128 | 10 clocks after input |
| aes_fault | out | 8 | error byte that D8 captured with |
| tr_pt_valid, tr_plaintext, tr_key | in | 1,128,128 | plaintext arrival at the protected cipher |
| tr_out_valid, tr_out, tr_error | out | 1,128,1 | 3 clocks after arrival |
| tr_sub_mismatch | out | [LAMBDA] | reconstruction mismatch per set |
| tr_f_trig | out | [LAMBDA][3] | trigger flag per mini-circuit |

Parameters and their defaults:
- `LAMBDA` = 3.
- `MOE` = 0.
- `TROJAN_MASK` = all ones.
- `CNT_W` = 25, `THRESH` = 33000000.
- `SEQ_W` = 80, `SEQ` = 0x12349876deadbeef1235.
- `F_TRIG_MHZ` = 65, `F_FULL_MHZ` = 80.

The two designs really run at different clocks: 65-100 MHz for the AES pipeline and 66 MHz for the protected system. Here one `clk` drives both, and the frequency is only declared through `f_clk_mhz`.

## Departures and limits

- **The timing fault is modelled, not built.** The slowed paths need the physical layout. `timing_fault_model` cannot be synthesized; everything else can.
- **The shared AES rounds are absent.** The mini-circuits compute only the shared key addition. The Trojan's trigger and payload do not depend on the missing rounds, and the key-leak result holds.
- **Parts of the protection scheme are not built:**
  - the pre-deployment random testing of each device;
  - the second cipher used by the prototype;
  - the fault-analysis software.
- **PRNG:** a 128-bit xorshift per mini-circuit, with fixed seeds. It is not cryptographic; it only produces the correlated shares.
- **Choices made in this design:**
  - λ = 3;
  - the handshake latencies;
  - reset behaviour;
  - byte order at the fault point;
  - the interpolation between the measured error rates.
- **Pattern and preference disagree.** It is preferable to use a pattern whose first and last bits are 1. The default pattern does not: it starts with a 0 bit. The hardware rule above is implemented as stated, with the default pattern.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert --top-module tb_trojan_designs_top -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv rtl/tr_pkg.sv tb/tb_aes_ref_pkg.sv tb/tb_trojan_designs_top.sv
./obj_dir/Vtb_trojan_designs_top
```

Testbenches:
- `tb_<module>` for each module.
- `tb_aes_ref_pkg`: an independent AES reference. It can inject an error byte into S(0,3) after round 7.
- `tb_trojan_designs_top`: the end-to-end test. It runs both designs with a reduced trigger: a 6-bit counter, threshold 20 and the 8-bit pattern 10110101.
  - AES side: blocks at 40/50 MHz must be exact; blocks at 72/100 MHz must equal the reference with the injected error byte.
  - Protected side: random gaps, counter overflow, mismatch reloads, and two complete trigger patterns, each followed by the key at the output.
  - It counts each of these events and fails if one never happened.
- `tb_aes_fault_sweep`: the frequency sweep at default sizes. It streams 5000 random blocks back to back at each of 64, 65, 70, 72, 73 and 80 MHz. It checks every ciphertext against the reference with the captured error byte, and checks the number of faulty ciphertexts per frequency against the table above.
- `tb_trojan_designs_top_full`: the top at its default sizes.
  - The FIPS-197 vector through the pipeline at 50 MHz (ciphertext 69c4e0d8…c55a) and at 100 MHz.
  - Two protected encryptions.

The full-size trigger needs up to 80 gaps of 33 million clocks, so it is exercised only at the reduced sizes.
