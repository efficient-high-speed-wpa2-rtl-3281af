# WPA2-PSK password search on an FPGA

This RTL tests candidate passwords against a captured WPA2-Personal handshake.
From the handshake it needs the SSID, the two MAC addresses, the two nonces, one EAPOL-Key
frame and that frame's MIC. For every candidate it computes the frame's MIC and reports the
candidate whose MIC matches. Nearly all the work is SHA-1:

| step | function | SHA-1 compressions |
|------|----------|-------------------:|
| PMK  | PBKDF2-HMAC-SHA1(password, SSID, 4096 iterations, 256 bits) | 16,386 |
| KCK  | first 128 bits of HMAC-SHA1(PMK, "Pairwise key expansion" ‖ 0 ‖ MACs ‖ nonces ‖ 0) | 5 |
| MIC  | first 128 bits of HMAC-SHA1(KCK, EAPOL frame with MIC zeroed) | 5 |
|      | total per password | 16,396 |

The hardware is built around a fully unrolled SHA-1 pipeline that accepts one compression
per clock cycle. It is kept full by having 83 passwords in flight per pipeline. One
sequencer, shared by all cores, steps them all through the derivation together. With two
cores at 180 MHz, one FPGA tests 2 × 180 MHz / 16,396 ≈ 21,950 passwords per second.
The cores are the SHA-1 pipelines plus their per-password state. The default of two cores
is a Spartan-6 LX150T configuration. An Artix-7 200T holds eight cores and a Kintex-7 410T
sixteen. A search is split across many FPGAs by giving each FPGA its own range of passwords.

## Structure

```
wpa2_cracker_top
├── password_generator     8-character odometer over 'A'..'Z'
├── wpa2_state_machine     phase / slot sequencer, shared by all cores
└── wpa2_verifier  × NUM_CORES
    ├── per-slot memories  password, valid, o-state, i-state, accumulator, T1
    └── sha1_pipeline      Buffer → Initiate → 80 × sha1_round → Add
        └── delay_line     carries the chaining value from Buffer to Add
```

Packages: `sha1_pkg` (SHA-1 constants, f_t, K_t, word helpers) and `wpa2_pkg` (the phase
enum, the control word `ctl_t`, ipad/opad, and the padding of a 20-byte digest).

## The SHA-1 pipeline (`sha1_pipeline`, `sha1_round`, `delay_line`)

The pipeline has 83 registered stages, three more than SHA-1's 80 rounds:

* **Buffer** registers the chaining value and the block. This keeps the input multiplexers
  of the verifier off the path into round 0.
* **Initiate** loads A..E from the chaining value and computes E + K₀ + W₀.
* **80 round stages.** Each stage computes A' = rol5(A) + f_t(B,C,D) + pre, where *pre* was
  added up one stage earlier. At the same time it computes the next round's
  pre = D + K_{t+1} + W_{t+1} (D becomes the next E). Only a three-operand sum stays on the
  critical path, not the five-operand sum of the textbook round.
* **Add** adds the chaining value back in (the SHA-1 feed-forward).

Each stage carries its own 16-word message-schedule window, W_t … W_{t+15}, and slides it
by one word per stage.

The chaining value is needed only at the Add stage, 81 cycles after Buffer. It is not
passed through 81 stage registers. It goes through `delay_line` instead: a circular buffer
of 80 words with a registered read, which maps onto block RAM. Latency: inputs presented in
cycle *k* produce their digest in cycle *k* + 83. There is no stall and no valid bit.

## How 83 passwords share one pipeline (`wpa2_state_machine`, `wpa2_verifier`)

This is the central idea of the design. Each pipeline has **83 slots**, one per stage.
Slot *s* is served in cycles where `cycle mod 83 = s`. A **phase** lasts 83 cycles: every
slot issues exactly one compression. The pipeline latency is also 83, so a slot's result
leaves the pipeline in the very cycle that slot is served again. The next phase then takes
its input straight from the pipeline output.

Every HMAC is split into the phases OState, IState, Salt and Finalize, plus Iterate in
PBKDF2. The phases of one batch, for all slots of all cores at once, are:

| phase | chaining value in | block in | stored from the pipeline output |
|-------|-------------------|----------|---------------------------------|
| Load (NUM_CORES × 83 cycles) | – | – | password, valid flag from the generator |
| PMK OState | IV | password ⊕ opad | – |
| PMK IState | IV | password ⊕ ipad | o-state |
| PMK Salt (T1, T2) | i-state (from the output for T1) | SSID ‖ INT(i), padded | i-state (T1); T1 = acc ⊕ U₄₀₉₆ (T2) |
| PMK Finalize | o-state | padded inner digest | – |
| PMK Iterate (j = 2…4096) | i-state | padded U_{j−1} | acc ← acc ⊕ U_{j−1} |
| PTK OState | IV | (T1 ‖ T2[159:64]) ⊕ opad | T2 into acc |
| PTK IState | IV | PMK ⊕ ipad | o-state |
| PTK Salt × 2 | output | PRF message blocks | – |
| PTK Finalize | o-state | padded inner digest | – |
| MIC OState | IV | KCK ⊕ opad | KCK into acc |
| MIC IState | IV | KCK ⊕ ipad | o-state |
| MIC Salt × 2 | output | EAPOL frame blocks | – |
| MIC Finalize | o-state | padded inner digest | – |
| Compare | – | – | MIC[159:32] compared with `captured_mic` |

The o-state is computed first. As a result, the i-state leaves the pipeline in the cycle the
first Salt block needs it, and it is used straight from the output. Both states are still
stored per slot, because every Iterate and Finalize phase needs them again.

The per-slot memories are 83 entries deep. They are read and written at the same address in
the same cycle, with read-before-write. Per core they hold 83 × 705 = 58,515 bits. The pipeline's delay line adds another 12,800 bits.

The sequencer drives all cores with one control word (`ctl_t`: phase, slot, PBKDF2 block
select, a flag meaning "the arriving U is U₁", and a message-block select). The cores differ
only in their passwords.

A batch is NUM_CORES × 83 passwords and takes NUM_CORES × 83 + 83 × 16,397 cycles. With the
defaults that is 1,361,117 cycles, 7.56 ms at 180 MHz. The Load and Compare phases add 0.02 %
to the 16,396 compressions per password.

## Password generator (`password_generator`)

The generator is a counter over 8-character passwords. Each character is one digit of an
odometer over `CHAR_LO..CHAR_HI` (default `'A'..'Z'`). The last character (bits [7:0]) counts
fastest. Ports:
`clk, reset, enable, start_password[64], n[32] → count[32], done, current_password[64]`.
`reset` is synchronous and loads `start_password`. Each enabled cycle hands out
`current_password` and advances. `done` is `count == n`. The first character is in bits [63:56].

## Using the top (`wpa2_cracker_top`)

Parameters: `NUM_CORES` (2), `ITERATIONS` (4096), `CHAR_LO` / `CHAR_HI` ('A' / 'Z').

1. Build the message blocks on the host. They are the same for every password, so the host
   supplies them already SHA-1 padded. Each one counts a 64-byte key block in front of it:
   * `salt_blk[i]` = SSID ‖ INT(i+1) ‖ 0x80 ‖ zeros ‖ bit length ((64 + |SSID| + 4) × 8).
     This allows an SSID of up to 32 bytes.
   * `ptk_blk[0..1]`: the 100-byte PRF message "Pairwise key expansion" ‖ 0x00 ‖ min(MAC) ‖
     max(MAC) ‖ min(nonce) ‖ max(nonce) ‖ 0x00, padded for a length of 164 bytes.
   * `mic_blk[0..1]`: the EAPOL frame with its MIC field zeroed, padded.
   * `captured_mic`: the 16-byte MIC from the handshake.
2. Set `start_password` and `n`, then pulse `start`. The top ignores `start` while `busy`
   is high.
3. `found` / `found_password` latch the first match. `tested` counts the passwords handed
   out. `batch_done` pulses after every batch. `done` rises when all `n` have been tried.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. The testbenches compare against
`tb/wpa2_ref_pkg.sv`, a separate, loop-based SHA-1/PBKDF2/HMAC model. That model's
constants for a synthetic handshake (SSID "UPC1234567", password "KCPFQWBR") came from an
independent software implementation. The model reproduces that software's PMK, KCK and MIC
at 4096 iterations, and the "abc" SHA-1 known answer.

| testbench | what it covers |
|-----------|----------------|
| `tb_sha1_round` | rounds 0, 19, 20, 45, 79 against a one-round model; 200 random vectors |
| `tb_delay_line` | 81- and 3-cycle delays on a random stream |
| `tb_sha1_pipeline` | "abc" and 399 random compressions back to back; exact 83-cycle latency |
| `tb_password_generator` | carries across several characters, random enable, the stop at `n` |
| `tb_wpa2_state_machine` | every control word of two batches (4 slots, 2 cores, 3 iterations); batch length |
| `tb_wpa2_verifier` | MIC of all 83 slots at 2 iterations; one true match; an invalid slot holding the true password does not match |
| `tb_wpa2_cracker_top` | 200 passwords (one full and one partial batch), 2 iterations; every MIC, the found password, cycle count; counts loads, empty slots, Iterate and T2 phases, matches and non-matches |
| `tb_wpa2_core_counts` | 8 and 16 cores side by side (the Artix-7 and Kintex-7 core counts), 2 iterations; found password, tested count, run length |
| `tb_wpa2_full` | full size: 2 cores, 4096 iterations, 166 passwords; every MIC against the reference model; finds "KCPFQWBR" after 1,361,117 cycles (about 12 s of simulation) |

To simulate, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sha1_pkg.sv rtl/wpa2_pkg.sv tb/wpa2_ref_pkg.sv tb/tb_wpa2_full.sv \
  --top-module tb_wpa2_full -o sim && ./obj_dir/sim
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>`.

Not verified: timing closure at 180 MHz, the resource fit in a particular FPGA, and
behaviour on hardware.

## Choices of this implementation and limits

* **Passwords are exactly 8 characters.** The generator and the key block take a 64-bit
  password. WPA2 allows 8 to 63 characters. The shortest length is the one that matters for
  weak default passwords.
* **The MIC frame can be at most 119 bytes** (two SHA-1 blocks), so the MIC step costs 5
  compressions. A full-length EAPOL-Key frame of 121 bytes or more needs a third block. The
  block select in `ctl_t` is one bit wide, so `MIC_BLOCKS` = 3 is not supported as written.
* **One password per cycle is loaded.** A Load phase of NUM_CORES × 83 cycles fills the cores
  from the single generator before each batch. The last batch of a search runs with its
  unused slots marked invalid.
* **Only the key derivation is implemented.** The host link (USB through the board's
  micro-controller), the distribution of password ranges to FPGAs, and the dynamic clock
  scaling (by error rate on the Spartan-6 boards, by temperature on the 7-series parts) are
  outside this RTL. The handshake data and the search range are plain input ports.
* **Floorplanning** (one region per core) and the advice to build the sequencer from many
  small multiplexers are implementation-tool matters. The RTL writes the multiplexers plainly.
* **Tie-break:** if two cores match in the same cycle, the lower-numbered core is reported.
* **Reset:** only control state is reset: the sequencer, the generator, the match latch and
  the delay-line pointer. Pipeline registers and slot memories are written before they are
  read, so they need no reset.

## Throughput at the published configurations

| configuration | cores | clock | passwords/s from this RTL's cycle count |
|---------------|------:|------:|----------------------------------------:|
| 1 × Spartan-6 LX150T (defaults) | 2 | 180 MHz | 21,953 |
| 4-FPGA board | 4 × 2 | 180 MHz | 87,810 |
| 36-FPGA cluster | 36 × 2 | 180 MHz | 790,292 |
| Artix-7 200T (`NUM_CORES = 8`) | 8 | 180 MHz | 87,778 |
| Kintex-7 410T (`NUM_CORES = 16`) | 16 | 216 MHz | 210,565 |

At about 790,000 passwords per second, all 26⁸ ≈ 2.09 × 10¹¹ eight-letter upper-case
passwords take about 3.1 days. `n` is 32 bits, so a range of more than 4,294,967,295
passwords must be split into several runs.
