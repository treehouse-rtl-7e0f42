# TREEHOUSE: secure provisioning and test access for a 3D-stacked IC

A 3DIC is built from dies made in different foundries, tested in
different test houses and stacked by yet another party. Its IPs carry hardware
security countermeasures: logic locks that need unlocking keys, PUFs and
watermarks that need challenges and golden responses. This secret *hardware
security metadata* must reach each IP several times: at die-level (pre-bond)
test, after bonding, and after packaging. None of the parties along the way
is trusted with it.

TREEHOUSE answers this with three pieces of hardware:

* a **TREE module** (Trust Enforcing Entity) in a trusted layer of the stack.
  It stores all metadata encrypted, decrypts it only on its way into a layer,
  and runs the unlock and authentication protocol itself;
* a **security wrapper** beside each IP in the untrusted layers. It gives
  one uniform register port to every countermeasure of the IP, whatever its
  protocol. Behind it, a secret-sequence state machine (the **TREE MODE FSM**)
  keeps every key register closed until the right *Mode Enable Vectors* have
  been applied;
* **scan protection** in each IP. A *scan lock* keeps the scan outputs at
  zero until a sequence of unlocking keys has been applied. A *scan-chain delay
  PUF* (scan authentication) gives each die a 128-bit signature. That signature
  exposes counterfeit or tampered dies, and the design house uses it to encrypt
  the metadata it ships to the TREE.

This repository is synthesizable SystemVerilog for all three pieces, on an
example stack of three IPs:

* a locked AES;
* a locked GPS accelerator with a watermark;
* an FIR filter with a PUF.

There is also a self-checking testbench for every module.

## Structure

```
treehouse_top
├── tree_module                 trusted layer
│   ├── hsm_memory              128 KB of encrypted metadata
│   ├── key_mgmt_unit           CAM: IP ID -> where its keys live + protocol flags
│   ├── auth_ctrl_unit          CAM: IP ID -> challenges + golden responses; comparator
│   ├── crypt_unit              decrypts each word on its way to a layer
│   └── policy_ctrl             runs the provisioning protocol
├── security_wrapper  u_aes     functional lock 1334 x 352 bits
├── security_wrapper  u_gps     functional lock 66 x 60 bits + watermark
└── security_wrapper  u_fir     PUF port
    each wrapper:
    ├── tree_mode_fsm           pin-pair mode decode + Mode Enable Vector chains
    ├── scan_unlock             AND-gates 16 scan outputs until 16 x 32-bit keys
    ├── scan_auth               128-bit scan-delay signature
    ├── func_lock               (optional) sequential functional lock
    └── watermark               (optional) challenge-response watermark
```

`treehouse_pkg` holds the shared types, the wrapper register map, the CAM
entry formats and `th_mix`, the keyed mixing function from which every
embedded secret is expanded.

The IPs themselves are not part of this RTL. Their scan chains, their
functional outputs and the FIR's PUF are ports of `treehouse_top`. So is the
analog part of the scan PUF: the phase-shifted capture clocks that measure
path delays.

## Wrapper modes and the TREE MODE FSM

The IEEE 1500 wrapper of each IP gets one extra pin, `TREE_MODE_RESET`. It
combines with `WRSTN` to select four modes:

| TREE_MODE_RESET | WRSTN | mode |
|---|---|---|
| 0 | 0 | functional |
| 0 | 1 | test |
| 1 | 1 | at-speed test |
| 1 | 0 | TREE |

Security operations exist only in TREE mode. There are four:

* scan unlock;
* scan authentication;
* functional unlock;
* HSC authentication: the watermark or the IP's PUF.

Each operation has its own secret chain of `SEQ_LEN` = 12 Mode Enable Vectors
of 16 bits. The FSM therefore has 4 x 12 = 48 chain states plus an idle state.
Vectors are applied by writing register 0. The rules are:

* The first vector of a chain selects the operation. Its two low bits are the
  operation number, so no two chains share a first vector.
* Each further vector must be the next one of that chain. A wrong vector sends
  the FSM back to idle.
* After the last vector the operation is *granted*. `op_active` rises on the
  clock edge that takes that vector.
* The grant ends when any further vector is written or when the pins leave
  TREE mode.

The Mode Register (register 0, read side) is laid out as follows:

| bits | field |
|---|---|
| 0 | KL_CTL: an operation has been granted |
| 1 | KL_STS: its key port is open (still in TREE mode) |
| 3:2 | granted operation |
| 5:4 | wrapper mode, `{TREE_MODE_RESET, WRSTN}` |

An operation is enabled exactly when KL_CTL and KL_STS are both 1. How far a
chain has progressed is deliberately not visible. Guessing therefore means
guessing all 192 bits of a chain at once, not 16 bits at a time.

### Register map of the security wrapper

32 registers of 32 bits. Each write is dropped unless the operation named
in the "needs" column is granted. This is how the wrapper refuses to load an
unlocking key that random vectors try to write.

| reg | name | access | needs | content |
|---|---|---|---|---|
| 0 | MODE | R / W | TREE mode | read: Mode Register; write: Mode Enable Vector (bits 15:0) |
| 1 | SUL_DATA | W | scan unlock | next 32-bit scan unlocking key |
| 2 | SUL_STS | R | TREE mode | bit 31 unlocked, bits 4:0 keys accepted |
| 3 | FUL_DATA | W | functional unlock | 32-bit chunk of a functional key, lowest chunk first |
| 4 | FUL_STS | R | TREE mode | bit 31 unlocked, bits 15:0 obfuscation state |
| 5 | WM_CHAL | W | HSC auth | watermark challenge |
| 6 | WM_RESP | R | TREE mode | watermark response |
| 7 | SA_CHAL | W | scan auth | challenge (shift distance to the target flop); starts a run |
| 8 | SA_STS | R | TREE mode | bit 1 done, bit 0 busy |
| 9-12 | SA_SIG | R | TREE mode | signature bits 31:0 ... 127:96 |
| 13 | PUF_CHAL | W | HSC auth | challenge for the IP's PUF |
| 14 | PUF_RESP | R | TREE mode | PUF response |
| 15-31 | GP | R / W | any granted operation | general metadata buffer |

Key registers always read as zero. Status registers read as zero outside TREE
mode. Writes take effect on the clock edge. Reads are combinational on
`rd_addr`. A functional key of `FK_W` bits takes ceil(`FK_W`/32) writes: 2 for
the GPS lock, 11 for the AES lock. The pattern is applied to the lock one
cycle after its last chunk.

## Scan protection

### Scan unlock (`scan_unlock`)

A counter counts consecutive correct unlocking keys. Its "done" output drives
one input of an AND gate on every scan-out port. Until 16 correct 32-bit keys
have been applied in order, the 16 scan outputs read as zero. This holds
whatever test pattern is shifted. A wrong key resets the counter, so a partial
or out-of-order sequence never opens the port. The gated 16-bit scan output is
the response of each unlocking vector. Once open, the port stays open until
reset, so the layer can go from TREE mode into test mode. The expected keys are
expanded from the IP's embedded seed (`LOCK_SEED`) rather than stored.

### Scan authentication (`scan_auth`)

The entropy source is the transition delay along each scan path, measured
against the edges of 8 phase-shifted capture clocks. The signature has one bit
per (path, phase), 16 x 8 = 128 bits. Bit `p*8 + k` is 1 when the transition
on path `p` reaches the challenge flop within phase interval `k`:

    sig = 0  if t_challenge > t_interval
          1  otherwise

One trial works as follows:

1. `launch` for one cycle.
2. `shift_en` for `challenge` cycles. This moves the transition to the target
   flop; challenges beyond the chain length are clamped to its last flop.
3. `cap_req` to the capture logic, which answers with `cap_valid` and one
   sampled bit per path.

Each phase runs 32 trials, and each bit is the majority vote of its 32 samples.
This removes occasional jittered samples. With the test model's 15 % jitter the
signature is fully repeatable.

A run takes 8 x 32 trials of (challenge + 3) cycles, plus one cycle to start.
That is 256 x 462 + 1 = 118 273 cycles when the challenge is the last flop
(459) of a 460-flop chain. The capture logic itself is analog and is not part
of the RTL. `tb/scanpuf_delay_model.sv` stands in for it in simulation. It
gives each (chip, path, target flop) a delay drawn from a seed and applies
random jitter.

**Other chain counts.** The same 7351 GPS scan flops can be stitched into 1,
4, 16 or 32 chains. The signature stays at 128 bits by measuring several
target flops per path. `N_TARGETS` sets how many; the first is at the
challenge, and each next one is `CHAIN_LEN/N_TARGETS` flops further on,
wrapping. Bit `(t*N_PATHS + p)*N_PHASES + k` belongs to target `t`, path `p`,
phase `k`. The configurations and their simulated run lengths, with the
challenge at the last flop, are:

| chains x flops | paths x phases x targets | cycles | relative to 16 chains |
|---|---|---|---|
| 1 x 7351 | 1 x 8 x 16 | 15 990 529 | 135 |
| 4 x 1838 | 4 x 8 x 4 | 1 177 601 | 9.95 |
| 16 x 460 | 16 x 8 x 1 | 118 273 | 1 |
| 32 x 230 | 32 x 4 x 1 | 29 697 | 0.25 |

The 32-chain row uses 4 phases, because 32 x 8 would be 256 bits. Published
timings for these four configurations grow about as the square of the chain
length per path: about 250 and 16 times for 1 and 4 chains. That is what results when
every measurement shifts the whole chain. Here the later targets sit nearer
the scan input, so those two rows come out shorter. Only the 16-chain
configuration is instantiated in the wrappers, whose scan ports are 16 bits.

## Functional lock, watermark and PUF

* **`func_lock`** models the sequential (obfuscation-FSM) lock of an IP. The
  FSM state counts consecutive correct key patterns and falls back to its
  first state on a wrong one. Until all `N_KEYS` patterns have been applied,
  the IP's 32-bit output is XOR-corrupted. The sizes are:

  | IP | patterns | bits per pattern |
  |---|---|---|
  | GPS | 66 | 60 |
  | AES | 1334 | 352 |

  Expected patterns are computed from `LOCK_SEED` by the key expansion, so no
  table of 469 kbit is stored.
* **`watermark`** is a keyed combinational function of the challenge,
  registered, so it answers in one clock cycle.
* **PUF port.** The wrapper of the FIR IP drives `puf_chal` / `puf_chal_valid`
  on a write to register 13 and shows `puf_resp` in register 14. The PUF itself
  is outside.

## The TREE module

* **Memory module (`hsm_memory`).** 128 KB, 32-bit words, one access per
  cycle, read data one cycle later. It holds each IP's record, encrypted. The
  word offsets of a record, counted from its base, are:

  | offset | content |
  |---|---|
  | `o*SEQ_LEN` | the Mode Enable Vectors of operation `o` (0..3), in the low 16 bits |
  | `4*SEQ_LEN` | 16 scan unlocking keys |
  | `4*SEQ_LEN + 16` | the functional key chunks, key by key, lowest chunk first |

* **Key Management Unit (`key_mgmt_unit`).** An 8-entry CAM searched by IP
  ID. Each entry (`kmu_entry_t`) holds:
  * the record's base address;
  * the scan-key count and the functional-key word count;
  * sequential/combinational and burst/word flags;
  * whether the IP has a watermark or a PUF.

  The policy controller does not act on the lock-type and transfer flags.
  Keys always go word by word, and a combinational lock is an IP with a
  single key pattern.
* **Authentication Control Unit (`auth_ctrl_unit`).** An 8-entry CAM of the
  encrypted scan challenge, golden 128-bit signature, and watermark/PUF
  challenge and golden response of each IP. It also holds the comparator: a
  signature matches when at most `MAX_HD` = 8 of the bits selected by
  `sa_mask` differ.
* **Encryption unit (`crypt_unit`).** Word `w` at tweak `t` is decrypted as
  `w ^ lo(th_mix(key, t)) ^ hi(th_mix(key, t))`. The tweak is:
  * for memory words, the word address;
  * for ACU word `k` of IP `id`, `0xAC000000 | id<<8 | k`, where `k` is 0
    challenge, 1-4 golden signature, 5 HSC challenge, 6 HSC golden.

  This keystream is a placeholder with the right interface and one-cycle
  latency. It is **not** a vetted cipher (see below).
* **Policy controller (`policy_ctrl`).** Runs the protocol below. HSM words
  stream at one per cycle: memory read, decrypt, wrapper write.
* **Host port.** It stands in for the TREE's secure network link. It gives:
  * raw memory writes (ignored while a command runs);
  * CAM entry writes;
  * the TREE's own PUF response, which the design house checks first;
  * the provisioning command: IP ID plus that layer's 64-bit decrypt key,
    answered by `prov_done`, `prov_pass` and `prov_fail_step`.

## Provisioning protocol

**Pre-bond (die-level test).** The design house drives each layer's own test
pins (`ext_sel[i]=1`) and does the following:

1. TREE mode.
2. The scan-unlock Mode Enable Vector chain, then the 16 scan keys.
3. The scan-authentication chain and a challenge, then reads the 128-bit
   signature. This is the golden response. The design house also uses it to
   encrypt that layer's metadata.
4. Test mode, and the layer-level test.

**Post-bond and post-packaging.** The design house:

1. checks the TREE fingerprint;
2. loads the encrypted records into the memory and both CAMs;
3. sends a command with the decrypt key for each IP.

For each command the policy controller then:

1. looks the IP up in both CAMs and decrypts its ACU entry;
2. sets TREE mode;
3. applies the scan-unlock chain, checks the Mode Register (KL_CTL = KL_STS =
   1, right operation), applies the 16 keys and checks that the scan port
   opened;
4. applies the scan-authentication chain and challenge, waits for *done*, reads
   the signature and compares it with the golden one;
5. if the IP is functionally locked: applies that chain and all key words, and
   checks that the IP is unlocked;
6. if the IP has a watermark or PUF: applies that chain and challenge, waits
   (1 cycle for a watermark, `PUF_WAIT` = 4 for a PUF) and compares the
   response;
7. sets test mode and reports pass.

Any failed check disables the layer. Its wrapper is held in functional mode,
still locked, and further commands for it are refused until reset.
`prov_fail_step` tells which step failed:

| code | meaning |
|---|---|
| 1 | IP not found in the CAMs |
| 2 | Mode Register check failed (wrong decrypt key or wrong vectors) |
| 3 | scan unlock failed |
| 4 | scan signature mismatch (or no signature within `SA_TIMEOUT` = 2^20 cycles) |
| 5 | functional unlock failed |
| 6 | watermark/PUF mismatch |
| 7 | command refused: ID out of range or layer disabled |

With a wrong decrypt key, the first decrypted vector is already wrong. The
wrapper grants nothing and the run stops at code 2.

Measured provisioning times at the default sizes, with the scan challenge at
the last flop of the 460-flop chains:

| IP | cycles | of which scan authentication |
|---|---|---|
| AES | 133 040 | 118 272; the 14 674 functional key words take most of the rest |
| GPS | 118 519 | 118 272 |
| FIR | 118 368 | 118 272 |

Scan authentication takes 256 x (challenge + 3) cycles and is the longest
step of every IP except the AES. The watermark check takes one cycle.

## Capacity at the default sizes

| workload | needed | built |
|---|---|---|
| GPS lock | 66 x 60 bits, record 196 words | `FK_N`=66, `FK_W`=60 |
| AES lock | 1334 x 352 bits, record 14 738 words | `FK_N`=1334, `FK_W`=352 |
| FIR | record 64 words | PUF port |
| all three records together | 14 998 words (60 KB) | 32 768 words (128 KB) |
| GPS scan chains | 7351 flops in 16 chains -> 460 each | `SA_CHAIN_LEN`=460, 16 paths |
| scan configurations with 1, 4 or 32 chains | 128-bit signature | `scan_auth` runs them all (see scan authentication); the wrappers are built for 16 chains |
| 128-state FSM instead of 48 | `SEQ_LEN`=32 | parameter change, simulated in `tree_mode_fsm_tb` |

The bottom-layer processor of the example stack has no countermeasure to
provision and gets no wrapper.

## Where this RTL is its own design

The architecture, the mode pins, the operations, the 32-register wrapper with
its Mode Register and the KL_CTL/KL_STS rule come from the TREEHOUSE
architecture. So do the counter-and-AND-gate scan lock, the 16 x 8 x 32 scan
PUF, the key and flop counts, the TREE's units and the protocol order. The
following are choices of this implementation:

* **Cipher and secret expansion.** `th_mix` (a splitmix64 finaliser) expands
  every embedded secret: Mode Enable Vectors, scan and functional lock keys,
  watermark. It is also the keystream of the encryption unit. It makes the RTL
  self-contained and testable. **It is not cryptographically strong.** Replace
  it with a real block cipher and real lock structures before trusting the
  design with secrets.
* **Firmware replaced by hardware.** The protocol runs in a hardware sequencer
  instead of firmware on a RISC-V microcontroller. The network link is a plain
  host port.
* **Unspecified encodings.** These details are this implementation's own:
  * the register map;
  * the CAM entry formats;
  * the memory layout and tweaks;
  * chunked functional keys;
  * the failure codes;
  * Hamming-distance tolerance 8;
  * the meaning of the 48 states (4 chains x 12 vectors);
  * majority voting over the 32 scan trials;
  * the challenge as a shift distance.
* **Models of locks the source only names.** The locked IPs' own locks are
  modelled: the functional lock is a key-sequence counter gating an XOR mask
  on the IP's output.
* **Scan key width.** The architecture describes 16 unlocking vectors of 32
  bits, each answered by a 16-bit scan response. Its brute-force estimate
  instead counts 16 patterns over 16 inputs. This RTL uses 32-bit keys.
* **Target flops.** The brute-force estimate for tampering counts 32 target
  flops spread over the 16 paths. Here a run of the built 16-chain
  configuration measures one flop, at the same shift distance on every path.
  The TREE stores one challenge per IP. More targets per run (`N_TARGETS`) or
  more runs with other challenges would need a wider signature or more ACU
  words.
* **Test mode by pins only.** The architecture returns a layer to test mode
  with test-mode vectors plus the two pins. Here the pins alone select test
  mode, and there is no fifth vector chain.
* **Decrypt keys come from outside.** The design house derives each layer's
  key from the scan signatures it recorded pre-bond. That derivation happens
  outside the chip. The TREE only receives the 64-bit key with each command.
* **Pre-bond/post-bond mux.** Each wrapper is fed from its layer's test pins
  or from the TREE through a mux (`ext_sel`).
* **Not modelled:**
  * the burst/serial transfer bits of the Mode Register;
  * the IEEE 1838 / IEEE 1500 test infrastructure itself (WIR, WBY, WBR,
    PTAP/STAP);
  * the IPs;
  * the analog capture clocks;
  * both PUFs.

## Verification

Every module except the package has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Reference values come
from `tb/tb_ref_pkg.sv`, an independent re-implementation of the mixing
function and secret expansion. The main tests are:

* **`treehouse_top_tb`** runs the whole stack at the default parameters:
  * pre-bond unlock and signature capture on all three layers;
  * re-power;
  * TREE fingerprint check and loading of all encrypted records;
  * provisioning of AES, GPS and FIR, each ending in test mode with open scan
    ports and an unlocked IP;
  * three failure paths: a tampered golden signature, a wrong decrypt key, and
    a command to a disabled layer.

  It counts each mechanism and fails if one never happens.
* **`tree_module_tb`** (also covers `policy_ctrl`) provokes every failure code
  and checks the provisioning cycle count.
* **`scan_auth_table6_tb`** runs `scan_auth` with 1, 4, 16 and 32 chains side
  by side. It checks each signature against the delay model and checks the
  exact run lengths.
* **The unit testbenches** check the exact latencies:
  * grant one cycle after the last vector;
  * unlock one cycle after the last key;
  * watermark answer in one cycle;
  * scan-auth run length 256 x (challenge + 3) + 1.

  They also cover random guessing of vectors, wrong and out-of-order keys, and
  read-back of all 128 KB of memory.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module treehouse_top_tb -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/treehouse_pkg.sv tb/tb_ref_pkg.sv tb/treehouse_top_tb.sv
./obj_dir/Vtreehouse_top_tb
```

Replace the top module and the last file name for any other testbench. The
full-size top-level test finishes in seconds.

Notes on the code:

* **Reset.** Resets are asynchronous and active-low. The testbenches drive a
  reset edge after time zero, because a two-state simulator starts flops at
  random values.
* **Assertions.** `tree_mode_fsm` asserts that an operation is only granted in
  TREE mode. `policy_ctrl` asserts that streamed transfers only write mode or
  key registers.
* **Lint.** Verilator lint reports unused bits and parameters. Most come from
  taking 32 or 16 bits of a 64-bit mix. It also reports a sync/async reset
  note, caused by the assertions' `disable iff`.
