# Fault-tolerant cryptographic module for automotive ECUs

Control messages on an in-vehicle bus such as CAN FD need two things. First, security: an
attacker on the bus must not be able to read, forge or replay a steering command. Second,
dependability: a soft error in the electronics that protect the message must neither corrupt
it nor stall the control loop. This RTL puts both into the programmable logic next to an ECU's
processor.

Every outgoing message is encrypted and authenticated in hardware. Every incoming one is
decrypted and checked. Each cryptographic function runs on a duplicated pair of cores with a
spare. A self-checking fault handler deals with mismatches: it recomputes, then switches in the
spare, works out which core is broken, and has that core rewritten by partial
reconfiguration. Traffic continues throughout.

The RTL is generic SystemVerilog-2017 with no vendor primitives. It is written for a 50 MHz
fabric clock, the figure used for the timing numbers below.

## What goes over the bus

A sender takes a 64-bit application message `M` and appends a 64-bit message counter `C`. This
gives the 128-bit block `M||C`, with `M` in the upper half. From that block it computes two
results, in parallel:

- the AES-128 ciphertext of `M||C` under the AES key, giving confidentiality;
- the HMAC-SHA3-256 of `M||C` under the MAC key, giving integrity, origin and replay protection
  (through `C`).

The secure payload is `{HMAC[255:0], ciphertext[127:0]}`: 384 bits, or 48 bytes. That fits one
CAN FD frame, which holds up to 64 bytes; classic CAN would need six frames. The sender advances
`C` after each message it sends.

The receiver reverses the process:

1. It decrypts the ciphertext to recover `M||C`.
2. It recomputes the HMAC of `M||C` and compares it with the received HMAC (`rx_auth_ok`).
3. It checks that `C` is strictly larger than the counter of the last message it accepted
   (`rx_fresh`).

A message is genuine when both flags are set. Only a genuine message updates the stored
counter, so a recorded frame that is played back later is flagged as stale.

This is "encrypt-and-MAC": the HMAC covers the plaintext block, not the ciphertext.

## Redundancy structure

Each cryptographic function in each node has three identical copies:

```
              +--> M1 --+                         +--> comparator 0 --+
  input ------+--> M2 --+--> input interface A ---+--> comparator 1 --+--> self-checking --> fault
              +--> MS --+--> input interface B ---+--> comparator 2 --+    voter (Berger)     handler
                  (spare, idle until needed)
```

- **M1 and M2** form a DMR (dual modular redundant) pair. Both compute every job.
- **MS** is a spare. It is not started during normal operation, which saves switching energy.
- **Input interfaces A and B** are multiplexers set by the fault handler. Side A shows `M1`, or
  `MS` if M1 is out of service. Side B shows `M2`, or `MS` if M2 is out of service.
- **Three comparators** each compare side A with side B, separately for the AES result and the
  HMAC result. A single broken comparator therefore cannot hide a mismatch or invent one.
- **The self-checking voter** takes the 2-of-3 majority of the comparator outputs. It also
  carries a Berger-code checker, so that a fault in the voter itself raises `scv_fault` instead
  of silently giving a wrong vote.

  How the voter is built: for each function it predicts the Berger check symbol of the three
  comparator bits, that is, their number of zeros. This uses two-level logic. The majority vote
  is the complement of the symbol's high bit: "two or more zeros" means the majority says
  "differ". A separate adder recounts the zeros. A disagreement between the prediction and the
  recount is a voter fault.

The same arrangement is built twice per node: once for AES (encryption in the sender,
decryption in the receiver) and once for the HMAC.

## The fault handler

`rtl/scfh.sv` is the part that needs the most care. A node hands it a job: "run the AES", "run
the HMAC", or both. The handler then does the following.

1. **Run.** It starts the in-service copies of each requested function. It waits until all of
   them are done, and stores every copy's result in a small buffer.
2. **Vote.** It reads the voter.
   - If all functions agree, it delivers the side-A result.
   - If the voter has flagged itself, the handler compares the buffered side-A and side-B
     results directly. It delivers only when they agree.
3. **Recompute.** On a mismatch it reruns the same copies on the same inputs. It does this until
   `NUM_SOFT_ERR` computations have been made in total; the count starts at 1. A transient
   upset usually disappears on the rerun. The result of the last allowed run is still voted on.
4. **Spare.** If the mismatch persists, the handler starts the spare of each function that
   disagrees. It compares the spare's result with the buffered results of M1 and M2:
   - The copy that differs from the spare is faulty.
   - If both copies differ, both are faulty.

   The handler takes each faulty copy out of service and sends it a reconfiguration request. It
   delivers the spare's result.
5. **Continue degraded.** The spare now stands in for the missing copy, so the function is
   still compared in DMR. If both copies were faulty, the spare runs alone until the first
   reconfigured copy comes back. Results from that unchecked mode are marked `degraded`.
6. **Give up.** A mismatch while the spare is already in use cannot be localised. The job ends
   with a failure (`send_fail` in the sender, `rx_fail` in the receiver) and nothing is
   delivered.

When the reconfiguration of a copy completes, the copy goes back into service. This happens
between jobs, never in the middle of one.

The sender accepts a new message only while the handler is idle (`msg_ready`), and likewise the
receiver with `payload_ready`.

The `events` output of each node pulses once for each mechanism used:

- mismatch;
- recomputation;
- spare activated;
- M1 faulty;
- M2 faulty;
- both faulty;
- voter self-flag;
- copy restored;
- unrecoverable.

## Reconfiguration sub-system

In an FPGA, the configuration engine rewrites a faulty copy's region from a stored partial
bitstream through the internal configuration port. That takes on the order of tens of
milliseconds.

`rtl/reconfig_ctrl.sv` models this engine's behaviour. It queues requests and serves them one at
a time, lowest index first. It holds `active` for `RECONF_CYCLES` cycles, then pulses `done`.
The default is 1,000,000 cycles, which is 20 ms at 50 MHz.

The bitstream transfer itself is device configuration, not user logic, so it is not in this
RTL. To use real partial reconfiguration, replace this module with an interface to the device's
configuration port.

## Node behaviour and timing

These numbers assume no faults. Each is counted from the clock edge that accepts the input.

| Path | Cycles | At 50 MHz |
|---|---|---|
| AES-128 encryption, one round per cycle | 10 | 0.2 µs |
| AES-128 decryption: 10 cycles of key expansion, then 10 inverse rounds | 20 | 0.4 µs |
| HMAC-SHA3-256: four Keccak-f[1600] permutations (inner key block, inner message, outer key block, outer digest), one round per cycle | 96 | 1.92 µs |
| Sender, message to `payload_valid`; AES and HMAC in parallel | 101 | 2.02 µs |
| Receiver, payload to `rx_valid` | 126 | 2.52 µs |
| Each sender recomputation | +99 | |

The receiver's HMAC starts only after the decrypted block has been checked.

With faults, at the default `NUM_SOFT_ERR = 3` (measured the same way):

| Case | Cycles | At 50 MHz |
|---|---|---|
| Sender, one soft error, cured by one recomputation | 200 | 4.00 µs |
| Receiver, one soft error in the decryption and one in the HMAC | 248 | 4.96 µs |
| Sender, permanent fault in an AES copy: three computations, then the AES spare | 312 | 6.24 µs |
| Sender, permanent fault in an HMAC copy: three computations, then the HMAC spare | 398 | 7.96 µs |

For comparison, the FPGA implementation this design follows was reported at 4.90 µs (sender)
and 9.00 µs (receiver) without fault tolerance. With fault tolerance it was reported at
6.53 µs and 10.63 µs.

Copies of a function are started together, so DMR adds no time when there is no fault. The
only area cost is the extra copies.

Per-node interface, all synchronous to `clk`, with `rst_n` as an asynchronous active-low reset:

| Node | Inputs | Outputs |
|---|---|---|
| Sender | `msg_valid`, `msg[63:0]` | `msg_ready`; `payload_valid` (one-cycle pulse), `payload[383:0]`, `payload_ctr`, `payload_degraded`; or `send_fail` |
| Receiver | `payload_valid`, `payload[383:0]` | `payload_ready`; `rx_valid` (one-cycle pulse), `rx_msg`, `rx_ctr`, `rx_auth_ok`, `rx_fresh`, `rx_degraded`; or `rx_fail` |

Each node also has these status outputs:

- `out1` and `out2`: which copies are out of service, per function;
- `reconf_active`: which copy is being rewritten;
- `cmp_disagree`: a comparator was outvoted;
- `events`: the mechanism pulses listed above.

The keys are plain inputs, `key_aes` and `key_mac`, both 128 bits. They are expected to come
from the ECU's tamper-resistant key store.

`ecu_ft_top` places a sender node and a receiver node side by side. The path between them runs
through an internal bus, a processor, a CAN FD controller and the bus itself. None of that is
RTL here, so the top brings out the sender's payload and the receiver's payload input as ports.

## Fault emulation

Every node has inputs for injecting faults:

- `fi_aes[2:0]` and `fi_mac[2:0]`: one bit per copy (M1, M2, MS). When set, copy *c* inverts
  bit *c* of its result. This makes faults in different copies distinguishable, as real
  independent faults would be.
- `fi_cmp[2:0]`: inverts a comparator's output.
- `fi_scv[1:0]`: flips the voter's predicted check bits.

Holding a bit for one computation emulates a soft error. Holding it across recomputations
emulates a permanent fault, which the handler then localises. Tie all of them to zero in a
product.

## Departures and open points

- **Receiver order.** The decryption check and the HMAC run one after the other, not
  overlapped. This costs a few cycles and guarantees that the HMAC copies hash a checked
  plaintext.
- **Last recomputation.** The result of the last allowed recomputation is still compared.
  Only a persistent mismatch brings in the spare.
- **Which spares start.** Only the spare of a function that actually disagreed is started.
- **Voter fault.** When the voter flags itself, the handler falls back to its own comparison of
  the buffered results.
- **Freshness rule.** The receiver's rule, a strictly increasing counter, is this design's
  choice. The counter starts at 0 after reset on both sides. There is no resynchronisation
  after a node resets.
- **`NUM_SOFT_ERR`.** The default of 3 is arbitrary. In a real system it comes from the slack
  between the control loop's deadline and the computation time. The 99-cycle recomputation
  time allows thousands of retries within a deadline of a few milliseconds.
- **Key sizes.** The HMAC key is 128 bits, zero-padded to the 136-byte SHA3-256 block as
  standard HMAC does.
- **Key refresh.** Key refresh, and the CAN FD framing, are not implemented.
- **Reconfiguration.** Partial reconfiguration is modelled by a timer (see above).

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each one prints a
line `TB_RESULT checks=N failures=M`.

Reference values come from independent models:

- AES: the FIPS-197 vectors.
- HMAC-SHA3-256: values computed outside the RTL with standard libraries.
- End-to-end payloads: tabulated in `tb/tb_vectors_pkg.sv`.

What the testbenches cover:

- **Units.** The unit testbenches check the latencies above and exhaustively check the
  interfaces, comparators and voter, including every emulated voter fault.
- **Fault handler.** `tb_scfh` drives the handler with behavioural copies and checks each path:
  recomputation, spare, M1, M2 or both faulty, voter self-flag, restore and failure.
- **End to end.** `tb_ecu_ft_top` connects the two nodes back to back, with a short
  reconfiguration time. It sends a stream of messages and injects soft errors, permanent faults,
  comparator and voter faults, a corrupted frame and a replayed frame. It counts every
  mechanism and fails if any mechanism never happened.
- **Full size.** `tb_ecu_ft_top_full` runs the top at its default parameters, including a full
  1,000,000-cycle reconfiguration.
- **Timing.** `tb_table2_timing` runs the top at its default parameters. It measures the
  fault-free and fault cases in the tables above, and checks each against those figures.

Simulating one testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/aes_pkg.sv rtl/keccak_pkg.sv rtl/ecu_pkg.sv tb/tb_vectors_pkg.sv \
  tb/tb_ecu_ft_top.sv --top-module tb_ecu_ft_top -o sim
./obj_dir/sim
```

With `-y`, Verilator finds each module's file by the module's name. The packages are listed
explicitly so that they are compiled first.

## Changing the design

- **Parameters.** `NUM_SOFT_ERR` and `RECONF_CYCLES` are parameters of the top, of both nodes
  and, respectively, of `scfh` and `reconfig_ctrl`.
- **Widths.** The widths live in `rtl/ecu_pkg.sv`. The message and counter are 64 bits each
  because the two together fill one AES block.
- **Constants.** The AES S-boxes, the Keccak round constants and the rotation offsets are
  computed by constant functions from their definitions (`aes_pkg`, `keccak_pkg`). No tables
  are typed in.
- **Other functions.** To protect a different function, give it the same interface as the
  cores here (`start`, `busy`, `done`, result, `fault_inj`). Then widen the function index in
  `ecu_pkg`, the comparators and the voter.
