# A self-repairing crypto co-processor for automotive ECUs

Two ECUs on a FlexRay bus need to exchange short control messages (a steer-by-wire
sensor value, for example) so that the messages cannot be read, forged or replayed.
Each ECU pairs an application processor with an FPGA co-processor. Both sides must keep
working when a radiation-induced upset, or even a permanent defect, hits the cryptographic
logic.

This RTL implements both co-processors:

- **The sender** takes a 64-bit ECU message and appends a 64-bit counter. It encrypts the
  resulting 128-bit block with AES-128 and, in parallel, computes an HMAC-SHA3-256 over the
  same block with a second key. The output is a 48-byte payload: the ciphertext followed by
  the digest.
- **The receiver** decrypts the ciphertext, recomputes the HMAC over the recovered
  plaintext, and compares it with the received digest. On a mismatch it asks for
  retransmission.

Each node can run in two modes:

- **NFT** (non-fault-tolerant): one AES module and one HMAC module per node.
- **FT** (fault-tolerant), using *FT-SR-DMR* (fault tolerance by self-reconfiguration in a
  dual-modular-redundant system). Every cryptographic unit is duplicated, plus a third spare
  copy. The two results go to three comparators, a self-checking voter judges the
  comparators, and a self-checking control unit decides what happens next. A unit found
  faulty is rewritten by partial reconfiguration while the spare takes its place.

The design targets a 50 MHz FPGA clock.

## Nodes and data formats

| Signal | Bits | Content |
|---|---|---|
| plaintext | 128 | `{ecu_msg[63:0], counter[63:0]}` |
| payload | 384 | `{ciphertext[127:0], mac[255:0]}`, first byte in `[383:376]` |

- The counter starts at 0 after reset and increments once per accepted message. It protects
  against replay.
- Byte 0 of any vector is its most significant byte. This is also the byte order AES and the
  HMAC see.
- `red_sender_node` keeps the last payload. A `retx_req` pulse offers it again.
- `red_receiver_node` raises `integrity` when the digests match. While a message with lost
  integrity is offered, it drives `retx_req`.
- `red_ecu_top` places one sender and one receiver side by side and prefixes their ports
  with `tx_` and `rx_`. The bus between them is not part of the RTL: the testbench copies
  the payload across.

All streams use valid/ready handshakes. A transfer happens on a clock edge where both are
high. Reset is synchronous and active high.

## Cryptographic cores

| Module | Cycles from `start` to `done` | Architecture |
|---|---|---|
| `aes128_enc` | 11 | One round per cycle; the next round key is derived in the same cycle. |
| `aes128_dec` | 21 | 10 cycles run the key schedule forward to the last round key. The 10 inverse rounds then run it backwards with the inverse key step, so no round keys are stored. |
| `keccak_f1600` | 25 | One Keccak round per cycle. |
| `sha3_hmac` | 106 | Four permutations, listed below. |

`sha3_hmac` runs these four permutations:

1. K ⊕ ipad.
2. The 16-byte message with SHA-3 padding (`0x06 … 0x80`).
3. K ⊕ opad.
4. The inner digest, padded.

The key is zero-extended to the 136-byte SHA3-256 rate.

No table is typed in. The AES S-box and its inverse, the Keccak round constants and the
rotation offsets are computed at elaboration by constant functions in `crypto_pkg`:

- The S-box is the GF(2⁸) inverse followed by the affine map.
- The round constants come from the degree-8 LFSR rc(t).
- The rotation offsets come from the (x, y) → (y, 2x+3y) walk.

A node's operation takes, from request to result at the FT module boundary:

| Node | NFT | FT, no fault |
|---|---|---|
| sender | 111 cycles (2.2 µs at 50 MHz) | 112 cycles |
| receiver | 135 cycles (2.7 µs at 50 MHz) | 137 cycles |

The sender runs AES and HMAC in parallel. The receiver runs them in sequence, because the
HMAC needs the decrypted plaintext. The published FPGA implementation reports 4.9/6.5 µs
(sender) and 9.0/9.6 µs (receiver), so these cores are faster than required.

The FT mode costs only one or two cycles here: the duplicated modules run side by side, and
one registered comparison is added. The published implementation sees a larger FT overhead
(about a third). The FT figures above assume no fault. A spare recomputation adds roughly one
more HMAC time (about 106 cycles), and a retry adds a whole operation.

## FT-SR-DMR: how a fault is detected, located and repaired

`red_ft_crypto` holds three modules of each kind (AES and HMAC): left, right and spare. The
datapath is built from these parts:

- **Input interfaces.** One left and one right interface capture each kind's result. Each
  interface can take the spare's result in place of its regular module.
- **Comparators (`result_cmp`).** Three copies in triple modular redundancy each compare
  left against right for both kinds.
- **Self-checking voter (`berger_voter`).** It forms the 2-of-3 majority per kind and
  names a comparator that disagrees with the majority. Its five output bits are protected by
  a Berger code:
  - The number of zeros is predicted by separate complementary logic (computed on the
    inverted comparator flags).
  - A checker counts the zeros actually present.
  - Any single fault that disturbs an output makes the two counts differ, and `berger_err`
    is raised.
- **Result buffer (`result_buffer`).** It holds the most recent left and right results of
  both kinds.
- **Self-checking control unit (`sccu`).** It runs the recovery policy below. Its state
  register is one-hot and checked every cycle (`state_err`).
- **Reconfiguration subsystem.** It consists of `config_memory`, which holds one partial
  bitstream per regular module, and `config_engine`. The engine streams the selected region
  word by word to the FPGA's internal configuration access port (ICAP): one 16-bit word
  every two cycles, holding while the port signals busy.

Recovery policy of the `sccu`, per operation:

1. **Launch and compare.** Both regular modules of each kind run on the same input. After
   they finish, the voter's verdict is read and both results are written to the buffer.
2. **Agreement.** The left result is delivered.
3. **Disagreement, spare free.** The spare recomputes the input, and its result is compared
   with the two buffered results:
   - The module whose result differs from the spare's is faulty.
   - The spare's result is delivered.
   - The spare takes the faulty module's slot: its interface now reads the spare.
   - Reconfiguration of the faulty module's region is requested.
4. **Unresolved cases.** These are:
   - a disagreement while the spare is already standing in;
   - a spare result that matches neither buffered result;
   - a `berger_err` from the voter.

   In these cases the operation is recomputed, at most `MAX_RETRY` times (default 3). After
   that the result is delivered with `status.fail` set.
5. **Repair done.** When the reconfiguration engine reports done, the spare is released at
   the next idle point, and the repaired module is used again.

Reconfiguration is slow: each word takes at least two cycles, and a real bitstream takes
tens of milliseconds. During all that time the node keeps working on the spare, so one
permanent fault per kind is covered without interrupting service. Transient faults are
cleared by the retry in step 4.

In the receiver, the AES decryption is checked and resolved first, and only the resolved
plaintext goes to the HMAC modules. `status.integrity` compares the final HMAC with the
received digest.

`resp_status` (`status_t` in `red_pkg`) reports the following for each operation:

| Field | Meaning |
|---|---|
| `fail` | the retries were exhausted |
| `integrity` | the received digest matched (receiver only) |
| `spare_used` | the spare was used, per kind |
| `mismatch` | the comparators saw a mismatch, per kind |
| `cmp_fault` | which comparator was out-voted |
| `voter_err` | the voter raised `berger_err` |
| `retries` | how many recomputations were needed |

The FT cryptographic module and the nodes bring out test inputs (`fi_mod`, `fi_cmp`,
`fi_voter`). These flip a result bit of a chosen module, or force a comparator or the voter
wrong. Tie them to zero in use.

## Where this departs from, or goes beyond, the published design

The published design gives the structure and the policy: DMR plus a spare, TMR
comparators, a Berger-coded voter, an SCCU with a result buffer, and repair by partial
reconfiguration while the spare stands in. It does not give:

- the input interfaces' behaviour;
- the voter's circuit;
- the SCCU's states;
- the bitstream size;
- the retry rule;
- the NFT datapath.

All of those above are this design's choices.

Specific departures and choices:

- **Spare wiring.** The published block diagram draws the spares beside the left-hand
  modules. Here either input interface can take the spare's result, so the spare can stand
  in for a faulty module on either side.
- **Receiver cipher.** The published block diagram labels the receiver's block with AES
  encryption. The text says the receiver decrypts, and `aes128_dec` follows the text.
- **Bitstream regions.** `REGION_WORDS` = 4096 16-bit words per region is an assumed size.
  The memory is written through a load port (`cfg_we`).
- **ICAP.** The port is a vendor primitive and is not modelled in RTL. Its signals are
  brought out (`icap_ce_n`, `icap_write_n`, `icap_din`, `icap_busy`).
  `tb/icap_model.sv` is a behavioural stand-in: it stalls every fifth word.
- **Not included.** The application processor, the FlexRay controller and the tamper-proof
  key store are outside the co-processor. Keys are plain inputs.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `MAX_RETRY` | 3 | recomputations before `fail` (`sccu`, nodes, top) |
| `REGION_WORDS` | 4096 | 16-bit words per partial bitstream (`config_memory`, `config_engine`, up) |
| `RECEIVER` | 0 | `red_ft_crypto`/`sccu`: 0 = encrypt-and-MAC, 1 = decrypt-then-MAC |
| `AES_ROUNDS`, `KECCAK_ROUNDS`, `SHA3_256_RATE` | 10, 24, 136 | `crypto_pkg` constants |

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The AES, HMAC and Keccak benches compare against
known-answer vectors from an independent software model, and they check the cycle counts
listed above.

`tb_red_ecu_top` runs the whole design at default parameters with a 50 MHz clock, over 12
operations. It makes every mechanism happen and counts each one:

- NFT and FT operations;
- a fault in the left and in the right module, with localization by the spare;
- reconfiguration, including ICAP stalls, followed by release of the spare;
- operation on the spare while a repair is running;
- a faulty comparator, out-voted;
- a voter fault caught by the Berger checker;
- transient retries;
- exhausted retries (`fail`);
- a corrupted payload detected by the receiver, followed by retransmission.

On fault-free operations it also checks that each node stays within the published
execution times converted to 50 MHz cycles: sender 245 (NFT) and 326 (FT), receiver 450
(NFT) and 481 (FT).

Module testbenches that need it shrink `REGION_WORDS` to keep bitstream streaming short;
the end-to-end test uses every default.

To simulate, for example:

```
verilator --binary --timing -Wno-fatal rtl/crypto_pkg.sv rtl/red_pkg.sv -y rtl \
    tb/icap_model.sv tb/tb_red_ecu_top.sv --top-module tb_red_ecu_top
./obj_dir/Vtb_red_ecu_top
```
