# TLS accelerator: 2048-bit key exchange and CBC-AES record protection

A small sequential core, such as a two-stage RISC-V core in an IoT or V2X
node, spends most of a TLS session on two kinds of work. One is the handshake:
modular exponentiation of 2048-bit numbers for Diffie-Hellman (DHE) and RSA.
The other is record protection: AES in CBC mode plus a message authentication
code. This accelerator does both behind one 128-bit word port. The core loads
keys, issues a command and streams 128-bit words in and out.

It contains:

* a **modular exponentiation unit** built from two carry-save Montgomery
  multipliers. They run the multiply and the square of each exponent bit at
  the same time.
* a **fully pipelined AES-128** cipher and inverse cipher with a shared key
  schedule. The pipeline is kept busy by running two independent chains
  through it: the CBC encryption chain and the CMAC chain.
* a **CMAC subkey generator** and a **SHA-3 (Keccak) unit**, the two ways to
  compute the record's integrity tag.
* a **key memory** and a **controller** that moves data between them.

```
            +------------+        +--------------------------+
 en  ------>|            |<------>| key_mem (priv, e, N,     |
 cmd ------>|            |        |  public value, secret)   |
 data_in -->|  tls_ctrl  |        +-----------+--------------+
 rd_req <---|            |                    |
 data_out<--|  (builds   |<------> modexp (2 x mont_mul)
 out_valid<-|   every    |
 busy/done<-|   AES      |<------> aes_key_expand -> aes_enc_pipe, aes_dec_pipe
 auth_ok <--|   input)   |<------> cmac_subkey
 mac_ok  <--|            |<------> sha3_256
            +------------+
```

## Host port and commands

The host sees `en`, `cmd[5:0]`, `data_in[127:0]`, `rd_req` and
`data_out[127:0]`. This design adds `out_valid`, `busy`, `done`, `auth_ok` and
`mac_ok`. The reset `rst` is synchronous and active high.

* While `busy` is low, a cycle with `en` high starts the command on `cmd`.
* During a command the accelerator raises `rd_req` when it can take a word. A
  word moves on each clock edge where `rd_req` and `en` are both high, so `en`
  acts as the host's "data valid".
* Each result word comes with a one-cycle `out_valid`. The host must take it;
  there is no output back-pressure.
* `done` pulses once at the end of the command, and `busy` then falls.

`cmd[3:0]` selects one of nine modes; `cmd[5:4]` selects the exponentiation
operation. Big numbers move least significant word first. In a message word,
byte 0 is bits [127:120].

| mode | name        | words in                                   | words out |
|------|-------------|--------------------------------------------|-----------|
| 0    | STORE_PRIV  | W/128: private exponent (DHE secret or RSA d) | none |
| 1    | STORE_PUB   | W/128 of public exponent e, then W/128 of modulus N | none |
| 2    | STORE_PUBVAL| W/128: public value (g, the peer's g^b, or an RSA ciphertext) | none |
| 3    | STORE_SECRET| W/128: shared secret, loaded directly       | none |
| 4    | MODEXP      | none                                       | W/128 result words |
| 5    | ENC_CMAC    | length, IV, ceil(L/16) plaintext words     | ciphertext words, then 1 tag word |
| 6    | DEC_CMAC    | length, IV, ciphertext words, 1 tag word   | plaintext words; sets `mac_ok` |
| 7    | ENC_SHA     | length, IV, ceil(L/16) plaintext words     | ciphertext words, then 2 tag words |
| 8    | DEC_SHA     | length, IV, ciphertext words, 2 tag words  | plaintext words; sets `mac_ok` |

MODEXP has three operations. N is always the stored modulus.

| cmd[5:4] | operation  | computes |
|----------|------------|----------|
| 0 | DHE        | PUBVAL^PRIV mod N. The result is returned and also written to the shared secret. |
| 1 | RSA_ENC    | SECRET^e mod N: the client encrypts the secret with the server's public key. |
| 2 | RSA_VERIFY | PUBVAL^PRIV mod N, returned. `auth_ok` is set if it equals the stored secret. |

One DHE exchange takes two DHE operations:

1. With PUBVAL = g, the first gives g^a to send to the peer.
2. With PUBVAL = g^b from the peer, the second leaves g^ab in the secret slot.

RSA then confirms that both sides hold the same secret.

## Key exchange: exponentiation with two Montgomery multipliers

`modexp` implements right-to-left binary exponentiation in the Montgomery
domain (R = 2^W):

```
M* = Mont(M, R^2 mod N);   S = R mod N
for each exponent bit e_i, LSB first, up to the highest set bit:
    if e_i: S  = Mont(M*, S)      -- multiplier A
            M* = Mont(M*, M*)     -- multiplier B, same time
C = Mont(S, 1)
```

Within one step, the update of S and the squaring of M* do not depend on each
other. Multiplier A therefore starts with the old M* while multiplier B squares
it, and both results are taken when they finish together. A step costs one
Montgomery product whether or not the bit is set.

R mod N and R^2 mod N are made inside the unit: it starts from 1 and doubles
modulo N, one doubling per clock, 2W times in all. The host therefore only
supplies M, e and an odd N with M < N.

`mont_mul` is radix 2: each clock handles one bit of `a`. The running value is
kept as two vectors, sum and carry, so an iteration has no carry chain:

```
(s, c) = CSA(s, c, a_i ? b : 0)
q      = lsb(s)                  -- makes the sum even
(s, c) = CSA(s, c, q ? n : 0)
(s, c) = (s >> 1, c >> 1)
```

The represented value stays below 2n. After W iterations one wide addition and
one conditional subtraction of n give the final result. Those two wide steps
each take a clock, so a product takes W + 3 cycles.

A whole exponentiation takes **2W + (k_e + 2)(W + 5) + 3 cycles** for a k_e-bit
exponent. At W = 2048 and 100 MHz:

* a 256-bit DHE exponent takes 5.3 ms;
* e = 65537 takes 0.43 ms;
* a full 2048-bit RSA private exponent takes 42.1 ms.

## Record protection: CBC and CMAC sharing one AES pipeline

Records are protected MAC-then-encrypt. The tag is computed over the message,
and CBC encrypts message || tag under the same IV chain.

* **AES key.** The AES-128 key is the low 128 bits of the shared secret, and
  the same key is used for CBC and for CMAC. At the start of every CBC command
  the key schedule is rebuilt (10 cycles). For CMAC, L = AES_K(0) is then
  computed and doubled in GF(2^128) into the subkeys K1 and K2.
* **Length and IV.** The length header gives L in bytes (at least 1) in bits
  [31:0]. The last message word holds L − 16·(ceil(L/16) − 1) valid bytes, and
  its unused bytes are encrypted as zeros. The IV is the second word of the
  command.
* **CMAC last block.** If the last block is complete it is XORed with K1.
  Otherwise it is padded with 0x80 00.. and XORed with K2.
* **Interleaving.** CBC cannot use a pipeline on its own: each block needs the
  previous ciphertext. For every plaintext word the controller puts
  `P ^ C_prev` (tag 0) and `P ^ MAC_prev` (tag 1) into `aes_enc_pipe` on
  consecutive clocks. Both come back 11 cycles later, so the CBC and CMAC
  chains each advance once per pipeline latency. A block costs about 13
  cycles: 845 cycles for a 1024-byte record, or 969 Mbit/s at 100 MHz.
* **Decryption.** Each ciphertext word goes through `aes_dec_pipe` and is XORed
  with the previous ciphertext. The recovered block is returned and also fed
  to the CMAC chain (or to SHA-3). The tag words at the end are decrypted and
  compared with the recomputed tag, and the result goes to `mac_ok`.
  Decryption handles one block at a time.

## SHA-3 unit

`sha3_256` is SHA3-256: rate 1088 bits (136 bytes), 512-bit capacity and a
256-bit digest, which makes a 2-word tag.

* **Absorbing.** Words are absorbed while they arrive, so the tag is ready a
  little after the last message word. The 136-byte block is not a whole number
  of 16-byte words. A word that crosses the block boundary leaves its upper
  8 bytes in an overflow register for the next block.
* **Padding.** The 0x06 byte (the two SHA-3 domain bits 01 plus the first pad
  bit) goes right after the message. 0x80 is XORed into byte 135 of the final
  block. The padding may spill into an extra block.
* **Permutation.** Keccak-p[1600] does one round per clock, 24 clocks per
  block: theta, rho, pi, chi and iota in one combinational step.
* **Round constants.** The 24 round constants are read from a ROM indexed by
  the round counter. The ROM is filled at elaboration from the Keccak LFSR
  x^8+x^6+x^5+x^4+1. The rho offsets are generated the same way.
* **Back-pressure.** While the unit permutes, `in_ready` is low and the
  controller holds off `rd_req` in the SHA modes. CBC+SHA therefore runs a
  little slower than CBC+CMAC: 897 cycles for 1024 bytes, 913 Mbit/s at
  100 MHz.

## Where this design fills gaps or departs from the original description

The published description gives the architecture, the nine-mode count, the
exponentiation algorithm with two carry-save Montgomery multipliers, the
pipelined AES, Keccak with 24 rounds and stored round constants, and the
CMAC/CBC structure. The following are this design's choices:

* **AES and keys.**
  * AES-128.
  * The AES key is the low 128 bits of the shared secret, and CMAC uses the same
    key as CBC.
  * No key-derivation function.
* **SHA-3 output length.** SHA3-256.
* **Host side.**
  * The command encoding and the three exponentiation operations.
  * A separate modulus slot, loaded together with the public exponent.
  * The length header and the host-supplied IV.
  * Zero-filling of a short last block. This is not TLS record padding.
  * The status outputs.
* **R^2 mod N.** It is computed inside the exponentiation unit by doubling.
* **Radix-2 multipliers.** With one bit per clock, a 2048-bit exponent takes
  42 ms, and a handshake of two 256-bit DHE steps, RSA encryption and the RSA
  check takes 53 ms (18.7 handshakes/s at 100 MHz). The original work reports
  a DHE + RSA handshake in 19 ms (52.4 handshakes/s), so its multipliers must
  handle more bits per step. The
  radix is the first thing to raise if handshake rate matters.
* **Throughput.** The original reports 850 Mbit/s for CBC+CMAC in its
  throughput plot and 700 Mbit/s in its summary. This design measures
  969 Mbit/s for long records.
  * The original's CBC+SHA throughput rises with record length (550 to
    790 Mbit/s) because its hash waits for the whole record.
  * Here SHA-3 absorbs while the record streams in, so CBC+SHA stays close to
    CBC+CMAC.
* **The multiplexer in front of the AES unit** in the block diagram is part of
  the controller here.
* **No FPGA-specific parts.** Everything is generic synthesizable RTL.

## Files

| file | contents |
|------|----------|
| `rtl/tls_accel.sv`     | top level |
| `rtl/tls_ctrl.sv`      | controller: modes, host protocol, CBC/CMAC/SHA sequencing |
| `rtl/tls_pkg.sv`       | mode, operation and slot encodings |
| `rtl/key_mem.sv`       | key and operand store |
| `rtl/modexp.sv`        | exponentiation with two multipliers |
| `rtl/mont_mul.sv`      | carry-save radix-2 Montgomery multiplier |
| `rtl/aes_pkg.sv`       | AES round functions, S-box generated at elaboration |
| `rtl/aes_key_expand.sv`| AES-128 key schedule |
| `rtl/aes_enc_pipe.sv`  | 11-stage cipher pipeline with tags |
| `rtl/aes_dec_pipe.sv`  | 11-stage inverse cipher pipeline |
| `rtl/cmac_subkey.sv`   | K1/K2 from L |
| `rtl/sha3_256.sv`      | SHA3-256 sponge and Keccak-p round |
| `tb/tb_*.sv`           | one self-checking testbench per module, plus `tb_tls_accel_full` |

`W`, the width of the big numbers, is the only size parameter. Its default is
2048 and it must be a multiple of 128. All testbenches except
`tb_tls_accel_full` use W = 256 or 512 to run fast.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/aes_pkg.sv rtl/tls_pkg.sv \
    tb/tb_tls_accel.sv --top-module tb_tls_accel
./obj_dir/Vtb_tls_accel
```

Replace `tb_tls_accel` with any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M`.

* `tb_tls_accel` is the end-to-end test at W = 256. It runs the DHE exchange,
  RSA encryption, the RSA check (pass and fail), and CBC+CMAC and CBC+SHA
  records of 16, 40, 64, 200 and 1024 bytes, encrypting and decrypting. A
  tampered ciphertext must make the MAC check fail. The test counts the
  mechanisms above: both subkeys, pipeline interleaving, multi-block SHA-3,
  stalls while SHA-3 permutes, and the secret write-back. It fails if any of
  them never happened.
* `tb_tls_throughput` sweeps record lengths from 384 to 1536 bits in both
  MAC modes. It checks each round trip and prints the throughput measured from
  the command to `done`, set-up included. At 100 MHz:

  | bits | CBC+CMAC (Mbit/s) | CBC+SHA (Mbit/s) |
  |------|-------------------|------------------|
  | 384  | 480               | 426              |
  | 768  | 645               | 609              |
  | 1024 | 706               | 682              |
  | 1152 | 729               | 619              |
  | 1536 | 779               | 727              |

  CBC+SHA dips at 1152 bits. Above 1080 bits the padded record needs a second
  SHA-3 block.
* `tb_tls_accel_full` runs the default 2048-bit configuration: both DHE steps
  with 256-bit exponents, RSA encryption and the RSA check with a 2048-bit key
  pair, then one CMAC-protected record under the negotiated key. The whole
  handshake takes 5.32 M cycles, or 18.7 handshakes/s at 100 MHz. It takes about 20 s
  of simulation.

## How far it has been checked

Every module has a self-checking testbench. The expected values come from
outside the RTL:

* published test vectors: FIPS-197 AES, SP 800-38A CBC and SP 800-38B CMAC
  subkeys and tags;
* SHA3-256 digests computed with an independent implementation;
* an RSA key pair generated beforehand;
* a square-and-multiply reference written with the simulator's wide
  arithmetic.

Latencies are checked too:

* AES pipeline: 11 cycles;
* key schedule: 10 cycles;
* SHA-3 block: 24 cycles;
* Montgomery product: W + 3 cycles;
* exponentiation: the formula above.

Concurrent assertions in the RTL catch protocol misuse during simulation:

* a Montgomery product or an exponentiation started while one is running;
* an even modulus;
* a last SHA-3 word carrying 0 or more than 16 bytes;
* a record header with length 0;
* a word pushed into the SHA-3 unit while it is not ready.

The design has not been synthesized for a specific FPGA or timing-closed. The
wide adders and comparators in `mont_mul` (the final addition) and in
`modexp` (the doubling precomputation) are single-cycle 2050-bit operations.
They would set the clock rate in a real implementation.
