# Grain and Trivium stream-cipher cores

A stream cipher turns a secret key and a public initialization vector (IV)
into a long pseudorandom bit sequence, the keystream. Encryption and
decryption are the same operation: the data is xored with the keystream. The
two cipher families here, Grain (v1, 128 and 128a) and Trivium, were designed
for very small hardware, such as IoT nodes and RFID tags. They are built from
shift registers, a few AND gates and a lot of XOR. Each cipher has two phases:

1. **Key initialization.** The registers are filled from key, IV and
   constants. The cipher is then clocked a fixed number of rounds with no
   output, which scrambles the state. Grain v1 runs 160 rounds, Grain-128/128a
   256 and Trivium 1152. In the Grain ciphers the output bit is fed back into
   both registers during this phase.
2. **Keystream generation.** Every step produces one keystream bit and shifts
   the registers by one position.

This repository gives synthesizable SystemVerilog for all four ciphers. Each
core can produce W keystream bits per clock instead of one. It also has the
optional message authentication (MAC) of Grain-128a, and a top level that
places the four cores side by side.

## The ciphers at a glance

| core | key | IV | state | init rounds | max W | clocks from `load` to `ready` |
|---|---|---|---|---|---|---|
| `grain_v1` | 80 | 64 | LFSR 80 + NLFSR 80 | 160 | 16 | 160/W |
| `grain128` | 128 | 96 | LFSR 128 + NLFSR 128 | 256 | 32 | 256/W |
| `grain128a` | 128 | 96 | LFSR 128 + NLFSR 128, MAC 32 + 32 | 256 | 32 | 256/W + 1, or with MAC 256/W + 1 + 64/W |
| `trivium` | 80 | 80 | three registers 93 + 84 + 111 | 1152 | 64 | 1152/W |

W must be a power of two no larger than "max W". The default W = 1 is the
basic cipher.

### Grain

A Grain cipher has three parts:

- an LFSR `s` with linear feedback f;
- an NLFSR `b` whose feedback g is nonlinear, with the LFSR's oldest bit
  xored into it;
- a boolean filter h, fed from both registers.

The output bit adds h to a fixed set of NLFSR bits. Grain-128 and Grain-128a
also add the LFSR bit s(i+93). In the RTL, `s[n]` holds s(i+n): bit 0 is the
oldest bit, the next to leave. The feedback polynomials of the specification
become tap positions by the rule x^k -> index (length - k). For example,
Grain-128's f(x) = 1 + x^32 + x^47 + x^58 + x^90 + x^121 + x^128 becomes
s(i+128) = s(i) + s(i+7) + s(i+38) + s(i+70) + s(i+81) + s(i+96).

Grain-128a differs from Grain-128 in three places:

- three more product terms in g;
- the last LFSR bit is set to 0 at load instead of 1;
- the authentication scheme, described below.

### Trivium

Trivium's 288-bit state is kept as `s[288:1]`, numbered exactly as the
cipher's definition numbers it:

- register A is `s[1..93]` and receives the new bit t3;
- register B is `s[94..177]` and receives t1;
- register C is `s[178..288]` and receives t2.

Bits move upward, from s(j) to s(j+1), each step. A step computes

    t1 = s66 + s93    t2 = s162 + s177    t3 = s243 + s288    z = t1 + t2 + t3
    t1 += s91 s92 + s171    t2 += s175 s176 + s264    t3 += s286 s287 + s69

At load, the key goes to s1..s80, the IV to s94..s173 and ones to
s286..s288; every other bit is zero. The definition allows at most 2^64
keystream bits per key/IV. The core counts them: when the limit is reached,
`ready` falls and `exhausted` rises until the next `load`.

## Several steps per clock

The central hardware trick is that none of these ciphers reads the newest
part of its registers:

- Grain v1 reads no index above 64 of 80;
- Grain-128 and Grain-128a read none above 96 of 128;
- the first tap of each Trivium register lies 66 or more positions from the
  register's input.

Step i+k therefore depends only on bits that are already in the register at
step i, for every k up to that margin. So each core contains W copies
("lanes") of its feedback and output logic. Lane k evaluates the same
equations with every tap index shifted by k:

- Grain: lane k reads `s[k+62]` where lane 0 reads `s[62]`;
- Trivium: lane k reads `s[66-k]`, because its bits move the other way.

At the clock edge the registers shift by W and take in the W new bits:

- Grain: lane 0's bit at index length-W and lane W-1's at the top.
- Trivium: the newest lane lands at the first position of each register.

During key initialization each lane xors its own output bit into its own
feedback. This works because a lane's new bits are never read by the other
lanes of the same clock. The maximum W of each core is the margin above
rounded down to a power of two, so that the round count divides evenly.

Only the combinational logic grows with W. The state stays 160, 256 or
288 flip-flops. The basic cores (W = 1) give 0.1 Mbit/s at 100 kHz. With W
lanes the rate is W x 0.1 Mbit/s, or half of that for Grain-128a with MAC.
These figures match the throughput column of the usual comparison of these
ciphers (Grain v1 up to 1.6, Grain-128/128a up to 3.2, Trivium up to 6.4
Mbit/s), and `tb_table1_rates` measures every one of those configurations.

## Grain-128a authentication

Grain-128a calls its output the *pre-output* y. Bit 0 of the IV selects the
mode for the whole stream:

- **IV bit 0 = 0, plain mode:** z(i) = y(i). `grain128a` then behaves like
  `grain128`, with W keystream bits per clock.
- **IV bit 0 = 1, authenticated mode:**
  1. The first 64 pre-output bits are not keystream. y0..y31 fill the 32-bit
     accumulator `a`, and y32..y63 fill the 32-bit shift register `r`.
  2. After that the pre-output is consumed in pairs. The even bit
     y(64+2i) is keystream bit z(i). The odd bit y(64+2i+1) is shifted into
     `r`.
  3. For every message bit m(i) = 1 the accumulator adds the current
     contents of r: a^j += m(i) r(i+j).
  4. After the last message bit a padding bit 1 is absorbed, so that m and
     m||0 give different tags. The accumulator is then the tag.

The hardware is split into three modules:

- `grain128a_pre` holds the LFSR and NLFSR, runs the 256 initialization
  rounds and exposes W pre-output bits per `step`.
- `grain128a_auth` holds `a` and `r`. It shifts in the preload (W bits per
  clock, 64/W clocks). In one clock it absorbs W message bits together with
  their W pre-output pairs, and on the last word the padding bit too. The
  padding step only needs the shift register, so the tag is complete in the
  same clock as the last word, with no extra pre-output drawn.
- `grain128a` is the controller. A message word needs 2W pre-output bits, so
  in authenticated mode each word takes two clocks:
  - on the first clock (`in_ready` low) the generator steps and W bits are
    saved;
  - on the second clock (`in_ready` high) the word is accepted and the next W
    bits complete the pairs.

  The throughput is therefore half the plain rate, as the cipher requires.
  One clock after the word marked `in_last`, `tag_valid` rises. The stream
  then stays closed until the next `load`.

The MAC covers the plaintext. A sender presents plaintext and sets
`decrypt = 0`. A receiver presents ciphertext with `decrypt = 1`: the MAC
then absorbs `in_data ^ z`, and the receiver computes the same tag as the
sender. Comparing the two tags is up to the user. `tag` is the last `TAG_W`
accumulator bits (default 32). The accumulator and shift register stay 32
bits for any `TAG_W`.

## Interface and timing

All four cores share this protocol. Grain-128a adds `auth`, `in_last`,
`decrypt`, `tag_valid` and `tag`; Trivium adds `exhausted`.

| signal | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | rising-edge clock; asynchronous active-low reset to the idle state |
| `load`, `key`, `iv` | in | one-clock `load` latches key and IV and starts initialization; allowed at any time, it restarts the core |
| `ready` | out | initialization done, keystream available |
| `in_valid`, `in_data[W-1:0]`, `in_ready` | in/in/out | a W-bit word transfers on a clock where `in_valid` and `in_ready` are both high; `in_data[k]` is the message bit at keystream position i+k |
| `out_valid`, `out_data`, `out_ks` | out | one clock after a transfer: `out_data = in_data ^ z`, `out_ks = z` |

There is no back-pressure on the output. The keystream advances only on
transfers, so idle clocks lose nothing. `in_ready` equals `ready`, except in
Grain-128a's authenticated mode, where it is high on every other clock. Key
and IV bit 0 is the cipher's first bit:

- Grain: k0 / IV0, so `b[i] = key[i]`;
- Trivium: K1 / IV1, so `s[1] = key[0]`.

With that ordering, and keystream bytes read least significant bit first,
the cores reproduce the published all-zero test vectors:

| cipher | keystream for all-zero key and IV |
|---|---|
| Grain v1 | `dee931cf1662a72f77d0…` |
| Grain-128 | `f09b7bf7d7f6b5c2de2ffc73ac21397f…` |
| Trivium | `fbe0bf265859051b517a2e4e239fc97f…` |

Example timing for `grain_v1` at W = 1:

1. `load` is high on clock 0.
2. `ready` is high from clock 160 on.
3. A word presented on clock 160 returns as ciphertext on clock 161.

Grain-128a needs one extra clock after the initialization rounds to act on
the mode, plus 64/W clocks of MAC preload in authenticated mode.

`stream_cipher_top` instantiates the four cores with a common clock and
reset. Their ports are prefixed `v1_`, `g128_`, `g128a_` and `triv_`. Its
parameters `W_V1`, `W_128`, `W_128A`, `W_TRIV`, `TAG_W` and `KS_LOG2` are
passed to the cores. At the defaults the top synthesizes to 1166
flip-flops.

## Files

| file | contents |
|---|---|
| `rtl/cipher_pkg.sv` | phase enums shared by the cores |
| `rtl/grain_v1.sv`, `rtl/grain128.sv`, `rtl/trivium.sv` | complete ciphers |
| `rtl/grain128a_pre.sv`, `rtl/grain128a_auth.sv`, `rtl/grain128a.sv` | Grain-128a generator, MAC datapath, controller |
| `rtl/stream_cipher_top.sv` | the four ciphers side by side |
| `tb/cipher_ref_pkg.sv` | bit-serial reference models (queues and 1-based arrays written straight from the equations) and the index-form MAC |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the ones below |

## Verification

Every testbench compares the hardware with the bit-serial reference models,
and ends with a line `TB_RESULT checks=N failures=M`.

- `tb_grain_v1`, `tb_grain128`, `tb_trivium` each test W = 1 and the maximum
  W. They check:
  - the initialization time;
  - the zero-key test vector;
  - several random keys and IVs, streamed with random idle clocks;
  - for Trivium, the stream limit, on an instance limited to 2^6 bits.
- `tb_grain128a_pre` checks the pre-output stream at W = 1 and W = 32.
- `tb_grain128a_auth` drives the MAC datapath with random data and compares
  each tag with the index-form definition. It uses W = 1 with a 32-bit tag
  and W = 8 with a 16-bit tag.
- `tb_grain128a` runs both modes at W = 1 and W = 8 and checks:
  - the mode flag and the ready latency;
  - that no two transfers fall on consecutive clocks with MAC;
  - keystream, tag, and random `decrypt`.
- `tb_stream_cipher_top` runs all four ciphers at once with
  W = 4/8/2/16 and a 2^10-bit Trivium limit. For each cipher it encrypts,
  reloads and decrypts, and requires that each of these happened at least
  once:
  - initialization and round trip;
  - idle cycles;
  - Grain-128a plain mode and authenticated mode with matching sender and
    receiver tags;
  - the Trivium limit.

  `tb_stream_cipher_top_full` does the same with every parameter at its
  default, except the Trivium limit, which cannot be reached at 2^64.
- `tb_table1_rates` builds all 29 configurations of the comparison. It
  checks their initialization time and keystream, and measures bits per
  clock.

To run one with Verilator, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/cipher_pkg.sv tb/cipher_ref_pkg.sv tb/tb_grain128a.sv \
        --top-module tb_grain128a -o sim
    ./obj_dir/sim

Each testbench finishes in seconds.

## Design choices and limits

- **Added by this design, not by the ciphers:**
  - the valid/ready word interface, the one-clock output register and the
    `ready`/`in_ready` signals;
  - the asynchronous reset;
  - the `exhausted` flag;
  - Grain-128a's `decrypt` input and its extra clock before keystream.
- **Message length.** Grain-128a messages must be a whole number of W-bit
  words.
- **Tag size.** For tags shorter than 32 bits, two rules of the scheme as stated here do
  not agree. The 32-bit accumulator and shift register are filled from 64
  skipped bits, but later shift-register input is indexed by the tag size w.
  This RTL always skips 64 bits and keeps 32-bit registers, which is the
  standard 32-bit case, and outputs the last `TAG_W` accumulator bits.
- **Grain v1 IV.** The IV is 64 bits, loaded into s0..s63; s64..s79 are ones.
- **Not included:**
  - Grain v0, the withdrawn first version;
  - published low-power Trivium variants: registers split into
    rising- and falling-edge halves, or the state divided into 19 x 16-bit
    registers so that few flip-flops are active at a time.

  Only their outline is known here.
- **Not reproduced.** The gate counts and power figures usually quoted for
  these ciphers come from custom standard-cell implementations. This RTL
  makes no claim to match them.
