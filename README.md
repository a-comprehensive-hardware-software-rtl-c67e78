# Remotely activable IP core: device-side RTL

An IP core sold for FPGAs can be copied and instantiated as often as a buyer likes, and the
designer cannot tell. This design makes every instance of a core useless until the designer's
activation server unlocks that particular instance. The core carries extra *activation
inputs* (logic-masking and logic-locking gates) that only give correct results when driven by
the right *activation word* (AW). The AW never crosses the link in clear. The server encrypts
it with a key that only this chip holds: the response `r` of an on-chip Physical Unclonable
Function (PUF). The chip then decrypts it internally. Each activation needs the server, so the
designer can count and license every instance (metering). An AW captured from one chip is
useless on another.

The PUF response is noisy: every measurement differs from the enrolment reference `r0` in a
few bits. The server repairs this with the CASCADE key-reconciliation protocol. It asks the
chip only for parities of chosen bit subsets of `r`, and corrects its own copy of `r0` until
it equals `r`. The chip's part is therefore tiny: two multiplexers and a single parity flip-flop.

## Block map

```
                      +----------------------------- ipp_top -------------------------------+
 server link  cmd --> |  ip_protection_module                                               |
 (ports)      rsp <-- |   ipp_controller --sel--> index_mux --index--> response_mux --bit-->  |
                      |        |                  (128 x 7b frame)     (128:1)     cascade_  |
                      |        |                                                  parity    |
                      |        +--aw_load--> aw_storage <-- otp_decrypt <-- cmd_data          |
                      |                          |            ^ key = r                     |
 fuse_blown --------> |                          |            |                             |
                      |  tero_puf_model --bits--> response_shift_register --r (128 b)--------+|
                      |                          | AW[63:0]              AW[127:64]          |
                      |                     masked_adder              locked_adder           |
                      +---------------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `ipp_pkg` | widths (128-bit response and AW, 7-bit index), command and reply enums, example AW |
| `tero_puf_model` | behavioural PUF: device-unique reference bits plus measurement noise, one bit per `CYCLES_PER_BIT` clocks |
| `response_shift_register` | collects the serial PUF bits into `r` |
| `ipp_controller` | FSM executing one server command at a time |
| `index_mux` | picks index number `sel` of a parity-request frame (128 x 7 bit) |
| `response_mux` | picks response bit `r[index]` |
| `cascade_parity` | XOR-accumulates those bits: the device's whole share of CASCADE |
| `otp_decrypt` | one-time pad: `AW = [AW]_r ^ r` |
| `aw_storage` | 128-bit AW register, cleared by reset (cores locked) |
| `masked_adder`, `locked_adder` | example protected cores |
| `ipp_top` | everything above; the link fields, the fuse and the core operands are ports |

## The activation sequence

1. **Enrolment** (at the designer's site). `GENERATE` measures the PUF. `READ_RESPONSE`
   returns `r0`, which the server stores. The fuse is then blown (`fuse_blown = 1`), and
   from then on `READ_RESPONSE` is answered `DENIED` with `rsp_data = 0`.
2. **Re-measurement** (in the field). `GENERATE` again. The new `r` differs from `r0` in a
   few noisy bits. Until the first `GENERATE` completes, `READ_RESPONSE`, `PARITY` and
   `LOAD_AW` are all answered `DENIED`.
3. **Reconciliation.** The server shuffles the 128 bit positions and cuts them into
   blocks. For each block it sends one `PARITY` frame: the block's indexes in
   `cmd_indexes[0..len-1]` and the block size in `cmd_len`. Where the chip's parity differs
   from the parity of its own copy, the server bisects the block with further `PARITY`
   requests until one bit is left, and flips that bit in its copy. Later passes use larger
   blocks and new shuffles. After each correction, blocks from earlier passes are checked
   again. The chip never changes `r`. All of this logic is on the server; the chip only
   answers parities.
4. **Activation.** The server sends `LOAD_AW` with `cmd_data = AW ^ r`. The chip stores
   `cmd_data ^ r`. If the server's copy still differs from `r`, the stored word is wrong in
   those bit positions and the cores stay broken.

A parity reply gives away one bit of information about `r`. This leakage is the reason a
designer might add a hash after reconciliation; this RTL does not.

## Link interface and timing (`ipp_top`, `ip_protection_module`, `ipp_controller`)

| Signal | Dir | Meaning |
|---|---|---|
| `cmd_valid` / `cmd_ready` | in / out | A command is accepted on a clock edge where both are high. `cmd_ready` is high only when the controller is idle. |
| `cmd_op` | in | `CMD_GENERATE`, `CMD_READ_RESPONSE`, `CMD_PARITY`, `CMD_LOAD_AW` |
| `cmd_len` | in | `PARITY`: number of indexes in the frame, 0..128 |
| `cmd_indexes[128][7]` | in | `PARITY`: the index frame. It must stay stable until the reply; an assertion checks this. |
| `cmd_data[128]` | in | `LOAD_AW`: the encrypted AW |
| `rsp_valid` | out | One-cycle pulse, exactly one per command |
| `rsp_kind` | out | `RSP_ACK`, `RSP_RESPONSE`, `RSP_PARITY`, `RSP_DENIED` |
| `rsp_parity`, `rsp_data` | out | The parity, or the raw response. `rsp_data` is zero in every other reply. |
| `resp_loaded` | out | The response register holds a complete measurement. |

Latency is counted in clock edges, from the accepting edge to the first edge that sees
`rsp_valid`:

| Command | Latency |
|---|---|
| `READ_RESPONSE`, `LOAD_AW` | 1 |
| `PARITY` with `L` indexes | `L + 1`, one index per clock (1 for `L = 0`) |
| `GENERATE` | 1 after the PUF's last bit. With the model this is `128 * CYCLES_PER_BIT` clocks plus a few. |

The link itself is not part of this RTL. A UART, SPI or bus wrapper would have to hold a
whole 128-index frame in registers (896 bits) and present it on these ports. Sending whole
frames at once costs registers but saves round trips during reconciliation.

## The protected example cores

The core that a real product protects is the customer's netlist. A software tool inserts the
key gates into it and emits the matching AW. Here, two 32-bit ripple-carry adders stand in
for that core. Each has one key gate after every sum bit and every carry, which makes 64 key
inputs per adder:

- **`masked_adder`** (logic masking). Each gate is an XOR where the correct key bit is 0 and
  an XNOR where it is 1. A wrong bit inverts the net, so the error spreads through the
  carry chain.
- **`locked_adder`** (logic locking). Each gate is an AND where the correct key bit is 1
  and an OR where it is 0. A wrong bit forces the net to a constant.

The parameter `AW_REF` of each adder is its correct key, and it fixes the gate types at
elaboration. `ipp_top` builds both adders from its `ACTIVATION_WORD` parameter: bits [63:0]
go to the masked adder and bits [127:64] to the locked adder. The default is
`ipp_pkg::DEFAULT_AW`. After reset the AW register holds zero, and the testbenches show that
this corrupts more than 90 % of sums.

## The PUF model

`tero_puf_model` is a stand-in for a Transient-Effect Ring Oscillator PUF. The real part
depends on placed oscillator pairs and on process variation, so it cannot be written as
portable RTL. It is also by far the largest part of a real implementation. The model works
as follows:

- Reference bit `i` is bit 31 of a 32-bit multiply-xorshift hash of `DEVICE_ID ^ (i * 0x9E3779B9)`.
- Each measured bit is flipped when a free-running xorshift32 generator's low 16 bits are
  below `NOISE_THRESHOLD`. With the default of 2000/65536 this flips about 3 % of bits.
- Because the generator runs all the time, two measurements taken at different times get
  different noise.

To use a real PUF, replace this module with one that has the same ports: `start`, `busy`,
`bit_valid`, `bit_out` and `done`.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| response / AW width `RESP_BITS` | 128 | package and every datapath module |
| indexes per frame `N_IDX` | 128 (7-bit indexes) | `ip_protection_module`, `ipp_controller`, `index_mux` |
| `ADDER_WIDTH` | 32 (2 x 64 key bits = whole AW) | `ipp_top` |
| `DEVICE_ID`, `NOISE_THRESHOLD`, `CYCLES_PER_BIT` | `32'h5EED_0001`, 2000, 8 | `ipp_top`, `tero_puf_model` |

The 128-bit sizes match a published FPGA proof of concept of this scheme. In that
implementation, the logic between the PUF and the core took a few hundred LUTs and about 360
flip-flops. Yosys coarse synthesis of `ip_protection_module` gives 151 flip-flop bits: 128
for the AW, 1 for the parity and 22 for the controller.

## Simulation

Every module has a self-checking testbench `tb/<module>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. `tb/ipp_top_tb.sv` runs a full
enrolment and activation at the default sizes. It plays the server, including a six-pass
CASCADE (block sizes 8, 16, 16, 32, 32 and 64). It checks that:

- the readout is refused after the fuse is blown;
- the cores are wrong before activation;
- an AW encrypted with the uncorrected `r0` does not unlock them;
- the server's corrected copy equals `r`;
- both cores add correctly after activation.

It also counts every mechanism and fails if one never happens. The default run makes 218
parity requests to correct 4 flipped bits. The same server was also run against 24 other
device identities and noise rates of 3 % and 6 %; it corrected between 4 and 19 flipped bits
and matched `r` exactly in every one of them. `tb/ipp_clone_tb.sv` shows the anti-copy
property: the encrypted AW that unlocks one device does not unlock a second device with
another PUF.

```
verilator --binary --timing --assert -Irtl rtl/ipp_pkg.sv tb/ipp_top_tb.sv \
          --top-module ipp_top_tb -Mdir obj_top
./obj_top/Vipp_top_tb
```

Use the same command with another testbench, or add `-y rtl` instead of listing files.
Verilator simulates with two states, so every register has a reset.

## How far to trust it, and what is not here

- **Built to the scheme as published:** the block structure (PUF, response register, parity
  engine with an index multiplexer and a response-bit multiplexer, one-time pad, AW register,
  controller), the 128-bit sizes, the device-only-answers-parities role in CASCADE, the
  fuse-gated enrolment readout, and the gate types of masking (XOR/XNOR) and locking (AND/OR).
- **This design's own choices:** the command set, the encodings, the handshake, all
  latencies and reset values, the bit order of the shift register, the example cores and
  where their key gates sit, and everything about the PUF model.
- **Not included:** the communication link, the physical fuse, the server software and the
  netlist-modification tools. The optional parts of the scheme are also left out: a PRESENT
  block cipher in place of the one-time pad, a SPONGENT hash to derive the key from `r`, and
  a side-channel watermark.
- **Security note:** a one-time pad keyed by the same `r` must not be reused for two
  different AWs on one device. With one AW per device it is sound, provided `r` stays secret.
