# OCP on-chip bus with four masters and four slaves, plus a SEA block cipher core

This RTL contains two pieces of hardware for a small system-on-chip:

1. **An OCP-style on-chip bus** that connects four bus masters to four slave
   memories. Masters ask an arbiter for the bus, and a decoder steers each
   request to the slave that owns its address. Five multiplexers carry address,
   burst length, write data, read data and responses. The fabric is either a
   shared bus (the default) or a crossbar with one arbiter per slave. The bus
   supports write bursts, read bursts in two request styles, pipelined read
   requests and a lock mechanism. The lock lets a low-priority master finish
   a sequence of transactions without being pre-empted. The bus also answers
   accesses to nonexistent addresses with an error response.
2. **A SEA(n,b) block cipher core** (Scalable Encryption Algorithm) in a loop
   architecture. One Feistel round and one key-schedule step are evaluated per
   clock. The same hardware encrypts and decrypts. The default is SEA48,8: a
   48-bit block and key, processed as 8-bit words.

The two subsystems are not connected to each other. `soc_top` instantiates both
side by side, and each has its own ports.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) with parameters. The
only memory is one register array per slave.

---

## 1. The OCP bus system

### 1.1 Block map

```
 system ports            ocp_bus                                   slaves
 ─────────────   ┌─────────────────────────────────────────┐
 MASTER_1 ──────▶│ ocp_arbiter  MREQ1..4 → MGRANTX1..4     │
 (ocp_master)    │                                          │     ┌────────────┐   ┌────────────┐
 MASTER_2 ──────▶│ ADDRESS_MUX ─┐ (sel = grant)             │────▶│ SLAVE_1    │◀─▶│ ocp_memory │
 MASTER_3 ──────▶│ BURST_MUX   ─┤                           │     │ (ocp_slave)│   │ 1024 x 8   │
 MASTER_4 ──────▶│ WR_DATA_MUX ─┘──▶ ocp_decoder → SSEL1..4 │────▶│ SLAVE_2..4 │◀─▶│ ...        │
                 │ RD_DATA_MUX ◀┐ (sel = SSEL)              │◀────│            │   └────────────┘
                 │ RESP_MUX    ◀┘ + error responder         │     └────────────┘
                 └─────────────────────────────────────────┘
```

This is the default fabric, a **shared bus**: at any time one master owns it,
and only that master's transaction is in flight. Section 1.6 describes the crossbar
alternative. All five multiplexers are instances of `ocp_mux`, a one-hot
AND-OR multiplexer.

- The three master-to-slave multiplexers are selected by the arbiter's grant.
  The command (MCmd) travels with the address through ADDRESS_MUX.
- The two slave-to-master multiplexers are selected by the decoder's SSEL.
  SCmdAccept travels with SResp through RESP_MUX.
- Slave responses go only to the master that holds the grant. The other
  masters see SResp = NULL and zero data.
- Only the selected slave sees the command. The other slaves see MCmd = IDLE.

### 1.2 Widths, encodings and address map

| item | value | note |
|---|---|---|
| address | 13 bits | |
| data | 8 bits | |
| command (MCmd) | 3 bits: `000` idle, `001` write, `010` read | OCP encoding; other codes are refused |
| response (SResp) | 2 bits: `00` NULL, `01` DVA, `10` FAIL, `11` ERR | OCP encoding |
| burst length | 3 bits, beats − 1 (1..8 beats) | incrementing addresses, wrapping inside the slave |
| memory per slave | 1024 × 8 bit = 8 kbit | |
| slave select | `addr[11:10]` → SLAVE_1..4 | |
| offset in slave | `addr[9:0]` | wraps inside the slave |
| nonexistent | `addr[12] = 1` (4096..8191) | answered with ERR |

The widths and the 8 kbit slave memory come from the source design. The
address map, the burst-length field and the command and response codes are
this implementation's choices. The codes follow the OCP standard.

### 1.3 Arbitration and lock (`ocp_arbiter`)

The arbiter uses fixed priority: MASTER_1 is highest and MASTER_4 lowest. The
grant is a registered one-hot vector, so it appears one cycle after the request.

**A master keeps the grant for as long as it holds its request high.** Two
behaviours follow from this single rule:

- A transaction in progress, including all of its burst beats, is never
  interrupted. A master holds MREQ from its request until its last response.
- Lock works through the same rule. If the system holds `m_lock` high when a
  transaction ends, the master keeps MREQ high after the transaction, so no
  other master is granted. The master can then start its next transaction
  without arbitrating again. Dropping `m_lock` releases the bus. Without lock,
  MREQ falls for at least one cycle after each transaction, and the
  highest-priority waiting master takes over.

### 1.4 Transactions (`ocp_master`, `ocp_slave`)

Master state machine: `IDLE → REQ → CMD → RESP → DONE → IDLE`.

- **REQ:** MREQ is high. The master waits for MGRANTX.
- **CMD:** the master drives MCmd, MAddr, MData and MBurstLength until it sees
  SCmdAccept.
- **RESP:** the master collects responses. It keeps MAddr inside the same
  slave so that the decoder keeps routing the slave's responses back. During
  a pipelined multi-request read it also issues the remaining requests here.
- **DONE:** one cycle; `m_ack` is high.

There are two burst styles. A single-request burst issues the address once; a
multi-request burst issues one request, with its own address, per beat.

- **Reads use either style, chosen per master** by the `ocp_master` parameter
  `READ_MULTI_REQ`. `soc_top` sets it per master through its own
  `READ_MULTI_REQ` vector. The default `4'b1100` gives MASTER_1 and MASTER_2
  single-request reads and MASTER_3 and MASTER_4 multi-request reads. Masters
  with either style share the same bus and slaves.
  - *Single-request read:* the master issues the address once, with
    MBurstLength = size. The slave accepts and then returns size+1 DVA beats
    on consecutive cycles, the first beat one cycle after acceptance.
  - *Multi-request read:* the master issues size+1 single-beat reads
    (MBurstLength = 0) at addresses base + k. These requests are
    **pipelined**: the master issues the next request as soon as the previous
    one is accepted, without waiting for its data. It counts the requests
    still unanswered, and the transaction ends when all of them have been
    answered. An error response stops further requests.
  - Either way, each beat appears on `m_data_out` with `m_data_out_valid`, one
    cycle after it was on the bus.
- **Writes are multi-request bursts, not pipelined.** Every beat is a
  separate request that carries its own address (base + k) and the current
  `m_data_in`. The slave
  writes its memory when it accepts the beat and acknowledges it with one DVA
  one cycle later. The master sends the next beat only after that
  acknowledge. `m_wr_take` pulses when a beat has been accepted, and the
  system then presents the next data byte.

On an idle bus, a single read or write takes 5 cycles from `m_enable` to
`m_ack`: request, grant, command, response, done. A read burst of k beats
takes k−1 more cycles in either style, because the pipelined requests keep
the slave streaming one beat per cycle. A write burst takes 2 more cycles per
extra beat.

The beat addresses base + k wrap inside the addressed slave, so every beat of
a burst goes to the same slave. This keeps the decoder's selection stable
while pipelined requests and their responses overlap.

```
cycle        1      2      3      4      5      6
m_enable     ‾‾‾‾‾‾\______________________________
state        IDLE   REQ    REQ    CMD    RESP   DONE
MREQ         ______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______
MGRANTX      _____________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_
SCmdAccept   ____________________/‾‾‾‾‾\__________
SResp        __________________________DVA________
m_ack        _________________________________/‾‾‾
```

A response of ERR or FAIL ends the transaction at once, with `m_err` set until
the next transaction starts. A `m_control` value other than read or write is
refused without a bus request: the master answers with `m_ack` and `m_err`.

The slave (`ocp_slave`) accepts a request in the cycle it sees it while it is
idle. It also accepts one in the cycle its last response of a transaction is
on the bus, which is what makes pipelined requests possible. It does not
accept a new request during the earlier beats of a read burst. It
answers any command other than read or write with ERR. Its memory
(`ocp_memory`) writes synchronously and has a registered read (one-cycle
latency). The memory contents are not reset.

### 1.5 Nonexistent addresses (`ocp_decoder`, `ocp_bus`)

When the granted master's address lies above the last slave, the decoder
raises `err` and no SSEL. The bus then accepts the command itself and, one
cycle later, returns SResp = ERR to the master. `dec_err` on the top shows when
this happens.

Besides `dec_err`, the top brings out three other observation outputs:
`mgrant` (the MGRANTX lines), `ssel` (the SSEL lines) and `m_accept`
(SCmdAccept as each master sees it). The end-to-end testbench uses them to
count contention, lock holds and pipelined requests.

### 1.6 Crossbar fabric (`ocp_xbar`, `CROSSBAR = 1`)

`soc_top` has a parameter `CROSSBAR`. When it is 1, `ocp_xbar` replaces
`ocp_bus`. The ports are the same, so masters and slaves do not change.

- Every master has its own decoder.
- **Every slave has its own arbiter**, which sees only the requests of masters
  whose address decodes to that slave. Each slave also has its own address,
  burst and write-data multiplexers, selected by that arbiter's grant.
- Every master has its own read-data and response multiplexers. They are
  selected by the slaves that currently grant that master.
- Every master has its own error responder for nonexistent addresses.

Masters that address different slaves are therefore served at the same time.
Masters that address the same slave are arbitrated by that slave's arbiter in
the same fixed-priority order, with the same grant hold and lock behaviour.
`mgrant[m]` is high while master m owns a slave or its error responder, and
`ssel[s]` is high while slave s is granted to some master. `tb_soc_xbar` runs
the `tb_soc_top` scenario on the crossbar. In that run, two or more masters are
served at once in 215 cycles. In 212 cycles a busy master waits while
another master is granted, against 555 such cycles on the shared bus.

The parameter `XBAR_PATHS` (`PATHS` in `ocp_xbar`) makes the crossbar
partial. Bit [m][s] wires master m to slave s. The default sets every bit,
which gives a full crossbar. For a path that is left out, the per-slave
multiplexer input is never selected, so synthesis removes it. An access along
that path is answered like a nonexistent address, with ERR.

---

## 2. The SEA cipher core

### 2.1 The algorithm

SEA(n,b) is a Feistel cipher built for small processors. It has three
parameters:

- n: the block and key size.
- b: the word size.
- nr: the number of rounds.

Each n/2-bit branch holds nb = n/(2b) words, and n must be a multiple of 6b.
Word 0 is the least significant b bits of a branch. The cipher uses only these
operations:

| operation | definition |
|---|---|
| ⊞ | word-wise addition mod 2^b (nb independent b-bit adders, no carries between words) |
| S | 3-bit S-box `[0,5,6,7,4,3,1,2]`, applied bit-sliced: bit j of words 3i, 3i+1, 3i+2 forms one 3-bit value, word 3i being its LSB |
| r | bit rotation: word 3i rotated right by 1, word 3i+1 unchanged, word 3i+2 rotated left by 1 |
| R | word rotation: y(i+1) = x(i), y(0) = x(nb−1); R⁻¹ is its inverse |

`sea_fn` computes the shared nonlinear part, r(S(x ⊞ y)). The rotations are
plain wiring.

Round function (`sea_round`), with L and R the two branches and K the round
key:

```
F = r(S(R ⊞ K))
encrypt:  L' = R,  R' = R(L) xor F
decrypt:  L' = R,  R' = R⁻¹(L xor F)
```

Key-schedule step (`sea_key_round`), with KL and KR the two key halves and
C(i) the vector whose least significant word is i (all other words zero):

```
G   = R(r(S(KR ⊞ C(i))))
new = KL xor G
Switch = 0:  KL' = KR,  KR' = new      (normal Feistel step)
Switch = 1:  KL' = new, KR' = KR       (no exchange: "switch" at half execution)
```

### 2.2 Why one key schedule serves both directions

This is the subtle part of the design. The key schedule has no encrypt or
decrypt input. A decryption must still use the encryption's round keys in
reverse order, starting from the same key. The key schedule achieves this by
retracing itself.

A normal step applied to the exchanged halves of its own output, with the same
constant, returns the exchanged halves of its input:

    step(swap(step(K, c)), c) = swap(K)

`tb_sea_key_round` checks this identity. The control unit uses it as follows,
with h = ⌊nr/2⌋:

- **Rounds 1..h:** normal steps with constants 1, 2, …, h. The round function
  takes KR.
- **Round h:** Switch is set, so the halves are left unexchanged. That is a
  normal step followed by a swap.
- **Rounds h+1..nr:** normal steps with constants nr−i, which run h, h−1, …,
  0. The key state walks back along the same path, mirrored. From round h+1
  on, **Half Exec** makes the round function take KL instead of KR.

The resulting sequence of round keys is a palindrome **when nr is odd**. That
is why the same key, fed through the same schedule, decrypts. With an even nr
the sequence is off by one round, and decryption with this hardware fails.
The default is therefore nr = 51. The usual SEA48,8 recommendation,
3n/4 + 2(nb + ⌊b/2⌋), gives 50, and this design rounds it up to 51.

### 2.3 Loop architecture and timing (`sea_core`, `sea_ctrl`)

```
 data_in[N-1:N/2] ─▶ mux ─┐                         ┌─ mux ◀─ key_in[N-1:N/2]
 data_in[N/2-1:0] ─▶ mux ─┤  (NotState0)            ├─ mux ◀─ key_in[N/2-1:0]
                          ▼                          ▼
                     sea_round ◀── Half Exec mux ── sea_key_round ◀── Const_i, Switch
                          │        (KR / KL)         │
                      L, R regs                  KL, KR regs
                          └──── fed back ────────────┘
```

- **Round 1** is computed in the cycle `start` is high. NotState0 = 0 makes the
  input multiplexers take `data_in` and `key_in` directly.
- **Rounds 2..NR** run from the registers, one per clock.
- **`done`** pulses in the cycle after round NR, so **a block takes exactly NR
  cycles from `start` to `done`**: 51 cycles by default.
- **`data_out`** is {R, L}, which is the final exchange of the halves. It stays
  valid until the next `start`.
- `busy` is high while rounds run. A `start` while busy is ignored.
- `encrypt` is sampled with `start`.

The upper half of `data_in` and `key_in` is the left branch.

`sea_ctrl` produces NotState0, Half Exec, Switch and Const_i from a round
counter. For round i:

- Const_i = i for i ≤ h, and nr − i after that.
- Switch is set only in round h.
- Half Exec is set for i > h.

Const_i is b bits wide. For small b it wraps modulo 2^b.

`sea_fn` stops elaboration with an error unless n is a multiple of 6b and
b ≥ 2.

### 2.4 Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 48 | block and key size n |
| `B` | 8 | word size b |
| `NR` | 51 | rounds, must be odd (see 2.2) |

Other sizes are possible through these parameters. For example,
`tb_sea_18bit` runs an 18-bit cipher with N=18, B=3 and NR=21.

---

## 3. Files

| file | contents |
|---|---|
| `rtl/soc_top.sv` | top: OCP system and SEA core side by side; `CROSSBAR` selects the fabric, `XBAR_PATHS` the crossbar's paths, `READ_MULTI_REQ` the read burst style per master |
| `rtl/ocp_pkg.sv` | OCP widths, command and response enums |
| `rtl/ocp_master.sv` | master FSM (system interface → OCP requests) |
| `rtl/ocp_bus.sv` | shared bus: arbiter, decoder, 5 multiplexers, error responder |
| `rtl/ocp_xbar.sv` | crossbar: decoder per master, arbiter and multiplexers per slave, error responder per master |
| `rtl/ocp_arbiter.sv` | fixed-priority arbiter with grant hold |
| `rtl/ocp_decoder.sv` | address decoder with nonexistent-address flag |
| `rtl/ocp_mux.sv` | one-hot multiplexer |
| `rtl/ocp_slave.sv` | slave FSM (OCP requests → memory) |
| `rtl/ocp_memory.sv` | 1024 × 8 memory, registered read |
| `rtl/sea_pkg.sv` | the 3-bit S-box |
| `rtl/sea_fn.sv` | r(S(x ⊞ y)) |
| `rtl/sea_round.sv` | Feistel round, encrypt and decrypt |
| `rtl/sea_key_round.sv` | key-schedule step with Switch |
| `rtl/sea_ctrl.sv` | round counter and control signals |
| `rtl/sea_core.sv` | the loop-architecture cipher |

Every testbench in `tb/` is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_soc_top` | whole design at default parameters: 4 masters running write/read-back bursts into all slaves at once, a locked pair, a nonexistent access, SEA encrypt and decrypt; counts contention, lock holds, bursts (reads of both request styles), pipelined requests, errors and cipher operations, and fails if one never happened |
| `tb_soc_xbar` | the `tb_soc_top` scenario with `CROSSBAR = 1`; also counts cycles in which two or more masters are served at once |
| `tb_soc_env` | layered, class-based environment on the whole OCP system: a test case, an input driver and input and output monitors per master, and a response checker with a reference memory; 160 random transactions including nonexistent addresses |
| `tb_soc_write_read` | master 2 writes `00000101` to address 4 and reads it back, with cycle counts |
| `tb_ocp_bus` | 4000 random cycles of the shared bus against a model (grant, routing both ways, error response) |
| `tb_ocp_xbar` | 5000 random cycles of the crossbar against a model with one arbiter per slave (grants, routing, parallel service, error responses) |
| `tb_ocp_xbar_partial` | the same on a partial crossbar with four paths left out; accesses along a missing path must get ERR |
| `tb_ocp_master` | master FSM against a random-delay bus model: bursts 1..8 with single-request reads, ERR, lock, refused command |
| `tb_ocp_master_mrr` | the same with multi-request reads: one single-beat request per beat at incrementing addresses, pipelined ahead of the data |
| `tb_ocp_slave` | write acknowledge and read-burst timing, data, no accept during a burst, pipelined accept with the last response, ERR |
| `tb_ocp_arbiter`, `tb_ocp_decoder`, `tb_ocp_mux`, `tb_ocp_memory` | unit checks, exhaustive or random against models |
| `tb_sea_round`, `tb_sea_key_round` | reference vectors from an independent software model, plus random checks against bit-level references |
| `tb_sea_ctrl` | control signals round by round, NR-cycle latency |
| `tb_sea_core` | 8 encrypt/decrypt reference vectors, 20 random round trips, latency |
| `tb_sea_18bit` | 18-bit configuration (N=18, B=3, NR=21), including plaintext 11 with key 28 |

## 4. Simulating

Verilator 5 is enough. Pass the packages first and let it find the other
modules in `rtl/`:

```sh
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/ocp_pkg.sv rtl/sea_pkg.sv tb/tb_soc_top.sv --top-module tb_soc_top
./obj_dir/Vtb_soc_top
```

Replace `tb_soc_top` with the name of any other testbench. Each testbench runs
in well under a second. The testbenches initialise or reset everything they
read, so they also run under two-state simulation with random initial values.

To lint a module on its own, run for example
`verilator --lint-only -Wall -Irtl -y rtl rtl/ocp_pkg.sv rtl/ocp_bus.sv`.

## 5. What is and is not modelled

The following follow the source design:

- 4 masters and 4 slaves.
- 13-bit address, 8-bit data and 3-bit control.
- An 8 kbit memory per slave.
- An arbiter with a lock mechanism.
- A decoder that reports nonexistent addresses.
- The five named bus multiplexers (shared bus).
- One arbiter per slave (crossbar), full or partial.
- Master and slave state machines.
- Single-request and multi-request bursts, so that masters of both burst types
  can share the bus.
- Pipelined requests: a read request issued before the data of the previous
  one has returned.
- The SEA operations, S-box and word rotation.
- The loop architecture with its NotState0, Encrypt, Half Exec, Switch and
  Const_i controls.

The following are this implementation's own choices:

- The address map and the command and response codes.
- The burst field. Writes always use multi-request bursts, and reads use the
  style set per master.
- The fixed priority order.
- The shared bus as the default fabric.
- All cycle timing.
- The bit order inside S-box groups and the reading of the bit-rotation
  directions.
- nr = 51 and the exact round at which Switch acts.
- The order of the halves in `data_in` and `key_in`.
- Driving both data-path multiplexers from one `encrypt` signal.

Not modelled:

- **Out-of-order transactions, and the response scheduler** that would
  reorder responses. Responses always return in request order. The
  scheduler's behaviour is not specified in the source design.
- **Pipelining across transactions or for writes.** Pipelining happens only
  inside a multi-request read burst. A master starts a new transaction only
  after all responses of the previous one are back.
- **Single-request write bursts.** Writes always use one request per beat.
- **Response back-pressure.** A master always accepts responses. There is no
  MRespAccept.
- **How the cipher attaches to the bus or to a system.** It is not specified,
  so the core has its own ports.
- **The congestion-aware network-on-chip router** that gives the source its
  title. Its flit format, buffering, routing function and priority rule are
  not specified, so it is not part of this RTL.
- **Bit-exact agreement with other SEA implementations.** This depends on the
  bit-order and schedule conventions above. The 18-bit result printed with the
  source design (ciphertext `011101101001010110` for plaintext 11 and key 28)
  is not reproduced by this core. Only encrypt-then-decrypt is checked at that
  size.
