# ASEP: a multi-session encryption co-processor

ASEP is an encryption co-processor that many applications can share at once.
Each application opens an *encryption session*, which is named by a 4-bit tag.
Each session can use its own algorithm (DES or IDEA), its own key and its own direction (encode or decode).
Up to 16 sessions per algorithm can be open together, and their blocks may arrive interleaved in any order.

The main architectural idea is a split of the work:

- The **algorithm modules** hold only what is specific to one cipher: per-session buffers, table lookups, permutations and the key schedule.
- **Every arithmetic step** (XOR, addition modulo 2^16, multiplication and exponentiation modulo 2^16+1) is sent over an internal bus to a small pool of **shared ALUs**.
- An **ALU controller** sits between the two. It queues requests, hands them to free ALUs and routes the results back.

While one session waits for its ALU result, the module works on another session.
With several sessions in flight this interleaving acts like a pipeline, and it keeps the ALUs busy.

This repository contains synthesizable SystemVerilog for the whole co-processor, and a self-checking testbench for every block.

## Block structure

```
 host ──44b instr──► microcontroller ──ctrl (4b per module)──┐
                    └► input buffer ──36b system I/O bus──────┼─► DES module ──┐   ┌─► XOR ALU
                                                              └─► IDEA module ─┤   ├─► ADD mod 2^16
                                                                    40b ALU bus ├───┤   MUL mod 2^16+1
                                                                 ALU controller ┘   ├─► EXP mod 2^16+1
                                                                                    └─► GCD
 host ◄──36b {tag,data}── output buffer (16 blocks, round robin) ◄── module outputs
```

| Module | Role |
|---|---|
| `asep_top` | Wires everything together. Parameter `NUM_SESS` (default 16). |
| `asep_pkg` | Instruction, op-code, bus word and control types, and the modulo 2^16+1 multiply function. |
| `asep_des_pkg` | Standard DES tables (IP, FP, E, P, PC-1, PC-2, S-boxes) as constants and functions. |
| `asep_microcontroller` | Decodes op-codes. Pulses CLEAR/FLUSH/READ to the addressed module and releases the input buffer. |
| `asep_input_buffer` | Holds {tag, data} of the last instruction. Drives the system I/O bus when released. |
| `asep_des_core`, `asep_idea_core` | Multi-session algorithm modules. |
| `asep_rr_arbiter` | The round robin counter used everywhere a choice between requesters is made. |
| `asep_alu_controller` | One request slot per module. Dispatches by function code, raises the wait wire, returns results. |
| `asep_alu_xor`, `asep_alu_modadd`, `asep_alu_modmul` | One-cycle ALUs. |
| `asep_alu_modexp` | a^b mod 2^16+1 by square and multiply, 16 cycles. |
| `asep_alu_gcd` | Binary GCD of two 16-bit numbers, at most 33 cycles. |
| `asep_output_buffer` | One 64-bit block per tag. Round robin selection of the next finished block. |

## Talking to the co-processor

An instruction is 44 bits:

| Bits | Field |
|---|---|
| [43:12] | data word (32 bits) |
| [11:8] | session tag |
| [7] | encode (0) / decode (1) |
| [6:4] | action: CLEAR = 1, FLUSH = 2, READ = 3 |
| [3:0] | algorithm: DES = 1, IDEA = 2 |

The field positions and widths are those of the original design. The numeric codes are this implementation's own.
Any other algorithm or action code is dropped, and `bad_instr` pulses for one cycle.

A session is used as follows:

1. **Key.** The first READ words of a fresh tag are the key, high word first: two words for DES (56 key bits plus parity), four for IDEA. The encode/decode flag of the first key word fixes the session's direction.
2. **Blocks.** Each following pair of READ words is one 64-bit block, high word first. Processing starts when the second word arrives.
3. **One pending block per session.** The host sends the next block of a tag only after the previous result has come back. This is the convention the whole design rests on: it is why one buffer per session is enough everywhere.
   - A READ that breaks the rule is ignored.
   - It also sets the module's sticky error status bit.
4. **Result.** The result comes back as two 36-bit `{tag, data}` words, high word first, on `out_valid`/`out_ready`.
5. **CLEAR and FLUSH.**
   - CLEAR erases one tag of one module, which then expects a new key.
   - FLUSH erases every session of one module and its error bit.

There is no input ready signal: an instruction is taken in every cycle that `instr_valid` is high.
DES and IDEA keep separate session tables, but the output buffer keeps one block per tag.
So the host must not have the same tag open in both modules at the same time.

## Inside an algorithm module

This is the part that makes the design work, and the part that is least obvious from the port list.

### Session state

Each tag has its own state:

- key buffer
- block halves
- round and step counters
- the last ALU result and a prepared ALU request
- direction flag
- a state code: empty → key words → idle → first data word → {process → request → wait}* → done → idle

The module's 4 status lines are {sticky protocol error, some block waiting to be output, some session processing, some session open}.

### Three round robin counters

Each cycle, three choices are made independently, each by its own round robin counter over the 16 sessions:

- **Processing.** From the sessions that have just received a block or an ALU result, one is picked. It is run through algorithm-specific logic up to its next *stop point*, which is the next operation that needs an ALU. The request is stored, and the session moves to "request".
- **ALU request.** From the sessions with a stored request, one is put on the module's ALU bus. It moves to "wait" once the controller accepts it, which is when the wait wire is low.
- **Output.** From the finished sessions, one is picked. Its two result words are offered to the output buffer.

A result arriving from the controller puts its session back into "process".

With a single session and a free ALU, every stop point costs three cycles: process, request (dispatched to the ALU in the same cycle), result.
With several sessions, these four phases of different sessions overlap.

### DES

The module keeps the key as the 56-bit PC-1 output {C0, D0}. It forms each round's subkey when it is needed, by rotating C0 and D0 by the cumulative shift of that round and applying PC-2; decoding uses the rounds in reverse order. IP, E, the S-boxes, P and FP are done in the module.

Every XOR is sent to the XOR ALU as a 16-bit operation. That gives five stop points per round:

- three for E(R) ⊕ K (48 bits)
- two for L ⊕ f (32 bits)

That is 80 ALU operations per block.

### IDEA

The subkeys are never stored. Encryption subkey *j* is the 16-bit slice *j* mod 8 of the 128-bit key, rotated left by 25·⌊*j*/8⌋ bits.

A round is 14 ALU operations, in this order:

1. 4 for the key mixing (multiply, add, add, multiply)
2. 2 XORs for the MA-box inputs
3. multiply, add, multiply, add for the MA-box
4. 4 XORs for the outputs

The output transformation adds 4 more. An encryption therefore takes 116 ALU operations.

Decoding uses the standard decryption subkeys:

- The additive inverses are formed inside the module.
- Each multiplicative inverse is asked of the exponentiation ALU as Z^(2^16−1) mod 2^16+1, just before the multiplication that uses it.

That adds 18 exponentiations per block: 134 ALU operations in all.
This is how the exponentiation ALU gets used by a symmetric cipher here.

## ALU controller and ALUs

Each algorithm module has its own 40-bit request bus, a request-valid line, a wait wire and a 40-bit result bus.

- **Request word:** {tag 4, function 4, a 16, b 16}. The function code selects the ALU: XOR 0, ADD 1, MUL 2, EXP 3, GCD 4.
- **Result word:** {tag 4, function 4, result 32}.

The controller has **one request slot per module**.

- **Taking a request.** If the ALU a request needs is free, the request goes straight to it in the cycle it arrives. Otherwise it waits in the module's slot, and the module's wait wire stays high until the slot is dispatched. A slot that is being dispatched can take the next request in the same cycle.
- **Dispatch.** Each idle ALU takes the request of one module that wants it, a queued request before a new one. When both modules want the same ALU in the same cycle, a round robin counter decides.
- **Results.** An ALU keeps its result, tagged with the session and the module number, until the controller forwards it. Each module gets at most one result per cycle, and a round robin counter picks among the ALUs.

Timing with a free one-cycle ALU: the request enters the ALU at the clock edge that ends the request cycle, and the result is presented to the module in the next cycle.
The exponentiation ALU takes 16 extra cycles. The GCD ALU takes up to 32 extra.

## Output buffer

There is one 64-bit block per tag.

- **Input side.** When both modules offer a word in the same cycle, a round robin counter picks one. A module's word is taken only if its tag's block is not still waiting to be read.
- **Output side.** A second round robin counter over the 16 full blocks picks which block goes out next. The block leaves as two words; `out_word` stays stable while `out_ready` is low.

## Performance

All figures are measured with one session alone unless noted.

- **DES latency, module alone.** A DES block takes 243 cycles, counted from the cycle of its second data word to its first output word. That is 80 stop points of three cycles plus three.
- **DES latency through the whole co-processor.** 247 cycles from the instruction to the first output word.
- **IDEA latency, module alone.** An IDEA encryption takes 351 cycles (116 stop points of three cycles plus three). An IDEA decryption adds 18 stop points for the inverses, each waiting 16 extra cycles for the exponentiation ALU.

Measured DES throughput, with each session's next block sent as soon as its previous result is back:

| DES sessions | bits / cycle, total | per session |
|---|---|---|
| 1 | 0.253 | 0.253 |
| 2 | 0.503 | 0.251 |
| 3 | 0.749 | 0.250 |

The original design reports 0.7619 bits/cycle for one DES session, which is 114 Mbit/s at 150 MHz. It reports 0.5926 and 0.3879 for two and three sessions, and it does not give the cycle model behind those figures.

This implementation is about three times slower for one session:

- Every XOR is a 16-bit round trip through the ALU controller.
- Each round trip costs three cycles.

Its total rate grows almost linearly with the number of sessions, because the ALU wait of one session is filled with the work of another. In the original figures, the rate falls as sessions are added.
Widening the ALU operands, or letting the processing step and the request share a cycle, are the obvious ways to close the single-session gap.

## How far to trust it

- **DES and IDEA results.** These are checked against standard example vectors and against vectors from independent software models, for encryption and decryption, through each module and through the whole co-processor.
- **Parts that are this implementation's own.** The original design gives the block structure, the bus widths, the instruction format, the actions, the three round robin counters, the one-slot ALU queue and the 16-block output buffer. These are this implementation's own:
  - every encoding (action and algorithm codes, status bits, ALU bus word layout)
  - the 16-bit ALU operand width
  - the handshakes
  - the order of ALU operations in each cipher
  - the use of exponentiation for IDEA inverses
- **Queue depth.** The original text describes the controller queue once as one request per module and once as one entry per session. This implementation uses one slot per module. The slot is freed as soon as its request reaches an ALU, so every session still has at most one request outstanding.
- **GCD ALU.** It is built, tested and reachable through the controller (function code 4), but neither cipher uses it.
- **Parts not built.**
  - The host processor.
  - The software side of the external interface.
  - The performance-degradation estimate for larger session counts, which is not reproduced.
  - Triple DES. It appears only as background, as three chained DES operations; a host can chain three DES sessions itself.

## Simulating

Every testbench is self-checking. Each prints one `TB_RESULT checks=N failures=M` line and has a cycle watchdog.
All of them run with plain Verilator 5 (two-state simulation); list the packages first:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/asep_pkg.sv rtl/asep_des_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/tb_asep_top.sv --top-module tb_asep_top -Mdir /tmp/obj_top
/tmp/obj_top/Vtb_asep_top +verilator+rand+reset+2
```

`tb_asep_top` runs the full-size design (16 sessions) with its default parameters and takes well under a second.
It also counts and requires each of these mechanisms at least once:

- both algorithms in flight together
- several sessions of one module in flight
- the wait wire
- two modules wanting one ALU
- several full output blocks
- output back-pressure
- 18 inverses for an IDEA decode
- unknown instructions
- the error status
- CLEAR and FLUSH

The block testbenches are:

- `tb_asep_des_core`, `tb_asep_idea_core`: the modules alone, with a modeled ALU path, random wait wire and output stalls.
- `tb_asep_alu_controller`: two modeled modules and five modeled ALUs of different latency, with scoreboarding.
- `tb_asep_alus`: the XOR, add and multiply ALUs. `tb_asep_alu_modexp` and `tb_asep_alu_gcd` test the other two.
- `tb_asep_output_buffer`, `tb_asep_rr_arbiter`, `tb_asep_input_buffer`, `tb_asep_microcontroller`: the remaining blocks.

To change the session count, set `NUM_SESS` on `asep_top`. Each tag needs a 4-bit code, so 16 is the most the instruction format allows.
