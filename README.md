# Crossbar on-chip bus with Open Core Protocol ports

A shared on-chip bus serves one transfer at a time. When several masters need different slaves at
once, they queue behind each other. This design replaces the shared bus with a **crossbar**, so
every master can work with a different slave in the same cycle. It also handles the transaction
types that make a modern bus efficient:

* **burst** transfers, both multi-request (one address per beat, as in AHB) and single-request
  (one address per burst, as in AXI);
* **lock**, which keeps a slave on one master for several transfers;
* **pipelined** (outstanding) reads, where a master issues new requests before older data is back;
* **out-of-order** responses, where a fast slave's data may overtake a slow slave's. This follows
  OCP's TagID rule: responses with the same TagID return in request order, and responses with
  different TagIDs may return in any order.

Masters and slaves attach through OCP-style sockets (MCmd/SCmdAccept, SResp/MRespAccept). The
default configuration has 4 masters and 6 slaves, 32-bit addresses, 64-bit data and a priority
queue 4 beats deep in each response scheduler. The architecture follows the paper *Advanced
On-Chip Bus Design with Open Core Protocol Interface* (K. Anjaiah, G. Sravya). The paper names
the blocks and says what each does. Where it leaves details open, this implementation makes its
own choices, which are listed below.

## Structure

```
 master m ──► FSM-S[m] ──(decoder[m] picks slave s)──► arbiter[s] ► MUX[s] ► FSM-M[s] ──► slave s
    ▲                                                                          │
    └──── output reg ◄── priority queue ◄── scheduler[m] ◄─────────────────────┘
                         (MUX1, MUX2, recorder, comparator, loop-back, priority setter)
```

| block | file | one per | role |
|---|---|---|---|
| decoder | `ocp_decoder.sv` | master | address → slave index; flags unmapped addresses |
| FSM-S | `ocp_fsm_s.sv` | master | OCP slave towards the master: routes beats, counts burst beats, raises *hold*, enters reads in the recorder, answers unmapped addresses with ERR |
| arbiter | `ocp_arbiter.sv` | slave | fixed priority (master 0 first); locks onto a master while *hold* is set |
| MUX | `ocp_req_mux.sv` | slave | forwards the granted master's beat |
| FSM-M | `ocp_fsm_m.sv` | slave | OCP master towards the slave: turns every burst into single accesses with generated addresses; labels each response with its master and TagID |
| scheduler | `ocp_scheduler.sv` | master | merges all slaves' responses for one master and enforces the ordering rule |
| priority queue | `ocp_prio_queue.sv` | master (inside scheduler) | 4 beats; smallest priority value first, oldest first among equals |
| bus | `ocp_bus.sv` | — | wires all of the above into the crossbar |
| memory slave | `ocp_mem_slave.sv` | slave (in the top) | OCP slave with internal memory and a fixed read latency |
| top | `ocp_system.sv` | — | the bus with a memory slave on each slave port; master ports brought out |

Shared types and constants are in `ocp_pkg.sv`.

## Ports and signals

A master drives an `ocp_req_t` and holds it until `m_cmd_accept`:

| field | meaning |
|---|---|
| `cmd` | `CMD_IDLE`, `CMD_WR`, `CMD_RD` (OCP MCmd encoding 0/1/2) |
| `addr`, `data` | byte address (32 bit), write data (64 bit) |
| `burst_len` | beats in the burst, 1..15 (0 counts as 1) |
| `single_req` | 1 = single-request burst, 0 = multi-request burst |
| `tag`, `in_order` | TagID (2 bits), or `in_order = 1` for a transaction without TagID |
| `lock` | keep the slave's arbiter on this master after this beat |

A response is an `ocp_rsp_t` (`resp` = DVA or ERR, `data`, `tag`, `in_order`, `last`). It is
presented while `m_rsp_valid` is set and does not change until `m_rsp_accept`.

Slave ports (`ocp_bus` only) are single-beat OCP: `s_req` (cmd, addr, data) is held until
`s_cmd_accept`, and `s_resp` ≠ NULL presents `s_data` until `s_rsp_accept`. **A slave must
answer reads in the order it accepted them.** Slaves need no burst support, because the FSM-M
expands every burst.

Address map: slave *s* owns bytes `s·0x1_0000` … `s·0x1_0000 + 0xFFFF`. Everything from
`6·0x1_0000` upwards is unmapped and is answered with ERR.

## How each transaction type flows

* **Single write / read.** The FSM-S sends the beat to the decoded slave. The beat is accepted in
  the same cycle the slave accepts the access, so an idle path adds no request latency. Writes are
  *posted*: the slave's acceptance completes them, and they return no response.
* **Multi-request burst.** Each beat carries its own address and is handled like a single access.
  The arbiter keeps the slave on the master until the last beat (hold = not last).
* **Single-request read burst.** One request. The FSM-M issues `burst_len` reads at `addr`,
  `addr+8`, `addr+16` and so on, one per cycle while the slave accepts, driven by a beat counter.
  The response beats carry `last` on the final one.
* **Single-request write burst.** The first beat carries the address and the first word. The
  following `burst_len-1` beats carry only data on the same request handshake, and the FSM-M
  writes them to the generated addresses.
* **Lock.** A beat accepted with `lock = 1` locks the slave's arbiter to that master. The next
  beat that master sends there with `lock = 0` unlocks it. Other masters wait, whatever their
  priority.
* **Unmapped address.** The FSM-S accepts the request itself and answers with ERR beats. A read
  gets as many ERR beats as it asked for data beats; a write gets one. ERR beats go through the
  scheduler like any other response, so they also keep the ordering rule.

## Response ordering: the scheduler

This is the part of the design that needs the most care. Every master has its own scheduler,
which sees the responses of all slaves meant for that master, plus its FSM-S's ERR beats.

**Ordering classes.** Each TagID is one class, and all transactions without a TagID form one
more class. Within a class, responses must come back in request order. Between classes, any
order is allowed.

**Recorder.** When the FSM-S accepts a read (or an unmapped request), it appends an entry to
the recorder: target slave, class, and number of beats. Entries stay in request order (4
entries by default, so at most 4 transactions are outstanding per master). The last beat of a
transaction removes its entry.

**MUX1 → MUX2 → comparator.** MUX1 picks one slave's beat, lowest slave index first. MUX2 picks
between MUX1 and the *loop-back buffer*, and always prefers a loop-back beat that may go now.
The comparator looks up the oldest recorder entry of the beat's class. The beat passes only if
that entry belongs to the slave the beat came from. Otherwise an older transaction of the same
class, at another slave, is still owed. The beat is then taken from the slave and *sent back*
into the loop-back buffer, where it is checked again every cycle. A slave beat keeps its place
at the slave (and that slave is skipped until the recorder changes) only if the loop-back buffer
is full. That cannot happen under the admission rule below.

**Priority setter and queue.** A beat that passes gets priority `TagID + 1`. An in-order beat
gets 0 when `ooo_first = 0` (in-order responses first) and the largest value, 7, when
`ooo_first = 1` (out-of-order responses first). The priority queue releases the smallest value
first, and the oldest among equal values. Beats of one class therefore never swap.

**Bypass and output register.** If the queue is empty, a passing beat skips it and goes straight
into the output register. Every response still passes the output register, which keeps `m_rsp`
stable until the master accepts it.

**Admission rule, and why it cannot deadlock.** Slaves answer strictly in order. A beat that
has to wait could therefore block every later beat of its slave, including beats that other
masters are waiting for. To avoid this, the recorder budgets loop-back room before it admits a
transaction. Call a recorder entry *exposed* if an older entry of the same class targets a
different slave. Only beats of exposed entries can fail the comparator. Every other entry's
older class-mates are at its own slave, which answers in order, so they are always finished
first. A new transaction is admitted (`rec_ok = 1`) if the recorder has a free entry and, in
case it would itself be exposed, one more condition holds. Its beats, plus the beats already in
the loop-back buffer, plus the beats still owed to exposed entries, must fit in the loop-back
buffer (`REC_DEPTH − 1` = 3 beats). Otherwise the FSM-S waits. Every beat that can fail the
comparator therefore has a reserved place in the loop-back buffer, and no slave is ever held up
by the ordering rule. The paper specifies neither this rule nor the buffer size.

The rule has a cost only for long bursts. Within one class, reads to one slave always pipeline,
because that slave returns them in order. So do reads of different classes. Reads of one class
to different slaves pipeline as long as the later ones total at most 3 beats, which covers the
paper's example of a 4-beat read followed by 2-beat and 1-beat reads. A longer burst behind an
outstanding read of its class to another slave waits until that read has completed. A master
that wants to overlap long bursts to different slaves gives them different TagIDs, which is
what TagIDs are for.

## Timing

| path | cycles |
|---|---|
| request, idle path | accepted in the cycle the slave accepts it (combinational through FSM-S, arbiter, MUX, FSM-M) |
| read response | slave latency + 1 (output register) from the accepting edge to `m_rsp_valid`, on an idle path |
| single-request burst | one slave access per cycle while the slave accepts |

Request-path logic is combinational from a master's `m_req` to the slave's `s_req`, and from
`s_cmd_accept` back to `m_cmd_accept`. A registered slice can be added at the slave ports if
timing needs it. The paper reports 333 MHz in a 0.13 µm process at about 30 K gates. That figure
has not been checked for this RTL.

## Parameters

| parameter | default | where | note |
|---|---|---|---|
| `NUM_MASTERS` | 4 | `ocp_system`, `ocp_bus` | from the paper's configuration |
| `NUM_SLAVES` | 6 | `ocp_system`, `ocp_bus` | from the paper's configuration |
| `Q_DEPTH` | 4 | priority queue depth | from the paper's configuration |
| `REC_DEPTH` | 4 | outstanding transactions per master | own choice; the loop-back buffer is `REC_DEPTH-1` |
| `AW`, `DW` | 32, 64 | `ocp_pkg` constants | from the paper's configuration |
| `TW`, `BLW` | 2, 4 | `ocp_pkg` constants | TagID and burst-length widths, own choice |
| `REGION_AW` | 16 | `ocp_pkg` | 64 KiB per slave, own choice |
| `TRK_DEPTH` | 8 | `ocp_fsm_m` | reads in flight per slave |
| `LAT_BASE`, `LAT_STEP` | 2, 3 | `ocp_system` | memory slave *s* has latency 2 + 3·s cycles |
| `SLAVE_WORDS` | 8192 | `ocp_system` | 64-bit words per memory slave (fills its region) |
| `SLAVE_DEPTH` | 8 | `ocp_system` | reads a memory slave takes ahead; matches `TRK_DEPTH` so one slave can stream one word per cycle |

## Where this implementation goes beyond or departs from the paper

* Writes are posted. The slave's acceptance is taken as its acknowledgement.
* Lock is a bit in the request rather than OCP's locking read commands.
* Arbitration is fixed priority with master 0 first. The paper speaks of master priorities but
  gives no scheme. MUX1's slave priority is likewise lowest index first.
* One decoder per master port, so concurrent requests decode in parallel. The paper's figure
  draws a single decoder box. The paper also has the decoder steer responses back to their
  master. Here each FSM-M remembers which master and TagID every read in flight belongs to, and
  the decoder's slave index goes to the scheduler through the recorder.
* Unmapped addresses are flagged by the decoder (as the paper says). The ERR response itself is
  produced by the FSM-S, so it takes the same ordered path as real data.
* The paper's figure draws the response path as scheduler → FSM-S → master. Here the scheduler's
  output register drives the master's response signals directly. The FSM-S handles the request
  side and the ERR generator.
* The paper's recorder tracks out-of-order (tagged) transactions. This recorder also tracks
  transactions without a TagID, as one more ordering class, so they are kept in order the same
  way.
* Single-request write bursts send their data beats on the request handshake rather than on a
  separate OCP data handshake.
* The recorder's admission rule and the loop-back buffer size are added to make the scheduler
  deadlock-free.
* Only the full crossbar is built. The paper allows a partial crossbar but does not say which
  paths it would drop.
* Not built: the transaction-level software model, and the master cores, which are the system's
  own IP. Master ports are the top's ports.

Usage limits that the RTL does not check:

* A burst must stay inside one slave's region.
* A master that locks a slave must unlock it with a later beat to that same slave.
* Slaves must answer in order.

## Verification

Each block has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_ocp_system` | the full default system (4×6). Four concurrent masters run a fill phase of 8-beat single-request write bursts. Then come directed tests: idle latency = slave latency + 1, the long-burst-then-short-reads out-of-order case (the short reads must come back first, and sooner than in order), and both `ooo_first` policies. After that, 250 random transactions per master (all kinds, lock, unmapped, tagged and in-order). Every response beat is compared with the next expected beat of its class, which checks data, ERR, `last` and ordering in one step. It also counts contention, lock holds, burst expansion, parallel slave access, pipelining, out-of-order returns, loop-back, bypass, queue use and ERR, and fails if any of them never occurs. |
| `tb_ocp_scenarios` | the showcase transactions on the full-size system, one at a time. (1) An 8-beat single-request write burst: 8 slave writes on consecutive cycles at start + 8·i, then read back on 8 consecutive cycles. (2) The same 4-beat read as a multi-request burst (4 handshakes) and as a single-request burst (1 handshake). (3) Three reads A11/A21/A31 (4, 2 and 1 beats) to one slave, first one after another and then pipelined: 48 against 20 cycles. (4) The same three reads from slaves of latency 17, 2 and 5, in order against with three TagIDs: 26 against 23 cycles, with D21, D22 and D31 ahead of D11. |
| `tb_ocp_bus` | the same traffic on a 2×3 bus with memory slaves attached in the testbench |
| `tb_ocp_scheduler` | one scheduler with modelled slaves of different latencies: class order, loop-back, bypass, queue, policy, and that `rec_ok` refuses only for a full recorder or an exceeded loop-back budget |
| `tb_ocp_fsm_m`, `tb_ocp_fsm_s` | burst expansion and address sequence, response labelling, routing/hold/recorder/ERR behaviour |
| `tb_ocp_arbiter`, `tb_ocp_prio_queue`, `tb_ocp_decoder`, `tb_ocp_req_mux`, `tb_ocp_mem_slave` | against reference models; the memory slave test also checks its latency and back-pressure |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_ocp_system \
    rtl/ocp_pkg.sv $(ls rtl/*.sv | grep -v ocp_pkg) tb/tb_ocp_system.sv -o sim
./obj_dir/sim
```

The package must come first. Replace `tb_ocp_system` with any other testbench name. The
full-size run takes well under a second and prints the count of every mechanism it exercised:

```
contention 797 lock-hold 660 rd-burst 678 wr-burst 1746 parallel 1286 err 230
pipelined 2900 overtake 447 loop-back 65 bypass 870 queued 702
TB_RESULT checks=1611 failures=0
```

To try a different size, change the parameters of `ocp_system` (or use `tb_ocp_bus`, which
takes `NM` and `NS` localparams). The testbenches read internal signals by hierarchical name to
count mechanisms, so renaming instances inside `ocp_bus` or `ocp_scheduler` means updating them.

Simulation is two-state. Every register that is read is reset, except the memory contents; the
testbenches write memory before reading it. The RTL carries immediate assertions, checked with
`--assert`:
* the arbiter's one-hot grant and lock;
* the scheduler's output stability and queue-head priority;
* continuation beats, which must reach an FSM-M only in a burst and only while its arbiter is locked;
* agreement between each decoder's one-hot select and its index;
* the FSM-S's ERR generator.
