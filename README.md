# DD-MPU: a per-IP memory firewall with rules that follow the IP's configuration

Third-party IP blocks with their own bus-master ports (DMA engines, accelerators,
network controllers) can read or write any address in a small SoC that has no
MMU. This RTL puts a small firewall directly at the ports of one such IP. The
firewall allows only the memory accesses the IP should need, and it learns
*which* accesses those are by watching how the CPU configures the IP.

Two halves work together:

* **Detection.** A passive monitor watches the IP's configuration (slave) bus.
  When the CPU writes, say, a buffer pointer or a length into one of the IP's
  control registers, a *trigger* turns that write into an update for a rule.
  The CPU's software does not change: it already writes these registers.
* **Protection.** A *protection unit* (PU) sits on each master port of the IP.
  It checks every request (address, byte length, read or write) against a
  fixed list of rules. Some fields of a rule can be overwritten at run time by
  the detection half. A request that no enabled rule covers is not dropped.
  A *dummy sink* answers it instead, following the bus protocol, so the IP
  finishes its transfer instead of hanging. Writes then have no effect, and
  reads return zeros.

Each protected IP gets its own instance ("distributed"), so no global address
decoder or central rule table is involved. All rules are fixed when the design
is built. At run time only three things can change: the dynamic fields, a rule's
enable bit, and hard-wired enable/disable signals driven by a secure
configuration source.

```
             CPU writes base/length to the IP's control registers
                                   |
   APB control bus ----------------+-------------------> IP slave port
        |  (monitored, not driven)
   apb_monitor --> detection_module: trigger k --> FIFO channel k
                                                          |  Address / Length / Enable
                                                          v
   IP master port k ==> [ bus adapter ]--(addr,len,r/w)--> rules --OR--+
                          |      ^                                      AND --> allow
                          |      |                    transfer counter -+
                          |      +---- grant / response ----------------------+
                          +--> allow ? memory port : dummy sink  ------------+
```

## Rules

A rule (`rule_cfg_t` in `ddmpu_pkg`) has six fields:

| field | values | meaning |
|---|---|---|
| `start_addr` | address | first byte of the allowed region |
| `length` | bytes | size of the region |
| `configuration` | `DEFAULT_DISABLED`, `DEFAULT_ENABLED`, `ALWAYS_ENABLED` | enable state after reset; `ALWAYS_ENABLED` cannot be switched off |
| `direction` | `READ_WRITE`, `WRITE_ONLY`, `READ_ONLY` | which transfers the rule allows |
| `is_dynamic` | `DYN_NONE`, `DYN_ADDRESS`, `DYN_LENGTH`, `DYN_ADDRESS_LENGTH`, `DYN_ENABLE` | which fields the detection half may overwrite |
| `outstanding` | N ≥ 1 | number of copies held for transfers still in flight |

A transfer matches a rule when three things hold: the rule is enabled, the
direction is allowed, and the whole byte range `[addr, addr+len)` lies inside
`[start, start+length)`. The sums are formed one bit wider than the address,
so they never wrap. A PU allows a transfer when at least one rule matches.

**Dynamic updates** (`pu_rule`). The PU receives a stream of values, each
tagged as Address, Length or Enable. A `DYN_ADDRESS` rule overwrites its
start with each Address value, and a `DYN_LENGTH` rule its length with each
Length value. A `DYN_ENABLE` rule sets its enable bit from bit 0 of each
Enable value. After an update the old content is gone, and only the new
region is allowed.

**Outstanding copies** are the subtle part. An IP may still have transfers in
flight to the previous buffer when the CPU announces the next one. If the
update simply overwrote the rule, those transfers would be refused. So a rule
with `outstanding = N` is held as N copies, which start invalid. Successive
updates go to the copies in round-robin order, and each copy becomes valid
with its first update. The last N regions announced therefore stay allowed,
and the (N+1)-th update replaces the oldest. With N = 1 the single copy starts
valid with the static start and length. For `DYN_ADDRESS_LENGTH` an Address
value opens the next copy, with its length reset to the static `length`. A
Length value then completes the copy opened last. The CPU is therefore expected
to write the pointer before the length.

**Enable control.** `sec_en_set_i` / `sec_en_clr_i` are hard-wired per-rule
inputs for a trusted source, such as a secure element. Through them, spare
rules built in as `DEFAULT_DISABLED` can be switched on, and outdated ones off,
for example after a firmware change. Clear wins over set, and both win over an
Enable value that arrives in the same cycle.

## Detection path and its latency

`apb_monitor` registers every completed APB transfer (`psel & penable &
pready`) as a trace record holding address, data, direction and length.
`detection_module` gives each record to one `reg_trigger` per PU. A trigger
matches a write to its pointer register (giving an Address value), its length
register (a Length value) or, if enabled, its enable register (an Enable
value). The value goes into a small FIFO channel, which the PU drains one entry
per cycle.

The path is pipelined so that it adds no long wire from the configuration bus
to the firewall:

| cycle | event |
|---|---|
| t | APB handshake of the register write |
| t+1 | trace record valid (monitor register) |
| t+2 | value at the head of the channel FIFO |
| t+3 | rule register holds the new value; matching uses it |

So a write becomes active in the third cycle after its handshake. An IP that
starts a memory request earlier than that is still judged by the old rule.
Typical accelerators take longer than this before their first request.
`tb_ddmpu_nic` shows both cases.

## Protection unit

`pu_core` is independent of the bus protocol. It evaluates all rules in
parallel, ORs the matches, and ANDs the result with the rate limiter's
*below limit* signal.

**Rate limiter** (`rate_limiter`). This is an optional counter that stops a
misbehaving IP from flooding the shared bus. Each transfer forwarded to memory
adds its number of data beats: 1 for TCDM, len+1 for an AXI4 burst. Every
`RL_PERIOD` cycles the counter drops by `RL_DEC`. While the counter is at
`RL_LIMIT` or above, every request goes to the dummy sink. The long-run share of
the bus is therefore `RL_DEC/RL_PERIOD` beats per cycle, and `RL_LIMIT` is the
burst allowance. The defaults (16, 8, 4) allow half the cycles. Denied
transfers are not counted, because they do not use the bus.

**Bus adapters.** Each adapter turns the native request into
`(addr, len, write)`. It steers the request to the memory port or to a dummy
sink, and it routes the responses back. A request that is not forwarded shows
all-zero fields on the memory port.

* `tcdm_adapter` + `tcdm_dummy_sink` (PULP TCDM: `req/gnt`, `r_valid` one
  cycle after grant). A TCDM transfer is one 32-bit word. The decision is
  combinational, so the data path gets no extra register. The sink grants at
  once and answers one cycle later with zero data.
* `axi4_adapter` + `axi4_dummy_sink` (AXI4; AXI4-Lite is the `len = 0`
  case). The checked range covers the whole burst. For INCR this is
  `(len+1)·2^size` bytes from the beat-aligned address. For WRAP it is the
  aligned wrap container, and for FIXED a single beat. AW and AR share one
  decision and alternate when both are valid. A request that has been shown to
  memory keeps its registered decision until its handshake, as AXI requires.
  AXI also lets responses come back in any order, except among equal IDs. To
  avoid reordering, all bursts in flight in one direction go to a single
  destination. A burst bound for the other destination waits until those have
  completed. W beats wait for their address. The sink handles one burst per
  direction at a time, with OKAY responses and the burst's ID.
* `apb_adapter` (APB4 master port, dummy sink built in). The transfer is
  judged in its setup phase, and the decision is registered for the access
  phase. A rule that changes in the middle of a transfer therefore cannot
  split it between the two sides. If it did, the IP would wait forever for a
  pready that the side now selected never gives. A denied transfer never
  appears on the memory side. The adapter completes it in the minimum two
  cycles with zero data and no error.

## The three instances in `ddmpu_soc`

`ddmpu_soc` is the top level. It holds three independent DD-MPUs side by side,
one per untrusted IP. The CPU, the interconnect, the memories and the IPs are
outside it and connect through its ports.

* `ddmpu_hwpe` protects an accelerator with an APB control port and four
  TCDM data ports, like the PULP "Hardware MAC Engine" HWPE. Ports 0–2 are
  read-only and port 3 is write-only. Each port has one
  `DYN_ADDRESS_LENGTH` rule (`DEFAULT_ENABLED`, 2 outstanding copies). Port
  k takes its base from a write to `0xB0 + 0x10·k` and its length in bytes
  from `0xB4 + 0x10·k`. Until both have been written, every access of that
  port is sunk.
* `ddmpu_nic` protects a network-controller-like IP with one AXI4 DMA port.
  Its single `READ_WRITE` rule takes the packet-buffer pointer from `0x10`
  and the frame length from `0x14`, with two buffers outstanding.
* `u_static` protects a simple IP with one APB master port using static
  rules only. It has no monitor and no trigger, and behaves like a classic
  MPU placed at the IP. `N_STATIC_RULES` rules (default 1) each cover
  `STATIC_SIZE` bytes from `STATIC_BASE + i·STATIC_SIZE` (defaults
  0x1A10_0000 and 4 KiB), `READ_WRITE`. The secure-configuration inputs can
  switch each rule off and on.

Register addresses are compared with the full APB address as seen at the IP's
slave port. Change `REG_BASE`/`REG_STRIDE` (or `REG_PTR`/`REG_LEN`) to match the
real register map of the IP you wrap. To wrap a different IP, instantiate
`apb_monitor`, `detection_module` (one trigger per PU) and one
`*_protection_unit` per master port, with your own rule list. For a trigger
more complex than address matching, replace `reg_trigger`. Its interface is
one `trace_t` in and one `det_t` out.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `ddmpu_pkg` | `ADDR_W`, `DATA_W`, `LEN_W` | 32 | 32-bit SoC |
| `ddmpu_pkg` | `AXI_ID_W` | 4 | |
| `ddmpu_soc` | `N_HWPE_PORTS` | 4 | |
| `ddmpu_soc` | `N_STATIC_RULES`, `STATIC_BASE`, `STATIC_SIZE` | 1, 0x1A10_0000, 0x1000 | static-rules unit |
| `ddmpu_hwpe` | `N_PORTS`, `OUTSTANDING` | 4, 2 | |
| `ddmpu_hwpe` | `REG_BASE`, `REG_STRIDE` | 0xB0, 0x10 | |
| `ddmpu_hwpe`, `ddmpu_nic` | `RL_ENABLE`, `RL_LIMIT`, `RL_PERIOD`, `RL_DEC` | 1, 16, 8, 4 | |
| `ddmpu_nic` | `REG_PTR`, `REG_LEN`, `OUTSTANDING` | 0x10, 0x14, 2 | |
| `*_protection_unit`, `pu_core` | `N_RULES`, `RULES` | 1, example rule | `RULES` is a packed array of `rule_cfg_t`; build entries with `make_rule(...)` |
| `detection_module` | `N_PU`, `ADDR_REGS`, `LEN_REGS`, `EN_REGS`, `USE_*`, `FIFO_DEPTH` | 2, {0xC0,0xB0}, … , 2 | |
| `channel_fifo` | `WIDTH`, `DEPTH` | 34, 2 | a push into a full FIFO is dropped and flagged on `overflow_o` |
| `axi4_adapter` | `CNT_W` | 4 | at most 15 bursts in flight per direction |

The default rule of `pu_rule`, `pu_core` and the protection units is the
example rule from the original description of the scheme: start 0, length
0x60, `DEFAULT_DISABLED`, `WRITE_ONLY`, `DYN_ADDRESS`, 2 outstanding.

Reset is active-low and asynchronous (`rst_ni`) throughout. All state has a
reset value.

## Simulating

Every testbench checks its own results and ends by printing
`TB_RESULT checks=<n> failures=<m>`. From the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ddmpu_pkg.sv tb/tb_ddmpu_soc.sv \
          --top-module tb_ddmpu_soc -Mdir obj_soc -o sim
./obj_soc/sim
```

Replace `tb_ddmpu_soc` with any other testbench:

| testbench | what it covers |
|---|---|
| `tb_ddmpu_soc` | whole top at default parameters. It covers: 3-cycle update latency, direction and range denial, outstanding round-robin, rate limit, secure disable, 4-port random traffic, and the NIC buffer rules over AXI4. It counts each mechanism and fails if one never occurred |
| `tb_ddmpu_hwpe`, `tb_ddmpu_nic` | each instance on its own |
| `tb_hwpe_ports` | accelerator instance with 1, 2, 3 and 4 ports side by side |
| `tb_static_rules` | single TCDM port with 1, 8 and 16 static rules, against a rule-list model |
| `tb_pu_rule`, `tb_pu_core`, `tb_rate_limiter` | rule semantics, OR/AND decision, counter model |
| `tb_apb_monitor`, `tb_reg_trigger`, `tb_channel_fifo`, `tb_detection_module` | detection path |
| `tb_tcdm_*`, `tb_axi4_*`, `tb_apb_*` | adapters, dummy sinks and protection units with memory models |

`tb/tcdm_mem_model.sv`, `tb/axi_mem_model.sv`, `tb/apb_mem_model.sv` and
`tb/axi_tb_tasks.svh` are test-only models: memories with random stalls, and
an AXI4 master task set.
Each testbench finishes in well under a second.

## How far it follows the original scheme, and what is this design's own

Taken from the description of the scheme: the split into a detection module
(monitor, triggers, FIFO channels) and protection units; the rule grammar and
its enable configurations; round-robin outstanding copies that become valid on
their first update; OR over the rules ANDed with a transfer counter that is
reduced periodically; the dummy sink; hard-wired secure enable/disable; the
3-cycle update latency; and, for the accelerator, four data ports of which the
first three only read and the last only writes, with each region taken from
the base address and length the CPU writes.

Chosen here, because the description leaves them open:

* the register map (0xB0/0xC0 are the example trigger addresses; the +4
  length register and the 0x10 stride are this design's);
* the handling of a `DYN_ADDRESS_LENGTH` rule (the address opens a copy, the
  length completes it);
* clear-over-set priority;
* all rate-limiter numbers, counting in data beats, and not counting denied
  transfers;
* the TCDM timing;
* everything in the AXI4 adapter beyond "an adapter exists": the burst range
  formula, the AW/AR arbitration, the single-destination ordering rule, and
  OKAY responses from the sink;
* the FIFO depth;
* the network-controller instance, which is the motivating example of the
  scheme and not a design with a register map of its own;
* for the static-rules unit, the APB port, its region and its rules (the
  scheme only names APB among its protocols, and evaluates a static-only unit
  on a single port), and the APB setup-phase decision.

Known limits:

* In the TCDM adapter the decision is combinational while a request waits for
  its grant. A rule update landing in that window can move the waiting request
  from memory to the sink. This is harmless for TCDM, and the AXI4 adapter
  registers its decision to avoid it.
* All rules of one PU listen to the same channel. Two dynamic rules in the
  same PU therefore receive the same updates.
* There is no separate AXI4-Lite adapter. AXI4-Lite masters use the AXI4
  adapter with single-beat bursts. Only an APB monitor is provided on the
  detection side.
* At APB speed (at most one transfer per two cycles) the default rate limit
  (4 per 8 cycles) is never reached. Lower `RL_DEC` or raise `RL_PERIOD` to
  restrict an APB master.
* The original implementation of the scheme reports about 1.6k cells and
  0.28 % of the area of a small RISC-V SoC in a 22 nm process for the
  four-port accelerator case. Those figures come from a different
  implementation and have not been reproduced with this RTL.
