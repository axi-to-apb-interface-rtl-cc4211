# AXI4-Lite to APB4 bridge with sixteen APB memory slaves

High-bandwidth masters in a system-on-chip usually talk AXI. Simple register
peripherals talk APB, which has no separate channels, no outstanding
transactions and no bursts. This RTL joins the two. It has three parts:

- a bridge that is an AXI4-Lite slave on one side and the only APB4 master on the other;
- sixteen APB4 slaves behind the bridge, each a small word memory;
- a command-driven AXI4-Lite master that drives the system from a port of plain enables.

Every AXI4-Lite write or read becomes exactly one APB transfer. A burst
command at the user port becomes a series of single AXI4-Lite transactions,
and so a series of single APB transfers. Both buses run on the same clock.

The design follows a published description of an AXI4-Lite to APB bridge:
its signal list, its sixteen APB slaves, a burst of four words, and the
port names of the system it was simulated in. That description gives what
the blocks do and what their pins are called. It does not say how they work
inside. The internal structure, the timing, the address map and the error
rules are this design's own choices. They are listed under
[Departures and choices](#departures-and-choices).

```
 user port         AXI4-Lite               APB4
 WR_EN/RD_EN ... +------------+  AW W B  +--------------+  PSEL[0]   +-----------+   +---------+
 -------------->| axi_master  |<-------->| axi4lite2apb |----------->| apb_slave |<->| apb_mem |
 <--------------|            |  AR R    |              |  PSEL[1]   +-----------+   +---------+
 WR_DONE ...     +------------+          |              |-----------> ... (16 slaves)
                                          +--------------+  PSEL[15]
```

## How a transaction crosses the bridge

`axi4lite2apb` is the heart of the design. It is built from two things:

- **Three one-deep holding registers**, one for each AXI request channel (AW, W and AR).
  `AWREADY`, `WREADY` and `ARREADY` are simply "my register is empty". So
  a beat is accepted in the cycle it is offered, provided the register is
  free. AW and W may arrive in either order, or together. A write becomes
  ready when both of its registers are full. A read is ready when the AR
  register is full.
- **A five-state controller**: `IDLE`, `SETUP`, `ACCESS`, `WRESP` and `RRESP`.
  In `IDLE` it picks a ready transaction. It copies the address, protection,
  data and strobes into the APB output registers, and it frees the holding
  registers the transaction used, so the next beats can be accepted while
  this transfer runs on the APB. Then it goes through the APB `SETUP` cycle
  (PSEL high, PENABLE low) and the `ACCESS` cycles (PENABLE high). It stays
  in `ACCESS` until the selected slave raises PREADY. The slave's PRDATA and
  PSLVERR are captured in that cycle. The controller then holds BVALID or
  RVALID until the master takes the response.

Only one transaction is on the APB at a time, because APB allows no other.
When a write and a read are both ready, they take turns: a write goes first
unless the previous transaction was also a write.

The APB signals PADDR, PWRITE, PWDATA, PSTRB and PPROT are registered and
shared by all slaves. PSEL has one bit per slave. PREADY, PRDATA and
PSLVERR come in one per slave, and the bridge listens only to the selected
slave's. PSTRB carries WSTRB on writes and is zero on reads, as APB4
requires. PPROT copies AWPROT or ARPROT.

Responses:

| case | response | APB transfer |
|---|---|---|
| slave answers with PSLVERR low | OKAY | yes |
| slave answers with PSLVERR high | SLVERR | yes |
| address above the last slave's slot | DECERR | none |

Timing of a single write at the bridge, with a slave that inserts no wait
states (cycle t is the cycle whose closing edge accepts the AW and W beats):

| cycle | t | t+1 | t+2 | t+3 | t+4 |
|---|---|---|---|---|---|
| AW/W handshake | yes | | | | |
| controller | IDLE | IDLE, starts | SETUP | ACCESS, PREADY high | WRESP, BVALID high |

So BVALID comes four cycles after the request, plus one cycle for each wait
state. A read is the same, from AR to RVALID. The bridge carries concurrent
assertions for the APB rules and for the AXI rules on its own outputs:

- PENABLE only with a PSEL high;
- PSEL one-hot;
- SETUP is always followed by ACCESS;
- signals stay stable while PREADY is low;
- BVALID and RVALID are held until accepted.

## Address map

The 32-bit byte address space is divided into 4 KB slots (`SLOT_BITS` = 12):

| address | what answers |
|---|---|
| `0x0000_k000` + 0x000 .. 0x3FF (k = 0..15) | APB slave k, memory words 0..255 |
| `0x0000_k400` .. `0x0000_kFFF` | APB slave k, PSLVERR → SLVERR |
| anything with a bit above bit 15 set | bridge, DECERR, no APB transfer |

PADDR[15:12] picks the slave. The slave looks only at PADDR[11:2], the word
offset within its slot.

## The APB memory slaves and their wait states

Each slave is an `apb_slave` front end with an `apb_mem` word memory behind
it:

- **Request.** In the SETUP cycle the front end checks the word offset.
  If the word exists, it sends a one-cycle write or read request to the
  memory.
- **Wait.** It holds PREADY low until the memory answers with `wr_done` or
  `rd_done`, then raises PREADY for one cycle, with the read data on PRDATA.
- **Error.** If the word does not exist, no request is made, and the ACCESS
  phase ends at once with PSLVERR.

`apb_mem` answers one cycle after a request. Every good APB transfer
therefore has **two wait states**. The memory applies the byte strobes lane
by lane. It is not cleared by reset.

## The command master and bursts

`axi_master` turns the user port into AXI4-Lite transactions:

- **Starting a command.** While `busy` is low, `wr_en` starts a write of
  `data_in` to `wr_addr`, and `rd_en` starts a read of `rd_addr`. If both
  are high, the write wins.
- **Bursts.** With `wr_burst` or `rd_burst` high in the same cycle, the
  command is a burst of `BURST_LEN` (4) beats to consecutive words, with
  the address stepping by 4 bytes.
- **How a beat runs.** A write beat raises AWVALID and WVALID together and
  drops each on its own handshake, then waits for B. A read beat raises
  ARVALID, then waits for R. The master is always ready for B and R once
  it waits for them.
- **Feeding burst write data.** `beat_done` pulses at the end of every
  beat. For a read, `data_out` then holds that beat's data. The first write
  word is taken with `wr_en`. Each further burst word is taken at the end of
  the cycle after the previous `beat_done`. So a user who sees `beat_done`
  at a clock edge has one full cycle to put the next word on `data_in`.
- **End of a command.** `wr_done` or `rd_done` pulses once per command.
  `resp_err` is then high if any beat got SLVERR or DECERR.

AWPROT and ARPROT are driven as 0, and WSTRB as all ones. Byte-wide writes
therefore reach the APB only through the bridge's own AXI port.

## System timing

With the default memory slaves, counting from the cycle in which WR_EN or
RD_EN is high to the cycle of the done pulse:

| command | cycles |
|---|---|
| single write | 9 |
| single read | 9 |
| 4-beat burst write | 36 (9 per extra beat) |
| 4-beat burst read | 30 (7 per extra beat) |

A burst write spends two extra cycles per beat waiting for the next word on
`data_in`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| all | `ADDR_WIDTH` | 32 | AXI and APB address width |
| all | `DATA_WIDTH` | 32 | data width, a multiple of 8 |
| `axi4lite2apb`, top | `NUM_SLAVES` | 16 | APB slaves, 1 to 16 |
| `axi4lite2apb`, top | `SLOT_BITS` | 12 | log2 of the bytes per slave slot |
| `apb_slave`, `apb_mem`, top | `MEM_DEPTH` / `DEPTH` | 256 | words per slave memory |
| `axi_master`, top | `BURST_LEN` | 4 | beats in a burst command |

`apb_slave` calls the slot size `REGION_BITS`. The top passes `SLOT_BITS`
to both.

## Departures and choices

What comes from the published description:

- the AXI4-Lite and APB4 signal lists;
- one bridge driving up to sixteen APB slaves;
- VALID/READY handshakes;
- APB wait states by holding PREADY low;
- bursts broken into a series of single APB accesses;
- a four-word burst;
- one clock for both buses;
- the top-level port names;
- a memory behind the APB slave, with write-done and read-done signals.

Where this RTL departs or had to choose:

- **Data width 32 bits.** The source mentions both word-wide (32-bit) and
  8-bit APB transfers. AXI4-Lite requires at least 32 bits.
- **Per-slave PREADY, PRDATA and PSLVERR.** The source's pin diagram
  shows one of each. With sixteen slaves, something has to multiplex them,
  and here that is the bridge.
- **No PBURST signal on the APB.** The source's simulation shows a burst
  flag and burst states in its APB master and slave, but never says what
  they do. APB has no bursts. Here the slaves see only single transfers.
- **Byte addresses.** A burst steps by 4 bytes. The source's simulation
  counts word addresses (14, 15, 16, 17).
- **Separate PCLK and PRESETn pins are not built.** Both sides of the
  bridge use ACLK and ARESETn. Running the APB on a slower or unrelated
  clock would need a clock-domain crossing, which this design does not have.
- **This design's own choices:**
  - the address map;
  - DECERR above the map, and SLVERR for the unused part of a slot;
  - the holding registers and read/write alternation;
  - 256-word memories with one-cycle latency;
  - the `beat_done` handshake, and `busy` and `resp_err`;
  - an active-high `RST` at the top and active-low resets inside.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bus_bridge_top \
  -y rtl rtl/axi_apb_pkg.sv tb/tb_bus_bridge_top.sv -o sim && ./obj_dir/sim
```

The package must come first on the command line. `-y rtl` finds the other
modules. Replace the top module and file name to run another testbench:

| testbench | what it covers |
|---|---|
| `tb_apb_mem` | every word, random byte strobes, done pulses one cycle after the request |
| `tb_apb_slave` | a memory model with 1 to 4 cycles of random latency; wait states match the latency; PSLVERR past the memory with no wait state and no memory request |
| `tb_axi4lite2apb` | sixteen APB slave models with random wait states and an error window; a reference model for every response; AW/W in all three orders; BREADY/RREADY back-pressure; a write and a read at once; DECERR with no APB transfer; zero-wait latency |
| `tb_axi_master` | an AXI4-Lite slave model with random READY/VALID delays; burst addresses and data per beat; done pulses; `resp_err` |
| `tb_bus_bridge_top` | the whole system at default parameters: fills and reads back all 16 × 256 words with bursts, then 2000 random single and burst commands with slave and decode errors. It checks the latencies above and fails unless single and burst writes and reads, APB wait states, PSLVERR, DECERR and a transfer to each of the 16 slaves all happened |
| `tb_burst_example` | the four-word burst write of 85, 243, 14, 213 to words 14 to 17 of slave 0, and the burst read back, checked on the APB, in the memory and at the user port |

Each run takes well under a second.

## Files

- `rtl/axi_apb_pkg.sv`: response codes and shared constants.
- `rtl/axi4lite2apb.sv`: the bridge.
- `rtl/apb_slave.sv`: the APB front end of a memory slave.
- `rtl/apb_mem.sv`: the slave memory.
- `rtl/axi_master.sv`: the command-driven AXI4-Lite master.
- `rtl/bus_bridge_top.sv`: the system of master, bridge and sixteen memory slaves.
- `tb/`: one testbench per module, plus `tb_burst_example`.
