# Bus interface of a 32-bit processor: caches, AHB master and APB peripherals

This is the memory and peripheral side of a 32-bit embedded processor of
the kind used in on-board computers. It sits between the pipeline and
everything outside the core:

* Instruction fetches go through a **32 KB two-way instruction cache**.
* Loads and stores go through a **32 KB two-way copy-back data cache**.
  It uses write allocate, LRU replacement and parity on tags and data.
* An **AHB master** FSM runs every external cycle with the wait states of
  the addressed memory bank. This covers uncached accesses, cache refills
  and cache write-backs. On banks where it is enabled, a SECDED code
  corrects single-bit memory errors and flags double-bit ones.
* An **AHB-to-APB bridge** connects the peripherals: interrupt registers,
  two UARTs and four timers (one of which can act as a watchdog). It also
  gives access to four external MIL-STD-1553 "ACE" devices. The bridge
  holds the processor and memory configuration registers.

The caches can be switched on and off at run time from the processor
configuration register. With a cache off, the AHB master serves the
pipeline directly. All RTL is synthesizable SystemVerilog (IEEE 1800-2017).
The top module is `caches_ahb_top` and has no parameters. Its defaults are
the full-size design.

```
 fetch stage ──► icache_ctrl ──┐ wait_for_mfc / mfc_ack
      │  (cache off)           ├──────────────┐
      └────────────────────────┼─► ahb_master ├──► external memory (banks 0-6, internal RAM)
 memory stage ─► dcache_ctrl ──┘       │
      │  (cache off, or 0xExxx_xxxx)   │ hsel_apb / hready_apb
      └────────────────────────────────┘
                                       ▼
                                  apb_bridge ── PCR, MCR
                              ┌───────┼────────┬──────────┐
                           apb_intc  2×apb_uart 4×apb_timer  ACE 1-4 (external)
```

## Address map

| Address | Target |
|---|---|
| `0x0000_0000`–`0x7FFF_FFFF` | External memory. Bank = `addr[30:28]`: banks 0–6 are external; bank 7 is the internal RAM |
| `0xE000_0000` | PCR, the processor configuration register |
| `0xE000_0004` | MCR, the memory configuration register (wait states) |
| `0xE000_0010` / `0x14` | Interrupt pending register (write 1 to clear) and interrupt mask register |
| `0xE000_0020`–`0x30` | UART1: TX data, RX data, status, control, mask |
| `0xE000_0040 + 12·n` | Timer n+1 (n = 0…3): control, reload, counter |
| `0xE000_0080`–`0x90` | UART2, same layout as UART1 |
| `0xE010_0000 + n·0x4_0000` | ACE device n (n = 0…3). 16-bit word k is at byte offset 4k |
| anything else in `0xExxx_xxxx` | Unmapped. Reads return 0 and writes are ignored |

The UART data registers (`+0` write, `+4` read) and the three-register
timer windows sit at the addresses of the original system. The other
locations, and everything marked as a choice below, belong to this
implementation. The constants live in `rtl/amba_pkg.sv`.

PCR bits: 0 data cache enable, 1 instruction cache enable, 2–10 SECDED
enables (internal registers, banks 0–6, internal RAM; see the SECDED
section below), 11 watchdog enable,
12 interrupt enable. Bits above 12 read as 0. The MCR holds 4 wait-state
bits per bank, with bank *b* at `[4b+3:4b]`. After reset PCR is 0 (both
caches off) and the MCR is all ones (15 wait states everywhere). Boot code
should lower the wait states before it turns the caches on.

## The AHB master (`ahb_master`)

A single FSM with the states IDLE, INSTR, DATA, ICACHE, DCACHE and APB_SEL.
In IDLE it picks one waiting request, highest priority first:

1. a data-cache miss
2. a memory-stage access to a peripheral, which goes to APB_SEL
3. an uncached load or store, which goes to DATA
4. an instruction-cache miss
5. an uncached fetch, which goes to INSTR

One external word access works like this:

* Chip select, address, `mem_oe`/`mem_we` and byte enables are held for
  **1 + N cycles**, where N is the MCR field of the addressed bank.
* Read data is taken in the last cycle. The requester gets its ready or ack
  pulse in that same cycle.
* An uncached fetch or load therefore takes N + 2 cycles from request to
  data, counting the IDLE cycle.

In ICACHE and DCACHE the master does not know the block size. It serves
whatever word the cache's miss FSM asks for while that FSM raises
`wait_for_mfc` ("wait for memory function complete"). It leaves one idle
cycle after each word so the cache can present the next address. It goes
back to IDLE when the cache pulses `access_complete`. APB_SEL holds
`hsel_apb`, `haddr`, `hwrite` and `hwdata` until the bridge answers with
`hready_apb`.

### SECDED on the memory banks

Every external word has 7 check bits on their own lane (`mem_wcheck` out,
`mem_rcheck` in). The code is an extended Hamming (39,32) code
(`secded32`):

* The 32 data bits sit at the positions 1–38 of a Hamming word that are not
  powers of two.
* Six check bits are the parities over the positions with bit *i* set.
* A seventh bit is the parity of the whole word.

On a read, the six check bits are computed again. Their XOR with the
stored bits is the syndrome. Decoding then goes by the overall parity:

| Overall parity | Syndrome | Result |
|---|---|---|
| correct | zero | no error |
| wrong | any | single error: the bit at the syndrome position is flipped back, `secded_ce` pulses |
| correct | non-zero | double error: the data pass unchanged, `secded_ue` pulses |

Check bits are written with every store, whatever the enables say. PCR bits
3–10 switch correction on per bank (bit 10 is the internal RAM). They affect
only reads: the corrected word goes to the pipeline or to the cache being
filled.

Check bits must always cover the whole word. So a store of fewer than four
bytes to an enabled bank becomes a read-modify-write:

1. a full read, corrected
2. a full-word write of the merged data

The two accesses each have the bank's wait states. The memory stage sees
one `dm_ready` at the end. Cache write-backs are always whole words and
need no merge.

## The caches (`icache_ctrl`, `dcache_ctrl`)

**Organisation.** Both caches have 1024 sets × 2 ways × 4 words, which is
32 KB (8K instructions for the instruction cache). The address splits into:

* an 18-bit tag, `addr[31:14]`
* a 10-bit set index, `addr[13:4]`
* a 2-bit word locator, `addr[3:2]`

The word locator is appended to the set index to address the data RAM.
The RAMs are `cache_ram` instances: synchronous read, one write port.

**Tag entries.** Each way has its own tag RAM:

| Cache | Entry layout | Width |
|---|---|---|
| Instruction | `{valid, lru, tag}` | 20 bits |
| Data | `{parity[1:0], valid, dirty, lru, tag}` | 23 bits |

**LRU with one bit per tag entry.** On a hit, the hit way's LRU bit is
cleared and the other way's LRU bit in the same set is set. Both tag RAMs
are written in that cycle. On a miss the victim is an invalid way if there
is one, otherwise the way whose LRU bit is 1. A refill leaves the new block
as most recently used.

**Request timing.** The pipeline holds `req` and the address (plus `we`,
`be` and `wdata` for stores) until `ready`. The request is registered and
the RAMs are read in the first cycle. The tags are compared in the second
cycle, and a hit answers there. A cache therefore takes one access every
two cycles, and `stall = req && !ready`.

**Miss FSM.**

```
IDLE → LOOKUP ─hit────────────────────────────────────────────→ IDLE
                └miss→ [dcache, victim dirty: (WB_RD → WB) × 4] → FILL × 4 → TAGW → COMPLETE → IDLE
```

* FILL asks for words 0–3 of the block, in order, through `wait_for_mfc`.
* TAGW writes the new tag entry and updates the LRU bits.
* COMPLETE pulses `access_complete`, which releases the AHB master. It
  also pulses `ready`, handing over the requested word that was caught
  during the refill.
* A data-cache miss on a dirty victim first writes the four victim words
  back. Each word is read out of the RAM (WB_RD) one cycle before it is
  offered to the AHB master (WB).

With N wait states, a clean miss costs 4·(N+3)+3 cycles and a dirty miss
4·(N+4)+4·(N+3)+3. Hits cost 2 cycles.

**Copy-back with write allocate.**

* A store hit merges the enabled bytes into the word and sets the block's
  dirty bit. No bus cycle is made.
* A store miss fetches the block and merges the store into the addressed
  word as it arrives. The block becomes dirty.
* Memory sees the data only when the block is evicted.

**Parity (data cache).**

* Each tag entry has two parity bits, over the even-numbered and the
  odd-numbered bits of `{valid, dirty, lru, tag}`.
* Each 32-bit word has two parity bits over its even and odd bits, stored
  next to it in the data RAM (34-bit words).
* Every lookup checks both tag entries of the set and the hit word.
  `parity_err` pulses on a mismatch.
* The access is not retried or corrected. What to do about the error is
  left to the system.

**After reset** each cache clears its tag RAMs, one set per cycle, which
takes 1024 cycles. `ready` stays low until then.

## The APB bridge (`apb_bridge`)

The bridge is the only APB master. For each access from the AHB master it:

* latches the address and write data
* decodes the address to exactly one `psel` bit and an offset
  (`apb.paddr`) inside the peripheral
* runs a SETUP cycle, then an ACCESS cycle with `penable` set

All APB slaves here answer without wait states, so a register access takes
two cycles after the request is seen, and `hready_apb` comes in the ACCESS
cycle. The bridge also honours `pready` from slaves that are slower.

ACE accesses drive `ace_cs`, `ace_addr`, `ace_rd_wr` and `ace_wdata`
instead. They stay in ACCESS until the device answers with `ace_ready`.

PCR and MCR are inside the bridge. The bridge outputs them to the rest of
the design. The request shared by all APB slaves is the packed struct
`amba_pkg::apb_req_t`.

## Peripherals

* **Timers (`apb_timer`, four instances).** Register `+0` is control:
  enable, auto-reload and interrupt enable. `+4` is reload, and writing it
  also loads the counter. `+8` is the counter.
  * While enabled the counter counts down once per clock.
  * From zero, the next clock is an underflow. It pulses the interrupt and
    then either reloads (period = reload + 1 clocks) or stops.
  * Timer 4's underflow also pulses `wdog_reset` when PCR bit 11 is set.
    Software keeps the watchdog quiet by rewriting the counter in time.
* **UARTs (`apb_uart` around `uart_core`, two instances).**
  * Frame format is 8N1, LSB first. The bit time in clocks is set in the
    control register (`[15:0]`; TX/RX enables at bits 16 and 17).
  * There is one transmit holding register, so one byte can wait while
    another is on the line.
  * The receiver takes each bit in the middle of its bit time, after
    checking the start bit half a bit in. It reports overrun and framing
    errors in the status register.
  * Interrupts are one-cycle pulses on byte received and byte sent, each
    with its own mask bit.
* **Interrupt registers (`apb_intc`).** There are 10 sources:
  * bits 0–3: timers 1–4
  * bits 4–5: UART1 and UART2
  * bits 6–9: ACE 1–4 (`ace_int`)

  A source that is high sets its pending bit. Writing 1 clears a bit.
  `irq` is `|(pending & mask)` gated by PCR bit 12 and registered.
  `irq_id` gives the lowest active source.

## What follows the original design and what does not

These follow the original design:

* the FSM states of the AHB master and their exit conditions
* per-bank wait states from the memory configuration register
* the cache geometry, the one-bit-per-entry LRU rule and the 23-bit data
  cache tag entry
* copy-back with write allocate
* odd/even parity on tags and 32-bit words
* the bridge's duties: latch, one-hot decode, drive write data, wait for
  the ACE's ready
* the PCR bit layout
* the peripheral population: four timers, two UARTs, interrupt registers,
  four ACEs
* the UART and timer register addresses

These are this implementation's own choices:

* **Clocking.** There is one clock. The original AHB master FSM runs on a
  doubled clock.
* **Bus protocol.** The AHB side is a held request/ready handshake, not
  pipelined AHB.
* **Layouts.** The MCR layout, the bank decoding, the remaining addresses,
  and every register bit layout of the timers, UARTs and interrupt
  registers.
* **Polarities and reset.** Chip selects are active high, and all flops
  have an active-low asynchronous reset.
* **Cache behaviour.**
  * two-cycle hits
  * in-order refill
  * byte enables on stores
  * the reset clearing sweep
  * no action on a parity error
  * an invalid way is filled first
* **Watchdog.** Timer 4 is the watchdog.
* **SECDED code.** The code, the separate check-bit lane and the
  read-modify-write for partial stores are this design's choices. The
  original system names only the enable bits.
* **Not built: SECDED for the internal registers.** PCR bit 2 protects the
  processor's own registers, which are not part of this design. All nine
  enables are brought out as `secded_en`.
* **Not built: the ACE devices.** They are external chips and appear only
  as the bus brought out of the top.
* **The instruction cache has no parity.** Parity is described only for
  the data cache.

## Files

| File | Contents |
|---|---|
| `rtl/amba_pkg.sv` | Address map, PCR bit numbers, `apb_req_t`, `mfc_req_t`, parity helper |
| `rtl/caches_ahb_top.sv` | Top: request routing and all instances |
| `rtl/ahb_master.sv` | External bus FSM |
| `rtl/secded32.sv` | SECDED encoder and decoder for 32-bit words |
| `rtl/icache_ctrl.sv`, `rtl/dcache_ctrl.sv`, `rtl/cache_ram.sv` | The caches and their RAMs |
| `rtl/apb_bridge.sv` | AHB-to-APB bridge, PCR and MCR, ACE interface |
| `rtl/apb_timer.sv`, `rtl/apb_uart.sv`, `rtl/uart_core.sv`, `rtl/apb_intc.sv` | Peripherals |
| `tb/tb_<module>.sv` | One self-checking testbench per module |
| `tb/ext_mem_model.sv`, `tb/ace_model.sv`, `tb/tb_pkg.sv` | Behavioural external memory and ACE devices, shared helpers |

## Verification

Every testbench checks its module's outputs against values it works out on
its own. Each prints `TB_RESULT checks=N failures=M` and has a cycle-count
watchdog.

| Testbench | What it checks |
|---|---|
| `tb_icache_ctrl` | Full size, against a reference two-way LRU model. Data, hit/miss sequence, hit and miss latency, refill word order. An 8192-instruction program runs twice, the second time with no miss |
| `tb_dcache_ctrl` | Full size. Adds dirty bits to the model, a reference memory, write-back counts, write allocate, and parity errors from deliberately corrupted tag and data bits. A 32 KB array is written and read back with no miss |
| `tb_ahb_master` | Wait states per bank, priority, block transfers, APB forwarding, SECDED correction and the read-modify-write store |
| `tb_secded32` | Every single-bit and many double-bit errors, on random words, against a separately written encoder |
| `tb_apb_bridge` | Decoding, offsets, SETUP/ACCESS order, slave wait states, ACE ready, configuration registers |
| `tb_apb_timer`, `tb_uart_core`, `tb_apb_uart`, `tb_apb_intc` | The peripherals, including the timer period, the serial frame time and framing errors |
| `tb_caches_ahb_top` | End to end at the default size (see below) |

`tb_caches_ahb_top` runs the whole design at its default size:

* uncached fetches and loads/stores with wait states
* enabling the caches, then a cached loop (hits after the first pass)
* random cached loads and stores with dirty evictions, checked against
  memory once the data cache is off again
* a parity error
* a corrected single-bit and a flagged double-bit memory error, and a byte
  store merged by read-modify-write
* a timer interrupt through the interrupt registers to `irq`
* a watchdog reset
* `0xA5` sent from UART1 to UART2 and back
* ACE reads and writes

It counts each of these and fails if one never happened. It also carries
assertions that timer read data and interrupts are zero during reset. The
modules themselves assert the APB rules: one-hot `psel`, `penable` only
with a select, stable address and data. They also assert one chip select at
a time, that a block is never present in both ways of a set, and that a
timer interrupts exactly one clock after an enabled underflow and never
while stopped.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
    rtl/amba_pkg.sv tb/tb_pkg.sv tb/tb_caches_ahb_top.sv --top tb_caches_ahb_top
./obj_dir/Vtb_caches_ahb_top
```

Each run takes seconds. The cache tests rely on hierarchical references
into `cache_ram` (`dut.g_way[0].u_data.mem`) to inject parity errors.

## Limits

* Nothing here has been run on silicon or an FPGA.
* Throughput is one cache access per two cycles. That is simple, not fast.
  A pipelined lookup would need a bypass for the LRU write.
* A change of the cache enables while a fetch is waiting is not handled.
  Software should switch caches only from uncached code, or with no fetch
  outstanding.
* Memory is not scrubbed. Words that have never been written since power-on
  have random check bits, so software should write a bank before it turns
  that bank's SECDED enable on.
* There is no cache flush or invalidate operation. Turning the data cache
  off leaves its dirty blocks unwritten.
