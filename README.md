# AXI4-Lite to APB bridge with independent clocks

This bridge lets an AXI4-Lite master reach up to 16 slow APB peripherals. The
two buses run on unrelated clocks: `aclk` for AXI and `pclk` for APB, with any
frequency ratio and any phase. The bridge turns each AXI4-Lite read or write
into one APB transfer and returns the result on the AXI response channel.
Along the way it:

- serves reads before writes when both are waiting;
- answers addresses that belong to no peripheral with **DECERR**, without
  touching APB;
- reports a peripheral's **PSLVERR** as **SLVERR**;
- stretches the AXI transfer for as long as the peripheral holds **PREADY**
  low.

Both buses are 32 bits wide (address and data). The APB side follows APB4: it
drives `PSTRB` and `PPROT`, and it accepts `PREADY` and `PSLVERR`.

```
            ACLK domain                              PCLK domain
  +--------------------------------+        +-----------------------------+
  | axi_slave_fsm                  | req    | apb_master_fsm              |
  |  AW buffer --+                 |=======>|  (copied on toggle)         |
  |  W  buffer --+-> arbiter ->    | req_tgl|  sync2 -> IDLE/SETUP/ENABLE |--> PADDR, PSEL[15:0],
  |  AR ---------+   addr_decoder  |------->|                             |    PENABLE, PWRITE, ...
  |                  IDLE/APB/RESP | ack_tgl|                             |<-- PRDATA[i], PREADY[i],
  |  B, R <-- response regs  sync2 |<-------|  response regs              |    PSLVERR[i]
  |                                |<=======| rsp                         |
  +--------------------------------+        +-----------------------------+
```

## Crossing the clock boundary

This is the part that needs the most care. Only two single-bit signals are
synchronised: a request toggle going to PCLK and an acknowledge toggle coming
back to ACLK. Each passes through a chain of `SYNC_STAGES` flops (`sync2`,
default 2, the classic two-flop synchroniser). No multi-bit value is ever
synchronised. Instead:

1. The ACLK side loads the whole transfer into a request word, `req`
   (`apb_req_t`): address, write data, strobes, protection, direction and
   peripheral slot. In the same clock edge it flips `req_tgl`.
2. `req` stays unchanged until the transfer has been acknowledged. By the time
   the PCLK side sees the synchronised toggle change, `req` has been stable for
   at least one PCLK period, so it can be sampled directly into PCLK registers.
3. The PCLK side runs the APB transfer. It loads PRDATA and PSLVERR into the
   response word `rsp` (`apb_rsp_t`) and flips `ack_tgl` in the same edge.
   `rsp` then holds until the next transfer ends.
4. The ACLK side sees the synchronised acknowledge, copies `rsp` into its
   response registers, and presents the response.

Each side detects a new event by comparing the synchronised toggle with a
"last seen" copy. So one transfer is in flight at a time, whatever the clock
ratio. This matches APB, which is not pipelined anyway.

The scheme only works if the request and response words reach the other
domain before the toggle does. In an implementation, give `req` and `rsp` a
maximum-delay constraint of about one period of the receiving clock. Declare
`aclk` and `pclk` as asynchronous to each other, and mark the first flop of
each `sync2` as a synchroniser (or use a metastability-hardened flop for it)
so that the tools keep it next to the second one.

## The ACLK side: `axi_slave_fsm`

The AXI4-Lite write address and write data channels are independent. Each has
a one-entry buffer, and `AWREADY` / `WREADY` stay high while their buffer is
empty. So the master may send the address first, the data first, or both
together. The read address has no buffer: `ARREADY` is high exactly when the
FSM is in IDLE, so an accepted read is always started at once.

| state | meaning | leaves when |
|-------|---------|-------------|
| IDLE  | nothing in flight | a read address is valid, or both write buffers are full |
| APB   | request handed to PCLK, waiting for the acknowledge | the synchronised acknowledge toggles |
| RESP  | `RVALID` or `BVALID` held with the response | the master raises `RREADY` / `BREADY` |

**Read priority.** In IDLE, a valid read address wins over a complete write,
and the write stays in its buffers until the read is done. The case that
matters comes after a busy period. Suppose a read response is held because
`RREADY` is low. Meanwhile a write and a new read arrive. When the response is
taken, the new read goes to APB first, then the write.

**Address decoding** (`addr_decoder`). The APB space is one window of
`NUM_SLV` slots, each `2**SLV_ADDR_BITS` bytes (4 KiB by default), starting at
`BASE_ADDR` (0x4000_0000 by default). Slot *k* drives `PSEL[k]`. An address
is mapped only if all of the following hold:

- it is inside the window;
- its slot number is below `NUM_SLV`;
- the slot's bit in `SLV_PRESENT` is set.

Any other address goes straight from IDLE to RESP with DECERR (and `RDATA` =
0 for a read). It never reaches APB. `PADDR` carries the full 32-bit AXI
address; each peripheral decodes the low bits it needs.

**Responses.** OKAY for a normal transfer. SLVERR when the peripheral raised
PSLVERR in the last ENABLE cycle (a read still returns the PRDATA it saw).
DECERR for an unmapped address. `RRESP`/`BRESP` use the AXI encodings in
`axi2apb_pkg::resp_e`.

## The PCLK side: `apb_master_fsm`

This side is a standard APB master FSM:

- **IDLE**: `PSEL` and `PENABLE` are low. When the synchronised request toggle
  changes, the FSM copies `req` into its own registers.
- **SETUP**: one cycle with the slot's `PSEL` high and `PENABLE` low.
  `PADDR`, `PWRITE`, `PWDATA`, `PSTRB` and `PPROT` are valid.
- **ENABLE**: `PENABLE` is high. The FSM stays here while the selected
  peripheral's `PREADY` is low; these are the wait states. In the cycle that
  `PREADY` is high, it samples `PRDATA` and `PSLVERR`, flips the acknowledge
  and returns to IDLE.

Each peripheral has its own `PRDATA`, `PREADY` and `PSLVERR` input
(`m_apb_prdata[i]`, `m_apb_pready[i]`, `m_apb_pslverr[i]`). The bridge selects
the one belonging to the active slot, so the peripherals need no external
multiplexer. `PSTRB` is zero on reads.

## Timing

For a mapped transfer with *W* APB wait states, counted from the AXI edge
that accepts the address (AR, or the later of AW and W plus one cycle):

| step | clock | cycles |
|------|-------|--------|
| request toggle synchronised, FSM leaves IDLE | PCLK | `SYNC_STAGES` + 1, plus up to 1 for phase |
| SETUP | PCLK | 1 |
| ENABLE | PCLK | 1 + *W* |
| acknowledge synchronised, response valid | ACLK | `SYNC_STAGES` + 1, plus up to 1 for phase |

With the default two-stage synchronisers, a read takes 5 + *W* PCLK cycles
plus 3 ACLK cycles, plus up to one cycle of each clock for alignment. One more
ACLK cycle is needed for the response handshake and one in IDLE before the
next transfer starts. A DECERR response appears one ACLK cycle after the
address is accepted. The logic between flops is small: the address decoder
and the request multiplexer on the ACLK side, and the PREADY/PRDATA
multiplexer on the PCLK side.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_SLV` | 16 | number of APB peripherals (1 to 16), width of `PSEL` |
| `SLV_ADDR_BITS` | 12 | log2 of the bytes per peripheral slot |
| `BASE_ADDR` | `32'h4000_0000` | start of the APB window (alignment below) |
| `SLV_PRESENT` | all ones | bit *k* set when slot *k* has a peripheral |
| `SYNC_STAGES` | 2 | flops per synchroniser (at least 2) |

Address and data width (32) and the maximum of 16 peripherals are constants
in `axi2apb_pkg`. `BASE_ADDR` must be a multiple of 16 × 2^`SLV_ADDR_BITS`:
the window is always decoded as 16 slots, and slots at or above `NUM_SLV`
count as unmapped.

## Choices made here, and where the design is open

The following are this design's own decisions; the behaviour the bridge is
meant to have does not fix them:

- The address-map layout: one contiguous window of equal 4 KiB slots, the
  base address, and the `SLV_PRESENT` mask.
- The clock-crossing scheme: toggle handshake with held data words. The only
  given is that two-flop synchronisers join the clock domains.
- One-entry AW and W buffers, and one transfer in flight.
- Per-peripheral PRDATA/PREADY/PSLVERR inputs, not one shared return bus.
- Asynchronous, active-low resets in both domains (`aresetn`, `presetn`).
  Assert both together; releasing one domain's reset while the other is
  mid-transfer is not supported.
- RDATA is zero on DECERR. An error response is always SLVERR for PSLVERR
  and DECERR for an unmapped address; no other event produces an error.

Not included:

- Any specific peripheral.
- Timing constraints, and the FPGA implementation results the bridge was
  reported with (168.7 MHz on a Xilinx device). Nothing here was synthesised
  to a device.

## Assertions

The RTL carries concurrent assertions for the bus rules it must keep:

- `axi_slave_fsm`: `BVALID`/`RVALID` and their payload are held until
  accepted, and never both valid at once.
- `apb_master_fsm`: `PENABLE` only with a `PSEL`; SETUP lasts one cycle and
  is followed by ENABLE with the same `PSEL`; address and control are stable
  through wait states.

The assertions use `disable iff` on the asynchronous reset. This is why
Verilator's lint reports `SYNCASYNCNET` for the reset nets. The warning is
expected and harmless.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_sync2` | output equals the input delayed by exactly 2 (and, in a second instance, 3) edges; reset values |
| `tb_addr_decoder` | 4,000+ addresses against plain address arithmetic, for the default map and a 5-slot, 256-byte map with absent slots |
| `tb_apb_master_fsm` | 416 transfers to 16 peripherals with 0 to 5 wait states; SETUP exactly 3 edges after the request toggle, ENABLE exactly 1 + *W* cycles, exact APB signal values, read data and PSLVERR |
| `tb_axi_slave_fsm` | 600 random transfers plus read-priority scenarios; PCLK side emulated; all write orderings, RREADY/BREADY stalls, DECERR never forwarded |
| `tb_axi2apb_bridge` | the whole bridge at default parameters. 16 peripheral models with random wait states, three clock relations (PCLK slower, faster, equal with offset), 750 random transfers plus 9 read-priority scenarios, an APB monitor, and read-latency bounds. It fails if any mechanism (wait state, SLVERR, DECERR, priority, stalls, write orderings, clock phase) never occurred |

`tb/apb_slave_model.sv` is a behavioural APB4 peripheral used by the
testbenches. It is a 16-word register file with random or fixed wait states,
and it raises PSLVERR at addresses whose bits [11:8] are all ones.

Run a testbench with Verilator 5, for example the full one:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb rtl/axi2apb_pkg.sv tb/tb_axi2apb_bridge.sv \
  --top-module tb_axi2apb_bridge
./obj_dir/Vtb_axi2apb_bridge
```

Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/axi2apb_pkg.sv rtl/axi2apb_bridge.sv`.

## Files

- `rtl/axi2apb_pkg.sv`: widths, `apb_req_t`, `apb_rsp_t`, response codes.
- `rtl/axi2apb_bridge.sv`: top level; AXI4-Lite slave ports and APB master
  ports.
- `rtl/axi_slave_fsm.sv`: ACLK side: buffers, arbitration, DECERR, response
  hold.
- `rtl/apb_master_fsm.sv`: PCLK side: IDLE/SETUP/ENABLE, wait states, result
  capture.
- `rtl/addr_decoder.sv`: address map.
- `rtl/sync2.sv`: multi-flop synchroniser.
- `tb/`: testbenches and the peripheral model.
