# AXI memory slave with per-channel state machines

This is an AXI slave that fronts a small on-chip memory of 128 words × 32 bits, addressed by byte. It implements all five AXI channels: write address (AW), write data (W), write response (B), read address (AR) and read data (R). It handles FIXED, INCR and WRAP bursts of 1 to 16 beats. Each channel runs its own small finite state machine. Together they take one write and one read at a time, and the write and the read proceed independently and may overlap. The slave is meant as the memory end of a single-master, single-slave AXI system. A verification master drives it; that master is not part of the RTL.

The signal set is AXI3-style: 4-bit IDs, 4-bit burst lengths (`awlen`/`arlen` = beats − 1), 3-bit sizes, a 32-bit address, 32-bit data and four byte strobes. `wid` is present.

## How a write places its bytes

This part differs most from a textbook AXI slave, so read it first.

The write path does **not** put byte lane *i* of `wdata` at byte address `addr + i`. Instead, it takes the lanes whose `wstrb` bit is set and packs them, lowest lane first, into **consecutive** byte addresses starting at the beat's address:

| beat address | `wstrb` | `wdata`       | bytes written                            |
|--------------|---------|---------------|------------------------------------------|
| 0x10         | `1111`  | `0xDDCCBBAA`  | 0x10=AA 0x11=BB 0x12=CC 0x13=DD          |
| 0x10         | `1010`  | `0xDDCCBBAA`  | 0x10=BB 0x11=DD                          |
| 0x10         | `0001`  | `0xDDCCBBAA`  | 0x10=AA                                  |

The address of the next beat depends on the burst type:

- **FIXED**: every beat starts again at the same address.
- **INCR**: the address advances by the number of bytes just written, which is the number of set strobe bits. With `wstrb = 0011`, the next beat starts 2 bytes further on. The bytes of successive beats therefore lie back to back with no holes, whatever the strobes.
- **WRAP**: the address also advances by the bytes written, but stays inside a region of `(awlen+1) << awsize` bytes. The region is aligned to its own size. When the address reaches the top of the region, it continues at the bottom, modulo the region size. AXI allows WRAP only with 2, 4, 8 or 16 beats, which makes the region a power of two. Other lengths are not checked. The bytes of a single beat are always written consecutively, even if they run past the region's upper bound.

On the write side, `awsize` moves no data. It only sets the size of the WRAP region and is checked for the response.

Reads are conventional. Each beat returns `1 << arsize` bytes, from the beat address upward, in lanes 0 upward, with the unused upper lanes zero. The address then advances by `1 << arsize`, with the same FIXED, INCR and WRAP rules. If a block is written with all strobes set and read back with `arsize = 2` and the same burst, the read returns the words as written. This is the round trip the reference transaction below exercises.

## Address range and responses

The memory covers byte addresses 0 to 511: 128 words of 4 bytes, with byte address `a` held in word `a >> 2`, lane `a[1:0]`. A write or read run may start at any byte and straddle two words.

| channel | condition                                             | response           |
|---------|-------------------------------------------------------|--------------------|
| B       | every beat's bytes lie below 512 and `awsize <= 3`    | OKAY (`00`)        |
| B       | some beat would pass byte 511                         | DECERR (`11`)      |
| B       | all beats in range, but `awsize > 3`                  | SLVERR (`10`)      |
| R, per beat | beat's bytes lie below 512 and `arsize <= 2`      | OKAY, data         |
| R, per beat | beat would pass byte 511                          | DECERR, data 0     |
| R, per beat | `arsize > 2` (more than the 32-bit bus)           | SLVERR, data 0     |

A write beat that would pass the end of memory stores nothing. The other beats of that burst are still stored.

A write answered SLVERR because of its size still stores its in-range bytes: the size check only decides the response.

The write limit `awsize <= 3` (8 bytes) is wider than the bus. It is kept because `awsize` does not affect where write data goes.

Every read burst returns exactly `arlen + 1` beats, errored or not, and `rlast` marks the last one.

## The five state machines

Each FSM has its own module. The state names below are the ones used in the code.

**Write address** (`axi_wr_addr_fsm`): `AWIDLE → AWSTART → AWREADY → AWIDLE`.
- `AWIDLE` keeps `awready` low. It moves on once reset is released and the previous write has been answered.
- `AWSTART` waits for `awvalid`, then records `awid`, `awaddr`, `awlen`, `awsize` and `awburst`.
- `AWREADY` drives `awready` high for one cycle. Because AXI holds `awvalid` high until ready, this completes the handshake.

**Write data** (`axi_wr_data_fsm`): `WIDLE → WSTART → WADDR_DEC → WREADY → (WVALID → WSTART | WIDLE)`.
- `WIDLE` clears the beat counter and the first-beat flag.
- `WSTART` waits for `wvalid` and a recorded address.
- `WADDR_DEC` chooses the beat address (the start address on the first beat, the computed next address afterwards). It writes the packed bytes to memory and computes the next address. The memory is written before `wready` rises. This is safe because AXI keeps `wdata` stable while `wvalid` waits.
- `WREADY` drives `wready` high for one cycle and looks at `wlast`. With `wlast` set the burst ends; otherwise `WVALID` counts the beat.

**Write response** (`axi_wr_resp_fsm`): `BIDLE → BDETECT_LAST → BSTART → BWAIT → BIDLE`.
- `BDETECT_LAST` waits for the data FSM to finish the burst.
- `BSTART` forms `bresp`.
- `BWAIT` holds `bvalid`, `bid` and `bresp` until `bready`.
- The B handshake releases the write address channel for the next write.

**Read address** (`axi_rd_addr_fsm`): `ARIDLE → ARSTART → ARREADY → ARIDLE`. It mirrors the write address FSM and is released after the last read beat.

**Read data** (`axi_rd_data_fsm`): `RIDLE → RSTART → (RERROR →) RWAIT → RVALID → (RSTART | RIDLE)`.
- `RSTART` checks the beat's address and size and fetches its bytes.
- `RERROR` replaces the data with an error response.
- `RWAIT` holds `rvalid`, `rdata`, `rresp` and `rlast` until `rready`. The handshake increments `len_count` and advances the address.
- `RVALID` ends the burst when `len_count == arlen + 1`.

### Timing

These figures assume a master that never stalls:

| event                                   | cycles |
|-----------------------------------------|--------|
| address accepted after `valid` rises (FSM waiting) | 2 |
| write beat to write beat                | 4      |
| last write beat to `bvalid`             | 2      |
| read address accepted to first `rvalid` | 2      |
| read beat to read beat                  | 3 (4 for an error beat) |

An 8-beat INCR burst therefore needs a single address handshake instead of eight. Throughput is limited by the per-beat FSM walk, not by the memory. The design keeps a one-to-one correspondence between cycles and the state sequences above, rather than streaming a beat per cycle.

## Where this RTL makes its own choices

The items below are not dictated by the state machines above. They are choices made for this RTL, or differences from plain AXI:

- **One transaction per direction.** A new write address is accepted only after the previous write's B handshake. A new read address is accepted only after the previous burst's last R beat. There are no outstanding queues and no reordering. IDs are simply echoed back.
- **`rvalid` does not wait for `rready`.** In the read FSM, the wait-for-ready state holds `rvalid` high, as AXI requires.
- **Error beats are handshaked.** An error beat on R goes through the same handshake as a good beat, so the master always sees `arlen + 1` beats.
- **Error codes.** DECERR for an address outside the memory, SLVERR for an unsupported size. When both apply, DECERR wins.
- **`wid` is not checked.** It is accepted but not compared with `awid`. With one write in flight it carries no information.
- **Reset and memory contents.** Reset is synchronous and active low. The memory array is not reset.
- **Reserved burst type.** Burst type `2'b11` is treated as INCR.
- **Odd WRAP lengths.** WRAP lengths other than 2, 4, 8 or 16 beats are not rejected. The region then is not a power of two, the mask arithmetic no longer describes a contiguous region, and the address sequence is not meaningful.

## Files

`rtl/`, one unit per file:

| file                  | contents                                                      |
|-----------------------|---------------------------------------------------------------|
| `axi_pkg.sv`          | widths, `burst_e`, `resp_e`, the request struct `ax_req_t`, strobe popcount |
| `axi_slave.sv`        | top level: the five FSMs and the memory, plain AXI ports, parameter `MEM_DEPTH = 128` |
| `axi_wr_addr_fsm.sv`, `axi_rd_addr_fsm.sv` | address channel FSMs                      |
| `axi_wr_data_fsm.sv`  | write data FSM, strobe packing, write address walk            |
| `axi_wr_resp_fsm.sv`  | write response FSM                                            |
| `axi_rd_data_fsm.sv`  | read data FSM, per-beat checks, `len_count`                   |
| `axi_burst_addr.sv`   | combinational FIXED/INCR/WRAP next-address unit, shared by both data FSMs |
| `axi_byte_mem.sv`     | 128 × 32-bit memory with a 0–4-byte run write port and a 4-byte combinational read port |

The FSMs carry SVA assertions for the AXI stability rules: a valid signal and its payload hold until ready, and `wlast` falls on beat `awlen + 1`.

`tb/` holds one self-checking testbench per module (`<module>_tb.sv`) and the AXI signal bundle `axi_if.sv`. The block testbenches compare against independent models. For example, the WRAP rule is modelled with a modulo where the RTL uses a mask.

`axi_slave_tb` is the end-to-end test at the default size. It runs:
- the reference transaction: an 8-beat INCR write of size 2 with all strobes, ID 9, data 6, 3, a, 7, 1, 4, 6, 3 to address 0x5, then the matching read. It checks the data, the OKAY responses and the 4-cycle and 3-cycle beat rates;
- 150 random write/read-back pairs;
- directed error cases;
- 60 overlapping writes and reads with random valid gaps and ready stalls;
- a check that a second write address is held off while a write is open.

It counts how often each mechanism occurred (each burst type, WRAP turn-round, partial strobes, each response code, B and R back-pressure, W gaps, address hold-off, read/write overlap) and fails if any count is zero.

`axi_slave_waveform_tb` replays the reference transaction cycle by cycle with `wvalid`, `bready` and `rready` held high. It checks the state codes each FSM passes through: write address 0, 1, 2; write data 1, 4, 2, 3 per beat; write response 1, 2, 3, 0. It also checks the beat counters and the read beat addresses 0x5, 0x9, 0xd … 0x21.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module axi_slave_tb \
    -y rtl -y tb +libext+.sv -Irtl rtl/axi_pkg.sv tb/axi_slave_tb.sv -o sim
./obj_dir/sim
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. Replace `axi_slave_tb` with any other `*_tb` to run a single block. For lint only:

```sh
verilator --lint-only -Wall -Irtl rtl/axi_pkg.sv rtl/axi_slave.sv -y rtl
```

To change the memory size, set `MEM_DEPTH` (in 32-bit words) on `axi_slave`. The valid byte range and the error checks follow it. The bus widths are fixed by `axi_pkg`: the strobe-packing logic assumes four byte lanes.
