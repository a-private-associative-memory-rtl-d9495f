# Scratchpad accelerator: a private, associative memory for a RISC-V core

Caches decide on their own what to keep and what to evict. That makes access
times hard to predict, and it leaves traces that other programs can observe.
This design gives software a second memory next to the L1 cache, which only
software controls. It is a small scratchpad attached to a RISC-V core as a
RoCC coprocessor (RoCC is the Rocket Chip's custom-coprocessor port). Custom0
instructions drive it directly.

- Data enters only through a write instruction and leaves only on a read,
  a remove or a region clear. Nothing is evicted behind the program's back,
  and every access takes the same time.
- The storage is organised like a set-associative cache. An address selects
  a set, and its upper bits form a tag that is matched against every way of
  that set at once. A program can use the tag as a key, so one set becomes a
  small hardware key-value store.
- The storage is split into **stripes**. A process reserves a power-of-two
  group of stripes as a **region** and can reach only its own regions while
  its process ID (PID) is the current one.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. By default it is
built in the evaluated configuration: 1 KiB of storage, 8-byte lines, 8 ways
(16 sets), 48-bit addresses and 4 stripes, with the privilege check on Set PID
off.

## Instruction set

All instructions use the RISC-V custom-0 major opcode (`0001011`). Bit 31
(`mode`) separates the three data accesses from the special instructions.

```
access   31 | 30:29 | 28:25      | 24:20        | 19:15        | 14 13 12  | 11:7         | 6:0
          0 | size  | offset[8:5]| rs2 / offset | rs1 / offset | xd xs1 xs2| rd / offset  | custom0
special  31 | 30:29 | 28:25      | 24:20        | 19:15        | 14 13 12  | 11:7         | 6:0
          1 | imm   | opcode     | rs2          | rs1          | xd xs1 xs2| rd           | custom0
```

The three accesses need only two registers each. The third register field
therefore carries the low five bits of a 9-bit unsigned byte offset. The
accesses are told apart only by their `xd xs1 xs2` pattern:

| Instruction | xd xs1 xs2 | address | value | offset[4:0] in | result |
|---|---|---|---|---|---|
| Put    | 011 | rs2 | rs1 | rd field  | none |
| Get    | 110 | rs1 | –   | rs2 field | value read |
| Remove | 111 | rs2 | –   | rs1 field | value removed |

`size` is log2 of the byte count (0 = 1 byte … 3 = 8 bytes). The address is
the register plus the offset. It must be aligned to the size.

| opcode | Instruction | operands | result |
|---|---|---|---|
| 0100 | Reserve Region    | stripe count in bits 24:20 | region index, 0 on failure |
| 0101 | Set Region        | region index in rs2 | – |
| 0110 | Clear Region      | region index in rs2 | – |
| 0111 | Free Region       | region index in rs2 | – |
| 1001 | Load Reserved     | size in 30:29, address in rs1 | value |
| 1000 | Store Conditional | size, address in rs2, value in rs1 | 0 success, 1 failure |
| 1010 | Investigate Error | – | latest error code |
| 1011 | Get Parameters    | – | configuration word |
| 1100 | Get Owned Regions | – | mask of stripes owned by the current PID |
| 1111 | Set PID           | new PID in rs2 | – |

Opcodes 0000–0011, 1101 and 1110 are free. They currently decode as
illegal instructions.

The Get Parameters word holds the six configuration parameters:
bits 15:0 total bytes, 23:16 line bytes, 31:24 ways, 39:32 address bits,
bit 40 protection, 55:48 stripes.

## Regions and address mapping

Regions are the hardest part of the design to follow, and also its central
idea.

**Stripes and regions.** With `STRIPES` stripes, each stripe is
`SETS/STRIPES` consecutive sets, and it spans all ways. A region is an
aligned block of 1, 2, 4 … `STRIPES` stripes. A *stripe table* records, for
every stripe, whether it is taken and which PID took it.

**Region index.** A region is named by its node number in a binary tree over
the stripes: `index = STRIPES/n + base/n` for `n` stripes starting at stripe
`base`. With 4 stripes:

| index | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|
| stripes | 0–3 | 0–1 | 2–3 | 0 | 1 | 2 | 3 |

Index 0 is never a region, so a zero result from Reserve Region signals
failure. The index fits in 5 bits for up to 16 stripes. Reserve Region takes
the lowest-numbered free block of the requested size. It records the current
PID in the stripe table and returns the index. It does not select the region:
a program follows it with Set Region.

**Mapping an address into the region.** Any 48-bit address is accepted, and
the hardware bends it into the current region. Call `LOGS = log2(STRIPES)`.
The top `LOGS` bits of the set index are the stripe field. The region has a
*Region Width* `p`, the position of the highest set bit of its index, which
is `LOGS - log2(n)`. It also has *Region Bits*, its lowest stripe. The top
`p` bits of the stripe field are replaced by the same bits of Region Bits.
The lower stripe bits still select among the region's own stripes.

Example with 4 stripes and 16 sets (`set = addr[6:3]`, stripe field =
`set[3:2]`):

| region | Region Width | Region Bits | set used for raw set `s` |
|---|---|---|---|
| 1 (whole pad) | 0 | 00 | `s` |
| 2 (stripes 0–1) | 1 | 00 | `{0, s[2:0]}` |
| 7 (stripe 3) | 2 | 11 | `{11, s[1:0]}` |

The replaced bits are not lost. They are stored with the tag in the
metadata. Two addresses that differ only in those bits therefore remain two
distinct lines, which compete for the ways of one set. Without this, they
would silently overwrite each other. It also means the original address can
always be recovered from a line. The two regions therefore behave as
separate address spaces: the same pointer in two regions reaches two
different lines.

**Checks.**
- A data access is allowed only if a region is selected and all of its
  stripes are taken by the current PID. Otherwise it fails with Bad Location
  Reference.
- Set, Clear and Free Region need a valid index whose stripes are all owned
  by the current PID. Otherwise they fail with Bad Stripe Reference.
- Reserve Region fails with Bad Stripe Reference if the count is not a power
  of two up to `STRIPES`, and with Out of Stripes if no aligned block is free.
- Freeing the selected region also deselects it.
- With `PROTECT = 1`, Set PID from user mode (privilege 0) fails with
  Unauthorized Instruction.

The operating system is expected to issue Set PID on every context switch
and to free a finished process's stripes, using Get Owned Regions.

## Associative storage

Every line has an in-use bit, a tag and one valid bit per byte. For every
access, all ways of the (mapped) set are searched in parallel:

- **Get, Load Reserved.** A line in use with a matching tag must have every
  addressed byte valid. Otherwise the access fails with Bad Location
  Reference.
- **Remove.** The same check applies. The value is returned and its bytes are
  marked invalid. A line with no valid byte left leaves use.
- **Put, Store Conditional.** The matching line is used if there is one,
  otherwise the lowest free way. If there is neither, the access fails with
  Out of Space. The written bytes become valid.
- **Clear Region, Free Region.** Every line of the region's sets is emptied.

Load Reserved records the line, its bytes and a `stillReserved` flag. The
reservation ends on any Put or Remove to that line, on a clear of its set,
on a new Load Reserved, and after every Store Conditional. A Store
Conditional writes only if the reservation still holds for the same line,
with bytes inside the reserved ones. If it does not write, it returns 1
without raising an error.

The data itself sits in one single-port synchronous RAM per way, with a
byte-write mask. Lines are little-endian. A read returns the addressed bytes
shifted down and zero-extended.

## Pipeline and timing

```
cycle 0  command accepted: decode -> protection check + set mapping
         -> metadata lookup -> error selection; on the closing edge all
         state updates and the RAM write or read happen
cycle 1  the read line is shifted and masked; the response (0 after an
         error) goes to the core, or into the response queue if the core
         is not ready; an error pulses `interrupt`
```

- One command can be accepted every cycle. A command with a result answers
  in the next cycle when nothing is queued.
- No forwarding is needed: a write lands on the edge before the next
  instruction can read.
- The response queue (`RESP_DEPTH`, 4) absorbs core stalls. `cmd_ready`
  drops when the queue could not take one more response.
- Errors are found in cycle 0, before anything changes. An erring
  instruction therefore has no effect, and no younger instruction is in
  flight that would need cancelling.

## Errors

| code | meaning | raised by |
|---|---|---|
| 0 | No Error | |
| 1 | Out of Space | write with no matching or free way |
| 2 | Unauthorized Instruction | Set PID from user mode with protection on; illegal instruction |
| 3 | Out of Stripes | Reserve Region with no free block |
| 4 | Bad Location Reference | access outside an owned region, to invalid bytes, or misaligned |
| 5 | Bad Stripe Reference | bad stripe count or region index, or a region not owned |

- When several units object at once, the decoder wins over protection, and
  protection wins over the metadata.
- On an error, the response (if the instruction has one) is 0, and
  `interrupt` pulses for one cycle.
- The code is kept for Investigate Error. A successful Set PID resets it to
  0, so a process does not read the error of the process before it.

## Files

| file | content |
|---|---|
| `rtl/spad_pkg.sv` | instruction layout, opcodes, error codes, decoded-operation struct |
| `rtl/spad_decoder.sv` | instruction decoder (combinational) |
| `rtl/spad_protection.sv` | stripe table, PID, current region, set mapping |
| `rtl/spad_metadata.sv` | in-use/tag/valid bits, way choice, reservation |
| `rtl/spad_data.sv`, `rtl/spad_way_ram.sv` | per-way RAMs and read alignment |
| `rtl/spad_error.sv` | error priority, latest error, interrupt |
| `rtl/spad_response.sv` | response queue with bypass |
| `rtl/scratchpad_accelerator.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two whole-design programs (SHA-256, protected mode) |

Top-level parameters:

| parameter | default | rule |
|---|---|---|
| `TOTAL_BYTES` | 1024 | `TOTAL_BYTES / (LINE_BYTES * WAYS)` sets, a power of two, below 64 KiB |
| `LINE_BYTES` | 8 | power of two, at least 8 |
| `WAYS` | 8 | at least 1 |
| `ADDR_BITS` | 48 | up to 64 |
| `PROTECT` | 0 | 0 or 1 |
| `STRIPES` | 4 | power of two, at most 16 and at most the number of sets |
| `PID_BITS` | 32 | |
| `RESP_DEPTH` | 4 | at least 2 |

The top-level ports are plain RoCC-style signals:

- command: `cmd_valid/ready`, `cmd_inst`, `cmd_rs1`, `cmd_rs2`, and
  `cmd_prv`, the privilege level from the core's status CSR;
- response: `resp_valid/ready`, `resp_rd`, `resp_data`;
- status: `interrupt`, and `busy`, which is high while a response is owed.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops with a
watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/spad_pkg.sv \
          tb/tb_scratchpad_accelerator.sv --top-module tb_scratchpad_accelerator
./obj_dir/Vtb_scratchpad_accelerator
```

Replace the testbench name to run another one.

`tb_scratchpad_accelerator` runs the top at its default parameters and plays
the core. It encodes instructions from the tables above and checks every
response against values it computes itself. It runs these programs:

- a sorted array of 1..256 that fills the whole 1 KiB, searched by
  predecessor binary search for 255 and 128, then read back with 256
  pipelined Gets;
- an in-place quicksort of 256..1 held in the scratchpad;
- one set used as an 8-entry key-value store, where the ninth key is
  refused;
- a 128-pair hash table with bucket-level linear probing, filled until
  every line of the pad is used;
- two 2-stripe regions, each holding a 64-word array at the same addresses;
- Load Reserved and Store Conditional success and failure, Remove, Clear
  and Free Region, and a second process that is denied access;
- a phase with random response stalls.

It checks that 256 back-to-back Puts and 256 back-to-back Gets are each
accepted in 256 cycles. It also checks that an unqueued response arrives one
cycle after acceptance, and that every error code reachable at the default
configuration occurs. Two more programs run on the whole design:

- `tb_scratchpad_sha256` computes SHA-256 at the default parameters. The 64
  round constants sit in one 2-stripe region and the 64-word message
  schedule in the other, both at the same base address. Every array access
  is a Get or Put with the word offset in the immediate. The digests of
  `""`, `"abc"` and the 448-bit standard message must match their published
  values. The constants are computed as root fractions of the first primes,
  not tabulated.
- `tb_scratchpad_protected` runs with `PROTECT = 1`. It plays an operating
  system that switches between two processes. A user-mode Set PID must be
  refused and must leave the PID unchanged. The second process is shut out
  of the first one's region, and leaked stripes are found with Get Owned
  Regions and freed at teardown.

## How far it follows the original design, and where it is our own

Taken from the original design:

- the instruction formats and opcodes;
- the stripe, region, PID and privilege scheme, with Region Bits and
  Region Width;
- the per-line in-use, tag and byte-valid metadata and its rules;
- the per-way RAMs with byte masks;
- the error codes, the zero response and the interrupt;
- the two-cycle pipeline with one instruction per cycle and a response
  queue.

Choices made here where the original is silent or unclear:

- the region-index numbering;
- keeping the region-replaced set bits in the tag;
- the register (rs2) holding the region index and the PID;
- the size encoding, little-endian lines and zero extension;
- lowest-free-way placement;
- the byte rule for Store Conditional and when reservations end;
- the interrupt as a one-cycle pulse;
- resetting the error code on Set PID;
- reporting illegal instructions as Unauthorized Instruction;
- the Get Parameters layout;
- the response-queue depth and bypass;
- the 32-bit PID.

Not included:

- the host core and SoC, which the ports stand in for;
- the seven-segment debug display that the original implementation used
  during bring-up.
