# Non-cacheable mirroring for an MMU-less cached processor

A small embedded system with one cache and several bus masters has a coherency
problem. Another master (DMA, an I/O engine, a second processor) can change
memory that the processor holds in its cache. Without an MMU there are no page
attributes to mark shared data as uncached. The usual fix adds range registers
or pointer registers plus comparators in front of the cache. Their count limits
how many non-cacheable areas can exist, and their granularity limits how small
an area can be.

This design needs neither. The physical memory is 1 GByte, so bit 31 of the
32-bit processor address is never needed to reach memory. That bit becomes a
**non-cacheable indicator**:

* `0x0000_0000 .. 0x7FFF_FFFF`: the normal address space. Accesses are cached
  as usual.
* `0x8000_0000 .. 0xFFFF_FFFF`: the *mirroring area*. It is an alias of the
  same physical memory. Any access here bypasses the cache completely.

Bit 31 is cleared before the address goes anywhere else. The cache tags, the
memory controller and the memory never see it: an access to `0x80FD_0000`
reaches memory as `0x00FD_0000`. Software picks cached or uncached access per
variable, simply by choosing which address it uses for that variable. Every
byte of memory can be reached both ways. The hardware is one wire plus a
masking condition in the cache controller.

## The rule software must follow, and why

The cache works on 4-word blocks. Marking one word non-cacheable does not keep
it out of the cache. Suppose word `0x00FD_0000` is shared with another master,
and its neighbour `0x00FD_0004` is private and cached. A read miss on the
neighbour fills the whole block `0x00FD_0000..0x00FD_000C`, so the shared word
lands in the cache too. The hardware cannot prevent this.

So the rule is: **a shared variable is only ever accessed through its mirror
address.** Here that address is `0x80FD_0000`. Mirrored accesses never look at
the cache. Any copy of the word that sits in the cache therefore goes stale
harmlessly, because it is never read. If software reads the word through its
plain address, it may get that stale copy. The end-to-end testbench shows both
cases.

In C this comes down to defining the shared variable at its mirror address:

```c
#define SHARED  (*(volatile unsigned *)0x80FD0000)  /* uncached alias */
#define PRIVATE (*(volatile unsigned *)0x00FD0004)  /* cached         */
```

Because the choice is made per address, a non-cacheable "area" can be anything
from one byte to the whole memory. A single byte store through the mirror uses
the byte enables and changes only that byte in memory.

## How an access is handled

`nc` is bit 31 of the processor address. `addr` is the address with bit 31
cleared.

| access                  | cache                                        | memory bus                           | data to CPU          |
|-------------------------|----------------------------------------------|--------------------------------------|----------------------|
| `nc=1` read             | not looked up, not filled                    | one word read at `addr`              | from memory          |
| `nc=1` write            | not looked up, not updated (even if resident) | one word write at `addr`, byte enables | —                    |
| `nc=0` read, hit        | block word returned                          | none                                 | from cache           |
| `nc=0` read, miss       | whole block filled, tag set, then re-looked up | 4 word reads, block-aligned, in order | from cache (re-lookup) |
| `nc=0` write, hit       | resident word updated (byte enables)         | one word write (write-through)       | —                    |
| `nc=0` write, miss      | not allocated                                | one word write                       | —                    |

Masking the cache, the block fill on a read miss and the memory controller
answering masked reads are all part of the scheme. Everything about writes
other than the masked case is this design's own choice. The choice is
write-through with no allocate on a miss, so memory always holds the latest
data that other masters might read.

## Structure

```
            cpu_*                        mc_*                     mem_*
 processor ------> [decoder] --> cache_ctrl -------> mem_ctrl -----------> external memory
                    bit 31 -> nc    |
                    cleared   cache_mem (valid, tag, 4-word blocks)
```

* `rtl/nc_cache_system.sv`: the top. It holds the decoder, which is pure
  wiring: `nc = cpu_addr[31]`, and the address is passed on with bit 31 set to
  0. It also instantiates the cache controller and the memory controller. The
  processor and the memory are outside the module and connect through the
  `cpu_*` and `mem_*` ports. `ev_hit`, `ev_miss` and `ev_bypass` pulse for
  cache hits, block fills and masked accesses. `ev_hit` also pulses on the
  re-lookup after a fill.
* `rtl/cache_ctrl.sv`: a three-state controller (idle, single transfer, block
  fill). It applies the table above and owns the cache storage.
* `rtl/cache_mem.sv`: a direct-mapped array of valid bits, tags and 4-word
  blocks. Reads are combinational, writes are clocked. Word writes take byte
  enables. Reset clears only the valid bits.
* `rtl/mem_ctrl.sv`: runs a single-word access, or a 4-word block fill starting
  at word 0 of the block. It hands each returned word back with its index.
* `rtl/nc_pkg.sv`: the shared defaults.

Address fields at the default sizes (64 lines, 4 words per block, 32-bit
words): bits 1:0 select the byte, 3:2 the word, 9:4 the line, and 30:10 form
the 21-bit tag. Bit 31 is the indicator and is never part of the tag.

## Interfaces and timing

Both interfaces use a request that is held until it is acknowledged.

* **Processor side:** `cpu_req` stays high, with `cpu_we`, `cpu_addr`,
  `cpu_wdata` and `cpu_be` stable, up to and including the cycle in which
  `cpu_ack` is high. Read data is valid in that cycle. The processor must drop
  `cpu_req`, or present a new access, in the next cycle.
* **Memory bus:** `mem_req` stays high, with its fields stable, until
  `mem_ack`. Read data is valid together with `mem_ack`. A write is taken on
  the acknowledging edge. A fill is four such transfers back to back.

Latency is counted in cycles after the cycle in which the request is first
presented. W is the number of wait cycles the memory inserts before each
`mem_ack`.

| access                  | cycles to `cpu_ack`     |
|-------------------------|-------------------------|
| cacheable read hit      | 0 (same cycle)          |
| masked read or write, cacheable write | W + 2     |
| cacheable read miss     | 4·(W + 1) + 2           |

Both handshakes, the latencies and the burst order are this design's own
choices. The scheme does not fix a bus protocol.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `ADDR_W`  | 32      | the scheme: 32-bit addresses |
| `NC_BIT`  | 31      | the scheme: the MSB is the indicator |
| `DATA_W`  | 32      | 32-bit ARM words |
| `WPL`     | 4       | the scheme: 4-word cache blocks |
| `LINES`   | 64      | own choice (1 KByte cache); the scheme gives no cache size |

`LINES` and `WPL` must be powers of two. The scheme assumes a 1 GByte physical
memory. The RTL does not check that limit: bit 30 passes through unchanged, so
memories up to 2 GByte also work.

## What is not here

* The processor and the external memory are existing parts. They are not
  designed here.
* Other bus masters, and any arbitration between them and this memory
  controller, are not described by the scheme and are not included. The
  testbenches stand in for them by writing the memory model directly.
* There are no cache maintenance operations (flush, invalidate). The scheme
  needs none, because shared data is only reached through the mirror.
* The designs this scheme replaces are not included. Those are start/end
  address registers, and fixed-size pointer registers with comparators.

## Simulation

The testbenches in `tb/` check their own results. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_nc_cache_system`: the whole system at default parameters, against
  `tb/ext_mem_model.sv`, a behavioural memory with sparse storage over the
  full address space and a settable wait count. It covers four things:
  1. The example program: a private word cached next to a shared word that is
     used only through its mirror.
  2. Another master rewriting memory. The mirrored read sees the new value; a
     plain-address read returns the stale cached copy.
  3. A 64 KByte uncached area at `0x0C01_0000..0x0C01_FFFF`, reached through
     `0x8C01_xxxx`. It must cause no fills.
  4. 4000 random accesses.

  Every read and every latency is checked against the reference model in
  `tb/cache_ref_pkg.sv`. It also checks that bit 31 never reaches the bus.
  Each mechanism must occur at least once: hit, fill, masked read, masked
  write, masked access to a resident block, stale read, write hit, write miss
  and other-master write.
* `tb_cache_ctrl`: the controller with the memory controller and the memory
  model, using a 4-line cache to force conflicts.
* `tb_mem_ctrl`: single accesses and fills, including bus addresses, beat order
  and latency.
* `tb_cache_mem`: the storage arrays against a reference copy.

With plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_nc_cache_system \
    rtl/nc_pkg.sv tb/cache_ref_pkg.sv tb/tb_nc_cache_system.sv
./obj_dir/Vtb_nc_cache_system
```

Each test runs in well under a second. The RTL holds assertions for both
handshakes, plus one stating that a masked access never writes the cache
storage. Run with `--assert` to enable them.
