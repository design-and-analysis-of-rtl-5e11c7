# Multi-read-port memories by bank division with XOR (BDX)

An FPGA memory built from slice logic gives each storage array a small, fixed
number of read ports. The usual way to get more read ports is to replicate
the whole memory once per pair of readers. Bank division with XOR (BDX) does
better. It spreads the words over four banks and keeps a fifth, the **XOR bank**,
which holds the XOR of the four banks at each offset:

    X[o] = MB0[o] ^ MB1[o] ^ MB2[o] ^ MB3[o]

Any word can then be read in two ways:

* **directly**, from its own bank, or
* **by recovery**, when its bank has no free read port:
  `MBb[o] = X[o] ^ (XOR of MBk[o] for the three banks k != b)`.

Two reads that would collide in one bank can therefore both be served. The
price is that every write must also rewrite `X[o]`. This **read update (Ru)**
reads the three other banks at the written offset and stores
`W ^ MBk[o] ^ MBl[o] ^ MBm[o]` in the XOR bank. That happens in the same
clock cycle as the write.

This repository holds four memories built this way, plus their building
blocks. All are in synthesizable SystemVerilog with 8-bit words and
512-word banks by default:

| module | ports per cycle | idea |
|---|---|---|
| `bdx_2r1w` | 2 reads + 1 write | basic BDX: the second read is recovered on a bank conflict |
| `bdx_2r1w_4r` | 2 reads + 1 write, **or** 4 reads | hybrid: the mode follows the write request |
| `bdx_hbdx_4r1w` | 4 reads + 1 write | hierarchical BDX: BDX over five `bdx_2r1w_4r` modules |
| `bdx_kr1w` | K reads + 1 write | K/2 replicated `bdx_2r1w` with a common write |
| `bdx_top` | - | `bdx_hbdx_4r1w` and `bdx_kr1w` side by side |

## Address map and word storage

Every memory holds `4*DEPTH` words of `WIDTH` bits. A word address is
`{bank[1:0], offset[log2(DEPTH)-1:0]}`: the two most significant bits pick
the bank. `DEPTH` is the depth of one bank, and it must be a power of two.
`bdx_hbdx_4r1w` also needs `DEPTH >= 8`.

`bdx_bank` is one storage array. It is used for the memory banks and for the
XOR bank alike. It has:

* one synchronous write port;
* `NRD` asynchronous read ports, two by default.

Slice RAM behaves this way, and the design uses no block RAM. A read shows the
contents before the next rising edge, so reading the word being written
returns the old word. Each memory gives the same read-old behaviour, because
the XOR bank and the data bank change at the same edge.

**Clearing after reset.** The XOR identity only holds if the banks start
consistent, so every bank clears itself. Each bank has its own
`bdx_addr_counter`. After reset it writes zero at address 0, 1, …, DEPTH-1,
one per clock, and then raises `ready`. A memory's `ready` is the AND of its
banks' `ready`. Writes before `ready` are ignored, and reads return
meaningless data. Clearing takes `DEPTH` cycles for `bdx_2r1w`, `bdx_2r1w_4r`
and `bdx_kr1w`. It takes `DEPTH/4` cycles for `bdx_hbdx_4r1w`, whose banks
are made of quarter-size sub-banks.

## `bdx_2r1w`: the basic scheme

Each of the four memory banks has two read ports. Port 0 serves data reads.
Port 1 is kept for the read update.

* Read 0 always reads its bank directly.
* Read 1 reads its bank directly if that bank differs from read 0's. If both
  reads hit the same bank, read 1 is recovered from the other three banks and
  the XOR bank at its own offset. `r1_recon` shows when this happens.
* A write stores `W` in its bank. Through port 1 of the other three banks it
  also stores the new XOR word.

## `bdx_2r1w_4r`: two modes and a port budget

This module has the same five banks, each with two read ports. Its behaviour
depends on whether a write is requested.

* **2R1W mode** (`we = 1`, `mode = MODE_2R1W`). Reads 0 and 1 are served,
  and reads 2 and 3 return zero. The read update takes one port on each bank
  that is not written. The written bank and the XOR bank keep one read port
  each, because they are being rewritten.
* **4R mode** (`we = 0`, `mode = MODE_4R`). All four reads are served, and
  every module offers both of its ports.

Both modes use the same rule, implemented in `bdx_port_alloc`. The ports of
the cycle are handed out in a fixed order: first the read update, then reads
0 to 3.

* A read takes a free port of its own bank if there is one.
* Otherwise it takes one port on each of the other four modules (three banks
  and the XOR bank). Its word is the XOR of what they return.

For each read, the allocator returns a mask of modules and the port number
used on each. The read data is the XOR of those port outputs, so a direct
read is a mask with one bit set. The resulting behaviour:

* **2R1W mode:** read 1 is recovered exactly when it shares read 0's bank.
* **4R mode:** a read is recovered exactly when two earlier reads of the
  same cycle already use its bank. Four reads of one bank give two direct
  words and two recovered ones.

The port budget always fits. An assertion (`a_no_overflow`) checks this.
`rd_recon[i]` flags reads that were recovered.

## `bdx_hbdx_4r1w`: BDX applied twice

The 4R1W memory repeats the scheme one level up. Its four memory banks and
its XOR bank are each a `bdx_2r1w_4r` module of `DEPTH` words, built from
`DEPTH/4`-word sub-banks. A module that is written in a cycle runs in 2R1W
mode and offers two read ports. A module that is not written runs in 4R mode
and offers four.

On a write to bank `b`:

* module `b` is written and runs in 2R1W mode;
* the other three banks each give one port to the read update, and stay in
  4R mode;
* the XOR module receives the updated word, so it runs in 2R1W mode.

The four reads are then scheduled by `bdx_port_alloc`, with budgets of 2 or 4
ports per module. A read of the written bank is recovered once two earlier
reads use that bank. A read of any other bank is recovered once three do.
Without a write, nothing is recovered at the top level.

The design's worst case is a write and all four reads in one bank. Then:

* that bank serves reads 0 and 1 directly;
* reads 2 and 3 are recovered;
* each other bank serves three reads: two recoveries and the read update.

Inside each module, reads that meet in one sub-bank are resolved by the same
mechanism one level down. `sub_recon[k]` flags this for module k, where k = 4
is the XOR module. Every path is combinational, including the read update of
the top-level XOR module, which reads through the 4R modules. One write and
four reads therefore complete in each cycle.

## `bdx_kr1w` and `bdx_top`

`bdx_kr1w` is the straightforward way to get K read ports. It uses K/2 copies
of `bdx_2r1w`. All copies receive the same write, and copy j serves reads 2j
and 2j+1. It costs K/2 times the storage of one 2R1W memory. That cost is
what the hierarchical design avoids. K defaults to 4 and must be even.

`bdx_top` places `bdx_hbdx_4r1w` (ports `h_*`) and `bdx_kr1w` (ports `k_*`)
side by side. They share only `clk` and `rst_n`.

## Interface summary

All memories have the same interface:

* `clk`, and `rst_n` (asynchronous, active low);
* `ready`;
* a write port `we`, `waddr`, `wdata`;
* read ports as packed arrays `raddr[i]` / `rdata[i]`;
* recovery flags.

Inputs are sampled for the write at the rising edge. Read data is a
combinational function of the read addresses and the stored contents, so a
user who wants registered outputs adds a register stage. The shared constants
(`NUM_BANKS`, `XB_IDX`, `BANK_W`) and the mode type `bdx_mode_e` are in
`bdx_pkg`.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The testbenches compare every read, in every
cycle, with a flat reference array that the testbench updates itself. They
bias addresses towards one bank, and for the hierarchical memory towards one
sub-bank, so that conflicts are frequent.

Beyond the data checks:

* The recovery flags are checked against the rules stated above.
* The clearing time is checked against the expected number of cycles.
* Each mechanism must happen at least once, or the testbench fails:
  * recovery, at both levels and in the XOR module;
  * 2R1W and 4R mode;
  * the worst case;
  * read-only cycles;
  * kR1W recovery.

`tb_bdx_top` runs the top at its default size (8-bit words, 512-word banks)
for 20,000 random cycles. It then reads back all 2048 words of both memories.

`tb_bdx_size_sweep` runs `bdx_2r1w`, `bdx_2r1w_4r` and `bdx_hbdx_4r1w`
side by side at ten size points, using the helper `tb/bdx_size_check.sv`:

* 8-bit words at bank depths 8, 16, 64, 128, 256, 512 and 8192;
* 16-, 32- and 64-bit words at depth 64.

Its Verilator build takes a couple of minutes because of the 8192-deep
point. The simulation itself takes about a second.

To simulate with Verilator, for example the top (the package goes first; the
other modules are found in `rtl/` and `tb/` by name):

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv rtl/bdx_pkg.sv \
              tb/tb_bdx_top.sv --top-module tb_bdx_top
    ./obj_dir/Vtb_bdx_top

Replace `tb_bdx_top` by any other testbench name to run that one. The
testbenches of the single blocks override `DEPTH` to small values (16 or 32)
to keep conflicts frequent; the memories work at any power-of-two depth.

## Design choices and limits

Several points are choices made for this implementation rather than part of
the method itself:

* **Address layout.** The bank is taken from the top address bits.
* **Asynchronous reads, read-old on a write collision.** These follow from
  using LUT-style storage.
* **Clearing by a per-bank counter sweep**, with writes ignored until `ready`.
* **Read 2 and read 3 in 2R1W mode.** They are dropped and return zero.
* **Fixed grant order of the port allocator.** Any order that respects the
  port budget gives the same data; only the recovery flags would change.
* **Read update includes the written word.** The update is formed as
  `W ^ (other three banks)`, so that the XOR bank stays the XOR of all four
  banks.
* **Sub-bank depth in the hierarchical memory.** It is `DEPTH/4`, so all
  four memories hold the same `4*DEPTH` words and can be compared directly.
* **K of the replicated memory.** It is not fixed by the method and
  defaults to 4.

Limits:

* Only the read-port side is built. Each memory has a single write port.
* No FPGA-specific primitives are used. Slice and LUT usage and the reachable
  clock rate depend on the synthesis tool. They were not measured here.
* The long combinational path of the hierarchical memory is its critical
  timing path. It runs through the allocator, two levels of XOR recovery and
  the read update.
