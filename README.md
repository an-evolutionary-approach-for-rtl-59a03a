# Application-specific address-bus encoding: GEG and GEG+T0

Every transition on a long bus line charges or discharges a large wire
capacitance, so the energy of an address bus grows with the number of bits
that flip from one address to the next. An embedded system runs one
application for its whole life, so the stream of addresses it puts on a bus
can be recorded in advance. That makes it worth building an encoder tailored
to the stream: a fixed, invertible mapping of bus words that makes the
addresses which follow each other most often differ in as few bits as
possible.

This RTL implements the hardware side of that idea:

* **GEG encoding** (genetic encoder generator). The 32-bit bus is cut into
  clusters of W consecutive lines (W = 8 by default, W = 4 also supported).
  Each cluster passes through its own bijective W-bit truth table. The
  tables are found offline by a genetic search over the recorded address
  trace and are then fixed, so the encoder and decoder are pure
  combinational look-ups with no state. The search itself is software and is
  not part of this RTL.
* **GEG+T0 hybrid**, for a bus that carries only instruction-fetch
  addresses. Such a bus mostly sees addresses in sequence: each one is the
  previous address plus 4. For those addresses the T0 scheme is used: the
  bus lines are left unchanged and one extra line, INC, is raised. The
  receiver then adds the stride to the last address it decoded. Every other
  address is sent GEG-coded with INC low.

On a fetch-plus-load/store ("multiplexed") address bus the plain GEG scheme
is the one to use. Set `T0_EN = 0` and the same top becomes that link.

## The cluster tables

A bijection of W-bit words can be described by its truth table: row *i*
holds the code sent for input word *i*. Because the mapping is a
permutation, the decoder is simply the inverse table. A single table for all
32 bits would have 2^32 rows, which is why the bus is split. Cluster *c*
holds lines `c*W .. c*W+W-1`, taken in plain order with no regrouping.

In the RTL a table is a packed parameter vector:

* for one cluster (`geg_cluster_enc`/`geg_cluster_dec`, parameter `TABLE`,
  `W*2**W` bits), entry *i* sits at bits `[i*W +: W]`;
* for the bus (`TABLES`, `BUS_W*2**W` bits), the table of cluster *c* sits
  at bits `[c*W*2**W +: W*2**W]`.

Both ends get the same encoder `TABLES`. The decoder computes the inverse at
elaboration time (`INV[TABLE[i]] = i`, in `geg_pkg::lut_inverse`), so the two
ends cannot disagree. If a table is not a permutation, elaboration stops with
an error, because such a table could not be decoded.

**Default tables.** Optimised tables only exist for a given application
trace. The default parameter is therefore a placeholder: the
binary-reflected Gray code `g(i) = i ^ (i >> 1)` in every cluster. It is a
valid, non-trivial permutation, but it is not tuned for any stream, and with
it the link gives no saving on the test streams (see below). To use the link
for real, produce one permutation per cluster from the application's trace
and pass them as `TABLES`. The same value must reach both `geg_t0_enc` and
`geg_t0_dec`; `geg_t0_link` passes it to both for you. The helpers in
`geg_pkg` (`gray_lut`, `lut_is_perm`, `lut_inverse`, `bus_lut_slice`) work
for W up to 8.

## GEG+T0 operation and timing

```
  transmitter (geg_t0_enc)                         receiver (geg_t0_dec)
  in_addr -> GEG tables ---------+                 bus_code -> inverse tables --+
          |                      v                                              v
          +-> == prev+STRIDE -> select -> bus_code ----------------------> select -> out_addr
                                       -> bus_inc  ----------------------> (INC: last+STRIDE)
```

Encoder (`geg_t0_enc`), at each rising edge with `in_valid` high:

* if the encoder has seen an address since reset, `T0_EN` is 1 and
  `in_addr == prev_addr + STRIDE` (mod 2^32): `bus_inc <= 1` and `bus_code`
  keeps its value, so the 32 lines do not switch;
* otherwise: `bus_inc <= 0` and `bus_code <=` the GEG code of `in_addr`.

`prev_addr` is then updated to `in_addr`. `bus_valid` follows `in_valid`
with one cycle of delay. When `in_valid` is low, the lines and INC hold their
value, so an idle cycle costs no transitions. An idle gap does not break a
sequence, because "previous" means the last address actually sent. The first
address after reset is always GEG-coded.

Decoder (`geg_t0_dec`) is combinational from the bus:
`out_addr = bus_inc ? last_addr + STRIDE : GEG^-1(bus_code)`, and
`last_addr` is loaded with `out_addr` on every valid transfer. An assertion
flags INC arriving before any address has been received.

Through `geg_t0_link` the latency is one clock cycle from `in_addr` to
`out_addr`. One address can be sent every cycle. Reset is synchronous and
active low, and clears the bus lines to zero.

The GEG path contains no registers. The registers in the hybrid
(`prev_addr`, `last_addr`, the bus register, INC) belong to T0 and to the
bus interface.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `BUS_W` | 32 | address bus width |
| `W` | 8 | lines per cluster (8 and 4 are the two sizes studied; 1..8 allowed, must divide `BUS_W`) |
| `TABLES` | Gray code per cluster | encoder truth tables, layout above |
| `STRIDE` | 4 | address step that counts as "in sequence" |
| `T0_EN` | 1 | 1: GEG+T0 hybrid; 0: plain GEG (INC stays 0) |

## Where this departs from, or adds to, the scheme as published

* The published tables are not available. The Gray-code default stands in
  for them.
* The cluster assignment uses consecutive, non-overlapping lines
  (`c*W ..`), which is the stated intent for clusters of equal size.
* The published description covers the hybrid's encoder. The decoder is
  derived from it here.
* The stride (4), the valid strobe, the registered bus driver, the reset
  behaviour and the wrap-around of the sequence test modulo 2^32 are choices
  of this design.
* The genetic search and the trace compression that feed it are offline
  software, and neither is included.

## Verification

Each module has a self-checking testbench in `tb/`. Expected values are
computed by formula, independently of the RTL's table helpers. Besides the
default tables, the tests use affine permutations `i -> (K*i + C) mod 2^W`
with a different K and C in each cluster, so a wrong line grouping or a
cluster given the wrong table shows up.

| testbench | what it checks |
|---|---|
| `tb_geg_cluster_enc`, `tb_geg_cluster_dec` | all 256 (W=8) and 16 (W=4) words, two hand-written 2-bit example encoders, round trip |
| `tb_geg_bus_enc`, `tb_geg_bus_dec` | GEG8 and GEG4, walking ones plus 2000 random addresses; GEG4 round trip |
| `tb_geg_t0_enc` | cycle model of the hybrid and of plain GEG: runs, repeats, idle gaps, wrap at 2^32, first address after reset, reset mid-stream |
| `tb_geg_t0_dec` | bus driven directly, including in-sequence addresses sent GEG-coded and garbage on idle lines |
| `tb_geg_t0_link` | whole link at default parameters, about 18k transfers of a synthetic fetch stream; checks every address after one cycle and that T0, GEG, idle and reset all occur |
| `tb_geg_workloads` | a synthetic fetch-only stream and a synthetic multiplexed stream through GEG8+T0, GEG8, GEG4 and GEG4+T0 links; checks every address and reports line transitions |

`geg_tb_pkg.sv` holds the reference functions the testbenches share.

The transition counts in `tb_geg_t0_link` and `tb_geg_workloads` show the
mechanism at work. With the default Gray tables, GEG alone saves nothing on
these streams. On the synthetic fetch stream, which has about 70% of its
addresses in sequence, a plain bus makes about 26k transitions and GEG8 about
27k. GEG8+T0 makes about 17k, and that saving comes from T0. Reaching the
savings the scheme is meant for requires tables searched on the actual
application's trace.

## Simulating

Every module is in its own file named after it. The shared package is
`rtl/geg_pkg.sv`, and `tb/geg_tb_pkg.sv` serves the testbenches. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/geg_pkg.sv tb/geg_tb_pkg.sv tb/tb_geg_t0_link.sv --top-module tb_geg_t0_link
./obj_dir/Vtb_geg_t0_link
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.

## Files

* `rtl/geg_pkg.sv`: widths and elaboration-time table functions
* `rtl/geg_cluster_enc.sv`, `rtl/geg_cluster_dec.sv`: one cluster
* `rtl/geg_bus_enc.sv`, `rtl/geg_bus_dec.sv`: the clustered 32-bit GEG codec
* `rtl/geg_t0_enc.sv`, `rtl/geg_t0_dec.sv`: the two ends of the hybrid
* `rtl/geg_t0_link.sv`: top, encoder and decoder joined by the coded bus
