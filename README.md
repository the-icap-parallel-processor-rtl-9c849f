# PARCOS: a bit-serial circuit switch with a connection pattern cache

PARCOS is a 32-input, 32-output switch for bit-serial links. It was designed for
the intermediate level of the Image Understanding Architecture, a
multi-level parallel machine for computer vision. At that level signal
processors talk to each other over one serial output and one serial input
each. Different algorithms want different interconnection patterns, so the
switch is built around two ideas:

* **Full crossbar with broadcast.** Every output has its own 1-of-32 multiplexer, and
  every input reaches every multiplexer. Any output can listen to any input,
  and one input can feed any number of outputs. With N outputs, all N^N
  mappings are possible.
* **A cache of connection patterns.** The chip stores 32 complete patterns
  in an on-chip memory, the *Connection Pattern Cache* (CPC). One bus write
  switches the whole matrix to a stored pattern. Patterns can be written or
  edited while the matrix keeps running on the current one. The matrix reads
  a separate *Control Pattern Register* (CPR), not the cache.

This repository holds synthesizable SystemVerilog for the chip. It also holds
the 64 x 64 network that joins eight chips in two columns, one for each of the
64 processors of the prototype machine.

## The chip

```
          sin[31:0] ──► communication matrix (32 tree muxes) ──► sout[31:0]
                              ▲ 32 x 5-bit selects
                        Control Pattern Register (160 bits)
                              ▲ whole-word load (WR2 / PR)
                Connection Pattern Cache: 32 words x 32 bytes x 5 bits
                              ▲ byte writes/reads      ▲ row
   bus: addr[5:0], data[4:0], WR1, WR2, RD, PR ──► Row Select Register + decode
```

| Module | Role |
|---|---|
| `parcos_mux_tree` | One 1-of-32 multiplexer, built as a 5-level binary tree. Level k is steered by select bit k: bit 0 chooses between neighbouring inputs and bit 4 drives the output. `y = d[c]`. |
| `parcos_comm_matrix` | 32 tree multiplexers that share the 32 input lines. Output j takes `sin[sel[j]]`. Combinational. |
| `parcos_cpc` | The pattern cache. It holds 32 control words of 32 five-bit bytes. Byte j of a word is the input number for output j. It has a byte port for the bus and a whole-word port for the CPR. Its contents are not reset. |
| `parcos_cpr` | A 160-bit register that holds the active pattern. It is loaded from one cache word in a single clock edge and resets to all zeros. |
| `parcos_ctrl` | Holds the Row Select Register (RSR) and decodes the bus. |
| `parcos` | The chip: these four blocks wired together. |
| `parcos_pkg` | Sizes, the `acu_bus_t` bus struct and the RSR address. |

### Programming model

The chip looks like 64 locations on the bus of the array controller (the ACU):

| Address | Location |
|---|---|
| 0-31 | Byte *addr* of the control word selected by the RSR. The address is the **output** port. The data is the **input** port that output should take. |
| 32-63 (bit 5 set) | The Row Select Register, 5 bits. |

| Strobe (while `cs` is high) | Effect at the rising clock edge |
|---|---|
| `wr1` | Writes `data` to the addressed location: a cache byte, or the RSR. |
| `wr2` | Reswitch: `RSR <= data`, and in the same edge `CPR <= CPC[data]`. The matrix takes the new pattern at once. |
| `rd` | `rd_data` shows the addressed byte or the RSR. It is combinational, and `rd_oe` is high. |
| `pr` | Reload: `CPR <= CPC[RSR]`. The RSR does not change. |

A strobe counts only while `cs` is high. At most one strobe may be high in a
cycle, and an assertion in `parcos_ctrl` checks this.

Writing a new pattern into row *r* takes:
1. one `wr1` to the RSR with the value *r*;
2. up to 32 `wr1` byte writes, one for each link that changes.

Bytes of links that stay the same need not be written, so a small edit is cheap.
Activating row *r* is a single `wr2` with data *r*. The matrix keeps its
current paths until that write. An edited row can therefore be prepared in the
background while the processors still use the old paths.

The following come from the original design:

* the memory-mapped RSR;
* byte addressing by output port;
* the 32-word cache;
* the CPR, which separates editing from switching;
* the single-write reswitch.

The chip's diagram names the strobes WR1, WR2, RD and PR but does not say what
each one does. The meanings in the table are this design's reading. So are:

* putting the RSR at addresses 32-63;
* the `cs` chip select;
* the synchronous, clocked bus;
* the separate `rd_data`/`rd_oe` outputs in place of bidirectional data pins.

### Timing

The serial data path from `sin` to `sout` is purely combinational. The switch
carries the processors' serial streams, about 5 Mbit/s each, without
retiming them. The original chip quotes under 50 ns from one input to all 32
outputs. That figure belongs to its 2 µm full-custom circuit, and the RTL does
not model it. All control actions take one clock cycle.

## The 64 x 64 network (`icap_network64`)

A 64 x 64 crossbar with broadcast, built from eight 32 x 32 chips:

* **Column 1, chips 0-3** (`cs[0]`..`cs[3]`). Chips 0 and 1 both receive
  network inputs 0-31. Chips 2 and 3 both receive inputs 32-63. Input *i* goes
  to pin *i* mod 32.
* **Column 2, chips 0-3** (`cs[4]`..`cs[7]`). Column-2 chip *k* drives network
  outputs 16k..16k+15 from its outputs 0-15. Its outputs 16-31 are unused.
  * Input pin 2j takes output 16·(k mod 2)+j of the column-1 chip that sees
    inputs 0-31. That is chip 0 for k < 2 and chip 1 otherwise.
  * Input pin 2j+1 takes the same output of the column-1 chip that sees inputs
    32-63. That is chip 2 for k < 2 and chip 3 otherwise.

So every network output owns two private lines, one from each half of the
inputs, and a column-2 chip picks between them. No two outputs share a line.
Any mapping is therefore possible, including every output listening to one
input.

**Routing rule.** To connect network output n = 16k + o to network input s:

* column-1 chip c = (s < 32 ? (k < 2 ? 0 : 1) : (k < 2 ? 2 : 3)): write byte
  16·(k mod 2) + o = s mod 32;
* column-2 chip k: write byte o = 2o + (s ≥ 32 ? 1 : 0).

Example: to send input 40 to output 20 (k = 1, o = 4), write byte 20 = 8 in
column-1 chip 2 and byte 4 = 9 in column-2 chip 1.

All eight chips share the bus. Each chip has its own select line, and
several may be selected for one write. Keep the same row number in all eight
chips for one network pattern. Then one `wr2` issued with `cs = 8'hFF`
reswitches the whole network in one cycle.

The following come from the original network drawing:

* the two columns of four chips;
* how the inputs split between the chips;
* the 16 outputs per column-2 chip.

That drawing shows only some of the wires between the columns. The
interleaving rule above is the pattern those wires follow, extended to all 16
pairs. The per-chip select lines are this design's own choice.

## Simulating

Each testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/parcos_pkg.sv tb/tb_icap_network64.sv --top-module tb_icap_network64 -o sim
./obj_dir/sim
```

| Testbench | What it shows |
|---|---|
| `tb_parcos_mux_tree` | Every select value, with one-hot, one-cold and random inputs. |
| `tb_parcos_comm_matrix` | Identity, reversal, broadcast of each input, and random patterns. |
| `tb_parcos_cpc` | Fill and read back; the byte and word ports at different rows; partial rewrites. |
| `tb_parcos_cpr` | Reset, load, and hold while the input changes. |
| `tb_parcos_ctrl` | Random bus operations against a model of the RSR and the decode. |
| `tb_parcos` | The whole chip: <ul><li>filling the cache and reading it back;</li><li>reswitching exactly at the edge of the `wr2`;</li><li>rewriting the active row without disturbing the matrix, then `pr`;</li><li>partial updates;</li><li>strobes ignored while the chip is not selected.</li></ul> |
| `tb_icap_network64` | The network at full size: <ul><li>identity, reversal, swapped halves, one input broadcast to all 64 outputs, and random mappings;</li><li>all eight chips reswitched by one write;</li><li>a background rewrite;</li><li>a one-link edit applied with `pr`;</li><li>readback.</li></ul> Each of these is counted. |
| `tb_icap_serial_traffic` | All 64 links carry 16-bit words at the same time, sent bit-serially at 5 Mbit/s. The network is reswitched between rounds. |

Apart from the CPC, which models static RAM, all state is reset by `rst_n`.
Write a cache row before loading it.

## Limits and departures

* **Transistor-level detail.** The original multiplexer uses paired n-channel
  and p-channel pass-transistor trees, sized for equal rise and fall times. The
  cache uses six-transistor static RAM cells. Here they are an ordinary
  multiplexer tree and a memory array.
* **Pin-level bus.** The strobe meanings and the clocked protocol are
  inferred, as described above. The original chip's pin timing is not
  reproduced.
* **Pattern-to-byte translation.** The controller and the processors that use
  the network are not part of this RTL. The translation from a network mapping
  to chip bytes is a software task, done in the testbenches with the rule
  given above.
* **Future 64 x 64 chip.** A later 64 x 64 chip with over 100 pattern words,
  self-routing, pattern copy under a mask, and 4096-port Clos or Benes networks
  built from it was planned but never specified. None of it is implemented.
