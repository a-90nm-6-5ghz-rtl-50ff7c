# 256 x 64-bit, 2-read / 1-write register file with a split decoder

This is the RTL of a register file that holds 256 words of 64 bits. It has two
read ports and one write port, and each port does one access per cycle. The
circuit it models was built to run at several GHz in a leaky deep-submicron
process. Its two central ideas set the structure of the RTL:

* **Split decoding, one cycle ahead.** Each port's 8-bit address goes through
  a two-level decoder. A 3:8 first level picks one of 8 banks. There it
  enables only that bank's 5:32 second-level decoder. The decoded selects are
  registered and drive the storage arrays in the *following* cycle.
* **Conditional precharge of deselected bitlines.** The cells are read over
  single-ended local bitlines (LBLs) with 8 cells each. Those feed per-bank
  global bitlines (GBLs). The decoder knows in advance which LBL and which
  bank will be read. So it also produces a precharge request for every *other*
  LBL (`LCP`) and, through the bank enables `BE`, for every other bank's GBL.
  These requests switch on pull-up "sustainers" that hold the idle lines high
  firmly, rather than through a weak keeper alone. In the circuit this is what
  buys noise and leakage tolerance. In two-state RTL it appears as a defined
  level: an idle bitline is 1, and an idle read port returns all ones.

The analog side of the original circuit is not represented. That covers the
dual supply (decoder and select drivers on a lower supply than the cells),
the local level converters, keeper sizing and noise margins. Those parts have
no logic function.

## Organisation and address map

```
                AD<7:5>          AD<4:3>             AD<2:0>
  address  =  [  bank  ] [ LBL within bank ] [ cell on that LBL ]
```

* Two arrays of 256 x 32 bits sit side by side. `u_array_hi` holds bits 63:32
  and `u_array_lo` holds bits 31:0. Both are driven by the same decoded
  selects, which come from three split decoders (read 0, read 1, write)
  placed between them.
* Each array has 8 banks of 32 words (`rf_bank`). For every bit and read port,
  a bank has 4 LBLs of 8 cells. Word `w` of a bank is cell `w % 8` on LBL
  `w / 8`.
* Global indices, per port:
  * word select `RS/WS<a>`, 256 of them
  * bank enable `BE<a/32>`, 8 of them
  * column select and `LCP` for LBL `a/8`, 32 each. LBL `4b+k` is LBL `k`
    of bank `b`.

The 3:8 / 5:32 split and the bank, LBL and cell counts are those of the
original organisation. The assignment of `AD<4:3>` to the LBL and `AD<2:0>`
to the cell is this design's reading of it. It is consistent with the
precharge gates, which take `BE`, `AD<3>` and `AD<4>`.

## The read path, bit by bit

A read goes through four stages. The RTL keeps them as separate modules,
because each holds one of the circuit's ideas.

1. **Cell** (`rf_bitcell`). It has one storage node and a read port on each
   side, one per read port. When `RS<p>` is high and the cell holds 0, the
   port pulls `LBL<p>` low (`pd[p]`). A cell holding 1 leaves the line high.
   So the LBL carries the stored value.
2. **Local bitline** (`rf_lbl`). The LBL is a wired pull-down of 8 cells that
   rests high. `out = ~lbl` is the restoring inverter. `lcp = 1` is the
   sustainer; it forces the line high. The decoder never selects a cell on a
   precharged LBL, and `rf_bank` asserts this.
3. **Column mux onto the GBL** (`rf_gbl_colmux`). Four clocked-CMOS inverters
   share the bank's GBL. The one whose column select is high drives `~out`,
   which is the stored value again. While the bank's `BE` is low, the
   sustainer holds the GBL at 1.
4. **GBL merge** (`rf_gbl_mux`). This stage is two 4:1 static muxes (banks 0-3
   and 4-7) and then a 2:1. It is steered by the registered bank number
   `AD<7:5>`.

For a deselected port every LBL and GBL sits at 1, so `rd_data` is all ones.

The write path is simple. The write port's decoder produces `WS<255:0>`, and
the cells of the selected word take the registered write data.

## Timing

```
cycle        N                    N+1                      N+2
port in   addr/en/wdata  -->  (registered selects)
decode    split decoder       RS/WS, BE, LCP driven
array                         read: rd_data valid         write visible
                              write: cells update at the end of N+1
```

* Present `rd_en[p]`/`rd_addr[p]` in cycle N. `rd_data[p]` holds the word
  throughout cycle N+1. Sample it at the edge that ends N+1.
* Present `wr_en`/`wr_addr`/`wr_data` in cycle N. The word changes at the edge
  that ends N+1. A read presented in cycle N+1 or later sees the new value. A
  read presented in the same cycle as the write sees the old value. There is
  no bypass.
* `rst_n` is an asynchronous, active-low reset. It clears the select registers,
  so nothing is selected and every LBL is precharged. It does **not** clear
  the storage. Write a word before you read it.

In the circuit, the decoder's precharge and column-select signals are timed
to arrive before the word selects, so that a sustainer releases its line
before a cell starts to drive it. Here all of them are registered in the same
stage and are valid for the whole access cycle, so that ordering has no RTL
counterpart.

The one-cycle decode-ahead pipeline follows the original design. Several
choices are this design's own: the exact register placement (`rf_sel_driver`),
the write-data register, the port enables and the reset.

## Modules

| module | role |
|---|---|
| `rf_pkg` | constants (256 words, 8 banks, 4 LBLs/bank, 8 cells/LBL) and `port_sel_t`, the bundle one decoder hands to the arrays |
| `rf_top` | three decoders, three select registers, write-data register, two arrays |
| `rf_split_decoder` | `rf_predec_3to8` + 8 x `rf_dec_5to32` + 8 x `rf_lcp_gen` |
| `rf_predec_3to8` | `AD<7:5>` to one-hot `BE<7:0>` (all zero when the port is disabled) |
| `rf_dec_5to32` | per bank: `AD<4:0>` to 32 word selects and 4 column selects, gated by `BE` |
| `rf_lcp_gen` | per bank: `LCP` high on every LBL except the addressed one |
| `rf_sel_driver` | registers a `port_sel_t` between the decode and access cycles |
| `rf_array` | 8 banks plus per-bit GBL merge; one 256 x 32 half |
| `rf_bank` | 32 x W cells, LBLs and column muxes for both read ports; protocol assertions |
| `rf_bitcell` | one 2R1W cell |
| `rf_lbl` | one local bitline: wired pull-down, restoring inverter, sustainer |
| `rf_gbl_colmux` | 4-way column mux onto a bank GBL, with `BE` sustainer |
| `rf_gbl_mux` | 4:1, 4:1, 2:1 static merge of 8 GBLs |

The top parameter `WORD_W` (default 64) sets the word width; each array is
`WORD_W/2` bits wide. The bank and decoder shapes are fixed by `rf_pkg`,
because the decoder split is built around them.

## How far it can be trusted, and where it departs from the circuit

These points follow the original design: the storage size, the port count,
the 3:8 / 5:32 decoder split, 8 banks of 4 LBLs of 8 cells, the 4-way column
mux, the 4:1 + 2:1 GBL merge, the precharge of every deselected LBL and GBL,
and decode one cycle ahead.

These are modelling choices, and a user should know them:

* **The cell is a flip-flop.** The real cell is a static latch written while
  `WS` is high. Here it is written at the clock edge that ends the access
  cycle. Writes therefore behave like a synchronous memory.
* **Bitline polarities and signal polarities.** Several are choices: the LBL
  carries the stored value, the C2MOS stage inverts, the GBL muxes do not
  invert, and `LCP` is active high. In silicon the sustainer gate is
  active low.
* **Idle and contention cases.** A line with nothing driving it reads 1. That
  is the level its keeper or sustainer holds. When a sustainer and a cell
  fight, the sustainer wins. The decoder never creates such a fight, and
  `rf_bank` asserts this with concurrent assertions: at most one `RS` per
  LBL, no `RS` on a precharged LBL, at most one column select, and no column
  select without `BE`.
* **Steering of the GBL muxes.** Here it is the registered `AD<7:5>`. The
  original does not say which signals steer them.
* **Not modelled:** supply domains, level converters, keeper strength, timing
  and energy. The RTL has one read per port and one write per cycle. It makes
  no claim about frequency.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For example,
with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rf_pkg.sv tb/tb_rf_top.sv \
          --top-module tb_rf_top -y rtl
./obj_dir/Vtb_rf_top
```

`tb_rf_top` runs the full-size register file with its default parameters. It
fills all 256 words. It then runs 5000 cycles of random reads and writes
against a reference memory, with a one-cycle read latency. It also counts
each behaviour and requires every one of them to happen at least once:

* reads on both ports
* both ports reading one word
* a read in the same cycle as a write to that word, which returns the old data
* a read right after the write lands, which returns the new data
* a deselected port, which returns all ones
* reads of two banks at once
* reads of every bank and every LBL

It also checks that new addresses leave `rd_data` unchanged until the next
clock edge. Together with the data checks, this pins the read latency to
exactly one cycle.

The unit testbenches check each decoder exhaustively. They test the bitline
stages over all input patterns. They run the bank and the array against
reference memories, with selects built independently of the decoder.
