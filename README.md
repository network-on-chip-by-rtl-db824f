# Switching-reducing data encoders for network-on-chip links

On a network-on-chip, the wires between routers are long and strongly coupled.
The power they draw depends on how many lines toggle from one flit to the next
(self switching) and on how adjacent lines toggle relative to each other
(coupling switching). This design encodes each body flit in the network
interface, before it enters the network. It picks, flit by flit, whichever
inverted or plain version of the flit makes the link switch least, and adds
one line that says an inversion was applied.

Three schemes are provided. They share one encoder frame and differ only in
the set of candidate flits they compare:

| scheme | module             | candidates                              |
|--------|--------------------|-----------------------------------------|
| I      | `odd_encoder`      | plain, odd bits inverted                |
| II     | `odd_full_encoder` | plain, odd bits inverted, all inverted  |
| III    | `odd_even_encoder` | plain, odd bits inverted, even inverted |

The top, `data_encoder_top`, feeds one flit stream to one encoder of each
scheme, and each encoder drives a link of its own. A real network interface
would keep one of the three instances.

## Transition types between adjacent lines

Take two neighbouring link lines and the change each makes from the previous
flit to the next. Four cases are possible:

| type | what the two lines do                       | cost used here |
|------|---------------------------------------------|----------------|
| I    | one toggles, the other stays                | 1              |
| II   | both toggle, in opposite directions         | 2              |
| III  | both toggle, in the same direction          | 0              |
| IV   | neither toggles                             | 0              |

Each line that toggles adds a self-switching cost of 1. So a candidate flit's
cost against the flit now on the link is

    cost = toggling lines + (Type I pairs) + 2 * (Type II pairs)

The weights are the usual bus energy model. A Type II pair swings the coupling
capacitance by twice the supply voltage. The weights are constants in
`noc_enc_pkg` (`COST_SELF`, `COST_T1`, `COST_T2`).

The inversions work on these types as follows:

* **Inverting every other line** turns a Type I pair into Type III or IV, and
  turns a Type II pair into Type I. This is scheme I's aim: fewer Type I
  transitions.
* **Inverting every line** turns Type II into Type IV, and Type IV back into
  Type II or III. It also toggles exactly the lines the plain flit leaves
  still. Scheme II adds it for flits that would toggle most of the link.

## Flit format on the link

A body of `DATA_W` bits (4 by default) travels on `W = DATA_W + 1` lines:

    link_flit = { encoded body[DATA_W-1:0], inv }      inv is line 0

The encoder appends a 0 below the body. Any inversion also inverts that 0, so
`inv` is 1 exactly when the body was inverted. The bits are numbered within the
body:

* "odd" means body bits 1, 3, 5, ...
* "even" means body bits 0, 2, 4, ...

In scheme I, a receiver decodes by inverting the odd body bits when `inv` is 1.
In schemes II and III, one `inv` line cannot say *which* inversion was used.
Each encoder therefore also outputs the mode it applied as `link_mode`
(`INV_NONE`, `INV_ODD`, `INV_EVEN`, `INV_FULL`). A link that carries it needs a
second indicator line. No decoder is included.

## How one encoder works

```
in_body -> {in_body,0} --+--> candidate 0 (plain) -> type_conversion + ones_counter --+
                         +--> candidate 1 (mask)  -> type_conversion + ones_counter --+--> precompute_logic -> select
                         +--> candidate 2 (mask)  -> ...                             --+            |
                                     ^                                                             v
                                     +------------------ prev_encoded_reg (drives link) <-----------+
```

1. **Candidates.** The extended flit `{in_body, 0}` is XORed with a fixed
   inversion mask, one per candidate.
2. **Type census.** For each candidate, `type_conversion` runs one `ty_unit`
   per adjacent line pair against the previous encoded flit and counts the
   pairs of each type. `ones_counter` counts the toggling lines. All candidates
   are evaluated in parallel.
3. **Decision.** `precompute_logic` weighs the counts into a cost per candidate
   and selects the lowest. The candidate with the lower index wins a tie, so
   the plain flit is kept unless an inversion is strictly cheaper.
4. **Register.** `prev_encoded_reg` stores the chosen flit. Its output is both
   the link and the reference for the next flit.

**Header flits** are not encoded. They go out as `{body, 0}` with mode
`INV_NONE`. They still become the reference for the next flit, because they are
what the link carries.

**Idle cycles.** When no body flit is offered, the census logic is fed the
previous encoded flit instead of the input, so it sees no transitions and does
not switch. The register loads only on `in_valid`, so the link stays still
between flits. This is the pre-computation idea the design is built around:
inputs to logic whose result is not needed are disabled.

### A property of odd-length links

The cost's parity equals the parity of the number of toggling *interior* lines
(all lines except the two outer ones). On the default 5-line link:

* odd inversion flips line 0 and body bits 1 and 3, which sit on lines 0, 2
  and 4;
* full inversion flips all five lines.

Each of these changes the number of toggling interior lines by an odd amount.
So for scheme I and scheme II, a candidate never ties with the plain flit.
Even inversion (lines 0, 1 and 3) changes it by an even amount. Ties can
therefore happen only in scheme III, and there the tie rule matters.

## Interface and timing

All encoders and the top share these inputs:

| port        | dir | width    | meaning                                     |
|-------------|-----|----------|---------------------------------------------|
| `clk`       | in  | 1        | clock                                       |
| `rst_n`     | in  | 1        | synchronous active-low reset, link goes to 0 |
| `in_valid`  | in  | 1        | a flit is offered this cycle                |
| `in_header` | in  | 1        | the flit is a header (sent unencoded)       |
| `in_body`   | in  | `DATA_W` | flit body                                   |

Each encoder drives:

| port         | dir | width        | meaning                           |
|--------------|-----|--------------|-----------------------------------|
| `link_flit`  | out | `W`          | link lines                        |
| `link_mode`  | out | `inv_mode_e` | inversion applied                 |
| `link_valid` | out | 1            | `link_flit` is new this cycle     |

The top has three such groups, `link1_*`, `link2_*` and `link3_*`, one per
scheme.

Timing:

* A flit appears on the link one clock after it is offered.
* One flit is accepted per clock.
* There is no backpressure.
* The whole decision is one combinational stage in front of the register.

## Files

| file | content |
|------|---------|
| `rtl/noc_enc_pkg.sv` | transition-type and inversion-mode enums, cost weights, mask function |
| `rtl/ty_unit.sv` | classifies the transition of one pair of lines |
| `rtl/type_conversion.sv` | one `ty_unit` per pair, per-type counts |
| `rtl/ones_counter.sv` | number of toggling lines |
| `rtl/precompute_logic.sv` | cost per candidate, cheapest selection |
| `rtl/prev_encoded_reg.sv` | previous-flit / link register |
| `rtl/odd_encoder.sv`, `rtl/odd_full_encoder.sv`, `rtl/odd_even_encoder.sv` | the three scheme encoders |
| `rtl/data_encoder_top.sv` | the three encoders side by side |
| `tb/enc_ref_pkg.sv` | independent reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every module has its own testbench. Each one:

* compares the module against values computed independently of it;
* ends with a `TB_RESULT checks=N failures=M` line.

The encoder testbenches check every link flit and mode against `enc_ref_pkg`.
They run both the default 4-bit body and a 7-bit body.

`tb_data_encoder_top` runs the top at its default parameters in two phases:

* every ordered pair of 4-bit body values;
* random packets with idle gaps.

It fails if any of these never happens:

* header bypass;
* idle hold;
* a tie resolved to plain;
* odd, full and even inversion.

It also sums the switching cost of each link. In one run, against the cost of
sending the same flits plain:

| scheme | switching cost vs. plain |
|--------|--------------------------|
| I      | about 14 % lower         |
| II     | about 28 % lower         |
| III    | about 29 % lower         |

The testbench requires that no scheme is worse than plain.

To simulate with Verilator:

```
verilator --binary --timing -y rtl -y tb +libext+.sv \
    rtl/noc_enc_pkg.sv tb/enc_ref_pkg.sv tb/tb_data_encoder_top.sv \
    --top-module tb_data_encoder_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The testbenches that import
`enc_ref_pkg` need it on the command line.

## Where this design makes its own choices

The source describes these encoders at block level: the transition types, the
aim of each scheme, the encoder frame with a previous-flit register, and the
order of the stages. It gives no formulas, widths or timing, so the following
are choices of this design:

* **Decision rule.** The encoder compares exact weighted switching costs of all
  candidates. The source only says that transitions are counted and that the
  inversion depends on the count.
* **Weights.** The cost weights are 1, 1 and 2.
* **Ties.** The plain flit wins a tie.
* **Bit numbering.** "Odd" and "even" are counted within the body, and `inv`
  is line 0.
* **Scheme III.** It is only named in the source. Its candidate set (plain,
  odd, even) comes from the name.
* **Mode output.** `link_mode` is added because the inversions in schemes II
  and III cannot be told apart from the single `inv` line.
* **Interface and register.** The reset, the one-clock latency and the
  valid-only handshake are this design's own.
* **Power.** Power figures for the encoders depend on the target device and
  its power model. The testbench reports the switching-cost measure above
  instead.

To change the link width, set `DATA_W` on the top or on an encoder. To change
the energy model, edit the weights in `noc_enc_pkg`. `cost_width()` sizes the
cost arithmetic from them.
