# Simulation-based fault injection for small digital circuits

To find out whether a test catches a hardware fault, you can put the fault
into the HDL model, run the test, and compare the output with that of the
fault-free model. This RTL does that in hardware, as a built-in self-test.
A pseudo-random pattern generator drives a circuit under test (CUT). First
the CUT runs with no fault, and its responses are stored as the "golden"
responses. Then the CUT runs once for every fault. Each time, the same
patterns are replayed while a *saboteur* forces one internal net. A
response analyzer compares every response with the stored one and flags
any difference. A controller counts how many faults were injected and how
many were detected. The fault coverage is detected / injected.

The framework is applied to three circuits:

| circuit | what it is | fault sites | faults |
|---|---|---|---|
| `s27` | ISCAS'89 s27 sequential benchmark | outputs of gates G8, G15, G9 | 9 |
| `mrsd_adder` | one radix-16 digit of a maximally redundant signed-digit adder | carries C0(0), C0(2), C1(0), C1(2) | 12 |
| `csa_adder` | 4-bit carry select adder | select carry, C0(3) | 6 |

Each site can take three fault models: stuck-at-0, stuck-at-1 and bit
flip. `fi_top` runs the three campaigns side by side.

## Structure

```
fi_top
 ├─ fi_campaign #(CUT_S27)   ─┐
 ├─ fi_campaign #(CUT_MRSD)   ├─ each: lfsr_tpg → CUT (with fault_inj saboteurs) → ora
 └─ fi_campaign #(CUT_CSA)   ─┘          ↑ fault_demux ↑ fi_controller
```

- `fi_pkg`: holds the `fault_t` enum (`FT_SA0`, `FT_SA1`, `FT_FLIP`), the
  CUT selector `cut_e`, and functions that give each CUT's input width,
  output width and number of fault sites.
- `fault_inj`: the saboteur, a multiplexer in series with one net. When
  `fis` (fault injection signal, active high) is low, the net passes
  unchanged. When `fis` is high, the net is replaced by 0, by 1 or by its
  inverse, as `ftype` selects. It adds no latency.
- `fault_demux`: turns the controller's one `fis` line and site index into
  one enable line per saboteur. Only one site is faulty at a time.
- `lfsr_tpg`: a 16-bit Galois LFSR with polynomial x^16+x^14+x^13+x^11+1
  (period 65535). It is reloaded with its seed before every run, so every
  run sees the same pattern sequence.
- `ora`: the output response analyzer. In the golden run it writes each
  response into a `PATTERNS`-deep memory. In a faulty run it compares each
  response with the stored word at the same index. Any difference sets a
  sticky `fail` flag.
- `fi_controller`: sequences the runs and keeps the counters.

## How a campaign runs

A campaign starts on `start`. It makes `1 + 3·SITES` runs. Run 0 is the
golden run. After it come the faulty runs: for site 0 the models SA0, SA1
and flip, then the same three for site 1, and so on. Each run has three
phases:

| phase | cycles | what happens |
|---|---|---|
| PREP | 1 | CUT reset, LFSR reloaded, analyzer flag cleared |
| RUN | `PATTERNS` | one pattern per cycle; the analyzer samples the response with index = cycle number |
| EVAL | 1 | the flag is final; for a faulty run, `n_injected` goes up by one, and `n_detected` too if the flag is set; `rep_valid` pulses with the site, the model and the verdict |

A stuck-at fault is applied in every RUN cycle. A bit flip is a transient
fault: it is applied only in pattern cycle `FLIP_AT` (default
`PATTERNS/2`). A campaign takes `(3·SITES + 1)·(PATTERNS + 2) + 1` cycles
from `start` until `done` goes high. At the default `PATTERNS = 64` that
is 661 cycles for s27, 859 for the MRSD adder and 463 for the CSA. `done`
stays high until the next `start`.

Both adders register their outputs. So the response sampled in RUN cycle
k is the result for pattern k−1 (cycle 0 sees the reset value). s27's
output G17 is combinational, so it reflects the current pattern. Both
cases are deterministic from run to run, which is all the golden
comparison needs.

The LFSR bits go to the CUT inputs like this:

- s27: `{G3,G2,G1,G0} = q[3:0]`.
- MRSD: `x = q[4:0]`, `y = q[9:5]`, `t_in = q[10]`,
  `T_in = q[11] & ~q[10]`. The digit code `10000` (−16) is outside the
  digit set, so it is replaced by 0. The transfer pair (1,1) is never
  applied.
- CSA: `a = q[3:0]`, `b = q[7:4]`, `ci = q[8]`.

## The circuits under test

### s27

s27 has four inputs G0–G3, one output G17, three D flip-flops (G5, G6,
G7) and ten gates. This is the public netlist:

```
G14 = NOT G0          G8  = G14 AND G6      G16 = G3 OR G8
G12 = G1 NOR G7       G15 = G12 OR G8       G9  = G16 NAND G15
G13 = G2 NOR G12      G11 = G5 NOR G9       G10 = G14 NOR G11
G17 = NOT G11         G5 <= G10   G6 <= G11   G7 <= G13
```

Saboteurs sit on G8, G15 and G9 (`fis[0..2]`). The flip-flops clear on a
synchronous, active-high reset.

### MRSD adder digit (`mrsd_digit`, `mrsd_adder`)

This is the least obvious part of the design. The number system has radix
r = 2^H (H = 4, so r = 16). Each digit lies in [−(r−1), r−1] = [−15, 15],
the largest symmetric set that H+1 bits allow. That is why it is called
"maximally redundant". A digit is stored as H+1 bits: H posibits of
weight 2^j and one negabit of weight −2^H. This is the same as two's
complement. The point of the redundancy is that carries never ripple
beyond one digit.

Each slice has two rows of adder cells. Each row is H full adders with a
half adder at bit 0, which gives the 8 full adders and 2 half adders of a
radix-16 slice.

1. **Row 0** computes the position sum p = x + y, which lies in [−30, 30].
2. **Transfer logic** picks a transfer t ∈ {−1, 0, +1}: t = +1 if
   p ≥ 15, t = −1 if p ≤ −15, and 0 otherwise. The interim sum
   w = p − 16·t then lies in [−14, 14]. The transfer goes to the next
   digit as two wires: `t_out` is a posibit of value +1 and `tn_out` is a
   negabit of value −1. They are never both set.
3. **Row 1** adds the incoming transfer: s = w + t_in − T_in. A −1 in
   two's complement is all ones, so bits 1..H of row 1 add `T_in`. Bit 0
   adds `t_in | T_in`, which is correct because at most one of the two is
   set. Since |w| ≤ 14, the result always stays in [−15, 15].

The outgoing transfer depends only on x and y, not on the incoming
transfer. So a multi-digit adder (`mrsd_adder #(.DIGITS(n))`) has the
delay of one slice, whatever n is. `mrsd_adder` registers the sum digits
and the final transfer. It defaults to one digit, which is the circuit
that is fault-tested. The four saboteurs sit on the carry out of bits 0
and 2 of row 0 (C0(0), C0(2)) and of row 1 (C1(0), C1(2)). In a
multi-digit adder only digit 0 has active saboteurs.

Because the digit set is redundant, a value can have more than one
representation. For example, 7 + 8 = 15 comes out as transfer +1 with
digit −1, not as transfer 0 with digit 15. Check results by value,
s + 16·(t_out − T_out), not bit by bit.

### Carry select adder (`csa_adder`, `rca`)

The low N/2 bits are added by a ripple-carry adder with carry in `ci`. The
high N/2 bits are added twice in parallel, once with carry in 0 and once
with carry in 1. The low half's carry out c(N/2) then selects one of the
two high results and its carry out. The sum and the carry out are
registered. With N = 4 there are three 2-bit ripple-carry adders. The
saboteurs sit on the select carry (`fis[0]`) and on the carry out of the
carry-in-0 high adder, C0(3) (`fis[1]`).

## Results in simulation

With the default 64 patterns and seed `16'hACE1`, every fault is
detected: s27 9/9, MRSD 12/12, CSA 6/6. With only 16 patterns, one CSA
fault goes undetected (5/6). The testbench `tb_fi_campaign` checks this
shorter case. Each per-fault verdict in the testbenches is compared with a
software replay of the whole campaign (`tb/tb_fi_model_pkg.sv`).

The fault-free adders also reproduce a published reference sequence of
eight 4-bit operand pairs, for example 0101 + 1011 → sum 0000, carry 1
(`tb_fig_vectors`).

## Where this RTL departs from the reference design, and why

- **One CUT, run many times.** The reference methodology speaks of a
  fault-free copy and several faulty copies. Here a single instance, with
  saboteurs built in, is run once fault-free to fill the golden memory and
  then once per fault. The result is the same, but the area does not grow
  with the number of faults.
- **Choices made where the reference gives no detail:** the LFSR and its
  polynomial, the number of patterns (64), the mapping of pattern bits to
  inputs, the one-cycle transient used for the bit flip, the run phases,
  and the synchronous active-high reset.
- **MRSD transfer logic and row 1.** The reference gives the block
  diagram, the cell counts and the signal names. It does not give the
  equations of the transfer logic or how row 1 takes in the negabit
  transfer. Both were derived here, and are exhaustively verified for all
  31 × 31 digit pairs and all 3 transfer values.
- **MRSD operand width.** The reference waveforms show 4-bit operands. The
  digit here is 5 bits, so that the negabit is present.
- **CSA structure.** The prose speaks of two ripple-carry adders made of
  four full adders. The block diagram shows three N/2-bit adders and a
  multiplexer, and that is what is built (six full adders for N = 4).
- **Register counts.** The reference's FPGA reports give more registers
  than the cores have here (s27: 3 flip-flops, against 10 reported). The
  extra registers presumably belong to FPGA test wrappers whose contents
  are not known.
- Timing and power figures from the FPGA reports are not modelled.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `fi_top`, `fi_campaign`, `fi_controller` | `PATTERNS` | 64 | patterns per run (also the golden memory depth) |
| `fi_campaign`, `fi_controller` | `FLIP_AT` | `PATTERNS/2` | cycle of the transient bit flip |
| `fi_campaign` | `SEED` | `16'hACE1` | LFSR seed (must be non-zero) |
| `fi_top`, `fi_campaign`, `fi_controller` | `CNT_W` | 8 | width of the fault counters |
| `mrsd_digit`, `mrsd_adder` | `H` | 4 | posibits per digit (radix 2^H, H ≥ 2) |
| `mrsd_adder` | `DIGITS` | 1 | number of digits |
| `csa_adder` | `N` | 4 | operand width |

The widths of the CUTs inside the campaigns are fixed in `fi_pkg`
(`MRSD_H`, `CSA_N`). The input mapping uses at most 16 LFSR bits.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and calls
`$finish`. The package files are listed first. For example, the
end-to-end test at default sizes:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  -y rtl -y tb +libext+.sv rtl/fi_pkg.sv tb/tb_fi_model_pkg.sv tb/tb_fi_top.sv \
  --top-module tb_fi_top
./obj_dir/Vtb_fi_top
```

This test runs each campaign twice and checks every verdict, the counts
and the cycle counts. It also confirms that the stuck-at-0, stuck-at-1
and bit-flip injections, and fault detections, each happened.

Each block has its own testbench: `tb_fault_inj`, `tb_fault_demux`,
`tb_full_adder`, `tb_rca`, `tb_lfsr_tpg`, `tb_ora`, `tb_fi_controller`,
`tb_s27`, `tb_mrsd_digit`, `tb_mrsd_adder`, `tb_csa_adder`,
`tb_fi_campaign`, `tb_fi_top` and `tb_fig_vectors`. All run in seconds.

To put a fault on a new net: route the net through a `fault_inj`, widen
the CUT's `fis` port, and raise its site count in `fi_pkg::cut_sites`. To
add a new CUT: give it a `cut_e` value, input and output widths in
`fi_pkg`, and a branch in `fi_campaign`'s generate block.
