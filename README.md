# Small RSA coprocessor on a systolic Montgomery multiplier

This is RSA modular exponentiation, `C = M^E mod N`, with a 1024-bit default key.
The design aims for small area rather than speed, so it has **one** Montgomery
multiplier. That multiplier is a row of word-wide processing elements (PEs). A
new bit of the multiplier operand enters it every clock, and a full product
takes about `N + N/W` clocks. The final conditional subtraction of Montgomery's
algorithm (`if S >= M then S - M`) is part of the multiplier. It runs
word-serially behind the main row, so it adds only two clocks and no long carry
chain. A small FSM runs the left-to-right square-and-multiply method on top of
it.

The architecture follows the paper *A Tiny RSA Coprocessor Based on Optimized
Systolic Montgomery Architecture*. That paper builds on the MWR2MM multiplier of
Tenca and Koç and on Huang et al.'s one-bit-per-clock version of it. Several
details the paper does not fix were chosen here; they are listed under
[Departures and choices](#departures-and-choices).

## 1. Montgomery multiplication in the PE row

### The arithmetic

Let the modulus `M` be odd and below `2^N`, and let `X, Y < M`. The multiplier
returns `S = X * Y * 2^-N mod M`. It processes the bits of `X` one per step
(radix 2), starting with `S = 0`:

```
for i = 0 .. N-1:
    q_i = (S + x_i*Y) mod 2            -- makes the sum even
    S   = (S + x_i*Y + q_i*M) / 2
```

After the loop `S < 2M`. One subtraction of `M` then gives the fully reduced
result. The running sum `T = S + x_i*Y + q_i*M` always stays below
`4M < 2^(N+2)`.

### Words and the systolic skew

`S`, `Y` and `M` are split into `e = N/W + 1` words of `W` bits. With the
defaults (`N = 1024`, `W = 32`) that is 33 words. PE#j owns word `j`:

| PE | type | module | work |
|---|---|---|---|
| PE#0 | F | `mont_pe_f` | word 0; computes `q_i`; no carry in |
| PE#1 … PE#e-2 | E | `mont_pe_e` | middle words; carry in from the left, carry out to the right |
| PE#e-1 | L | `mont_pe_l` | top word, above the N bits of `Y` and `M`; only adds the incoming carry |
| e PEs | S | `mont_pe_s` | one word each of `S + ~M + 1` |

Three tapped delay lines (`mont_shift_reg`) carry `x_i`, `q_i` and the 2-bit
control state along the row, one stage per PE. So while PE#0 works on bit `i`,
PE#j works on bit `i-j`. The carry out of word `j` for bit `i` is produced one
clock before PE#j+1 needs it. This one-clock skew is what lets a new bit enter
every clock.

### The odd/even copies (the subtle part)

Dividing by 2 means word `j` of the new `S` is
`{T_0^(j+1), T_(W-1..1)^(j)}`. Its top bit is the lowest bit of the
*right-hand* neighbour's sum. The neighbour computes that sum in the same clock
in which PE#j already needs its new word. PE#j therefore does not wait. It adds
for both values of that unknown bit and registers both results:

* **even copy** `SE/CE`: the unknown top bit taken as 0;
* **odd copy** `SO/CO`: the unknown top bit taken as 1, which is the even sum
  plus `2^(W-1)`.

The two copies differ only in bit `W-1` and in the carry. The other `W-1` bits
are stored once. In the next clock, the neighbour's registered lowest bit
(`s0_next`) drives two multiplexers. One picks the correct word, which PE#j adds
into next. The other picks the correct carry, which goes to PE#j+1. Every path
is register → mux → one W-bit adder → register. No path spans more than two
PEs.

The carry between PEs is 2 bits wide. `S + x*Y + q*M + C` can reach almost
`3 * 2^W`.

`q_i` needs bit 0 of the current word 0. That is bit 1 of PE#0's stored sum,
which both copies share, so `q_i` is ready at the start of the clock. This
requires `W >= 3`.

### Control states

Each PE sees the same 4-state sequence (`rsa_pkg::pe_ctl_e`), one clock after
its left neighbour:

| state | PE#j does |
|---|---|
| `CTL_ADD` (N clocks) | add `x*Y + q*M + carry` into the word; keep both copies; `q` is forced to 0 outside this state |
| `CTL_LOCK` (1 clock) | stop adding; latch `s0_next`, so the right copy stays selected after the neighbour has moved on |
| `CTL_SUB` (1 clock) | the word is final; its S PE forms this word of `S - M` |
| `CTL_IDLE` | hold everything |

A `start` pulse clears every PE (`S = 0`), loads `X` into the x register and
starts the sequence at PE#0.

### Final subtraction without extra time

Word `j` of `S` is final `N + j + 2` clocks after `start`. In that clock S PE
`j` forms `S^(j) + ~M^(j) + CS^(j-1)` and registers it, together with its carry
`CS^(j)`. The carry into word 0 is 1. The borrow chain therefore moves one word
per clock, in step with the words becoming final, and the subtraction ends one
clock after the top word.

The multiplier does not choose between the two results itself. It outputs:

* `S`;
* `S - M` (`s_sub`);
* the final carry `cs`, which is 1 when `S >= M`.

The coprocessor's write-back mux takes `s_sub` when `cs = 1` and `S` otherwise.
The paper argues this folds the choice into the same logic level as the register
write-enable.

### Timing of one multiplication

```
clock after start    1 .. N      N+1      N+2     ...   N+e+1   N+e+2
PE#0                 ADD         LOCK     SUB
PE#j                 ADD from clock j+1 to N+j, LOCK at N+j+1, SUB at N+j+2
done                                                              pulse
```

The latency is `N + e + 2` clocks: 1059 at 1024 bits, 2115 at 2048 and 4227 at
4096. `s`, `s_sub` and `cs` hold until the next `start`. `Y` and `M` are not
registered inside and must stay stable while `busy` is high.

## 2. Exponentiation

`rsa_coprocessor` wires the multiplier to:

* two operand muxes;
* the P register (running power, and the result);
* the R register (the message in Montgomery form);
* the exponent shift register (`e_shift_reg`);
* the control FSM (`rsa_ctrl_fsm`).

The host supplies `Nr = 2^(2N) mod N`. The FSM performs:

| step | operand A (`con4`: 1, P, Nr) | operand B (`con2`: M, R, P) | written to (`con1`) |
|---|---|---|---|
| INIT_P | Nr | P (preloaded with 1) | P = 2^N mod N |
| INIT_R | Nr | M | R = M·2^N mod N |
| for each exponent bit, MSB first: SQR | P | P | P |
| … and if the bit is 1: MUL | P | R | P |
| FINAL | 1 | P | P = M^E mod N |

The operand muxes carry exactly {1, P, Nr} and {M, R, P}. The first step,
`Mon(1, Nr)`, therefore cannot be formed from them directly. Instead, P is
loaded with 1 at `start` and the step is done as `Mon(Nr, P)`.

All `N` exponent bits are scanned, leading zeros included. An exponentiation
therefore takes `3 + N + popcount(E)` multiplications, and in total

```
1 + (3 + N + popcount(E)) * (N + e + 3) clocks
```

That is about 1.63 million clocks for a random 1024-bit exponent.

**Port protocol.** Pulse `start` for one clock while `busy` is low, with `nr`,
`e_exp`, `n_mod` (odd) and `m_msg` (< `n_mod`) valid. Hold them until
`rsa_done`. `rsa_done` pulses for one clock when `rsa_result` is valid, and the
result holds until the next `start`. The reset `rst_n` is active low and
asynchronous. The PEs are cleared synchronously at each start.

## 3. Parameters and size

| parameter | default | meaning |
|---|---|---|
| `N` | 1024 | key / modulus / exponent width |
| `W` | 32 | PE word width (`W >= 3`); the number of PEs is `e = ceil(N/W) + 1` |

The paper gives 1024, 2048 and 4096-bit versions. Those sizes need `N = 2048`
or `N = 4096`. Nothing else changes.

After generic synthesis, the 1024-bit coprocessor has about 6.6 k flip-flops:

* 3.5 k in the multiplier;
* 1 k each in the P, R and exponent registers.

The paper reports 6.8 k flip-flops for its 1024-bit FPGA implementation. The
clock count per 1024-bit multiplication is 1059, against the 1056 reported
there.

## Departures and choices

* **Word size** `W = 32`. The paper does not state it. 32 matches its 1024-bit
  latency of about `n + 32`.
* **Latency** is `N + e + 2`. The paper quotes `n + 32` clocks for 1024 bits.
  The two extra clocks are the LOCK step and the registered last word of the
  subtraction.
* **Adders.** The PEs are drawn with carry-save adders (two levels in the E
  type). Here each PE has one behavioural `+`, and synthesis chooses the adder
  structure.
* **Control encoding and start/clear.** The 4 states and their roles are from
  the paper. The encoding, the clear at start and the `start`/`busy`/`done`
  handshake are choices made here.
* **P preloaded with 1** (see above). Con1 is interpreted as choosing which
  register receives the product.
* **Exponent width** equals `N`, and every bit is scanned. There is no
  early-out on leading zeros.
* **Quotient bit in the last step.** The paper says q_i is forced to zero in
  the last step of the loop. Here all N steps use the computed q_i, and q_i is
  zero only outside the add state. This is the textbook radix-2 loop, and the
  tests confirm it gives `X*Y*2^-N mod M`.
* **No input registers.** Operands, modulus and `Nr` are read from the ports
  during the whole operation. `Nr` is not computed on chip.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_mont_pe_f`, `tb_mont_pe_e`, `tb_mont_pe_l` | PE sums, copy selection, `q_i`, lock and hold, against a word-level model |
| `tb_mont_pe_s` | four chained S PEs subtract 128-bit numbers; carry = `S >= M` |
| `tb_mont_shift_reg`, `tb_e_shift_reg` | delay taps; MSB-first exponent scan |
| `tb_rsa_ctrl_fsm` | the exact operation sequence of the binary method for random exponents, with a stub multiplier |
| `tb_mont_mult` | N = 64, W = 8: `R·2^N ≡ X·Y (mod M)`, `R < M`, `S < 2M`, `s_sub`, latency |
| `tb_rsa_coprocessor` | N = 32, W = 8: RSA round trip (65521·65519, e = 65537, d from the extended Euclidean algorithm), random and corner exponents, clock counts, and counts of squarings, multiplies, skipped multiplies and both subtraction outcomes |
| `tb_rsa_full` | one full 1024-bit exponentiation at default parameters against a wide-arithmetic reference, with its clock count |
| `tb_rsa_workloads` | 2048- and 4096-bit Montgomery products and latency; a complete 2048-bit exponentiation with a full-width exponent (6.4 M clocks); the first 16 products of a 4096-bit exponentiation, in the Montgomery domain |

The multiplier and coprocessor checks compare with plain big-integer arithmetic
(`%`, or shift-and-add modular multiplication above 2048 bits). They never use a
model of the PE row.

Running one with Verilator, for example the full-size test:

```
verilator --binary --timing --assert -y rtl rtl/rsa_pkg.sv \
          tb/tb_rsa_full.sv --top-module tb_rsa_full
./obj_dir/Vtb_rsa_full
```

`tb_rsa_full` takes a few seconds. `tb_rsa_workloads` takes about a minute.
A complete 4096-bit exponentiation takes 17 M clocks (E = 65537) to 26 M clocks
(a full-width exponent), which is five minutes or more of Verilator time. That
is why the 4096-bit test checks only the start of a run.

## Files

* `rtl/rsa_pkg.sv`: control-state and mux-select enums; the word-count function
* `rtl/mont_pe_f.sv`, `mont_pe_e.sv`, `mont_pe_l.sv`, `mont_pe_s.sv`: the four PE types
* `rtl/mont_shift_reg.sv`: tapped delay line for x, q and control
* `rtl/mont_mult.sv`: the multiplier (PE row, subtraction row, sequencer)
* `rtl/e_shift_reg.sv`, `rtl/rsa_ctrl_fsm.sv`: exponent register and control FSM
* `rtl/rsa_coprocessor.sv`: top level
