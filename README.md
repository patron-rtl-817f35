# PATRON-encoded FSM state register

A laser can flip individual flip-flops. If an attacker can flip up to `x`
state flip-flops of a finite state machine in one clock cycle, and some
state encoding lies within `x` flips of a *sensitive* state, the attacker can
jump straight into that state. A sensitive state is one that is authorised to
reach protected resources, or is protected itself. With binary or one-hot
state encoding, almost every state is that close.

Error-detecting and error-correcting codes (Hamming, repetition, non-linear
codes) avoid this, but they protect every state equally and so cost many
flip-flops. The pragmatic encoding here protects only what needs it:

* every **normal** code (NS) is **more than `x` flips** away from every
  **sensitive** code (SS);
* any two sensitive codes are a Hamming distance apart that is a **positive
  multiple of `x+1`**, so one sensitive state cannot be turned into another;
* normal codes may be close to one another. A fault that moves the FSM from
  one normal state to another is accepted, because it gives no access to
  anything sensitive.

Nothing detects or corrects faults. The protection comes only from which
codes the state register may hold. The results below use two measures:

* the **vulnerability metric** `VM(x) = |VS_x| / |S|`: the share of states from
  which `x` flips reach another state that is sensitive. It must be 0.
* the **code rate** `CR = k / n`: `k` flip-flops for binary encoding against
  `n` flip-flops for the protected encoding.

## The worked example (default parameters)

With `n = 4` flip-flops, `x = 1`, two sensitive and four normal states:

| index | kind      | code |
|------:|-----------|------|
| 0     | sensitive | 0000 |
| 1     | sensitive | 0011 |
| 2     | normal    | 0101 |
| 3     | normal    | 0110 |
| 4     | normal    | 1001 |
| 5     | normal    | 1010 |

Eight 4-bit values are at least 2 flips from both sensitive codes: 0101, 0110,
1001, 1010, 1100, 1101, 1110 and 1111. The first four are used. Binary
encoding needs 3 flip-flops for six states, so `CR = 3/4`. The other ten
4-bit values are unused. Six of them are one flip from a sensitive code.

## How the codebook is built

`rtl/patron_pkg.sv` computes the codebook while the design elaborates, using
constant functions. No table files are involved.

1. **Sensitive codes.** Values are scanned from 0 upward. A value is taken if
   its distance to every sensitive code taken so far is a multiple of `x+1`.
   Scanning stops once `NUM_SS` codes are found. For `x = 1` this gives the
   even-weight codes 0000, 0011, 0101, 0110, and so on.
2. **Normal codes.** Values are scanned from 0 upward again. A value is taken
   if it is more than `x` flips from every sensitive code. This is
   `NS = {z : HD(z, ss_1) > x AND ... AND HD(z, ss_m) > x}`. The method
   builds this set as the AND of one binary decision diagram per sensitive
   state. Here it is enumerated directly, which gives the same set.
3. **Checks.** The codebook's `|VS_x|` is computed. `patron_fsm` stops
   elaboration with `$error` if it is not 0, or if the requested numbers of
   codes were not found.

The greedy scan order is this design's own choice. For `x > 1`, the count
formula `floor(2^(n/(x+1)))` can promise more sensitive states than the
multiple-of-`(x+1)` rule allows. For example, with `n = 5, x = 2` the formula
gives 3, but the only pair is 00000 and 00111. The rule is what this design
enforces.

Limits of the search:

* codes up to 64 bits (`MAX_BITS`);
* at most 128 states (`MAX_STATES`);
* at most 16000 values scanned per search (`SCAN_LIMIT`). This keeps
  constant-function evaluation inside the default loop limits of common tools.

All the benchmark configurations below fit well within these limits.

Logical state numbering: indices `0 .. NUM_SS-1` are the sensitive states.
Indices `NUM_SS .. NUM_SS+NUM_NS-1` are the normal states.

## Hardware

```
next_state ──► patron_encoder ──► code_q (N_BITS flip-flops) ──► patron_decoder ──► state
 (index)        index → code        async reset to RESET_STATE      code → index       is_sensitive
                                                              └──► state_code          code_valid
```

* `patron_encoder` is a combinational lookup from index to code. An index
  outside the codebook encodes as `SAFE_STATE`, which must be a normal state.
* `patron_fsm` holds the `N_BITS` state flip-flops. They are reset
  asynchronously (active low) to the code of `RESET_STATE`, which by default
  is the first normal state. They load a new code on every rising edge. The
  register carries `(* fsm_encoding = "none" *)` because a synthesis tool
  that extracts and re-encodes FSMs would throw the encoding away. Check that
  your own flow leaves this register alone.
* `patron_decoder` matches the register contents exactly against every code
  in the codebook.

### Unused codes: the subtle part

A register value outside the codebook can only come from a fault. Some unused
codes are one flip from a normal code and also within `x` flips of a
sensitive code. Examples: 0100 and 0111 in the default codebook.

Suppose the decoder treated unused codes as don't-cares. A logic optimiser
could then merge 0100 with 0000. One flip would take normal state 0101 to
0100, and the logic would act as if it were in sensitive state 0000. That
reopens exactly the path the encoding closes.

So `patron_decoder` decodes every unused code explicitly:

* `state_idx = SAFE_STATE`;
* `is_sensitive = 0`;
* `code_valid = 0`.

The method does not specify this; it is this design's choice. `code_valid` is
only a report. Nothing in the design acts on it.

### Ports of `patron_fsm`

| port          | dir | width    | meaning |
|---------------|-----|----------|---------|
| `clk`         | in  | 1        | clock |
| `rst_n`       | in  | 1        | asynchronous active-low reset |
| `next_state`  | in  | `IDX_W`  | logical next state from your next-state logic |
| `state`       | out | `IDX_W`  | logical current state |
| `state_code`  | out | `N_BITS` | raw flip-flop contents |
| `is_sensitive`| out | 1        | register holds a sensitive code |
| `code_valid`  | out | 1        | register holds a code from the codebook |

`IDX_W = max(1, ceil(log2(NUM_SS + NUM_NS)))`. There is one cycle from
`next_state` to `state`. All outputs are combinational from the register.

Parameters: `N_BITS` (4), `X_FLIPS` (1), `NUM_SS` (2), `NUM_NS` (4) and
`RESET_STATE` (`NUM_SS`). To protect a controller, write its next-state and
output logic in terms of the logical indices, and feed `state` back into it.
The register is the only place where the encoded form exists.

## Benchmark configurations

The method was evaluated on five controllers: AES, SHA-256, RSA, a MIPS
processor and a memory controller. Each was protected against `x = 1, 2, 3`
flips. `tb_patron_workloads` builds each configuration at the smallest `n`
this construction needs and attacks it. It checks the codebook rules,
`VM = 0`, and every pattern of up to `x` flips from every state.

| controller        | SS | NS | k | n (x=1/2/3) | CR here          | published CR    |
|-------------------|---:|---:|--:|-------------|------------------|-----------------|
| AES               | 2  | 3  | 3 | 4 / 5 / 6   | 0.75 / 0.60 / 0.50 | 0.8 / 0.6 / 0.5 |
| SHA-256           | 3  | 4  | 3 | 4 / 6 / 7   | 0.75 / 0.50 / 0.43 | 0.8 / 0.5 / 0.4 |
| RSA               | 4  | 3  | 3 | 4 / 7 / 7   | 0.75 / 0.43 / 0.43 | 0.8 / 0.4 / 0.4 |
| MIPS processor    | 5  | 14 | 5 | 5 / 9 / 8   | 1.00 / 0.56 / 0.63 | 0.5 / 0.3 / 0.3 |
| memory controller | 8  | 58 | 7 | 7 / 9 / 9   | 1.00 / 0.78 / 0.78 | 0.3 / 0.2 / 0.1 |

For the three small controllers the code rates agree with the published
figures.

For MIPS and the memory controller this construction needs far fewer
flip-flops than published. The published rates imply roughly 10 to 70
flip-flops. How those widths were reached is not known here. Because the scan
is greedy from 0, a wider register gives the same codes with leading zeros,
so the published widths can be met too. The one exception is widths above 64
bits, which exceed `MAX_BITS`.

`n` is not monotonic in `x` (MIPS: 9 flip-flops for `x = 2`, 8 for `x = 3`).
This comes from the multiple-of-`(x+1)` spacing between sensitive codes.

Only the state register is modelled. The controllers' state transition graphs
are not part of this design. Power-delay figures after synthesis were
published for these controllers. They cannot be reproduced without the
controllers, and are not.

## Verification

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.

| testbench             | what it does |
|-----------------------|--------------|
| `tb_patron_encoder`   | every index, including out-of-range ones, for the default codebook and an `n=5, x=2` codebook, against hand-derived codes; distance rules |
| `tb_patron_decoder`   | every 4-bit and 5-bit code: index, sensitive flag, safe decode of unused codes |
| `tb_patron_fsm`       | default parameters: reset; 400 random transitions against a reference model, including the one-cycle latency; flips of up to `x` bits forced into the register from every state, none reaching a sensitive code; `x+1` flips shown to reach one |
| `tb_patron_workloads` | the 15 benchmark configurations above, each with a complete fault campaign (`tb/patron_campaign.sv`) |

The attacker is modelled with `force` on `dut.code_q`. Verilator reports
MULTIDRIVEN warnings for this, so build the testbenches with `-Wno-fatal`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/patron_pkg.sv tb/tb_patron_workloads.sv --top-module tb_patron_workloads
./obj_dir/Vtb_patron_workloads
```

For lint: `verilator --lint-only -Wall -y rtl rtl/patron_pkg.sv rtl/patron_fsm.sv`.

## Where this departs from the method, or goes beyond it

* The set of normal codes is computed directly, not with BDDs. The greedy
  order and the search limits are this design's own.
* For `x > 1`, the design enforces multiple-of-`(x+1)` spacing between
  sensitive codes, not the count given by the closed-form formula.
* The reset state, the decoding of unused codes and out-of-range indices to a
  normal state, the `code_valid` output and the FSM-encoding attribute are all
  this design's choices.
* Binary, one-hot, Hamming(7,4) and repetition ("naive") encodings, which
  serve as comparisons for the method, are not implemented.
