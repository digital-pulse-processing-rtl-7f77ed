# Digital pulse processing in SystemVerilog

This design implements signal processing on pulse trains. A value is not
carried as a binary word. It is carried as the rate of pulses on a wire. A
signed value uses two wires: a pulse on `pos` means +1 and a pulse on `neg`
means -1 (`pulse_pkg::pulse_t`). The design is clocked, so one pulse is a
one-clock strobe. Every element assumes that pulses are sparse compared with
the clock.

## Building blocks (`rtl/`)

| Module | What it does |
|---|---|
| `if_modulator` | Signed integrate-and-fire encoder. A 16-bit accumulator adds a 15-bit input every clock. A carry emits a positive pulse and a borrow emits a negative pulse, so the rate is x / 2^16 per clock. |
| `pulse_merge` | Adder. It ORs several streams. Opposite signs in the same clock cancel. Two or more pulses of one sign in the same clock give one pulse and raise `collision`. |
| `pulse_delay` | Shift-register delay line with all taps visible. |
| `balancer`, `counting_network` | A toggle that alternates pulses between two outputs, and a periodic network of log2(W)^2 balancer layers. The network spreads pulses round-robin over W outputs. |
| `const_mult` | Multiplies by N/D. An accumulator modulo D steps by N on each pulse. Overflow emits +1 and underflow emits -1. |
| `pulse_fir` | Delay-and-add FIR filter. Taps are delays with an optional sign flip. A counting network sums the taps, and a subset of its outputs scales the result by OUT_NUM/NET_W. |
| `moving_average` | Reconstruction. It outputs the net pulse count over the last W clocks. |
| `abs_value`, `relu`, `min_max_sorter` | Small state machines for \|x\|, max(0,x), and min/max of two streams. They use a few states of hysteresis and follow pulse gaps, not rates. |
| `diff_analyzer` | Solves dx/dt = a·x. An up/down counter holds x, and an I&F modulator of a·x feeds its own pulses back into the counter. |

## LDPC decoder

`ldpc_decoder` is a fully parallel min-sum decoder for the IEEE 802.16e
rate-1/2 LDPC code. The default lifting factor is Z = 44, which gives a
1056-bit codeword. `ldpc_pkg` holds the 12 x 24 base matrix and the table
functions. A shift p is scaled as floor(p·Z/96).

- **Variables.** Each variable has two buses, one for the cost of 0 and one for the cost of 1 (`var_bus`). Each port on a bus hears every other port but not itself. Port 0 is the channel modulator, fed with the 15-bit LLR. Positive pulses go on bus 0 and negative pulses on bus 1.
- **Edges.** Each edge passes through an `offset_normalizer`, which removes the common part of the two costs.
- **Checks.** A check of degree d is a chain of d-2 three-input nodes (`check_node`, `parity3_node`). Each three-input node is built from `min_broadcast` elements on four internal buses, one for each even configuration.
- **Decision.** An 8-bit saturating counter per variable (`sign_detector`) gives the tentative bit. `codeword_verifier` checks every parity equation.
- **Control.** `ldpc_ctrl` runs one decode after `start`. It stops with success as soon as the tentative word is a codeword. It stops with failure after 32 input pulses per variable on average. The outputs also report cycles and input pulses.

**Status:** the decoder finds the codeword when the channel has no errors.
It does not yet correct words that contain channel errors. The testbench
reports those cases as failures.

## Filter bank

`filter_bank` has seven I&F-encoded sources merged into one stream. Three
64-tap pulse FIR filters separate that stream into bands. Each filter output
and the merged input also go through a 256-clock moving average.

The taps are computed at elaboration. Each tap set is the I&F encoding of a
Gaussian-windowed sinusoid: window 1024, sigma 160, periods 48, 80 and 128
clocks. The testbench drives a tone at each centre period in turn. The
matching band has the largest response at the tone frequency, by about 3x or
more over the other bands.

## Top

`dpp_top` places the decoder, the filter bank and the stand-alone operators
side by side. They share only the clock and the synchronous active-low reset.
Its parameter Z sets the decoder size. The default is 44.

## Testbenches (`tb/`)

Each block has a self-checking testbench `tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. `tb_dpp_top` runs all parts together at
Z = 8. It also counts each mechanism: decode success, timeout, merge
collision, multiplier overflow and underflow, relu blocking, sorter outputs
and analyzer overflow. A mechanism that never happens counts as a failure.
`ldpc_tb_util.svh` provides a reference encoder and a syndrome check that are
built directly from the base matrix.

## Design choices not fixed by the source description

- The design is clocked and registered.
- The base matrix comes from the standard.
- The min/max sorters use 5 states. Their inputs are sums of two I&F streams, so the gap between the streams can range over 4 values.
- The sign detector is 8 bits wide. With 3 bits, variables of degree 6 followed the check messages instead of the channel.
- A check node works reliably only when the pulse rates are a few percent of the clock or less. Above that, bus blinding and collisions lose pulses.
- Host software, the PCIe link, the quadratic-program network and the analog pulse regenerator are not built.

## Simulating

Every testbench builds with plain verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pulse_pkg.sv rtl/ldpc_pkg.sv \
  tb/tb_filter_bank.sv --top-module tb_filter_bank
./obj_dir/Vtb_filter_bank
```

The filter bank and all small blocks are simulated at their default sizes.
The decoder and the top were simulated at Z = 8, which is a 192-bit code.
There is no testbench of the whole top at Z = 44. At that size the decoder
has about a hundred thousand pulse elements, and it was not simulated.
