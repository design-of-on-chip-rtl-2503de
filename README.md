# TDSP — an on-chip temperature monitor on the APB bus

Heat is the main limit on how hard a system-on-chip can be driven: junction
temperature rises with power density, and a hot die is slower and wears out
sooner. The TDSP ("temperature-based digital signal processing" unit) is a small
APB peripheral that lets a microcontroller watch its own die temperature. An
on-chip sensor feeds an 8-bit ADC; the TDSP reads the ADC code every 8 clocks,
turns it into degrees Celsius with a look-up table, decides whether the
temperature is **low**, **average** or **high**, and reports the temperature and
an interrupt flag to the CPU. The host can move the high-temperature limit by
writing a reference temperature over the bus.

The whole unit is about 70 flip-flops and a 256 x 8 constant table, designed for
a 16 MHz APB clock.

## Pipeline

```
 INPUTADC[7:0] ─┐
                ▼
 u1 counter ─► u2 interface ─► u3 voltage-to- ─► u4 watchdog ─► u5 interrupt ─┬► u6 output ────► PRDATA[31:0]
  (strobe      register         temperature      (low / avg /    generator    │  converter
   every 8)    (ADC + ref)      table            high)                        └► u7 function ──► PREADY
                ▲                                                                controller
 PSEL PENABLE PWRITE PWDATA
```

| Instance | Module | What it does |
|---|---|---|
| u1 | `tdsp_counter` | Counts PCLK modulo 8 and pulses `sample_tick` in the last cycle of each period. |
| u2 | `tdsp_interface_reg` | Takes `INPUTADC` on `sample_tick`; takes `PWDATA[7:0]` as the reference temperature on an APB write. Sets `adc_valid` / `ref_valid` on the first sample / first write after reset. |
| u3 | `tdsp_v2t_lut` | Registered 256-entry table: code → signed °C. |
| u4 | `tdsp_watchdog` | Classes the temperature: low if below 0 °C, high if above the limit, average otherwise. The limit is the host's reference once written, 50 °C before. |
| u5 | `tdsp_interrupt_gen` | Registers the temperature (`temp_out`) and turns the classes into `interrupt_low` and `interrupt_high`. |
| u6 | `tdsp_output_converter` | Packs temperature and interrupts into the 32-bit read word. |
| u7 | `tdsp_function_controller` | Drives `PREADY` high while either interrupt is raised. |

Shared constants and types (`TEMP_W`, limits, table line, sample period, the
`temp_range_e` enum) live in `tdsp_pkg`.

## The read word

`PRDATA` always holds the latest result; no read access is needed to update it.

| Bits | Content |
|---|---|
| 31:24 | 0 |
| 23 | sign of the temperature (1 = below 0 °C) |
| 22:16 | magnitude of the temperature, °C |
| 15:8 | `interrupt_low` copied to all 8 bits |
| 7:0 | `interrupt_high` copied to all 8 bits |

Examples: 73 °C and too hot → `32'h0049_00FF`; 47 °C and in range →
`32'h002F_0000`; −9 °C and too cold → `32'h0089_FF00`.

The temperature is **sign-magnitude** on the bus, though it is two's complement
inside the pipeline. The byte-wide interrupt fields mean that a CPU can test
either byte for non-zero.

## Temperature conversion

The table holds, for every code `c`,

    temp(c) = 2*c − 27  °C, clipped to +127

so codes 0..77 span −27 °C to +127 °C and codes 78..255 read +127 °C. This line
is fitted to four calibration points of the original design (codes 9, 37, 43, 50
→ −9, 47, 59, 73 °C), all of which it matches exactly. The original table is
not published beyond those points. For a real sensor, set `LUT_SLOPE` and
`LUT_OFFSET` or replace `tdsp_pkg::lut_entry` with the sensor's calibration. The
table is built at elaboration from that function, so no data file is needed.

## Watchdog limits and the host reference

* Low: `temp < LOW_LIMIT` (0 °C).
* High: `temp > high limit`, where the high limit is `HIGH_DEFAULT` (50 °C)
  until the host writes a reference, and the reference afterwards.
* Average: anything else.

A write is any cycle with `PSEL`, `PENABLE` and `PWRITE` all high. There is no
address decode, because the unit has only one writable register.
`PWDATA[7:0]` is read as a signed °C value, and the upper bits are ignored. A
write of 0 °C is a valid limit; "no reference yet" is tracked by a separate
`ref_valid` flag, which only reset clears. Only the high limit is programmable.

The two default limits are this design's own values. The original design only
fixes that −9 °C is low, 47 °C is average and 59 °C is high, so any low limit in
(−9, 47] and any default high limit in [47, 59) behaves the same on its
examples. Both limits are module parameters of `tdsp_watchdog`.

## Timing

All registers share `PCLK` and an asynchronous, active-low `PRESETn`.

* After reset is released, `sample_tick` goes high following the 7th rising
  edge. The ADC code is captured on the 8th edge and then on every 8th edge, so
  at 16 MHz the ADC is read at 2 MS/s.
* A captured code reaches `PRDATA`/`PREADY` 4 edges later: table, watchdog,
  interrupt generator, then output converter or controller. The worst case from
  an `INPUTADC` change to `PRDATA` is therefore 12 edges (750 ns at 16 MHz).
* A reference write changes the class computed in the next cycle. It shows on
  `PRDATA` 3 edges after the write edge.
* Until the first sample after reset, `PRDATA` and `PREADY` stay 0. Without this
  quiet period, a "−27 °C, too cold" result would come out of the reset value of
  the ADC register.

## PREADY is an attention flag

`PREADY` here does **not** mean "transfer complete" as in the APB
specification. It is high whenever `interrupt_low` or `interrupt_high` is, which
is how the original design uses it: the CPU can treat it as an interrupt
request. Reads and writes themselves complete without wait states. To put the
unit on a standard APB fabric, tie the bridge's PREADY input high and route this
output to the interrupt controller instead.

Interrupts are levels that follow the temperature. They fall by themselves when
the temperature returns to the average range, so they need no clear register.

## Where this RTL departs from, or adds to, the original design

* The table contents, the two default limits, the sign-magnitude reading of
  the temperature field (inferred from the printed word for −9 °C), the valid
  flags, the strobe phase and the register stages are this design's choices.
* In the original block diagram, the watchdog receives `PSEL`, `PENABLE` and
  `PWRITE` itself. Here the write is decoded once in the interface register,
  which passes on `reftemp` and `ref_valid`.
* The original waveform shows two internal signals, `set` and `out[7:0]`,
  whose role is not described. They have no counterpart here.
* In the original waveform, monitoring starts roughly 500 ns after reset. Here
  it starts after 750 ns: 8 cycles to the first sample plus 4 pipeline stages.
* The watchdog's `average_temp` output is kept for observability and has no
  consumer. The average range is signalled by the absence of both interrupts.
* There is no `PADDR`, `PSLVERR` or `PPROT`: the original bus connection lists
  only `PCLK`, `PRESETn`, `PSEL`, `PENABLE`, `PWRITE`, `PWDATA`, `PRDATA` and
  `PREADY`.
* The temperature sensor, the ADC and the CPU are outside this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | Checks |
|---|---|
| `tb_tdsp_counter` | strobe position and period, restart after reset |
| `tb_tdsp_interface_reg` | capture only on strobe; write only on a full APB access; random APB traffic |
| `tb_tdsp_v2t_lut` | all 256 codes against the formula; the four calibration points; latency |
| `tb_tdsp_watchdog` | boundary temperatures; 400 random temperature/reference cases against a model |
| `tb_tdsp_interrupt_gen` | one-cycle latency and mapping of the classes |
| `tb_tdsp_output_converter` | every temperature −127..127 with random interrupts; the literal example words |
| `tb_tdsp_function_controller` | PREADY = low OR high, one cycle later |
| `tb_tdsp_top` | the full unit at default parameters (below) |

`tb_tdsp_top` first replays the original design's reference scenario at 16 MHz:

1. reset with code 1;
2. codes 9, 37 and 43 for 2 µs each;
3. code 50 while the host writes 60 °C.

It checks the printed words `0089_FF00`, `002F_0000`, `003B_00FF` and
`0049_00FF`. Then it checks:

* that 59 °C drops to "average" under the 60 °C reference;
* the 12-edge worst-case latency;
* table saturation.

Finally it runs 1500 random cycles with host writes and resets against a
cycle-exact model. It counts each mechanism (low, average, high, write, a write
that changes the class, saturation, reset during operation, the quiet period
after reset) and fails if one never occurs.

Run any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
          rtl/tdsp_pkg.sv tb/tb_tdsp_top.sv --top-module tb_tdsp_top
./obj_dir/Vtb_tdsp_top
```

Assertions in the RTL check two rules:

* `PENABLE` never rises without `PSEL`;
* the watchdog never raises low and high together.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `WIDTH` / `TEMP_W` | 8 | all | ADC code and temperature width |
| `COUNT_CYCLES` | 8 | `tdsp_counter` | clocks per ADC sample |
| `LUT_SLOPE`, `LUT_OFFSET` | 2, −27 | `tdsp_v2t_lut` | table line, °C = slope·code + offset |
| `LOW_LIMIT` | 0 | `tdsp_watchdog` | below this is low |
| `HIGH_DEFAULT` | 50 | `tdsp_watchdog` | high limit before the host writes one |

The read-word layout assumes `WIDTH` = 8: the magnitude field is 7 bits wide.
