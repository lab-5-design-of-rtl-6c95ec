# A 4-bit register-file datapath with an 8-function ALU

This is a small teaching computer datapath. It moves 4-bit words between four
registers, R0 to R3, and operates on them. Each clock cycle carries out one
*microoperation*, such as `R1 <- R0 - R2` or `R3 <- data`. A flat *control
word* chooses the microoperation. Its fields drive the register selects, the
ALU function and a data-source multiplexer directly. A list of control words
applied one per cycle is a *microprogram*. No instruction decoder or sequencer
is involved: whoever drives the control word is the controller.

The RTL holds two datapaths, a simple one and an extended one. Both are built
bottom-up from the same five parts: a 2-to-4 decoder, a 4-bit register, a
"quad" 4:1 multiplexer, a quad 2:1 multiplexer and an ALU.

## The two datapaths

**Register-transfer datapath (`datapath_rt`).** A 4x4 register file has one
write port and one read port. The read port drives the output (`data_out`,
meant for LEDs). It also feeds input 1 of a quad 2:1 multiplexer. Input 0 of
that multiplexer is external data (`data_in`, meant for switches). The
multiplexer output goes to the register file's write data. The datapath can
do two things:

| DS | effect          |
|----|-----------------|
| 0  | `R[D] <- data_in` |
| 1  | `R[D] <- R[S]` (a copy; `S` may equal `D`) |

**ALU datapath (`datapath_alu`).** This register file has a second read port,
so any two registers can be read at once. Read port A feeds ALU operand A and
read port B feeds operand B. The ALU result `F` drives `data_out`. It also
feeds input 1 of the quad 2:1 multiplexer, whose input 0 is external data.

| DS | effect |
|----|--------|
| 0  | `R[D] <- data_in` |
| 1  | `R[D] <- f(R[SA], R[SB])`, where `f` is chosen by `s2 s1 s0` |

`lab5_top` places the two datapaths side by side. They share only `clk` and
`rst_n`. Every other port of each datapath is brought out under an `rt_` or
`alu_` prefix.

## Control words

Both control words are packed structs in `lab5_pkg`. The most significant bit
comes first, in the order below.

`rt_ctrl_t`, 5 bits: `[D1 D0 | S1 S0 | DS]`

`alu_ctrl_t`, 10 bits: `[D1 D0 | SA1 SA0 | SB1 SB0 | s2 s1 s0 | DS]`

| field        | meaning |
|--------------|---------|
| `dst`        | destination register, 0 to 3 |
| `src`        | source register (register-transfer datapath) |
| `src_a`, `src_b` | registers on ALU inputs A and B |
| `fn`         | ALU function (`alu_op_t`) |
| `ds`         | 0: external data, 1: internal result (`data_src_t`) |

For example, `10 01 11 011 1` is `R2 <- R1 + R3`. The word `11 11 11 010 1`
is `R3 <- R3 - R3`, which clears R3. So do `11 11 11 100 1` (R3 xor R3) and
`11 xx xx 000 1` (clear).

## ALU functions (`alu4`)

| s2 s1 s0 | F        |
|----------|----------|
| 000 | 0000 (clear) |
| 001 | B - A |
| 010 | A - B |
| 011 | A + B |
| 100 | A xor B |
| 101 | A or B |
| 110 | A and B |
| 111 | 1111 (preset) |

Sums and differences wrap modulo 16, and no carry or borrow is produced.
Signed and unsigned operands give the same 4-bit result. The ALU also has two
status outputs: `zero` is 1 when F = 0000, and `sign` is F's top bit. The
parameter `INC_FOR_PRESET = 1` makes code 111 compute A + 1 in place of
preset. The default keeps preset. Both extensions are optional variants of the
basic ALU. The flags only feed the outputs `zero` and `sign`, so they do not
affect the datapath.

## Timing of a microoperation

This is the part most worth understanding before using the RTL.

In the original circuit, the load-enable input LE *is* the clock. The
decoder, enabled by LE, routes an LE pulse (low, high, low) to the clock input
of the one destination register. That register then captures its input on the
rising edge of the pulse. Every other register sees no edge.

This RTL keeps that behaviour but avoids the gated clocks:

* All registers share one free-running `clk`.
* The decoder is still enabled by `le` and still decodes the destination.
  Its one-hot output drives each register's synchronous `load` input, not its
  clock.
* A register loads on the rising edge of `clk` at which both `le` and its own
  decoder output are 1.

So one microoperation is: set the control word (and `data_in` if DS = 0),
hold `le` high across exactly one rising edge of `clk`, then drop it. With
`le` low the control word can be changed freely, and the outputs show the
result the microoperation would write. Nothing is written.

Every read path is combinational: the register outputs, the read
multiplexers, the ALU and the 2:1 multiplexer. The only state is the 16
register bits. The loop from a register through the ALU back to the register
file's input is therefore broken only at the flip-flops. The value written at
an edge is computed from the register contents *before* that edge. Because of
that, `R0 <- R0 + R1` and `R3 <- R3 xor R3` work as expected. Read-after-write
needs no bypass: the written value is visible on the outputs right after the
edge.

An assertion in each register file checks that at most one register loads per
cycle.

## Reset

`rst_n` is an asynchronous, active-low reset. It clears all four registers of
both datapaths to 0000. This is an addition of this RTL: the original
registers have no reset and are loaded from the switches before use. The
simple datapath's first example table does exactly that.

## Module hierarchy

```
lab5_top
├── datapath_rt
│   ├── quad_mux2              write data: data_in or register read
│   └── regfile_1r
│       ├── decoder2to4        destination select, enable = le
│       ├── reg4 x 4           R0..R3
│       └── quad_mux4          read port
└── datapath_alu
    ├── regfile_2r
    │   ├── decoder2to4
    │   ├── reg4 x 4
    │   └── quad_mux4 x 2      read ports A and B
    ├── alu4
    └── quad_mux2              write data: data_in or ALU result
```

`lab5_pkg` holds the word width (`DATA_W` = 4), the register count, the ALU
opcodes, the data-source enum and the two control-word structs. Every data
module has a `WIDTH` parameter with default 4. For example,
`quad_mux4 #(.WIDTH(8))` is an "octal" 4:1 multiplexer. The register count is
fixed at four because the decoder is a 2-to-4 decoder.

## How far it follows the original circuit

These parts follow the original:

* the structure of both register files;
* the structure of both datapaths, including where the LEDs and switches
  attach;
* the control-word layouts;
* the meaning of DS;
* the ALU function table.

These are this RTL's own choices:

* the shared clock with load enables, instead of decoder-driven register
  clocks (see the timing section above);
* the asynchronous reset;
* the `zero` and `sign` status outputs, and the increment option;
* the decoder's internals. Only its function (2-to-4, active-high outputs,
  active-high enable) is specified, so it is written as a case statement;
* packing the control words into structs, and the `WIDTH` parameters.

The programmable-logic device, switches and LEDs of the original set-up are
not modelled. The datapaths' data inputs, control words and outputs are plain
top-level ports.

## Verification

Every module has a self-checking testbench in `tb/` named `<module>_tb`. Each
one compares the module's outputs with values computed independently inside
the testbench. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `decoder2to4_tb`: all 8 input combinations.
* `quad_mux4_tb`, `quad_mux2_tb`: random data on every input, every select.
* `reg4_tb`: asynchronous reset, loading and holding. The new value appears
  after the edge and not before.
* `alu4_tb`: all 8 x 16 x 16 inputs, with the flags and the increment
  variant.
* `regfile_1r_tb`, `regfile_2r_tb`: random writes and idle cycles against a
  model. Every register is read through every read port. Write timing and
  read-old-value-in-write-cycle are checked.
* `datapath_rt_tb`: the full register-transfer table (4 external loads and all
  16 `R[d] <- R[s]` pairs), then a random microprogram.
* `datapath_alu_tb`: the example microprogram below, with register contents
  worked out by hand, then a random microprogram.
* `lab5_top_tb`: both datapaths at default parameters running together. It
  counts each mechanism and fails if one never occurs: external load, internal
  write-back, self-referencing microoperation, each of the 8 ALU functions
  written back, idle cycle with `le` low, and zero and sign flags raised.

The example microprogram, starting from R0..R3 = 5, 3, 9, 12:

| control word | operation | R0 R1 R2 R3 after |
|---|---|---|
| 00 00 01 011 1 | R0 <- R0 + R1 | 8 3 9 12 |
| 01 00 10 010 1 | R1 <- R0 - R2 | 8 15 9 12 |
| 10 xx xx 000 1 | R2 <- 0 | 8 15 0 12 |
| 11 xx xx 111 1 | R3 <- 1111 | 8 15 0 15 |
| 00 10 11 110 1 | R0 <- R2 and R3 | 0 15 0 15 |
| 01 01 10 101 1 | R1 <- R1 or R2 | 0 15 0 15 |
| 10 01 11 100 1 | R2 <- R1 xor R3 | 0 15 0 15 |
| 11 11 11 100 1 | R3 <- R3 xor R3 | 0 15 0 0 |
| 10 01 11 011 1 | R2 <- R1 + R3 | 0 15 15 0 |
| 11 11 11 010 1 | R3 <- R3 - R3 | 0 15 15 0 |

## Simulating

The packages must be read first. From the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lab5_pkg.sv tb/lab5_top_tb.sv --top-module lab5_top_tb
./obj_dir/Vlab5_top_tb
```

To run another testbench, substitute its name. The RTL resets all state it
reads, so results do not depend on Verilator's random initial values. To lint
one module:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/lab5_pkg.sv rtl/datapath_alu.sv
```

A simulation of any testbench finishes in well under a second.
