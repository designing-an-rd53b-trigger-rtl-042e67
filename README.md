# RD53B trigger pattern encoder for a YARR-style TX core

An RD53B pixel readout chip is told which LHC bunch crossings to read out by
*trigger commands*. A trigger command is a 16-bit frame made of two DC-balanced
8-bit symbols (each symbol has four ones and four zeros). The first symbol says which
of four consecutive bunch crossings are triggered. The second symbol is a tag that
identifies the command. When nothing is to be sent, the line carries the PLL-lock
pattern `1010...`, which also serves as the idle command.

The readout firmware's trigger logic produces plain trigger *pulses*, one pulse per
triggered bunch crossing. This RTL turns those pulses into the chip's command
encoding in hardware and sends it on the serial command line. It is built from four
parts:

```
            Wishbone
               |
        +--------------+  interval (0x20)   enable (0x21)
        | tx_core_regs |-----------+---------------+
        +--------------+           |               |
                                   v               v
 trig_i --> trigger_extender --> trig_code_gen --32b/ready--> tx_channel --> cmd_o
                                                                  ^
                              cmd_word_i / cmd_valid_i / cmd_read_o
```

`rd53b_tx_core` is the top. The trigger unit that makes the pulses and the core's
other command sources are not part of this RTL. They connect through `trig_i` and
`cmd_word_i`.

## Time base

One bunch crossing (25 ns at 40 MHz) is four clock cycles, so the core is meant to
run at 160 MHz. A trigger pulse is four cycles long. Everything in the encoder
counts from reset:

| unit | length | counted by |
|---|---|---|
| window (one bunch crossing) | 4 cycles | 2-bit trigger counter |
| command word (four bunch crossings) | 16 cycles | 2-bit command counter |
| output word / serial frame (two command words) | 32 cycles | word-phase bit, and the channel's 5-bit bit counter |

Take edge 0 to be the first rising edge after reset is released. Then window `w`
covers edges `4w..4w+3`, command word `k` covers windows `4k..4k+3`, and output pair
`p` (words `2p` and `2p+1`) is registered at edge `32p+31`. The TX channel loads that
pair at edge `32p+32` and shifts it out MSB first over the next 32 cycles. A pulse
therefore leaves the core between 33 and 64 cycles after it arrives. The only way to
line trigger pulses up with command words is to count cycles from reset, which is
what the end-to-end testbench does.

## Trigger code generator (`trig_code_gen`)

This is the core of the design. It has four stages.

1. **Pulse processing.** The input is sampled every cycle. On the last cycle of each
   window (trigger counter = 3), the three stored samples and the current one are
   OR'ed into one *trigger bit*. A pulse that is high on any cycle of the window
   therefore triggers that bunch crossing, even if it is only one cycle long or
   starts late.
2. **Pattern.** Each trigger bit is shifted into a 4-bit pattern register, and the
   command counter advances. The earliest bunch crossing ends up in bit 3, so
   pattern `1000` ("T000") means "the first of the four".
3. **Encoding.** When the command counter wraps, the pattern is complete.
   - A non-zero pattern gives the word `{trig_symbol(pattern), tag_symbol(tag)}`.
   - Pattern `0000` gives the idle frame `0xAAAA`.
   - A 6-bit tag counter advances with every word and goes from 49 back to 0
     (parameter `TAG_MAX`).
4. **Output.** The first word of each 32-cycle interval waits in a 16-bit register.
   The second word is appended to it, and `code_o = {first, second}` is updated
   once every 32 cycles.
   - `code_ready_o` is high while `enable_i` is set and at least one half of
     `code_o` is a trigger command.
   - `code_update_o` pulses for one cycle after each update.

The symbol tables are in `rd53b_pkg`:

| pattern | symbol | pattern | symbol | pattern | symbol |
|---|---|---|---|---|---|
| 0001 | 0x2B | 0110 | 0x36 | 1011 | 0x4D |
| 0010 | 0x2D | 0111 | 0x39 | 1100 | 0x4E |
| 0011 | 0x2E | 1000 | 0x3A | 1101 | 0x53 |
| 0100 | 0x33 | 1001 | 0x3C | 1110 | 0x55 |
| 0101 | 0x35 | 1010 | 0x4B | 1111 | 0x56 |

The 54 tag symbols come in this order:
- tags 0–31 are the 32 RD53B data symbols, `0x6A` to `0xD4`;
- tags 32–37 are `0x63 0x5A 0x5C 0xAA 0x65 0x69`;
- tags 38–52 are the 15 trigger symbols above;
- tag 53 is `0x66`.

The tag counter only reaches tags 0–49.

Example: with no extension, patterns `1000, 0001, 0000, 1001` in words 0–3 give the
output words `3A6A 2B6C AAAA 3C72`. The tag advances on the idle word too.

## Trigger extender (`trigger_extender`)

Software can lengthen each trigger pulse by N cycles (register 0x20).
- With N = 0 the input passes straight through, combinationally.
- With N > 0, a down-counter is reloaded with N on every cycle the input is high.
  The output is `input OR counter != 0`, so an L-cycle pulse becomes L + N cycles
  long.
- A new pulse during the extension restarts the count.

This is how one trigger pulse can fill several bunch crossings. For example, a 4-cycle
pulse at the start of a command word gives these patterns:

| N | pattern(s) |
|---|---|
| 7 | `1110` |
| 11 | `1111` |
| 15 | `1111`, then `1000` in the next word |

## Configuration registers (`tx_core_regs`)

This is a classic Wishbone slave with an 8-bit address and 32-bit data. It acknowledges
each access with a registered `ack` one cycle after `cyc & stb` are seen. It has two
registers, both read/write and both cleared on reset:

| address | register | bits used |
|---|---|---|
| 0x20 | trigger extension interval (cycles) | 31:0 |
| 0x21 | trigger code generator enable | 0 |

Any other address is acknowledged and reads as zero. A concurrent assertion checks
that `ack` only answers a bus cycle in progress.

## TX channel (`tx_channel`)

Every 32 cycles the channel loads one 32-bit word and shifts it out MSB first on
`cmd_o`. A fixed-priority encoder chooses the word:
1. The trigger code generator's word, if `trig_ready_i` is set. This is the highest
   priority, so triggers are never delayed by configuration traffic.
2. Otherwise, `cmd_word_i` if `cmd_valid_i` is set. In that case `cmd_read_o`
   pulses for one cycle so that a FIFO can pop the word.
3. Otherwise, the idle word `0xAAAAAAAA`.

`sel_o` shows which of the three sources the word now on the line came from.

The generator and the channel are reset together. The generator updates its output
one cycle before each load, so every generated word is sent exactly once. The top
checks this with an assertion.

## What is this design's own choice

The following points were settled here rather than taken from a specification. Each
is marked in the opening comment of its file.

- **Trigger bit timing.** The bit is formed on the window's last cycle from three
  stored samples plus the live input. A literal reading of the encoder's description
  would use a full 4-sample shift register that is OR'ed once the trigger counter
  returns to 0. That version adds a window of latency and needs an extra start-up
  guard. The grouping of cycles into windows and words is the same either way.
- **Tag counting.** The tag counter advances on every 16-cycle word, idle words
  included. It does not advance only on trigger commands.
- **Tag symbols and idle.** The tag symbols 0–53 and the idle value `0xAAAA` follow
  the RD53B protocol.
- **Ready signal and strobe.** `code_ready_o` is a level, not a pulse, and
  `code_update_o` is an extra output.
- **Interfaces and reset.** The register widths, the Wishbone handshake, the reset
  values, the channel's 32-bit MSB-first framing and its single generic
  lower-priority input are all choices made here. The real TX core has more
  registers and command sources, which are not modelled.
- **Not generated.** The core never generates the Sync command. It must be sent
  through `cmd_word_i`, like any other non-trigger command.

## Simulating

All testbenches check themselves and end with a `TB_RESULT checks=N failures=M`
line. Each has a watchdog. The `.sv` files in `rtl/` are found through `-y`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/rd53b_pkg.sv \
          tb/rd53b_tx_core_tb.sv --top-module rd53b_tx_core_tb -o sim
./obj_dir/sim
```

Replace the testbench and top module names to run the others.

| testbench | what it checks |
|---|---|
| `trig_code_gen_tb` | 60 output pairs against a reference model. It checks the value and the cycle of every update (one every 32 cycles), `code_ready` on every cycle with the enable toggling, and two tag wraps. |
| `trigger_extender_tb` | Intervals 0, 7, 11, 15 and random values, checked cycle by cycle and by pulse width. It also checks retriggering. |
| `tx_core_regs_tb` | Reset values, write and read-back of both registers, unused addresses, and acknowledge timing. |
| `tx_channel_tb` | 200 serial frames against the priority rule, `sel_o`, and one read strobe per command word sent. |
| `rd53b_tx_core_tb` | End to end at default parameters, decoding the serial line (see below). |

`rd53b_tx_core_tb` covers:
- the patterns 1000/0001/0000/1001;
- extensions 7/11/15 of a 1000 pulse;
- triggers while the generator is disabled;
- random traffic with tag wrap, a trigger word pre-empting a queued command word, and
  register read-back.

It counts each of these and fails if one never happens. It runs in well under a
second.

## Extending

- To use a different tag range, set `TAG_MAX`. Values up to 53 are allowed; an
  elaboration-time assertion catches anything larger.
- To add command sources to the channel, add priorities below the trigger code in
  `tx_channel`.
