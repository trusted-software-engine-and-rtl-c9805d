# A trusted checking layer for an untrusted AES chip

A commercial AES chip cannot be opened up and inspected. Someone may have
added hidden logic to it, a hardware Trojan, that changes results or leaks
the key. This design does not try to find such logic. It works around it
with a trusted layer that sits between the user and the chip and does three
things:

- **It keeps the key.** The user side never handles the key, and the chip
  gets it only over the layer's own link.
- **It runs every job twice.** Each block goes to the untrusted AES core and
  also to a trusted software AES engine that runs on a processor inside the
  layer.
- **It compares the two answers.** If they match, the result goes to the
  user. If they differ, the layer stops for good and holds the untrusted
  cores in reset.

To the user the layer is invisible: they type text and get ciphertext back.

The RTL models the whole two-board demonstrator:

- **Board 1 (trusted)** has the user's keyboard and LCD, plus the checking
  layer.
- **Board 2 (untrusted)** has the AES encryption and decryption cores. Four
  key-leaking Trojans are included as examples of what an untrusted chip
  could hide.

The AES cores and the processor that runs the software engine are outside
the RTL. They connect at ports of the top module, and the testbenches supply
behavioural models for them.

## System at a glance

```
           board 1 (trusted)                          board 2 (untrusted)
 PS/2 ──► user_module ──text_out/load_out/──► trusted_module ═link═► untrusted_wrapper ─► AES encrypt core
 LCD  ◄──             ◄─text_in/load_in/done_in─      │      ═link═► untrusted_wrapper ─► AES decrypt core
                                                      │                     │
                                   FSL to/from the processor   stored key ──► 4 Trojans
                                   (software AES engine)                      (LED, antenna,
                                                                               resistor, die)
```

`trojan_detection_top` wires this together. One clock drives the whole
system, and board 2 receives it over the connector. Reset (`rst`) is
synchronous and active high.

The parts:

| Module | What it is |
|---|---|
| `user_module` | Keyboard input, text buffer, LCD output, handshake with the layer |
| `ps2_keyboard_rx` | PS/2 frame receiver |
| `lcd_controller` | HD44780-style 2x16 LCD driver on a 4-bit bus |
| `trusted_module` | Key store, job dispatch, comparison, halt |
| `p2s_serializer` / `s2p_deserializer` | The serial link ends, one on each side |
| `fsl_fifo` | Fast Simplex Link: a one-way FIFO to or from the processor |
| `untrusted_wrapper` | Board-2 link end around one AES core |
| `trojan_key_sequencer` | Steps through the key bits for a Trojan |
| `optical_trojan`, `em_trojan`, `thermal_resistor_trojan`, `thermal_fpga_trojan` | The four leaks |
| `tsd_pkg` | Shared widths, link structs and a microseconds-to-cycles helper |

## The board-to-board link

The boards are joined by a connector with few free pins. Key, text and result
therefore travel serially, one bit per wire, most significant bit first. Each
AES core has its own link.

**Down to the core** (`link_down_t`, 4 wires):

- `rst`: holds the wrapper and core in reset.
- `load`: a frame strobe. It is high for exactly 128 cycles, and one key bit
  and one text bit move in each of those cycles.
- `key`: the serial key bit.
- `txtin`: the serial text bit.

**Up from the core** (`link_up_t`, 2 wires):

- `done`: a frame strobe, high for 128 cycles.
- `txtout`: the serial result bit.

With the clock, both links use 13 connector pins.

The receiving deserializer counts the bits in a frame. When the strobe
falls, it reports one of two outcomes:

- a complete 128-bit word (`valid`)
- a `framing_error`, if the count was wrong

A frame that stops early or runs long is therefore never taken as data.

**Timing at the defaults:**

| Event | Cycles |
|---|---|
| `load_out` from the user to the first down-link bit | 2 |
| Down-link frame | 128 |
| Last down bit to the core's start strobe (`core_load`) | 3 |
| Core's `core_done` to the first up-link bit | 2 |
| Up-link frame | 128 |
| Last up bit to `load_in` at the user, if the software answer is already in | 5 |

Link overhead per block is therefore about 268 cycles plus the core's own
latency.

## The trusted module

This is the heart of the design. Its states are:

- **IDLE**: `done_in` is high and a new job may start. Only here can the key
  register be written, with `key_wr` and `key_value`.
- **RUN**: the job is being carried out.
- **CHECK**: the two answers are compared.
- **ACK**: waiting for the user's acknowledgement.
- **HALT**: the system has stopped.

**What happens when the user hands over a block.** The user module pulses
`load_out` with `text_out` and `encrypt_sw`. The layer then:

1. Serializes key and text onto the encryption link (`encrypt_sw`=1) or the
   decryption link (`encrypt_sw`=0). A single two-lane serializer is routed
   to whichever link is selected.
2. At the same time, writes the job to the processor over the outgoing FSL.
   The job is nine 32-bit words:
   - a header word, with the FSL control bit set and bit 0 = 1 for encrypt
   - four key words, most significant first
   - four text words, most significant first
3. Collects the core's 128-bit answer from the up-link, and four result words
   from the processor over the incoming FSL.
4. In CHECK, compares the two answers.
   - **Equal:** the result goes out on `text_in` with a one-cycle `load_in`.
     The layer then waits in ACK for `done_out` before it is ready again.
   - **Different:** the layer goes to HALT.

**HALT is final until reset.** While halted:

- `halted` is high.
- Both links hold `rst` high, so the untrusted cores stay in reset.
- Nothing is passed to the user.

Besides a wrong answer, two more events count as suspicious and also halt the
layer:

- a frame from a core that was not asked for anything
- a frame with the wrong number of bits

**Self-tests.** The layer also tests the cores on its own. After
`TEST_PERIOD` idle cycles (one second at the default 50 MHz), it runs a job
itself:

- The block is the fixed `TEST_TEXT`, encrypted or decrypted with the stored
  key.
- It goes alternately to the encryption core and the decryption core.
- It runs through the same dual path and compare as a user job.

While the test runs, `self_test` is high and `done_in` is low. A pass
returns to IDLE without telling the user. A failure halts the layer like any
other mismatch. If a user job and a self-test fall due in the same cycle,
the user job goes first. This catches a core that has gone bad while nobody
is using it.

**Rules the layer expects, checked by assertions:**

- The user may pulse `load_out` only while `done_in` is high.
- The FSL links must not be written when full or read when empty.

**Missing behaviour.** There is no timeout. If a core never answers, the
layer waits forever, and the user sees it as busy.

## The untrusted-board wrapper

`untrusted_wrapper` is the board-2 end of one link. It works like this:

1. It deserializes key and text.
2. Three cycles after the last bit, it presents them in parallel to the core
   (`core_key`, `core_txtin`) with a one-cycle `core_load`.
3. It waits for `core_done`.
4. It latches `core_txtout` and shifts it back up the link.

The key it last received is available on `stored_key`. In the top, the
Trojans take their key from the encryption wrapper's copy.

## User side: keyboard and LCD

**Keyboard.** `ps2_keyboard_rx` does the following:

- It synchronizes the PS/2 clock and data lines.
- It samples the data line on falling clock edges.
- It checks the start bit, odd parity and the stop bit of each 11-bit frame.
- It drops a frame that stalls for more than `TIMEOUT_US` (200 µs), so it
  can never lose alignment.

**Typing.** `user_module` maps scan-code set 2 make codes as follows:

| Key | Action |
|---|---|
| A–Z | Typed as upper case |
| 0–9 and space | Typed |
| Backspace | Deletes the last character |
| Enter | Sends the block |

Release codes (the `F0` prefix) and the `E0` prefix are skipped.

**The text block.** Up to 16 characters form one 128-bit block:

- The first character goes in bits [127:120].
- Unused places are filled with spaces.

Enter is ignored while the trusted layer is busy.

**LCD contents.**

- While typing, line 1 reads `ENCRYPT:` or `DECRYPT:`, following the
  `mode_sw` switch, and line 2 shows the text.
- While waiting for the result, a `*` is shown.
- When the result arrives, it is shown as 32 hex digits over both lines.
- The next key press starts a new string.

**LCD driver.** `lcd_controller` drives an HD44780-compatible 2x16 display
in 4-bit mode.

Initialisation:

1. Wait 15 ms.
2. Send the nibbles 3, 3, 3 and 2, with 4.1 ms, 100 µs and 40 µs gaps.
3. Send the commands `0x28`, `0x06`, `0x0C` and `0x01`. `0x01` needs a
   1.64 ms wait.

After that, it rewrites both lines continuously from a 32-byte frame buffer:

- `0x80`, then 16 characters for line 1
- `0xC0`, then 16 characters for line 2

The enable pulse is `E_CYCLES` wide, and `lcd_rw` is always 0.

## The Trojans

Each Trojan leaks the 128-bit key one bit at a time through a side channel
instead of the data pins. Each bit is held for half a second (`BIT_CYCLES` =
25,000,000 cycles at 50 MHz), so one full pass takes 64 s.

A pulse on `trojan_trigger` starts one pass, most significant bit first.
`trojan_active` shows which Trojans are running. What starts a leak in a real
attack is left open; here it is simply an input.

| Trojan | A 1 bit | A 0 bit |
|---|---|---|
| Optical (`optical_trojan`) | LED square wave at 4 kHz | LED square wave at 2 kHz |
| EM (`em_trojan`) | Spare pin toggles at the clock rate (50 MHz) | Pin held low |
| Thermal, resistor (`thermal_resistor_trojan`) | Pin driven high, heating a resistor | Pin low |
| Thermal, die (`thermal_fpga_trojan`) | 64 dummy registers invert every clock | Registers cleared |

Notes on individual Trojans:

- **Optical.** The LED tone can be heard with a light sensor and a speaker.
  Its phase restarts at every bit.
- **EM.** The pin acts as an antenna for a nearby radio receiver. The 50 MHz
  wave is the clock, gated by an enable that is retimed on the falling clock
  edge. This keeps the gate free of glitches. It is the one place where a
  clock drives data, and it is on purpose.
- **Thermal, die.** The registers carry a keep attribute and appear as a port
  so that synthesis keeps them.

The Trojans leak through side channels, not through the data pins. The
consistency check therefore cannot see them. It catches only a core whose
answers are wrong.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `CLK_KHZ` | 50000 | top, user, PS/2, LCD | Board clock, used for all time-based delays |
| `BIT_CYCLES` | 25,000,000 | top, Trojans | Clock cycles per leaked key bit (0.5 s) |
| `N_DUMMY` | 64 | top, die Trojan | Number of dummy heating registers (the count is this design's choice) |
| `WIDTH` | 128 | most blocks | AES block and key size |
| `FSL_W`, `FSL_DEPTH` | 32, 16 | trusted module | Processor word width and FIFO depth |
| `TEST_PERIOD` | 50,000,000 | top, trusted module | Idle cycles before a self-test (1 s) |
| `TEST_TEXT` | `00112233…EEFF` | trusted module | Block used by the self-tests |
| `F0_HZ`, `F1_HZ` | 2000, 4000 | optical Trojan | LED tones for 0 and 1 |
| `TIMEOUT_US` | 200 | PS/2 receiver | Idle time that drops a partial frame |
| `E_CYCLES` | 12 | LCD | Enable pulse width |

## Simulating

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/tsd_pkg.sv tb/aes_model_pkg.sv tb/tb_trojan_detection_top.sv \
  --top-module tb_trojan_detection_top
./obj_dir/Vtb_trojan_detection_top
```

There is one testbench per module, `tb/tb_<module>.sv`. The shared
behavioural models are:

- `aes_model_pkg.sv`: a FIPS-197 AES-128 reference. Its S-box is computed,
  not tabled, and it is checked against the FIPS-197 example vector.
- `aes_core_model.sv`: the untrusted AES core, with a fixed latency. Its
  `trojan_leak` input makes it XOR the key into its result. That is a Trojan
  that leaks the key through the text pins, which is exactly what the
  checking layer must catch.
- `sw_engine_model.sv`: the processor and software engine at the FSL ports.
- `lcd_monitor.sv`: decodes the LCD bus back into screen contents.

There are two system-level testbenches.

**`tb_trojan_detection_top`** runs at a 1 MHz clock with 1000-cycle Trojan
bits, to stay short. It checks each mechanism at least once:

- key store
- a good encryption
- a good decryption
- a mode switch
- Backspace
- halt on a core that returns a wrong answer
- periodic self-tests on both cores (the period is cut to 30,000 cycles)
- all four leaks, including the leaked bit values

**`tb_trojan_detection_top_full`** uses every default (50 MHz, half-second
bits). It types and encrypts "HI", checks the ciphertext on the LCD, and checks the first two leaked key bits at their full length. It
runs in about a minute.

## Departures from the original demonstrator, and what is missing

**Where the comparison runs.** In the original system, the processor
software does the comparison, and user data passes through the processor
between the user module and the link peripheral. Here:

- the user module connects straight to the trusted module, as the original
  block diagram draws it;
- the trusted module compares the answers in hardware;
- the processor is reduced to a reference engine that answers FSL job
  messages.

**Choices the original does not specify.** These are this design's own:

- the link framing
- the FSL job format
- the user handshake
- the key set
- the LCD layout, including hex output for the result
- the PS/2 timeout
- the fixed 16-character string length
- the halt on malformed frames
- the self-test schedule

**The key.** How the key reaches the layer is not specified. Here it is a
parallel write port.

**Self-tests.** The original says only that the layer periodically tests
for Trojans. The period, the test block and the alternation between cores
are this design's own.

**Not included:**

- the AES cores
- the processor and its memory, buses and standard peripherals
- the software AES engine
- board hardware: DDR memory, configuration PROM, SD slot, RS-232 level
  shifter, regulators, oscillator, connector, JTAG chain and the PCB itself

These are either third-party parts or have no logic function. The testbench
models stand in for the first three.
