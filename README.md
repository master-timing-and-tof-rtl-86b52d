# Master Timing and TOF module

This design measures and generates pulse times with sub-nanosecond resolution
over intervals as long as a third of a second. It combines two ways of measuring
time. A 50 MHz clock counter is exactly linear over a wide range but only
resolves 20 ns. An analog vernier divides one clock period into 256 steps of
about 78 ps. Each time is therefore a 24-bit clock count plus an 8-bit fraction,
about 32 bits in all. The 24-bit counter wraps after 2^24 × 20 ns ≈ 335 ms.

The module has two halves that share the clock counter:

* The **Time Master** is a pattern generator. A PC loads a list of pulses. Each
  pulse has a clock count, a fine delay in 1/256-period steps and an output
  channel. The Time Master then plays the list on 16 outputs. Channel numbers
  are 8 bits wide, so up to 256 channels can be named.
* The **TOF** (time-of-flight) section is a time recorder. For each pulse on any
  of its 16 inputs it stores three words: the clock count, the channel number
  and the vernier value. The PC reads them back.

Wiring the Time Master outputs to the TOF inputs calibrates the module. Known
times go in, and the recorder's answers show how linear its vernier is.

The RTL here covers all the digital logic. The two verniers, the NIM/TTL output
drivers and the oscillator are analog parts. They connect through ports of the
top module. The testbenches contain behavioural models of the two verniers.

## Time base: binary counter and Gray code

`clock_counter` is a free-running 24-bit binary counter. A start sets it to
zero; otherwise it never stops. `bin2gray` turns its value into Gray code
(`g = b ^ (b >> 1)`). Both halves see only the Gray code, and the pattern words
and stored time stamps are in Gray code too. Successive Gray codes differ in one
bit, so a word taken while the counter is changing is wrong by at most one
count, never by a large jump. The PC converts stored stamps back to binary:
`b[23] = g[23]`, then `b[i] = b[i+1] ^ g[i]`.

## Time Master

`time_master` holds three 32K-word memories that the PC fills at consecutive
addresses:

| memory   | width | contents                                   |
|----------|-------|--------------------------------------------|
| PAT MEM  | 24    | Gray-coded clock count of the pulse        |
| VER MEM  | 8     | fine delay, in units of 1/256 clock period |
| CHID MEM | 8     | output channel                             |

A run goes through these steps:

1. A start clears the counter and the 15-bit address register MEM ADD
   (`mem_add_reg`).
2. The sequencer reads the three words at MEM ADD into the pattern latch
   (`word_latch`, one 40-bit register).
3. It arms the 24-bit comparator (`word_comparator`).
4. When the Gray clock equals the pattern word, the sequencer makes a one-clock
   `vern_trig` pulse for the external programmable delay. It holds the word's
   delay code on `vern_code` and its channel number for the output decoder.
5. It increments MEM ADD and fetches the next word.
6. The delayed pulse comes back on `vern_pulse`. `channel_decoder` sends it
   to the one output named by the channel number. Numbers 16 to 255 select no
   output.

**Timing.** For a pattern word P, the trigger rises on the clock edge after the
one that loads P into the counter. Let t0 be the edge at which the counter
became 0. Then the output pulse leaves at

    t0 + (P + 1)·T + d0 + code·T/256,      T = 20 ns

where d0 is the fixed delay of the analog path. A code of 255 delays the pulse
by 255/256 of a clock period, so the delay line's full scale is one period.

**Dead time.** Pulses must be at least 140 ns, or 7 clocks, apart. After a
match the comparator ignores the clock for 6 cycles, so the next match can come
7 clocks after the last one (parameter `DEAD_P`). The next word is fetched
during this time: one clock to read the memory and one to load the latch. Note
what happens to a word that falls inside the dead time. The comparator only
tests for equality, so the word is missed. The pattern then waits until the
24-bit counter comes round to that value again, about 335 ms later. Patterns
must keep their pulses 7 or more clocks apart.

**End of a pattern.** The sequencer stops after `pat_len` words, a value that
the PC sets. A stop command ends a run at once.

## TOF recorder

`time_of_flight` takes asynchronous pulses on `pulse_in[15:0]`.

**Catching the pulse.** The pulses can be shorter than a clock period. The
simulated Time Master's pulses are 10 ns long, half of one period. So the
encoder (`tof_channel_encoder`) does not sample the inputs directly. Instead,
each input clocks a toggle flip-flop of its own. The toggle goes through a
two-flop synchronizer and a change detector. The result is a one-cycle `hit`
with the channel number. If several channels change on the same clock, the
lowest channel is kept, because there is only one vernier. For three clocks
after reset the encoder reports nothing, which hides the toggles' random
power-up state.

**What is stored.** Take a pulse that arrives between clock edges k−1 and k.
`hit` is high in the cycle after edge k+1, and in that cycle the recorder writes
three words at its next address:

* TOF TIME MEM: the Gray code of N, the counter value after edge k+1;
* TOF CHID MEM: the channel number;
* TOF VER MEM: the ADC code v.

**The vernier.** The external vernier is a time-to-amplitude converter read by
an 8-bit flash ADC. The pulse starts it, and the second clock edge after the
pulse (edge k+1, "the following clock pulse plus one") stops it. The interval is
therefore always between one and two clock periods long, which keeps the
converter away from zero-length intervals. An ideal converter gives
v = floor(256·(interval − T)/T). The pulse time is then

    t_pulse = t0 + (N − 1)·T − v·T/256      (within one step, T/256 ≈ 78 ps)

**Dead time and arming.** After storing a pulse the recorder ignores new hits
for 4 clocks (parameter `DEAD_P`, 80 ns). The `tac_arm` output tells the
converter when it may accept a pulse. A pulse is stored about 3 clocks after it
arrives. With a 4-clock dead time, pulses from the Time Master at its 7-clock
minimum separation all find the converter armed.

The recorder sees a pulse two clocks after it arrives. To store a pulse, it
checks two things, and both must hold:

* `tac_arm` was high when the pulse arrived, which the recorder knows from a
  two-clock history of `tac_arm`;
* the recorder is not in its dead time.

If either fails, the recorder drops the pulse. The converter made no fresh
conversion for it, so the ADC code on hand belongs to an earlier pulse. This
rule also covers a pulse that comes while the converter is still busy with the
previous one. The analog side and the digital side thus always agree on which
pulses were measured.

**Start, stop and full.** A start clears the write address and arms the
recorder. A stop disarms it. After 32768 records the recorder stops and raises
`full`.

**Linearity.** A real converter is not linear. The calibration is done by
the PC from the recorded data. Pulses that arrive at random times relative to
the clock should fill all vernier values equally. Call the histogram of vernier
values dN/dv. Its running integral I(v), normalised as t(v) = I(v)/I(v_max),
gives the true fraction of a period for each code. You can measure the same
curve by sweeping the Time Master's delay code with its outputs looped back to
the TOF inputs. No hardware in this design computes t(v).

## Start control

`start_control` starts a run in one of two ways:

* a keyboard command from the PC, which takes effect at once;
* the rising edge of the asynchronous `ext_start` input, which takes effect two
  to three clocks later.

A long external level starts only one run. A start clears the clock counter and
MEM ADD and arms both halves.

## PC bus

`host_interface` connects the PC. It uses a simple synchronous bus:

* `host_req` makes one request per clock, and `host_we` marks a write;
* the address `host_addr[17:0]` is {region[2:0], word[14:0]};
* data is 32 bits wide;
* read data comes with `host_rvalid` one clock after the request.

| region | contents                  | access                                   |
|--------|---------------------------|------------------------------------------|
| 0      | PAT MEM                   | write (data bits 23:0)                   |
| 1      | VER MEM                   | write (bits 7:0)                         |
| 2      | CHID MEM                  | write (bits 7:0)                         |
| 3      | TOF TIME MEM              | read                                     |
| 4      | TOF CHID MEM              | read                                     |
| 5      | TOF VER MEM               | read                                     |
| 6      | word 0: pattern length    | read/write, 0..32768                     |
|        | word 1: command           | write: bit 0 start, bit 1 stop           |
|        | word 2: status            | bit 0 TM running, bit 1 TOF running, bit 2 TOF full, bits 30:16 MEM ADD |
|        | word 3: TOF record count  | read                                     |

The PC bus cannot read back the pattern memories.

## Top level and analog ports

`master_timing_tof` connects the start control, the counter and Gray encoder,
the PC bus, the Time Master and the TOF recorder. Its ports:

| port                       | dir | connects to                                                   |
|----------------------------|-----|---------------------------------------------------------------|
| `clk`, `rst_n`             | in  | 50 MHz oscillator; active-low asynchronous reset              |
| `host_*`                   |     | PC bus                                                        |
| `ext_start`                | in  | external start pulse                                          |
| `tm_vern_trig`             | out | trigger of the programmable delay line                        |
| `tm_vern_code[7:0]`        | out | delay code of the delay line (full scale = one clock period)  |
| `tm_vern_pulse`            | in  | delayed pulse from the delay line                             |
| `tm_out[15:0]`             | out | output pulses, to the NIM/TTL drivers                         |
| `tof_in[15:0]`             | in  | timing pulses to be recorded                                  |
| `tof_tac_arm`              | out | converter may accept a pulse                                  |
| `tof_adc_data[7:0]`        | in  | flash ADC code, valid one clock after the converter stops     |

The shared sizes are set in `mtt_pkg`: 24-bit clock, 15-bit addresses
(32K words), 8-bit vernier and channel numbers, 16 channels, and the dead times
of 7 and 4 clocks. At these sizes the six memories hold 2.6 Mbit. Each is a
plain array (`dp_ram`) with one write port and one registered read port.

## What follows the original module and what does not

These points follow the original module:

* the 50 MHz clock;
* the 24-bit binary counter with Gray-code conversion;
* the 24-bit × 32K pattern memory and the 8 × 32K vernier and channel memories;
* the Gray-code comparator;
* the 15-bit MEM ADD that advances on each match;
* the 8-bit delay with a full scale of one clock period;
* the 1-to-16 output decoder;
* the 140 ns minimum separation;
* the 24/8/8-bit TOF records in three 32K memories;
* a vernier that stops at the second clock edge after the pulse;
* the start from the keyboard or from an external pulse.

These are this design's own choices:

* the PC bus and its address map;
* the pattern-length register and the stop command;
* one counter shared by both halves, cleared by each start;
* the fetch pipeline inside the dead time;
* the TOF dead time of 4 clocks and the `tac_arm`/`adc_data` handshake;
* the lowest-channel rule for simultaneous pulses;
* stopping when the TOF memory is full;
* the synchronous capture of the stamp.

The original ECL circuit latched the running Gray code asynchronously, on the
pulse itself. Here the stamp is taken on the vernier's stop edge, and the
vernier interval of one to two periods makes up the difference. Both give the
same pulse time, but the stored count is 1 to 2 higher than a latch on the pulse
would give. The original ran the outputs through TTL-to-ECL level translation.
Only the holding function of its latch is built here.

## Simulation

All files are SystemVerilog (IEEE 1800-2017). The testbenches need Verilator 5
with `--timing`. They print `TB_RESULT checks=N failures=M`. Each one stops
itself with a failure if it hangs.

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mtt_pkg.sv tb/tb_master_timing_tof.sv --top-module tb_master_timing_tof
    ./obj_dir/Vtb_master_timing_tof

Use the same command for any other `tb/tb_<module>.sv`. The RTL files carry
no `timescale` of their own, hence the default on the command line. The delay
models in `tb/` compute their delays at run time, which Verilator reports as a
possible zero delay; that warning is harmless here.

`tb_master_timing_tof` runs the whole module at full size, with no parameter
changed. It ties each Time Master output to the TOF input of the same channel,
with the behavioural delay-line model `ad9500_model` and the converter model
`tof_vernier_model`. It makes three runs:

* **Run 1** plays a pattern that fills all 32768 words. It includes 7-clock
  separations and one pulse for a channel that is not built. Every TOF record
  must rebuild the programmed pulse time within one vernier step, on the right
  channel. Two extra pulses then fill the TOF memory and overflow it.
* **Run 2** starts from the external input. It adds three extra cases:
  * a pulse inside the TOF dead time;
  * a pulse that arrives while the converter is disarmed but is seen only after
    the dead time has ended;
  * two pulses on the same clock.
* **Run 3** puts a word inside the Time Master dead time. The pattern stalls
  until a stop command ends it.

The testbench counts each of these mechanisms and fails if one never happens.
It runs in about a second.

The block testbenches check each module against values they work out for
themselves. Two of them model the clock counter themselves and work at full
size:

* `tb_time_master` checks trigger edges, codes, channels and fine output times
  to within 10 ps.
* `tb_time_of_flight` checks every stored record.

`tb_calibration` runs the two calibration measurements on the whole module:

* random pulses whose vernier histogram must be flat;
* a sweep of the Time Master's delay code, read back through the TOF section,
  which must come out linear.

The behavioural models are ideal: a perfectly linear delay line and converter
with no jitter. So the testbenches show that the logic places and rebuilds
times correctly. They say nothing of the analog resolution: the original
hardware measured about 65 ps for one pulse after linearisation.
