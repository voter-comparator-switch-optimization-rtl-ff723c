# Voter-Comparator-Switch (VCS)

A quad-redundant flight computer complex has four computers (A, B, C, D)
that run the same program. Their outputs go to the subsystems over one
serial bus to the subsystems' local processors (LP). A wrong word from a
faulty computer must never reach the bus. The computers themselves decide,
as a group, which of them are trusted and how their outputs are combined.

The VCS sits between the four computers and the bus. Each computer sends
its copy of every output word to the VCS, one byte at a time. The VCS
combines the copies bit by bit, puts the result on the LP bus, and records
which computers disagreed with the result. Every word on the bus, whether
it is voted output or a subsystem reply, is copied back to all four
computers. The VCS can combine the copies in four ways:

| Mode        | Computers | Output                                              |
|-------------|-----------|-----------------------------------------------------|
| selector    | 1         | the one computer's data                             |
| comparator  | 2         | the bit on which both agree; otherwise the previous bit |
| three-way   | 3         | the majority of the three                           |
| four-way    | 4         | the bit on which at least three agree; otherwise the previous bit |

The mode is not given by an outside controller. Each computer writes its
own opinion into three small matrices inside the VCS, and the VCS works out
the mode from them. In a full system there are several VCS units, so a
failed VCS is tolerated too. `VCS_ID` tells one instance which bit of the
control byte's address field is its own.

This RTL is a bit-time-accurate, synthesizable model of one VCS. All
logic runs on a single host clock, with a one-cycle enable per bit time.

## The matrices: who is trusted, who is asked for

There are three 4×4 bit matrices. Each is stored as a 16-bit vector,
bit `4*row + col`. The row is the computer that writes or is judged by the
entry, and column j is computer j (A = 0).

- **P, computer status.** Computer r's row holds its opinion of the other
  three computers: 1 means good. The diagonal element `P[5*i]` is the
  group's verdict on computer i, and no computer writes it directly. Every
  bit time the diagonal is recomputed:
  - it is cleared when computer i's own self-test line (`c_nogo`) signals
    no-go;
  - it is cleared when two other computers that are still good mark i bad;
  - it is set when two good others mark it good;
  - it is also set when no other computer is good, so the last computer
    standing cannot vote itself out;
  - otherwise it keeps its value.
- **R, mode requests.** Computer r's row names the set of computers it
  wants to take part in voting. An all-zero row means "don't care".
- **S, voting status.** A 1 in column j means computer j's data differed
  from the transmitted data. The voter's disagreement bits are ORed into
  every row, so each computer can read and clear its own copy of the
  status.

A computer counts as **don't care** when it is failed (its P diagonal is 0)
or its R row is zero. The mode logic (`vcs_mode_logic`) computes 15 terms
and the 4-bit `used` set:

- **Four-way:** at least three good computers request `1111`.
- **Three-way XYZ:** X, Y and Z are all good and request exactly XYZ. Two
  of them requesting XYZ is also enough when the fourth computer is don't
  care.
- **Comparator XY:** X and Y are both good and request XY, and at least one
  of the other two computers is don't care.
- **Selector X:** X is good and requests only itself, and all the others
  are don't care.

Note the strictness this gives. If all four computers request the pair AB,
no mode is selected, because the comparator term needs an abstaining
computer. A plain "majority of identical requests" rule would pick AB.
This design follows the detailed logic equations, not that summary rule.

The resulting set is latched into the operating-mode register `op_mode`,
and any change to it resets the voter (`newmod`).

## Talking to the VCS: the byte protocol

Each computer has its own input channel (`vcs_input_channel`). The lines
are an 8-bit data byte, odd parity, a data strobe and end of message. The
channel answers on two lines, next byte and bad parity. The computers also
see a shared power-reset line, which comes from the output channel. Every exchange starts with a control byte:

| Byte bits | Field                                              |
|-----------|----------------------------------------------------|
| 7:4       | VCS address, one bit per VCS (`VCS_ID`)            |
| 3         | 0 = output transmission (voter), 1 = matrix operation |
| 2:0       | matrix operation code                              |

The matrix operation codes are:

| Code | Operation                                                     | Data                           |
|------|---------------------------------------------------------------|--------------------------------|
| 000  | set own R and P rows, clear own S row                         | one byte: R in 7:4, P in 3:0   |
| 001  | set own R and P rows                                          | one byte                       |
| 011  | clear own S row                                               | none                           |
| 100  | sample all                                                    | returns R lo, R hi, P lo, P hi, S lo, S hi |
| 110  | sample P diagonal and operating mode                          | returns `{OM[3:0], P16, P11, P6, P1}` |
| 111  | sample S                                                      | returns S lo, S hi             |

Each byte is latched when its strobe rises and is parity-checked in the
next bit time. On a parity error the channel raises bad parity for two bit
times and waits for the same byte again. For a voter message, the first
data byte goes straight to buffer register B (BRB) and sets BRB full
(BRBF). Each later byte is requested with next byte and held in buffer A
until the voter asks for it. The 17th bit of each word, `PAR4`, is
computed from the two byte parities, so the parity that comes out of the
voter is the vote of the computers' own parities.

A message ends in one of two ways:
- the computer raises end of message with its last byte, and the channel
  reports done once the last word has been handed over;
- end of message is raised on its own, without a byte, while a word is
  still waiting for the voter. The message is then abandoned, which is how
  a computer clears a comparator that gave up waiting for its partner.

## Voting on the fly

`vcs_voter_section` never stores a word. In each bit time it takes the
most significant bit of every involved channel's BRB, votes, and places the
result in the voter buffer register (VBR), which drives the LP bus
(`lp_tx_valid`/`lp_tx_data`). A word takes 17 bit times. The 16 data bits
go out MSB first, with the second byte loaded into BRB at bit time 7. The
voted `PAR4` goes out at bit time 16, and the next word's first byte is
loaded at the same time.

The computers are not exactly in step, so the voter waits before starting:

- selector: it starts as soon as the one channel has a word;
- comparator: it waits for both channels. If the second is more than 15
  bit times late, no single-copy transmission is made. The voter locks out
  until the channels are cleared by end of message, then returns to idle;
- three-way and four-way: it starts when all involved channels have a
  word, or 15 bit times after two of them have one. A late computer is
  simply outvoted.

At a 1 MHz bus rate a bit time is 1 µs, so this window is the 15–16 µs
synchronisation tolerance the computers' software has to meet. Voting
stops at the end of the word in which enough channels report done:
- the selector's channel, for the selector;
- both channels, for the comparator;
- two of three, or three of four, for majority voting.

In every mode but the selector, each bit time reports which involved
computers differed from the voted bit. The matrix section ORs these bits
into S, but only while it is not busy serving a command.

## Back to the computers: the output channel

`vcs_output_channel` drives one byte bus shared by all four computers. It
works in two modes.

- **LP data.** Every bit on `lp_rx_*` is shifted into a serial-to-parallel
  register. After 8 bits, the byte goes out with a two-bit-time data strobe
  and generated odd parity. After 16 bits the second byte goes out. Its
  parity is the first byte's parity when the bus parity bit is 1, and the
  inverse when it is 0. A bus parity error therefore reaches the computers
  as a parity error on the second byte, without the VCS judging it. LP
  data has absolute priority: bus activity aborts a matrix transfer
  (`lp_abort`).
- **Matrix data.** For each byte the matrix section offers, the channel
  raises one computer's matrix strobe for two bit times. A one-bit-time
  output-ready pulse goes back to the matrix section, and a one-bit-time
  gap follows each byte.

While `pwron` is applied every VCS output, this one included, is held
false. Power reset rises in the first bit time after power-on and stays up
until some computer has loaded its R and P rows. It tells the computers that the VCS lost its
state.

## Clocking

`vcs_clock_generator` counts the host clock, which runs at nine times the
bit rate, from 0 to 8:
- `bit_en` is high in count 8;
- the four phases are counts 0–1, 2–3, 4–5 and 6–8 (0, 222, 444, 666 and
  1000 ns within a 1 µs bit);
- the overlapping pairs `phi12`, `phi23`, `phi34` and `phi41` are also
  provided.

In this RTL all registers are ordinary flip-flops on `clk`, enabled by
`bit_en`. The phase outputs are provided for an interface that needs them;
nothing inside uses them. `pwron` is a synchronous reset that also holds
`bit_en` and the phases low.

## Interface of `vcs_top`

Per-computer signals are arrays indexed A=0 … D=3.

| Group      | Signals                                                             |
|------------|---------------------------------------------------------------------|
| computers in  | `c_data[4][8]`, `c_parity`, `c_strobe`, `c_eom`, `c_nogo`        |
| computers out | `c_next_byte`, `c_bad_parity`, `o_data`, `o_parity`, `o_data_strobe`, `o_matrix_strobe[4]`, `o_power_reset` |
| LP bus     | `lp_tx_valid/lp_tx_data` (voted output), `lp_rx_valid/lp_rx_data` (everything heard on the bus, own transmission included) |
| clocking   | `clk` (9× bit rate), `pwron`, outputs `bit_en`, `phi12`, `phi23`, `phi34`, `phi4`, `phi41` |
| observation | `p_mat`, `r_mat`, `s_mat`, `op_mode`, `mode_terms`, `voter_busy`  |

The LP line driver and receiver, and the TTL level shifters, are outside
this RTL. In a system, `lp_rx` must hear the VCS's own transmissions,
since that is how voted words return to the computers.

## Where this design makes its own choices

The specification this design follows is detailed, but not in every
respect. These points are this design's own reading:

- **Operation code for the diagonal sample.** It is `110`, chosen to
  match the sampling logic. A table of codes lists both the diagonal sample
  and the S sample as `111`.
- **Orientation of P.** P is row = the computer giving the opinion. One
  summary table shows the transpose; the logic equations use this
  orientation.
- **Comparator timeout.** After a timeout the comparator waits for the
  buffers to clear before going idle. Returning straight to idle would
  restart the wait on the stale word.
- **Four-way start.** The four-way start window opens at two of four full
  buffers, as stated for the start rule ("2-4"). The voting-mode
  description instead speaks of "a majority".
- **Late computers.** In voting mode a computer must answer next byte
  within about six bit times. Otherwise BRB is not refilled in time and
  the voted word is wrong; a real computer interface is designed to keep up.
- **Strobe and handshake timing.** Bit placement within a word, the
  matrix-strobe gap and the set-command handshake are this design's choice.
- **Power reset clearing.** Power reset is cleared by the first R/P load.
  The specification only says that P and R must be reloaded.
- **Partial LP words.** If the bus goes quiet mid-word, a 16-bit remainder
  is still delivered with generated parity, and shorter fragments are
  dropped.
- **Priority of mode terms.** If the mode terms ever overlap (they cannot
  with consistent inputs), the selector has the highest priority, then
  comparator, three-way and four-way.

## Files

| File | Contents |
|------|----------|
| `rtl/vcs_pkg.sv` | constants (`CLK_DIV`=9, `FRAME_BITS`=17, `VOTE_TIMEOUT`=15, strobe and parity-error times), operation codes, mode-term struct, parity and count helpers |
| `rtl/vcs_top.sv` | the VCS: four input channels, voter, matrix section, output channel, clock generator |
| `rtl/vcs_input_channel.sv` | one computer's byte interface, parity check and retry, BRA/BRB buffering |
| `rtl/vcs_voter_section.sv` | bit-serial selector/comparator/three-way/four-way voter |
| `rtl/vcs_matrix_section.sv` | P, R, S matrices, command sequencer, P-diagonal logic |
| `rtl/vcs_mode_logic.sv` | combinational mode decision from R and P |
| `rtl/vcs_output_channel.sv` | LP-to-computer byte path and matrix sample path |
| `rtl/vcs_clock_generator.sv` | bit-time enable and four-phase clock |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_vcs_faults.sv` | failure-mode run: stuck-at nets under an exercise sequence |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing -Irtl rtl/vcs_pkg.sv rtl/*.sv tb/tb_vcs_top.sv \
    --top-module tb_vcs_top -Mdir obj_top && obj_top/Vtb_vcs_top
```

Replace `tb_vcs_top` with any other testbench name.

`tb_vcs_top` runs the complete VCS at its default parameters, with four
behavioural computers and the LP bus looped back. It covers:
- power reset;
- loading R and P;
- four-way voting with one computer sending a wrong word (outvoted, and
  marked in S);
- sampling and clearing S;
- three-way voting with a parity retry, and with one computer arriving
  late inside the waiting window;
- the comparator, including a late partner;
- the selector;
- a no-go line clearing a P diagonal, read back with a diagonal sample;
- sample all;
- LP data cutting a matrix sample short;
- a subsystem reply with a bus parity error passed on.

It counts each of these mechanisms and fails if any never happened. It
also checks that the LP bus carries whole 17-bit words. It runs in well
under a second.

The module testbenches add directed and random cases:
- the mode logic is compared against a reference model for every
  combination of P diagonal and R matrix;
- the voter runs 200 random mode, data and corruption cases against a
  bit-level reference;
- the input channel is sent random messages;
- the output channel receives random LP traffic with parity errors;
- the matrix section gets random set commands, checked against a model of
  the diagonal rule.

`tb_vcs_faults` repeats the study's failure-mode investigation on a small
scale. One of 26 nets between the blocks is held stuck at 0 or at 1
(52 cases) while an exercise sequence runs:
- all computers load R and P for four-way voting;
- they send a two-word output message;
- they send a Go or No Go word, chosen from their own feedback comparison;
- computer A samples the P diagonal and mode.

Computer-side and LP-side status flags are then evaluated, modelled on the
study's flag list (feedback wrong, S non-zero, wrong diagonal, parity
errors, No Go received). The fault-free run must raise no flag. No stuck-at
case may deliver a wrong message followed by the Go word. The current
result is 30 cases detected, 22 without effect and none undetected.

Two simplifications apply. The study failed single gates of its logic
equations; this run sticks whole nets between blocks instead. The Go/No Go
word goes out as a separate one-word message.
