# tout — an on-board bus to fiber-optic link bridge

`tout` connects a board's 32-bit on-board data bus to a point-to-point fiber
link. The link hardware is a set of standard parts: a parallel-to-serial
fiber transmitter that takes one byte per clock, a matching receiver that
delivers one byte at a time, and a 9-bit wide FIFO chip that buffers
received bytes. `tout` is the glue logic around them. It carries 16-bit bus
words over the fiber as pairs of bytes, and on the receive side it decodes
an addressing protocol. Several such chips can share the far end of the
link, and each one takes only the words addressed to it.

All logic runs on one system clock. Almost every exchange between blocks,
and with the on-board bus, is a four-phase request/acknowledge handshake
guarded by a 16-cycle timeout.

## The two paths

```
 upper bus (id_upper, AO_TO_PC_STROBE/ACK)
        |
  read_from_ibus ──req/ack──> ibus_fo_action ──fo_d, fo_ENA_l──> transmitter
                                     ^                                |
                         fo_CKW = clk/2 (toggle flop)            fiber
                                                                      v
 receiver ──fr_d, fr_RDY_l──> fiber_rec ──WRITE_l──> [ FIFO chip ]
                                                          |
                               fifo_data_pump <──READ_l───┘
                                     |  word_ready / refill
                               ibus_fi_port ──req/ack──> read_from_fi
                                                              |
                      lower bus (id_lower, AO_FROM_PC_STROBE/ACK)
```

**Bus to fiber.** The bus master puts a word on `id_upper` and raises
`AO_TO_PC_STROBE`. `read_from_ibus` latches the word, answers with
`AO_TO_PC_ACK` one cycle later, and asks `ibus_fo_action` to send the word.
`ibus_fo_action` sends the low byte and then the high byte on two
consecutive rising edges of the transmitter clock. Both go as data
characters: the command and send-violation flags are 0.

**Fiber to bus.** `fiber_rec` writes each byte from the receiver into the
FIFO, together with the receiver's command-character flag (9 bits). It also
counts bytes that carry the receiver's code-violation flag.
`fifo_data_pump` reads the FIFO and joins two data bytes into a word, the
first byte read becoming the low byte. `ibus_fi_port` passes each finished
word to `read_from_fi`. That block decodes it and drives data words onto
`id_lower` with `AO_FROM_PC_STROBE`. This chip's transmitter only sends data
characters. A command character in the received stream (a fill or control
character that the receiver reports) resynchronises word assembly: any
half-built word is thrown away.

## Word format

Each 16-bit word is either an address word (bit 15 = 1) or a data word
(bit 15 = 0). An address word has these fields, named in `tout_pkg::addr_word_t`:

| bits  | field      | use                                              |
|-------|------------|--------------------------------------------------|
| 15    | is_address | 1                                                |
| 14:13 | —          | not used                                         |
| 12    | remote     | side bit, compared with `I_AM_REMOTE`            |
| 11:8  | chip       | compared with `MY_DATA_ADDRESS`, `MY_CTRL_ADDRESS` |
| 7:0   | sub        | sub-address, latched on a match; bit 5 = FIFO reset on a control address |

A transaction is normally an address word followed by data words. A soft
reset needs only the address word.

## Address decoding in `read_from_fi`

This is the part whose behaviour is least obvious from the outside.

* **Address word, side bit equal to `I_AM_REMOTE`.** Any earlier selection
  is cleared first. Then:
  * if `chip == MY_CTRL_ADDRESS`, the chip is selected for a *control*
    transaction, the sub-address is latched, and sub-address bit 5 raises
    `request_reset` for one cycle. That reset clears the receive FIFO and
    the violation counter.
  * if `chip == MY_DATA_ADDRESS`, the chip is selected for *data* and the
    sub-address is latched.
  * for any other chip address, the chip is deselected.

  The word is acknowledged in all three cases and never reaches the bus.
* **Address word, other side bit.** The word is treated as a data word: it
  is put on the lower bus, and it clears the selection.
* **Data word.**
  * While the chip is selected for data, the word goes to the lower bus.
  * While it is selected for control, the word is acknowledged and
    consumed. No action is defined for control data on this chip.
  * While it is not selected, the word is acknowledged and dropped.

The chip stays selected until the next address word. Its state is visible
on `chip_selected` and `fi_address`.

## Handshakes and timeouts

Every handshake is four-phase: raise req; the other side raises ack; drop
req; the other side drops ack. A block that waits for the other side gives
up after 16 cycles, which is the 4-bit `timeout` counter in `tout_pkg`.

| where | waits for | on timeout |
|-------|-----------|------------|
| `read_from_ibus`, bus side | `AO_TO_PC_STROBE` to fall | goes on to send the word anyway |
| `read_from_ibus`, fiber side | ack from `ibus_fo_action` | returns to idle; the word is not sent |
| `ibus_fi_port` | ack from `read_from_fi` | drops req; the word is lost |
| `read_from_fi`, fiber side | req to fall | returns to idle |
| `read_from_fi`, bus side | `AO_FROM_PC_ACK` to rise, then to fall | returns to idle; the word is lost |

Two details matter when you connect the bus:

* `read_from_ibus` raises its request to the transmitter while it is still
  acknowledging the bus master. A word takes the transmitter about five
  cycles. If `AO_TO_PC_STROBE` stays high longer than that, the same word is
  sent a second time. Release the strobe as soon as the ack is seen.
* `read_from_fi` raises `AO_FROM_PC_STROBE` while it is still finishing the
  fiber-side handshake, so the bus cycle starts early. The lower-bus slave
  has 16 cycles to answer. After that the word is lost.

Between the pump and `ibus_fi_port` there is no loss:

1. The pump raises `data_pump_word_ready` and holds the word in
   `fiber_to_ibus_buf`.
2. When `ibus_fi_port` takes the word, it pulses `refill_ibus_output_buf` for
   one cycle.
3. Only then does the pump start on the next word.

Back-pressure therefore stops at the FIFO chip. Its depth is the link's only
elastic storage, and nothing in this design watches its full flag.

## Fiber clock and byte timing

A toggle flop divides the system clock by two. Its output drives both the
transmitter's byte clock `fo_CKW` and the receiver's reference clock
`fr_ref_clk`, so the link carries at most one byte per two system clocks.

The transmitter takes `fo_d` on each rising edge of `fo_CKW` while
`fo_ENA_l` is low. `ibus_fo_action` changes `fo_d` and `fo_ENA_l` only at
system-clock edges where `fo_CKW` falls. Both are then stable for a full
system-clock cycle on either side of each rising edge.

Sequence for one word: IDLE, then BYTE1, which waits for `fo_CKW` high and
lowers ENA. Next come WAIT1 (the low byte is taken), BYTE2 (the high byte is
driven) and WAIT2 (the high byte is taken). The high byte is taken 4 or 5
cycles after the request is sampled, depending on the clock phase.

On the receive side `fr_d`, `fr_RDY_l` and `fr_status` are sampled directly
on the system clock. `fiber_rec` needs two cycles per byte. `fr_RDY_l` must
therefore be low for at most two cycles per byte, and bytes must be at least
two cycles apart. The half-rate reference clock meets both conditions. The
receiver inputs have no synchronisers. That is acceptable only if the
receiver's outputs are timed to the same clock, as they are when it runs
from `fr_ref_clk`. Otherwise add a synchroniser stage before `fiber_rec`.

The pump reads one FIFO entry every two cycles, in two states:
1. STROBE checks the empty flag and drives `fifo_READ_l` low.
2. READ_DATA takes `fifo_OUT`.

It keeps pace with the link: a full FIFO yields one word every 5 cycles.

## Straps and parameters

`tout` has three parameters. Their defaults are the settings for the remote
board:

* `I_AM_REMOTE` = 1
* `MY_DATA_ADDRESS` = 4'hF
* `MY_CTRL_ADDRESS` = 4'h2

The transceiver mode pins are tied off:

* `fo_ENN_l` = 1
* `fo_mode` = 0
* `fo_foto` = 0
* `fr_mode` = 0
* `fr_rf` = 1

The receiver is always enabled. `DEBUG` mirrors `AO_FROM_PC_STROBE`.

The on-board bus is 32 bits wide, but the chip only reads the upper half and
only drives the lower half. The two halves are therefore separate ports:
`id_upper` is `id[31:16]` and `id_lower` is `id[15:0]`. To use the chip on a
shared bidirectional bus, add the tristate drivers outside it.

## How this RTL differs from the original design

The state machines, state sequences, timeouts, address decoding, byte order
and strap values follow the original VHDL design. The changes below make
that design work as a whole; each is also noted in the header comment of
the module it affects.

* **Selection gates data.** The original describes chip selection but keeps
  the selected flag constant and forwards every data word. Here selection
  sets the flag and gates data words.
* **No stalls on words for other chips.** Non-matching address words, and
  data words that arrive while the chip is not selected, are acknowledged
  and dropped. They are not left to time out.
* **Control flag cleared per address.** The control-transaction flag is
  cleared on every address word. In the original, one control transaction
  would capture all later data words.
* **Pump and output buffer.** The pump holds each word until it is taken,
  and `refill_ibus_output_buf` is a "word taken" pulse. In the original
  the pump runs freely, and words arriving while the bus side is busy are
  lost.
* **One version of word assembly.** Words are assembled by counting two
  data bytes, with command characters as delimiters. The original also has
  a second, unfinished variant that never reports a word.
* **Empty flag read again.** The pump checks the FIFO empty flag again just
  before each read, so it cannot read an empty FIFO.
* **No shortcut in `ibus_fo_action`.** The sequencer always passes through
  BYTE1. The original's shortcut would leave ENA high for the low byte.
* **Resets.** Every register has an asynchronous active-high reset,
  including those in `fiber_rec` and the clock divider, which had none.
* **Not built.** The original's loopback mode is disabled in its own source
  and is not built. Its unused pins are left off: `fast`, `slow`,
  `in_strobe`, `fr_ckr`, `fo_RP_l`, `fifo_FULL_l` and `fifo_HALF_l`.
* **Status ports.** Four status outputs are brought out: `chip_selected`,
  `fi_address`, `violation_count` and `increment_fifo_count`.

The transmitter, the receiver and the FIFO are external parts and are not
part of the RTL. The testbenches use behavioural models of the transmitter
and the FIFO.

## Files

`rtl/` has one module or package per file:

| file | content |
|------|---------|
| `tout_pkg.sv` | timeout width, word and address-word types |
| `read_from_ibus.sv` | upper bus to transmitter hand-over |
| `ibus_fo_action.sv` | word-to-two-bytes transmitter sequencer |
| `fiber_rec.sv` | receiver to FIFO writer, violation counter |
| `fifo_data_pump.sv` | FIFO reader and word assembler |
| `ibus_fi_port.sv` | word buffer towards the decoder |
| `read_from_fi.sv` | address decoder and lower-bus driver |
| `tout.sv` | top level |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`), plus
two behavioural models:

* `fiber_tx_model.sv` takes bytes from the transmitter pins.
* `fifo_chip_model.sv` models a 512 x 9 FIFO.

`tb_tout.sv` runs the top level with default parameters. The fiber is looped
back through a link model that occasionally sets the violation flag on a
byte and inserts a command character between words. The test exercises
every mechanism listed above and checks the words that come out on the
lower bus against a reference model of the decoder.

`tb_tout_pair.sv` joins two chips with a pair of fibers: a local end
(`I_AM_REMOTE` = 0, data address 1, control address 3) and a remote end
(the defaults). Both bus masters write at once, each addressing the other
chip, and the test checks that each lower bus receives the other side's
data words in order.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tout_pkg.sv tb/tb_tout.sv --top-module tb_tout
./obj_dir/Vtb_tout
```

Use the same command with any other `tb_<module>` to test one block. Each
testbench ends by printing `TB_RESULT checks=N failures=M`. A watchdog ends
it with a failure if it hangs. The testbenches drive stimulus and sample
outputs one time unit after each rising clock edge.
