# High-pT Level-0 Trigger Logic (pretrigger) in SystemVerilog

This is the logic of a level-0 "high transverse momentum" trigger for a fixed-target
B-physics experiment. Three layers of pad chambers (PT1, PT2, PT3) sit inside the
spectrometer magnet. A track with large transverse momentum hits pads in the three
layers that lie almost on a straight line pointing back to the target. The logic
looks for those coincidences in every 96 ns bunch crossing, over about 19000 pads,
and for each candidate it sends a short message to the track finding units of the
next trigger level. Those units then follow the candidate through the rest of the
detector.

The logic is spread over three kinds of boards, and this RTL has one module for each:

```
 detector rows        48 ns words          27-bit data sets          80-bit messages
 ------------> Link Board ==========> Pretrigger Board ---------> Message Generator ------> TFUs
               (3 channels)  12 x 32-bit   (up to 8 per section,    (one per section)   4 x 20 bit
                             per PTB        DAV/DAC bus)                                 at 100 MHz
```

* **Link Board** (`link_board`, `link_channel`). It sits at the detector, collects the
  pads of two rows per bunch crossing and sends them to the counting room, one row
  every 48 ns, as pairs of 32-bit words for the serial links.
* **Pretrigger Board**, PTB (`pretrigger_board`). It receives one detector row of all
  three layers every 48 ns (3 x 96 pads). It finds the trigger roads, buffers the rows
  that have at least one road, and emits one *data set* per road.
* **Message Generator**, MG (`message_generator`). It collects the data sets of up to
  eight PTBs and splits each road into its PT2/PT3 pad pairs. It looks each pair up in a
  256K x 64 table and sends the resulting 80-bit messages out as four 20-bit packages.

`hpt_section` is the top level. It wires one *section* together: 16 Link Boards,
8 PTBs and one MG. The complete trigger uses eight sections (two per VME crate, four
crates).

## Trigger roads

This part of the design needs the most care, because three modules must agree on it.

A pad in PT1 opens a *road*. The road contains five neighbouring pads in PT2 and six
in PT3, and each PT2 pad is joined to the two PT3 pads next to it:

```
 PT1        PT2          PT3
            i+2  ------  i+3
                 \-----  i+2
            i+1  ------  i+2
                 \-----  i+1
  i  ---->  i    ------  i+1       PT2 pad j joins PT3 pads j and j+1
                 \-----  i
            i-1  ------  i
                 \-----  i-1
            i-2  ------  i-1
                 \-----  i-2
```

PT1 pad i has its **Road Starting Flag** set when

    RSF[i] = PT1[i] & OR over j = i-2 .. i+2 of ( PT2[j] & (PT3[j] | PT3[j+1]) )

Pads beyond the ends of the 96-pad row count as not hit. The pads are indexed so
that the road geometry becomes this fixed window. The real chambers are projective:
pad sizes grow with distance from the beam, so that matching pads in the three layers
line up. The boards do the road search in programmable logic so that the mapping
can be changed. To use another mapping, change `coincidence_logic` (the RSF formula)
and the two `road_pad_mux` instances (window offset `WIN_OFS` in `hpt_pkg`) together.

For each set RSF bit the PTB sends a **data set** of 27 bits: the 7-bit RSF code
(which PT1 pad), the 5 PT2 pads i-2..i+2, the 6 PT3 pads i-2..i+3, the 8-bit bunch
number and the Cycle Bit.

The MG's **road encoder** splits a data set into hit PT2/PT3 pairs. Up to 18 pairs are
possible: PT2 pad j (0..4) is paired with PT3 pads j-1..j+2, keeping only those that
exist (0..5). That gives 3+4+4+4+3 = 18. This is wider than the two-pad fan-out used
by the road search, and it is this design's reading of "18 possible combinations between
the 11 pads". The numbering is in `hpt_pkg::comb_p2/comb_p3`: codes 0-2 belong to
PT2 pad 0, codes 3-6 to pad 1, 7-10 to pad 2, 11-14 to pad 3 and 15-17 to pad 4.
Every data set from the PTB contains at least one of these pairs.

## Link Board: transfer words

A link channel carries one half row (48 pads) of one layer, for the two rows m and
m+1 of a bunch crossing. On `bx` it stores both rows and the bunch number. In the next
48 ns cycle it shows row m (Cycle Bit CB = 0), and in the cycle after that row m+1
(CB = 1). The two transmitter words are:

| word | bits 31 | 30 | 29..26 | 25..18 | 17..0 |
|------|---------|----|--------|--------|-------|
| tx1  | CB | BN[0] | pads 29..26 | pads 25..18 | pads 17..0 |
| tx2  | CB | 0 | 0 (bits 29..26) | BN[7:0] | pads 47..30 |

So tx1 = {CB, BN[0], pads[29:0]} and tx2 = {CB, 5'b0, BN, pads[47:30]}.
The 30-pad split, the single BN bit and the full BN plus CB on the second word come
from the source description. The bit positions, and the choice of BN[0] as the
single bit, are this design's own. One PTB needs six link channels (3 layers x 2 halves)
= 12 transfer words. Transfer channel c = 2*link + tx, with link = 2*layer + half. In a
section, link l of PTB p comes from global link channel g = l*8 + p, which is channel
g%3 of Link Board g/3. Each PTB is therefore fed by six different Link Boards.

The serializers (32-bit, 800 Mbit/s), the optical links (about 45 m) and the
deserializers are not logic. They lie outside `hpt_section`: `lb_tx` is what goes into
the transmitters and `ptb_rx` is what comes out of the receivers. The system testbench
joins them with a delay of one 48 ns cycle.

## Pretrigger Board

Two clock domains:

* **48 ns input clock** (locked to the serial link clock). Incoming words are unpacked
  into 3 x 96 pads.
  * `bn_compare` checks every cycle that the 66 redundant bunch-number and Cycle Bits
    of the 12 words agree: 6 x (CB + BN[0]) + 6 x (CB + BN[7:0]). A mismatch sets a
    sticky error flag and can raise an interrupt.
  * `coincidence_logic` is a three-stage pipeline:
    1. the input register, with the mask applied (or the test pattern in test mode);
    2. RSF computation;
    3. the write into the Event FIFO, only when at least one RSF is set (R-Flg, zero
       suppression).
* **Event FIFO** (`async_fifo`, 512 x 297 = RSF 96 + PT2 96 + PT3 96 + BN 8 + CB 1).
  It crosses from the 48 ns clock to the 25 MHz output clock. It also absorbs the
  bursts, because one event can yield many data sets.
* **25 MHz output clock**: `ptb_output_ctrl` takes an event from the FIFO and drops it
  if the calorimeter vetoed its bunch number (`veto_logic`). Then, once per set RSF
  bit, highest first, it runs a three-step pipeline:
  1. the 7-bit priority encoder (`rsf_priority_encoder`);
  2. the PT2 and PT3 multiplexers (`road_pad_mux`);
  3. the Output Register.

  Further behaviour:
  * A register can cap the number of data sets per event (0 = no limit).
  * A 29-bit counter counts the data sets.
  * Every data set is copied into the 512 x 32 Test FIFO (`sync_fifo`) as
    {0, card[3:0], data set}.
  * `clock_watchdog` flags a stopped input clock.

Rate: the output pipeline can produce one data set per 40 ns cycle. An event with all
96 RSF bits set leaves in 96 + 4 cycles if the MG answers at once.

**PTB to MG handshake.** Each PTB has a DAV line (Output Register full) and a DAC line.
The MG raises DAC for one 40 ns cycle. During that cycle the PTB drives its 27 bits on
the shared bus, and the MG stores them at the end of the cycle. On the boards the bus
is three-state. In this RTL each PTB drives zeros unless its DAC is high, and the
section ORs the eight drivers together.

## Message Generator

A three-stage pipeline at 25 MHz:

1. **Handshake Logic and Data Input Register** (`mg_handshake`). The DAV pattern is
   copied into an 8-bit encoder register whenever that register is empty. The encoder
   then serves the flagged PTBs from the highest number down: one DAC per cycle, and
   the data set is stored together with the 3-bit PTB code (30 bits). Only when all
   flagged PTBs have been served is the next pattern taken. Every waiting PTB is
   therefore served once per pattern, so a busy board cannot starve the others. With
   all eight PTBs busy the grants run 7,6,...,0 and eight data sets move in nine cycles.
2. **Road encoder and Data Buffer** (`road_encoder`). It produces one pair code
   (5 bits) per cycle. The buffer holds the RSF code, PTB code, BN and CB of the
   current data set.
3. **Look-up and Message FIFO** (`mg_msg_stage`, `lut_sram`, `async_fifo` 256 x 80).
   * The table address is {M.Msg[1:0], CB, PTB code[2:0], RSF code[6:0], pair code[4:0]}
     (18 bits).
   * The message is {15 constant bits, BN[7:0], table bits 56:0} (80 bits).
   * If table bit 57 is set, the same pair is looked up again with M.Msg + 1. One road
     can give up to four messages.

   The meaning of the two M.Msg address bits is this design's choice. The source
   only says they exist "for multiple message generation".

At 100 MHz, `tfu_mux` sends each message as four 20-bit packages, bits 19:0 first,
with `tfu_valid` and `tfu_first` marking them. At full rate that is one message per
40 ns. The track finding units can hold the stream off with `tfu_en`. The Message FIFO
fills meanwhile and stalls the pipeline when full. A 512 x 20 Test FIFO records the
packages. The TTL-to-PECL level converters are outside the RTL.

## Register access

Both boards are VME slaves on the real system. The VME protocol is not modelled here.
Each board instead has a plain synchronous register port at 25 MHz: `vme_addr` is a
word address, writes are strobed by `vme_we`, and `vme_rdata` is valid one cycle after
`vme_re`. In `hpt_section`, `vme_slot` 0..7 selects a PTB and 8 selects the MG. The maps
are listed at the top of `pretrigger_board.sv` and `message_generator.sv`. In short:

* **PTB**:
  * control: test mode, interrupt enable, clear of the bunch-number error, limit of
    data sets per event;
  * status: bunch-number error, watchdog, Event FIFO overflow;
  * the data set counter;
  * Test FIFO read and fill level;
  * test start, with the test bunch number and Cycle Bit;
  * clear of the veto table;
  * nine words each of mask (1 = input bit disabled) and test pattern, covering all
    288 inputs.
* **MG**:
  * test mode, test data set and test start;
  * table address, low and high word (a write to the high word writes the 64-bit
    entry);
  * Test FIFO read and status;
  * the 15 constant message bits.

The mask, test pattern and mode bits are written at 25 MHz and used in the 48 ns domain
as static settings. Change them only while no data is flowing. The test start strobe
and the error clear cross into the 48 ns domain through flip-flop chains.

## Choices made where the source description is silent

The sizes all come from the source description: 96 pads, 30 pads on the first word,
8-bit BN, 512 x 297 Event FIFO, 512 x 32 and 512 x 20 Test FIFOs, 27-bit data set, 30-bit
Data Input Register, 18 pairs, 5-bit code, 18-bit address, 256K x 64 table with 57 bits
used, 15 constant bits, 256 x 80 Message FIFO, 20-bit output at 100 MHz, 29-bit counter,
and 8 PTBs per MG. The following are this design's own:

* The road window i-2..i+2 / i-2..i+3, and the 18-pair rule of the road encoder (see above).
* 48 pads per half row, so 18 pads on the second transmitter word. The field order in
  the words, in the Event FIFO record, the data set, the table address and the message.
* The link-channel-to-PTB assignment in a section.
* The bunch-number check compares all copies with link 0. It does not compare with an
  expected sequence.
* **Veto**: a 256-entry flag table set by the calorimeter. An event is dropped if its
  bunch number is flagged. The flag is cleared when the second row (CB = 1) of that
  bunch is taken from the FIFO, or by a register write. The source only says that a
  veto exists.
* Watchdog timeout of 16 cycles of the 25 MHz clock.
* The test register is applied once per start command, not continuously.
* The MG issues DAC only when its Data Input Register can accept data (back-pressure).
* Table bit 57 requests another message (M.Msg).
* A write into a full Event FIFO is dropped and flagged. Full Test FIFOs drop new words.
* All FIFOs are dual-clock (or single-clock) FIFOs with Gray-coded pointers. The boards
  build them from FIFO chips instead.

Not included:

* the serializer/deserializer chips and the optical links;
* the TTL-to-PECL converters;
* the VMEbus interface logic;
* the front-end card that the Link Board plugs onto.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The references they compare against are written
independently of the RTL, mostly in `tb/tb_ref_pkg.sv`:

* the road search, by walking every PT2/PT3 segment;
* the data set list of an event;
* the pair list of a data set.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/hpt_pkg.sv tb/tb_hpt_section.sv \
  --top-module tb_hpt_section
./obj_dir/Vtb_hpt_section
```

Replace `tb_hpt_section` with any other testbench name. Initialise unread memory
randomly with `+verilator+rand+reset+2`: the design resets every register that is read,
and the testbenches only read table entries and FIFO words that were written.

`tb_hpt_section` runs a whole section at its full default size (8 PTBs, 16 Link Boards,
the full 256K-entry table) for 160 bunch crossings. It takes a few seconds. It
checks every message against the reference and counts how often each mechanism
happened:

* roads;
* events with several data sets;
* the per-event limit;
* several PTBs waiting at once;
* extra messages from M.Msg;
* vetoed events;
* cycles with the TFUs disabling the output.

It fails if any of these never occurred.

Other testbenches of interest:

* `tb_hpt_rate`: a full-size section under heavy load (every pad hit with probability
  1/8 for 64 crossings). It measures the sustained message rate at the TFU output and
  requires 1.25 x 10^7 per second, the share of one section in 10^8 track candidates
  per second for the whole trigger. It reaches about 2.4 x 10^7, close to the ceiling of
  one message per 40 ns. Every message is still checked.
* `tb_pretrigger_board`: one board through its registers (mask, limit, veto, test mode,
  bunch-number error and interrupt).
* `tb_message_generator`: eight modelled PTBs, the table loaded through registers,
  random TFU hold-off, and the test register path.
* `tb_ptb_output_ctrl`: includes the rate check above.
* `tb_mg_handshake`: includes the 7..0 grant order.

The parameters of the modules default to the sizes above. The two-state simulation
has no X, so the testbenches check reset values and data, not X propagation.
