# Message-passing logic for networks of single chip computers

A 16-bit single chip computer (SCC) has two bidirectional ports and two
interrupt inputs, and nothing that lets several of them share work. This
design adds a small amount of logic around such a chip so that a group of
them, on one board, can exchange packets of 16-bit words over shared buses.
The SCC core is not part of the RTL. The logic is reached only through the
core's port A and port B reads and writes and its T0/T1 interrupt inputs.

The RTL follows the scheme published as "Communications for Next Generation
single chip computers" (Caltech Conference on VLSI, 1981). It contains four
independent pieces, and the top module `scc_comm_top` places them side by
side:

1. **The version-1 chip.** A send port, a receive port and a few extra pins.
   Bus ownership passes around a ring as a token. Receivers are selected
   directly by the data lines of the first word. Every word is handshaken by
   the software kernels at both ends.
2. **A master-slave controller built from version-1 chips.** It gives a
   master two-way traffic with two devices, although each chip only sends on
   one port and receives on the other.
3. **The chip with a receive FIFO.** Reception is done in hardware into a
   64-word FIFO, and a separate arbitrator grants each local bus. Two local
   buses are built in series: three senders on bus A, two chips that relay
   from A to B, and two receivers on B.
4. **The bus arbitrator and its hierarchy.** It offers fixed priority or
   round robin over 15 request pins, announces the end of each packet, and
   picks the next master in advance. A master arbitrator in fixed-priority
   mode sits over two round-robin group arbitrators.

Every chip starts in *normal mode* after reset. In normal mode the added
logic is transparent: port A reads the receive pins and T0/T1 come from
their pins. The kernel switches a chip to *multicomputer mode* by writing its
MODE bit.

## The message

All traffic is packets of 16-bit words (`scc_comm_pkg`):

| word | bits 15:8 | bits 7:0 |
|---|---|---|
| 0 (header) | receiver field | check bits = bitwise NOT of the receiver field |
| 1 | sender id | body length (0..254) |
| 2.. | body | |
| last | XOR of all previous words (longitudinal check) | |

On the version-1 bus the receiver field is a bit mask: bit *i* selects chip
*i*. On the FIFO chips it is an 8-bit device address, and `8'hFF` means
every chip. A header whose check bits do not match is never taken as a
header. This is how a receiver finds the start of a packet.

## Version-1 chip (`v1_node`)

The chip has three blocks around the SCC.

**Control-status register (`v1_csr`).** The SCC writes it through port A and
reads it through port B. Its fields are:

- kernel flags: READY FOR RECEIVING, WAIT FOR TOKEN, DATA VALID out,
  DATA ACCEPTED out, TRANS. ERROR out;
- sticky hardware flags: TOKEN IN, RX ACTIVE, RX IRQ. Writing 0 clears
  them and writing 1 leaves them alone;
- live pin levels: DATA VALID in, DATA ACCEPTED in, TRANS. ERROR in;
- MODE and TX DRIVE.

The bit positions are in `scc_comm_pkg::v1_csr_t`.

**Token logic (`v1_token_arb`).** ARBITRATION OUT of each chip feeds
ARBITRATION IN of the next, in a ring (`v1_bus_system`). One pulse is
inserted after reset. A chip whose WAIT FOR TOKEN flag is set keeps the
pulse: it sets TOKEN IN and clears WAIT FOR TOKEN. Any other chip passes the
pulse on one clock later. When the kernel has sent its packet it clears
TOKEN IN, and the pulse moves on. Senders that wait at the same time are
therefore served in ring order.

**Receive selection (`v1_rx_select`).** Chip *i*'s SELECT pin is data line
8+*i* of the bus. Here is what happens when a header appears with DATA VALID
high, SELECT high and correct check bits:

- **Receiver ready:** the logic acknowledges the header on DATA ACCEPTED
  without the kernel and keeps the header word. When the header's DATA VALID
  falls, it raises RX IRQ on T0. From then on the kernel handshakes each word
  through the register, reads it on port A, and finally clears RX ACTIVE.
- **Receiver not ready:** the logic drives DATA ACCEPTED false until DATA
  VALID falls.

The DATA ACCEPTED lines of all receivers are wired-AND, so a word completes
only when every selected receiver has taken it. A receiver that sees an error
raises TRANS. ERROR. That line reaches the sender's T0, and the sender sends
the word again.

One mode of the selection is FIRST READY. The sender offers the header to
one receiver at a time. If no DATA ACCEPTED arrives in time, it moves on to
the next receiver.

**Fan-out trees.** For a larger fan-out, the source connects chips in a
tree. `tb_v1_fanout_tree` builds one layer of relays from 8-chip buses:

- the root bus holds the source and 7 relays;
- each relay broadcasts every body it receives on its own leaf bus, to 7
  leaves.

One send therefore reaches 7 x 7 = 49 chips. One layer of 8-way buses
cannot reach the 256 the source quotes (at most 8 x 8 = 64). A second relay
layer gives 343.

In the source a relay is a single chip: it receives on R and sends on S.
`v1_bus_system` joins both ports of a chip to one bus, so the testbench
models a relay as two chips driven by one kernel.

## Master-slave controller (`v1_master_slave`)

A version-1 chip cannot turn a link around, so each bidirectional device
gets two slave chips:

- **Slave A** receives from the master's down bus, where slave A number *k*
  is selected by data line 8+*k*. It sends to its device.
- **Slave B** receives from its device and sends on the up bus to the
  master, which is selected by data line 8.

The slave-B chips share the up bus through a token ring that the start
pulse enters. The master and each slave A are the only sender on their
bus, so their ARBITRATION OUT is fed back to their own ARBITRATION IN.

**Slave identities.** Slaves with identical programs can still tell
themselves apart. At reset each slave-B kernel counts until the token first
reaches it and derives its I.D. from the count. It then uses that I.D. in
the sender field of its packets. `v1_scc_model::boot_id` shows one version:
each slave holds the token for a fixed time, so the counts differ.

## Chip with receive FIFO (`v3_node`)

**Transmit** stays under program control:

1. The kernel raises BUS REQUEST and waits for BUS GRANT.
2. For each word, it writes the word to port B and raises DATA VALID.
3. It waits for DATA ACCEPTED, or for ERROR IN TRANS., in which case it
   resends the word.
4. After the last word, it drops BUS REQUEST.

Port S and DATA VALID are driven only while BUS GRANT is high.

**Receive** is in hardware. Every chip on a bus takes part in every packet:

- **`rx_ctrl`** handshakes each word (four-phase DATA VALID / DATA ACCEPTED)
  into the FIFO. It refuses a bad header with ERROR IN TRANS. It withholds
  DATA ACCEPTED while STOP RECEIVING is set, which stalls the sender. Once the
  header shows that the packet is for another chip, it still acknowledges the
  remaining words but does not store them.
- **`addr_recognizer`** compares the stored header with the device address,
  or with the broadcast address, when the arbitrator signals TRANSMISSION END:
  - **Match:** the chip sets STOP RECEIVING and raises T0. The kernel reads
    the packet from the FIFO with read pulses on port A, then writes
    STOP RECEIVING = 0, which releases the FIFO.
  - **No match:** the FIFO is cleared at once.
- **`rx_fifo`** has a 63×16 storage array, a write address counter, a read
  address counter and an output register. The output register always holds
  the current word, so the FIFO holds 64 words.
- **`v3_ctrl_reg`**: a port-A write with bit 15 = 0 writes the control
  register, and with bit 15 = 1 loads the device address. Bit *n*-1 is
  position *n* of the register:

  | bit | field |
  |---|---|
  | 0 | MODE |
  | 1 | STOP RECEIVING |
  | 3 | ERROR IN TRANS. |
  | 4 | DATA ACCEPTED |
  | 5 | DATA VALID |
  | 6 | BUS GRANT |
  | 7 | BUS REQUEST |

  A port-B read returns the register in bits 7:0 and the FIFO word count in
  bits 15:8.

In multicomputer mode, T1 carries TRANSMISSION END and T0 signals "message
waiting".

**Boot-time addresses.** Device addresses are meant to be generated at
boot. Every chip on a local bus requests the bus at once, and each derives
its address from how long it waited for its grant. The hardware's part is
the device address register and the arbitrator's grant order. The
procedure itself is kernel software; `v3_scc_model::boot_addr` shows one
version of it.

## Bus arbitrator (`bus_arbiter`)

Pins 1..15 of the request and grant ports are bits 0..14.

**Pin 16 of the request port** chooses the mode:

- **High: fixed priority.** Pin 1 is the highest priority.
- **Low: round robin.** The scan starts after the last master.

**Pin 16 of the grant port** is TRANSMISSION END. When the master drops its
request, its grant is removed and pin 16 pulses for one clock.

**Pre-arbitration.** While a master holds the bus, the arbitrator keeps
choosing who comes next among the other requesters. The saved winner is
granted in the clock after TRANSMISSION END, if it still requests. On a free
bus, a request is granted one clock after it rises. The current master is
left out of pre-arbitration, so in either mode a module that releases the
bus never gets it straight back while others wait.

**Hierarchy (`arb_hierarchy`).** With `HAS_UPSTREAM = 1` an arbitrator first
requests its bus from a master arbitrator, and grants only while it holds the
master's grant. After each release it drops that request for a clock, so the
master can pass the bus on. The master sits over two 15-module round-robin
groups and runs in fixed priority, with group 1 on pin 1.

`v3_local_bus` joins one bus:

- the OR of the enabled send ports and DATA VALID lines;
- wired-AND DATA ACCEPTED;
- wired-OR ERROR IN TRANS.;
- the arbitrator, with only the transmitter pins in use.

`v3_system` builds buses A and B from it.

## Where this RTL goes beyond or departs from the source scheme

- **Bus arbitrator in logic.** The source runs the arbitrator as a program
  on an SCC in normal mode. Here it is dedicated logic with the same external
  behaviour. The link between hierarchy levels (`up_req`/`up_gnt`) is this
  design's own.
- **Header acknowledged in hardware (version 1).** In the source, the kernel
  acknowledges the header. Here the selection logic does it, because an
  interrupt could not answer before the sender moves on.
- **Check-bit code and longitudinal check.** The source gives neither. Here
  the check bits are the complement of the receiver field and the
  longitudinal check is XOR.
- **Bad headers.** The source does not say how a FIFO chip detects an error.
  Here it checks the header word only.
- **Foreign packets.** A FIFO chip stores only the header of a packet for
  another chip, so long foreign packets cannot fill its FIFO.
- **Port A and port B roles (version 1).** The source's two descriptions
  disagree on which port sends. The block diagram is followed: port B sends
  and port A receives.
- **Error recovery (version 1).** The source gives two answers to a
  transmission error: restart the packet from its header, or resend only
  the failed word. The hardware only carries TRANS. ERROR to the sender's
  T0, so the kernel can do either. The kernel model resends the word.
- **Three-state lines.** Every three-state line is a value plus an enable.
  Joined lines are OR (data, DATA VALID, errors) or AND (DATA ACCEPTED, false
  when nobody drives it).
- **Clocking.** There is one clock and a synchronous active-low reset.

## Limits

- **Packet size for a FIFO chip.** A packet addressed to a FIFO chip must fit
  in its 64 words: 2 header words + at most 61 body words + 1 check word. A
  longer one fills the FIFO, and the bus stays stalled until reset. The
  version-1 bus has no such limit (body up to 254 words). For example, a
  130-byte packet (65 words of body) must be split in two for a FIFO chip.
- **Selectable receivers.** A version-1 bus can select at most 8 receivers
  (data lines 8..15). The default bus has 4 chips (`N`).
- **Timing.** The source gives arbitration delays in microseconds but no
  clock rate. Here the delays are 1 clock for a fresh grant and 2 clocks for
  a pre-arbitrated hand-over.

## Simulating

All files use SystemVerilog-2017 and need no macros. List the package first:

    verilator --binary --timing --assert rtl/scc_comm_pkg.sv rtl/*.sv \
        tb/tb_scc_comm_top.sv tb/v1_scc_model.sv tb/v3_scc_model.sv \
        --top-module tb_scc_comm_top
    ./obj_dir/Vtb_scc_comm_top

Each testbench prints `TB_RESULT checks=N failures=M`, and each has a
watchdog.

**Kernel models.** The SCC kernels are behavioural models in `tb/`:

- `v1_scc_model` handles token wait and release, packet send with resend on
  error, FIRST READY, receive on interrupt, and error injection;
- `v3_scc_model` handles request/grant send with resend, receive on T0,
  release, header corruption, and a hold that keeps a message waiting.

**Block testbenches.** There is one `tb_<module>` for each module, and
`tb_v1_fanout_tree` runs the fan-out tree. `tb_message_sizes` sends
bodies of 1 to 65 words (2 to 130 bytes, the text-to-speech packets) and the
longest, 254 words, over both kinds of chip. For a FIFO chip the sender
splits a body into pieces of at most 61 words.

**End-to-end test.** `tb_scc_comm_top` runs the top with every parameter at
its default. All four parts run at once:

- **Version-1 bus:** broadcast to two receivers, a resend after an error,
  FIRST READY past two chips that are not ready, and three senders served in
  ring order.
- **FIFO chips:** addresses generated at boot from the order of grants;
  round robin, then fixed priority on both buses; relaying
  from A to B; a broadcast; a refused header; a packet that fills a FIFO; a
  held message that stalls bus A.
- **Master-slave controller:** slave I.D.s taken from the token, a command
  from the master to both devices, and both devices answering at once.
- **Hierarchy:** 200 random grants across both groups.

The test counts each of these mechanisms and fails if any never occurs. It
runs in well under a minute.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `rx_fifo` | `DEPTH`, `W` | 63, 16 | storage array words, word width |
| `v3_node`, `v3_system` | `FIFO_DEPTH` | 63 | FIFO array size (+1 output register) |
| `bus_arbiter` | `N_REQ`, `HAS_UPSTREAM` | 15, 0 | request pins; hierarchy link |
| `arb_hierarchy` | `N_GRP` | 15 | modules per group |
| `v3_local_bus` | `N_TX`, `N_RX` | 3, 2 | transmitters, receivers on the bus |
| `v1_bus_system` | `N` | 4 | chips on the version-1 bus (2..8) |
| `v1_master_slave` | `N_SLAVE` | 2 | bidirectional devices (two chips each) |
