# Transputer link adaptor as a synchronous Petri-net controller

A transputer link is a pair of wires that carries bytes in both directions at
once. Data packets and the acknowledgments for received data share each wire.
This design is a link adaptor: it connects one such link (`link_in`,
`link_out`) to two one-way 8-bit buses with four-phase handshakes:

* the input bus `i_data` (I0-I7) with `ivalid`/`iack`, whose bytes go out on
  the link;
* the output bus `q_data` (Q0-Q7) with `qvalid`/`qack`, which delivers the
  bytes that come in on the link.

The controller is a Petri net, not a conventional state machine. Each place is
a flip-flop that holds a token. Each transition is an AND of its input places
and an input condition, and it fires for the single clock cycle in which it is
enabled. Four token loops run at the same time and meet at shared places. This
is how the adaptor receives, transmits, acknowledges and handshakes on both
buses in parallel with a small amount of logic: 29 flip-flops of marking in the
controller, plus the 8-bit data register and one flag.

## Link format

There is one bit per clock cycle, and the line is low when idle.

| packet          | bits on the wire                              | length   |
|-----------------|-----------------------------------------------|----------|
| data            | `1 1 d7 d6 d5 d4 d3 d2 d1 d0 0`               | 11 cycles |
| acknowledgment  | `1 0`                                         | 2 cycles |

A sender must not send its next data packet until the acknowledgment for the
previous one has arrived. The adaptor sends bit 7 first and stores the first
received bit in bit 7. Two adaptors wired back to back therefore keep each
byte's bit positions.

## Blocks

```
                 +-------------------------- controller ------------------------+
 link_in ------->|  main net (p1 p2 p11..p17 p28 p29, t1..t11)                  |---> link_out
 i_data[7:0] --->|    serpar  (SerPar macroplace, 8 places, 7 transitions)      |---> iack
 ivalid -------->|    parser  (ParSer macroplace, 10 places, 17 transitions)    |---> qvalid
 qack ---------->|                                                              |
                 +------------------------------+-------------------------------+
                                                | shift_enable
 link_in -------------------------> shift_register (8 bit + shift flag) ---------> q_data[7:0]
```

| file | role |
|------|------|
| `rtl/tla_pkg.sv` | bus width, `tla_fire_t` (firing pulses t1..t11), `tla_status_t` |
| `rtl/shift_register.sv` | serial-in/parallel-out data register for `q_data` |
| `rtl/serpar.sv` | sub-net that times the eight shifts of an incoming byte |
| `rtl/parser.sv` | sub-net that multiplexes the bits of `i_data` onto `link_out` |
| `rtl/controller.sv` | the main net, the two sub-nets and the output equations |
| `rtl/link_adaptor.sv` | top level: controller plus shift register |

## The controller net

Places are marked at reset with `p1`, `p12`, `p17` and `p29`. Transitions, with
input places, condition, output places and outputs:

| transition | from | condition | to | drives |
|---|---|---|---|---|
| t1  | p1 (and p2 empty) | `link_in` | p2 | |
| t2  | p2 | `link_in` | SerPar | `shift_enable` |
| t10 | p2, p28 | `!link_in` | p1, p11 | `iack` |
| t3  | SerPar end, p29 | none | p1, p13 | |
| t4  | p13 | none | p14 | `qvalid` |
| t5  | p14, p17 | `qack` | p15 | `link_out` (acknowledgment start bit) |
| t6  | p15 | none | p16, p17 | (acknowledgment stop bit: `link_out` low) |
| t7  | p16 | `!qack` | p29 | |
| t8  | p12, p17 | `ivalid` and not t5 | ParSer | `link_out` (first start bit) |
| t9  | ParSer end | none | p28, p17 | (stop bit: `link_out` low) |
| t11 | p11 | `!ivalid` | p12 | |

Each loop has its own token:

* **LinkIn (p1, p2).** t1 sees a leading 1. If the next bit is also 1 it is a
  data packet: t2 starts SerPar. If the next bit is 0 it is an acknowledgment:
  t10 fires, provided the adaptor is waiting for one (p28).
* **Q bus (p29).** When SerPar has shifted in a byte, t3 hands it to the bus if
  the previous handshake has finished (p29). Otherwise the byte waits in
  SerPar's last place. t4 raises `qvalid`. t5 waits for `qack` and sends the
  acknowledgment packet. t7 waits for `qack` to fall.
* **I bus (p12, p28, p11).** t8 accepts `ivalid` and sends the first start
  bit. ParSer sends the rest of the packet, and t9 sends the stop bit. p28 waits
  for the acknowledgment, which t10 relays as `iack`. t11 waits for `ivalid` to
  fall.
* **LinkOut (p17).** This token is a mutex on the output wire, so an
  acknowledgment and a data packet are never interleaved. t5 and t8 take it;
  t6 and t9 return it.

`iack` and `qvalid` are asserted by their transitions and held while the
next place waits for the other side. `qvalid = t4 | p14` stays high through the
cycle in which `qack` is seen. `iack = t10 | p11` stays high through the cycle
in which `ivalid` is seen low. `link_out` and `shift_enable` are pure
transition outputs.

Inside the sub-nets, each transition needs its input place marked and its
output place empty. The token therefore moves one place per cycle. SerPar's
seven transitions and t2 raise `shift_enable` eight times per packet. ParSer
has one place for the second start bit, then one place per data bit. Each data
place has two transitions, one on `i_data[n]` that raises `link_out` and one on
its complement. A last place waits for t9.

## Timing

Cycle 0 below is the cycle of the first start bit.

* **Receive.** t1 fires in cycle 0, t2 in cycle 1, and `shift_enable` is high
  in cycles 1-8. The shift register keeps each enable in its one-bit `shift`
  flag and shifts `link_in` in on the following cycle, so it samples the data
  bits in cycles 2-9. t3 fires in cycle 9, and `q_data` is complete and
  `qvalid` rises in cycle 10. The line is ready for the next packet's start
  bit from cycle 11. `q_data` does not change until the next data packet's
  shifts, which the sender can only start after the adaptor's acknowledgment.
* **Transmit.** If `ivalid` is seen high in cycle 0 with p12 and p17 marked,
  `link_out` carries the packet in cycles 0-10 and LinkOut is free again in
  cycle 11. `i_data` is read straight from the bus, bit by bit, so it must stay
  stable while `ivalid` is high.
* **Acknowledgment in.** When `1 0` arrives in cycles a and a+1, `iack` rises
  in cycle a+1.
* **Acknowledgment out.** `link_out` is 1 in the cycle in which `qack` is seen
  (t5) and 0 in the next.

## Where the design makes its own choices

The following points are not fixed by the net as described. They were chosen
here:

* **One bit per clock, synchronous `link_in`.** There is no oversampling or
  resynchronisation. To connect a real, asynchronous link, add a bit-clock
  recovery front end.
* **Shift flag in the data register.** The enable is registered so that the
  eight shifts, which start on the second start bit, land on the eight data
  bits.
* **Held `qvalid` and `iack`.** A plain transition output would last one
  cycle. With a one-cycle `qvalid`, the reader could not tell how long to hold
  `qack` while LinkOut is busy with an outgoing data packet.
* **Priority on LinkOut.** If t5 and t8 are enabled in the same cycle, the
  acknowledgment goes first and the data packet follows directly after its
  stop bit. `status.tx_deferred` marks such a cycle.
* **ParSer contents**, and **bit order** (bit 7 first).
* **Synchronous, active-high `rst`.**
* **The `fire` and `status` outputs** are observation ports only and can be
  left open.

## Limitations

These limitations follow from the net itself and are reproduced faithfully:

* **Acknowledgments are sent late.** The acknowledgment for a received byte is
  sent only after the output-bus reader raises `qack`, not as soon as a packet
  header arrives.
* **An acknowledgment must arrive at the right time.** It must arrive after the
  adaptor's stop bit (t10 needs p28) and while the LinkIn token is at p1. If
  one arrives while SerPar holds a byte for a busy Q bus (`status.rx_held`),
  or before the adaptor has finished sending, it is lost. In the second case
  the following 1 bit is taken as a data header. A peer that acknowledges only
  complete packets, and a Q-bus reader that finishes its handshake promptly,
  avoid both cases.
* **No stop-bit checking.** Neither the stop bit nor the framing is checked.

Three assertions in `controller` report the unsafe firings of this net: t3 with
t10 (p1 marked twice), t6 with t9 (p17 marked twice), and t5 with t8 (p17
taken twice). Each sub-net also asserts that its entry place is free and that
its exit transition only fires on a marked last place.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/tla_pkg.sv rtl/serpar.sv rtl/parser.sv rtl/controller.sv \
  rtl/shift_register.sv rtl/link_adaptor.sv tb/tb_link_adaptor.sv \
  --top-module tb_link_adaptor -Mdir obj && ./obj/Vtb_link_adaptor
```

* `tb_shift_register` compares the register with a reference model under
  random stimulus and under framed packets.
* `tb_serpar` and `tb_parser` check the sub-nets cycle by cycle. This covers
  shift-enable placement, the packet body bit by bit, and holding in the last
  place.
* `tb_controller` runs directed, cycle-exact scenarios: receive with the
  acknowledgment, transmit with `iack`, the t5/t8 conflict, and a byte held
  for a busy Q bus.
* `tb_link_adaptor` runs the whole adaptor at its default size against a
  transputer model and two bus models. The transputer model sends data only
  after the previous acknowledgment and acknowledges complete packets. It
  moves 340 bytes out and 380 bytes in, in three phases: full duplex with
  random delays, a slow Q-bus reader, and simultaneous `qack`/`ivalid`. It
  checks byte order and content in both directions, the 10-cycle receive
  latency, and that every packet on `link_out` starts with t5 or t8. It also
  counts the held-byte, deferred-transmit and full-duplex situations and fails
  if any of them never occurred. It finishes in well under a second.
* `tb_adaptor_pair` connects two adaptors link to link, with a bus driver and
  a bus reader on each side, and moves 500 random bytes each way at the same
  time. With handshake delays of a few cycles it measured about 21 clock
  cycles per byte in each direction. The lower bound is 13: an 11-bit packet
  plus the 2-bit acknowledgment, both on the same wire.

The only size parameter is `DATA_W`, which defaults to 8. The sub-nets scale
with it, but the link format above assumes 8.
