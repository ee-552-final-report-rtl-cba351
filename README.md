# Networked appliance controller

This is a small FPGA design that switches an appliance over a network. Its
job is to reboot a computer that has locked up. The FPGA watches the
network for UDP packets. If a packet's payload starts with a secret key,
it toggles one output pin. Through an optical coupler and a 12 V relay,
that pin cuts or restores the computer's power.

There are two ways packets can arrive:

* **Ethernet.** A CS8900A Ethernet controller (on a small add-on module)
  stores received frames in its own 4 kB RAM. The FPGA drives the chip's
  8-bit I/O bus and copies frames out of it.
* **SLIP.** IP packets arrive over an RS-232 serial line at 9600 baud,
  framed with the Serial Line Internet Protocol.

Both links write the packet into a byte-wide RAM. A separate engine then
reads that RAM at random addresses. The engine does not know which link
filled the RAM.

```
             CS8900A bus                         serial line
                  |                                   |
              +--------+   frame bytes   +---------+  |  +-------------------------+
              | eth_if |---------------->|pkt_buffer| |  | slip_control            |
              +--------+                 +---------+  |  |  slip -> slip_buffer    |
            poll/load ^                       | bytes  |  +-------------------------+
            handshake |                       v        |     pktRead |   ^ address / data
              +----------------------------------------------------------------+
              | net_controller  (advances once per 1024 clocks, clk_div)       |
              +----------------------------------------------------------------+
                                    | appliance_off
                          +----------------------+
                          | appliance_controller |---> reset_relay_n (pin)
                          +----------------------+
```

`netcon_top` contains all of the blocks. The build-time parameter `SLIP_LINK`
picks the link the controller listens to: 0, the default, picks Ethernet.
Both interfaces are always built. Choosing a link is a recompile, not a
runtime switch.

## From packet to pin

One pass of the network controller goes like this:

1. **Wait for a packet.**
   * On Ethernet, the controller asks `eth_if` whether a frame is waiting
     (`poll_req`). If one is, it asks `eth_if` to copy the frame into
     `pkt_buffer` (`load_req`). Loading overwrites the previous packet.
   * On SLIP, the controller waits for the `pktRead` pulse. The SLIP
     receiver sends that pulse when it sees the END character. The pulse is
     caught at the full clock rate, so the slow controller cannot miss it.
2. **Find the payload.** The controller skips the headers using the lengths
   they contain:
   * The IP header starts at byte `LINK_HDR`. That is 14 on Ethernet, which
     skips the Ethernet II header, and 0 on SLIP.
   * Its low nibble is the IHL: the IP header length in 32-bit words.
   * The UDP header starts at `LINK_HDR + 4*IHL`.
   * The UDP length field is at +4 and +5 from there. The payload starts at
     +8.
3. **Compare.** The controller compares the first `KEY_LEN` payload bytes,
   one per controller cycle, with `KEY`.
   * `KEY` is a SystemVerilog string parameter. Its first character is the
     first byte on the wire.
   * The packet is accepted only if all of these hold: IHL ≥ 5, the UDP
     length covers the key (≥ 8 + `KEY_LEN`), and every key byte matches.
4. **Act.** If the packet is accepted, `appliance_off` toggles and
   `key_match` pulses.

Either way, `pkt_checked` pulses and the controller goes back to waiting.

No other header field is examined: not the addresses, ports, protocol or
checksums. The controller therefore accepts packets from any source to any
destination, and the Ethernet chip is put in promiscuous mode to match. The
key only gives weak authorisation. Anyone who can see a valid packet can
replay it.

Reading a buffer byte costs one controller cycle:

* The controller presents the address on one tick.
* The RAM answers one clock later.
* The controller takes the byte on the next tick.

The SLIP buffer has a single port, and the SLIP receiver writes to it with
priority. If the receiver is writing when the controller wants to read, the
buffer drops `data_valid` and the controller reads that byte again.

## Clocking

Everything runs on one clock: the 25.175 MHz board clock.

* **Network controller.** It runs 1024 times slower than the interfaces.
  `clk_div` produces an enable pulse, `tick`, once every 1024 clocks, and
  the controller only changes state on a tick. An enable was used instead
  of a divided clock to keep the design in one clock domain.
* **Ethernet load time.** The clock ratio is chosen so that a small frame
  loads within one controller cycle: a 60-byte frame takes 386 clocks.
  Larger frames take longer; a 512-byte frame takes about 3,100 clocks. The
  controller does not count on the ratio. It waits for the acknowledge.
* **Serial timing.** Serial bits last `round(CLK_HZ / BAUD)` = 2622 clocks.

A complete Ethernet check takes about 17 controller cycles, which is about
17 k clocks or 0.7 ms. Over SLIP, receiving a 36-byte packet takes about
37 ms of line time.

## Ethernet interface (`eth_if`)

### Chip bus

`eth_if` is the only master on the chip's bus. The signals are:

| Signal | Meaning |
|---|---|
| `sa[3:0]` | I/O address |
| `data_o`, `data_oe`, `data_i` | the bidirectional data bus, split into out, output enable and in; the three-state pad is outside |
| `ior_n`, `iow_n` | read and write strobes, active low |
| `aen` | low while the bus is in use |

Every byte access takes `STROBE_CYCLES + 3` clocks:

```
clock    : idle | setup | strobe x STROBE_CYCLES | hold
aen      :  1   |   0   |   0  ...  0           |  0  -> 1
sa       :  -   | addr  | addr ...  addr        | addr
ior/iow_n:  1   |   1   |   0  ...  0           |  1     (read data taken on the last strobe clock)
data_oe  :  0   | write | write ... write       | write -> 0
```

A 16-bit chip register is two byte accesses: the low byte at the even
address, then the high byte at the odd address.

### What the interface does

**At reset**, it:

1. reads the PacketPage product ID (register 0x0000). `chip_ok` goes high
   if the value is 0x630E.
2. writes RxCTL (0x0104) = 0x0D85. This accepts good frames that are
   individual, broadcast or promiscuous.
3. writes LineCTL (0x0112) = 0x0053. This turns the receiver on.
4. raises `init_done`.

All PacketPage registers are reached through the pointer port (0xA) and
the data port (0xC).

**A poll** reads RxEvent (0x0124). Bit 8 (RxOK) means a good frame is
waiting. Reading RxEvent clears that flag inside the chip. So once a frame
has been reported, it keeps being reported from a local flag until it is
loaded.

**A load** reads a sequence from the receive data port (0x0/0x1):

1. RxStatus,
2. RxLength,
3. RxLength bytes, alternating between the even and odd address.

Byte *i* of the frame is written to `pkt_buffer[i]`, and `pkt_len` reports
the frame length. A frame longer than the 512-byte buffer is still read out
completely, so that the chip lets go of it, but only its first 512 bytes
are kept. That is enough for the key check, which never looks past byte 90.

### Handshakes

Both requests use a four-phase handshake:

1. The request is raised and held.
2. The acknowledge rises when the work is done.
3. The request falls.
4. The acknowledge falls.

This works whatever the rate ratio between the two sides. The controller
has also been tested with a tick every 4 clocks, against handshake models.

### Register source

The register map, register values and byte order come from the chip's
published 8-bit-mode rules, not from the original design description. They
have been checked only against the behavioural chip model in
`tb/cs8900a_model.sv`, not against silicon. The order in which the
RxStatus and RxLength bytes arrive is the least certain point. Check it
against the chip's manual before use on hardware.

## SLIP interface (`slip_control` = `slip` + `slip_buffer`)

**Receiving.** `uart_rx` turns the line into bytes. The line format is 8N1,
least significant bit first, sampled in the middle of each bit after a
two-flop synchroniser. `slip` then removes the escapes:

* `ESC ESC_END` becomes `END`.
* `ESC ESC_ESC` becomes `ESC`.

The character values are END 0xC0, ESC 0xDB, ESC_END 0xDC, ESC_ESC 0xDD.
Each byte is written to `slip_buffer` as soon as it is complete, at the
next address. An END byte closes the packet:

* `pktRead` pulses for one clock.
* The next packet starts again at address 0.

An END with no data before it does not pulse `pktRead`. Senders often
start a packet with END to flush line noise. Bytes beyond address 511 are
dropped. A byte with a bad stop bit is dropped and cancels a pending ESC.

**Transmitting.** While `outready` is high:

* an `out_load` pulse sends `serial_out_data`. END and ESC are sent as
  their two-byte escapes.
* an `out_finished` pulse sends END.

`enableserialout` is high from the first byte of a packet until its END
has left the line. Nothing inside the design sends packets, so these
transmit-request ports are brought out of `netcon_top`.

**Resets.** The transmit side (`soutclr`) and the receive side (`reset`)
have separate resets. `slip_control` drives both from its one reset.

## Appliance pin (`appliance_controller`)

The FPGA pin sinks the coupler's diode current: the diode is fed from the
supply, and the pin provides the ground.

* **Pin low:** the diode lights, the coupler switches the 12 V relay, and
  the appliance is off.
* **Pin high:** there is no voltage across the diode, and the appliance
  runs.

The block is therefore a registered inverter: `reset_relay_n = !disable_req`,
one clock late. It is high (appliance running) from reset. The appliance
only goes off when the controller actively asks for it.

## Parameters (of `netcon_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `SLIP_LINK` | 0 | 0: controller reads Ethernet frames; 1: SLIP packets |
| `DIV` | 1024 | system clocks per controller cycle |
| `CLK_HZ` | 25 175 000 | system clock, for the baud rate |
| `BAUD` | 9600 | serial rate |
| `STROBE_CYCLES` | 3 | CS8900A strobe width in clocks (3 clocks ≈ 120 ns) |
| `KEY_LEN`, `KEY` | 8, `"REBOOTPC"` | secret key at the start of the UDP payload |

The buffer address width, `BUF_AW` = 9 (512 bytes), is in `netcon_pkg`,
together with the SLIP characters and the chip's register numbers.

## What follows the original design and what was chosen here

These points follow the original design:

* the block structure;
* polling by the controller;
* a load that overwrites the buffer;
* random access to the packet through header lengths;
* the secret-key test and the toggle;
* the 1024:1 rate ratio;
* the 9600-baud SLIP link with the port names of its block diagram;
* the 9-bit SLIP buffer address;
* the write-has-priority SLIP buffer;
* the inverted, current-sinking appliance pin.

These points were not specified and were chosen here:

* the key's length and value;
* the exact header fields used, and the sanity checks on IHL and UDP length;
* all handshakes;
* the CS8900A register sequence and bus timing;
* the packet buffer size (matched to the SLIP buffer so that the links are
  interchangeable);
* the single clock with an enable, instead of separate controller and
  buffer clocks;
* the empty-packet and overflow rules of the SLIP receiver;
* the meaning of `out_finished` and `enableserialout`;
* the UART's framing and sampling;
* the status outputs of the top.

Known gaps:

* There is no lock on the SLIP buffer. A SLIP packet that arrives while
  the controller is still comparing the previous one overwrites it.
* Nothing sends replies; the transmit path is only exercised by the
  testbenches.
* The design has not been run against a real CS8900A.

## Simulating

The testbenches are self-checking. Each one ends with
`TB_RESULT checks=N failures=M` and has a watchdog. Build any of them with
Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/netcon_pkg.sv tb/tb_netcon_pkg.sv tb/tb_netcon_full.sv --top-module tb_netcon_full
./obj_dir/Vtb_netcon_full
```

| Testbench | What it covers |
|---|---|
| `tb_netcon_full` | whole design at the default parameters: a behavioural CS8900A delivers a wrong-key frame, a right-key frame, a second right-key frame (longer IP header) and a full-size 1514-byte right-key frame; the pin stays high, goes low, returns high, goes low |
| `tb_netcon_top` | both links end to end, at the real rates. Counts each mechanism and requires it: empty polls, frames reported and loaded, rejected packets, key matches in both directions, SLIP escapes and packet ends, SLIP transmission |
| `tb_net_controller` | both controller variants against buffer and handshake models: wrong first, middle and last key byte, IHL 7, UDP length too short, IHL < 5, random `rd_valid` drops |
| `tb_eth_if` | chip set-up, empty polls, repeated reporting, byte-exact loads, two queued frames, a 600-byte frame, bus-rule checks, load time of a 60-byte frame (must be ≤ 1024 clocks) |
| `tb_slip`, `tb_slip_control` | escaped packets, an END alone, a 520-byte packet, random-access read-back, encoded transmission |
| `tb_uart_rx`, `tb_uart_tx` | random bytes at 16 clocks/bit, bad stop bit, glitch rejection, bit time at 9600 baud |
| `tb_slip_buffer`, `tb_pkt_buffer`, `tb_clk_div`, `tb_appliance_controller` | the small blocks |

`tb/tb_netcon_pkg.sv` builds the test packets: IP/UDP, the Ethernet
wrapper, and SLIP encoding. `tb/cs8900a_model.sv` models the chip's host
interface and counts bus-protocol faults. The whole-design tests take a
few seconds each.
