# PRINCE cipher IP cores for secure GSM messaging

Short text messages sent through a GSM modem are easy to intercept. This
design encrypts each message on an FPGA before it reaches the modem, and
decrypts each received message the same way. The cipher is PRINCE, a
lightweight 64-bit block cipher with a 128-bit key, built for low latency.
Here it is fully unrolled: one 64-bit block goes through all twelve rounds in
a single clock cycle. The system around the cipher has:

- two PRINCE IP cores on the processor bus, one that encrypts and one that decrypts;
- an RS-232 UART to the GSM modem (9600 baud, 8 data bits, no parity, 1 stop bit);
- the Processor Local Bus (PLB) that connects them;
- the processor's local block RAM on its two Local Memory Buses (LMB).

The processor is a MicroBlaze soft core. It runs the messaging software,
sends AT commands to the modem and moves data between the cores and the UART.
It is a vendor core, so it is not part of this RTL: its bus ports are the
ports of the top module, `prince_soc`.

```
        processor (not included)
   DLMB  ILMB      DPLB  IPLB
     |     |         |     |
  +--v-----v--+   +--v-----v------------------------------+
  | lmb_bram  |   | plb_bus (arbiter, OR of responses,    |
  | port B/A  |   |          timeout)                     |
  +-----------+   +---+-------------+---------------+-----+
                      |             |               |
               prince_ip       prince_ip        uartlite ---- tx/rx ---- GSM modem
               (encrypt)       (decrypt)        (FIFOs, 9600 8-N-1)
               0x8441_8000     0x8441_4000      0x8400_0000
```

## The PRINCE datapath

### Bit and key order

The state is `logic [63:0]`, and bit 63 is the most significant bit. It is
read as sixteen nibbles. Nibble 0 is bits 63:60, the leftmost hex digit of a
test vector. The key is `{k0, k1}`, with k0 in bits 127:64. This is the order
in which published PRINCE test vectors are written. For example, plaintext
`0123456789abcdef` with key `0000000000000000_fedcba9876543210` encrypts to
`ae25ad3ca8fa9ccf`.

### Encryption and decryption

```
c = PRINCE-core_k1( p ^ k0 ) ^ k0'          k0' = (k0 >>> 1) ^ (k0 >> 63)
```

`prince_key_schedule` computes k0'. It is only wiring plus one XOR gate: bit 0
of k0' is `k0[1] ^ k0[63]`. `prince_core` is the keyed permutation:

| step | operation | module |
|---|---|---|
| round 0 | `x ^= k1 ^ RC0` | `prince_core` |
| rounds 1..5 | `x = SR(M'(S(x))) ^ RC_i ^ k1` | `prince_round` (INVERSE=0) |
| middle | `x = S^-1(M'(S(x)))` | `prince_middle` |
| rounds 6..10 | `x = S^-1(M'(SR^-1(x ^ RC_i ^ k1)))` | `prince_round` (INVERSE=1) |
| round 11 | `x ^= k1 ^ RC11` | `prince_core` |

Decryption needs no separate datapath. The round constants satisfy
`RC_i ^ RC_(11-i) = alpha` (alpha = `c0ac29b7c97c50dd`). Because of this, the
same core run with `k1 ^ alpha` computes the inverse permutation. The
decryption unit therefore only rearranges the keys:

```
p = PRINCE-core_(k1 ^ alpha)( c ^ k0' ) ^ k0
```

`prince_cipher` has a `DECRYPT` parameter that selects one of the two key
arrangements. Everything else in the core is identical for both.

### The layers

- **S** (`prince_sbox_layer`): sixteen parallel copies of the 4-bit S-box
  `B F 3 2 A C 9 1 6 7 8 0 E 5 D 4`. The inverse S-box is
  `B 7 3 2 F D 8 9 A 6 4 0 5 E C 1`. These are plain constant tables, which
  map to LUTs. No block RAM is used.
- **SR** (`prince_shift_rows`): AES-style ShiftRows on a 4x4 nibble array.
  Output nibble i takes input nibble
  `(0,5,10,15,4,9,14,3,8,13,2,7,12,1,6,11)[i]`. It is pure wiring.
- **M'** (`prince_mprime_layer`): this is the layer most likely to be
  misread.
  - The layer is `diag(M0^, M1^, M1^, M0^)`, applied to the four 16-bit slices
    of the state. Slice 0 is bits 63:48.
  - Inside a slice, `M0^` has 4x4 block (br, bc) equal to `M((br+bc) mod 4)`.
    `M1^` has `M((br+bc+1) mod 4)`.
  - `Mk` is the 4x4 identity matrix with diagonal entry k cleared.
  - So output bit r of nibble br is the XOR of bit r of three of the four
    nibbles of the same slice. The one nibble left out is the bc with
    `(br+bc+s) mod 4 == r`, where s is 0 for `M0^` and 1 for `M1^`.
  - Bit r counts from the most significant bit of the nibble.
  - Every output bit is the XOR of exactly three input bits, and M' is its own
    inverse.

The round constants RC0..RC11 are the standard PRINCE values, derived from
the digits of pi. They are in `prince_pkg`.

### Timing

The datapath from the operand registers to the result register is
combinational: 12 S-box layers and 11 linear layers deep. `prince_cipher`
takes `data_i`/`key_i` on the rising edge where `valid_i` is high. The
result is on `data_o` (with `valid_o`) during the next cycle. A new block can
be started every cycle. The FPGA implementation this design follows reached
31.76 MHz. One 64-bit block per cycle at that clock gives
64 x 31.76 MHz = 2.03 Gbit/s. The clock frequency has not been measured for
this RTL.

## The IP core register interface (`prince_ip`)

Each core is a PLB slave with eight 32-bit registers:

| offset | register | access |
|---|---|---|
| 0x00 | input block, bits 63:32 | R/W |
| 0x04 | input block, bits 31:0 | R/W |
| 0x08 | key bits 127:96 (k0 high) | R/W |
| 0x0C | key bits 95:64 (k0 low) | R/W |
| 0x10 | key bits 63:32 (k1 high) | R/W |
| 0x14 | key bits 31:0 (k1 low) | R/W |
| 0x18 | result, bits 63:32 | R |
| 0x1C | result, bits 31:0 | R |

There is no start bit and no busy flag:

1. Any write to an operand register makes the cipher reload its operands in
   the following cycle.
2. The result register is up to date one clock later.
3. That is before the bus can deliver the next read, so software writes six
   words and reads two, without polling.

In the full system the encryption core is at 0x8441_8000 and the decryption
core at 0x8441_4000. Each core has a 256-byte window.

## The bus

### Slave side (`plb_slave_if`, used by both cores and the UART)

The port names and widths are those of a PLB v4.6 slave: 128-bit data buses,
16 byte enables, and the `Sl_*` handshake outputs. They are grouped in the
structs `plb_req_t` and `plb_rsp_t`. Only single-beat 32-bit transfers are
supported:

- **cycle t:** `PLB_PAValid` is high with an address in the window. The
  register access happens at the end of this cycle.
- **cycle t+1:** `Sl_addrAck` is high. For a write, `Sl_wrDAck` and
  `Sl_wrComp` are high with it. For a read, `Sl_rdDAck` and `Sl_rdComp` are
  high, and the data is on `Sl_rdDBus`, copied onto all four 32-bit lanes.

The master must hold its request until `Sl_addrAck`. If the request is still
there in the ack cycle, it is not taken a second time. Write data comes from
the lane selected by address bits 3:2.

This protocol is simplified. There are no bursts, no wait states, no
`Sl_rearbitrate` and no error reporting from the slaves. A real PLB v4.6
master that uses only single transfers will work with it. Check your master
before you rely on more.

### Bus side (`plb_bus`)

The bus serves two masters: the processor's data-side port (index 0) and its
instruction-side port (index 1). The master side is a reduced bundle,
`plb_mreq_t`/`plb_mrsp_t`: request, read/write, address, byte enables, write
data, and then ack, data and error.

- **Arbitration:** fixed priority. The data side wins when both ports request
  in the same cycle.
- **Address phase:** the winner's request goes to all slaves. The slaves'
  outputs are ORed together, so only the addressed slave can drive them.
- **Timeout:** if no slave answers within 16 cycles, the bus ends the
  transfer itself with `err`. A stray address therefore cannot hang the
  processor.

## The UART (`uartlite`, `uart_tx`, `uart_rx`, `uart_baud_gen`)

| offset | register | function |
|---|---|---|
| 0x0 | RX FIFO | R: oldest received byte; reading it removes the byte (reads zero when empty) |
| 0x4 | TX FIFO | W: byte to send |
| 0x8 | STATUS | R: bit 0 rx valid, 1 rx full, 2 tx empty, 3 tx full, 5 overrun, 6 frame error; reading it clears bits 5 and 6 |
| 0xC | CONTROL | W: bit 0 clears the TX FIFO, bit 1 clears the RX FIFO |

- **Baud generator:** a divider that makes a tick at 16 times the bit rate:
  `round(CLK_HZ / (16*BAUD))`, which is 207 at the defaults.
- **Transmitter:** sends the start bit, then 8 bits LSB first, then the stop
  bit. Each bit lasts 16 ticks.
- **Receiver:** synchronises the line with two flip-flops and waits for a
  falling edge. Half a bit later it checks that the line is still low. A
  shorter pulse is ignored as a glitch. It then samples each bit in its
  middle.
- **FIFOs:** each direction has a 16-entry FIFO. A byte that arrives when the
  RX FIFO is full is dropped and sets the overrun bit.

## Local memory (`lmb_bram`)

The local memory is one array of `MEM_BYTES` (default 8 KB) 32-bit words with
two ports:

- port A serves the instruction LMB;
- port B serves the data LMB.

An access starts with `LMB_AddrStrobe` plus the read or write strobe.
`Sl_Ready` comes one cycle later, and read data arrives with it. Writes honour
the four byte enables. If both ports write the same word in the same cycle,
the data port wins. The array starts uninitialised. There is no
program-loading path: in a real system, the processor's image would be placed
in the RAM when the FPGA is configured.

## Parameters of the top (`prince_soc`)

| parameter | default | meaning |
|---|---|---|
| `ENC_BASEADDR` | 0x8441_8000 | encryption core window |
| `DEC_BASEADDR` | 0x8441_4000 | decryption core window |
| `UART_BASEADDR` | 0x8400_0000 | UART window |
| `CLK_HZ` | 31_760_000 | system clock, used for the baud divider |
| `BAUD` | 9600 | serial rate |
| `MEM_BYTES` | 8192 | local memory size |

The design uses one clock and a synchronous, active-high reset.

## Where this RTL departs from, or goes beyond, the reference design

Taken from the reference design:

- the cipher structure and its one-cycle unrolled form;
- the S-box tables;
- alpha;
- the key-schedule formula;
- the key order;
- the use of two cores, one encrypting and one decrypting;
- the six-plus-two register interface;
- the base addresses of the three peripherals and the UART's register offsets;
- the PLB slave port list;
- the 9600 8-N-1 serial format;
- the bus structure, with two LMBs to a shared BRAM and the peripherals on the PLB.

The following points are choices made for this RTL:

- **Round order.** The reference block diagram draws the rounds in a
  different order from the PRINCE definition. It draws the middle layer as
  SR^-1, M', SR. This RTL follows the PRINCE definition, because only that
  reproduces the published test vectors. Those vectors appear in the reference
  design's own simulation results.
- **Round constants and M' matrix.** RC1..RC10 and the M' matrix are not
  given in the reference design. They are taken from the PRINCE definition.
- **Decryption whitening.** The reference drawing of the decryption unit
  shows k0' at both the input and the output. Here the output uses k0, which
  is what inverts the encryption. The two agree for the all-zero k0 used in
  the reference results.
- **Register layout.** The reference software listing declares only seven
  register addresses per core. The text describes eight registers; eight are
  built.
- **Own choices for unspecified details:**
  - the PLB handshake timing and the arbitration;
  - the bus timeout;
  - window sizes;
  - the UART's FIFO depth, control register and status bit layout;
  - 16x oversampling;
  - the LMB timing and the memory size;
  - reset behaviour;
  - the system clock value.
- **Not built:**
  - the processor;
  - its debug module;
  - the clock generator;
  - the GSM modem, which is external. The testbench replaces it with a
    loop-back of the serial line.

## Simulating

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each one has a watchdog. To run one with
Verilator, list the packages first and let Verilator find the other modules
in `rtl/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
  rtl/prince_pkg.sv rtl/plb_pkg.sv rtl/lmb_pkg.sv tb/tb_prince_soc.sv \
  --top-module tb_prince_soc
./obj_dir/Vtb_prince_soc
```

| testbench | what it shows |
|---|---|
| `tb_prince_cipher` | published PRINCE vectors and random vectors checked in both directions, the one-cycle latency, one block per clock, and random round trips |
| `tb_prince_core`, `tb_prince_round`, `tb_prince_middle`, `tb_prince_mprime_layer`, `tb_prince_shift_rows`, `tb_prince_sbox_layer`, `tb_prince_key_schedule` | each layer against values from an independent software model, plus its algebraic properties: inverse, involution, weight-3 columns, the alpha reflection |
| `tb_prince_ip` | the register interface: both cores, read-back, byte enables |
| `tb_plb_slave_if`, `tb_plb_bus` | handshake timing, lane handling, arbitration priority, timeout |
| `tb_uart_baud_gen`, `tb_uart_tx`, `tb_uart_rx`, `tb_uartlite` | tick spacing, framing, frame errors, glitch rejection, FIFOs, overrun, status bits |
| `tb_lmb_bram` | both ports, byte enables, a random run against a model |
| `tb_prince_soc` | the whole system at its default parameters |

`tb_prince_soc` acts as the processor:

1. It stores a key and an 8-character message in local memory.
2. It encrypts the message in the encryption core.
3. It sends the two AT commands that switch the modem to text mode and start
   a message (`AT+CMGF=1`, `AT+CMGS="<number>"`), then the ciphertext, through
   the UART at 9600 baud. The commands are longer than the 16-entry TX FIFO,
   so the software has to wait on the tx-full bit. Meanwhile it drains the RX
   FIFO.
4. It receives the echo.
5. It decrypts the echo in the decryption core over the instruction-side bus
   port.

It also forces a bus conflict and a bus timeout. It counts each of these
events and fails if any of them never happens. It takes a few seconds of run
time.

The expected cipher values in the testbenches come from a software PRINCE
model, cross-checked against the five published test vectors. The model
itself is not included. Any PRINCE reference implementation gives the same
numbers.
