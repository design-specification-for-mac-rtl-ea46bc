# CRC-32 error detection for an IEEE 802.11 MAC sub-layer

A MAC layer turns an unreliable radio link into a reliable one by adding a
32-bit *frame check sequence* (FCS) to every frame. The transmitter computes the
FCS as a cyclic redundancy check (CRC) over the MAC header and frame body. The
receiver runs the same computation. If the results differ, the frame was damaged
and must not be acknowledged.

This RTL covers both sides, in two styles:

* a **bit-serial** CRC. It is a 32-stage linear feedback shift register (LFSR)
  that takes one bit per clock. The transmitter and a serial receive check use it.
* a **table-driven CRC** that takes 4 bits per clock. This is the width of the
  bus between the 802.11 transceiver and the MAC. The unit first builds a
  16-entry lookup table from the generator polynomial, in hardware. After that,
  each clock needs one table lookup, one shift and one XOR. On the receive side
  it works with a 16-bit serial-to-parallel shifter and a *CRC decoder*. The
  decoder rebuilds the received FCS from two 16-bit words and compares it with
  the CRC computed locally.

All of it is synthesizable SystemVerilog with a synchronous active-high reset.

## The arithmetic

Bits are treated as the coefficients of a polynomial over GF(2), where addition
is XOR. The first bit on the wire is the highest power. For a message M(x) and a
generator G(x) of degree n:

    FCS  = remainder of  M(x) * x^n  /  G(x)
    T(x) = M(x) * x^n + FCS          (the transmitted frame)

By construction, T(x) divides evenly by G(x). A receiver can therefore do either
of two things:

* divide the whole received frame and test for a zero remainder, or
* recompute the FCS over header and body and compare it with the received one.

Both are built here.

A small example, used in the testbenches: G = 10011 (x^4 + x + 1) and message
1101011011. The remainder is 1110, so the transmitted frame is 11010110111110.
Dividing that frame again leaves zero, and flipping any one bit leaves a
non-zero remainder.

The generator is the IEEE 802.3 CRC-32:

    G(x) = x^32 + x^26 + x^23 + x^22 + x^16 + x^12 + x^11 + x^10 + x^8 + x^7
         + x^5 + x^4 + x^2 + x + 1          (0x04C11DB7 without the x^32 term)

The CRC register starts at zero. The result is not complemented and not
bit-reflected. Messages go in most significant bit first. These are the plain
mathematical conventions, not the framing conventions of 802.11 on air (see
*Departures* below). With these conventions, the CRC of the ASCII string
"123456789" is 0x89A1897F. The testbenches check this value.

## Bit-serial CRC (`crc_serial_lfsr`)

The LFSR is a 32-stage shift register with an XOR in front of every stage whose
power of x appears in G(x). The incoming bit is XORed with the bit leaving the
top stage. The result is fed back into all the taps at once.

Because the message enters at the top, the multiplication by x^32 is already
folded in. The register holds the finished CRC one clock after the last message
bit, with no 32 zero bits to feed.

To append the CRC, `fb_en` switches the feedback off. The register then works as
a plain shift register: `dout` delivers the CRC MSB first over 32 clocks and the
register is left at zero for the next frame. `init` marks the first bit of a new
message. `crc_nxt` shows the value the register will take on the next clock.

### Transmitter (`fcs_append`)

The partial frame (header and body) enters as a bit stream: `in_valid`,
`in_data`, and `in_last` on the final bit. The complete frame leaves one clock
later on `out_*`:

* the same bits,
* then the 32 FCS bits, marked by `out_fcs`,
* with `out_last` on the final FCS bit.

`in_ready` is low for exactly the 32 FCS clocks. A new frame may start on the
next clock. The output has no back-pressure.

### Serial receive check (`crc_serial_check`)

This block divides the whole received frame, FCS included. One clock after
`in_last`:

* `done` pulses,
* `ok` is 1 when the remainder is zero,
* `remainder` holds that remainder.

Note that the LFSR computes T(x)·x^32 mod G(x). This is zero exactly when
T(x) mod G(x) is zero. Frames may follow each other with no gap.

## Table-driven CRC, 4 bits per clock (`crc_parallel`)

This is the most involved part of the design. It has four pieces:

    poly register ──> crc_table_gen ──write──> crc_table (16 x 32) ──read──┐
                            ^                                              v
    en, din[3:0] ──> crc_parallel_ctrl ──clr/step/zero──> crc_nibble_engine ──> crc_out

### The main loop (`crc_nibble_engine`)

This is the *augmented-message* form of the table algorithm. Each step does the
following:

    top      = the 4 most significant register bits
    register = (register << 4) | next 4 message bits
    register = register XOR table[top]

with `table[i]` = remainder of i(x)·x^32 / G(x). The table replaces four bit-wise
division steps. The register always holds a 32-bit value congruent to everything
fed in so far. So:

* **sending:** feed the message, then 32 zero bits (8 zero nibbles). The
  register then holds the FCS.
* **receiving:** feed the whole frame including its FCS. The register is then
  the frame's remainder, which is zero when no error is detected.

`clr` together with `step` starts a new message with the incoming nibble as its
first data. This works because `table[0]` is zero. The table is read
asynchronously, so the lookup and the register update happen in the same clock.

### Table generation (`crc_table_gen`)

The table is computed in hardware from the polynomial register. Two counters
drive it:

* Counter_2 walks through the 16 indices.
* Counter_1 walks through 4 division steps plus one store step.

In each division step the shift register moves one place left. The polynomial is
XORed in when the bit leaving the top, XORed with the current index bit (MSB
first), is one. In the store step the register is written to `table[index]` and
cleared.

One entry takes 5 clocks and the whole table takes 80. The polynomial is latched
when generation starts. `W` and `NB` are parameters: the testbench also builds
the table of an 8-bit generator.

### Controller (`crc_parallel_ctrl`)

The controller uses a flag `C` meaning "table complete". Reset and loading a new
polynomial (`poly_load`) clear it. A finished table generation sets it.

| state | does | leaves to |
|---|---|---|
| Cleared | held while `rst` = 1 | Table Generation when `rst` = 0 and C = 0 |
| Table Generation | runs `crc_table_gen`, engine cleared | when the table is complete: Idle_0 if `en` = 0, Idle_1 if `en` = 1 |
| Idle_1 | a frame started before the unit was ready; it is ignored | Idle_0 when `en` = 0 |
| Idle_0 | waits for a frame | Main Algorithm when C = 1 and `en` = 1 (first nibble processed in this clock); Idle_1 when C = 0 and `en` = 1; Table Generation when C = 0 and `en` = 0 |
| Main Algorithm | one table step per clock while `en` = 1 | Table Generation when C = 0 (frame abandoned); when `en` falls: Append if sending, else Idle_0 with the result |
| Append | 8 zero steps (the first already in the clock `en` fell) | Idle_0 (Idle_1 if `en` is already high again) |

`rst` = 1 returns every state to Cleared. `gen_mode` is sampled at the first
nibble of a frame: 1 means sending, 0 means receiving.

Timing:

* Right after reset, `table_ready` (the C flag) rises about 82 clocks after `rst`
  falls.
* In sending mode, `done` and `crc_valid` with the checksum on `crc_out` arrive
  8 clocks after the first clock with `en` low.
* In receiving mode, `done` and `frame_ok` arrive in the clock after that first
  clock, with the remainder on `crc_out`.
* Frames may be back to back. A frame that begins while `table_ready` is low is
  dropped, so the source must wait for `table_ready`.
* `crc_valid` falls when a new frame starts or when the table becomes invalid.

### Receive side: 16-bit shifter and CRC decoder (`s2p_shift`, `crc_decoder`)

`s2p_shift` packs four 4-bit bus transfers into one 16-bit word, with the first
nibble in the top bits. `out_valid` pulses in the clock after the fourth nibble.

`crc_decoder` receives the FCS as two such words (`crc_shift`, with
`crc_enable`):

1. It keeps the first word in a 16-bit buffer.
2. When the second word arrives, it outputs `{first, second}` on `crc_out` one
   clock later.
3. As soon as the locally computed CRC (`crc_calc`, `crc_calc_valid`) is also
   available, it sets `frame_enable` to 1 if the two match and 0 if not, and
   pulses `check_done`.

`frame_enable` holds until the next comparison. If the computed CRC arrives
late, the comparison waits for it.

## Top level (`crc_mac_top`)

Three independent paths share the clock and reset:

* **Transmit:** `tx_in_*` → `fcs_append` → `tx_out_*` (bit-serial).
* **Serial receive check:** `srx_*` → `crc_serial_check`.
* **4-bit receive:** `rx_valid`, `rx_data[3:0]`, `rx_is_fcs`, `rx_gen_mode`.
  * `rx_gen_mode` = 1: header and body nibbles go to `crc_parallel` in sending
    mode. The 8 FCS nibbles (`rx_is_fcs` = 1) go through `s2p_shift` into
    `crc_decoder`, which compares them with the computed CRC. The result is
    `frame_enable`, and `crc_out` is the received FCS. The FCS nibbles arrive
    while the unit appends its zeros, so the next frame can follow immediately.
  * `rx_gen_mode` = 0: the whole frame goes to `crc_parallel` in receiving
    mode, and `par_frame_ok` reports a zero remainder. The decoder still
    rebuilds `crc_out`, but it makes no comparison in this mode.

  `poly_load` and `poly_in` replace the polynomial of the 4-bit unit, which then
  rebuilds its table. The serial paths use the `POLY` parameter.

The logic that separates header, body and FCS on the receive bus drives
`rx_is_fcs`. The frame decoder that uses `frame_enable` and `crc_out` (for
example, to decide whether to send an ACK) is outside this design. Its signals
are top-level ports.

Parameters (defaults): `W` = 32, `POLY` = 32'h04C11DB7, `NB` = 4 bits per clock,
`SHIFT_W` = 16. The decoder assumes that `W` = 2·`SHIFT_W`.

After synthesis the whole top needs about 370 flip-flops plus the 16×32-bit
table.

## Departures from the original specification

The specification this RTL was built from leaves several points open or states
them inconsistently. The following choices were made:

* **Polynomial.** The specification calls its generator "the standard CRC-32".
  Its formula omits the x^10 and x^7 terms, and in one place the x term. Its
  LFSR drawings include x^10 and x^7 but no x term. This design uses the
  standard IEEE 802.3 polynomial, which is the union of all the printed terms.
  As a consequence the serial LFSR has 13 tap XORs plus the input XOR, not the
  12 XOR gates the specification counts. Set `POLY` to use a different
  generator.
* **Table entry width.** The specification describes sixteen *8-bit* entries in
  a byte-addressable table. A CRC-32 needs 32-bit entries, so each of the 16
  addresses holds one 32-bit word.
* **Shift amount.** The printed table algorithm shifts the register by 28 per
  step. With 4 bits per clock the shift must be 4, and 4 is used.
* **Reset.** The specification says both that Reset = 1 returns the controller
  to Cleared and that Reset becoming 0 does. Here Reset is synchronous and
  active high, and Reset = 1 returns every state to Cleared.
* **Own additions to the controller.** These are:
  * the Append state;
  * regenerating the table from Idle_0 when C = 0 and `en` = 0;
  * restarting generation when a polynomial arrives during generation;
  * what clears C (reset and `poly_load`).
* **802.11 conventions.** The register starts at zero and the FCS is not
  complemented, as the specification describes. A real 802.11/802.3 FCS starts
  the register at all ones, complements the result and sends bits LSB first
  within each byte. Frames produced by this RTL therefore do not carry a
  standard 802.11 FCS. Adding a preset and a final inversion would be a small
  change to the three registers.
* **Interfaces.** The following are this design's own:
  * valid/last framing of the bit streams and the 4-bit bus;
  * the `rx_is_fcs` marker;
  * the `crc_calc` inputs of the decoder;
  * the order of the two FCS words (upper half first).
* **Bus widths.** The specification mentions a 4-bit transceiver bus, a 16-bit
  data bus and "four bytes in parallel". Here the transceiver bus is 4 bits and
  the shifter output that feeds the decoder is 16 bits.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against
an independent long-division model (`tb/crc_ref_pkg.sv`) and prints
`TB_RESULT checks=N failures=M`:

| testbench | what it covers |
|---|---|
| `tb_crc_serial_lfsr` | 4-bit example (remainder 1110, frame leaves zero); "123456789" → 0x89A1897F; random messages; CRC shift-out |
| `tb_fcs_append` | control-frame and random sizes back to back; exact output stream; 32-clock FCS phase |
| `tb_crc_serial_check` | good and corrupted frames, back to back; remainder values; result latency |
| `tb_crc_table_gen` | all 16 entries for CRC-32, CRC-32C and an 8-bit generator; 5 clocks per entry, 80 per table |
| `tb_crc_table` | write and read-back of the storage |
| `tb_crc_nibble_engine` | checksum after 8 zero nibbles; zero remainder on good frames only |
| `tb_crc_parallel_ctrl` | every state transition in the table above, zero-step counts, reset from Main |
| `tb_crc_parallel` | sending and receiving frames back to back with exact latencies; polynomial change to CRC-32C |
| `tb_s2p_shift`, `tb_crc_decoder` | word assembly and timing; match/mismatch with early, simultaneous and late `crc_calc` |
| `tb_crc_mac_top` | end to end at default parameters (below) |

The top-level test builds frames of the 802.11 sizes the design targets:

* RTS: 20 bytes with FCS;
* CTS and ACK: 14 bytes;
* data frames with a 30-byte header and a 128-byte or 2048-byte body;
* the largest body, 2312 bytes.

Each frame is transmitted, then received by the serial check, by the 4-bit path
in both modes, and again with one to three flipped bits. It then loads a new
polynomial in the middle of a frame, checks CRC-32C frames and switches back. It
counts the following and fails if any never happens:

* FCS appends;
* table generations;
* Idle_1 visits;
* Append phases;
* Main → Table Generation transitions;
* passed and flagged frames on every checker.

The run takes a few seconds.

Simulating with Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/crc_pkg.sv tb/crc_ref_pkg.sv tb/tb_crc_mac_top.sv --top-module tb_crc_mac_top
    ./obj_dir/Vtb_crc_mac_top

Replace `tb_crc_mac_top` with any other testbench name. Lint the RTL with
`verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/crc_pkg.sv rtl/crc_mac_top.sv`.
The only remaining warnings are deliberately unconnected LFSR outputs and unused
package constants.

What is not verified: no timing closure or gate-level simulation has been done,
and the design has not been run against frames captured from real 802.11
hardware (which would also need the preset and inversion described above).
