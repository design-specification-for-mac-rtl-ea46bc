// crc_serial_lfsr: bit-serial CRC register (one message bit per clock).
//
// A W-stage shift register with an XOR in front of every stage whose power of x
// appears in the generator polynomial. The incoming bit is XORed with the bit
// leaving the top stage; that feedback bit is folded into the taps, so the register
// holds Remainder(M(x) * x^W / G(x)) as soon as the last message bit has been
// clocked in, without feeding W extra zero bits. Bits enter MSB (highest power of
// x) first. The register starts at zero, as the specification asks.
//
// Interface: en clocks one bit din in. init makes that bit the first of a new
// message (the register is treated as zero before it); init without en just clears.
// With fb_en low the register shifts without feedback, so dout (the top stage)
// walks the finished CRC out MSB first, leaving zeros behind after W shifts.
// crc is the register, crc_nxt the value it takes on the next enabled clock.
// Synchronous active-high reset.
module crc_serial_lfsr #(
  parameter int unsigned   W    = crc_pkg::CRC_W,
  parameter logic [W-1:0]  POLY = W'(crc_pkg::CRC32_POLY)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         init,
  input  logic         fb_en,
  input  logic         din,
  output logic [W-1:0] crc,
  output logic [W-1:0] crc_nxt,
  output logic         dout
);

  logic [W-1:0] base;
  logic         fb;

  always_comb begin
    base    = init ? '0 : crc;
    fb      = fb_en & (base[W-1] ^ din);
    crc_nxt = {base[W-2:0], 1'b0} ^ (fb ? POLY : '0);
  end

  always_ff @(posedge clk) begin
    if (rst)       crc <= '0;
    else if (en)   crc <= crc_nxt;
    else if (init) crc <= '0;
  end

  assign dout = crc[W-1];

endmodule
