// crc_nibble_engine: CRC register of the table-driven unit, NB bits per clock.
//
// Each step implements the augmented-message table algorithm:
//   top      = the NB most significant register bits
//   register = (register << NB) | next NB message bits
//   register = register XOR table[top]
// After a message M followed by W zero bits the register holds
// Remainder(M(x)*x^W / G(x)), the checksum to send. After a received frame with its
// FCS it holds the remainder of the frame, zero when no error is detected.
//
// Interface: tbl_idx drives the table's read address and tbl_val returns the entry
// in the same clock. step clocks din in (the controller puts zeros on din while
// appending). clr empties the register; clr together with step starts a new
// message with din as its first bits (the register is taken as zero, and
// table[0] is zero). crc_nxt is the value the next step produces, is_zero tells
// whether the register is zero.
// Synchronous active-high reset.
module crc_nibble_engine #(
  parameter int unsigned W  = crc_pkg::CRC_W,
  parameter int unsigned NB = crc_pkg::NIB_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clr,
  input  logic          step,
  input  logic [NB-1:0] din,
  output logic [NB-1:0] tbl_idx,
  input  logic [W-1:0]  tbl_val,
  output logic [W-1:0]  crc,
  output logic [W-1:0]  crc_nxt,
  output logic          is_zero
);

  logic [W-1:0] base;

  assign base    = clr ? '0 : crc;
  assign tbl_idx = base[W-1 -: NB];
  assign crc_nxt = {base[W-NB-1:0], din} ^ tbl_val;
  assign is_zero = (crc == '0);

  always_ff @(posedge clk) begin
    if (rst)       crc <= '0;
    else if (step) crc <= crc_nxt;
    else if (clr)  crc <= '0;
  end

endmodule
