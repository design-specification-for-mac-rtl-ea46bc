// crc_table: storage array of the table-driven CRC unit.
//
// 2^NB words of W bits, one per value of the NB bits shifted out of the CRC
// register. One synchronous write port (from the table generator) and one
// asynchronous read port (the lookup in the main loop, used in the same clock as
// the register update). The contents are not reset: the controller never reads the
// table before the generator has filled it. The specification asks for a
// byte-addressable array; here each address holds a whole W-bit entry.
module crc_table #(
  parameter int unsigned W  = crc_pkg::CRC_W,
  parameter int unsigned NB = crc_pkg::NIB_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [NB-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [NB-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**NB];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
