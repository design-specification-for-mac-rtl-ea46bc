// crc_pkg: constants and types shared by the CRC-32 blocks of the MAC sub-layer.
//
// CRC_W and CRC32_POLY describe the generator G(x) of degree 32. The polynomial is
// the standard IEEE 802.3 CRC-32 (x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7
// +x^5+x^4+x^2+x+1), written MSB-first without the x^32 term. NIB_W is the number of
// message bits the table-driven unit consumes per clock (the 4-bit transceiver bus),
// SHIFT_W the width of the receive serial-to-parallel shifter that feeds the CRC
// decoder. par_state_e enumerates the states of the parallel unit's controller.
package crc_pkg;

  localparam int unsigned CRC_W      = 32;
  localparam logic [31:0] CRC32_POLY = 32'h04C1_1DB7;
  localparam int unsigned NIB_W      = 4;
  localparam int unsigned SHIFT_W    = 16;

  // Controller states. ST_APPEND (appending the W zero bits of the augmented
  // message when sending) is this design's addition to the five named states.
  typedef enum logic [2:0] {
    ST_CLEARED   = 3'd0,
    ST_TABLE_GEN = 3'd1,
    ST_IDLE_0    = 3'd2,
    ST_IDLE_1    = 3'd3,
    ST_MAIN      = 3'd4,
    ST_APPEND    = 3'd5
  } par_state_e;

endpackage
