// crc_mac_top: CRC-32 sub-layer of an IEEE 802.11 MAC, transmit and receive.
//
// Transmit: fcs_append takes the partial frame (header and body) bit-serially and
// emits the complete frame with its 32-bit FCS appended, using the bit-serial LFSR.
//
// Receive, serial: crc_serial_check divides a complete received frame, bit by bit,
// by the generator and reports whether the remainder is zero.
//
// Receive, parallel: frames arrive on the 4-bit transceiver bus (rx_data, one nibble
// per clock while rx_valid is high). rx_is_fcs marks the eight nibbles of the FCS;
// separating them from header and body is the frame decoder's job and is an input
// here. The table-driven unit crc_parallel sees the nibbles:
//   rx_gen_mode = 1: it gets only header and body and computes their CRC. The FCS
//   nibbles go through the 16-bit serial-to-parallel shifter to the CRC decoder,
//   which rebuilds the received FCS from two 16-bit words (crc_out) and compares it
//   with the computed CRC: frame_enable = 1 means no error was detected.
//   rx_gen_mode = 0: it gets the whole frame, FCS included, and par_frame_ok reports
//   whether the remainder is zero. The decoder still rebuilds crc_out.
// The polynomial of the parallel unit can be replaced at run time (poly_load,
// poly_in); the unit then rebuilds its table. The frame decoder ("control logic")
// that consumes crc_out and frame_enable is outside this design.
// Every block uses the synchronous active-high reset rst.
module crc_mac_top #(
  parameter int unsigned   W       = crc_pkg::CRC_W,
  parameter logic [W-1:0]  POLY    = W'(crc_pkg::CRC32_POLY),
  parameter int unsigned   NB      = crc_pkg::NIB_W,
  parameter int unsigned   SHIFT_W = crc_pkg::SHIFT_W
) (
  input  logic          clk,
  input  logic          rst,
  // transmitter: partial frame in, complete frame out (bit-serial)
  input  logic          tx_in_valid,
  input  logic          tx_in_data,
  input  logic          tx_in_last,
  output logic          tx_in_ready,
  output logic          tx_out_valid,
  output logic          tx_out_data,
  output logic          tx_out_last,
  output logic          tx_out_fcs,
  // serial receive check
  input  logic          srx_valid,
  input  logic          srx_data,
  input  logic          srx_last,
  output logic          srx_done,
  output logic          srx_ok,
  output logic [W-1:0]  srx_remainder,
  // parallel receive path
  input  logic          poly_load,
  input  logic [W-1:0]  poly_in,
  input  logic          rx_gen_mode,
  input  logic          rx_valid,
  input  logic [NB-1:0] rx_data,
  input  logic          rx_is_fcs,
  output logic          table_ready,
  output crc_pkg::par_state_e par_state,
  output logic          par_done,
  output logic [W-1:0]  par_crc,
  output logic          par_crc_valid,
  output logic          par_frame_ok,
  output logic [W-1:0]  crc_out,
  output logic          crc_out_valid,
  output logic          frame_enable,
  output logic          check_done
);

  logic               par_en;
  logic               fcs_valid;
  logic [SHIFT_W-1:0] crc_shift;
  logic               crc_enable;

  fcs_append #(.W(W), .POLY(POLY)) u_fcs (
    .clk, .rst,
    .in_valid  (tx_in_valid),
    .in_data   (tx_in_data),
    .in_last   (tx_in_last),
    .in_ready  (tx_in_ready),
    .out_valid (tx_out_valid),
    .out_data  (tx_out_data),
    .out_last  (tx_out_last),
    .out_fcs   (tx_out_fcs)
  );

  crc_serial_check #(.W(W), .POLY(POLY)) u_srx (
    .clk, .rst,
    .in_valid  (srx_valid),
    .in_data   (srx_data),
    .in_last   (srx_last),
    .done      (srx_done),
    .ok        (srx_ok),
    .remainder (srx_remainder)
  );

  assign par_en    = rx_valid && (!rx_is_fcs || !rx_gen_mode);
  assign fcs_valid = rx_valid && rx_is_fcs;

  crc_parallel #(.W(W), .POLY(POLY), .NB(NB)) u_par (
    .clk, .rst,
    .poly_load,
    .poly_in,
    .gen_mode    (rx_gen_mode),
    .en          (par_en),
    .din         (rx_data),
    .table_ready,
    .state       (par_state),
    .done        (par_done),
    .crc_out     (par_crc),
    .crc_valid   (par_crc_valid),
    .frame_ok    (par_frame_ok)
  );

  s2p_shift #(.IN_W(NB), .OUT_W(SHIFT_W)) u_s2p (
    .clk, .rst,
    .in_valid  (fcs_valid),
    .din       (rx_data),
    .out_valid (crc_enable),
    .dout      (crc_shift)
  );

  crc_decoder #(.SHIFT_W(SHIFT_W), .W(W)) u_dec (
    .clk, .rst,
    .crc_shift,
    .crc_enable,
    .crc_calc       (par_crc),
    .crc_calc_valid (par_crc_valid),
    .crc_out,
    .crc_out_valid,
    .frame_enable,
    .check_done
  );

endmodule
