// fcs_append: the transmitter's Frame Check Sequence block.
//
// It takes the partial frame (MAC header and body) as a bit stream, MSB first, and
// emits the complete frame: the same bits followed by the W-bit CRC computed over
// them. The CRC is built in a crc_serial_lfsr while the frame passes through; after
// the last frame bit the register holds the CRC and is shifted out with feedback
// switched off, which takes W clocks and leaves the register at zero for the next
// frame.
//
// Interface: in_valid/in_data/in_last carry the partial frame, in_ready is low
// while the FCS is being sent. out_valid/out_data/out_last carry the complete
// frame one clock later; out_fcs marks the appended CRC bits. The output has no
// back-pressure. Frame framing by valid/last strobes and the bit-serial stream are
// this design's choices; the specification gives only Partial_Frame in,
// Complete_Frame out, Clock and Reset. Synchronous active-high reset.
module fcs_append #(
  parameter int unsigned   W    = crc_pkg::CRC_W,
  parameter logic [W-1:0]  POLY = W'(crc_pkg::CRC32_POLY)
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_data,
  input  logic in_last,
  output logic in_ready,
  output logic out_valid,
  output logic out_data,
  output logic out_last,
  output logic out_fcs
);

  localparam int unsigned CW = $clog2(W);

  logic          sending;    // FCS phase
  logic [CW-1:0] fcs_cnt;
  logic          lfsr_en;
  logic          crc_msb;

  assign in_ready = ~sending;
  assign lfsr_en  = sending | (in_valid & in_ready);

  crc_serial_lfsr #(.W(W), .POLY(POLY)) u_lfsr (
    .clk, .rst,
    .en     (lfsr_en),
    .init   (1'b0),
    .fb_en  (~sending),
    .din    (in_data),
    .crc    (),
    .crc_nxt(),
    .dout   (crc_msb)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sending   <= 1'b0;
      fcs_cnt   <= '0;
      out_valid <= 1'b0;
      out_data  <= 1'b0;
      out_last  <= 1'b0;
      out_fcs   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_fcs   <= 1'b0;
      if (sending) begin
        out_valid <= 1'b1;
        out_data  <= crc_msb;
        out_fcs   <= 1'b1;
        fcs_cnt   <= fcs_cnt + 1'b1;
        if (fcs_cnt == CW'(W - 1)) begin
          out_last <= 1'b1;
          sending  <= 1'b0;
          fcs_cnt  <= '0;
        end
      end else if (in_valid) begin
        out_valid <= 1'b1;
        out_data  <= in_data;
        if (in_last) sending <= 1'b1;
      end
    end
  end

endmodule
