// crc_serial_check: bit-serial CRC check of a received frame.
//
// The complete received frame T(x) (header, body and FCS, MSB first) is divided by
// the generator in a crc_serial_lfsr. The frame is free of detected errors when the
// remainder is zero. Because the LFSR folds the division by x^W into its taps it
// produces T(x)*x^W mod G(x), which is zero exactly when T(x) mod G(x) is zero.
//
// Interface: in_valid/in_data/in_last carry one frame bit per clock. One clock after
// the last bit, done pulses, ok tells whether the remainder was zero and remainder
// holds it until the next frame ends. The first bit after reset or after a last bit
// starts a new division. Synchronous active-high reset.
module crc_serial_check #(
  parameter int unsigned   W    = crc_pkg::CRC_W,
  parameter logic [W-1:0]  POLY = W'(crc_pkg::CRC32_POLY)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic         in_data,
  input  logic         in_last,
  output logic         done,
  output logic         ok,
  output logic [W-1:0] remainder
);

  logic         first;
  logic [W-1:0] crc_nxt;
  logic         unused_msb;

  crc_serial_lfsr #(.W(W), .POLY(POLY)) u_lfsr (
    .clk, .rst,
    .en     (in_valid),
    .init   (first),
    .fb_en  (1'b1),
    .din    (in_data),
    .crc    (),
    .crc_nxt(crc_nxt),
    .dout   (unused_msb)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      first     <= 1'b1;
      done      <= 1'b0;
      ok        <= 1'b0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        first <= in_last;
        if (in_last) begin
          done      <= 1'b1;
          ok        <= (crc_nxt == '0);
          remainder <= crc_nxt;
        end
      end
    end
  end

endmodule
