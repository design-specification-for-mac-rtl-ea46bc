// crc_decoder: receive-side CRC decoder with its CRC buffer.
//
// The received 32-bit FCS arrives as two 16-bit words on crc_shift, each marked by
// crc_enable. The first word is kept in a 16-bit buffer; when the second arrives the
// two are joined (first word in the upper half) into crc_out, one clock later, so
// the whole FCS is available after two words. crc_out is then compared with the
// CRC computed locally over the received header and body (crc_calc, valid while
// crc_calc_valid is high): frame_enable goes high if they are equal and low if not,
// and check_done pulses. If crc_calc is not valid yet the comparison waits for it.
// frame_enable holds its value until the next comparison.
// The buffer, the two-word assembly, the outputs and their meaning are the
// specification's; the crc_calc inputs, the word order and the wait for a late
// crc_calc are this design's choices. Synchronous active-high reset.
module crc_decoder #(
  parameter int unsigned SHIFT_W = crc_pkg::SHIFT_W,
  parameter int unsigned W       = 2 * SHIFT_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [SHIFT_W-1:0] crc_shift,
  input  logic               crc_enable,
  input  logic [W-1:0]       crc_calc,
  input  logic               crc_calc_valid,
  output logic [W-1:0]       crc_out,
  output logic               crc_out_valid,
  output logic               frame_enable,
  output logic               check_done
);

  logic [SHIFT_W-1:0] buffer;
  logic               half;     // first word is in the buffer
  logic               pending;  // crc_out assembled, not yet compared

  always_ff @(posedge clk) begin
    if (rst) begin
      buffer        <= '0;
      half          <= 1'b0;
      pending       <= 1'b0;
      crc_out       <= '0;
      crc_out_valid <= 1'b0;
      frame_enable  <= 1'b0;
      check_done    <= 1'b0;
    end else begin
      check_done <= 1'b0;
      if (pending && crc_calc_valid) begin
        frame_enable <= (crc_out == crc_calc);
        check_done   <= 1'b1;
        pending      <= 1'b0;
      end
      if (crc_enable) begin
        if (!half) begin
          buffer        <= crc_shift;
          half          <= 1'b1;
          crc_out_valid <= 1'b0;
        end else begin
          crc_out       <= {buffer, crc_shift};
          crc_out_valid <= 1'b1;
          half          <= 1'b0;
          pending       <= 1'b1;
        end
      end
    end
  end

  initial assert (W == 2 * SHIFT_W) else $error("the CRC is assembled from two words");

endmodule
