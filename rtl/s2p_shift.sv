// s2p_shift: serial-to-parallel shift register of the receiver.
//
// Collects OUT_W/IN_W consecutive IN_W-bit input words, first word in the most
// significant position, and presents them as one OUT_W-bit word (CRC_shift for the
// CRC decoder). With the defaults it turns four 4-bit bus transfers into one 16-bit
// word. out_valid pulses for one clock, the clock after the last input word, and
// dout holds the word until the next one is complete. The word boundary is counted
// from reset; it is a property of the stream and not realigned. The 16-bit output
// width is the specification's; the 4-bit input is the transceiver bus width it
// names. Synchronous active-high reset.
module s2p_shift #(
  parameter int unsigned IN_W  = crc_pkg::NIB_W,
  parameter int unsigned OUT_W = crc_pkg::SHIFT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  din,
  output logic             out_valid,
  output logic [OUT_W-1:0] dout
);

  localparam int unsigned N  = OUT_W / IN_W;
  localparam int unsigned CW = $clog2(N);

  logic [OUT_W-IN_W-1:0] sr;      // the words received so far
  logic [OUT_W-1:0]      sr_nxt;
  logic [CW-1:0]         cnt;

  assign sr_nxt = {sr, din};

  always_ff @(posedge clk) begin
    if (rst) begin
      sr        <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        sr <= sr_nxt[OUT_W-IN_W-1:0];
        if (cnt == CW'(N - 1)) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          dout      <= sr_nxt;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  initial assert (OUT_W % IN_W == 0 && N >= 2)
    else $error("OUT_W must be at least two IN_W words");

endmodule
