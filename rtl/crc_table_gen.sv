// crc_table_gen: builds the lookup table of the table-driven CRC unit.
//
// For every NB-bit index i (Counter_2, 2^NB values) it divides i(x)*x^W by the
// generator and writes the W-bit remainder to table[i]. The division is done bit
// by bit in a shift register: Counter_1 steps through NB division steps, each
// shifting the register one place left and XORing in the polynomial when the bit
// that leaves the register, XORed with the selected index bit (MSB first), is one;
// its extra step (NB+1 values in all) stores the register and moves to the next
// index. A full table therefore takes 2^NB * (NB+1) clocks: 80 for NB = 4.
//
// Interface: start (one clock, while idle) latches poly and begins; busy is high
// while running; we/waddr/wdata write one table entry; done pulses in the clock
// after the last write. Synchronous active-high reset.
module crc_table_gen #(
  parameter int unsigned W  = crc_pkg::CRC_W,
  parameter int unsigned NB = crc_pkg::NIB_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [W-1:0]  poly,
  output logic          busy,
  output logic          done,
  output logic          we,
  output logic [NB-1:0] waddr,
  output logic [W-1:0]  wdata
);

  localparam int unsigned C1W = $clog2(NB + 1);

  logic [W-1:0]   sr;
  logic [W-1:0]   poly_q;
  logic [C1W-1:0] cnt1;
  logic [NB-1:0]  cnt2;
  logic           sel_bit;
  logic           fb;

  // Index bit used by division step cnt1 (MSB first).
  always_comb begin
    sel_bit = 1'b0;
    for (int k = 0; k < NB; k++)
      if (cnt1 == C1W'(k)) sel_bit = cnt2[NB-1-k];
    fb = sr[W-1] ^ sel_bit;
  end

  assign we    = busy && (cnt1 == C1W'(NB));
  assign waddr = cnt2;
  assign wdata = sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      sr     <= '0;
      poly_q <= '0;
      cnt1   <= '0;
      cnt2   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          poly_q <= poly;
          sr     <= '0;
          cnt1   <= '0;
          cnt2   <= '0;
        end
      end else if (cnt1 != C1W'(NB)) begin
        sr   <= {sr[W-2:0], 1'b0} ^ (fb ? poly_q : '0);
        cnt1 <= cnt1 + 1'b1;
      end else begin
        sr   <= '0;
        cnt1 <= '0;
        cnt2 <= cnt2 + 1'b1;
        if (cnt2 == '1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
