// crc_parallel: table-driven CRC unit processing NB (= 4) message bits per clock.
//
// It has two modes of operation, as in the specification: table generation, in
// which crc_table_gen divides every NB-bit value by the polynomial and fills
// crc_table, and CRC processing, in which crc_nibble_engine runs the main loop,
// one table lookup per clock. crc_parallel_ctrl sequences the two. A frame is the
// run of clocks with en high once the unit is in Idle_0 with a complete table.
//   Sending (gen_mode = 1 at the frame's first clock): after the frame the unit
//   appends W zero bits (W/NB clocks, the first being the clock in which en is
//   first low) and delivers the checksum on crc_out with crc_valid in the clock
//   after the last of them: W/NB clocks (8 for CRC-32) after that first clock.
//   Receiving (gen_mode = 0): the frame includes its FCS; one clock after en falls,
//   frame_ok tells whether the remainder was zero and crc_out holds the remainder.
// done pulses with every result; crc_valid falls when the next frame starts or
// the table becomes invalid. Frames that begin while table_ready is low are
// ignored (the controller waits in Idle_1 for them to end).
// The polynomial is held in a register preset to POLY at reset and replaced by
// poly_in on poly_load, which makes the controller rebuild the table. table_ready is
// the controller's C flag. The register starts at zero for every frame (no preset,
// no final inversion). Synchronous active-high reset.
module crc_parallel
  import crc_pkg::*;
#(
  parameter int unsigned   W    = crc_pkg::CRC_W,
  parameter logic [W-1:0]  POLY = W'(crc_pkg::CRC32_POLY),
  parameter int unsigned   NB   = crc_pkg::NIB_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          poly_load,
  input  logic [W-1:0]  poly_in,
  input  logic          gen_mode,
  input  logic          en,
  input  logic [NB-1:0] din,
  output logic          table_ready,
  output par_state_e    state,
  output logic          done,
  output logic [W-1:0]  crc_out,
  output logic          crc_valid,
  output logic          frame_ok
);

  logic [W-1:0]  poly_q;
  logic          tgen_start, tgen_busy, tgen_done;
  logic          tbl_we;
  logic [NB-1:0] tbl_waddr, tbl_raddr;
  logic [W-1:0]  tbl_wdata, tbl_rdata;
  logic          eng_clr, eng_step, eng_zero;
  logic          frame_start, latch_crc, latch_chk;
  logic [W-1:0]  eng_crc, eng_crc_nxt;
  logic          eng_is_zero;

  always_ff @(posedge clk) begin
    if (rst)            poly_q <= POLY;
    else if (poly_load) poly_q <= poly_in;
  end

  crc_parallel_ctrl #(.W(W), .NB(NB)) u_ctrl (
    .clk, .rst, .en, .gen_mode, .poly_load,
    .tgen_busy, .tgen_done,
    .c          (table_ready),
    .state,
    .tgen_start,
    .eng_clr, .eng_step, .eng_zero,
    .frame_start, .latch_crc, .latch_chk
  );

  crc_table_gen #(.W(W), .NB(NB)) u_tgen (
    .clk, .rst,
    .start (tgen_start),
    .poly  (poly_q),
    .busy  (tgen_busy),
    .done  (tgen_done),
    .we    (tbl_we),
    .waddr (tbl_waddr),
    .wdata (tbl_wdata)
  );

  crc_table #(.W(W), .NB(NB)) u_table (
    .clk,
    .we    (tbl_we),
    .waddr (tbl_waddr),
    .wdata (tbl_wdata),
    .raddr (tbl_raddr),
    .rdata (tbl_rdata)
  );

  crc_nibble_engine #(.W(W), .NB(NB)) u_engine (
    .clk, .rst,
    .clr     (eng_clr),
    .step    (eng_step),
    .din     (eng_zero ? '0 : din),
    .tbl_idx (tbl_raddr),
    .tbl_val (tbl_rdata),
    .crc     (eng_crc),
    .crc_nxt (eng_crc_nxt),
    .is_zero (eng_is_zero)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      done      <= 1'b0;
      crc_out   <= '0;
      crc_valid <= 1'b0;
      frame_ok  <= 1'b0;
    end else begin
      done <= latch_crc | latch_chk;
      if (frame_start || !table_ready) crc_valid <= 1'b0;
      if (latch_crc) begin
        crc_out   <= eng_crc_nxt;
        crc_valid <= 1'b1;
      end
      if (latch_chk) begin
        crc_out  <= eng_crc;
        frame_ok <= eng_is_zero;
      end
    end
  end

endmodule
