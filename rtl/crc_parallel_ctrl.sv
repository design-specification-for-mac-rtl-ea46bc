// crc_parallel_ctrl: controller of the table-driven (parallel) CRC unit.
//
// States follow the error-detection state diagram of the specification:
//   Cleared        held while Reset = 1; with Reset = 0 and the table not complete
//                  (C = 0) it starts table generation.
//   Table Gen.     waits for the generator; when the table is complete (C = 1) it
//                  goes to Idle_0 if En = 0, or to Idle_1 if En = 1.
//   Idle_1         a frame was already running: wait for En = 0, then Idle_0.
//   Idle_0         C = 1 and En = 1 starts a frame in Main Algorithm; C = 0 and
//                  En = 1 goes to Idle_1.
//   Main Algorithm one table step per clock while C = 1 and En = 1; En = 0 ends the
//                  frame (back to Idle_0); C = 0 (new polynomial) goes back to
//                  Table Generation and abandons the frame.
// Choices of this design: Reset is synchronous and active high, and Reset = 1 sends
// every state to Cleared. C is the "table complete" flag; it is cleared by reset
// and by poly_load, and a load during generation restarts it. Idle_0 with C = 0
// and En = 0 regenerates the table. When a frame ends in sending mode the
// controller passes through an extra state, Append, that feeds the W zero bits of
// the augmented message (W/NB steps, the first of them in the clock that sees
// En = 0), so the next frame may start right after; latch_crc marks the last step.
// In receiving mode latch_chk marks the clock in which the register holds the
// frame's remainder. gen_mode is sampled when a frame starts.
module crc_parallel_ctrl
  import crc_pkg::*;
#(
  parameter int unsigned W  = crc_pkg::CRC_W,
  parameter int unsigned NB = crc_pkg::NIB_W
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       gen_mode,
  input  logic       poly_load,
  input  logic       tgen_busy,
  input  logic       tgen_done,
  output logic       c,
  output par_state_e state,
  output logic       tgen_start,
  output logic       eng_clr,
  output logic       eng_step,
  output logic       eng_zero,
  output logic       frame_start,
  output logic       latch_crc,
  output logic       latch_chk
);

  localparam int unsigned STEPS = W / NB;
  localparam int unsigned AW    = $clog2(STEPS);

  par_state_e    state_nxt;
  logic          mode_q;
  logic          reload;     // polynomial changed while the table was being built
  logic [AW-1:0] app_cnt;
  logic          table_done;

  assign table_done = tgen_done && !reload && !poly_load;

  always_comb begin
    state_nxt   = state;
    tgen_start  = 1'b0;
    eng_clr     = 1'b0;
    eng_step    = 1'b0;
    eng_zero    = 1'b0;
    frame_start = 1'b0;
    latch_crc   = 1'b0;
    latch_chk   = 1'b0;
    unique case (state)
      ST_CLEARED: begin
        eng_clr = 1'b1;
        if (!c) begin
          state_nxt  = ST_TABLE_GEN;
          tgen_start = 1'b1;
        end
      end
      ST_TABLE_GEN: begin
        eng_clr    = 1'b1;
        tgen_start = !tgen_busy && !table_done;
        if (table_done) state_nxt = en ? ST_IDLE_1 : ST_IDLE_0;
      end
      ST_IDLE_1: begin
        eng_clr = 1'b1;
        if (!en) state_nxt = ST_IDLE_0;
      end
      ST_IDLE_0: begin
        eng_clr = 1'b1;
        if (c && en) begin
          state_nxt   = ST_MAIN;
          eng_step    = 1'b1;
          frame_start = 1'b1;
        end else if (!c && en) begin
          state_nxt = ST_IDLE_1;
        end else if (!c) begin
          state_nxt  = ST_TABLE_GEN;
          tgen_start = 1'b1;
        end
      end
      ST_MAIN: begin
        if (!c) begin
          state_nxt  = ST_TABLE_GEN;
          tgen_start = 1'b1;
        end else if (en) begin
          eng_step = 1'b1;
        end else if (mode_q) begin
          eng_step  = 1'b1;
          eng_zero  = 1'b1;
          state_nxt = ST_APPEND;
        end else begin
          latch_chk = 1'b1;
          state_nxt = ST_IDLE_0;
        end
      end
      ST_APPEND: begin
        eng_step = 1'b1;
        eng_zero = 1'b1;
        if (app_cnt == AW'(STEPS - 1)) begin
          latch_crc = 1'b1;
          state_nxt = en ? ST_IDLE_1 : ST_IDLE_0;
        end
      end
      default: state_nxt = ST_CLEARED;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= ST_CLEARED;
      c       <= 1'b0;
      reload  <= 1'b0;
      mode_q  <= 1'b0;
      app_cnt <= '0;
    end else begin
      state <= state_nxt;
      if (poly_load) begin
        c      <= 1'b0;
        reload <= tgen_busy | tgen_start;
      end else if (tgen_done) begin
        if (reload) reload <= 1'b0;
        else        c      <= 1'b1;
      end
      if (frame_start) mode_q <= gen_mode;
      if (state == ST_MAIN && state_nxt == ST_APPEND) app_cnt <= AW'(1);
      else if (state == ST_APPEND)                   app_cnt <= app_cnt + 1'b1;
    end
  end

  // The append counter needs W to be a whole number of steps.
  initial assert (W % NB == 0 && STEPS >= 2)
    else $error("W must be a multiple of NB, with at least two steps");

endmodule
