// tb_crc_parallel_ctrl: checks the controller of the parallel CRC unit against the
// state diagram. A behavioural table generator in the testbench is busy for 80
// clocks after each start. Checked: Cleared while Reset = 1; Table Generation after
// it; Idle_1 when En = 1 as the table completes and Idle_0 once En = 0; a sending
// frame (Main, then 8 zero steps in Append ending with latch_crc); a receiving
// frame (latch_chk in the clock En falls, no zero steps); a new polynomial in Main
// (back to Table Generation, C = 0) and during generation (generation restarts);
// C = 0 in Idle_0 with En = 1 (Idle_1) and with En = 0 (Table Generation); Reset
// from Main. Engine controls are compared with the expected values each clock.
module tb_crc_parallel_ctrl;
  import crc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (state %s)", what, state.name());
    end
  endtask

  logic       en, gen_mode, poly_load, tgen_busy, tgen_done;
  logic       c, tgen_start, eng_clr, eng_step, eng_zero, frame_start, latch_crc, latch_chk;
  par_state_e state;

  crc_parallel_ctrl dut (.clk, .rst, .en, .gen_mode, .poly_load, .tgen_busy, .tgen_done,
                         .c, .state, .tgen_start, .eng_clr, .eng_step, .eng_zero,
                         .frame_start, .latch_crc, .latch_chk);

  // behavioural table generator: 80 clocks, done in the clock after it ends
  int tg_cnt = 0;
  int starts = 0;
  always_ff @(posedge clk) begin
    if (rst) begin
      tgen_busy <= 0; tgen_done <= 0; tg_cnt <= 0;
    end else begin
      tgen_done <= 0;
      if (!tgen_busy && tgen_start) begin
        tgen_busy <= 1; tg_cnt <= 0; starts <= starts + 1;
      end else if (tgen_busy) begin
        tg_cnt <= tg_cnt + 1;
        if (tg_cnt == 79) begin tgen_busy <= 0; tgen_done <= 1; end
      end
    end
  end

  // count engine activity
  int zero_steps = 0, data_steps = 0, n_latch_crc = 0, n_latch_chk = 0;
  always_ff @(posedge clk) if (!rst) begin
    if (eng_step && eng_zero)  zero_steps  <= zero_steps + 1;
    if (eng_step && !eng_zero) data_steps  <= data_steps + 1;
    if (latch_crc) n_latch_crc <= n_latch_crc + 1;
    if (latch_chk) n_latch_chk <= n_latch_chk + 1;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_state(input par_state_e s, input int limit, input string what);
    int n = 0;
    while (state != s && n < limit) begin @(negedge clk); n++; end
    check(state == s, what);
  endtask

  task automatic frame(input bit mode, input int len);
    int z0, d0, lc, lk;
    z0 = zero_steps; d0 = data_steps; lc = n_latch_crc; lk = n_latch_chk;
    check(state == ST_IDLE_0 && c, "idle with a table before a frame");
    en = 1; gen_mode = mode;
    #1;
    check(frame_start && eng_step && eng_clr, "first nibble starts a new message");
    @(negedge clk);
    gen_mode = !mode;   // sampled only at the start
    for (int i = 1; i < len; i++) begin
      check(state == ST_MAIN && eng_step && !eng_zero, "Main steps while En = 1");
      @(negedge clk);
    end
    en = 0;
    #1;
    if (mode) begin
      check(eng_step && eng_zero && !latch_chk, "first zero step as En falls");
      @(negedge clk);
      for (int z = 1; z < 8; z++) begin
        check(state == ST_APPEND && eng_step && eng_zero, "Append feeds zeros");
        check(latch_crc == (z == 7), "latch_crc on the last zero step");
        @(negedge clk);
      end
      check(zero_steps - z0 == 8, $sformatf("%0d zero steps, expected 8", zero_steps - z0));
      check(n_latch_crc - lc == 1 && n_latch_chk == lk, "one checksum latched");
    end else begin
      check(latch_chk && !eng_step, "receiving frame ends with latch_chk");
      @(negedge clk);
      check(zero_steps == z0, "no zeros appended when receiving");
      check(n_latch_chk - lk == 1 && n_latch_crc == lc, "one check latched");
    end
    check(data_steps - d0 == len, $sformatf("%0d data steps, expected %0d", data_steps - d0, len));
    check(state == ST_IDLE_0, "back to Idle_0");
  endtask

  initial begin
    int s0;
    en = 0; gen_mode = 0; poly_load = 0;
    repeat (4) begin
      @(negedge clk);
      check(state == ST_CLEARED && !c, "Cleared while Reset = 1");
    end
    rst = 0;
    #1;
    check(tgen_start, "table generation requested out of Cleared");
    @(negedge clk);
    check(state == ST_TABLE_GEN, "Table Generation after Cleared");
    en = 1;        // a frame is already running when the table completes
    wait_state(ST_IDLE_1, 100, "Idle_1 when En = 1 at table completion");
    check(c, "C = 1 after table generation");
    repeat (3) begin @(negedge clk); check(state == ST_IDLE_1 && eng_clr, "stays in Idle_1 while En = 1"); end
    en = 0;
    @(negedge clk);
    check(state == ST_IDLE_0, "Idle_0 once En = 0");
    @(negedge clk);

    frame(1, 5);
    frame(0, 9);
    frame(1, 1);
    // back to back: sending frame, next frame right after Append
    frame(1, 3);
    frame(0, 2);

    // new polynomial in Main
    en = 1; gen_mode = 1;
    @(negedge clk);
    @(negedge clk);
    poly_load = 1;
    @(negedge clk);
    poly_load = 0;
    check(!c, "C = 0 after poly_load");
    #1;
    check(tgen_start, "Main with C = 0 restarts generation");
    @(negedge clk);
    check(state == ST_TABLE_GEN, "Table Generation after C = 0 in Main");
    en = 0;
    // new polynomial during generation: generation runs again
    s0 = starts;
    repeat (10) @(negedge clk);
    poly_load = 1;
    @(negedge clk);
    poly_load = 0;
    repeat (75) @(negedge clk);
    check(state == ST_TABLE_GEN && !c, "still generating after a reload");
    wait_state(ST_IDLE_0, 200, "Idle_0 after the second generation");
    check(starts - s0 == 1 && c, "generation restarted once for the new polynomial");

    // C = 0 in Idle_0: with En = 1 go to Idle_1, then regenerate from Idle_0
    poly_load = 1;
    @(negedge clk);
    poly_load = 0;
    en = 1;
    @(negedge clk);
    check(state == ST_IDLE_1, "Idle_0 with C = 0 and En = 1 goes to Idle_1");
    en = 0;
    @(negedge clk);
    check(state == ST_IDLE_0, "Idle_1 to Idle_0");
    @(negedge clk);
    check(state == ST_TABLE_GEN, "Idle_0 with C = 0 and En = 0 regenerates");
    wait_state(ST_IDLE_0, 200, "Idle_0 after regeneration");
    frame(0, 4);

    // reset in Main
    en = 1;
    @(negedge clk);
    @(negedge clk);
    rst = 1;
    @(negedge clk);
    check(state == ST_CLEARED && !c, "Reset = 1 sends Main to Cleared");
    en = 0;
    rst = 0;
    wait_state(ST_IDLE_0, 200, "table rebuilt after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
