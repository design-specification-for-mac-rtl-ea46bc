// tb_crc_mac_top: end-to-end test of the CRC sub-layer at its default parameters.
//
// Frames of the sizes the design targets are built from random bytes: RTS (16 bytes
// of header before the FCS, 20 in all), CTS and ACK (10 + 4), data frames with the
// 30-byte four-address header and a 128-byte and a 2048-byte body, and the largest
// body, 2312 bytes. Each frame goes through the transmitter, and the complete frame
// it returns (checked against long division) is then
//   - divided again by the serial checker (srx_ok),
//   - received over the 4-bit bus in sending mode: CRC of header and body in the
//     table-driven unit, FCS through the 16-bit shifter into the decoder
//     (frame_enable, crc_out = the FCS),
//   - received in receiving mode: whole frame through the table-driven unit
//     (par_frame_ok).
// Every frame is also received with one to three flipped bits, which all three
// checks must flag. Then a new polynomial is loaded in the middle of a long frame
// (Main Algorithm back to Table Generation, the frame is dropped, Idle_1 while it
// ends), CRC-32C frames are checked, and CRC-32 is loaded again. Each mechanism is
// counted and must have happened; the transmitter's FCS phase must last 32 clocks.
module tb_crc_mac_top;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [31:0] CRC32  = 32'h04C1_1DB7;
  localparam logic [31:0] CRC32C = 32'h1EDC_6F41;

  logic        tx_in_valid, tx_in_data, tx_in_last, tx_in_ready;
  logic        tx_out_valid, tx_out_data, tx_out_last, tx_out_fcs;
  logic        srx_valid, srx_data, srx_last, srx_done, srx_ok;
  logic [31:0] srx_remainder;
  logic        poly_load, rx_gen_mode, rx_valid, rx_is_fcs;
  logic [31:0] poly_in;
  logic [3:0]  rx_data;
  logic        table_ready, par_done, par_crc_valid, par_frame_ok;
  logic [31:0] par_crc, crc_out;
  logic        crc_out_valid, frame_enable, check_done;
  par_state_e  par_state;

  crc_mac_top dut (.*);

  // ---------------------------------------------------------------- monitors
  bitq_t txq;
  int    tx_fcs_bits = 0, tx_frames = 0;
  int    n_tablegen = 0, n_idle1 = 0, n_append = 0, n_main_to_tg = 0;
  int    n_srx = 0, n_par = 0, n_chk = 0;
  par_state_e prev_state = ST_CLEARED;

  always @(posedge clk) begin
    if (!rst) begin
      if (tx_out_valid) begin
        txq.push_back(tx_out_data);
        if (tx_out_fcs) tx_fcs_bits++;
        if (tx_out_last) tx_frames++;
      end
      if (par_state != prev_state) begin
        if (par_state == ST_TABLE_GEN) n_tablegen++;
        if (par_state == ST_IDLE_1)    n_idle1++;
        if (par_state == ST_APPEND)    n_append++;
        if (prev_state == ST_MAIN && par_state == ST_TABLE_GEN) n_main_to_tg++;
      end
      prev_state <= par_state;
      if (srx_done)   n_srx++;
      if (par_done)   n_par++;
      if (check_done) n_chk++;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- drivers
  task automatic tx_frame(input bitq_t msg, output bitq_t full);
    int f0 = tx_frames, b0 = tx_fcs_bits;
    txq.delete();
    foreach (msg[i]) begin
      @(negedge clk);
      while (!tx_in_ready) @(negedge clk);
      tx_in_valid = 1; tx_in_data = msg[i]; tx_in_last = (i == msg.size() - 1);
    end
    @(negedge clk);
    tx_in_valid = 0; tx_in_last = 0;
    while (tx_frames == f0) @(negedge clk);
    check(tx_fcs_bits - b0 == 32, "FCS phase of 32 clocks");
    full = txq;
  endtask

  task automatic srx_frame(input bitq_t f, output bit ok);
    foreach (f[i]) begin
      @(negedge clk);
      srx_valid = 1; srx_data = f[i]; srx_last = (i == f.size() - 1);
    end
    @(negedge clk);
    srx_valid = 0; srx_last = 0;
    check(srx_done, "serial check result one clock after the frame");
    ok = srx_ok;
  endtask

  // nibbles over the 4-bit bus; in sending mode the last 8 are marked as FCS
  task automatic prx_drive(input bitq_t f, input bit gen);
    for (int i = 0; i < f.size(); i += 4) begin
      @(negedge clk);
      rx_valid = 1; rx_gen_mode = gen;
      rx_is_fcs = (i >= f.size() - 32);
      rx_data = {f[i], f[i+1], f[i+2], f[i+3]};
    end
    @(negedge clk);
    rx_valid = 0; rx_is_fcs = 0;
  endtask

  task automatic prx_gen(input bitq_t f, output bit ok);
    int n0 = n_chk, w = 0;
    prx_drive(f, 1);
    while (n_chk == n0 && w < 20) begin @(negedge clk); w++; end
    check(n_chk == n0 + 1, "decoder compared once");
    ok = frame_enable;
  endtask

  task automatic prx_chk(input bitq_t f, output bit ok);
    prx_drive(f, 0);
    @(negedge clk);
    check(par_done, "receive result one clock after the bus goes idle");
    ok = par_frame_ok;
  endtask

  function automatic bitq_t corrupt(input bitq_t f);
    bitq_t g = f;
    int ne = int'($urandom_range(1, 3));
    int pos[$];
    // distinct positions, so the frame really changes
    while (pos.size() < ne) begin
      int p;
      p = int'($urandom_range(0, g.size() - 1));
      if (!(p inside {pos})) pos.push_back(p);
    end
    foreach (pos[e]) g[pos[e]] = ~g[pos[e]];
    return g;
  endfunction

  task automatic wait_table();
    int n = 0;
    while (!table_ready && n < 400) begin @(negedge clk); n++; end
    check(table_ready, "table ready");
    @(negedge clk);
  endtask

  // ---------------------------------------------------------------- test
  int sizes[$] = '{16, 10, 10, 30 + 128, 30 + 2048, 30 + 2312};
  string names[$] = '{"RTS", "CTS", "ACK", "Data2", "Data1", "max body"};
  int n_ok_srx = 0, n_ok_gen = 0, n_ok_chk = 0, n_err_srx = 0, n_err_gen = 0, n_err_chk = 0;

  initial begin
    bitq_t msg, full, bad;
    bit ok;
    logic [31:0] fcs;
    byte unsigned bytes[$];
    tx_in_valid = 0; tx_in_data = 0; tx_in_last = 0;
    srx_valid = 0; srx_data = 0; srx_last = 0;
    poly_load = 0; poly_in = 0; rx_gen_mode = 0; rx_valid = 0; rx_is_fcs = 0; rx_data = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    wait_table();

    foreach (sizes[k]) begin
      bytes.delete();
      for (int b = 0; b < sizes[k]; b++) bytes.push_back(8'($urandom));
      msg = bytes_to_bits(bytes);
      tx_frame(msg, full);
      check(full == with_crc(msg, 32, CRC32), $sformatf("%s: complete frame", names[k]));
      fcs = crc_aug(msg, 32, CRC32);

      srx_frame(full, ok);
      check(ok, $sformatf("%s: serial check passes", names[k])); n_ok_srx += ok;
      prx_gen(full, ok);
      check(ok, $sformatf("%s: decoder frame_enable", names[k])); n_ok_gen += ok;
      check(crc_out == fcs && crc_out_valid, $sformatf("%s: crc_out %h, FCS %h", names[k], crc_out, fcs));
      check(par_crc == fcs, $sformatf("%s: CRC computed on the 4-bit bus", names[k]));
      prx_chk(full, ok);
      check(ok, $sformatf("%s: remainder zero", names[k])); n_ok_chk += ok;

      bad = corrupt(full);
      srx_frame(bad, ok);
      check(!ok, $sformatf("%s: serial check flags the error", names[k])); n_err_srx += !ok;
      prx_gen(bad, ok);
      check(!ok, $sformatf("%s: decoder flags the error", names[k])); n_err_gen += !ok;
      bad = corrupt(full);
      prx_chk(bad, ok);
      check(!ok, $sformatf("%s: remainder nonzero", names[k])); n_err_chk += !ok;
    end

    // new polynomial in the middle of a long frame
    bytes.delete();
    for (int b = 0; b < 200; b++) bytes.push_back(8'($urandom));
    msg = with_crc(bytes_to_bits(bytes), 32, CRC32);
    fork
      prx_drive(msg, 1);
      begin
        repeat (40) @(negedge clk);
        check(par_state == ST_MAIN, "long frame in Main Algorithm");
        poly_in = CRC32C; poly_load = 1;
        @(negedge clk);
        poly_load = 0;
      end
    join
    wait_table();
    for (int t = 0; t < 4; t++) begin
      bytes.delete();
      for (int b = 0; b < 30 + 8 * t; b++) bytes.push_back(8'($urandom));
      msg = with_crc(bytes_to_bits(bytes), 32, CRC32C);
      if (t % 2 == 1) msg = corrupt(msg);
      prx_gen(msg, ok);
      check(ok == (t % 2 == 0), $sformatf("CRC-32C frame %0d via decoder", t));
      prx_chk(msg, ok);
      check(ok == (t % 2 == 0), $sformatf("CRC-32C frame %0d remainder", t));
    end
    poly_in = CRC32; poly_load = 1;
    @(negedge clk);
    poly_load = 0;
    wait_table();
    msg = with_crc(bytes_to_bits(bytes), 32, CRC32);
    prx_gen(msg, ok);
    check(ok, "CRC-32 again after reloading");

    // every mechanism must have happened
    check(tx_frames == sizes.size(), $sformatf("FCS appended to %0d frames", tx_frames));
    check(n_tablegen >= 3, $sformatf("table generation %0d times", n_tablegen));
    check(n_idle1 >= 1, $sformatf("Idle_1 %0d times", n_idle1));
    check(n_append >= 1, $sformatf("zero append %0d times", n_append));
    check(n_main_to_tg >= 1, $sformatf("Main to Table Generation %0d times", n_main_to_tg));
    check(n_ok_srx > 0 && n_err_srx > 0, "serial check passed and flagged frames");
    check(n_ok_gen > 0 && n_err_gen > 0, "decoder passed and flagged frames");
    check(n_ok_chk > 0 && n_err_chk > 0, "remainder check passed and flagged frames");
    $display("mechanisms: fcs %0d, tablegen %0d, idle_1 %0d, append %0d, main->tablegen %0d",
             tx_frames, n_tablegen, n_idle1, n_append, n_main_to_tg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
