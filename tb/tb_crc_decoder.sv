// tb_crc_decoder: checks the receive CRC decoder. For each frame two 16-bit words
// arrive (upper half first, a random number of idle clocks apart); crc_out must be
// their concatenation one clock after the second word. The computed CRC arrives
// before, together with or after the words; frame_enable must be 1 exactly when the
// two are equal, with check_done once per frame, and must hold between frames.
module tb_crc_decoder;
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

  logic [15:0] crc_shift;
  logic        crc_enable, crc_calc_valid, crc_out_valid, frame_enable, check_done;
  logic [31:0] crc_calc, crc_out;

  crc_decoder dut (.clk, .rst, .crc_shift, .crc_enable, .crc_calc, .crc_calc_valid,
                   .crc_out, .crc_out_valid, .frame_enable, .check_done);

  int dones = 0;
  always @(posedge clk) if (!rst && check_done) dones++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    crc_shift = 0; crc_enable = 0; crc_calc = 0; crc_calc_valid = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 60; t++) begin
      logic [31:0] rx, calc;
      bit good;
      int order, d0;
      d0 = dones;
      rx = $urandom;
      good = (t % 3 != 2);
      calc = good ? rx : rx ^ (32'd1 << $urandom_range(0, 31));
      order = t % 3;                 // 0: calc first, 1: with the words, 2: after
      @(negedge clk);
      crc_calc_valid = 0;
      if (order == 0) begin crc_calc = calc; crc_calc_valid = 1; end
      @(negedge clk);
      crc_shift = rx[31:16]; crc_enable = 1;
      @(negedge clk);
      crc_enable = 0; crc_shift = '1;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      crc_shift = rx[15:0]; crc_enable = 1;
      if (order == 1) begin crc_calc = calc; crc_calc_valid = 1; end
      @(negedge clk);
      crc_enable = 0;
      check(crc_out_valid && crc_out == rx, $sformatf("frame %0d crc_out %h, expected %h", t, crc_out, rx));
      if (order == 2) begin
        repeat (3) @(negedge clk);
        check(dones == d0, "no comparison before crc_calc is valid");
        crc_calc = calc; crc_calc_valid = 1;
      end
      repeat (2) @(negedge clk);
      check(dones - d0 == 1, $sformatf("frame %0d: %0d comparisons", t, dones - d0));
      check(frame_enable == good, $sformatf("frame %0d: frame_enable %b, expected %b", t, frame_enable, good));
      repeat (2) @(negedge clk);
      check(frame_enable == good, "frame_enable holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
