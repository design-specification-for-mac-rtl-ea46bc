// tb_s2p_shift: checks the serial-to-parallel shifter. Random 4-bit words, with
// random idle clocks between them, must come out as 16-bit words, first input in
// the top nibble, out_valid for one clock in the clock after every fourth input.
// A 1-bit-in instance must assemble 16 serial bits the same way.
module tb_s2p_shift;
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

  logic        in_valid, out_valid, v1, ov1, d1;
  logic [3:0]  din;
  logic [15:0] dout, dout1;

  s2p_shift dut (.clk, .rst, .in_valid, .din, .out_valid, .dout);
  s2p_shift #(.IN_W(1), .OUT_W(16)) dut1 (.clk, .rst, .in_valid(v1), .din(d1),
                                          .out_valid(ov1), .dout(dout1));

  logic [15:0] exp_w[$], exp_w1[$];
  int words = 0, words1 = 0, last_in = -5, last_in1 = -5, cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      logic [15:0] e;
      e = exp_w.pop_front();
      words++;
      check(dout == e, $sformatf("word %0d = %h, expected %h", words, dout, e));
      check(cyc == last_in + 1, "word one clock after its fourth nibble");
    end
    if (!rst && ov1) begin
      logic [15:0] e;
      e = exp_w1.pop_front();
      words1++;
      check(dout1 == e, $sformatf("serial word %0d = %h, expected %h", words1, dout1, e));
      check(cyc == last_in1 + 1, "serial word one clock after its 16th bit");
    end
    if (!rst && in_valid) last_in <= cyc;
    if (!rst && v1) last_in1 <= cyc;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; din = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int w = 0; w < 50; w++) begin
      logic [15:0] word;
      word = 16'($urandom);
      exp_w.push_back(word);
      for (int k = 3; k >= 0; k--) begin
        @(negedge clk);
        in_valid = 1; din = word[4*k +: 4];
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 0; din = 4'($urandom);
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    check(words == 50 && out_valid == 0, $sformatf("%0d words", words));
  end

  initial begin
    v1 = 0; d1 = 0;
    repeat (2) @(negedge clk);
    for (int w = 0; w < 10; w++) begin
      logic [15:0] word;
      word = 16'($urandom);
      exp_w1.push_back(word);
      for (int k = 15; k >= 0; k--) begin
        @(negedge clk);
        v1 = 1; d1 = word[k];
      end
    end
    @(negedge clk);
    v1 = 0;
    repeat (300) @(negedge clk);
    check(words1 == 10, $sformatf("%0d serial words", words1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
