// tb_crc_serial_lfsr: checks the bit-serial CRC register.
// 1. The worked example: G = 10011 (x^4+x+1), message 1101011011, CRC 1110.
// 2. CRC-32 of the ASCII string "123456789" with zero preset and no inversion,
//    0x89A1897F (the complement of the POSIX cksum check value 0x765E7680).
// 3. Random CRC-32 messages against long division; each result must be ready the
//    clock after the last bit (one bit per clock).
// 4. Shift-out with feedback off: dout walks the CRC out MSB first in W clocks and
//    leaves the register at zero. 5. init restarts a message.
module tb_crc_serial_lfsr;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // CRC-32 instance
  logic        en, init, fb_en, din, dout;
  logic [31:0] crc, crc_nxt;
  crc_serial_lfsr dut (.clk, .rst, .en, .init, .fb_en, .din, .crc, .crc_nxt, .dout);

  // 4-bit instance for the worked example
  logic       en4, din4, dout4, init4;
  logic [3:0] crc4, crc4_nxt;
  crc_serial_lfsr #(.W(4), .POLY(4'b0011)) dut4 (
    .clk, .rst, .en(en4), .init(init4), .fb_en(1'b1), .din(din4),
    .crc(crc4), .crc_nxt(crc4_nxt), .dout(dout4));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic feed(input bitq_t q, input bit first_init);
    foreach (q[i]) begin
      en   <= 1'b1;
      din  <= q[i];
      init <= first_init && (i == 0);
      @(posedge clk);
    end
    en   <= 1'b0;
    init <= 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitq_t q;
    byte unsigned s[$];
    logic [31:0] exp;
    en = 0; init = 0; fb_en = 1; din = 0; en4 = 0; din4 = 0; init4 = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(crc == 0 && crc4 == 0, "register is zero after reset");

    // 1. worked example
    q = '{1,1,0,1,0,1,1,0,1,1};
    foreach (q[i]) begin
      en4 <= 1'b1; din4 <= q[i];
      @(posedge clk);
    end
    en4 <= 1'b0;
    @(negedge clk);
    check(crc4 == 4'b1110, $sformatf("example remainder %b, expected 1110", crc4));
    // the transmitted frame 11010110111110 leaves remainder zero when divided again
    q = '{1,1,0,1,0,1,1,0,1,1,1,1,1,0};
    @(posedge clk);
    foreach (q[i]) begin en4 <= 1'b1; init4 <= (i == 0); din4 <= q[i]; @(posedge clk); end
    en4 <= 1'b0; init4 <= 1'b0;
    @(negedge clk);
    check(crc4 == 4'b0000, $sformatf("example frame with CRC gives %b, expected 0000", crc4));
    // a single flipped bit leaves a nonzero remainder
    q[5] = ~q[5];
    @(posedge clk);
    foreach (q[i]) begin en4 <= 1'b1; init4 <= (i == 0); din4 <= q[i]; @(posedge clk); end
    en4 <= 1'b0; init4 <= 1'b0;
    @(negedge clk);
    check(crc4 != 4'b0000, "example frame with an error gives a nonzero remainder");

    // 2. check string
    s = '{"1","2","3","4","5","6","7","8","9"};
    feed(bytes_to_bits(s), 1);
    @(negedge clk);
    check(crc == 32'h89A1_897F, $sformatf("CRC-32(123456789) = %h", crc));
    check(crc == crc_aug(bytes_to_bits(s), 32, 32'h04C11DB7), "reference agrees on check string");

    // 3. random messages, restarted with init
    for (int t = 0; t < 40; t++) begin
      int n;
      n = 1 + int'($urandom_range(0, 400));
      q = rand_bits(n);
      @(posedge clk);
      feed(q, 1);
      @(negedge clk);
      exp = crc_aug(q, 32, 32'h04C11DB7);
      check(crc == exp, $sformatf("random %0d bits: got %h expected %h", n, crc, exp));
    end

    // 4. shift-out without feedback
    exp = crc;
    @(posedge clk);
    fb_en <= 1'b0;
    for (int k = 31; k >= 0; k--) begin
      en <= 1'b1; din <= 1'($urandom);
      @(negedge clk);
      check(dout == exp[k], $sformatf("shift-out bit %0d", k));
      @(posedge clk);
    end
    en <= 1'b0; fb_en <= 1'b1;
    @(negedge clk);
    check(crc == 0, "register empty after shift-out");

    // 5. init alone clears
    @(posedge clk);
    feed(rand_bits(50), 1);
    init <= 1'b1;
    @(posedge clk);
    init <= 1'b0;
    @(negedge clk);
    check(crc == 0, "init without en clears");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
