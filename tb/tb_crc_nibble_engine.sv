// tb_crc_nibble_engine: checks the table-driven CRC register on its own. The table
// is modelled in the testbench from long division (entry i = Remainder(i(x)*x^32 /
// G(x))). Messages are fed 4 bits per clock followed by eight zero nibbles: the
// register must then equal the CRC-32 of the message. A message followed by its
// CRC must leave the register at zero (is_zero), a corrupted one must not. clr with
// step starts a new message, clr alone empties the register.
module tb_crc_nibble_engine;
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

  localparam logic [31:0] POLY = 32'h04C1_1DB7;

  logic        clr, step, is_zero;
  logic [3:0]  din, tbl_idx;
  logic [31:0] tbl_val, crc, crc_nxt;
  logic [31:0] table_m [16];

  crc_nibble_engine dut (.clk, .rst, .clr, .step, .din, .tbl_idx, .tbl_val, .crc, .crc_nxt,
                         .is_zero);

  assign tbl_val = table_m[tbl_idx];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(input bitq_t q, input int zero_nibbles);
    for (int i = 0; i < q.size(); i += 4) begin
      @(negedge clk);
      clr  = (i == 0);
      step = 1;
      din  = {q[i], q[i+1], q[i+2], q[i+3]};
    end
    for (int z = 0; z < zero_nibbles; z++) begin
      @(negedge clk);
      clr = 0; step = 1; din = 0;
    end
    @(negedge clk);
    clr = 0; step = 0;
  endtask

  initial begin
    bitq_t m, f;
    logic [31:0] exp;
    int n;
    for (int i = 0; i < 16; i++) begin
      bitq_t q;
      q.delete();
      for (int k = 3; k >= 0; k--) q.push_back(i[k]);
      table_m[i] = crc_aug(q, 32, POLY);
    end
    clr = 0; step = 0; din = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(crc == 0 && is_zero, "zero after reset");
    for (int t = 0; t < 30; t++) begin
      n = 4 * (1 + int'($urandom_range(0, 100)));
      m = rand_bits(n);
      feed(m, 8);
      exp = crc_aug(m, 32, POLY);
      check(crc == exp, $sformatf("message %0d bits: crc %h expected %h", n, crc, exp));
      f = with_crc(m, 32, POLY);
      if (t % 2 == 1) f[$urandom_range(0, f.size() - 1)] ^= 1'b1;
      feed(f, 0);
      check(is_zero == (t % 2 == 0), $sformatf("frame check %0d: is_zero %b", t, is_zero));
    end
    // the standard check string, 9 bytes
    feed(bytes_to_bits('{"1","2","3","4","5","6","7","8","9"}), 8);
    check(crc == 32'h89A1_897F, $sformatf("CRC-32(123456789) = %h", crc));
    // clr alone empties the register
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    check(crc == 0, "clr empties the register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
