// tb_crc_serial_check: checks the bit-serial receive check.
// Frames with a correct CRC-32 appended must give ok = 1 and remainder 0; the same
// frames with one or more flipped bits must give ok = 0 and the remainder
// Remainder(T(x)*x^32 / G(x)) from long division. Frames follow each other with no
// gap, so each first bit must restart the division; done comes one clock after the
// last bit. Also the worked example with G = 10011.
module tb_crc_serial_check;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        in_valid, in_data, in_last, done, ok;
  logic [31:0] remainder;
  crc_serial_check dut (.clk, .rst, .in_valid, .in_data, .in_last, .done, .ok, .remainder);

  logic       v4, d4, l4, done4, ok4;
  logic [3:0] rem4;
  crc_serial_check #(.W(4), .POLY(4'b0011)) dut4 (
    .clk, .rst, .in_valid(v4), .in_data(d4), .in_last(l4), .done(done4), .ok(ok4),
    .remainder(rem4));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expectations, in frame order
  bit          exp_ok[$];
  logic [31:0] exp_rem[$];
  int          results = 0;
  int          last_at = -10, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst && in_valid && in_last) last_at = cyc;
    if (!rst && done) begin
      bit e;
      logic [31:0] r;
      e = exp_ok.pop_front();
      r = exp_rem.pop_front();
      results++;
      check(ok == e && remainder == r,
            $sformatf("frame %0d: ok %b rem %h, expected %b %h", results, ok, remainder, e, r));
      check(cyc == last_at + 1, "result one clock after the last bit");
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitq_t f;
    int nerr;
    in_valid = 0; in_data = 0; in_last = 0; v4 = 0; d4 = 0; l4 = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    // worked example: 11010110111110 is correct, 11010110101110 is not
    f = '{1,1,0,1,0,1,1,0,1,1,1,1,1,0};
    for (int r = 0; r < 2; r++) begin
      foreach (f[i]) begin v4 <= 1; d4 <= f[i]; l4 <= (i == f.size() - 1); @(posedge clk); end
      v4 <= 0; l4 <= 0;
      @(negedge clk);
      check(done4 && ok4 == (r == 0), $sformatf("example pass %0d: ok %b rem %b", r, ok4, rem4));
      f[10] = ~f[10];
      @(posedge clk);
    end

    for (int t = 0; t < 40; t++) begin
      f = with_crc(rand_bits(1 + int'($urandom_range(0, 300))), 32, 32'h04C11DB7);
      nerr = (t % 2 == 0) ? 0 : int'($urandom_range(1, 3));
      for (int e = 0; e < nerr; e++) begin
        int p;
        p = int'($urandom_range(0, f.size() - 1));
        f[p] = ~f[p];
      end
      exp_rem.push_back(crc_aug(f, 32, 32'h04C11DB7));
      exp_ok.push_back(crc_rem(f, 32, 32'h04C11DB7) == 0);
      // drive on the falling edge, back to back unless a gap is inserted
      foreach (f[i]) begin
        @(negedge clk);
        in_valid = 1; in_data = f[i]; in_last = (i == f.size() - 1);
      end
      if (t % 3 == 0) begin
        @(negedge clk);
        in_valid = 0; in_last = 0;
        repeat (2) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    repeat (5) @(posedge clk);
    check(results == 40, $sformatf("%0d results", results));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
