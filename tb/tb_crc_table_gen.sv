// tb_crc_table_gen: checks the table generator.
// For CRC-32 and for an 8-bit generator (x^8+x^2+x+1) the 16 written entries must be
// Remainder(i(x)*x^W / G(x)) for i = 0..15, in index order, one write every NB+1
// clocks, done in the clock after the last write and 80 clocks from start to done. A second
// run with another polynomial must use the new one (latched at start).
module tb_crc_table_gen;
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

  logic        start, busy, done, we;
  logic [3:0]  waddr;
  logic [31:0] poly, wdata;
  crc_table_gen dut (.clk, .rst, .start, .poly, .busy, .done, .we, .waddr, .wdata);

  logic       start8, busy8, done8, we8;
  logic [3:0] waddr8;
  logic [7:0] poly8, wdata8;
  crc_table_gen #(.W(8), .NB(4)) dut8 (.clk, .rst, .start(start8), .poly(poly8), .busy(busy8),
                                       .done(done8), .we(we8), .waddr(waddr8), .wdata(wdata8));

  function automatic logic [31:0] ref_entry(input int i, input int w, input logic [31:0] p);
    bitq_t q;
    for (int k = 3; k >= 0; k--) q.push_back(i[k]);
    return crc_aug(q, w, p);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run32(input logic [31:0] p);
    int n = 0, cyc = 0, last_we = 0;
    @(negedge clk);
    start = 1; poly = p;
    @(negedge clk);
    start = 0; poly = 32'hDEAD_BEEF;   // must have been latched
    check(busy, "busy after start");
    while (1) begin
      cyc++;
      if (we) begin
        check(waddr == 4'(n), $sformatf("write %0d to address %0d", n, waddr));
        check(wdata == ref_entry(n, 32, p),
              $sformatf("entry %0d = %h, expected %h", n, wdata, ref_entry(n, 32, p)));
        if (n > 0) check(cyc - last_we == 5, "one entry every NB+1 clocks");
        last_we = cyc;
        n++;
      end
      @(negedge clk);
      if (done) break;
      if (cyc > 200) break;
    end
    check(n == 16, $sformatf("%0d entries written", n));
    check(cyc == 80, $sformatf("table took %0d clocks, expected 80", cyc));
    check(!busy, "idle after done");
  endtask

  initial begin
    int n8;
    start = 0; poly = 0; start8 = 0; poly8 = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    run32(32'h04C1_1DB7);
    check(ref_entry(1, 32, 32'h04C1_1DB7) == 32'h04C1_1DB7, "reference entry 1 is the polynomial");
    run32(32'h1EDC_6F41);
    // 8-bit generator
    @(negedge clk);
    start8 = 1; poly8 = 8'h07;
    @(negedge clk);
    start8 = 0;
    n8 = 0;
    while (!done8) begin
      if (we8) begin
        check(wdata8 == ref_entry(int'(waddr8), 8, 32'h07),
              $sformatf("8-bit entry %0d = %h", waddr8, wdata8));
        n8++;
      end
      @(negedge clk);
    end
    check(!we8 && !busy8, "done follows the last write");
    check(n8 == 16, "16 8-bit entries before done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
