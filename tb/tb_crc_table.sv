// tb_crc_table: checks the lookup table storage. Random words are written to all 16
// addresses; every address must read back its last written word on the
// asynchronous read port, a write must show up on the next clock, and a clock with
// we low must not change anything.
module tb_crc_table;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        we;
  logic [3:0]  waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [16];

  crc_table dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int round = 0; round < 4; round++) begin
      for (int a = 0; a < 16; a++) begin
        @(negedge clk);
        we = 1; waddr = 4'(a); wdata = $urandom; model[a] = wdata;
        raddr = 4'(a);
        @(negedge clk);
        we = 0;
        check(rdata == model[a], $sformatf("read after write at %0d", a));
      end
      // scattered writes
      for (int k = 0; k < 10; k++) begin
        @(negedge clk);
        we = $urandom_range(0, 1); waddr = 4'($urandom); wdata = $urandom;
        if (we) model[waddr] = wdata;
      end
      @(negedge clk);
      we = 0;
      wdata = '1;
      for (int a = 0; a < 16; a++) begin
        raddr = 4'(a);
        #1;
        check(rdata == model[a], $sformatf("read back address %0d", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
