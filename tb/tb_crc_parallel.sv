// tb_crc_parallel: checks the complete table-driven CRC unit.
// After reset the unit builds its table (table_ready within 2 + 80 + a few clocks).
// Sending frames (4 bits per clock) must return the CRC-32 from long division W/NB
// = 8 clocks after the first clock with en low (the eight zero steps); receiving
// frames (message plus CRC, some corrupted) must report frame_ok as long division
// says, one clock after en falls. Frames run
// back to back. Then the polynomial is replaced by the CRC-32C generator
// 0x1EDC6F41 and the checks are repeated with it.
module tb_crc_parallel;
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

  logic        poly_load, gen_mode, en, table_ready, done, crc_valid, frame_ok;
  logic [31:0] poly_in, crc_out;
  logic [3:0]  din;
  par_state_e  state;

  crc_parallel dut (.clk, .rst, .poly_load, .poly_in, .gen_mode, .en, .din, .table_ready,
                    .state, .done, .crc_out, .crc_valid, .frame_ok);

  // expected results, in order
  bit          exp_gen[$];
  logic [31:0] exp_val[$];
  bit          exp_ok[$];
  int          exp_cyc[$];
  int          cyc = 0, results = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && done) begin
      bit g, o;
      logic [31:0] v;
      int c0;
      g = exp_gen.pop_front(); v = exp_val.pop_front(); o = exp_ok.pop_front();
      c0 = exp_cyc.pop_front();
      results++;
      if (g) check(crc_valid && crc_out == v,
                   $sformatf("result %0d: crc %h valid %b, expected %h", results, crc_out, crc_valid, v));
      else   check(frame_ok == o,
                   $sformatf("result %0d: frame_ok %b, expected %b", results, frame_ok, o));
      check(cyc - c0 == (g ? 8 : 1),
            $sformatf("result %0d after %0d clocks", results, cyc - c0));
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one frame of nibbles; returns with en still high on the last nibble
  task automatic send(input bitq_t q, input bit mode);
    for (int i = 0; i < q.size(); i += 4) begin
      @(negedge clk);
      en = 1; gen_mode = mode;
      din = {q[i], q[i+1], q[i+2], q[i+3]};
    end
    @(negedge clk);
    en = 0;
  endtask

  task automatic run_frames(input logic [31:0] p, input int n);
    for (int t = 0; t < n; t++) begin
      bitq_t m;
      bit mode;
      m = rand_bits(4 * (1 + int'($urandom_range(0, 60))));
      mode = (t % 2 == 0);
      if (!mode) begin
        m = with_crc(m, 32, p);
        if (t % 4 == 1) m[$urandom_range(0, m.size() - 1)] ^= 1'b1;
      end
      exp_gen.push_back(mode);
      exp_val.push_back(crc_aug(m, 32, p));
      exp_ok.push_back(crc_rem(m, 32, p) == 0);
      exp_cyc.push_back(cyc + m.size() / 4 + 1);
      send(m, mode);
      // a sending frame may be followed at once only after its append phase
      if (mode) repeat (7) @(negedge clk);
    end
  endtask

  initial begin
    int n;
    poly_load = 0; poly_in = 0; gen_mode = 0; en = 0; din = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    n = 0;
    while (!table_ready && n < 200) begin @(negedge clk); n++; end
    check(table_ready && n <= 84, $sformatf("table ready after %0d clocks", n));
    @(negedge clk);
    run_frames(32'h04C1_1DB7, 24);
    repeat (12) @(negedge clk);
    check(results == 24, $sformatf("%0d results", results));

    // new polynomial
    poly_in = 32'h1EDC_6F41;
    poly_load = 1;
    @(negedge clk);
    poly_load = 0;
    #1;
    check(!table_ready, "table invalid after a new polynomial");
    n = 0;
    while (!table_ready && n < 200) begin @(negedge clk); n++; end
    check(table_ready, "table rebuilt");
    @(negedge clk);
    run_frames(32'h1EDC_6F41, 16);
    repeat (12) @(negedge clk);
    check(results == 40, $sformatf("%0d results", results));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
