// tb_fcs_append: checks the transmit Frame Check Sequence block.
// Frames of the control-frame sizes (header and body of RTS, CTS/ACK) and random
// lengths are sent back to back with random gaps. The complete frame must be the
// input bits, one clock later, followed by the 32-bit CRC computed by long division,
// with out_fcs on exactly the 32 CRC bits, out_last on the final one and in_ready
// low for exactly those 32 clocks.
module tb_fcs_append;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic in_valid, in_data, in_last, in_ready;
  logic out_valid, out_data, out_last, out_fcs;

  fcs_append dut (.clk, .rst, .in_valid, .in_data, .in_last, .in_ready,
                  .out_valid, .out_data, .out_last, .out_fcs);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected output stream
  bitq_t exp_bits;
  bit    exp_fcs[$];
  bit    exp_last[$];
  int    frames_out = 0;
  int    busy_clocks = 0;

  always @(posedge clk) if (!rst) begin
    if (!in_ready) busy_clocks++;
    if (out_valid) begin
      if (exp_bits.size() == 0) check(0, "unexpected output bit");
      else begin
        bit b, f, l;
        b = exp_bits.pop_front();
        f = exp_fcs.pop_front();
        l = exp_last.pop_front();
        check(out_data === b && out_fcs === f && out_last === l,
              $sformatf("frame %0d: bit %b fcs %b last %b, expected %b %b %b",
                        frames_out, out_data, out_fcs, out_last, b, f, l));
        if (out_last) begin
          frames_out++;
          check(1, "frame completed");
        end
      end
    end
  end

  task automatic send(input bitq_t msg);
    bitq_t full = with_crc(msg, 32, 32'h04C11DB7);
    foreach (full[i]) begin
      exp_bits.push_back(full[i]);
      exp_fcs.push_back(i >= msg.size());
      exp_last.push_back(i == full.size() - 1);
    end
    // inputs change on the falling edge; in_ready is known before the rising one
    foreach (msg[i]) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1'b1;
      in_data  = msg[i];
      in_last  = (i == msg.size() - 1);
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sizes[$] = '{16*8, 10*8, 10*8, 1, 2, 33, 8*5};
  int nframes;
  initial begin
    in_valid = 0; in_data = 0; in_last = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int t = 0; t < 20; t++) sizes.push_back(1 + int'($urandom_range(0, 300)));
    nframes = sizes.size();
    foreach (sizes[i]) begin
      send(rand_bits(sizes[i]));
      if (i % 2 == 1) repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    repeat (40) @(posedge clk);
    check(frames_out == nframes, $sformatf("%0d frames out of %0d", frames_out, nframes));
    check(exp_bits.size() == 0, "all expected bits seen");
    check(busy_clocks == 32 * nframes, $sformatf("in_ready low %0d clocks, expected %0d",
                                                 busy_clocks, 32 * nframes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
