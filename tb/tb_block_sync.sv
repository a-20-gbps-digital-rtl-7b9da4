// tb_block_sync: models a GTX gearbox: a continuous bit stream of valid
// 66-bit blocks is cut into 66-bit words at a bit offset; every slip pulse
// moves the cut by one bit. Starting from a random offset, the block must lock
// within 66 * (LOCK_CNT + 66) words and, once locked, the words must be
// aligned (the cut offset is 0 modulo 66) with no further slips. Then 16
// corrupted headers inside one 64-word window must drop the lock, and the
// block must lock again. Headers corrupted below the limit must not.
module tb_block_sync;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, slip, locked;
  blk66_t in_blk;
  block_sync dut (.*);

  int offset;                // bit position of the next word in the stream
  int corrupt_left = 0;
  // bit k of the stream: headers at multiples of 66 are 01 or 10
  function automatic logic stream_bit(int k);
    int p = k % 66, b = k / 66;
    if (p == 0) return 1'(b % 3 == 0);       // hdr[1]
    if (p == 1) return 1'(b % 3 != 0);       // hdr[0]
    return 1'((b * 7 + p * 13) % 5 == 1);
  endfunction

  task automatic next_word();
    logic [65:0] w;
    for (int i = 0; i < 66; i++) w[65 - i] = stream_bit(offset + i);
    if (corrupt_left > 0 && (offset % 66) == 0) begin
      w[65:64] = ($urandom % 2) ? 2'b00 : 2'b11;
      corrupt_left--;
    end
    in_blk   <= w;
    in_valid <= 1;
    offset   += 66;
  endtask

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n, slips;
    offset = 5 + ($urandom % 60);
    in_valid = 0; in_blk = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    n = 0;
    while (!locked && n < 66 * 140) begin
      @(posedge clk); #1;
      if (slip) offset += 1;
      next_word();
      n++;
    end
    checks++; if (!locked) begin failures++; $display("no lock"); end
    checks++; if ((offset % 66) != 0) begin failures++; $display("locked misaligned %0d", offset % 66); end
    slips = 0;
    repeat (200) begin
      @(posedge clk); #1; if (slip) begin slips++; offset += 1; end
      next_word();
    end
    checks++; if (slips != 0 || !locked) begin failures++; $display("unstable lock"); end
    // 10 bad headers: stays locked
    corrupt_left = 10;
    repeat (100) begin @(posedge clk); #1; if (slip) offset += 1; next_word(); end
    checks++; if (!locked) begin failures++; $display("lost lock on 10 errors"); end
    // 40 bad headers in a row: loses lock
    corrupt_left = 40;
    n = 0;
    while (locked && n < 100) begin @(posedge clk); #1; if (slip) offset += 1; next_word(); n++; end
    checks++; if (locked) begin failures++; $display("kept lock on 40 errors"); end
    n = 0;
    while (!locked && n < 66 * 140) begin @(posedge clk); #1; if (slip) offset += 1; next_word(); n++; end
    checks++; if (!locked || (offset % 66) != 0) begin failures++; $display("no relock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
