// tb_tx_fifo: the PHY receive side (period 3.2) writes Ethernet frames
// (start block, 2 to 20 data blocks, terminate block) in bursts, at about
// two thirds of the rate the GTX side (period 6.4) reads, so a frame
// forwarded as soon as it started would run dry. Checks: the non-fill output
// blocks equal the written blocks in order, every fill block is the idle
// block, no fill appears between a start and its terminate block (frames
// leave whole), and fills appear between bursts (idle insertion).
module tb_tx_fifo;
  import modem_pkg::*;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #2 wclk = ~wclk;
  always #4 rclk = ~rclk;
  int checks = 0, failures = 0;

  logic in_valid, out_is_fill;
  blk66_t in_blk, out_blk;
  logic [31:0] overflow;
  tx_fifo #(.AW(6)) dut (.*);

  blk66_t q [$];
  int fills = 0, got = 0, sent = 0;
  bit out_in_frame = 0;

  function automatic blk66_t next_blk(ref int left);
    blk66_t b;
    if (left < 0) begin
      left = 2 + int'($urandom % 19);
      return '{hdr: HDR_CTRL, data: {$urandom, 24'($urandom), 8'h78}};
    end
    if (left == 0) begin
      left = -1;
      return '{hdr: HDR_CTRL, data: {$urandom, 24'($urandom), 8'hFF}};
    end
    left--;
    return '{hdr: HDR_DATA, data: {$urandom, $urandom}};
  endfunction

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int left;
    in_valid = 0; in_blk = IDLE_BLK;
    repeat (4) @(posedge wclk);
    wrst <= 0;
    left = -1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge wclk);
      if ((((n / 100) % 2 == 0) || left >= 0) && ($urandom % 3 == 0)) begin
        in_valid <= 1;
        in_blk   <= next_blk(left);
      end else in_valid <= 0;
      #1;
      if (in_valid) begin q.push_back(in_blk); sent++; end
    end
    @(posedge wclk); in_valid <= 0;
  end

  initial begin
    repeat (4) @(posedge rclk);
    rrst <= 0;
    repeat (2000) begin
      @(posedge rclk); #1;
      if (out_is_fill) begin
        fills++; checks++;
        if (out_blk != IDLE_BLK) begin failures++; $display("fill not idle"); end
        if (out_in_frame) begin checks++; failures++; if (failures < 5) $display("idle inside a frame"); end
      end else if (!rrst) begin
        checks++; got++;
        if (q.size() == 0 || out_blk != q[0]) begin
          failures++; if (failures < 5) $display("mismatch %h", out_blk);
        end
        if (q.size() != 0) void'(q.pop_front());
        if (is_start(out_blk)) out_in_frame = 1;
        if (is_term(out_blk)) out_in_frame = 0;
      end
    end
    checks++; if (got != sent || got == 0) begin failures++; $display("got %0d sent %0d", got, sent); end
    checks++; if (fills < 100) begin failures++; $display("too few fills %0d", fills); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
