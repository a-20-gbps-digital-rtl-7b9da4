// tb_rx_fifo: the GTX side (period 6.4) writes a random mix of idle and
// traffic blocks, some while block lock is off; the PHY side (period 3.2)
// reads at random. Checks: the read sequence of traffic blocks equals the
// traffic blocks written while locked, in order; idle blocks never enter the
// FIFO; an empty FIFO answers with the idle block; the deleted-idle counter.
module tb_rx_fifo;
  import modem_pkg::*;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #4 wclk = ~wclk;
  always #2 rclk = ~rclk;
  int checks = 0, failures = 0;

  logic locked, in_valid, rd;
  blk66_t in_blk, rdata;
  logic [31:0] idle_deleted, overflow;
  logic [6:0] level;
  rx_fifo #(.AW(6)) dut (.*);

  blk66_t q [$];
  int n_idle = 0, n_empty_reads = 0;

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer
  initial begin
    locked = 0; in_valid = 0; in_blk = IDLE_BLK;
    repeat (4) @(posedge wclk);
    wrst <= 0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge wclk);
      locked   <= n > 20;
      in_valid <= ($urandom % 3) != 0;
      in_blk   <= (($urandom % 3) == 0) ? IDLE_BLK : '{hdr: HDR_DATA, data: {$urandom, $urandom}};
      #1;
      if (in_valid && locked) begin
        if (is_idle(in_blk)) n_idle++;
        else q.push_back(in_blk);
      end
    end
    @(posedge wclk); in_valid <= 0;
  end

  // reader
  initial begin
    rd = 0;
    repeat (4) @(posedge rclk);
    rrst <= 0;
    repeat (20000) begin
      @(posedge rclk);
      rd <= ($urandom % 2) == 0;
      #1;
      if (rd) begin
        if (level == 0) begin
          checks++; n_empty_reads++;
          if (rdata != IDLE_BLK) begin failures++; $display("empty read not idle"); end
        end else begin
          checks++;
          if (q.size() == 0 || rdata != q[0]) begin
            failures++;
            if (failures < 5) $display("order mismatch got %h exp %h t=%0t qs=%0d lvl=%0d", rdata, q.size() ? q[0] : IDLE_BLK, $time, q.size(), level);
          end
          if (q.size() != 0) void'(q.pop_front());
        end
      end
    end
    checks++; if (q.size() != 0) begin failures++; $display("%0d blocks not read", q.size()); end
    checks++; if (idle_deleted != n_idle) begin failures++; $display("idle_deleted %0d exp %0d", idle_deleted, n_idle); end
    checks++; if (overflow != 0) begin failures++; $display("overflow %0d", overflow); end
    checks++; if (n_empty_reads == 0) begin failures++; $display("idle insertion never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
