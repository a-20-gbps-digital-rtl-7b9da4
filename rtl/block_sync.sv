// block_sync: 64b/66b block lock on the 66-bit words the GTX gearbox delivers
// from the 10GbE fibre. A sync header is valid when it is 01 or 10. Out of
// lock, every invalid header asks the gearbox to slip by one bit (slip pulse)
// and restarts the count; LOCK_CNT consecutive valid headers give lock. In
// lock, headers are counted in windows of WINDOW; BAD_LIMIT invalid headers
// in one window drop the lock. The design only names this block; the
// counting rule follows the usual 10GBASE-R lock state machine in
// simplified form. One decision per valid word; locked and slip registered.
module block_sync
  import modem_pkg::*;
#(
  parameter int LOCK_CNT  = 64,
  parameter int WINDOW    = 64,
  parameter int BAD_LIMIT = 16
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  blk66_t in_blk,
  output logic   slip,
  output logic   locked
);
  logic hdr_ok;
  logic [$clog2(LOCK_CNT+1)-1:0] good_cnt;
  logic [$clog2(WINDOW+1)-1:0]   win_cnt;
  logic [$clog2(BAD_LIMIT+1)-1:0] bad_cnt;

  assign hdr_ok = in_blk.hdr[1] ^ in_blk.hdr[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      locked <= 1'b0; slip <= 1'b0;
      good_cnt <= '0; win_cnt <= '0; bad_cnt <= '0;
    end else begin
      slip <= 1'b0;
      if (in_valid) begin
        if (!locked) begin
          if (!hdr_ok) begin
            slip     <= 1'b1;
            good_cnt <= '0;
          end else if (good_cnt == LOCK_CNT - 1) begin
            locked   <= 1'b1;
            good_cnt <= '0;
            win_cnt  <= '0;
            bad_cnt  <= '0;
          end else begin
            good_cnt <= good_cnt + 1'b1;
          end
        end else begin
          if (!hdr_ok && bad_cnt == BAD_LIMIT - 1) begin
            locked  <= 1'b0;
            slip    <= 1'b1;
            bad_cnt <= '0;
            win_cnt <= '0;
          end else if (win_cnt == WINDOW - 1) begin
            win_cnt <= '0;
            bad_cnt <= '0;
          end else begin
            win_cnt <= win_cnt + 1'b1;
            if (!hdr_ok) bad_cnt <= bad_cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
