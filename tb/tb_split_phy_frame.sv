// tb_split_phy_frame: a testbench queue plays the RX FIFO (first-word-fall-
// through data, fill level, pop on fifo_rd). Frames of NBLK = 5 blocks are
// started every 16 clocks while traffic arrives slowly, so the splitter must
// produce both padding and data frames. Checks, per frame: the frame type
// against the fill level at frame_start (10 blocks needed with both channels,
// 5 with one), NBLK pairs with sof on the first, padding pairs all idle, and
// in data frames the FIFO order dealt alternately to channel 0 and 1, or all
// to channel 0 when channel 1 is disabled. Waiting traffic must be flushed
// after FLUSH_FRAMES = 2 padding frames, with idle blocks where the FIFO ran
// empty and the filler block on channel 1 after a lone channel 0 block.
// Both channel modes are run.
module tb_split_phy_frame;
  import modem_pkg::*;
  localparam int NB = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic frame_start, fifo_rd, out_valid, out_sof, out_pad;
  logic [1:0] ch_en;
  logic [6:0] fifo_level;
  blk66_t fifo_rdata, out_blk [2];
  logic [31:0] data_frames, pad_frames;
  split_phy_frame #(.AW(6), .NBLK(NB)) dut (.*);

  blk66_t q [$];
  blk66_t src [$];
  int p = 0, pairs = 0, exp_pad_frames = 0, exp_data_frames = 0, waited = 0, flushes = 0, fills = 0;
  logic mode_data;
  logic [1:0] mode_en;
  logic pop;

  initial begin
    #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // FIFO model
  always @(negedge clk) pop = fifo_rd;
  always @(posedge clk) begin
    #1;
    if (pop && q.size() > 0) void'(q.pop_front());
    if (($urandom % 5) == 0) begin
      automatic blk66_t b = '{hdr: HDR_DATA, data: {$urandom, $urandom}};
      q.push_back(b); src.push_back(b);
    end
    fifo_level = 7'(q.size());
    fifo_rdata = q.size() ? q[0] : IDLE_BLK;
  end

  // checker
  always @(negedge clk) if (!rst) begin
    if (frame_start) begin
      mode_en   = ch_en;
      mode_data = int'(fifo_level) >= ((ch_en == 2'b11) ? 2 * NB : NB);
      if (!mode_data && fifo_level != 0 && waited >= 2) begin mode_data = 1; flushes++; end
      if (mode_data) begin exp_data_frames++; waited = 0; end
      else begin exp_pad_frames++; if (fifo_level != 0 && waited < 2) waited++; end
      pairs = 0;
    end
    if (out_valid) begin
      checks++;
      if (out_sof != (pairs == 0) || out_pad != !mode_data) begin failures++; $display("flags wrong"); end
      if (!mode_data) begin
        checks++;
        if (out_blk[0] != IDLE_BLK || out_blk[1] != IDLE_BLK) begin failures++; $display("pad not idle"); end
      end else begin
        for (int c = 0; c < 2; c++) begin
          checks++;
          if (c == 1 && mode_en != 2'b11) begin
            if (out_blk[1] != IDLE_BLK) begin failures++; $display("disabled channel not idle"); end
          end else if (out_blk[c] == FILL_BLK) begin
            fills++;
            if (c != 1 || is_idle(out_blk[0])) begin failures++; $display("misplaced filler"); end
          end else if (!is_idle(out_blk[c])) begin
            if (out_blk[c] != src[p]) begin failures++; $display("order wrong at %0d", p); end
            p++;
          end
        end
      end
      pairs++;
    end
  end

  initial begin
    frame_start = 0; ch_en = 2'b11;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 80; f++) begin
      if (f == 40) ch_en <= 2'b01;
      @(posedge clk); frame_start <= 1;
      @(posedge clk); frame_start <= 0;
      repeat (14) @(posedge clk);
      checks++;
      if (pairs != NB) begin failures++; $display("frame %0d had %0d pairs", f, pairs); end
    end
    checks++; if (data_frames != exp_data_frames || pad_frames != exp_pad_frames) begin failures++; $display("frame counters"); end
    checks++; if (exp_data_frames < 10 || exp_pad_frames < 10) begin failures++; $display("modes not both exercised %0d %0d", exp_data_frames, exp_pad_frames); end
    checks++; if (flushes == 0 || fills == 0) begin failures++; $display("flush %0d / filler %0d never seen", flushes, fills); end
    $display("data frames %0d, padding frames %0d, flushes %0d, fillers %0d", exp_data_frames, exp_pad_frames, flushes, fills);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
