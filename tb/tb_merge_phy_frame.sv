// tb_merge_phy_frame: the two channel inputs carry interleaved traffic (the
// splitter's deal: even blocks on channel 0, odd on channel 1) mixed with
// padding idle blocks, some with up to PAD_HAM = 1 flipped bit, and with a
// different delay per channel. Checks: the output is the traffic in its
// original order, every padding block is dropped (per-channel counters), and
// with channel 1 disabled the channel 0 traffic comes out alone.
module tb_merge_phy_frame;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] ch_en, in_valid;
  blk66_t in_blk [2];
  logic out_valid;
  blk66_t out_blk;
  logic [31:0] pad_dropped [2], overflow;
  merge_phy_frame #(.AW(6), .PAD_HAM(1)) dut (.*);

  blk66_t exp_q [$];
  blk66_t chq [2][$];
  int npad [2];

  function automatic blk66_t noisy_idle(int nflip);
    blk66_t b = IDLE_BLK;
    for (int k = 0; k < nflip; k++) begin
      int idx = int'($urandom % 66);
      b[idx] = ~b[idx];
    end
    return b;
  endfunction

  initial begin
    #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (out_valid) begin
    checks++;
    if (exp_q.size() == 0 || out_blk != exp_q[0]) begin failures++; if (failures < 5) $display("merge order wrong"); end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  task automatic feed(int cc);
    repeat (cc * 7) @(posedge clk);
    while (chq[cc].size() > 0) begin
      @(posedge clk);
      in_valid[cc] <= ($urandom % 2) == 0;
      in_blk[cc]   <= chq[cc][0];
      #1;
      if (in_valid[cc]) void'(chq[cc].pop_front());
    end
    @(posedge clk); in_valid[cc] <= 0;
  endtask

  task automatic run(logic [1:0] en, int nblk);
    ch_en = en;
    npad[0] = 0; npad[1] = 0;
    for (int k = 0; k < nblk; k++) begin
      blk66_t b = '{hdr: HDR_DATA, data: {$urandom, $urandom}};
      exp_q.push_back(b);
      if (en == 2'b11) chq[k % 2].push_back(b); else chq[0].push_back(b);
      if (($urandom % 3) == 0) begin
        // a padding stretch on both channels (the splitter pads both)
        for (int c = 0; c < 2; c++) begin
          chq[c].push_back(noisy_idle($urandom % 2));
          npad[c]++;
        end
      end
    end
    if (en != 2'b11) begin
      // disabled channel carries only padding, which is ignored
      chq[1].delete();
      npad[1] = 0;
    end
    fork
      feed(0);
      feed(1);
    join
    repeat (50) @(posedge clk);
  endtask

  initial begin
    logic [31:0] d0, d1;
    in_valid = 0; in_blk[0] = IDLE_BLK; in_blk[1] = IDLE_BLK; ch_en = 2'b11;
    repeat (3) @(posedge clk);
    rst <= 0;
    run(2'b11, 200);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d blocks missing", exp_q.size()); end
    checks++; if (pad_dropped[0] != npad[0] || pad_dropped[1] != npad[1]) begin failures++; $display("pad counts %0d %0d exp %0d %0d", pad_dropped[0], pad_dropped[1], npad[0], npad[1]); end
    d0 = pad_dropped[0];
    run(2'b01, 100);
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d blocks missing (single)", exp_q.size()); end
    checks++; if (pad_dropped[0] - d0 != npad[0]) begin failures++; $display("single pad count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
