// tb_eth_scrambler: drives random 66-bit blocks (with gaps in in_valid) into
// the scrambler and compares each output with a bit-serial model of the
// 1 + x^39 + x^58 scrambler kept in the testbench (a 58-entry shift register
// of transmitted bits, state preset to all ones like the design). Also checks
// that the sync header passes unchanged and the one-clock latency.
module tb_eth_scrambler;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  blk66_t in_blk, out_blk;
  eth_scrambler dut (.*);

  bit sr [58];   // sr[0] = most recent transmitted bit
  function automatic logic [63:0] model(logic [63:0] d);
    logic [63:0] o;
    for (int i = 0; i < 64; i++) begin
      o[i] = d[i] ^ sr[38] ^ sr[57];
      for (int k = 57; k > 0; k--) sr[k] = sr[k-1];
      sr[0] = o[i];
    end
    return o;
  endfunction

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    blk66_t exp_q;
    foreach (sr[k]) sr[k] = 1;
    in_valid = 0; in_blk = IDLE_BLK;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 300; n++) begin
      @(posedge clk);
      in_valid <= ($urandom % 4) != 0;
      in_blk   <= '{hdr: ($urandom % 2) ? HDR_DATA : HDR_CTRL, data: {$urandom, $urandom}};
      #1;
      if (in_valid) begin
        exp_q = '{hdr: in_blk.hdr, data: model(in_blk.data)};
        @(posedge clk); #1;
        checks++;
        if (!(out_valid && out_blk == exp_q)) begin
          failures++;
          if (failures < 5) $display("mismatch n=%0d got %h exp %h", n, out_blk, exp_q);
        end
        in_valid <= 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
