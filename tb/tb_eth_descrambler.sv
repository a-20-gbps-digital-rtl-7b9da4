// tb_eth_descrambler: a bit-serial 1 + x^39 + x^58 scrambler in the testbench
// (started from a random state the descrambler does not know) scrambles
// random payloads; the descrambler must return the original payload once
// its 58-bit history has filled, i.e. from the second block on. Header
// pass-through and one-clock latency are checked too.
module tb_eth_descrambler;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  blk66_t in_blk, out_blk;
  eth_descrambler dut (.*);

  bit sr [58];
  function automatic logic [63:0] scramble(logic [63:0] d);
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
    blk66_t plain;
    foreach (sr[k]) sr[k] = 1'($urandom);
    in_valid = 0; in_blk = IDLE_BLK;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 300; n++) begin
      @(posedge clk);
      plain = '{hdr: ($urandom % 2) ? HDR_DATA : HDR_CTRL, data: {$urandom, $urandom}};
      in_valid <= 1;
      in_blk   <= '{hdr: plain.hdr, data: scramble(plain.data)};
      @(posedge clk); #1;
      in_valid <= 0;
      if (n > 0) begin
        checks++;
        if (!(out_valid && out_blk == plain)) begin
          failures++;
          if (failures < 5) $display("mismatch n=%0d got %h exp %h", n, out_blk, plain);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
