// tb_eth_interface: end-to-end run of the Ethernet interface with the two
// PHY channels looped back (channel 1 with extra delay). The 10GbE receive
// side gets scrambled 64b/66b blocks: idles first for block lock, then
// Ethernet frames with valid FCS separated by idles. Frames are split into
// PHY frames of NBLK = 8 blocks (frame_start every 40 PHY clocks), merged
// again and scrambled onto the 10GbE transmit side. The testbench descrambles
// that output with its own bit-serial model and checks that the traffic
// blocks come out unchanged and in order, that padding frames and data
// frames both occurred, that idles were deleted, and the monitor counters
// (frames seen at both monitors, no FCS or framing errors).
module tb_eth_interface;
  import modem_pkg::*;
  localparam int NB = 8;
  logic gtx_rx_clk = 0, gtx_tx_clk = 0, phy_tx_clk = 0, phy_rx_clk;
  always #4 gtx_rx_clk = ~gtx_rx_clk;
  always #4 gtx_tx_clk = ~gtx_tx_clk;
  always #2 phy_tx_clk = ~phy_tx_clk;
  assign phy_rx_clk = phy_tx_clk;
  logic gtx_rx_rst = 1, gtx_tx_rst = 1, phy_tx_rst = 1, phy_rx_rst = 1;
  int checks = 0, failures = 0;

  logic gtx_rx_valid, gtx_rx_slip, rx_locked, frame_start, ch_tx_valid, ch_tx_sof, ch_tx_pad;
  blk66_t gtx_rx_blk, gtx_tx_blk, ch_tx_blk [2], ch_rx_blk [2];
  logic [1:0] ch_en, ch_rx_valid;
  logic [31:0] idle_deleted, rx_fifo_overflow, tx_fifo_overflow, data_frames, pad_frames;
  logic [31:0] pad_dropped [2];
  logic [31:0] eth_rx_frames, eth_rx_fcs_err, eth_rx_framing_err, eth_tx_frames, eth_tx_fcs_err, eth_tx_framing_err;

  eth_interface #(.FIFO_AW(8), .MERGE_AW(6), .NBLK(NB)) dut (.*);

  // scrambler model for the fibre input, descrambler model for the output
  bit ssr [58], dsr [58];
  function automatic logic [63:0] scr(logic [63:0] d);
    logic [63:0] o;
    for (int i = 0; i < 64; i++) begin
      o[i] = d[i] ^ ssr[38] ^ ssr[57];
      for (int k = 57; k > 0; k--) ssr[k] = ssr[k-1];
      ssr[0] = o[i];
    end
    return o;
  endfunction
  function automatic logic [63:0] dscr(logic [63:0] s);
    logic [63:0] o;
    for (int i = 0; i < 64; i++) begin
      o[i] = s[i] ^ dsr[38] ^ dsr[57];
      for (int k = 57; k > 0; k--) dsr[k] = dsr[k-1];
      dsr[0] = s[i];
    end
    return o;
  endfunction
  function automatic logic [31:0] crc32(byte unsigned d [$]);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (d[i]) begin
      c ^= 32'(d[i]);
      repeat (8) c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    end
    return ~c;
  endfunction

  blk66_t sent [$];
  int nframes = 0, nidle = 0, got = 0;

  task automatic put(blk66_t b);
    @(posedge gtx_rx_clk);
    gtx_rx_valid <= 1;
    gtx_rx_blk   <= '{hdr: b.hdr, data: scr(b.data)};
    if (is_idle(b)) begin if (rx_locked) nidle++; end
    else sent.push_back(b);
  endtask

  task automatic put_frame(int len);
    byte unsigned d [$];
    logic [31:0] fcs;
    int pos;
    blk66_t b;
    logic [7:0] TERM [8] = '{8'h87, 8'h99, 8'hAA, 8'hB4, 8'hCC, 8'hD2, 8'hE1, 8'hFF};
    for (int i = 0; i < len - 4; i++) d.push_back(8'($urandom));
    fcs = crc32(d);
    for (int k = 0; k < 4; k++) d.push_back(fcs[8*k +: 8]);
    put('{hdr: HDR_CTRL, data: {8'hD5, {6{8'h55}}, 8'h78}});
    pos = 0;
    while (d.size() - pos >= 8) begin
      for (int k = 0; k < 8; k++) b.data[8*k +: 8] = d[pos + k];
      b.hdr = HDR_DATA;
      put(b);
      pos += 8;
    end
    b.hdr = HDR_CTRL; b.data = '0;
    b.data[7:0] = TERM[d.size() - pos];
    for (int k = 0; k < d.size() - pos; k++) b.data[8*(k+1) +: 8] = d[pos + k];
    put(b);
    nframes++;
  endtask

  // PHY loopback: channel 0 after 1 clock, channel 1 after 3 clocks
  logic   v_d [2][4];
  blk66_t b_d [2][4];
  always_ff @(posedge phy_tx_clk) begin
    for (int c = 0; c < 2; c++) begin
      v_d[c][0] <= ch_tx_valid; b_d[c][0] <= ch_tx_blk[c];
      for (int k = 1; k < 4; k++) begin v_d[c][k] <= v_d[c][k-1]; b_d[c][k] <= b_d[c][k-1]; end
    end
  end
  assign ch_rx_valid = {v_d[1][3], v_d[0][0]};
  assign ch_rx_blk[0] = b_d[0][0];
  assign ch_rx_blk[1] = b_d[1][3];

  // frame clock of the PHY
  int fcnt = 0;
  always_ff @(posedge phy_tx_clk) fcnt <= (fcnt == 39) ? 0 : fcnt + 1;
  assign frame_start = !phy_tx_rst && fcnt == 0;

  // output checker on the fibre transmit side
  always @(posedge gtx_tx_clk) if (!gtx_tx_rst) begin
    blk66_t p;
    #1;
    p = '{hdr: gtx_tx_blk.hdr, data: dscr(gtx_tx_blk.data)};
    if (!is_idle(p) && got < 100000) begin
      checks++;
      if (sent.size() == 0 || p != sent[0]) begin
        failures++; if (failures < 5) $display("t=%0t output block %h, expected %h", $time, p, sent.size() ? sent[0] : IDLE_BLK);
      end
      if (sent.size()) void'(sent.pop_front());
      got++;
    end
  end

  initial begin
    #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (ssr[k]) ssr[k] = 1;
    foreach (dsr[k]) dsr[k] = 1;
    gtx_rx_valid = 0; gtx_rx_blk = IDLE_BLK; ch_en = 2'b11;
    repeat (4) @(posedge gtx_rx_clk);
    gtx_rx_rst <= 0; gtx_tx_rst <= 0; phy_tx_rst <= 0; phy_rx_rst <= 0;
    repeat (100) put(IDLE_BLK);
    for (int f = 0; f < 40; f++) begin
      put_frame(64 + ($urandom % 300));
      repeat (4 + ($urandom % 40)) put(IDLE_BLK);
    end
    repeat (2000) put(IDLE_BLK);
    checks++; if (sent.size() != 0) begin failures++; $display("%0d blocks never came out", sent.size()); end
    checks++; if (eth_rx_frames != nframes || eth_tx_frames != nframes) begin failures++; $display("monitor frames %0d %0d exp %0d", eth_rx_frames, eth_tx_frames, nframes); end
    checks++; if (eth_rx_fcs_err != 0 || eth_tx_fcs_err != 0 || eth_rx_framing_err != 0 || eth_tx_framing_err != 0) begin failures++; $display("monitor errors %0d %0d %0d %0d", eth_rx_fcs_err, eth_tx_fcs_err, eth_rx_framing_err, eth_tx_framing_err); end
    checks++; if (data_frames == 0 || pad_frames == 0) begin failures++; $display("frame types %0d %0d", data_frames, pad_frames); end
    checks++; if (idle_deleted < 100) begin failures++; $display("idle deleted %0d", idle_deleted); end
    checks++; if (rx_fifo_overflow != 0 || tx_fifo_overflow != 0) begin failures++; $display("overflow"); end
    $display("data frames %0d padding frames %0d idles deleted %0d pad blocks dropped %0d/%0d", data_frames, pad_frames, idle_deleted, pad_dropped[0], pad_dropped[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
