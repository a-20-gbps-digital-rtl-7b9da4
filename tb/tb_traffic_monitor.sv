// tb_traffic_monitor: builds 10GBASE-R block streams of Ethernet frames:
// start block 0x78 with preamble/SFD, data blocks, and the terminate block
// that fits the frame length, with idle blocks in between. The FCS is
// computed here with a bytewise CRC-32 (table-free, reflected 0xEDB88320,
// complemented and sent least significant byte first). Some frames get a
// corrupted byte (FCS error expected), and framing faults are inserted: a
// data block between frames, a second start inside a frame and a bad sync
// header. Checks the three counters against what was sent.
module tb_traffic_monitor;
  import modem_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid;
  blk66_t in_blk;
  logic [31:0] frames, fcs_errors, framing_errors;
  traffic_monitor dut (.*);

  int exp_frames = 0, exp_fcs = 0, exp_framing = 0;
  logic [7:0] TERM [8] = '{8'h87, 8'h99, 8'hAA, 8'hB4, 8'hCC, 8'hD2, 8'hE1, 8'hFF};

  function automatic logic [31:0] crc32(byte unsigned d [$]);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (d[i]) begin
      c ^= 32'(d[i]);
      repeat (8) c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    end
    return ~c;
  endfunction

  task automatic send(blk66_t b);
    @(posedge clk);
    in_valid <= 1;
    in_blk   <= b;
  endtask

  task automatic send_frame(int len, bit corrupt);
    byte unsigned d [$];
    logic [31:0] fcs;
    int pos;
    blk66_t b;
    for (int i = 0; i < len - 4; i++) d.push_back(8'($urandom));
    fcs = crc32(d);
    for (int k = 0; k < 4; k++) d.push_back(fcs[8*k +: 8]);
    if (corrupt) d[5] ^= 8'h10;
    send('{hdr: HDR_CTRL, data: {8'hD5, {6{8'h55}}, 8'h78}});
    pos = 0;
    while (d.size() - pos >= 8) begin
      for (int k = 0; k < 8; k++) b.data[8*k +: 8] = d[pos + k];
      b.hdr = HDR_DATA;
      send(b);
      pos += 8;
    end
    b.hdr = HDR_CTRL;
    b.data = '0;
    b.data[7:0] = TERM[d.size() - pos];
    for (int k = 0; k < d.size() - pos; k++) b.data[8*(k+1) +: 8] = d[pos + k];
    send(b);
    exp_frames++;
    if (corrupt) exp_fcs++;
  endtask

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_blk = IDLE_BLK;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 60; f++) begin
      send_frame(64 + ($urandom % 200), ($urandom % 4) == 0);
      repeat ($urandom % 3) send(IDLE_BLK);
      if (f % 15 == 7) begin
        send('{hdr: HDR_DATA, data: 64'h1234});   // data outside a frame
        exp_framing++;
      end
      if (f % 20 == 9) begin
        send('{hdr: 2'b11, data: 64'h0});        // bad header
        exp_framing++;
      end
    end
    // start inside a frame: the aborted frame is not counted, the second is
    send('{hdr: HDR_CTRL, data: {8'hD5, {6{8'h55}}, 8'h78}});
    send('{hdr: HDR_DATA, data: 64'h0});
    exp_framing++;
    send_frame(80, 0);
    send(IDLE_BLK);
    @(posedge clk); in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++; if (frames != exp_frames) begin failures++; $display("frames %0d exp %0d", frames, exp_frames); end
    checks++; if (fcs_errors != exp_fcs) begin failures++; $display("fcs %0d exp %0d", fcs_errors, exp_fcs); end
    checks++; if (framing_errors != exp_framing) begin failures++; $display("framing %0d exp %0d", framing_errors, exp_framing); end
    checks++; if (exp_fcs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
