// async_fifo: dual-clock FIFO with Gray-coded pointers, used for the two
// clock crossings of the Ethernet interface (GTX <-> PHY). Writes in wclk,
// reads in rclk. Read data is first-word-fall-through: rdata shows the head
// entry whenever rempty is low, and rd pops it. Each side reports a fill level
// computed from its own pointer and the synchronised (two-flop) pointer of
// the other side, so it lags the true level by up to three cycles.
// Depth, width and the synchroniser length are this design's choices.
module async_fifo #(
  parameter int W  = 66,
  parameter int AW = 10          // 2**AW entries
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          wr,
  input  logic [W-1:0]  wdata,
  output logic          wfull,
  output logic [AW:0]   wlevel,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          rd,
  output logic [W-1:0]  rdata,
  output logic          rempty,
  output logic [AW:0]   rlevel
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    for (int i = AW; i >= 0; i--) b[i] = (i == AW) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  // write side
  always_ff @(posedge wclk) begin
    if (wr && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (wr && !wfull) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end
  assign wlevel = wbin - gray2bin(rgray_w2);
  assign wfull  = wlevel[AW];

  // read side
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      if (rd && !rempty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
  assign rlevel = gray2bin(wgray_r2) - rbin;
  assign rempty = (rlevel == '0);
  assign rdata  = mem[rbin[AW-1:0]];
endmodule
