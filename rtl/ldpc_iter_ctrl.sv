// ldpc_iter_ctrl: scheduler in front of the LDPC decoder cores of one
// platform. Code blocks of both bands wait in one large buffer; this block
// keeps the buffer's queue of blocks (band and buffer slot, in arrival
// order), hands the oldest waiting block to a free decoder core, and picks
// the number of decoding iterations from the queue length: ITER_MAX while at
// most LOW_MARK blocks wait, falling linearly to ITER_MIN as the queue fills
// to BUF_BLKS. So a lightly loaded receiver decodes harder and a heavily
// loaded one keeps up. The two bands share the NCORES cores: any free core
// takes the next block, whichever band it came from.
// Interface: blk_in[b] pulses when band b has written a complete code block
// into the buffer (both bands may pulse in the same clock; band 0 queues
// first). A core is busy from its start pulse until its done pulse. At most
// one block is dispatched per clock, to the lowest-numbered free core,
// registered. The slot number is the buffer position the block occupies
// (slots are used in circular order); blocks arriving at a full buffer are
// dropped and counted. Sharing cores and buffer-driven iteration control
// follow the design; every number and the linear rule are this design's.
module ldpc_iter_ctrl #(
  parameter int NCORES   = 4,
  parameter int BUF_BLKS = 32,
  parameter int LOW_MARK = 4,
  parameter int ITER_MAX = 10,
  parameter int ITER_MIN = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  blk_in,
  input  logic [NCORES-1:0] core_done,
  output logic [NCORES-1:0] core_start,
  output logic        core_band,
  output logic [$clog2(BUF_BLKS)-1:0] core_slot,
  output logic [4:0]  core_iters,
  output logic [$clog2(BUF_BLKS+1)-1:0] level,
  output logic [31:0] dropped
);
  localparam int SA = $clog2(BUF_BLKS);
  logic          q_band [BUF_BLKS];
  logic [SA-1:0] head, tail;
  logic [NCORES-1:0] busy;

  // iterations for the current level
  function automatic logic [4:0] iters_for(int lvl);
    if (lvl <= LOW_MARK) return 5'(ITER_MAX);
    return 5'(ITER_MAX - ((ITER_MAX - ITER_MIN) * (lvl - LOW_MARK)) / (BUF_BLKS - LOW_MARK));
  endfunction

  logic          disp;
  int            core_sel;
  always_comb begin
    core_sel = 0;
    disp     = 1'b0;
    for (int k = NCORES - 1; k >= 0; k--)
      if (!busy[k]) begin
        core_sel = k;
        disp     = level != '0;
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      head <= '0; tail <= '0; level <= '0; busy <= '0; dropped <= '0;
      core_start <= '0; core_band <= 1'b0; core_slot <= '0; core_iters <= '0;
      for (int k = 0; k < BUF_BLKS; k++) q_band[k] <= 1'b0;
    end else begin
      logic [SA-1:0]                   t;
      logic [$clog2(BUF_BLKS+1)-1:0]   lv;
      logic [31:0]                     dr;
      t  = tail;
      lv = level;
      dr = dropped;
      core_start <= '0;
      busy       <= busy & ~core_done;
      if (disp) begin
        core_start[core_sel] <= 1'b1;
        busy[core_sel]       <= 1'b1;
        core_band  <= q_band[head];
        core_slot  <= head;
        core_iters <= iters_for(int'(level));
        head       <= SA'(int'(head) + 1);
        lv = lv - 1'b1;
      end
      for (int b = 0; b < 2; b++) begin
        if (blk_in[b]) begin
          if (32'(lv) < BUF_BLKS) begin
            q_band[t] <= 1'(b);
            t  = SA'(int'(t) + 1);
            lv = lv + 1'b1;
          end else begin
            dr = dr + 1;
          end
        end
      end
      tail  <= t;
      level <= lv;
      dropped <= dr;
    end
  end
endmodule
