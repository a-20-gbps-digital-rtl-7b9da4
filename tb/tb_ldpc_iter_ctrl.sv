// tb_ldpc_iter_ctrl: two bands deliver code blocks in bursts and at random;
// four modelled decoder cores each take 3 clocks per iteration and pulse done.
// A reference queue here follows arrivals (band 0 before band 1 in the same
// clock). Checks: blocks are decoded in arrival order with the right band and
// slot, the iteration count matches the queue length at dispatch
// (10 at <= 4 waiting, falling linearly to 2 at 32), no core starts while
// busy, both bands use the shared cores, and both ends of the iteration
// range are reached, and the blocks dropped at a full buffer are counted.
module tb_ldpc_iter_ctrl;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NC = 4;
  logic [1:0] blk_in;
  logic [NC-1:0] core_done, core_start;
  logic core_band;
  logic [4:0] core_slot, core_iters;
  logic [5:0] level;
  logic [31:0] dropped;
  ldpc_iter_ctrl #(.NCORES(NC)) dut (.*);

  int q_band [$], q_slot [$];
  int tail = 0, lvl = 0, ndrop = 0;
  int busy_left [NC];
  bit busy [NC];
  int hi_seen = 0, lo_seen = 0, band_seen [2];

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // core models and checker, evaluated between clock edges
  always @(negedge clk) if (!rst) begin
    int exp_it;
    core_done = '0;
    for (int k = 0; k < NC; k++) if (busy[k]) begin
      busy_left[k]--;
      if (busy_left[k] == 0) begin core_done[k] = 1; busy[k] = 0; end
    end
    for (int k = 0; k < NC; k++) if (core_start[k]) begin
      checks++;
      if (busy[k] || q_band.size() == 0) begin failures++; $display("start on busy core / empty queue"); end
      else begin
        exp_it = (lvl <= 4) ? 10 : 10 - (8 * (lvl - 4)) / 28;
        checks++;
        if (core_band != q_band[0] || core_slot != q_slot[0] || core_iters != exp_it) begin
          failures++; if (failures < 5) $display("dispatch band %0d slot %0d iters %0d, exp %0d %0d %0d", core_band, core_slot, core_iters, q_band[0], q_slot[0], exp_it);
        end
        if (core_iters == 10) lo_seen++;
        if (core_iters <= 3) hi_seen++;
        band_seen[core_band]++;
        void'(q_band.pop_front()); void'(q_slot.pop_front());
        lvl--;
      end
      busy[k] = 1; busy_left[k] = 3 * int'(core_iters) + 1;
    end
    for (int b = 0; b < 2; b++) if (arr[b]) begin
      if (lvl < 32) begin q_band.push_back(b); q_slot.push_back(tail); tail = (tail + 1) % 32; lvl++; end
      else ndrop++;
    end
  end

  task automatic arrive(logic [1:0] b);
    @(posedge clk);
    blk_in <= b;
  endtask

  // arrivals sampled at each clock edge; the queue model applies them after
  // that edge's dispatch, as the controller does
  logic [1:0] arr;
  always @(posedge clk) arr <= rst ? 2'b00 : blk_in;

  initial begin
    blk_in = 0; core_done = 0;
    foreach (busy[k]) begin busy[k] = 0; busy_left[k] = 0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    // burst: both bands every clock for 24 clocks, overfilling the buffer
    repeat (24) arrive(2'b11);
    arrive(2'b00);
    repeat (400) arrive(2'b00);
    // light random traffic
    repeat (600) arrive(($urandom % 12 == 0) ? 2'($urandom % 3 + 1) : 2'b00);
    repeat (400) arrive(2'b00);
    checks++; if (q_band.size() != 0) begin failures++; $display("%0d blocks never dispatched", q_band.size()); end
    checks++; if (hi_seen == 0 || lo_seen == 0 || band_seen[0] == 0 || band_seen[1] == 0) begin failures++; $display("coverage %0d %0d %0d %0d", hi_seen, lo_seen, band_seen[0], band_seen[1]); end
    checks++; if (ndrop == 0 || dropped != 32'(ndrop)) begin failures++; $display("drops %0d exp %0d", dropped, ndrop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
