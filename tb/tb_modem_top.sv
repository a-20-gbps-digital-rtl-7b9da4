// tb_modem_top: end-to-end run of one baseband platform at its default
// parameters (full-size PHY frames of 1192 clocks, 309 blocks per channel).
//
// Around the platform the testbench models what is outside the RTL:
//  - the 10GbE fibre input: scrambled 64b/66b blocks, idles for block lock,
//    then three bursts of Ethernet frames with valid FCS, each followed by a
//    long idle gap; channel 1 is disabled during the second burst;
//  - an ideal LDPC codec and radio link for the Ethernet path: the blocks of
//    each channel come back after a fixed delay (40 and 47 clocks);
//  - the LDPC encoder output: random coded nibbles, recorded as consumed;
//  - the analog path: each band's D/A samples reach its A/D turned by a
//    carrier frequency offset of 0.0008 cycles per sample (2 MHz);
//  - the receive filter: it hands over the transmitted symbols of each frame
//    (16QAM data from the recorded nibbles and the PN-coded pilots, level
//    unit 512), every data block turned by a slowly varying phase of up to
//    +/-0.3 rad as phase noise would;
//  - the LDPC decoder: a code block is complete every 486 soft-demapped data
//    symbols of a band; each of the four cores needs 20 clocks per iteration,
//    slightly more than keeps up at the maximum iteration count.
// Checks: every traffic block arrives in order at the fibre output, the
// frame monitors on both sides agree and see no FCS or framing errors, each
// preamble is detected once with the timing on its last sample (+/-2), the
// fine timing lands on that last sample exactly, the CFO estimate is within
// 1e-4 cycles/sample, the compensated samples keep a steady phase (drift
// equal to what the estimate leaves, +/-0.05 rad per 64 clocks), every soft bit of every data symbol has the transmitted sign and
// the pilots are flagged, and no decoder core is started while busy.
// Mechanisms counted (a failure for each that never happens): block lock,
// idle deletion, data frame, padding frame, padding dropped at the receiver,
// flush of a partial frame, filler block, single-channel operation, idle
// insertion at the output, preamble detection, fine timing, CFO
// compensation, phase tracking of a block turned by more than 0.25 rad,
// maximum and reduced iteration counts.
module tb_modem_top;
  import modem_pkg::*;
  logic gtx_rx_clk = 0, gtx_tx_clk = 0, phy_tx_clk = 0, phy_rx_clk;
  always #4 gtx_rx_clk = ~gtx_rx_clk;
  always #4 gtx_tx_clk = ~gtx_tx_clk;
  always #2 phy_tx_clk = ~phy_tx_clk;
  assign phy_rx_clk = phy_tx_clk;
  logic gtx_rx_rst = 1, gtx_tx_rst = 1, phy_tx_rst = 1, phy_rx_rst = 1;
  int checks = 0, failures = 0;

  localparam real PI  = 3.14159265358979;
  localparam real CFO = 0.0008;
  localparam int  NC  = 4;
  localparam int  NNIB = 120000;

  logic        gtx_rx_valid, gtx_rx_slip, rx_locked;
  blk66_t      gtx_rx_blk, gtx_tx_blk;
  logic [1:0]  ch_en;
  logic        enc_blk_valid, enc_blk_sof, enc_blk_pad;
  blk66_t      enc_blk [2];
  logic [3:0]  enc_nib [2][SYM_PER_CLK];
  logic [2:0]  enc_take [2];
  logic [1:0]  dac_sof;
  cplx_t       dac_smp [2][SMP_PER_CLK];
  logic        adc_valid;
  cplx_t       adc_smp [2][SMP_PER_CLK];
  logic [1:0]  rxf_in_valid;
  cplx_t       rxf_in_smp [2][SMP_PER_CLK];
  logic [1:0]  rxf_sym_valid, rxf_sym_sof;
  cplx_t       rxf_sym [2][SYM_PER_CLK];
  logic [1:0]  dec_llr_valid;
  logic [SYM_PER_CLK-1:0] dec_llr_pilot [2];
  logic signed [5:0] dec_llr [2][SYM_PER_CLK][4];
  logic [1:0]  dec_blk_in;
  logic [NC-1:0] dec_core_done, dec_core_start;
  logic        dec_core_band;
  logic [4:0]  dec_core_slot, dec_core_iters;
  logic [1:0]  dec_blk_valid;
  blk66_t      dec_blk [2];
  logic [1:0]  sync_found;
  logic [31:0] sync_timing [2];
  logic [1:0]  fine_found;
  logic [31:0] fine_idx [2];
  logic signed [23:0] cfo_phase_inc [2];
  logic [31:0] idle_deleted, data_frames, pad_frames, pad_dropped [2];
  logic [31:0] eth_rx_frames, eth_rx_fcs_err, eth_rx_framing_err;
  logic [31:0] eth_tx_frames, eth_tx_fcs_err, eth_tx_framing_err;
  logic [31:0] rx_fifo_overflow, tx_fifo_overflow, dec_dropped;

  modem_top dut (.*);

  // ---------------- mechanism counters ----------------
  int m_flush = 0, m_fill = 0, m_single = 0, m_idle_ins = 0, m_sync = 0, m_cfo = 0, m_fine = 0;
  int m_track = 0, m_iter_max = 0, m_iter_low = 0;

  // ---------------- 10GbE side ----------------
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
  int nframes = 0, got = 0;

  task automatic put(blk66_t b);
    @(posedge gtx_rx_clk);
    gtx_rx_valid <= 1;
    gtx_rx_blk   <= '{hdr: b.hdr, data: scr(b.data)};
    if (!is_idle(b)) sent.push_back(b);
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

  task automatic burst(int n);
    for (int f = 0; f < n; f++) begin
      put_frame(64 + ($urandom % 900));
      repeat (2 + ($urandom % 20)) put(IDLE_BLK);
    end
  endtask

  // fibre output: descramble and compare traffic blocks in order; idles
  // between frames are the idle insertion
  bit out_seen = 0;
  always @(posedge gtx_tx_clk) if (!gtx_tx_rst) begin
    blk66_t p;
    #1;
    p = '{hdr: gtx_tx_blk.hdr, data: dscr(gtx_tx_blk.data)};
    if (!is_idle(p)) begin
      checks++;
      if (sent.size() == 0 || p != sent[0]) begin
        failures++; if (failures < 8) $display("t=%0t output block %h, expected %h", $time, p, sent.size() ? sent[0] : IDLE_BLK);
      end
      if (sent.size()) void'(sent.pop_front());
      got++; out_seen = 1;
    end else if (out_seen) m_idle_ins++;
  end

  // ---------------- Ethernet path over an ideal codec and link ----------------
  localparam int D0 = 40, D1 = 47;
  logic   v_d [2][D1];
  blk66_t b_d [2][D1];
  always @(posedge phy_tx_clk) begin
    for (int c = 0; c < 2; c++) begin
      v_d[c][0] <= enc_blk_valid && !phy_tx_rst; b_d[c][0] <= enc_blk[c];
      for (int k = 1; k < D1; k++) begin v_d[c][k] <= v_d[c][k-1]; b_d[c][k] <= b_d[c][k-1]; end
    end
  end
  assign dec_blk_valid = {v_d[1][D1-1], v_d[0][D0-1]};
  assign dec_blk[0] = b_d[0][D0-1];
  assign dec_blk[1] = b_d[1][D1-1];

  // frame types on the PHY channels
  bit fr_data = 0, fr_idle = 0;
  always @(negedge phy_tx_clk) if (enc_blk_valid) begin
    if (enc_blk_sof) begin
      if (fr_data && fr_idle) m_flush++;
      fr_data = !enc_blk_pad; fr_idle = 0;
      if (!enc_blk_pad && ch_en == 2'b01) m_single++;
    end
    if (!enc_blk_pad && (is_idle(enc_blk[0]) || (ch_en[1] && is_idle(enc_blk[1])))) fr_idle = 1;
    if (enc_blk[1] == FILL_BLK) m_fill++;
  end

  // ---------------- coded bits into the transmitters ----------------
  logic [3:0] nibs [2][NNIB];
  int took [2];
  always @(negedge phy_tx_clk) begin
    for (int b = 0; b < 2; b++) begin
      if (!phy_tx_rst) took[b] += int'(enc_take[b]);
      for (int l = 0; l < SYM_PER_CLK; l++) enc_nib[b][l] = nibs[b][(took[b] + l) % NNIB];
    end
  end

  // ---------------- analog path: D/A to A/D with a carrier offset ----------------
  int ac = 0;              // A/D clock index since the first valid clock
  int sof_idx [2][$];      // A/D clock index of each preamble start
  function automatic logic signed [SW-1:0] clip(real v);
    int i = int'(v);
    if (i > 2047) i = 2047;
    if (i < -2047) i = -2047;
    return SW'(i);
  endfunction
  always @(posedge phy_tx_clk) begin
    if (phy_tx_rst) adc_valid <= 0;
    else begin
      adc_valid <= 1;
      for (int b = 0; b < 2; b++) begin
        if (dac_sof[b]) sof_idx[b].push_back(ac);
        for (int j = 0; j < SMP_PER_CLK; j++) begin
          real a, xr, xi;
          a  = 2.0 * PI * CFO * real'(SMP_PER_CLK * ac + j);
          xr = real'(dac_smp[b][j].re); xi = real'(dac_smp[b][j].im);
          adc_smp[b][j].re <= clip(xr * $cos(a) - xi * $sin(a));
          adc_smp[b][j].im <= clip(xr * $sin(a) + xi * $cos(a));
        end
      end
      ac++;
    end
  end

  // D/A history, for checking the compensated samples
  localparam int HIST = 16;
  cplx_t dac_hist [2][HIST][SMP_PER_CLK];
  always @(posedge phy_tx_clk) begin
    for (int b = 0; b < 2; b++) begin
      for (int k = HIST - 1; k > 0; k--) dac_hist[b][k] <= dac_hist[b][k-1];
      dac_hist[b][0] <= dac_smp[b];
    end
  end

  // preamble detection and CFO estimate
  int last_found [2] = '{-100000, -100000};
  int pclk = 0;
  always @(posedge phy_tx_clk) pclk++;
  always @(negedge phy_rx_clk) if (!phy_rx_rst) begin
    for (int b = 0; b < 2; b++) if (sync_found[b]) begin
      int best, d;
      best = 1 << 30;
      foreach (sof_idx[b][k]) begin
        d = int'(sync_timing[b]) - (SMP_PER_CLK * sof_idx[b][k] + 2 * PRE_LEN - 1);
        if ((d < 0 ? -d : d) < (best < 0 ? -best : best)) best = d;
      end
      checks++;
      if (best > 2 || best < -2) begin failures++; $display("band %0d: preamble timing off by %0d", b, best); end
      m_sync++;
      last_found[b] = pclk;
    end
    // fine timing must land on the preamble's last sample exactly
    for (int b = 0; b < 2; b++) if (fine_found[b]) begin
      int best, d;
      best = 1 << 30;
      foreach (sof_idx[b][k]) begin
        d = int'(fine_idx[b]) - (SMP_PER_CLK * sof_idx[b][k] + 2 * PRE_LEN - 1);
        if ((d < 0 ? -d : d) < (best < 0 ? -best : best)) best = d;
      end
      checks++;
      if (best != 0) begin failures++; $display("band %0d: fine timing off by %0d", b, best); end
      m_fine++;
    end
  end

  // CFO: estimate, and steady phase after compensation. z correlates the
  // compensated samples with the D/A samples over 64 clocks; the lag is
  // searched once (the best match over the history).
  real zr [2][HIST], zi [2][HIST];
  real prev_ang [2];
  bit  prev_ok [2];
  int  win = 0;
  always @(negedge phy_rx_clk) if (!phy_rx_rst) begin
    for (int b = 0; b < 2; b++) if (rxf_in_valid[b])
      for (int k = 0; k < HIST; k++)
        for (int j = 0; j < SMP_PER_CLK; j++) begin
          real yr, yi, xr, xi;
          yr = real'(rxf_in_smp[b][j].re); yi = real'(rxf_in_smp[b][j].im);
          xr = real'(dac_hist[b][k][j].re); xi = real'(dac_hist[b][k][j].im);
          zr[b][k] += yr * xr + yi * xi;
          zi[b][k] += yi * xr - yr * xi;
        end
    win++;
    if (win == 64) begin
      win = 0;
      for (int b = 0; b < 2; b++) begin
        int kb;
        real mb, ang, want, d, res;
        kb = 0; mb = 0.0;
        for (int k = 0; k < HIST; k++)
          if (zr[b][k] * zr[b][k] + zi[b][k] * zi[b][k] > mb) begin mb = zr[b][k] * zr[b][k] + zi[b][k] * zi[b][k]; kb = k; end
        ang = $atan2(zi[b][kb], zr[b][kb]);
        if (pclk - last_found[b] > 200 && last_found[b] > 0 && mb > 0.0) begin
          res = CFO + real'(cfo_phase_inc[b]) / real'(1 << 24);   // what the estimate leaves
          if (prev_ok[b]) begin
            want = 2.0 * PI * res * real'(SMP_PER_CLK * 64);
            d = ang - prev_ang[b] - want;
            while (d > PI) d -= 2.0 * PI;
            while (d < -PI) d += 2.0 * PI;
            checks++;
            if (d > 0.05 || d < -0.05) begin failures++; $display("band %0d: compensated phase drifts %f rad", b, d); end
            else m_cfo++;
          end
          prev_ok[b] = 1;
        end else prev_ok[b] = 0;
        prev_ang[b] = ang;
        for (int k = 0; k < HIST; k++) begin zr[b][k] = 0.0; zi[b][k] = 0.0; end
      end
    end
  end

  // ---------------- receive filter model: symbols with phase noise ----------------
  bit chip [300];
  typedef struct { bit pilot; logic [3:0] nib; int blk; } exp_t;
  exp_t expq [2][$];
  bit blk_bad [2][int];
  real blk_ph [2][int];

  task automatic feed_band(int b);
    for (int f = 0; ; f++) begin
      wait (took[b] >= DATA_PER_PIL * 252 * (f + 1));
      @(posedge phy_rx_clk);
      for (int c = 0; c < DATA_CLKS; c++) begin
        rxf_sym_valid[b] <= 1;
        rxf_sym_sof[b]   <= c == 0;
        for (int l = 0; l < SYM_PER_CLK; l++) begin
          int s, blk, dn, xr, xi;
          real ph;
          exp_t e;
          s   = SYM_PER_CLK * c + l;
          blk = f * 252 + s / SYM_PER_DBLK;
          ph  = 0.3 * $sin(2.0 * PI * real'(blk) / 40.0 + real'(b));
          blk_ph[b][blk] = ph;
          if (s % SYM_PER_DBLK == 0) begin
            xr = chip[s / SYM_PER_DBLK] ? -512 : 512; xi = xr;
            e.pilot = 1; e.nib = '0;
          end else begin
            sym_t q;
            dn = s - s / SYM_PER_DBLK - 1;
            e.pilot = 0; e.nib = nibs[b][(f * DATA_PER_PIL * 252 + dn) % NNIB];
            q = qam16_map(e.nib);
            xr = 512 * lvl2amp(q.i); xi = 512 * lvl2amp(q.q);
          end
          e.blk = blk;
          expq[b].push_back(e);
          rxf_sym[b][l].re <= SW'(int'(real'(xr) * $cos(ph) - real'(xi) * $sin(ph)));
          rxf_sym[b][l].im <= SW'(int'(real'(xr) * $sin(ph) + real'(xi) * $cos(ph)));
        end
        @(posedge phy_rx_clk);
      end
      rxf_sym_valid[b] <= 0;
      rxf_sym_sof[b]   <= 0;
    end
  endtask

  // soft bits: signs against the transmitted bits; code block completion
  int nsym [2], nblk_done [2];
  always @(negedge phy_rx_clk) if (!phy_rx_rst) begin
    dec_blk_in = 2'b00;
    for (int b = 0; b < 2; b++) if (dec_llr_valid[b]) begin
      for (int l = 0; l < SYM_PER_CLK; l++) begin
        exp_t e;
        bit bad;
        checks++;
        if (expq[b].size() == 0) begin failures++; continue; end
        e = expq[b].pop_front();
        bad = dec_llr_pilot[b][l] != e.pilot;
        if (!e.pilot) begin
          if ((dec_llr[b][l][0] > 0) != e.nib[3] || (dec_llr[b][l][1] > 0) != e.nib[2] ||
              (dec_llr[b][l][2] > 0) != e.nib[1] || (dec_llr[b][l][3] > 0) != e.nib[0]) bad = 1;
          nsym[b]++;
          if (nsym[b] % (LDPC_N / 4) == 0) dec_blk_in[b] = 1'b1;
        end
        if (bad) begin
          failures++; blk_bad[b][e.blk] = 1;
          if (failures < 8) $display("band %0d block %0d lane %0d: soft bits %0d %0d %0d %0d for nibble %h pilot %0d", b, e.blk, l,
                                     dec_llr[b][l][0], dec_llr[b][l][1], dec_llr[b][l][2], dec_llr[b][l][3], e.nib, e.pilot);
        end
      end
    end
  end

  // decoder cores
  int busy_left [NC];
  always @(negedge phy_rx_clk) if (!phy_rx_rst) begin
    dec_core_done = '0;
    for (int k = 0; k < NC; k++) if (busy_left[k] > 0) begin
      busy_left[k]--;
      if (busy_left[k] == 0) dec_core_done[k] = 1'b1;
    end
    for (int k = 0; k < NC; k++) if (dec_core_start[k]) begin
      checks++;
      if (busy_left[k] > 0 || dec_core_iters < 2 || dec_core_iters > 10) begin failures++; $display("core %0d start: busy %0d iters %0d", k, busy_left[k], dec_core_iters); end
      if (dec_core_iters == 10) m_iter_max++; else m_iter_low++;
      busy_left[k] = 20 * int'(dec_core_iters);
    end
  end

  // ---------------- run ----------------
  initial begin
    #400000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic mech(string name, int n);
    checks++;
    $display("  %-34s %0d", name, n);
    if (n == 0) begin failures++; $display("  mechanism never happened: %s", name); end
  endtask

  initial begin
    bit r [7];
    foreach (r[i]) r[i] = 1;
    for (int n = 0; n < 300; n++) begin
      chip[n] = r[6] ^ r[3];
      for (int i = 6; i > 0; i--) r[i] = r[i-1];
      r[0] = chip[n];
    end
    for (int b = 0; b < 2; b++) for (int n = 0; n < NNIB; n++) nibs[b][n] = 4'($urandom);
    foreach (ssr[k]) ssr[k] = 1;
    foreach (dsr[k]) dsr[k] = 1;
    foreach (busy_left[k]) busy_left[k] = 0;
    foreach (v_d[c, k]) v_d[c][k] = 0;
    took = '{0, 0}; nsym = '{0, 0};
    gtx_rx_valid = 0; gtx_rx_blk = IDLE_BLK; ch_en = 2'b11;
    rxf_sym_valid = 0; rxf_sym_sof = 0; dec_blk_in = 0; dec_core_done = 0;
    foreach (rxf_sym[b, l]) rxf_sym[b][l] = '0;
    foreach (adc_smp[b, j]) adc_smp[b][j] = '0;
    repeat (4) @(posedge gtx_rx_clk);
    gtx_rx_rst <= 0; gtx_tx_rst <= 0; phy_tx_rst <= 0; phy_rx_rst <= 0;
    fork feed_band(0); feed_band(1); join_none
    repeat (150) put(IDLE_BLK);
    burst(14);
    repeat (1500) put(IDLE_BLK);
    ch_en = 2'b01;                       // channel 1 disabled while the link is quiet
    burst(6);
    repeat (1800) put(IDLE_BLK);
    ch_en = 2'b11;
    burst(6);
    repeat (2400) put(IDLE_BLK);

    checks++; if (sent.size() != 0) begin failures++; $display("%0d blocks never came out", sent.size()); end
    checks++; if (eth_rx_frames != nframes || eth_tx_frames != nframes) begin failures++; $display("monitor frames %0d %0d exp %0d", eth_rx_frames, eth_tx_frames, nframes); end
    checks++; if (eth_rx_fcs_err != 0 || eth_tx_fcs_err != 0 || eth_rx_framing_err != 0 || eth_tx_framing_err != 0) begin failures++; $display("monitor errors %0d %0d %0d %0d", eth_rx_fcs_err, eth_tx_fcs_err, eth_rx_framing_err, eth_tx_framing_err); end
    checks++; if (rx_fifo_overflow != 0 || tx_fifo_overflow != 0 || dec_dropped != 0) begin failures++; $display("overflow %0d %0d %0d", rx_fifo_overflow, tx_fifo_overflow, dec_dropped); end
    for (int b = 0; b < 2; b++) begin
      real e;
      e = real'(cfo_phase_inc[b]) / real'(1 << 24) + CFO;
      checks++; if (e > 1e-4 || e < -1e-4) begin failures++; $display("band %0d: CFO estimate off by %e cycles/sample", b, e); end
    end
    for (int b = 0; b < 2; b++) foreach (blk_ph[b][k]) if (!blk_bad[b].exists(k) && (blk_ph[b][k] > 0.25 || blk_ph[b][k] < -0.25)) m_track++;
    $display("frames %0d, traffic blocks %0d, PHY frames per channel: data %0d padding %0d", nframes, got, data_frames, pad_frames);
    mech("block lock", int'(rx_locked));
    mech("idle blocks deleted", int'(idle_deleted));
    mech("data frames", int'(data_frames));
    mech("padding frames", int'(pad_frames));
    mech("padding blocks dropped (rx)", int'(pad_dropped[0] + pad_dropped[1]));
    mech("flushed partial frames", m_flush);
    mech("filler blocks", m_fill);
    mech("single-channel data frames", m_single);
    mech("idles inserted at output", m_idle_ins);
    mech("preambles detected", m_sync);
    mech("fine timing results", m_fine);
    mech("CFO-compensated windows", m_cfo);
    mech("blocks tracked beyond 0.25 rad", m_track);
    mech("code blocks at max iterations", m_iter_max);
    mech("code blocks at reduced iterations", m_iter_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
