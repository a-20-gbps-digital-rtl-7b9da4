// modem_top: one 10 Gbps baseband DSP platform of the 20 Gbps backhaul
// modem (the full modem is two of these). A 10GbE port is bridged to two
// radio bands of 5.34 Gbps each (user bits per 3.82 us PHY frame). The
// Ethernet interface splits traffic into fixed-length PHY frames for the two
// bands and merges what the two receivers recover. Each band's transmitter
// builds frames of preamble, 16QAM data and PN-coded pilots and pulse-shapes
// them to 8 samples per 312 MHz clock. Each band's receiver detects the
// preamble by autocorrelation, refines that timing by cross-correlation with
// the known training block, estimates and removes the carrier frequency
// offset, and after the receive filter tracks phase noise on the pilots and
// demaps to soft bits; a shared scheduler assigns buffered code blocks to the
// LDPC decoder cores with a load-dependent iteration count.
// The LDPC encoder and decoder cores, the receive filter with its channel and
// I/Q-imbalance estimation, the data converters and the GTX transceiver are
// outside this RTL: their signals are ports of this module (enc_*, rxf_*,
// dec_*, dac_*, adc_*, gtx_*). Clock domains as in eth_interface; both bands
// of a direction share one clock (phy_tx_clk: D/A, phy_rx_clk: A/D).
module modem_top
  import modem_pkg::*;
#(
  parameter int NCORES = 4
) (
  input  logic        gtx_rx_clk,
  input  logic        gtx_rx_rst,
  input  logic        gtx_tx_clk,
  input  logic        gtx_tx_rst,
  input  logic        phy_tx_clk,
  input  logic        phy_tx_rst,
  input  logic        phy_rx_clk,
  input  logic        phy_rx_rst,
  // 10GbE side (GTX)
  input  logic        gtx_rx_valid,
  input  blk66_t      gtx_rx_blk,
  output logic        gtx_rx_slip,
  output blk66_t      gtx_tx_blk,
  input  logic [1:0]  ch_en,
  // to the LDPC encoders: 66-bit blocks of the two bands' frames
  output logic        enc_blk_valid,
  output logic        enc_blk_sof,
  output logic        enc_blk_pad,
  output blk66_t      enc_blk [2],
  // from the LDPC encoders: coded bits, four per symbol
  input  logic [3:0]  enc_nib  [2][SYM_PER_CLK],
  output logic [2:0]  enc_take [2],
  // D/A converters
  output logic [1:0]  dac_sof,
  output cplx_t       dac_smp [2][SMP_PER_CLK],
  // A/D converters
  input  logic        adc_valid,
  input  cplx_t       adc_smp [2][SMP_PER_CLK],
  // to the receive filters: CFO-corrected samples
  output logic [1:0]  rxf_in_valid,
  output cplx_t       rxf_in_smp [2][SMP_PER_CLK],
  // from the receive filters: symbols, frame aligned
  input  logic [1:0]  rxf_sym_valid,
  input  logic [1:0]  rxf_sym_sof,
  input  cplx_t       rxf_sym [2][SYM_PER_CLK],
  // to the LDPC decoder buffer: soft bits
  output logic [1:0]  dec_llr_valid,
  output logic [SYM_PER_CLK-1:0] dec_llr_pilot [2],
  output logic signed [5:0] dec_llr [2][SYM_PER_CLK][4],
  // decoder scheduling
  input  logic [1:0]  dec_blk_in,
  input  logic [NCORES-1:0] dec_core_done,
  output logic [NCORES-1:0] dec_core_start,
  output logic        dec_core_band,
  output logic [4:0]  dec_core_slot,
  output logic [4:0]  dec_core_iters,
  // from the LDPC decoders: recovered 66-bit blocks
  input  logic [1:0]  dec_blk_valid,
  input  blk66_t      dec_blk [2],
  // status
  output logic        rx_locked,
  output logic [1:0]  sync_found,
  output logic [31:0] sync_timing [2],
  output logic [1:0]  fine_found,
  output logic [31:0] fine_idx [2],
  output logic signed [23:0] cfo_phase_inc [2],
  output logic [31:0] idle_deleted,
  output logic [31:0] data_frames,
  output logic [31:0] pad_frames,
  output logic [31:0] pad_dropped [2],
  output logic [31:0] eth_rx_frames,
  output logic [31:0] eth_rx_fcs_err,
  output logic [31:0] eth_rx_framing_err,
  output logic [31:0] eth_tx_frames,
  output logic [31:0] eth_tx_fcs_err,
  output logic [31:0] eth_tx_framing_err,
  output logic [31:0] rx_fifo_overflow,
  output logic [31:0] tx_fifo_overflow,
  output logic [31:0] dec_dropped
);
  logic [1:0] frame_start;

  eth_interface u_eth (
    .gtx_rx_clk, .gtx_rx_rst, .gtx_rx_valid, .gtx_rx_blk, .gtx_rx_slip, .rx_locked,
    .gtx_tx_clk, .gtx_tx_rst, .gtx_tx_blk,
    .phy_tx_clk, .phy_tx_rst, .ch_en, .frame_start(frame_start[0]),
    .ch_tx_valid(enc_blk_valid), .ch_tx_sof(enc_blk_sof), .ch_tx_pad(enc_blk_pad), .ch_tx_blk(enc_blk),
    .phy_rx_clk, .phy_rx_rst, .ch_rx_valid(dec_blk_valid), .ch_rx_blk(dec_blk),
    .idle_deleted, .rx_fifo_overflow, .tx_fifo_overflow, .data_frames, .pad_frames, .pad_dropped,
    .eth_rx_frames, .eth_rx_fcs_err, .eth_rx_framing_err,
    .eth_tx_frames, .eth_tx_fcs_err, .eth_tx_framing_err
  );

  for (genvar b = 0; b < 2; b++) begin : g_band
    // ---------------- transmitter ----------------
    tx_band u_tx (
      .clk(phy_tx_clk), .rst(phy_tx_rst), .frame_start(frame_start[b]),
      .nib_in(enc_nib[b]), .take(enc_take[b]), .dac_sof(dac_sof[b]), .dac_smp(dac_smp[b])
    );

    // ---------------- receiver ----------------
    logic               found;
    logic signed [31:0] pk_re, pk_im;
    logic               cfo_done;
    logic signed [23:0] inc;

    coarse_sync u_sync (
      .clk(phy_rx_clk), .rst(phy_rx_rst), .in_valid(adc_valid), .in_smp(adc_smp[b]),
      .found, .timing(sync_timing[b]), .peak_re(pk_re), .peak_im(pk_im), .detections()
    );
    assign sync_found[b] = found;

    fine_timing u_fine (
      .clk(phy_rx_clk), .rst(phy_rx_rst), .in_valid(adc_valid), .in_smp(adc_smp[b]),
      .start(found), .t_coarse(sync_timing[b]),
      .done(fine_found[b]), .t_fine(fine_idx[b]), .offset()
    );

    cfo_estimator u_cfo_est (
      .clk(phy_rx_clk), .rst(phy_rx_rst), .start(found), .p_re(pk_re), .p_im(pk_im),
      .done(cfo_done), .angle(), .phase_inc(inc)
    );
    assign cfo_phase_inc[b] = inc;

    cfo_comp u_cfo_comp (
      .clk(phy_rx_clk), .rst(phy_rx_rst), .load(cfo_done), .phase_inc(inc),
      .in_valid(adc_valid), .in_smp(adc_smp[b]),
      .out_valid(rxf_in_valid[b]), .out_smp(rxf_in_smp[b])
    );

    logic                   pt_valid;
    logic [SYM_PER_CLK-1:0] pt_pilot;
    cplx_t                  pt_sym [SYM_PER_CLK];

    phase_track u_pt (
      .clk(phy_rx_clk), .rst(phy_rx_rst), .in_valid(rxf_sym_valid[b]), .in_sof(rxf_sym_sof[b]),
      .in_sym(rxf_sym[b]), .out_valid(pt_valid), .out_pilot(pt_pilot), .out_sym(pt_sym)
    );

    qam16_demapper #(.LW(6)) u_demap (
      .clk(phy_rx_clk), .rst(phy_rx_rst), .in_valid(pt_valid), .in_pilot(pt_pilot), .in_sym(pt_sym),
      .out_valid(dec_llr_valid[b]), .out_pilot(dec_llr_pilot[b]), .out_llr(dec_llr[b])
    );
  end

  ldpc_iter_ctrl #(.NCORES(NCORES), .BUF_BLKS(32)) u_iter (
    .clk(phy_rx_clk), .rst(phy_rx_rst), .blk_in(dec_blk_in), .core_done(dec_core_done),
    .core_start(dec_core_start), .core_band(dec_core_band), .core_slot(dec_core_slot),
    .core_iters(dec_core_iters), .level(), .dropped(dec_dropped)
  );
endmodule
