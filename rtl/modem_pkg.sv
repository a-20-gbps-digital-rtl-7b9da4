// modem_pkg: types and constants shared by the 10 Gbps baseband platform of
// the backhaul modem. It fixes the 66-bit Ethernet block format, the PHY
// frame geometry (16 preamble clocks + 1176 data clocks at 312 MHz, 14 LDPC
// blocks and 252 pilots per frame), the 16QAM level coding and the complex
// sample format. Frame numbers follow the design description; sample widths,
// the idle block encoding and the level coding are this design's choices.
package modem_pkg;

  // ---------------- Ethernet 64b/66b blocks ----------------
  typedef struct packed {
    logic [1:0]  hdr;   // sync header: 2'b01 data, 2'b10 control
    logic [63:0] data;  // byte k is data[8k+7:8k], byte 0 first on the line
  } blk66_t;

  localparam logic [1:0] HDR_DATA = 2'b01;
  localparam logic [1:0] HDR_CTRL = 2'b10;
  // Control block with type 0x1E and eight idle control characters.
  localparam blk66_t IDLE_BLK = '{hdr: HDR_CTRL, data: 64'h0000_0000_0000_001E};

  // Filler for channel 1 when a flushed data frame has an odd number of
  // blocks: block type 0x1E with eight /E/ (0x1E) control characters. It keeps
  // the two channels' block counts equal and is discarded by the merger.
  localparam blk66_t FILL_BLK = '{hdr: HDR_CTRL, data: {{8{7'h1E}}, 8'h1E}};

  function automatic logic is_idle(blk66_t b);
    return b == IDLE_BLK;
  endfunction

  // Terminate control block (types 0x87 ... 0xFF): the last block of a frame
  function automatic logic is_term(blk66_t b);
    if (b.hdr != HDR_CTRL) return 1'b0;
    case (b.data[7:0])
      8'h87, 8'h99, 8'hAA, 8'hB4, 8'hCC, 8'hD2, 8'hE1, 8'hFF: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic is_start(blk66_t b);
    return b.hdr == HDR_CTRL && (b.data[7:0] == 8'h78 || b.data[7:0] == 8'h33);
  endfunction

  // ---------------- PHY frame geometry ----------------
  localparam int PRE_CLKS      = 16;    // preamble: 2 x 64 samples, 8 per clock
  localparam int DATA_CLKS     = 1176;  // 14 LDPC blocks + 252 pilots, 6 symbols per clock
  localparam int FRAME_CLKS    = PRE_CLKS + DATA_CLKS;
  localparam int SYM_PER_CLK   = 6;     // 1.875 GBd at 312 MHz
  localparam int SMP_PER_CLK   = 8;     // 2.5 GS/s at 312 MHz
  localparam int PRE_LEN       = 64;    // samples per preamble block
  localparam int DATA_PER_PIL  = 27;    // 6804 data symbols / 252 pilots
  localparam int SYM_PER_DBLK  = DATA_PER_PIL + 1;  // pilot + 27 data symbols
  localparam int LDPC_N        = 1944;
  localparam int LDPC_K        = 1458;  // rate 3/4
  localparam int LDPC_PER_FRM  = 14;
  localparam int FRAME_BLKS    = (LDPC_K * LDPC_PER_FRM) / 66;  // 309 Ethernet blocks per frame

  // ---------------- samples and symbols ----------------
  localparam int SW = 12;               // I/Q sample width (DAC/ADC word)
  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } cplx_t;

  // 16QAM level code per dimension: 0:-3, 1:-1, 2:+1, 3:+3
  typedef struct packed {
    logic [1:0] i;
    logic [1:0] q;
  } sym_t;

  // Gray mapping of a bit pair (b0 first) to a level code:
  // 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3
  function automatic logic [1:0] gray2lvl(logic b0, logic b1);
    case ({b0, b1})
      2'b00:   return 2'd0;
      2'b01:   return 2'd1;
      2'b11:   return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  // 4 coded bits (nib[3] first) to a 16QAM symbol: first pair on I, second on Q
  function automatic sym_t qam16_map(logic [3:0] nib);
    sym_t s;
    s.i = gray2lvl(nib[3], nib[2]);
    s.q = gray2lvl(nib[1], nib[0]);
    return s;
  endfunction

  function automatic int lvl2amp(logic [1:0] l);
    return 2 * int'(l) - 3;
  endfunction

  // Preamble: one 64-sample block, sent twice. Each sample is a QPSK point
  // (+/-PRE_AMP, +/-PRE_AMP) whose signs are two successive bits of the
  // x^7 + x^4 + 1 LFSR started from 7'h5A.
  localparam int PRE_AMP = 724;
  function automatic cplx_t preamble_sample(int k);
    logic [6:0] r = 7'h5A;
    logic b0, b1;
    cplx_t c;
    for (int n = 0; n <= k % PRE_LEN; n++) begin
      b0 = r[6] ^ r[3]; r = {r[5:0], b0};
      b1 = r[6] ^ r[3]; r = {r[5:0], b1};
      c.re = b0 ? SW'(-PRE_AMP) : SW'(PRE_AMP);
      c.im = b1 ? SW'(-PRE_AMP) : SW'(PRE_AMP);
    end
    return c;
  endfunction

  // Level unit of received symbols handed over by the receive filter.
  localparam int RX_UNIT_LOG2 = 9;      // +/-1 level = 512

endpackage
