// traffic_monitor: watches a descrambled 66-bit block stream and counts
// Ethernet frames, frames with a bad frame check sequence and framing errors.
// Two instances sit at the output of the RX FIFO (Eth_rx) and of the TX FIFO
// (Eth_tx), so link problems can be located while user traffic runs.
// A frame opens with a start control block (type 0x78, start in lane 0; its
// seven bytes are preamble and SFD), continues with data blocks and closes
// with one of the eight terminate blocks (0x87 ... 0xFF, carrying 0 to 7 last
// bytes). The CRC-32 of IEEE 802.3 (reflected, polynomial 0x04C11DB7, preset
// to all ones) runs over all bytes after the SFD, FCS included; a good frame
// leaves the residue 0xDEBB20E3. Framing errors: a data or terminate block
// outside a frame, a start block or any other control block inside one, and
// an invalid sync header. Up to eight bytes enter the CRC per clock; counters
// update one clock after the block. Start in lane 4 (type 0x33) is not
// recognised and counts as a framing error if it appears inside a frame.
module traffic_monitor
  import modem_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  blk66_t      in_blk,
  output logic [31:0] frames,
  output logic [31:0] fcs_errors,
  output logic [31:0] framing_errors
);
  localparam logic [31:0] CRC_RESIDUE = 32'hDEBB20E3;

  function automatic logic [31:0] crc_bytes(logic [31:0] c, logic [63:0] d, int first, int n);
    for (int b = 0; b < 8; b++) begin
      if (b >= first && b < first + n) begin
        for (int k = 0; k < 8; k++) begin
          logic fb = c[0] ^ d[8*b+k];
          c = c >> 1;
          if (fb) c = c ^ 32'hEDB88320;
        end
      end
    end
    return c;
  endfunction

  logic        in_frame;
  logic [31:0] crc;

  typedef enum logic [2:0] {K_DATA, K_START, K_TERM, K_OTHER, K_BAD} kind_e;
  kind_e kind;
  int    nterm;

  always_comb begin
    nterm = 0;
    if (in_blk.hdr == HDR_DATA) kind = K_DATA;
    else if (in_blk.hdr != HDR_CTRL) kind = K_BAD;
    else begin
      kind = K_TERM;
      unique case (in_blk.data[7:0])
        8'h78: kind = K_START;
        8'h87: nterm = 0;
        8'h99: nterm = 1;
        8'hAA: nterm = 2;
        8'hB4: nterm = 3;
        8'hCC: nterm = 4;
        8'hD2: nterm = 5;
        8'hE1: nterm = 6;
        8'hFF: nterm = 7;
        default: kind = K_OTHER;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame <= 1'b0; crc <= '1;
      frames <= '0; fcs_errors <= '0; framing_errors <= '0;
    end else if (in_valid) begin
      case (kind)
        K_START: begin
          if (in_frame) framing_errors <= framing_errors + 1;
          in_frame <= 1'b1;
          crc      <= '1;
        end
        K_DATA: begin
          if (in_frame) crc <= crc_bytes(crc, in_blk.data, 0, 8);
          else          framing_errors <= framing_errors + 1;
        end
        K_TERM: begin
          if (in_frame) begin
            frames <= frames + 1;
            if (crc_bytes(crc, in_blk.data, 1, nterm) != CRC_RESIDUE) fcs_errors <= fcs_errors + 1;
          end else begin
            framing_errors <= framing_errors + 1;
          end
          in_frame <= 1'b0;
        end
        K_BAD: begin
          framing_errors <= framing_errors + 1;
          in_frame <= 1'b0;
        end
        default: begin
          if (in_frame) begin
            framing_errors <= framing_errors + 1;
            in_frame <= 1'b0;
          end
        end
      endcase
    end
  end
endmodule
