// mac_rx: receive side of the DQDB MAC: receive shift register, receive control, MID control
// with the 1k x 2 MID lookup table, and the output buffer onto MAC_Indicate.
//
// Every slot on the bus (phy_in, phy_in_sos on the ACF) is shifted in. At the end of a slot
// that is busy and queued-arbitrated, receive control decides whether the cell is for this
// node:
//   BOM  accepted when the external address logic reports a destination match
//        (ext_addr_match, judged on rx_da, the DA field of the message header in the BOM
//        payload); the MID is marked in progress in the MID table
//   SSM  accepted on an address match
//   COM  accepted when its MID is in progress
//   EOM  accepted when its MID is in progress; the MID is released
// CRC-10 is checked over the 48 bytes from the segment header to the trailer, on the fly.
// Accepted cells go to the SAR as 13 words on consecutive cycles with ind_crc_ok, whether or
// not the CRC passed, as the document describes. Cell order is not checked (that is left
// to the SAR). Exceptions are reported to the host as a one-cycle pulse with a code: a BOM
// for a MID already in progress, or an EOM ending a message in which a cell failed CRC.
// The second bit of each MID-table entry records that failure; the meaning of the two bits
// is this design's choice, the 1k x 2 size is the document's.
module mac_rx
  import smds_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  phy_in_data,
  input  logic        phy_in_valid,
  input  logic        phy_in_sos,
  // external address match
  output logic [63:0] rx_da,
  output logic        rx_da_valid,
  input  logic        ext_addr_match,
  // MAC_Indicate
  output logic [31:0] ind_word,
  output logic        ind_valid,
  output logic        ind_first,
  output logic        ind_last,
  output logic        ind_crc_ok,
  // host exceptions
  output logic        exc_valid,
  output logic [1:0]  exc_code        // 1: duplicate BOM, 2: message with CRC error
);

  logic [5:0]  idx_q, idx;
  logic [SEG_BYTES*8-1:0] sh;
  logic        acf_busy, acf_qa;
  logic [9:0]  crc_q;
  logic        decide;
  logic [1023:0] tab_prog, tab_err;   // MID lookup table, 1k x 2

  assign idx = phy_in_sos ? 6'd0 : idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q <= 6'd53; sh <= '0; acf_busy <= 1'b0; acf_qa <= 1'b0; crc_q <= '0; decide <= 1'b0;
    end else begin
      decide <= 1'b0;
      if (phy_in_valid) begin
        idx_q <= (idx >= 6'd53) ? 6'd53 : idx + 1'b1;
        if (idx == 0) begin
          acf_busy <= phy_in_data[7];
          acf_qa   <= !phy_in_data[6];
        end else if (idx <= 52) begin
          sh <= {sh[SEG_BYTES*8-9:0], phy_in_data};
        end
        if (idx == 5)                   crc_q <= crc10_upd(10'd0,  {phy_in_data, 24'd0}, 8);
        else if (idx > 5 && idx <= 52)  crc_q <= crc10_upd(crc_q, {phy_in_data, 24'd0}, 8);
        if (idx == 52) decide <= 1'b1;
      end
    end
  end

  seg_hdr_t hdr;
  logic     crc_ok, accept;
  assign hdr         = seg_hdr_t'(sh[(SEG_BYTES-4)*8-1 -: 16]);
  assign crc_ok      = crc_q == 10'd0;
  assign rx_da       = sh[(SEG_BYTES-10)*8-1 -: 64];
  assign rx_da_valid = decide && acf_busy && acf_qa;

  always_comb begin
    accept = 1'b0;
    if (decide && acf_busy && acf_qa) begin
      unique case (hdr.st)
        ST_BOM, ST_SSM: accept = ext_addr_match;
        default:        accept = tab_prog[hdr.mid];
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tab_prog <= '0; tab_err <= '0; exc_valid <= 1'b0; exc_code <= '0;
    end else begin
      exc_valid <= 1'b0;
      if (accept) begin
        unique case (hdr.st)
          ST_BOM: begin
            if (tab_prog[hdr.mid]) begin
              exc_valid <= 1'b1; exc_code <= 2'd1;
            end
            tab_prog[hdr.mid] <= 1'b1;
            tab_err[hdr.mid]  <= !crc_ok;
          end
          ST_COM: if (!crc_ok) tab_err[hdr.mid] <= 1'b1;
          ST_EOM: begin
            tab_prog[hdr.mid] <= 1'b0;
            if (tab_err[hdr.mid] || !crc_ok) begin
              exc_valid <= 1'b1; exc_code <= 2'd2;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // output buffer
  logic [SEG_BYTES*8-1:0] obuf;
  logic [3:0] ocnt;
  logic       obusy, ocrc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      obuf <= '0; ocnt <= '0; obusy <= 1'b0; ocrc <= 1'b0;
    end else begin
      if (obusy) begin
        ocnt <= ocnt + 1'b1;
        if (ocnt == 4'(SEG_WORDS-1)) obusy <= 1'b0;
      end
      if (accept) begin
        obuf <= sh; ocnt <= '0; obusy <= 1'b1; ocrc <= crc_ok;
      end
    end
  end

  assign ind_valid  = obusy;
  assign ind_word   = obuf[(SEG_WORDS-1-32'(ocnt))*32 +: 32];
  assign ind_first  = obusy && ocnt == 0;
  assign ind_last   = obusy && ocnt == 4'(SEG_WORDS-1);
  assign ind_crc_ok = ocrc;

endmodule
