// mac_tx: transmit side of the DQDB MAC: transmit control, transmit shift register,
// BUSY/REQ control and the output multiplexer onto PHY_Request.
//
// The MAC sits in its bus: every byte arriving on phy_in (PHY side, from upstream, phy_in_sos
// on the ACF of each slot) leaves on phy_out in the same cycle. A segment of 13 words is
// loaded from the SAR (MAC_Request, req_valid/req_ready) into the segment buffer; while it
// loads, CRC-10 over the segment header, payload and PL is computed. At the ACF of a slot
// that is empty (BUSY = 0, queued-arbitrated), the node takes it if it has a segment and
// the queue allows it (dqdb_queue); it sets BUSY and puts its 52 bytes in place of the
// slot's, with the HCS filled into the fourth NCI byte and the CRC into the trailer.
// On taking a slot the segment moves to a send register, so the load buffer can take the
// next segment while this one is written and the very next slot can be used.
// BUSY/REQ control also sets a REQ bit in the first slot with REQ clear after the other
// MAC asked for one (req_set_in), and reports REQ bits it sees (req_seen_out).
//
// What follows the document: cells are sent when an empty cell arrives and access is
// granted, the MAC adds the CRC. Combinational repeating, the ACF layout and REQ handling
// are this design's choices from IEEE 802.6.
module mac_tx
  import smds_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        single_cpe,
  input  logic        tx_enable,     // management allows busy cells to be sent
  // MAC_Request
  input  logic [31:0] req_word,
  input  logic        req_valid,
  input  logic        req_first,
  output logic        req_ready,
  // bus
  input  logic [7:0]  phy_in_data,
  input  logic        phy_in_valid,
  input  logic        phy_in_sos,
  output logic [7:0]  phy_out_data,
  output logic        phy_out_valid,
  output logic        phy_out_sos,
  // queue control to/from the other MAC
  input  logic        req_other,     // REQ seen on the other bus
  input  logic        req_set_in,    // other MAC asks this one to send a REQ
  output logic        req_seen_out,  // REQ seen on this bus
  output logic        req_send_out,  // ask the other MAC to send a REQ
  output logic        sent,          // pulse: segment written into a slot
  output logic [7:0]  rq,            // DQDB request counter
  output logic [7:0]  cd             // DQDB countdown counter
);

  logic [SEG_BYTES*8-1:0] buf_q, snd_q;   // load buffer, send register
  logic [9:0]  snd_crc;
  logic [3:0]  ld_cnt;
  logic        have_seg;
  logic [9:0]  crc_q;
  logic [5:0]  idx_q;
  logic [5:0]  idx;
  logic        writing;
  logic [3:0]  req_pend;
  logic        queued;
  logic        take, empty_slot, may_send, set_req;

  assign req_ready = !have_seg;
  assign idx       = phy_in_sos ? 6'd0 : idx_q;

  // segment buffer load with running CRC-10
  logic [3:0] w;                        // word index of req_word
  assign w = req_first ? 4'd0 : ld_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0; ld_cnt <= '0; have_seg <= 1'b0; crc_q <= '0;
    end else begin
      if (req_valid && req_ready) begin
        buf_q[(SEG_WORDS-1-32'(w))*32 +: 32] <= req_word;
        ld_cnt <= w + 1'b1;
        if (w == 4'd0)       crc_q <= '0;
        else if (w == 4'd12) crc_q <= crc10_upd(crc_q, req_word, 22);
        else                 crc_q <= crc10_upd(crc_q, req_word, 32);
        if (w == 4'(SEG_WORDS-1)) have_seg <= 1'b1;
      end
      if (take) have_seg <= 1'b0;
    end
  end
  assign queued = req_valid && req_ready && !req_first && ld_cnt == 4'(SEG_WORDS-1);

  // slot handling
  acf_t acf_in, acf_out;
  assign acf_in     = acf_t'(phy_in_data);
  assign empty_slot = phy_in_valid && idx == 0 && !acf_in.busy && !acf_in.sl_type;
  assign take       = empty_slot && have_seg && may_send && tx_enable;
  assign set_req    = phy_in_valid && idx == 0 && !acf_in.req[0] && req_pend != 0;

  always_comb begin
    acf_out = acf_in;
    if (take)    acf_out.busy   = 1'b1;
    if (set_req) acf_out.req[0] = 1'b1;
  end

  logic [5:0] sb;                       // segment byte index
  logic [7:0] seg_byte;
  assign sb = idx - 6'd1;
  always_comb begin
    seg_byte = snd_q[(SEG_BYTES-1-32'(sb))*8 +: 8];
    if (sb == 6'd3)  seg_byte = hcs8(snd_q[SEG_BYTES*8-1 -: 24]);
    if (sb == 6'd50) seg_byte = {snd_q[15:10], snd_crc[9:8]};
    if (sb == 6'd51) seg_byte = snd_crc[7:0];
  end

  always_comb begin
    phy_out_valid = phy_in_valid;
    phy_out_sos   = phy_in_sos;
    if (idx == 0)                  phy_out_data = acf_out;
    else if (writing && idx <= 52) phy_out_data = seg_byte;
    else                           phy_out_data = phy_in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q <= 6'd53; writing <= 1'b0; req_pend <= '0; snd_q <= '0; snd_crc <= '0;
    end else begin
      if (take) begin snd_q <= buf_q; snd_crc <= crc_q; end
      if (phy_in_valid) begin
        idx_q <= (idx >= 6'd53) ? 6'd53 : idx + 1'b1;
        if (idx == 0) writing <= take;
      end
      unique case ({req_set_in && req_pend != '1, set_req})
        2'b10:   req_pend <= req_pend + 1'b1;
        2'b01:   req_pend <= req_pend - 1'b1;
        default: ;
      endcase
    end
  end

  assign sent         = phy_in_valid && writing && idx == 6'd52;
  assign req_seen_out = phy_in_valid && idx == 0 && acf_in.req[0];

  dqdb_queue #(.RQ_W(8)) u_queue (
    .clk, .rst_n, .single_cpe,
    .queued,
    .req_other,
    .empty_pass (empty_slot && !take),
    .sent       (take),
    .may_send,
    .req_send   (req_send_out),
    .rq,
    .cd
  );

endmodule
