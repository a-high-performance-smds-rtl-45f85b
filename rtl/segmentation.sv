// segmentation: turns one L3-PDU (SMDS message) from the bridge into 52-byte segments.
//
// The message arrives one byte per cycle (msg_valid/msg_ready, msg_last on the final byte).
// Bytes are gathered 44 at a time into a fill buffer. When 44 bytes are in, or the last
// byte has come, the fill buffer is copied into an output buffer and a segment header
// (ST, MID, CSN) and trailer (PL) are attached: BOM for the first of several segments, COM
// for the middle ones, EOM for the last, SSM for a message that fits one segment. CSN
// starts at 0 with each message and counts modulo 16; PL is the number of valid payload
// bytes, unused payload bytes are zero. The output buffer is sent as 13 words (seg_first
// on word 0, seg_last on word 12) while the next 44 bytes are being gathered, so a steady
// byte stream keeps the MAC fed with back-to-back cells.
//
// Word 0 carries the SMDS NCI with a zero HCS and the CRC field is zero: the MAC fills both
// in, as the document assigns CRC generation to the MAC. One message is segmented at a time,
// as in the document. The MID comes from MID page allocation and is sampled at the first
// byte of a message. Handshake, CSN start value and padding with zeros are this design's
// choices.
module segmentation
  import smds_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [MID_W-1:0] mid,
  // message in, from the bridge
  input  logic [7:0]       msg_data,
  input  logic             msg_valid,
  input  logic             msg_last,
  output logic             msg_ready,
  // segment out, MAC_Request[31:0]
  output logic [31:0]      seg_word,
  output logic             seg_valid,
  output logic             seg_first,
  output logic             seg_last,
  input  logic             seg_ready
);

  // fill side
  logic [PAYLOAD_BYTES*8-1:0] fill_buf;
  logic [5:0]                 fill_cnt;
  logic                       fill_done;   // fill buffer holds a finished segment payload
  logic                       fill_is_last;
  logic                       in_msg;      // at least one segment of this message was sent
  logic [CSN_W-1:0]           csn;
  logic [MID_W-1:0]           mid_q;

  // output side
  logic [SEG_BYTES*8-1:0]     out_buf;
  logic                       out_full;
  logic [3:0]                 out_word;

  logic out_load;
  assign out_load  = fill_done && (!out_full || (seg_valid && seg_ready && seg_last));
  assign msg_ready = !fill_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_buf     <= '0;
      fill_cnt     <= '0;
      fill_done    <= 1'b0;
      fill_is_last <= 1'b0;
      in_msg       <= 1'b0;
      csn          <= '0;
      mid_q        <= '0;
    end else begin
      if (msg_valid && msg_ready) begin
        if (fill_cnt == 0 && !in_msg) mid_q <= mid;
        fill_buf[(PAYLOAD_BYTES-1-fill_cnt)*8 +: 8] <= msg_data;
        fill_cnt <= fill_cnt + 1'b1;
        if (msg_last || fill_cnt == 6'(PAYLOAD_BYTES-1)) begin
          fill_done    <= 1'b1;
          fill_is_last <= msg_last;
        end
      end
      if (out_load) begin
        fill_done <= 1'b0;
        fill_cnt  <= '0;
        fill_buf  <= '0;
        in_msg    <= !fill_is_last;
        csn       <= fill_is_last ? '0 : csn + 1'b1;
      end
    end
  end

  seg_type_e st;
  always_comb begin
    unique case ({in_msg, fill_is_last})
      2'b00:   st = ST_BOM;
      2'b01:   st = ST_SSM;
      2'b10:   st = ST_COM;
      default: st = ST_EOM;
    endcase
  end

  seg_hdr_t hdr;
  assign hdr = '{st: st, mid: mid_q, csn: csn};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_buf  <= '0;
      out_full <= 1'b0;
      out_word <= '0;
    end else begin
      if (seg_valid && seg_ready) begin
        out_word <= seg_last ? 4'd0 : out_word + 1'b1;
        if (seg_last) out_full <= 1'b0;
      end
      if (out_load) begin
        out_buf  <= {SMDS_NCI_TOP, 8'h00, hdr, fill_buf, PL_W'(fill_cnt), 10'd0};
        out_full <= 1'b1;
        out_word <= '0;
      end
    end
  end

  assign seg_valid = out_full;
  assign seg_word  = out_buf[(SEG_WORDS-1-out_word)*32 +: 32];
  assign seg_first = out_word == 0;
  assign seg_last  = out_word == 4'(SEG_WORDS-1);

endmodule
