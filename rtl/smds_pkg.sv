// smds_pkg: constants, types and CRC functions shared by the SMDS interface.
//
// Cell (L2-PDU) layout, 53 bytes on the line:
//   byte 0        ACF  (access control field, handled by the DQDB MAC)
//   bytes 1..4    NCI  (network control information: VCI[19:0], PT[1:0], SP[1:0], HCS[7:0])
//   bytes 5..6    segment header: ST[1:0], MID[9:0], CSN[3:0]  (order as printed in the
//                 cell-structure figure)
//   bytes 7..50   44-byte segment payload
//   bytes 51..52  segment trailer: PL[5:0], CRC[9:0]
// Inside the SMDS interface the 52 bytes after the ACF (the "segment") travel as 13
// 32-bit words, most significant byte first, on the MAC_Request / MAC_Indicate buses.
//
// The sizes (53-byte cell, 44-byte payload, 10-bit MID, 4-bit CSN, 10-bit CRC, 9188-byte
// message, 270/260-byte STS-3c rows, 19.44 MHz byte clock) follow the document. The ACF
// bit layout, the NCI value, the HCS and CRC-10 polynomials and the 6-bit PL width are
// taken from IEEE 802.6 / SMDS practice, since the document does not print them.
package smds_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned CELL_BYTES     = 53;
  localparam int unsigned SEG_BYTES      = 52;   // cell without ACF
  localparam int unsigned SEG_WORDS      = 13;   // SEG_BYTES / 4
  localparam int unsigned PAYLOAD_BYTES  = 44;
  localparam int unsigned MID_W          = 10;
  localparam int unsigned CSN_W          = 4;
  localparam int unsigned PL_W           = 6;
  localparam int unsigned MAX_L3PDU      = 9188;
  localparam int unsigned MAX_CELLS_MSG  = (MAX_L3PDU + PAYLOAD_BYTES - 1) / PAYLOAD_BYTES; // 209

  // STS-3c frame: 9 rows of 270 bytes, 9 bytes transport overhead, 261-byte SPE row
  // (1 POH byte + 260 payload bytes).
  localparam int unsigned STS_ROWS        = 9;
  localparam int unsigned STS_ROW_BYTES   = 270;
  localparam int unsigned STS_TOH_BYTES   = 9;
  localparam int unsigned STS_SPE_ROW     = 261;
  localparam int unsigned STS_PAYLOAD_ROW = 260;
  localparam int unsigned BYTE_CLK_HZ     = 19_440_000;

  localparam logic [7:0] A1_BYTE = 8'b1111_0110;   // start-of-frame byte, three in a row

  // ---------------------------------------------------------------- segment types
  typedef enum logic [1:0] {
    ST_COM = 2'b00,   // continuation of message
    ST_EOM = 2'b01,   // end of message
    ST_BOM = 2'b10,   // beginning of message
    ST_SSM = 2'b11    // single segment message
  } seg_type_e;

  typedef struct packed {
    seg_type_e          st;
    logic [MID_W-1:0]   mid;
    logic [CSN_W-1:0]   csn;
  } seg_hdr_t;

  typedef struct packed {
    logic       busy;
    logic       sl_type;   // 0: queued-arbitrated slot
    logic       psr;
    logic [1:0] rsvd;
    logic [2:0] req;       // request bits, priority 2..0; this design uses req[0]
  } acf_t;

  // NCI carried by every SMDS cell: VCI all ones, payload type 0, segment priority 0.
  localparam logic [23:0] SMDS_NCI_TOP = 24'hFFFFF0;

  // ---------------------------------------------------------------- link status (H4[5:0])
  typedef enum logic [1:0] {
    LS_RX_LINK_DOWN = 2'd0,
    LS_RX_LINK_UP   = 2'd1,
    LS_CONNECTED    = 2'd2
  } link_state_e;

  localparam logic [5:0] LSC_DOWN      = 6'b000_000;
  localparam logic [5:0] LSC_UP        = 6'b111_000;
  localparam logic [5:0] LSC_CONNECTED = 6'b111_111;

  // Bus identification codes carried in M1.
  localparam logic [7:0] BUSID_A = 8'h01;
  localparam logic [7:0] BUSID_B = 8'h02;

  // First 24 bits of the NCI written into empty slots by the slot generator.
  localparam logic [23:0] IDLE_NCI_TOP = 24'hFFFFF0;

  // ---------------------------------------------------------------- CRCs
  // HCS: CRC-8, generator x^8 + x^2 + x + 1, over the first 24 NCI bits, with the coset
  // 01010101 added (as in ITU-T I.432) so that runs of zero bytes never look like a header.
  function automatic logic [7:0] hcs8(input logic [23:0] d);
    logic [7:0] c;
    c = '0;
    for (int i = 23; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ d[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c ^ 8'h55;
  endfunction

  // CRC-10, generator x^10 + x^9 + x^5 + x^4 + x + 1, MSB first. Feeds the upper n bits of d.
  function automatic logic [9:0] crc10_upd(input logic [9:0] crc, input logic [31:0] d,
                                           input int unsigned n);
    logic [9:0] c;
    c = crc;
    for (int i = 31; i >= 0; i--) begin
      if (32 - i <= n) begin
        logic fb;
        fb = c[9] ^ d[i];
        c  = {c[8:0], 1'b0};
        if (fb) c = c ^ 10'h233;
      end
    end
    return c;
  endfunction

endpackage
