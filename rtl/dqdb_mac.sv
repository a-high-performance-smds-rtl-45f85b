// dqdb_mac: one DQDB MAC, attached to one bus (two per CPE: MAC A on Bus A, MAC B on Bus B).
//
// Transmit (mac_tx): takes 13-word segments from the SAR on MAC_Request, waits for an empty
// slot the distributed queue lets it use (any empty slot in the Single-CPE configuration)
// and writes the segment into it with HCS and CRC-10 added. Receive (mac_rx): copies BOM/SSM
// cells with a matching external address and COM/EOM cells of messages in progress (MID
// lookup table), checks CRC-10 and hands the cells to the SAR on MAC_Indicate with a CRC
// flag. The bus passes through from PHY_Indicate to PHY_Request in the same cycle, the MAC
// changing only the ACF and the slots it writes. The queue-control pins connect the two MACs
// of a node: REQ bits seen on one bus feed the other MAC's request counter, and each MAC
// sends REQs on the other's bus.
//
// The block structure (transmit, receive, MID control, counters, queue control, BUSY/REQ
// control, shift registers) follows the document's MAC block diagram; the bus widths
// MAC_Request[31:0], MAC_Indicate[31:0], PHY_Request[7:0] and PHY_Indicate[7:0] are the
// document's. The byte-level timing (a slot is 53 phy_*_valid strobes, phy_*_sos on the
// first) is this design's.
module dqdb_mac
  import smds_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        single_cpe,
  input  logic        tx_enable,
  // MAC_Request (from segmentation)
  input  logic [31:0] mac_request,
  input  logic        mac_request_valid,
  input  logic        mac_request_first,
  output logic        mac_request_ready,
  // MAC_Indicate (to reassembly)
  output logic [31:0] mac_indicate,
  output logic        mac_indicate_valid,
  output logic        mac_indicate_first,
  output logic        mac_indicate_last,
  output logic        mac_indicate_crc_ok,
  // PHY_Indicate (bus in) and PHY_Request (bus out)
  input  logic [7:0]  phy_indicate,
  input  logic        phy_indicate_valid,
  input  logic        phy_indicate_sos,
  output logic [7:0]  phy_request,
  output logic        phy_request_valid,
  output logic        phy_request_sos,
  // external address match
  output logic [63:0] rx_da,
  output logic        rx_da_valid,
  input  logic        ext_addr_match,
  // queue control to/from the other MAC
  input  logic        req_other,
  input  logic        req_set_in,
  output logic        req_seen_out,
  output logic        req_send_out,
  // status
  output logic        tx_sent,
  output logic [7:0]  rq,
  output logic [7:0]  cd,
  output logic        exc_valid,
  output logic [1:0]  exc_code
);

  mac_tx u_tx (
    .clk, .rst_n, .single_cpe, .tx_enable,
    .req_word     (mac_request),
    .req_valid    (mac_request_valid),
    .req_first    (mac_request_first),
    .req_ready    (mac_request_ready),
    .phy_in_data  (phy_indicate),
    .phy_in_valid (phy_indicate_valid),
    .phy_in_sos   (phy_indicate_sos),
    .phy_out_data (phy_request),
    .phy_out_valid(phy_request_valid),
    .phy_out_sos  (phy_request_sos),
    .req_other, .req_set_in, .req_seen_out, .req_send_out,
    .sent         (tx_sent),
    .rq, .cd
  );

  mac_rx u_rx (
    .clk, .rst_n,
    .phy_in_data  (phy_indicate),
    .phy_in_valid (phy_indicate_valid),
    .phy_in_sos   (phy_indicate_sos),
    .rx_da, .rx_da_valid, .ext_addr_match,
    .ind_word     (mac_indicate),
    .ind_valid    (mac_indicate_valid),
    .ind_first    (mac_indicate_first),
    .ind_last     (mac_indicate_last),
    .ind_crc_ok   (mac_indicate_crc_ok),
    .exc_valid, .exc_code
  );

endmodule
