// smds_interface: an SMDS (Switched Multi-megabit Data Service) interface at the SONET
// STS-3c rate, in the Single-CPE configuration, running on the 19.44 MHz byte clock.
//
// Two boards' worth of logic:
//   SAR board   segmentation (messages from the bridge -> 52-byte segments) and reassembly
//               (cells of up to 128 interleaved, mis-ordered messages -> messages)
//   SMDS board  MAC A (on Bus A, receives from the switching system), MAC B (on Bus B,
//               transmits to it), the STS-3c PLCP and the POH management
// Data paths:
//   transmit  msg_in -> segmentation -> MAC B -> PLCP transmit -> tx_data to the framer
//   receive   framer rx_* -> PLCP receive (POH split, cell delineation) -> MAC A ->
//             reassembly -> msg_out
// In the Single-CPE configuration this node heads Bus B: the PLCP transmit side opens slots
// in the outgoing payload and supplies their empty content (a valid idle header), which MAC
// B passes on or replaces with a busy cell. Timing: MAC B's slot byte reaches tx_data in
// the cycle the framer asks for it; received cells reach MAC A 4 bytes after the PLCP, and
// a message leaves reassembly once its last cell is filed. Busy cells go out only when the
// management allows it (start-up wait, far-end link status) and a MID has been obtained.
// External address match is a comparison of the received DA with my_address. The split
// into SAR and SMDS boards and the blocks in each follow the document; the wiring details,
// the address comparison and the Multiple-CPE pins are this design's choices.
//
// Multiple-CPE pins: where the second PLCP (Bus B receive, Bus A transmit) would connect,
// its signals are brought out: busb_in_data is the upstream Bus B slot byte, aligned to
// busb_slot_valid/busb_slot_sos and used when single_cpe = 0; busa_out_* is MAC A's output
// on Bus A; b_m2_* is the Bus B M2 stream. The framer, optics and clock recovery are
// outside this module.
module smds_interface
  import smds_pkg::*;
#(
  parameter int unsigned N_MSG     = 128,
  parameter int unsigned MSG_SLOTS = 256,
  parameter int unsigned N_CELLS   = 4096,
  parameter int unsigned T_SEARCH  = BYTE_CLK_HZ / 1000,
  parameter int unsigned T_LOS     = BYTE_CLK_HZ / 10_000,
  parameter int unsigned T_LOF     = BYTE_CLK_HZ / 1000 * 3,
  parameter int unsigned T_STARTUP = BYTE_CLK_HZ * 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             single_cpe,
  input  logic [63:0]      my_address,
  // bridge: messages to send
  input  logic [7:0]       msg_in_data,
  input  logic             msg_in_valid,
  input  logic             msg_in_last,
  output logic             msg_in_ready,
  // bridge: reassembled messages
  output logic [7:0]       msg_out_data,
  output logic             msg_out_valid,
  output logic             msg_out_last,
  input  logic             msg_out_ready,
  // framer receive
  input  logic [7:0]       rx_data,
  input  logic             rx_spe,
  input  logic             rx_j1,
  input  logic             rx_lais,
  input  logic             rx_pais,
  // framer transmit
  input  logic             tx_req,
  input  logic             tx_j1,
  output logic [7:0]       tx_data,
  // Multiple-CPE connections
  output logic             busb_slot_valid,
  output logic             busb_slot_sos,
  input  logic [7:0]       busb_in_data,
  output logic [7:0]       busa_out_data,
  output logic             busa_out_valid,
  output logic             busa_out_sos,
  input  logic [7:0]       b_m2_in,
  input  logic             b_m2_valid,
  // status
  output logic             los,
  output logic             lof,
  output logic             lop,
  output logic             frf_rx,
  output logic             busid_ok,
  output link_state_e      link_state,
  output logic             tx_allowed,
  output logic             cell_sync,
  output logic             search_timeout,
  output logic [MID_W-1:0] mid,
  output logic             mid_valid,
  output logic             mid_lost,
  output logic             mac_exc_valid,
  output logic [1:0]       mac_exc_code,
  output logic             cell_sent,
  output logic [15:0]      msgs_done,
  output logic [15:0]      drop_crc,
  output logic [15:0]      drop_orphan,
  output logic [15:0]      drop_full,
  output logic [15:0]      drop_dup
);

  // segmentation -> MAC B
  logic [31:0] sg_word;
  logic        sg_valid, sg_first, sg_last, sg_ready;

  segmentation u_seg (
    .clk, .rst_n, .mid,
    .msg_data (msg_in_data), .msg_valid(msg_in_valid), .msg_last(msg_in_last),
    .msg_ready(msg_in_ready),
    .seg_word (sg_word), .seg_valid(sg_valid), .seg_first(sg_first), .seg_last(sg_last),
    .seg_ready(sg_ready)
  );

  // PLCP
  logic       poh_v, rx_frame;
  logic [3:0] poh_idx;
  logic [7:0] poh_d;
  logic [7:0] c_data;
  logic       c_valid, c_sos;
  logic       sl_valid, sl_sos;
  logic [7:0] sl_data, sl_idle;
  logic [7:0] tx_poh [STS_ROWS];

  plcp_sts3c #(.T_SEARCH(T_SEARCH)) u_plcp (
    .clk, .rst_n,
    .rx_data, .rx_spe, .rx_j1,
    .rx_poh_valid(poh_v), .rx_poh_idx(poh_idx), .rx_poh_data(poh_d), .rx_frame,
    .cell_data(c_data), .cell_valid(c_valid), .cell_sos(c_sos),
    .in_sync(cell_sync), .search_timeout,
    .tx_req, .tx_j1, .tx_data, .tx_poh,
    .tx_poh_strobe(), .tx_poh_idx(),
    .slot_valid(sl_valid), .slot_sos(sl_sos), .slot_idle(sl_idle), .slot_data(sl_data)
  );
  assign busb_slot_valid = sl_valid;
  assign busb_slot_sos   = sl_sos;

  // MACs
  logic [63:0] da_a, da_b;
  logic        a_seen, a_send, b_seen, b_send;
  logic [31:0] ind_word;
  logic        ind_valid, ind_first, ind_last, ind_crc;

  dqdb_mac u_mac_a (
    .clk, .rst_n, .single_cpe,
    .tx_enable          (1'b0),
    .mac_request        (32'd0),
    .mac_request_valid  (1'b0),
    .mac_request_first  (1'b0),
    .mac_request_ready  (),
    .mac_indicate       (ind_word),
    .mac_indicate_valid (ind_valid),
    .mac_indicate_first (ind_first),
    .mac_indicate_last  (ind_last),
    .mac_indicate_crc_ok(ind_crc),
    .phy_indicate       (c_data),
    .phy_indicate_valid (c_valid),
    .phy_indicate_sos   (c_sos),
    .phy_request        (busa_out_data),
    .phy_request_valid  (busa_out_valid),
    .phy_request_sos    (busa_out_sos),
    .rx_da              (da_a),
    .rx_da_valid        (),
    .ext_addr_match     (da_a == my_address),
    .req_other          (b_seen),
    .req_set_in         (b_send),
    .req_seen_out       (a_seen),
    .req_send_out       (a_send),
    .tx_sent            (),
    .rq                 (),
    .cd                 (),
    .exc_valid          (mac_exc_valid),
    .exc_code           (mac_exc_code)
  );

  dqdb_mac u_mac_b (
    .clk, .rst_n, .single_cpe,
    .tx_enable          (tx_allowed && mid_valid),
    .mac_request        (sg_word),
    .mac_request_valid  (sg_valid),
    .mac_request_first  (sg_first),
    .mac_request_ready  (sg_ready),
    .mac_indicate       (),
    .mac_indicate_valid (),
    .mac_indicate_first (),
    .mac_indicate_last  (),
    .mac_indicate_crc_ok(),
    .phy_indicate       (single_cpe ? sl_idle : busb_in_data),
    .phy_indicate_valid (sl_valid),
    .phy_indicate_sos   (sl_sos),
    .phy_request        (sl_data),
    .phy_request_valid  (),
    .phy_request_sos    (),
    .rx_da              (da_b),
    .rx_da_valid        (),
    .ext_addr_match     (da_b == my_address),
    .req_other          (a_seen),
    .req_set_in         (a_send),
    .req_seen_out       (b_seen),
    .req_send_out       (b_send),
    .tx_sent            (cell_sent),
    .rq                 (),
    .cd                 (),
    .exc_valid          (),
    .exc_code           ()
  );

  reassembly #(.N_MSG(N_MSG), .MSG_SLOTS(MSG_SLOTS), .N_CELLS(N_CELLS)) u_reasm (
    .clk, .rst_n,
    .in_word(ind_word), .in_valid(ind_valid), .in_first(ind_first), .in_last(ind_last),
    .in_crc_ok(ind_crc),
    .out_data(msg_out_data), .out_valid(msg_out_valid), .out_last(msg_out_last),
    .out_ready(msg_out_ready),
    .msgs_done, .drop_crc, .drop_orphan, .drop_full, .drop_dup
  );

  management #(.T_LOS(T_LOS), .T_LOF(T_LOF), .T_STARTUP(T_STARTUP)) u_mgmt (
    .clk, .rst_n, .single_cpe,
    .rx_data,
    .rx_poh_valid(poh_v), .rx_poh_idx(poh_idx), .rx_poh_data(poh_d),
    .rx_j1       (rx_frame),
    .lais(rx_lais), .pais(rx_pais),
    .cell_sync, .search_timeout,
    .b_m2_in, .b_m2_valid,
    .tx_poh,
    .los, .lof, .lop, .frf_rx, .busid_ok, .link_state,
    .far_link_code(), .startup_done(), .tx_allowed,
    .mid, .mid_valid, .mid_lost,
    .frame_start()
  );

endmodule
