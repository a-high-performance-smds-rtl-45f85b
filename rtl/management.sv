// management: path-overhead (POH) management of the SMDS board at the STS-3c rate.
//
// Receive side, from the raw line bytes (rx_data, one per byte clock) and the POH bytes the
// PLCP separates out (rx_poh_*; index 0..8 = J1 B3 C2 G1 M1 H4 M2 Z4 Z5):
//   error indicators  LOS  all-zero bytes for T_LOS cycles (100 us)
//                     LOF  no start of frame (three A1 bytes, 11110110) for T_LOF cycles (3 ms)
//                     LOP  no J1 from the framer in LOP_FRAMES (8) consecutive frames
//   alarms            LAIS and PAIS come from the framer; FRF (far-end receive failure,
//                     path yellow) is read from G1 bit 3
//   bus identification M1 is compared with the Bus A code (busid_ok)
//   MID page allocation M2 feeds mid_page_alloc, which supplies the MID for segmentation
//   link status       a state machine rates the received link as rx_link_down, rx_link_up
//                     or connected from the error state, cell sync and the far end's link
//                     status code in H4[5:0]
//   start-up          busy cells may be sent only T_STARTUP cycles (7 s) after frames began
//                     to arrive without loss, and only while the far end's link status is
//                     connected or rx_link_up (tx_allowed)
// Transmit side: the nine outgoing POH bytes (tx_poh): G1 bit 3 = FRF when the received
// link fails, H4[5:0] = own link status, M1 = Bus B code and M2 = the repeated Bus B value
// with this node's reservation only in the Multiple-CPE configuration (zero in Single-CPE),
// other bytes zero.
//
// The time limits, the frame counts, the use of G1/H4/M1/M2 and the three link states are
// the document's. Bit positions within G1 and M2, the 6-bit link status codes, the bus
// codes and the state machine's transitions are this design's choices.
module management
  import smds_pkg::*;
#(
  parameter int unsigned T_LOS      = BYTE_CLK_HZ / 10_000,   // 100 us
  parameter int unsigned T_LOF      = BYTE_CLK_HZ / 1000 * 3, // 3 ms
  parameter int unsigned LOP_FRAMES = 8,
  parameter int unsigned T_STARTUP  = BYTE_CLK_HZ * 7         // 7 s
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             single_cpe,
  input  logic [7:0]       rx_data,
  input  logic             rx_poh_valid,
  input  logic [3:0]       rx_poh_idx,
  input  logic [7:0]       rx_poh_data,
  input  logic             rx_j1,
  input  logic             lais,
  input  logic             pais,
  input  logic             cell_sync,
  input  logic             search_timeout,
  // Bus B M2 stream (Multiple-CPE, from the second PLCP)
  input  logic [7:0]       b_m2_in,
  input  logic             b_m2_valid,
  // transmit POH
  output logic [7:0]       tx_poh [STS_ROWS],
  // status
  output logic             los,
  output logic             lof,
  output logic             lop,
  output logic             frf_rx,
  output logic             busid_ok,
  output link_state_e      link_state,
  output logic [5:0]       far_link_code,
  output logic             startup_done,
  output logic             tx_allowed,
  output logic [MID_W-1:0] mid,
  output logic             mid_valid,
  output logic             mid_lost,
  output logic             frame_start
);

  // ------------------------------------------------------------------ LOS
  logic [$clog2(T_LOS+1)-1:0] zcnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zcnt <= '0; los <= 1'b0;
    end else if (rx_data != 8'h00) begin
      zcnt <= '0; los <= 1'b0;
    end else if (32'(zcnt) + 1 >= T_LOS) begin
      los <= 1'b1;
    end else begin
      zcnt <= zcnt + 1'b1;
    end
  end

  // ------------------------------------------------------------------ LOF (A1 A1 A1)
  logic [7:0] a1_d1, a1_d2;
  logic [$clog2(T_LOF+1)-1:0] fcnt;
  assign frame_start = (rx_data == A1_BYTE) && (a1_d1 == A1_BYTE) && (a1_d2 == A1_BYTE);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a1_d1 <= '0; a1_d2 <= '0; fcnt <= '0; lof <= 1'b1;
    end else begin
      a1_d1 <= rx_data;
      a1_d2 <= a1_d1;
      if (frame_start) begin
        fcnt <= '0; lof <= 1'b0;
      end else if (32'(fcnt) + 1 >= T_LOF) begin
        lof <= 1'b1;
      end else begin
        fcnt <= fcnt + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------ LOP
  logic       j1_seen;
  logic [3:0] nj1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j1_seen <= 1'b0; nj1 <= '0; lop <= 1'b0;
    end else begin
      if (frame_start) begin
        j1_seen <= rx_j1;
        if (j1_seen) begin
          nj1 <= '0; lop <= 1'b0;
        end else if (32'(nj1) + 1 >= LOP_FRAMES) begin
          lop <= 1'b1;
        end else begin
          nj1 <= nj1 + 1'b1;
        end
      end else if (rx_j1) begin
        j1_seen <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------ POH bytes received
  logic [7:0] a_m2;
  logic       a_m2_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frf_rx <= 1'b0; busid_ok <= 1'b0; far_link_code <= LSC_DOWN; a_m2 <= '0; a_m2_v <= 1'b0;
    end else begin
      a_m2_v <= 1'b0;
      if (rx_poh_valid) begin
        unique case (rx_poh_idx)
          4'd3: frf_rx   <= rx_poh_data[3];
          4'd4: busid_ok <= rx_poh_data == BUSID_A;
          4'd5: if (rx_poh_data[5:0] == LSC_DOWN || rx_poh_data[5:0] == LSC_UP ||
                    rx_poh_data[5:0] == LSC_CONNECTED)
                  far_link_code <= rx_poh_data[5:0];
          4'd6: begin a_m2 <= rx_poh_data; a_m2_v <= 1'b1; end
          default: ;
        endcase
      end
    end
  end

  logic [7:0] b_m2_out, b_m2_q;
  mid_page_alloc u_mid (
    .clk, .rst_n, .single_cpe,
    .a_m2_in   (a_m2),
    .a_m2_valid(a_m2_v),
    .b_m2_in, .b_m2_valid, .b_m2_out,
    .mid, .mid_valid, .mid_lost,
    .a_step_err(),
    .a_count   ()
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_m2_q <= '0;
    else if (b_m2_valid) b_m2_q <= b_m2_out;
  end

  // ------------------------------------------------------------------ link status
  logic rx_err;
  assign rx_err = los || lof || lop || lais || pais;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_state <= LS_RX_LINK_DOWN;
    end else if (rx_err || !cell_sync || search_timeout) begin
      link_state <= LS_RX_LINK_DOWN;
    end else begin
      unique case (link_state)
        LS_RX_LINK_DOWN: link_state <= LS_RX_LINK_UP;
        LS_RX_LINK_UP:   if (far_link_code != LSC_DOWN) link_state <= LS_CONNECTED;
        LS_CONNECTED:    if (far_link_code == LSC_DOWN) link_state <= LS_RX_LINK_UP;
        default:         link_state <= LS_RX_LINK_DOWN;
      endcase
    end
  end

  // ------------------------------------------------------------------ start-up wait
  logic [$clog2(T_STARTUP+1)-1:0] scnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scnt <= '0; startup_done <= 1'b0;
    end else if (los || lof) begin
      scnt <= '0; startup_done <= 1'b0;
    end else if (32'(scnt) + 1 >= T_STARTUP) begin
      startup_done <= 1'b1;
    end else begin
      scnt <= scnt + 1'b1;
    end
  end

  assign tx_allowed = startup_done && !rx_err &&
                      (far_link_code == LSC_UP || far_link_code == LSC_CONNECTED);

  // ------------------------------------------------------------------ transmit POH
  logic [5:0] own_code;
  always_comb begin
    unique case (link_state)
      LS_CONNECTED:  own_code = LSC_CONNECTED;
      LS_RX_LINK_UP: own_code = LSC_UP;
      default:       own_code = LSC_DOWN;
    endcase
    for (int i = 0; i < STS_ROWS; i++) tx_poh[i] = 8'h00;
    tx_poh[3] = {4'b0000, rx_err, 3'b000};               // G1: FRF
    tx_poh[4] = single_cpe ? 8'h00 : BUSID_B;            // M1
    tx_poh[5] = {2'b00, own_code};                       // H4: link status
    tx_poh[6] = single_cpe ? 8'h00 : b_m2_q;             // M2
  end

endmodule
