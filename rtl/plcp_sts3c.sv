// plcp_sts3c: Physical Layer Convergence Protocol for the STS-3c rate (155 Mbit/s).
//
// The framer hands over the synchronous payload envelope (SPE) byte by byte. Each SPE row
// is 261 bytes: one path overhead (POH) byte followed by 260 payload bytes; J1, the first
// POH byte, is flagged by the framer. The POH bytes of a frame are, in order, J1 B3 C2 G1 M1
// H4 M2 Z4 Z5 (as printed in the STS-3c frame figure).
//
// Receive: rx_spe marks SPE bytes and rx_j1 the J1 byte. The PLCP counts columns from J1;
// POH bytes go to management (rx_poh_valid, rx_poh_idx 0..8, rx_poh_data), payload bytes go
// to cell delineation, which finds the cells (they float and straddle rows and frames) and
// passes them to the MAC (cell_*). No POH is processed before the first J1.
//
// Transmit: tx_req asks for one SPE byte in this cycle and tx_j1 marks the J1 position. At
// POH positions tx_data is the management byte tx_poh[row]; at payload positions the PLCP
// opens a 53-byte slot stream (slot_valid, slot_sos on its first byte) and returns the byte
// the MAC puts on that slot (slot_data), in the same cycle. Cells thus run back to back
// through the 260-byte rows. As slot generator at the head of the bus the PLCP also offers
// slot_idle, the content of an empty slot at the current slot byte: ACF 0, NCI FFFFF0 with
// its HCS, zero payload. The header gives the far end's cell delineation one position to
// lock to, since a stream of all-zero slots has none. This empty-slot content is this
// design's choice; the document does not describe it. The offset indicator (H4 pointer) is not used, as in the
// document's design, which relies on the framing state machine only.
module plcp_sts3c
  import smds_pkg::*;
#(
  parameter int unsigned T_SEARCH = BYTE_CLK_HZ / 1000
) (
  input  logic       clk,
  input  logic       rst_n,
  // framer receive side
  input  logic [7:0] rx_data,
  input  logic       rx_spe,
  input  logic       rx_j1,
  // to management
  output logic       rx_poh_valid,
  output logic [3:0] rx_poh_idx,
  output logic [7:0] rx_poh_data,
  output logic       rx_frame,        // pulse with each J1
  // to the MAC (PHY_Indicate)
  output logic [7:0] cell_data,
  output logic       cell_valid,
  output logic       cell_sos,
  output logic       in_sync,
  output logic       search_timeout,
  // framer transmit side
  input  logic       tx_req,
  input  logic       tx_j1,
  output logic [7:0] tx_data,
  input  logic [7:0] tx_poh [STS_ROWS],
  output logic       tx_poh_strobe,   // pulse when a POH byte is sent
  output logic [3:0] tx_poh_idx,
  // slot stream to and from the MAC (PHY_Request side)
  output logic       slot_valid,
  output logic       slot_sos,
  output logic [7:0] slot_idle,
  input  logic [7:0] slot_data
);

  // ------------------------------------------------------------------ receive
  logic [8:0] rcol, rcol_n;
  logic [3:0] rrow, rrow_n;
  logic       rlock;
  logic       r_poh;

  always_comb begin
    rcol_n = rcol; rrow_n = rrow;
    if (rx_j1) begin
      rcol_n = '0; rrow_n = '0;
    end else if (rcol == 9'(STS_SPE_ROW-1)) begin
      rcol_n = '0; rrow_n = (rrow == 4'(STS_ROWS-1)) ? 4'd0 : rrow + 1'b1;
    end else begin
      rcol_n = rcol + 1'b1;
    end
  end
  assign r_poh = rx_spe && (rx_j1 || (rlock && rcol_n == 0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcol <= 9'(STS_SPE_ROW-1); rrow <= 4'(STS_ROWS-1); rlock <= 1'b0;
      rx_poh_valid <= 1'b0; rx_poh_idx <= '0; rx_poh_data <= '0; rx_frame <= 1'b0;
    end else begin
      rx_poh_valid <= 1'b0;
      rx_frame     <= 1'b0;
      if (rx_spe) begin
        rcol <= rcol_n;
        rrow <= rrow_n;
        if (rx_j1) begin
          rlock <= 1'b1;
          rx_frame <= 1'b1;
        end
        if (r_poh) begin
          rx_poh_valid <= 1'b1;
          rx_poh_idx   <= rrow_n;
          rx_poh_data  <= rx_data;
        end
      end
    end
  end

  cell_delineation #(.T_SEARCH(T_SEARCH)) u_delin (
    .clk, .rst_n,
    .pay_data  (rx_data),
    .pay_valid (rx_spe && rlock && !r_poh),
    .cell_data, .cell_valid, .cell_sos, .in_sync, .search_timeout,
    .state_o   ()
  );

  // ------------------------------------------------------------------ transmit
  logic [8:0] tcol, tcol_n;
  logic [3:0] trow, trow_n;
  logic [5:0] tslot;
  logic       tlock;
  logic       t_poh;

  always_comb begin
    tcol_n = tcol; trow_n = trow;
    if (tx_j1) begin
      tcol_n = '0; trow_n = '0;
    end else if (tcol == 9'(STS_SPE_ROW-1)) begin
      tcol_n = '0; trow_n = (trow == 4'(STS_ROWS-1)) ? 4'd0 : trow + 1'b1;
    end else begin
      tcol_n = tcol + 1'b1;
    end
  end
  assign t_poh = tx_req && (tx_j1 || tcol_n == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcol <= 9'(STS_SPE_ROW-1); trow <= 4'(STS_ROWS-1); tslot <= '0; tlock <= 1'b0;
    end else if (tx_req) begin
      tcol <= tcol_n;
      trow <= trow_n;
      if (tx_j1) tlock <= 1'b1;
      if (!t_poh && (tlock || tx_j1)) tslot <= (tslot == 6'd52) ? 6'd0 : tslot + 1'b1;
    end
  end

  assign slot_valid    = tx_req && !t_poh && tlock;
  assign slot_sos      = slot_valid && tslot == 0;
  always_comb begin
    unique case (tslot)
      6'd1:    slot_idle = IDLE_NCI_TOP[23:16];
      6'd2:    slot_idle = IDLE_NCI_TOP[15:8];
      6'd3:    slot_idle = IDLE_NCI_TOP[7:0];
      6'd4:    slot_idle = hcs8(IDLE_NCI_TOP);
      default: slot_idle = 8'h00;
    endcase
  end
  assign tx_poh_strobe = t_poh;
  assign tx_poh_idx    = trow_n;
  assign tx_data       = t_poh ? tx_poh[trow_n] : (slot_valid ? slot_data : 8'h00);

endmodule
