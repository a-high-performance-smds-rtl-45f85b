// cell_delineation: the STS-3c PLCP framing state machine that finds cells in the floating
// payload by their headers.
//
// A header is correct when the HCS (fifth header byte) matches the CRC-8 of the three NCI
// bytes before it. The payload stream (pay_data/pay_valid) runs through a 5-byte window:
//   HUNT     every byte position is tried; a correct header starts PRESYNC at that position
//   PRESYNC  the header of each following cell, 53 bytes on, must be correct; after 6
//            consecutive correct cells the state is SYNC (In-Slot-Delineation); one bad
//            header goes back to HUNT
//   SYNC     cells are passed to the MAC; 7 consecutive bad headers go back to HUNT
// A search timer runs outside SYNC; when it reaches T_SEARCH cycles (1 ms at the 19.44 MHz
// byte clock) search_timeout pulses and the node restarts its initialisation.
// The counts 6 and 7, the 1 ms limit and the 3-bit counter are the document's; the HCS
// check as "correct header" follows IEEE 802.6.
//
// Timing: output bytes are the input bytes delayed by four payload bytes, registered;
// cell_sos marks the ACF of each cell passed on. A cell is passed on when the state was
// SYNC at its first header check and stays SYNC after it.
module cell_delineation
  import smds_pkg::*;
#(
  parameter int unsigned T_SEARCH   = BYTE_CLK_HZ / 1000,  // 1 ms
  parameter int unsigned SYNC_CELLS = 6,
  parameter int unsigned LOSS_CELLS = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] pay_data,
  input  logic       pay_valid,
  output logic [7:0] cell_data,
  output logic       cell_valid,
  output logic       cell_sos,
  output logic       in_sync,
  output logic       search_timeout,
  output logic [1:0] state_o
);

  typedef enum logic [1:0] {HUNT, PRESYNC, SYNC} dl_state_e;
  dl_state_e  state, nstate;
  logic [7:0] win [4];          // the four bytes before the newest one
  logic [5:0] pos;              // cell position of the byte leaving the window
  logic [2:0] cnt;
  logic       fwd;
  logic [$clog2(T_SEARCH+1)-1:0] timer;

  logic hdr_ok, at_start;
  assign hdr_ok   = hcs8({win[1], win[2], win[3]}) == pay_data;
  // win[0] is the byte at position pos; it is the ACF when pos == 0
  assign at_start = (state == HUNT) ? hdr_ok : (pos == 0);

  logic [2:0] ncnt;
  always_comb begin
    nstate = state;
    ncnt   = cnt;
    if (pay_valid) begin
      unique case (state)
        HUNT:    if (hdr_ok) begin nstate = PRESYNC; ncnt = 3'd1; end
        PRESYNC: if (pos == 0) begin
                   if (!hdr_ok) nstate = HUNT;
                   else if (32'(cnt) + 1 >= SYNC_CELLS) begin nstate = SYNC; ncnt = 3'd0; end
                   else ncnt = cnt + 1'b1;
                 end
        SYNC:    if (pos == 0) begin
                   if (hdr_ok) ncnt = 3'd0;
                   else if (32'(cnt) + 1 >= LOSS_CELLS) begin nstate = HUNT; ncnt = 3'd0; end
                   else ncnt = cnt + 1'b1;
                 end
        default: nstate = HUNT;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= HUNT; cnt <= '0; pos <= '0; fwd <= 1'b0; timer <= '0;
      for (int i = 0; i < 4; i++) win[i] <= '0;
      cell_data <= '0; cell_valid <= 1'b0; cell_sos <= 1'b0; search_timeout <= 1'b0;
    end else begin
      cell_valid     <= 1'b0;
      cell_sos       <= 1'b0;
      search_timeout <= 1'b0;
      if (pay_valid) begin
        win[0] <= win[1]; win[1] <= win[2]; win[2] <= win[3]; win[3] <= pay_data;
        state <= nstate;
        cnt   <= ncnt;
        if (at_start && nstate != HUNT) pos <= 6'd1;
        else pos <= (pos == 6'd52) ? 6'd0 : pos + 1'b1;
        // forward the byte leaving the window
        if (at_start) begin
          fwd        <= (state == SYNC) && (nstate == SYNC);
          cell_valid <= (state == SYNC) && (nstate == SYNC);
          cell_sos   <= (state == SYNC) && (nstate == SYNC);
        end else begin
          cell_valid <= fwd && (state == SYNC);
        end
        cell_data <= win[0];
      end
      // search timer
      if (state == SYNC) timer <= '0;
      else if (32'(timer) + 1 >= T_SEARCH) begin
        timer <= '0;
        search_timeout <= 1'b1;
      end else timer <= timer + 1'b1;
    end
  end

  assign in_sync = state == SYNC;
  assign state_o = state;

endmodule
