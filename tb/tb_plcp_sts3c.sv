// tb_plcp_sts3c: self-checking test of the STS-3c PLCP.
// The testbench models a framer: 9 rows x 270 bytes per frame, the first 9 columns
// transport overhead, the rest SPE; J1 floats at column 9+J1_COL of row 0 so that each SPE
// row straddles two line rows and the SPE straddles frames. The received SPE carries POH
// bytes (a distinct value per row and frame) and back-to-back cells with correct HCS.
// Checks, receive: every POH byte reaches management with its row index; the cells come
// out in order after delineation (from the seventh cell on). Transmit: POH positions carry
// tx_poh[row]; payload positions open slots of 53 bytes (sos on the first) and carry the
// slot byte returned by the MAC; the number of slots per frame is 2340/53.
module tb_plcp_sts3c;
  import smds_pkg::*;

  localparam int J1_COL = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] rx_data, rx_poh_data, cell_data, tx_data, slot_data;
  logic       rx_spe, rx_j1, rx_poh_valid, rx_frame, cell_valid, cell_sos, in_sync, search_timeout;
  logic [3:0] rx_poh_idx, tx_poh_idx;
  logic       tx_req, tx_j1, tx_poh_strobe, slot_valid, slot_sos;
  logic [7:0] slot_idle;
  logic [7:0] tx_poh [STS_ROWS];

  plcp_sts3c #(.T_SEARCH(100000)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_hcs(input logic [7:0] b0, b1, b2);
    logic [7:0] r;
    logic [23:0] d;
    d = {b0, b1, b2};
    r = 0;
    for (int i = 0; i < 24; i++) r = (r[7] ^ d[23 - i]) ? ((r << 1) ^ 8'h07) : (r << 1);
    return r ^ 8'h55;   // coset added as in ITU-T I.432
  endfunction

  // receive cell source
  logic [7:0] cur [53];
  int cb = 53, cells_made = 0;
  logic [7:0] expq [$];
  function automatic logic [7:0] next_cell_byte();
    if (cb == 53) begin
      for (int i = 0; i < 53; i++) cur[i] = 8'($urandom);
      cur[4] = ref_hcs(cur[1], cur[2], cur[3]);
      cells_made++;
      if (cells_made > 6) for (int i = 0; i < 53; i++) expq.push_back(cur[i]);
      cb = 0;
    end
    cb++;
    return cur[cb-1];
  endfunction

  // slot source for transmit: a byte the MAC would return
  int sb = 0, slots = 0;
  assign slot_data = 8'(sb * 7 + slots);

  // framer model
  int row = 0, col = 0, frame = 0, s = -1;   // s: SPE byte count from the first J1
  logic expect_poh;
  int exp_row;
  int poh_ok = 0, txpoh_ok = 0, txpay_ok = 0;
  always_comb for (int i = 0; i < STS_ROWS; i++) tx_poh[i] = 8'(8'hA0 + i);

  int fwd = 0;
  always @(posedge clk) if (rst_n && cell_valid) begin
    if (expq.size() == 0) check(0, "unexpected cell byte");
    else begin
      logic [7:0] e;
      e = expq.pop_front();
      if (e != cell_data) check(0, $sformatf("cell byte %0d", fwd)); else checks++;
    end
    fwd++;
  end

  int rx_poh_seen = 0;
  logic [7:0] poh_exp [$];
  logic [3:0] pidx_exp [$];
  always @(posedge clk) if (rst_n && rx_poh_valid) begin
    logic [7:0] e; logic [3:0] ei;
    e = poh_exp.pop_front(); ei = pidx_exp.pop_front();
    check(rx_poh_data == e && rx_poh_idx == ei, $sformatf("rx POH %0d", rx_poh_seen));
    rx_poh_seen++;
  end

  int slots_in_frame [$];
  int sl_cnt = 0;
  initial begin
    rx_data = 0; rx_spe = 0; rx_j1 = 0; tx_req = 0; tx_j1 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (frame = 0; frame < 6; frame++) begin
      for (row = 0; row < 9; row++) begin
        for (col = 0; col < 270; col++) begin
          @(negedge clk);
          rx_spe = 0; rx_j1 = 0; tx_req = 0; tx_j1 = 0; rx_data = 8'hF6;
          if (col >= 9 && (s >= 0 || (row == 0 && col == 9 + J1_COL))) begin
            if (row == 0 && col == 9 + J1_COL) s = 0;
            rx_spe = 1; tx_req = 1;
            rx_j1 = (s % 2349 == 0); tx_j1 = rx_j1;
            expect_poh = (s % 261 == 0);
            exp_row = (s / 261) % 9;
            if (expect_poh) begin
              rx_data = 8'(16 * exp_row + frame);
              poh_exp.push_back(rx_data); pidx_exp.push_back(4'(exp_row));
            end else rx_data = next_cell_byte();
            #1;
            if (expect_poh) begin
              check(tx_data == tx_poh[exp_row] && !slot_valid, "tx POH byte");
              check(tx_poh_strobe && tx_poh_idx == 4'(exp_row), "tx POH strobe");
            end else begin
              check(slot_valid, "slot open at payload byte");
              check(slot_sos == (sb == 0), $sformatf("slot sos at slot byte %0d", sb));
              check(tx_data == slot_data, "tx payload = slot byte");
              if (sb == 52) begin sb = 0; slots++; sl_cnt++; end else sb++;
            end
            if (rx_j1 && s > 0) begin slots_in_frame.push_back(sl_cnt); sl_cnt = 0; end
            s++;
          end
        end
      end
    end
    @(negedge clk);
    rx_spe = 0; tx_req = 0; rx_j1 = 0; tx_j1 = 0;
    repeat (10) @(negedge clk);
    check(rx_poh_seen == poh_exp.size() + rx_poh_seen && poh_exp.size() == 0, "all POH seen");
    check(in_sync, "cells in sync");
    check(fwd > 53 * 200, $sformatf("cells passed on: %0d bytes", fwd));
    check(expq.size() <= 53 + 4, "no cells lost");   // unsent rest of a cell + 4-byte window
    foreach (slots_in_frame[i])
      check(slots_in_frame[i] == 44 || slots_in_frame[i] == 45,
            $sformatf("slots per frame %0d", slots_in_frame[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
