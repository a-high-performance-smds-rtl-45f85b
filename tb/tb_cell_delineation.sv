// tb_cell_delineation: self-checking test of the cell delineation state machine.
// Streams filler bytes and then back-to-back 53-byte cells with correct headers (HCS
// computed here), starting at an odd offset. Checks: sync is declared on the header of the
// sixth correct cell, not earlier; cells are passed on from the seventh cell, byte for byte
// with sos on each ACF; six consecutive bad headers keep sync, the seventh loses it and
// nothing more is passed on; sync is found again afterwards; with no cells at all the
// search timer fires after T_SEARCH cycles (shortened here).
module tb_cell_delineation;
  import smds_pkg::*;

  localparam int TS = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] pay_data, cell_data;
  logic       pay_valid, cell_valid, cell_sos, in_sync, search_timeout;
  logic [1:0] state_o;

  cell_delineation #(.T_SEARCH(TS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
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

  logic [7:0] filler;
  logic [7:0] last4 [4];
  int cell_no = 0;              // cells sent
  int byte_no = 0;
  int sync_at_cell = -1;
  int lost_at_cell = -1;
  // expected forwarded bytes
  logic [7:0] expq [$];
  logic       sosq [$];
  bit         fwd_expected [int];

  task automatic put(input logic [7:0] d);
    @(negedge clk);
    pay_valid = 1; pay_data = d;
    last4 = {last4[1:3], d};
    @(negedge clk);
    pay_valid = 0;
  endtask

  task automatic send_cell(input bit good, input bit expect_fwd);
    logic [7:0] c [53];
    logic [7:0] x [57];
    bit clash;
    // draw until no byte position other than the true one looks like a header, also across
    // the boundary with the four bytes sent before
    do begin
      for (int i = 0; i < 53; i++) c[i] = 8'($urandom);
      c[4] = ref_hcs(c[1], c[2], c[3]);
      for (int i = 0; i < 4; i++) x[i] = last4[i];
      for (int i = 0; i < 53; i++) x[4 + i] = c[i];
      clash = 0;
      for (int k = 0; k < 53; k++)
        if (k != 4 && ref_hcs(x[k + 1], x[k + 2], x[k + 3]) == x[k + 4]) clash = 1;
    end while (clash);
    if (!good) c[4] = c[4] ^ 8'h01;
    if (expect_fwd) for (int i = 0; i < 53; i++) begin expq.push_back(c[i]); sosq.push_back(i == 0); end
    for (int i = 0; i < 53; i++) begin
      put(c[i]);
      if (i == 4) begin
        @(posedge clk); #1;
        if (in_sync && sync_at_cell < 0) sync_at_cell = cell_no;
        if (!in_sync && sync_at_cell >= 0 && lost_at_cell < 0) lost_at_cell = cell_no;
      end
    end
    cell_no++;
  endtask

  // monitor forwarded bytes
  int nfwd = 0;
  always @(posedge clk) if (rst_n && cell_valid) begin
    if (expq.size() == 0) check(0, "unexpected forwarded byte");
    else begin
      logic [7:0] e; logic s;
      e = expq.pop_front(); s = sosq.pop_front();
      if (cell_data != e || cell_sos != s) check(0, $sformatf("forwarded byte %0d", nfwd));
      else checks++;
    end
    nfwd++;
  end

  int timeouts = 0, t0, t_to;
  always @(posedge clk) if (search_timeout) begin timeouts++; t_to = $time; end

  initial begin
    pay_valid = 0; pay_data = 0;
    filler = 8'h55;
    while (ref_hcs(filler, filler, filler) == filler || ref_hcs(0, 0, 0) == filler) filler++;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 17; i++) put(filler);
    // cells 0..5 bring sync, cells 6.. are passed on
    for (int i = 0; i < 12; i++) send_cell(1, i >= 6);
    check(sync_at_cell == 5, $sformatf("sync declared at cell %0d (expected 5)", sync_at_cell));
    // six bad headers: still in sync (cells still passed on)
    for (int i = 0; i < 6; i++) send_cell(0, 1);
    check(in_sync, "six bad headers keep sync");
    send_cell(1, 1);
    // seven bad headers: sync lost at the seventh
    for (int i = 0; i < 6; i++) send_cell(0, 1);
    send_cell(0, 0);
    check(!in_sync, "seven bad headers lose sync");
    check(lost_at_cell == cell_no - 1, $sformatf("sync lost at cell %0d", lost_at_cell));
    repeat (10) @(negedge clk);
    check(expq.size() == 0, $sformatf("all expected bytes forwarded (%0d left)", expq.size()));
    // sync again
    sync_at_cell = -1; lost_at_cell = -1;
    for (int i = 0; i < 8; i++) send_cell(1, i >= 6);
    check(in_sync, "sync regained");
    // filler: six filler "cells" are still passed on, the seventh bad header loses sync
    for (int i = 0; i < 6 * 53; i++) begin expq.push_back(filler); sosq.push_back(i % 53 == 0); end
    for (int i = 0; i < 7 * 53 + 60; i++) put(filler);
    check(expq.size() == 0, $sformatf("forwarding after resync (%0d left)", expq.size()));
    check(!in_sync, "filler loses sync");
    timeouts = 0;
    t0 = $time;
    for (int i = 0; i < TS; i++) put(filler);
    check(timeouts >= 1, "search timer fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
