// tb_smds_interface: end-to-end test of the SMDS interface in the Single-CPE configuration.
//
// The testbench is the framer and the switching system. It produces STS-3c frames, one
// line byte per byte-clock cycle (9 rows x 270 bytes, A1 A1 A1 A2 A2 A2 in the first row,
// the SPE from column 9 with J1 at its start), and loops the CPE's own transmitted SPE back
// into the next received frame, so every busy cell the CPE sends comes back addressed to
// itself. The switching system's POH replaces the looped POH: M1 = Bus A, H4 = connected,
// M2 announces the MID values 1..1023, one per frame, with 1..511 marked reserved.
//
// Six messages (30, 250, 9188, 44, 45, 500 bytes, DA = the CPE's address) are handed to the
// bridge port once the CPE may transmit. One byte of the second busy cell (the BOM of the
// 250-byte message) is corrupted on the way back. Checked:
//   cell delineation reaches sync; the link status reaches connected; no busy cell leaves
//   before the start-up wait and MID allocation allow it; the MID is 512 (first CPE value)
//   231 busy cells are sent; the cells of the 9188-byte message fill consecutive slots
//   the five intact messages come back byte for byte; the corrupted BOM is dropped for its
//   CRC, its five following cells are dropped as orphans and MAC A reports the CRC failure
//   then the line goes dead (zero bytes): LOS, link down and no transmission; once the
//   frames return the link recovers to connected
// Each mechanism is counted and one that never happened counts as a failure.
module tb_smds_interface;
  import smds_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [63:0] MY = 64'hC141_5555_1234_0001;

  logic             single_cpe;
  logic [63:0]      my_address;
  logic [7:0]       msg_in_data, msg_out_data;
  logic             msg_in_valid, msg_in_last, msg_in_ready;
  logic             msg_out_valid, msg_out_last, msg_out_ready;
  logic [7:0]       rx_data, tx_data;
  logic             rx_spe, rx_j1, rx_lais, rx_pais, tx_req, tx_j1;
  logic             busb_slot_valid, busb_slot_sos, busa_out_valid, busa_out_sos, b_m2_valid;
  logic [7:0]       busb_in_data, busa_out_data, b_m2_in;
  logic             los, lof, lop, frf_rx, busid_ok, tx_allowed, cell_sync, search_timeout;
  link_state_e      link_state;
  logic [9:0]       mid;
  logic             mid_valid, mid_lost, mac_exc_valid, cell_sent;
  logic [1:0]       mac_exc_code;
  logic [15:0]      msgs_done, drop_crc, drop_orphan, drop_full, drop_dup;

  smds_interface #(.T_STARTUP(20_000)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int WATCHDOG = 2_500_000;
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: msgs_done=%0d mid_valid=%0d link=%0d sync=%0d sent=%0d busy=%0d got=%0d crc=%0d orph=%0d full=%0d dup=%0d allowed=%0d", msgs_done, mid_valid,
             link_state, cell_sync, n_sent, busy_seen, got, drop_crc, drop_orphan, drop_full, drop_dup, tx_allowed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ messages
  localparam int NM = 6;
  int lens [NM] = '{30, 250, 9188, 44, 45, 500};
  byte unsigned msgs [NM][];
  int cells_of [NM];
  int total_cells = 0;

  // ------------------------------------------------------------ framer + switching system
  logic [7:0] loopbuf [2349];
  int ss_mid = 1;
  int busy_seen = 0, corrupt_k = 1;
  int tslot = 0;            // byte position in the transmit slot stream
  bit tslot_busy;
  int slot_no = 0, last_busy_slot = -1, max_gap_big = 0;
  int sent_before_allowed = 0;
  bit line_dead = 0;        // outage: the line delivers zero bytes and no SPE

  initial begin
    rx_data = 0; rx_spe = 0; rx_j1 = 0; tx_req = 0; tx_j1 = 0;
    for (int i = 0; i < 2349; i++) loopbuf[i] = 8'h00;
    @(posedge rst_n);
    forever begin
      for (int r = 0; r < 9; r++) begin
        for (int c = 0; c < 270; c++) begin
          @(negedge clk);
          rx_spe = 0; rx_j1 = 0; tx_req = 0; tx_j1 = 0;
          if (line_dead) begin
            rx_data = 8'h00;
          end else if (c < 9) begin
            rx_data = (r == 0 && c < 3) ? A1_BYTE : (r == 0 && c < 6) ? 8'h28 : 8'h5A;
          end else begin
            int s;
            s = r * 261 + (c - 9);
            rx_spe = 1; tx_req = 1;
            rx_j1 = (s == 0); tx_j1 = (s == 0);
            if (s % 261 == 0) begin
              unique case (s / 261)
                4: rx_data = BUSID_A;
                5: rx_data = {2'b00, LSC_CONNECTED};
                6: rx_data = {(ss_mid < 512), (ss_mid == 1), 4'b0000, 2'(ss_mid)};
                default: rx_data = 8'h00;
              endcase
            end else rx_data = loopbuf[s];
            #1;
            if (s % 261 != 0) begin
              logic [7:0] b;
              b = tx_data;
              if (tslot == 0) begin
                tslot_busy = b[7];
                if (tslot_busy) begin
                  busy_seen++;
                  if (!(mid_valid && tx_allowed)) sent_before_allowed++;
                  // cells of the 9188-byte message must use consecutive slots
                  if (busy_seen > cells_of[0] + cells_of[1] + 1 &&
                      busy_seen <= cells_of[0] + cells_of[1] + cells_of[2] &&
                      slot_no - last_busy_slot - 1 > max_gap_big)
                  begin max_gap_big = slot_no - last_busy_slot - 1; $display("gap %0d before busy cell %0d at slot %0d t=%0t", max_gap_big, busy_seen, slot_no, $time); end
                  last_busy_slot = slot_no;
                end
              end
              if (tslot_busy && busy_seen == corrupt_k + 1 && tslot == 40) b = b ^ 8'h04;
              loopbuf[s] = b;
              if (tslot == 52) begin tslot = 0; slot_no++; end else tslot++;
            end
          end
        end
      end
      ss_mid = (ss_mid == 1023) ? 1 : ss_mid + 1;
    end
  end

  // ------------------------------------------------------------ mechanisms
  int n_sync = 0, n_connected = 0, n_gate_held = 0, n_exc_crc = 0, n_sent = 0;
  always @(posedge clk) if (rst_n) begin
    if (cell_sync) n_sync++;
    if (link_state == LS_CONNECTED) n_connected++;
    if (link_state == LS_CONNECTED && !tx_allowed) n_gate_held++;
    if (mac_exc_valid && mac_exc_code == 2'd2) n_exc_crc++;
    if (cell_sent) n_sent++;
  end

  // ------------------------------------------------------------ bridge receive checker
  int exp_list [$];
  int om = 0, ob = 0, got = 0;
  always @(posedge clk) if (rst_n && msg_out_valid && msg_out_ready) begin
    if (om >= exp_list.size()) check(0, "unexpected message byte");
    else begin
      int m;
      m = exp_list[om];
      if (ob >= lens[m] || msg_out_data != msgs[m][ob]) check(0, $sformatf("msg %0d byte %0d", m, ob));
      else checks++;
      check(msg_out_last == (ob == lens[m] - 1), $sformatf("msg %0d last flag at %0d", m, ob));
      ob++;
      if (msg_out_last) begin om++; ob = 0; got++; end
    end
  end

  initial begin
    single_cpe = 1; my_address = MY;
    msg_in_data = 0; msg_in_valid = 0; msg_in_last = 0; msg_out_ready = 1;
    rx_lais = 0; rx_pais = 0; busb_in_data = 0; b_m2_in = 0; b_m2_valid = 0;
    for (int m = 0; m < NM; m++) begin
      msgs[m] = new[lens[m]];
      foreach (msgs[m][j]) msgs[m][j] = 8'($urandom);
      for (int j = 0; j < 8; j++) msgs[m][4 + j] = MY[63 - 8*j -: 8];
      cells_of[m] = (lens[m] + 43) / 44;
      total_cells += cells_of[m];
      if (m != 1) exp_list.push_back(m);
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (mid_valid && tx_allowed);
    check(mid == 10'd512, $sformatf("MID %0d", mid));
    for (int m = 0; m < NM; m++) begin
      for (int j = 0; j < lens[m]; j++) begin
        @(negedge clk);
        msg_in_valid = 0;
        while (!msg_in_ready) @(negedge clk);
        msg_in_valid = 1; msg_in_data = msgs[m][j]; msg_in_last = (j == lens[m] - 1);
      end
      @(negedge clk);
      msg_in_valid = 0; msg_in_last = 0;
    end
    wait (got == exp_list.size());
    repeat (3 * 2430) @(posedge clk);
    check(n_sync > 0, "mechanism: cell delineation sync");
    check(n_connected > 0, "mechanism: link status connected");
    check(n_gate_held > 0, "mechanism: start-up wait held transmission");
    check(sent_before_allowed == 0, "no busy cell before transmission allowed");
    check(n_sent == total_cells, $sformatf("cells sent %0d of %0d", n_sent, total_cells));
    check(busy_seen == total_cells, $sformatf("busy cells on the line %0d", busy_seen));
    check(max_gap_big == 0, $sformatf("largest gap in 9188-byte message: %0d slots", max_gap_big));
    check(got == NM - 1, "intact messages received");
    check(msgs_done == 16'(NM - 1), "reassembly completions");
    check(drop_crc == 1, $sformatf("CRC drops %0d", drop_crc));
    check(drop_orphan == 16'(cells_of[1] - 1), $sformatf("orphan drops %0d", drop_orphan));
    check(n_exc_crc == 1, "mechanism: MAC CRC exception");
    check(!los && !lof && !lop && busid_ok, "no error indicators, bus A identified");
    // line outage: LOS, link down, transmission stopped; then recovery to connected
    line_dead = 1;
    repeat (3000) @(posedge clk);
    check(los, "mechanism: LOS after an all-zero line");
    check(link_state == LS_RX_LINK_DOWN, "link down during the outage");
    check(!tx_allowed, "transmission stopped during the outage");
    line_dead = 0;
    for (int n = 0; n < 10 * 2430 && link_state != LS_CONNECTED; n++) @(posedge clk);
    check(!los && !lof && link_state == LS_CONNECTED, "mechanism: link recovered to connected");
    $display("mechanisms: sync_cycles=%0d connected_cycles=%0d gate_held_cycles=%0d cells=%0d crc_drop=%0d orphan=%0d exc=%0d",
             n_sync, n_connected, n_gate_held, n_sent, drop_crc, drop_orphan, n_exc_crc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
