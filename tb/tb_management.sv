// tb_management: self-checking test of POH management with shortened time limits.
// The testbench sends short stand-in frames (three A1 bytes, non-zero filler, a J1 pulse
// and the nine POH bytes) and checks: LOF before the first frame and after frames stop,
// LOS after a run of zero bytes, LOP after 8 frames without J1; the link status machine
// (rx_link_down -> rx_link_up -> connected -> rx_link_up -> rx_link_down) and the code it
// sends in H4; FRF sent in G1 while the receive side fails and FRF read from G1; bus
// identification from M1; the start-up wait and far-end link status gating tx_allowed;
// a MID obtained from M2; M1 sent only in the Multiple-CPE configuration.
module tb_management;
  import smds_pkg::*;

  localparam int TLOS = 50, TLOF = 900, TSTART = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       single_cpe;
  logic [7:0] rx_data, rx_poh_data, b_m2_in;
  logic       rx_poh_valid, rx_j1, lais, pais, cell_sync, search_timeout, b_m2_valid;
  logic [3:0] rx_poh_idx;
  logic [7:0] tx_poh [STS_ROWS];
  logic       los, lof, lop, frf_rx, busid_ok, startup_done, tx_allowed, mid_valid, mid_lost, frame_start;
  link_state_e link_state;
  logic [5:0] far_link_code;
  logic [9:0] mid;

  management #(.T_LOS(TLOS), .T_LOF(TLOF), .LOP_FRAMES(8), .T_STARTUP(TSTART)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int lop_at;
  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] poh [9];
  int midv = 1;
  task automatic frame(input bit with_a1 = 1, input bit with_j1 = 1);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      rx_j1 = 0; rx_poh_valid = 0;
      rx_data = (i < 3 && with_a1) ? A1_BYTE : 8'h3C;
      if (i == 10 && with_j1) rx_j1 = 1;
      if (i >= 11 && i < 20 && with_j1) begin
        rx_poh_valid = 1; rx_poh_idx = 4'(i - 11);
        rx_poh_data = (i - 11 == 6) ? {1'b0, midv == 1, 4'b0, 2'(midv)} : poh[i - 11];
      end
    end
    @(negedge clk); rx_j1 = 0; rx_poh_valid = 0;
    midv = (midv == 1023) ? 1 : midv + 1;
  endtask

  initial begin
    single_cpe = 1; rx_data = 8'h3C; rx_poh_valid = 0; rx_poh_idx = 0; rx_poh_data = 0;
    rx_j1 = 0; lais = 0; pais = 0; cell_sync = 0; search_timeout = 0; b_m2_in = 0; b_m2_valid = 0;
    for (int i = 0; i < 9; i++) poh[i] = 8'h00;
    poh[4] = BUSID_A;
    poh[5] = {2'b00, LSC_DOWN};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(lof, "LOF before any frame");
    frame();
    check(!lof && !los && !lop, "frames: no errors");
    check(busid_ok, "bus identification A");
    check(link_state == LS_RX_LINK_DOWN, "link down without cell sync");
    check(tx_poh[5] == {2'b00, LSC_DOWN}, "H4 sends rx_link_down");
    cell_sync = 1;
    frame();
    check(link_state == LS_RX_LINK_UP, "rx_link_up with cell sync");
    check(tx_poh[5] == {2'b00, LSC_UP}, "H4 sends rx_link_up");
    check(!tx_allowed, "far end down: no transmission");
    poh[5] = {2'b00, LSC_UP};
    frame(); frame();
    check(link_state == LS_CONNECTED, "connected when far end receives");
    check(tx_poh[5] == {2'b00, LSC_CONNECTED}, "H4 sends connected");
    check(!tx_allowed && !startup_done, "start-up wait still running");
    for (int i = 0; i < TSTART / 200 + 1; i++) frame();
    check(startup_done && tx_allowed, "transmission allowed after start-up wait");
    poh[5] = {2'b00, LSC_DOWN};
    frame(); frame();
    check(link_state == LS_RX_LINK_UP && !tx_allowed, "far end down: back to rx_link_up");
    poh[5] = {2'b00, LSC_CONNECTED};
    frame(); frame();
    check(link_state == LS_CONNECTED && tx_allowed, "connected again");
    // FRF
    poh[3] = 8'h08;
    frame();
    check(frf_rx, "FRF received in G1");
    poh[3] = 8'h00;
    frame();
    check(!frf_rx, "FRF cleared");
    // LOP
    lop_at = -1;
    for (int i = 0; i < 9; i++) begin
      frame(1, 0);
      if (lop && lop_at < 0) lop_at = i + 1;
    end
    // the eighth frame without J1 ends when the ninth frame starts
    check(lop_at == 9, $sformatf("LOP declared when the ninth frame starts (at %0d)", lop_at));
    check(lop, "LOP after 8 frames without J1");
    check(link_state == LS_RX_LINK_DOWN && tx_poh[3][3], "LOP: link down, FRF sent");
    frame(); frame();
    check(!lop, "LOP cleared");
    check(!tx_poh[3][3], "FRF no longer sent");
    // LOS
    for (int i = 0; i < TLOS + 5; i++) begin @(negedge clk); rx_data = 8'h00; end
    check(los, "LOS after all-zero bytes");
    check(link_state == LS_RX_LINK_DOWN && !tx_allowed, "LOS: link down");
    frame();
    check(!los, "LOS cleared");
    // LOF
    for (int i = 0; i < TLOF / 200 + 2; i++) frame(0, 1);
    check(lof, "LOF when frames stop");
    frame();
    check(!lof, "LOF cleared");
    // MID from M2 (cycle start comes round within 1023 frames)
    for (int n = 0; n < 2100 && !mid_valid; n++) frame();
    check(mid_valid && mid >= 10'd512, $sformatf("MID obtained: %0d", mid));
    check(tx_poh[4] == 8'h00 && tx_poh[6] == 8'h00, "Single-CPE: no M1/M2 sent");
    single_cpe = 0;
    @(negedge clk);
    check(tx_poh[4] == BUSID_B, "Multiple-CPE: M1 = Bus B");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
