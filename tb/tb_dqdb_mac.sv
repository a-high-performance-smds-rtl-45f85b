// tb_dqdb_mac: self-checking test of the DQDB MAC.
// The testbench plays the bus: it drives 53-byte slots on PHY_Indicate and watches
// PHY_Request in the same cycle. HCS and CRC-10 are computed here bit by bit, separately
// from the RTL's functions.
//   transmit, Single-CPE: a busy slot passes untouched, the next empty slot is taken, the
//     written cell carries BUSY, the segment, the HCS and the CRC-10; with tx_enable low no
//     slot is taken
//   transmit, DQDB: three REQs seen on the other bus make the node let three empty slots
//     pass before it takes the fourth; queuing a segment asks the other MAC for a REQ; a
//     REQ requested by the other MAC is set in the next slot's ACF
//   receive: BOM with matching DA, COM, EOM of the same MID are handed over with
//     crc_ok = 1; a BOM for another address and a COM for a foreign MID are not; a cell
//     with a broken CRC is handed over with crc_ok = 0 and the EOM reports an exception;
//     a second BOM on a busy MID reports a duplicate
module tb_dqdb_mac;
  import smds_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        single_cpe, tx_enable;
  logic [31:0] mac_request;
  logic        mac_request_valid, mac_request_first, mac_request_ready;
  logic [31:0] mac_indicate;
  logic        mac_indicate_valid, mac_indicate_first, mac_indicate_last, mac_indicate_crc_ok;
  logic [7:0]  phy_indicate;
  logic        phy_indicate_valid, phy_indicate_sos;
  logic [7:0]  phy_request;
  logic        phy_request_valid, phy_request_sos;
  logic [63:0] rx_da;
  logic        rx_da_valid, ext_addr_match;
  logic        req_other, req_set_in, req_seen_out, req_send_out;
  logic        tx_sent;
  logic [7:0]  rq, cd;
  logic        exc_valid;
  logic [1:0]  exc_code;

  localparam logic [63:0] MY = 64'hC123_4567_8900_0001;
  assign ext_addr_match = rx_da == MY;

  dqdb_mac dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference codes
  function automatic logic [7:0] ref_hcs(input logic [7:0] b0, b1, b2);
    logic [7:0] r;
    logic [23:0] d;
    d = {b0, b1, b2};
    r = 0;
    for (int i = 0; i < 24; i++) begin
      r = (r[7] ^ d[23 - i]) ? ((r << 1) ^ 8'b0000_0111) : (r << 1);
    end
    return r ^ 8'h55;   // coset added as in ITU-T I.432
  endfunction

  // CRC-10 over the 374 bits from the segment header to the PL field
  function automatic logic [9:0] ref_crc10(input logic [7:0] s [52]);
    logic [9:0] r;
    logic bitv;
    r = 0;
    for (int k = 0; k < 374; k++) begin
      bitv = s[4 + k / 8][7 - k % 8];
      r = (r[9] ^ bitv) ? ((r << 1) ^ 10'b10_0011_0011) : (r << 1);
    end
    return r;
  endfunction

  typedef logic [7:0] seg_t [52];

  function automatic seg_t make_seg(input logic [1:0] st, input int mid, input int csn,
                                    input logic [63:0] da, input bit fill_codes);
    seg_t s;
    logic [9:0] c;
    for (int i = 0; i < 52; i++) s[i] = 8'($urandom);
    s[0] = 8'hFF; s[1] = 8'hFF; s[2] = 8'hF0; s[3] = 8'h00;
    {s[4], s[5]} = {st, 10'(mid), 4'(csn)};
    for (int i = 0; i < 8; i++) s[10 + i] = da[63 - 8*i -: 8];
    s[50] = {6'd44, 2'b00}; s[51] = 8'h00;
    if (fill_codes) begin
      s[3] = ref_hcs(s[0], s[1], s[2]);
      c = ref_crc10(s);
      s[50][1:0] = c[9:8]; s[51] = c[7:0];
    end
    return s;
  endfunction

  // ------------------------------------------------------------ bus driver
  logic [7:0] seen [53];
  task automatic slot(input logic [7:0] acf, input seg_t s);
    for (int i = 0; i < 53; i++) begin
      @(negedge clk);
      phy_indicate_valid = 1;
      phy_indicate_sos   = (i == 0);
      phy_indicate       = (i == 0) ? acf : s[i-1];
      #1;
      seen[i] = phy_request;
      check(phy_request_valid && (phy_request_sos == (i == 0)), "PHY_Request strobes");
    end
    @(negedge clk);
    phy_indicate_valid = 0; phy_indicate_sos = 0;
  endtask

  task automatic load(input seg_t s);
    for (int w = 0; w < 13; w++) begin
      @(negedge clk);
      while (!mac_request_ready) @(negedge clk);
      mac_request_valid = 1; mac_request_first = (w == 0);
      mac_request = {s[4*w], s[4*w+1], s[4*w+2], s[4*w+3]};
    end
    @(negedge clk);
    mac_request_valid = 0; mac_request_first = 0;
  endtask

  // MAC_Indicate monitor
  seg_t got [$];
  logic got_crc [$];
  logic [415:0] acc;
  int wi = 0;
  int exc_dup = 0, exc_crc = 0, req_send_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (mac_indicate_valid) begin
      check(mac_indicate_first == (wi == 0) && mac_indicate_last == (wi == 12), "indicate flags");
      acc[415 - 32*wi -: 32] = mac_indicate;
      wi++;
      if (wi == 13) begin
        seg_t g;
        for (int i = 0; i < 52; i++) g[i] = acc[415 - 8*i -: 8];
        got.push_back(g); got_crc.push_back(mac_indicate_crc_ok);
        wi = 0;
      end
    end
    if (exc_valid && exc_code == 2'd1) exc_dup++;
    if (exc_valid && exc_code == 2'd2) exc_crc++;
    if (req_send_out) req_send_cnt++;
  end

  seg_t s0, s1, e, b, c, x, bad;
  int taken_at;
  initial begin
    single_cpe = 1; tx_enable = 1;
    mac_request = 0; mac_request_valid = 0; mac_request_first = 0;
    phy_indicate = 0; phy_indicate_valid = 0; phy_indicate_sos = 0;
    req_other = 0; req_set_in = 0;
    for (int i = 0; i < 52; i++) e[i] = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- transmit, Single-CPE
    s0 = make_seg(ST_BOM, 600, 0, 64'h1, 0);
    load(s0);
    s1 = make_seg(ST_COM, 33, 1, 64'h2, 1);
    slot(8'h80, s1);                                   // busy slot: untouched
    check(seen[0] == 8'h80, "busy slot ACF untouched");
    for (int i = 1; i < 53; i++) if (seen[i] != s1[i-1]) check(0, "busy slot data untouched");
    slot(8'h00, e);                                    // empty slot: taken
    check(seen[0][7] == 1'b1, "taken slot marked BUSY");
    begin
      seg_t ref_s;
      logic [9:0] c10;
      ref_s = s0;
      ref_s[3] = ref_hcs(s0[0], s0[1], s0[2]);
      c10 = ref_crc10(ref_s);
      ref_s[50][1:0] = c10[9:8]; ref_s[51] = c10[7:0];
      for (int i = 1; i < 53; i++)
        check(seen[i] == ref_s[i-1], $sformatf("written byte %0d: %02x vs %02x", i, seen[i], ref_s[i-1]));
    end
    slot(8'h00, e);
    check(seen[0] == 8'h00, "no second write");
    tx_enable = 0;
    load(s0);
    slot(8'h00, e);
    check(seen[0] == 8'h00, "tx_enable low: slot not taken");
    tx_enable = 1;
    slot(8'h00, e);
    check(seen[0] == 8'h80, "tx_enable high: slot taken");

    // ---------------- transmit, DQDB distributed queue
    single_cpe = 0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); req_other = 1; @(negedge clk); req_other = 0;
    end
    check(rq == 8'd3, $sformatf("RQ counts REQs: %0d", rq));
    load(s0);
    check(req_send_cnt == 1, "queued segment asks for a REQ");
    check(cd == 8'd3 && rq == 8'd0, $sformatf("RQ moved to CD: cd=%0d rq=%0d", cd, rq));
    taken_at = -1;
    for (int k = 0; k < 5; k++) begin
      slot(8'h00, e);
      if (seen[0][7] && taken_at < 0) taken_at = k;
    end
    check(taken_at == 3, $sformatf("took empty slot number %0d, expected 3", taken_at));
    @(negedge clk); req_set_in = 1; @(negedge clk); req_set_in = 0;
    slot(8'h80, s1);
    check(seen[0] == 8'h81, "REQ bit set for the other MAC");
    slot(8'h80, s1);
    check(seen[0] == 8'h80, "only one REQ set");
    check(req_seen_out == 0, "no REQ seen");

    // ---------------- receive
    b   = make_seg(ST_BOM, 700, 0, MY, 1);
    c   = make_seg(ST_COM, 700, 1, 64'h0, 1);
    x   = make_seg(ST_COM, 701, 1, 64'h0, 1);
    bad = make_seg(ST_EOM, 700, 2, 64'h0, 1);
    bad[20] = bad[20] ^ 8'h10;                         // CRC error
    slot(8'h80, b);
    slot(8'h80, make_seg(ST_BOM, 702, 0, MY ^ 64'h1, 1));   // foreign address
    slot(8'h80, x);                                    // foreign MID
    slot(8'h00, c);                                    // not busy: ignored
    slot(8'h80, c);
    slot(8'h80, bad);
    slot(8'h80, make_seg(ST_BOM, 703, 0, MY, 1));
    slot(8'h80, make_seg(ST_BOM, 703, 0, MY, 1));      // duplicate BOM
    repeat (20) @(negedge clk);
    check(got.size() == 5, $sformatf("cells handed over: %0d", got.size()));
    if (got.size() >= 3) begin
      for (int i = 0; i < 52; i++) begin
        if (got[0][i] != b[i]) check(0, "BOM contents");
        if (got[1][i] != c[i]) check(0, "COM contents");
        if (got[2][i] != bad[i]) check(0, "EOM contents");
      end
      check(got_crc[0] && got_crc[1] && !got_crc[2], "crc_ok flags");
    end
    check(exc_crc == 1, "CRC exception at EOM");
    check(exc_dup == 1, "duplicate BOM exception");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
