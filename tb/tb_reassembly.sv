// tb_reassembly: self-checking test of reassembly at its full default size (128 messages,
// 4096 cells).
// Cells are built in the testbench and driven as 13 back-to-back words with one idle cycle
// between cells. Phases:
//   1  one SSM
//   2  three interleaved messages with mis-ordered COM/EOM cells
//   3  one 209-cell (9188-byte) message whose cells are swapped in pairs, so the CSN wraps
//      thirteen times while cells arrive out of order
//   4  128 messages interleaved at once (all BOMs, then all COMs, then all EOMs in reverse)
//   5  error cells: a CRC failure, a COM with no message in progress, a duplicate BOM
// Every message is compared byte for byte with what was sent, in the order in which the
// messages complete; the drop counters are compared with the number of error cells; the
// read-out of the 9188-byte message must take at most 53 cycles per cell.
module tb_reassembly;
  import smds_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] in_word;
  logic        in_valid, in_first, in_last, in_crc_ok;
  logic [7:0]  out_data;
  logic        out_valid, out_last, out_ready;
  logic [15:0] msgs_done, drop_crc, drop_orphan, drop_full, drop_dup;

  reassembly dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // messages
  typedef byte unsigned bytes_t[];
  bytes_t msg [$];
  int     msg_mid [$];
  int     exp_order [$];

  function automatic int new_msg(input int len, input int mid);
    bytes_t b;
    b = new[len];
    foreach (b[i]) b[i] = 8'($urandom);
    msg.push_back(b);
    msg_mid.push_back(mid);
    return msg.size() - 1;
  endfunction

  task automatic send_cell(input int m, input int c, input bit crc_ok);
    int L, n, nb;
    logic [1:0] st;
    logic [415:0] s;
    L = msg[m].size();
    n = (L + 43) / 44;
    nb = (L - c*44 > 44) ? 44 : L - c*44;
    st = (n == 1) ? 2'b11 : (c == 0) ? 2'b10 : (c == n-1) ? 2'b01 : 2'b00;
    s = '0;
    s[415:384] = 32'hFFFFF000;
    s[383:368] = {st, 10'(msg_mid[m]), 4'(c)};
    for (int b = 0; b < nb; b++) s[367 - 8*b -: 8] = msg[m][c*44 + b];
    s[15:10] = 6'(nb);
    for (int w = 0; w < 13; w++) begin
      @(negedge clk);
      in_valid = 1; in_word = s[415 - 32*w -: 32];
      in_first = (w == 0); in_last = (w == 12); in_crc_ok = crc_ok;
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
  endtask

  // output checker
  int om = 0, ob = 0, got_msgs = 0;
  int t = 0, t_first_big = 0, t_last_big = 0, big_idx = -1;
  always @(posedge clk) t++;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (om < exp_order.size()) begin
      int m;
      m = exp_order[om];
      if (m == big_idx && ob == 0) t_first_big = t;
      if (ob < msg[m].size()) begin
        if (out_data !== msg[m][ob]) begin
          check(0, $sformatf("msg %0d byte %0d: got %02x exp %02x", m, ob, out_data, msg[m][ob]));
        end else checks++;
      end
      check(out_last == (ob == msg[m].size() - 1), $sformatf("out_last msg %0d byte %0d", m, ob));
      ob++;
      if (out_last) begin
        if (m == big_idx) t_last_big = t;
        om++; ob = 0; got_msgs++;
      end
    end else begin
      check(0, "unexpected output byte");
    end
  end

  int a, b2, c3, big;
  int many [128];
  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_word = 0; in_crc_ok = 1; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: SSM
    a = new_msg(30, 0);
    send_cell(a, 0, 1); exp_order.push_back(a);
    // phase 2: three interleaved messages (4, 3 and 5 cells), COM/EOM out of order
    a  = new_msg(4*44, 517);
    b2 = new_msg(2*44 + 7, 518);
    c3 = new_msg(5*44 - 3, 519);
    send_cell(a, 0, 1); send_cell(b2, 0, 1); send_cell(c3, 0, 1);
    send_cell(c3, 2, 1); send_cell(a, 2, 1); send_cell(b2, 2, 1);   // b2 EOM before COM
    send_cell(a, 1, 1); send_cell(c3, 1, 1); send_cell(b2, 1, 1);   // b2 completes
    exp_order.push_back(b2);
    send_cell(c3, 4, 1); send_cell(a, 3, 1);                        // a completes
    exp_order.push_back(a);
    send_cell(c3, 3, 1);                                            // c3 completes
    exp_order.push_back(c3);
    // phase 3: 9188-byte message, cells swapped in pairs after the BOM
    big = new_msg(9188, 700);
    big_idx = big;
    send_cell(big, 0, 1);
    for (int c = 1; c < 209; c += 2) begin
      if (c + 1 < 209) begin send_cell(big, c + 1, 1); send_cell(big, c, 1); end
      else send_cell(big, c, 1);
    end
    exp_order.push_back(big);
    wait (got_msgs == exp_order.size());   // let the long message drain first
    // phase 4: 128 interleaved 3-cell messages
    for (int i = 0; i < 128; i++) many[i] = new_msg(89 + (i % 44), 520 + i);   // 89..132 bytes: 3 cells
    for (int i = 0; i < 128; i++) send_cell(many[i], 0, 1);
    for (int i = 0; i < 128; i++) send_cell(many[i], 1, 1);
    for (int i = 127; i >= 0; i--) begin send_cell(many[i], 2, 1); exp_order.push_back(many[i]); end
    // phase 5: errors
    a = new_msg(60, 900);
    send_cell(a, 0, 1);
    send_cell(a, 1, 0);                 // CRC failure: dropped, message stays incomplete
    b2 = new_msg(60, 901);
    send_cell(b2, 1, 1);                // COM with no BOM: orphan
    send_cell(a, 0, 1);                 // second BOM on MID 900: duplicate
    repeat (25000) @(posedge clk);
    check(got_msgs == exp_order.size(), $sformatf("messages out %0d of %0d", got_msgs, exp_order.size()));
    check(msgs_done == 16'(exp_order.size()), "msgs_done");
    check(drop_crc == 1, "drop_crc");
    check(drop_orphan == 1, "drop_orphan");
    check(drop_dup == 1, "drop_dup");
    check(drop_full == 0, "drop_full");
    check(t_last_big - t_first_big + 1 <= 209 * 53,
          $sformatf("9188-byte read-out took %0d cycles", t_last_big - t_first_big + 1));
    $display("9188-byte message read out in %0d cycles (%0d per cell)",
             t_last_big - t_first_big + 1, (t_last_big - t_first_big + 1) / 209);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
