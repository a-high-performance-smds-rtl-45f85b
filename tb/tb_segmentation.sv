// tb_segmentation: self-checking test of segmentation.
// Sends messages of 10, 44, 45, 250 (the six-cell example) and 9188 bytes (the largest
// L3-PDU, 209 cells) with random byte values, and rebuilds every expected segment in the
// testbench: NCI, segment type sequence (SSM or BOM, COM..., EOM), MID, CSN counting from 0,
// payload bytes, zero padding, PL and a zero CRC field. Also checks that segments leave at
// one per 44 input bytes once the stream runs (faster than the 53-byte cell time).
module tb_segmentation;
  import smds_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [9:0]  mid;
  logic [7:0]  msg_data;
  logic        msg_valid, msg_last, msg_ready;
  logic [31:0] seg_word;
  logic        seg_valid, seg_first, seg_last, seg_ready;

  segmentation dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // message store
  byte unsigned msgs [5][];
  int lens [5] = '{10, 44, 45, 250, 9188};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  int m_drv;
  initial begin
    mid = 10'd600;
    msg_valid = 0; msg_data = 0; msg_last = 0; seg_ready = 1;
    foreach (lens[i]) begin
      msgs[i] = new[lens[i]];
      foreach (msgs[i][j]) msgs[i][j] = 8'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (m_drv = 0; m_drv < 5; m_drv++) begin
      for (int j = 0; j < lens[m_drv]; j++) begin
        @(negedge clk);
        msg_valid = 0;
        while (!msg_ready) @(negedge clk);
        msg_valid = 1; msg_data = msgs[m_drv][j]; msg_last = (j == lens[m_drv]-1);
      end
      @(negedge clk);
      msg_valid = 0; msg_last = 0;
    end
  end

  // monitor
  logic [415:0] seg;
  int wi = 0, m_mon = 0, cell_in_msg = 0, last_first_t = -1, steady_max = 0, nseg = 0;
  int t = 0;
  always @(posedge clk) t++;

  always @(posedge clk) if (rst_n && seg_valid && seg_ready) begin
    seg[415 - 32*wi -: 32] = seg_word;
    check(seg_first == (wi == 0), "seg_first position");
    check(seg_last == (wi == 12), "seg_last position");
    if (seg_first) begin
      if (m_mon == 4 && cell_in_msg > 1 && cell_in_msg < 200) begin
        if (t - last_first_t > steady_max) steady_max = t - last_first_t;
      end
      last_first_t = t;
    end
    wi++;
    if (wi == 13) begin
      int L, ncell, nb, off;
      logic [1:0] exp_st;
      wi = 0;
      L = lens[m_mon];
      ncell = (L + 43) / 44;
      off = cell_in_msg * 44;
      nb = (L - off > 44) ? 44 : L - off;
      if (ncell == 1) exp_st = 2'b11;
      else if (cell_in_msg == 0) exp_st = 2'b10;
      else if (cell_in_msg == ncell - 1) exp_st = 2'b01;
      else exp_st = 2'b00;
      check(seg[415:392] == 24'hFFFFF0, "NCI");
      check(seg[383:382] == exp_st, $sformatf("ST msg %0d cell %0d", m_mon, cell_in_msg));
      check(seg[381:372] == 10'd600, "MID");
      check(seg[371:368] == 4'(cell_in_msg), "CSN");
      for (int b = 0; b < 44; b++) begin
        logic [7:0] eb;
        eb = (b < nb) ? msgs[m_mon][off + b] : 8'h00;
        if (seg[367 - 8*b -: 8] != eb) begin
          check(0, $sformatf("payload msg %0d cell %0d byte %0d", m_mon, cell_in_msg, b));
        end
      end
      checks++;
      check(seg[15:10] == 6'(nb), "PL");
      check(seg[9:0] == 10'd0, "CRC field zero");
      nseg++;
      cell_in_msg++;
      if (cell_in_msg == ncell) begin
        cell_in_msg = 0;
        m_mon++;
        if (m_mon == 5) begin
          check(nseg == 1 + 1 + 2 + 6 + 209, "segment count");
          check(steady_max > 0 && steady_max <= 53, $sformatf("segment period %0d", steady_max));
          $display("steady segment period = %0d cycles", steady_max);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
