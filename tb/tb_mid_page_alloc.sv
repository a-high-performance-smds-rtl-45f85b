// tb_mid_page_alloc: self-checking test of MID page allocation.
// The testbench plays the head of Bus A (and, in the Multiple-CPE part, the M2 stream on
// Bus B), sending one M2 byte per "frame": cycle-start mark with value 1, the two LSBs of
// the value, and a reserved mark where a value is taken.
//   Single-CPE: values before the first cycle start are ignored; with 512..515 marked the
//     node takes 516 and keeps it through later cycles, even when 516 comes marked; it sends
//     no M2 of its own; a wrong LSB pattern reports a step error
//   Multiple-CPE: with 512 and 513 marked upstream on Bus B the node reserves 514 by
//     marking it in its outgoing M2 and marks it again on the next cycle; when 514 arrives
//     already marked the MID is lost and 515 is reserved instead
module tb_mid_page_alloc;
  import smds_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       single_cpe;
  logic [7:0] a_m2_in, b_m2_in, b_m2_out;
  logic       a_m2_valid, b_m2_valid;
  logic [9:0] mid, a_count;
  logic       mid_valid, mid_lost, a_step_err;

  mid_page_alloc dut (.*);

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

  function automatic logic [7:0] m2(input int v, input bit rsv, input bit lsb_err);
    logic [1:0] l;
    l = 2'(v) ^ {1'b0, lsb_err};
    return {rsv, (v == 1), 4'b0000, l};
  endfunction

  int lost = 0, steperr = 0;
  always @(posedge clk) begin
    if (mid_lost) lost++;
    if (a_step_err) steperr++;
  end

  task automatic a_frame(input int v, input bit rsv, input bit lsb_err = 0);
    @(negedge clk); a_m2_in = m2(v, rsv, lsb_err); a_m2_valid = 1;
    @(negedge clk); a_m2_valid = 0;
  endtask

  logic [7:0] out_seen;
  task automatic b_frame(input int v, input bit rsv);
    @(negedge clk); b_m2_in = m2(v, rsv, 0); b_m2_valid = 1;
    #1 out_seen = b_m2_out;
    @(negedge clk); b_m2_valid = 0;
  endtask

  initial begin
    single_cpe = 1; a_m2_in = 0; b_m2_in = 0; a_m2_valid = 0; b_m2_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- Single-CPE
    for (int v = 900; v < 1024; v++) a_frame(v, 0);     // before any cycle start
    check(!mid_valid, "no MID before the counter is in step");
    for (int v = 1; v < 1024; v++) begin
      a_frame(v, v >= 512 && v <= 515);
      if (v == 515) check(!mid_valid, "marked values not taken");
      if (v == 516) check(mid_valid && mid == 10'd516, $sformatf("took MID %0d", mid));
      check(b_m2_out == 8'h00, "Single-CPE sends no M2");
    end
    for (int v = 1; v < 1024; v++) a_frame(v, v == 516);
    check(mid_valid && mid == 10'd516 && lost == 0, "Single-CPE keeps its MID");
    steperr = 0;
    a_frame(1, 0); a_frame(2, 0, 1);
    repeat (2) @(negedge clk);
    check(steperr == 1, $sformatf("LSB mismatch reported %0d", steperr));

    // ---------------- Multiple-CPE
    single_cpe = 0;
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int v = 1; v < 1024; v++) begin
      b_frame(v, v == 512 || v == 513);
      if (v == 512 || v == 513) check(out_seen[7], "marked value repeated with its mark");
      if (v == 514) check(out_seen[7], $sformatf("reserving 514 marks it %0d %0d %0d", out_seen, mid_valid, mid));
      if (v == 515) check(!out_seen[7] && mid_valid && mid == 10'd514, "514 held, 515 passed free");
    end
    for (int v = 1; v < 1024; v++) begin
      b_frame(v, 0);
      if (v == 514) check(out_seen[7], "own MID marked again");
      if (v == 600) check(!out_seen[7], "other values unmarked");
    end
    for (int v = 1; v < 1024; v++) begin
      b_frame(v, v == 514);
      if (v == 515) check(out_seen[7], "after the loss 515 is reserved");
    end
    check(lost == 1, $sformatf("MID lost once (%0d)", lost));
    check(mid_valid && mid == 10'd515, $sformatf("new MID %0d", mid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
