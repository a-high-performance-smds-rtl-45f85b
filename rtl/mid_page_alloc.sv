// mid_page_alloc: MID page allocation, the distributed protocol by which a CPE obtains a
// Message Identifier.
//
// The head of Bus A announces one MID value per frame in byte M2; the value itself is not
// carried, only its two least significant bits, so every node keeps a 10-bit counter that
// steps through the MID values 1..1023 once per frame and is checked against those two bits
// (a_step_err pulses on a mismatch and the node waits for the next cycle start). Values 1..511
// belong to the switching system, 512..1023 may be used by CPEs.
//   Single-CPE (single_cpe = 1): the CPE takes the first announced CPE value that is not
//     marked reserved, keeps it from then on and sends no M2 byte of its own (b_m2_out = 0).
//   Multiple-CPE: the head of Bus B repeats the values on Bus B, where nodes reserve them.
//     A second counter follows the Bus B values. A node with no MID marks the first free CPE
//     value passing on Bus B as reserved in its outgoing M2 (b_m2_out) and takes it; from
//     then on it marks it again each time it passes. If the value arrives already marked
//     by an upstream node, the MID is lost (mid_lost pulses) and a new one is sought.
//
// M2 layout (this design's choice; the document gives only that M2 holds the two LSBs):
//   bit 7 reserved mark, bit 6 cycle start (set with MID value 1), bits 1:0 MID LSBs,
//   other bits zero. The cycle-start mark lets a node load its counter; the two LSBs then
//   confirm every step. A node acquires a MID only while its counter is in step.
// Timing: *_m2_valid pulse once per frame with the received M2 byte; b_m2_out is
// combinational from b_m2_in.
module mid_page_alloc
  import smds_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             single_cpe,
  input  logic [7:0]       a_m2_in,
  input  logic             a_m2_valid,
  input  logic [7:0]       b_m2_in,
  input  logic             b_m2_valid,
  output logic [7:0]       b_m2_out,
  output logic [MID_W-1:0] mid,
  output logic             mid_valid,
  output logic             mid_lost,
  output logic             a_step_err,
  output logic [MID_W-1:0] a_count
);

  localparam logic [MID_W-1:0] CPE_FIRST = 10'd512;

  function automatic logic [MID_W-1:0] next_mid(input logic [MID_W-1:0] v);
    return (v == '1) ? 10'd1 : v + 1'b1;
  endfunction

  logic [MID_W-1:0] a_cnt, b_cnt, a_exp, b_exp, a_cur, b_cur;
  assign a_exp = next_mid(a_cnt);
  assign b_exp = next_mid(b_cnt);
  assign a_cur = a_m2_in[6] ? 10'd1 : a_exp;
  assign b_cur = b_m2_in[6] ? 10'd1 : b_exp;

  // in step: counter loaded by a cycle start and confirmed by the LSBs since
  logic a_sync, b_sync, a_ok, b_ok;
  assign a_ok = (a_m2_in[6] || a_sync) && a_m2_in[1:0] == a_cur[1:0];
  assign b_ok = (b_m2_in[6] || b_sync) && b_m2_in[1:0] == b_cur[1:0];

  logic b_mine, b_take;
  assign b_take = !single_cpe && b_m2_valid && b_ok && !mid_valid && b_cur >= CPE_FIRST &&
                  !b_m2_in[7];
  assign b_mine = !single_cpe && b_m2_valid && b_ok && mid_valid && b_cur == mid && !b_m2_in[7];
  assign b_m2_out = single_cpe ? 8'h00 : {b_m2_in[7] | b_take | b_mine, b_m2_in[6:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_cnt <= '0; b_cnt <= '0; mid <= '0; mid_valid <= 1'b0; mid_lost <= 1'b0;
      a_step_err <= 1'b0; a_sync <= 1'b0; b_sync <= 1'b0;
    end else begin
      mid_lost   <= 1'b0;
      a_step_err <= 1'b0;
      if (a_m2_valid) begin
        a_cnt      <= a_cur;
        a_sync     <= a_ok;
        a_step_err <= !a_ok;
        if (single_cpe && a_ok && !mid_valid && a_cur >= CPE_FIRST && !a_m2_in[7]) begin
          mid       <= a_cur;
          mid_valid <= 1'b1;
        end
      end
      if (b_m2_valid) begin
        b_cnt  <= b_cur;
        b_sync <= b_ok;
        if (b_take) begin
          mid       <= b_cur;
          mid_valid <= 1'b1;
        end else if (!single_cpe && b_ok && mid_valid && b_cur == mid && b_m2_in[7]) begin
          mid_valid <= 1'b0;
          mid_lost  <= 1'b1;
        end
      end
    end
  end

  assign a_count = a_cnt;

endmodule
