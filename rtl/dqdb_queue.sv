// dqdb_queue: the counters and queue control of a DQDB MAC, for one bus and priority 0.
//
// Distributed queue (IEEE 802.6): while the node has nothing queued, the request counter
// RQ counts REQ bits seen on the opposite bus (seen by the other MAC, req_other) and counts
// down once for every empty slot passing on this bus. When a segment is queued, RQ moves
// into the countdown counter CD and RQ restarts from zero; a REQ is sent upstream on the
// opposite bus (req_send, carried out by the other MAC). CD then counts down once per empty
// slot that passes; with CD = 0 the node may take the next empty slot (may_send).
// In the Single-CPE configuration (single_cpe = 1) the queue is bypassed: the node owns the
// bus and may take every empty slot, as the document says the DQDB protocol is then not
// necessary.
//
// Timing: all inputs are one-cycle pulses; may_send is valid in the same cycle as the
// empty slot's ACF. Counter widths are this design's choice (RQ_W bits, saturating).
module dqdb_queue #(
  parameter int unsigned RQ_W = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic single_cpe,
  input  logic queued,       // a segment became ready to send
  input  logic req_other,    // REQ bit seen on the opposite bus
  input  logic empty_pass,   // an empty slot passed on this bus without being taken
  input  logic sent,         // this node wrote its segment into a slot
  output logic may_send,
  output logic req_send,     // ask the other MAC to set a REQ bit
  output logic [RQ_W-1:0] rq,
  output logic [RQ_W-1:0] cd
);

  logic counting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq <= '0;
      cd <= '0;
      counting <= 1'b0;
    end else if (single_cpe) begin
      rq <= '0;
      cd <= '0;
      counting <= 1'b0;
    end else begin
      if (queued && !counting) begin
        cd       <= rq - RQ_W'(empty_pass && rq != 0);
        rq       <= RQ_W'(req_other);
        counting <= 1'b1;
      end else begin
        if (counting) begin
          if (empty_pass && cd != 0) cd <= cd - 1'b1;
          if (req_other && rq != '1) rq <= rq + 1'b1;
        end else begin
          unique case ({req_other && rq != '1, empty_pass && rq != 0})
            2'b10:   rq <= rq + 1'b1;
            2'b01:   rq <= rq - 1'b1;
            default: ;
          endcase
        end
        if (sent) counting <= 1'b0;
      end
    end
  end

  assign may_send = single_cpe || (counting && cd == 0);
  assign req_send = !single_cpe && queued && !counting;

endmodule
