// reassembly: rebuilds SMDS messages from cells of up to N_MSG interleaved messages whose
// cells may arrive out of order.
//
// Three memories, as in the document's reassembly scheme:
//   MID table      indexed by MID: "message in progress" bit and the message number
//   message table  N_MSG rows of MSG_SLOTS entries: the cell-buffer address of each cell of
//                  the message, at the position given by its sequence number
//   cell buffer    N_CELLS cells of 12 words (segment header, payload, trailer)
// Cell-buffer locations and message numbers are handed out from free lists, so the buffer
// is filled cell by cell and a new cell always goes to the next free location.
//
// Receive: the 13 words of a cell arrive on in_* (word 0 = NCI, in_crc_ok with the last
// word). Words 1..12 are written to the next free cell location as they arrive. One cycle
// after the last word the cell is filed:
//   BOM  a message number is taken from its free list and entered in the MID table
//   SSM  a message number is taken and the message is complete at once
//   COM/EOM  the MID table gives the message; the position in the message table is
//        worked out from the 4-bit CSN (see below)
// A message is complete when its EOM has arrived and as many cells as the EOM position
// plus one are filed; it then goes on the completion queue and its MID is released.
// Cells with a CRC error, for a MID with no message in progress, a second BOM for a busy
// MID, or with no free cell or message entry are dropped and counted.
//
// Position from CSN (this design's choice; the document says only that the position is
// calculated from the sequence number): the CSN offset from the BOM is known modulo 16,
// so the cell is placed at the position nearest to the highest position filed so far,
// within -8..+7 of it. Cells can thus be mis-ordered by up to 7 positions.
//
// Read-out: completed messages leave one at a time as a byte stream (out_valid/out_ready,
// out_last on the last byte), made of the PL payload bytes of each cell in position
// order. A cell takes PL cycles, at most 44, which is less than the 53 byte-clock cycles
// between cells on the line, so messages are read out at the cell arrival rate. Freed
// cells and message numbers go back to their free lists.
module reassembly
  import smds_pkg::*;
#(
  parameter int unsigned N_MSG     = 128,   // interleaved messages
  parameter int unsigned MSG_SLOTS = 256,   // message-table entries per message (>= 209)
  parameter int unsigned N_CELLS   = 4096   // cell-buffer size in cells
) (
  input  logic        clk,
  input  logic        rst_n,
  // cells in, MAC_Indicate[31:0]
  input  logic [31:0] in_word,
  input  logic        in_valid,
  input  logic        in_first,
  input  logic        in_last,
  input  logic        in_crc_ok,
  // messages out, to the bridge
  output logic [7:0]  out_data,
  output logic        out_valid,
  output logic        out_last,
  input  logic        out_ready,
  // statistics
  output logic [15:0] msgs_done,
  output logic [15:0] drop_crc,
  output logic [15:0] drop_orphan,
  output logic [15:0] drop_full,
  output logic [15:0] drop_dup
);

  localparam int unsigned MW = $clog2(N_MSG);
  localparam int unsigned SW = $clog2(MSG_SLOTS);
  localparam int unsigned CW = $clog2(N_CELLS);
  localparam int unsigned CELL_WORDS = 12;

  // ------------------------------------------------------------------ memories
  logic [1023:0]        mid_valid;
  logic [MW-1:0]        mid_msg   [1024];
  logic [CW-1:0]        msg_tab   [N_MSG*MSG_SLOTS];
  logic [31:0]          cell_buf  [N_CELLS*CELL_WORDS];
  logic [PL_W-1:0]      cell_pl   [N_CELLS];
  // per-message state
  logic [SW:0]          ms_cnt    [N_MSG];
  logic [SW-1:0]        ms_hi     [N_MSG];
  logic [CSN_W-1:0]     ms_base   [N_MSG];
  logic                 ms_eom    [N_MSG];
  logic [SW-1:0]        ms_eompos [N_MSG];

  // ------------------------------------------------------------------ free lists
  logic [CW:0]   cf_fresh;                 // cells never used yet: cf_fresh .. N_CELLS-1
  logic [CW-1:0] cf_fifo [N_CELLS];
  logic [CW-1:0] cf_head, cf_tail;
  logic [CW:0]   cf_cnt;
  logic [MW:0]   mf_fresh;
  logic [MW-1:0] mf_fifo [N_MSG];
  logic [MW-1:0] mf_head, mf_tail;
  logic [MW:0]   mf_cnt;

  logic          cell_avail, msg_avail;
  logic [CW-1:0] cell_peek;
  logic [MW-1:0] msg_peek;
  assign cell_avail = (cf_cnt != 0) || (cf_fresh < (CW+1)'(N_CELLS));
  assign cell_peek  = (cf_cnt != 0) ? cf_fifo[cf_head] : cf_fresh[CW-1:0];
  assign msg_avail  = (mf_cnt != 0) || (mf_fresh < (MW+1)'(N_MSG));
  assign msg_peek   = (mf_cnt != 0) ? mf_fifo[mf_head] : mf_fresh[MW-1:0];

  // completion queue
  logic [MW-1:0] cq_msg  [N_MSG];
  logic [SW-1:0] cq_last [N_MSG];
  logic [MW-1:0] cq_head, cq_tail;
  logic [MW:0]   cq_cnt;

  // ------------------------------------------------------------------ receive
  logic [3:0]    wcnt;
  logic          rx_have_cell;            // a free location was reserved for this cell
  logic          rx_fresh;                // ... and it came from the never-used range
  logic [CW-1:0] rx_cell;
  seg_hdr_t      rx_hdr;
  logic [PL_W-1:0] rx_pl;
  logic          rx_crc;
  logic          proc;                    // file the cell this cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0;
      rx_have_cell <= 1'b0;
      rx_fresh <= 1'b0;
      rx_cell <= '0;
      rx_hdr <= '0;
      rx_pl <= '0;
      rx_crc <= 1'b0;
      proc <= 1'b0;
    end else begin
      proc <= 1'b0;
      if (in_valid) begin
        wcnt <= in_last ? 4'd0 : (in_first ? 4'd1 : wcnt + 1'b1);
        if (!in_first && wcnt == 4'd1) begin
          rx_hdr       <= seg_hdr_t'(in_word[31:16]);
          rx_have_cell <= cell_avail;
          rx_cell      <= cell_peek;
          rx_fresh     <= cf_cnt == 0;
        end
        if (in_last) begin
          rx_pl  <= in_word[15:10];
          rx_crc <= in_crc_ok;
          proc   <= 1'b1;
        end
      end
    end
  end

  // cell-buffer writes: the location is the current free-list head
  logic [CW-1:0] wr_cell;
  logic          wr_ok;
  assign wr_cell = (wcnt == 4'd1) ? cell_peek : rx_cell;
  assign wr_ok   = (wcnt == 4'd1) ? cell_avail : rx_have_cell;
  always_ff @(posedge clk) begin
    if (in_valid && !in_first && wcnt != 0 && wr_ok)
      cell_buf[32'(wr_cell) * CELL_WORDS + 32'(wcnt) - 1] <= in_word;
  end

  // ------------------------------------------------------------------ filing (comb)
  logic          mt_valid;
  logic [MW-1:0] mt_msg;
  logic [SW-1:0] pos;
  logic [SW:0]   pos_ext;
  logic [3:0]    d4;
  logic [SW:0]   new_cnt;
  logic          accept, alloc_msg, complete, pos_bad;
  logic [MW-1:0] f_msg;
  logic [SW-1:0] f_last;
  logic [1:0]    drop_kind; // 0 none, 1 crc, 2 orphan, 3 full
  logic          dup;

  assign mt_valid = mid_valid[rx_hdr.mid];
  assign mt_msg   = mid_msg[rx_hdr.mid];

  always_comb begin
    accept = 1'b0; alloc_msg = 1'b0; complete = 1'b0; pos_bad = 1'b0; dup = 1'b0;
    drop_kind = 2'd0;
    f_msg = mt_msg; pos = '0; f_last = '0; new_cnt = '0; pos_ext = '0;
    d4 = rx_hdr.csn - ms_base[mt_msg] - ms_hi[mt_msg][3:0];
    pos_ext = {1'b0, ms_hi[mt_msg]} + {{(SW-3){d4[3]}}, d4};
    if (!rx_crc) begin
      drop_kind = 2'd1;
    end else if (!rx_have_cell) begin
      drop_kind = 2'd3;
    end else begin
      unique case (rx_hdr.st)
        ST_BOM, ST_SSM: begin
          if (rx_hdr.st == ST_BOM && mt_valid) dup = 1'b1;
          else if (!msg_avail) drop_kind = 2'd3;
          else begin
            accept = 1'b1; alloc_msg = 1'b1; f_msg = msg_peek; pos = '0;
            new_cnt = 1;
            complete = (rx_hdr.st == ST_SSM);
            f_last = '0;
          end
        end
        default: begin
          if (!mt_valid) drop_kind = 2'd2;
          else begin
            pos_bad = pos_ext[SW] || (pos_ext == '0);
            if (pos_bad) drop_kind = 2'd2;
            else begin
              accept  = 1'b1;
              pos     = pos_ext[SW-1:0];
              new_cnt = ms_cnt[mt_msg] + 1'b1;
              f_last  = (rx_hdr.st == ST_EOM) ? pos : ms_eompos[mt_msg];
              complete = ((rx_hdr.st == ST_EOM) || ms_eom[mt_msg]) &&
                         (new_cnt == {1'b0, f_last} + 1'b1);
            end
          end
        end
      endcase
    end
  end

  // ------------------------------------------------------------------ read-out
  typedef enum logic [1:0] {RD_IDLE, RD_CELL, RD_BYTES} rd_state_e;
  rd_state_e     rd_state;
  logic [MW-1:0] rd_msg;
  logic [SW-1:0] rd_last, rd_pos;
  logic [CW-1:0] rd_cell;
  logic [PL_W-1:0] rd_pl, rd_b;
  logic          free_cell, free_msg;

  logic [5:0]    boff;
  logic [31:0]   rd_word;
  assign boff     = 6'(rd_b) + 6'd2;               // payload byte b is stored byte b+2
  assign rd_word  = cell_buf[32'(rd_cell) * CELL_WORDS + 32'(boff[5:2])];
  assign out_data = rd_word[(2'd3 - boff[1:0])*8 +: 8];
  assign out_valid = (rd_state == RD_BYTES);
  assign out_last  = out_valid && (rd_b == rd_pl - 1'b1) && (rd_pos == rd_last);

  logic cq_pop;
  assign cq_pop = (rd_state == RD_IDLE) && (cq_cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_state <= RD_IDLE;
      rd_msg <= '0; rd_last <= '0; rd_pos <= '0; rd_cell <= '0; rd_pl <= '0; rd_b <= '0;
    end else begin
      unique case (rd_state)
        RD_IDLE: if (cq_cnt != 0) begin
          rd_msg   <= cq_msg[cq_head];
          rd_last  <= cq_last[cq_head];
          rd_pos   <= '0;
          rd_state <= RD_CELL;
        end
        RD_CELL: begin
          rd_cell  <= msg_tab[32'(rd_msg) * MSG_SLOTS + 32'(rd_pos)];
          rd_pl    <= cell_pl[msg_tab[32'(rd_msg) * MSG_SLOTS + 32'(rd_pos)]];
          rd_b     <= '0;
          rd_state <= RD_BYTES;
        end
        RD_BYTES: if (out_ready || rd_pl == 0) begin
          if (rd_pl == 0 || rd_b == rd_pl - 1'b1) begin
            if (rd_pos == rd_last) rd_state <= RD_IDLE;
            else begin
              rd_pos   <= rd_pos + 1'b1;
              rd_state <= RD_CELL;
            end
          end else begin
            rd_b <= rd_b + 1'b1;
          end
        end
        default: rd_state <= RD_IDLE;
      endcase
    end
  end

  assign free_cell = (rd_state == RD_BYTES) && (out_ready || rd_pl == 0) &&
                     (rd_pl == 0 || rd_b == rd_pl - 1'b1);
  assign free_msg  = free_cell && (rd_pos == rd_last);

  // ------------------------------------------------------------------ table and list updates
  logic pop_cell, pop_msg, push_cq;
  assign pop_cell = proc && accept;
  assign pop_msg  = proc && alloc_msg;
  assign push_cq  = proc && complete;

  always_ff @(posedge clk) begin
    if (proc && accept) begin
      msg_tab[32'(f_msg) * MSG_SLOTS + 32'(pos)] <= rx_cell;
      cell_pl[rx_cell] <= rx_pl;
      ms_cnt[f_msg] <= new_cnt;
      if (alloc_msg) begin
        ms_hi[f_msg]     <= '0;
        ms_base[f_msg]   <= rx_hdr.csn;
        ms_eom[f_msg]    <= 1'b0;
        ms_eompos[f_msg] <= '0;
        mid_msg[rx_hdr.mid] <= f_msg;
      end else begin
        if (pos > ms_hi[f_msg]) ms_hi[f_msg] <= pos;
        if (rx_hdr.st == ST_EOM) begin
          ms_eom[f_msg]    <= 1'b1;
          ms_eompos[f_msg] <= pos;
        end
      end
    end
    if (push_cq) begin
      cq_msg[cq_tail]  <= f_msg;
      cq_last[cq_tail] <= f_last;
    end
    if (free_cell) cf_fifo[cf_tail] <= rd_cell;
    if (free_msg)  mf_fifo[mf_tail] <= rd_msg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mid_valid <= '0;
      cf_fresh <= '0; cf_head <= '0; cf_tail <= '0; cf_cnt <= '0;
      mf_fresh <= '0; mf_head <= '0; mf_tail <= '0; mf_cnt <= '0;
      cq_head <= '0; cq_tail <= '0; cq_cnt <= '0;
      msgs_done <= '0; drop_crc <= '0; drop_orphan <= '0; drop_full <= '0; drop_dup <= '0;
    end else begin
      if (proc && accept && rx_hdr.st == ST_BOM) mid_valid[rx_hdr.mid] <= 1'b1;
      if (push_cq && rx_hdr.st != ST_SSM)        mid_valid[rx_hdr.mid] <= 1'b0;
      // cell free list
      if (pop_cell && rx_fresh)  cf_fresh <= cf_fresh + 1'b1;
      if (pop_cell && !rx_fresh) cf_head <= cf_head + 1'b1;
      if (free_cell) cf_tail <= cf_tail + 1'b1;
      cf_cnt <= cf_cnt + (CW+1)'(free_cell) - (CW+1)'(pop_cell && !rx_fresh);
      // message free list
      if (pop_msg && mf_cnt == 0) mf_fresh <= mf_fresh + 1'b1;
      if (pop_msg && mf_cnt != 0) mf_head <= mf_head + 1'b1;
      if (free_msg) mf_tail <= mf_tail + 1'b1;
      mf_cnt <= mf_cnt + (MW+1)'(free_msg) - (MW+1)'(pop_msg && mf_cnt != 0);
      // completion queue
      if (push_cq) cq_tail <= cq_tail + 1'b1;
      if (cq_pop)  cq_head <= cq_head + 1'b1;
      cq_cnt <= cq_cnt + (MW+1)'(push_cq) - (MW+1)'(cq_pop);
      // statistics
      if (push_cq) msgs_done <= msgs_done + 1'b1;
      if (proc && drop_kind == 2'd1) drop_crc    <= drop_crc + 1'b1;
      if (proc && drop_kind == 2'd2) drop_orphan <= drop_orphan + 1'b1;
      if (proc && drop_kind == 2'd3) drop_full   <= drop_full + 1'b1;
      if (proc && dup)               drop_dup    <= drop_dup + 1'b1;
    end
  end

endmodule
