// fap_segmenter: the SEGMENTATOR of SAR-1. It cuts the frames held in the
// segmentation buffer into ATM cell payloads following the FAP rules.
//
// Every FCS frame, SOF and EOF ordered sets included, is copied word by word
// into 23-word (46-byte) payloads. Each cell gets the FAP header:
//   first cell of a frame     PT2=0, SI=000 (more cells follow) or 001 (the
//                             whole frame fits); SI=101 if the frame opens
//                             with SOFc1, SI=110 if it is a P_RJT frame and
//                             SI=100 if it is a one-cell frame closed by
//                             EOFdt (precedence in that order)
//   middle cell               PT2=0, SI=011
//   last cell                 PT2=1, SI=000, or SI=001 when the EOF is split
//                             so that only its second word is in this cell
//   Link-Reset notification   PT2=0, SI=010, empty payload (on lr_req)
// The EOF pointer is the word offset of the EOF's first word in the cell, 31
// where the cell holds none. The frame counter (mod 4) advances per frame,
// the cell counter (mod 64) restarts at 0 on every first cell. Unused payload
// words are zero.
//
// Deadlock protection: if a frame has started and no word arrives for
// SEG_TIMEOUT cycles, or a new SOF shows up before the EOF, the frame is
// closed with an EOFa (abort) ordered set made here, so the far end discards
// it; seg_abort pulses. Words outside a frame are dropped.
//
// Interface: first-word fall-through input (in_valid/in_data, in_pop takes
// the word), one word per cycle; cells leave on a ready/valid pair through an
// output register. The cell format follows the document; the EOF-pointer
// "none" value, the SI precedence and the EOFa closing are this design's
// choices.
module fap_segmenter
  import fap_pkg::*;
#(
  parameter int SEG_TIMEOUT = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  seg_word_t in_data,
  output logic      in_pop,
  input  logic      lr_req,
  output logic      cell_valid,
  input  logic      cell_ready,
  output cell_t     cell_o,
  output logic      seg_abort
);
  localparam int LASTW = PAYLOAD_WORDS - 1;

  logic [0:PAYLOAD_WORDS-1][15:0] buf_q;
  logic [4:0]  widx;
  logic        infr, eof_seen, eof_here, split, c1, prjt;
  logic [4:0]  eof_ptr;
  logic [5:0]  cell_cnt;
  logic [1:0]  fc_cur, fc_next;
  logic [1:0]  ins;                 // 0 none, 1 EOFa word 0 next, 2 EOFa word 1 next
  logic        lr_pend;
  logic [$clog2(SEG_TIMEOUT+1)-1:0] idle_cnt;

  logic        can_emit, take, from_buf, start_ins;
  seg_word_t   w;
  logic        ends_frame, full_cell, emit;
  cell_t       dcell;
  logic        first;

  assign can_emit = !cell_valid || cell_ready;

  // choose the word handled this cycle
  always_comb begin
    w         = in_data;
    take      = 1'b0;
    from_buf  = 1'b0;
    start_ins = 1'b0;
    if (can_emit && !lr_pend) begin
      if (!infr) begin
        take     = in_valid;
        from_buf = in_valid;
      end else if (ins == 2'd1) begin
        w = '{sof:1'b0, c1:1'b0, prjt:1'b0, eof:1'b1, dt:1'b0, d:W0_EOFA};
        take = 1'b1;
      end else if (ins == 2'd2) begin
        w = '{sof:1'b0, c1:1'b0, prjt:1'b0, eof:1'b0, dt:1'b0, d:W1_EOFA};
        take = 1'b1;
      end else if (in_valid && !in_data.sof) begin
        take     = 1'b1;
        from_buf = 1'b1;
      end else if ((in_valid && in_data.sof) || int'(idle_cnt) >= SEG_TIMEOUT) begin
        start_ins = 1'b1;
      end
    end
  end
  assign in_pop = from_buf;

  // does this word close a cell?
  logic        starts;
  logic [4:0]  idx;
  assign starts     = take && !infr && w.sof;
  assign idx        = starts ? 5'd0 : widx;
  assign ends_frame = take && infr && eof_seen;                 // second EOF word
  assign full_cell  = take && (infr || starts) && (idx == 5'(LASTW));
  assign emit       = ends_frame || full_cell;
  assign first      = starts || (cell_cnt == 6'd0);

  always_comb begin
    logic c1_n, prjt_n;
    logic eof_in_cell;
    logic [4:0] ptr;
    c1_n   = (starts ? 1'b0 : c1)   | w.c1;
    prjt_n = (starts ? 1'b0 : prjt) | w.prjt;
    eof_in_cell = (w.eof && take) || eof_here;
    ptr = (w.eof && take) ? idx : eof_ptr;
    dcell = '0;
    for (int i = 0; i < PAYLOAD_WORDS; i++)
      if (i < int'(idx)) dcell.payload[i] = buf_q[i];
    dcell.payload[idx] = w.d;
    dcell.fap.eof_ptr   = eof_in_cell ? ptr : EOF_NONE;
    dcell.fap.frame_cnt = starts ? fc_next : fc_cur;
    dcell.fap.cell_cnt  = starts ? 6'd0 : cell_cnt;
    if (ends_frame && first) begin
      dcell.pt2    = 1'b0;
      dcell.fap.si = c1_n ? SI_SOFC : prjt_n ? SI_PRJT : w.dt ? SI_ACK_DT : SI_SOF_WHOLE;
    end else if (ends_frame) begin
      dcell.pt2    = 1'b1;
      dcell.fap.si = split ? SI_EOF_SPLIT : SI_EOF_FULL;
    end else if (first) begin
      dcell.pt2    = 1'b0;
      dcell.fap.si = c1_n ? SI_SOFC : SI_SOF_PART;
    end else begin
      dcell.pt2    = 1'b0;
      dcell.fap.si = SI_MIDDLE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0; widx <= '0; infr <= 1'b0; eof_seen <= 1'b0; eof_here <= 1'b0;
      split <= 1'b0; c1 <= 1'b0; prjt <= 1'b0; eof_ptr <= EOF_NONE;
      cell_cnt <= '0; fc_cur <= '0; fc_next <= '0; ins <= '0; lr_pend <= 1'b0;
      idle_cnt <= '0; cell_valid <= 1'b0; cell_o <= '0; seg_abort <= 1'b0;
    end else begin
      seg_abort <= 1'b0;
      if (lr_req) lr_pend <= 1'b1;
      if (cell_valid && cell_ready) cell_valid <= 1'b0;

      if (can_emit && lr_pend) begin
        cell_valid    <= 1'b1;
        cell_o        <= '0;
        cell_o.fap.si   <= SI_LR;
        cell_o.fap.eof_ptr   <= EOF_NONE;
        cell_o.fap.frame_cnt <= fc_next;
        lr_pend       <= lr_req;
      end

      // timeout counter: idle cycles inside a frame
      if (!infr || take) idle_cnt <= '0;
      else if (int'(idle_cnt) < SEG_TIMEOUT) idle_cnt <= idle_cnt + 1'b1;

      if (start_ins) begin
        ins       <= eof_seen ? 2'd2 : 2'd1;
        seg_abort <= 1'b1;
      end

      if (take) begin
        if (ins != 2'd0) ins <= (ins == 2'd2) ? 2'd0 : 2'd2;
        if (!infr) begin
          if (w.sof) begin
            infr     <= 1'b1;
            fc_cur   <= fc_next;
            cell_cnt <= '0;
            c1       <= 1'b0;
            prjt     <= 1'b0;
            eof_seen <= 1'b0;
            eof_here <= 1'b0;
            split    <= 1'b0;
            buf_q[0] <= w.d;
            widx     <= 5'd1;
          end
        end else begin
          buf_q[idx] <= w.d;
          if (w.c1)   c1   <= 1'b1;
          if (w.prjt) prjt <= 1'b1;
          if (w.eof) begin
            eof_seen <= 1'b1;
            eof_here <= 1'b1;
            eof_ptr  <= idx;
          end
          widx <= idx + 5'd1;
        end
        if (emit) begin
          cell_valid <= 1'b1;
          cell_o     <= dcell;
          cell_cnt   <= (starts ? 6'd0 : cell_cnt) + 6'd1;
          widx       <= '0;
          eof_here   <= 1'b0;
          if (w.eof && take && full_cell) split <= 1'b1;   // second word goes alone
          if (ends_frame) begin
            infr    <= 1'b0;
            fc_next <= fc_cur + 2'd1;
            ins     <= 2'd0;
          end
        end
      end
    end
  end

  // a cell is never overwritten while it waits
  assert property (@(posedge clk) disable iff (!rst_n) cell_valid && !cell_ready |=> $stable(cell_o));
endmodule
