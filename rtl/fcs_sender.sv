// fcs_sender: the SENDER of the FCS2 unit. It decides every word handed to
// the Fibre Channel transmitter.
//
// The link runs continuously: in each cycle with tx_en the sender emits one
// 16-bit word (tx_valid, tx_word; k marks K28.5). Ordered sets take two
// consecutive words. Choice at each ordered-set boundary:
//  1. link not active: the primitive sequence the link FSM asks for (NOS,
//     OLS, LR, LRR) or Idles; frames and R_RDY wait;
//  2. a pending R_RDY (requested by the filter for buffer-to-buffer flow
//     control) is sent;
//  3. once at least MIN_GAP ordered sets have been sent since the last frame,
//     a whole frame is sent, from the local buffer (frames the control unit
//     prepared) first, otherwise from the reassembly FIFO;
//  4. otherwise an Idle.
// A frame is copied word by word, its SOF and EOF included, until the word
// flagged `last`. Both sources only show committed frames, so a frame never
// runs dry once started. The 6-Idle minimum gap follows the document; the
// priorities are this design's choice.
module fcs_sender
  import fap_pkg::*;
#(
  parameter int MIN_GAP = 6
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     tx_en,
  output logic     tx_valid,
  output fc_word_t tx_word,
  input  seq_e     seq,
  input  logic     active,
  input  logic     rrdy_req,
  input  logic     loc_valid,
  input  fr_word_t loc_data,
  output logic     loc_pop,
  input  logic     rem_valid,
  input  fr_word_t rem_data,
  output logic     rem_pop,
  output logic     frame_sent,
  output logic     rrdy_sent
);
  typedef enum logic [1:0] { SRC_NONE, SRC_LOC, SRC_REM } src_e;

  src_e        src;
  logic        half;          // second word of an ordered set is next
  logic [15:0] w1;            // that second word
  logic [$clog2(MIN_GAP+1)-1:0] gap;
  logic [7:0]  rrdy_pend;
  logic        start_loc, start_rem, slot;
  fr_word_t    fw;

  assign slot      = tx_en && src == SRC_NONE && !half;
  assign start_loc = slot && active && rrdy_pend == 0 && int'(gap) >= MIN_GAP && loc_valid;
  assign start_rem = slot && active && rrdy_pend == 0 && int'(gap) >= MIN_GAP && !loc_valid && rem_valid;
  assign loc_pop   = tx_en && (src == SRC_LOC || start_loc);
  assign rem_pop   = tx_en && (src == SRC_REM || start_rem);
  assign fw        = (src == SRC_LOC || start_loc) ? loc_data : rem_data;
  logic  dec;                 // an R_RDY goes out in this slot
  assign dec       = slot && active && rrdy_pend != 0 && !loc_pop && !rem_pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src <= SRC_NONE; half <= 1'b0; w1 <= '0; gap <= '0; rrdy_pend <= '0;
      tx_valid <= 1'b0; tx_word <= '0; frame_sent <= 1'b0; rrdy_sent <= 1'b0;
    end else begin
      tx_valid <= tx_en; frame_sent <= 1'b0; rrdy_sent <= 1'b0;
      if (tx_en) begin
        if (loc_pop || rem_pop) begin
          tx_word <= '{k: fw.k, d: fw.d};
          if (fw.last) begin
            src        <= SRC_NONE;
            gap        <= '0;
            frame_sent <= 1'b1;
          end else if (start_loc) src <= SRC_LOC;
          else if (start_rem)     src <= SRC_REM;
        end else if (half) begin
          tx_word <= '{k: 1'b0, d: w1};
          half    <= 1'b0;
          if (int'(gap) < MIN_GAP) gap <= gap + 1'b1;
        end else begin
          half <= 1'b1;
          if (!active) begin
            unique case (seq)
              SEQ_NOS: begin tx_word <= '{k: 1'b1, d: W0_NOS}; w1 <= W1_NOS; end
              SEQ_OLS: begin tx_word <= '{k: 1'b1, d: W0_OLS}; w1 <= W1_OLS; end
              SEQ_LR:  begin tx_word <= '{k: 1'b1, d: W0_LR};  w1 <= W1_LR;  end
              SEQ_LRR: begin tx_word <= '{k: 1'b1, d: W0_LRR}; w1 <= W1_LRR; end
              default: begin tx_word <= '{k: 1'b1, d: W0_IDLE}; w1 <= W1_IDLE; end
            endcase
          end else if (rrdy_pend != 0) begin
            tx_word   <= '{k: 1'b1, d: W0_RRDY};
            w1        <= W1_RRDY;
            rrdy_sent <= 1'b1;
          end else begin
            tx_word <= '{k: 1'b1, d: W0_IDLE};
            w1      <= W1_IDLE;
          end
        end
      end
      rrdy_pend <= rrdy_pend + 8'(rrdy_req && rrdy_pend != 8'hFF) - 8'(dec);
    end
  end
endmodule
