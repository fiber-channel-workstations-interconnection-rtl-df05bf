// fap_reassembler: the REASSEMBLER of SAR-2. It rebuilds FCS frames from
// the FAP cells of the connection and writes them into the frame FIFO that
// feeds the sender.
//
// A frame starts with a first cell (PT2=0, SI other than 011 and 010). Its
// frame counter is compared with the one expected after the previous frame;
// a gap counts a lost frame (frame_loss) but the new frame is taken. Each
// following cell must carry the same frame counter and the next cell counter
// (mod 64), otherwise a cell was lost: the partial frame is discarded
// (cell_loss) and cells are ignored until the next first cell. A first cell
// arriving inside a frame also discards the partial frame (no_eof).
// Payload words are written to the FIFO one per cycle: all 23 words of a cell
// without an EOF, words 0..EOF pointer+1 of a cell holding a whole EOF, and
// word 0 only of a last cell with SI=001 (the second half of a split EOF). The
// frame is committed with its last word, so the sender never sees a part of a
// frame. K28.5 flags are restored on word 0 of a first cell and on the EOF
// word.
// The reassembly timeout runs from the first cell; if the frame is not
// complete after REASM_TIMEOUT cycles it is discarded (timeout). A frame that
// does not fit in the FIFO is discarded too (overflow). A Link-Reset cell
// (SI=010) pulses lr_rx. Event outputs pulse for one cycle.
// REASM_TIMEOUT defaults to 1.5 times the time 47 back-to-back cells (a
// maximum-length frame) take at one byte per cycle: 1.5 x 47 x 53 = 3737.
module fap_reassembler
  import fap_pkg::*;
#(
  parameter int REASM_TIMEOUT = 3737
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cell_valid,
  output logic     cell_ready,
  input  cell_t    cell_i,
  output logic     wr_en,
  output fr_word_t wr_data,
  output logic     commit,
  output logic     discard,
  input  logic     wr_lost,
  input  logic     wr_full,
  output logic     lr_rx,
  output logic     frame_done,
  output logic     cell_loss,
  output logic     frame_loss,
  output logic     no_eof,
  output logic     timeout,
  output logic     overflow
);
  typedef enum logic { S_WAIT, S_WRITE } state_e;

  state_e     state;
  cell_t      cur;
  logic [4:0] j, n;          // word index, words to write
  logic       ends;          // this cell completes the frame
  logic       first_c;       // this is a first cell
  logic       infr, have_fc, lost;
  logic [1:0] cur_fc, exp_fc;
  logic [5:0] exp_cc;
  logic [$clog2(REASM_TIMEOUT+1)-1:0] timer;

  // classification of the offered cell
  logic is_lr, is_first;
  always_comb begin
    is_lr    = !cell_i.pt2 && cell_i.fap.si == SI_LR;
    is_first = !cell_i.pt2 && cell_i.fap.si != SI_LR && cell_i.fap.si != SI_MIDDLE;
  end

  assign cell_ready = (state == S_WAIT);

  // words carried by the offered cell and whether the frame ends with it
  logic [4:0] cnt;
  logic       fin, seq_ok, to_now, accept, last_w;
  always_comb begin
    if (cell_i.pt2 && cell_i.fap.si == SI_EOF_SPLIT) begin
      cnt = 5'd1;  fin = 1'b1;
    end else if (cell_i.fap.eof_ptr <= 5'd21) begin
      cnt = cell_i.fap.eof_ptr + 5'd2;  fin = 1'b1;
    end else begin
      cnt = 5'(PAYLOAD_WORDS);  fin = 1'b0;
    end
    seq_ok = cell_i.fap.frame_cnt == cur_fc && cell_i.fap.cell_cnt == exp_cc
             && !(cell_i.pt2 && !fin);
    to_now = infr && int'(timer) >= REASM_TIMEOUT;
    accept = state == S_WAIT && !to_now && cell_valid && (is_first || (infr && !is_lr && seq_ok));
  end
  assign last_w = (j == n - 5'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_WAIT; cur <= '0; j <= '0; n <= '0; ends <= 1'b0; first_c <= 1'b0;
      infr <= 1'b0; have_fc <= 1'b0; lost <= 1'b0; cur_fc <= '0; exp_fc <= '0; exp_cc <= '0;
      timer <= '0;
      wr_en <= 1'b0; wr_data <= '0; commit <= 1'b0; discard <= 1'b0;
      lr_rx <= 1'b0; frame_done <= 1'b0; cell_loss <= 1'b0; frame_loss <= 1'b0;
      no_eof <= 1'b0; timeout <= 1'b0; overflow <= 1'b0;
    end else begin
      wr_en <= 1'b0; commit <= 1'b0; discard <= 1'b0;
      lr_rx <= 1'b0; frame_done <= 1'b0; cell_loss <= 1'b0; frame_loss <= 1'b0;
      no_eof <= 1'b0; timeout <= 1'b0; overflow <= 1'b0;

      if (infr && int'(timer) < REASM_TIMEOUT) timer <= timer + 1'b1;

      unique case (state)
        S_WAIT: begin
          if (to_now) begin
            infr    <= 1'b0;
            discard <= 1'b1;
            timeout <= 1'b1;
          end else if (cell_valid) begin
            if (is_lr) begin
              lr_rx <= 1'b1;
            end else if (is_first) begin
              if (infr) begin
                discard <= 1'b1;
                no_eof  <= 1'b1;
              end
              if (have_fc && cell_i.fap.frame_cnt != exp_fc) frame_loss <= 1'b1;
              have_fc <= 1'b1;
              exp_fc  <= cell_i.fap.frame_cnt + 2'd1;
              cur_fc  <= cell_i.fap.frame_cnt;
              exp_cc  <= 6'd1;
              timer   <= '0;
              infr    <= 1'b1;
            end else if (infr) begin
              if (!seq_ok) begin
                infr      <= 1'b0;
                discard   <= 1'b1;
                cell_loss <= 1'b1;
              end else begin
                exp_cc <= exp_cc + 6'd1;
              end
            end
            if (accept) begin
              state   <= S_WRITE;
              cur     <= cell_i;
              j       <= '0;
              n       <= cnt;
              ends    <= fin;
              first_c <= is_first;
              lost    <= 1'b0;
            end
          end
        end
        S_WRITE: begin
          if (wr_full) lost <= 1'b1;
          wr_en        <= 1'b1;
          wr_data.d    <= cur.payload[j];
          wr_data.k    <= (first_c && j == 5'd0) ||
                          (cur.fap.eof_ptr == j && !(cur.pt2 && cur.fap.si == SI_EOF_SPLIT));
          wr_data.last <= last_w && ends;
          j <= j + 5'd1;
          if (last_w) begin
            state <= S_WAIT;
            if (ends) begin
              infr <= 1'b0;
              if (lost || wr_lost || wr_full) begin
                discard  <= 1'b1;
                overflow <= 1'b1;
              end else begin
                commit     <= 1'b1;
                frame_done <= 1'b1;
              end
            end
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end
endmodule
