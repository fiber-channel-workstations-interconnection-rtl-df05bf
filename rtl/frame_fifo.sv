// frame_fifo: FIFO of whole Fibre Channel frames, used as the local buffers
// between the hardware and the control unit and as the FIFO between the
// reassembler and the sender.
//
// Words are written one per cycle (wr_en, wr_data). They become visible to the
// reader only when the writer pulses `commit`, normally together with or
// after the frame's last word; `discard` instead throws away everything
// written since the last commit (a frame cut short by cell loss, a timeout or
// an overflow). The read side is first-word fall-through: rd_data is valid
// while rd_valid is high and rd_en takes it. A write into a full buffer is
// dropped and sets `wr_lost`, which stays high until the next commit or
// discard; a commit of a frame that lost a word discards it instead. `frames` counts committed
// frames not yet read (a frame leaves when its word with `last` set is read).
// The commit/discard discipline and the depth are this design's choices.
module frame_fifo
  import fap_pkg::*;
#(
  parameter int DEPTH = 2048
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     wr_en,
  input  fr_word_t wr_data,
  input  logic     commit,
  input  logic     discard,
  output logic     wr_lost,
  output logic     full,
  input  logic     rd_en,
  output fr_word_t rd_data,
  output logic     rd_valid,
  output logic [$clog2(DEPTH):0] frames
);
  localparam int AW = $clog2(DEPTH);

  fr_word_t mem [DEPTH];
  logic [AW:0] wp, cp, rp;   // write, committed and read pointers
  logic [AW:0] wp_next, wp_wr;
  logic        cm_ok, cm_bad;
  logic        do_wr, do_rd;

  assign full     = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign rd_valid = (cp != rp);
  assign rd_data  = mem[rp[AW-1:0]];
  // A discard rewinds the write pointer; a word written in the same cycle
  // lands at the rewound position (it starts the next frame).
  assign do_wr    = wr_en && !((wp_wr[AW-1:0] == rp[AW-1:0]) && (wp_wr[AW] != rp[AW]));
  assign do_rd    = rd_en && rd_valid;
  assign wp_wr    = discard ? cp : wp;
  // a frame that lost a word is thrown away instead of committed
  assign cm_ok    = commit && !discard && !wr_lost && !(wr_en && !do_wr);
  assign cm_bad   = commit && !discard && !cm_ok;
  assign wp_next  = do_wr ? wp_wr + 1'b1 : wp_wr;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp_wr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; cp <= '0; rp <= '0; wr_lost <= 1'b0; frames <= '0;
    end else begin
      rp <= do_rd ? rp + 1'b1 : rp;
      wp <= cm_bad ? cp : wp_next;
      if (discard || commit) begin
        wr_lost <= 1'b0;
        if (cm_ok) cp <= wp_next;
      end else if (wr_en && !do_wr) begin
        wr_lost <= 1'b1;
      end
      frames <= frames + (AW+1)'(cm_ok) - (AW+1)'(do_rd && rd_data.last);
    end
  end

  initial assert ((DEPTH & (DEPTH - 1)) == 0) else $error("frame_fifo: DEPTH must be a power of two");
endmodule
