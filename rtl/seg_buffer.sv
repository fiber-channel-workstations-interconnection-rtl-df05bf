// seg_buffer: the 4 Mbyte segmentation buffer between the filter and the
// segmentator.
//
// It stores the tagged 16-bit words of the frames to be forwarded (2^21
// words = 4 Mbyte of frame data by default). Two disciplines are supported:
//  - STORE_FWD = 0, FIFO (dual-port RAM): a word can be read as soon as it is
//    written, so segmentation runs on the fly while the frame arrives;
//  - STORE_FWD = 1, store and forward (static RAM): reading is held off until
//    SF_FRAMES whole frames are stored; then the buffer is drained until it
//    is empty before it waits for the next block.
// A frame counts as stored when the second word of its EOF (seg_word_t.eof of
// the previous word) is written. Reads are first-word fall-through
// (rd_valid/rd_data/rd_en). A write into a full buffer is lost and pulses
// `overflow`. The two disciplines and SF_FRAMES = 1985 follow the document;
// FIFO is the default because it is the one reaching the target throughput.
module seg_buffer
  import fap_pkg::*;
#(
  parameter int DEPTH     = 2097152,
  parameter bit STORE_FWD = 1'b0,
  parameter int SF_FRAMES = 1985
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      wr_en,
  input  seg_word_t wr_data,
  output logic      overflow,
  input  logic      rd_en,
  output seg_word_t rd_data,
  output logic      rd_valid,
  output logic [$clog2(DEPTH):0] level
);
  localparam int AW = $clog2(DEPTH);

  seg_word_t mem [DEPTH];
  logic [AW:0] wp, rp;
  logic        empty, full, do_wr, do_rd;
  logic        wr_after_eof, rd_after_eof;   // next word ends an EOF
  logic [31:0] stored;                       // whole frames in the buffer
  logic        draining;

  assign empty    = (wp == rp);
  assign full     = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign do_wr    = wr_en && !full;
  assign rd_valid = !empty && (!STORE_FWD || draining);
  assign do_rd    = rd_en && rd_valid;
  assign rd_data  = mem[rp[AW-1:0]];
  assign level    = wp - rp;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; overflow <= 1'b0;
      wr_after_eof <= 1'b0; rd_after_eof <= 1'b0;
      stored <= '0; draining <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) begin
        wp           <= wp + 1'b1;
        wr_after_eof <= wr_data.eof;
      end
      if (do_rd) begin
        rp           <= rp + 1'b1;
        rd_after_eof <= rd_data.eof;
      end
      stored <= stored + ((do_wr && wr_after_eof) ? 32'd1 : 32'd0)
                       - ((do_rd && rd_after_eof) ? 32'd1 : 32'd0);
      if (!draining && stored >= SF_FRAMES)      draining <= 1'b1;
      else if (draining && empty && !do_wr)      draining <= 1'b0;
    end
  end
endmodule
