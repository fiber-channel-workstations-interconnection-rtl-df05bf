// fcs_filter: the FILTERING block of the FCS receive side.
//
// It takes the 16-bit words delivered by the Fibre Channel receiver (one per
// cycle when in_valid is high; the link sends words continuously, Idles
// between frames) and
//  - recognises ordered sets, reporting each one on os_valid/os_type for the
//    primitive-sequence FSM;
//  - delineates frames from SOF to EOF;
//  - sends frames whose destination address (D_ID) is IWU_DID to the local
//    buffer for the control unit, committing them at the EOF and pulsing
//    `irq`; all other frames go to the segmentation buffer;
//  - tags the words it writes to the segmentation buffer with the control
//    flags the segmentator needs (SOF, SOFc1, P_RJT, EOF, EOFdt);
//  - asks the sender for an R_RDY (rrdy_req) at the end of every frame that
//    needs buffer-to-buffer flow control: frames opening with a SOF other than
//    SOFi1/SOFn1 (not inside an established Class 1 connection) and frames
//    closed by EOFdt.
// Words pass through a 3-word delay line so that the routing decision can be
// made once the D_ID in the first two header words has arrived; an ordered
// set is classified when its second word arrives. Writes therefore trail the
// input by three valid words. A primitive signal or sequence inside a frame
// means its EOF was lost: the frame stops there. A partial local frame is
// discarded when the next SOF arrives; a partial forwarded frame is closed by
// the segmentator's timeout. Routing by D_ID and the R_RDY rule are this design's
// reading of the document; the ordered-set codes are those of FC-PH.
module fcs_filter
  import fap_pkg::*;
#(
  parameter logic [23:0] IWU_DID = 24'hFFFFFE
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  fc_word_t  in_word,
  // segmentation buffer
  output logic      seg_we,
  output seg_word_t seg_wdata,
  // local buffer
  output logic      loc_we,
  output fr_word_t  loc_wdata,
  output logic      loc_commit,
  output logic      loc_discard,
  input  logic      loc_wr_lost,
  output logic      irq,
  // flow control and link
  output logic      rrdy_req,
  output logic      os_valid,
  output os_e       os_type,
  output logic      frame_fwd,     // pulse: a forwarded frame ended
  output logic      frame_loc      // pulse: a local frame was stored
);
  typedef struct packed {
    logic      vld;   // holds a received word
    logic      fr;    // word belongs to a frame
    logic      k;
    logic      last;  // second word of the EOF
    seg_word_t w;
  } line_t;

  line_t line [3];    // [0] newest, [2] oldest
  line_t ent;         // entry made from the incoming word
  line_t patched0;    // line[0] after classification of the pair
  logic  infr;        // input side is inside a frame
  logic  hdr0;        // next word is the first header word
  os_e   cls;
  logic  pair;

  // output side state
  logic  out_fr, out_loc, need_rrdy;
  logic [23:0] did;

  assign pair = line[0].vld && line[0].k && !in_word.k;
  assign cls  = pair ? seq_classify(line[0].w.d, in_word.d) : OS_NONE;
  assign did  = {line[0].w.d[7:0], in_word.d};
  logic  loc;         // the word leaving the delay line goes to the local buffer
  assign loc  = line[2].w.sof ? (did == IWU_DID) : out_loc;

  always_comb begin
    patched0 = line[0];
    ent      = '0;
    ent.vld  = 1'b1;
    ent.k    = in_word.k;
    ent.w.d  = in_word.d;
    ent.fr   = infr;
    if (cls == OS_SOF) begin
      patched0.fr    = 1'b1;
      patched0.w.sof = 1'b1;
      ent.fr         = 1'b1;
      ent.w.c1       = (in_word.d[15:8] == SOF_C1);
    end else if (cls == OS_EOF && infr) begin
      patched0.w.eof = 1'b1;
      ent.w.dt       = (in_word.d[15:8] == EOF_DT);
      ent.last       = 1'b1;
    end else if (infr && cls inside {OS_IDLE, OS_RRDY, OS_NOS, OS_OLS, OS_LR, OS_LRR}) begin
      // a primitive inside a frame: the EOF was lost, the frame ends here
      patched0.fr    = 1'b0;
      ent.fr         = 1'b0;
    end else if (infr && hdr0) begin
      ent.w.prjt     = (in_word.d[15:8] == R_CTL_PRJT);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) line[i] <= '0;
      infr <= 1'b0; hdr0 <= 1'b0;
      out_fr <= 1'b0; out_loc <= 1'b0; need_rrdy <= 1'b0;
      seg_we <= 1'b0; seg_wdata <= '0;
      loc_we <= 1'b0; loc_wdata <= '0; loc_commit <= 1'b0; loc_discard <= 1'b0;
      irq <= 1'b0; rrdy_req <= 1'b0; os_valid <= 1'b0; os_type <= OS_NONE;
      frame_fwd <= 1'b0; frame_loc <= 1'b0;
    end else begin
      seg_we <= 1'b0; loc_we <= 1'b0; loc_commit <= 1'b0; loc_discard <= 1'b0;
      irq <= 1'b0; rrdy_req <= 1'b0; os_valid <= 1'b0;
      frame_fwd <= 1'b0; frame_loc <= 1'b0;
      if (in_valid) begin
        // input side
        line[0] <= ent;
        line[1] <= patched0;
        line[2] <= line[1];
        if (pair) begin
          os_valid <= 1'b1;
          os_type  <= cls;
        end
        if (cls == OS_SOF)                 begin infr <= 1'b1; hdr0 <= 1'b1; end
        else if (cls == OS_EOF && infr)    infr <= 1'b0;
        else if (cls inside {OS_IDLE, OS_RRDY, OS_NOS, OS_OLS, OS_LR, OS_LRR}) infr <= 1'b0;
        else if (!in_word.k)               hdr0 <= 1'b0;

        // output side: the oldest word leaves the delay line
        if (line[2].vld && line[2].fr) begin
          if (line[2].w.sof) begin
            // line[1] = SOF second word, line[0] = first header word
            if (out_fr && out_loc) loc_discard <= 1'b1;  // unterminated local frame
            out_fr    <= 1'b1;
            out_loc   <= loc;
            need_rrdy <= !(line[1].w.d[15:8] inside {SOF_I1, SOF_N1});
          end
          if (loc) begin
            loc_we         <= 1'b1;
            loc_wdata.k    <= line[2].k;
            loc_wdata.last <= line[2].last;
            loc_wdata.d    <= line[2].w.d;
          end else begin
            seg_we    <= 1'b1;
            seg_wdata <= line[2].w;
          end
          if (line[2].last) begin
            out_fr   <= 1'b0;
            rrdy_req <= need_rrdy || line[2].w.dt;
            if (loc) begin
              if (loc_wr_lost) loc_discard <= 1'b1;
              else begin
                loc_commit <= 1'b1;
                irq        <= 1'b1;
                frame_loc  <= 1'b1;
              end
            end else begin
              frame_fwd <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
