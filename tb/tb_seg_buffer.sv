// tb_seg_buffer: the segmentation buffer in both disciplines, side by side.
// FIFO discipline: a word is readable right after it is written and comes
// out in order. Store-and-forward (SF_FRAMES = 3): nothing is readable until
// three whole frames (SOF..EOF) are stored, then the buffer drains completely
// before it waits again. Also checks the overflow pulse.
module tb_seg_buffer;
  import fap_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_a, rd_b, ov_a, ov_b, v_a, v_b;
  seg_word_t wd, q_a, q_b;
  logic [6:0] lvl_a, lvl_b;
  int checks = 0, failures = 0;

  seg_buffer #(.DEPTH(64), .STORE_FWD(1'b0)) fifo_d (.clk, .rst_n, .wr_en, .wr_data(wd), .overflow(ov_a),
      .rd_en(rd_a), .rd_data(q_a), .rd_valid(v_a), .level(lvl_a));
  seg_buffer #(.DEPTH(64), .STORE_FWD(1'b1), .SF_FRAMES(3)) sf_d (.clk, .rst_n, .wr_en, .wr_data(wd), .overflow(ov_b),
      .rd_en(rd_b), .rd_data(q_b), .rd_valid(v_b), .level(lvl_b));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // write one 6-word frame: SOF0 SOF1 D D EOF0 EOF1
  task automatic put_frame(input int f);
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      wr_en = 1;
      wd = '0;
      wd.d = 16'(f * 8 + i);
      wd.sof = (i == 0);
      wd.eof = (i == 4);
      @(negedge clk);
      wr_en = 0;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ra;
    wr_en = 0; rd_a = 0; rd_b = 0; wd = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    ra = 0;
    for (int f = 0; f < 3; f++) begin
      put_frame(f);
      @(negedge clk);
      // FIFO side: drain everything written so far, in order
      while (v_a) begin
        chk(q_a.d === 16'((ra / 6) * 8 + ra % 6), $sformatf("fifo word %0d = %h", ra, q_a.d));
        rd_a = 1; @(negedge clk); rd_a = 0; ra++;
      end
      chk(ra === (f + 1) * 6, "fifo discipline delivers on the fly");
      if (f < 2) chk(!v_b, $sformatf("store-and-forward holds after %0d frames", f + 1));
    end
    // a partial 4th frame must not hold back the draining of the block
    @(negedge clk);
    chk(v_b, "store-and-forward releases after 3 frames");
    for (int i = 0; i < 18; i++) begin
      chk(v_b && q_b.d === 16'((i / 6) * 8 + i % 6), $sformatf("s&f word %0d", i));
      rd_b = 1; @(negedge clk); rd_b = 0;
    end
    @(negedge clk);
    chk(!v_b, "store-and-forward empty after the block");
    put_frame(7);
    @(negedge clk);
    chk(!v_b, "store-and-forward waits for the next block");
    // overflow of the FIFO-discipline buffer (64 words)
    for (int i = 0; i < 70; i++) begin
      @(negedge clk); wr_en = 1; wd = '0; wd.d = 16'(i);
    end
    @(negedge clk); wr_en = 0;
    chk(lvl_a === 7'd64, "buffer full at 64 words");
    @(negedge clk);
    chk(ov_a === 1'b0, "overflow pulse ends");
    begin
      int seen;
      seen = 0;
      for (int i = 0; i < 3; i++) begin
        @(negedge clk); wr_en = 1; @(posedge clk); #1; if (ov_a) seen++; @(negedge clk); wr_en = 0;
      end
      chk(seen === 3, "overflow reported for every lost word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
