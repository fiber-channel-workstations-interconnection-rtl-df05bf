// tb_frame_fifo: frames written, committed, discarded and read back.
// Checks that nothing of a frame is visible before its commit, that a
// discarded frame never appears, that a word written together with a
// discard starts the next frame, that a frame which overflowed the buffer is
// thrown away at its commit, and the committed-frame count.
module tb_frame_fifo;
  import fap_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, commit, discard, wr_lost, full, rd_en, rd_valid;
  fr_word_t wr_data, rd_data;
  logic [4:0] frames;
  int checks = 0, failures = 0;
  fr_word_t expq[$];

  frame_fifo #(.DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [15:0] d, input bit last, input bit cm = 0, input bit dc = 0);
    @(negedge clk);
    wr_en = 1; wr_data = '{k:1'b0, last:last, d:d}; commit = cm; discard = dc;
    @(negedge clk);
    wr_en = 0; commit = 0; discard = 0;
  endtask

  task automatic read_all(input int n_expect);
    int got;
    got = 0;
    @(negedge clk);
    while (rd_valid) begin
      chk(expq.size() > 0 && rd_data === expq[0], $sformatf("read %h", rd_data.d));
      if (expq.size() > 0) void'(expq.pop_front());
      rd_en = 1; @(negedge clk); rd_en = 0;
      got++;
    end
    chk(got === n_expect, $sformatf("read %0d words, expected %0d", got, n_expect));
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; commit = 0; discard = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // frame A: 3 words, invisible until commit
    wr(16'hA0, 0); wr(16'hA1, 0);
    chk(!rd_valid, "visible before commit");
    wr(16'hA2, 1, 1);
    expq.push_back('{k:0, last:0, d:16'hA0}); expq.push_back('{k:0, last:0, d:16'hA1});
    expq.push_back('{k:0, last:1, d:16'hA2});
    @(negedge clk);
    chk(rd_valid && frames === 1, "frame A committed");
    // frame B discarded, frame C's first word written with the discard
    wr(16'hB0, 0); wr(16'hB1, 0);
    wr(16'hC0, 0, 0, 1); wr(16'hC1, 1, 1);
    expq.push_back('{k:0, last:0, d:16'hC0}); expq.push_back('{k:0, last:1, d:16'hC1});
    @(negedge clk);
    chk(frames === 2, "two frames after discard");
    read_all(5);
    chk(frames === 0, "frames back to zero");
    // overflow: 20 words into 16 entries, commit must discard
    for (int i = 0; i < 20; i++) wr(16'h100 + 16'(i), i == 19, i == 19);
    @(negedge clk);
    chk(!rd_valid && frames === 0, "overflowed frame discarded");
    // buffer usable afterwards
    wr(16'hD0, 1, 1);
    expq.push_back('{k:0, last:1, d:16'hD0});
    read_all(1);
    // overflow again, this time committed by itself after the lost words
    for (int i = 0; i < 18; i++) wr(16'h200 + 16'(i), i == 17);
    chk(wr_lost === 1'b1, "word lost flagged");
    @(negedge clk); commit = 1; @(negedge clk); commit = 0;
    @(negedge clk);
    chk(!rd_valid && frames === 0 && wr_lost === 1'b0, "frame with a lost word discarded at commit");
    wr(16'hE0, 1, 1);
    expq.push_back('{k:0, last:1, d:16'hE0});
    read_all(1);
    // many frames of random length, random reads in between
    for (int f = 0; f < 40; f++) begin
      int n;
      n = 1 + $urandom % 6;
      for (int i = 0; i < n; i++) begin
        wr(16'(f * 16 + i), i == n - 1, i == n - 1);
        expq.push_back('{k:0, last:(i == n - 1), d:16'(f * 16 + i)});
      end
      read_all(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
