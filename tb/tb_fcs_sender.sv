// tb_fcs_sender: frames queued in both sources and R_RDY requests go into the
// sender while the transmitter takes words at an irregular rate. The output
// word stream is parsed: every frame must arrive intact and in order within
// its source, local-buffer frames must win when both sources are ready, at
// least six ordered sets must separate frames, every R_RDY request must
// produce one R_RDY, and while the link is not active only the requested
// primitive sequence may be sent.
module tb_fcs_sender;
  import fap_pkg::*;
  import tb_fc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tx_en, tx_valid, rrdy_req = 0, loc_valid, loc_pop, rem_valid, rem_pop, frame_sent, rrdy_sent;
  logic active = 1;
  seq_e seq = SEQ_IDLE;
  fc_word_t tx_word;
  fr_word_t loc_data, rem_data;
  int checks = 0, failures = 0;
  fr_word_t locq[$], remq[$];
  fr_word_t expq[$];       // expected frame words in output order
  int gap = 100, min_gap = 100, n_rrdy = 0, n_frames = 0, n_seq_lr = 0, in_frame = 0, frame_while_down = 0;
  logic [15:0] w0;
  logic half = 0;
  bit lastw;

  fcs_sender dut (.*);
  always #5 clk = ~clk;

  function automatic void chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  function automatic void add(input bit to_loc, input int n, input int seed);
    wq_t f;
    f = make_frame(SOF_N1, 8'h00, 24'h123456, n, EOF_T, seed);
    foreach (f[i]) begin
      fr_word_t w;
      w = '{k:f[i].k, last:(i == f.size() - 1), d:f[i].d};
      if (to_loc) locq.push_back(w); else remq.push_back(w);
    end
  endfunction

  always @(negedge clk) begin
    tx_en     = ($urandom % 3) != 0;
    loc_valid = locq.size() > 0;  loc_data = loc_valid ? locq[0] : '0;
    rem_valid = remq.size() > 0;  rem_data = rem_valid ? remq[0] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    if (loc_pop) begin expq.push_back(locq[0]); void'(locq.pop_front()); end
    if (rem_pop) begin expq.push_back(remq[0]); void'(remq.pop_front()); end
  end

  // output parser (runs on the registered output)
  always @(posedge clk) if (rst_n && tx_valid) begin
    if (in_frame > 0 || (tx_word.k && tx_word.d == 16'hBCB5 && !half)) begin
      if (in_frame == 0) begin
        if (gap < min_gap) min_gap = gap;
        if (!active) frame_while_down++;
      end
      chk(expq.size() > 0 && tx_word.k === expq[0].k && tx_word.d === expq[0].d, $sformatf("frame word %h", tx_word.d));
      lastw = expq.size() == 0 || expq[0].last;
      if (expq.size() > 0) void'(expq.pop_front());
      in_frame++;
      if (lastw) begin
        in_frame = 0; gap = 0; n_frames++;
      end
    end else if (!half) begin
      chk(tx_word.k, "ordered set starts with K28.5");
      w0 = tx_word.d; half = 1;
    end else begin
      half = 0; gap++;
      if (w0 == W0_RRDY && tx_word.d == W1_RRDY) n_rrdy++;
      if (w0 == W0_LR && tx_word.d == W1_LR) n_seq_lr++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g;
    repeat (3) @(posedge clk); rst_n = 1;
    // both sources ready at once: the three local frames come first
    for (int i = 0; i < 3; i++) add(0, 10 + i, 100 + i);
    for (int i = 0; i < 3; i++) add(1, 5 + i, 200 + i);
    repeat (2) @(negedge clk);
    // R_RDY requests
    for (int i = 0; i < 5; i++) begin @(negedge clk); rrdy_req = 1; @(negedge clk); rrdy_req = 0; end
    g = 0;
    while ((locq.size() > 0 || remq.size() > 0 || expq.size() > 0) && g < 20000) begin @(posedge clk); g++; end
    repeat (40) @(posedge clk);
    chk(n_frames === 6, $sformatf("frames %0d", n_frames));
    chk(n_rrdy === 5, $sformatf("R_RDY %0d", n_rrdy));
    // link down: LR only, frames held
    @(negedge clk); active = 0; seq = SEQ_LR;
    add(0, 30, 300);
    repeat (200) @(posedge clk);
    chk(n_seq_lr > 20, $sformatf("LR sent %0d", n_seq_lr));
    chk(remq.size() > 0 && frame_while_down === 0, $sformatf("no frame while link is down: %0d %0d", remq.size(), frame_while_down));
    @(negedge clk); active = 1; seq = SEQ_IDLE;
    for (int i = 0; i < 20; i++) add($urandom % 2, $urandom % 60, 400 + i);
    g = 0;
    while ((locq.size() > 0 || remq.size() > 0 || expq.size() > 0) && g < 50000) begin @(posedge clk); g++; end
    repeat (40) @(posedge clk);
    chk(n_frames === 27, $sformatf("frames %0d", n_frames));
    chk(min_gap >= 6, $sformatf("smallest gap %0d ordered sets", min_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
