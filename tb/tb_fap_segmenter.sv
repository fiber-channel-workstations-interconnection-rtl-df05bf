// tb_fap_segmenter: frames of many lengths and kinds go through the
// segmentator; every cell is compared with the cells a reference written from
// the cell-type table expects (payload, PT2, SI, EOF pointer, frame and cell
// counters). Covered: one-cell frames, a frame filling exactly one cell, the
// split EOF, SOFc1, P_RJT and ACK/EOFdt frames, maximum-length frames, the
// Link-Reset cell, the deadlock timeout and a SOF arriving before the EOF
// (both closing the frame with EOFa). Input gaps and output back-pressure are
// random.
module tb_fap_segmenter;
  import fap_pkg::*;
  import tb_fc_pkg::*;
  localparam int TO = 200;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_pop, lr_req, cell_valid, cell_ready, seg_abort;
  seg_word_t in_data;
  cell_t cell_o;
  int checks = 0, failures = 0, n_abort = 0, n_lr = 0, n_cells = 0;
  seg_word_t inq[$];
  cell_t expq[$];
  logic [1:0] fc = 0;
  bit gaps = 1;

  fap_segmenter #(.SEG_TIMEOUT(TO)) dut (.*);
  always #5 clk = ~clk;

  function automatic void chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  // tag a frame as the filter does
  function automatic void queue_frame(input wq_t f, input bit complete = 1);
    int n;
    n = f.size();
    for (int i = 0; i < n; i++) begin
      seg_word_t w;
      w = '0;
      w.d    = f[i].d;
      w.sof  = (i == 0);
      w.c1   = (i == 1) && f[1].d[15:8] == SOF_C1;
      w.prjt = (i == 2) && f[2].d[15:8] == R_CTL_PRJT;
      w.eof  = complete && (i == n - 2);
      w.dt   = complete && (i == n - 1) && f[i].d[15:8] == EOF_DT;
      inq.push_back(w);
    end
  endfunction

  function automatic void expect_frame(input wq_t f);
    cq_t c;
    c = ref_cells(f, fc);
    fc++;
    foreach (c[i]) expq.push_back(c[i]);
  endfunction

  task automatic frame(input logic [7:0] sof_c, input logic [7:0] r_ctl, input int n, input logic [7:0] eof_c);
    wq_t f;
    f = make_frame(sof_c, r_ctl, 24'h010203, n, eof_c, $urandom % 1000);
    queue_frame(f);
    expect_frame(f);
  endtask

  // frame cut after k words; the segmentator must add EOFa
  task automatic cut_frame(input int k);
    wq_t f, g;
    f = make_frame(SOF_N1, 8'h00, 24'h010203, 40, EOF_T, 5);
    for (int i = 0; i < k; i++) g.push_back(f[i]);
    queue_frame(g, 0);
    g.push_back('{k:1, d:16'hBC95});
    g.push_back('{k:0, d:16'hF5F5});
    expect_frame(g);
  endtask

  // input driver: first-word fall-through from inq
  always @(posedge clk) if (rst_n && in_pop) void'(inq.pop_front());
  always @(negedge clk) begin
    in_valid = inq.size() > 0 && (!gaps || $urandom % 5 != 0);
    in_data  = inq.size() > 0 ? inq[0] : '0;
    cell_ready = $urandom % 4 != 0;
  end

  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (seg_abort) n_abort++;
    if (cell_valid && cell_ready) begin
      n_cells++;
      if (!cell_o.pt2 && cell_o.fap.si == SI_LR) begin
        n_lr++;
        chk(cell_o.fap.cell_cnt === 0 && cell_o.fap.eof_ptr === EOF_NONE && cell_o.payload === '0, "LR cell format");
      end else begin
        chk(expq.size() > 0, "unexpected cell");
        if (expq.size() > 0) begin
          cell_t e;
          e = expq.pop_front();
          if (cell_o != e) begin
            chk(0, $sformatf("cell %0d: got pt2=%0d si=%b ptr=%0d fc=%0d cc=%0d, expected pt2=%0d si=%b ptr=%0d fc=%0d cc=%0d",
                n_cells, cell_o.pt2, cell_o.fap.si, cell_o.fap.eof_ptr, cell_o.fap.frame_cnt, cell_o.fap.cell_cnt,
                e.pt2, e.fap.si, e.fap.eof_ptr, e.fap.frame_cnt, e.fap.cell_cnt));
            if (cell_o.payload != e.payload) $display("  payload differs");
          end else chk(1, "");
        end
      end
    end
  end

  task automatic drain();
    int guard;
    guard = 0;
    while ((inq.size() > 0 || expq.size() > 0) && guard < 200000) begin @(posedge clk); guard++; end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lr_req = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    frame(SOF_N1, 8'h00, 0, EOF_T);        // 18 words: one cell
    frame(SOF_N1, 8'h00, 5, EOF_T);        // 23 words: exactly one cell
    frame(SOF_N1, 8'h00, 6, EOF_T);        // 24 words: EOF split over two cells
    frame(SOF_N1, 8'h00, 29, EOF_T);       // 47 words: EOF split again
    frame(SOF_C1, 8'h00, 0, EOF_N);        // SOFc1, one cell
    frame(SOF_C1, 8'h00, 100, EOF_N);      // SOFc1, many cells
    frame(SOF_I1, R_CTL_PRJT, 0, EOF_T);   // P_RJT
    frame(SOF_N1, 8'hC1, 0, EOF_DT);       // ACK with EOFdt
    frame(SOF_N1, 8'h00, 200, EOF_DT);     // long frame closed by EOFdt
    frame(SOF_N1, 8'h00, 1056, EOF_T);     // maximum length: 2148 bytes
    drain();
    // Link-Reset cell between frames and in the middle of one
    @(negedge clk); lr_req = 1; @(negedge clk); lr_req = 0;
    frame(SOF_N1, 8'h00, 300, EOF_T);
    repeat (60) @(negedge clk);
    lr_req = 1; @(negedge clk); lr_req = 0;
    drain();
    chk(n_lr === 2, $sformatf("LR cells %0d", n_lr));
    // deadlock timeout: frame stops after 30 words
    cut_frame(30);
    drain();
    repeat (TO + 50) @(posedge clk);
    drain();
    // SOF before EOF
    gaps = 0;
    cut_frame(50);
    frame(SOF_N1, 8'h00, 10, EOF_T);
    drain();
    chk(n_abort === 2, $sformatf("aborts %0d", n_abort));
    // random frames
    gaps = 1;
    for (int i = 0; i < 40; i++) frame(SOF_N1, ($urandom % 8 == 0) ? R_CTL_PRJT : 8'h00, $urandom % 120,
                                       ($urandom % 3 == 0) ? EOF_DT : EOF_T);
    drain();
    chk(expq.size() === 0 && inq.size() === 0, $sformatf("left: %0d cells, %0d words", expq.size(), inq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
