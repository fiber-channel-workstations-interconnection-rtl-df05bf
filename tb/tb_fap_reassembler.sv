// tb_fap_reassembler: cells made by the reference segmentation go into the
// reassembler, whose frame FIFO is read back and compared word by word
// (including the restored K28.5 flags and the end-of-frame flag) with the
// original frames. Frames spoiled on purpose must not come out: a lost middle
// cell (cell counter gap), a frame whose last cells never arrive (reassembly
// timeout) and a frame cut by the next first cell. A skipped frame number
// must be counted as a lost frame, and a Link-Reset cell must be reported.
module tb_fap_reassembler;
  import fap_pkg::*;
  import tb_fc_pkg::*;
  localparam int TO = 3000;
  logic clk = 0, rst_n = 0;
  logic cell_valid, cell_ready;
  cell_t cell_i;
  logic wr_en, commit, discard, wr_lost, wr_full;
  fr_word_t wr_data, rd_data;
  logic lr_rx, frame_done, cell_loss, frame_loss, no_eof, timeout, overflow;
  logic rd_en, rd_valid;
  logic [11:0] frames;
  int checks = 0, failures = 0;
  int n_lr = 0, n_cl = 0, n_fl = 0, n_ne = 0, n_to = 0, n_done = 0;
  fr_word_t expw[$];
  cell_t cq[$];
  logic [1:0] fc = 0;

  fap_reassembler #(.REASM_TIMEOUT(TO)) dut (.*);
  frame_fifo #(.DEPTH(2048)) fifo (.clk, .rst_n, .wr_en, .wr_data, .commit, .discard, .wr_lost,
      .full(wr_full), .rd_en, .rd_data, .rd_valid, .frames);
  always #5 clk = ~clk;

  function automatic void chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  // mode: 0 good, 1 drop a middle cell, 2 drop the tail, 3 cut by next frame, 4 not sent at all
  function automatic void frame(input int n, input logic [7:0] sof_c, input logic [7:0] r_ctl,
                                input logic [7:0] eof_c, input int mode = 0);
    wq_t f;
    cq_t c;
    f = make_frame(sof_c, r_ctl, 24'h0A0B0C, n, eof_c, $urandom % 1000);
    c = ref_cells(f, fc);
    fc++;
    if (mode == 4) return;
    foreach (c[i]) begin
      if (mode == 1 && i == 1) continue;
      if ((mode == 2 || mode == 3) && i >= c.size() - 1) continue;
      cq.push_back(c[i]);
    end
    if (mode == 0)
      foreach (f[i]) expw.push_back('{k:f[i].k, last:(i == f.size() - 1), d:f[i].d});
  endfunction

  // cell driver
  always @(negedge clk) begin
    cell_valid = cq.size() > 0 && $urandom % 3 != 0;
    cell_i     = cq.size() > 0 ? cq[0] : '0;
    rd_en      = rd_valid && $urandom % 2 == 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (cell_valid && cell_ready) void'(cq.pop_front());
    if (lr_rx) n_lr++;
    if (cell_loss) n_cl++;
    if (frame_loss) n_fl++;
    if (no_eof) n_ne++;
    if (timeout) n_to++;
    if (frame_done) n_done++;
    if (rd_en && rd_valid) begin
      chk(expw.size() > 0 && rd_data === expw[0],
          $sformatf("word %h k=%0d last=%0d expected %h k=%0d last=%0d", rd_data.d, rd_data.k, rd_data.last,
                    expw.size() ? expw[0].d : 0, expw.size() ? expw[0].k : 0, expw.size() ? expw[0].last : 0));
      if (expw.size() > 0) void'(expw.pop_front());
    end
  end

  task automatic drain();
    int g;
    g = 0;
    while ((cq.size() > 0 || expw.size() > 0) && g < 100000) begin @(posedge clk); g++; end
    repeat (30) @(posedge clk);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    frame(0, SOF_N1, 8'h00, EOF_T);
    frame(5, SOF_N1, 8'h00, EOF_T);
    frame(6, SOF_N1, 8'h00, EOF_T);          // split EOF
    frame(29, SOF_N1, 8'h00, EOF_T);         // split EOF
    frame(0, SOF_C1, 8'h00, EOF_N);
    frame(100, SOF_C1, 8'h00, EOF_N);
    frame(0, SOF_I1, R_CTL_PRJT, EOF_T);
    frame(0, SOF_N1, 8'hC1, EOF_DT);
    frame(1056, SOF_N1, 8'h00, EOF_T);       // maximum length
    drain();
    chk(n_done === 9, $sformatf("frames done %0d", n_done));
    // lost middle cell
    frame(200, SOF_N1, 8'h00, EOF_T, 1);
    frame(10, SOF_N1, 8'h00, EOF_T);
    drain();
    chk(n_cl === 1, $sformatf("cell losses %0d", n_cl));
    // tail never arrives: timeout
    frame(200, SOF_N1, 8'h00, EOF_T, 2);
    drain();
    repeat (TO + 20) @(posedge clk);
    chk(n_to === 1, $sformatf("timeouts %0d", n_to));
    frame(10, SOF_N1, 8'h00, EOF_T);
    drain();
    // cut by the next first cell
    frame(100, SOF_N1, 8'h00, EOF_T, 3);
    frame(3, SOF_N1, 8'h00, EOF_T);
    drain();
    chk(n_ne === 1, $sformatf("no-eof %0d", n_ne));
    // a whole frame missing
    n_fl = 0;
    frame(50, SOF_N1, 8'h00, EOF_T, 4);
    frame(50, SOF_N1, 8'h00, EOF_T);
    drain();
    chk(n_fl === 1, $sformatf("frame losses %0d", n_fl));
    // Link-Reset cell
    begin
      cell_t l;
      l = '0; l.fap.si = SI_LR; l.fap.eof_ptr = EOF_NONE;
      cq.push_back(l);
    end
    frame(20, SOF_N1, 8'h00, EOF_T);
    drain();
    chk(n_lr === 1, $sformatf("LR %0d", n_lr));
    for (int i = 0; i < 30; i++) frame($urandom % 150, SOF_N1, 8'h00, EOF_T);
    drain();
    chk(expw.size() === 0 && frames === 0, "all frames read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
