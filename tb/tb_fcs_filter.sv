// tb_fcs_filter: a continuous word stream (Idles between frames, primitive
// signals mixed in) goes into the filter. Checks: frames for other ports are
// written to the segmentation buffer word for word with the right control
// flags; frames for the IWU (D_ID FFFFFE) go to the local buffer, are
// committed at their EOF and raise the interrupt; an unterminated local frame
// is discarded; R_RDY requests follow the SOF/EOFdt rule; received ordered
// sets are reported with their type.
module tb_fcs_filter;
  import fap_pkg::*;
  import tb_fc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  fc_word_t in_word;
  logic seg_we, loc_we, loc_commit, loc_discard, irq, rrdy_req, os_valid, frame_fwd, frame_loc;
  logic loc_wr_lost = 0;
  seg_word_t seg_wdata;
  fr_word_t loc_wdata;
  os_e os_type;
  int checks = 0, failures = 0;
  int exp_irq = 0, n_irq = 0, n_rrdy = 0, exp_rrdy = 0, n_disc = 0, n_os_rrdy = 0, n_os_nos = 0, n_sof = 0, n_eof = 0;
  fc_word_t inq[$];
  seg_word_t seg_exp[$];
  fr_word_t loc_pend[$], loc_exp[$];

  fcs_filter dut (.*);
  always #5 clk = ~clk;

  function automatic void chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  function automatic void idles(input int n);
    for (int i = 0; i < n; i++) begin
      inq.push_back('{k:1, d:W0_IDLE}); inq.push_back('{k:0, d:W1_IDLE});
    end
  endfunction

  function automatic void frame(input logic [7:0] sof_c, input logic [7:0] r_ctl, input logic [23:0] did,
                                input int n, input logic [7:0] eof_c);
    wq_t f;
    int m;
    f = make_frame(sof_c, r_ctl, did, n, eof_c, $urandom % 500);
    m = f.size();
    foreach (f[i]) inq.push_back(f[i]);
    idles(6);
    if (!(sof_c inside {SOF_I1, SOF_N1}) || eof_c == EOF_DT) exp_rrdy++;
    if (did == 24'hFFFFFE) begin
      exp_irq++;
      foreach (f[i]) loc_exp.push_back('{k:f[i].k, last:(i == m - 1), d:f[i].d});
    end else begin
      foreach (f[i]) begin
        seg_word_t w;
        w = '0; w.d = f[i].d;
        w.sof = (i == 0); w.c1 = (i == 1 && sof_c == SOF_C1); w.prjt = (i == 2 && r_ctl == R_CTL_PRJT);
        w.eof = (i == m - 2); w.dt = (i == m - 1 && eof_c == EOF_DT);
        seg_exp.push_back(w);
      end
    end
  endfunction

  always @(negedge clk) begin
    in_valid = inq.size() > 0 && $urandom % 4 != 0;
    in_word  = inq.size() > 0 ? inq[0] : '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (in_valid) void'(inq.pop_front());
    if (irq) n_irq++;
    if (rrdy_req) n_rrdy++;
    if (loc_discard) begin n_disc++; loc_pend.delete(); end
    if (os_valid && os_type == OS_RRDY) n_os_rrdy++;
    if (os_valid && os_type == OS_NOS) n_os_nos++;
    if (os_valid && os_type == OS_SOF) n_sof++;
    if (os_valid && os_type == OS_EOF) n_eof++;
    if (seg_we) begin
      chk(seg_exp.size() > 0 && seg_wdata === seg_exp[0], $sformatf("seg word %h flags %b", seg_wdata.d, seg_wdata[20:16]));
      if (seg_exp.size() > 0) void'(seg_exp.pop_front());
    end
    if (loc_we) loc_pend.push_back(loc_wdata);
    if (loc_commit) begin
      foreach (loc_pend[i]) begin
        chk(loc_exp.size() > 0 && loc_pend[i] === loc_exp[0], $sformatf("local word %h", loc_pend[i].d));
        if (loc_exp.size() > 0) void'(loc_exp.pop_front());
      end
      loc_pend.delete();
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g;
    repeat (3) @(posedge clk); rst_n = 1;
    idles(8);
    frame(SOF_C1, 8'h00, 24'h010203, 10, EOF_N);      // connect request: forward, R_RDY
    frame(SOF_I3, 8'h22, 24'hFFFFFE, 58, EOF_T);      // login to the IWU: local
    frame(SOF_N1, 8'h00, 24'h010203, 500, EOF_N);     // class 1 data: no R_RDY
    frame(SOF_N1, 8'hC1, 24'h010203, 0, EOF_DT);      // ACK with EOFdt: R_RDY
    frame(SOF_I1, R_CTL_PRJT, 24'h010203, 0, EOF_T);  // P_RJT
    for (int i = 0; i < 3; i++) begin inq.push_back('{k:1, d:W0_RRDY}); inq.push_back('{k:0, d:W1_RRDY}); end
    for (int i = 0; i < 4; i++) begin inq.push_back('{k:1, d:W0_NOS}); inq.push_back('{k:0, d:W1_NOS}); end
    idles(4);
    // local frame cut short by a new SOF: discarded
    begin
      wq_t f;
      f = make_frame(SOF_I3, 8'h22, 24'hFFFFFE, 20, EOF_T, 9);
      for (int i = 0; i < 10; i++) inq.push_back(f[i]);
    end
    frame(SOF_I3, 8'h22, 24'hFFFFFE, 4, EOF_T);
    for (int i = 0; i < 20; i++)
      frame(($urandom % 2) ? SOF_N1 : SOF_I2, 8'h00, ($urandom % 4 == 0) ? 24'hFFFFFE : 24'h040506,
            $urandom % 80, ($urandom % 3 == 0) ? EOF_DT : EOF_T);
    idles(10);
    g = 0;
    while (inq.size() > 0 && g < 100000) begin @(posedge clk); g++; end
    repeat (10) @(posedge clk);
    chk(seg_exp.size() === 0, $sformatf("%0d forwarded words missing", seg_exp.size()));
    chk(loc_exp.size() === 0, $sformatf("%0d local words missing", loc_exp.size()));
    chk(n_rrdy === exp_rrdy, $sformatf("R_RDY requests %0d expected %0d", n_rrdy, exp_rrdy));
    chk(n_disc === 1, $sformatf("discards %0d", n_disc));
    chk(n_os_rrdy === 3 && n_os_nos === 4, $sformatf("ordered sets R_RDY %0d NOS %0d", n_os_rrdy, n_os_nos));
    chk(n_sof === n_eof + 1, $sformatf("SOF %0d EOF %0d", n_sof, n_eof));
    chk(n_irq === exp_irq, $sformatf("interrupts %0d expected %0d", n_irq, exp_irq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
