// tb_fcs_atm_iwu: end-to-end test of two interworking units at their default
// parameters (4 Mbyte segmentation buffer, FIFO discipline, 1.5-frame
// reassembly timeout), joined back to back by an ATM link model, with a
// workstation (N_Port) model on each FC side and a control-unit model on
// unit A.
//
//   WS A <-> IWU A --ATM A->B--> IWU B <-> WS B
//                 <--ATM B->A--
//
// Workstation models send frames built by tb_fc_pkg at the FC word rate
// (two words in three clocks) with Idles between them, and parse what their
// IWU transmits: frames are compared in order with an expected list, R_RDY,
// LR and LRR are counted. WS B answers a Link Reset with LRR, as an N_Port
// does. The control-unit model reads every frame of unit A's receive local
// buffer (a login sent to the IWU's own address) and answers with two frames
// through the transmit local buffer.
//
// The A->B link model copies cells byte by byte and can, when armed, drop the
// next middle, last or single cell, corrupt a header byte, or hold a middle
// cell back for 5000 clocks; this provokes the reassembler's cell-loss,
// frame-loss, missing-EOF and timeout paths and the receiver's HEC check.
// It also counts the cell types (SI codes) that pass and checks that the 47
// cells of a maximum-size frame leave back to back (46 x 53 clocks from first
// to last start of cell).
//
// Every mechanism is counted and the test fails if one never happens: multi-
// cell, single-cell, split-EOF, SOFc1, P_RJT and ACK/EOFdt cells, R_RDY
// generation (exact count), local frames and the control unit's replies,
// segmentation abort (a frame whose EOF never comes), Link Reset passed to
// the far side and link recovery on both sides, cell loss, frame loss,
// missing EOF, reassembly timeout and HEC errors. At the end the performance
// counters of both units are read through their monitor ports and compared
// with the event pulses counted here and with the cells the link model saw.
// Ends with TB_RESULT.
module tb_fcs_atm_iwu;
  import fap_pkg::*;
  import tb_fc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0d %s", cyc, msg); end
  endfunction

  // ---------------------------------------------------------------- DUTs
  logic        a_rxv, b_rxv, fc_en;
  fc_word_t    a_rxw, b_rxw, a_txw, b_txw;
  logic        a_txv, b_txv;
  logic [7:0]  a_atd, b_atd, a_ard, b_ard;
  logic        a_ats, b_ats, a_atv, b_atv, a_ars, b_ars, a_arv, b_arv;
  logic        a_irq, a_cu_rd, a_cu_v, a_cu_wr, a_cu_cm, b_irq, b_cu_v;
  fr_word_t    a_cu_d, a_cu_wd, b_cu_d;
  logic        a_act, b_act;
  iwu_events_t a_ev, b_ev;
  logic [4:0]  a_maddr = '0, b_maddr = '0;
  logic [31:0] a_mdata, b_mdata;

  fcs_atm_iwu u_a (
    .clk, .rst_n, .rx_valid(a_rxv), .rx_word(a_rxw), .los(1'b0),
    .tx_en(fc_en), .tx_valid(a_txv), .tx_word(a_txw),
    .atm_tx_en(1'b1), .atm_tx_data(a_atd), .atm_tx_soc(a_ats), .atm_tx_valid(a_atv),
    .atm_rx_data(a_ard), .atm_rx_soc(a_ars), .atm_rx_valid(a_arv),
    .cfg_tx_vpi(8'd1), .cfg_tx_vci(16'd100), .cfg_rx_vpi(8'd1), .cfg_rx_vci(16'd101),
    .cu_irq(a_irq), .cu_rx_rd(a_cu_rd), .cu_rx_valid(a_cu_v), .cu_rx_data(a_cu_d),
    .cu_tx_wr(a_cu_wr), .cu_tx_data(a_cu_wd), .cu_tx_commit(a_cu_cm),
    .cu_lr_req(1'b0), .cu_offline(1'b0), .link_active(a_act), .ev(a_ev),
    .mon_clear(1'b0), .mon_addr(a_maddr), .mon_data(a_mdata));

  fcs_atm_iwu u_b (
    .clk, .rst_n, .rx_valid(b_rxv), .rx_word(b_rxw), .los(1'b0),
    .tx_en(fc_en), .tx_valid(b_txv), .tx_word(b_txw),
    .atm_tx_en(1'b1), .atm_tx_data(b_atd), .atm_tx_soc(b_ats), .atm_tx_valid(b_atv),
    .atm_rx_data(b_ard), .atm_rx_soc(b_ars), .atm_rx_valid(b_arv),
    .cfg_tx_vpi(8'd1), .cfg_tx_vci(16'd101), .cfg_rx_vpi(8'd1), .cfg_rx_vci(16'd100),
    .cu_irq(b_irq), .cu_rx_rd(1'b0), .cu_rx_valid(b_cu_v), .cu_rx_data(b_cu_d),
    .cu_tx_wr(1'b0), .cu_tx_data('0), .cu_tx_commit(1'b0),
    .cu_lr_req(1'b0), .cu_offline(1'b0), .link_active(b_act), .ev(b_ev),
    .mon_clear(1'b0), .mon_addr(b_maddr), .mon_data(b_mdata));

  // FC word strobe: 13.28 Mword/s against the 19.44 MHz byte clock is close
  // to two words in three clocks.
  assign fc_en = (cyc % 3) != 2;

  // ---------------------------------------------------- workstation sources
  fc_word_t sa[$], sb[$];
  bit       a_half = 0, b_half = 0;

  always @(posedge clk) begin
    a_rxv <= 1'b0; b_rxv <= 1'b0;
    if (rst_n && fc_en) begin
      a_rxv <= 1'b1;
      if (sa.size() != 0 && !a_half) a_rxw <= sa.pop_front();
      else begin a_rxw <= a_half ? '{k:1'b0, d:W1_IDLE} : '{k:1'b1, d:W0_IDLE}; a_half = !a_half; end
      b_rxv <= 1'b1;
      if (sb.size() != 0 && !b_half) b_rxw <= sb.pop_front();
      else begin b_rxw <= b_half ? '{k:1'b0, d:W1_IDLE} : '{k:1'b1, d:W0_IDLE}; b_half = !b_half; end
    end
  end

  // ------------------------------------------------------ workstation sinks
  wq_t expA[$], expB[$];
  int  rrdyA = 0, rrdyB = 0, lrA = 0, lrB = 0, lrrA = 0, lrrB = 0, gotA = 0, gotB = 0;
  int  exp_rrdyA = 0, exp_rrdyB = 0;
  bit  b_answered = 0;

  typedef struct { bit pend; fc_word_t k0; bit infr; wq_t cur; } sink_t;
  sink_t skA, skB;

  function automatic bit same(input wq_t x, input wq_t y);
    if (x.size() != y.size()) return 0;
    foreach (x[i]) if (x[i] !== y[i]) return 0;
    return 1;
  endfunction

  // returns the ordered-set class when a pair completes, OS_NONE otherwise;
  // a finished frame is compared with the head of `exp`
  function automatic os_e sink_word(ref sink_t s, input fc_word_t w, ref wq_t exp[$],
                                    input string who, ref int got);
    os_e c = OS_NONE;
    if (w.k) begin s.pend = 1; s.k0 = w; return OS_NONE; end
    if (s.pend) begin
      s.pend = 0;
      c = seq_classify(s.k0.d, w.d);
      if (c == OS_SOF) begin s.infr = 1; s.cur = {}; s.cur.push_back(s.k0); s.cur.push_back(w); end
      else if (c == OS_EOF && s.infr) begin
        s.cur.push_back(s.k0); s.cur.push_back(w); s.infr = 0; got++;
        if (exp.size() === 0) chk(0, $sformatf("%s: unexpected frame of %0d words", who, s.cur.size()));
        else begin
          wq_t e = exp.pop_front();
          chk(same(e, s.cur), $sformatf("%s: frame of %0d words, expected %0d words", who, s.cur.size(), e.size()));
        end
      end else if (s.infr) begin
        chk(0, $sformatf("%s: ordered set inside a frame", who)); s.infr = 0;
      end
    end else if (s.infr) s.cur.push_back(w);
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (a_txv) begin
      os_e c;
      c = sink_word(skA, a_txw, expA, "WS A", gotA);
      if (c == OS_RRDY) rrdyA++;
      if (c == OS_LR)   lrA++;
      if (c == OS_LRR)  lrrA++;
    end
    if (b_txv) begin
      os_e c;
      c = sink_word(skB, b_txw, expB, "WS B", gotB);
      if (c == OS_RRDY) rrdyB++;
      if (c == OS_LR)   lrB++;
      if (c == OS_LRR)  lrrB++;
      // N_Port answer to a Link Reset: LRR, then Idles once LR stops
      if (c == OS_LR && lrB >= 3 && !b_answered) begin
        b_answered = 1;
        repeat (8) begin sb.push_back('{k:1'b1, d:W0_LRR}); sb.push_back('{k:1'b0, d:W1_LRR}); end
      end
    end
  end

  // ---------------------------------------------------- control unit model
  wq_t      login_seen, cu_rep1, cu_rep2;
  fc_word_t cu_cur[$];
  fr_word_t cuw[$];
  int       cu_frames = 0;

  assign a_cu_rd = a_cu_v;
  always @(posedge clk) begin
    a_cu_wr <= 1'b0; a_cu_cm <= 1'b0;
    if (rst_n) begin
      if (a_cu_v) begin
        cu_cur.push_back('{k:a_cu_d.k, d:a_cu_d.d});
        if (a_cu_d.last) begin
          login_seen = cu_cur; cu_cur = {}; cu_frames++;
          foreach (cu_rep1[i]) cuw.push_back('{k:cu_rep1[i].k, last:(i == cu_rep1.size() - 1), d:cu_rep1[i].d});
          foreach (cu_rep2[i]) cuw.push_back('{k:cu_rep2[i].k, last:(i == cu_rep2.size() - 1), d:cu_rep2[i].d});
        end
      end
      if (cuw.size() != 0) begin
        fr_word_t w;
        w = cuw.pop_front();
        a_cu_wr <= 1'b1; a_cu_wd <= w; a_cu_cm <= w.last;
      end
    end
  end

  // --------------------------------------------------------- ATM link model
  typedef logic [0:52][7:0] cb_t;
  cb_t   ab_q[$], ba_q[$];
  int    ab_hold[$];
  cb_t   cap_ab, cap_ba;
  int    ia = 0, ib = 0;
  longint soc_ab;
  bit    arm_drop_mid = 0, arm_hec = 0, arm_drop_last = 0, arm_drop_single = 0, arm_pause = 0;
  int    n_si[8], n_split = 0, n_eofcell = 0, n_dropped = 0, n_rate = 0;
  longint t_first;

  // capture A->B and apply the armed fault
  always @(posedge clk) if (rst_n && a_atv) begin
    if (a_ats) begin ia = 0; soc_ab = cyc; end
    cap_ab[ia] = a_atd; ia++;
    if (ia == 53) begin
      logic pt2; logic [2:0] si; logic [5:0] cc; int hold; bit drop;
      pt2 = cap_ab[3][1]; si = cap_ab[5][7:5]; cc = cap_ab[6][5:0];
      hold = 0; drop = 0;
      if (!pt2) n_si[si]++;
      else if (si == SI_EOF_SPLIT) n_split++;
      else n_eofcell++;
      if (!pt2 && si == SI_SOF_PART) t_first = soc_ab;
      if (pt2 && cc == 6'd46) begin
        n_rate++;
        chk(soc_ab - t_first === 46 * 53, $sformatf("max frame cells not back to back: %0d clocks", soc_ab - t_first));
      end
      if (arm_drop_mid && !pt2 && si == SI_MIDDLE)          begin arm_drop_mid = 0; drop = 1; end
      if (arm_drop_last && pt2)                              begin arm_drop_last = 0; drop = 1; end
      if (arm_drop_single && !pt2 && si == SI_SOF_WHOLE)     begin arm_drop_single = 0; drop = 1; end
      if (arm_hec && !pt2 && si == SI_SOF_PART)              begin arm_hec = 0; cap_ab[2] ^= 8'h10; end
      if (arm_pause && !pt2 && si == SI_MIDDLE)              begin arm_pause = 0; hold = 5000; end
      if (drop) n_dropped++;
      else begin ab_q.push_back(cap_ab); ab_hold.push_back(hold); end
      ia = 0;
    end
  end

  always @(posedge clk) if (rst_n && b_atv) begin
    if (b_ats) ib = 0;
    cap_ba[ib] = b_atd; ib++;
    if (ib == 53) begin ba_q.push_back(cap_ba); ib = 0; end
  end

  // replay: one byte per clock, cells back to back
  cb_t out_ab, out_ba;
  int  oa = 53, ob = 53, wait_ab = 0;
  always @(posedge clk) begin
    b_arv <= 1'b0; b_ars <= 1'b0; a_arv <= 1'b0; a_ars <= 1'b0;
    if (rst_n) begin
      if (oa == 53 && wait_ab == 0 && ab_q.size() != 0) begin
        wait_ab = ab_hold.pop_front();
        out_ab = ab_q.pop_front(); oa = 0;
      end
      if (wait_ab > 0) wait_ab--;
      else if (oa < 53) begin
        b_arv <= 1'b1; b_ars <= (oa == 0); b_ard <= out_ab[oa]; oa++;
      end
      if (ob == 53 && ba_q.size() != 0) begin out_ba = ba_q.pop_front(); ob = 0; end
      if (ob < 53) begin
        a_arv <= 1'b1; a_ars <= (ob == 0); a_ard <= out_ba[ob]; ob++;
      end
    end
  end

  // ------------------------------------------------------------ event tally
  int a_loc = 0, a_abort = 0, a_lrl = 0, b_lrr = 0, b_closs = 0, b_floss = 0,
      b_noeof = 0, b_tmo = 0, b_hec = 0, b_frx = 0, a_ovf = 0, b_ovf = 0, a_sent = 0, b_rcov = 0;
  always @(posedge clk) if (rst_n) begin
    a_loc   += a_ev.frame_loc;     a_abort += a_ev.seg_abort;
    a_lrl   += a_ev.lr_local;      b_lrr   += b_ev.lr_remote;
    b_closs += b_ev.cell_loss;     b_floss += b_ev.frame_loss;
    b_noeof += b_ev.no_eof;        b_tmo   += b_ev.reasm_timeout;
    b_hec   += b_ev.hec_err;       b_frx   += b_ev.frame_rx;
    a_ovf   += a_ev.seg_overflow + a_ev.reasm_overflow + a_ev.rx_overrun;
    b_ovf   += b_ev.seg_overflow + b_ev.reasm_overflow + b_ev.rx_overrun;
    a_sent  += a_ev.frame_sent;
  end

  // counter number of one event: its bit position in iwu_events_t
  function automatic logic [4:0] ev_bit(input iwu_events_t e);
    for (int i = 0; i < $bits(iwu_events_t); i++) if (e[i]) return 5'(i);
    return 5'd31;
  endfunction

  task automatic mon_read(input bit side_b, input iwu_events_t e, output int v);
    @(negedge clk);
    if (side_b) b_maddr = ev_bit(e); else a_maddr = ev_bit(e);
    @(negedge clk);
    v = int'(side_b ? b_mdata : a_mdata);
  endtask

  // ------------------------------------------------------------- stimulus
  function automatic bit wants_rrdy(input logic [7:0] sof_c, input logic [7:0] eof_c);
    return !(sof_c inside {SOF_I1, SOF_N1}) || eof_c == EOF_DT;
  endfunction

  int seed = 10;
  task automatic send_a(input logic [7:0] sof_c, input logic [7:0] r_ctl, input int n,
                        input logic [7:0] eof_c, input bit expect_it);
    wq_t f = make_frame(sof_c, r_ctl, 24'h020202, n, eof_c, seed++);
    foreach (f[i]) sa.push_back(f[i]);
    if (expect_it) expB.push_back(f);
    if (wants_rrdy(sof_c, eof_c)) exp_rrdyA++;
  endtask

  task automatic send_b(input logic [7:0] sof_c, input logic [7:0] r_ctl, input int n,
                        input logic [7:0] eof_c);
    wq_t f = make_frame(sof_c, r_ctl, 24'h010101, n, eof_c, seed++);
    foreach (f[i]) sb.push_back(f[i]);
    expA.push_back(f);
    if (wants_rrdy(sof_c, eof_c)) exp_rrdyB++;
  endtask

  task automatic drain(input string what, input int maxc);
    int c = 0;
    while ((expA.size() || expB.size() || sa.size() || sb.size()) && c < maxc) begin
      @(posedge clk); c++;
    end
    chk(c < maxc, $sformatf("%s: not delivered in %0d clocks (expA %0d expB %0d)",
                            what, maxc, expA.size(), expB.size()));
    repeat (300) @(posedge clk);
  endtask

  initial begin
    wq_t login, part;
    int  r0;
    repeat (20) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);
    chk(a_act && b_act, "links active after reset");

    // 1. login to the IWU: local buffer, control unit, replies on FC
    login   = make_frame(SOF_I3, 8'h22, 24'hFFFFFE, 28, EOF_T, 1);
    cu_rep1 = make_frame(SOF_N3, 8'hC0, 24'h010101, 0, EOF_T, 2);
    cu_rep2 = make_frame(SOF_N3, 8'h23, 24'h010101, 30, EOF_T, 3);
    foreach (login[i]) sa.push_back(login[i]);
    exp_rrdyA++;
    expA.push_back(cu_rep1); expA.push_back(cu_rep2);
    drain("login", 20000);
    chk(cu_frames === 1 && same(login_seen, login), "login frame read by the control unit");

    // 2. data frames of every cell pattern, A to B
    send_a(SOF_I1, 8'h06, 200,  EOF_N,  1);    // multi-cell
    send_a(SOF_N1, 8'h06, 0,    EOF_N,  1);    // single cell
    send_a(SOF_N1, 8'h06, 6,    EOF_N,  1);    // EOF split, one SOF cell + EOF cell
    send_a(SOF_N1, 8'h06, 29,   EOF_T,  1);    // EOF split after a full cell
    send_a(SOF_C1, 8'h06, 10,   EOF_N,  1);    // SOFc1
    send_a(SOF_N1, R_CTL_PRJT, 0, EOF_T, 1);   // P_RJT
    send_a(SOF_N1, 8'h06, 1056, EOF_T,  1);    // maximum size, 47 cells
    send_a(SOF_I2, 8'h06, 50,   EOF_T,  1);    // class 2
    send_a(SOF_N1, 8'hC0, 0,    EOF_DT, 1);    // ACK with EOFdt
    drain("data frames", 60000);

    // 3. frames from B to A, including an ACK that ends the connection
    send_b(SOF_N1, 8'h06, 300, EOF_N);
    send_b(SOF_N1, 8'hC0, 0,   EOF_DT);
    drain("B to A", 30000);

    // 4. faults on the ATM link, each followed by a clean frame
    arm_drop_mid = 1;    send_a(SOF_N1, 8'h06, 100, EOF_N, 0); send_a(SOF_N1, 8'h06, 40, EOF_N, 1);
    drain("cell loss", 30000);
    arm_hec = 1;         send_a(SOF_N1, 8'h06, 100, EOF_N, 0); send_a(SOF_N1, 8'h06, 40, EOF_N, 1);
    drain("HEC error", 30000);
    arm_drop_last = 1;   send_a(SOF_N1, 8'h06, 100, EOF_N, 0); send_a(SOF_N1, 8'h06, 40, EOF_N, 1);
    drain("missing EOF", 30000);
    arm_drop_single = 1; send_a(SOF_N1, 8'h06, 0,   EOF_N, 0); send_a(SOF_N1, 8'h06, 40, EOF_N, 1);
    drain("frame loss", 30000);
    arm_pause = 1;       send_a(SOF_N1, 8'h06, 100, EOF_N, 0); send_a(SOF_N1, 8'h06, 40, EOF_N, 1);
    drain("reassembly timeout", 40000);

    // 5. a frame whose EOF never comes: the segmentator closes it with EOFa
    begin
      wq_t f;
      f = make_frame(SOF_N1, 8'h06, 24'h020202, 60, EOF_N, 99);
      part = {};
      for (int i = 0; i < 40; i++) part.push_back(f[i]);
      foreach (part[i]) sa.push_back(part[i]);
      part.push_back('{k:1'b1, d:W0_EOFA}); part.push_back('{k:1'b0, d:W1_EOFA});
      expB.push_back(part);
    end
    drain("segmentation abort", 30000);
    chk(a_abort === 1, $sformatf("segmentation aborts %0d, expected 1", a_abort));

    // 6. Link Reset from WS A travels to WS B
    repeat (8) begin sa.push_back('{k:1'b1, d:W0_LR}); sa.push_back('{k:1'b0, d:W1_LR}); end
    r0 = 0;
    while (!(b_answered && a_act && b_act) && r0 < 20000) begin @(posedge clk); r0++; end
    repeat (500) @(posedge clk);
    chk(a_act && b_act, "both links active again after the link reset");
    chk(lrrA >= 1, "IWU A answered LR with LRR");
    chk(lrB >= 3, "IWU B sent LR to its N_Port");
    send_a(SOF_N1, 8'h06, 80, EOF_N, 1);
    send_b(SOF_N1, 8'h06, 80, EOF_N);
    drain("after link reset", 30000);

    // ---------------------------------------------------------- summary
    repeat (500) @(posedge clk);
    chk(n_si[SI_SOF_PART] > 0, "multi-cell frames (SI=000) seen");
    chk(n_si[SI_MIDDLE]   > 0, "middle cells (SI=011) seen");
    chk(n_eofcell         > 0, "EOF cells (PT2=1, SI=000) seen");
    chk(n_si[SI_SOF_WHOLE] > 0, "single-cell frames (SI=001) seen");
    chk(n_split           > 0, "split EOF cells (PT2=1, SI=001) seen");
    chk(n_si[SI_SOFC]     > 0, "SOFc1 cells (SI=101) seen");
    chk(n_si[SI_PRJT]     > 0, "P_RJT cells (SI=110) seen");
    chk(n_si[SI_ACK_DT]   > 0, "ACK/EOFdt cells (SI=100) seen");
    chk(n_si[SI_LR]       === 1, $sformatf("Link-Reset cells %0d, expected 1", n_si[SI_LR]));
    chk(n_rate === 1, "maximum frame timing measured");
    chk(rrdyA === exp_rrdyA, $sformatf("R_RDY to WS A %0d, expected %0d", rrdyA, exp_rrdyA));
    chk(rrdyB === exp_rrdyB, $sformatf("R_RDY to WS B %0d, expected %0d", rrdyB, exp_rrdyB));
    chk(a_loc === 1, "one local frame stored");
    chk(a_lrl === 1 && b_lrr === 1, $sformatf("link reset local %0d remote %0d", a_lrl, b_lrr));
    chk(b_closs > 0, "cell loss detected");
    chk(b_hec   > 0, "HEC error detected");
    chk(b_noeof > 0, "missing EOF detected");
    chk(b_floss > 0, "frame loss detected");
    chk(b_tmo   > 0, "reassembly timeout detected");
    chk(a_ovf === 0 && b_ovf === 0, "no overflow or overrun");
    chk(n_dropped === 3, "three cells dropped by the link model");
    chk(expA.size() === 0 && expB.size() === 0, "every expected frame delivered");
    // performance counters agree with the pulses and with the link model
    begin
      iwu_events_t e;
      int v;
      e = '0; e.cell_loss = 1'b1;  mon_read(1, e, v); chk(v === b_closs, $sformatf("B cell-loss counter %0d", v));
      e = '0; e.hec_err = 1'b1;    mon_read(1, e, v); chk(v === b_hec, $sformatf("B HEC counter %0d", v));
      e = '0; e.reasm_timeout = 1'b1; mon_read(1, e, v); chk(v === b_tmo, $sformatf("B timeout counter %0d", v));
      e = '0; e.frame_rx = 1'b1;   mon_read(1, e, v); chk(v === b_frx, $sformatf("B frames counter %0d", v));
      e = '0; e.seg_abort = 1'b1;  mon_read(0, e, v); chk(v === 1, $sformatf("A abort counter %0d", v));
      e = '0; e.cell_tx = 1'b1;    mon_read(0, e, v);
      chk(v === n_si[0] + n_si[1] + n_si[2] + n_si[3] + n_si[4] + n_si[5] + n_si[6] + n_si[7] + n_split + n_eofcell,
          $sformatf("A cells-sent counter %0d", v));
    end
    $display("frames to WS B %0d, to WS A %0d, cells SOF %0d mid %0d whole %0d EOF %0d split %0d",
             gotB, gotA, n_si[SI_SOF_PART], n_si[SI_MIDDLE], n_si[SI_SOF_WHOLE], n_eofcell, n_split);
    $display("B: cell loss %0d frame loss %0d no EOF %0d timeout %0d HEC %0d",
             b_closs, b_floss, b_noeof, b_tmo, b_hec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
