// tb_iwu_throughput: throughput of the unit's FC -> ATM path for blocks of
// maximum-length frames (2112 data bytes each), under the two disciplines of
// the segmentation buffer.
//
// Two units see the same FC input at 265.625 Mbaud (13.28 Mword/s, taken as
// two words every three clocks of the 19.44 MHz ATM byte clock):
//   u_fifo - default parameters: FIFO discipline, segmentation on the fly;
//   u_sf   - store and forward with a block of N = 32 frames (STORE_FWD = 1,
//            SF_FRAMES = 32), the SRAM-style buffer.
// Phase 1 sends a 32-frame block (64 Kbyte, the window the evaluation calls
// sufficient) to both. Phase 2 sends a 1985-frame block (4 Mbyte, W = N = 1985)
// to the FIFO unit alone; its buffer must never overflow.
//
// Throughput is data bits of the block over the time from its first FC word to
// the end of its last cell, in Mbit/s at 19.44 MHz. Expected, worked out from
// the rates: FIFO, the ATM link is the bottleneck: 2112*8 bits per 47 cells of
// 53 bytes = 131.9 Mbit/s for any block size; store and forward, the block is
// first received (N*1074 words at 2/3 word per clock) and only then sent
// (N*47*53 clocks): 2112*8*N / ((1.5*1074 + 2491)*N) clocks = 80.1 Mbit/s.
// Checks: cell counts, no overflow, FIFO >= 130 Mbit/s, store and forward
// between 78 and 82 Mbit/s, the peak FIFO level below the buffer size.
// Ends with TB_RESULT.
module tb_iwu_throughput;
  import fap_pkg::*;
  import tb_fc_pkg::*;

  localparam int N_SMALL = 32;
  localparam int N_BIG   = 1985;
  localparam int FRAME_DATA = 2112;   // bytes of data in a maximum-length frame

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0d %s", cyc, msg); end
  endfunction

  logic        fc_en, rxv_f, rxv_s;
  fc_word_t    rxw;
  logic [7:0]  d_f, d_s;
  logic        soc_f, soc_s, v_f, v_s;
  iwu_events_t ev_f, ev_s;

  assign fc_en = (cyc % 3) != 2;

  fcs_atm_iwu u_fifo (
    .clk, .rst_n, .rx_valid(rxv_f), .rx_word(rxw), .los(1'b0),
    .tx_en(fc_en), .tx_valid(), .tx_word(),
    .atm_tx_en(1'b1), .atm_tx_data(d_f), .atm_tx_soc(soc_f), .atm_tx_valid(v_f),
    .atm_rx_data(8'h00), .atm_rx_soc(1'b0), .atm_rx_valid(1'b0),
    .cfg_tx_vpi(8'd1), .cfg_tx_vci(16'd100), .cfg_rx_vpi(8'd1), .cfg_rx_vci(16'd101),
    .cu_irq(), .cu_rx_rd(1'b0), .cu_rx_valid(), .cu_rx_data(),
    .cu_tx_wr(1'b0), .cu_tx_data('0), .cu_tx_commit(1'b0),
    .cu_lr_req(1'b0), .cu_offline(1'b0), .link_active(), .ev(ev_f),
    .mon_clear(1'b0), .mon_addr(5'd0), .mon_data());

  fcs_atm_iwu #(.STORE_FWD(1'b1), .SF_FRAMES(N_SMALL)) u_sf (
    .clk, .rst_n, .rx_valid(rxv_s), .rx_word(rxw), .los(1'b0),
    .tx_en(fc_en), .tx_valid(), .tx_word(),
    .atm_tx_en(1'b1), .atm_tx_data(d_s), .atm_tx_soc(soc_s), .atm_tx_valid(v_s),
    .atm_rx_data(8'h00), .atm_rx_soc(1'b0), .atm_rx_valid(1'b0),
    .cfg_tx_vpi(8'd1), .cfg_tx_vci(16'd100), .cfg_rx_vpi(8'd1), .cfg_rx_vci(16'd101),
    .cu_irq(), .cu_rx_rd(1'b0), .cu_rx_valid(), .cu_rx_data(),
    .cu_tx_wr(1'b0), .cu_tx_data('0), .cu_tx_commit(1'b0),
    .cu_lr_req(1'b0), .cu_offline(1'b0), .link_active(), .ev(ev_s),
    .mon_clear(1'b0), .mon_addr(5'd0), .mon_data());

  // FC source: frames are generated one at a time as the previous one drains
  int       to_send = 0, sent = 0;
  bit       to_sf = 0, half = 0;
  fc_word_t q[$];
  longint   t_start;

  always @(posedge clk) begin
    rxv_f <= 1'b0; rxv_s <= 1'b0;
    if (rst_n && fc_en) begin
      if (q.size() == 0 && sent < to_send && !half) begin
        q = make_frame(SOF_N1, 8'h06, 24'h020202, 1056, (sent == to_send - 1) ? EOF_T : EOF_N, sent);
        if (sent == 0) t_start = cyc;
        sent++;
      end
      rxv_f <= 1'b1; rxv_s <= to_sf;
      if (q.size() != 0 && !half) rxw <= q.pop_front();
      else begin rxw <= half ? '{k:1'b0, d:W1_IDLE} : '{k:1'b1, d:W0_IDLE}; half = !half; end
    end
  end

  // ATM sinks: cells and ends of frames (PT2 = 1), time of the last byte
  int     cells_f = 0, cells_s = 0, ends_f = 0, ends_s = 0, bi_f = 0, bi_s = 0;
  longint t_end_f, t_end_s;
  logic   pt2_f, pt2_s;
  int     ovf_f = 0, ovf_s = 0, peak = 0;
  always @(posedge clk) if (rst_n) begin
    if (v_f) begin
      if (soc_f) bi_f = 0;
      if (bi_f == 3) pt2_f = d_f[1];
      bi_f++;
      if (bi_f == CELL_BYTES) begin cells_f++; if (pt2_f) begin ends_f++; t_end_f = cyc; end end
    end
    if (v_s) begin
      if (soc_s) bi_s = 0;
      if (bi_s == 3) pt2_s = d_s[1];
      bi_s++;
      if (bi_s == CELL_BYTES) begin cells_s++; if (pt2_s) begin ends_s++; t_end_s = cyc; end end
    end
    ovf_f += ev_f.seg_overflow;
    ovf_s += ev_s.seg_overflow;
    if (int'(u_fifo.u_segbuf.level) > peak) peak = int'(u_fifo.u_segbuf.level);
  end

  // Mbit/s x 10 of n frames over `clocks` clocks of 19.44 MHz
  function automatic int mbit10(input int n, input longint clocks);
    return int'((64'(n) * FRAME_DATA * 8 * 19440 * 10) / (clocks * 1000));
  endfunction

  initial begin
    int tf, ts;
    repeat (20) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);

    // phase 1: 32 frames to both units
    to_sf = 1; to_send = N_SMALL; sent = 0;
    wait (ends_f == N_SMALL && ends_s == N_SMALL);
    tf = mbit10(N_SMALL, t_end_f - t_start + 1);
    ts = mbit10(N_SMALL, t_end_s - t_start + 1);
    $display("N=%0d: FIFO %0d.%0d Mbit/s, store and forward %0d.%0d Mbit/s",
             N_SMALL, tf / 10, tf % 10, ts / 10, ts % 10);
    chk(cells_f === N_SMALL * 47 && cells_s === N_SMALL * 47, "47 cells per maximum-length frame");
    chk(tf >= 1300, "FIFO throughput at least 130 Mbit/s");
    chk(ts >= 780 && ts <= 820, "store-and-forward throughput near 80 Mbit/s");
    chk(tf > ts, "FIFO discipline faster than store and forward");

    // phase 2: the 4 Mbyte block through the FIFO unit
    repeat (1000) @(posedge clk);
    peak = 0; cells_f = 0; ends_f = 0;
    to_sf = 0; to_send = N_BIG; sent = 0;
    wait (ends_f == N_BIG);
    tf = mbit10(N_BIG, t_end_f - t_start + 1);
    $display("N=%0d: FIFO %0d.%0d Mbit/s, peak buffer level %0d words of %0d",
             N_BIG, tf / 10, tf % 10, peak, 2097152);
    chk(cells_f === N_BIG * 47, "cells of the 4 Mbyte block");
    chk(tf >= 1300, "FIFO throughput at least 130 Mbit/s on the 4 Mbyte block");
    chk(ovf_f === 0 && ovf_s === 0, "no segmentation buffer overflow");
    chk(peak > 0 && peak < 2097152, "peak level inside the 4 Mbyte buffer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #80_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
