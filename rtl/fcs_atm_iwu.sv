// fcs_atm_iwu: one FCS/ATM InterWorking Unit (IWU), the F_Port that joins a
// Fibre Channel N_Port (a workstation) to an ATM link through the FAP
// segmentation and reassembly protocol.
//
// Transmit direction (FC -> ATM), units FCS1 and SAR1:
//   rx words -> fcs_filter -> seg_buffer (4 Mbyte) -> fap_segmenter
//            -> cell FIFO (sync_fifo) -> atm_driver (header and HEC from
//               atm_hdr_gen) -> parallel ATM transmit interface
//   frames addressed to the IWU itself go instead to the receive local
//   buffer (frame_fifo) and raise cu_irq for the control unit.
// Receive direction (ATM -> FC), units SAR2 and FCS2:
//   parallel ATM receive interface -> atm_receiver -> fap_reassembler
//            -> frame FIFO (frame_fifo) -> fcs_sender -> tx words
//   the sender also takes frames the control unit put in the transmit local
//   buffer and adds R_RDY and the primitive sequences chosen by
//   link_recovery_fsm, which watches the ordered sets the filter reports.
// A Link Reset received from the N_Port is passed to the far IWU in an SI=010
// cell; such a cell from the far IWU makes this IWU start a link reset on its
// own N_Port.
//
// Everything runs on one clock, taken to be the ATM byte clock; the FC word
// rate is set by the rx_valid and tx_en strobes and the ATM rate by atm_tx_en.
// The control unit (a processor board in the original) reaches the local
// buffers, the VPI/VCI registers and the link-reset request through plain
// ports; the optical parts and the FC serialiser/8b10b chips sit outside, the
// unit sees decoded 16-bit words. Every internal event pulses on `ev`, and
// iwu_monitor counts each kind for the control unit (mon_addr selects the
// counter by its bit number in iwu_events_t, mon_data one cycle later,
// mon_clear zeroes them all).
module fcs_atm_iwu
  import fap_pkg::*;
#(
  parameter int          SEG_DEPTH     = 2097152,  // 4 Mbyte of 16-bit words
  parameter bit          STORE_FWD     = 1'b0,     // 0 FIFO, 1 store and forward
  parameter int          SF_FRAMES     = 1985,
  parameter int          SEG_TIMEOUT   = 256,
  parameter int          REASM_TIMEOUT = 3737,
  parameter int          LOC_DEPTH     = 2048,
  parameter int          REM_DEPTH     = 2048,
  parameter int          CELL_FIFO     = 4,
  parameter logic [23:0] IWU_DID       = 24'hFFFFFE
) (
  input  logic        clk,
  input  logic        rst_n,
  // Fibre Channel receiver (decoded words) and transmitter
  input  logic        rx_valid,
  input  fc_word_t    rx_word,
  input  logic        los,
  input  logic        tx_en,
  output logic        tx_valid,
  output fc_word_t    tx_word,
  // parallel ATM interface
  input  logic        atm_tx_en,
  output logic [7:0]  atm_tx_data,
  output logic        atm_tx_soc,
  output logic        atm_tx_valid,
  input  logic [7:0]  atm_rx_data,
  input  logic        atm_rx_soc,
  input  logic        atm_rx_valid,
  // control unit
  input  logic [7:0]  cfg_tx_vpi,
  input  logic [15:0] cfg_tx_vci,
  input  logic [7:0]  cfg_rx_vpi,
  input  logic [15:0] cfg_rx_vci,
  output logic        cu_irq,
  input  logic        cu_rx_rd,
  output logic        cu_rx_valid,
  output fr_word_t    cu_rx_data,
  input  logic        cu_tx_wr,
  input  fr_word_t    cu_tx_data,
  input  logic        cu_tx_commit,
  input  logic        cu_lr_req,
  input  logic        cu_offline,
  // status
  output logic        link_active,
  output iwu_events_t ev,
  input  logic        mon_clear,
  input  logic [4:0]  mon_addr,
  output logic [31:0] mon_data
);
  // ---------------- FCS1: filtering, link FSM, buffers ----------------
  logic      seg_we, loc_we, loc_commit, loc_discard, loc_lost, rrdy_req;
  seg_word_t seg_wdata;
  fr_word_t  loc_wdata;
  logic      os_valid;
  os_e       os_type;
  seq_e      tx_seq;
  logic      lr_local, lr_remote;

  fcs_filter #(.IWU_DID(IWU_DID)) u_filter (
    .clk, .rst_n, .in_valid(rx_valid), .in_word(rx_word),
    .seg_we, .seg_wdata,
    .loc_we, .loc_wdata, .loc_commit, .loc_discard, .loc_wr_lost(loc_lost), .irq(cu_irq),
    .rrdy_req, .os_valid, .os_type,
    .frame_fwd(ev.frame_fwd), .frame_loc(ev.frame_loc));

  link_recovery_fsm u_link (
    .clk, .rst_n, .os_valid, .os_type, .los,
    .lr_req(cu_lr_req || lr_remote), .offline(cu_offline),
    .tx_seq, .active(link_active), .lr_rx(lr_local));

  frame_fifo #(.DEPTH(LOC_DEPTH)) u_loc_rx (
    .clk, .rst_n, .wr_en(loc_we), .wr_data(loc_wdata), .commit(loc_commit),
    .discard(loc_discard), .wr_lost(loc_lost), .full(),
    .rd_en(cu_rx_rd), .rd_data(cu_rx_data), .rd_valid(cu_rx_valid), .frames());

  seg_word_t sb_data;
  logic      sb_valid, sb_pop;
  seg_buffer #(.DEPTH(SEG_DEPTH), .STORE_FWD(STORE_FWD), .SF_FRAMES(SF_FRAMES)) u_segbuf (
    .clk, .rst_n, .wr_en(seg_we), .wr_data(seg_wdata), .overflow(ev.seg_overflow),
    .rd_en(sb_pop), .rd_data(sb_data), .rd_valid(sb_valid), .level());

  // ---------------- SAR1: segmentation and driver ----------------
  cell_t seg_cell, drv_cell;
  logic  seg_cv, seg_cr, cf_full, drv_cv, drv_cr;

  fap_segmenter #(.SEG_TIMEOUT(SEG_TIMEOUT)) u_seg (
    .clk, .rst_n, .in_valid(sb_valid), .in_data(sb_data), .in_pop(sb_pop),
    .lr_req(lr_local), .cell_valid(seg_cv), .cell_ready(seg_cr), .cell_o(seg_cell),
    .seg_abort(ev.seg_abort));

  assign seg_cr = !cf_full;
  sync_fifo #(.T(cell_t), .DEPTH(CELL_FIFO)) u_cellq (
    .clk, .rst_n, .push(seg_cv), .din(seg_cell), .full(cf_full),
    .pop(drv_cr), .dout(drv_cell), .valid(drv_cv));

  atm_driver u_drv (
    .clk, .rst_n, .cfg_vpi(cfg_tx_vpi), .cfg_vci(cfg_tx_vci),
    .cell_valid(drv_cv), .cell_ready(drv_cr), .cell_i(drv_cell),
    .atm_en(atm_tx_en), .atm_data(atm_tx_data), .atm_soc(atm_tx_soc), .atm_valid(atm_tx_valid));
  assign ev.cell_tx = atm_tx_en && atm_tx_valid && atm_tx_soc;

  // ---------------- SAR2: receiver and reassembler ----------------
  cell_t    rx_cell;
  logic     rx_cv, rx_cr;
  logic     rem_we, rem_commit, rem_discard, rem_lost, rem_full;
  fr_word_t rem_wdata;

  atm_receiver u_rcv (
    .clk, .rst_n, .cfg_vpi(cfg_rx_vpi), .cfg_vci(cfg_rx_vci),
    .atm_data(atm_rx_data), .atm_soc(atm_rx_soc), .atm_valid(atm_rx_valid),
    .cell_valid(rx_cv), .cell_ready(rx_cr), .cell_o(rx_cell),
    .hec_err(ev.hec_err), .vc_drop(ev.vc_drop), .overrun(ev.rx_overrun));
  assign ev.cell_rx = rx_cv && rx_cr;

  fap_reassembler #(.REASM_TIMEOUT(REASM_TIMEOUT)) u_reasm (
    .clk, .rst_n, .cell_valid(rx_cv), .cell_ready(rx_cr), .cell_i(rx_cell),
    .wr_en(rem_we), .wr_data(rem_wdata), .commit(rem_commit), .discard(rem_discard),
    .wr_lost(rem_lost), .wr_full(rem_full), .lr_rx(lr_remote),
    .frame_done(ev.frame_rx), .cell_loss(ev.cell_loss), .frame_loss(ev.frame_loss),
    .no_eof(ev.no_eof), .timeout(ev.reasm_timeout), .overflow(ev.reasm_overflow));

  // ---------------- FCS2: frame FIFO, transmit local buffer, sender ----------------
  fr_word_t rem_rdata, loc_rdata;
  logic     rem_rvalid, rem_pop, loc_rvalid, loc_pop;

  frame_fifo #(.DEPTH(REM_DEPTH)) u_rem_fifo (
    .clk, .rst_n, .wr_en(rem_we), .wr_data(rem_wdata), .commit(rem_commit),
    .discard(rem_discard), .wr_lost(rem_lost), .full(rem_full),
    .rd_en(rem_pop), .rd_data(rem_rdata), .rd_valid(rem_rvalid), .frames());

  frame_fifo #(.DEPTH(LOC_DEPTH)) u_loc_tx (
    .clk, .rst_n, .wr_en(cu_tx_wr), .wr_data(cu_tx_data), .commit(cu_tx_commit),
    .discard(1'b0), .wr_lost(), .full(),
    .rd_en(loc_pop), .rd_data(loc_rdata), .rd_valid(loc_rvalid), .frames());

  fcs_sender u_send (
    .clk, .rst_n, .tx_en, .tx_valid, .tx_word, .seq(tx_seq), .active(link_active),
    .rrdy_req, .loc_valid(loc_rvalid), .loc_data(loc_rdata), .loc_pop,
    .rem_valid(rem_rvalid), .rem_data(rem_rdata), .rem_pop,
    .frame_sent(ev.frame_sent), .rrdy_sent(ev.rrdy_sent));

  assign ev.lr_local  = lr_local;
  assign ev.lr_remote = lr_remote;

  iwu_monitor u_mon (.clk, .rst_n, .ev, .clear(mon_clear), .rd_addr(mon_addr), .rd_data(mon_data));
endmodule
