// tb_fc_pkg: helpers shared by the testbenches: building Fibre Channel
// frames as 16-bit word lists and a reference FAP segmentation written
// independently of the RTL.
//
// A frame is SOF (2 words), a 24-byte header (12 words: R_CTL/D_ID, CS_CTL/
// S_ID, TYPE/F_CTL, SEQ_ID/DF_CTL/SEQ_CNT, OX_ID/RX_ID, parameter), the data
// words, a 4-byte CRC field with a fixed pattern (the unit does not check the CRC) and the EOF
// (2 words): 18 + n words in all.
package tb_fc_pkg;
  import fap_pkg::*;

  typedef fc_word_t wq_t[$];

  function automatic wq_t make_frame(input logic [7:0] sof_c, input logic [7:0] r_ctl,
                                     input logic [23:0] did, input int n_data,
                                     input logic [7:0] eof_c, input int seed);
    wq_t q;
    q.push_back('{k:1'b1, d:16'hBCB5});
    q.push_back('{k:1'b0, d:{sof_c, sof_c}});
    q.push_back('{k:1'b0, d:{r_ctl, did[23:16]}});
    q.push_back('{k:1'b0, d:did[15:0]});
    q.push_back('{k:1'b0, d:16'h0001});           // CS_CTL, S_ID[23:16]
    q.push_back('{k:1'b0, d:16'h0203});           // S_ID[15:0]
    for (int i = 0; i < 8; i++) q.push_back('{k:1'b0, d:16'(seed * 131 + i)});
    for (int i = 0; i < n_data; i++) q.push_back('{k:1'b0, d:16'((seed * 7919 + i * 37) & 16'h7FFF)});
    q.push_back('{k:1'b0, d:16'hC0DE});           // CRC field, fixed pattern
    q.push_back('{k:1'b0, d:16'(seed)});
    q.push_back('{k:1'b1, d:16'hBC95});
    q.push_back('{k:1'b0, d:{eof_c, eof_c}});
    return q;
  endfunction

  // Expected FAP cells of one frame (list of cell_t), worked out from the
  // cell-type table directly rather than by stepping through words.
  typedef cell_t cq_t[$];
  function automatic cq_t ref_cells(input wq_t f, input logic [1:0] fc);
    cq_t cells;
    int nw, ncell, eofw;
    bit c1, prjt, dt, split;
    nw    = f.size();
    eofw  = nw - 2;                                  // index of the EOF's first word
    c1    = (f[1].d[15:8] == SOF_C1);
    prjt  = (f[2].d[15:8] == R_CTL_PRJT);
    dt    = (f[nw-1].d[15:8] == EOF_DT);
    ncell = (nw + PAYLOAD_WORDS - 1) / PAYLOAD_WORDS;
    split = (eofw % PAYLOAD_WORDS) == PAYLOAD_WORDS - 1;
    for (int c = 0; c < ncell; c++) begin
      cell_t x;
      x = '0;
      for (int i = 0; i < PAYLOAD_WORDS; i++)
        if (c * PAYLOAD_WORDS + i < nw) x.payload[i] = f[c * PAYLOAD_WORDS + i].d;
      x.fap.frame_cnt = fc;
      x.fap.cell_cnt  = 6'(c);
      x.fap.eof_ptr   = (eofw / PAYLOAD_WORDS == c) ? 5'(eofw % PAYLOAD_WORDS) : EOF_NONE;
      if (ncell == 1) begin
        x.pt2 = 0;
        x.fap.si = c1 ? 3'b101 : prjt ? 3'b110 : dt ? 3'b100 : 3'b001;
      end else if (c == 0) begin
        x.pt2 = 0; x.fap.si = c1 ? 3'b101 : 3'b000;
      end else if (c == ncell - 1) begin
        x.pt2 = 1; x.fap.si = split ? 3'b001 : 3'b000;
      end else begin
        x.pt2 = 0; x.fap.si = 3'b011;
      end
      cells.push_back(x);
    end
    return cells;
  endfunction

  // Reference HEC by polynomial long division of header * x^8 by x^8+x^2+x+1
  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction
endpackage
