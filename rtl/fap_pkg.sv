// fap_pkg: types, constants and helper functions shared by the FCS/ATM
// interworking unit.
//
// The Fibre Channel side moves 16-bit words. A word whose upper byte is the
// special character K28.5 starts a 4-character ordered set (two words); the
// flag `k` of fc_word_t marks such a word. The byte codes of the ordered sets
// are the FC-PH values (they are standard and not part of this design); the
// classifier below looks at the second, third and fourth characters, which is
// enough to tell every delimiter and primitive from the others whatever the
// running disparity.
//
// The ATM side moves cells that carry the FAP (FCS/ATM Protocol) header in
// their first two payload bytes:
//   byte 1: bits 8..6 Special Information (SI), bits 5..1 EOF pointer
//   byte 2: bits 8..7 Frame Counter (mod 4), bits 6..1 Cell Counter (mod 64)
// leaving 46 payload bytes, i.e. 23 words. Together with the PT2 bit of the
// ATM header (1 = the cell ends a frame) SI gives the cell type. The EOF
// pointer is the word offset (0..22) of the EOF's K28.5 inside the 23-word
// payload; the value 31 is this design's marker for "no EOF in this cell".
package fap_pkg;

  localparam int PAYLOAD_WORDS = 23;   // 46 bytes after the 2 FAP bytes
  localparam int CELL_BYTES    = 53;
  localparam logic [4:0] EOF_NONE = 5'd31;

  // One word on the FC side: k = upper byte is K28.5
  typedef struct packed {
    logic        k;
    logic [15:0] d;
  } fc_word_t;

  // Word written by the filter into the segmentation buffer, with the
  // control flags the segmentator uses.
  typedef struct packed {
    logic        sof;   // first word of a SOF
    logic        c1;    // second word of a SOFc1
    logic        prjt;  // first header word of a P_RJT frame
    logic        eof;   // first word of an EOF
    logic        dt;    // second word of an EOFdt
    logic [15:0] d;
  } seg_word_t;

  // Word of a whole-frame FIFO (local buffers, reassembly FIFO)
  typedef struct packed {
    logic        k;     // upper byte is K28.5
    logic        last;  // final word of the frame
    logic [15:0] d;
  } fr_word_t;

  // Special Information codes (Table of cell types). PT2 = 0 column:
  localparam logic [2:0] SI_SOF_PART  = 3'b000;
  localparam logic [2:0] SI_SOF_WHOLE = 3'b001;
  localparam logic [2:0] SI_LR        = 3'b010;
  localparam logic [2:0] SI_MIDDLE    = 3'b011;
  localparam logic [2:0] SI_ACK_DT    = 3'b100;
  localparam logic [2:0] SI_SOFC      = 3'b101;
  localparam logic [2:0] SI_PRJT      = 3'b110;
  // PT2 = 1 column:
  localparam logic [2:0] SI_EOF_FULL  = 3'b000;
  localparam logic [2:0] SI_EOF_SPLIT = 3'b001;

  typedef struct packed {
    logic [2:0] si;
    logic [4:0] eof_ptr;
    logic [1:0] frame_cnt;
    logic [5:0] cell_cnt;
  } fap_hdr_t;

  typedef struct packed {
    logic                               pt2;
    fap_hdr_t                           fap;
    logic [0:PAYLOAD_WORDS-1][15:0]     payload;  // payload[0] is sent first
  } cell_t;

  // One-cycle event pulses the unit reports for performance monitoring
  typedef struct packed {
    logic frame_fwd;       // frame written to the segmentation buffer
    logic frame_loc;       // frame stored for the control unit
    logic seg_overflow;    // word lost, segmentation buffer full
    logic seg_abort;       // frame closed with EOFa by the segmentator
    logic cell_tx;         // cell left on the ATM interface
    logic cell_rx;         // good cell received
    logic hec_err;         // cell with bad HEC dropped
    logic vc_drop;         // cell of another VPI/VCI dropped
    logic rx_overrun;      // cell lost in the receiver
    logic frame_rx;        // frame reassembled and committed
    logic cell_loss;       // cell-counter gap: frame discarded
    logic frame_loss;      // frame-counter gap
    logic no_eof;          // first cell inside a frame: frame discarded
    logic reasm_timeout;   // reassembly timeout: frame discarded
    logic reasm_overflow;  // reassembled frame did not fit
    logic lr_local;        // Link Reset received from the N_Port
    logic lr_remote;       // Link-Reset cell received from the far IWU
    logic frame_sent;      // frame sent to the N_Port
    logic rrdy_sent;       // R_RDY sent to the N_Port
  } iwu_events_t;

  // Ordered-set characters (FC-PH)
  localparam logic [7:0] K28_5 = 8'hBC;

  typedef enum logic [3:0] {
    OS_NONE, OS_IDLE, OS_RRDY, OS_NOS, OS_OLS, OS_LR, OS_LRR,
    OS_SOF, OS_EOF, OS_OTHER
  } os_e;

  // Sequences the link FSM asks the sender to transmit
  typedef enum logic [2:0] { SEQ_IDLE, SEQ_NOS, SEQ_OLS, SEQ_LR, SEQ_LRR } seq_e;

  // Word pairs of the ordered sets the IWU transmits itself
  localparam logic [15:0] W0_IDLE = 16'hBC95, W1_IDLE = 16'hB5B5;
  localparam logic [15:0] W0_RRDY = 16'hBC95, W1_RRDY = 16'h4A4A;
  localparam logic [15:0] W0_NOS  = 16'hBC55, W1_NOS  = 16'hBF45;
  localparam logic [15:0] W0_OLS  = 16'hBC35, W1_OLS  = 16'h8A55;
  localparam logic [15:0] W0_LR   = 16'hBC49, W1_LR   = 16'hBF49;
  localparam logic [15:0] W0_LRR  = 16'hBC35, W1_LRR  = 16'hBF49;
  localparam logic [15:0] W0_EOFA = 16'hBC95, W1_EOFA = 16'hF5F5;

  // SOF third characters
  localparam logic [7:0] SOF_C1 = 8'h17, SOF_I1 = 8'h57, SOF_N1 = 8'h37,
                         SOF_I2 = 8'h55, SOF_N2 = 8'h35, SOF_I3 = 8'h56,
                         SOF_N3 = 8'h36, SOF_F  = 8'h58;
  // EOF third characters
  localparam logic [7:0] EOF_T = 8'h75, EOF_DT = 8'h95, EOF_A = 8'hF5, EOF_N = 8'hD5;

  localparam logic [7:0] R_CTL_PRJT = 8'hC2;

  function automatic logic is_sof_char(input logic [7:0] c);
    return c inside {SOF_C1, SOF_I1, SOF_N1, SOF_I2, SOF_N2, SOF_I3, SOF_N3, SOF_F};
  endfunction

  // Classify an ordered set from its two words (w0 carries K28.5)
  function automatic os_e os_classify(input logic [15:0] w0, input logic [15:0] w1);
    logic [7:0] c2, c3, c4;
    c2 = w0[7:0]; c3 = w1[15:8]; c4 = w1[7:0];
    if (w0[15:8] != K28_5)                                   return OS_OTHER;
    if (c3 != c4)                                            return OS_OTHER;
    if (c2 == 8'hB5 && is_sof_char(c3))                      return OS_SOF;
    if ((c2 == 8'h95 || c2 == 8'hB5) && c3 inside {EOF_T, EOF_DT, EOF_A, EOF_N})
                                                             return OS_EOF;
    if ((c2 == 8'h8A || c2 == 8'hAA) && c3 inside {EOF_DT, EOF_N})
                                                             return OS_EOF;   // EOFdti/EOFni
    if (c2 == 8'h95 && c3 == 8'hB5)                          return OS_IDLE;
    if (c2 == 8'h95 && c3 == 8'h4A)                          return OS_RRDY;
    return OS_OTHER;
  endfunction

  // Primitive sequences do not repeat their third character in the fourth
  function automatic os_e seq_classify(input logic [15:0] w0, input logic [15:0] w1);
    if (w0 == W0_NOS && w1 == W1_NOS) return OS_NOS;
    if (w0 == W0_OLS && w1 == W1_OLS) return OS_OLS;
    if (w0 == W0_LR  && w1 == W1_LR ) return OS_LR;
    if (w0 == W0_LRR && w1 == W1_LRR) return OS_LRR;
    return os_classify(w0, w1);
  endfunction

  // ATM HEC: CRC-8, generator x^8 + x^2 + x + 1, over the first four header
  // bytes, then XOR 0x55 (ITU-T I.432).
  function automatic logic [7:0] atm_hec(input logic [31:0] h);
    logic [7:0] crc;
    crc = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb  = crc[7] ^ h[i];
      crc = {crc[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return crc ^ 8'h55;
  endfunction

endpackage
