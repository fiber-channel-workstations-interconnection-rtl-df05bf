// link_recovery_fsm: the primitive-sequence state machine of the filtering
// block.
//
// It decides which primitive sequence the IWU transmits to its N_Port from
// the sequence it transmitted last (its state) and the sequence it receives.
// A received sequence (NOS, OLS, LR, LRR) counts once SEQ_MATCH identical
// ordered sets have arrived in a row; Idle and R_RDY count at once. States
// and transmitted sequences, after the FC-PH Link Recovery protocol:
//   AC  active, sends Idles          LR1 sends LR (reset started here)
//   LR2 sends LRR (LR received)      LR3 sends Idles (LRR received)
//   LF1 sends OLS (NOS received)     LF2 sends NOS (loss of signal)
//   OL1 sends OLS (offline request)  OL2 sends LR (OLS received)
// Transitions:
//   any state: los -> LF2, NOS -> LF1 (from LF2/LF1 too), OLS -> OL2,
//              LR  -> LR2 (pulses lr_rx so the remote IWU can be told)
//   AC/LR3/LR2: lr_req -> LR1, offline -> OL1
//   LR1, OL2: LRR -> LR3
//   LR2: LRR -> LR3, Idle or R_RDY -> AC
//   LR3: Idle or R_RDY -> AC
// `active` is high in AC; frames are sent only then. A received LR does not
// pulse lr_rx again while already in LR2. The transition set is a reduced
// reading of the standard protocol, which the document refers to but does not
// reproduce.
module link_recovery_fsm
  import fap_pkg::*;
#(
  parameter int SEQ_MATCH = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic os_valid,
  input  os_e  os_type,
  input  logic los,       // loss of signal / synchronisation
  input  logic lr_req,    // start a link reset (control unit or remote IWU)
  input  logic offline,   // take the link offline
  output seq_e tx_seq,
  output logic active,
  output logic lr_rx
);
  typedef enum logic [2:0] { AC, LR1, LR2, LR3, LF1, LF2, OL1, OL2 } state_e;

  state_e state, nxt;
  os_e    last_os;
  logic [$clog2(SEQ_MATCH+1)-1:0] run;
  logic   seq_ok;     // a primitive sequence is recognised on this ordered set
  os_e    rx;         // recognised event (sequence, Idle or R_RDY) or OS_NONE

  always_comb begin
    seq_ok = os_valid && (os_type == last_os) && (int'(run) + 1 >= SEQ_MATCH);
    rx = OS_NONE;
    if (os_valid) begin
      if (os_type inside {OS_IDLE, OS_RRDY}) rx = os_type;
      else if (os_type inside {OS_NOS, OS_OLS, OS_LR, OS_LRR} && (seq_ok || SEQ_MATCH <= 1))
        rx = os_type;
    end
  end

  always_comb begin
    nxt = state;
    if (los)                                       nxt = LF2;
    else if (rx == OS_NOS)                         nxt = LF1;
    else if (rx == OS_OLS)                         nxt = OL2;
    else if (rx == OS_LR)                          nxt = LR2;
    else begin
      unique case (state)
        AC:       if (offline) nxt = OL1; else if (lr_req) nxt = LR1;
        LR1:      if (rx == OS_LRR) nxt = LR3;
        LR2:      if (rx == OS_LRR) nxt = LR3;
                  else if (rx inside {OS_IDLE, OS_RRDY}) nxt = AC;
        LR3:      if (rx inside {OS_IDLE, OS_RRDY}) nxt = AC;
        OL2:      if (rx == OS_LRR) nxt = LR3;
        default:  ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= AC;
      last_os <= OS_NONE;
      run     <= '0;
      lr_rx   <= 1'b0;
    end else begin
      state <= nxt;
      lr_rx <= (nxt == LR2) && (state != LR2);
      if (os_valid) begin
        last_os <= os_type;
        if (os_type == last_os) begin
          if (int'(run) < SEQ_MATCH) run <= run + 1'b1;
        end else begin
          run <= 1;
        end
      end
    end
  end

  always_comb begin
    unique case (state)
      LR1, OL2:  tx_seq = SEQ_LR;
      LR2:       tx_seq = SEQ_LRR;
      LF1, OL1:  tx_seq = SEQ_OLS;
      LF2:       tx_seq = SEQ_NOS;
      default:   tx_seq = SEQ_IDLE;
    endcase
  end
  assign active = (state == AC);

endmodule
