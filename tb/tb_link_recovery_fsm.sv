// tb_link_recovery_fsm: walks the primitive-sequence FSM through the link
// reset handshake (both as responder and as initiator), link failure, offline
// and loss of signal, checking the sequence it asks the sender to transmit
// after every step. A sequence must be recognised only after three identical
// ordered sets, and a received Link Reset must be reported exactly once.
module tb_link_recovery_fsm;
  import fap_pkg::*;
  logic clk = 0, rst_n = 0;
  logic os_valid = 0, los = 0, lr_req = 0, offline = 0, active, lr_rx;
  os_e os_type = OS_NONE;
  seq_e tx_seq;
  int checks = 0, failures = 0, n_lr_rx = 0;

  link_recovery_fsm dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (lr_rx) n_lr_rx++;

  function automatic void chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (seq=%s active=%0d)", msg, tx_seq.name(), active); end
  endfunction

  task automatic rx(input os_e t, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); os_valid = 1; os_type = t;
      @(negedge clk); os_valid = 0;
    end
    @(negedge clk);
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0; @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(active && tx_seq === SEQ_IDLE, "reset: active, Idles");
    rx(OS_LR, 2);
    chk(active, "two LR are not yet a sequence");
    rx(OS_LR, 1);
    chk(!active && tx_seq === SEQ_LRR, "LR received: send LRR");
    chk(n_lr_rx === 1, "LR reported");
    rx(OS_LR, 5);
    chk(n_lr_rx === 1, "LR reported only once");
    rx(OS_IDLE, 1);
    chk(active && tx_seq === SEQ_IDLE, "Idle after LRR: active");
    // initiator
    pulse(lr_req);
    chk(!active && tx_seq === SEQ_LR, "reset request: send LR");
    rx(OS_LRR, 3);
    chk(!active && tx_seq === SEQ_IDLE, "LRR received: send Idles");
    rx(OS_RRDY, 1);
    chk(active, "back to active");
    // link failure
    rx(OS_NOS, 3);
    chk(!active && tx_seq === SEQ_OLS, "NOS received: send OLS");
    rx(OS_OLS, 3);
    chk(tx_seq === SEQ_LR, "OLS received: send LR");
    rx(OS_LRR, 3);
    rx(OS_IDLE, 1);
    chk(active, "recovered through LRR and Idle");
    // loss of signal
    pulse(los);
    chk(!active && tx_seq === SEQ_NOS, "loss of signal: send NOS");
    rx(OS_OLS, 3);
    chk(tx_seq === SEQ_LR, "OLS after NOS: send LR");
    rx(OS_LR, 3);
    chk(tx_seq === SEQ_LRR, "LR: send LRR");
    rx(OS_IDLE, 1);
    chk(active, "active again");
    // offline
    pulse(offline);
    chk(!active && tx_seq === SEQ_OLS, "offline: send OLS");
    rx(OS_OLS, 3);
    chk(tx_seq === SEQ_LR, "OLS while offline: send LR");
    rx(OS_LRR, 3); rx(OS_IDLE, 1);
    chk(active, "online again");
    // interleaved ordered sets do not make a sequence
    rx(OS_NOS, 2); rx(OS_IDLE, 1); rx(OS_NOS, 2);
    chk(active, "broken NOS run ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
