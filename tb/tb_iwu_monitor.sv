// tb_iwu_monitor: checks the event counter bank.
// Random event pulses (each bit with its own probability) drive two
// instances, one with the default 32-bit counters and one with 4-bit counters
// to reach saturation. A model counts the same pulses. Every counter of both
// instances is read back through the read port (one cycle latency) after a
// first run, after a clear (which must also drop the events of its own cycle)
// and after a second run; the 4-bit counters must stop at 15. An address past
// the last event must read 0. Ends with TB_RESULT.
module tb_iwu_monitor;
  import fap_pkg::*;

  localparam int N = $bits(iwu_events_t);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic void chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endfunction

  iwu_events_t ev;
  logic        clear;
  logic [4:0]  rd_addr;
  logic [31:0] rd32;
  logic [3:0]  rd4;

  iwu_monitor dut (.clk, .rst_n, .ev, .clear, .rd_addr, .rd_data(rd32));
  iwu_monitor #(.W(4)) dut4 (.clk, .rst_n, .ev, .clear, .rd_addr, .rd_data(rd4));

  longint model[N];

  task automatic run(input int cycles);
    for (int c = 0; c < cycles; c++) begin
      logic [N-1:0] p;
      for (int i = 0; i < N; i++) p[i] = ($urandom % 100) < (i * 5 + 2);
      @(negedge clk);
      ev = p;
      for (int i = 0; i < N; i++) model[i] += p[i];
    end
    @(negedge clk);
    ev = '0;
  endtask

  task automatic read_all(input string phase);
    for (int i = 0; i < N + 2; i++) begin
      @(negedge clk);
      rd_addr = 5'(i);
      @(negedge clk);
      if (i < N) begin
        chk(rd32 === 32'(model[i]), $sformatf("%s: counter %0d reads %0d, expected %0d", phase, i, rd32, model[i]));
        chk(rd4 === ((model[i] > 15) ? 4'd15 : 4'(model[i])),
            $sformatf("%s: 4-bit counter %0d reads %0d", phase, i, rd4));
      end else begin
        chk(rd32 === 32'd0, $sformatf("%s: address %0d past the end reads %0d", phase, i, rd32));
      end
    end
  endtask

  initial begin
    ev = '0; clear = 0; rd_addr = '0;
    foreach (model[i]) model[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    read_all("after reset");
    run(300);
    read_all("first run");
    // clear together with a burst of events: none of them may count
    @(negedge clk);
    clear = 1; ev = '1;
    @(negedge clk);
    clear = 0; ev = '0;
    foreach (model[i]) model[i] = 0;
    read_all("after clear");
    run(7);
    read_all("short run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
