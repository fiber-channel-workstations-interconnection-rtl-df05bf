// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the valid and full flags, and that pushes into a full FIFO are lost.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, valid;
  logic [15:0] din, dout;
  int checks = 0, failures = 0;
  logic [15:0] model[$];

  sync_fifo #(.T(logic [15:0]), .DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      checks++;
      if (valid !== (model.size() > 0) || full !== (model.size() == 4)) begin
        failures++;
        $display("flag mismatch at %0d: valid=%0d full=%0d size=%0d", cyc, valid, full, model.size());
      end
      if (valid && model.size() > 0) begin
        checks++;
        if (dout !== model[0]) begin failures++; $display("data %h expected %h", dout, model[0]); end
      end
      push = ($urandom % 100) < (cyc < 1500 ? 70 : 30);
      pop  = ($urandom % 100) < (cyc < 1500 ? 30 : 70);
      din  = 16'($urandom);
      begin
        int sz;
        sz = model.size();
        @(posedge clk);
        #1;
        if (pop && sz > 0) void'(model.pop_front());
        if (push && sz < 4) model.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
