// tb_atm_receiver: byte streams in, cell records out. Good cells must come
// out with PT2, FAP header and payload intact; a cell with a corrupted HEC and
// a cell of another VCI must be dropped and reported; a cell interrupted by a
// new start-of-cell must be thrown away; a cell arriving while the previous
// one waits must be reported as an overrun.
module tb_atm_receiver;
  import fap_pkg::*;
  import tb_fc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] atm_data; logic atm_soc, atm_valid;
  logic cell_valid, cell_ready, hec_err, vc_drop, overrun;
  cell_t cell_o;
  logic [7:0] cfg_vpi = 8'h21;
  logic [15:0] cfg_vci = 16'h0777;
  int checks = 0, failures = 0;
  int n_hec = 0, n_vc = 0, n_ovr = 0;
  cell_t expq[$];

  atm_receiver dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input cell_t c, input logic [15:0] vci, input bit bad_hec, input int cut = 53);
    logic [31:0] h;
    logic [7:0] b[53];
    h = {4'h0, cfg_vpi, vci, 2'b00, c.pt2, 1'b0};
    {b[0], b[1], b[2], b[3]} = h;
    b[4] = ref_hec(h) ^ (bad_hec ? 8'h04 : 8'h00);
    {b[5], b[6]} = c.fap;
    for (int i = 0; i < 23; i++) {b[7 + 2 * i], b[8 + 2 * i]} = c.payload[i];
    for (int i = 0; i < cut; i++) begin
      @(negedge clk);
      atm_valid = 1; atm_soc = (i == 0); atm_data = b[i];
      if ($urandom % 4 == 0) begin @(negedge clk); atm_valid = 0; end
    end
    @(negedge clk); atm_valid = 0; atm_soc = 0;
  endtask

  function automatic cell_t rnd_cell();
    cell_t c;
    c.pt2 = 1'($urandom); c.fap = 16'($urandom);
    for (int i = 0; i < 23; i++) c.payload[i] = 16'($urandom);
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (hec_err) n_hec++;
    if (vc_drop) n_vc++;
    if (overrun) n_ovr++;
    if (cell_valid && cell_ready) begin
      chk(expq.size() > 0 && cell_o === expq[0], "received cell matches");
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_t c;
    atm_valid = 0; atm_soc = 0; atm_data = 0; cell_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 10; i++) begin c = rnd_cell(); expq.push_back(c); send(c, cfg_vci, 0); end
    c = rnd_cell(); send(c, cfg_vci, 1);          // bad HEC
    c = rnd_cell(); send(c, 16'h0778, 0);         // foreign VCI
    c = rnd_cell(); send(c, cfg_vci, 0, 30);      // cut short by the next cell
    c = rnd_cell(); expq.push_back(c); send(c, cfg_vci, 0);
    repeat (5) @(negedge clk);
    chk(expq.size() === 0, $sformatf("%0d cells missing", expq.size()));
    chk(n_hec === 1, $sformatf("hec errors %0d", n_hec));
    chk(n_vc === 1, $sformatf("vc drops %0d", n_vc));
    // overrun: reader stalls for two cells
    cell_ready = 0;
    c = rnd_cell(); expq.push_back(c); send(c, cfg_vci, 0);
    c = rnd_cell(); send(c, cfg_vci, 0);
    chk(n_ovr === 1, $sformatf("overruns %0d", n_ovr));
    cell_ready = 1;
    repeat (3) @(negedge clk);
    chk(expq.size() === 0, "stalled cell delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
