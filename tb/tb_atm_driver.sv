// tb_atm_driver: cells in, bytes out. Each cell must leave as 53 bytes in the
// order header (with HEC), {SI, EOF pointer}, {frame counter, cell counter},
// 46 payload bytes, with start-of-cell on the first. Queued cells must follow
// each other without a gap (53 enabled cycles apart), and a stalled
// interface (atm_en low) must hold the byte on the line.
module tb_atm_driver;
  import fap_pkg::*;
  import tb_fc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cell_valid, cell_ready, atm_en, atm_soc, atm_valid;
  cell_t cell_i;
  logic [7:0] atm_data;
  logic [7:0] cfg_vpi = 8'h12;
  logic [15:0] cfg_vci = 16'h0345;
  int checks = 0, failures = 0;
  cell_t sent[$];
  logic [7:0] got[$];
  int cells_seen = 0, last_soc = -1, en_cycles = 0;
  logic stall_mode = 0;

  atm_driver dut (.*);
  always #5 clk = ~clk;

  function automatic void chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  function automatic void check_cell(input cell_t c, input logic [7:0] b[$]);
    logic [31:0] h;
    h = {4'h0, cfg_vpi, cfg_vci, 2'b00, c.pt2, 1'b0};
    chk(b.size() === 53, $sformatf("cell length %0d", b.size()));
    if (b.size() != 53) return;
    chk({b[0], b[1], b[2], b[3]} === h, "header bytes");
    chk(b[4] === ref_hec(h), "HEC byte");
    chk(b[5] === {c.fap.si, c.fap.eof_ptr}, "FAP byte 1");
    chk(b[6] === {c.fap.frame_cnt, c.fap.cell_cnt}, "FAP byte 2");
    for (int i = 0; i < 23; i++)
      chk({b[7 + 2 * i], b[8 + 2 * i]} === c.payload[i], $sformatf("payload word %0d", i));
  endfunction

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (atm_en) en_cycles++;
    if (atm_en && atm_valid) begin
      if (atm_soc) begin
        if (got.size() > 0) begin
          check_cell(sent.pop_front(), got);
          got.delete();
        end
        if (last_soc >= 0 && !stall_mode) chk(en_cycles - last_soc === 53, $sformatf("cell spacing %0d", en_cycles - last_soc));
        last_soc = en_cycles;
        cells_seen++;
      end
      got.push_back(atm_data);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_valid = 0; cell_i = '0; atm_en = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      cell_t c;
      c = '0;
      c.pt2 = 1'($urandom); c.fap = 16'($urandom);
      for (int i = 0; i < 23; i++) c.payload[i] = 16'($urandom);
      if (n == 5) begin
        stall_mode = 1;
        fork
          repeat (400) begin @(negedge clk); atm_en = 1'($urandom); end
        join_none
      end
      @(negedge clk);
      cell_valid = 1; cell_i = c;
      do @(posedge clk); while (!cell_ready);
      sent.push_back(c);
      @(negedge clk); cell_valid = 0;
    end
    repeat (500) @(negedge clk);
    atm_en = 1;
    repeat (100) @(negedge clk);
    if (got.size() > 0) begin check_cell(sent.pop_front(), got); got.delete(); end
    chk(cells_seen === 8 && sent.size() === 0, $sformatf("cells seen %0d", cells_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a byte must stay on the line while the interface stalls
  logic [7:0] held; logic was_stalled;
  always @(posedge clk) begin
    if (rst_n && was_stalled && atm_valid) begin
      checks++;
      if (atm_data != held) begin failures++; $display("FAIL: byte changed during stall"); end
    end
    was_stalled <= atm_valid && !atm_en;
    held <= atm_data;
  end
endmodule
