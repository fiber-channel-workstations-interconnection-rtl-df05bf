// tb_atm_hdr_gen: header field placement and HEC. The HEC is checked against
// the all-zero header (whose HEC is 0x55 by definition of the coset) and
// against a polynomial long division done in the testbench for random
// VPI/VCI/PT2 values.
module tb_atm_hdr_gen;
  import fap_pkg::*;
  import tb_fc_pkg::*;
  logic [7:0] vpi; logic [15:0] vci; logic pt2; logic [39:0] hdr;
  int checks = 0, failures = 0;

  atm_hdr_gen dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vpi = 0; vci = 0; pt2 = 0; #1;
    chk(hdr === 40'h00_00_00_00_55, $sformatf("zero header %h", hdr));
    vpi = 8'hAB; vci = 16'h1234; pt2 = 1; #1;
    chk(hdr[39:8] === 32'h0AB1_2342, $sformatf("field placement %h", hdr[39:8]));
    chk(hdr[7:0] === ref_hec(32'h0AB1_2342), "HEC of AB/1234/PT2");
    for (int i = 0; i < 200; i++) begin
      vpi = 8'($urandom); vci = 16'($urandom); pt2 = 1'($urandom); #1;
      chk(hdr[39:8] === {4'h0, vpi, vci, 2'b00, pt2, 1'b0}, "fields");
      chk(hdr[7:0] === ref_hec(hdr[39:8]), $sformatf("HEC %h for %h", hdr[7:0], hdr[39:8]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
