// tb_fap_pkg: checks the functions of the shared package.
//  - atm_hec against a polynomial long division (tb_fc_pkg::ref_hec) for a
//    known header (idle cell header 00000001 has HEC 0x52, ITU-T I.432) and
//    5000 random headers;
//  - os_classify / seq_classify on every ordered set the unit uses: each SOF
//    and EOF, Idle, R_RDY, NOS, OLS, LR, LRR, and on random non-K28.5 words;
//  - is_sof_char on all 256 byte values (exactly the eight SOF codes).
// No clock is needed: the functions are combinational. Ends with TB_RESULT.
module tb_fap_pkg;
  import fap_pkg::*;
  import tb_fc_pkg::*;

  int checks = 0, failures = 0;

  function automatic void chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endfunction

  localparam logic [7:0] SOFS [8] = '{SOF_C1, SOF_I1, SOF_N1, SOF_I2, SOF_N2, SOF_I3, SOF_N3, SOF_F};
  localparam logic [7:0] EOFS [4] = '{EOF_T, EOF_DT, EOF_A, EOF_N};

  initial begin
    logic [31:0] h;
    int n_sof;
    chk(atm_hec(32'h0000_0001) === 8'h52, "HEC of the idle-cell header");
    for (int i = 0; i < 5000; i++) begin
      h = $urandom;
      chk(atm_hec(h) === ref_hec(h), $sformatf("HEC of %h", h));
    end

    foreach (SOFS[i]) chk(os_classify(16'hBCB5, {SOFS[i], SOFS[i]}) === OS_SOF, $sformatf("SOF %h", SOFS[i]));
    foreach (EOFS[i]) begin
      chk(os_classify(16'hBC95, {EOFS[i], EOFS[i]}) === OS_EOF, $sformatf("EOF %h (95)", EOFS[i]));
      chk(os_classify(16'hBCB5, {EOFS[i], EOFS[i]}) === OS_EOF, $sformatf("EOF %h (B5)", EOFS[i]));
    end
    chk(os_classify(W0_IDLE, W1_IDLE) === OS_IDLE, "Idle");
    chk(os_classify(W0_RRDY, W1_RRDY) === OS_RRDY, "R_RDY");
    chk(seq_classify(W0_NOS, W1_NOS) === OS_NOS, "NOS");
    chk(seq_classify(W0_OLS, W1_OLS) === OS_OLS, "OLS");
    chk(seq_classify(W0_LR,  W1_LR)  === OS_LR,  "LR");
    chk(seq_classify(W0_LRR, W1_LRR) === OS_LRR, "LRR");
    chk(seq_classify(W0_IDLE, W1_IDLE) === OS_IDLE, "Idle through seq_classify");
    chk(os_classify(W0_EOFA, W1_EOFA) === OS_EOF, "EOFa");
    for (int i = 0; i < 1000; i++) begin
      logic [15:0] w0;
      w0 = 16'($urandom);
      if (w0[15:8] == K28_5) w0[15:8] = 8'h3C;
      chk(seq_classify(w0, 16'($urandom)) === OS_OTHER, $sformatf("data word %h", w0));
    end

    n_sof = 0;
    for (int c = 0; c < 256; c++) if (is_sof_char(8'(c))) n_sof++;
    chk(n_sof === 8, $sformatf("%0d SOF codes", n_sof));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
