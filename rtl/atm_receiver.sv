// atm_receiver: the Receiver block of SAR-2; it collects cells from the
// parallel ATM interface.
//
// Bytes arrive one per cycle with atm_valid; atm_soc marks the first header
// byte and restarts collection (a short cell is thrown away). When the 53rd
// byte arrives the cell is checked: a header whose HEC does not match is
// dropped (hec_err pulses; no single-bit correction is attempted), as is a
// cell of another VPI/VCI (vc_drop pulses). A good cell is presented to the
// reassembler as a cell record on a ready/valid pair; if the previous cell has
// not been taken yet the new one is lost (overrun pulses). With 53 cycles per
// cell the reassembler has ample time, so a single output register is
// enough. Dropping rather than correcting, and the single register, are this
// design's choices.
module atm_receiver
  import fap_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  cfg_vpi,
  input  logic [15:0] cfg_vci,
  input  logic [7:0]  atm_data,
  input  logic        atm_soc,
  input  logic        atm_valid,
  output logic        cell_valid,
  input  logic        cell_ready,
  output cell_t       cell_o,
  output logic        hec_err,
  output logic        vc_drop,
  output logic        overrun
);
  logic [CELL_BYTES-2:0][7:0] byt;     // the last 52 bytes, oldest in the top byte
  logic [5:0]  cnt;
  logic        collecting;
  logic [CELL_BYTES*8-1:0] whole;
  logic [31:0] h4;
  logic        done, hec_ok, vc_ok;

  assign whole  = {byt, atm_data};
  assign h4     = whole[CELL_BYTES*8-1 -: 32];
  assign hec_ok = (whole[CELL_BYTES*8-33 -: 8] == atm_hec(h4));
  assign vc_ok  = (h4[27:20] == cfg_vpi) && (h4[19:4] == cfg_vci);
  assign done   = atm_valid && !atm_soc && collecting && (cnt == 6'(CELL_BYTES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byt <= '0; cnt <= '0; collecting <= 1'b0;
      cell_valid <= 1'b0; cell_o <= '0;
      hec_err <= 1'b0; vc_drop <= 1'b0; overrun <= 1'b0;
    end else begin
      hec_err <= 1'b0; vc_drop <= 1'b0; overrun <= 1'b0;
      if (cell_valid && cell_ready) cell_valid <= 1'b0;
      if (atm_valid) begin
        byt <= {byt[CELL_BYTES-3:0], atm_data};
        if (atm_soc) begin
          collecting <= 1'b1;
          cnt        <= 6'd1;
        end else if (collecting) begin
          cnt <= cnt + 6'd1;
        end
        if (done) begin
          collecting <= 1'b0;
          if (!hec_ok)                          hec_err <= 1'b1;
          else if (!vc_ok)                      vc_drop <= 1'b1;
          else if (cell_valid && !cell_ready)   overrun <= 1'b1;
          else begin
            cell_valid     <= 1'b1;
            cell_o.pt2     <= h4[1];
            cell_o.fap     <= whole[48*8 - 1 -: 16];
            cell_o.payload <= whole[46*8 - 1 : 0];
          end
        end
      end
    end
  end
endmodule
