// atm_driver: the Driver block of SAR-1; it puts cells on the parallel ATM
// interface.
//
// Each cell leaves as 53 bytes, one per cycle in which the physical layer
// raises atm_en: the 5 header bytes (from atm_hdr_gen, with the HEC), the two
// FAP bytes ({SI, EOF pointer} then {frame counter, cell counter}) and the 46
// payload bytes, upper byte of each word first. atm_soc marks the first header
// byte and atm_valid is high while a cell is being sent. The next cell is
// taken (cell_ready) in the same cycle as the last byte of the current one,
// so back-to-back cells leave without a gap. The 8-bit interface with a
// start-of-cell flag is this design's choice: the document only speaks of a
// parallel ATM interface.
module atm_driver
  import fap_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  cfg_vpi,
  input  logic [15:0] cfg_vci,
  input  logic        cell_valid,
  output logic        cell_ready,
  input  cell_t       cell_i,
  input  logic        atm_en,
  output logic [7:0]  atm_data,
  output logic        atm_soc,
  output logic        atm_valid
);
  cell_t       cur;
  logic        busy;
  logic [5:0]  cnt;
  logic [39:0] hdr;
  logic [CELL_BYTES*8-1:0] bytes;

  atm_hdr_gen u_hdr (.vpi(cfg_vpi), .vci(cfg_vci), .pt2(cur.pt2), .hdr(hdr));

  assign bytes      = {hdr, cur.fap, cur.payload};
  assign atm_valid  = busy;
  assign atm_soc    = busy && (cnt == 6'd0);
  assign atm_data   = bytes[(CELL_BYTES - 1 - int'(cnt)) * 8 +: 8];
  assign cell_ready = !busy || (atm_en && cnt == 6'(CELL_BYTES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      cur  <= '0;
    end else begin
      if (busy && atm_en) cnt <= (cnt == 6'(CELL_BYTES - 1)) ? 6'd0 : cnt + 6'd1;
      if (cell_ready) begin
        busy <= cell_valid;
        if (cell_valid) cur <= cell_i;
      end
    end
  end
endmodule
