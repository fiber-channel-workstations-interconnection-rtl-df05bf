// atm_hdr_gen: builds the 5-byte ATM cell header of the IWU's connection (the
// "RAM HEC" block of SAR-1).
//
// The header uses the UNI layout: GFC (4 bits, zero), VPI (8), VCI (16),
// Payload Type (3) and CLP (1), followed by the HEC byte. The payload type is
// 0,0,PT2: a user data cell, no congestion, with the PT2 bit the FAP uses to
// mark the last cell of a frame. CLP is 0. The HEC is the CRC-8 of the first
// four bytes (x^8 + x^2 + x + 1) XOR 0x55. VPI/VCI come from registers the
// control unit loads during connection set-up. Purely combinational; hdr[39:32]
// is the first byte on the line. The header layout and the HEC are the ATM
// standard's; the document names the block but does not describe it.
module atm_hdr_gen
  import fap_pkg::*;
(
  input  logic [7:0]  vpi,
  input  logic [15:0] vci,
  input  logic        pt2,
  output logic [39:0] hdr
);
  logic [31:0] h4;
  assign h4  = {4'h0, vpi, vci, 2'b00, pt2, 1'b0};
  assign hdr = {h4, atm_hec(h4)};
endmodule
