// aal_crc10: byte-serial CRC-10 (x^10 + x^9 + x^5 + x^4 + x + 1) over an AAL4
// SAR-PDU.  One byte enters per clock while 'en' is high; with 'six_only' only
// the top six bits of din are used, which lets the transmitter feed the LI
// field and read the finished CRC from 'crc_next' in the same clock.
// The receiver feeds all 48 body bytes; the remainder is zero for a good cell.
// The CRC itself and the byte-per-clock rate follow the document; the port
// arrangement is a design choice.
module aal_crc10 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic       six_only,
  input  logic [7:0] din,
  output logic [9:0] crc,       // registered remainder
  output logic [9:0] crc_next   // remainder after din (combinational)
);
  import atm_pkg::*;

  assign crc_next = crc10_bits(crc, din, six_only);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= '0;
    else if (clear) crc <= '0;
    else if (en)    crc <= crc_next;
  end
endmodule
