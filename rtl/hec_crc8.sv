// hec_crc8: byte-serial CRC-8 (x^8 + x^2 + x + 1) for the ATM header error
// check.  One byte enters per clock while 'en' is high; 'clear' starts a new
// header.  After the four header bytes, 'crc' holds the remainder; the HEC
// byte sent on the line is crc ^ 0x55.  The byte-per-clock rate is the
// document's; the register form (no preset, generator form) is a design choice.
module hec_crc8 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,   // reset the remainder to zero (wins over en)
  input  logic       en,      // feed din
  input  logic [7:0] din,
  output logic [7:0] crc
);
  import atm_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= '0;
    else if (clear) crc <= '0;
    else if (en)    crc <= crc8_byte(crc, din);
  end
endmodule
