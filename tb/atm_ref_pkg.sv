// atm_ref_pkg: reference models for the testbenches.  The CRCs are computed by
// plain polynomial long division over the whole message, independently of the
// byte-serial circuits, and cells are assembled field by field.
package atm_ref_pkg;

  typedef logic [7:0] cell_t [53];

  // HEC: remainder of hdr(x) * x^8 divided by x^8 + x^2 + x + 1, XOR 0x55
  function automatic logic [7:0] ref_hec(input logic [31:0] hdr);
    logic [39:0] r;
    r = {hdr, 8'h00};
    for (int i = 39; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  // CRC-10 of the first 374 bits of a 48-byte SAR-PDU
  function automatic logic [9:0] ref_crc10(input logic [7:0] body [48]);
    logic [383:0] r;
    for (int i = 0; i < 48; i++) r[383 - 8*i -: 8] = body[i];
    r[9:0] = '0;
    for (int i = 383; i >= 10; i--)
      if (r[i]) r[i -: 11] = r[i -: 11] ^ 11'h633;
    return r[9:0];
  endfunction

  // Build a cell.  For AAL4, payload[0..43] are the user bytes (unused ones
  // must be zero) and li the count; otherwise payload[0..47] is the body.
  function automatic cell_t build_cell(input logic [15:0] vci, input logic [2:0] pt,
                                       input logic clp, input logic [1:0] st,
                                       input logic [3:0] sn, input logic [9:0] mid,
                                       input logic [5:0] li, input logic [7:0] payload [48]);
    cell_t c;
    logic [7:0] body [48];
    logic [9:0] crc;
    c[0] = 8'h00;
    c[1] = {4'h0, vci[15:12]};
    c[2] = vci[11:4];
    c[3] = {vci[3:0], pt, clp};
    c[4] = ref_hec({c[0], c[1], c[2], c[3]});
    if (vci[15]) begin
      body[0] = {st, sn, mid[9:8]};
      body[1] = mid[7:0];
      for (int i = 0; i < 44; i++) body[2+i] = payload[i];
      body[46] = {li, 2'b00};
      body[47] = 8'h00;
      crc = ref_crc10(body);
      body[46][1:0] = crc[9:8];
      body[47] = crc[7:0];
    end else begin
      for (int i = 0; i < 48; i++) body[i] = payload[i];
    end
    for (int i = 0; i < 48; i++) c[5+i] = body[i];
    return c;
  endfunction

endpackage
