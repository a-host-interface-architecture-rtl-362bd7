// atm_pkg: types, constants and CRC functions shared by the segmenter and the
// reassembler of the ATM host interface.
//
// Cell layout (53 bytes, sent most significant byte first):
//   byte 0      GFC (4) | VPI[7:4]          GFC and VPI are sent as zero
//   byte 1      VPI[3:0] | VCI[15:12]
//   byte 2      VCI[11:4]
//   byte 3      VCI[3:0] | PT (3) | CLP
//   byte 4      HEC = CRC-8 (x^8+x^2+x+1) of bytes 0..3, XOR coset 0x55
//   bytes 5..52 48-byte cell body.  When VCI[15] is set the body is an AAL4
//               SAR-PDU:  ST(2) SN(4) MID(10) | 44 payload bytes | LI(6) CRC10(10)
// The VCI-MSB convention for AAL4 and the unused VPI follow the document; the
// HEC coset and the byte ordering are the standard ATM ones (design choice).
package atm_pkg;

  localparam int CELL_BYTES   = 53;
  localparam int HDR_BYTES    = 5;
  localparam int BODY_BYTES   = 48;
  localparam int BODY_WORDS   = 12;   // cell body in 32-bit words
  localparam int AAL4_PAYLOAD = 44;   // user bytes per AAL4 cell
  localparam logic [7:0] HEC_COSET = 8'h55;
  localparam logic [7:0] CRC8_POLY = 8'h07;     // x^8 + x^2 + x + 1
  localparam logic [9:0] CRC10_POLY = 10'h233;  // x^10 + x^9 + x^5 + x^4 + x + 1

  // List reference: {datagram, CAM index}; 256 VC lists and 256 datagram lists.
  localparam int LIST_W = 9;
  // Reassembly buffer slot (= linked-list node) number: 32K words / 16 words.
  localparam int NODE_W = 11;
  localparam logic [15:0] NULL_PTR = 16'hFFFF;

  // AAL4 segment type
  typedef enum logic [1:0] {
    ST_COM = 2'b00,
    ST_EOM = 2'b01,
    ST_BOM = 2'b10,
    ST_SSM = 2'b11
  } seg_type_e;

  // Cell manager -> CAM lookup controller
  typedef struct packed {
    logic        ok;     // HEC (and CRC-10 for AAL4) correct
    logic        aal4;   // VCI[15] set
    logic [15:0] vci;
    logic [9:0]  mid;
    seg_type_e   st;
    logic [5:0]  li;
  } cell_info_t;

  // CAM lookup controller -> linked list manager
  typedef struct packed {
    logic              drop;   // no list for this cell: flush its body
    logic [LIST_W-1:0] list;
    logic              eom;    // cell ends an AAL4 message (EOM or SSM)
  } list_req_t;

  // Linked list manager -> reassembly buffer controller
  typedef struct packed {
    logic              drop;   // flush the body from the FIFO
    logic [NODE_W-1:0] slot;   // reassembly buffer slot to write
  } buf_cmd_t;

  // One byte through the generator form of the CRC-8 divider.
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] d);
    logic [7:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (c[7] ^ d[i]) c = {c[6:0], 1'b0} ^ CRC8_POLY;
      else             c = {c[6:0], 1'b0};
    end
    return c;
  endfunction

  // The n most significant bits of d through the CRC-10 divider (n = 6 or 8).
  function automatic logic [9:0] crc10_bits(input logic [9:0] crc, input logic [7:0] d,
                                            input logic six_only);
    logic [9:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (!(six_only && i < 2)) begin
        if (c[9] ^ d[i]) c = {c[8:0], 1'b0} ^ CRC10_POLY;
        else             c = {c[8:0], 1'b0};
      end
    end
    return c;
  endfunction

endpackage
