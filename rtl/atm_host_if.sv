// atm_host_if: the complete ATM host interface, a segmenter card and a
// reassembler card for a workstation I/O bus, connecting it to a SONET OC-3c
// ATM link at 155 Mbit/s.  Per-cell work (CRC generation and checking,
// segmentation, CAM lookup, linked-list reassembly) is done in hardware; the
// host issues commands and reads status through I/O registers and the cards
// move data to and from host memory as streaming bus masters.
//
// The two cards are independent and share only the clock (50 ns) and reset.
// The SONET framer chip sits outside: tx_* carries segmented cells to it and
// rx_* brings received cells from it, one byte per clock with a start-of-cell
// mark.  Connecting tx_* to rx_* gives the loop-back set-up used to test the
// cards.  Each card has its own I/O register port (seg_io_*, rsm_io_*) and its
// own bus master port (seg_m_*, rsm_m_*); see segmenter.sv and reassembler.sv
// for the register maps.  Sizes default to the document's: 256-entry CAMs,
// 32K x 16 list SRAM, 32K x 32 reassembly buffer.
//
// Constant outputs: the segmenter only reads host memory, so seg_m_we is 0
// and seg_m_wdata is 0; the reassembler only writes it, so rsm_m_we is 1.
// They are kept so that both master ports have the same shape as the bus.
// What follows the document: the split into two cards, the per-cell work in
// hardware, the sizes above and the loop-back test.  The simplified bus
// handshake that stands in for the Micro Channel, the register maps and the
// byte-wide framer ports are this design's own choices.
module atm_host_if #(
  parameter int SEG_BUF_WORDS = 64,
  parameter int CAM_ENTRIES   = 256,
  parameter int RAM_DEPTH     = 32768,
  parameter int BUF_DEPTH     = 32768,
  parameter int FIFO_DEPTH    = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  // segmenter card: I/O registers
  input  logic        seg_io_req,
  input  logic        seg_io_we,
  input  logic [3:0]  seg_io_addr,
  input  logic [31:0] seg_io_wdata,
  output logic        seg_io_ack,
  output logic [31:0] seg_io_rdata,
  output logic        seg_irq,
  // segmenter card: bus master
  output logic        seg_m_req,
  output logic        seg_m_we,
  output logic [31:0] seg_m_addr,
  output logic [31:0] seg_m_wdata,
  input  logic        seg_m_ready,
  input  logic [31:0] seg_m_rdata,
  // to the SONET framer
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_soc,
  input  logic        tx_ready,
  // reassembler card: I/O registers
  input  logic        rsm_io_req,
  input  logic        rsm_io_we,
  input  logic [3:0]  rsm_io_addr,
  input  logic [31:0] rsm_io_wdata,
  output logic        rsm_io_ack,
  output logic [31:0] rsm_io_rdata,
  output logic        rsm_irq,
  // reassembler card: bus master
  output logic        rsm_m_req,
  output logic        rsm_m_we,
  output logic [31:0] rsm_m_addr,
  output logic [31:0] rsm_m_wdata,
  input  logic        rsm_m_ready,
  input  logic [31:0] rsm_m_rdata,
  // from the SONET framer
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_soc
);
  segmenter #(.BUF_WORDS(SEG_BUF_WORDS)) u_seg (
    .clk, .rst_n,
    .io_req(seg_io_req), .io_we(seg_io_we), .io_addr(seg_io_addr), .io_wdata(seg_io_wdata),
    .io_ack(seg_io_ack), .io_rdata(seg_io_rdata),
    .m_req(seg_m_req), .m_we(seg_m_we), .m_addr(seg_m_addr), .m_wdata(seg_m_wdata),
    .m_ready(seg_m_ready), .m_rdata(seg_m_rdata),
    .tx_data, .tx_valid, .tx_soc, .tx_ready, .irq(seg_irq)
  );

  reassembler #(.CAM_ENTRIES(CAM_ENTRIES), .RAM_DEPTH(RAM_DEPTH), .BUF_DEPTH(BUF_DEPTH),
                .FIFO_DEPTH(FIFO_DEPTH)) u_rsm (
    .clk, .rst_n,
    .io_req(rsm_io_req), .io_we(rsm_io_we), .io_addr(rsm_io_addr), .io_wdata(rsm_io_wdata),
    .io_ack(rsm_io_ack), .io_rdata(rsm_io_rdata),
    .m_req(rsm_m_req), .m_we(rsm_m_we), .m_addr(rsm_m_addr), .m_wdata(rsm_m_wdata),
    .m_ready(rsm_m_ready), .m_rdata(rsm_m_rdata),
    .rx_data, .rx_valid, .rx_soc, .irq(rsm_irq)
  );
endmodule
