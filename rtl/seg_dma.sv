// seg_dma: the segmenter's streaming bus-master read engine.  After 'start'
// it reads 'nwords' consecutive 32-bit words from host memory beginning at
// byte address 'src_addr' and pushes each into the segmenter's data buffer.
//
// Bus: a simplified word-wide master port standing in for the Micro Channel
// streaming master.  A word moves in a clock where m_req and m_ready are both
// high; for reads m_rdata is valid in that clock.  The slave sets the pace
// (the Micro Channel streams one word per 100 ns once a transfer is set up).
// The engine requests only while the data buffer has room, so a full buffer
// stalls the bus transfer.  The port form is this design's own.
module seg_dma (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] src_addr,
  input  logic [31:0] nwords,
  output logic        busy,
  // bus master
  output logic        m_req,
  output logic        m_we,
  output logic [31:0] m_addr,
  output logic [31:0] m_wdata,
  input  logic        m_ready,
  input  logic [31:0] m_rdata,
  // data buffer
  input  logic        buf_full,
  output logic        buf_push,
  output logic [31:0] buf_din
);
  logic [31:0] remaining;

  assign busy     = (remaining != 0);
  assign m_req    = busy && !buf_full;
  assign m_we     = 1'b0;
  assign m_wdata  = '0;
  assign buf_push = m_req && m_ready;
  assign buf_din  = m_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      m_addr    <= '0;
    end else if (start) begin
      remaining <= nwords;
      m_addr    <= {src_addr[31:2], 2'b00};
    end else if (m_req && m_ready) begin
      remaining <= remaining - 1;
      m_addr    <= m_addr + 32'd4;
    end
  end

  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (m_req && !m_ready && !start) |=> $stable(m_addr));
endmodule
