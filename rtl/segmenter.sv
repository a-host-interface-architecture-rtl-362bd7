// segmenter: the transmit card.  The host loads the source address, the block
// length in bytes, the header fields (VCI, PT, CLP) and, for AAL4, the MID
// through I/O register writes, then writes GO.  The streaming read engine
// fetches the block from host memory into the data buffer while the
// segmentation controller cuts it into cells, as soon as a cell's worth has
// arrived, and hands them byte by byte to the SONET framer.
//
// I/O registers (word index on io_addr; io_req is held until io_ack, which
// comes one clock later with io_rdata):
//   0 SRC_ADDR   1 LENGTH   2 HEADER {CLP[19], PT[18:16], VCI[15:0]}
//   3 MID[9:0]   4 CONTROL  write bit0 = GO; read {done[1], busy[0]}
//   5 CELLS_SENT (read only, running count)
// The register set follows the document's list of what the host loads; the
// encoding, the 64-word data buffer and the handshake are design choices.
module segmenter #(
  parameter int BUF_WORDS = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // host I/O register port
  input  logic        io_req,
  input  logic        io_we,
  input  logic [3:0]  io_addr,
  input  logic [31:0] io_wdata,
  output logic        io_ack,
  output logic [31:0] io_rdata,
  // bus master
  output logic        m_req,
  output logic        m_we,
  output logic [31:0] m_addr,
  output logic [31:0] m_wdata,
  input  logic        m_ready,
  input  logic [31:0] m_rdata,
  // framer
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_soc,
  input  logic        tx_ready,
  output logic        irq        // block sent (level, cleared by GO)
);
  logic [31:0] src_addr, length;
  logic [15:0] vci;
  logic [2:0]  pt;
  logic        clp;
  logic [9:0]  mid;
  logic        go, done_flag;
  logic        ctrl_busy, ctrl_done, dma_busy;
  logic [15:0] cells_sent;

  logic        io_fire;
  assign io_fire = io_req && !io_ack;
  assign go      = io_fire && io_we && io_addr == 4'd4 && io_wdata[0] && !ctrl_busy;
  assign irq     = done_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_addr <= '0; length <= '0; vci <= '0; pt <= '0; clp <= 1'b0; mid <= '0;
      io_ack <= 1'b0; io_rdata <= '0; done_flag <= 1'b0;
    end else begin
      io_ack <= io_fire;
      if (go)        done_flag <= 1'b0;
      if (ctrl_done) done_flag <= 1'b1;
      if (io_fire && io_we) begin
        unique case (io_addr)
          4'd0: src_addr <= io_wdata;
          4'd1: length   <= io_wdata;
          4'd2: {clp, pt, vci} <= io_wdata[19:0];
          4'd3: mid      <= io_wdata[9:0];
          default: ;
        endcase
      end
      if (io_fire && !io_we) begin
        unique case (io_addr)
          4'd0: io_rdata <= src_addr;
          4'd1: io_rdata <= length;
          4'd2: io_rdata <= {12'h0, clp, pt, vci};
          4'd3: io_rdata <= {22'h0, mid};
          4'd4: io_rdata <= {30'h0, done_flag, ctrl_busy || dma_busy};
          4'd5: io_rdata <= {16'h0, cells_sent};
          default: io_rdata <= '0;
        endcase
      end
    end
  end

  localparam int CW = $clog2(BUF_WORDS) + 1;
  logic          buf_push, buf_pop, buf_full, buf_empty;
  logic [31:0]   buf_din, buf_dout;
  logic [CW-1:0] buf_count;

  seg_dma u_dma (
    .clk, .rst_n, .start(go), .src_addr(src_addr), .nwords((length + 32'd3) >> 2),
    .busy(dma_busy), .m_req, .m_we, .m_addr, .m_wdata, .m_ready, .m_rdata,
    .buf_full, .buf_push, .buf_din
  );

  sync_fifo #(.WIDTH(32), .DEPTH(BUF_WORDS)) u_buf (
    .clk, .rst_n, .push(buf_push), .din(buf_din), .pop(buf_pop), .dout(buf_dout),
    .empty(buf_empty), .full(buf_full), .count(buf_count)
  );

  seg_ctrl u_ctrl (
    .clk, .rst_n, .start(go), .length(length), .vci(vci), .pt(pt), .clp(clp), .mid(mid),
    .busy(ctrl_busy), .done(ctrl_done), .cells_sent(cells_sent),
    .buf_dout(buf_dout), .buf_count(7'(buf_count)), .buf_pop(buf_pop),
    .tx_data, .tx_valid, .tx_soc, .tx_ready
  );

  a_ack_follows_req: assert property (@(posedge clk) disable iff (!rst_n)
    io_ack |-> $past(io_req));
endmodule
