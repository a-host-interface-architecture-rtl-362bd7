// reassembler: the receive card.  Cells from the SONET framer pass a
// four-stage control pipeline, all stages working at once:
//   cell_manager -> clc (CAM lookup) -> llm (linked lists) -> dprbc (buffer)
// Only control tokens travel down the pipeline; the 48-byte cell body waits
// in the cell body FIFO until the buffer controller either writes it into the
// reassembly buffer slot chosen by the linked list manager or flushes it.
// Queues of a few tokens sit between cell manager and CLC and between LLM and
// buffer controller.  The host reads reassembled data with rsm_xfer, which
// unlinks nodes from a list and streams their slots to host memory.
//
// I/O registers (word index on io_addr; io_req is held until io_ack; reads
// and writes that reach the CAMs or the list SRAM take a few clocks):
//   0 DEST_ADDR   1 LIST_REF {dg[8], index[7:0]}   2 CELL_COUNT
//   3 CONTROL     write bit0 = GO; read {done[1], busy[0]}
//   4 XFERRED     cells moved by the last request
//   5 CAM_SEL     {dg[8], index[7:0]}
//   6 CAM_DATA    read {valid[31], key[25:0]} of CAM_SEL; write deletes the
//                 entry and its list
//   7 LLM_ADDR    list SRAM address, incremented after each LLM_DATA access
//   8 LLM_DATA    read/write list SRAM word
//   9 {hec_errors, cells_in}        10 {overflow, crc_errors}
//  11 {no_buffer_drops, cam_full}    12 {bodies_flushed, bodies_stored}
// The units and their order follow the document; the register map, queue
// depths and handshakes are design choices.
module reassembler #(
  parameter int CAM_ENTRIES = 256,
  parameter int RAM_DEPTH   = 32768,   // list SRAM words
  parameter int BUF_DEPTH   = 32768,   // reassembly buffer words
  parameter int FIFO_DEPTH  = 512      // cell body FIFO bytes
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
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_soc,
  output logic        irq        // read request finished (cleared by GO)
);
  import atm_pkg::*;
  localparam int FCW = $clog2(FIFO_DEPTH) + 1;

  // ---------------- cell manager and cell body FIFO
  logic            body_push, body_pop, body_empty, body_full;
  logic [7:0]      body_din, body_dout;
  logic [FCW-1:0]  body_count;
  logic            tok_valid, tok_ready;
  cell_info_t      tok;
  logic [15:0]     cells_in, hec_errors, crc_errors, overflow;

  cell_manager #(.FIFO_DEPTH(FIFO_DEPTH)) u_cm (
    .clk, .rst_n, .rx_data, .rx_valid, .rx_soc,
    .body_push, .body_din, .body_count,
    .tok_valid, .tok, .tok_ready,
    .cells_in, .hec_errors, .crc_errors, .overflow
  );

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_body (
    .clk, .rst_n, .push(body_push), .din(body_din), .pop(body_pop), .dout(body_dout),
    .empty(body_empty), .full(body_full), .count(body_count)
  );

  // ---------------- CAM lookup controller
  logic              lr_valid, lr_ready;
  list_req_t         lr;
  logic              del_req, del_ack;
  logic [LIST_W-1:0] del_list;
  logic              cam_h_req, cam_h_op, cam_h_ack;
  logic [48:0]       cam_h_rdata;
  logic [15:0]       cam_full_drops;
  logic [LIST_W-1:0] cam_sel;

  clc #(.ENTRIES(CAM_ENTRIES)) u_clc (
    .clk, .rst_n, .tok_valid, .tok, .tok_ready,
    .lr_valid, .lr, .lr_ready,
    .del_req, .del_list, .del_ack,
    .h_req(cam_h_req), .h_op(cam_h_op), .h_sel(cam_sel), .h_ack(cam_h_ack),
    .h_rdata(cam_h_rdata), .cam_full_drops
  );

  // ---------------- linked list manager and buffer command queue
  logic              bc_valid, bc_full, bq_empty, bq_pop;
  buf_cmd_t          bc, bq_dout;
  logic              un_req, un_ack, un_empty, fr_req, fr_ack;
  logic [LIST_W-1:0] un_list;
  logic [NODE_W-1:0] un_node, fr_node;
  logic              llm_h_req, llm_h_we, llm_h_ack;
  logic [14:0]       llm_addr;
  logic [15:0]       llm_h_wdata, llm_h_rdata, no_buffer_drops;

  llm #(.RAM_DEPTH(RAM_DEPTH)) u_llm (
    .clk, .rst_n, .lr_valid, .lr, .lr_ready,
    .bc_valid, .bc, .bc_full,
    .un_req, .un_list, .un_ack, .un_empty, .un_node,
    .fr_req, .fr_node, .fr_ack,
    .del_req, .del_list, .del_ack,
    .h_req(llm_h_req), .h_we(llm_h_we), .h_addr(llm_addr), .h_wdata(llm_h_wdata),
    .h_ack(llm_h_ack), .h_rdata(llm_h_rdata), .no_buffer_drops
  );

  sync_fifo #(.WIDTH($bits(buf_cmd_t)), .DEPTH(4)) u_bq (
    .clk, .rst_n, .push(bc_valid && !bc_full), .din(bc), .pop(bq_pop), .dout(bq_dout),
    .empty(bq_empty), .full(bc_full), .count()
  );

  // ---------------- reassembly buffer controller
  logic              rd_valid, rd_ready, out_valid, out_last, out_ready;
  logic [NODE_W-1:0] rd_slot;
  logic [31:0]       out_data;
  logic [15:0]       bodies_stored, bodies_flushed;

  dprbc #(.BUF_DEPTH(BUF_DEPTH)) u_dprbc (
    .clk, .rst_n, .bc_valid(!bq_empty), .bc(bq_dout), .bc_pop(bq_pop),
    .body_dout, .body_empty, .body_pop,
    .rd_valid, .rd_slot, .rd_ready,
    .out_valid, .out_data, .out_last, .out_ready,
    .bodies_stored, .bodies_flushed
  );

  // ---------------- host read engine
  logic [31:0]       dest_addr;
  logic [LIST_W-1:0] list_ref;
  logic [15:0]       cell_count, xferred;
  logic              go, x_busy, x_done, done_flag;

  rsm_xfer u_xfer (
    .clk, .rst_n, .start(go), .dest_addr, .list(list_ref), .count(cell_count),
    .busy(x_busy), .done(x_done), .xferred,
    .un_req, .un_list, .un_ack, .un_empty, .un_node,
    .fr_req, .fr_node, .fr_ack,
    .rd_valid, .rd_slot, .rd_ready, .out_valid, .out_data, .out_last, .out_ready,
    .m_req, .m_we, .m_addr, .m_wdata, .m_ready
  );

  // ---------------- I/O registers
  typedef enum logic [1:0] {IO_IDLE, IO_CAM, IO_LLM} io_state_e;
  io_state_e io_state;
  logic      io_fire;

  assign io_fire     = io_req && !io_ack && io_state == IO_IDLE;
  assign go          = io_fire && io_we && io_addr == 4'd3 && io_wdata[0] && !x_busy;
  assign cam_h_req   = (io_state == IO_CAM);
  assign llm_h_req   = (io_state == IO_LLM);
  assign irq         = done_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      io_state <= IO_IDLE; io_ack <= 1'b0; io_rdata <= '0;
      dest_addr <= '0; list_ref <= '0; cell_count <= '0; cam_sel <= '0; cam_h_op <= 1'b0;
      llm_addr <= '0; llm_h_we <= 1'b0; llm_h_wdata <= '0; done_flag <= 1'b0;
    end else begin
      io_ack <= 1'b0;
      if (go)     done_flag <= 1'b0;
      if (x_done) done_flag <= 1'b1;
      unique case (io_state)
        IO_IDLE: if (io_fire) begin
          if (io_addr == 4'd6) begin
            cam_h_op <= io_we;
            io_state <= IO_CAM;
          end else if (io_addr == 4'd8) begin
            llm_h_we    <= io_we;
            llm_h_wdata <= io_wdata[15:0];
            io_state    <= IO_LLM;
          end else begin
            io_ack <= 1'b1;
            if (io_we) begin
              unique case (io_addr)
                4'd0: dest_addr  <= io_wdata;
                4'd1: list_ref   <= io_wdata[LIST_W-1:0];
                4'd2: cell_count <= io_wdata[15:0];
                4'd5: cam_sel    <= io_wdata[LIST_W-1:0];
                4'd7: llm_addr   <= io_wdata[14:0];
                default: ;
              endcase
            end else begin
              unique case (io_addr)
                4'd0:  io_rdata <= dest_addr;
                4'd1:  io_rdata <= 32'(list_ref);
                4'd2:  io_rdata <= 32'(cell_count);
                4'd3:  io_rdata <= {30'h0, done_flag, x_busy};
                4'd4:  io_rdata <= 32'(xferred);
                4'd5:  io_rdata <= 32'(cam_sel);
                4'd7:  io_rdata <= 32'(llm_addr);
                4'd9:  io_rdata <= {hec_errors, cells_in};
                4'd10: io_rdata <= {overflow, crc_errors};
                4'd11: io_rdata <= {no_buffer_drops, cam_full_drops};
                4'd12: io_rdata <= {bodies_flushed, bodies_stored};
                default: io_rdata <= '0;
              endcase
            end
          end
        end
        IO_CAM: if (cam_h_ack) begin
          io_rdata <= {cam_h_rdata[48], 5'h0, cam_h_rdata[25:0]};
          io_ack   <= 1'b1;
          io_state <= IO_IDLE;
        end
        IO_LLM: if (llm_h_ack) begin
          io_rdata <= {16'h0, llm_h_rdata};
          llm_addr <= llm_addr + 1'b1;
          io_ack   <= 1'b1;
          io_state <= IO_IDLE;
        end
        default: io_state <= IO_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = ^{m_rdata, body_full, cam_h_rdata[47:26]};
endmodule
