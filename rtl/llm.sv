// llm: linked list manager.  Keeps one linked list per connection or datagram
// (512 lists: 256 virtual circuits, 256 datagrams) in a 32K x 16 single-port
// SRAM.  Every list node stands for one cell-sized slot of the reassembly
// buffer, so a connection's cells look contiguous without being so.  Unused
// slots sit on a free list.  Operations, one at a time:
//   append  (from the CAM lookup controller) take a node from the free list,
//           link it at the tail of the list, bump the list status, and pass
//           the node (the buffer slot) to the buffer controller.  With no
//           free node, or a token marked drop, a drop command is passed instead.
//   unlink  (host read engine) remove the node at the front of a list.
//   free    (host read engine) return a node to the free list once its data
//           has left the buffer, so a slot is never reused while being read.
//   delete  (host, through the CLC) splice a whole list onto the free list.
//   host    read or write any SRAM word (initialisation, status reads).
// Priority when several wait: append, free, unlink, delete, host.
//
// SRAM layout (16-bit words, NULL = 0xFFFF):
//   4*L+0 HEAD, 4*L+1 TAIL, 4*L+2 STATUS {complete[15], cells[14:0]}
//   0x0800 FREE_HEAD,  0x1000+n NEXT pointer of node n
// 'complete' is set when an AAL4 EOM or SSM cell is appended and cleared when
// the list empties.  The host must build the free list and empty list headers
// before use.  Worst case: an append takes 10 clocks from acceptance to its
// buffer command, within the document's thirteen 50 ns clocks.  The
// operations, SRAM size and host access follow the document; the layout and
// the separate free step are design choices.
module llm #(
  parameter int RAM_DEPTH = 32768
) (
  input  logic        clk,
  input  logic        rst_n,
  // append requests from the CLC
  input  logic        lr_valid,
  input  atm_pkg::list_req_t lr,
  output logic        lr_ready,
  // buffer commands to the DPRBC (through a queue)
  output logic        bc_valid,
  output atm_pkg::buf_cmd_t bc,
  input  logic        bc_full,
  // unlink from the host read engine
  input  logic        un_req,
  input  logic [atm_pkg::LIST_W-1:0] un_list,
  output logic        un_ack,
  output logic        un_empty,
  output logic [atm_pkg::NODE_W-1:0] un_node,
  // free from the host read engine
  input  logic        fr_req,
  input  logic [atm_pkg::NODE_W-1:0] fr_node,
  output logic        fr_ack,
  // delete list
  input  logic        del_req,
  input  logic [atm_pkg::LIST_W-1:0] del_list,
  output logic        del_ack,
  // host SRAM access
  input  logic        h_req,
  input  logic        h_we,
  input  logic [14:0] h_addr,
  input  logic [15:0] h_wdata,
  output logic        h_ack,
  output logic [15:0] h_rdata,
  output logic [15:0] no_buffer_drops
);
  import atm_pkg::*;
  localparam int AW = $clog2(RAM_DEPTH);
  localparam logic [14:0] FREE_HEAD = 15'h0800;
  localparam logic [14:0] NEXT_BASE = 15'h1000;

  typedef enum logic [4:0] {
    L_IDLE,
    A_FH, A_NX, A_WFH, A_TL, A_WNX, A_LINK, A_WTL, A_ST, A_WST,
    U_HD, U_NX, U_WHD, U_WTL, U_ST, U_WST,
    F_FH, F_WNX, F_WFH,
    D_HD, D_TL, D_FH, D_WNX, D_WFH, D_CLR1, D_CLR2, D_CLR3,
    H_WAIT, H_RD, L_DROP
  } state_e;
  state_e state;

  // SRAM port
  logic          ram_en, ram_we;
  logic [14:0]   ram_addr;
  logic [15:0]   ram_wdata, ram_rdata;

  spram #(.WIDTH(16), .DEPTH(RAM_DEPTH)) u_ram (
    .clk, .en(ram_en), .we(ram_we), .addr(AW'(ram_addr)), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  logic [LIST_W-1:0] list;
  logic              eom;
  logic [15:0]       n, t;          // node taken / tail or head read
  logic [NODE_W-1:0] fnode;
  logic              h_we_q;
  logic [14:0]       h_addr_q;
  logic [15:0]       h_wdata_q;

  function automatic logic [14:0] hdr(input logic [LIST_W-1:0] l, input logic [1:0] w);
    return {4'b0, l, w};
  endfunction
  function automatic logic [14:0] nxt(input logic [15:0] node);
    return NEXT_BASE + {4'b0, node[NODE_W-1:0]};
  endfunction

  always_comb begin
    ram_en = 1'b1; ram_we = 1'b0; ram_addr = '0; ram_wdata = '0;
    unique case (state)
      A_FH:   ram_addr = FREE_HEAD;
      A_NX:   ram_addr = nxt(ram_rdata);
      A_WFH:  begin ram_we = 1'b1; ram_addr = FREE_HEAD; ram_wdata = ram_rdata; end
      A_TL:   ram_addr = hdr(list, 2'd1);
      A_WNX:  begin ram_we = 1'b1; ram_addr = nxt(n); ram_wdata = NULL_PTR; end
      A_LINK: begin
        ram_we = 1'b1; ram_wdata = n;
        ram_addr = (t == NULL_PTR) ? hdr(list, 2'd0) : nxt(t);
      end
      A_WTL:  begin ram_we = 1'b1; ram_addr = hdr(list, 2'd1); ram_wdata = n; end
      A_ST:   ram_addr = hdr(list, 2'd2);
      A_WST:  begin
        ram_we = 1'b1; ram_addr = hdr(list, 2'd2);
        ram_wdata = {ram_rdata[15] | eom, ram_rdata[14:0] + 15'd1};
      end
      U_HD:   ram_addr = hdr(list, 2'd0);
      U_NX:   ram_addr = nxt(ram_rdata);
      U_WHD:  begin ram_we = 1'b1; ram_addr = hdr(list, 2'd0); ram_wdata = ram_rdata; end
      U_WTL:  begin ram_we = (t == NULL_PTR); ram_en = (t == NULL_PTR);
                    ram_addr = hdr(list, 2'd1); ram_wdata = NULL_PTR; end
      U_ST:   ram_addr = hdr(list, 2'd2);
      U_WST:  begin
        ram_we = 1'b1; ram_addr = hdr(list, 2'd2);
        ram_wdata = (ram_rdata[14:0] <= 15'd1) ? 16'h0 : {ram_rdata[15], ram_rdata[14:0] - 15'd1};
      end
      F_FH:   ram_addr = FREE_HEAD;
      F_WNX:  begin ram_we = 1'b1; ram_addr = nxt({5'b0, fnode}); ram_wdata = ram_rdata; end
      F_WFH:  begin ram_we = 1'b1; ram_addr = FREE_HEAD; ram_wdata = {5'b0, fnode}; end
      D_HD:   ram_addr = hdr(list, 2'd0);
      D_TL:   ram_addr = hdr(list, 2'd1);
      D_FH:   begin ram_en = (n != NULL_PTR); ram_addr = FREE_HEAD; end
      D_WNX:  begin ram_we = 1'b1; ram_addr = nxt(t); ram_wdata = ram_rdata; end
      D_WFH:  begin ram_we = 1'b1; ram_addr = FREE_HEAD; ram_wdata = n; end
      D_CLR1: begin ram_we = 1'b1; ram_addr = hdr(list, 2'd0); ram_wdata = NULL_PTR; end
      D_CLR2: begin ram_we = 1'b1; ram_addr = hdr(list, 2'd1); ram_wdata = NULL_PTR; end
      D_CLR3: begin ram_we = 1'b1; ram_addr = hdr(list, 2'd2); ram_wdata = 16'h0; end
      H_WAIT: begin ram_we = h_we_q; ram_addr = h_addr_q; ram_wdata = h_wdata_q; end
      default: ram_en = 1'b0;
    endcase
  end

  assign lr_ready = (state == L_IDLE) && !bc_full && !bc_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= L_IDLE; list <= '0; eom <= 1'b0; n <= '0; t <= '0; fnode <= '0;
      bc_valid <= 1'b0; bc <= '0;
      un_ack <= 1'b0; un_empty <= 1'b0; un_node <= '0; fr_ack <= 1'b0; del_ack <= 1'b0;
      h_ack <= 1'b0; h_rdata <= '0; h_we_q <= 1'b0; h_addr_q <= '0; h_wdata_q <= '0;
      no_buffer_drops <= '0;
    end else begin
      un_ack <= 1'b0; fr_ack <= 1'b0; del_ack <= 1'b0; h_ack <= 1'b0;
      if (bc_valid && !bc_full) bc_valid <= 1'b0;
      unique case (state)
        L_IDLE: begin
          if (lr_valid && lr_ready) begin
            list <= lr.list;
            eom  <= lr.eom;
            state <= lr.drop ? L_DROP : A_FH;
          end else if (fr_req && !fr_ack) begin
            fnode <= fr_node;
            state <= F_FH;
          end else if (un_req && !un_ack) begin
            list  <= un_list;
            state <= U_HD;
          end else if (del_req && !del_ack) begin
            list  <= del_list;
            state <= D_HD;
          end else if (h_req && !h_ack) begin
            h_we_q <= h_we; h_addr_q <= h_addr; h_wdata_q <= h_wdata;
            state  <= H_WAIT;
          end
        end
        L_DROP: begin
          bc_valid <= 1'b1; bc <= '{drop: 1'b1, slot: '0};
          state    <= L_IDLE;
        end
        // ---- append
        A_FH:  state <= A_NX;
        A_NX:  begin
          n <= ram_rdata;
          if (ram_rdata == NULL_PTR) begin
            no_buffer_drops <= no_buffer_drops + 1'b1;
            state <= L_DROP;
          end else state <= A_WFH;
        end
        A_WFH: state <= A_TL;
        A_TL:  state <= A_WNX;
        A_WNX: begin t <= ram_rdata; state <= A_LINK; end
        A_LINK: state <= A_WTL;
        A_WTL: state <= A_ST;
        A_ST:  state <= A_WST;
        A_WST: begin
          bc_valid <= 1'b1; bc <= '{drop: 1'b0, slot: n[NODE_W-1:0]};
          state    <= L_IDLE;
        end
        // ---- unlink
        U_HD:  state <= U_NX;
        U_NX:  begin
          n <= ram_rdata;
          if (ram_rdata == NULL_PTR) begin
            un_ack <= 1'b1; un_empty <= 1'b1;
            state  <= L_IDLE;
          end else state <= U_WHD;
        end
        U_WHD: begin t <= ram_rdata; state <= U_WTL; end
        U_WTL: state <= U_ST;
        U_ST:  state <= U_WST;
        U_WST: begin
          un_ack <= 1'b1; un_empty <= 1'b0; un_node <= n[NODE_W-1:0];
          state  <= L_IDLE;
        end
        // ---- free
        F_FH:  state <= F_WNX;
        F_WNX: state <= F_WFH;
        F_WFH: begin fr_ack <= 1'b1; state <= L_IDLE; end
        // ---- delete
        D_HD:  state <= D_TL;
        D_TL:  begin n <= ram_rdata; state <= D_FH; end
        D_FH:  begin
          t <= ram_rdata;                       // tail of the list
          state <= (n == NULL_PTR) ? D_CLR1 : D_WNX;
        end
        D_WNX: state <= D_WFH;
        D_WFH: state <= D_CLR1;
        D_CLR1: state <= D_CLR2;
        D_CLR2: state <= D_CLR3;
        D_CLR3: begin del_ack <= 1'b1; state <= L_IDLE; end
        // ---- host
        H_WAIT: begin
          h_ack <= h_we_q;
          state <= h_we_q ? L_IDLE : H_RD;
        end
        H_RD:  begin h_rdata <= ram_rdata; h_ack <= 1'b1; state <= L_IDLE; end
        default: state <= L_IDLE;
      endcase
    end
  end
endmodule
