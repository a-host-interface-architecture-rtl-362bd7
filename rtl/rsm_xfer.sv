// rsm_xfer: the reassembler's host read engine.  The host names a destination
// address, an internal list reference and a number of cells.  For each cell
// the engine asks the linked list manager to remove the node at the front of
// the list, has the buffer controller stream that slot's 12 words, writes them
// to consecutive host addresses as a streaming bus master, and then returns
// the node to the free list.  It stops early when the list runs empty; 'done'
// pulses at the end and 'xferred' tells how many cells were moved.
// Bus port as in seg_dma (a word moves when m_req and m_ready are high).
// The request (destination, list, count) and the node removal are the
// document's; the one-cell-at-a-time sequencing is a design choice.
module rsm_xfer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] dest_addr,
  input  logic [atm_pkg::LIST_W-1:0] list,
  input  logic [15:0] count,
  output logic        busy,
  output logic        done,
  output logic [15:0] xferred,
  // linked list manager
  output logic        un_req,
  output logic [atm_pkg::LIST_W-1:0] un_list,
  input  logic        un_ack,
  input  logic        un_empty,
  input  logic [atm_pkg::NODE_W-1:0] un_node,
  output logic        fr_req,
  output logic [atm_pkg::NODE_W-1:0] fr_node,
  input  logic        fr_ack,
  // buffer controller
  output logic        rd_valid,
  output logic [atm_pkg::NODE_W-1:0] rd_slot,
  input  logic        rd_ready,
  input  logic        out_valid,
  input  logic [31:0] out_data,
  input  logic        out_last,
  output logic        out_ready,
  // bus master
  output logic        m_req,
  output logic        m_we,
  output logic [31:0] m_addr,
  output logic [31:0] m_wdata,
  input  logic        m_ready
);
  import atm_pkg::*;

  typedef enum logic [2:0] {X_IDLE, X_UN, X_RD, X_STREAM, X_FREE} state_e;
  state_e state;

  logic [15:0] target;

  assign busy      = (state != X_IDLE);
  assign un_req    = (state == X_UN);
  assign rd_valid  = (state == X_RD);
  assign fr_req    = (state == X_FREE);
  assign fr_node   = rd_slot;
  assign m_req     = (state == X_STREAM) && out_valid;
  assign m_we      = 1'b1;
  assign m_wdata   = out_data;
  assign out_ready = (state == X_STREAM) && m_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= X_IDLE; target <= '0; xferred <= '0; done <= 1'b0;
      un_list <= '0; rd_slot <= '0; m_addr <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        X_IDLE: if (start) begin
          un_list <= list;
          target  <= count;
          xferred <= '0;
          m_addr  <= {dest_addr[31:2], 2'b00};
          if (count == 0) done  <= 1'b1;
          else            state <= X_UN;
        end
        X_UN: if (un_ack) begin
          if (un_empty) begin
            done  <= 1'b1;
            state <= X_IDLE;
          end else begin
            rd_slot <= un_node;
            state   <= X_RD;
          end
        end
        X_RD: if (rd_ready) state <= X_STREAM;
        X_STREAM: if (m_req && m_ready) begin
          m_addr <= m_addr + 32'd4;
          if (out_last) state <= X_FREE;
        end
        X_FREE: if (fr_ack) begin
          xferred <= xferred + 1'b1;
          if (xferred + 1'b1 == target) begin
            done  <= 1'b1;
            state <= X_IDLE;
          end else begin
            state <= X_UN;
          end
        end
        default: state <= X_IDLE;
      endcase
    end
  end
endmodule
