// cell_manager: first stage of the reassembly pipeline.  Takes the 53-byte
// cells from the SONET framer one byte per clock, checks the header CRC-8
// (HEC) and, for AAL4 connections (VCI[15] set), the CRC-10 of the body,
// both computed as the bytes arrive.  It extracts the VCI and, for AAL4, the
// segment type, MID and length indicator.  The 48 body bytes go into the
// cell body FIFO as they arrive, before the checks are known; at the end of
// the cell a control token (cell_info_t) with the verdict is queued for the
// CAM lookup controller.  A token with ok = 0 makes the later stages flush the
// body, so bodies and tokens always stay in step.
//
// A cell is skipped entirely (counted in 'overflow') when, at its first byte,
// the body FIFO lacks room for 48 bytes or the token queue is full.  The framer
// is expected to deliver whole cells: rx_soc is only looked at between cells.
// The checks, field extraction, body FIFO and flush request follow the
// document; the in-order flush token, overflow rule and counters are design
// choices.  One cell takes exactly 53 clocks at the input.
module cell_manager #(
  parameter int FIFO_DEPTH = 512,   // cell body FIFO bytes
  parameter int TOK_DEPTH  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // framer
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_soc,
  // cell body FIFO write side
  output logic        body_push,
  output logic [7:0]  body_din,
  input  logic [$clog2(FIFO_DEPTH):0] body_count,
  // token to the CAM lookup controller
  output logic        tok_valid,
  output atm_pkg::cell_info_t tok,
  input  logic        tok_ready,
  // statistics
  output logic [15:0] cells_in,
  output logic [15:0] hec_errors,
  output logic [15:0] crc_errors,
  output logic [15:0] overflow
);
  import atm_pkg::*;

  logic        in_cell, accept;
  logic [5:0]  idx;
  logic        hec_ok, finish;
  logic [7:0]  crc8;
  logic [9:0]  crc10, crc10_next;
  cell_info_t  cur;

  logic        first_byte, take;
  assign first_byte = rx_valid && !in_cell && rx_soc;
  assign take       = rx_valid && in_cell;

  logic        room;
  logic        tq_full, tq_empty;
  logic [$clog2(TOK_DEPTH):0] tq_count;
  assign room = (body_count <= ($clog2(FIFO_DEPTH)+1)'(FIFO_DEPTH - BODY_BYTES)) &&
                (tq_count < ($clog2(TOK_DEPTH)+1)'(TOK_DEPTH - 1));

  // byte position: idx counts the byte now on rx_data (0 when first_byte)
  logic [5:0] pos;
  assign pos = first_byte ? 6'd0 : idx;

  hec_crc8 u_crc8 (
    .clk, .rst_n, .clear(take && idx == 6'(CELL_BYTES - 1)), .en((first_byte || take) && pos < 6'd4),
    .din(rx_data), .crc(crc8)
  );
  aal_crc10 u_crc10 (
    .clk, .rst_n, .clear(first_byte), .en(take && pos >= 6'd5), .six_only(1'b0),
    .din(rx_data), .crc(crc10), .crc_next(crc10_next)
  );

  assign body_push = take && accept && pos >= 6'd5;
  assign body_din  = rx_data;

  cell_info_t tq_din;
  always_comb begin
    tq_din    = cur;
    tq_din.ok = hec_ok && (!cur.aal4 || crc10 == 10'd0);
  end

  sync_fifo #(.WIDTH($bits(cell_info_t)), .DEPTH(TOK_DEPTH)) u_tokq (
    .clk, .rst_n, .push(finish), .din(tq_din), .pop(tok_ready && tok_valid), .dout(tok),
    .empty(tq_empty), .full(tq_full), .count(tq_count)
  );
  assign tok_valid = !tq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cell <= 1'b0; accept <= 1'b0; idx <= '0; hec_ok <= 1'b0; finish <= 1'b0;
      cur <= '0;
      cells_in <= '0; hec_errors <= '0; crc_errors <= '0; overflow <= '0;
    end else begin
      finish <= 1'b0;
      if (finish) begin
        if (!hec_ok)                                   hec_errors <= hec_errors + 1'b1;
        else if (cur.aal4 && crc10 != 10'd0)           crc_errors <= crc_errors + 1'b1;
      end
      if (first_byte) begin
        in_cell  <= 1'b1;
        idx      <= 6'd1;
        accept   <= room;
        cells_in <= cells_in + 1'b1;
        if (!room) overflow <= overflow + 1'b1;
        cur      <= '0;
      end else if (take) begin
        unique case (idx)
          6'd1: cur.vci[15:12] <= rx_data[3:0];
          6'd2: cur.vci[11:4]  <= rx_data;
          6'd3: cur.vci[3:0]   <= rx_data[7:4];
          6'd4: hec_ok         <= (rx_data == (crc8 ^ HEC_COSET));
          6'd5: begin
            cur.aal4     <= cur.vci[15];
            cur.st       <= seg_type_e'(rx_data[7:6]);
            cur.mid[9:8] <= rx_data[1:0];
          end
          6'd6: cur.mid[7:0] <= rx_data;
          6'd51: cur.li      <= rx_data[7:2];
          default: ;
        endcase
        if (idx == 6'(CELL_BYTES - 1)) begin
          in_cell <= 1'b0;
          finish  <= accept;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  logic unused;
  assign unused = ^{tq_full, crc10_next};
endmodule
