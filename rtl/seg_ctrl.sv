// seg_ctrl: the segmentation controller.  Once started with a block length and
// the header fields, it waits until the data buffer holds one cell's worth of
// data (or the rest of the block), then sends one 53-byte cell, one byte per
// clock, to the framer: ATM header with HEC, and for an AAL4 connection
// (VCI[15] set) the SAR header (segment type, sequence number, MID) and
// trailer (length indicator, CRC-10).  CRC-8 and CRC-10 are computed as the
// bytes go out.  Repeats until the block is sent, then pulses 'done'.
//
// Cells carry 44 user bytes (AAL4) or 48 (other traffic); both are whole
// words, so every cell consumes whole data-buffer words.  Buffer words are
// big-endian (byte 0 in bits 31:24).  The unused tail of the last cell is
// zero.  Segment types: single-cell block SSM, else BOM, COM..., EOM; the
// sequence number counts from 0 per block.  Framer port: tx_valid/tx_ready
// handshake per byte, tx_soc marks byte 0.  The document gives the cell
// contents and the byte-per-clock CRCs; padding, ordering and the handshake
// are design choices.
//
// Timing: with data ready and the framer always ready, a cell takes 53
// clocks plus one clock to check the buffer, so cells leave every 54 clocks,
// 2.7 us at 50 ns, about the OC-3c cell time of 2.73 us.
module seg_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] length,     // bytes in the block
  input  logic [15:0] vci,
  input  logic [2:0]  pt,
  input  logic        clp,
  input  logic [9:0]  mid,
  output logic        busy,
  output logic        done,       // one-clock pulse after the last cell
  output logic [15:0] cells_sent,
  // data buffer (show-ahead FIFO)
  input  logic [31:0] buf_dout,
  input  logic [6:0]  buf_count,
  output logic        buf_pop,
  // framer
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_soc,
  input  logic        tx_ready
);
  import atm_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_SEND} state_e;
  state_e state;

  logic [31:0] rem;
  logic [15:0] r_vci;
  logic [2:0]  r_pt;
  logic        r_clp;
  logic [9:0]  r_mid;
  logic        first;
  logic [3:0]  sn;
  logic [5:0]  idx;          // byte 0..52 of the cell
  logic [5:0]  cell_bytes;   // user bytes in this cell
  logic [3:0]  cell_words;
  logic        cell_last;
  seg_type_e   cell_st;

  logic        aal4;
  logic [5:0]  payload;
  logic [5:0]  want_bytes;
  logic [3:0]  want_words;
  assign aal4    = r_vci[15];
  assign payload = aal4 ? 6'(AAL4_PAYLOAD) : 6'(BODY_BYTES);
  assign want_bytes = (rem < 32'(payload)) ? rem[5:0] : payload;
  assign want_words = 4'((want_bytes + 6'd3) >> 2);

  // current byte
  logic [7:0]  crc8;
  logic [9:0]  crc10, crc10_next;
  logic [5:0]  b;            // body byte 0..47
  logic [5:0]  p;            // user byte within the cell
  logic        is_payload;
  logic [7:0]  pbyte;
  logic        crc8_en, crc10_en, crc10_six;

  assign b = idx - 6'd5;
  always_comb begin
    is_payload = 1'b0;
    p          = '0;
    if (idx >= 6'd5) begin
      if (aal4) begin
        is_payload = (b >= 6'd2) && (b < 6'd46);
        p          = b - 6'd2;
      end else begin
        is_payload = 1'b1;
        p          = b;
      end
    end
  end

  always_comb begin
    unique case (p[1:0])
      2'd0: pbyte = buf_dout[31:24];
      2'd1: pbyte = buf_dout[23:16];
      2'd2: pbyte = buf_dout[15:8];
      default: pbyte = buf_dout[7:0];
    endcase
    if (p >= cell_bytes) pbyte = 8'h00;
  end

  // body bytes that do not depend on the CRC-10
  logic [7:0] sar_byte;
  always_comb begin
    if (is_payload)     sar_byte = pbyte;
    else if (b == 6'd0) sar_byte = {cell_st, sn, r_mid[9:8]};
    else if (b == 6'd1) sar_byte = r_mid[7:0];
    else                sar_byte = 8'h00;
  end

  always_comb begin
    tx_data   = 8'h00;
    crc8_en   = 1'b0;
    crc10_en  = 1'b0;
    crc10_six = 1'b0;
    unique case (idx)
      6'd0: tx_data = 8'h00;
      6'd1: tx_data = {4'h0, r_vci[15:12]};
      6'd2: tx_data = r_vci[11:4];
      6'd3: tx_data = {r_vci[3:0], r_pt, r_clp};
      6'd4: tx_data = crc8 ^ HEC_COSET;
      default: begin
        if (!aal4 || b < 6'd46) tx_data = sar_byte;
        else if (b == 6'd46)    tx_data = {cell_bytes, crc10_next[9:8]};
        else                    tx_data = crc10[7:0];   // b == 47
      end
    endcase
    crc8_en   = (idx < 6'd4);
    crc10_en  = (idx >= 6'd5) && (b < 6'd47);
    crc10_six = (b == 6'd46);
  end

  logic fire;
  assign fire     = (state == S_SEND) && tx_ready;
  assign tx_valid = (state == S_SEND);
  assign tx_soc   = (state == S_SEND) && (idx == 6'd0);
  assign busy     = (state != S_IDLE);
  assign buf_pop  = fire && is_payload && (p[1:0] == 2'd3) && (p[5:2] < cell_words);

  hec_crc8 u_crc8 (
    .clk, .rst_n, .clear(state != S_SEND), .en(fire && crc8_en), .din(tx_data), .crc(crc8)
  );

  // For byte 46 the LI bits go in; the CRC then stands in the register for byte 47.
  aal_crc10 u_crc10 (
    .clk, .rst_n, .clear(state != S_SEND), .en(fire && crc10_en), .six_only(crc10_six),
    .din(crc10_six ? {cell_bytes, 2'b00} : sar_byte), .crc(crc10), .crc_next(crc10_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rem <= '0; r_vci <= '0; r_pt <= '0; r_clp <= 1'b0; r_mid <= '0;
      first <= 1'b0; sn <= '0; idx <= '0;
      cell_bytes <= '0; cell_words <= '0; cell_last <= 1'b0; cell_st <= ST_COM;
      done <= 1'b0; cells_sent <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rem   <= length;
          r_vci <= vci; r_pt <= pt; r_clp <= clp; r_mid <= mid;
          first <= 1'b1;
          sn    <= '0;
          if (length == 0) done  <= 1'b1;
          else             state <= S_WAIT;
        end
        S_WAIT: if (32'(buf_count) >= 32'(want_words)) begin
          cell_bytes <= want_bytes;
          cell_words <= want_words;
          cell_last  <= (rem <= 32'(payload));
          if (rem <= 32'(payload)) cell_st <= first ? ST_SSM : ST_EOM;
          else                     cell_st <= first ? ST_BOM : ST_COM;
          idx   <= '0;
          state <= S_SEND;
        end
        S_SEND: if (fire) begin
          if (idx == 6'(CELL_BYTES - 1)) begin
            rem        <= rem - 32'(cell_bytes);
            sn         <= sn + 1'b1;
            first      <= 1'b0;
            cells_sent <= cells_sent + 1'b1;
            if (cell_last) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_WAIT;
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_valid && !tx_ready) |=> (tx_valid && $stable(tx_data)));
endmodule
