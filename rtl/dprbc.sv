// dprbc: dual port reassembly buffer controller, last stage of the reassembly
// pipeline.  The reassembly buffer is one single-port 32K x 32 RAM; this
// controller makes it behave as two ports by giving even clocks to the write
// side and odd clocks to the read side.
//   write side  for each buffer command it moves one 48-byte cell body from
//               the cell body FIFO, a byte per clock, packs four bytes per
//               word and writes the 12 words to the command's slot (slot*16).
//               A drop command flushes the body from the FIFO instead.
//               48 clocks per body: 2.4 us at 50 ns, as in the document.
//   read side   for each read request it streams the 12 words of one slot
//               out on a valid/ready port, one word every two clocks at
//               most (1.2 us per cell body, the document's figure), with
//               out_last on the twelfth.
// Bytes are packed big-endian (first byte in bits 31:24).  The 16-word slot,
// the even/odd split and the handshakes are design choices.
module dprbc #(
  parameter int BUF_DEPTH  = 32768,   // words in the reassembly buffer
  parameter int SLOT_WORDS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // buffer commands (show-ahead queue)
  input  logic        bc_valid,
  input  atm_pkg::buf_cmd_t bc,
  output logic        bc_pop,
  // cell body FIFO read side
  input  logic [7:0]  body_dout,
  input  logic        body_empty,
  output logic        body_pop,
  // read requests from the host read engine
  input  logic        rd_valid,
  input  logic [atm_pkg::NODE_W-1:0] rd_slot,
  output logic        rd_ready,
  // word stream to the bus
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        out_last,
  input  logic        out_ready,
  output logic [15:0] bodies_stored,
  output logic [15:0] bodies_flushed
);
  import atm_pkg::*;
  localparam int AW = $clog2(BUF_DEPTH);
  localparam int SW = $clog2(SLOT_WORDS);

  logic phase;   // 0: write slot, 1: read slot

  // ---------------- write side
  logic              w_active, w_drop;
  logic [NODE_W-1:0] w_slot;
  logic [5:0]        w_cnt;
  logic [23:0]       pack;
  logic              pend_valid;
  logic [31:0]       pend_data;
  logic [AW-1:0]     pend_addr;
  logic              do_write;

  assign bc_pop   = !w_active && bc_valid;
  assign body_pop = w_active && !body_empty && !(pend_valid && w_cnt[1:0] == 2'd3);
  assign do_write = !phase && pend_valid;

  // ---------------- read side
  logic              r_active, r_inflight;
  logic [NODE_W-1:0] r_slot;
  logic [3:0]        r_widx;
  logic              issue;

  assign rd_ready = !r_active;
  assign issue    = r_active && phase && (r_widx < 4'(BODY_WORDS)) && !r_inflight &&
                    (!out_valid || out_ready);

  // ---------------- RAM
  logic          ram_en, ram_we;
  logic [AW-1:0] ram_addr;
  logic [31:0]   ram_rdata;
  assign ram_en   = do_write || issue;
  assign ram_we   = do_write;
  assign ram_addr = do_write ? pend_addr : AW'({r_slot, SW'(r_widx)});

  spram #(.WIDTH(32), .DEPTH(BUF_DEPTH)) u_dprb (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(pend_data), .rdata(ram_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 1'b0;
      w_active <= 1'b0; w_drop <= 1'b0; w_slot <= '0; w_cnt <= '0; pack <= '0;
      pend_valid <= 1'b0; pend_data <= '0; pend_addr <= '0;
      r_active <= 1'b0; r_inflight <= 1'b0; r_slot <= '0; r_widx <= '0;
      out_valid <= 1'b0; out_data <= '0; out_last <= 1'b0;
      bodies_stored <= '0; bodies_flushed <= '0;
    end else begin
      phase <= !phase;
      // write side
      if (do_write) pend_valid <= 1'b0;
      if (bc_pop) begin
        w_active <= 1'b1;
        w_drop   <= bc.drop;
        w_slot   <= bc.slot;
        w_cnt    <= '0;
      end
      if (body_pop) begin
        pack  <= {pack[15:0], body_dout};
        w_cnt <= w_cnt + 1'b1;
        if (w_cnt[1:0] == 2'd3 && !w_drop) begin
          pend_valid <= 1'b1;
          pend_data  <= {pack, body_dout};
          pend_addr  <= AW'({w_slot, SW'(w_cnt[5:2])});
        end
        if (w_cnt == 6'(BODY_BYTES - 1)) begin
          w_active <= 1'b0;
          if (w_drop) bodies_flushed <= bodies_flushed + 1'b1;
          else        bodies_stored  <= bodies_stored + 1'b1;
        end
      end
      // read side
      if (rd_valid && rd_ready) begin
        r_active <= 1'b1;
        r_slot   <= rd_slot;
        r_widx   <= '0;
      end
      r_inflight <= issue;
      if (issue) r_widx <= r_widx + 1'b1;
      if (out_valid && out_ready) begin
        out_valid <= 1'b0;
        if (out_last) r_active <= 1'b0;
      end
      if (r_inflight) begin
        out_valid <= 1'b1;
        out_data  <= ram_rdata;
        out_last  <= (r_widx == 4'(BODY_WORDS));
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));
endmodule
