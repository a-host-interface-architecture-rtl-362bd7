// clc: CAM lookup controller, second stage of the reassembly pipeline.  It
// manages two CAMs: one keyed by VCI for virtual circuit traffic, one keyed by
// VCI+MID for AAL4 datagrams, each with 256 entries.  For each token from the
// cell manager it searches the right CAM; on a miss it writes the identifier
// into a free entry (a new connection or datagram), and when none is free the
// cell is dropped.  The entry number, with a bit telling which CAM, is the
// internal list reference passed to the linked list manager.  Cells that
// failed their CRC checks are passed on as drops without touching the CAMs.
//
// Host operations (h_req held until h_ack): read an entry (h_op = 0), giving
// {valid, key}; delete an entry (h_op = 1), which also asks the linked list
// manager to delete that list.  Host operations run only between cells.
// Timing: a cell takes three clocks (accept, search/write, hand-over when the
// LLM is ready); the document allows up to eleven 50 ns clocks.  CAM keys:
// {32'b0, VCI} and {22'b0, VCI, MID}.  Key layout and handshakes are design
// choices; the search/insert/drop rule is the document's.
module clc #(
  parameter int ENTRIES = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the cell manager
  input  logic        tok_valid,
  input  atm_pkg::cell_info_t tok,
  output logic        tok_ready,
  // to the linked list manager
  output logic        lr_valid,
  output atm_pkg::list_req_t lr,
  input  logic        lr_ready,
  // list delete request to the linked list manager
  output logic        del_req,
  output logic [atm_pkg::LIST_W-1:0] del_list,
  input  logic        del_ack,
  // host
  input  logic        h_req,
  input  logic        h_op,          // 0 read entry, 1 delete entry
  input  logic [atm_pkg::LIST_W-1:0] h_sel,
  output logic        h_ack,
  output logic [48:0] h_rdata,       // {valid, key}
  output logic [15:0] cam_full_drops
);
  import atm_pkg::*;
  localparam int IW = $clog2(ENTRIES);

  typedef enum logic [2:0] {C_IDLE, C_LOOK, C_EMIT, C_HDEL, C_HACK} state_e;
  state_e state;

  cell_info_t cur;
  logic [47:0] vc_key, dg_key;
  assign vc_key = {32'h0, cur.vci};
  assign dg_key = {22'h0, cur.vci, cur.mid};

  logic          vc_match, dg_match, vc_free, dg_free;
  logic [IW-1:0] vc_midx, dg_midx, vc_fidx, dg_fidx;
  logic          vc_wr, dg_wr, vc_del, dg_del;
  logic [47:0]   vc_rkey, dg_rkey;
  logic          vc_rvalid, dg_rvalid;
  logic [LIST_W-1:0] hsel_q;

  logic is_dg;
  assign is_dg = cur.aal4;

  cam #(.ENTRIES(ENTRIES), .KEY_W(48)) u_vc_cam (
    .clk, .rst_n, .search_key(vc_key), .match(vc_match), .match_idx(vc_midx),
    .free_valid(vc_free), .free_idx(vc_fidx), .wr_en(vc_wr), .wr_idx(vc_fidx), .wr_key(vc_key),
    .del_en(vc_del), .del_idx(hsel_q[IW-1:0]), .rd_idx(hsel_q[IW-1:0]),
    .rd_key(vc_rkey), .rd_valid(vc_rvalid)
  );
  cam #(.ENTRIES(ENTRIES), .KEY_W(48)) u_dg_cam (
    .clk, .rst_n, .search_key(dg_key), .match(dg_match), .match_idx(dg_midx),
    .free_valid(dg_free), .free_idx(dg_fidx), .wr_en(dg_wr), .wr_idx(dg_fidx), .wr_key(dg_key),
    .del_en(dg_del), .del_idx(hsel_q[IW-1:0]), .rd_idx(hsel_q[IW-1:0]),
    .rd_key(dg_rkey), .rd_valid(dg_rvalid)
  );

  logic hit, free;
  logic [IW-1:0] hidx, fidx;
  assign hit  = is_dg ? dg_match : vc_match;
  assign hidx = is_dg ? dg_midx  : vc_midx;
  assign free = is_dg ? dg_free  : vc_free;
  assign fidx = is_dg ? dg_fidx  : vc_fidx;

  assign vc_wr = (state == C_LOOK) && cur.ok && !is_dg && !vc_match && vc_free;
  assign dg_wr = (state == C_LOOK) && cur.ok &&  is_dg && !dg_match && dg_free;
  assign vc_del = (state == C_HDEL) && del_ack && !hsel_q[LIST_W-1];
  assign dg_del = (state == C_HDEL) && del_ack &&  hsel_q[LIST_W-1];

  assign tok_ready = (state == C_IDLE);
  assign lr_valid  = (state == C_EMIT);
  assign del_req   = (state == C_HDEL);
  assign del_list  = hsel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE; cur <= '0; lr <= '0; hsel_q <= '0;
      h_ack <= 1'b0; h_rdata <= '0; cam_full_drops <= '0;
    end else begin
      h_ack <= 1'b0;
      unique case (state)
        C_IDLE: begin
          if (tok_valid) begin
            cur   <= tok;
            state <= C_LOOK;
          end else if (h_req && !h_ack) begin
            hsel_q <= h_sel;
            state  <= h_op ? C_HDEL : C_HACK;
          end
        end
        C_LOOK: begin
          lr.eom  <= cur.aal4 && (cur.st == ST_EOM || cur.st == ST_SSM);
          lr.list <= {is_dg, hit ? hidx : fidx};
          lr.drop <= !cur.ok || (!hit && !free);
          if (cur.ok && !hit && !free) cam_full_drops <= cam_full_drops + 1'b1;
          state   <= C_EMIT;
        end
        C_EMIT: if (lr_ready) state <= C_IDLE;
        C_HDEL: if (del_ack) begin
          h_ack <= 1'b1;
          state <= C_IDLE;
        end
        C_HACK: begin
          h_rdata <= hsel_q[LIST_W-1] ? {dg_rvalid, dg_rkey} : {vc_rvalid, vc_rkey};
          h_ack   <= 1'b1;
          state   <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  a_lr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (lr_valid && !lr_ready) |=> (lr_valid && $stable(lr)));
endmodule
