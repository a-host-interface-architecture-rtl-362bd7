// tb_clc: CAM lookup controller with 4-entry CAMs.  Random VC and datagram
// tokens are checked against a model that hands out the lowest free entry:
// the list reference, new-entry creation, the drop of bad cells and of cells
// finding their CAM full, host entry reads and deletes (with the list-delete
// request), and the per-cell time (at most eleven clocks).
module tb_clc;
  import atm_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic tok_valid = 0, tok_ready;
  cell_info_t tok = '0;
  logic lr_valid, lr_ready = 1;
  list_req_t lr;
  logic del_req, del_ack = 0;
  logic [LIST_W-1:0] del_list, h_sel = 0;
  logic h_req = 0, h_op = 0, h_ack;
  logic [48:0] h_rdata;
  logic [15:0] cam_full_drops;
  int checks = 0, failures = 0;

  clc #(.ENTRIES(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [47:0] mkey [2][N];
  bit          mval [2][N];
  int creates = 0, hits = 0, full_drops = 0, bad_drops = 0;

  task automatic send_cell(input logic [15:0] vci, input logic [9:0] mid, input bit ok, input logic [1:0] st);
    int d, idx, t0;
    logic [47:0] k;
    bit exp_drop;
    d = vci[15];
    k = d ? {22'h0, vci, mid} : {32'h0, vci};
    idx = -1;
    for (int i = 0; i < N; i++) if (mval[d][i] && mkey[d][i] == k && idx < 0) idx = i;
    exp_drop = 0;
    if (!ok) begin exp_drop = 1; bad_drops++; end
    else if (idx >= 0) hits++;
    else begin
      for (int i = N - 1; i >= 0; i--) if (!mval[d][i]) idx = i;
      if (idx < 0) begin exp_drop = 1; full_drops++; end
      else begin mval[d][idx] = 1; mkey[d][idx] = k; creates++; end
    end
    @(negedge clk);
    tok = '0; tok.ok = ok; tok.aal4 = vci[15]; tok.vci = vci; tok.mid = mid; tok.st = seg_type_e'(st);
    tok_valid = 1;
    t0 = 0;
    while (!tok_ready) @(negedge clk);
    @(negedge clk); t0++;
    tok_valid = 0;
    while (!lr_valid) begin @(negedge clk); t0++; end
    checks++;
    if (t0 > 11) begin failures++; $display("FAIL %0d clocks for a cell", t0); end
    checks++;
    if (lr.drop !== exp_drop || (!exp_drop && lr.list !== {1'(d), 2'(idx)}) ||
        (!exp_drop && lr.eom !== (vci[15] && st[0]))) begin
      failures++; $display("FAIL vci %h mid %h: drop %b list %h eom %b, want drop %b list %0d/%0d",
                           vci, mid, lr.drop, lr.list, lr.eom, exp_drop, d, idx);
    end
    @(negedge clk);
  endtask

  task automatic host(input bit op, input int d, input int idx);
    @(negedge clk);
    h_req = 1; h_op = op; h_sel = {1'(d), 8'(idx)};
    while (!h_ack) begin
      @(negedge clk);
      if (del_req && !del_ack) begin
        checks++;
        if (del_list !== h_sel) begin failures++; $display("FAIL delete list %h", del_list); end
        del_ack = 1;
      end else del_ack = 0;
    end
    del_ack = 0;
    h_req = 0;
    if (op) mval[d][idx] = 0;
    else begin
      checks++;
      if (h_rdata[48] !== mval[d][idx] || (mval[d][idx] && h_rdata[47:0] !== mkey[d][idx])) begin
        failures++; $display("FAIL host read %0d/%0d: %h", d, idx, h_rdata);
      end
    end
  endtask

  initial begin
    foreach (mval[i, j]) mval[i][j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int r;
      r = $urandom_range(0, 19);
      if (r < 16) send_cell({1'($urandom), 12'h0, 3'($urandom)}, 10'($urandom_range(0, 3)), r != 0, 2'($urandom));
      else host(r == 19, $urandom_range(0, 1), $urandom_range(0, N - 1));
    end
    checks++;
    if (creates == 0 || hits == 0 || full_drops == 0 || bad_drops == 0 || cam_full_drops != 16'(full_drops)) begin
      failures++; $display("FAIL coverage creates %0d hits %0d full %0d (%0d) bad %0d", creates, hits,
                           full_drops, cam_full_drops, bad_drops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
