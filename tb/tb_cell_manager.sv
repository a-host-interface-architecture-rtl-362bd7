// tb_cell_manager: sends back-to-back cells (good AAL4, good plain VC, bad
// HEC, bad CRC-10) and checks each token's fields and verdict, that every
// body byte reaches the body FIFO in order, the error counters, and that
// cells arriving while the body FIFO is full are skipped and counted.
module tb_cell_manager;
  import atm_ref_pkg::*;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = 0;
  logic rx_valid = 0, rx_soc = 0;
  logic body_push, body_pop = 0, body_empty, body_full;
  logic [7:0] body_din, body_dout;
  logic [7:0] body_count;
  logic tok_valid, tok_ready = 0;
  cell_info_t tok;
  logic [15:0] cells_in, hec_errors, crc_errors, overflow;
  int checks = 0, failures = 0;

  sync_fifo #(.WIDTH(8), .DEPTH(128)) u_body (.clk, .rst_n, .push(body_push), .din(body_din),
      .pop(body_pop), .dout(body_dout), .empty(body_empty), .full(body_full), .count(body_count));
  cell_manager #(.FIFO_DEPTH(128), .TOK_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected tokens and body bytes
  cell_info_t exp_tok [$];
  logic [7:0] exp_body [$];
  bit drain = 1;

  always @(negedge clk) begin
    tok_ready = $urandom_range(0, 1);
    body_pop  = drain && !body_empty;
  end
  always @(posedge clk) begin
    if (tok_valid && tok_ready) begin
      checks++;
      if (exp_tok.size() == 0 || tok !== exp_tok[0]) begin
        failures++; $display("FAIL token %p", tok);
      end
      if (exp_tok.size() > 0) void'(exp_tok.pop_front());
    end
    if (body_pop && !body_empty) begin
      checks++;
      if (exp_body.size() == 0 || body_dout !== exp_body[0]) begin
        failures++; $display("FAIL body byte %h", body_dout);
      end
      if (exp_body.size() > 0) void'(exp_body.pop_front());
    end
  end

  // kind: 0 good, 1 bad HEC, 2 bad body bit; expect: whether the cell is taken
  task automatic send(input logic [15:0] vci, input int kind, input bit expect_taken);
    cell_t c;
    logic [7:0] p [48];
    cell_info_t t;
    logic [1:0] st;
    logic [9:0] mid;
    logic [5:0] li;
    foreach (p[i]) p[i] = 8'($urandom);
    st = 2'($urandom); mid = 10'($urandom); li = 6'($urandom_range(1, 44));
    c = build_cell(vci, 3'b000, 1'b0, st, 4'($urandom), mid, li, p);
    if (kind == 1) c[2] ^= 8'h10;
    if (kind == 2) c[20] ^= 8'h01;
    t.ok   = (kind == 0) || (kind == 2 && !vci[15]);
    t.aal4 = vci[15];
    t.vci  = (kind == 1) ? {c[1][3:0], c[2], c[3][7:4]} : vci;
    t.mid  = vci[15] ? mid : {c[5][1:0], c[6]};
    t.st   = vci[15] ? seg_type_e'(st) : seg_type_e'(c[5][7:6]);
    t.li   = c[51][7:2];
    if (kind == 1) begin t.aal4 = t.vci[15]; end
    if (expect_taken) begin
      exp_tok.push_back(t);
      for (int i = 5; i < 53; i++) exp_body.push_back(c[i]);
    end
    for (int i = 0; i < 53; i++) begin
      rx_valid = 1; rx_soc = (i == 0); rx_data = c[i];
      @(negedge clk);
    end
    rx_valid = 0; rx_soc = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 40; k++) send(16'h8000 | 16'($urandom), 0, 1);
    for (int k = 0; k < 10; k++) send(16'h0000 | 16'($urandom_range(0, 16'h7FFF)), 0, 1);
    for (int k = 0; k < 5; k++)  send(16'h8101, 1, 1);
    for (int k = 0; k < 5; k++)  send(16'h8202, 2, 1);
    send(16'h0303, 2, 1);
    repeat (60) @(negedge clk);
    // overflow: stop draining; two cells fit in 128 bytes, the third is skipped
    drain = 0;
    send(16'h8400, 0, 1);
    send(16'h8401, 0, 1);
    send(16'h8402, 0, 0);
    drain = 1;
    repeat (200) @(negedge clk);
    checks++;
    if (cells_in != 64 || hec_errors != 5 || crc_errors != 5 || overflow != 1) begin
      failures++;
      $display("FAIL counters in %0d hec %0d crc %0d ovf %0d", cells_in, hec_errors, crc_errors, overflow);
    end
    checks++;
    if (exp_tok.size() != 0 || exp_body.size() != 0) begin
      failures++; $display("FAIL %0d tokens %0d bytes missing", exp_tok.size(), exp_body.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
