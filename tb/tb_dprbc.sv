// tb_dprbc: cell bodies are queued in a byte FIFO with store or drop
// commands for random slots, while read requests stream stored slots back.
// Checks every word read against the bodies written, that dropped bodies are
// flushed, the 48-clock write time per body, and the 24-clock read time per
// slot (one word every two clocks) when the consumer is always ready.
module tb_dprbc;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bq_push = 0, bq_pop, bq_empty, bq_full;
  buf_cmd_t bq_din = '0, bq_dout;
  logic body_push = 0, body_pop, body_empty, body_full;
  logic [7:0] body_din = 0, body_dout;
  logic rd_valid = 0, rd_ready, out_valid, out_last, out_ready = 1;
  logic [NODE_W-1:0] rd_slot = 0;
  logic [31:0] out_data;
  logic [15:0] bodies_stored, bodies_flushed;
  int checks = 0, failures = 0;

  sync_fifo #(.WIDTH(8), .DEPTH(512)) u_body (.clk, .rst_n, .push(body_push), .din(body_din),
      .pop(body_pop), .dout(body_dout), .empty(body_empty), .full(body_full), .count());
  sync_fifo #(.WIDTH($bits(buf_cmd_t)), .DEPTH(16)) u_bq (.clk, .rst_n, .push(bq_push), .din(bq_din),
      .pop(bq_pop), .dout(bq_dout), .empty(bq_empty), .full(bq_full), .count());
  dprbc dut (.clk, .rst_n, .bc_valid(!bq_empty), .bc(bq_dout), .bc_pop(bq_pop),
      .body_dout, .body_empty, .body_pop, .rd_valid, .rd_slot, .rd_ready,
      .out_valid, .out_data, .out_last, .out_ready, .bodies_stored, .bodies_flushed);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [int];   // slot*16+word -> data
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // write one body (all 48 bytes first, then the command)
  task automatic put(input int slot, input bit drop);
    logic [7:0] b [48];
    foreach (b[i]) b[i] = 8'($urandom);
    for (int i = 0; i < 48; i++) begin
      @(negedge clk); body_push = 1; body_din = b[i];
    end
    @(negedge clk); body_push = 0;
    bq_push = 1; bq_din.drop = drop; bq_din.slot = 11'(slot);
    @(negedge clk); bq_push = 0;
    if (!drop) for (int w = 0; w < 12; w++) model[slot * 16 + w] = {b[4*w], b[4*w+1], b[4*w+2], b[4*w+3]};
  endtask

  task automatic get(input int slot, input bit timed);
    int w, t0, t1;
    @(negedge clk);
    rd_valid = 1; rd_slot = 11'(slot);
    while (!rd_ready) @(negedge clk);
    @(negedge clk); rd_valid = 0;
    t0 = cyc;
    w = 0;
    while (w < 12) begin
      out_ready = timed ? 1'b1 : 1'($urandom_range(0, 1));
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== model[slot * 16 + w] || out_last !== (w == 11)) begin
          failures++; $display("FAIL slot %0d word %0d: %h want %h last %b", slot, w, out_data,
                               model[slot * 16 + w], out_last);
        end
        w++;
        t1 = cyc;
      end
      @(negedge clk);
    end
    out_ready = 1;
    if (timed) begin
      checks++;
      if (t1 - t0 > 25) begin failures++; $display("FAIL read of a slot took %0d clocks", t1 - t0); end
    end
  endtask

  // measure the write time of one body when the FIFO already holds it
  task automatic timed_put(input int slot);
    int t0;
    put(slot, 0);
    t0 = cyc;
    while (bodies_stored == 0 && cyc - t0 < 200) @(negedge clk);
    checks++;
    if (cyc - t0 > 50) begin failures++; $display("FAIL body write took %0d clocks", cyc - t0); end
  endtask

  initial begin
    int slots [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    timed_put(5);
    get(5, 1);
    for (int k = 0; k < 40; k++) begin
      int s;
      s = $urandom_range(0, 2047);
      fork
        begin put(s, 0); put((s + 1) % 2048, 1); end
        if (slots.size() > 0) get(slots[0], 0);
      join
      if (slots.size() > 0) void'(slots.pop_front());
      slots.push_back(s);
    end
    while (slots.size() > 0) begin get(slots[0], 0); void'(slots.pop_front()); end
    repeat (100) @(negedge clk);
    checks++;
    if (bodies_stored != 41 || bodies_flushed != 40 || !body_empty) begin
      failures++; $display("FAIL stored %0d flushed %0d", bodies_stored, bodies_flushed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
