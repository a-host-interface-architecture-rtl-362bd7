// tb_llm: initialises the list SRAM through the host port (empty lists, a free
// list of 16 nodes), then runs random appends, unlinks, frees, list deletes
// and status reads against a model of the lists and of the free list's
// order.  Checks every buffer command and returned node, the status words,
// drops when no node is free, and that an append takes at most thirteen
// clocks.
module tb_llm;
  import atm_pkg::*;
  localparam int NODES = 16;
  logic clk = 0, rst_n = 0;
  logic lr_valid = 0, lr_ready;
  list_req_t lr = '0;
  logic bc_valid, bc_full = 0;
  buf_cmd_t bc;
  logic un_req = 0, un_ack, un_empty;
  logic [LIST_W-1:0] un_list = 0, del_list = 0;
  logic [NODE_W-1:0] un_node, fr_node = 0;
  logic fr_req = 0, fr_ack, del_req = 0, del_ack;
  logic h_req = 0, h_we = 0, h_ack;
  logic [14:0] h_addr = 0;
  logic [15:0] h_wdata = 0, h_rdata, no_buffer_drops;
  int checks = 0, failures = 0;

  llm dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int          lists [4][$];
  bit          cmpl [4];
  int          freel [$];
  int          out_nodes [$];
  int          nodrops = 0, maxcyc = 0;

  task automatic hw(input logic [14:0] a, input logic [15:0] d);
    @(negedge clk); h_req = 1; h_we = 1; h_addr = a; h_wdata = d;
    do @(negedge clk); while (!h_ack);
    h_req = 0;
  endtask
  task automatic hr(input logic [14:0] a, output logic [15:0] d);
    @(negedge clk); h_req = 1; h_we = 0; h_addr = a;
    do @(negedge clk); while (!h_ack);
    d = h_rdata; h_req = 0;
  endtask

  task automatic append(input int l, input bit eom, input bit drop);
    int t;
    @(negedge clk);
    lr_valid = 1; lr.list = 9'(l); lr.eom = eom; lr.drop = drop;
    while (!lr_ready) @(negedge clk);
    @(negedge clk); lr_valid = 0;
    t = 1;
    while (!bc_valid) begin @(negedge clk); t++; end
    if (t > maxcyc) maxcyc = t;
    checks++;
    if (t > 13) begin failures++; $display("FAIL append took %0d clocks", t); end
    checks++;
    if (drop || freel.size() == 0) begin
      if (!drop) nodrops++;
      if (!bc.drop) begin failures++; $display("FAIL expected drop"); end
    end else begin
      if (bc.drop || int'(bc.slot) != freel[0]) begin
        failures++; $display("FAIL append slot %0d drop %b, want %0d", bc.slot, bc.drop, freel[0]);
      end
      lists[l].push_back(freel.pop_front());
      if (eom) cmpl[l] = 1;
    end
  endtask

  task automatic unlink(input int l);
    @(negedge clk); un_req = 1; un_list = 9'(l);
    do @(negedge clk); while (!un_ack);
    un_req = 0;
    checks++;
    if (lists[l].size() == 0) begin
      if (!un_empty) begin failures++; $display("FAIL unlink of empty list gave a node"); end
    end else begin
      if (un_empty || int'(un_node) != lists[l][0]) begin
        failures++; $display("FAIL unlink %0d: %0d want %0d", l, un_node, lists[l][0]);
      end
      out_nodes.push_back(lists[l].pop_front());
      if (lists[l].size() == 0) cmpl[l] = 0;
    end
  endtask

  task automatic free_one;
    int n;
    if (out_nodes.size() == 0) return;
    n = out_nodes.pop_front();
    @(negedge clk); fr_req = 1; fr_node = 11'(n);
    do @(negedge clk); while (!fr_ack);
    fr_req = 0;
    freel.push_front(n);
  endtask

  task automatic delete_list(input int l);
    @(negedge clk); del_req = 1; del_list = 9'(l);
    do @(negedge clk); while (!del_ack);
    del_req = 0;
    for (int i = lists[l].size() - 1; i >= 0; i--) freel.push_front(lists[l][i]);
    lists[l].delete();
    cmpl[l] = 0;
  endtask

  task automatic check_status(input int l);
    logic [15:0] d;
    hr(15'(4 * l + 2), d);
    checks++;
    if (d !== {cmpl[l], 15'(lists[l].size())}) begin
      failures++; $display("FAIL status list %0d: %h want %0d/%0d", l, d, cmpl[l], lists[l].size());
    end
  endtask

  // random back-pressure from the buffer command queue
  always @(posedge clk) bc_full <= ($urandom_range(0, 7) == 0);

  initial begin
    logic [15:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 4; l++) begin
      hw(15'(4 * l), 16'hFFFF); hw(15'(4 * l + 1), 16'hFFFF); hw(15'(4 * l + 2), 16'h0);
      cmpl[l] = 0;
    end
    for (int n = 0; n < NODES; n++) begin
      hw(15'h1000 + 15'(n), (n == NODES - 1) ? 16'hFFFF : 16'(n + 1));
      freel.push_back(n);
    end
    hw(15'h0800, 16'h0000);
    hr(15'h1003, d);
    checks++;
    if (d !== 16'd4) begin failures++; $display("FAIL host read back %h", d); end
    for (int k = 0; k < 1500; k++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 45)      append($urandom_range(0, 3), $urandom_range(0, 3) == 0, $urandom_range(0, 9) == 0);
      else if (r < 70) unlink($urandom_range(0, 3));
      else if (r < 90) free_one();
      else if (r < 93) delete_list($urandom_range(0, 3));
      else             check_status($urandom_range(0, 3));
    end
    checks++;
    if (nodrops == 0 || no_buffer_drops != 16'(nodrops)) begin
      failures++; $display("FAIL no-buffer drops %0d counter %0d", nodrops, no_buffer_drops);
    end
    $display("longest append %0d clocks", maxcyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
