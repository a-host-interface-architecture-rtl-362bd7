// tb_rsm_xfer: the host read engine against simple stand-ins for the linked
// list manager and buffer controller.  Checks that the right list is
// unlinked cell by cell, that each slot's 12 words land at consecutive host
// addresses, that each node is freed after its data has gone, the transfer
// count, and the early stop when the list runs empty.
module tb_rsm_xfer;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic [31:0] dest_addr = 0;
  logic [LIST_W-1:0] list = 0, un_list;
  logic [15:0] count = 0, xferred;
  logic un_req, un_ack = 0, un_empty = 0, fr_req, fr_ack = 0;
  logic [NODE_W-1:0] un_node = 0, fr_node, rd_slot;
  logic rd_valid, rd_ready = 0, out_valid = 0, out_last = 0, out_ready;
  logic [31:0] out_data = 0;
  logic m_req, m_we, m_ready;
  logic [31:0] m_addr, m_wdata, m_rdata;
  int checks = 0, failures = 0;

  mem_model #(.WORDS(4096)) u_mem (.clk, .m_req, .m_we, .m_addr, .m_wdata, .m_ready, .m_rdata);
  rsm_xfer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lists [int][$];
  int freed [$];
  int streaming = 0;

  function automatic logic [31:0] word_of(input int slot, input int w);
    return {slot[15:0], 8'hA5, w[7:0]};
  endfunction

  // linked list manager stand-in
  always @(negedge clk) begin
    un_ack = 0; fr_ack = 0;
    if (un_req && !un_ack && $urandom_range(0, 2) == 0) begin
      un_ack = 1;
      un_empty = (lists[int'(un_list)].size() == 0);
      if (!un_empty) un_node = 11'(lists[int'(un_list)].pop_front());
    end
    if (fr_req && !fr_ack && $urandom_range(0, 1) == 0) begin
      fr_ack = 1;
      freed.push_back(int'(fr_node));
      checks++;
      if (streaming != 0) begin failures++; $display("FAIL node freed while its data moves"); end
    end
  end

  // buffer controller stand-in
  initial begin
    forever begin
      @(negedge clk);
      rd_ready = 1;
      if (rd_valid) begin
        int s;
        s = int'(rd_slot);
        @(negedge clk);
        rd_ready = 0;
        streaming = 1;
        for (int w = 0; w < 12; w++) begin
          out_valid = 1; out_data = word_of(s, w); out_last = (w == 11);
          do @(negedge clk); while (!out_ready);
          @(posedge clk); #1;
          out_valid = 0;
        end
        streaming = 0;
      end
    end
  end

  task automatic run(input int l, input int n, input int avail, input int base);
    int slots [$];
    for (int i = 0; i < avail; i++) begin
      slots.push_back($urandom_range(0, 2047));
      lists[l].push_back(slots[i]);
    end
    freed.delete();
    @(negedge clk);
    dest_addr = 32'(base * 4); list = 9'(l); count = 16'(n); start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (int'(xferred) != ((n < avail) ? n : avail)) begin
      failures++; $display("FAIL xferred %0d", xferred);
    end
    for (int c = 0; c < int'(xferred); c++) begin
      checks++;
      if (freed[c] != slots[c]) begin failures++; $display("FAIL freed %0d want %0d", freed[c], slots[c]); end
      for (int w = 0; w < 12; w++) begin
        checks++;
        if (u_mem.mem[base + 12 * c + w] !== word_of(slots[c], w)) begin
          failures++; $display("FAIL cell %0d word %0d: %h", c, w, u_mem.mem[base + 12 * c + w]);
        end
      end
    end
    lists[l].delete();
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(3, 5, 5, 0);
    run(300, 4, 9, 400);
    run(7, 6, 2, 1000);      // list runs empty after 2 cells
    run(8, 0, 3, 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
