// tb_seg_dma: the read engine fetches blocks from the memory model into a
// 16-word buffer.  Checks the words and their order, the streaming rate (a
// word every 2 clocks = 100 ns after a 4-clock set-up), and that a full
// buffer stalls the bus without losing words.
module tb_seg_dma;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [31:0] src_addr = 0, nwords = 0;
  logic m_req, m_we, m_ready;
  logic [31:0] m_addr, m_wdata, m_rdata;
  logic buf_full, buf_push, buf_empty;
  logic [31:0] buf_din, buf_dout;
  logic [4:0] count;
  logic pop = 0;
  int checks = 0, failures = 0;

  mem_model #(.WORDS(1024)) u_mem (.clk, .m_req, .m_we, .m_addr, .m_wdata, .m_ready, .m_rdata);
  seg_dma dut (.clk, .rst_n, .start, .src_addr, .nwords, .busy, .m_req, .m_we, .m_addr, .m_wdata,
               .m_ready, .m_rdata, .buf_full, .buf_push, .buf_din);
  sync_fifo #(.WIDTH(32), .DEPTH(16)) u_buf (.clk, .rst_n, .push(buf_push), .din(buf_din), .pop,
               .dout(buf_dout), .empty(buf_empty), .full(buf_full), .count);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, first_at = -1, last_at = -1, stalls = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (buf_push) begin
      if (first_at < 0) first_at = cyc;
      last_at = cyc;
    end
    if (busy && buf_full) stalls++;
  end

  task automatic run(input int base, input int n, input bit slow);
    int got, start_at;
    for (int i = 0; i < n; i++) u_mem.mem[base + i] = $urandom;
    first_at = -1; last_at = -1;
    repeat (10) @(negedge clk);   // let the previous burst end
    @(negedge clk);
    src_addr = 32'(base * 4); nwords = 32'(n); start = 1;
    start_at = cyc;
    @(negedge clk) start = 0;
    got = 0;
    while (got < n) begin
      pop = !buf_empty && (!slow || $urandom_range(0, 5) == 0);
      if (pop) begin
        checks++;
        if (buf_dout !== u_mem.mem[base + got]) begin
          failures++; $display("FAIL word %0d: %h want %h", got, buf_dout, u_mem.mem[base + got]);
        end
        got++;
      end
      @(negedge clk);
      pop = 0;
    end
    if (!slow) begin
      checks++;
      if (last_at - first_at != 2 * (n - 1) || first_at - start_at != 5) begin
        failures++; $display("FAIL timing n=%0d: first after %0d, span %0d", n, first_at - start_at, last_at - first_at);
      end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 12, 0);
    run(100, 11, 0);
    run(300, 200, 1);
    run(40, 1, 0);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no buffer-full stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
