// tb_sync_fifo: random pushes and pops against a queue; checks data order,
// count, empty and full.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [7:0] din = 0, dout;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [7:0] q[$];

  sync_fifo #(.WIDTH(8), .DEPTH(16)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      checks++;
      if (count != q.size() || empty != (q.size() == 0) || full != (q.size() == 16)) begin
        failures++; $display("FAIL count %0d model %0d", count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL dout %h want %h", dout, q[0]); end
      end
      // bias towards filling in the first half, emptying in the second
      push = !full  && ($urandom_range(0, 99) < ((k / 500) % 2 ? 35 : 65));
      pop  = !empty && ($urandom_range(0, 99) < ((k / 500) % 2 ? 65 : 35));
      din  = 8'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
