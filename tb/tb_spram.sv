// tb_spram: writes random words at random addresses and reads them back
// against a model; checks the one-clock read latency and that writes leave
// the read data alone.
module tb_spram;
  logic clk = 0, en = 0, we = 0;
  logic [14:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [int];
  int checks = 0, failures = 0;

  spram #(.WIDTH(16), .DEPTH(32768)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] a;
    logic [15:0] last;
    @(negedge clk);
    for (int k = 0; k < 2000; k++) begin
      a = 15'($urandom_range(0, 255)) | (k[0] ? 15'h7F00 : 15'h0);
      if (!model.exists(int'(a)) || $urandom_range(0, 1)) begin
        en = 1; we = 1; addr = a; wdata = 16'($urandom);
        model[int'(a)] = wdata;
        @(negedge clk);
        checks++;
        if (rdata !== last && k > 0 && last !== 'x) begin
          failures++; $display("FAIL write changed rdata");
        end
      end else begin
        en = 1; we = 0; addr = a;
        @(negedge clk);
        checks++;
        last = rdata;
        if (rdata !== model[int'(a)]) begin failures++; $display("FAIL rd %h got %h want %h", a, rdata, model[int'(a)]); end
      end
      en = 0;
      last = rdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
