// tb_hec_crc8: feeds ATM headers a byte per clock and compares the HEC with a
// long-division reference, including the idle-cell header 00 00 00 01 whose
// HEC is 0x52.
module tb_hec_crc8;
  import atm_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [7:0] din = 0, crc;
  int checks = 0, failures = 0;

  hec_crc8 dut (.clk, .rst_n, .clear, .en, .din, .crc);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] h);
    @(negedge clk) begin clear = 1; en = 0; end
    @(negedge clk) clear = 0;
    for (int i = 3; i >= 0; i--) begin
      en = 1; din = h[8*i +: 8];
      @(negedge clk);
    end
    en = 0;
    checks++;
    if ((crc ^ 8'h55) !== ref_hec(h)) begin
      failures++;
      $display("FAIL hdr %h: got %h want %h", h, crc ^ 8'h55, ref_hec(h));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(32'h0000_0001);
    checks++;
    if ((crc ^ 8'h55) !== 8'h52) begin failures++; $display("FAIL idle-cell HEC %h", crc ^ 8'h55); end
    run(32'h0000_0000);
    for (int k = 0; k < 200; k++) run($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
